// mpmc_npi_model: behavioural model of one write-only native port of a
// multi-port DDR memory controller, for testbenches. Words pushed with
// wr_push go into a write FIFO (FIFO_DEPTH words; wr_full when it has less
// than one word of room). An address request is acknowledged after a random
// 1..MAX_WAIT cycles; on acknowledge the next BURST words of the FIFO are
// written to consecutive 8-byte locations from addr. The memory is a sparse
// array that the testbench reads through read_word().
module mpmc_npi_model #(
  parameter int BURST      = 32,
  parameter int FIFO_DEPTH = 64,
  parameter int MAX_WAIT   = 6
) (
  input  logic        clk,
  input  logic        addr_req,
  output logic        addr_ack,
  input  logic [31:0] addr,
  input  logic        wr_push,
  input  logic [63:0] wr_data,
  output logic        wr_full
);
  logic [63:0] fifo [$];
  logic [63:0] mem [int unsigned];
  int wait_cnt = -1;
  int n_bursts = 0;
  int n_waits  = 0;

  assign wr_full = (fifo.size() >= FIFO_DEPTH);

  initial addr_ack = 1'b0;
  always @(posedge clk) begin
    if (wr_push) fifo.push_back(wr_data);
    addr_ack <= 1'b0;
    if (addr_req && !addr_ack) begin
      if (wait_cnt < 0) wait_cnt = $urandom_range(1, MAX_WAIT);
      else if (wait_cnt > 0) begin wait_cnt--; n_waits++; end
      if (wait_cnt == 0) begin
        addr_ack <= 1'b1;
        wait_cnt = -1;
        for (int i = 0; i < BURST; i++) begin
          if (fifo.size() == 0) $display("mpmc model: burst with too few words");
          else mem[addr + 32'(8 * i)] = fifo.pop_front();
        end
        n_bursts++;
      end
    end
  end

  function automatic logic [63:0] read_word(input int unsigned a);
    return mem.exists(a) ? mem[a] : 64'hDEAD_DEAD_DEAD_DEAD;
  endfunction
endmodule
