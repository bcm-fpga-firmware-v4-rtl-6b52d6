// npi_ctrl: writes the post-mortem data stream into DDR2 through a native
// port interface (NPI) of the multi-port memory controller. The memory is
// split into two buffers of BUF_BYTES; they are filled in turn as one ring.
// Each FIFO entry holds IN_WORDS words of DW bits. The controller works in
// bursts of BURST words:
//   PUSH : one word per cycle is pushed into the NPI write FIFO
//          (npi_wr_push_o) while the user FIFO has data and the NPI FIFO has
//          room; burst_cnt counts 0..BURST-1. An empty user FIFO stalls.
//   REQ  : npi_addr_req_o is held with the burst address until
//          npi_addr_ack_i; then the address advances by one burst
//          (wrapping at 2*BUF_BYTES) and the next burst starts.
// When the address leaves a buffer its bit in irq_status_o is set (cleared by
// irq_clr_i), telling software that the buffer is full. While freeze_i is high
// no new burst is started (the post-mortem buffer is kept); last_addr_o is the
// address of the last burst written. Push-then-request, the 32-word bursts
// and the 2x128 MB split follow the BCM firmware; the entry width and the
// status bits are this design's choices.
module npi_ctrl #(
  parameter int unsigned DW        = 64,
  parameter int unsigned IN_WORDS  = 4,
  parameter int unsigned BURST     = 32,
  parameter longint unsigned BUF_BYTES = 134217728,
  parameter logic [31:0] BASE_ADDR = 32'h0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   enable_i,
  input  logic                   freeze_i,
  // user FIFO, first-word fall-through
  input  logic                   fifo_empty_i,
  input  logic [IN_WORDS*DW-1:0] fifo_rdata_i,
  output logic                   fifo_rd_en_o,
  // NPI
  output logic                   npi_addr_req_o,
  input  logic                   npi_addr_ack_i,
  output logic [31:0]            npi_addr_o,
  output logic                   npi_wr_push_o,
  output logic [DW-1:0]          npi_wr_data_o,
  input  logic                   npi_wr_full_i,
  // status
  input  logic                   irq_clr_i,
  output logic [1:0]             irq_status_o,
  output logic [$clog2(BURST)-1:0] burst_cnt_o,
  output logic [31:0]            last_addr_o,
  output logic                   busy_o
);
  localparam int unsigned SW = (IN_WORDS > 1) ? $clog2(IN_WORDS) : 1;
  localparam int unsigned BW = $clog2(BURST);
  localparam longint unsigned BURST_BYTES = longint'(BURST) * DW / 8;
  localparam longint unsigned RING_BYTES  = 2 * BUF_BYTES;

  typedef enum logic [1:0] {S_IDLE, S_PUSH, S_REQ} state_e;
  state_e st;
  logic [SW-1:0] sub;
  logic [31:0]   offs;          // byte offset in the ring
  logic          push;
  logic [31:0]   offs_next;

  assign push = (st == S_PUSH) && !fifo_empty_i && !npi_wr_full_i;
  assign npi_wr_push_o = push;
  assign npi_wr_data_o = fifo_rdata_i[sub*DW +: DW];
  assign fifo_rd_en_o  = push && (sub == SW'(IN_WORDS - 1));
  assign npi_addr_req_o = (st == S_REQ);
  assign npi_addr_o     = BASE_ADDR + offs;
  assign offs_next = (64'(offs) + BURST_BYTES >= RING_BYTES) ? 32'd0 : 32'(64'(offs) + BURST_BYTES);
  assign busy_o = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; sub <= '0; offs <= '0; burst_cnt_o <= '0;
      irq_status_o <= '0; last_addr_o <= '0;
    end else begin
      if (irq_clr_i) irq_status_o <= '0;
      unique case (st)
        S_IDLE: if (enable_i && !freeze_i && !fifo_empty_i) st <= S_PUSH;
        S_PUSH: if (push) begin
                  sub <= (sub == SW'(IN_WORDS - 1)) ? '0 : sub + 1'b1;
                  burst_cnt_o <= burst_cnt_o + 1'b1;
                  if (burst_cnt_o == BW'(BURST - 1)) st <= S_REQ;
                end
        S_REQ:  if (npi_addr_ack_i) begin
                  last_addr_o <= BASE_ADDR + offs;
                  offs <= offs_next;
                  // buffer boundary crossed: that buffer is full
                  if (64'(offs_next) == BUF_BYTES) irq_status_o[0] <= 1'b1;
                  if (offs_next == 32'd0)          irq_status_o[1] <= 1'b1;
                  st <= (enable_i && !freeze_i) ? S_PUSH : S_IDLE;
                end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the address request is held until it is acknowledged
  a_req_hold: assert property (@(posedge clk) disable iff (rst)
    npi_addr_req_o && !npi_addr_ack_i |=> npi_addr_req_o);
endmodule
