// tb_npi_ctrl: a queue stands in for the user FIFO (with random gaps, so the
// controller stalls on empty) and mpmc_npi_model for the memory controller.
// With two buffers of 1 KiB the ring wraps several times; the test checks the
// burst counter and request order, that the memory holds the last ring's worth
// of the stream at the right addresses, the per-buffer interrupt bits and
// their clear, and that freeze stops recording at a burst boundary.
module tb_npi_ctrl;
  localparam int BUF = 1024, BURST = 32, IN_WORDS = 4;
  localparam int N_ENTRIES = 3 * (2 * BUF / 8) / IN_WORDS + 5 * (BURST / IN_WORDS);
  logic clk = 0, rst = 1;
  logic en, frz, empty, rd_en, req, ack, push, full, irq_clr, busy;
  logic [255:0] rdata;
  logic [31:0] addr, last;
  logic [63:0] wdata;
  logic [1:0] irq;
  logic [4:0] bcnt;
  int checks = 0, failures = 0;
  logic [255:0] q [$];
  logic [63:0] stream [$];
  int n_stall = 0, n_irq0 = 0, n_irq1 = 0;

  npi_ctrl #(.DW(64), .IN_WORDS(IN_WORDS), .BURST(BURST), .BUF_BYTES(BUF), .BASE_ADDR(32'h1000_0000)) dut (
    .clk(clk), .rst(rst), .enable_i(en), .freeze_i(frz), .fifo_empty_i(empty),
    .fifo_rdata_i(rdata), .fifo_rd_en_o(rd_en), .npi_addr_req_o(req), .npi_addr_ack_i(ack),
    .npi_addr_o(addr), .npi_wr_push_o(push), .npi_wr_data_o(wdata), .npi_wr_full_i(full),
    .irq_clr_i(irq_clr), .irq_status_o(irq), .burst_cnt_o(bcnt), .last_addr_o(last), .busy_o(busy));
  mpmc_npi_model #(.BURST(BURST)) u_mem (.clk(clk), .addr_req(req), .addr_ack(ack), .addr(addr),
    .wr_push(push), .wr_data(wdata), .wr_full(full));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // user FIFO: entries become visible at random times
  logic [255:0] pending [$];
  logic show;
  assign empty = !(show && q.size() > 0);
  assign rdata = (q.size() > 0) ? q[0] : '0;
  always @(posedge clk) begin
    show <= ($urandom_range(0, 4) != 0);
    if (rd_en) begin
      checks++;
      if (empty) begin failures++; $display("read from empty FIFO"); end
      else void'(q.pop_front());
    end
    if (!rst && busy && empty) n_stall++;
    if (irq[0]) n_irq0++;
    if (irq[1]) n_irq1++;
  end

  // every push must be the next word of the stream, counted by burst_cnt
  int n_push = 0;
  always @(posedge clk) if (push) begin
    checks++;
    if (bcnt !== 5'(n_push % BURST) || wdata !== stream[n_push]) begin
      failures++; $display("push %0d: cnt %0d data %h exp %h", n_push, bcnt, wdata, stream[n_push]);
    end
    n_push++;
  end

  initial begin
    en = 0; frz = 0; irq_clr = 0; show = 0;
    for (int e = 0; e < N_ENTRIES; e++) begin
      logic [255:0] x;
      for (int w = 0; w < IN_WORDS; w++) begin
        x[64*w +: 64] = {32'(e), 32'(w) ^ $urandom};
        stream.push_back(x[64*w +: 64]);
      end
      q.push_back(x);
    end
    repeat (3) @(posedge clk);
    #1 rst = 0; en = 1;
    wait (u_mem.n_bursts >= 3 * (2 * BUF) / (8 * BURST));   // three times round the ring
    @(posedge clk); #1;
    checks++;
    if (n_irq0 == 0 || n_irq1 == 0) begin failures++; $display("buffer interrupts %0d %0d", n_irq0, n_irq1); end
    irq_clr = 1; @(posedge clk); #1 irq_clr = 0;
    checks++;
    if (irq != 2'b00) begin failures++; $display("irq clear"); end
    // freeze: the running burst completes, then nothing more
    frz = 1;
    wait (!busy);
    repeat (50) @(posedge clk);
    #1;
    begin
      int nb, base;
      nb = u_mem.n_bursts;
      checks++;
      if (n_push != nb * BURST) begin failures++; $display("pushed %0d for %0d bursts", n_push, nb); end
      checks++;
      if (last !== 32'h1000_0000 + 32'(((nb - 1) * BURST * 8) % (2 * BUF))) begin
        failures++; $display("last address %h", last);
      end
      // the memory holds the last 2*BUF bytes of the stream
      base = nb * BURST - (2 * BUF / 8);
      for (int k = base; k < nb * BURST; k++) begin
        int unsigned a;
        a = 32'h1000_0000 + 32'((k * 8) % (2 * BUF));
        checks++;
        if (u_mem.read_word(a) !== stream[k]) begin
          failures++; $display("mem[%h] = %h exp %h", a, u_mem.read_word(a), stream[k]);
        end
      end
    end
    checks++;
    if (n_stall == 0 || u_mem.n_waits == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
