// tb_async_fifo: writes at 40 MHz and reads at 100 MHz with random enables;
// checks data order against a queue, that full and empty stop writes and
// reads, that the write count never exceeds the depth, and the sticky
// overflow / underflow flags when the rules are broken on purpose.
module tb_async_fifo;
  localparam int AW = 3;
  logic wclk = 0, rclk = 0, rst = 1;
  logic we = 0, re = 0, full, empty, ovf, udf;
  logic [15:0] wd, rd;
  logic [AW:0] wcnt;
  int checks = 0, failures = 0, nw = 0, nr = 0, n_full = 0;
  logic [15:0] q [$];
  async_fifo #(.DW(16), .AW(AW)) dut (.wclk(wclk), .wrst(rst), .wr_en(we), .wdata(wd), .full(full),
    .wr_count(wcnt), .overflow(ovf), .rclk(rclk), .rrst(rst), .rd_en(re), .rdata(rd),
    .empty(empty), .underflow(udf));
  always #12.5 wclk = ~wclk;
  always #5 rclk = ~rclk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit phase_fast_read = 0;
  // writer
  initial begin
    wd = 0;
    repeat (4) @(posedge wclk);
    #1 rst = 0;
    while (nw < 3000) begin
      @(posedge wclk); #1;
      if (full) n_full++;
      checks++;
      if (wcnt > (1 << AW)) begin failures++; $display("count %0d", wcnt); end
      we = !full && ($urandom_range(0, 3) != 0);
      if (we) begin wd = 16'($urandom); q.push_back(wd); nw++; end
      @(negedge wclk);
    end
    @(posedge wclk); #1 we = 0;
  end
  // reader: slow at first so the FIFO fills, fast later
  initial begin
    repeat (10) @(posedge rclk);
    while (nr < 3000) begin
      @(posedge rclk); #1;
      re = 0;
      if (!empty && $urandom_range(0, nr < 1500 ? 9 : 1) == 0) begin
        re = 1;
        checks++;
        if (q.size() == 0 || rd !== q[0]) begin failures++; $display("read %h exp %h", rd, q.size() ? q[0] : 16'h0); end
        if (q.size()) void'(q.pop_front());
        nr++;
      end
    end
    @(posedge rclk); #1 re = 0;
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    checks++;
    if (ovf || udf) begin failures++; $display("flag set by legal traffic"); end
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("not empty at end"); end
    // illegal read and write
    #1 re = 1; @(posedge rclk); #1 re = 0;
    checks++;
    if (!udf) begin failures++; $display("underflow not flagged"); end
    for (int i = 0; i < 12; i++) begin @(posedge wclk); #1 we = 1; wd = 16'(i); end
    @(posedge wclk); #1 we = 0;
    checks++;
    if (!ovf || !full) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
