// tb_pulse_sync_2way: a source at 100 MHz tries to send a pulse every few
// cycles to a 40 MHz destination; pulses offered while busy are refused. The
// destination must see exactly the accepted pulses, each within a bounded
// time, and busy must clear after every transfer.
module tb_pulse_sync_2way;
  logic sclk = 0, dclk = 0, rst = 1;
  logic sp = 0, busy, dp;
  int checks = 0, failures = 0, got = 0, sent = 0, refused = 0;
  pulse_sync_2way dut (.src_clk(sclk), .src_rst(rst), .src_pulse(sp), .src_busy(busy),
                       .dst_clk(dclk), .dst_rst(rst), .dst_pulse(dp));
  always #5 sclk = ~sclk;
  always #12.5 dclk = ~dclk;
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic dp_q = 0;
  always @(posedge dclk) begin
    if (!rst && dp) got++;
    if (!rst && dp) begin
      checks++;
      if (dp_q) begin failures++; $display("destination pulse longer than one cycle"); end
    end
    dp_q <= dp;
  end
  initial begin
    repeat (4) @(posedge dclk);
    #1 rst = 0;
    for (int k = 0; k < 2000; k++) begin
      @(posedge sclk); #1;
      sp = ($urandom_range(0, 2) == 0);
      if (sp && !busy) sent++;
      else if (sp) refused++;
    end
    @(posedge sclk); #1 sp = 0;
    repeat (20) @(posedge dclk);
    checks++;
    if (got != sent) begin failures++; $display("sent %0d received %0d", sent, got); end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    checks++;
    if (refused == 0 || sent < 50) begin failures++; $display("sent %0d refused %0d", sent, refused); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
