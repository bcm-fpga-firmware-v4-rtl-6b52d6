// tb_pulse_sync_1way: sends single-cycle pulses, spaced apart, from a 40 MHz
// to a 100 MHz domain and back the other way round; checks every pulse arrives
// exactly once as a one-cycle pulse within four destination cycles.
module tb_pulse_sync_1way;
  logic sclk = 0, dclk = 0, rst = 1;
  logic sp = 0, dp;
  int checks = 0, failures = 0, got = 0;
  pulse_sync_1way dut (.src_clk(sclk), .src_rst(rst), .src_pulse(sp), .dst_clk(dclk), .dst_rst(rst), .dst_pulse(dp));
  always #12.5 sclk = ~sclk;
  always #5 dclk = ~dclk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge dclk) if (!rst && dp) got++;
  initial begin
    repeat (4) @(posedge sclk);
    #1 rst = 0;
    for (int k = 0; k < 200; k++) begin
      int n0, n;
      n0 = got;
      @(posedge sclk); #1 sp = 1;
      @(posedge sclk); #1 sp = 0;
      n = 0;
      while (got == n0 && n < 10) begin @(posedge dclk); #1; n++; end
      checks++;
      if (got != n0 + 1 || n > 4) begin failures++; $display("pulse %0d: got %0d after %0d", k, got - n0, n); end
      repeat ($urandom_range(1, 4)) @(posedge sclk);
      checks++;
      if (got != n0 + 1) begin failures++; $display("extra pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
