// tb_bc_clk_gen: checks that the regenerated clocks have periods of 8 and 4
// reference cycles with 50 % duty, that bc_stb_o comes once per BC just before
// the 40 MHz rising edge, and that sync_i sets the phase (rising edge five
// reference cycles after sync).
module tb_bc_clk_gen;
  logic clk = 0, rst = 1, sync = 0;
  logic c40, c80, stb;
  int checks = 0, failures = 0;
  bc_clk_gen dut (.clk_320(clk), .rst(rst), .sync_i(sync), .clk_40_o(c40), .clk_80_o(c80), .bc_stb_o(stb));
  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, last40 = -1, last80 = -1, high40 = 0;
    logic p40 = 0, p80 = 0, pstb = 0;
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk); #0.1;
      n++;
      if (c40) high40++;
      if (c40 && !p40) begin
        if (last40 >= 0) begin
          checks++;
          if (n - last40 != 8) begin failures++; $display("40 MHz period %0d", n - last40); end
        end
        checks++;
        if (!pstb) begin failures++; $display("strobe not before 40 MHz edge"); end
        last40 = n;
      end
      if (c80 && !p80) begin
        if (last80 >= 0) begin
          checks++;
          if (n - last80 != 4) begin failures++; $display("80 MHz period %0d", n - last80); end
        end
        last80 = n;
      end
      p40 = c40; p80 = c80; pstb = stb;
    end
    checks++;
    if (high40 < 196 || high40 > 204) begin failures++; $display("duty %0d/400", high40); end
    // re-phasing
    repeat (3) @(posedge clk);
    #0.1 sync = 1;
    @(posedge clk); #0.1 sync = 0;
    n = 1;
    while (!(c40 && !p40) && n < 20) begin p40 = c40; @(posedge clk); #0.1; n++; end
    checks++;
    if (n != 6) begin failures++; $display("sync phase %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
