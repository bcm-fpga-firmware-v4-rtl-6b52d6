// tb_pm_reduce: random samples; checks every 780 ps bit is the OR of its two
// 390 ps bits, the channel placement in the 256-bit word and the valid delay.
module tb_pm_reduce;
  import bcm_pkg::*;
  logic clk = 0, rst = 1, vi, vo;
  logic [N_CH-1:0][63:0] raw;
  logic [255:0] w;
  int checks = 0, failures = 0;
  pm_reduce dut (.clk(clk), .rst(rst), .valid_i(vi), .raw_i(raw), .valid_o(vo), .word_o(w));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vi = 0; raw = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [N_CH-1:0][63:0] s;
      logic [255:0] e;
      bit v;
      for (int c = 0; c < N_CH; c++) s[c] = {$urandom, $urandom} & {$urandom, $urandom};
      v = $urandom_range(0, 1);
      raw = s; vi = v;
      for (int c = 0; c < N_CH; c++)
        for (int k = 0; k < 32; k++) e[32*c + k] = s[c][2*k] || s[c][2*k+1];
      @(posedge clk); #1;
      checks++;
      if (w !== e || vo !== v) begin failures++; $display("word %h exp %h", w, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
