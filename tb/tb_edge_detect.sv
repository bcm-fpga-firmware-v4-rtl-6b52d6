// tb_edge_detect: random input levels; checks that pulse is high exactly in
// the cycles where the input has just gone from 0 to 1.
module tb_edge_detect;
  logic clk = 0, rst = 1, d = 0, p;
  int checks = 0, failures = 0, n_edges = 0;
  edge_detect dut (.clk(clk), .rst(rst), .d(d), .pulse(p));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic prev = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      d = $urandom_range(0, 1);
      #1;
      checks++;
      if (p !== (d && !prev)) begin failures++; $display("t=%0d d=%b prev=%b pulse=%b", t, d, prev, p); end
      n_edges += (d && !prev);
      @(posedge clk); #1;
      prev = d;
    end
    checks++;
    if (n_edges < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
