// tb_sync_2ff: random 8-bit values; checks the output equals the input of two
// clock edges earlier.
module tb_sync_2ff;
  logic clk = 0, rst = 1;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  sync_2ff #(.W(8)) dut (.clk(clk), .rst(rst), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] h1 = 0, h2 = 0;
    d = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      d = 8'($urandom);
      @(posedge clk); #1;
      h2 = h1; h1 = d;
      checks++;
      if (q !== h2) begin failures++; $display("q=%h exp %h", q, h2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
