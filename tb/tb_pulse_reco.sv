// tb_pulse_reco: checks pulse_reco against the bit-walking reference model on
// three fixed cases of the BCM firmware (two pulses, all ones, an over-wide
// pulse) and on random samples, including the one-BC output latency.
module tb_pulse_reco;
  import bcm_pkg::*;
  import bcm_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic [63:0] raw;
  pulse_t p1, p2;
  logic [6:0] hits;
  int checks = 0, failures = 0;

  pulse_reco dut (.clk(clk), .rst(rst), .raw_i(raw), .pulse1_o(p1), .pulse2_o(p2), .hits_o(hits));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_check(input logic [63:0] s);
    chan_pulses_t e;
    e = ref_pulses(s);
    raw = s;
    @(posedge clk); #1;
    checks++;
    if (p1 !== e.p1 || p2 !== e.p2 || hits !== 7'(ref_hits(s))) begin
      failures++;
      $display("MISMATCH raw=%h p1=%p p2=%p hits=%0d exp p1=%p p2=%p hits=%0d",
               s, p1, p2, hits, e.p1, e.p2, ref_hits(s));
    end
  endtask

  task automatic fixed(input logic [63:0] s, input bit v1, input int x1, input int w1,
                       input bit v2, input int x2, input int w2);
    raw = s;
    @(posedge clk); #1;
    checks++;
    if (p1.valid !== v1 || (v1 && (p1.pos !== 6'(x1) || p1.width !== 5'(w1))) ||
        p2.valid !== v2 || (v2 && (p2.pos !== 6'(x2) || p2.width !== 5'(w2)))) begin
      failures++;
      $display("WAVEFORM CASE raw=%h got p1=%p p2=%p", s, p1, p2);
    end
  endtask

  initial begin
    raw = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // the three cases of the simulation waveforms
    fixed(64'h07fc00000001ff80, 1, 7, 10, 1, 50, 9);
    fixed(64'hffffffffffffffff, 0, 0, 0, 0, 0, 0);
    fixed(64'h7ffffffffffffffe, 1, 1, 31, 0, 0, 0);
    // latency: the output changes exactly one clock after the input
    raw = 64'h0000_0000_0000_00f0;
    @(posedge clk); #1;
    raw = 64'h0;
    checks++;
    if (!(p1.valid && p1.pos == 4 && p1.width == 4)) begin failures++; $display("latency"); end
    @(posedge clk); #1;
    checks++;
    if (p1.valid) begin failures++; $display("latency (clear)"); end
    // middle pulses are not reported, last pulse runs to the end
    fixed(64'h8000_0f00_00f0_0006, 1, 1, 2, 1, 63, 1);
    for (int i = 0; i < 5000; i++) apply_check(rand_sample());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
