// tb_abort_ctrl: runs each abort algorithm alone against a cycle-by-cycle
// model (hit counting, a queue of past results, a leaky bucket), checks the
// fire flags every BC, the latched CIBU/DSS outputs, the single post-mortem
// trigger pulse, the clear, and that a disabled algorithm does not abort.
module tb_abort_ctrl;
  import bcm_pkg::*;
  logic clk = 0, rst = 1;
  chan_pulses_t [N_CH-1:0] pulses;
  logic [3:0] thr;
  logic [5:0] xx, yy;
  logic [15:0] inc, leak, per, lthr, bucket;
  logic [2:0] en, fire;
  logic clr, cibu, dss, pmt;
  int checks = 0, failures = 0;

  abort_ctrl #(.Y_MAX(32), .BUCKET_W(16)) dut (
    .clk(clk), .rst(rst), .pulses_i(pulses), .basic_thr_i(thr), .xy_x_i(xx), .xy_y_i(yy),
    .lb_inc_i(inc), .lb_leak_i(leak), .lb_period_i(per), .lb_thr_i(lthr), .alg_en_i(en),
    .abort_clr_i(clr), .fire_o(fire), .bucket_o(bucket), .abort_cibu_o(cibu),
    .abort_dss_o(dss), .pm_trig_o(pmt));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run of n BCs with hit probability 1/pdiv per channel
  task automatic run(input int n, input int pdiv, input bit [2:0] enable);
    bit hist[$];
    int bkt = 0, lcnt = 0, n_pm = 0, fired_any = 0;
    bit latched = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    en = enable;
    for (int t = 0; t < n; t++) begin
      int nh, nf;
      bit b, fxy, flb, leak_now;
      bit [2:0] ef;
      nh = 0;
      nf = 0;
      for (int c = 0; c < N_CH; c++) begin
        pulses[c] = '0;
        pulses[c].p1.valid = ($urandom_range(1, pdiv) == 1);
        nh += pulses[c].p1.valid;
      end
      b = (thr != 0) && (nh >= thr);
      hist.push_front(b);
      if (hist.size() > 32) void'(hist.pop_back());
      for (int i = 0; i < yy && i < hist.size(); i++) nf += hist[i];
      fxy = (xx != 0) && (nf >= xx);
      bkt = bkt + (b ? inc : 0);
      if (bkt > 65535) bkt = 65535;
      leak_now = (per != 0) && (lcnt >= per - 1);
      lcnt = leak_now ? 0 : lcnt + 1;
      if (leak_now) bkt = (bkt > leak) ? bkt - leak : 0;
      flb = (lthr != 0) && (bkt >= lthr);
      ef = {flb, fxy, b};
      @(posedge clk); #1;
      checks++;
      if (fire !== ef || bucket !== 16'(bkt)) begin
        failures++; $display("t=%0d fire %b exp %b bucket %0d exp %0d", t, fire, ef, bucket, bkt);
      end
      if (|(ef & enable)) begin
        if (!latched) begin
          checks++;
          if (!pmt) begin failures++; $display("no post-mortem trigger"); end
        end
        latched = 1;
        fired_any++;
      end
      if (pmt) n_pm++;
      checks++;
      if (cibu !== latched || dss !== latched) begin failures++; $display("latched output"); end
    end
    checks++;
    if (fired_any == 0 || n_pm != 1) begin
      failures++; $display("algorithm %b fired %0d times, %0d pm triggers", enable, fired_any, n_pm);
    end
    clr = 1; pulses = '0; @(posedge clk); #1; clr = 0;
    checks++;
    if (cibu || dss) begin failures++; $display("clear"); end
  endtask

  initial begin
    pulses = '0; clr = 0; en = 0;
    thr = 4; xx = 3; yy = 10; inc = 10; leak = 1; per = 2; lthr = 60;
    repeat (3) @(posedge clk);
    run(500, 4, 3'b001);   // basic only
    run(500, 4, 3'b010);   // X-of-Y only
    run(500, 4, 3'b100);   // leaky bucket only
    // a disabled algorithm never aborts
    rst = 1; @(posedge clk); #1; rst = 0; en = 3'b000;
    for (int t = 0; t < 100; t++) begin
      for (int c = 0; c < N_CH; c++) pulses[c].p1.valid = 1'b1;
      @(posedge clk); #1;
    end
    checks++;
    if (cibu || !fire[0]) begin failures++; $display("disabled algorithm aborted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
