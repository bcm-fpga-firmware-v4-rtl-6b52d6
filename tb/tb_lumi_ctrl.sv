// tb_lumi_ctrl: random pulse positions against fixed windows; checks the CTP
// trigger bits of each BC and the four event counters, then the counter clear.
module tb_lumi_ctrl;
  import bcm_pkg::*;
  logic clk = 0, rst = 1, clr = 0;
  chan_pulses_t [N_CH-1:0] pulses;
  logic [2:0] trig;
  logic [31:0] c_col, c_ba, c_bc, c_any;
  int checks = 0, failures = 0;
  int n_col = 0, n_ba = 0, n_bc = 0, n_any = 0;
  localparam logic [5:0] CL = 20, CH = 35, BL = 2, BH = 12;

  lumi_ctrl dut (.clk(clk), .rst(rst), .pulses_i(pulses), .win_col_lo_i(CL), .win_col_hi_i(CH),
                 .win_bkg_lo_i(BL), .win_bkg_hi_i(BH), .cnt_clr_i(clr), .ctp_trig_o(trig),
                 .cnt_col_o(c_col), .cnt_bkg_a_o(c_ba), .cnt_bkg_c_o(c_bc), .cnt_any_o(c_any));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulses = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      bit ac, cc, ab, cb, an;
      bit [2:0] e;
      ac = 0; cc = 0; ab = 0; cb = 0; an = 0;
      for (int c = 0; c < N_CH; c++) begin
        pulses[c] = '0;
        pulses[c].p1.valid = ($urandom_range(0, 3) == 0);
        pulses[c].p1.pos   = 6'($urandom_range(0, 63));
        pulses[c].p1.width = 5'($urandom);
        pulses[c].p2.pos   = 6'($urandom);   // ignored
        if (pulses[c].p1.valid) begin
          int p;
          p = pulses[c].p1.pos;
          an = 1;
          if (c < 4) begin ac |= (p >= CL && p <= CH); ab |= (p >= BL && p <= BH); end
          else       begin cc |= (p >= CL && p <= CH); cb |= (p >= BL && p <= BH); end
        end
      end
      e = {cb && ac, ab && cc, ac && cc};
      @(posedge clk); #1;
      n_col += e[0]; n_ba += e[1]; n_bc += e[2]; n_any += an;
      checks++;
      if (trig !== e) begin failures++; $display("trig %b exp %b", trig, e); end
      checks++;
      if (c_col != n_col || c_ba != n_ba || c_bc != n_bc || c_any != n_any) begin
        failures++; $display("counters %0d %0d %0d %0d exp %0d %0d %0d %0d",
                             c_col, c_ba, c_bc, c_any, n_col, n_ba, n_bc, n_any);
      end
    end
    checks++;
    if (n_col == 0 || n_ba == 0 || n_bc == 0) begin failures++; $display("an event class never occurred"); end
    clr = 1; @(posedge clk); #1; clr = 0;
    checks++;
    if (c_col != 0 || c_any != 0) begin failures++; $display("clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
