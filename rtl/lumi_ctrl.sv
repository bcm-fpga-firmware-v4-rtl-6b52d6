// lumi_ctrl: luminosity and background classification by time windows.
// Channels 0..N_CH/2-1 are side A, the rest side C. For every BC the first
// pulse of each channel is tested against two windows on its 6-bit position
// (390 ps steps): the in-time window (collision products) and the early window
// (particles arriving from outside, one bunch-crossing-half earlier on the
// upstream side). Per BC:
//   collision = in-time hit on side A and in-time hit on side C
//   bkg_a     = early hit on side A and in-time hit on side C
//   bkg_c     = early hit on side C and in-time hit on side A
//   any       = at least one pulse on any channel (event-OR luminosity)
// These drive the CTP trigger bits and 32-bit event counters (cleared by
// cnt_clr_i, wrapping). Windows are inclusive, lo <= pos <= hi. Applying time
// windows to count collisions and background is the BCM scheme; the side split,
// the window pairing and the counter set are this design's choices.
// Timing: ctp_trig_o is registered, one clk after pulses_i; counters follow.
module lumi_ctrl
  import bcm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  chan_pulses_t [N_CH-1:0] pulses_i,
  input  logic [POS_W-1:0]        win_col_lo_i,
  input  logic [POS_W-1:0]        win_col_hi_i,
  input  logic [POS_W-1:0]        win_bkg_lo_i,
  input  logic [POS_W-1:0]        win_bkg_hi_i,
  input  logic                    cnt_clr_i,
  output logic [2:0]              ctp_trig_o,     // {bkg_c, bkg_a, collision}
  output logic [31:0]             cnt_col_o,
  output logic [31:0]             cnt_bkg_a_o,
  output logic [31:0]             cnt_bkg_c_o,
  output logic [31:0]             cnt_any_o
);
  localparam int unsigned HALF = N_CH / 2;

  logic a_col, c_col, a_bkg, c_bkg, any_hit;
  logic [N_CH-1:0] in_col, in_bkg;

  always_comb begin
    a_col = 1'b0; c_col = 1'b0; a_bkg = 1'b0; c_bkg = 1'b0; any_hit = 1'b0;
    for (int c = 0; c < N_CH; c++) begin
      in_col[c] = pulses_i[c].p1.valid && pulses_i[c].p1.pos >= win_col_lo_i
                  && pulses_i[c].p1.pos <= win_col_hi_i;
      in_bkg[c] = pulses_i[c].p1.valid && pulses_i[c].p1.pos >= win_bkg_lo_i
                  && pulses_i[c].p1.pos <= win_bkg_hi_i;
      any_hit = any_hit | pulses_i[c].p1.valid;
      if (c < HALF) begin
        a_col = a_col | in_col[c];
        a_bkg = a_bkg | in_bkg[c];
      end else begin
        c_col = c_col | in_col[c];
        c_bkg = c_bkg | in_bkg[c];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctp_trig_o <= '0;
      cnt_col_o <= '0; cnt_bkg_a_o <= '0; cnt_bkg_c_o <= '0; cnt_any_o <= '0;
    end else begin
      ctp_trig_o <= {c_bkg & a_col, a_bkg & c_col, a_col & c_col};
      if (cnt_clr_i) begin
        cnt_col_o <= '0; cnt_bkg_a_o <= '0; cnt_bkg_c_o <= '0; cnt_any_o <= '0;
      end else begin
        cnt_col_o   <= cnt_col_o   + 32'(a_col & c_col);
        cnt_bkg_a_o <= cnt_bkg_a_o + 32'(a_bkg & c_col);
        cnt_bkg_c_o <= cnt_bkg_c_o + 32'(c_bkg & a_col);
        cnt_any_o   <= cnt_any_o   + 32'(any_hit);
      end
    end
  end
endmodule
