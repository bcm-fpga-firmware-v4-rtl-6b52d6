// pulse_reco: reconstructs up to two pulses from one 64-bit BC sample.
// Bit 0 of raw_i is the earliest 390 ps sample. Rising edges (RE) are bits
// that are 1 after a 0, falling edges (FE) bits that are 0 after a 1, both
// looked for only inside the sample, so bit 0 is never an edge and an all-ones
// sample holds no pulse. The first RE from the forward direction gives pulse 1,
// the last RE from the reverse direction gives pulse 2:
//   pulse 1: pos = FWD_RE, width = FWD_FE - FWD_RE
//   pulse 2: pos = REV_RE, width = REV_FE - REV_RE
// That scheme and the 6/5-bit fields follow the BCM design. This design's own
// choices: FWD_FE is the first FE after FWD_RE, a pulse still high at bit 63
// ends at 64, widths saturate at 31 and pulse 2 is valid only when the sample
// has two or more REs (one pulse is not reported twice). hits_o counts all REs.
// Timing: outputs are registered, one clk (BC) after raw_i.
module pulse_reco
  import bcm_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] raw_i,
  output pulse_t              pulse1_o,
  output pulse_t              pulse2_o,
  output logic [POS_W:0]      hits_o
);
  localparam int unsigned WMAX = (1 << WID_W) - 1;

  logic [SAMPLE_W-1:0] re;
  logic [SAMPLE_W:0]   fe;        // fe[64]: pulse runs past the end
  logic [SAMPLE_W:0]   fe_after;  // falling edges after FWD_RE
  logic [POS_W:0]      fwd_re, rev_re, fwd_fe, rev_fe;
  logic [POS_W:0]      n_re;
  pulse_t              p1_d, p2_d;

  always_comb begin
    re = '0;
    fe = '0;
    for (int i = 1; i < SAMPLE_W; i++) begin
      re[i] = raw_i[i] & ~raw_i[i-1];
      fe[i] = ~raw_i[i] & raw_i[i-1];
    end
    fe[SAMPLE_W] = raw_i[SAMPLE_W-1];
  end

  // forward / reverse search for the first set bit
  always_comb begin
    fwd_re = '0;
    rev_re = '0;
    n_re   = '0;
    for (int i = SAMPLE_W - 1; i >= 0; i--)
      if (re[i]) fwd_re = (POS_W+1)'(i);
    for (int i = 0; i < SAMPLE_W; i++) begin
      if (re[i]) rev_re = (POS_W+1)'(i);
      n_re = n_re + (POS_W+1)'(re[i]);
    end
    fe_after = '0;
    for (int i = 0; i <= SAMPLE_W; i++)
      fe_after[i] = fe[i] && (i > int'(fwd_re));
    fwd_fe = '0;
    rev_fe = '0;
    for (int i = SAMPLE_W; i >= 0; i--)
      if (fe_after[i]) fwd_fe = (POS_W+1)'(i);
    for (int i = 0; i <= SAMPLE_W; i++)
      if (fe[i]) rev_fe = (POS_W+1)'(i);
  end

  function automatic logic [WID_W-1:0] sat_width(input logic [POS_W:0] fe_pos,
                                                 input logic [POS_W:0] re_pos);
    logic [POS_W:0] d;
    d = fe_pos - re_pos;
    return (d > (POS_W+1)'(WMAX)) ? WID_W'(WMAX) : d[WID_W-1:0];
  endfunction

  always_comb begin
    p1_d.valid = (n_re != '0);
    p1_d.pos   = p1_d.valid ? fwd_re[POS_W-1:0] : '0;
    p1_d.width = p1_d.valid ? sat_width(fwd_fe, fwd_re) : '0;
    p2_d.valid = (n_re > (POS_W+1)'(1));
    p2_d.pos   = p2_d.valid ? rev_re[POS_W-1:0] : '0;
    p2_d.width = p2_d.valid ? sat_width(rev_fe, rev_re) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pulse1_o <= '0;
      pulse2_o <= '0;
      hits_o   <= '0;
    end else begin
      pulse1_o <= p1_d;
      pulse2_o <= p2_d;
      hits_o   <= n_re;
    end
  end
endmodule
