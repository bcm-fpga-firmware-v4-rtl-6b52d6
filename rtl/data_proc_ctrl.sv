// data_proc_ctrl: per-BC data processing of all channels. One pulse_reco per
// channel turns each 64-bit sample into two pulses; the pulses are packed into
// the 176-bit TDAQ record (channel 0 first, per channel P1 position, P1 width,
// P2 position, P2 width, most significant bit first), the order of the ROD data
// format. It also sums the hits of all channels in the BC and keeps a 32-bit
// running total of hits (counter width is this design's choice; it wraps).
// Timing: pulses_o, rec_o and bc_hits_o are valid one clk (BC) after raw_i;
// hit_total_o includes them one clk later.
module data_proc_ctrl
  import bcm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_CH-1:0][SAMPLE_W-1:0] raw_i,
  output chan_pulses_t [N_CH-1:0]       pulses_o,
  output logic [REC_W-1:0]              rec_o,
  output logic [POS_W+3:0]              bc_hits_o,
  output logic [31:0]                   hit_total_o
);
  logic [N_CH-1:0][POS_W:0] hits;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    pulse_reco u_reco (
      .clk(clk), .rst(rst), .raw_i(raw_i[c]),
      .pulse1_o(pulses_o[c].p1), .pulse2_o(pulses_o[c].p2), .hits_o(hits[c])
    );
    // channel 0 occupies the most significant 22 bits
    assign rec_o[REC_W-1-c*2*(POS_W+WID_W) -: 2*(POS_W+WID_W)] =
      {pulses_o[c].p1.pos, pulses_o[c].p1.width, pulses_o[c].p2.pos, pulses_o[c].p2.width};
  end

  always_comb begin
    bc_hits_o = '0;
    for (int c = 0; c < N_CH; c++) bc_hits_o = bc_hits_o + (POS_W+4)'(hits[c]);
  end

  always_ff @(posedge clk) begin
    if (rst) hit_total_o <= '0;
    else     hit_total_o <= hit_total_o + 32'(bc_hits_o);
  end
endmodule
