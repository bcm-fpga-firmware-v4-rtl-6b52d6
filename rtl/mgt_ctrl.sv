// mgt_ctrl: receive path between the multi-gigabit transceivers and the pulse
// processing, one lane per channel. Each BC the transceiver delivers 64 bits
// of the 2.56 Gb/s sensor stream (bit 0 first).
//  * Fine delay: the stream of a channel can be delayed by 0..63 bits
//    (390 ps steps) across word boundaries, the function of the transceiver's
//    RX-slide feature: out = ({word, previous word} >> (64 - delay)).
//  * Test-vector playback: software writes up to TV_DEPTH 64-bit words per
//    channel into a block RAM (tv_we_i). Channels with tv_sel_i set take their
//    samples from it instead of the transceiver, one word per BC, looping over
//    words 0..tv_len_i-1 while tv_run_i is high (restarts at word 0 when
//    tv_run_i is low).
// Fine delay and test-vector playback are BCM firmware features; the barrel
// shifter, the memory size and the loop control are this design's choices.
// Timing: raw_o is registered, one clk (BC) after rx_i; playback data are
// read from the RAM one clk after the address advances.
module mgt_ctrl
  import bcm_pkg::*;
#(
  parameter int unsigned TV_DEPTH = 256
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [N_CH-1:0][SAMPLE_W-1:0]      rx_i,
  input  logic [N_CH-1:0][POS_W-1:0]         delay_i,
  input  logic [N_CH-1:0]                    tv_sel_i,
  input  logic                               tv_run_i,
  input  logic [$clog2(TV_DEPTH):0]          tv_len_i,
  input  logic                               tv_we_i,
  input  logic [$clog2(N_CH)-1:0]            tv_wch_i,
  input  logic [$clog2(TV_DEPTH)-1:0]        tv_waddr_i,
  input  logic [SAMPLE_W-1:0]                tv_wdata_i,
  output logic [N_CH-1:0][SAMPLE_W-1:0]      raw_o
);
  localparam int unsigned AW = $clog2(TV_DEPTH);

  logic [AW-1:0] tv_addr;
  logic [N_CH-1:0][SAMPLE_W-1:0] prev, tv_q;

  // playback address, common to all channels
  always_ff @(posedge clk) begin
    if (rst || !tv_run_i)
      tv_addr <= '0;
    else if ({1'b0, tv_addr} >= tv_len_i - 1'b1)
      tv_addr <= '0;
    else
      tv_addr <= tv_addr + 1'b1;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [SAMPLE_W-1:0] mem [TV_DEPTH];
    logic [2*SAMPLE_W-1:0] both;
    logic [SAMPLE_W-1:0]   delayed;

    always_ff @(posedge clk) begin
      if (tv_we_i && tv_wch_i == ($clog2(N_CH))'(c)) mem[tv_waddr_i] <= tv_wdata_i;
      tv_q[c] <= mem[tv_addr];
    end

    assign both    = {rx_i[c], prev[c]} >> (SAMPLE_W - int'(delay_i[c]));
    assign delayed = both[SAMPLE_W-1:0];

    always_ff @(posedge clk) begin
      if (rst) begin
        prev[c]  <= '0;
        raw_o[c] <= '0;
      end else begin
        prev[c]  <= rx_i[c];
        raw_o[c] <= tv_sel_i[c] ? tv_q[c] : delayed;
      end
    end
  end
endmodule
