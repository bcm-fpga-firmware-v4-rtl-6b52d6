// pulse_sync_1way: carries a one-cycle pulse from the src_clk domain to the
// dst_clk domain without acknowledge. A src pulse flips a toggle flip-flop; the
// toggle level crosses through sync_2ff and an edge on it (either direction)
// gives one dst_clk-cycle pulse. Latency 2-3 dst_clk cycles. Pulses closer
// than about three dst_clk cycles merge: use pulse_sync_2way when the source
// needs to know. The toggle scheme is this design's choice.
module pulse_sync_1way (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tgl, tgl_s, tgl_q;
  always_ff @(posedge src_clk) begin
    if (src_rst)        tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end
  sync_2ff #(.W(1)) u_sync (.clk(dst_clk), .rst(dst_rst), .d(tgl), .q(tgl_s));
  always_ff @(posedge dst_clk) begin
    if (dst_rst) tgl_q <= 1'b0;
    else         tgl_q <= tgl_s;
  end
  assign dst_pulse = tgl_s ^ tgl_q;
endmodule
