// pulse_sync_2way: carries a one-cycle pulse from src_clk to dst_clk with an
// acknowledge back to the source. A src pulse raises req; req crosses to the
// destination (sync_2ff), where its rising edge gives dst_pulse; the
// synchronised req is returned as ack; the source drops req on ack and stays
// busy until ack has fallen again (four-phase handshake). A src_pulse while
// src_busy is high is not accepted. Busy time: about 2x2 cycles of each clock.
// Only the name is given by the design; the handshake is this design's choice.
module pulse_sync_2way (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  output logic src_busy,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic req, ack_s, req_s, req_q;
  always_ff @(posedge src_clk) begin
    if (src_rst)                          req <= 1'b0;
    else if (src_pulse && !src_busy)      req <= 1'b1;
    else if (ack_s)                       req <= 1'b0;
  end
  assign src_busy = req | ack_s;
  sync_2ff #(.W(1)) u_req (.clk(dst_clk), .rst(dst_rst), .d(req),   .q(req_s));
  sync_2ff #(.W(1)) u_ack (.clk(src_clk), .rst(src_rst), .d(req_s), .q(ack_s));
  always_ff @(posedge dst_clk) begin
    if (dst_rst) req_q <= 1'b0;
    else         req_q <= req_s;
  end
  assign dst_pulse = req_s & ~req_q;
endmodule
