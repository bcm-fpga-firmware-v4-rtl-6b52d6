// edge_detect: rising-edge detector of the clock-domain-crossing library.
// pulse is high for one clk cycle after d has gone from 0 to 1. d must already
// be synchronous to clk (put sync_2ff in front of an asynchronous signal).
// Timing: pulse is combinational from d and the one-cycle-old copy of d.
// Only the name is given by the design; the rising-only behaviour is a choice.
module edge_detect (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic pulse
);
  logic d_q;
  always_ff @(posedge clk) begin
    if (rst) d_q <= 1'b0;
    else     d_q <= d;
  end
  assign pulse = d & ~d_q;
endmodule
