// sync_2ff: two-stage flip-flop synchronizer for level signals entering the
// clk domain. Each bit is synchronised on its own, so a multi-bit W is only
// safe for independent bits or gray-coded values. Latency: two clk edges.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
