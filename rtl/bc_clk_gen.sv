// bc_clk_gen: regenerates the 40 MHz bunch-crossing clock and an 80 MHz clock
// from the 320 MHz reference by counting: a 3-bit counter on clk_320 gives
// clk_80_o = bit 1 (divide by 4) and clk_40_o = bit 2 (divide by 8), both
// straight from flip-flops so they carry no glitches. sync_i (synchronous to
// clk_320) restarts the counter so that the rising edge of clk_40_o follows it
// by five clk_320 cycles, which lets the BC phase be set from an orbit or
// reference signal. bc_stb_o is high for the one clk_320 cycle before each
// clk_40_o rising edge. Dividing 320 MHz down is what the BCM firmware does;
// the counter and the re-phasing input are this design's choices (an FPGA
// build would feed the outputs to global clock buffers).
module bc_clk_gen (
  input  logic clk_320,
  input  logic rst,
  input  logic sync_i,
  output logic clk_40_o,
  output logic clk_80_o,
  output logic bc_stb_o
);
  logic [2:0] cnt;
  always_ff @(posedge clk_320) begin
    if (rst || sync_i) cnt <= 3'd0;
    else               cnt <= cnt + 3'd1;
  end
  always_ff @(posedge clk_320) begin
    if (rst) begin
      clk_40_o <= 1'b0;
      clk_80_o <= 1'b0;
    end else begin
      clk_40_o <= cnt[2];
      clk_80_o <= cnt[1];
    end
  end
  assign bc_stb_o = (cnt == 3'd4);
endmodule
