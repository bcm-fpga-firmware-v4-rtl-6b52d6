// pm_reduce: halves the time resolution of the samples for post-mortem
// recording. The raw data rate (8 channels x 64 bits x 40 MHz = 2560 MB/s) is
// above what one memory-controller port can write (1600 MB/s), so each pair of
// neighbouring 390 ps bits is ORed into one 780 ps bit (a pulse touching
// either bit is kept). 8 channels x 32 bits make one 256-bit word per BC
// (1280 MB/s), channel 0 in the low 32 bits. The rate reduction to 780 ps is
// the BCM firmware's; combining the bits by OR is this design's choice.
// Timing: word_o / valid_o are registered, one clk after raw_i / valid_i.
module pm_reduce
  import bcm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          valid_i,
  input  logic [N_CH-1:0][SAMPLE_W-1:0] raw_i,
  output logic                          valid_o,
  output logic [N_CH*SAMPLE_W/2-1:0]    word_o
);
  localparam int unsigned HW = SAMPLE_W / 2;
  logic [N_CH*HW-1:0] red;

  always_comb begin
    for (int c = 0; c < N_CH; c++)
      for (int j = 0; j < HW; j++)
        red[c*HW + j] = raw_i[c][2*j] | raw_i[c][2*j+1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      word_o  <= '0;
    end else begin
      valid_o <= valid_i;
      word_o  <= red;
    end
  end
endmodule
