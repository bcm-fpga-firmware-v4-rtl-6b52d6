// bcm_pkg: types and constants shared by the BCM readout and abort logic.
// One BC (bunch crossing, 25 ns) carries a 64-bit sample per channel, one bit
// per 390 ps. A reconstructed pulse is a 6-bit rising-edge position and a
// 5-bit width; each channel reports up to two pulses, so 8 channels give the
// 176-bit per-BC record sent to TDAQ. The channel count, sample width and field
// widths are the ones of the BCM system; the enum and struct layout are this
// design's own.
package bcm_pkg;
  localparam int unsigned N_CH      = 8;   // channels per FPGA
  localparam int unsigned SAMPLE_W  = 64;  // bits per BC per channel
  localparam int unsigned POS_W     = 6;   // rising-edge position
  localparam int unsigned WID_W     = 5;   // pulse width
  localparam int unsigned BCID_W    = 12;
  localparam int unsigned REC_W     = N_CH * 2 * (POS_W + WID_W);  // 176

  typedef struct packed {
    logic             valid;
    logic [POS_W-1:0] pos;
    logic [WID_W-1:0] width;
  } pulse_t;

  typedef struct packed {
    pulse_t p1;
    pulse_t p2;
  } chan_pulses_t;

  // Operation mode chosen by software: the same firmware serves both RODs.
  typedef enum logic {
    MODE_ABORT = 1'b0,   // 8 low-gain channels, beam abort ROD
    MODE_LUMI  = 1'b1    // 8 high-gain channels, luminosity ROD
  } bcm_mode_e;
endpackage
