// rod_ctrl: ROD (readout driver) function and S-LINK output. Every BC the
// 12-bit BCID, the 176-bit pulse record and a 4-bit error code are written
// into a latency ring buffer of LAT_DEPTH entries. An L1A, arriving lat_i BCs
// after its bunch crossing, reads that entry back and queues an event
// (data plus extended L1ID, trigger type, BCID) in a small event FIFO
// (EV_DEPTH events; an L1A with the FIFO full is dropped and counted). The
// sender turns each event into one ROD fragment:
//   S-LINK begin control word (slink_ctrl_o = 1)
//   header  9 words: 0xEE1234EE, header size 9, ROD_VERSION, SOURCE_ID,
//                    {0, 31-bit run number}, {ECR count, 24-bit L1ID},
//                    BCID, trigger type, detector event type
//   data    6 words: 192 bits = 12-bit BCID, for channel 0..7 P1 position,
//                    P1 width, P2 position, P2 width (6+5+6+5 bits), then the
//                    4-bit error code, most significant bit first
//   trailer 5 words: status 1 (error bits), status 2 (number of data words
//                    with errors), number of status words (2), number of
//                    data words (6), status block position (1 = after data)
//   S-LINK end control word (slink_ctrl_o = 1)
// A word is written (slink_wen_o) only while the link is not full
// (slink_ff_i low). The word list and the data packing follow the BCM ROD data
// format; the marker and control word values, the latency buffer, the event
// FIFO and the status-word contents are this design's choices.
// Timing: an event starts at the earliest 3 clk after its L1A; a fragment
// takes 22 clk without back-pressure.
module rod_ctrl
  import bcm_pkg::*;
#(
  parameter int unsigned LAT_DEPTH   = 256,
  parameter int unsigned EV_DEPTH    = 8,
  parameter logic [31:0] ROD_VERSION = 32'h0301_0000,
  parameter logic [31:0] SOURCE_ID   = 32'h0081_0000
) (
  input  logic                         clk,
  input  logic                         rst,
  // per-BC data
  input  logic [BCID_W-1:0]            bcid_i,
  input  logic [REC_W-1:0]             rec_i,
  input  logic [3:0]                   err_i,
  input  logic [$clog2(LAT_DEPTH)-1:0] lat_i,
  // trigger
  input  logic                         l1a_i,
  input  logic [31:0]                  l1id_i,
  input  logic [7:0]                   ttype_i,
  input  logic [30:0]                  run_i,
  input  logic [31:0]                  det_type_i,
  // S-LINK
  output logic [31:0]                  slink_data_o,
  output logic                         slink_ctrl_o,
  output logic                         slink_wen_o,
  input  logic                         slink_ff_i,
  // status
  output logic [15:0]                  drop_cnt_o,
  output logic [31:0]                  ev_cnt_o
);
  localparam int unsigned LW = $clog2(LAT_DEPTH);
  localparam int unsigned EW = $clog2(EV_DEPTH);
  localparam int unsigned DATA_W = BCID_W + REC_W + 4;   // 192
  localparam int unsigned N_WORDS = 1 + 9 + 6 + 5 + 1;   // 22
  localparam logic [31:0] HDR_MARKER = 32'hEE12_34EE;
  localparam logic [31:0] SLINK_BOF  = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF  = 32'hE0F0_0000;

  typedef struct packed {
    logic [DATA_W-1:0] data;   // {bcid, rec, err}
    logic [31:0]       l1id;
    logic [7:0]        ttype;
  } event_t;

  // latency ring buffer
  logic [DATA_W-1:0] lat_mem [LAT_DEPTH];
  logic [LW-1:0]     wptr;
  logic [DATA_W-1:0] lat_q;
  logic              l1a_q;
  logic [31:0]       l1id_q;
  logic [7:0]        ttype_q;

  always_ff @(posedge clk) begin
    lat_mem[wptr] <= {bcid_i, rec_i, err_i};
    lat_q <= lat_mem[wptr - lat_i];
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; l1a_q <= 1'b0; l1id_q <= '0; ttype_q <= '0;
    end else begin
      wptr  <= wptr + 1'b1;
      l1a_q <= l1a_i;
      if (l1a_i) begin
        l1id_q  <= l1id_i;
        ttype_q <= ttype_i;
      end
    end
  end

  // event FIFO
  event_t        ev_mem [EV_DEPTH];
  logic [EW:0]   ev_wp, ev_rp;
  logic          ev_full, ev_empty, ev_pop;
  event_t        ev;
  assign ev_full  = (ev_wp - ev_rp) == (EW+1)'(EV_DEPTH);
  assign ev_empty = (ev_wp == ev_rp);
  assign ev       = ev_mem[ev_rp[EW-1:0]];

  always_ff @(posedge clk) begin
    if (l1a_q && !ev_full) ev_mem[ev_wp[EW-1:0]] <= '{data: lat_q, l1id: l1id_q, ttype: ttype_q};
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      ev_wp <= '0; ev_rp <= '0; drop_cnt_o <= '0;
    end else begin
      if (l1a_q) begin
        if (ev_full) drop_cnt_o <= drop_cnt_o + 16'd1;
        else         ev_wp <= ev_wp + 1'b1;
      end
      if (ev_pop) ev_rp <= ev_rp + 1'b1;
    end
  end

  // fragment sender
  logic [4:0]  widx;
  logic        sending;
  logic [31:0] word;
  logic        is_ctrl;
  logic [BCID_W-1:0] ev_bcid;
  logic [3:0]        ev_err;
  assign ev_bcid = ev.data[DATA_W-1 -: BCID_W];
  assign ev_err  = ev.data[3:0];

  always_comb begin
    is_ctrl = 1'b0;
    unique case (widx)
      5'd0:  begin word = SLINK_BOF; is_ctrl = 1'b1; end
      5'd1:  word = HDR_MARKER;
      5'd2:  word = 32'd9;
      5'd3:  word = ROD_VERSION;
      5'd4:  word = SOURCE_ID;
      5'd5:  word = {1'b0, run_i};
      5'd6:  word = ev.l1id;
      5'd7:  word = {20'h0, ev_bcid};
      5'd8:  word = {24'h0, ev.ttype};
      5'd9:  word = det_type_i;
      5'd10, 5'd11, 5'd12, 5'd13, 5'd14, 5'd15:
             word = ev.data[DATA_W-1-32*(int'(widx)-10) -: 32];
      5'd16: word = {28'h0, ev_err};
      5'd17: word = (ev_err != 4'h0) ? 32'd1 : 32'd0;
      5'd18: word = 32'd2;
      5'd19: word = 32'd6;
      5'd20: word = 32'd1;
      5'd21: begin word = SLINK_EOF; is_ctrl = 1'b1; end
      default: word = '0;
    endcase
  end

  assign slink_wen_o  = sending && !slink_ff_i;
  assign slink_data_o = word;
  assign slink_ctrl_o = is_ctrl;
  assign ev_pop = slink_wen_o && (widx == 5'(N_WORDS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      widx <= '0; sending <= 1'b0; ev_cnt_o <= '0;
    end else if (!sending) begin
      widx <= '0;
      if (!ev_empty) sending <= 1'b1;
    end else if (slink_wen_o) begin
      if (widx == 5'(N_WORDS - 1)) begin
        widx <= '0;
        sending <= 1'b0;
        ev_cnt_o <= ev_cnt_o + 32'd1;
      end else
        widx <= widx + 5'd1;
    end
  end
endmodule
