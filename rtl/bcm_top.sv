// bcm_top: readout, abort and post-mortem logic of one BCM (beam conditions
// monitor) FPGA. Eight detector channels arrive from the multi-gigabit
// transceivers as one 64-bit sample per channel per bunch crossing (BC,
// 40 MHz; one bit per 390 ps). Data flow, on the BC clock unless noted:
//   rx_data_i -> mgt_ctrl (fine delay, test-vector playback)
//     -> data_proc_ctrl (pulse reconstruction, 176-bit record, hit counts)
//        -> abort_ctrl (basic / X-of-Y / leaky-bucket beam abort)
//        -> lumi_ctrl  (time-window collision / background counting, CTP bits)
//        -> rod_ctrl   (latency buffer, ROD fragments on S-LINK per L1A)
//     -> pm_reduce (780 ps) -> async_fifo -> npi_ctrl on clk_npi
//        (post-mortem ring buffer in DDR2 through the memory-controller port)
//   ltp_ctrl: LTP signals, L1ID / BCID bookkeeping, post-mortem delay
//   bc_clk_gen on clk_320: regenerated 40 / 80 MHz clocks (brought out); its
//     re-phase command bc_sync_i is a clk_bc pulse carried by pulse_sync_1way
// One firmware serves both uses: mode_i selects abort-ROD operation (abort
// algorithms enabled, CTP bits held low) or lumi-ROD operation (abort
// outputs held off, CTP bits driven). A beam abort, or pm_trig_i from
// software, starts the post-mortem delay; when it has run out recording
// stops so the DDR2 ring keeps the history around the event. The transceivers,
// the memory controller, the PowerPC system and its bus are outside this RTL:
// their data paths are ports here, and the configuration that software would
// write into registers is a set of plain inputs. The block list and data flow
// follow the BCM firmware; the port-level register interface, the mode gating
// and the error code bits are this design's choices, as are the debug outputs
// (hits per BC, bucket level, FIFO high-water mark, burst position).
// Resets are synchronous, one per clock domain.
module bcm_top
  import bcm_pkg::*;
(
  input  logic                          clk_bc,
  input  logic                          rst_bc,
  input  logic                          clk_npi,
  input  logic                          rst_npi,
  input  logic                          clk_320,
  input  logic                          rst_320,
  input  bcm_mode_e                     mode_i,
  // transceiver data, one word per channel per BC
  input  logic [N_CH-1:0][SAMPLE_W-1:0] rx_data_i,
  // receive path configuration
  input  logic [N_CH-1:0][POS_W-1:0]    fine_delay_i,
  input  logic [N_CH-1:0]               tv_sel_i,
  input  logic                          tv_run_i,
  input  logic [8:0]                    tv_len_i,
  input  logic                          tv_we_i,
  input  logic [2:0]                    tv_wch_i,
  input  logic [7:0]                    tv_waddr_i,
  input  logic [SAMPLE_W-1:0]           tv_wdata_i,
  // LTP
  input  logic                          ltp_l1a_i,
  input  logic                          ltp_ecr_i,
  input  logic                          ltp_orbit_i,
  input  logic [7:0]                    ltp_ttype_i,
  input  logic [BCID_W-1:0]             bcid_offset_i,
  input  logic                          ecr_load_i,
  input  logic [7:0]                    ecr_load_val_i,
  // abort configuration
  input  logic [3:0]                    basic_thr_i,
  input  logic [5:0]                    xy_x_i,
  input  logic [5:0]                    xy_y_i,
  input  logic [15:0]                   lb_inc_i,
  input  logic [15:0]                   lb_leak_i,
  input  logic [15:0]                   lb_period_i,
  input  logic [15:0]                   lb_thr_i,
  input  logic [2:0]                    alg_en_i,
  input  logic                          abort_clr_i,
  // lumi configuration
  input  logic [POS_W-1:0]              win_col_lo_i,
  input  logic [POS_W-1:0]              win_col_hi_i,
  input  logic [POS_W-1:0]              win_bkg_lo_i,
  input  logic [POS_W-1:0]              win_bkg_hi_i,
  input  logic                          lumi_clr_i,
  // ROD configuration
  input  logic [7:0]                    l1_latency_i,
  input  logic [30:0]                   run_number_i,
  input  logic [31:0]                   det_type_i,
  // post-mortem
  input  logic                          pm_enable_i,
  input  logic                          pm_trig_i,
  input  logic [15:0]                   pm_delay_i,
  input  logic                          pm_rearm_i,
  input  logic                          pm_irq_clr_i,
  // outputs: S-LINK
  output logic [31:0]                   slink_data_o,
  output logic                          slink_ctrl_o,
  output logic                          slink_wen_o,
  input  logic                          slink_ff_i,
  // outputs: beam abort and triggers
  output logic                          abort_cibu_o,
  output logic                          abort_dss_o,
  output logic [2:0]                    abort_fire_o,
  output logic [2:0]                    ctp_trig_o,
  // outputs: NPI write port (clk_npi)
  output logic                          npi_addr_req_o,
  input  logic                          npi_addr_ack_i,
  output logic [31:0]                   npi_addr_o,
  output logic                          npi_wr_push_o,
  output logic [63:0]                   npi_wr_data_o,
  input  logic                          npi_wr_full_i,
  // status (clk_bc)
  output logic [1:0]                    pm_irq_status_o,
  output logic                          pm_frozen_o,
  output logic [31:0]                   pm_last_addr_o,
  output logic [31:0]                   hit_total_o,
  output logic [31:0]                   lumi_cnt_col_o,
  output logic [31:0]                   lumi_cnt_bkg_a_o,
  output logic [31:0]                   lumi_cnt_bkg_c_o,
  output logic [31:0]                   lumi_cnt_any_o,
  output logic [31:0]                   rod_ev_cnt_o,
  output logic [15:0]                   rod_drop_cnt_o,
  output logic [3:0]                    err_o,
  output logic [BCID_W-1:0]             bcid_o,
  output logic [31:0]                   l1id_o,
  // debug (clk_bc): hits in the current BC, leaky-bucket level, highest fill
  // of the post-mortem FIFO since pm_rearm_i, interrupt clear still in flight
  output logic [POS_W+3:0]              bc_hits_o,
  output logic [15:0]                   abort_bucket_o,
  output logic [6:0]                    pm_fifo_max_o,
  output logic                          pm_irq_clr_busy_o,
  // debug (clk_npi): position in the current burst, recording busy
  output logic [4:0]                    npi_burst_cnt_o,
  output logic                          npi_busy_o,
  // regenerated clocks (clk_320)
  input  logic                          bc_sync_i,
  output logic                          clk_40_o,
  output logic                          clk_80_o,
  output logic                          bc_stb_o
);
  localparam int unsigned PM_W = N_CH * SAMPLE_W / 2;   // 256

  logic [N_CH-1:0][SAMPLE_W-1:0] raw;
  chan_pulses_t [N_CH-1:0]       pulses;
  logic [REC_W-1:0]              rec;
  logic [POS_W+3:0]              bc_hits;
  logic                          abort_pm_trig, cibu, dss;
  logic [15:0]                   bucket;
  logic [2:0]                    ctp;
  logic                          l1a, pm_freeze, pm_busy;
  logic [7:0]                    ttype;
  logic                          pm_valid;
  logic [PM_W-1:0]               pm_word;
  logic                          fifo_full, fifo_ovf, fifo_empty, fifo_rd, fifo_udf;
  logic [6:0]                    fifo_wcount;
  logic [PM_W-1:0]               fifo_rdata;
  logic                          freeze_npi, enable_npi, irq_clr_npi, irq_clr_busy;
  logic [1:0]                    irq_npi;
  logic [4:0]                    burst_cnt;
  logic [31:0]                   last_addr_npi;
  logic                          npi_busy, fifo_udf_bc;
  logic                          bc_sync_320;

  assign bc_hits_o         = bc_hits;
  assign abort_bucket_o    = bucket;
  assign pm_irq_clr_busy_o = irq_clr_busy;
  assign npi_burst_cnt_o   = burst_cnt;
  assign npi_busy_o        = npi_busy;

  mgt_ctrl #(.TV_DEPTH(256)) u_mgt (
    .clk(clk_bc), .rst(rst_bc), .rx_i(rx_data_i), .delay_i(fine_delay_i),
    .tv_sel_i(tv_sel_i), .tv_run_i(tv_run_i), .tv_len_i(tv_len_i),
    .tv_we_i(tv_we_i), .tv_wch_i(tv_wch_i), .tv_waddr_i(tv_waddr_i),
    .tv_wdata_i(tv_wdata_i), .raw_o(raw)
  );

  data_proc_ctrl u_proc (
    .clk(clk_bc), .rst(rst_bc), .raw_i(raw), .pulses_o(pulses), .rec_o(rec),
    .bc_hits_o(bc_hits), .hit_total_o(hit_total_o)
  );

  abort_ctrl #(.Y_MAX(32), .BUCKET_W(16)) u_abort (
    .clk(clk_bc), .rst(rst_bc), .pulses_i(pulses), .basic_thr_i(basic_thr_i),
    .xy_x_i(xy_x_i), .xy_y_i(xy_y_i), .lb_inc_i(lb_inc_i), .lb_leak_i(lb_leak_i),
    .lb_period_i(lb_period_i), .lb_thr_i(lb_thr_i),
    .alg_en_i((mode_i == MODE_ABORT) ? alg_en_i : 3'b000),
    .abort_clr_i(abort_clr_i), .fire_o(abort_fire_o), .bucket_o(bucket),
    .abort_cibu_o(cibu), .abort_dss_o(dss), .pm_trig_o(abort_pm_trig)
  );
  assign abort_cibu_o = cibu;
  assign abort_dss_o  = dss;

  lumi_ctrl u_lumi (
    .clk(clk_bc), .rst(rst_bc), .pulses_i(pulses),
    .win_col_lo_i(win_col_lo_i), .win_col_hi_i(win_col_hi_i),
    .win_bkg_lo_i(win_bkg_lo_i), .win_bkg_hi_i(win_bkg_hi_i),
    .cnt_clr_i(lumi_clr_i), .ctp_trig_o(ctp),
    .cnt_col_o(lumi_cnt_col_o), .cnt_bkg_a_o(lumi_cnt_bkg_a_o),
    .cnt_bkg_c_o(lumi_cnt_bkg_c_o), .cnt_any_o(lumi_cnt_any_o)
  );
  assign ctp_trig_o = (mode_i == MODE_LUMI) ? ctp : 3'b000;

  ltp_ctrl #(.BC_PER_ORBIT(3564)) u_ltp (
    .clk(clk_bc), .rst(rst_bc), .l1a_i(ltp_l1a_i), .ecr_i(ltp_ecr_i),
    .orbit_i(ltp_orbit_i), .ttype_i(ltp_ttype_i), .bcid_offset_i(bcid_offset_i),
    .ecr_load_i(ecr_load_i), .ecr_load_val_i(ecr_load_val_i),
    .pm_trig_i(abort_pm_trig | pm_trig_i), .pm_delay_i(pm_delay_i),
    .pm_rearm_i(pm_rearm_i), .l1a_o(l1a), .l1id_o(l1id_o), .bcid_o(bcid_o),
    .ttype_o(ttype), .pm_freeze_o(pm_freeze),
    .pm_busy_o(pm_busy)
  );
  assign pm_frozen_o = pm_freeze;

  // error code carried in every ROD data block
  assign err_o = {pm_busy, pm_freeze, fifo_udf_bc, fifo_ovf};

  rod_ctrl #(.LAT_DEPTH(256), .EV_DEPTH(8)) u_rod (
    .clk(clk_bc), .rst(rst_bc), .bcid_i(bcid_o), .rec_i(rec), .err_i(err_o),
    .lat_i(l1_latency_i), .l1a_i(l1a), .l1id_i(l1id_o), .ttype_i(ttype),
    .run_i(run_number_i), .det_type_i(det_type_i),
    .slink_data_o(slink_data_o), .slink_ctrl_o(slink_ctrl_o),
    .slink_wen_o(slink_wen_o), .slink_ff_i(slink_ff_i),
    .drop_cnt_o(rod_drop_cnt_o), .ev_cnt_o(rod_ev_cnt_o)
  );

  // post-mortem recording
  pm_reduce u_pm_reduce (
    .clk(clk_bc), .rst(rst_bc), .valid_i(pm_enable_i && !pm_freeze),
    .raw_i(raw), .valid_o(pm_valid), .word_o(pm_word)
  );

  async_fifo #(.DW(PM_W), .AW(6)) u_pm_fifo (
    .wclk(clk_bc), .wrst(rst_bc), .wr_en(pm_valid), .wdata(pm_word),
    .full(fifo_full), .wr_count(fifo_wcount), .overflow(fifo_ovf),
    .rclk(clk_npi), .rrst(rst_npi), .rd_en(fifo_rd), .rdata(fifo_rdata),
    .empty(fifo_empty), .underflow(fifo_udf)
  );

  // high-water mark of the FIFO fill, a measure of the NPI throughput margin
  always_ff @(posedge clk_bc) begin
    if (rst_bc || pm_rearm_i)              pm_fifo_max_o <= '0;
    else if (fifo_wcount > pm_fifo_max_o) pm_fifo_max_o <= fifo_wcount;
  end

  sync_2ff #(.W(2)) u_cfg_to_npi (
    .clk(clk_npi), .rst(rst_npi), .d({pm_freeze, pm_enable_i}), .q({freeze_npi, enable_npi})
  );
  pulse_sync_2way u_irq_clr (
    .src_clk(clk_bc), .src_rst(rst_bc), .src_pulse(pm_irq_clr_i), .src_busy(irq_clr_busy),
    .dst_clk(clk_npi), .dst_rst(rst_npi), .dst_pulse(irq_clr_npi)
  );

  npi_ctrl #(.DW(64), .IN_WORDS(PM_W / 64), .BURST(32), .BUF_BYTES(134217728)) u_npi (
    .clk(clk_npi), .rst(rst_npi), .enable_i(enable_npi), .freeze_i(freeze_npi),
    .fifo_empty_i(fifo_empty), .fifo_rdata_i(fifo_rdata), .fifo_rd_en_o(fifo_rd),
    .npi_addr_req_o(npi_addr_req_o), .npi_addr_ack_i(npi_addr_ack_i),
    .npi_addr_o(npi_addr_o), .npi_wr_push_o(npi_wr_push_o),
    .npi_wr_data_o(npi_wr_data_o), .npi_wr_full_i(npi_wr_full_i),
    .irq_clr_i(irq_clr_npi), .irq_status_o(irq_npi), .burst_cnt_o(burst_cnt),
    .last_addr_o(last_addr_npi), .busy_o(npi_busy)
  );

  // status back to the BC domain. last_addr is read by software only while
  // recording is frozen, when it no longer changes.
  sync_2ff #(.W(3)) u_stat_to_bc (
    .clk(clk_bc), .rst(rst_bc), .d({fifo_udf, irq_npi}), .q({fifo_udf_bc, pm_irq_status_o})
  );
  sync_2ff #(.W(32)) u_addr_to_bc (
    .clk(clk_bc), .rst(rst_bc), .d(last_addr_npi), .q(pm_last_addr_o)
  );

  // the re-phase command is a one-BC pulse on clk_bc; going from a slow to a
  // fast clock it needs no acknowledge
  pulse_sync_1way u_bc_sync (
    .src_clk(clk_bc), .src_rst(rst_bc), .src_pulse(bc_sync_i),
    .dst_clk(clk_320), .dst_rst(rst_320), .dst_pulse(bc_sync_320)
  );
  bc_clk_gen u_clkgen (
    .clk_320(clk_320), .rst(rst_320), .sync_i(bc_sync_320),
    .clk_40_o(clk_40_o), .clk_80_o(clk_80_o), .bc_stb_o(bc_stb_o)
  );
endmodule
