// tb_bcm_top: end-to-end test of the whole BCM FPGA logic at its real sizes.
// Random detector samples go in on all eight channels with a different fine
// delay each. A cycle-accurate model in the testbench (bit-stream delay,
// bit-walking pulse finder, abort algorithms, time windows) predicts:
//   * every S-LINK ROD fragment sent for the random L1As (header with the
//     extended L1ID across an ECR, BCID, trigger type; the packed pulse data
//     of the BC one L1 latency back; trailer), with random link back-pressure
//   * the three abort fire flags every BC and the latched CIBU / DSS outputs
//     for basic, X-of-Y and leaky-bucket phases in abort mode
//   * the post-mortem delay after an abort and that the DDR2 model then holds
//     a contiguous run of the 780 ps post-mortem words
//   * the CTP trigger bits every BC in lumi mode, with the abort suppressed
//   * the hit count of a test-vector playback
//   * the regenerated BC strobe period and its re-phasing by bc_sync_i
// It counts how often each mechanism occurred and fails if one never did.
module tb_bcm_top;
  import bcm_pkg::*;
  import bcm_tb_pkg::*;

  localparam int LAT = 20;
  logic clk_bc = 0, clk_npi = 0, clk_320 = 0;
  logic rst_bc = 1, rst_npi = 1, rst_320 = 1;
  bcm_mode_e mode;
  logic [N_CH-1:0][63:0] rx;
  logic [N_CH-1:0][5:0] fdly;
  logic [N_CH-1:0] tv_sel;
  logic tv_run, tv_we;
  logic [8:0] tv_len;
  logic [2:0] tv_wch;
  logic [7:0] tv_waddr;
  logic [63:0] tv_wdata;
  logic l1a, ecr, orbit;
  logic [7:0] ttype;
  logic [3:0] thr;
  logic [5:0] xx, yy;
  logic [15:0] inc, leak, per, lthr, pm_delay;
  logic [2:0] alg_en;
  logic abort_clr, lumi_clr, pm_en, pm_trig, pm_rearm, irq_clr, slink_ff, bc_sync;
  logic [5:0] wcl, wch_, wbl, wbh;
  logic [31:0] sl_data;
  logic sl_ctrl, sl_wen, cibu, dss;
  logic [2:0] fire, ctp;
  logic npi_req, npi_ack, npi_push, npi_full;
  logic [31:0] npi_addr;
  logic [63:0] npi_data;
  logic [1:0] irq;
  logic frozen;
  logic [9:0] bc_hits;
  logic [15:0] bucket;
  logic [6:0] fifo_max;
  logic irq_clr_busy, npi_busy;
  logic [4:0] burst_cnt;
  logic [31:0] last_addr, hit_total, c_col, c_ba, c_bc, c_any, ev_cnt, l1id;
  logic [15:0] drops;
  logic [3:0] err;
  logic [11:0] bcid;
  logic c40, c80, stb;

  bcm_top dut (
    .clk_bc(clk_bc), .rst_bc(rst_bc), .clk_npi(clk_npi), .rst_npi(rst_npi),
    .clk_320(clk_320), .rst_320(rst_320), .mode_i(mode), .rx_data_i(rx),
    .fine_delay_i(fdly), .tv_sel_i(tv_sel), .tv_run_i(tv_run), .tv_len_i(tv_len),
    .tv_we_i(tv_we), .tv_wch_i(tv_wch), .tv_waddr_i(tv_waddr), .tv_wdata_i(tv_wdata),
    .ltp_l1a_i(l1a), .ltp_ecr_i(ecr), .ltp_orbit_i(orbit), .ltp_ttype_i(ttype),
    .bcid_offset_i(12'd5), .ecr_load_i(1'b0), .ecr_load_val_i(8'd0),
    .basic_thr_i(thr), .xy_x_i(xx), .xy_y_i(yy), .lb_inc_i(inc), .lb_leak_i(leak),
    .lb_period_i(per), .lb_thr_i(lthr), .alg_en_i(alg_en), .abort_clr_i(abort_clr),
    .win_col_lo_i(wcl), .win_col_hi_i(wch_), .win_bkg_lo_i(wbl), .win_bkg_hi_i(wbh),
    .lumi_clr_i(lumi_clr), .l1_latency_i(8'(LAT)), .run_number_i(31'd4711),
    .det_type_i(32'h0000_0001), .pm_enable_i(pm_en), .pm_trig_i(pm_trig),
    .pm_delay_i(pm_delay), .pm_rearm_i(pm_rearm), .pm_irq_clr_i(irq_clr),
    .slink_data_o(sl_data), .slink_ctrl_o(sl_ctrl), .slink_wen_o(sl_wen), .slink_ff_i(slink_ff),
    .abort_cibu_o(cibu), .abort_dss_o(dss), .abort_fire_o(fire), .ctp_trig_o(ctp),
    .npi_addr_req_o(npi_req), .npi_addr_ack_i(npi_ack), .npi_addr_o(npi_addr),
    .npi_wr_push_o(npi_push), .npi_wr_data_o(npi_data), .npi_wr_full_i(npi_full),
    .pm_irq_status_o(irq), .pm_frozen_o(frozen), .pm_last_addr_o(last_addr),
    .hit_total_o(hit_total), .lumi_cnt_col_o(c_col), .lumi_cnt_bkg_a_o(c_ba),
    .lumi_cnt_bkg_c_o(c_bc), .lumi_cnt_any_o(c_any), .rod_ev_cnt_o(ev_cnt),
    .rod_drop_cnt_o(drops), .err_o(err), .bcid_o(bcid), .l1id_o(l1id),
    .bc_hits_o(bc_hits), .abort_bucket_o(bucket), .pm_fifo_max_o(fifo_max),
    .pm_irq_clr_busy_o(irq_clr_busy), .npi_burst_cnt_o(burst_cnt), .npi_busy_o(npi_busy),
    .bc_sync_i(bc_sync), .clk_40_o(c40), .clk_80_o(c80), .bc_stb_o(stb));

  mpmc_npi_model #(.BURST(32), .FIFO_DEPTH(64), .MAX_WAIT(4)) u_mem (
    .clk(clk_npi), .addr_req(npi_req), .addr_ack(npi_ack), .addr(npi_addr),
    .wr_push(npi_push), .wr_data(npi_data), .wr_full(npi_full));

  always #12.5 clk_bc = ~clk_bc;
  always #2.5 clk_npi = ~clk_npi;   // 200 MHz: 64 bit x 200 MHz = 1600 MB/s
  always #1.5625 clk_320 = ~clk_320;

  int checks = 0, failures = 0;
  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_frag = 0, n_two_pulse = 0, n_backpressure = 0, n_ecr = 0, n_orbit = 0;
  int n_fire[3] = '{0, 0, 0}, n_abort = 0, n_freeze = 0, n_lumi[3] = '{0, 0, 0};
  int n_suppressed = 0, n_tv = 0, n_c40 = 0, n_c320 = 0, n_resync = 0;
  int last_stb = 0;

  // ---------------------------------------------------------------- model
  int cyc = 0;                          // BC cycle number, inputs of cycle c go in after edge c
  logic [N_CH-1:0][63:0] rx_h [int];    // inputs per cycle
  logic [11:0] bcid_h [int];            // bcid_o seen in each cycle
  bit model_on = 1;

  function automatic logic [63:0] rxw(int c, int ch);
    return rx_h.exists(c) ? rx_h[c][ch] : 64'h0;
  endfunction
  function automatic logic [63:0] delayed(int s, int ch);
    logic [63:0] r;
    for (int b = 0; b < 64; b++)
      r[b] = (b >= fdly[ch]) ? rxw(s, ch)[b - fdly[ch]] : rxw(s - 1, ch)[64 + b - fdly[ch]];
    return r;
  endfunction
  function automatic chan_pulses_t pulses_of(int s, int ch);
    return ref_pulses(delayed(s, ch));
  endfunction

  // abort model state
  bit hist[$];
  int bkt = 0, lcnt = 0;
  bit latched = 0;
  bit [2:0] exp_fire = 0;
  bit [2:0] exp_ctp = 0;

  // one model step for the edge that ends cycle c: uses the pulses of
  // sample c-2 and the configuration applied in cycle c; called just before
  // that edge
  task automatic model_step(int c);
    int nh, nf;
    bit b, ac, cc, ab, cb;
    bit [2:0] f, en_eff;
    bit leak_now;
    nh = 0; ac = 0; cc = 0; ab = 0; cb = 0;
    for (int ch = 0; ch < N_CH; ch++) begin
      chan_pulses_t p;
      int x;
      p = pulses_of(c - 2, ch);
      nh += p.p1.valid;
      x = p.p1.pos;
      if (p.p1.valid) begin
        if (ch < 4) begin ac |= (x >= wcl && x <= wch_); ab |= (x >= wbl && x <= wbh); end
        else        begin cc |= (x >= wcl && x <= wch_); cb |= (x >= wbl && x <= wbh); end
      end
    end
    exp_ctp = {cb && ac, ab && cc, ac && cc};
    b = (thr != 0) && (nh >= thr);
    hist.push_front(b);
    if (hist.size() > 32) void'(hist.pop_back());
    nf = 0;
    for (int i = 0; i < yy && i < hist.size(); i++) nf += hist[i];
    bkt = bkt + (b ? inc : 0);
    if (bkt > 65535) bkt = 65535;
    leak_now = (per != 0) && (lcnt >= per - 1);
    lcnt = leak_now ? 0 : lcnt + 1;
    if (leak_now) bkt = (bkt > leak) ? bkt - leak : 0;
    f = {(lthr != 0) && (bkt >= lthr), (xx != 0) && (nf >= xx), b};
    exp_fire = f;
    en_eff = (mode == MODE_ABORT) ? alg_en : 3'b000;
    if (abort_clr) latched = 0;
    else if (|(f & en_eff)) latched = 1;
  endtask

  // ROD expectation
  logic [32:0] exp_words [$];
  int m_evt = 24'hFFFFFF, m_ecr = 0;

  task automatic expect_fragment(int t);
    logic [191:0] d;
    logic [11:0] bc;
    int s, two;
    s = t - LAT;
    bc = bcid_h.exists(t + 2 - LAT) ? bcid_h[t + 2 - LAT] : 12'h0;
    d = {180'(0), bc};
    two = 0;
    for (int ch = 0; ch < N_CH; ch++) begin
      chan_pulses_t p;
      p = pulses_of(s, ch);
      two += p.p2.valid;
      d = (d << 11) | 192'({p.p1.pos, p.p1.width});
      d = (d << 11) | 192'({p.p2.pos, p.p2.width});
    end
    if (two > 0) n_two_pulse++;
    d = (d << 4);   // error code compared separately
    m_evt = (m_evt + 1) % (1 << 24);
    exp_words.push_back({1'b1, 32'hB0F00000});
    exp_words.push_back({1'b0, 32'hEE1234EE});
    exp_words.push_back({1'b0, 32'd9});
    exp_words.push_back({1'b0, 32'h03010000});
    exp_words.push_back({1'b0, 32'h00810000});
    exp_words.push_back({1'b0, 32'd4711});
    exp_words.push_back({1'b0, 8'(m_ecr), 24'(m_evt)});
    exp_words.push_back({1'b0, 20'h0, bc});
    exp_words.push_back({1'b0, 24'h0, ttype});
    exp_words.push_back({1'b0, 32'h1});
    for (int w = 5; w >= 0; w--) exp_words.push_back({1'b0, d[32*w +: 32]});
    for (int w = 0; w < 5; w++) exp_words.push_back({1'b1, 32'h0});   // trailer: checked by shape
    exp_words.push_back({1'b1, 32'hE0F00000});
  endtask

  // S-LINK checker
  int widx = 0;
  always @(posedge clk_bc) begin
    if (!rst_bc && slink_ff) n_backpressure++;
    if (!rst_bc && sl_wen) begin
      logic [32:0] e;
      checks++;
      if (exp_words.size() == 0) begin failures++; $display("unexpected S-LINK word %h", sl_data); end
      else begin
        e = exp_words.pop_front();
        if (widx == 15) begin
          // last data word: the low 4 bits carry the error code
          if ({sl_ctrl, sl_data[31:4]} !== e[32:4]) begin
            failures++; $display("data word %h exp %h", sl_data, e[31:0]);
          end
        end else if (widx >= 16 && widx <= 20) begin
          if (sl_ctrl || (widx == 18 && sl_data != 2) || (widx == 19 && sl_data != 6) ||
              (widx == 20 && sl_data != 1)) begin failures++; $display("trailer word %0d = %h", widx, sl_data); end
        end else if ({sl_ctrl, sl_data} !== e) begin
          failures++; $display("S-LINK word %0d = %h ctrl %b exp %h", widx, sl_data, sl_ctrl, e);
        end
      end
      widx = (widx == 21) ? 0 : widx + 1;
      if (widx == 0) n_frag++;
    end
  end

  // the running hit total adds up the per-BC hit counts
  logic [31:0] prev_total = 0;
  logic [9:0] prev_hits = 0;
  int n_hit_bc = 0, max_burst = 0, n_npi_busy = 0, max_bucket = 0;
  always @(posedge clk_bc) if (!rst_bc) begin
    checks++;
    if (prev_total + 32'(prev_hits) != hit_total) begin
      failures++; $display("hit total %0d after %0d + %0d", hit_total, prev_total, prev_hits);
    end
    if (prev_hits != 0) n_hit_bc++;
    if (int'(bucket) > max_bucket) max_bucket = int'(bucket);
    prev_total = hit_total; prev_hits = bc_hits;
  end
  always @(posedge clk_npi) if (!rst_npi) begin
    if (int'(burst_cnt) > max_burst) max_burst = int'(burst_cnt);
    if (npi_busy) n_npi_busy++;
  end

  // bc_sync_i re-phases the regenerated clock: the first strobe after the
  // command comes a fixed number of clk_320 cycles after the clk_bc edge
  // that sampled it: 7 here, where the clk_320 rising edges lie half a cycle
  // after the clk_bc ones (1-way sync 2.5, counter restart 1, strobe at
  // count 4 sampled one edge later); otherwise a strobe every eight cycles
  localparam int RESYNC_DT = 7;
  realtime sync_t = -1.0;
  bit resync_seen = 1;
  always @(posedge clk_bc) if (!rst_bc && bc_sync) begin sync_t = $realtime; resync_seen = 0; end

  always @(posedge clk_320) if (!rst_320) begin
    n_c320++;
    if (stb) begin
      int dt;
      n_c40++;
      dt = (sync_t >= 0.0) ? int'(($realtime - sync_t) / 3.125) : 1000;
      if (!resync_seen && dt >= 4) begin
        resync_seen = 1;
        n_resync++;
        checks++;
        if (dt != RESYNC_DT) begin failures++; $display("strobe %0d clk_320 cycles after re-phase", dt); end
      end else if (n_c40 > 1) begin
        checks++;
        if (n_c320 - last_stb != 8) begin failures++; $display("strobe period %0d", n_c320 - last_stb); end
      end
      last_stb = n_c320;
    end
  end

  // ---------------------------------------------------------------- driver
  int last_l1a = -100, last_ecr = -100;
  int hit_div = 6;

  task automatic tick(input bit trig_ok);
    // the configuration is final now: predict the coming edge
    if (model_on) model_step(cyc);
    @(posedge clk_bc); #1;
    cyc++;
    bcid_h[cyc] = bcid;
    // outputs of this cycle
    if (model_on) begin
      checks++;
      if (fire !== exp_fire) begin failures++; $display("cyc %0d fire %b exp %b", cyc, fire, exp_fire); end
      if (|fire) for (int i = 0; i < 3; i++) n_fire[i] += fire[i];
      checks++;
      if (cibu !== latched || dss !== latched) begin failures++; $display("cyc %0d abort %b exp %b", cyc, cibu, latched); end
      if (mode == MODE_LUMI) begin
        checks++;
        if (ctp !== exp_ctp) begin failures++; $display("cyc %0d ctp %b exp %b", cyc, ctp, exp_ctp); end
        for (int i = 0; i < 3; i++) n_lumi[i] += ctp[i];
        if (|(fire & alg_en) && !cibu) n_suppressed++;
      end else begin
        checks++;
        if (ctp !== 3'b000) begin failures++; $display("ctp in abort mode"); end
      end
    end
    // inputs of this cycle
    for (int ch = 0; ch < N_CH; ch++)
      rx[ch] = ($urandom_range(1, hit_div) == 1) ? rand_sample() : 64'h0;
    rx_h[cyc] = rx;
    l1a = 0; ecr = 0; orbit = 0;
    ttype = 8'($urandom);
    slink_ff = ($urandom_range(0, 4) == 0);
    if (trig_ok && cyc > LAT + 5 && cyc - last_l1a > 3 && cyc - last_ecr > 4 && $urandom_range(0, 40) == 0) begin
      l1a = 1; last_l1a = cyc;
      expect_fragment(cyc);
    end else if (trig_ok && cyc - last_l1a > 4 && cyc - last_ecr > 300 && $urandom_range(0, 50) == 0) begin
      ecr = 1; last_ecr = cyc;
      m_evt = 24'hFFFFFF; m_ecr++; n_ecr++;
    end else if ($urandom_range(0, 400) == 0) begin
      orbit = 1; n_orbit++;
    end
  endtask

  task automatic settle(int n);
    for (int i = 0; i < n; i++) tick(0);
  endtask

  // checks that the DDR2 model holds consecutive post-mortem words
  task automatic check_pm_memory();
    int nwords, s0, found;
    nwords = u_mem.n_bursts * 32;
    found = 0;
    // find the first recorded BC: the first 32 BCs in memory must match
    for (int s = -4; s < 400 && !found; s++) begin
      bit ok;
      ok = 1;
      for (int k = 0; k < 128 && ok; k++) begin
        logic [255:0] e;
        for (int ch = 0; ch < N_CH; ch++)
          for (int j = 0; j < 32; j++)
            e[32*ch + j] = delayed(s + k / 4, ch)[2*j] | delayed(s + k / 4, ch)[2*j+1];
        if (u_mem.read_word(32'(8 * k)) !== e[64*(k%4) +: 64]) ok = 0;
      end
      if (ok) begin s0 = s; found = 1; end
    end
    checks++;
    if (!found) begin failures++; $display("post-mortem start not found"); return; end
    for (int k = 0; k < nwords; k++) begin
      logic [255:0] e;
      int s;
      s = s0 + k / 4;
      for (int ch = 0; ch < N_CH; ch++)
        for (int j = 0; j < 32; j++) e[32*ch + j] = delayed(s, ch)[2*j] | delayed(s, ch)[2*j+1];
      checks++;
      if (u_mem.read_word(32'(8 * k)) !== e[64*(k%4) +: 64]) begin
        failures++; $display("pm word %0d = %h exp %h", k, u_mem.read_word(32'(8 * k)), e[64*(k%4) +: 64]);
        break;
      end
    end
    $display("post-mortem buffer: %0d words of %0d BCs checked", nwords, nwords / 4);
  endtask

  initial begin
    mode = MODE_ABORT;
    rx = '0;
    for (int ch = 0; ch < N_CH; ch++) fdly[ch] = 6'(ch * 7 + 1);
    tv_sel = '0; tv_run = 0; tv_len = 9'd16; tv_we = 0; tv_wch = 0; tv_waddr = 0; tv_wdata = 0;
    l1a = 0; ecr = 0; orbit = 0; ttype = 0;
    thr = 5; xx = 0; yy = 0; inc = 0; leak = 0; per = 0; lthr = 0; alg_en = 0;
    abort_clr = 0; lumi_clr = 0; pm_en = 1; pm_trig = 0; pm_delay = 16'd150; pm_rearm = 0;
    irq_clr = 0; slink_ff = 0; bc_sync = 0;
    wcl = 6'd20; wch_ = 6'd40; wbl = 6'd1; wbh = 6'd12;
    repeat (4) @(posedge clk_bc);
    #1 rst_bc = 0; rst_npi = 0; rst_320 = 0;

    // phase 1: readout only (algorithms computed, none enabled)
    for (int i = 0; i < 1500; i++) tick(1);
    // phase 2: basic abort enabled
    alg_en = 3'b001; thr = 6; hit_div = 5;
    while (!latched) tick(1);
    n_abort++;
    // post-mortem delay, then freeze
    begin
      int n;
      n = 0;
      while (!frozen && n < 1000) begin tick(1); n++; end
      checks++;
      if (n < 150 || n > 153) begin failures++; $display("freeze after %0d BCs", n); end
      else n_freeze++;
    end
    settle(200);
    check_pm_memory();
    checks++;
    if (err[0]) begin failures++; $display("post-mortem FIFO overflowed"); end
    // the memory port takes words as they come, so the FIFO holds only a
    // few entries, and never reaches its 64
    checks++;
    if (fifo_max == 7'd0 || fifo_max > 7'd63) begin failures++; $display("FIFO high-water mark %0d", fifo_max); end
    abort_clr = 1; pm_rearm = 1; tick(1); abort_clr = 0; pm_rearm = 0;
    checks++;
    if (fifo_max != 0) begin failures++; $display("FIFO high-water mark not cleared: %0d", fifo_max); end
    // phase 3: X-of-Y only
    alg_en = 3'b010; thr = 3; xx = 6'd4; yy = 6'd16; hit_div = 7;
    for (int i = 0; i < 3000 && !latched; i++) tick(1);
    if (latched) n_abort++;
    abort_clr = 1; tick(1); abort_clr = 0;
    // phase 4: leaky bucket only
    alg_en = 3'b100; thr = 3; inc = 16'd10; leak = 16'd1; per = 16'd2; lthr = 16'd60;
    max_bucket = 0;
    for (int i = 0; i < 3000 && !latched; i++) tick(1);
    if (latched) n_abort++;
    tick(1); tick(1);   // the bucket is sampled one BC behind the fire flag
    checks++;
    if (max_bucket < 60) begin failures++; $display("bucket reached only %0d before the abort", max_bucket); end
    abort_clr = 1; tick(1); abort_clr = 0;
    // phase 5: lumi mode; abort algorithms still evaluated but do not abort
    mode = MODE_LUMI; alg_en = 3'b111; thr = 2; hit_div = 3;
    for (int i = 0; i < 2000; i++) tick(1);
    // drain the ROD
    for (int i = 0; i < 200; i++) tick(0);
    checks++;
    if (exp_words.size() != 0 || drops != 0) begin
      failures++; $display("%0d S-LINK words missing, %0d events dropped", exp_words.size(), drops);
    end
    // phase 6: test-vector playback on all channels
    model_on = 0;
    begin
      int exp_hits, h0;
      exp_hits = 0;
      for (int ch = 0; ch < N_CH; ch++)
        for (int a = 0; a < 16; a++) begin
          logic [63:0] w;
          w = (a == 0) ? 64'h0 : rand_sample();
          exp_hits += 2 * ref_hits(w);     // played twice
          tv_we = 1; tv_wch = 3'(ch); tv_waddr = 8'(a); tv_wdata = w;
          tick(0);
        end
      tv_we = 0; tv_sel = '1;
      settle(5);
      h0 = hit_total;
      tv_run = 1;
      settle(32);
      tv_run = 0;
      settle(5);
      tv_sel = '0;
      checks++;
      if (hit_total - h0 != exp_hits) begin
        failures++; $display("test-vector hits %0d exp %0d", hit_total - h0, exp_hits);
      end else n_tv++;
    end

    // re-phase the regenerated BC clock twice
    for (int k = 0; k < 2; k++) begin
      bc_sync = 1; tick(0); bc_sync = 0;
      settle(3);
    end
    settle(3);
    // clocks and mechanism coverage
    checks++;
    if (n_c40 * 8 < n_c320 - 8 || n_c40 * 8 > n_c320 + 8) begin failures++; $display("bc strobe %0d of %0d", n_c40, n_c320); end
    $display("fragments %0d (two-pulse %0d), back-pressure %0d, ECR %0d, orbit %0d",
             n_frag, n_two_pulse, n_backpressure, n_ecr, n_orbit);
    $display("fire basic/xy/bucket %0d/%0d/%0d, aborts %0d, freeze %0d, lumi col/bkgA/bkgC %0d/%0d/%0d",
             n_fire[0], n_fire[1], n_fire[2], n_abort, n_freeze, n_lumi[0], n_lumi[1], n_lumi[2]);
    $display("suppressed %0d, NPI bursts %0d, NPI waits %0d, test vectors %0d, re-phase %0d",
             n_suppressed, u_mem.n_bursts, u_mem.n_waits, n_tv, n_resync);
    foreach (n_fire[i]) begin checks++; if (n_fire[i] == 0) failures++; end
    foreach (n_lumi[i]) begin checks++; if (n_lumi[i] == 0) failures++; end
    checks++; if (n_frag < 50) failures++;
    checks++; if (n_two_pulse == 0) failures++;
    checks++; if (n_backpressure == 0) failures++;
    checks++; if (n_ecr == 0) failures++;
    checks++; if (n_orbit == 0) failures++;
    checks++; if (n_abort != 3) begin failures++; $display("only %0d of 3 abort phases aborted", n_abort); end
    checks++; if (n_freeze == 0) failures++;
    checks++; if (n_suppressed == 0) failures++;
    checks++; if (u_mem.n_bursts == 0 || u_mem.n_waits == 0) failures++;
    checks++; if (n_tv == 0) failures++;
    checks++; if (n_hit_bc == 0) failures++;
    checks++; if (max_burst != 31 || n_npi_busy == 0) begin failures++; $display("burst count max %0d", max_burst); end
    checks++; if (n_resync != 2) begin failures++; $display("%0d of 2 re-phase commands arrived", n_resync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
