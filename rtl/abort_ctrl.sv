// abort_ctrl: beam abort decision, evaluated once per BC.
//  * Basic abort: the number of channels with a reconstructed pulse in this BC
//    reaches basic_thr_i.
//  * X-of-Y: of the last Y basic results (Y <= Y_MAX, the current BC
//    included) at least X fired.
//  * Forgetting factor (leaky bucket): each basic abort adds lb_inc_i to a
//    bucket, every lb_period_i BCs lb_leak_i is taken out again (not below 0),
//    and the bucket reaching lb_thr_i fires. Old results are thus forgotten.
// alg_en_i[0..2] enables basic, X-of-Y and leaky bucket; any enabled algorithm
// that fires sets the latched abort outputs (CIBU beam-permit removal and DSS
// alarm) and gives a one-BC post-mortem trigger pulse. The outputs stay set
// until abort_clr_i. The three algorithms are those of the BCM firmware; the
// basic abort criterion itself, the counter sizes and the latching are this
// design's choices. Timing: fire flags and outputs are registered, one clk after
// pulses_i.
module abort_ctrl
  import bcm_pkg::*;
#(
  parameter int unsigned Y_MAX    = 32,
  parameter int unsigned BUCKET_W = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  chan_pulses_t [N_CH-1:0]      pulses_i,
  input  logic [$clog2(N_CH+1)-1:0]    basic_thr_i,
  input  logic [$clog2(Y_MAX+1)-1:0]   xy_x_i,
  input  logic [$clog2(Y_MAX+1)-1:0]   xy_y_i,
  input  logic [BUCKET_W-1:0]          lb_inc_i,
  input  logic [BUCKET_W-1:0]          lb_leak_i,
  input  logic [15:0]                  lb_period_i,
  input  logic [BUCKET_W-1:0]          lb_thr_i,
  input  logic [2:0]                   alg_en_i,
  input  logic                         abort_clr_i,
  output logic [2:0]                   fire_o,        // {bucket, x_of_y, basic}
  output logic [BUCKET_W-1:0]          bucket_o,
  output logic                         abort_cibu_o,
  output logic                         abort_dss_o,
  output logic                         pm_trig_o
);
  localparam int unsigned CW = $clog2(N_CH+1);
  localparam int unsigned YW = $clog2(Y_MAX+1);

  logic [CW-1:0]    n_hit;
  logic             basic;
  logic [Y_MAX-1:0] hist, hist_d;
  logic [YW-1:0]    n_fired;
  logic [15:0]      leak_cnt;
  logic [BUCKET_W:0] bucket_add;
  logic [BUCKET_W-1:0] bucket_d;
  logic             leak_now;
  logic [2:0]       fire_d;

  always_comb begin
    n_hit = '0;
    for (int c = 0; c < N_CH; c++)
      n_hit = n_hit + CW'(pulses_i[c].p1.valid);
    basic  = (basic_thr_i != '0) && (n_hit >= basic_thr_i);
    hist_d = {hist[Y_MAX-2:0], basic};
    n_fired = '0;
    for (int i = 0; i < Y_MAX; i++)
      if (i < int'(xy_y_i)) n_fired = n_fired + YW'(hist_d[i]);
    // leaky bucket: add, then leak, saturating at both ends
    leak_now   = (lb_period_i != '0) && (leak_cnt >= lb_period_i - 16'd1);
    bucket_add = {1'b0, bucket_o} + ((BUCKET_W+1)'(basic) * {1'b0, lb_inc_i});
    if (bucket_add[BUCKET_W]) bucket_add = {1'b0, {BUCKET_W{1'b1}}};
    if (leak_now)
      bucket_d = (bucket_add[BUCKET_W-1:0] > lb_leak_i) ? bucket_add[BUCKET_W-1:0] - lb_leak_i : '0;
    else
      bucket_d = bucket_add[BUCKET_W-1:0];
    fire_d[0] = basic;
    fire_d[1] = (xy_x_i != '0) && (n_fired >= xy_x_i);
    fire_d[2] = (lb_thr_i != '0) && (bucket_d >= lb_thr_i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0; bucket_o <= '0; leak_cnt <= '0; fire_o <= '0;
      abort_cibu_o <= 1'b0; abort_dss_o <= 1'b0; pm_trig_o <= 1'b0;
    end else begin
      hist     <= hist_d;
      bucket_o <= bucket_d;
      leak_cnt <= leak_now ? '0 : leak_cnt + 16'd1;
      fire_o   <= fire_d;
      pm_trig_o <= 1'b0;
      if (abort_clr_i) begin
        abort_cibu_o <= 1'b0;
        abort_dss_o  <= 1'b0;
      end else if (|(fire_d & alg_en_i)) begin
        abort_cibu_o <= 1'b1;
        abort_dss_o  <= 1'b1;
        pm_trig_o    <= ~abort_cibu_o;   // first abort only
      end
    end
  end
endmodule
