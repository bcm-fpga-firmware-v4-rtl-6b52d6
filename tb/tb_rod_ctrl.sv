// tb_rod_ctrl: feeds random BCID / pulse records / error codes every BC and
// random L1As; a model keeps the per-BC history and builds each expected
// fragment (BOF, 9 header words, 6 data words packed field by field, 5
// trailer words, EOF). The S-LINK is randomly full. Also checks the 22-cycle
// fragment length without back-pressure and that L1As are dropped and
// counted when the event FIFO is full.
module tb_rod_ctrl;
  import bcm_pkg::*;
  localparam int LAT = 40;
  logic clk = 0, rst = 1;
  logic [11:0] bcid;
  logic [REC_W-1:0] rec;
  logic [3:0] err;
  logic l1a, ctrl, wen, ff;
  logic [31:0] l1id, data, ev_cnt;
  logic [7:0] tt;
  logic [15:0] drops;
  int checks = 0, failures = 0;

  rod_ctrl #(.LAT_DEPTH(64), .EV_DEPTH(4)) dut (
    .clk(clk), .rst(rst), .bcid_i(bcid), .rec_i(rec), .err_i(err), .lat_i(6'(LAT)),
    .l1a_i(l1a), .l1id_i(l1id), .ttype_i(tt), .run_i(31'h1234567), .det_type_i(32'h0000_00BC),
    .slink_data_o(data), .slink_ctrl_o(ctrl), .slink_wen_o(wen), .slink_ff_i(ff),
    .drop_cnt_o(drops), .ev_cnt_o(ev_cnt));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [11:0] bcid; logic [REC_W-1:0] rec; logic [3:0] err; } bc_t;
  bc_t hist [$];
  logic [32:0] exp_words [$];   // {ctrl, word}
  int n_frag = 0;

  task automatic expect_event(input bc_t b, input logic [31:0] id, input logic [7:0] t);
    logic [191:0] d;
    // independent packing: append the fields one after another
    d = {180'(0), b.bcid};
    for (int c = 0; c < N_CH; c++) begin
      logic [21:0] f;
      f = b.rec[REC_W-1-22*c -: 22];
      d = (d << 6) | 192'(f[21:16]);
      d = (d << 5) | 192'(f[15:11]);
      d = (d << 6) | 192'(f[10:5]);
      d = (d << 5) | 192'(f[4:0]);
    end
    d = (d << 4) | 192'(b.err);
    exp_words.push_back({1'b1, 32'hB0F00000});
    exp_words.push_back({1'b0, 32'hEE1234EE});
    exp_words.push_back({1'b0, 32'd9});
    exp_words.push_back({1'b0, 32'h03010000});
    exp_words.push_back({1'b0, 32'h00810000});
    exp_words.push_back({1'b0, 32'h01234567});
    exp_words.push_back({1'b0, id});
    exp_words.push_back({1'b0, 20'h0, b.bcid});
    exp_words.push_back({1'b0, 24'h0, t});
    exp_words.push_back({1'b0, 32'h000000BC});
    for (int w = 5; w >= 0; w--) exp_words.push_back({1'b0, d[32*w +: 32]});
    exp_words.push_back({1'b0, 28'h0, b.err});
    exp_words.push_back({1'b0, 32'(b.err != 0)});
    exp_words.push_back({1'b0, 32'd2});
    exp_words.push_back({1'b0, 32'd6});
    exp_words.push_back({1'b0, 32'd1});
    exp_words.push_back({1'b1, 32'hE0F00000});
  endtask

  // output checker
  int bof_t = -1, cyc = 0;
  bit measure = 0;
  int n_len_checks = 0;
  // a dropped L1A (event FIFO full) removes its fragment from the model;
  // L1As are at least three BCs apart, so it is the newest one
  logic [15:0] drops_q = 0;
  int n_drop_seen = 0;
  always @(posedge clk) begin
    if (!rst && drops != drops_q) begin
      repeat (22) void'(exp_words.pop_back());
      n_drop_seen++;
    end
    drops_q <= drops;
  end

  always @(posedge clk) begin
    cyc++;
    if (wen && !rst) begin
      checks++;
      if (exp_words.size() == 0) begin failures++; $display("unexpected word %h at %0d", data, cyc); end
      else begin
        logic [32:0] e;
        e = exp_words.pop_front();
        if ({ctrl, data} !== e) begin failures++; $display("word %h ctrl %b exp %h at %0d", data, ctrl, e, cyc); end
      end
      if (ctrl && data == 32'hB0F00000) bof_t = cyc;
      if (ctrl && data == 32'hE0F00000) begin
        n_frag++;
        if (measure) begin
          checks++; n_len_checks++;
          if (cyc - bof_t != 21) begin failures++; $display("fragment took %0d cycles", cyc - bof_t + 1); end
        end
      end
    end
  end

  int since_trig = 100;
  task automatic bc(input bit trig_req, input bit full);
    bc_t b;
    bit trig;
    trig = trig_req && since_trig >= 2;
    since_trig = trig ? 0 : since_trig + 1;
    b.bcid = 12'($urandom); b.err = 4'($urandom_range(0, 3) == 0 ? $urandom : 0);
    for (int i = 0; i < REC_W; i += 32) rec[i +: 32] = $urandom;
    b.rec = rec;
    bcid = b.bcid; err = b.err;
    l1a = trig; ff = full;
    l1id = $urandom; tt = 8'($urandom);
    hist.push_front(b);
    if (hist.size() > 64) void'(hist.pop_back());
    if (trig) expect_event(hist[LAT], l1id, tt);
    @(posedge clk); #1;
  endtask

  initial begin
    bcid = 0; rec = '0; err = 0; l1a = 0; ff = 0; l1id = 0; tt = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 70; t++) bc(0, 0);
    // random traffic with back-pressure
    for (int t = 0; t < 3000; t++) bc($urandom_range(0, 40) == 0, $urandom_range(0, 3) == 0);
    for (int t = 0; t < 200; t++) bc(0, 0);
    // fragment length without back-pressure
    measure = 1;
    for (int k = 0; k < 5; k++) begin
      bc(1, 0);
      for (int t = 0; t < 40; t++) bc(0, 0);
    end
    measure = 0;
    checks++;
    if (n_len_checks != 5) begin failures++; $display("length measured %0d times", n_len_checks); end
    // overflow: link full, more L1As than the event FIFO holds
    begin
      int d0, e0;
      d0 = drops;
      for (int k = 0; k < 6; k++) begin
        bc(1, 1);
        bc(0, 1);
        bc(0, 1);
      end
      repeat (3) bc(0, 1);
      checks++;
      if (drops != d0 + 2) begin failures++; $display("drops %0d exp %0d", drops, d0 + 2); end
    end
    for (int t = 0; t < 300; t++) bc(0, 0);
    checks++;
    if (exp_words.size() != 0 || n_frag < 50 || ev_cnt != 32'(n_frag)) begin
      failures++; $display("left %0d words, %0d fragments, ev_cnt %0d", exp_words.size(), n_frag, ev_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
