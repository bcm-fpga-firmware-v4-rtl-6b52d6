// tb_mgt_ctrl: sends a random bit stream per channel with a different fine
// delay on each, checks every output word against the stream delayed by that
// many bits, then loads test vectors and checks their looped playback on the
// selected channels while the others keep the live data.
module tb_mgt_ctrl;
  import bcm_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  logic [N_CH-1:0][63:0] rx, raw;
  logic [N_CH-1:0][5:0] dly;
  logic [N_CH-1:0] sel;
  logic run, we;
  logic [4:0] len;
  logic [2:0] wch;
  logic [3:0] waddr;
  logic [63:0] wdata;
  int checks = 0, failures = 0;

  mgt_ctrl #(.TV_DEPTH(D)) dut (.clk(clk), .rst(rst), .rx_i(rx), .delay_i(dly), .tv_sel_i(sel),
    .tv_run_i(run), .tv_len_i(len), .tv_we_i(we), .tv_wch_i(wch), .tv_waddr_i(waddr),
    .tv_wdata_i(wdata), .raw_o(raw));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] tv_word(int ch, int a);
    return {32'(ch * 1000 + a), 32'hC0DE_0000 | 32'(a)};
  endfunction

  logic [N_CH-1:0][63:0] hist [$];
  initial begin
    rx = '0; sel = '0; run = 0; we = 0; len = 0; wch = 0; waddr = 0; wdata = 0;
    for (int c = 0; c < N_CH; c++) dly[c] = 6'(c * 9);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // fine delay
    for (int t = 0; t < 500; t++) begin
      for (int c = 0; c < N_CH; c++) rx[c] = {$urandom, $urandom};
      hist.push_front(rx);
      if (hist.size() > 2) void'(hist.pop_back());
      @(posedge clk); #1;
      if (t >= 1) begin
        for (int c = 0; c < N_CH; c++) begin
          logic [63:0] e;
          for (int b = 0; b < 64; b++)
            e[b] = (b >= dly[c]) ? hist[0][c][b - dly[c]] : hist[1][c][64 + b - dly[c]];
          checks++;
          if (raw[c] !== e) begin failures++; $display("delay ch%0d got %h exp %h", c, raw[c], e); end
        end
      end
    end
    // test vectors
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < D; a++) begin
        we = 1; wch = 3'(c); waddr = 4'(a); wdata = tv_word(c, a);
        @(posedge clk); #1;
      end
    we = 0;
    sel = 8'b1010_0101; len = 5'd5; run = 1;
    @(posedge clk); #1;   // first word read from the RAM
    for (int t = 0; t < 40; t++) begin
      for (int c = 0; c < N_CH; c++) rx[c] = {$urandom, $urandom};
      @(posedge clk); #1;
      for (int c = 0; c < N_CH; c++) if (sel[c]) begin
        checks++;
        if (raw[c] !== tv_word(c, t % 5)) begin
          failures++; $display("playback ch%0d t=%0d got %h exp %h", c, t, raw[c], tv_word(c, t % 5));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
