// tb_data_proc_ctrl: random samples on all channels; checks each channel's
// pulses, the 176-bit record packing (channel 0 in the top bits, fields
// P1x P1w P2x P2w), the per-BC hit sum and the running hit total.
module tb_data_proc_ctrl;
  import bcm_pkg::*;
  import bcm_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic [N_CH-1:0][63:0] raw;
  chan_pulses_t [N_CH-1:0] pulses;
  logic [REC_W-1:0] rec;
  logic [9:0] bc_hits;
  logic [31:0] total;
  int checks = 0, failures = 0;
  longint exp_total = 0;

  data_proc_ctrl dut (.clk(clk), .rst(rst), .raw_i(raw), .pulses_o(pulses), .rec_o(rec),
                      .bc_hits_o(bc_hits), .hit_total_o(total));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raw = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [N_CH-1:0][63:0] s;
      logic [REC_W-1:0] erec;
      int eh;
      for (int c = 0; c < N_CH; c++) s[c] = rand_sample();
      raw = s;
      @(posedge clk); #1;
      eh = 0;
      erec = '0;
      for (int c = 0; c < N_CH; c++) begin
        chan_pulses_t e;
        e = ref_pulses(s[c]);
        eh += ref_hits(s[c]);
        erec = {erec[REC_W-23:0], e.p1.pos, e.p1.width, e.p2.pos, e.p2.width};
        checks++;
        if (pulses[c] !== e) begin failures++; $display("ch%0d pulses %p exp %p", c, pulses[c], e); end
      end
      checks++;
      if (rec !== erec) begin failures++; $display("record %h exp %h", rec, erec); end
      checks++;
      if (bc_hits !== 10'(eh)) begin failures++; $display("bc hits %0d exp %0d", bc_hits, eh); end
      checks++;
      if (total !== 32'(exp_total)) begin failures++; $display("total %0d exp %0d", total, exp_total); end
      exp_total += eh;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
