// tb_ltp_ctrl: random L1A / ECR / Orbit pulses and trigger types against a
// model that applies each input at the second clock edge after it; checks the extended L1ID, the
// trigger type, the BCID (with a short orbit to see it wrap), the ECR-count
// load, and the post-mortem delay in BCs.
module tb_ltp_ctrl;
  import bcm_pkg::*;
  localparam int ORBIT = 100;
  logic clk = 0, rst = 1;
  logic l1a, ecr, orbit, ld, rearm, pmt;
  logic [7:0] tt, ldv, tt_o;
  logic [11:0] offs, bcid;
  logic [15:0] pmd;
  logic l1a_o, frz, busy;
  logic [31:0] l1id;
  int checks = 0, failures = 0;

  ltp_ctrl #(.BC_PER_ORBIT(ORBIT)) dut (
    .clk(clk), .rst(rst), .l1a_i(l1a), .ecr_i(ecr), .orbit_i(orbit), .ttype_i(tt),
    .bcid_offset_i(offs), .ecr_load_i(ld), .ecr_load_val_i(ldv), .pm_trig_i(pmt),
    .pm_delay_i(pmd), .pm_rearm_i(rearm), .l1a_o(l1a_o), .l1id_o(l1id), .bcid_o(bcid),
    .ttype_o(tt_o), .pm_freeze_o(frz), .pm_busy_o(busy));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int m_evt = 24'hFFFFFF, m_ecr = 0, m_bcid = 0, m_tt = 0;
  bit d_l1a[1], d_ecr[1], d_orb[1];
  int d_tt[1];
  bit prev_ecr = 0, prev_orb = 0;
  int n_l1a = 0, n_ecr = 0, n_orb = 0, n_wrap = 0;

  task automatic step(input bit a, input bit e, input bit o, input int t);
    l1a = a; ecr = e; orbit = o; tt = 8'(t);
    @(posedge clk); #1;
    // an input applied before the previous edge takes effect at this edge
    if (d_ecr[0] && !prev_ecr) begin m_evt = 24'hFFFFFF; m_ecr = (m_ecr + 1) % 256; n_ecr++; end
    else if (d_l1a[0]) begin m_evt = (m_evt + 1) % (1 << 24); n_l1a++; end
    if (d_l1a[0]) m_tt = d_tt[0];
    if (d_orb[0] && !prev_orb) begin m_bcid = offs; n_orb++; end
    else if (m_bcid == ORBIT - 1) begin m_bcid = 0; n_wrap++; end
    else m_bcid++;
    prev_ecr = d_ecr[0]; prev_orb = d_orb[0];
    d_l1a[0] = a; d_ecr[0] = e; d_orb[0] = o; d_tt[0] = t;
    checks++;
    if (l1id !== {8'(m_ecr), 24'(m_evt)} || bcid !== 12'(m_bcid) || tt_o !== 8'(m_tt)) begin
      failures++;
      $display("l1id %h exp %h bcid %0d exp %0d tt %h exp %h", l1id, {8'(m_ecr), 24'(m_evt)},
               bcid, m_bcid, tt_o, m_tt);
    end
  endtask

  initial begin
    l1a = 0; ecr = 0; orbit = 0; tt = 0; ld = 0; ldv = 0; offs = 12'd7; pmt = 0; pmd = 0; rearm = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 3) == 0, $urandom_range(0, 60) == 0, $urandom_range(0, 150) == 0,
           $urandom_range(0, 255));
    repeat (3) step(0, 0, 0, 0);
    checks++;
    if (n_l1a < 100 || n_ecr < 5 || n_orb < 3 || n_wrap < 3) begin
      failures++; $display("too few events: %0d %0d %0d %0d", n_l1a, n_ecr, n_orb, n_wrap);
    end
    // ECR count load from software
    ldv = 8'h5A; ld = 1; @(posedge clk); #1; ld = 0;
    m_ecr = 8'h5A;
    checks++;
    if (l1id[31:24] !== 8'h5A) begin failures++; $display("ECR load"); end
    // post-mortem delay
    foreach (pmd_list[k]) begin
      int n;
      pmd = 16'(pmd_list[k]);
      pmt = 1; @(posedge clk); #1; pmt = 0;
      n = 1;
      while (!frz && n < 2000) begin @(posedge clk); #1; n++; end
      checks++;
      if (n != pmd_list[k] + 1) begin  // registered trigger + delay
        failures++; $display("pm delay %0d took %0d BCs", pmd_list[k], n);
      end
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (!frz) begin failures++; $display("freeze not held"); end
      rearm = 1; @(posedge clk); #1; rearm = 0;
      checks++;
      if (frz) begin failures++; $display("rearm"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int pmd_list[3] = '{37, 1, 0};
endmodule
