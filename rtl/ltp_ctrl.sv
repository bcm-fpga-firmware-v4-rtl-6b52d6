// ltp_ctrl: interface to the Local Trigger Processor (LTP) and event
// bookkeeping, all on the BC clock.
//  * The LTP signals L1A, ECR, Orbit and the 8-bit trigger type are latched
//    in input flip-flops first. ECR and Orbit are turned into one-BC pulses by
//    edge_detect, so a level held for several BCs counts once.
//  * L1ID: a 24-bit event counter incremented by each L1A and an 8-bit ECR
//    counter; together the extended L1ID {ECR count, L1ID}. An ECR sets the
//    L1ID to all ones (so the next L1A is event 0) and increments the ECR
//    count; software may load the ECR count (ecr_load_i).
//  * BCID: 12-bit counter wrapping after BC_PER_ORBIT; Orbit loads
//    bcid_offset_i.
//  * Post-mortem delay: after pm_trig_i recording continues for pm_delay_i
//    BCs, then pm_freeze_o rises and stays high until pm_rearm_i.
// L1ID with ECR load, BCID bookkeeping, post-mortem delay and latching of the
// four LTP signals are the BCM firmware's list; the counting conventions above
// are this design's choices. Timing: l1a_o with the updated l1id_o and ttype_o
// appear two BCs after l1a_i; ECR and Orbit act on the counters after two BCs
// as well, ecr_load_i after one.
module ltp_ctrl
  import bcm_pkg::*;
#(
  parameter int unsigned BC_PER_ORBIT = 3564
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              l1a_i,
  input  logic              ecr_i,
  input  logic              orbit_i,
  input  logic [7:0]        ttype_i,
  input  logic [BCID_W-1:0] bcid_offset_i,
  input  logic              ecr_load_i,
  input  logic [7:0]        ecr_load_val_i,
  input  logic              pm_trig_i,
  input  logic [15:0]       pm_delay_i,
  input  logic              pm_rearm_i,
  output logic              l1a_o,
  output logic [31:0]       l1id_o,
  output logic [BCID_W-1:0] bcid_o,
  output logic [7:0]        ttype_o,
  output logic              pm_freeze_o,
  output logic              pm_busy_o
);
  typedef enum logic [1:0] {PM_ARMED, PM_DELAY, PM_FROZEN} pm_state_e;

  logic       l1a_q, ecr_q, orbit_q;
  logic [7:0] ttype_q;
  logic       ecr_p, orbit_p;
  logic [23:0] evt;
  logic [7:0]  ecrc;
  pm_state_e   pm_st;
  logic [15:0] pm_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a_q <= 1'b0; ecr_q <= 1'b0; orbit_q <= 1'b0; ttype_q <= '0;
    end else begin
      l1a_q <= l1a_i; ecr_q <= ecr_i; orbit_q <= orbit_i; ttype_q <= ttype_i;
    end
  end

  edge_detect u_ecr_edge   (.clk(clk), .rst(rst), .d(ecr_q),   .pulse(ecr_p));
  edge_detect u_orbit_edge (.clk(clk), .rst(rst), .d(orbit_q), .pulse(orbit_p));

  always_ff @(posedge clk) begin
    if (rst) begin
      evt <= '1; ecrc <= '0; bcid_o <= '0;
      l1a_o <= 1'b0; ttype_o <= '0;
    end else begin
      l1a_o <= l1a_q;
      if (ecr_load_i)  ecrc <= ecr_load_val_i;
      else if (ecr_p)  ecrc <= ecrc + 8'd1;
      if (ecr_p)       evt <= '1;
      else if (l1a_q)  evt <= evt + 24'd1;
      if (l1a_q) begin
        ttype_o    <= ttype_q;
      end
      if (orbit_p)
        bcid_o <= bcid_offset_i;
      else if (bcid_o == BCID_W'(BC_PER_ORBIT - 1))
        bcid_o <= '0;
      else
        bcid_o <= bcid_o + 1'b1;
    end
  end
  assign l1id_o = {ecrc, evt};

  always_ff @(posedge clk) begin
    if (rst) begin
      pm_st <= PM_ARMED; pm_cnt <= '0;
    end else begin
      unique case (pm_st)
        PM_ARMED:  if (pm_trig_i) begin
                     pm_cnt <= pm_delay_i;
                     pm_st  <= (pm_delay_i == '0) ? PM_FROZEN : PM_DELAY;
                   end
        PM_DELAY:  if (pm_cnt <= 16'd1) pm_st <= PM_FROZEN;
                   else pm_cnt <= pm_cnt - 16'd1;
        PM_FROZEN: if (pm_rearm_i) pm_st <= PM_ARMED;
        default:   pm_st <= PM_ARMED;
      endcase
    end
  end
  assign pm_freeze_o = (pm_st == PM_FROZEN);
  assign pm_busy_o   = (pm_st == PM_DELAY);
endmodule
