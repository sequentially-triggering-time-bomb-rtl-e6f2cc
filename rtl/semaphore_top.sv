// semaphore_top: two-LED railway semaphore built as a wired microsequencer,
// with a sequential "time-bomb" hardware Trojan attached.
//
// The golden design is a six-state Moore machine. Its state lives as a binary
// number in a 4-bit register (usq_reg); a 1-of-8 decoder (usq_dec) turns it into
// state lines S0..S7, and a small gate network (usq_ctrl) decides from those
// lines and the two buttons whether the register counts up (INC), loads a new
// state number (/PL, Y) or returns to S1 (/RES). Pressing B1/B0 in the order
// 00 -> 01 -> 11 -> 10 -> 00 reaches S3 (green LED, z1); the order
// 00 -> 10 -> 11 -> 01 -> 00 reaches S6 (red LED, z0). Both LEDs stay lit
// until the hard reset bres_n.
//
// The Trojan is an 8-bit free-running counter (ht_trigger) whose all-ones
// state fires for one clock in 256, and one XOR (ht_payload) in a victim wire.
// In the default configuration the victim is x1 where it enters the S5*x1*x0
// term of /PL, exactly as in the paper: while the trigger fires, S5 with
// inputs 01 loads S4 instead of holding, and S5 with inputs 11 holds instead
// of loading S4. The parameter HIJACK (a mask, see usq_pkg) also places XORs on
// x1 and x0 everywhere, or on INC, /PL or /RES, which the paper says the
// same method can reach; HIJACK = HJ_NONE gives the golden model.
//
// Interface: x1, x0 are the button levels (1 = pushed, as the paper's text
// states) and are taken to be synchronous to clk; bres_n is the active-low
// hard reset, which also clears the Trojan's counter (this design's choice).
// z1/z0 drive the green/red LED stages. state shows the register contents.
// Timing: one state step per rising clock edge; outputs decode the register.
// With HIJACK = HJ_NONE an assertion checks that the register stays in S1..S6.
module semaphore_top
  import usq_pkg::*;
#(
  parameter logic [HJ_W-1:0] HIJACK   = HJ_DEFAULT,
  parameter int unsigned     HT_WIDTH = HT_CNT_W
) (
  input  logic             clk,
  input  logic             bres_n,  // Bres button: hard reset, active low
  input  logic             x1,      // button B1, 1 = pushed
  input  logic             x0,      // button B0, 1 = pushed
  output logic             z1,      // green LED on
  output logic             z0,      // red LED on
  output logic [REG_W-1:0] state    // register contents (state number)
);

  logic [DEC_N-1:0]    s;
  logic                trig;
  logic                x1_h, x0_h, x1_pl5;
  reg_ctl_t            ctl, ctl_h;

  // Trojan trigger: the "time bomb".
  ht_trigger #(.K(HT_WIDTH)) u_trigger (
    .clk   (clk),
    .rst_n (bres_n),
    .trig  (trig)
  );

  // Payload XORs on the inputs of the gate network.
  ht_payload #(.EN(HIJACK[HJ_X1])) u_pay_x1 (.sig(x1), .trig(trig), .sig_p(x1_h));
  ht_payload #(.EN(HIJACK[HJ_X0])) u_pay_x0 (.sig(x0), .trig(trig), .sig_p(x0_h));
  ht_payload #(.EN(HIJACK[HJ_X1_S5PL] | HIJACK[HJ_X1])) u_pay_x1_pl5 (
    .sig(x1), .trig(trig), .sig_p(x1_pl5));

  usq_ctrl u_ctrl (
    .s      (s),
    .x1     (x1_h),
    .x0     (x0_h),
    .x1_pl5 (x1_pl5),
    .ctl    (ctl),
    .z1     (z1),
    .z0     (z0)
  );

  // Payload XORs on the register's control lines.
  ht_payload #(.EN(HIJACK[HJ_INC])) u_pay_inc (.sig(ctl.inc),   .trig(trig), .sig_p(ctl_h.inc));
  ht_payload #(.EN(HIJACK[HJ_PL]))  u_pay_pl  (.sig(ctl.pl_n),  .trig(trig), .sig_p(ctl_h.pl_n));
  ht_payload #(.EN(HIJACK[HJ_RES])) u_pay_res (.sig(ctl.res_n), .trig(trig), .sig_p(ctl_h.res_n));
  assign ctl_h.y = ctl.y;

  usq_reg u_reg (
    .clk   (clk),
    .rst_n (bres_n),
    .inc   (ctl_h.inc),
    .pl_n  (ctl_h.pl_n),
    .res_n (ctl_h.res_n),
    .d     (ctl_h.y),
    .q     (state)
  );

  usq_dec u_dec (
    .a (state),
    .s (s)
  );

  // Without a payload the register only ever holds one of the six states.
  if (HIJACK == HJ_NONE) begin : g_golden_check
    a_golden_states : assert property (
      @(posedge clk) disable iff (!bres_n) state inside {[ST_S1:ST_S6]})
      else $error("golden sequencer left S1..S6: state %0d", state);
  end

endmodule
