// usq_ctrl: the gate network of the wired microsequencer.
//
// From the decoded state lines S1..S6 and the button inputs x1, x0 it forms
// the register's control lines and the load value, and the two LED outputs,
// as the paper's equations give them:
//   INC  = S1*x1*x0 + S2*/x1 + S4*/x1*x0 + S5*/x1*/x0
//   /PL  = /(S1*x1*/x0 + S2*/x1*x0 + S5*x1*x0)
//   /RES = /(S1*/x1 + S4*/x1*/x0)
//   Y3 = 0, Y2 = S1 + S5, Y1 = 0, Y0 = S2
//   Z1 = S3 (green LED), Z0 = S6 (red LED)
// The input x1_pl5 is the copy of x1 that enters the S5*x1*x0 term of /PL
// only. In the golden model it is tied to x1; the Trojan of the paper
// breaks exactly this wire and feeds it from its payload XOR. Bringing that one
// wire out as a separate port is this design's way of giving the Trojan its
// insertion point.
//
// S0 and S7 are decoded but belong to no state of the machine, so their
// lines enter no equation.
//
// Purely combinational.
module usq_ctrl
  import usq_pkg::*;
(
  input  logic [DEC_N-1:0] s,       // decoded state lines S0..S7
  input  logic             x1,      // button B1
  input  logic             x0,      // button B0
  input  logic             x1_pl5,  // x1 as seen by the S5 term of /PL
  output reg_ctl_t         ctl,     // INC, /PL, /RES and Y to the register
  output logic             z1,      // green LED
  output logic             z0       // red LED
);

  always_comb begin
    ctl.inc   = (s[1] &  x1 &  x0) | (s[2] & ~x1) | (s[4] & ~x1 & x0) | (s[5] & ~x1 & ~x0);
    ctl.pl_n  = ~((s[1] & x1 & ~x0) | (s[2] & ~x1 & x0) | (s[5] & x1_pl5 & x0));
    ctl.res_n = ~((s[1] & ~x1) | (s[4] & ~x1 & ~x0));
    ctl.y     = {1'b0, s[1] | s[5], 1'b0, s[2]};
    z1        = s[3];
    z0        = s[6];
  end

endmodule
