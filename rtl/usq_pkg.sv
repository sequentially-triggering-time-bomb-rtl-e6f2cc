// usq_pkg: shared constants and types of the railway semaphore microsequencer
// and of the sequential "time-bomb" Trojan attached to it.
//
// The microsequencer keeps its state as a plain binary number in a 4-bit
// register; state Sk is register value k, and a 1-of-8 decoder turns the number
// back into one line per state. The state names S1..S6, the 4-bit register and
// the 8 decoder outputs follow the paper. The register value that a reset
// gives (S1) follows the paper's flow chart, which enters S1 from "Reset".
// The hijack mask below is this design's own way of choosing which internal
// signals the Trojan payload inverts: the paper inserts it on X1 in the
// S5 term of the parallel-load network and says it can be repeated on
// X1, X0, INC, PL and RES.
package usq_pkg;

  // Width of the state register Reg[3:0] and number of decoder outputs.
  localparam int unsigned REG_W = 4;
  localparam int unsigned DEC_N = 8;

  // State numbers (register contents).
  typedef enum logic [REG_W-1:0] {
    ST_S0 = 4'd0,
    ST_S1 = 4'd1,
    ST_S2 = 4'd2,
    ST_S3 = 4'd3,
    ST_S4 = 4'd4,
    ST_S5 = 4'd5,
    ST_S6 = 4'd6,
    ST_S7 = 4'd7
  } state_e;

  // Value loaded by the functional reset (RES) and by the hard reset button.
  localparam logic [REG_W-1:0] RESET_STATE = ST_S1;

  // Width of the Trojan's free-running up counter.
  localparam int unsigned HT_CNT_W = 8;

  // Hijack mask: one bit per internal signal the Trojan payload can invert.
  localparam int unsigned HJ_W       = 6;
  localparam int unsigned HJ_X1_S5PL = 0;  // X1 only in the S5*x1*x0 term of PL
  localparam int unsigned HJ_X1      = 1;  // X1 everywhere in the control network
  localparam int unsigned HJ_X0      = 2;  // X0 everywhere in the control network
  localparam int unsigned HJ_INC     = 3;  // the INC line of the register
  localparam int unsigned HJ_PL      = 4;  // the /PL line of the register
  localparam int unsigned HJ_RES     = 5;  // the /RES line of the register

  localparam logic [HJ_W-1:0] HJ_NONE    = '0;                       // golden model
  localparam logic [HJ_W-1:0] HJ_DEFAULT = HJ_W'(1) << HJ_X1_S5PL;   // the inserted Trojan

  // Control lines of the state register.
  typedef struct packed {
    logic             inc;    // count up
    logic             pl_n;   // parallel load, active low
    logic             res_n;  // functional reset to S1, active low
    logic [REG_W-1:0] y;      // parallel-load value
  } reg_ctl_t;

endpackage
