// usq_reg: the 4-bit state register Reg[3:0] of the wired microsequencer.
//
// The register holds the number of the current state. On each rising clock
// edge it performs one of four operations, chosen by three control lines:
//   /RES = 0           -> reset: load RESET_STATE (state S1)
//   /PL  = 0           -> parallel load of Y[3:0]
//   INC  = 1           -> count up by one
//   otherwise          -> hold
// The operations and their encoding on INC, /PL and /RES come from the
// paper's transition table, which lists rows where INC and /PL are both
// asserted and the result is the load; so /RES outranks /PL and /PL outranks
// INC, as in common counter parts. The value loaded by /RES (S1 rather than 0)
// is taken from the flow chart, where "Reset" enters S1. The asynchronous
// active-low hard reset rst_n (the Bres button) is this design's own addition
// of a pin: the paper says only that Bres resets the system.
//
// Timing: one operation per clock; q changes only on the rising edge of clk
// or at once when rst_n falls.
module usq_reg #(
  parameter int unsigned            W         = usq_pkg::REG_W,
  parameter logic [W-1:0]           RST_VALUE = W'(usq_pkg::RESET_STATE)
) (
  input  logic         clk,
  input  logic         rst_n,   // hard reset, asynchronous, active low
  input  logic         inc,     // count up
  input  logic         pl_n,    // parallel load, active low
  input  logic         res_n,   // synchronous reset to RST_VALUE, active low
  input  logic [W-1:0] d,       // parallel-load value Y
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= RST_VALUE;
    else if (!res_n) q <= RST_VALUE;
    else if (!pl_n)  q <= d;
    else if (inc)    q <= q + W'(1);
  end

endmodule
