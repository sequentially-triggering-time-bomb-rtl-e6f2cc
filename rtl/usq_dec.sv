// usq_dec: the "1 of 8" state decoder of the wired microsequencer.
//
// It turns the 4-bit state number held in the register into one line per
// state: s[k] is 1 exactly when the register holds k, for k = 0..7. Register
// values 8..15 (input bit 3 set) drive no line, as a BCD-style decoder with
// eight used outputs does. The four inputs and eight outputs follow the
// paper's figure; active-high outputs follow its equations, which use the
// lines S1..S6 directly as product-term inputs. Behaviour for values above 7 is
// this design's own choice; the microsequencer never loads them.
//
// Purely combinational.
module usq_dec #(
  parameter int unsigned W = usq_pkg::REG_W,
  parameter int unsigned N = usq_pkg::DEC_N
) (
  input  logic [W-1:0] a,
  output logic [N-1:0] s
);

  always_comb begin
    s = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (a == W'(k)) s[k] = 1'b1;
    end
  end

endmodule
