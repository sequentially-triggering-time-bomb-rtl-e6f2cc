// ht_payload: payload of the "time-bomb" hardware Trojan.
//
// An XOR gate placed in a victim wire: while trig is 0 the wire passes
// unchanged (sig_p = sig), and while trig is 1 it is inverted. With the
// enable parameter EN cleared the gate is left out and the wire is intact,
// which gives back the golden model; that parameter is this design's own.
// The XOR with the original signal follows the paper.
//
// Purely combinational.
module ht_payload #(
  parameter bit EN = 1'b1
) (
  input  logic sig,    // original signal
  input  logic trig,   // Trojan trigger
  output logic sig_p   // hijacked signal
);

  assign sig_p = EN ? (sig ^ trig) : sig;

endmodule
