// rev_feynman: Feynman gate (FG), the 2x2 reversible controlled-NOT gate.
//
// Outputs P = A and Q = A xor B. The mapping (A,B) -> (P,Q) is a bijection, so
// no information is lost. With B tied to 0 both outputs carry A: this is the
// "copying circuit" that replaces fan-out of a signal in a reversible design.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
//
// The first output (P = A) and the copying behaviour with B = 0 follow the
// design; the second output is not labelled in its drawing and is taken as the
// usual A xor B, which matches the cost of one two-input XOR given for the FG.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
