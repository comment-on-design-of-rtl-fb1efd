// rev_peres: Peres gate (PG), a 3x3 reversible gate.
//
// Outputs P = A, Q = A xor B and R = (A and B) xor C. The mapping is a
// bijection on the eight input patterns. With C = 0 the gate is a reversible
// AND (R = A*B, used to form a partial product) and at the same time a half
// adder (Q = sum, R = carry of A + B).
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
//
// The design names this gate and prices it at two XORs and one AND; the output
// equations are the standard Peres gate definition, which matches that cost.
module rev_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;

endmodule
