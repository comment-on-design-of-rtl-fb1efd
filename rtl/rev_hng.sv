// rev_hng: HNG gate, a 4x4 reversible full adder.
//
// Outputs P = A, Q = B, R = A xor B xor C and S = ((A xor B) and C) xor
// (A and B) xor D. The mapping is a bijection on the sixteen input patterns.
// With D = 0, R is the sum and S the carry of A + B + C; A and B come back out
// unchanged as garbage.
//
// Interface: a, b, c, d in; p, q, r, s out. Purely combinational, no clock.
//
// The design uses the HNG gate as its reversible full adder (priced there at
// five XORs and two ANDs) but does not print its equations; the ones above are
// the standard HNG gate definition. As written they take four XORs and two ANDs.
module rev_hng (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic axb;

  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;

endmodule
