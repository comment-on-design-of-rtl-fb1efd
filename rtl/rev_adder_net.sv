// rev_adder_net: addition network of the reversible 4x4 multiplier.
//
// Sums the 16 partial products pp[i][j] = x_i*y_j into the product bits P0..P7
// with two Peres gates and eight HNG full adders, all with their last input
// tied to 0. The gates form one carry chain: the carry (S) of every gate goes
// to the C input of the next, and the sum (R) either goes to the A input of
// the next gate or leaves as a product bit.
//
//   P0 = x0y0 (wire)
//   PG  u_pg0 : A=x1y0 B=x0y1 C=0        -> P1 (Q), carry to u_h1
//   HNG u_h1  : A=x2y0 B=x1y1 C=carry    -> sum to u_h2
//   HNG u_h2  : A=sum  B=x0y2 C=carry    -> P2
//   HNG u_h3  : A=x3y0 B=x2y1 C=carry    -> sum to u_h4
//   HNG u_h4  : A=sum  B=x1y2 C=carry    -> sum to u_h5
//   HNG u_h5  : A=sum  B=x0y3 C=carry    -> P3
//   HNG u_h6  : A=x3y1 B=x2y2 C=carry    -> sum to u_h7
//   HNG u_h7  : A=sum  B=x1y3 C=carry    -> P4
//   HNG u_h8  : A=x2y3 B=x3y2 C=carry    -> P5
//   PG  u_pg17: A=x3y3 B=carry C=0       -> P6 (Q), P7 (R)
//
// Garbage outputs g0..g17: g0 = P of u_pg0; g(2k-1), g(2k) = P, Q of HNG k;
// g17 = P of u_pg17.
//
// Note on the arithmetic: inside a column of more than three terms, the carry
// of the first HNG enters the next HNG of the same column instead of the next
// column, exactly as the network is drawn. This network therefore does not
// return x*y for every operand pair (3*3 gives 5, for example); it returns the
// exact product for 184 of the 256 pairs. The gate list, the wiring and the
// garbage labels follow the design; nothing here corrects it.
//
// Interface: pp (revmul_pkg::pp_array_t) in; p[7:0] product, g[17:0] garbage
// out. Purely combinational, no clock.
module rev_adder_net
  import revmul_pkg::*;
(
  input  pp_array_t              pp,
  output logic [PRODW-1:0]       p,
  output logic [ADD_GARBAGE-1:0] g
);

  // Sum (R) and carry (S) outputs of the eight HNG gates, index 1..8.
  logic [8:1] hs;
  logic [8:1] hc;
  logic       c0;  // carry out of u_pg0

  assign p[0] = pp[0][0];

  rev_peres u_pg0 (
    .a(pp[1][0]), .b(pp[0][1]), .c(1'b0),
    .p(g[0]), .q(p[1]), .r(c0)
  );

  // Column 2
  rev_hng u_h1 (
    .a(pp[2][0]), .b(pp[1][1]), .c(c0), .d(1'b0),
    .p(g[1]), .q(g[2]), .r(hs[1]), .s(hc[1])
  );
  rev_hng u_h2 (
    .a(hs[1]), .b(pp[0][2]), .c(hc[1]), .d(1'b0),
    .p(g[3]), .q(g[4]), .r(hs[2]), .s(hc[2])
  );
  assign p[2] = hs[2];

  // Column 3
  rev_hng u_h3 (
    .a(pp[3][0]), .b(pp[2][1]), .c(hc[2]), .d(1'b0),
    .p(g[5]), .q(g[6]), .r(hs[3]), .s(hc[3])
  );
  rev_hng u_h4 (
    .a(hs[3]), .b(pp[1][2]), .c(hc[3]), .d(1'b0),
    .p(g[7]), .q(g[8]), .r(hs[4]), .s(hc[4])
  );
  rev_hng u_h5 (
    .a(hs[4]), .b(pp[0][3]), .c(hc[4]), .d(1'b0),
    .p(g[9]), .q(g[10]), .r(hs[5]), .s(hc[5])
  );
  assign p[3] = hs[5];

  // Column 4
  rev_hng u_h6 (
    .a(pp[3][1]), .b(pp[2][2]), .c(hc[5]), .d(1'b0),
    .p(g[11]), .q(g[12]), .r(hs[6]), .s(hc[6])
  );
  rev_hng u_h7 (
    .a(hs[6]), .b(pp[1][3]), .c(hc[6]), .d(1'b0),
    .p(g[13]), .q(g[14]), .r(hs[7]), .s(hc[7])
  );
  assign p[4] = hs[7];

  // Column 5
  rev_hng u_h8 (
    .a(pp[2][3]), .b(pp[3][2]), .c(hc[7]), .d(1'b0),
    .p(g[15]), .q(g[16]), .r(hs[8]), .s(hc[8])
  );
  assign p[5] = hs[8];

  // Column 6 and the final carry
  rev_peres u_pg17 (
    .a(pp[3][3]), .b(hc[8]), .c(1'b0),
    .p(g[17]), .q(p[6]), .r(p[7])
  );

endmodule
