// rev_pp_gen: reversible partial-product generator of the 4x4 multiplier.
//
// Forms the N*N partial products x_i AND y_j with one Peres gate per product
// (A = copy of x_i, B = copy of y_j, C = 0, so R = x_i*y_j). A reversible
// circuit may not fan a signal out, so each operand bit is first copied by
// Feynman gates with B = 0 (the copying circuit): every bit feeds N/2 Feynman
// gates, each of which yields two copies, giving the N copies the Peres gates
// need. For N = 4 that is 16 Peres gates and 16 Feynman gates.
//
// Copy assignment, as in the 4x4 drawing: the Feynman gate k of x_i serves the
// Peres gates of y_(2k) and y_(2k+1); the Feynman gate k of y_j serves the
// Peres gates of x_(2k) and x_(2k+1).
//
// Interface: x, y (N bits each) in; pp[i][j] = x_i*y_j out; garb[i][j] holds
// the two other Peres outputs of that gate (P = x_i, Q = x_i xor y_j). All
// Feynman outputs are consumed. Purely combinational, no clock.
//
// The gate counts, the copying circuits and the Peres gates with a constant-0
// input follow the design. As drawn there, each operand bit drives the inputs
// of two Feynman gates; this is kept. Which input of the Peres gate gets x and
// which gets y is not printed and is a choice made here; it changes only the
// garbage outputs. N is a parameter (even values only) with the design's 4 as
// default.
module rev_pp_gen #(
  parameter int unsigned N = revmul_pkg::OPW
) (
  input  logic [N-1:0]                           x,
  input  logic [N-1:0]                           y,
  output logic [N-1:0][N-1:0]                    pp,
  output revmul_pkg::pg_garbage_t [N-1:0][N-1:0] garb
);

  localparam int unsigned NFG = N / 2;  // Feynman gates per operand bit

  if (N < 2 || N % 2 != 0) begin : g_bad_n
    $error("rev_pp_gen: N must be even and at least 2");
  end

  // Copies of the operand bits: xc[i][k] is copy k of x_i.
  logic [N-1:0][N-1:0] xc;
  logic [N-1:0][N-1:0] yc;

  for (genvar i = 0; i < N; i++) begin : g_bit
    for (genvar k = 0; k < NFG; k++) begin : g_fg
      rev_feynman u_fg_x (
        .a(x[i]), .b(1'b0), .p(xc[i][2*k]), .q(xc[i][2*k+1])
      );
      rev_feynman u_fg_y (
        .a(y[i]), .b(1'b0), .p(yc[i][2*k]), .q(yc[i][2*k+1])
      );
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      rev_peres u_pg (
        .a(xc[i][j]),
        .b(yc[j][i]),
        .c(1'b0),
        .p(garb[i][j].p),
        .q(garb[i][j].q),
        .r(pp[i][j])
      );
    end
  end

endmodule
