// revmul_pkg: constants and types shared by the reversible 4x4 multiplier.
//
// The multiplier multiplies two 4-bit operands x and y into an 8-bit product
// P7..P0. It is built only from reversible gates: Feynman gates (FG) used as
// copying circuits, Peres gates (PG) and HNG full-adder gates. Every gate output
// that is not consumed by another gate is a "garbage" output; the types below
// bundle those so that they can be brought out of the hierarchy.
//
// The operand width of 4 follows the design; the grouping of garbage outputs
// into the structs below is a choice of this implementation.
package revmul_pkg;

  // Operand width of the multiplier and width of the product.
  localparam int unsigned OPW   = 4;
  localparam int unsigned PRODW = 2 * OPW;

  // Number of garbage outputs of the addition network (labels g0..g17).
  localparam int unsigned ADD_GARBAGE = 18;

  // The two unused outputs of a Peres gate that produces a partial product:
  // P = A (a copy of the x operand bit) and Q = A xor B.
  typedef struct packed {
    logic p;
    logic q;
  } pg_garbage_t;

  // Partial products of the 4x4 multiplier, indexed [i][j] = x_i AND y_j.
  typedef logic [OPW-1:0][OPW-1:0] pp_array_t;

  // Garbage outputs of the partial-product generator, indexed [i][j] like the
  // partial products.
  typedef pg_garbage_t [OPW-1:0][OPW-1:0] pp_garbage_t;

endpackage
