// rev_mult4x4: reversible 4x4 multiplier built from FG, PG and HNG gates.
//
// Two stages, both purely combinational:
//   1. rev_pp_gen forms the 16 partial products x_i*y_j with 16 Peres gates;
//      16 Feynman gates with B = 0 copy the operand bits so that no signal
//      fans out.
//   2. rev_adder_net adds the partial products column by column along one
//      carry chain of 2 Peres gates and 8 HNG full adders, giving P0..P7.
// In all: 18 PG, 16 FG and 8 HNG gates, 42 constant-0 inputs, and 32 + 18 = 50
// garbage outputs, all brought out as ports.
//
// The addition network is built as it is drawn in the design. Its columns fold
// a carry back into the same column, so p equals x*y for 184 of the 256 operand
// pairs only (see rev_adder_net). The testbench checks the circuit against an
// arithmetic model of that wiring and reports the pairs where it departs from
// x*y.
//
// Interface: x, y (4 bits) in; p (8 bits) out; pp_garbage and add_garbage are
// the unused gate outputs of the two stages. No clock, no reset, no latency
// beyond gate delay.
module rev_mult4x4
  import revmul_pkg::*;
(
  input  logic [OPW-1:0]         x,
  input  logic [OPW-1:0]         y,
  output logic [PRODW-1:0]       p,
  output pp_garbage_t            pp_garbage,
  output logic [ADD_GARBAGE-1:0] add_garbage
);

  pp_array_t pp;

  rev_pp_gen #(.N(OPW)) u_pp_gen (
    .x   (x),
    .y   (y),
    .pp  (pp),
    .garb(pp_garbage)
  );

  rev_adder_net u_adder_net (
    .pp(pp),
    .p (p),
    .g (add_garbage)
  );

endmodule
