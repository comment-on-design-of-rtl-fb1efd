# Reversible 4x4 multiplier from Feynman, Peres and HNG gates

This is a 4-bit by 4-bit multiplier written only with *reversible* gates.
Every gate has as many outputs as inputs, and its inputs can always be
recovered from its outputs. A reversible circuit has two rules an ordinary
netlist does not have:

* **No fan-out and no fan-in.** A wire may drive exactly one gate input, and
  wires may not be joined. If a signal is needed twice, a gate has to make the
  copy.
* **Constants in, garbage out.** A gate that computes, say, an AND needs extra
  inputs tied to a constant and has extra outputs that nobody uses (garbage).
  Both are counted when such designs are compared.

The multiplier has two stages. A partial-product generator forms the sixteen
products `x_i AND y_j`, with copying gates in front so that no operand bit
fans out. An addition network then sums the products column by column along
a single carry chain of full-adder gates.

The RTL describes the gate network exactly, one module instance per reversible
gate, so that the structure, the gate count and the garbage can be inspected
and simulated. The whole design is combinational: no clock, no reset, no
pipeline.

**Read this before using it as a multiplier.** The addition network is
implemented as specified, and as specified it does **not** return `x*y` for
every operand pair. The section on the addition network below explains why.
It returns the exact product for 184 of the 256 pairs.

## The three gates

| Gate | Module | Inputs | Outputs | Use in this design |
|---|---|---|---|---|
| Feynman (FG) | `rev_feynman` | A, B | P = A, Q = A ^ B | with B = 0: copies A to both outputs |
| Peres (PG) | `rev_peres` | A, B, C | P = A, Q = A ^ B, R = (A & B) ^ C | with C = 0: R = A & B (partial product), or a half adder (Q = sum, R = carry) |
| HNG | `rev_hng` | A, B, C, D | P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D | with D = 0: full adder, R = sum, S = carry |

Each of these maps its input patterns one-to-one onto its output patterns. The
testbenches check this exhaustively. These are the standard definitions of the
three gates. The specification gives the Feynman gate's copying behaviour and
each gate's cost in two-input XORs (a) and ANDs (b): FG = a, PG = 2a + b,
HNG = 5a + 2b. It does not print the Peres or HNG equations. The HNG equations
as written here take four XORs, one fewer than that cost figure.

## Stage 1: partial products without fan-out (`rev_pp_gen`)

Each partial product `x_i*y_j` comes from one Peres gate with A = a copy of
`x_i`, B = a copy of `y_j` and C = 0, so R = `x_i*y_j`. Its other two outputs
are garbage: P = `x_i` and Q = `x_i ^ y_j`.

Each operand bit reaches four Peres gates. A Feynman gate with B = 0 makes two
copies, so each bit feeds two Feynman gates:

* Copies of `x_i`: the first Feynman gate serves the Peres gates of `y0` and
  `y1`. The second serves those of `y2` and `y3`.
* Copies of `y_j`: the first Feynman gate serves `x0` and `x1`. The second
  serves `x2` and `x3`.

That makes 16 Peres gates and 16 Feynman gates for N = 4. All Feynman outputs
are used, so the stage leaves 32 garbage outputs.

As specified, each operand bit drives the inputs of two Feynman gates. This is
kept. Strictly, this is itself a fan-out of the primary input. A circuit with
no fan-out at all would need a third Feynman gate per bit, making 24 in all.

`rev_pp_gen` has a parameter `N` (default 4, even values only). It uses the same
scheme of two copies per Feynman gate, with N/2 Feynman gates per bit.

## Stage 2: the addition network (`rev_adder_net`)

The network is one chain of ten gates. Each gate's carry output goes to the
carry input (C) of the next. Its sum goes either into the A input of the next
gate, or out as a product bit:

```
P0 = x0y0
PG0   (x1y0, x0y1, 0)        -> P1        column 1
HNG1  (x2y0, x1y1, c)        -> s         column 2
HNG2  (s,    x0y2, c)        -> P2
HNG3  (x3y0, x2y1, c)        -> s         column 3
HNG4  (s,    x1y2, c)        -> s
HNG5  (s,    x0y3, c)        -> P3
HNG6  (x3y1, x2y2, c)        -> s         column 4
HNG7  (s,    x1y3, c)        -> P4
HNG8  (x2y3, x3y2, c)        -> P5        column 5
PG17  (x3y3, c,    0)        -> P6 (Q), P7 (R)
```

The garbage outputs are named g0..g17:

* g0 is P of PG0.
* g(2k-1) and g(2k) are P and Q of HNG k.
* g17 is P of PG17.

**Why the result is not always x*y.** In an array multiplier, a carry out of
column k has weight 2^(k+1) and must go to column k+1. Here, in columns 2, 3
and 4, the carry of one HNG goes into the *next HNG of the same column*. There
it is added at weight 2^k. Only the carry of the last gate in a column moves
on. A column that gets two carries in a single operand pair therefore loses
value. The smallest example is 3 x 3:

* column 1: x1y0 + x0y1 = 2, so P1 = 0, carry 1
* column 2: x1y1 + carry = 2 in HNG1, so sum 0, carry 1
* HNG2: 0 + x0y2 (= 0) + that carry 1, so P2 = 1

The circuit outputs 0b0101 = 5 instead of 9. Over all operand pairs the network
is exact for 184 of 256, and the full testbench prints the first mismatches.
Where carries never pile up, for example when either operand is 0, 1, 2, 4 or
8, the result is exact.

This RTL does not correct the network. A correct version needs each column to
pass all of its carries to the next column, as in a standard carry-save or
ripple array. That takes a different gate count from the one below.

## Cost of the built circuit

| | Built | Stated in the specification |
|---|---|---|
| Peres gates | 18 (16 + 2) | 18 |
| Feynman gates | 16 | 16 |
| HNG gates | 8 | 8 |
| Logic cost | 18(2a+b) + 8(5a+2b) + 16a = 92a + 34b | 92a + 34b |
| Garbage outputs | 32 + 18 = 50 | 49 (17 for the addition network) |
| Constant-0 inputs | 16 + 16 + 10 = 42 | not given for this circuit |

The garbage count follows the labelled outputs of the addition network, g0 to
g17, which is 18 and not 17.

## Files and interfaces

| File | Contents |
|---|---|
| `rtl/revmul_pkg.sv` | `OPW` = 4, `PRODW` = 8, `ADD_GARBAGE` = 18; `pg_garbage_t`, `pp_array_t`, `pp_garbage_t` |
| `rtl/rev_feynman.sv`, `rtl/rev_peres.sv`, `rtl/rev_hng.sv` | the three gates |
| `rtl/rev_pp_gen.sv` | stage 1 |
| `rtl/rev_adder_net.sv` | stage 2 |
| `rtl/rev_mult4x4.sv` | top: stage 1 into stage 2 |

The top, `rev_mult4x4`, has these ports:

* inputs `x[3:0]` and `y[3:0]`
* output `p[7:0]`
* output `pp_garbage`, 16 x {p, q}, indexed `[i][j]` like the partial products
* output `add_garbage[17:0]`

Partial products are indexed `pp[i][j] = x_i & y_j` throughout. Constant
inputs are tied to 0 inside the modules. Every garbage output is brought out,
so the top is reversible at its boundary.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_rev_feynman`, `tb_rev_peres`, `tb_rev_hng`: every input pattern. Outputs
  are compared with integer arithmetic (for example, HNG: R = n mod 2 and
  S = (n div 2) ^ D with n = A + B + C). Each also checks that the output
  patterns are all distinct.
* `tb_rev_pp_gen`: all 256 pairs at N = 4, plus 500 random pairs at N = 6. It
  checks every partial product and both garbage outputs of every Peres gate.
* `tb_rev_adder_net`: all 65,536 patterns of the 16 inputs. Product and garbage
  are compared with a model that treats each full adder as an integer sum,
  chained as wired.
* `tb_rev_mult4x4`: the top at its default size, all 256 pairs, against the
  same model computed from the operands. It counts Feynman copies carrying a
  1, the carry out of each HNG, carries kept inside a column, and P7 being set.
  Each must happen at least once. It also lists the pairs where the result
  differs from `x*y`. These are not counted as failures, because they are the
  specified behaviour.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb rtl/revmul_pkg.sv \
    tb/tb_rev_mult4x4.sv --top-module tb_rev_mult4x4 -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## Choices made where the specification is silent

* Pin names of the gates are not printed in the drawings. In the addition
  network, the input that enters a gate from the side is taken as C (carry in),
  and the output that leaves it sideways as S or R (carry out), so that the
  chain reads as a carry chain. The two outputs next to the garbage labels are
  taken as P and Q.
* In each Peres gate of stage 1, C is the input tied to 0. `x_i` goes to A and
  `y_j` to B. Swapping A and B would change only the Q garbage.
* Two descriptions of column 2 disagree on which partial product joins the
  first full adder: {x2y0, x1y1} or {x2y0, x0y2}. The drawn version,
  {x2y0, x1y1}, is used. Sum and carry are symmetric in the three inputs, so
  the outputs are the same either way.
* No clock, reset or registers. None are described.
