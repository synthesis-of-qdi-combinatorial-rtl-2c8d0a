# DIMOS: quasi-delay-insensitive combinational logic from C elements and OR gates

Clockless (asynchronous) logic that is *quasi delay insensitive* (QDI) works
for any gate and wire delays. The one exception is that the branches of some
forks must arrive at the same time (the "isochronic fork" assumption). Such
logic carries every bit on two wires and finds out when its own result is
complete, without a delay line or a clock.

The price is area. The classic construction, DIMS (delay-insensitive minterm
synthesis), builds every minterm of every output rail from Muller C elements.
A two-input AND then costs four C elements. An NCL-style variant (NCL_D)
applies DIMS to each AND/OR term of a minimised function and saves a little.

This RTL implements a leaner construction called **DIMOS**, short for
*delay-insensitive minterm optimised synthesis*. It works in three steps:

1. Each rail of a term gets a *disjoint minimised* cover instead of its full
   minterm list.
2. A product in that cover may lack one of the term's variables. That
   variable is added back as the OR of both its rails, which means "this
   input has arrived, whatever its value".
3. Each product is then one two-input C element, and each sum is an OR gate.

The result needs fewer C elements but still waits for every input. The
repository holds the two DIMOS building cells and eight small circuits built
from them, in synthesizable SystemVerilog.

## Dual-rail signals and the 4-phase protocol

Each logical signal is a pair of wires `{r1, r0}` (`qdi_pkg::dr_t`, a packed
struct, so its value reads as "r1 r0"):

| r1 r0 | meaning |
|-------|---------|
| 00    | NULL (spacer) |
| 01    | data 0 |
| 10    | data 1 |
| 11    | never used |

Every circuit is used with a return-to-zero handshake:
1. The environment drives every input to NULL and waits until every output is NULL.
2. It drives valid data and waits until every output is valid. This "all
   outputs valid" condition is the completion signal: no timing margin is needed.
3. It returns to step 1.

Inverting a signal costs nothing: you swap its rails (`qdi_pkg::dr_not`).

## The C element (`c_element`)

The C element is the state-holding gate of this logic:

| c1 c2 | q next |
|-------|--------|
| 0 0   | 0 |
| 1 1   | 1 |
| 0 1, 1 0 | q (holds) |

In RTL it is a level-sensitive latch that is transparent while `c1 == c2`
and loads `c1`. Synthesis therefore reports one latch per C element, and this
is intended. A silicon C element would be a custom cell, for example a
semi-static one with a weak keeper, and the RTL gives only its function.
Building it from ordinary AND/OR gates with feedback is not QDI, so that
form is not used.

There is no reset. The first NULL phase of the protocol drives both inputs of
every C element to 0, and that clears it. Any environment must therefore
start by holding all inputs at NULL.

## The two DIMOS cells

**AND term, F = A·B** (`dimos_and2`, 3 C elements, 2 OR2):

    F1 = C(A1, B1)
    F0 = C(B0, A0+A1) + C(A0, B1)

The false rail is the disjoint cover `B0 + A0·B1`. The product `B0` lacks A,
so it is completed with `A0+A1`.

**OR term, F = A + B** (`dimos_or2`, 3 C elements, 2 OR2):

    F1 = C(A1, B0+B1) + C(A0, B1)
    F0 = C(A0, B0)

For comparison, DIMS needs four C elements for each of these terms.

How the cells give QDI behaviour:

- **Each rail fires on exactly one product.** The covers are disjoint, so for
  any valid input word exactly one C element in the cell fires. That is why
  the OR gates never see two products at once.
- **The fired C element holds its output.** It keeps the result until *both*
  of its inputs return to 0. As a result, every output leaves its value only
  after every input has returned to NULL.
- **What the outputs do not show.** Some internal transitions are not visible
  at the outputs. Examples are the OR gate "A has arrived" falling, or a
  C element that had only one input high. These are covered by the
  isochronic-fork assumption: the method's own characterisation calls this
  *weak* indication with respect to internal gates.

## Composing circuits

A function is written as a minimised sum of products and mapped onto
two-input AND and OR terms. Each term then becomes a `dimos_and2` or
`dimos_or2` cell. Complemented literals are rail swaps. Operand order
matters: it decides which variable is completed by an OR gate.
`qdi_f_example` and `qdi_mux2` choose the operand order so that each cell
builds exactly the published covers. In each of the following, "C" is a
two-input C element and "OR2" a two-input OR gate:

| module | function | built as | C | OR2 | transistors* |
|---|---|---|---|---|---|
| `qdi_f_example` | F(a,b,c) = Σ(3,6,7) = ab + bc | AND(b,a), AND(c,b), OR | 9 | 6 | 144 |
| `qdi_mux2` | out = a·sel' + b·sel | AND(a,sel'), AND(sel,b), OR | 9 | 6 | 144 |
| `qdi_half_adder` | s = a⊕b, cout = ab | 7 product C elements, given rail by rail (below) | 7 | 4 | 108 |
| `qdi_eq1` | eq = (a == b) | 4 products, 2 ORs | 4 | 2 | 60 |
| `qdi_and4` | AND of 4 | tree of 3 AND terms | 9 | 6 | 144 |
| `qdi_and8` | AND of 8 | two `qdi_and4` + 1 AND term | 21 | 14 | 336 |
| `qdi_mux4` | d[sel] | 4 products of 3 literals (8 AND terms) + 3 OR terms | 33 | 22 | 528 |
| `qdi_full_adder` | s, cout of a+b+cin | two half adders + OR term for the carry | 17 | 10 | 264 |

\*The transistor estimate counts 6 transistors per OR2 and 12 per static
C element. These counts match the published DIMOS results for the same
benchmarks.

The half adder is given rail by rail rather than from cells:

    S1 = A1B0 + A0B1        S0 = A0B0 + A1B1
    Cout1 = A1B1            Cout0 = A0(B0+B1) + A1B0

The products A1B1 (in S0 and Cout1) and A1B0 (in S1 and Cout0) are each
built twice, as separate C elements, so there are 7 C elements. A synthesis
tool that merges identical latches will reduce this to 5 (and the full adder
from 17 to 13). That is logically equivalent.

For the comparator the canonical cover is already minimal, so DIMOS adds
nothing there.

Only the function and the gate counts are published for AND4, AND8, MUX4 and
the full adder. Their internal structure is this design's choice, picked to
reproduce those counts exactly:

- **MUX4:** a flat sum of products, not a cascade of 2:1 multiplexers. The
  cascade would use 27 C elements, not 33.
- **Full adder:** two half adders plus a DIMOS OR term for the carry.

A benchmark 4-to-2 encoder is also in the published comparison: 18 C
elements and 12 gates. Its truth table is defined elsewhere and is not
reproduced, so it is not included.

Every circuit waits for *all* of its inputs, including the unselected data
input of a multiplexer and the inputs of AND terms whose result a zero
already decides. That is the cost of indicating every input.

## Top level (`qdi_dimos_top`)

The eight circuits share nothing, and the top places them side by side, each
with its own dual-rail ports. The ports are:

- `f_a f_b f_c → f_out`
- `mux2_a mux2_b mux2_sel → mux2_out`
- `ha_a ha_b → ha_s ha_cout`
- `eq_a eq_b → eq_out`
- `and4_x[3:0] → and4_y`
- `and8_x[7:0] → and8_y`
- `mux4_d[3:0] mux4_sel[1:0] → mux4_out` (`d[i]` is selected when `sel == i`)
- `fa_a fa_b fa_cin → fa_s fa_cout`

The circuits have no parameters.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The per-circuit testbenches share the
4-phase environment `tb/qdi_tb_common.svh`. For each circuit they apply every
input word many times. Each time, the inputs are raised one at a time in a
random order and lowered one at a time in another random order. After
*every* single input change the environment checks five things:

- No output ever shows the code 11.
- Rails only rise in the data phase and only fall in the NULL phase, so no
  output glitches.
- No output is valid before the last input is valid.
- No output returns to NULL before the last input is NULL.
- The final outputs equal a plain Boolean model.

In these runs every output of every circuit waits for all of its inputs in
both directions. The "outputs changed early" counter stays at zero.

`tb_qdi_dimos_top` drives the whole top as one 31-input, 10-output block
with 3000 random handshakes. It checks that the full output set completes
only after the last input. It also counts and requires:

- outputs completing ahead of others (which happens because the circuits are
  independent);
- every select value of both multiplexers;
- carries from both adders;
- both comparator results;
- true outputs of F, AND4 and AND8.

This testbench runs the top at its only configuration.

`tb_c_element` walks the C element's table and then makes 2000 random
single-input changes.

Limits of this verification:

- The simulation has zero delay, so the random arrival order is the only
  delay variation it exercises.
- Orderings of *internal* transitions are not explored, nor is the
  isochronic-fork assumption.
- It is a functional check of the protocol, not a timing proof.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/qdi_pkg.sv tb/tb_qdi_dimos_top.sv --top-module tb_qdi_dimos_top
    ./obj_dir/Vtb_qdi_dimos_top

Replace `tb_qdi_dimos_top` with any `tb/tb_<module>.sv` to test one circuit.
All runs finish in well under a second.

## Where this departs from, or goes beyond, the published method

- The C element is a behavioural latch, not a transistor-level cell.
- There is no reset; the first NULL phase initialises the circuit.
- The structures of AND4, AND8, MUX4 and the full adder are reconstructed from
  their published counts.
- The 4-to-2 encoder benchmark is not built.
- The published method starts from ESPRESSO minimisation and SIS technology
  mapping to INV/AND2/OR2. Here that flow was done by hand for each circuit.
  No generator is included.
- The published description labels several of the example circuits
  strong-indication, while it calls the method as a whole weak-indication. The
  structures are the same either way. The testbenches check the stronger
  per-output property, and it holds.

## Files

- `rtl/qdi_pkg.sv`: the dual-rail type, its codes and helper functions.
- `rtl/c_element.sv`: the C element.
- `rtl/dimos_and2.sv`, `rtl/dimos_or2.sv`: the two DIMOS terms.
- `rtl/qdi_*.sv`: the circuits and the top.
- `tb/tb_*.sv`: one testbench per module.
- `tb/qdi_tb_common.svh`: the shared handshake environment.
