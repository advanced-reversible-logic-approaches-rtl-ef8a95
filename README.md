# Reversible-logic magnitude comparators (16-bit and 32-bit)

A magnitude comparator takes two unsigned numbers A and B and raises exactly
one of three flags: A > B, A = B or A < B. This design builds 16-bit and
32-bit comparators only from *reversible* gates. A reversible gate has as
many outputs as inputs and maps its input patterns one-to-one onto its output
patterns, so no information is erased inside it. That property is the reason
reversible logic is studied for low-power circuits. The price is extra lines:
constant inputs fed into gates to make room for a result, and "garbage"
outputs that carry nothing useful but must exist to keep every gate
one-to-one.

The comparator is a tree:

```
 a[31:30] b[31:30] ... a[1:0] b[1:0]
     |                   |
  [2-bit cmp]   ...   [2-bit cmp]        WIDTH/2 leaves -> (greater, equal)
        \               /
       [decision block]  ...             WIDTH/2 - 1 blocks, log2(WIDTH/2) levels
               |
         (greater, equal) of the whole word
               |
         [BJN gate, C = 1]  ->  agb, aeb, alb
```

Every node carries only two lines, *greater* and *equal*. *Less* is never
computed in the tree: the last gate forms it as NOT(greater OR equal).

The 16-bit comparator uses 8 leaves and 7 decision blocks in three levels.
The 32-bit comparator uses 16 leaves and 15 decision blocks in four levels.
Both end in one BJN gate.

Everything is combinational. There is no clock, no reset and no handshake.
The outputs settle one leaf, log2(WIDTH/2) decision blocks and one BJN gate
after the operands change.

## The gate library

| Gate | Lines | Outputs | Quantum cost | Used in |
|---|---|---|---|---|
| NOT (`not_gate`) | 1x1 | P = ~A | 0 | leaves, decision blocks |
| Feynman (`fg_gate`) | 2x2 | P = A, Q = A^B | 1 | top-level ports only |
| TR (`tr_gate`) | 3x3 | P = A, Q = A^B, R = (A & ~B) ^ C | 4 | leaves |
| Peres (`pg_gate`) | 3x3 | P = A, Q = A^B, R = (A & B) ^ C | 4 | top-level ports only |
| BJN (`bjn_gate`) | 3x3 | P = A, Q = B, R = (A \| B) ^ C | 5 | output stage |
| two-control XOR (`ctrl2_xor_gate`) | 3x3 | P = A, Q = B, R = (A & B) ^ C | see below | decision blocks |

Some textual descriptions of the TR gate give R = AB ^ C. That would make it
identical to the Peres gate. This RTL uses the usual TR definition,
R = A·B' ^ C. This is also the form that makes a TR gate a one-bit
comparator.

The Peres and Feynman gates belong to the same library, but neither
comparator uses them. The top level brings them out on their own ports so
that they can be simulated and synthesized with the rest.

## The decision block: how two halves become one

This block is the heart of the design and the least obvious part. Let X be
the more significant half of a slice and Y the less significant half. Each
half arrives as (G, E) = (greater, equal). The whole slice is greater if X
is greater, or if X is equal and Y is greater. It is equal if both halves
are equal:

```
AGB = GX | (EX & GY)        AEB = EX & EY
```

The block computes this on seven lines. Four carry the inputs and three are
constants (0, 1, 1). It applies one NOT and then three two-control XOR
stages, in this order:

| step | gate | controls | target | result on the target line |
|---|---|---|---|---|
| 1 | NOT | – | line GX | ~GX |
| 2 | two-control XOR | EY, EX | constant 0 | **AEB** = EY & EX |
| 3 | two-control XOR | GY, EX | constant 1 | t = ~(GY & EX) |
| 4 | two-control XOR | ~GX, t | constant 1 | **AGB** = ~(~GX & t) = GX \| (EX & GY) |

Step 4 is De Morgan's law: an AND of two inverted terms, XORed onto a 1,
gives the OR of the original terms. The five lines that leave without a
result are GY, EY, ~GX, EX and t. They are exposed as the `garbage[4:0]`
port and left unconnected everywhere the block is used.

The gate arrangement works only if X is the more significant half. With the
halves swapped the block computes GY | (EY & GX), which is not a comparison.
So `dcb_tree` always connects the more significant child to X.

## The 2-bit leaf (`mag_comp2`)

The leaf compares a[1:0] with b[1:0]. Each bit goes through a TR gate with
C = 0:

- R = a & ~b is "this bit of A is greater".
- Q = a ^ b, inverted by a NOT gate, is "this bit is equal".

A decision block then merges bit 1 (on X) with bit 0 (on Y). This
construction is this design's own: the comparator structure only fixes the
leaf's function. It was chosen because it keeps the whole tree made of the
same reversible gates, so the leaf is a small instance of the same scheme as
the tree above it.

## The tree and the output stage

`dcb_tree` is a binary heap of decision blocks. `leaf[j]` is the result for
bits 2j+1:2j, with j = 0 the least significant. The leaves are placed so that
the most significant pair is leftmost, and each block's left child (its X
side) is the more significant one. `LEAVES` must be a power of two, which an
elaboration-time assertion checks.

`rev_mag_comp16` and `rev_mag_comp32` each instantiate their leaves, a
`dcb_tree` and a BJN gate. The BJN gate's A and B inputs take the root's
greater and equal lines, and its C input is tied to 1. The gate passes A and
B through as `agb` and `aeb`, and its third output is
`alb = (agb | aeb) ^ 1`.

## Line and gate bookkeeping

These counts follow from the structure above; the testbenches do not check
them.

| | 16-bit | 32-bit |
|---|---|---|
| TR gates | 16 | 32 |
| NOT gates | 31 | 63 |
| two-control XOR stages | 45 | 93 |
| BJN gates | 1 | 1 |
| constant inputs | 62 | 126 |
| garbage outputs | 91 | 187 |
| lines in = lines out | 94 | 190 |

The quantum cost of the two-control XOR stage is taken here as 5, the usual
figure for that gate. With the gate costs from the library table, the total
quantum cost is 294 for 16 bits and 598 for 32 bits.

On an FPGA this reversible structure is only a way of writing the logic. The
synthesizer flattens it to ordinary LUTs. The 16-bit comparator has 35 pins:
16 + 16 inputs and 3 outputs.

## The 4-bit sum-of-products comparator (`mag_comp4`)

This is a conventional comparator written directly from the three textbook
equations, with xi = Ai XNOR Bi:

```
A>B = A0B0' + x0[A1B1' + x1{A2B2' + x2 A3B3'}]
A<B = A0'B0 + x0[A1'B1 + x1{A2'B2 + x2 A3'B3}]
A=B = x0 x1 x2 x3
```

Index 0 is the most significant bit. The ports are declared `[0:3]`, so a[0]
is the MSB and the vectors still read as ordinary unsigned numbers. It is
included as the reference form of the problem and stands beside the
reversible comparators in the top level.

## Top level (`rev_comparator_top`)

The top level has four independent parts, each with its own ports:

| part | inputs | outputs |
|---|---|---|
| 16-bit reversible comparator | `a16`, `b16` | `agb16`, `aeb16`, `alb16` |
| 32-bit reversible comparator | `a32`, `b32` | `agb32`, `aeb32`, `alb32` |
| 4-bit comparator | `a4[0:3]`, `b4[0:3]` (bit 0 = MSB) | `agb4`, `aeb4`, `alb4` |
| Peres gate | `pg_in[2:0]` = {A,B,C} | `pg_out[2:0]` = {P,Q,R} |
| Feynman gate | `fg_in[1:0]` = {A,B} | `fg_out[1:0]` = {P,Q} |

The widths are fixed by module: `rev_mag_comp16` and `rev_mag_comp32` have
no width parameter. A comparator of another power-of-two width is the same
three instantiations with `dcb_tree #(.LEAVES(WIDTH/2))`.

## Where this RTL makes its own choices

- **Which half goes to X in a decision block.** The circuit is only correct
  with the more significant half on X, so that is how it is wired.
- **The 2-bit leaf.** Its insides are this design's own: TR + NOT per bit,
  then one decision block.
- **The TR gate equation.** It uses R = A·B' ^ C, as discussed above.
- **The final gate.** It is the BJN gate, with C = 1.
- **Garbage lines.** They are left unconnected. Verilator's `-Wall` lint
  reports them as unused signals in `mag_comp2` and `dcb_tree`. This is
  inherent to reversible logic, not a defect.
- **Ascending ranges.** The `[0:3]` ports of the 4-bit comparator draw
  Verilator's ascending-range warning. They are deliberate, to keep the
  textbook's bit numbering.
- **Comparators without reversible logic.** The ordinary 16-bit and 32-bit
  comparators (`a > b` etc.) used as baselines are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_not_gate`, `tb_fg_gate`, `tb_tr_gate`, `tb_pg_gate`, `tb_bjn_gate` | every input pattern against the gate equation, and that no two input patterns give the same output (reversibility) |
| `tb_decision_block` | every pair of 2-bit numbers, through their per-bit results, against integer comparison; every raw input pattern against the expected result and garbage lines |
| `tb_mag_comp2` | all 16 operand pairs |
| `tb_mag_comp4` | all 256 operand pairs |
| `tb_rev_mag_comp16`, `tb_rev_mag_comp32` | see below |
| `tb_rev_comparator_top` | all parts at once, at full size |

`tb_rev_mag_comp16` and `tb_rev_mag_comp32` check:

- a = 0x…0A against b = 0x…09, 0x…0A and 0x…0B;
- for every bit position, a pair whose first difference is at that bit, in
  both directions;
- the extreme values;
- 2000 random pairs, a quarter of them equal;
- that exactly one flag is high each time.

`tb_rev_comparator_top` drives all parts at once. It counts each outcome
(greater, equal, less) of every comparator, and which 2-bit leaf held the
most significant difference. Any outcome or leaf that never occurred counts
as a failure, so every path through both decision trees is exercised.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_cmp_pkg.sv \
          tb/tb_rev_comparator_top.sv --top-module tb_rev_comparator_top
./obj_dir/Vtb_rev_comparator_top
```

Replace the testbench name to run another. The package file must come first;
Verilator finds the other modules in `rtl/` through `-Irtl`.

## Files

- `rtl/rev_cmp_pkg.sv`: the shared `cmp_t` {gt, eq} type.
- `rtl/not_gate.sv`, `fg_gate.sv`, `tr_gate.sv`, `pg_gate.sv`,
  `bjn_gate.sv`, `ctrl2_xor_gate.sv`: the gates.
- `rtl/decision_block.sv`, `mag_comp2.sv`, `dcb_tree.sv`: the comparator
  building blocks.
- `rtl/rev_mag_comp16.sv`, `rev_mag_comp32.sv`: the reversible comparators.
- `rtl/mag_comp4.sv`: the sum-of-products comparator.
- `rtl/rev_comparator_top.sv`: the top level.
- `tb/tb_<module>.sv`: one testbench per module above, except the package
  and the two helpers `ctrl2_xor_gate` and `dcb_tree`, which are tested
  through `decision_block` and the comparators.
