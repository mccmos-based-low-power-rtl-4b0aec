# Nikhilum 32 x 32 bit multiplier

This is a combinational unsigned 32 x 32 bit multiplier built on the Vedic
*Nikhilum* rule ("all from nine, the last from ten"). That rule multiplies two
numbers by working on how far each lies from a base. Underneath it sits a
recursive *Urdhva Tiryakbhyam* (UT, "vertically and crosswise") multiplier,
which is built from 2 x 2 bit cells, carry look-ahead adders and half-adder
chains.

The circuit this RTL describes was presented as a transistor-level design in a
16 nm process, using *McCMOS*: NMOS devices get a longer channel (29 nm, against
16.5 nm for the PMOS) to cut subthreshold leakage. That technique lives entirely
in transistor sizing. The RTL keeps the logic structure of the design
(which blocks, which adders, how they are wired) and leaves sizing to whatever
cell library it is synthesized with.

## The Nikhilum identity

Take the base 2^W. Write each operand as its distance from the base:
A = 2^W − A' and B = 2^W − B', where A' and B' are the W-bit two's complements.
Then

    A · B = 2^W · (A − B') + A' · B'

The product therefore splits into a left-hand part, one W-bit subtraction, and a
right-hand part, one multiplication of complements. In hardware (`nm_mul`):

```
   a ──┬──────────────────────────────┐
       └─► complementor_mc ─► A' ─┐    │
                                 ├─► vmul32_mc ─► M = A'·B' (64 bits)
   b ──► complementor_mc ─► B' ──┤          │             │
                                 │          │ M[31:0]     │ M[63:32]
                                 └────┐     ▼             ▼
                     a ─► sub_mc ◄────┘   p[31:0]     cla_mc ─► p[63:32]
                         (A − B') ──────────────────────►┘
```

* `p[W-1:0]` is the low half of A'·B', unchanged.
* `p[2W-1:W]` is (A − B') + the upper half of A'·B', mod 2^W.
* The subtractor's borrow and the final adder's carry are discarded. That is
  exact: the identity holds mod 2^(2W), and A·B < 2^(2W).

The design does not rely on the operands being close to the base: the identity
is exact for every nonzero pair. Operands near 2^W make A' and B' small, but the
complement multiplier is a full W x W multiplier either way.

### Zero operands

A W-bit complementor maps 0 to 0, not to the base 2^W, which does not fit.
With the datapath exactly as drawn, A = 0 gives 2^W·B and B = 0 gives 2^W·A.
Only 0 · 0 comes out right. `nm_mul` therefore has `ZERO_GUARD` (default 1),
which forces the product to 0 when either operand is 0. This guard is an
addition of this implementation. `ZERO_GUARD = 0` gives the bare datapath, for
comparison with the original circuit.

## The UT multiplier tree

`vmul32_mc` multiplies the complements. Every UT level of width W splits its
operands into halves of H = W/2 bits, uses four H x H multipliers of the level
below, and adds their results in `ut_combine`:

    q0 = a_lo·b_lo   q1 = a_hi·b_lo   q2 = a_lo·b_hi   q3 = a_hi·b_hi
    p  = q0 + 2^H·(q1 + q2) + 2^W·q3

| Module      | Sub-multipliers | Adders in ut_combine           |
|-------------|-----------------|--------------------------------|
| `vmul32_mc` | 4 × `vmul16_mc` | 2 × 32-bit CLA, 16 half adders |
| `vmul16_mc` | 4 × `vmul8_mc`  | 2 × 16-bit CLA, 8 half adders  |
| `vmul8_mc`  | 4 × `vmul4_mc`  | 2 × 8-bit CLA, 4 half adders   |
| `vmul4_mc`  | 4 × `vmul2_mc`  | 2 × 4-bit CLA, 2 half adders   |
| `vmul2_mc`  | 4 AND gates     | 2 half adders                  |

`ut_combine` works in three parts, which the timing depends on:

1. **Cross products.** CLA #1 adds q1 + q2 and gives carry c1.
2. **Middle band.** CLA #2 adds that sum to `{q3[H-1:0], q0[W-1:H]}`, which is
   the part of q0 and q3 that overlaps the middle band. It gives carry c2 and
   product bits `p[W+H-1:H]`. The bits `p[H-1:0]` are `q0[H-1:0]`, untouched.
3. **Top quarter.** `q3[W-1:H]` plus the carries goes through a ripple chain of
   H half adders. The chain's final carry is dropped, because the product
   always fits in 2W bits.

`vmul2_mc` is the 2 x 2 cell. It has four AND gates. One half adder adds the two
cross terms, and a second adds that carry to a1·b1.

### Merging the two carries: the one real design choice

In the original schematics c1 and c2 go through a single OR gate into the
half-adder chain. OR is only correct if the two carries are never set together.
That holds at W = 4, where the OR merge is exact for all 256 operand pairs. From
W = 8 up it fails: 248 of the 65,536 8 x 8 pairs set both carries, and the OR
then loses 2^(W+H) from the product. The errors also reach the 32 x 32
multiplier through its 8-bit and 16-bit sub-multipliers.

`ut_combine` therefore has a parameter, passed down through every `vmul*_mc` and
`nm_mul`:

* `OR_CARRY_MERGE = 0` (default). q3[H], c1 and c2 go into a full adder, which
  takes the place of the OR gate and the first half adder of the chain. Every
  width is exact. The cost is one full adder in place of an OR plus a half
  adder.
* `OR_CARRY_MERGE = 1`. This is the OR gate as drawn, kept so the original
  circuit can be reproduced. It is exact for the 4 x 4 multiplier only.

### Carry look-ahead adder

The schematics name the adders CLA4MC, CLA8MC, CLA16MC and CLA32MC, with carry
in tied low, and do not draw their insides. `cla_mc` is a parameterized
look-ahead adder of this implementation's own choosing:

* per-bit generate and propagate signals;
* groups of `GROUP` = 4 bits, each with a group generate and a group
  propagate;
* a second look-ahead level that computes every group's carry in directly from
  cin and the group terms;
* inside each group, every bit carry computed directly from the group's carry
  in.

No carry ripples between groups. Changing `GROUP` changes only timing, not the
results.

### Complementor and subtractor

Only the functions of these two blocks are given. `complementor_mc` computes
~x + 1 with a row of inverters and a ripple incrementer. `sub_mc` computes
a + ~b + 1 on a `cla_mc` and outputs borrow = ¬carry.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `nm_mul` | `W` | 32 | operand width; 4, 8, 16 or 32 (the sizes the design was built in) |
| `nm_mul` | `ZERO_GUARD` | 1 | force p = 0 when an operand is 0 (this implementation's addition) |
| `nm_mul`, `vmul*_mc`, `ut_combine` | `OR_CARRY_MERGE` | 0 | 0: exact full-adder merge; 1: OR gate as drawn |
| `ut_combine`, `cla_mc`, `complementor_mc`, `sub_mc` | `W` | 32 | width |
| `cla_mc` | `GROUP` | 4 | look-ahead group size |

## Interface and timing

`nm_mul` has three ports: inputs `a` (multiplicand) and `b` (multiplier), W
bits each and unsigned, and the product `p`, 2W bits. There is no clock, reset
or register anywhere. The product settles after one pass through the longest
path:

* a complementor;
* four UT levels, each with two CLAs in series;
* the final CLA.

To pipeline the design, register the outputs of the complementors and of
`vmul32_mc`.

The original transistor-level circuit was reported at 27.82 ns delay and
0.556 mW at 32 x 32 bits. Those figures belong to that circuit and process. This
RTL neither models nor checks them. After generic synthesis the 32-bit
`nm_mul` is about 7,600 word-level cells (nearly all single-bit gates).

## What is not modelled

* **McCMOS cells.** The inverter, NAND and other gates with lengthened NMOS
  channels are transistor-sizing work. The RTL uses the plain logic functions
  (`and2_mc`, `or2_mc`, `ha_mc`, and operators elsewhere).
* **Power, delay, transistor count.** These are circuit-simulation results.

## Files

`rtl/`:

* `nm_mul.sv`: the top, the Nikhilum datapath.
* `vmul32_mc.sv`, `vmul16_mc.sv`, `vmul8_mc.sv`, `vmul4_mc.sv`: the UT levels.
* `vmul2_mc.sv`: the 2 x 2 cell.
* `ut_combine.sv`: the adder network of one UT level.
* `cla_mc.sv`, `complementor_mc.sv`, `sub_mc.sv`: the adder, complementor and
  subtractor.
* `ha_mc.sv`, `and2_mc.sv`, `or2_mc.sv`: the gate-level cells.

`tb/` holds one self-checking testbench per module, plus:

* `tb_nm_mul`: the 32-bit top with default parameters. It runs about 53,000
  products and counts how often the zero guard, the subtractor borrow, the
  final-adder carry and the double carry at the top UT level occur. It fails if
  any of them never does.
* `tb_nm_mul_sizes`: `nm_mul` at W = 4 and 8 on every operand pair, and at 16 on
  random pairs.
* `tb_nm_mul_variants`: the bare datapath (`ZERO_GUARD = 0`, `OR_CARRY_MERGE = 1`),
  checked against a model of what that circuit computes, including its wrong
  results.
* `ut_ref_pkg.sv`: an arithmetic model of the OR-merged recursion, used by the
  variant tests.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

## Simulating

Verilator 5 with timing support. From the project root, for example:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    tb/tb_nm_mul.sv --top-module tb_nm_mul -o sim
./obj_dir/sim
```

Any other testbench runs the same way, with its own name in place of
`tb_nm_mul`. Lint with `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/nm_mul.sv`. It reports three unused signals, all deliberate:

* the subtractor borrow and the final carry in `nm_mul`;
* the last carry of each half-adder chain in `ut_combine`.

## Departures from the original circuit

1. The full-adder carry merge (`OR_CARRY_MERGE = 0`) replaces the drawn OR gate.
   It is needed for correct products at 8 bits and wider.
2. The zero-operand guard (`ZERO_GUARD = 1`) is added. Without it the datapath
   is wrong when exactly one operand is 0.
3. The insides of the CLA, complementor and subtractor are this
   implementation's own. Only their functions and widths were given.
4. The transistor-level McCMOS technique is not represented.

Both deviations behind a parameter can be switched off to get the drawn circuit
back.
