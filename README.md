# Reversible 4x4 Urdhva Tiryakbhayam multiplier

This is a 4-bit by 4-bit unsigned multiplier built only from **reversible
logic gates**. A reversible gate has as many outputs as inputs, and its
input-to-output mapping is a bijection, so no information is destroyed. By
Landauer's principle only lost information must dissipate energy, which is
why reversible circuits are studied for very low power.

The arithmetic follows **Urdhva Tiryakbhayam** ("vertically and crosswise"),
the Vedic multiplication method. The operands are split into halves, all
cross products are formed at the same time, and the cross products are then
summed. Here the halves are 2 bits wide. Each 2-bit product comes from a small
reversible 2x2 multiplier, and reversible ripple-carry adders sum the four
products.

Everything is combinational: there is no clock, no reset and no pipelining.
The RTL is ordinary synthesizable SystemVerilog. Each gate is written as the
Boolean function of its reversible mapping, so a synthesis tool maps it to
ordinary CMOS gates. The RTL describes the reversible *netlist* (which gate
feeds which) and shows that it computes the right product. It does not model
the physical benefit of reversibility.

## Cost metrics

Reversible designs are compared with these metrics, not with gate delay:

- **Quantum cost**: the number of elementary 1x1/2x2 reversible operations
  needed to build the circuit.
- **Garbage outputs**: outputs that carry no wanted result. They are needed to
  keep the mapping one-to-one.
- **Constant inputs**: inputs tied to 0 or 1.
- **Gate count**.

A reversible circuit must not fan out a signal to several gate inputs. When a
value is needed twice, a gate has to produce a copy of it. Both 2x2
multipliers below produce their copies inside the circuit. Each composite
module declares its costs as localparams (`QUANTUM_COST`, `GARBAGE_OUTPUTS`,
`GATE_COUNT`, `CONSTANT_INPUTS`), and the testbenches check them against the
expected values.

| block | quantum cost | garbage | gates | constant inputs |
|---|---|---|---|---|
| `ut2x2_design1` | 23 | 5 | 5 | 5 |
| `ut2x2_design2` | 24 | 4 (+1, see below) | 5 | 5 |
| `rev_rca`, 4 bits | 22 | 7 | 4 | 4 |
| `rev_rca`, 5 bits | 28 | 9 | 5 | 5 |
| `rev_rca`, 6 bits | 34 | 11 | 6 | 6 |
| `ut4x4`, design 1 | 170 | 45 (+2 always-0 lines) | 34 | 34 (+5 zero pad bits) |
| `ut4x4`, design 2 | 174 | 45 (+2 always-0 lines) | 34 | 34 (+5 zero pad bits) |

## The gate library

All gates are in `rtl/*_gate.sv`. Each output list below is in port order.

| gate | size | outputs | quantum cost | used here for |
|---|---|---|---|---|
| Feynman (`feynman_gate`) | 2x2 | P=A, Q=A^B | 1 | XOR; a copy of A when B=0 |
| Peres (`peres_gate`) | 3x3 | P=A, Q=A^B, R=AB^C | 4 | AND plus a copy; a half adder when C=0 |
| NFT (`nft_gate`) | 3x3 | P=A^B, Q=B'C^AC', R=BC^AC' | 5 | with A=0: P=B, Q=B'C, R=BC |
| HNG (`hng_gate`) | 4x4 | P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D | 6 | a full adder when D=0 |
| BVPPG (`bvppg_gate`) | 5x5 | P=A, Q=B, R=AB^C, S=D, T=AD^E | 10 | two partial products when C=E=0 |

## The 2x2 multipliers

Multiplying a = a1a0 by b = b1b0 gives

    q0 = a0b0
    q1 = a1b0 ^ a0b1               carry c = a1b0 & a0b1
    q2 = a1b1 ^ c
    q3 = a1b1 & c

The two designs exploit two identities. The carry `c` is 1 only when all four
input bits are 1, so **q3 = c**. And when a1b1 = 1, **c = a0b0**, so
q2 = a1b1 & ~a0b0 and q3 = a1b1 & a0b0.

**Design 1** (`ut2x2_design1`) uses a BVPPG, three Peres gates and one
Feynman gate:

| gate | inputs | what it produces |
|---|---|---|
| BVPPG | a0, b0, 0, b1, 0 | q0 = a0b0, a0b1, copies of b0 and b1 |
| Peres | a1, copy of b0, 0 | a1b0, copy of a1 |
| Peres | copy of a1, copy of b1, 0 | a1b1 |
| Peres | a0b1, a1b0, 0 | q1 on Q, carry c on R |
| Feynman | c, a1b1 | P = c = q3, Q = c ^ a1b1 = q2 |

**Design 2** (`ut2x2_design2`) uses the same BVPPG and two Peres gates to make
the partial products. A Feynman gate forms q1 = a0b1 ^ a1b0. A single NFT gate
with inputs (0, a0b0, a1b1) then gives q0, q2 and q3 together, using the
second identity. It costs one unit of quantum cost more than design 1 and has
one garbage output fewer. The copy of a0 that the BVPPG makes is never used.
It is not counted as garbage in the cost figures, but it leaves on the garbage
port with the other four lines, so that port is 5 bits wide.

Both modules bring every garbage line out on a `garbage` port instead of
leaving it open.

## The reversible ripple-carry adder

`rev_rca #(WIDTH)` adds two WIDTH-bit numbers into a WIDTH+1-bit sum. No carry
enters bit 0, so bit 0 needs only a half adder, a Peres gate with C=0. Every
higher bit is an HNG full adder with D=0 and the incoming carry on C. Starting
with a Peres gate instead of an HNG saves 2 quantum cost and one garbage
output. The default WIDTH is 5; the multiplier uses widths 4 and 6.

## Assembling the 4x4 multiplier (`ut4x4`, the top)

    q0 = a[1:0]*b[1:0]   (weight 1)      q1 = a[3:2]*b[1:0]   (weight 4)
    q2 = a[1:0]*b[3:2]   (weight 4)      q3 = a[3:2]*b[3:2]   (weight 16)

    product[1:0] = q0[1:0]
    adder B (4 bits): qb = {00, q0[3:2]} + q1                 weight 4
    adder A (4 bits): qa = q3 + {00, q2[3:2]}                 weight 16
    final   (6 bits): product[7:2] = {qa[3:0], q2[1:0]} + {0, qb}

The published block diagram for this structure has four 2x2 multipliers, two
4-bit ripple-carry adders and one 5-bit final adder with a 6-bit result. It
pairs q2 with q3 directly in the second 4-bit adder. That cannot give a correct
product, for two reasons:

- q3 weighs four times as much as q2.
- At the final adder's scale, 4*q3 alone reaches 36. This is more than any
  5-bit operand holds, so no 5-bit final adder fed by two 4-bit adders can
  cover all products.

This RTL keeps the four multipliers, the adder B input of {00, q0[3:2]} and
q1, two 4-bit first-stage adders and one final adder. It makes two changes:

- Adder A shifts q3 two places above q2. It adds q2's upper half and passes
  q2's lower half around the adder.
- The final adder is 6 bits wide instead of 5.

qa[4] and the final carry out can never be 1, because the largest values are
12 and 63. They leave on the `garbage` port. The port is 47 bits wide:
bits 0-19 come from the four multipliers (5 each, q0 first), bits 20-26 from
adder B, 27-33 from adder A, 34-44 from the final adder, 45 is qa[4] and 46 is
the final carry out.

The parameter `DESIGN` (`rev_pkg::ut2_design_e`) selects which 2x2 design is
used. The default is `UT2_DESIGN1`, the cheaper one. Nothing in the
architecture fixes this choice.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | gate quantum costs, the `ut2_design_e` enum, garbage widths |
| `rtl/feynman_gate.sv`, `peres_gate.sv`, `nft_gate.sv`, `hng_gate.sv`, `bvppg_gate.sv` | the reversible gates |
| `rtl/ut2x2_design1.sv`, `rtl/ut2x2_design2.sv` | the two 2x2 multipliers |
| `rtl/rev_rca.sv` | the reversible ripple-carry adder |
| `rtl/ut4x4.sv` | the 4x4 multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ut4x4_full.sv` | all 256 products through the default top |

## Verification

Every testbench is exhaustive, because the input spaces are small:

- **Gates**: the testbenches check every input pattern against the gate's
  definition, written in a different form than in the RTL. For example, the
  HNG's {S^D, R} must equal the integer sum A+B+C. They also check that no two
  inputs give the same output, and they check the quantum cost.
- **2x2 multipliers**: all 16 operand pairs are compared with the integer
  product. `{q, garbage}` must never repeat, which confirms the whole circuit
  is reversible. The cost localparams are checked.
- **Adder**: every operand pair at widths 4, 5 and 6 is compared with a + b.
  The cost figures are checked.
- **4x4 multiplier**: `tb_ut4x4` runs both DESIGN choices over all 256 pairs.
  It checks `{q, garbage}` for uniqueness. It counts carries rippling through
  each of the three adders, including into the final adder's top stage, and a
  mechanism that never happens counts as a failure.

Each testbench ends by printing `TB_RESULT checks=N failures=M`. A watchdog
stops any testbench that hangs.

To run one with Verilator 5:

    verilator --binary --timing -Irtl rtl/rev_pkg.sv tb/tb_ut4x4.sv --top-module tb_ut4x4
    ./obj_dir/Vtb_ut4x4

The package has to be listed explicitly. Verilator finds every other module
through `-Irtl`.

## How far to trust it

- The gate equations and the quantum costs of the gates are standard. All
  gate equations are verified exhaustively.
- **The gate-to-gate wiring of both 2x2 designs** follows the published gate
  choices and port labels. Where a label could be read two ways, the reading
  kept is the only one that yields the product with the stated garbage and
  constant-input counts.
- **The 4x4 wiring departs from the usual description**: see the assembly
  section above. The product is exact for all 256 input pairs.
- Design 2 is also described in prose as "BVPPG, three Peres gates and one
  NFT".
  The version built here has two Peres gates, one NFT and one Feynman gate,
  the only gate set that matches its quantum cost of 24.
- Costs describe the reversible netlist. Area, delay and power after CMOS
  synthesis say nothing about reversible hardware.
