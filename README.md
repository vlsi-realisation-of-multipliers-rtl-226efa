# Vedic multiplier: vertically-and-crosswise multiplication in SystemVerilog

An unsigned N x N multiplier built the "Urdhva Tiryagbhyam" (vertically and
crosswise) way. Instead of a rippling array of adders, each operand is cut
into a high and a low half; the four half-size products (low x low, the two
crosswise products, high x high) are formed at the same time, and a short
adder network adds them with the right shifts. The half-size products are
themselves made the same way, down to a 2x2-bit cell built from four AND
gates and two half adders.

The reference configuration is the **4x4-bit** multiplier: four 2x2 Vedic
cells and three 4-bit ripple carry adders. The RCA widths and the tree depth
follow from the one parameter `WIDTH`, so the same RTL also gives the 2-,
8- and 16-bit multipliers. The circuit is purely combinational: no clock, no
reset, no registers.

## The 2x2 cell (`vedic_mult_2x2`)

For `a = a1a0`, `b = b1b0`:

| product bit | formed by |
|---|---|
| p0 | `a0&b0` (vertical, right) |
| p1, carry c1 | half adder on `a0&b1`, `a1&b0` (crosswise) |
| p2, p3 | half adder on `a1&b1`, `c1` (vertical, left) |

All four partial products exist after one AND delay. The longest path is
AND, half adder, half adder.

## The adder stage (`vedic_adder_stage`): where the care is needed

With operands split into halves of `H = WIDTH/2` bits, the product is

    p = q_hh * 2^WIDTH  +  (q_hl + q_lh) * 2^H  +  q_ll

where each `q` is a `WIDTH`-bit half-size product. Three `WIDTH`-bit ripple
carry adders compute it. For the 4x4 case (`WIDTH = 4`, `H = 2`):

| adder | operand A | operand B | result |
|---|---|---|---|
| RCA1 | `q_hl` | `q_lh` | sum `s1`, carry `ca1` |
| RCA2 | `s1` | `{00, q_ll[3:2]}` | sum `s2`, carry `ca2` |
| RCA3 | `q_hh` | `{0, ca1\|ca2, s2[3:2]}` | sum `s3` = p[7:4], carry `ca3` |

and `p = {s3, s2[1:0], q_ll[1:0]}`. So p[1:0] comes straight from the
low x low cell, p[3:2] from the second adder, and p[7:4] from the third.

**The carry into RCA3.** The middle column `q_hl + q_lh + q_ll[3:2]` is up to
5 bits wide. Its fifth bit comes out as `ca1` (if RCA1 overflowed) or as
`ca2` (if RCA2 did). Both weigh 2^(WIDTH+H), product bit 6 in the 4x4 case,
which is bit `H` of RCA3's second operand. They can never both be 1: the
column sum is below 2^(WIDTH+1). So one OR gate merges them.

The usual published drawing of this network feeds RCA3 with
`{ca1, 0, s2[3:2]}`. That puts `ca1` one bit too high and leaves `ca2`
unconnected. Wired that way, 15 x 15 gives 33 and 14 x 15 gives 146. This
RTL uses the corrected operand.

`ca3` is always 0, since the product fits in `2*WIDTH` bits. It is not a
port; an `assert final` in `vedic_adder_stage` checks it in simulation.

## Wider multipliers (`vedic_mult`)

`vedic_mult #(.WIDTH(W))` needs `W` to be a power of two, 2 or more. An
elaboration-time `$error` rejects anything else. The tree is generated
level by level rather than by a module instantiating itself:

* level 1: a `vedic_mult_2x2` for every pair of 2-bit digits of `a` and `b`;
* level k: for every pair of 2^k-bit digits, a `vedic_adder_stage` of width
  2^k combines the four level k-1 products of its sub-digits;
* the single product at the last level is `p`.

This is the same hardware as the recursive description.

| WIDTH | 2x2 cells | adder stages (RCA width) | full adders |
|---|---|---|---|
| 2 | 1 | none | 0 |
| 4 | 4 | 1 (4) | 12 |
| 8 | 16 | 4 (4) + 1 (8) | 72 |
| 16 | 64 | 16 (4) + 4 (8) + 1 (16) | 336 |

Only the 4x4 network is fully specified by the structure it reproduces.
Building 8 and 16 bits by repeated halving is this design's reading of
"divide the bits of the inputs equally in two parts".

## Files

| file | module | role |
|---|---|---|
| `rtl/half_adder.sv` | `half_adder` | XOR/AND half adder |
| `rtl/full_adder.sv` | `full_adder` | full adder, the RCA cell |
| `rtl/ripple_carry_adder.sv` | `ripple_carry_adder #(WIDTH=4)` | `{cout,sum} = a + b + cin` |
| `rtl/vedic_mult_2x2.sv` | `vedic_mult_2x2` | 2x2 cell |
| `rtl/vedic_adder_stage.sv` | `vedic_adder_stage #(WIDTH=4)` | three-RCA combining stage |
| `rtl/vedic_mult.sv` | `vedic_mult #(WIDTH=4)` | top: `p[2W-1:0] = a[W-1:0] * b[W-1:0]` |

Each `tb/tb_<module>.sv` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends it
with a failure if it hangs.

* `tb_vedic_mult` runs the 4x4 top at its defaults. It tries all 256 operand
  pairs, including 5 x 15, the operand pair of the reference waveform. It
  also counts how often the `ca1` and `ca2` carry paths are taken; those
  counts are worked out from the operands alone. A path that is never taken
  counts as a failure.
* `tb_vedic_mult_table1` runs the 2-, 8- and 16-bit multipliers. The 2- and
  8-bit ones are checked exhaustively (65,536 pairs at 8 bits). The 16-bit
  one gets corner cases and 20,000 random pairs.
* `tb_vedic_adder_stage` tests the combining stage at 4 and 8 bits. The
  others test the cells exhaustively or, at 16 bits, at random.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        --top-module tb_vedic_mult tb/tb_vedic_mult.sv -o sim
    ./obj_dir/sim

To change the width, set the parameter when you instantiate the top, e.g.
`vedic_mult #(.WIDTH(8)) u (.a(a), .b(b), .p(p));`, or pass `-GWIDTH=8` when
it is the top.

## Choices and limits

* **Unsigned only.** Signed operands would need a sign correction around the
  unsigned core.
* **Combinational.** The multiplier has no clock. If you need a target
  frequency, register the operands and product around `vedic_mult`. The
  critical path at 4x4 is AND, two half adders, then through the three
  4-bit ripple adders in turn.
* **Ripple carry adders** throughout, as in the reference 4x4 structure. A
  faster adder (e.g. carry look-ahead) could replace `ripple_carry_adder`
  without other changes, since it has the same ports.
* **Gate-level cells.** The half- and full-adder equations are the standard
  ones. The structure fixes only their function.
* **No timing or area claims.** The RTL reproduces the logic structure.
  Delays, logic levels, LUT counts and power depend on the technology and
  are not modelled.
* An array multiplier is the usual comparison point for this design. It is
  not included.
