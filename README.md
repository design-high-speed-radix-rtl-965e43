# Radix-4 complex Vedic multiplier with CBL adders

This is a combinational multiplier for two complex numbers with 32-bit parts:

    (ar + j·ai) · (br + j·bi) = (ar·br − ai·bi) + j·(ar·bi + ai·br) = pr + j·pi

It is built from three ideas, one inside the other:

1. **Complex level.** There are two ways to get the four cross products. One uses four real
   multipliers, an adder and a subtractor. The other uses three multipliers with pre-adders.
2. **Real multiplier level.** Each real product uses a *Vedic* ("vertically and crosswise")
   multiplier. It splits each operand into halves, forms the four half-size products, and
   merges them with three adders. It repeats this until the pieces are 8 bits wide. Each
   8×8 piece is then multiplied by a **radix-4 Booth** multiplier.
3. **Adder level.** Every addition in the design uses the **common-Boolean-logic (CBL)
   adder**. It is a ripple adder whose cells work out both possible results before the carry
   arrives. The carry then only drives a multiplexer.

The design has no clock and no registers. Outputs follow the inputs after the logic delay.

## Interface (`cvm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `ar`, `ai` | in | N | real and imaginary part of A, unsigned |
| `br`, `bi` | in | N | real and imaginary part of B, unsigned |
| `pr` | out | 2N | ar·br − ai·bi, low 2N bits, two's complement |
| `pi` | out | 2N | ar·bi + ai·br, low 2N bits |
| `pr_neg` | out | 1 | sign of the real part: `{pr_neg, pr}` is exact in 2N+1 bits |
| `pi_cout` | out | 1 | carry of the imaginary part: `{pi_cout, pi}` is exact in 2N+1 bits |

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | width of each operand part |
| `LEAF_W` | 8 | piece width at which the Vedic split stops and Booth takes over |
| `THREE_MULT` | 0 | 0: four real multipliers; 1: three real multipliers |

Example: (12 + j5)(2 + j4) gives `pr = 4`, `pi = 58`.

## The CBL adder (`cbl_cell`, `cbl_adder`)

A full adder's outputs depend on the carry-in in a simple way:

- with carry-in 0, the sum is `a ^ b` and the carry is `a & b`;
- with carry-in 1, the sum is `~(a ^ b)` and the carry is `a | b`.

Each cell builds all four of these from `a` and `b` alone. The incoming carry then picks the
sum and the carry-out with two 2:1 multiplexers. `cbl_adder` chains W cells in ripple-carry
order, so the critical path is one XOR plus W multiplexers.

`cbl_subtractor` computes `a + ~b + 1` on the same adder. Its `borrow` output is the inverted
carry-out. That makes `{borrow, diff}` the exact (W+1)-bit two's-complement difference of two
unsigned numbers.

## Radix-4 Booth leaves (`booth_enc`, `booth_mult`)

A zero is appended below the multiplier's LSB. The multiplier is then cut into overlapping
3-bit groups `{b(2k+1), b(2k), b(2k−1)}`. Each group selects one multiple of the
multiplicand:

| group | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| multiple | +0 | +A | +A | +2A | −2A | −A | −A | −0 |
| `{neg,one,two}` | 000 | 010 | 010 | 001 | 101 | 110 | 110 | 100 |

`booth_enc` computes that table: `neg = b(i+1)`, `one = b(i) ^ b(i−1)`, and `two` for 011 and
100. The three bits travel as the packed struct `cvm_pkg::booth_sel_t`.

`booth_mult` turns each group into a partial-product row, shifted by 2k. A negative row is the
bitwise inverse of the shifted positive row, with a carry-in of 1 into the adder that adds it.
The rows are summed in a chain of 2W-bit CBL adders, one adder per group.

**Signed and unsigned.** The input `sgn` picks two's-complement (`1`) or unsigned (`0`)
operands. The multiplier is extended by two bits: copies of its sign bit, or zeros. This gives
W/2 + 1 groups, which is five for 8 bits.

- In signed mode the extra top group is always 000 or 111, so it adds nothing. The product then
  uses the usual four groups of an 8-bit multiplier.
- In unsigned mode the extra group is `{0, 0, b7}`. It adds +A·2^W when b7 is set.

The Vedic multiplier always uses unsigned mode. The four-group signed arrangement found in
textbooks therefore becomes a five-stage chain here.

## The Vedic multiplier (`vedic_mult`)

For a W-bit node with halves of H = W/2 bits:

```
q_hh = a_hi·b_hi   q_lh = a_lo·b_hi   q_hl = a_hi·b_lo   q_ll = a_lo·b_lo   (each W bits)

adder 1:  s1, c1 = q_lh + q_hl
adder 2:  s2, c2 = s1 + {0…0, q_ll[W-1:H]}
adder 3:  s3, c3 = q_hh + {0…0, c1|c2, s2[W-1:H]}

p = {s3, s2[H-1:0], q_ll[H-1:0]}
```

The two carries c1 and c2 both carry weight 2^W. They are never both set: the middle sum is
below 2^(W+1). A single OR gate can therefore merge them into bit H of adder 3's operand.
`c3` is brought out but is always 0.

This is not written as a recursive module. The tree is a set of generate levels:

- level 0 holds a Booth product for every pair of LEAF_W-bit pieces of `a` and `b`;
  that is 16 products at 32 bits;
- level l builds each product of width 2·(LEAF_W·2^l) from four products of level l−1.

The products are reached as `g_lv[l].g_i[i].g_j[j].prod`. W must be LEAF_W times a power of
two.

With `W=8, LEAF_W=4` the module is exactly the classic 8-bit arrangement. That is four 4×4
multipliers, three 8-bit CBL adders and the OR gate. Its leaves are 4-bit Booth multipliers.

The default 32-bit instance has 16 Booth leaves. Each leaf has five 16-bit CBL adders. On top
of them sit four 16-bit nodes and one 32-bit node.

## Complex arrangements

**Four multipliers (`cmplx_mult4`, the default).**

- Four 32×32 Vedic multipliers form ar·bi, ai·br, ar·br and ai·bi.
- A 64-bit CBL adder gives `pi` and `pi_cout`.
- A 64-bit CBL subtractor gives `pr` and `pr_neg`.

**Three multipliers (`cmplx_mult3`, `THREE_MULT=1`).** This form uses the identities

    pr = ar·(br + bi) − bi·(ar + ai)
    pi = ar·(br + bi) + br·(ai − ar)

It shares the product ar·(br+bi) between both outputs. The pre-added operands are 33 bits
wide (`ai − ar` is signed), but the multipliers are 32×32. Each product is therefore taken
from the low 32 bits and corrected for the top bit:

    x·s = x·s[31:0] + s[32]·(x << 32)      for the two sums
    br·d = br·d[31:0] − d[32]·(br << 32)    for the signed difference d

The corrections are done in 65-bit adders and the last step in 66 bits. Both arrangements give
identical outputs. The three-multiplier form is smaller in multipliers but has a longer path:
pre-adder, then multiplier, then two adders.

## Where this design makes its own choices

- **Signedness.** Operands are unsigned. The Vedic split into halves is an unsigned
  decomposition. Signed complex operands would need a sign-magnitude wrapper, which is not
  provided. The Booth leaves do support signed operands on their own.
- **Output width.** The outputs are 64 bits, as in the reference design (4×32 inputs plus
  2×64 outputs gives 256 I/O pins). The exact results need 65 bits, so `pr_neg` and
  `pi_cout` are extra.
- **Where Booth and Vedic meet.** Vedic splitting is used for wide words and Booth for the
  8-bit pieces. Booth is not applied to the full 32-bit operands. A pure Booth 32×32
  multiplier is still available as `booth_mult #(.W(32))`, or by setting
  `LEAF_W = N`.
- **Subtractor.** Its construction (invert and carry-in 1) is standard. It is not a
  documented part of the reference design.
- **Three-multiplier wiring.** This follows the identities above. One block diagram of that
  form labels the `pr` box as an adder and the `pi` box as a subtractor. With the
  pre-subtraction `ai − ar` shown here, the output operations must be the other way round.
- **Not built.** The FIR filter that the multiplier is meant to serve is not specified
  (taps, coefficients, widths), so it is not part of this RTL. There are no pipeline
  registers.
- **Not reproduced.** The FPGA results are LUT and slice counts and a 25.2 ns delay on a
  Virtex-7. They are synthesis results that this RTL cannot confirm.

## Files

| file | contents |
|---|---|
| `rtl/cvm_pkg.sv` | `booth_sel_t` |
| `rtl/cbl_cell.sv`, `rtl/cbl_adder.sv`, `rtl/cbl_subtractor.sv` | CBL adder and subtractor |
| `rtl/booth_enc.sv`, `rtl/booth_mult.sv` | radix-4 Booth encoder and multiplier |
| `rtl/vedic_mult.sv` | Vedic multiplier tree |
| `rtl/cmplx_mult4.sv`, `rtl/cmplx_mult3.sv` | four- and three-multiplier complex multipliers |
| `rtl/cvm_top.sv` | top level, selects the arrangement |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cvm_top_full.sv` | top at its default parameters, no overrides |

## Verification

Each testbench compares against the simulator's own `*`, `+` and `-` on wider integers. Each
one prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `cbl_adder` and `cbl_subtractor`: exhaustive at 8 bits, random and corner cases at 64 bits.
- `booth_enc`: all eight rows of the table.
- `booth_mult`: exhaustive 8×8 in both modes, random 32×32 in both modes.
- `vedic_mult`: exhaustive 8×8 with 4-bit leaves, random and corner cases at 32×32.
- `cmplx_mult4` and `cmplx_mult3`: the example above, corner cases and random operands at
  32 bits, plus a 16-bit instance with 4-bit leaves.
- `tb_cvm_top`: runs both arrangements side by side at 32 bits. It also counts how often each
  of these happened, and fails if one never did: a negative real part, an imaginary
  carry-out, each of the two merged carries c1/c2 of the 32-bit Vedic node, and each of the
  three top-bit corrections of the three-multiplier form. c2 is rare with random operands, so
  a directed vector (ar = 0x0002ffff, br = 0xffffffff) forces it.
- `tb_cvm_top_full`: the top with no parameter overrides.

Each testbench also catches a deliberately broken copy of its module.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cvm_pkg.sv tb/tb_cvm_top.sv \
          --top-module tb_cvm_top -Mdir obj && ./obj/Vtb_cvm_top
```

Each testbench builds in under a minute and then runs in about a second.

The only lint remarks are unused-signal notes. They are for the carry-outs that the design
discards on purpose: the inner `c3`s and the wrap-around carries of the Booth row adders.
