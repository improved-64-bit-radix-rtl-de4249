# Radix-16 Booth multiplier with a 16-row partial-product array

This is a pipelined 64 x 64 unsigned multiplier. It recodes the multiplier operand into
radix-16 Booth digits, so that it produces about n/4 partial products instead of the n/2
of radix-4. An unsigned operand needs one more digit than a signed one: the transfer out of
the most significant group. For n = 64 that gives 17 partial products, and 17 bits in the
tallest columns of the array.

A 17-high array forces an irregular reduction tree. A 16-high array reduces to two words
in exactly three levels of 4:2 carry-save adders. The design removes the 17th row with a
short 16-bit addition that runs beside the normal partial-product generation. It takes its
inputs straight from the operand bits, so its delay should not be on the critical path.
The method is the one published by E. Antelo, P. Montuschi and A. Nannarelli, "Improved
64-bit Radix-16 Booth Multiplier Based on Partial Product Array Height Reduction". This RTL
is an independent implementation of that method. Where it fills gaps or departs from the
method, it says so below.

All RTL is SystemVerilog-2017 and synthesizable. Every block has a self-checking
testbench.

## Datapath and pipeline

```
 x, y ──► input regs ──► PPGEN ──► [16 x 128-bit reg] ──► TREE ──► ( [2 x 128-bit reg] ) ──► CPA ──► p
                     stage 1                      stage 2                      (stage 3)
```

| Module | Role |
|---|---|
| `booth16_mult` | top: input registers, pipeline registers, valid pipeline |
| `ppgen` | partial-product generation, including the short addition, giving 16 rows of 128 bits |
| `pp_tree` | three levels of 4:2 carry-save adders, 16 → 8 → 4 → 2 (uses `csa42`) |
| `final_cpa` | 128-bit carry-propagate adder |

The partial products are registered before the tree. With `STAGES = 2` (the default)
that is the only internal register. With `STAGES = 3` a second register sits between the
tree and the CPA.

**Timing.** An operand pair sampled with `in_valid` at a rising edge appears on `p`
with `out_valid` high exactly `STAGES` rising edges later. `p` is the combinational output
of the CPA, so the consumer registers it. A new pair can be accepted every cycle. The
`in_valid`/`out_valid` signals and the reset are this design's additions.
`rst_n` is active-low and synchronous, and it clears only the valid bits.

**Ports of `booth16_mult`:**

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | `x`, `y` hold an operand pair |
| `x`, `y` | in | N | unsigned multiplicand and multiplier |
| `out_valid` | out | 1 | `p` holds a product |
| `p` | out | 2N | `x * y` |

**Parameters:** `N` (default 64) must be a multiple of 4 and at least 16. The
32-bit case builds as well; it has 8 rows and a 2-level tree. `STAGES` is 2 or 3.

## Radix-16 recoding and the regular partial products

Digit i looks at `y[4i+3:4i]` and at `y[4i-1]`, with `y[-1] = 0`:

    d_i = -8*y[4i+3] + 4*y[4i+2] + 2*y[4i+1] + y[4i] + y[4i-1]   ∈ {-8..8}

Digits 0..15 select a multiple of X through a one-hot 8:1 multiplexer with implicit zero
(`booth16_recoder`, `pp_select`):

- 1X, 2X, 4X and 8X are shifts of X.
- 6X is 3X shifted left by one.
- 3X, 5X and 7X come from three shared adders (`odd_multiple_adder`). They compute 3X as
  4X − X, 5X as 4X + X, and 7X as 8X − X. Why these exact forms matter is explained below.

A negative digit inverts the 67-bit magnitude, and its +1 (the "hot one" `b_i`) goes into
the next row down, at that partial product's bit 0. Partial product 16 is digit
`y[63]` ∈ {0, 1} times X, which is a plain AND.

Sign extension uses the usual constants:

- Partial product 0 carries `C S S S S` in bits 71..67, where S is its sign and C = ¬S.
- Partial products 1..15 carry `1 1 1 C` in their relative bits 70..67.
- The constants add up to 2^131, which vanishes modulo 2^128.

## The short addition (the core of the design)

In the conventional array two places hold 17 bits: column 60, where `b15` lands, and
columns 64..71, where partial product 16 begins. The fix adds three groups of bits in one
16-bit addition, over product bits 60..75:

```
        75  74 73 72 71  70 69 68 67 | 66 ... 60
             1  1  1 c0  s0 s0 s0 s0 | p15[6:0]          (pp0 sign ext., pp1's 111, pp15 low bits)
                     p16[7] ... p16[3] p16[2:0] ...       (low byte of partial product 16, at 64..71)
                                                  b15     (hot one of pp15, at 60)
       ───────────────────────────────────────────────
        z15 ..................... z7 | z6 ....... z0
```

The result `z` goes back into the array:

- z6..z0 take the place of `p15[6:0]`.
- z11..z7 take the place of pp0's `C S S S S`.
- z15..z12 take the place of pp1's `111`, plus one new bit at 75.

The remaining bits 8..63 of partial product 16 (product bits 72..127) move into the empty
upper half of row 0. The array is then exactly 16 rows (`ppgen` documents the full row
layout). The addition only works if it is faster than the regular partial products. It is
therefore split into two halves that run in parallel.

### Part A (`part_a`): speculative upper half

Its inputs are early signals:

- s0 is simply `y[3]`, since digit 0 has no incoming transfer.
- `p16[7:3]` is `x[7:3] & y[63]`.

A 5-bit compound adder forms both results, for carry-in 0 and for carry-in 1. Part B's
carry `sel` chooses one. Adding the three constant ones above needs no adder: bits 72..74
become ¬cout and bit 75 becomes cout.

### Part B (`part_b`): the low bits of partial product 15 without waiting for it

Waiting for the regular `p15[6:0]` would put the short addition behind the 3X/5X/7X
adders. Part B instead rebuilds those 7 bits from `x[6:0]`. It treats the radix-16 digit
as two radix-4 digits, `d = 4*hi + lo` with hi, lo ∈ {−2..2}:

- lo comes from `y[61:59]`.
- hi comes from `y[63:61]`.

That way only shifts are needed:

- u: the low multiple ±X or ±2X.
- h: the high multiple ±4X or ±8X.
- A third operand holding bits 0..2 of partial product 16 (at weights 16..64) and a 4-bit
  field abcd. abcd holds the hot ones of the two radix-4 multiples, at weights 8, 4, 2, 1.
  A negative multiple inverts the shifted multiplicand bits but leaves the shifted-in
  zeros at zero, then adds its own magnitude as the hot one.

A 3:2 carry-save adder and a 7-bit adder add the three 7-bit operands. They give z6..z0
and two carries, Cout1 and Cout2.

**The carry correction.** The regular partial product 15 already includes, in its bits
7 and up, the carry that the adder making 3X, 5X or 7X moved out of its own low 7 bits.
Part B recomputes those low bits and would produce that carry a second time. `cm_selector`
provides it as C_M:

- For |d| = 3, 5, 7 it is the carry into bit 7 of the matching adder.
- For |d| = 6 it is the carry into bit 6 of the 3X adder, which becomes bit 7 after the
  shift.
- For all other magnitudes it is zero.
- For a negative digit it is complemented. Inverting the multiple turns "carry already
  included" into "carry not included".

The carry into part A is then `sel = Cout1 ⊕ Cout2 ⊕ C_M`. The sum Cout1 + Cout2 − C_M
is always 0 or 1, so the XOR is exact.

**Why the adder forms and the recoding are fixed together.** The correction only works
if part B's radix-4 pair computes the low bits *the same way* the multiple adder does.
The carry out of the low 7 bits depends on how the sum is split, not only on its value.
This design therefore fixes the following pairings, and exhaustive tests confirm them:

| digit | radix-4 pair (hi×4, lo) | adder form whose carry is C_M |
|---|---|---|
| ±2 | (0, ±2) — strings 00100 / 11011 re-split | none |
| ±3 | (±4, ∓1) | 3X = 4X − X |
| ±5 | (±4, ±1) | 5X = 4X + X |
| ±6 | (±8, ∓2) — strings 01011 / 10100 re-split | 6X = 2·(4X − X), carry into bit 6 |
| ±7 | (±8, ∓1) | 7X = 8X − X |

The published method names the re-split of 00100/11011 and the 4X − X form of 3X. The
8X − X and 4X + X forms, and the re-split of the two ±6 strings 01011 → (8, −2) and
10100 → (−8, 2), are this design's own. Without the ±6 re-split, `sel` is wrong for some
multiplicands, in 128 of the 4096 cases of the part-B test. The plain radix-4 split of
those strings is 4X + 2X, which does not match 2·(4X − X).

## Reduction tree and final adder

`pp_tree` reduces ROWS = N/4 words with word-wide 4:2 compressors (`csa42`, each two rows
of full adders). Each level halves the number of rows. Carries out of bit 127 are
dropped, because only the product modulo 2^128 is wanted and the true product fits.
`final_cpa` is a plain `a + b`, so a synthesis tool can choose the adder architecture.
The source method specifies neither block beyond "three 4:2 levels" and "a carry-propagate
adder".

## How far to trust it

- **Functionally:** every testbench checks against arithmetic computed independently:
  - The end-to-end tests compare 6000 products in each pipeline form with a 128-bit
    multiply and check the latency. They also confirm that every mechanism of the short
    addition occurred: part-B carry, non-zero C_M, negative top digit, transfer digit,
    each re-split string, and a carry out of z15.
  - `part_a`, `part_b`, `cm_selector` and `booth16_recoder` are tested exhaustively over
    their inputs.
  - `ppgen` is checked at N = 64 and N = 32. The N/4 rows must sum to X·Y. The whole
    multiplier is also run end to end at N = 32.
- **Not modelled:** delay, area and power. The point of the method is a timing argument,
  that the short addition is hidden behind the 3X/5X/7X adders. RTL cannot show that.
  The adders here are word-level `+` operators. Where the method expects explicit
  internal carries, they are exposed by splitting each adder at bits 6 and 7, but the
  architecture is left to synthesis.
- **The tree** works on whole 128-bit words. It does not exploit the triangular shape of
  the array: constant-zero bits are left for synthesis to prune. Many outputs of `ppgen`
  are constant zero for that reason.
- **Not built:** the conventional 17-row multiplier that the method is compared against,
  and the radix-8, signed and combined signed/unsigned variants that the method says it
  extends to.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/booth16_pkg.sv tb/tb_booth16_mult.sv --top-module tb_booth16_mult
./obj_dir/Vtb_booth16_mult
```

Replace the testbench name to run any other test. Each test prints
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it covers |
|---|---|
| `tb_booth16_mult` | whole multiplier, default parameters (64-bit, 2 stages) |
| `tb_booth16_mult_3stage` | whole multiplier with `STAGES = 3` |
| `tb_booth16_mult_n32` | whole multiplier at N = 32, both pipeline forms |
| `tb_ppgen` | 16-row array sums to X·Y (N = 64 and 32) |
| `tb_part_a`, `tb_part_b`, `tb_cm_selector`, `tb_booth16_recoder` | exhaustive |
| `tb_odd_multiple_adder`, `tb_pp_select`, `tb_pp_tree`, `tb_final_cpa` | random and corner cases |

## Changing it

- **Operand width:** set `N` on `booth16_mult`. N/4 must be a power of two for the 4:2
  tree, for example 32 or 64.
- **Pipeline depth:** set `STAGES`.
- **Alternative adder forms:** the consistency table above must stay true for any
  alternative form of the odd-multiple adders or of the part-B recoding. `tb_part_b`
  checks it exhaustively, and it feeds C_M with the carries of the adder forms it assumes.
  If you change `odd_multiple_adder`, update the C_M formulas in that testbench too.
