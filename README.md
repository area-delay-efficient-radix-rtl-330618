# Radix-4 8×8 Booth multiplier with a compressor-based adder

This is a combinational signed multiplier for two 8-bit two's-complement
operands that produces a 15-bit product. It aims at low area and short delay,
which makes it suited to DSP datapaths such as filters and transforms. It uses
radix-4 (modified) Booth recoding, so only four partial products are formed
instead of eight. Those four are then summed by a single layer of 4:2
compressors and one 10-bit carry-lookahead / carry-select adder, not by a tree
of three adders. Most blocks are written close to gate level (NAND/NOR
networks) because the point of the design is in how they are built.

```
        A[7:0] ─┬───────────────┬──────────────┬──────────────┬──────────────┐
                │               │              │              │              │
            ┌───▼───┐           │              │              │              │
            │  B2C  │── -A[8:0] ┼──────────────┼──────────────┼──────────────┤
            └───────┘           │              │              │              │
                          ┌─────▼─────┐  ┌─────▼─────┐  ┌─────▼─────┐  ┌─────▼─────┐
     B[1:0] ──────────────►  BECS-2   │  │  BECS-1   │  │  BECS-1   │  │  BECS-1   │
     B[3:1] ─────────────────────────────►           │  │           │  │           │
     B[5:3] ────────────────────────────────────────────►           │  │           │
     B[7:5] ───────────────────────────────────────────────────────────►           │
                          └─────┬─────┘  └─────┬─────┘  └─────┬─────┘  └─────┬─────┘
                             PP0[9:0]       PP1[9:0]       PP2[9:0]       PP3[9:0]
                                └──────────────┴───────┬──────┴──────────────┘
                                        ┌──────────────▼──────────────┐
                                        │ compressor module           │──► P[4:0]
                                        │ (2×2:1, 2×3:2, 9×4:2)       │
                                        └──────┬─────────────┬────────┘
                                          row_s[9:0]    row_c[9:0]
                                        ┌──────▼─────────────▼────────┐
                                        │ 10-bit CLA-CSLA adder       │──► P[14:5]
                                        └─────────────────────────────┘
```

There is no clock. `p` follows `a` and `b` after the combinational delay.

## Number format and the one product that does not fit

`a` and `b` are two's complement (−128…127). The product `p` is 15 bits of
two's complement. Every product fits in 15 bits except (−128)·(−128) = +16384.
That product needs 16 bits, so the output wraps to −16384 (`15'h4000`). The
15-bit width is part of the architecture, because the final adder stops at
column 14. If the full range is needed, widen the top column (see
*Changing the design*).

## Booth recoding and partial-product selection

B is read in overlapping 3-bit groups {B[2i+1], B[2i], B[2i−1]}, with
B[−1] = 0. Each group gives a digit d = −2·B[2i+1] + B[2i] + B[2i−1] in
{−2, −1, 0, +1, +2}, and PP_i = d·A. A = −128 needs 10 bits for −2A = +256,
so each partial product is a 10-bit two's-complement word.

**B2C (`b2c`)** computes −A once for all four selectors. Bit k of −A is A[k]
inverted when any lower bit of A is one. The prefix OR is a NOR2 rank on bit
pairs followed by NAND gates. The sign bit of the 9-bit result needs no XOR:
with X meaning "A[6:0] is all zero", S8 = ¬A7·¬X. −A is negative exactly
when A is positive, i.e. A7 = 0 and some lower bit is set. For A = −128,
X = 1, so S8 = 0 and −A = 0_1000_0000 = +128, as required.

**Type-1 encoder-cum-selector (`becs_type1`, PP1..PP3).** The encoder makes
four one-hot, active-high selects: P (+A), Q (+2A), R (−2A) and S (−A). All
four are NOR2 gates over a few shared terms: the OR and the NAND of the two
low group bits, their combination into an XNOR, and the top bit with its
complement. Groups 000 and 111 raise no select, which gives zero.

The selector is a NAND–NAND network, PP = NAND4(NAND(P,A), NAND(Q,2A),
NAND(R,−2A), NAND(S,−A)). Two details save gates:

* *Late width equalisation.* A is 8 bits, ±2A and −A are 9 or 10 bits. The
  first NAND rank works at each word's natural width. Its outputs are then
  sign-extended to 10 bits. This works because a sign-extended operand bit
  equals the sign bit, so its NAND equals the sign bit's NAND.
* *Shift by appending 1.* The ×2 words are formed after the first rank by
  appending a constant 1 at the LSB. That is the value a NAND with a 0 operand
  would have produced.

**Type-2 encoder-cum-selector (`becs_type2`, PP0).** With B[−1] = 0, the
lowest group can only select 0, +A, −2A or −A. So there are three selects
(no +2A) and a NAND3 second rank.

## Summing the partial products: the compressor column map

This is the least obvious part of the design. PP_j has weight 4^j, so it sits
in product columns 2j…2j+9. Each partial product is sign-extended up to
column 14, the top column of the product, by repeating its bit 9. The number
of bits per column is then:

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 … 14 |
|---|---|---|---|---|---|---|---|
| bits | 1 | 1 | 2 | 2 | 3 | 3 | 4 |
| cell | wire | wire | 2:1 | 2:1 | 3:2 | 3:2 | 4:2 |

That is exactly two 2-to-1 compressors, two 3:2 compressors and nine 4:2
compressors (`pp_compressor`). They connect as follows:

* **Columns 0–1** are already product bits P0, P1.
* **Columns 2–3** use `compressor_2to1`, which is a full adder. The column
  carry ripples 2 → 3 → 4, and the sums are final product bits P2 and P3.
* **Columns 4–5** use `compressor_3to2` (x1..x3 plus cin; outputs sum, carry
  and cout). Column 4's cin is column 3's carry. Its sum is final: P4.
* **Columns 6–14** use `compressor_4to2` (x1..x4 plus cin; outputs sum,
  carry and cout).
* From column 4 upward, each compressor's `cout` feeds the next column's
  `cin`. `cout` is the majority of x1..x3 and never depends on `cin`, so
  this chain has a fixed depth of one cell and does not ripple.
* Each compressor's `carry` (double weight) lands in the next column.
  Columns 5…14 therefore end with exactly two bits each: their own
  compressor's `sum` and the `carry` of the column below. These are the two
  10-bit rows `row_s` and `row_c`.
* The carry and cout leaving column 14 have weight 2^15 and are dropped.

Each cell keeps the identity inputs = sum + 2·(carry + cout), so the module
preserves the total modulo 2^15. The testbenches check this identity
directly.

## The 10-bit CLA-CSLA adder (`cla_csla`)

This adder adds `row_s` and `row_c` (carry-in 0) to give P[14:5]. It is a
carry-select adder with segments [1:0], [4:2], [7:5], [9:8]. Every segment
produces its sums for carry-in 0 and for carry-in 1, and a 2-to-1 multiplexer
chosen by the carry from the segment below picks one set. Instead of two
independent lookahead networks, the two cases share one:

* **PG:** p = x ⊕ y and g = x·y.
* **LACG-0:** carries with segment carry-in 0, in flat sum-of-products form,
  c0[k] = g[k] + p[k]g[k−1] + … + p[k]…p[lo+1]g[lo].
* **LACG-1:** c1[k] = c0[k] + p[k]…p[lo]. This adds a single product term
  to the LACG-0 result.
* **SG-0 / SG-1:** s0[k] = p[k] ⊕ c0[k−1] and s1[k] = p[k] ⊕ c1[k−1]. At a
  segment's LSB they reduce to p and ¬p.

`WIDTH`, `SEG0_W` (lowest segment) and `SEG_W` (other segments) are
parameters. The multiplier uses 10 / 2 / 3.

## Files

| file | contents |
|---|---|
| `rtl/booth_pkg.sv` | widths (`OP_W`=8, `PP_W`=10, `PROD_W`=15, `ADD_LSB`=5, `ADD_W`=10), `pp_t`, `booth_sel_t` |
| `rtl/booth_mult8x8.sv` | top: `a[7:0]`, `b[7:0]` → `p[14:0]` |
| `rtl/b2c.sv` | −A generator |
| `rtl/becs_type1.sv`, `rtl/becs_type2.sv` | Booth encoder-cum-selectors |
| `rtl/compressor_2to1.sv`, `rtl/compressor_3to2.sv`, `rtl/compressor_4to2.sv` | compressor cells |
| `rtl/pp_compressor.sv` | the column map above |
| `rtl/cla_csla.sv` | final adder |
| `rtl/pp_addition.sv` | compressor module + final adder |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `booth_mult8x8_random_tb` |

## Verification

Every testbench compares against values it computes itself, not against
another module of the design. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `booth_mult8x8_tb` applies **all 65,536 operand pairs**, one every 50 ns.
  Each output must equal A·B exactly; for (−128)·(−128) it must equal the
  15-bit wrap. The testbench also counts how often each mechanism ran and
  fails if one never did. The mechanisms are: every Booth digit in each of
  the four selectors, the B2C producing +128, a horizontal compressor cout of
  1, a carry-in of 1 selected in each upper adder segment, and the single
  wrapped product.
* `booth_mult8x8_random_tb` applies 1,000 random pairs at 50 ns intervals.
* `b2c_tb`, `becs_type1_tb` and `becs_type2_tb` are exhaustive over A and the
  B group.
* The compressor cell tests are exhaustive. They check the arithmetic
  identity and that `cout` does not depend on `cin`.
* `cla_csla_tb` is exhaustive over both 10-bit operands and the carry-in
  (2^21 vectors).
* `pp_compressor_tb` and `pp_addition_tb` use corner words plus 50,000
  random partial-product sets.

All pass. A broken copy of each module was also run, for example with a
swapped carry multiplexer, a missing LACG-1 term, zero- instead of
sign-extension, or a wrong constant at the appended LSB. In every case the
module's testbench reported failures.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/booth_pkg.sv tb/booth_mult8x8_tb.sv --top-module booth_mult8x8_tb
./obj_dir/Vbooth_mult8x8_tb
```

Substitute any other `tb/<name>_tb.sv`. Verilator finds the other modules in
`rtl/` through `-I`, because each file is named after its module. The
exhaustive top-level test takes well under a second.

## What is specified and what is chosen here

These follow the reference architecture:

* the block set and how the blocks are connected;
* the 10-bit partial products and the 15-bit product;
* the S8 simplification in the B2C;
* NOR-based encoder terms, NAND–NAND selection with late width equalisation
  and the appended-1 shift;
* the type-2 selector for PP0 without a zero or +2A leg;
* the compressor counts (nine 4:2, two 3:2, two 2:1, the last built from full
  adders);
* the 10-bit CLA-CSLA with LACG-1 derived from LACG-0.

These are this implementation's own choices:

* **Gate netlists of the B2C, type-2 selector and compressor cells.** Only
  their function and critical-path gate counts were available. The B2C uses a
  NOR2/NAND prefix tree. The 4:2 compressor uses the common form
  cout = maj(x1,x2,x3), carry = parity ? cin : x4. The 3:2 compressor is that
  cell with x4 removed. Delays will therefore not match a hand-optimised cell
  netlist exactly.
* **Column assignment in the compressor module.** It is the assignment that
  the compressor counts and the 10-bit adder width leave room for. Columns
  0–4 leave the module resolved, and the adder covers columns 5–14.
* **Segment boundaries of the final adder**: 2 + 3 + 3 + 2 bits. The lowest
  segment is also carry-selected on `cin`, which is 0 in the multiplier.
* **The adder's carry-out** (weight 2^15) is left unconnected.
* **(−128)·(−128)** wraps, as described above.

The published evaluation also reports 65 nm synthesis figures: delay, area,
power and energy. These come from a commercial standard-cell flow and cannot
be reproduced or checked from this RTL.

## Changing the design

* To get a full-range 16-bit product, extend the sign extension in
  `pp_compressor` to column 15 (`PROD_W` = 16). Column 15 then holds four
  bits and needs a tenth 4:2 compressor. The final adder grows to 11 bits
  (`ADD_W` = 11).
  `cla_csla` already takes any `WIDTH`.
* The operand width is not a free parameter. `b2c`, the compressor column
  map (`ADD_LSB`, the 2:1 / 3:2 column ranges) and the testbenches are
  written for 8 bits.
* To pipeline the multiplier, register the partial products `pp` or the two
  compressor rows, which are the natural cut points. The testbenches check
  combinationally, one step after applying inputs, so they would need the
  matching latency.
