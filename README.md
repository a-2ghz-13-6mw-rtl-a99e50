# 12x9b single-cycle Booth multiplier for FFT twiddle multiplication

An FFT datapath spends most of its multiplier work scaling samples by
twiddle factors: pre-computed constants read from a ROM. This design is the
multiplier for that job: a 12-bit by 9-bit two's complement multiplier that
accepts a new operand pair every clock cycle and returns the full 21-bit
product one cycle after the operands are registered. It was designed to run at
2 GHz in a 90 nm process, and the ideas come from that target. Every
combinational step is kept shallow. The Booth encoder is one-hot so that
partial product selection is a single 6:1 multiplexer. Sign extension is
folded into a few constant bits. The final adder is split according to when
its input bits arrive.

The RTL here describes the logic of that multiplier. The circuit-level parts
of the original (mirror-adder transistors, write-port flip-flops, high-Vt
devices, sizing) are written by their logic function.

## Datapath

```
 multiplicand[11:0] ──► FF ──────────────┐
                                          ▼
 multiplier[8:0] ──► FF ──► booth_encoder ──► booth_selection ──► pp_reduction_tree ──► completion_adder ──► FF ──► product[20:0]
                            5 x one-hot S0..S5   5 x 14b pp + neg     22b sum + 22b carry   22b, bit 21 dropped
```

| Module              | Role |
|---------------------|------|
| `mult_pkg`          | widths (12, 9, 21, 5 digits, 14b products, 22 positions) and the `booth_sel_t` select struct |
| `booth_encoder`     | radix-4 Booth encoding, one-hot, six selects per digit |
| `booth_selection`   | 6:1 selection of each partial product, sign-extension compression |
| `compressor_3to2`   | 3:2 compressor (full adder) |
| `pp_reduction_tree` | column-tiled tree: 48 compressors in three levels, down to two bits per column |
| `completion_adder`  | hybrid ripple / carry-lookahead / conditional-sum adder |
| `wp_flipflop`       | the input and output flip-flops |
| `twiddle_mult_12x9` | top level |

### Timing

There is no reset, no valid signal and no stall. Operands present before
rising edge *k* go into the input flip-flops at edge *k*. Their product goes
into the output flip-flops at edge *k+1* and stays on `product` until edge
*k+2*. Throughput is one multiply per cycle. The operands are not
distinguished by role: either one can carry the twiddle factor, as long as the
12-bit one goes to `multiplicand`.

## One-hot Booth encoding

The 9-bit multiplier X is sign extended to 10 bits and a 0 is placed below
bit 0. This gives five overlapping triplets (x[2j+1], x[2j], x[2j-1]). Each
triplet is a radix-4 digit d_j in {-2..2}, and X = Σ d_j·4^j. Instead of
the usual (sign, one, two) encoding, each digit drives six mutually exclusive
select lines:

| select | triplet  | candidate | value chosen from Y        |
|--------|----------|-----------|----------------------------|
| S0     | 000      | 0         | 0                          |
| S1     | 001, 010 | Y         | Y                          |
| S2     | 011      | 2Y        | 2Y                         |
| S3     | 100      | 2Y#       | ~2Y  (complement)          |
| S4     | 101, 110 | Y#        | ~Y                         |
| S5     | 111      | 1         | all ones (= ~0)            |

A negative digit (S3, S4, S5) picks the bitwise complement. The missing +1
of the two's complement negation is the digit's top triplet bit, `neg[j]`,
which goes into the compressor tree as a separate bit. Triplet 111 is
"minus zero": all ones plus 1 is 0. With one-hot selects the selection is a
plain AND-OR over six precomputed candidates. No select signal needs a second
level of decoding.

## The partial product bit matrix

This is the part that needs the most care when you change widths.

Each selected candidate c_j is a 13-bit two's complement word (2Y needs the
extra bit). Copying its sign across the full width would give five 22-bit
rows. Instead each partial product is 14 bits:

```
pp[j] = { 1, ~c_j[12], c_j[11:0] }         placed at bit 2j
```

One more row holds the five negation bits and a single constant:

```
row 5 = neg[j] at bit 2j (j = 0..4)  +  1 at bit 12
```

Why this is exact: a 13-bit signed word equals c[11:0] − s·2^12 with
s = c[12], and −s·2^12 = (~s)·2^12 − 2^12. So the stored row j, with ~s at
bit 12 and a 1 at bit 13, exceeds its true value by (2^13 + 2^12)·4^j =
3·2^12·4^j. Over the five rows that excess is 3·2^12·(1+4+16+64+256) =
2^12·1023. The extra 1 at bit 12 brings it to 2^12·1024 = 2^22, which is 0
modulo 2^22. In general the excess is 2^(YW+2·NDIG), which is exactly the
matrix width. All arithmetic is therefore modulo 2^22. The leading 1 of the
last row sits at bit 21, which is why the tree and adder span 22 positions
(0..21) for a 21-bit product. Bit 21 of the final sum always equals bit 20,
and an assertion in the top level checks this on every cycle.

The matrix holds 76 bits: 70 partial product bits, 5 negation bits and the
constant. With full sign extension it would hold 95 (rows of 22, 20, 18, 16
and 14 bits, plus the negation bits). That is a fifth fewer bits to compress.

## Compressor tree

The matrix above has up to six bits per column (columns 8 and 12). It is
reduced to two bits per column by a tree of 3:2 compressors, tiled column by
column in three levels, Dadda style. Level 1 brings every column to at most
four bits, level 2 to three, and level 3 to two. Each level works from bit 0
upward. The carries a column receives from the column below count toward its
height. Inside a column the earliest-arriving bits are compressed first.
Where only one bit has to go, a compressor with a tied-low input serves as a
half adder. This gives 48 compressors. `pp_reduction_tree.sv` lists them one
per line with their column.

In the original circuit the compressor's Carry output is fast and its Sum
output slow, and its inputs a and b are the slow ones. The tree therefore
wires incoming carries to a and b.

The number of compressors between the matrix and each adder input bit (bits
0..21) is:

```
bit:    0 1 2 3 4 5 6 7 8 9 10 11 12 13 14 15 16 17 18 19 20 21
depth:  0 0 1 1 2 2 2 3 3 3  3  3  3  3  3  3  3  3  2  2  1  0
```

This is the arrival profile the completion adder exploits. It matches the
profile published for the original design up to bit 17. Bits 18 to 21 are
one compressor shallower here. The original's exact matrix layout is not
published, so that difference cannot be traced further.

## Completion adder

The tree's outputs settle at different times. The low bits go through few
compressors and arrive first, and the middle bits arrive last. The adder is
cut to match that profile:

| bits   | structure |
|--------|-----------|
| 5:0    | ripple carry: finished before the middle bits are ready |
| 16:6   | carry-lookahead in variable blocks 8:6, 13:9, 16:14. Each block forms group generate/propagate; its internal carries and carry-out are G \| P·cin |
| 21:17  | conditional sum: two ripple chains, computed for carry-in 0 and 1, and a 2:1 multiplexer driven by the carry out of bit 16 |

The segment sizes are parameters of `completion_adder` (6, 3, 5, 3, 5). The
width is their sum. `cout` is provided but not used by the multiplier.

## Departures from the original design

- **Flip-flops.** The write-port master-slave flip-flops are written as
  rising-edge registers, with no reset. The original's clock power saving is
  a transistor-level property.
- **Sign-extension bit pattern.** The original merges the signs and
  pre-computes their sum but does not give the bits. The pattern above is
  this design's own.
- **Tree tiling.** The original does not publish its compressor placement.
  The Dadda-style tiling here is this design's own. Its arrival profile
  matches the original's up to bit 17.
- **Lookahead internals.** The block boundaries are the original's. The
  equations inside each block are this design's.
- **Width.** The original calls the tree output and the adder "21-bit" but
  numbers their bits 0..21. This design uses 22 positions internally and a
  21-bit product port.
- **Not included.** The surrounding 128-point FFT engine (three radix-4
  stages and one radix-2 stage, three complex multipliers per radix-4
  butterfly) and the twiddle ROM are only the multiplier's setting. Their
  hardware is not specified, so they are not part of this RTL. Timing,
  power and voltage scaling have no RTL counterpart.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_encoder`     | all 512 multipliers: one-hot selects, select matches the digit, Σ d_j·4^j = X |
| `tb_booth_selection`   | random and extreme multiplicands, every select: recovered word + neg = d·Y, leading 1 |
| `tb_compressor_3to2`   | all 8 input combinations |
| `tb_pp_reduction_tree` | 20 000 random matrices: vsum + vcarry = matrix sum mod 2^22 |
| `tb_completion_adder`  | carries started at every bit and run to the top, plus 50 000 random pairs; both settings of the conditional-sum mux |
| `tb_wp_flipflop`       | capture at the rising edge, hold while d changes |
| `tb_twiddle_mult_12x9` | all 2^21 operand pairs at one per cycle, at default parameters |

The top-level test checks each product exactly two edges after its operands.
It also checks that the product is not visible one edge earlier, and that
2^21 + 2 products take exactly as many cycles. It first applies the longest
carry path pattern: multiplicand all ones, multiplier stepping from 0 to 1,
product going from 0 to all ones. It counts, and fails if any is missing:
each of S0..S5, both settings of the conditional-sum multiplexer, carries
out of each lookahead block, and negative, zero and positive products. It
runs in a few seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/tb_twiddle_mult_12x9.sv \
          --top-module tb_twiddle_mult_12x9 -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run the others. `-Irtl` lets Verilator find the
modules by file name. Each file holds one module, and `mult_pkg.sv` must come
first.

## Changing the sizes

The widths live in `mult_pkg`. Changing `YW` or `XW` changes the number of
digits, the partial product width and the matrix width. The sign-extension
constant (the 1 at bit `YW` in `pp_reduction_tree`) is correct for any width,
as shown above. Two things are fixed, though. The completion adder's
segment sizes must add up to `SUMW`. The compressor list in `pp_reduction_tree` is the tiling for the default sizes,
so it has to be re-tiled with the procedure above for any other size.
