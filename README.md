# Radix-4 Booth multiplier with a multiple-level conditional-sum final adder

A combinational N x N two's-complement multiplier (default N = 32). It is built from
three ideas:

1. **A Booth recoder whose decoder has two gate delays on every path.** Each pair of
   multiplier bits selects one of 0, ±y, ±2y. The recoder's select signals are arranged
   so that a zero digit needs no special decoder path.
2. **A partial-product array with a regular low end.** The least significant bit of each
   row and the row's "+1 for negation" are merged into two terms: `Row_LSB` at bit 2i and
   `Neg_cin` at bit 2i+1. No row then has a stray term two places below the next row.
3. **A final adder shaped to the arrival times of its inputs.** The two rows that leave the
   reduction tree settle early at both ends and late in the middle. Instead of one balanced
   adder, the carry path is a chain of blocks: ripple bits at the bottom,
   conditional-carry sections in the middle and a conditional-sum block at the top. Each
   block's internal terms are ready before its carry in arrives.

```
 x ──► mbe_pp_array ──(N/2+1 rows of 2N bits)──► pprt ──(2 rows)──► mlcsma ──► p = x*y
 y ──►   N/2 × mbe_ppt_row                       full adders         rgp_gen
           mbe_encoder + N × XNOR                                    full_adder / cca_block
           (N-1) × mbe_decoder                                       … / csma_block
```

There is no clock and no reset. `p` is valid one combinational delay after `x` and `y`
change. Register the inputs or the output yourself if you need a pipeline.

## Booth recoding (`mbe_encoder`, `mbe_decoder`, `mbe_ppt_row`)

Row i looks at the triplet t = {x[2i+1], x[2i], x[2i-1]}, with x[-1] = 0. The triplet
gives the digit d = -2·x[2i+1] + x[2i] + x[2i-1]. The encoder produces four signals:

| t   | d  | X1_b | X2_b | Neg | Z |
|-----|----|------|------|-----|---|
| 000 | 0  | 1 | 0 | 0 | 1 |
| 001 | 1  | 0 | 1 | 0 | 1 |
| 010 | 1  | 0 | 1 | 0 | 0 |
| 011 | 2  | 1 | 0 | 0 | 0 |
| 100 | -2 | 1 | 0 | 1 | 0 |
| 101 | -1 | 0 | 1 | 1 | 0 |
| 110 | -1 | 0 | 1 | 1 | 1 |
| 111 | 0  | 1 | 0 | 1 | 1 |

The encoder's signals are simple XOR-type functions of the triplet:

- X1_b = XNOR(x[2i-1], x[2i])
- X2_b = XOR(x[2i-1], x[2i])
- Z = XNOR(x[2i+1], x[2i])
- Neg = x[2i+1]

X2_b is low for the ±2 digits and also for the two zero digits. Z is high exactly where
that would be wrong, so the decoder has to test only one extra input.

Each multiplicand bit passes once through an XNOR with Neg. Neighbouring decoders share
that output. Decoder j computes:

```
ppt[j] = ~( (~(y[j]^Neg) | X1_b) & (~(y[j-1]^Neg) | X2_b | Z) )
```

This gives y[j]^Neg for |d| = 1, y[j-1]^Neg for |d| = 2, and 0 for d = 0. The 111 triplet
therefore gives an all-zero row, not an inverted all-ones row.

Bit 0 of the row and the negation's +1 are merged:

```
Row_LSB = y[0] & (x[2i-1] ^ x[2i])                                   (weight 1)
Neg_cin = x[2i+1] & ~(x[2i]&x[2i-1] | y[0]&x[2i] | y[0]&x[2i-1])      (weight 2)
```

Row_LSB + 2·Neg_cin equals the bit-0 value of the ones'-complement row plus the
negation's +1 (0, 1 or 2). The row sign `se` is (d ≠ 0) & (y[N-1] ^ Neg). With it, one row
satisfies:

    Σ ppt[j]·2^j + 2·Neg_cin − se·2^N = d · y

Note that `mbe_ppt_row` uses N XNOR gates, one per bit of y. Decoder 1 needs y[0]^Neg for
the 2y case.

## Partial-product array (`mbe_pp_array`)

This is the layout for N = 8. For other sizes, row i is shifted left by 2i in the same way.

```
bit:   15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 0:                ~s  s  s  p  p  p  p  p  p  p  R
row 1:              1 ~s  p  p  p  p  p  p  p  R
row 2:        1 ~s  p  p  p  p  p  p  p  R
row 3:  1 ~s  p  p  p  p  p  p  p  R
cin  :                          C     C     C     C
```

In the diagram, p is a decoder bit, R is Row_LSB, C is Neg_cin and s is the row's sign.
Sign extension is replaced by constants: row 0 carries s, s, ~s and every other row
carries ~s, 1. Together these encode −Σ s_i·2^(2i+N) modulo 2^(2N). The Neg_cin terms
never overlap, so they form one extra row. The array has N/2 + 1 rows of 2N bits, and
their sum modulo 2^(2N) is x·y.

## Reduction tree (`pprt`)

The tree is Wallace-style. At each level, groups of three rows go through a row of full
adders (3:2 counters), and one or two left-over rows pass through unchanged. Levels repeat
until two rows remain. For N = 32 that is 17 rows in 6 levels.

This tree has the right function but not the delay-optimised wiring the design intends.
The intended tree wires every counter by the arrival times of its inputs (fast and slow
full-adder inputs, n:2 column compressors). That search is not reproduced here. If you
need that delay profile, replace this module; its interface only promises that
`sum_row + carry_row` equals the sum of the rows.

## Final adder (`mlcsma` and its sections)

This is the part of the design that takes the most explaining.

**Terms.** For each bit, `rgp_gen` forms three terms:

- r = a|b, the carry out if the carry in is 1
- g = a&b, the carry out if the carry in is 0
- p = a^b

A group of bits also has an (r, g) pair. Two adjacent groups merge with two multiplexers
(`mbe_pkg::rg_merge`):

```
merged.r = lo.r ? hi.r : hi.g
merged.g = lo.g ? hi.r : hi.g
```

The merge is associative but not commutative: the lower group must drive the select.
Once a group's pair is known, its carry out is a single multiplexer:
`cout = cin ? R : G`.

**Blocks.** `BLOCK_START` marks the bits where a block begins. The three kinds of block
are:

- **Ripple bit** (a block of one bit): a `full_adder`. Bit 0 has no carry in, so it is a
  half adder. Ripple bits suit the LSB end, where inputs and carry arrive together.
- **Conditional-carry section** (`cca_block`, any block of two or more bits except the
  last): the bits are merged in 2-bit sections. The sections are then folded into the top
  one from the top down, one multiplexer level each. A late section near the top of the
  block thus enters the chain last. The internal carries come from a running merge
  selected by the carry in, and each sum is p ^ c. Area is low, and the carry in costs
  only one multiplexer on the way through.
- **Conditional-sum block** (`csma_block`, always the last block): a conditional-sum
  tree. Each bit starts with both candidate results (sum p or ~p, carry g or r). At each
  level, pairs of neighbouring groups merge: the lower group's two candidate carries pick
  the upper group's candidates. After ceil(log2 L) levels the block's carry in chooses
  between the two finished results. The late carry into the top of the adder therefore
  drives only one row of multiplexers.

**Choosing the partition.** The best partition depends on the arrival profile of the
reduction tree's outputs. It is found at design time by walking from the LSB to the MSB.
The walk opens a new, deeper level wherever the carry arrives at least
½(t_NOR2 + t_MUX) later than a block's inputs, and falls back to ripple bits where it
does not. This RTL does not include that search. The partition is a parameter, and any
partition gives the same sum; only the delay changes.

The default (`mbe_pkg::default_blocks`) gives:

- ripple bits 0–3;
- 4-bit conditional-carry sections above them;
- a conditional-sum block over the top third.

For the 64-bit adder of the 32 × 32 multiplier, the default section boundaries above bit
24 are at bits 27, 33 and 43. Those are the boundaries of a published 32 × 32 example,
but that example was computed for a different (non-Booth) tree. Re-derive the partition
if you change the tree.

The 8-bit "hybrid" adder is `mlcsma #(.W(8), .BLOCK_START(8'b0001_0001))`. It has a
conditional-carry section on bits 0–3 and a conditional-sum block on bits 4–7.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `booth_multiplier` | `N` | 32 | operand width, even, ≥ 4 |
| `booth_multiplier`, `mlcsma` | `BLOCK_START` | `default_blocks(2N)` | final-adder partition, bit k set = block starts at k |
| `pprt` | `ROWS`, `W` | 17, 64 | rows in, row width |
| `cca_block`, `csma_block` | `L` | 4 | section width |

`default_blocks` supports adders up to 256 bits wide (N ≤ 128).

## Where this RTL departs from the intended design

- **Reduction tree.** A plain Wallace tree replaces the arrival-time-optimised tree
  (see above). The product is the same, but the delay profile is not.
- **Final-adder partition.** The partition is a parameter with a generic default. It is
  not the output of the partition search on this tree's real profile.
- **Gate-level form.**
  - r and g are written in true polarity. The intended circuit uses NOR/NAND with
    inverting multiplexers.
  - Inside a conditional-carry section, the carries come from a serial running merge.
  - Synthesis decides the actual gate structure and depth. No timing claim is made for
    this RTL.
- **Sign-extension logic.** The row sign `se` and the constants in the array are this
  design's own formulation. They are checked arithmetically.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_full_adder`, `tb_mbe_encoder`, `tb_mbe_decoder` | exhaustive; recoder against the table above and the row arithmetic |
| `tb_mbe_ppt_row` | row value = d·y; 8-bit exhaustive, 32-bit with random and extreme y |
| `tb_mbe_pp_array` | rows sum to x·y; 8 × 8 exhaustive including the layout rules, 32 × 32 random |
| `tb_pprt` | sum preserved; 17 × 64 and 5 × 16 |
| `tb_rgp_gen`, `tb_cca_block`, `tb_csma_block` | exhaustive sections (4 and 7 bits, both carries in) |
| `tb_mlcsma` | 8-bit hybrid exhaustive, 16- and 64-bit random and carry-chain cases |
| `tb_booth_multiplier` | 32 × 32 at default parameters, 40 000 products, with coverage counters |
| `tb_mult_sizes` | N = 6, 8, 12, 16, 18, 24, 32, 36; 6 and 8 exhaustive, the others random |

`tb_booth_multiplier` counts how often each mechanism of the design was exercised. It fails
if any of the following never happened:

- each of the eight Booth triplets;
- a Neg_cin of 1;
- a row sign of 1;
- a carry of 1 out of the ripple bits and out of a conditional-carry section;
- a carry of 0 and a carry of 1 into the conditional-sum block.

To run a testbench with Verilator:

```
verilator --binary --timing --assert rtl/mbe_pkg.sv tb/tb_booth_multiplier.sv \
          -y rtl -y tb --top-module tb_booth_multiplier -o sim
./obj_dir/sim
```

Pass `rtl/mbe_pkg.sv` first; the other files are found through `-y`. Every testbench runs
in well under a minute.
