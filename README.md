# Fixed-width Booth multiplier with error compensation

A fixed-width multiplier takes two L-bit numbers and returns an L-bit
result. DSP datapaths (filters, DCTs, FFTs) use them so that word widths stay
constant. The exact product of two L-bit two's complement numbers needs
2L-1 bits (2L for the single case -2^(L-1) * -2^(L-1)). A fixed-width
multiplier keeps only the top L of those bits. There are two cheap ways to do
that, and both cost accuracy:

* **Compute everything, then round.** This is the accurate reference, but it
  spends the full adder array on bits that are thrown away.
* **Drop the low half of the partial-product array.** This halves the array,
  but the carries the dropped half would have sent upward are lost. The
  result is then too small by up to several output LSBs.

This design drops the low columns but adds back an estimate of their carry, a
*compensation bias* σ. Most of σ comes from one column of the dropped part,
which is added exactly. The rest comes from the Booth encoder's "digit is
nonzero" flags. The result stays within one output LSB of the true product.
Its mean absolute error is close to that of full rounding.

The repository also contains a second, independent multiplier: a
full-width radix-2 Booth array multiplier made of add/subtract-and-shift
stages. The top level `fwbm_top` holds both side by side, each with its own
ports.

Everything is combinational: there is no clock, reset or handshake. Outputs
are valid one propagation delay after the inputs change.

## The partial-product array and where it is cut

The multiplier `y` is recoded in radix-4 Booth form. Each group of three bits
`{y[2i+1], y[2i], y[2i-1]}` (with `y[-1] = 0`) becomes a digit
`d_i = -2·y[2i+1] + y[2i] + y[2i-1]`, so `d_i ∈ {-2, -1, 0, +1, +2}`. It also
gives a flag `nz_i = (d_i != 0)`:

| y[2i+1] y[2i] y[2i-1] | d_i | nz_i |
|---|---|---|
| 000 | 0 | 0 |
| 001 | +1 | 1 |
| 010 | +1 | 1 |
| 011 | +2 | 1 |
| 100 | -2 | 1 |
| 101 | -1 | 1 |
| 110 | -1 | 1 |
| 111 | 0 | 0 |

Each digit selects a row of L+1 bits `p_{i,0..L}` and a negation bit `n_i`.
For a negative digit, the row holds the one's complement of `|d_i|·x`, and `n_i`
adds the missing +1 at the weight of `p_{i,0}`. Row i is shifted 2i places.
There are Q = L/2 rows. For L = 8 the array looks like this (column weights
2^14 on the left down to 2^0 on the right):

```
weight   14  13  12  11  10   9   8   7 |   6   5   4   3   2   1   0
row 0                           p08 p07 | p06 p05 p04 p03 p02 p01 p00
                                        |                          n0
row 1                   p18 p17 p16 p15 | p14 p13 p12 p11 p10
                                        |                  n1
row 2           p28 p27 p26 p25 p24 p23 | p22 p21 p20
                                        |          n2
row 3   p38 p37 p36 p35 p34 p33 p32 p31 | p30
                                        |  n3
        <----------- MP ------------>   | LPmaj <-------- LPminor -------->
```

Sign extension of the rows lies entirely to the left, inside MP (it is
replaced by inverted sign bits and constant ones, see below). The array is
cut at weight 2^(L-1):

* **MP** is every bit of weight 2^(L-1) and above. These bits are summed
  exactly. The output is `pq = (MP + σ·2^(L-1)) >> (L-1)`, which is bits
  `2L-2 .. L-1` of the compensated product. All `n_i` fall below the cut.
* **LP** is everything below the cut. It is never added. LP is split again:
  * **LPmajor** is the single column of weight 2^(L-2). It holds
    `p_{i, L-2-2i}` for every row and also `n_{Q-1}`, so Q+1 bits in all.
  * **LPminor** is everything below LPmajor. Only rows 0 .. Q-2 reach it.

## Adding MP: the 4-2 compressor array

`mp_csa_array` adds the kept part. It works on L-bit words whose bit b has
weight 2^(L-1+b), so everything below the cut is simply absent.

* **No sign extension.** A row is an (L+1)-bit signed number. Its sign bit
  p_{i,L} weighs -2^(L+2i). Write that as (1 - p_{i,L})·2^(L+2i) - 2^(L+2i).
  Each row then enters with its sign bit inverted. One constant word carries
  -Σ_i 2^(L+2i), reduced modulo the word size; it is a handful of constant
  ones. For L = 8 that constant is 0xAB00 (modulo 2^16) before scaling.
* **Words.** There are Q row words, the constant word and a word holding σ at
  the bottom bit: Q+2 words in all, six for L = 8.
* **Compressor rows.** `csa42_row` is a row of `compressor42` cells. Each
  cell is two full adders, and its lateral carry does not depend on its
  carry-in, so a row has no ripple. A row turns four words into a sum word
  and a carry word. The first row takes four words. Each further row takes
  the two words left by the previous row plus two new words; a zero word pads
  an odd count. L = 8 needs two rows.
* **Final adder.** One carry-propagate adder adds the last two words. Its L
  bits are the output.

Everything is exact modulo 2^L in word units. That means modulo 2^(2L-1) of
the product, which covers all output bits.

## The compensation bias σ

σ stands for the carry that LP would have sent into the MP least significant
bit, with the final rounding included. It has the form

    σ = CE[ S_LPmajor + CA[S_LPminor] ]

* **S_LPmajor** is the number of ones in the LPmajor column. It is counted
  exactly.
* **CA[S_LPminor]** is an *estimate* of the carry from LPminor into LPmajor.
  It does not look at any LPminor bit; it uses the Booth flags only. Consider
  a nonzero row whose multiplicand bits are random with equal probability.
  For row i, its LPminor bits at weights 2^(2i) .. 2^(L-3) each average 1/2.
  Its `n_i` averages 1/2 (half the nonzero codes are negative). Together
  they give
  `½·(2^(L-2) - 2^(2i)) + ½·2^(2i) = 2^(L-3)`.
  That is exactly half an LPmajor unit, for every row and every L. A zero
  digit gives an all-zero row, which contributes nothing. The expected
  LPminor carry is therefore k/2 LPmajor units, where k counts the nonzero
  digits among rows 0 .. Q-2. The circuit uses `CA = floor(k/2)`.
* **CE[t]** is the exact carry out of the LPmajor column into MP, rounded to
  nearest: `σ = floor((t + 1) / 2)`.

For L = 8 this is a popcount of 5 bits, a popcount of 3 flags halved, and
one add-and-shift. σ is at most 3, which is a 2-bit add into the bottom of MP.

Two other forms were tried, with every 8-bit operand pair:

| CA | mean \|error\| (LSB) | max \|error\| (LSB) |
|---|---|---|
| floor(k/2) (used) | 0.302 | 1.0 |
| round(k/2) | 0.430 | 1.5 |
| k/2 kept as a half unit | 0.302 | 1.0 |

The first and last rows give identical results.

### Trading area for accuracy: `W_COL`

The same idea works with more than one exact column. The parameter `W_COL`
(default 1) sets how many of the top LP columns are added exactly. Their sum
S is measured in units of the lowest exact column. The same averaging
argument shows that each nonzero row reaching below those columns
contributes half of that unit. Let k count those rows. Then

    σ = floor((2·S + k + 2^W_COL) / 2^(W_COL+1))

With `W_COL = 1` this is the formula above. Each extra column costs one more
column of adders in the bias circuit, and the error falls towards that of
full rounding.

The paper this design follows gives only the general form of σ. The
estimator for CA, the rounding constant and the choice between the forms
above belong to this design. So does the `W_COL` parameter: the paper says
accuracy can be tuned by how many columns are kept, but gives no number.

### Accuracy

The figures below were measured over every operand pair. Errors are in
output LSBs (2^(L-1) of the exact product). The pair
x = y = -2^(L-1) is left out.

| L | W_COL | this design | MP only, no σ | exact product rounded |
|---|---|---|---|---|
| 8 | 1 | mean 0.302, max 1.0 | mean 1.502 | mean 0.248 |
| 8 | 2 | mean 0.264, max 0.75 | mean 1.502 | mean 0.248 |
| 8 | 3 | mean 0.251, max 0.625 | mean 1.502 | mean 0.248 |
| 4 | 1 | mean 0.220, max 0.5 | mean 0.780 | mean 0.220 |

At L = 4 the estimate gives exactly the same results as full rounding.
 The
paper reports mean errors of 0.1121 (L = 8) and 0.1257 (L = 4) without
stating the unit or the normalisation. Those numbers cannot be compared
directly with the table above.

**Output range.** x = y = -2^(L-1) gives +2^(2L-2). Divided by 2^(L-1),
that is +2^(L-1), which an L-bit signed output cannot hold. It wraps to
-2^(L-1). This is the usual -1 × -1 corner of fractional fixed-point
multipliers.

## The radix-2 Booth array multiplier

`booth_multiplier` computes the full 2N-bit product. It unrolls the classic
shift-and-add Booth algorithm into N combinational stages (`booth_substep`).
Each stage holds an accumulator `acc`, the shifting multiplier register `Q`
and the bit `q0` shifted out last. It works as follows:

| {Q[0], q0} | action |
|---|---|
| 01 | acc ← acc + multiplicand |
| 10 | acc ← acc − multiplicand |
| 00, 11 | acc unchanged |

Then `{acc, Q, q0}` shifts right by one place, and the accumulator's sign is
copied in at the top. Stage 0 starts with `acc = 0`, `Q = multiplier` and
`q0 = 0`. After N stages, `{acc, Q}` is the product.

Each stage contains one `add_sub`: a row of N XOR gates inverts the
multiplicand for subtraction, and a ripple chain of N full adders (`fa`) adds
with carry-in = `sub`.

**Overflow.** The accumulator is only N bits wide. With multiplicand
= -2^(N-1), `acc ± multiplicand` can need N+1 bits. The bit shifted into the
accumulator's top is therefore the sign of the true (N+1)-bit sum, worked out
from the operand signs and the adder's carry-out. It is not bit N-1 of the
N-bit sum. With that one change, every operand pair multiplies correctly.
With plain N-bit arithmetic, the products with multiplicand = -2^(N-1) would
be wrong.

Worked example (N = 8): 00110101 × 01101101 = 0001011010010001
(53 × 109 = 5777). The testbench checks the accumulator, Q and q0 after every
stage:

| after stage | acc | Q | q0 |
|---|---|---|---|
| 1 | 11001001 | 10011010 | 1 |
| 2 | 00011011 | 01001101 | 0 |
| 3 | 11010111 | 00100110 | 1 |
| 4 | 00100010 | 00010011 | 0 |
| 5 | 11011010 | 10001001 | 1 |
| 6 | 11101101 | 01000100 | 1 |
| 7 | 00101101 | 00100010 | 0 |

## Modules

| module | role |
|---|---|
| `fwbm_pkg` | `booth_digit_t` = {neg, one, two, nz}: one Booth digit |
| `booth_encoder` | 3 multiplier bits → Booth digit and nonzero flag (table above) |
| `pp_row_gen` | digit and multiplicand → row `p[L:0]` and `n` |
| `comp_bias` | exact LP column sum and nonzero flags → σ |
| `compressor42` | 4-2 compressor cell (two full adders) |
| `csa42_row` | row of 4-2 cells: four words → sum and carry words |
| `mp_csa_array` | MP words (inverted signs, constant, σ), compressor rows, final adder |
| `fw_booth_mult` | fixed-width multiplier: encoders, rows, exact-column sum, σ, MP array |
| `fa` | full adder |
| `add_sub` | XOR row + ripple-carry adder/subtractor, with carry-out |
| `booth_substep` | one radix-2 Booth add/subtract-and-shift stage |
| `booth_multiplier` | N chained stages, full product |
| `fwbm_top` | both multipliers side by side |

### Top-level ports (`fwbm_top`)

Parameters: `L` (default 8; even, at least 4) and `W_COL` (default 1; 1 .. L-2).

| port | dir | width | meaning |
|---|---|---|---|
| `fw_x` | in | L | fixed-width multiplier: multiplicand |
| `fw_y` | in | L | fixed-width multiplier: multiplier (Booth-encoded) |
| `fw_pq` | out | L | ≈ fw_x·fw_y / 2^(L-1), rounded |
| `fw_sigma` | out | clog2(L)+1 | σ applied (for observation) |
| `bm_multiplier` | in | L | array multiplier: multiplier |
| `bm_multiplicand` | in | L | array multiplier: multiplicand |
| `bm_product` | out | 2L | exact product |

All values are two's complement. `booth_multiplier` also has a `qout` output:
the last bit shifted out, which always equals the multiplier's sign bit. The
top level does not bring it out.

## Where this design follows the paper and where it fills gaps

These parts follow the paper:

* the radix-4 encoding table;
* the row layout with one negation bit per row;
* the MP/LP cut at weight 2^(L-1), with LPmajor as the top LP column;
* the MP adder built from rows of 4-2 compressors and a final carry-propagate
  adder, with constant ones and inverted sign bits instead of sign extension;
* the form σ = CE[S_LPmajor + CA[S_LPminor]];
* the default width L = 8;
* the radix-2 array's structure: a chain of Booth steps, each with an XOR-row
  adder/subtractor built from full adders, and the signal names and worked
  example above.

These are this design's own choices:

* **Feeding the compressor array.** The cell types are given: 4-2
  compressors, full adders, a final carry-propagate adder, constant ones and
  inverted sign bits. The order in which words enter the compressor rows,
  the sign constant and the construction of each 4-2 cell belong to this
  design.
* **Exact-column sum.** The sum of the exact LP columns that feeds σ is
  written as plain arithmetic; for `W_COL = 1` it is a 5-input population
  count.
* **Compensation rule.** The CA estimator, the rounding and the proof that
  every nonzero row contributes half an LPmajor unit on average. The
  `W_COL` generalisation is also this design's.
* **Zero digits.** For code 111 the negation flag is forced low, so a zero
  digit gives an all-zero row.
* **Overflow-safe shift** in the radix-2 stage.
* **No clock or pipelining.** None is specified; both multipliers are purely
  combinational.
* **Separate operands.** The two multipliers do not share inputs.

The paper's evaluation uses an 8×8 radix-2 multiplier with a 16-bit product.
That is the array multiplier here. The prose and the accuracy table describe the
fixed-width compensated multiplier. The two are therefore provided together
rather than merged.

## Simulation

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/fwbm_pkg.sv tb/fwbm_top_tb.sv --top-module fwbm_top_tb
./obj_dir/Vfwbm_top_tb
```

Replace `fwbm_top_tb` with any other `*_tb` to test one module.

| testbench | what it covers |
|---|---|
| `fwbm_top_tb` | Top level at L = 8, every operand pair: exact full products; fixed-width error ≤ 1 LSB; mean error better than truncating the exact product. It counts, and requires, every Booth digit value, σ = 0..3, a nonzero LPminor estimate, add/subtract/pass steps, accumulator overflow and the wrapping corner. |
| `fw_booth_mult_tb` | L = 8 with W_COL = 1, 2, 3 and L = 4 with W_COL = 1, 2, every pair, against an integer model of the array and σ. Prints the accuracy table. Checks that more exact columns never increase the mean error. |
| `booth_multiplier_tb` | The worked example stage by stage, then all 65 536 pairs. |
| `booth_substep_tb` | Corner and random stages against an integer Booth step. |
| `add_sub_tb`, `fa_tb` | Exhaustive checks. |
| `booth_encoder_tb`, `pp_row_gen_tb`, `comp_bias_tb`, `compressor42_tb` | Exhaustive checks. |
| `csa42_row_tb`, `mp_csa_array_tb` | Random words or rows against integer sums (L = 8 and L = 4 for the array). |

Every testbench finishes in well under a second.

## Changing the width

`L` (`fwbm_top`, `fw_booth_mult`, `pp_row_gen`, `comp_bias`) must be even and
at least 4. `fw_booth_mult` stops elaboration with an error otherwise. The
CA rule holds for any even L without change. σ is `$clog2(L)+1` bits wide.
`W_COL` must lie in 1 .. L-2; elaboration stops with an error otherwise.
`N` (`booth_multiplier`, `booth_substep`, `add_sub`) can be any width of 2 or
more. The ripple chains grow linearly with N, so the array multiplier's delay
grows as N².
