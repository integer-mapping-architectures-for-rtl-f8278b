# Polynomial Ring Engine: integer mapping datapath

This design computes complex integer inner products, `y = sum_n x_n * h_n`,
without a single binary multiplier. Each complex sample is rewritten as a
polynomial in two indeterminates: `X` stands for the binary weight 2 and `Y`
for the imaginary unit `j`. The polynomial is evaluated at a handful of small
roots modulo 3, 5 and 7. That splits one complex multiply-accumulate into 27
independent channels, and each channel does only 3-bit modular arithmetic.
At the end of a block, the channel results are turned back into polynomial
coefficients, the coefficients are rebuilt from their residues (Chinese
Remainder Theorem), and `X = 2`, `Y = j` are substituted to give the binary
complex result.

Almost all of the arithmetic is done by one kind of cell: a pipelined block
with 6 inputs and 3 outputs. It takes two 3-bit residues and returns a 3-bit
residue from a 64-entry table. Binary adders appear only in the last row of
the CRT and in the output converter.

The configuration built here is the one the architecture is presented with:

| quantity | value |
|---|---|
| moduli | 3, 5, 7 (product 105) |
| roots per indeterminate | -1, 0, +1 |
| channels | 3 moduli x 9 root pairs = 27 |
| input | complex, real and imaginary parts unsigned 0..3 |
| exact block length | up to 26 products |
| output range (exact) | real -234..234, imaginary 0..468 |
| throughput | one sample pair per clock |
| latency | 13 clocks from the last pair of a block to the result |

## From bits to polynomials

The sample `x = (a00 + 2*a10) + j*(a01 + 2*a11)` becomes

    A(X, Y) = a00 + a10*X + a01*Y + a11*X*Y

with one bit per coefficient. This is pure wiring. The coefficients are
already smaller than every modulus, so "reducing them modulo m" costs
nothing. The polynomial has degree 1 in each indeterminate. The product of
two such polynomials has degree 2 in each, which gives 9 coefficients
`C[i][k]` of `X^i Y^k`. Summing products over a block does not raise the
degree.

## The polynomial map, the hardest part

Take a polynomial of degree at most 2 in `T`, `c0 + c1*T + c2*T^2`. Its three
values at `T = -1, 0, +1` determine it completely, provided the differences
between the roots are invertible modulo `m`. Here the differences are 1 and
2, and both are invertible modulo 3, 5 and 7. The evaluation matrix and its
inverse are

    [v(-1)]   [1 -1 1] [c0]          c0 = v(0)
    [v( 0)] = [1  0 0] [c1]          c1 = (v(+1) - v(-1)) / 2
    [v(+1)]   [1  1 1] [c2]          c2 = (v(+1) + v(-1)) / 2 - v(0)

where `/2` means multiplication by the inverse of 2 modulo `m` (2, 3 and 4
for m = 3, 5 and 7). With two indeterminates, the 9x9 evaluation matrix is
the tensor (Kronecker) product of this 3x3 matrix with itself. That is why
the hardware does it one indeterminate at a time:

* **Forward map (`pre_fwd_map`, one per modulus and operand).** Stage 1
  evaluates along `X`: `P_k(x) = a0k + x*a1k` for `k = 0, 1`. Stage 2
  evaluates along `Y`: `v(x,y) = P_0(x) + y*P_1(x)`. Evaluating at +1 or -1
  takes one weighted modulo adder, with weights `1` and `1` or `m-1`.
  Evaluating at 0 takes only a pipeline register. Each stage is one clock,
  and the output is the 9 channel values `v[ix][iy]`.
* **Channel computation (`pre_channel_mac`, 27 instances).** Evaluation is a
  ring homomorphism, so the value of `x*h` at a root pair is the product of
  the values of `x` and `h` there, and likewise for sums. Each channel
  multiplies its two residues (a modulo multiplier block) and accumulates
  (a modulo adder block whose register is the accumulator). No channel ever
  talks to another one.
* **Reverse map (`pre_rev_map`, one per modulus).** This is the inverse
  above, applied first along `Y` and then along `X`. Each 1-D inversion
  (`pre_inv3`) takes two rows of blocks. Row 1 forms `c1` and the half-sum
  `t = (v(+1)+v(-1))/2`. Row 2 forms `c2 = t - v(0)`. The forward map only
  needs the simpler 2-coefficient evaluation. The reverse map needs the full
  second-order inverse, because the result has degree 2.

The channel index convention throughout is `v[ix][iy]`, where root index 0,
1, 2 means -1, 0, +1. Coefficients are `c[i][k]` for `X^i Y^k`.

## Rebuilding coefficients: mixed-radix CRT

Each of the 9 coefficients now exists as three residues, one each modulo 3,
5 and 7. `pre_crt` rebuilds the integer `0 <= C < 105` with mixed-radix
digits:

    d1 = r3
    d2 = (r5 - d1) * 3^-1 mod 5        = 2*r5 + 3*d1  mod 5
    d3 = ((r7 - d1)*3^-1 - d2) * 5^-1  mod 7
    C  = d1 + 3*d2 + 15*d3

Every digit step is a weighted modulo adder. The blocks read their operands
as plain integers 0..7, so a digit of one modulus can feed a block of
another. The last row is a small binary adder. There are 9 CRT units, one
per coefficient, and each takes three clocks.

The CRT returns the least non-negative residue. That equals the true
coefficient only while the coefficient is below 105. All coefficients here
are non-negative sums of bit products, so the condition is easy to state:
the `X*Y` coefficient gains at most 4 per product, and every other
coefficient at most 2. Blocks of up to 26 products are therefore always
exact (4 x 26 = 104). From 27 products on, the `X*Y` coefficient can wrap.
From 53 on, the others can wrap too. The engine does not detect wrapping;
it simply returns the result built from the wrapped coefficients. Longer
blocks are a trade between block length and overflow probability.

## Back to binary

`pre_poly2bin` applies `Y^2 = j^2 = -1` and `X = 2`:

    real = sum_i 2^i * (C[i][0] - C[i][2])
    imag = sum_i 2^i *  C[i][1]

Row 1 is three subtractors. They separate the `j^2` terms from the real
coefficients, and this is where the real part gets its sign bit. Row 2 is
two parallel shift adders, one per part. The outputs are 11-bit two's
complement. That is wide enough for any coefficients 0..104, so the output
stage never wraps even when a coefficient has. The top bit of `out_im` is
always 0.

## The 6-input block

`pre_lut6` is the only computing primitive below the CRT. It is a switching
tree: a binary decision tree over the six input bits, with the 64 table
entries at its leaves, followed by the output register. The parameter
`ORDER` sets which input bit each tree level tests, output node first.
Changing it changes the tree's shape but not its function. Merging equal
subtrees is left to synthesis. The tables are never stored as data. They are
computed at elaboration by the functions in `pre_pkg`:

* `wmod_table(m, wa, wb)`: entry `{a,b}` = `(wa*a + wb*b) mod m`, which is
  the weighted modulo adder `pre_wmod_add`;
* `mult_table(m)`: entry `{a,b}` = `(a*b) mod m`, which is the modulo
  multiplier `pre_mod_mult`. Its tree tests the inputs in the order B2, B1,
  A2, A1, A0, B0, the order of the published mod 7 multiplier tree. That
  cell, with its table and order, is also the default of `pre_lut6`.

The original cell is a dynamic CMOS circuit: an n-channel tree inside a
true single-phase clocked latch. Here it is modelled only as its logic
function plus one edge-triggered register. One clock per block is the
pipeline rhythm of the whole design.

## Top level: `pre_engine`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid/marker registers |
| `in_valid` | in | 1 | a sample pair is presented this cycle |
| `in_first`, `in_last` | in | 1 | first / last pair of a block (both high for a 1-pair block); looked at only with `in_valid` |
| `x_re`, `x_im`, `h_re`, `h_im` | in | 2 each | the two complex operands, unsigned 0..3 |
| `out_valid` | out | 1 | one-cycle pulse per block |
| `out_re`, `out_im` | out | 11 signed | the block's inner product |

Parameters `MOD1`, `MOD2`, `MOD3` (default 3, 5, 7) set the moduli. They
must be pairwise coprime, each at most 7, with a product of at most 128;
`pre_crt` asserts this. Root residues and inverses are derived from them.

Pipeline, in clocks: forward map 2, multiply 1 + accumulate 1, reverse map
4, CRT 3, output 2. That makes `out_valid` arrive 13 clocks after the cycle
that presented the last pair of the block. Blocks may follow each other
without a gap, and idle cycles (`in_valid` low) may appear anywhere. There
is no back-pressure: the design is a free-running pipeline with a valid bit
alongside the data. Data registers have no reset. Their contents are only
read under a valid bit. Two assertions check that the three modulus
pipelines stay in step and that every block starts with `in_first`.

Hierarchy:

    pre_engine
    ├─ pre_fwd_map  x 6   (operands x, h; moduli 3, 5, 7)   ─ pre_wmod_add ─ pre_lut6
    ├─ pre_channel_mac x 27                                 ─ pre_mod_mult, pre_wmod_add
    ├─ pre_rev_map  x 3   ─ pre_inv3 x 6                    ─ pre_wmod_add
    ├─ pre_crt      x 9                                     ─ pre_wmod_add
    └─ pre_poly2bin
    pre_pkg: residue type, table type, latencies, table and inverse functions

## What follows the source architecture, and what is chosen here

These follow the published architecture: the moduli {3,5,7}; the roots
{-1,0,+1} for both indeterminates; 9 channels per modulus; the
one-stage-per-indeterminate forward and reverse maps built from weighted
modulo adders; the mixed-radix CRT from 6-input blocks; the subtractor row
that applies `j^2 = -1`; the parallel shift adders; and the mod 7
multiplier's tree order.

These are this design's own choices:

* The channel computation. The architecture leaves its inside open; the
  example it is shown with even omits it. It is built here as the simplest
  inner-product cell: a multiply, then an accumulate.
  A conversion-only run (forward map straight into the reverse map) is
  the same as one-pair blocks with `h = 1`.
* The exact pipeline depths.
* The block framing, the valid bits and the reset.
* The clock enable on the 6-input block, used only by the accumulator.
* The output width.
* The order of the two stages in each map.
* The mixed-radix digit order.

Input parts are read as unsigned 2-bit numbers. A variant with signed-digit
inputs, or with 2-bit coefficients per indeterminate (input range 0..7,
exact only up to 5 products), would need a different binary-to-polynomial
wiring and is not built. A variant that uses the roots of `T^2 + 1` modulo
5 for `Y` (6 channels instead of 9 for that modulus) is not built either.

The transistor-level cell, its layout and its area, speed and power figures
are outside the RTL.

## Simulating

Each module has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/pre_pkg.sv \
        tb/tb_pre_engine.sv --top-module tb_pre_engine -Mdir obj
    ./obj/Vtb_pre_engine

Replace `tb_pre_engine` with any other testbench name. The package file
goes first; the other modules are found through `-I` (Verilator searches
the include path for `<module>.sv`).

* `tb_pre_engine` runs the whole engine at its default parameters. It uses
  about 180 random and directed blocks: one-pair blocks; 26-pair blocks at
  the extremes of the range (real +234, real -234, imaginary 468); negative
  results; back-to-back blocks; idle cycles inside blocks; and blocks whose
  `X*Y` coefficient wraps. Each result is checked against two models. One is
  the plain complex sum of products. The other sums the coefficients, wraps
  each modulo 105 and then applies `X = 2, Y = j`. The latency is checked
  to the clock. The testbench fails if any of the listed situations never
  occurred.
* `tb_pre_workload_blocklen` runs random inner products of length 26, 27,
  52, 53 and 70..150. It reports how many blocks wrapped and in which
  coefficient, and checks that none wrapped at 26 and that only `X*Y`
  wrapped up to 52. With uniformly random input bits, the `X*Y` coefficient
  grows by 1 per product on average. Wrapping therefore starts to show from
  about 100 products. The probability depends strongly on the input
  distribution.
* The block testbenches check every input combination of the 6-input
  blocks, and all 16 input patterns of the forward map against direct
  evaluation. They check random coefficient sets through the reverse map
  against evaluation done in the testbench, and all 105 values through the
  CRT. The output converter gets random and extreme coefficient sets, and
  the channel cell gets random blocks with idle cycles. Each testbench also
  checks its block's latency.

All testbenches pass. Each was also run against a deliberately broken copy
of its module, and each one caught it.
