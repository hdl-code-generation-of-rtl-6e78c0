# Multiplier-free 4- and 8-point DCT

This is a one-dimensional discrete cosine transform (DCT) with no multipliers.
Every product of a sample with a DCT coefficient is a sum of left-shifted
copies of the sample. For example, 84·d is `(d<<<6) + (d<<<4) + (d<<<2)`.
The transform matrix is also split along its row symmetries, so that each
larger transform is built from the next smaller one. The outcome is a small,
purely combinational datapath: adders, subtractors and wiring only, with no
registers, RAMs or multipliers.

The top level, `dct_top`, takes eight signed samples and a mode bit:

| `order8` | result |
|---|---|
| 1 | `y[0..7]` = 8-point DCT of `x[0..7]` |
| 0 | `y[0..3]` = 4-point DCT of `x[0..3]`, and `y[4..7]` = 4-point DCT of `x[4..7]` |

## The integer coefficients

The transform is the unscaled integer DCT. Every coefficient is scaled so
that the DC row is exactly 64, a plain 6-bit shift:

    C(k,n) = 64                                           k = 0
    C(k,n) = round(64·√2·cos((2n+1)·k·π / 2N))            k > 0

For N = 4 this gives the matrix

    [ 64  64  64  64 ]
    [ 84  35 -35 -84 ]
    [ 64 -64 -64  64 ]
    [ 35 -84  84 -35 ]

For N = 8 the odd rows add the magnitudes 89, 75, 50 and 18. The even rows of
the 8-point matrix are the 4-point matrix above.

The `a(u)` normalisation of the textbook DCT (√(1/N) for u = 0, √(2/N)
otherwise) is **not** applied. Every output is 64·√N times the orthonormal
DCT, apart from the rounding of the coefficients: 128 for N = 4 and about 181
for N = 8. A quantiser or the next stage is expected to absorb this factor.

The coefficients are close to those of HEVC's core transform, but not equal:
84/35 here against 83/36 there. This design is not bit-exact with HEVC.

Each constant is written as a sum of powers of two:

| constant | shift-add form | adds |
|---|---|---|
| 64 | `d<<<6` | 0 |
| 84 | `(d<<<6) + (d<<<4) + (d<<<2)` | 2 |
| 35 | `(d<<<5) + (d<<<1) + d` | 2 |
| 89 | `(d<<<6) + (d<<<4) + (d<<<3) + d` | 3 |
| 75 | `(d<<<6) + (d<<<3) + (d<<<1) + d` | 3 |
| 50 | `(d<<<5) + (d<<<4) + (d<<<1)` | 2 |
| 18 | `(d<<<4) + (d<<<1)` | 1 |

## Even/odd decomposition: how the blocks nest

The rows of a DCT matrix alternate between two kinds:

- **Even symmetric rows.** Entry n equals entry N−1−n. These rows only see the
  butterfly sums `s_k = x_k + x_(N-1-k)`. On those sums, the even rows of the
  N-point matrix are exactly the N/2-point DCT.
- **Odd symmetric rows.** Entry n equals minus entry N−1−n. These rows only see
  the differences `e_k = x_k − x_(N-1-k)`, and they need a dedicated block.

This gives the hierarchy:

```
dct_top
├── dct8                      (order8 = 1)
│   ├── butterfly sums s_k = x_k + x_(7-k)
│   ├── dct4  on s_0..s_3  ->  Y0 Y2 Y4 Y6
│   │   ├── dct2     on x0+x3, x1+x2  ->  Y0 Y2   (64·(a±b), shifts only)
│   │   └── dct4_odd on x0-x3, x1-x2  ->  Y1 Y3
│   └── dct8_odd on e_k = x_k - x_(7-k)  ->  Y1 Y3 Y5 Y7
├── dct4  on x[0..3]          (order8 = 0)
└── dct4  on x[4..7]          (order8 = 0)
```

The odd halves hold all the shift-add constant products:

```
dct4_odd:   Y1 = 84·d1 + 35·d2          d1 = x0 − x3
            Y3 = 35·d1 − 84·d2          d2 = x1 − x2

dct8_odd:   Y1 = 89e0 + 75e1 + 50e2 + 18e3
            Y3 = 75e0 − 18e1 − 89e2 − 50e3
            Y5 = 50e0 − 89e1 + 18e2 + 75e3
            Y7 = 18e0 − 50e1 + 75e2 − 89e3
```

All outputs are in natural order, Y0 first.

`dct_top` computes the 8-point transform and the two 4-point transforms side
by side, and a multiplexer picks one set of results. The mode bit can change
on every input set. The multiplexer is the only logic in the design that is
not an adder.

## Word widths

No block rounds, truncates or saturates. Each block grows its word by the
largest gain any row can apply, which is `dct_pkg::grow(N) = 6 + log2(N)`
bits:

| block | input | output | worst case |
|---|---|---|---|
| `dct2` | IN_W (17 by default) | IN_W+7 | 64·2 |
| `dct4`, `dct4_odd` | IN_W (16) | IN_W+8 (24) | 64·4 = 256 > 84+35 |
| `dct8`, `dct8_odd`, `dct_top` | IN_W (16) | IN_W+9 (25) | 64·8 = 512 > 89+75+50+18 |

Inside `dct4` and `dct8`, the even half receives the (IN_W+1)-bit butterfly
sums. Its output width therefore lines up with the odd half's without
extension. In 4-point mode `dct_top` sign-extends the 24-bit results to the
common 25-bit port.

The low 6 bits of the `dct2` outputs, and so of the DC and the middle even
coefficient of `dct4` and `dct8`, are always zero, because those rows are pure
×64. They are kept so that all outputs share one scale. A user who wants a
narrower datapath can drop them at the even outputs.

## Timing

All blocks are combinational, with no clock, reset or handshake. A result is
valid as soon as the adder trees settle after the inputs change. Latency is
zero cycles, and a new input set can be applied every cycle of any clock put
around the block. The critical path of `dct_top` runs through the butterfly,
a shift-add constant product (up to four terms) and a four-term output sum,
then the mode multiplexer. To pipeline the design, put registers between the
butterfly, product and output-sum stages. None are there now.

## Where this design departs from its source description

The source design is a set of generated shift-add functions. The main ones
are the odd half of the 4-point transform and an 8-point transform, and it
reports their adder counts. This RTL follows its matrix, its symmetry
argument and its 4-point odd-half equations exactly. It also makes the
following choices of its own:

- **8-point coefficients and their shift-add forms.** Only the 4-point odd
  constants (84 = 64+16+4 and 35 = 32+2+1) are given. 89, 75, 50 and 18 follow
  from the same scaling rule. Their decompositions are this design's.
- **Even half.** The source argues that the even outputs follow directly from
  the even symmetry, but does not spell them out. Here they are built as the
  half-size DCT of the butterfly sums.
- **Full precision.** The reference computation works on 16-bit integers and
  would saturate on large inputs. This RTL widens the outputs instead, and the
  end-to-end test counts the many results that need more than 16 bits.
- **Adder count.** The source's generated netlists report 7 adders/subtractors
  for the 4-point odd half and 18 for the 8-point transform. Those netlists
  list adders only 2 to 16 bits wide, so their word widths were probably
  narrowed to the range of some test data. Written out in full, this RTL uses:
  - `dct4_odd`: 12 operations (2 differences, 8 adds inside the four
    constant products, 2 output sums)
  - `dct4`: 16
  - `dct8_odd`: 52
  - `dct8`: 72

  Synthesis may merge many of these into multi-operand adders. Sharing partial
  sums between constants, such as 73·e inside both 89·e and 75·e, would cut the
  count further. That is left undone so that each constant stays readable.
- **Order selection.** The source describes a function that first checks the
  transform order. Here that check is the run-time input `order8`. In 4-point
  mode the design runs two 4-point transforms so that all eight lanes are
  used.
- **Not included: the 2D transform.** A 2D DCT runs 1D transforms over the rows
  and then the columns of a block. This design provides the 1D units only. It
  has no transpose storage, and does not define the intermediate word width or
  the scan order that a 2D unit would need. Two passes of `dct8` through an
  8×8 transpose buffer would build one. The intermediate words would then be
  25 bits, and the second pass needs `IN_W = 25`.

## Files

| file | content |
|---|---|
| `rtl/dct_pkg.sv` | default sample width and the `grow(N)` width rule |
| `rtl/dct2.sv` | 2-point DCT, 64·(a±b) |
| `rtl/dct4_odd.sv` | odd rows of the 4-point DCT (84/35) |
| `rtl/dct4.sv` | 4-point DCT = sums → `dct2`, differences → `dct4_odd` |
| `rtl/dct8_odd.sv` | odd rows of the 8-point DCT (89/75/50/18) |
| `rtl/dct8.sv` | 8-point DCT = sums → `dct4`, differences → `dct8_odd` |
| `rtl/dct_top.sv` | order select: one 8-point or two 4-point transforms |
| `tb/dct_ref_pkg.sv` | reference integer DCT computed from the cosine definition |
| `tb/tb_*.sv` | one self-checking testbench per module |

Every module has one parameter, `IN_W`, the signed sample width (default 16).
Changing it rescales all widths.

## Verification

Each testbench computes its expected outputs from the cosine definition in
`tb/dct_ref_pkg.sv`, rounding `64·√2·cos(...)` at run time. They never reuse
the RTL's shift-add constants, so a wrong shift or sign in the RTL shows up as
a mismatch. The stimulus includes:

- all-zero vectors
- unit impulses on every input
- all-maximum and all-minimum vectors
- alternating maximum/minimum patterns
- thousands of random vectors, a quarter of whose samples are full-scale

All checks are exact. The block tests check each result in the cycle its
inputs are applied, which confirms zero latency.

`tb_dct_top` runs the top at its default size, with a random order per
vector. It also requires each of the following to occur at least once, and
fails if one never does:

- 8-point transforms
- 4-point transform pairs
- switches between the two orders
- results wider than 16 bits

Each testbench ends with a line `TB_RESULT checks=N failures=M`, and a
watchdog ends it as failed if it runs away.

To simulate with Verilator 5, for example the top-level test:

```
verilator --binary --timing -y rtl -y tb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_top.sv --top-module tb_dct_top
./obj_dir/Vtb_dct_top
```

Replace `tb_dct_top` with `tb_dct2`, `tb_dct4_odd`, `tb_dct4`, `tb_dct8_odd`
or `tb_dct8` to test a single block. A lint-only run of the RTL is
`verilator --lint-only -Wall -y rtl rtl/dct_pkg.sv rtl/dct_top.sv`.
