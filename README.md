# 8-point FFT on Booth-encoded Wallace tree multipliers

This design computes the 8-point discrete Fourier transform of eight real
samples in integer arithmetic. It is aimed at short biomedical records such as
EEG windows. There is no floating point. Samples and the twiddle factor
cos(pi/4) are power-of-ten scaled integers. Every multiplication goes through
a hybrid multiplier: radix-2 Booth recoding produces the partial products, a
Wallace tree of 3:2 compressors reduces them to two rows, and a carry
look-ahead adder adds those two rows.

The whole circuit is combinational. There is no clock, reset or handshake:
eight samples and two coefficients go in, and sixteen numbers come out (the
real and imaginary parts of bins X0..X7).

## Number format: why there is a `k` input

The transform needs the twiddle factors 1, -j, (1-j)/sqrt2 and -(1+j)/sqrt2.
Only 1/sqrt2 is irrational. The circuit takes two coefficient inputs:

| input | meaning | default used in the testbenches |
|---|---|---|
| `k`  | the scaling factor, a power of ten | 10000 |
| `wr` | round(k * cos(pi/4)) | 7071 |

A fixed-point design would normally multiply by `wr` and then divide by `k`.
This design avoids the divider. Every branch whose twiddle is 1 or -j is
multiplied by `k`, and the two 1/sqrt2 branches are multiplied by `wr`. So all
terms that meet in an adder carry the same scale, and each output is

    x_re[m] + j*x_im[m] = k * DFT(x)[m]        (with 1/sqrt2 replaced by wr/k)

exactly, with no rounding inside the circuit. To get the spectrum in volts,
divide an output by `k` and by the scale of the samples. For example, samples
in volts times 10000 and k = 10000 give outputs in units of 1e-8 V.

The only approximation is wr/k standing in for 1/sqrt2, so `k` sets the
accuracy. The end-to-end testbench measures the worst bin error relative to
the largest bin of the same vector:

| k | wr | worst error |
|---|---|---|
| 10 | 7 | 1.0 % |
| 100 | 71 | 0.41 % |
| 1000 | 707 | 0.015 % |
| 10000 | 7071 | 0.001 % |

With the default `COEF_W = 16`, `k` can be at most 32767 (signed). A factor of
100000 needs `COEF_W >= 18`.

## FFT dataflow (`rtl/fft8.sv`)

This is a radix-2 decimation-in-time transform with three butterfly stages. The
even samples (x0, x2, x4, x6) give a 4-point DFT E, and the odd samples give O.

1. **Stage 1.** Sums and differences of the pairs (x0,x4), (x2,x6), (x1,x5)
   and (x3,x7).
2. **Stage 2.** E0 = s0e + s1e, E2 = s0e - s1e, E1 = d0e - j*d1e, and the same
   for O. The -j twiddle is only a swap of real and imaginary parts plus a
   sign, so it needs no multiplier.
3. **Products.** Eight `booth_wallace_mult` instances compute:
   - k*E0, k*E2, k*d0e, k*d1e, k*O0 and k*O2;
   - wr*(a-b) and wr*(a+b), where O1 = a - j*b.

   The last two products cover both irrational twiddles:
   - W^1*O1 = wr*(a-b) - j*wr*(a+b)
   - W^3*O3 = -wr*(a-b) - j*wr*(a+b)
4. **Stage 3.** X[m] = E[m] + W^m*O[m] and X[m+4] = E[m] - W^m*O[m].

Real inputs give E3 = conj(E1) and O3 = conj(O1). This is why eight real
multipliers are enough. It also means that `x_im[0]` and `x_im[4]` are always
zero, and that bins 5..7 are the complex conjugates of bins 3..1. A
synthesis tool reports those two outputs as constant. The circuit is only
correct for real inputs. It has no imaginary sample inputs.

Widths grow by one bit per butterfly stage, so nothing can overflow:

- samples: `DATA_W` (16) bits;
- multiplicands: `DATA_W+2` bits;
- products: `DATA_W+2+COEF_W` bits;
- outputs: `OUT_W = DATA_W+COEF_W+3` (35) bits, signed.

The all-most-negative input vector is tested.

## The multiplier (`rtl/booth_wallace_mult.sv`)

`prod = md * mr`. It treats the operands as two's complement numbers when
`signed_mode = 1` and as unsigned numbers when it is 0. The datapath has five
blocks:

- **`twos_complement_gen`** forms -MD. It inverts MD and adds one through a
  ripple chain of half adders.
- **`booth_encoder`** recodes every multiplier bit with its right neighbour
  (MR[-1] = 0):

  | MR[i] MR[i-1] | digit | x (negate) | z (non-zero) | row |
  |---|---|---|---|---|
  | 0 0 | 0 | 0 | 0 | 0 |
  | 0 1 | +1 | 0 | 1 | +MD |
  | 1 0 | -1 | 1 | 1 | -MD |
  | 1 1 | 0 | 0 | 0 | 0 |

  This gives z = MR[i] xor MR[i-1] and x = MR[i] and not MR[i-1]. The
  encoding is radix-2, with one row per multiplier bit. Runs of ones cost
  only two non-zero rows, but the number of rows is not halved as it is in
  radix-4 (modified) Booth.
- **`partial_product_gen`** selects 0, MD or -MD for each row. It
  sign-extends the row to the full product width and shifts it left by the
  row index.
- **`wallace_tree`** reduces the rows in layers. Within a layer, rows are
  taken three at a time into a `csa_3to2`: one full adder per bit, which
  gives a sum row and a shifted carry row. One or two left-over rows pass
  through unchanged. A layer turns n rows into 2*floor(n/3) + n mod 3. The
  17 rows of the FFT multipliers need 6 layers.
- **`cla_adder`** adds the final two rows. It is built from 4-bit look-ahead
  slices (`cla4`), with the slice carries chained from one slice to the next.

Unsigned mode works by widening both operands by one bit. The new top bit is
the sign bit in signed mode and 0 in unsigned mode. So one signed datapath
handles both modes, at the cost of one extra Booth row and one extra
multiplicand bit. This also makes -MD exist for the most negative
multiplicand. The product is exact in `MD_W+MR_W` bits in both modes.

The FFT uses 18 x 16 multipliers: the data word is the multiplicand and `k` or
`wr` is recoded. On their own, the defaults are 4 x 4.

## Interfaces

| module | ports | timing |
|---|---|---|
| `fft8 #(DATA_W=16, COEF_W=16)` | in: `x[8]`, `wr`, `k`; out: `x_re[8]`, `x_im[8]` | combinational |
| `booth_wallace_mult #(MD_W=4, MR_W=4)` | in: `signed_mode`, `md`, `mr`; out: `prod` | combinational |
| `twos_complement_gen #(W)` | in: `md`; out: `md_neg` | combinational |
| `booth_encoder #(N)` | in: `mr`; out: `x`, `z` | combinational |
| `partial_product_gen #(MD_W, N, P_W)` | in: `md`, `md_neg`, `x`, `z`; out: `pp[N]` | combinational |
| `wallace_tree #(N, W)` | in: `rows[N]`; out: `sum_row`, `carry_row` | combinational |
| `cla_adder #(W)` | in: `a`, `b`, `cin`; out: `sum`, `cout` | combinational |

`fft_pkg` holds the transform size and the default widths and coefficients.
The helper modules `csa_3to2` and `cla4` are the compressor row and the adder
slice. After coarse synthesis, `fft8` is about 3200 word-level cells and has
no flip-flops.

Timing is not modelled. If the circuit runs at a clock rate, register the
inputs and outputs around it. The longest path runs through two butterfly
stages, a 6-layer compressor tree, a 34-bit chained-slice adder and one more
adder.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_twos_complement_gen`, `tb_booth_encoder`: exhaustive. The encoder test
  also checks that the weighted digits sum to the signed multiplier value.
- `tb_partial_product_gen`: every multiplicand with every select pattern.
- `tb_wallace_tree`: trees of 1, 2, 3, 5, 9 and 17 rows with random rows.
- `tb_cla_adder`: an exhaustive 8-bit adder, and a 35-bit adder (not a
  multiple of four) with random operands and the full carry chain.
- `tb_booth_wallace_mult`: 4x4 and 7x5 exhaustively, and 18x16 with random
  and corner operands, in both modes.
- `tb_fft8`: runs the top at its default parameters. It compares all sixteen
  outputs exactly against a direct DFT with an integer twiddle table. That
  reference does not use the butterfly structure. The stimuli are impulses,
  DC, alternating and tone inputs, full-scale vectors, a synthetic slow wave
  and random vectors, for k = 10, 100, 1000 and 10000. The test also checks
  the accuracy table above. It requires each of these to happen at least
  once: negative samples, non-zero `wr` products, the -j swap, and
  full-scale DC growth.

To run one testbench with Verilator 5:

    verilator --binary --timing -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft8.sv \
              --top-module tb_fft8 -Mdir obj_tb_fft8
    ./obj_tb_fft8/Vtb_fft8

Replace `tb_fft8` with any other testbench name. Each run takes well under a
second.

## What is taken as given, and what is chosen here

These parts follow the reference architecture:

- eight real samples, with `wr` and `k` as inputs;
- power-of-ten scaling, with a four-decimal twiddle (7071);
- separate real and imaginary outputs;
- the five-block multiplier: a negator built as inverter plus ripple
  increment, a Booth encoder following the table above, a row generator, a
  Wallace tree, and a carry look-ahead final adder.

These are this design's own choices:

- **Decimation in time.** Decimation in frequency would give the same
  results.
- **Scaling by k.** All non-irrational branches are multiplied by `k` instead
  of dividing by `k`. As a result, outputs carry the factor `k`.
- **Real-input symmetry.** It is used to get by with eight multipliers.
- **Word widths.** 16-bit samples and coefficients, with lossless growth.
- **Radix-2 recoding.** This follows the encoding table. Radix-4 "modified
  Booth" would halve the number of rows, but is not used.
- **3:2 compressors only,** working on whole rows. No 4:2 compressors or
  column-wise Dadda/Wallace bit scheduling.
- **4-bit look-ahead slices** with chained slice carries, in place of a
  multi-level look-ahead tree.
- **Unsigned multiplication** by one-bit operand widening.
- **No pipeline registers.**

Not included:

- standalone Booth and Wallace multipliers used only as points of comparison;
- the software that chooses the EEG samples and reads the bands;
- any area or power figures, which depend on a cell library.

Changing `DATA_W` or `COEF_W` resizes everything consistently. Changing the
transform size would need a new butterfly network, because the dataflow is
written out for eight points.
