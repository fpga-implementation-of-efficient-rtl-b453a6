# 16-point FFT as two concurrent 8-point FFTs

OFDM transceivers spend much of their hardware on the FFT. This design computes
a 16-point FFT by splitting the input into its even and odd samples and
transforming the two halves **at the same time** with two different 8-point
engines: a decimation-in-time (DIT) FFT for the even half and a
decimation-in-frequency (DIF) FFT for the odd half. A final rank of eight
radix-2 butterflies merges the two 8-point spectra into the 16-point spectrum.
The whole transform is one parallel, combinational datapath between an input
register and an output register, so a new set of 16 samples can be accepted
every clock cycle.

Samples enter and leave as 8-bit two's complement integers.

## The decomposition

With x(n), n = 0..15, the 16-point DFT splits into two 8-point DFTs:

```
E(k) = DFT8{ x(0), x(2), ..., x(14) }          (even samples)
O(k) = DFT8{ x(1), x(3), ..., x(15) }          (odd samples)

X(k)     = E(k) + W16^k * O(k)
X(k + 8) = E(k) - W16^k * O(k)        k = 0..7,   W_N^k = exp(-j*2*pi*k/N)
```

```
 x(0),x(2),..,x(14) ──► fft8_dit ── E(0..7) ──┐
                                             ├──► combine8 ──► X(0..15)
 x(1),x(3),..,x(15) ──► fft8_dif ── O(0..7) ──┘   (8 butterflies, W16^k)
```

Each 8-point engine has 12 radix-2 butterflies in 3 stages of 4; the
combiner has 8. That is 32 butterflies in all.

## The two 8-point engines

Both engines compute the same thing, an 8-point DFT with natural-order input
and natural-order output. They differ in where the twiddle factor sits in the
butterfly and in which stage the nontrivial twiddles appear.

**DIT butterfly (`bf2_dit`).** The twiddle multiplies the second input first:

```
o1 = a + c*W        o2 = a - c*W
```

**DIF butterfly (`bf2_dif`).** The twiddle multiplies the difference afterwards:

```
o1 = a + c          o2 = (a - c)*W
```

Twiddles per stage (`fft8_stage` builds one stage, SPAN is the distance
between the two inputs of a butterfly):

| stage | `fft8_dit` (even half)         | `fft8_dif` (odd half)          |
|-------|--------------------------------|--------------------------------|
| 1     | span 1: W8^0                   | span 4: W8^0, W8^1, W8^2, W8^3 |
| 2     | span 2: W8^0, W8^2             | span 2: W8^0, W8^2             |
| 3     | span 4: W8^0, W8^1, W8^2, W8^3 | span 1: W8^0                   |

W8^0 = 1 and W8^2 = -j need no multiplier: they are wiring and a negation.
Only W8^1 = 0.7071 - 0.7071j and W8^3 = -0.7071 - 0.7071j need real
multipliers, two butterflies per engine.

The DIT flow graph expects its input in bit-reversed order (0, 4, 2, 6, 1, 5,
3, 7); the DIF flow graph produces its output in that order. In a parallel
datapath both reorderings are only a permutation of wires, so `fft8_dit`
permutes its inputs and `fft8_dif` its outputs, and no reordering buffer is
needed.

## Twiddle multiplication

`twiddle_mul` multiplies by a constant W_N^K chosen by parameters. K = 0,
N/4, N/2 and 3N/4 (factors 1, -j, -1, +j) are exact swaps and negations. Any
other factor is four signed constant products with coefficients
round(cos(2*pi*K/N) * 2^10) and round(-sin(2*pi*K/N) * 2^10), summed at full
precision and rounded once, half up, back to the data scale. The coefficients
are computed at elaboration from `$cos`/`$sin` (`fft16_pkg::tw_re`,
`tw_im`), so there is no coefficient table to maintain.

In the default 16-point build, multipliers are needed for W8^1 and W8^3 in
each engine and for W16^1, 2, 3, 5, 6 and 7 in the combiner.

## Number format and accuracy

| where                         | format                                     |
|-------------------------------|--------------------------------------------|
| `in_re`, `in_im`              | 8-bit signed integers                      |
| everything between the registers | 17-bit signed, 4 fraction bits          |
| twiddle coefficients          | 12-bit signed, 10 fraction bits            |
| `out_re`, `out_im`            | 8-bit signed integers, rounded, saturated  |

The 17 bits are 8 for the sample, 5 for growth (a 16-point DFT of full-scale
complex samples can reach 16 * 128 * sqrt(2) ≈ 2896 per component, below
2^12), and 4 fraction bits that keep the twiddle rounding well below an
output LSB. Nothing overflows inside the datapath, so the butterflies do no
overflow checks. At the output, `round_sat` rounds each part half up and clips
it to -128..127. `out_sat` is high for a transform in which any part was
clipped.

Measured accuracy, against a double-precision DFT:
* each 8-point engine stays within 1.4 internal LSBs (0.09 of an output LSB);
* every 16-point output is within 1 output LSB of the exact, clipped value.

For the 16-point example input [0,1,4,2,6,4,2,1,0,0,7,5,3,2,4,1], the design
gives the expected result within 1 LSB per part:

```
[42, -2+1i, -16-5i, 6+5i, -8+2i, -4-8i, -2+5i, 1+1i,
 10, 1-1i, -2-5i, -4+8i, -8-2i, 6-5i, -16+5i, -2-1i]
```

The 8-bit output range is small for a 16-point transform. Full-scale random
inputs often exceed it, so widen `DATA_W` (input and output together), or
scale the input down, if that matters.

## Interface and timing (`fft16`)

| port        | dir | width  | meaning                                        |
|-------------|-----|--------|------------------------------------------------|
| `clk`       | in  | 1      | clock                                          |
| `rst_n`     | in  | 1      | asynchronous active-low reset (valid flags only) |
| `in_valid`  | in  | 1      | `in_re`/`in_im` hold a new set of 16 samples   |
| `in_re/im`  | in  | 8 × 16 | x(0)..x(15)                                    |
| `out_valid` | out | 1      | `out_re`/`out_im` hold a result                |
| `out_re/im` | out | 8 × 16 | X(0)..X(15), natural order                     |
| `out_sat`   | out | 1      | some part of this result was clipped           |

All 16 samples arrive in one cycle. The input register loads when `in_valid`
is high. The next cycle computes the transform through the combinational
datapath, and the output register loads it. So `out_valid` rises exactly 2
cycles after `in_valid`, once per transform. `in_valid` may be high every
cycle; there is no back-pressure. Reset clears the two valid flags, so a
transform that is in flight during reset is dropped. Data registers are not
reset.

The critical path runs through all four butterfly ranks (3 per engine, then
the combiner). That includes two constant-multiplier levels in the DIF path:
stage 1 and the combiner. If a faster clock is needed, the natural cut points
are the outputs of `fft8_dit`/`fft8_dif`.

Parameters of `fft16`: `DATA_W` (8) is the sample width at the ports,
`FRAC_W` (4) the internal fraction bits, and `TW_FRAC` (10) the coefficient
fraction bits. The internal width follows as `DATA_W + 5 + FRAC_W`. The
sub-blocks take the internal width `W` and `TW_FRAC` directly.

## What follows the published architecture, and what is this design's own

Taken from the architecture:
* the even/odd split;
* DIT on the even half and DIF on the odd half, concurrently;
* 12 butterflies in 3 stages per 8-point engine, with the stage twiddles in
  the table above;
* 8 combining butterflies;
* 8-bit two's complement inputs and outputs.

Own choices:
* **Twiddle W8^2.** Some listings of this architecture give W8^2 as -1. It is
  -j, and only -j reproduces the expected 16-point results, so -j is used.
* **Combiner twiddles W16^k.** These are not spelled out for the combining
  butterflies. The standard even/odd split is used, which reproduces the
  expected example result.
* **Number format.** Internal word width, fraction bits, coefficient
  precision, the rounding mode, output saturation and `out_sat`.
* **Interface.** Parallel I/O, input and output registers with a 2-cycle
  latency, the valid handshake and the reset behaviour.
* **Implementation details.** Trivial twiddles as wiring, and reordering as
  wire permutations.

The published implementation reports 616 slice registers on a Virtex-5 and
125 ns per transform. Synthesised generically, this RTL has 515 flip-flops:
2 × 16 × 16 data bits, plus valid bits and the flag. No clock rate is
targeted.

## Files

| file | content |
|------|---------|
| `rtl/fft16_pkg.sv`  | default widths, twiddle and bit-reverse functions |
| `rtl/fft16.sv`      | top: registers, even/odd split, engines, combiner, output rounding |
| `rtl/fft8_dit.sv`, `rtl/fft8_dif.sv` | 8-point engines (3 × `fft8_stage`) |
| `rtl/fft8_stage.sv` | one stage of 4 butterflies, DIT or DIF |
| `rtl/bf2_dit.sv`, `rtl/bf2_dif.sv` | radix-2 butterflies |
| `rtl/twiddle_mul.sv`| constant complex multiplier |
| `rtl/combine8.sv`   | 8 combining butterflies |
| `rtl/round_sat.sv`  | round half up and saturate |
| `tb/tb_dft_pkg.sv`  | reference DFT and twiddle model for the testbenches |
| `tb/tb_*.sv`        | one self-checking testbench per block |

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`; a watchdog stops it if it hangs. For example, the
end-to-end test of the top at its default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fft16_pkg.sv tb/tb_dft_pkg.sv tb/tb_fft16.sv --top-module tb_fft16
./obj_dir/Vtb_fft16
```

Replace `fft16` with `fft8_dit`, `fft8_dif`, `combine8`, `bf2_dit`, `bf2_dif`
or `twiddle_mul` to test a single block. Each run takes well under a second.

What the testbenches check:
* `tb_twiddle_mul`, `tb_bf2_dit`, `tb_bf2_dif` and `tb_combine8` compare bit
  for bit with an integer model that uses the same coefficient rule. The
  combiner test also compares with double precision.
* `tb_fft8_dit` and `tb_fft8_dif` compare with a double-precision DFT within 4
  internal LSBs. Their inputs are the example's halves, an impulse,
  full-scale patterns and random vectors.
* `tb_fft16` runs 600 transforms: the example, and random small and
  full-scale inputs. They are issued both back to back and with idle gaps.
  It checks every output bin, the 2-cycle latency, the `out_sat` flag and
  that reset drops a transform in flight. It fails if any of these situations
  never occurred.
