# Hybrid floating point pipelined FFT, 2048 points

A holographic camera does not record an image directly: the sensor records an
interference pattern, and the picture is reconstructed from it by large
two-dimensional FFTs (2048 x 2048 complex points, in real time). The core of
that computation is a one-dimensional FFT processor that streams one complex
sample per clock. This repository holds SystemVerilog for such a processor.

The processor is a pipelined radix-2^2 single-path delay feedback (R2^2SDF)
FFT. Its distinguishing feature is how it keeps precision in fixed-point
hardware. Instead of growing the word length from stage to stage, or
collecting blocks of samples to give them a common exponent (convergent block
floating point, which needs large buffers between the stages), every sample
carries **its own exponent, shared by its real and imaginary part**. Data is
rescaled on the fly:

* a **normalizer** after every twiddle multiplier brings each sample back to a
  fixed mantissa width, shifting small values up and large values down, and
  records the shift in the exponent;
* an **equalizer** in front of every butterfly shifts the operand with the
  smaller exponent right so that an ordinary fixed-point adder can combine
  the two.

Adders and multipliers stay plain fixed-point units; no buffers are added
between stages. Because every sample is normalized, the output
signal-to-noise ratio does not depend on the signal level. The testbench
measures about 48 dB at 2048 points for full-scale input and for input 64
times smaller alike.

## Number format

| field | default width | meaning |
|---|---|---|
| `re`, `im` | `MANT_W` = 10 bits, signed | integer mantissas |
| `exp` | `EXP_W` = 5 bits, signed (-16..15) | value = (re + j im) * 2**exp |
| twiddle `re`, `im` | `TW_W` = 12 bits, signed, 10 fractional bits | +1.0 and -1.0 are exact |

Input samples are plain 10-bit fixed point (exponent 0). Output samples are
10-bit mantissas with an exponent. A small input ends up with negative
exponents, because its mantissas have been shifted up to full scale. The three
word lengths are this implementation's choice; all are parameters.

## Pipeline

For N = 2**LOG2N points with LOG2N odd (default 11, N = 2048):

```
 x ─► IBF(L=2048) ─► MUL ─► MBF(1024) ─► MUL ─► MBF(256) ─► MUL ─► MBF(64) ─► MUL ─► MBF(16) ─► MUL ─► MBF(4) ─► NORM ─► X
      radix-2                radix-2^2 stages, each = BF I ─ (-j) ─ BF II, both with equalizers
```

* **IBF** (`ibf`): a normal radix-2 SDF butterfly with a 1024-sample feedback
  delay. The input has no exponent yet, so this stage needs no equalizer.
* **MBF** (`mbf`): a radix-2^2 stage. It holds two SDF butterflies
  (`eq_butterfly`) with delays L/2 and L/4. Each has an equalizer in front,
  and its feedback FIFO stores the exponent next to the mantissas. Between
  them sits the trivial multiplication by -j.
* **MUL** (`mul_unit`): twiddle ROM, full-precision complex multiplier and
  normalizer.
* The last stage (L = 4) has only twiddles equal to 1, so it ends in a
  normalizer alone.

For even LOG2N there is no IBF stage; every stage is an MBF.

Every butterfly output is one bit wider than its input, so a butterfly never
overflows. An MBF therefore produces `MANT_W+2`-bit mantissas, and the MUL
brings them back to `MANT_W`.

### The stream schedule

The hardest part to follow is which operation happens when. All of it is set
by one counter: the number of input samples taken since reset, modulo N.
Every unit subtracts its fixed pipeline distance from that count, which gives
`idx`, the position (0..L-1) within the unit's block of the sample now at its
input.

For a radix-2^2 stage of block length L:

| unit | mode / operation |
|---|---|
| BF I (delay L/2) | butterfly when `idx[LOG2L-1]` = 1 (second half of the block); otherwise fill the FIFO and drain the previous differences |
| -j | applied to BF I's output position u when u is in the last quarter (`u[LOG2L-1] & u[LOG2L-2]`), u = idx - (L/2 + 1) |
| BF II (delay L/4) | butterfly when `u[LOG2L-2]` = 1 |
| MUL | twiddle W_L^(n*(k1+2*k2)), v = u - (L/4 + 1), k1 = v[LOG2L-1], k2 = v[LOG2L-2], n = v[LOG2L-3:0] |

For the radix-2 stage the twiddle is W_N^(n*k1), with k1 = v[LOG2N-1] and
n = v[LOG2N-2:0]. In an SDF butterfly, "butterfly" means: the FIFO head
x[n] and the input x[n+L/2] are added, the sum goes out and the difference
goes into the FIFO. In the other half of the block the input goes into the
FIFO and the stored differences go out. The result leaves in **bit-reversed
order**. The processor has no reorder buffer.

### Latency

Each feedback delay adds its length, each butterfly output register adds 1,
each MUL adds 2 (product register and normalized register), and the output
normalizer adds 1. For N = 2048:
2047 + 11 + 10 + 1 = **2069 steps** from input sample x[n] of a frame to the
output of the same position n. For the 128-point configuration used in the
quick test it is 127 + 7 + 6 + 1 = 141.

## Scaling logic

**Normalizer** (`normalizer`): it counts the redundant sign bits of the real
and of the imaginary part and takes the smaller count k. Both parts are
shifted left by k, and the top `OW` bits are kept, rounded to nearest. A
positive value that would round past full scale saturates. The exponent
becomes `exp + EXP_OFS + (IW - OW) - k`. `EXP_OFS` removes the twiddle
factors' fractional bits (-10 in a MUL). k is limited so that the exponent
never goes below its minimum. One shift serves both parts: this is the "one
scale factor per complex value" rule.

**Equalizer** (`equalizer`): the common exponent is the larger of the two. The
other operand's mantissas are shifted right arithmetically by the difference.
The shifted-out bits are dropped, which rounds towards minus infinity.
Aligning to the larger exponent means the butterfly cannot overflow.

## Delay feedback memories

The SDF FIFOs make up most of the storage: 2047 samples at 2048 points, 50,831
bits at the default word lengths. A delay line is always read and written at
consecutive addresses. That allows **one single-port memory of double word
length** with a single address counter (`delay_feedback`, storage in
`sp_ram`):

* odd step: the pair of samples collected in two registers is written as one
  2*WIDTH-bit word;
* even step: the word of the pair due to leave is read. Its two halves are
  output on the next two steps.

A line of depth D uses D/2 words. Lines shorter than 4 samples (the last
stage's 2 and 1) are shift registers. The RAM is an array model with a
single-port macro's behaviour (read data held until the next read). A chip
flow would replace it with SRAM macros.

## Interface (`hfp_fft`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (memories are not reset) |
| `in_valid` | in | 1 | step enable: takes `in_re/in_im` and advances the whole pipeline by one sample; low stalls everything |
| `in_re`, `in_im` | in | `MANT_W` | input sample; sample i after reset is x[i mod N] of frame i / N |
| `out_valid` | out | 1 | `in_valid` and the pipeline has filled (LATENCY steps since reset) |
| `out_re`, `out_im`, `out_exp` | out | `MANT_W`, `EXP_W` | output value (out_re + j out_im) * 2**out_exp |
| `out_index` | out | `LOG2N` | time position of the output within its frame |
| `out_k` | out | `LOG2N` | frequency bin of the output = bit-reverse(out_index) |

Frames follow each other without gaps in the sample count. The pipeline only
moves with `in_valid`, so the last frame comes out while further samples (for
example the next frame, or zeros) are fed in.

## Accuracy

Measured by `tb/tb_hfp_fft_full.sv` against a double-precision DFT of the same
quantized input. The first three frames are random complex noise, the fourth
a complex tone between two bins:

| points | input | SNR |
|---|---|---|
| 2048 | random, amplitude 511 | 47.6 dB |
| 2048 | random, amplitude 64 | 48.1 dB |
| 2048 | random, amplitude 8 | 48.1 dB |
| 2048 | tone, amplitude 256 | 51.4 dB |
| 128 | the same four frames | 49.5 / 50.5 / 51.9 / 54.2 dB |

With plain truncation in the normalizers instead of rounding, the SNR at 2048
points was about 4 dB lower. The error also collected in the lowest bins.

## What is fixed by the design and what is chosen here

Taken from the design: the 2048-point size, the R2^2SDF pipelined
architecture, the stage structure (radix-2 first stage without scaling
logic, then equalizing radix-2^2 butterflies, each stage followed by a
complex multiplier with a normalizer), one exponent per complex sample,
exponents stored in the feedback FIFOs, and delay lines in double-width
single-port memory.

Chosen here, because the design leaves these open:

* the word lengths: 10-bit mantissa, 5-bit exponent, 12-bit twiddles;
* one guard bit per butterfly;
* rounding to nearest in the normalizers and truncation in the equalizers;
* saturation of the one overflowing case of the -j rotation;
* a normalizer alone in the last stage;
* pipeline registers: one per butterfly, two per MUL;
* the in_valid step-enable interface;
* the bit-reversed output order;
* shift registers for delays below 4;
* twiddle tables computed at elaboration, one per multiplier, without
  symmetry folding.

Not included: the 2D transform around the processor (row/column passes and
the 2048 x 2048 transpose memory it needs), the image sensor, and the rest of
the reconstruction algorithm.

## Files

| file | content |
|---|---|
| `rtl/hfp_pkg.sv` | default sizes, twiddle computation (integer Taylor series), bit reversal |
| `rtl/hfp_fft.sv` | top: stage generation, sample counter, latency, output indexing |
| `rtl/ibf.sv` | radix-2 SDF butterfly, fixed point |
| `rtl/mbf.sv` | radix-2^2 stage: two `eq_butterfly` and the -j rotation |
| `rtl/eq_butterfly.sv` | SDF butterfly with equalizer and exponent-carrying FIFO |
| `rtl/mul_unit.sv` | twiddle ROM + complex multiplier + normalizer |
| `rtl/twiddle_rom.sv`, `rtl/cmul.sv` | twiddle table, complex multiplier |
| `rtl/normalizer.sv`, `rtl/equalizer.sv` | the scaling logic |
| `rtl/delay_feedback.sv`, `rtl/sp_ram.sv` | feedback delay line, single-port RAM |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_hfp_fft.sv` | 128-point end-to-end test with stalls and four amplitudes |
| `tb/tb_hfp_fft_full.sv` | the same at the default 2048 points |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_hfp_fft_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/hfp_pkg.sv tb/tb_hfp_fft_full.sv
./obj_dir/Vtb_hfp_fft_full
```

The 2048-point test builds in about a minute and runs in seconds. Lint a
module with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/hfp_pkg.sv
rtl/<module>.sv`. To change the transform size, set `LOG2N` on `hfp_fft`
(3 or more). To change the precision, set `MANT_W`, `EXP_W` and `TW_W`. Keep
`EXP_W` wide enough for the exponent range, which is about
-(MANT_W-1) .. LOG2N+2.
