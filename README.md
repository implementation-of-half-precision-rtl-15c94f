# Half-precision floating-point FFT with pass-logic first stage

This is a radix-2 FFT whose arithmetic is 16-bit IEEE 754 half precision.
Its size N is a parameter. The default is N = 8, and any power of two from
8 up works. It is meant for data that arrives as bits, as in an OFDM
transmitter. Each input sample is 0 or 1. The first stage of a
decimation-in-frequency (DIF) FFT multiplies `x[n] - x[n+N/2]` by a
twiddle factor. With one-bit samples that difference can only be -1, 0 or
+1. So the first stage needs no multiplier. It passes the twiddle factor,
its negation, or zero. That selection is the "pass logic". It removes the
N/2 complex multipliers a DIF first stage would otherwise need. The later
stages work on general complex values. They use complex floating-point
adders/subtractors and complex multipliers built from half-precision units.

The half-precision units can also be used on their own:

- a multiplier whose mantissa product comes from a sequential shift-and-add
  multiplier;
- a combinational adder/subtractor.

## Number format and arithmetic conventions

A half-precision word is `{sign, exponent[4:0], fraction[9:0]}`. Its value is
`(-1)^sign * 1.fraction * 2^(exponent-15)`. The package `hp_pkg` defines it
as the packed struct `half_t`. A complex value `cplx_t` is `{re, im}`, 32
bits.

Every unit follows the same rules. They are this implementation's choices:

| case | behaviour |
|---|---|
| rounding | truncation toward zero |
| exponent field 0 (zero or subnormal input) | read as zero |
| result below 2^-14 | +0 (no subnormals are produced) |
| result of 2^16 or more | infinity with the result's sign |
| exact zero result | +0 |
| infinity / NaN inputs | not special-cased: all-ones exponents are treated as ordinary numbers |

With these rules, each unit's result is the exact mathematical result,
truncated once. The testbenches rely on that. They compute the exact value
with `real` arithmetic, which holds any sum or product of two half values
exactly. They then truncate it and compare bit for bit.

## The arithmetic units

### `fp_addsub`: adder/subtractor (combinational)

- `sub = 1` inverts the sign of `b`.
- The XOR of the two signs then chooses between adding and subtracting the
  mantissas.
- An exponent compare orders the operands by magnitude. The larger exponent
  becomes the provisional result exponent. The exponent difference is the
  alignment shift for the smaller mantissa.
- The aligned mantissas are 42 bits wide: 11 significant bits and 31 bits
  below them. The exponent difference is at most 30, so no bit is ever
  shifted out. After the add or subtract, a leading-one search renormalises
  the result. The 10 fraction bits are then cut off, which makes the
  truncation exact.
- The result takes the sign of the larger operand.

A narrower datapath with guard/round/sticky bits could replace the wide
alignment. It must still round toward zero, or the testbenches fail.

### `fp_mul`: multiplier (sequential, 11 cycles)

The multiplier has three parts:

- **`fp_mul_expo_adjust`** restores the hidden bits, forms
  `ea + eb - 15`, and flags a zero operand.
- **`shift_add_mult`** multiplies the two 11-bit mantissas. It handles one
  multiplier bit per clock. It adds the multiplicand into the accumulator
  when the bit is 1, then shifts.
- **`fp_mul_result_norm`** takes the 22-bit product, which lies in [1, 4).
  If the product is 2 or more, it shifts right by one and increments the
  exponent. Then it truncates to 10 fraction bits and applies the
  underflow/overflow rules.

The sign is the XOR of the operand signs, forced to 0 when the magnitude is
zero.

Handshake:

1. Pulse `start` with `a` and `b`.
2. Sign, exponent and mantissas are captured on that edge.
3. `done` is high in the 11th cycle after it.
4. `result` stays valid until the next `start`.

A `start` while `busy` is ignored.

### `cplx_mul` and `cplx_butterfly`

`cplx_mul` computes `(A+jB)(C+jD) = (AC-BD) + j(AD+BC)`. It uses four
`fp_mul` that run in parallel, and two `fp_addsub` on the held products. It
has the same start/done timing as `fp_mul`. `cplx_butterfly` is four
`fp_addsub` that give `a+b` and `a-b`.

## The FFT (`fft_top`)

### Data flow

`S = log2 N` stages, `W = W_N = e^{-j2π/N}`. A stage splits the data into
blocks of `M = N/2^(st-1)` values. A butterfly pairs position `p` with
`p + M/2` in its block.

| stage | operation | hardware |
|---|---|---|
| 1 | `s[n] = x[n]+x[n+N/2]`, `d[n] = (x[n]-x[n+N/2])·W^n` | `pass_logic_stage`: selects 0/1/2 and +W^n / -W^n / 0 |
| 2 … S-1 | butterfly; the difference is multiplied by `W^(p·2^(st-1))` | N/2 `cplx_butterfly` + N/2 `cplx_mul` per stage |
| S | butterflies on neighbouring pairs, twiddle 1 | N/2 `cplx_butterfly` |

- At N = 8 this gives 4 complex multipliers in total, all in stage 2.
- The multiplier stages use a complex multiplier even where the factor is 1.
  Every difference of those stages therefore goes through the same path and
  the same truncation.
- The last stage has no multipliers.
- The DIF result comes out in bit-reversed order. It is written to `X[k]` in
  natural order.

`twiddle_rom #(N)` holds `W^0 … W^(N/2-1)`. A constant function computes
the table at elaboration: a Taylor series for cos/sin in `real` arithmetic,
then truncation to half precision. In hardware the table is a constant
lookup. At N = 8 the factor `0.7071…` is stored as `0x39A8`, which is
0.70703125.

### Control and timing

Ports:

- `clk`, `reset` (synchronous, active high);
- `start`, and `x_in[N-1:0]` where `x[n]` is bit `n`;
- outputs `busy`, `done` and `X[0:N-1]`, each of type `cplx_t`.

One register array `v[N]` holds the values between stages. The stages run
one after another:

| state | what happens |
|---|---|
| IDLE | `start` writes the pass-logic outputs of `x_in` into `v` |
| LOAD | the current stage's butterfly sums go into `v`, and its N/2 complex multipliers start on the differences |
| MUL | after 11 cycles the products go into `v`. The next state is LOAD for the next multiplier stage, or FINAL |
| FINAL | the last butterflies are written, bit-reversed, into `X`; `done` pulses |

- Latency from the edge that samples `start` to `done`:
  `(S-2)·13 + 1` cycles. That is **14** for N = 8, 27 for N = 16 and 40 for
  N = 32.
- A new `start` is accepted in the cycle in which `done` is high.
- `X` holds its value until the next transform finishes.
- `start` is ignored while `busy` is high.
- `reset` aborts a running transform.

Only one stage's multipliers work at a time. The per-stage hardware mirrors
the "N/2 multipliers per stage" structure of the design. A cheaper variant
would share one set of N/2 multipliers across the stages, using a
multiplexer on the inputs.

### Accuracy

The errors come from truncation in every operation and from the truncated
twiddle factors. For N = 8, all 256 input words give outputs within 0.01
of the exact DFT. Output magnitudes reach N, for `X[0]` when all samples
are 1. Each stage truncates once, relative to values as large as N, so the
error bound grows with N·log2 N. The tests at N = 16 and 32 allow an error
of `log2 N · N / 512`.

## How far this follows the source design, and where it does not

These parts follow the source design:

- half-precision format;
- a DIF structure with pass logic replacing the first-stage multipliers;
- complex add/subtract followed by complex multiplication in the remaining
  stages;
- a complex multiplier made of four real multipliers and two
  adders/subtractors;
- the multiplier's structure: sign XOR, exponent adjustment, an 11×11
  shift-and-add mantissa multiplier with a 22-bit product, normalisation;
- the adder/subtractor's order of operations: exponent compare, alignment,
  mantissa add/sub selected by the sign XOR, repacking.

These are this design's own choices. The source gives none of them:

- rounding mode, subnormal, overflow and special-value handling;
- the start/busy/done handshakes and the one-bit-per-cycle multiplier
  schedule;
- reset polarity;
- the encoding of the input bits and natural-order outputs;
- the FFT controller and its latency;
- multiplying by a factor of 1 in the multiplier stages;
- computing the twiddle table at elaboration.

The source says the structure works for any FFT size, but it shows only
8 points. Here the size is a parameter. It has been simulated at 8, 16
and 32. The source reports its FPGA resource use, but this RTL has not been
compared against it.

## Files

| file | content |
|---|---|
| `rtl/hp_pkg.sv` | `half_t`, `cplx_t`, constants (default `FFT_N`, `MUL_CYCLES`, …) |
| `rtl/shift_add_mult.sv` | sequential W×W shift-and-add multiplier (W = 11) |
| `rtl/fp_mul_expo_adjust.sv`, `rtl/fp_mul_result_norm.sv`, `rtl/fp_mul.sv` | half-precision multiplier |
| `rtl/fp_addsub.sv` | half-precision adder/subtractor |
| `rtl/cplx_mul.sv`, `rtl/cplx_butterfly.sv` | complex multiplier, complex add/sub pair |
| `rtl/twiddle_rom.sv`, `rtl/pass_logic_stage.sv` | twiddle table (computed for any N), first FFT stage |
| `rtl/fft_top.sv` | the FFT, parameter `N` |
| `tb/hp_ref_pkg.sv` | reference half↔real conversion used by all testbenches |
| `tb/fft_ref_pkg.sv` | reference FFTs: a bit-exact stage-by-stage half-precision model, and the exact DFT |
| `tb/fft_tb_driver.sv` | stimulus and checks for one `fft_top` of any size |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fft_top_sizes.sv` | the FFT at N = 16 and N = 32 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a run that hangs. For example, the end-to-end FFT test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/hp_pkg.sv tb/hp_ref_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_top.sv \
  --top-module tb_fft_top -o sim && ./obj_dir/sim
```

For another module, replace `tb_fft_top` with its testbench. `-y`
finds the other modules by file name.

The testbenches check the following:

| testbench | what it checks |
|---|---|
| `tb_fft_top` | the default size, N = 8, with all 256 input words, two ways: bit for bit against a stage-by-stage model, and against the exact DFT. Also the 14-cycle latency, ignored starts, back-to-back transforms and a reset abort, and that the pass logic produced each of +W, −W and 0 |
| `tb_fft_top_sizes` | the same checks at N = 16 and 32, with random and patterned input words |
| `tb_fp_addsub` | 40 000 random and corner cases, including cancellation and overflow |
| `tb_fp_mul` | 3 000 random and corner cases, including overflow and underflow, and the 11-cycle latency |
| `tb_cplx_mul`, `tb_cplx_butterfly` | random operands and the FFT twiddles |
| `tb_pass_logic_stage` | exhaustive over all 256 input words |
| `tb_twiddle_rom` | every factor for N = 8, 16 and 64, against `cos`/`sin` |

Each run takes well under a second. Building `tb_fft_top_sizes` takes
about a minute.
