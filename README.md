# Two-microphone sound localizer: time-difference-of-arrival in real time

This RTL estimates where a sound comes from by measuring how much later it
reaches one microphone than the other. Each microphone's signal is cut into
segments of 256, 512 or 1024 samples. Each segment is windowed and
Fourier-transformed. The phase difference between the two spectra is then
tested against every candidate delay from -30 to +30 sample periods. The
delay that puts the most frequency bins "in phase" wins. At 20 kHz sampling
and a 0.4 m microphone spacing a delay of 30 samples covers every direction,
since the largest possible delay is 0.4 m / 345 m/s = 23.2 samples.

The architecture follows the FPGA design published as *Real-Time Sound
Localization Using Field-Programmable Gate Arrays*. That design puts the
whole digital part (everything after the analog amplifier, filter and ADC)
on one FPGA. It uses CORDIC both for the FFT's twiddle factors and for the
magnitude/phase conversion, runs a three-stage pipeline, and keeps the
previous segment's spectra for temporal smoothing. Where that description
stops, this implementation makes its own choices. Each choice is listed in
"Departures and own choices" below and in the header comment of the file
concerned.

## The estimator

For one segment of N samples, let `M1(k)` and `M2(k)` be the two spectra.
For a candidate delay `beta` (in sample periods), the phase error of bin `k` is

    theta(k, beta) = arg M1(k) - arg M2(k) - 2*pi*k*beta/N

If microphone 2 hears the source `D` samples later, `theta` is close to zero
in every bin when `beta = D`. Classical generalized cross-correlation weights
`cos(theta)` by the bin magnitudes. This design instead uses a rectangular
reward: a bin counts only when `|theta| <= 0.5 rad`. The score of a delay is

    score(beta) = sum over k of  W(k) * |M1(k)| * |M2(k)| * [ |theta(k,beta)| <= 0.5 ]

and the estimate is the `beta` with the largest score. Two weightings can be
selected with `phat_en`:

* **PHAT** (`phat_en = 1`, phase transform): `W = 1 / (|M1| |M2|)`. Every
  bin within the window adds exactly 1, so the score is a count of bins and
  no magnitude is needed. This is the mode to use, especially with
  reverberation or noise.
* **UCC** (`phat_en = 0`, unweighted cross-correlation): `W = 1`. A bin
  adds `|M1| |M2|`.

The rectangular window needs only a compare instead of a cosine. Phases are
16-bit *binary angles*, where 65536 is one full turn. Wrapping `theta` into
(-pi, pi] is then plain two's-complement overflow. The delay term
`2*pi*k*beta/N` becomes the integer `k*beta*65536/N`, a product and a shift.
The 0.5 rad window is `|theta| <= 5215`, since 0.5 rad = 5215.19/65536 of a
turn.

Only bins 0..255 are used: 0 to 5 kHz at N = 1024 and 20 kHz sampling. This
is because each spectrum buffer holds 256 entries. For N = 256 the bins are
0..128.

## Pipeline

```
 ch1_sample[23:16] -> channel_buffer -> channel_proc --+
                      (stage 1)         (stage 2)      |    tdoa_estimator (stage 3)
 ch2_sample[23:16] -> channel_buffer -> channel_proc --+--> 3 GCC buffers per channel
                                                            -> gcc_core -> tdoa
```

**Stage 1, acquisition (`channel_buffer`, one per channel).** Each
`sample_valid` strobe writes the 8 most significant bits of the 24-bit ADC
word into a 1024 x 8 memory at a running address. The segment length comes
from `seg_sel` (0: 256, 1: 512, 2: 1024). It is sampled when a segment starts
and holds until the segment ends. `seg_done` pulses after the segment's last
sample.

**Stage 2, spectrum (`channel_proc`, one per channel).** Both channels work
in lockstep. Stage 2 reads the finished segment while stage 1 refills the
same buffer from address 0. Stage 2 reads one address per clock, so it stays
ahead of the writer as long as samples come at most every second clock. At
20 kHz and a 10 MHz clock they come every 500 clocks. Stage 2 has three
steps:

1. **Load.** Window each sample (Hanning,
   `w[n] = 0.5 (1 - cos(2 pi n / N))`), convert it to 16-bit floating point
   (`window_convert`), and store it in the 1024-word FFT buffer at the
   bit-reversed address.
2. **In-place radix-2 FFT.** The FFT is decimation in time, stage by stage.
   For each distinct twiddle factor `exp(-j 2 pi t / span)`, the channel's
   CORDIC runs once in rotation mode (18 clocks). All butterflies that use
   that twiddle then follow, 4 clocks each: read a, read b, write `a + b*w`,
   write `a - b*w`. That is N-1 CORDIC runs and (N/2) log2 N butterflies per
   segment.
3. **Magnitude and phase.** Each bin is read back. Its real and imaginary
   parts are aligned to the larger of their two exponents, and the same
   CORDIC runs in vectoring mode. The result is written as {magnitude
   (16-bit float), phase (binary angle)} into a GCC buffer of stage 3.

**Stage 3, search (`tdoa_estimator`).** Each channel has three GCC buffers
(256 x {16-bit magnitude, 16-bit phase}). At any moment:

* one buffer is being written by stage 2;
* one holds the current segment;
* one holds the previous segment.

When stage 2 finishes it *commits*. The roles then rotate: the written buffer
becomes current, current becomes previous, and previous becomes the next
write buffer. The search (`gcc_core`) starts at once. It reads the current
and previous buffers of both channels with one shared address, one bin per
clock, and runs all 61 lags.

With `smooth_en`, the terms of the previous segment are added to each lag's
score, so the estimate covers about 100 ms instead of 50 ms. Smoothing is
skipped for the first segment and after a change of segment length.
`tdoa_smoothed` reports whether it was applied.

**Hand-over rules.** Stage 2 counts as occupied from its start until stage 3
has taken its result.

* **Overrun.** A segment that ends while stage 2 is occupied is dropped, and
  `overrun` pulses.
* **Stall.** When stage 2 has finished but stage 3 is still searching the
  previous segment, stage 2 holds its result and `stall` is high. This only
  happens when a short segment follows a long one at a high sample rate.

### Timing

All figures are in clocks.

| | N = 256 | N = 512 | N = 1024 |
|---|---|---|---|
| Stage 2 (load + FFT + magnitude/phase) | 11,779 | 24,559 | 46,063 |
| Stage 3 (61 lags x (bins + 1) + 2) | 7,932 | 15,679 | 15,679 |
| One segment at 20 kHz, 10 MHz clock | 128,000 | 256,000 | 512,000 |

Stage 2 and stage 3 work on consecutive segments in parallel, so at the real
rate every segment gets an estimate. The estimate appears about 62,000
clocks (6.2 ms at 10 MHz) after the last sample of its 1024-sample segment.
Stage 2 finishes a segment before the next one is complete whenever samples
arrive every 45 clocks or slower (N = 1024). Faster input is dropped segment
by segment (overrun).

## Number formats

This is where most of the design's own decisions sit.

* **Samples.** An 8-bit two's-complement sample is read as a fraction of full
  scale, `sample / 128`.
* **16-bit floating point (`fp16_pkg`).** This format is used for the FFT
  buffers and the magnitudes. It has the IEEE 754 binary16 layout: sign,
  5-bit exponent with bias 15, and 10-bit fraction. It is simplified: there
  are no subnormals, so results below 2^-14 become zero. There are no
  infinities or NaNs, so results saturate at +-65504. Rounding is to nearest,
  ties away from zero. One function, `fp16_norm` (leading-one search, round,
  range check), packs every result. `fp16_add` aligns with three guard bits.
  The FFT never scales. A bin magnitude is at most N/2 = 512, well inside the
  range.
* **Twiddle factors** stay in the CORDIC's fixed-point form (Q1.14, where
  16384 = 1.0). `fp16_mul_q14` multiplies a float by them directly, which
  saves a conversion.
* **CORDIC (`cordic`).** The CORDIC has 17-bit inputs and 6 guard bits. It
  runs 16 micro-rotations, one per clock, then compensates its gain with
  one constant multiply (19898/32768 = 1/1.64676). Angles beyond +-90 degrees
  are first rotated by 180 degrees. Rotation mode takes 18 clocks from start
  to `done`, and so does vectoring mode. Its accuracy is within 4 LSB of
  magnitude and within 8/65536 of a turn in phase, for vectors longer than
  256 LSB.
* **Phases** are 16-bit binary angles throughout.
* **UCC score.** Each float magnitude is taken as an integer in units of
  2^-10 (truncated). The product is exact, and the score is 64 bits wide.

## Top-level interface (`sound_localizer`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `sample_valid` | in | 1 | one-clock strobe: a new sample pair is on the inputs |
| `ch1_sample`, `ch2_sample` | in | 24 | ADC words; bits [23:16] are used |
| `seg_sel` | in | 2 | segment length 0: 256, 1: 512, 2 (or 3): 1024; applies from the next segment |
| `phat_en` | in | 1 | 1: PHAT, 0: UCC weighting; taken when a search starts |
| `smooth_en` | in | 1 | add the previous segment's score |
| `tdoa` | out | 8 | signed estimate in sample periods, -30..30; positive: microphone 2 hears the source later |
| `tdoa_score` | out | 64 | score of the winning lag (bin count for PHAT) |
| `tdoa_valid` | out | 1 | one-clock strobe with each new estimate |
| `tdoa_smoothed` | out | 1 | the estimate includes the previous segment |
| `overrun` | out | 1 | one-clock strobe: a segment was dropped |
| `stall` | out | 1 | stage 2 waits for stage 3 |

To turn `tdoa` into a direction, use `phi = asin(v * tdoa / (Fs * d))`, with
`v` about 345 m/s, `Fs` the sample rate and `d` the microphone spacing. This
conversion is not part of the RTL.

Parameters and their defaults: `NMAX = 1024` (largest segment; buffer
depth), `GCC_BINS = 256` (bins kept per spectrum), `MAX_LAG = 30`. Memory
in the full design:

* two 1024 x 8 channel buffers;
* two 1024 x 32 FFT buffers;
* six 256 x 32 GCC buffers;
* two 1024 x 16 window tables.

## Files

| File | Contents |
|---|---|
| `rtl/sl_pkg.sv` | shared constants (window 5215, lag range, score width) and types |
| `rtl/fp16_pkg.sv` | 16-bit floating-point pack, add, multiply by fixed point, convert |
| `rtl/channel_buffer.sv` | stage 1: sample memory, write counter, segment end |
| `rtl/window_convert.sv` | Hanning window table (computed at elaboration) and float conversion |
| `rtl/fft_buffer.sv` | 1024 x {re, im} FFT working memory |
| `rtl/cordic.sv` | iterative rotation/vectoring CORDIC |
| `rtl/channel_proc.sv` | stage 2 sequencer: load, FFT, magnitude/phase |
| `rtl/gcc_buffer.sv` | 256 x {magnitude, phase} spectrum memory |
| `rtl/gcc_core.sv` | the lag search |
| `rtl/tdoa_estimator.sv` | stage 3: buffer rotation, read multiplexers, search |
| `rtl/sound_localizer.sv` | top level and pipeline control |

The memories are plain arrays with a synchronous read, so they map to block
RAM. The window table is built by a constant function using `$cos`.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`,
and the floating-point package has `tb_fp16_pkg`. Each testbench computes
its expected values independently, in real arithmetic where possible, and
prints `TB_RESULT checks=N failures=M`.

* `tb_cordic`: random angles and vectors against `cos`, `sin`, `sqrt`,
  `atan2`, plus the 18-clock latency.
* `tb_window_convert`: all three lengths against the window formula.
* `tb_channel_proc`: two tones plus noise at N = 1024, 256 and 512. Every
  bin is checked against a direct DFT, within 1 % plus 0.3 % of the largest
  bin in magnitude. The test also checks the stage-2 time.
* `tb_gcc_core`, `tb_tdoa_estimator`: synthetic spectra with a known delay.
  The expected best lag and score are computed by brute force. The tests
  cover PHAT and UCC, smoothing, buffer rotation with writes during a search,
  and the exact search time.
* `tb_sound_localizer`: the full-size design end to end, with no parameter
  overrides. White noise reaches the microphones with a known delay, each
  with independent noise (about 24 dB SNR). The test runs in phases: the
  real sample rate with latency checks, smoothing, a switch to 256 samples
  with UCC and a negative delay, a forced stall, and a forced overrun. Every
  estimate must equal the delay, and each mechanism is counted and must
  occur. It takes a few seconds in Verilator.

### Room experiments

`tb_localization_experiments` recreates the published room experiments on
the full-size design. It uses synthetic signals, and the signal model is this
testbench's own choice.

**Geometry.** The microphones are 0.4 m apart on a wall. The talker is 2 m in
front of the wall.

**Talker.** The talker is modelled as 200 sinusoids between 100 Hz and 5 kHz.
They are evaluated in continuous time, so the delay can be fractional.

**Noise.** At 30 dB SNR the only noise is independent sensor noise. At 20,
10 and 0 dB there is also a far-field Gaussian noise source, 40 degrees off
axis, which reaches microphone 2 15 samples after microphone 1.

Each estimate is compared with the true delay, and the direction-of-arrival
error is printed.

| Run | Estimates within one sample |
|---|---|
| Stationary talker, 30 dB, PHAT (true delay 7.63 samples) | 4 of 4 |
| Stationary talker, 30 dB, UCC | 4 of 4 |
| Talker at 6 positions from 0.5 m left of microphone 1 to 0.5 m right of microphone 2, PHAT, 30 dB | 6 of 6 |
| Same path, 20 dB | 6 of 6 |
| Same path, 10 dB | 6 of 6 |
| Same path, 0 dB | 5 of 6; once the noise source wins (estimate 15) |

An estimate is the nearest whole sample to the true delay, so the direction
error is at most about 1 degree here. At 0 dB the noise source starts to take
over. The synthetic talker is easier than real speech in a reverberant room,
so these numbers are not a prediction of field accuracy.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sound_localizer \
  -y rtl -y tb +libext+.sv rtl/sl_pkg.sv rtl/fp16_pkg.sv tb/tb_sound_localizer.sv
./obj_dir/Vtb_sound_localizer
```

## Departures and own choices

Compared with the published design:

* **Floating-point format.** The published design converts the windowed
  samples to a 16-bit floating-point format but does not specify it. The
  format here (see "Number formats") is an assumption, and so is the choice
  to keep twiddles in fixed point.
* **Bins.** The published GCC buffers hold 256 entries, while the estimator
  formula runs over all bins up to N/2. Bins 0..255 are used.
* **Segment lengths.** The published design gives "256 to 1024 samples".
  Only the powers of two 256, 512 and 1024 are supported.
* **Smoothing.** The published design keeps a third buffer for temporal
  smoothing but does not say how smoothing is done. Adding the previous
  segment's score is this design's choice.
* **Assumed details.** The pipeline hand-over (drop on overrun, stall),
  the buffer rotation order, the reset behaviour, memory port arrangements,
  the CORDIC width and iteration count, and the FFT schedule are not given
  in the published design.
* **Clock.** The clock rate is not fixed by the RTL. The 10 MHz used in the
  timing figures is the rate the published design quotes for its power
  estimate.
* **Outside the RTL.** The analog front end (amplification, band-pass
  filtering, 24-bit sampling at 20 kHz) lies outside this RTL, and the
  samples enter as ports. The published design also estimates how many such
  estimators fit in a larger FPGA for microphone arrays. This RTL is one
  microphone pair; more pairs are more instances.
