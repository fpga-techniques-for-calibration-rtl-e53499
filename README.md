# Calibrated digital beamforming for an eight-element smart antenna

An antenna array can only steer beams digitally if every receive channel
has the same gain and the same phase. Real RF chains do not: cables, mixers,
amplifiers and ADCs each add their own amplitude and phase error, and these
drift with temperature. This design is the FPGA back end of an eight-channel
digital array receiver that fixes this in the frequency domain.

1. **Calibrate.** The same CW tone is fed into all eight channels. Each
   channel is transformed with a 1024-point FFT. The bin holding the tone is
   picked out, and a CORDIC turns it into a magnitude and a phase. Comparing
   each channel with a reference channel gives one correction pair per
   channel: a gain and a phase shift.
2. **Correct.** Later captures are transformed the same way. Every bin is
   multiplied by its channel's gain and rotated by its channel's phase, so
   all channels look as if they had the reference channel's hardware.
3. **Beamform.** The eight corrected spectra go through a complex matrix
   product, `T(25x1024) = A(25x8) * Q_CAL(8x1024)`. This forms 25 beams
   from -60 to +60 degrees in 5-degree steps at every frequency bin. It also
   gives the power `re^2 + im^2` of each beam, which is what direction
   finding needs.

A second, separate unit sits beside the receiver: an adaptive weight
processor for QRD-RLS beamforming. It is a triangular systolic array of
CORDIC cells that keeps the QR decomposition of the weighted least-squares
problem `X w ~ y` up to date, one data row at a time. A back-substitution
engine then solves `R w = u` for the weights. The two units share only clock
and reset.

All RTL is SystemVerilog-2017 in `rtl/`. There is one self-checking
testbench per module in `tb/`.

## Block structure

```
                 smart_antenna_top
 adc_data[0..3] ──► cal_block #0 ─┐ meas        ┌──────────────────┐
 adc_data[4..7] ──► cal_block #1 ─┴────────────►│ cal_weight_table │ (seq_divider)
                        ▲  ▲                     └────────┬─────────┘
                        │  └──────── pairs[8] ◄───────────┘
                        │ 4+4 corrected channels, one bin per clock
                        └──────────────► beamformer ──► T[25], power[25]

 qrd_x[8], qrd_y ──► qrd_array (44 × qrd_cordic_cell) ──R,u──► back_substitution ──► w[8]

 cal_block = 4 capture RAMs ─mux─► fft1024_r4 ─┬► tone_selector ─► cordic_vectoring ─► meas
                                               └► cal_corrector (sincos_lut) ─► 4 output RAMs ─► stream
```

| module | role |
|---|---|
| `sa_pkg` | shared widths and the `cplx16_t` and `cal_pair_t` types |
| `smart_antenna_top` | wires both units together. Starts the weight computation and the synchronised stream. Arbitrates measurements |
| `cal_block` | four channels: capture RAMs, one shared FFT, measurement path, correction path, output RAMs |
| `fft1024_r4` | in-place radix-4 DIF FFT, 5 ranks × 256 butterflies |
| `tone_selector` | picks the tone bin, either a fixed bin or the strongest positive-frequency bin |
| `cordic_vectoring` | magnitude and phase of one complex value |
| `cal_weight_table` | eight measurements in, eight correction pairs out |
| `seq_divider` | signed restoring divider, one bit per clock |
| `sincos_lut` | 10-bit phase in, 12-bit cosine and sine out |
| `cal_corrector` | gain multiply and complex rotation of a bin stream |
| `beamformer` | 25 × 8 complex matrix times one column per clock, plus power |
| `qrd_cordic_cell` | one Givens-rotation cell of the array, in vectoring or rotation mode |
| `qrd_array` | triangular array of cells, pipelined row by row |
| `back_substitution` | solves `R w = u` with one multiplier and the divider |

## Calibration, in detail

This is the part where most of the subtle choices sit.

**Measurement.** After a `cmd_calibrate`, each block processes its four
captured channels one after the other through its single FFT. The
`tone_selector` watches the 1024 output bins.

- With `search = 0` it keeps bin `target_bin`.
- With `search = 1` it keeps the bin with the largest `re^2 + im^2` among
  bins 1 to 511. This lets a swept tone calibrate at whatever frequency it
  currently occupies. DC and the mirrored negative frequencies are excluded,
  so a strong image can never win.

`cordic_vectoring` folds the vector into the right half-plane. It then runs
16 shift-and-add micro-rotations. It returns the magnitude, corrected for
the CORDIC gain, and a 10-bit phase (1024 units = 2π).

**Correction pair.** `cal_weight_table` stores the eight (magnitude, phase)
measurements. On `compute` it derives, for each channel m, with channel 0 as
the reference:

```
gain_m  = mag_0 / mag_m          unsigned Q2.14, saturates at 3.99994
phase_m = theta_0 - theta_m      modulo 1024
```

It uses one shared sequential divider, about 36 clocks per channel. The set
used by the correctors switches only when all eight new pairs are ready. In
the top, the table is started automatically once both blocks have reported
all their channels, and `cal_valid` pulses when the new set is active. The
two blocks run in lockstep, so their measurements arrive in the same clock.
The top holds block 1's measurement for one clock before writing it.

**Correction.** `cal_corrector` multiplies both parts of a bin by `gain_m`.
It then multiplies the bin by `cos + j sin` from a 12-bit table. The input
data are real, so bin `N-k` is the complex conjugate of bin `k`. For that
reason bins above N/2 are rotated by `-phase_m` and the others by
`+phase_m`, which keeps the corrected spectrum conjugate-symmetric. The
result is rounded and saturated to 16 bits. It is written to the channel's
output RAM as a complex word.

**Why the correction is exact for the tone.** Say a channel's tone bin is
`g_m·A·e^{j(e_m+φ)}`. After correction it becomes
`g_m·A·e^{j(e_m+φ)} · (g_0/g_m) · e^{j(e_0−e_m)} = g_0·A·e^{j(e_0+φ)}`,
which is the same for every channel. A signal from another direction keeps
its inter-element phase progression, so the beamformer sees an ideal array.
The end-to-end testbench checks this. Eight channels get random gains
(0.6 to 1.0) and random phases. After calibration, a plane wave from +25
degrees must peak in the +25-degree beam.

## The FFT

`fft1024_r4` keeps 1024 complex words in a working memory.

- **Transform time.** Each clock it reads four words, computes one radix-4
  decimation-in-frequency butterfly and writes four words back in place. A
  transform takes exactly 5 × 256 = 1280 clocks.
- **Addressing.** In rank `s` (0 to 4) the butterfly span is
  `Q = 1024 / 4^(s+1)`. Butterfly `b` works on addresses `a0 + k·Q`, where
  `a0 = (b / Q)·4Q + b mod Q`. Its twiddles are `W^(k·(b mod Q)·4^s)` for
  k = 1, 2, 3, with `W = e^{-j2π/1024}`.
- **Output order.** The results end up in base-4 digit-reversed order. The
  read port reverses the address digits, so `rd_addr` is simply the bin
  number. Read data follow one clock later.
- **Number format.** Inputs are 8-bit. Working words are 24 bits: the full
  growth of 10 bits, a sign margin, and 4 fractional guard bits. Without the
  guard bits, rounding noise from the early ranks accumulates to several
  output LSBs. No rank scales. The 16-bit output is the working value
  shifted right by 6 and saturated. A full-scale input tone of amplitude A
  therefore appears as `A·1024/2/4 = 128·A` in its bin. Twiddles are
  18-bit (Q1.16) and are computed at elaboration.

## The beamformer

Each clock one column arrives from the two blocks: the eight corrected
channels at one bin. All 25 × 8 complex products are formed in parallel. In
the next stage they are summed per beam and scaled back by 2^10. The third
stage squares and adds the parts to give power. Outputs appear on the third
clock edge after the column is applied, and a frame takes 1024 clocks.

The scan matrix is a register file that any weight can be rewritten through
the `w_*` / `bw_*` port. After reset it holds steering weights for a uniform
linear array with half-wavelength spacing:

```
A[b][n] = exp(+j·π·n·sin θ_b),   θ_b = −60° + 5°·b,   Q1.10 in 12 bits
```

A plane wave from θ reaches element n with phase `e^{−jπ n sin θ}` at
positive frequencies, so it adds up coherently in the beam whose θ_b = θ.
If your array has a different spacing or element order, load your own
weights.

## Commands and timing (receiver)

All commands are one-clock pulses to `smart_antenna_top`. They are accepted
while the blocks are idle.

| step | what happens | clocks |
|---|---|---|
| `cmd_capture` | the next 1024 clocks with `adc_valid` fill the capture RAMs of all 8 channels. `captured` pulses | 1024 valid samples |
| `cmd_calibrate` | per channel: load FFT (1025), transform (1281), read bins (1024), CORDIC (about 20). Then the weight table (about 300). `cal_valid` pulses | about 13 700 |
| `cmd_correct` | per channel: load, transform, read through the corrector, drain. Then both blocks release their data together | about 13 350 |
| stream | 1024 consecutive `beam_valid` clocks, bins 0 to 1023, `beam_last` on bin 1023 | 1024 + 3 |

The blocks process their four channels serially. The two blocks run in
parallel and stay in step; an assertion in the top checks that their
streams line up.

## QRD-RLS weight processor

**Cells.** Each `qrd_cordic_cell` stores one element of `R`, or of `u` in
the last column. Per input row it performs one Givens rotation with 16
CORDIC micro-rotations.

- The boundary cell (vectoring mode) rotates `(λ·r, x)` onto the x axis.
  Its new r is `sqrt((λr)^2 + x^2)`. In each iteration it also outputs the
  direction of the micro-rotation it just took.
- The internal cells of the same row apply those directions in the same
  clock to their own `(λ·r, x)` (rotation mode). They keep the new r and
  pass the rotated x down to the next row.

Every cell spends the same 17 clocks whatever it computes. The forgetting
factor is `λ = 1 − 2^−6 ≈ 0.984` (parameter `LAMBDA_SH`; 0 means λ = 1). It
gives the exponentially weighted least-squares solution.

**Array.** `qrd_array` has N = 8 rows. Row i holds one boundary cell and
8 − i internal cells, 44 cells in all. It works in beats of 19 clocks.

- Within a beat all rows rotate at once.
- Between beats the rotated values move down one row.
- A new input row is accepted every beat (`in_ready`), and a row's effect
  has reached the bottom 8 beats later.
- When no row is offered, the array keeps beating until the pipeline is
  empty, and then raises `idle`.

Inputs are 16-bit integers. Inside the array they carry 4 fractional bits,
and `R` and `u` are 26-bit.

**Back substitution.** `back_substitution` computes
`w_i = (u_i − Σ_{j>i} R_ij w_j) / R_ii` from the last weight upwards. It
does one multiply-accumulate per clock and one 55-clock division per
weight, about 500 clocks for N = 8. The weights are 24-bit with 12
fractional bits (Q11.12). A zero diagonal saturates that weight and sets
`w_singular`. In the top, `qrd_solve` may be pulsed at any time: the solve
waits until the array is idle.

## Number formats at a glance

| signal | format |
|---|---|
| ADC sample | 8-bit signed |
| FFT bin, corrected bin | 16-bit signed re and im (`cplx16_t`) |
| magnitude from CORDIC | 18-bit unsigned, same scale as the bin |
| phase | 10-bit unsigned, 1024 = 2π |
| gain | 16-bit unsigned Q2.14 |
| sin/cos table | 12-bit signed, ±2047 |
| scan weight | 12-bit signed Q1.10 |
| beam output T | 21-bit signed |
| beam power | 42-bit unsigned |
| QRD R, u | 26-bit signed, 4 fractional bits |
| weights w | 24-bit signed, 12 fractional bits |

## How this relates to the original system, and its limits

What follows the published design:

- eight channels in two four-ADC calibration blocks;
- 8-bit samples and a radix-4 DIF 1024-point FFT with five ranks of 256
  butterflies and 16-bit outputs, imaginary inputs zero;
- tone selection by fixed bin or by largest energy, with CORDIC for the
  magnitude;
- correction pairs relative to a reference channel;
- correction by amplitude multiply and a 10-bit-phase, 12-bit sin/cos
  complex rotation, with the sign switched for negative frequencies;
- corrected data held in RAM and passed to the beamformer in parallel;
- the 25 × 8 by 8 × 1024 scan matrix product with a power output;
- a triangular CORDIC systolic array for QRD-RLS in vectoring and rotation
  modes, followed by back substitution with multiply and divide hardware.

What this design chose itself:

- the command interface;
- the reference channel (0);
- the gain format and all internal widths;
- the FFT memory organisation and scaling;
- the array geometry behind the default scan weights;
- the forgetting factor;
- the array size N = 8 (the original gives none);
- real-valued QRD-RLS data;
- running back substitution in a small engine instead of on an embedded
  processor.

Known differences and limits:

- The original split the work over three FPGAs: two for calibration, one
  for beamforming. Here it is one design. The chip-to-chip link is the
  parallel column stream.
- One calibration block stores about 213 kbit: capture RAMs 32 k, output
  RAMs 128 k, FFT working memory 48 k. That is more than the roughly 130
  kbit of block RAM the original block used. The wider FFT working words
  and separate output RAMs cost that memory in exchange for simpler timing.
- The beamformer forms all 200 complex products in one clock. On an FPGA
  of the original's generation this would be far too large. A
  time-multiplexed version would have to accept a column less often than
  every clock.
- Only the direct mapping of the QRD array is built. The linear,
  time-shared mapping is not, and neither is complex-valued data (three
  CORDICs per cell).
- The analog front end, the ADCs, the calibration tone source, splitter,
  switch and probe antenna are outside this RTL. So are the DDC, matched
  filter, Rake fingers and maximal ratio combining of a Rake-beamformer
  system. A testbench stands in for the analog side by generating sampled
  tones.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. With Verilator 5:

```sh
# whole design at default sizes (1024 points, 8 channels, 25 beams, N=8 QRD)
verilator --binary --timing --assert -Irtl rtl/sa_pkg.sv rtl/smart_antenna_top.sv \
          tb/tb_smart_antenna_top.sv --top tb_smart_antenna_top -o sim
./obj_dir/sim

# a single block, e.g. the FFT
verilator --binary --timing -Irtl rtl/fft1024_r4.sv tb/tb_fft1024_r4.sv --top tb_fft1024_r4 -o sim_fft
./obj_dir/sim_fft
```

`-Irtl` lets Verilator find submodules by file name. Pass `rtl/sa_pkg.sv`
first for anything that imports the package. Each testbench compares
against values it computes on its own, mostly in floating point:

- `tb_fft1024_r4`: the FFT against a direct DFT, all 1024 bins, within 2
  LSB.
- `tb_cordic_vectoring`: the CORDIC against `sqrt` and `atan2`.
- `tb_beamformer`: the beamformer against an integer matrix model, bit
  exact.
- `tb_qrd_array`: the QRD array against a floating-point Givens update,
  plus a least-squares solve that must recover the true coefficients.
- `tb_smart_antenna_top`: runs the whole flow described above and counts
  that every mechanism happened at least once. These are capture, both
  calibration modes, weight update, measurement collision, correction,
  streaming, weight rewrite, QRD rows, a solve that has to wait, and the
  singular case.

Latencies and transform times are checked too.
