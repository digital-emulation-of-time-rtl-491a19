# Digital emulation of time-varying PMD for real-time DSP evaluation

This is a synthesizable SystemVerilog model of a real-time test system for
coherent-receiver DSP. The system sends two QPSK polarizations through a
digital polarization-mode-dispersion (PMD) emulator. The emulator is a chain
of waveplate sections. Each section rotates the polarization state and delays
the two polarizations against each other by a fraction of a symbol. The
rotation angles of selected sections change randomly over time. White Gaussian
noise can be added. A receiver then equalizes the signal and counts bit errors
over long runs. This gives bit-error-rate (BER) figures for low error rates
under slowly or quickly drifting PMD, which offline simulation struggles to
reach.

The chain for each polarization (channel 1 = X, channel 2 = Y) is:

```
rng -> qpsk_modulator -> rrc_upsampler -> awgn_channel --+
                                                         |  (X and Y together)
                               pmd_emulator (K waveplate sections + final rotation)
                                                         |
       eq_mode = 0: cma_equalizer (2x2, 11 taps)  -------+
       eq_mode = 1: rrc_downsampler per polarization ----+
                                                         |
                        qpsk_demodulator -> error_counter (vs. delayed rng bits)
```

The top level is `pmd_system_top`.

## Clocking and number formats

- One clock carries one QPSK symbol per polarization. After pulse shaping each
  polarization carries two samples per clock, on lanes 0 and 1; lane 0 is the
  earlier sample. The sample period is therefore T/2.
- Samples are complex. I and Q are each 16 bits two's complement with 13
  fraction bits.
- The QPSK amplitude is 0.5 (4096 LSB). A 0 bit maps to +0.5 and a 1 bit to
  -0.5. Bit 1 of the symbol drives I and bit 0 drives Q.
- RRC taps use 15 fraction bits. Rotation cos/sin values and Lagrange taps use
  14 fraction bits.
- Angles are whole degrees, 0..359, 9 bits wide.
- The shared types, rounding and saturation helpers, and the tables built at
  elaboration are in `pmd_pkg`. These tables are the RRC taps and the cos/sin
  ROM contents. No data files are read.

## Bit source and QPSK mapping

- `rng`: a 32-bit xorshift generator (shifts 13, 17, 5). It delivers BITS
  fresh bits per clock while `en` is high.
- `qpsk_modulator` maps two bits to a symbol, with one register stage.
- `qpsk_demodulator` makes hard decisions from the signs of I and Q, with one
  register stage.

## RRC pulse shaping and matched filter

- The filter is a root-raised cosine with 51 taps at T/2 spacing and roll-off
  0.1. Its taps are scaled to unit energy.
- `rrc_upsampler` is a polyphase interpolator. Lane 0 uses the even taps and
  lane 1 the odd taps. Each phase is a symmetric transposed-form FIR
  (`rrc_phase_fir`) that shares the products of mirrored taps.
- `rrc_downsampler` is the matched filter for the verification setup. It uses
  the same 51 taps in a direct form with pre-adders for the symmetric pairs.
  It outputs one sample per symbol: z[n] = sum_k h_k x[2n-k].

## Noise channel

`awgn_channel` adds independent noise to I and Q of both lanes, giving four
noise sources per polarization.

- Each source (`gauss_gen`) sums twelve uniform bytes taken from two xorshift64
  generators. This approximates a Gaussian (central-limit method) with a
  standard deviation of 512 LSB.
- The noise is scaled by the `sigma` input: n = g * sigma / 512. Results are
  saturated.
- With amplitude A = 0.5 = 4096 LSB and unit-energy filters:
  sigma = 4096 / sqrt(2 * Eb/N0), with Eb/N0 as a linear ratio.

## Waveplate section

`pmd_section` is one fiber section of the waveplate model with phase shift
delta = 0. It works in three steps:

1. **Rotation.** `rot_rom` looks up cos(theta) and sin(theta) in a 360-entry
   table. `pol_rotation` applies the 2x2 rotation [c s; -s c] to the (X, Y)
   pair, on both lanes and on I and Q.
2. **Lagrange coefficients.** `lagrange_coef` computes two coefficient sets of
   an order-4 (five-tap) Lagrange fractional-delay filter
   from the delay input d. Set 1 is for delay D0 + d and set 2 for D0 - d, with
   bulk delay D0 = 2 samples. The two polarizations thus differ in delay by
   2d = tau, the section's differential group delay. The bulk delay keeps the
   "negative" delay causal.
3. **Fractional delay.** Two `frac_delay_fir` instances apply the filters: X
   uses set 1 and Y uses set 2. Each is a two-lane direct-form FIR.

The section latency is 3 clocks.

`d` is given in sample periods with 14 fraction bits, and must satisfy
|d| <= 1. Because one sample is T/2, d equals the DGD in symbol periods. For
example, a DGD of 0.06 T gives d = 0.06 * 16384 = 983.

## PMD emulator and time-varying angles

`pmd_emulator` chains K sections (default 10), followed by a final rotation
that completes the waveplate model.

- Sections selected by `VAR_MASK` get a `theta_gen`. By default these are the
  first, centre and last sections (0, K/2 and K-1).
- Every `period` clocks, `theta_gen` draws a new whole-degree angle, uniform
  over theta_min..theta_max, from its own xorshift generator. A period of 0
  keeps that section at its fixed angle.
- The other sections use their fixed angles.
- Each section has its own `frac_delay` input.
- The latency is 3K + 1 clocks.

## CMA equalizer

`cma_equalizer` is a 2x2 butterfly equalizer with T/2-spaced taps (11 per
filter) and one output per symbol.

- Its input window is u[k] = x[2n-k].
- It adapts every symbol with the constant-modulus rule
  w += mu (R2 - |y|^2) y conj(u).
- The step size is mu = 3355 / 2^24, about 0.0002.
- R2 = 2 A^2 (4096 LSB at amplitude 0.5).
- Taps hold 28 fraction bits. They start as a centre spike on the XX and YY
  filters.
- The update uses the output computed in the same cycle, so the filter has no
  adaptation delay.

## Error counting

`error_counter` compares the demodulated bits with the transmitted bits. It
delays the transmitted bits by a programmable number of clocks through a
circular buffer.

- Counting starts once the buffer holds `delay` entries. This skips the
  symbols still in flight after a reset or a `clear`.
- The 64-bit bit and error counts are outputs.

In the top level the delays are:

- LAT_CMA = 3K + 21 clocks (51 for K = 10);
- LAT_RRC = 3K + 31 clocks (61 for K = 10).

## Top-level configuration

| Quantity | Port | Value |
|---|---|---|
| Section DGD tau (in T) | `frac_delay[k]` | round(tau * 16384), \|tau\| <= 1 T |
| Angle update frequency f | `theta_period[k]` | f_clk / f; at 30 MHz, 1 Hz = 30,000,000 |
| Random angle range | `theta_min`, `theta_max` | degrees |
| Fixed angles | `theta_fixed[k]`, `theta_final` | degrees |
| Eb/N0 | `sigma` | 4096 / sqrt(2 * 10^(EbN0_dB/10)); 4 dB gives 1828, 10 dB gives 916 |
| Receiver | `eq_mode` | 0 = CMA, 1 = matched filter (use sigma = 0 for PMD-only tests) |

After changing settings, pulse `cnt_clear`.

Parameters: K = 10, LAG_TAPS = 5, CMA_TAPS = 11, CMA_MU = 3355, AMP = 4096,
MAX_DELAY = 256.

## Verification

Every module has a self-checking testbench in `tb/`. The checks include:

- the RRC shaper against a real-valued convolution, within 4 LSB;
- the Lagrange taps against the formula in real arithmetic, within 3 LSB;
- the rotation against real cos/sin;
- the CMA on a rotated, attenuated QPSK pair: it must shrink the modulus
  dispersion tenfold and then decide every symbol;
- the noise for mean, standard deviation (within 4 %), fourth moment and
  cross-correlation.

`tb_pmd_system_top` runs the whole system at default parameters and reports
the following.

**Clean link.** Zero errors through both receivers.

**DGD sweep (matched filter, no noise).** Only the first section has a DGD;
the other nine sections and the final rotation have zero delay and zero angle.
The first section's angle is swept from 0 to 45 degrees in 3-degree steps.
Errors per 2878 bits per channel:

| DGD of the section | 0 deg | 15 deg | 18 deg | 21 deg | 30 deg | 45 deg |
|---|---|---|---|---|---|---|
| 0.3 T | 0 | 0 | 1-2 | 4-6 | 98-106 | 706-751 |
| 0.6 T | 55-72 | 151-172 | 200-207 | 231-254 | 376-400 | 732-739 |

**Fine sweep.** This is a lab-style trace: DGD 0.3 T, the angle stepped from
0 to 20 degrees in 1-degree steps of 30,000 symbols, and the counters left
running. It repeats a published measurement of the original FPGA system.
The first errors appear at 14 degrees. The sweep ends with 183 errors per
channel in 1.26e6 bits. The original trace shows its first error at 13
degrees and ends with 270 and 257 errors in 1.25e6 bits.

**Noise calibration.** At Eb/N0 = 4 dB the matched filter gives BER 1.249e-2,
against the Gaussian theory value of 1.25e-2.

**Real-time scenario.** The receiver is the CMA equalizer. Every section has
a DGD of 0.06 T. The fixed angles alternate between 6 and 354 degrees. The
variable sections draw from 0..15 degrees. Eb/N0 is 10 dB.

- *Slow updates.* The first, centre and last sections update at 0.3, 1 and
  0.1 Hz (1e8, 3e7 and 3e8 clocks at 30 MHz), so the angles hold still over
  the simulated span. After 300,000 symbols of convergence, the BER is 7.0e-6
  over 1.0e6 bits. The Gaussian value is 3.9e-6, and the original system's
  long-run measurement for this case is about 5e-6. The check is BER < 4e-5.
- *Fast updates.* All three sections jump every 5000 clocks (6 kHz). The BER
  rises to 1.25e-4 over 4.0e5 bits, because the equalizer must re-converge
  after every jump. The original system, with only the centre section at
  5 kHz, reports about 2e-5 after 2.5e9 bits. The checks are BER > slow BER
  and BER < 1e-3.

**DGD against convergence.** The system is restarted from reset with 1 Hz
updates and a DGD of 0.02 T or 0.06 T per section. During the first 100,000
symbols, 0.02 T makes 1022 errors and 0.06 T makes 6099. Over the next 200,000
symbols both settle near the Gaussian value: 1.4e-5 and 2.4e-5. A smaller DGD
converges faster but reaches the same level.

**Mechanism counts.** The bench counts mode switches, counter clears, angle
updates per variable section, error runs caused by noise, and error runs
caused by PMD.

Each testbench was also run against a copy of its module with one deliberate
bug, such as swapped signals, a flipped sign or a wrong latency. Every such bug made the
testbench fail.

To simulate one testbench with Verilator:

```
verilator --binary --timing -Irtl -y rtl rtl/pmd_pkg.sv tb/tb_pmd_system_top.sv \
  --top-module tb_pmd_system_top && obj_dir/Vtb_pmd_system_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The system
testbench simulates about 2.2 million clocks. Once built, it runs in about
10 seconds.

## Departures from the described system and known limits

- **Not built:** the on-chip logic analyser and the host-side BER calculation.
  The counters are plain output ports instead.
- **Phase shift.** The phase shift delta_k is fixed at 0, as in the described
  experiments. A section has no phase-shift stage.
- **Angle resolution.** Angles have 1-degree resolution. Random angles are
  uniform over an integer range.
- **Design choices.** The Lagrange order (4), the bulk delay (2 samples) and
  all word lengths are this design's own choices.
- **Single section with a DGD of 0.6 T.** Here the matched-filter receiver
  already shows errors at 0 degrees. Each polarization is shifted by
  tau/2 = 0.3 T from the symbol instant. With roll-off 0.1, that offset alone
  closes the eye. The original measurement is error-free at small angles and
  shows its first error at about 13 degrees. That behaviour matches a DGD of
  0.6 *sample* periods (0.3 T). With 0.3 T this design shows its first errors
  at 14 degrees in the fine sweep. The testbench therefore sweeps both
  values. The `frac_delay` scaling (d in samples equals tau in symbols) is
  kept as defined above.
- **CMA convergence time.** With step 0.0002 and amplitude 0.5, the CMA
  needs a few hundred thousand symbols to settle. Until then its BER stays
  well above the Gaussian value. With 120,000 symbols of convergence, the
  fast-update case measured 2.4e-4. The update gradient scales with the
  fourth power of the signal amplitude. A larger `AMP` therefore converges
  faster at the same `CMA_MU`.
- **Simulation length.** The BER-versus-Eb/N0 curves of the real-time
  measurements need 1e9 to 1e12 bits. These runs are beyond practical RTL
  simulation. The testbench runs shortened versions of each scenario.
- **Higher-order formats.** Only QPSK modulation and demodulation are built.
  The PMD emulator and the noise channel act on any complex samples and need
  no change for other formats. The CMA's single-modulus target suits QPSK.

## Files

- `rtl/pmd_pkg.sv` — types, formats, RRC and cos/sin tables.
- `rtl/rng.sv`, `rtl/qpsk_modulator.sv`, `rtl/qpsk_demodulator.sv` — bit source and QPSK mapping.
- `rtl/rrc_upsampler.sv`, `rtl/rrc_phase_fir.sv` — polyphase RRC pulse shaper.
- `rtl/gauss_gen.sv`, `rtl/awgn_channel.sv` — Gaussian noise.
- `rtl/rot_rom.sv`, `rtl/pol_rotation.sv` — polarization rotation.
- `rtl/lagrange_coef.sv`, `rtl/frac_delay_fir.sv` — fractional delay.
- `rtl/pmd_section.sv`, `rtl/theta_gen.sv`, `rtl/pmd_emulator.sv` — waveplate sections and emulator.
- `rtl/cma_equalizer.sv`, `rtl/rrc_downsampler.sv` — receivers.
- `rtl/error_counter.sv` — BER counting.
- `rtl/pmd_system_top.sv` — complete system.
- `tb/tb_<module>.sv` — one self-checking testbench per module.
