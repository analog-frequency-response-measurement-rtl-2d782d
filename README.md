# DDS-based self-test for the gain and phase of an analog path

A mixed-signal chip already has a DAC, an analog signal path and an ADC.
This RTL reuses them to measure the analog path's frequency response on
chip, in both gain and phase. The test logic sits entirely on the digital
side. A direct digital synthesizer (DDS) plays a test tone into the DAC. The
tone passes through the analog circuit under test and comes back through the
ADC. Two multiplier/accumulators then correlate the returned samples with a
cosine and a sine of the same frequency.

The key idea is that this one pair of correlations gives both quantities:

* The two accumulator values, DC3 (in-phase) and DC4 (quadrature), are the
  phase delay of the path in polar form.
* Their signs give the quadrant, and their ratio gives the angle. No
  arctangent table is needed.
* The amplitude, corrected for the phase, follows from the same two numbers.

A naive single-correlator gain test reads low whenever the analog path
delays the tone. Here the phase delay is measured and taken out in the same
accumulation. No second pass with a phase-shifted tone is needed.

The same hardware also runs a two-tone linearity test. Two tones are summed
into the DAC. One accumulator measures the response at one tone (gain), and
the other measures it at the third-order intermodulation frequency
2·f2 − f1 (IM3). Both values are compared against limits.

## Measurement principle

Let the DAC tone be `A·cos(ωt)` and let the analog path return
`A1·cos(ωt − Δφ) + k`, where `k` is an unknown DC offset. The two correlators
form

```
DC3 = Σ  A·cos(ωt) · ADC  ≈ (A·A1/2)·N·cos Δφ
DC4 = Σ  A·sin(ωt) · ADC  ≈ (A·A1/2)·N·sin Δφ
```

over N samples. The 2ω products and the offset `k` average out, and they
cancel exactly when N covers a whole number of periods. The results are:

* phase delay: `Δφ = atan2(DC4, DC3)`;
* phase-corrected amplitude: `(A·A1/2)·N = DC3/cos Δφ = DC4/sin Δφ = sqrt(DC3² + DC4²)`.

Comparing the amplitude with the one measured at a low frequency gives the
gain in dB. `A` is 127 codes for 8-bit samples.

The arithmetic in the analyzer (`freq_analyzer`) avoids trigonometric
tables:

1. **Quadrant** from the two sign bits:

   | DC3 | DC4 | quadrant | Δφ |
   |-----|-----|----------|----|
   | ≥0 | ≥0 | 0 (0–90°) | a |
   | <0 | ≥0 | 1 (90–180°) | 180° − a |
   | <0 | <0 | 2 (180–270°) | 180° + a |
   | ≥0 | <0 | 3 (270–360°) | 360° − a |

2. **Angle inside the quadrant**, `a`: a sequential divider forms
   `x = min(|DC3|,|DC4|) / max(|DC3|,|DC4|)`, so `0 ≤ x ≤ 1`.
   * If `|DC4| ≤ |DC3|`, then `a = atan(x)`.
   * Otherwise `a = 90° − atan(x)`.

   For small x, `atan(x) ≈ x`. That is the plain rule, selected with
   `ADJUST = 0`, and it is good to about 0.1° below 5°. Near 45° the plain
   rule is off by up to 12°. The default, `ADJUST = 1`, therefore uses
   `atan(x) ≈ x·(π/4 + 0.273·(1 − x))`, which stays within about 0.25° over
   the whole octant.

3. **Amplitude** `sqrt(DC3² + DC4²)`, from a sequential integer square root.
   This is the same value as DC3/cos Δφ, computed without a cosine.

The phase is a binary angle: `phase / 2^16` of a full turn, positive for a
lag. Its top `P` bits can be written back as the generator's phase
adjustment. The DAC tone is then advanced by the measured lag, the returned
tone arrives in phase with the cosine reference, DC4 reads about 0, and DC3
carries the whole amplitude. The end-to-end testbench exercises this
correction. The main flow does not need it, because the analyzer already
corrects the amplitude.

## Structure

```
             fr / f1,f2          phase_adj
                 |                   |
      +----------v-------------------v------+    dac_o      +-----+   +---------+   +-----+
      | dds_tpg                             |-------------->| DAC |-->| circuit |-->| ADC |--+
      |  3 x dds_nco -> 3 x sincos_rom      |               +-----+   +---------+   +-----+  |
      +---------+---------------+-----------+                                              |
          ref_a |         ref_b |                                              adc_i       |
                v               v     <--------------------------------------------------- +
          +-----------+   +-----------+
          | ora_mac A |   | ora_mac B |     (Accumulator3 / Accumulator4)
          +-----+-----+   +-----+-----+
            dc3 |           dc4 |
                +-------+-------+----------------------+
                        v                              v
                +---------------+        +----------------------------+
                | freq_analyzer |        | spec_comparator x2         |
                | phase, amp    |        | gain >= spec, IM3 <= spec  |
                +---------------+        +----------------------------+
   bist_controller: frequency word, clears, settle window, accumulation window, analyzer start
```

| file | role |
|------|------|
| `rtl/bist_pkg.sv` | default sizes; `bist_mode_e` (frequency response / linearity), `sweep_e` (linear / octave) |
| `rtl/bist_top.sv` | the complete self-test; DAC, circuit and ADC attach at `dac_o`, `adc_i`, `sample_en` |
| `rtl/dds_nco.sv` | n-bit phase accumulator; its top p bits address the table |
| `rtl/sincos_rom.sv` | 2^p × D cosine table, offset binary, computed at elaboration |
| `rtl/dds_tpg.sv` | tone generator: three accumulators, three table reads, mode multiplexing |
| `rtl/ora_mac.sv` | sign-magnitude multiplier and 2D+M-bit accumulator |
| `rtl/freq_analyzer.sv` | quadrant, angle and amplitude from DC3/DC4 |
| `rtl/seq_divider.sv`, `rtl/int_sqrt.sv` | sequential divider and square root used by the analyzer |
| `rtl/spec_comparator.sv` | pass/fail against a limit |
| `rtl/bist_controller.sv` | sweep and measurement sequencer |

### Tone generator (`dds_tpg`)

On each sample strobe, a phase accumulator adds the frequency word. The tone
frequency is `f_sample · fr / 2^16`. The top 10 bits address a
1024-entry cosine table, whose entries are
`128 + round(127·cos(2π·i/1024))`. The sine reference is the same table
read a quarter turn earlier, which is done by changing the two phase MSBs.

The generator has two modes:

* **Frequency response:** the DAC gets `cos(ωt + adj)`, reference A gets
  `cos ωt` and reference B gets `sin ωt`.
* **Linearity:** three accumulators run at f1, f2 and 2·f2 − f1. The DAC
  gets `(cos f1 + cos f2)/2`, reference A gets `cos f2` and reference B gets
  `cos(2f2 − f1)`.

Each table read has one output register. The DAC code and both references
therefore change on the same clock, and any delay between `dac_o` and
`adc_i` appears as phase delay.

### Multiplier/accumulator (`ora_mac`)

The table codes are offset binary, with mid-scale 128 meaning zero. Before
the multiplier, each reference code is split into a sign and a magnitude
`|u − 128|`. This removes the generator's DC level. The magnitude is
multiplied by the unsigned ADC code. The sign then chooses whether the
product enters the adder as it is or in two's complement, so the
accumulator's adder also does the subtraction.

The ADC's own mid-scale, and any offset of the analog path, correlate with a
zero-mean reference and vanish. The accumulator is 2D+M = 33 bits wide,
enough for fewer than 2^17 samples of full-scale products. A sample enters
the accumulator two clocks after its `en`.

### Controller (`bist_controller`) and timing

All settings are sampled on `start`. Each frequency step then runs these
states:

1. **CLEAR** (one clock): empties both accumulators. On the first step it
   also resets the generator phases.
2. **SETTLE**: waits `settle` samples for the analog path's transient to die
   out.
3. **ACCUM**: gates exactly `n_samples` strobes into both accumulators, so
   both end at the same N.
4. **DRAIN** (4 clocks): lets the multiplier pipeline drain.
5. **ANALYZE**: starts the analyzer and waits for it (frequency-response
   mode only).
6. **REPORT**: raises `step_done` for one clock. `step_idx`, `step_fr`,
   `dc3`, `dc4`, `phase`, `amp` and `quadrant` belong to the step during
   that clock.

After REPORT, the frequency word moves by `fr_step` or doubles, depending on
`sweep`. After `num_steps` steps, `sweep_done` is high together with the
last `step_done`. In linearity mode the controller makes one measurement
and skips the analyzer. The comparators register their results on
`step_done`, and `gain_valid`/`im3_valid` rise one clock later.

One step takes `(settle + N)` sample periods plus about 7 clocks of overhead and
the analyzer's `max(ANG_W + 3, ACC_W + 2) = 35` clocks.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `D` | 8 | DAC/ADC/table sample width |
| `FREQ_W` | 16 | frequency word and phase accumulator width (n) |
| `P` | 10 | phase bits kept for the table (p) |
| `M` | 17 | N must be below 2^M |
| `ACC_W` | 2D+M = 33 | accumulator width |
| `ANG_W` | 16 | phase result width (binary angle) |
| `STEP_W`, `SETTLE_W` | 8, 16 | sweep length and settle counter widths |

D = 8 follows the original hardware, which used the 8 MSBs of a 12-bit DAC
and ADC. The other widths are choices of this RTL.

## Departures from the original description and design choices

* **Accumulator width.** The sizing rule "2D+M bits for fewer than 2^M
  samples" is followed. One account of the original FPGA build gives
  16-bit accumulators. That cannot hold the roughly 3·10^8 values it
  reports after about 1.3·10^5 samples, so 33 bits are used here.
* **Sign of the phase adjustment.** The phase adjustment *advances* the DAC
  tone. This brings the returned tone in phase with the reference, which is
  the stated purpose. The original's formula for the adjusted tone has the
  opposite sign.
* **Arctangent near 45°.** The correction near 45° (`ADJUST = 1`) is a
  standard approximation. The original only says that an adjustment is
  needed there.
* **Amplitude.** The amplitude is computed as `sqrt(DC3² + DC4²)`, which is
  equal to DC3/cos Δφ.
* **Two-tone linearity mode.** The mode follows the block diagram of the
  complete self-test. The choices made here are:
  * the two-tone sum is halved to fit D bits;
  * 2·f2 − f1 is computed from f1 and f2;
  * the phase adjustment is not applied in this mode;
  * the gain limit is a lower bound and the IM3 limit an upper bound, both
    on the magnitude.
* **Controller.** It is this design's own: the settle window, the state
  sequence, and the octave sweep law.
* **Host interface.** The original drove the test from a PC through a host
  interface whose protocol is not specified. Its registers are ports of
  `bist_top` here.
* **Not included:**
  * the delta-sigma noise shaping mentioned for shrinking the generator;
  * the single-MAC variant, which measures DC3 and DC4 in two passes;
  * the analog DAC, deglitch filter, circuit under test and ADC.
* **Reset.** All registers have an asynchronous active-low reset.

## How far it is verified

Every module has a self-checking testbench in `tb/`. Each compares against
values the testbench computes itself, such as a reference phase model, a
cosine table from `$cos`, and exact sums of products. The end-to-end tests
use `tb/dut_channel_model.sv`. This behavioural model of DAC, first-order
low pass (`y += α(x − y)`), gain, DC offset, optional cubic distortion,
latency and 8-bit ADC has the known response
`H(z) = G·α·z^−(1+LAT) / (1 − (1−α)z^−1)`.

* `tb_bist_top` runs at the default sizes. It covers:
  * an octave sweep of 6 steps, with phases from 7° to 128°, so both the
    first and second quadrant;
  * a linear sweep with a sample every second clock;
  * a phase-corrected re-measurement, which reads within 1.5° of 0;
  * three two-tone tests: all pass, IM3 fails on a distorting circuit, and
    gain fails on a strict limit.

  Phases agree with the closed-form response within 1.5° and amplitudes
  within 3 %. The testbench counts each mechanism and fails if one never
  happened.
* `tb_bist_fig5` makes one full-length measurement at the default sizes.
  It uses N = 2^17 − 1 samples, a tone at 1/1024 of the sample rate and a
  low pass that delays it by 79°. It reads 78.9° and the amplitude within
  0.2 %, with no accumulator overflow.

* `tb_bist_sweep` runs a seven-step octave sweep, with frequency words 1 to
  64 and N = 2^17 − 1 at each step, through such a low pass. The phase
  curve runs from 4.7° to 78.9° and the gain curve from 0 to −14.3 dB. Both
  stay within 0.3° and 0.05 dB of the closed-form response.

Not verified: behaviour on real converters, and the frequency points of a
real sweep, since the sample rate of the original hardware is not known.

## Simulating

Everything is plain SystemVerilog and runs with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with any other testbench in `tb/`, for example
`tb_freq_analyzer`, `tb_bist_fig5` or `tb_bist_sweep`. Each prints
`TB_RESULT checks=N failures=F` and stops by itself. All of them finish in
well under a second.

To measure your own analog path in a system, connect `dac_o` to the DAC and
`adc_i` to the ADC. Pulse `sample_en` at the converter rate. Choose `N` to
cover a whole number of tone periods where possible: the residue from the
2ω term shrinks as 1/N otherwise. Choose `settle` to be several time
constants of the path.
