# On-chip gain and phase measurement with a DDS stimulus and a MAC analyzer

This is synthesizable SystemVerilog for the digital half of a mixed-signal
built-in self-test (BIST). It measures how an analog path changes a sine
wave: the path's gain in dB and its phase delay, at one frequency per run.
Sweeping the frequency gives the path's frequency response.

The idea fits in two lines. An oscillator sends a digital sine, cos(wn), out
through the system's own DAC. The ADC brings the response f(n) back, and two
multiplier/accumulators correlate it with a cosine and a sine of the same
frequency:

    DC1 = sum f(n) * cos(wn)          DC2 = sum f(n) * sin(wn)

If the response is A*cos(wn - phi), then DC1 is proportional to A*cos(phi)
and DC2 to A*sin(phi). So phi = atan2(DC2, DC1) is the phase delay, and
sqrt(DC1^2 + DC2^2) is proportional to A. This is one bin of a Fourier
transform at a frequency you choose. It costs two multipliers and two
adders, not an FFT.

The design follows the BIST architecture described in *Phase Delay
Measurement and Calibration in Built-In Analog Functional Testing*: a
three-oscillator pattern generator, a MUX-selected return path, a two-MAC
analyzer, the octant-folded arctangent, and dB amplitude in the log domain.
That source does not give several details. This design chooses them, and
each file's header comment lists its choices. The
"Departures and open points" section below collects them.

## Block structure

```
                 +----------------------- tpg -----------------------+
 freq/theta ---> | NCO1 --+--------------> MUX1 --- tone -------------+---> dac_data ---> [DAC] --+--> [DUT] --+
                 | NCO2 --+--(+)/2 ------> MUX2 --- f1 (cosine ref)   |                           |            |
                 | NCO3 ------------------------- f2 (sine ref)      |                           +--> MUX3 <--+
                 +----------------------------------------------------+                  mux3_bypass     |
                                  tone ---+                                                         [ADC]
                                          v                                                          |
                 +---------------------- ora -------------------------+                              |
                 |  MUX4 (internal | ADC) <--------------------------------------------- adc_data <--+
                 |    f(n) --> x f1 --> Accum1 --> DC1                |
                 |    f(n) --> x f2 --> Accum2 --> DC2                |
                 +----------------------------------------------------+
  test_controller: restarts the NCOs, clears and enables the accumulators
  phase_calc:      DC1, DC2 -> phase delay (binary angle)
  amp_db:          DC1, DC2 -> 10*log10(DC1^2 + DC2^2)
```

Everything in square brackets is analog and sits outside `bist_top`: the DAC
with its low-pass amplifier, the DUT, the analog loopback switch (MUX3) and
the ADC. `bist_top` drives `dac_data` and `mux3_bypass` and receives
`adc_data`.

| file | module | role |
|---|---|---|
| `rtl/bist_pkg.sv` | package | default widths, tone and path encodings |
| `rtl/nco.sv` | `nco` | phase accumulator, phase truncation, sine table |
| `rtl/tpg.sv` | `tpg` | three NCOs, two-tone adder, MUX1, MUX2 |
| `rtl/mac.sv` | `mac` | N x N signed multiplier into an M-bit accumulator |
| `rtl/ora.sv` | `ora` | MUX4 and the two MACs (DC1, DC2) |
| `rtl/test_controller.sv` | `test_controller` | sequences one measurement |
| `rtl/phase_calc.sv` | `phase_calc` | phase delay from DC1/DC2 |
| `rtl/amp_db.sv` | `amp_db` | amplitude in dB from DC1/DC2 |
| `rtl/bist_top.sv` | `bist_top` | the whole digital BIST |

## One measurement, cycle by cycle

Set `freq`, `theta`, `mux1_sel`, `mux2_sel`, `path_sel`, `k_len` (K) and
`settle` (S), then pulse `start` in cycle t. Then:

| cycle | event |
|---|---|
| t+1 | `nco_sync`: every NCO loads its `theta`; both accumulators clear |
| t+3 | first oscillator sample (phase = theta) at the NCO outputs |
| t+3+S .. t+2+S+K | accumulate: K cycles. The first S cycles are for the analog path to fill with the new tone. |
| t+3+S+K | `meas_done`; `dc1`/`dc2` are final and stay put until the next start |
| +4 | `amp_valid`, `amp_db_out` |
| +17 | `phase_valid`, `phase`, `phase_offset` |

`busy` stays high from the start until the phase result is out. In the
usual set-up, NCO1 makes the stimulus (`theta` = 90 deg, a cosine) through
MUX1. NCO2 runs at the same frequency and phase and gives the cosine
reference through MUX2. NCO3 gives the sine reference (`theta` = 0). For a
two-tone linearity test, MUX1 takes the sum of NCO1 and NCO2 and MUX2
takes NCO1, so the analyzer looks at the NCO1 tone.

Choose K as a whole number of tone periods. Over whole periods the
double-frequency part of f(n)*cos(wn) sums to zero. Otherwise it leaves a
residue that shows up as a phase error. That error is largest when K covers
only a few periods, and it goes up and down with frequency. In the
frequency-sweep test at 48.5 MHz with a fixed K = 65,536 cycles, the error
is 4.6 deg at 1 kHz (1.35 periods) and mostly below 0.2 deg above 20 kHz.
With whole periods it is zero at every frequency.

The sums cannot overflow while K < 2^(M-2N). At the defaults (M = 40,
N = 8) that is 16.7 million cycles, 0.35 s at 48.5 MHz. `k_len` is exactly
M-2N bits wide, so that limit is built in.

## Phase alignment is the whole game

The analyzer only sees relative phase. Any clock cycle of delay between the
stimulus and the references reads as a phase delay of 360 * f_tone / f_clk
degrees. That error grows linearly with frequency and looks just like a
real analog delay. Two rules in this design follow from that:

* **Internal loopback adds no register.** `tone`, `f1` and `f2` all come
  from the NCO output registers through combinational logic. MUX4 is
  combinational. So on the internal path the sample and both references
  meet in the multipliers in the same cycle, and the path reads as exactly
  0 deg. `path_sel = PATH_INTERNAL` is the self-check of the digital part.
  `tb_ora` and `tb_bist_top` both flag a register added to that path.
* **The converters are calibrated separately.** With `PATH_BYPASS`, MUX3
  sends the DAC output straight to the ADC. This measures the delay of the
  DAC, its amplifier and the ADC alone. A DUT measurement (`PATH_DUT`)
  includes that delay, so subtract the bypass phase at the same frequency
  to get the DUT's own phase.

There is another way to remove a known phase. Shift both reference
oscillators' `theta` by the measured phase (binary angle `phase` << 8). The
same path then reads 0 deg, and DC1 alone carries the amplitude. The
end-to-end test does this. The dB unit does not depend on this step,
because it uses DC1 and DC2 together.

## From DC1/DC2 to a phase without a full arctangent table (`phase_calc`)

A full-range atan2 table indexed by a 40-bit ratio is out of the question.
The unit cuts the problem down in three steps.

1. **Fold to one octant.** The sign bits of DC1 and DC2 give the quadrant.
   Comparing |DC1| with |DC2| gives the half of the quadrant. Only
   phi_o = atan(min/max) in [0, 45 deg] is computed, and this table
   restores the full angle (a zero counts as positive):

   | signs | abs(DC1) >= abs(DC2) | abs(DC1) < abs(DC2) |
   |---|---|---|
   | DC1 >= 0, DC2 >= 0 | phi_o | 90 - phi_o |
   | DC1 >= 0, DC2 < 0  | 360 - phi_o | 270 + phi_o |
   | DC1 < 0,  DC2 >= 0 | 180 - phi_o | 90 + phi_o |
   | DC1 < 0,  DC2 < 0  | 180 + phi_o | 270 - phi_o |

2. **Form the ratio.** A restoring divider makes r = min/max with R = 14
   fraction bits, one bit per clock. That takes R+1 = 15 cycles, which is
   most of the 17-cycle latency.

3. **Small ratios need no table.** For r < 1/16, atan(r) is replaced by r
   itself, converted from radians to binary angle. The error there is under
   0.005 deg. The table covers only 1/16 <= r <= 1, in steps of 1/64: 62
   entries of atan(i/64), i = 4..65, stored with 4 extra fraction bits. It
   is computed at elaboration from `$atan`. The unit interpolates linearly
   between neighbouring entries.

The output is a 16-bit binary angle: 65,536 = 360 deg, one LSB = 0.0055 deg.
The unit testbench sweeps all eight octants and 1,500 random pairs. Every
result is within 2 LSB (0.011 deg) of floating-point atan2. DC1 = DC2 = 0
has no phase, so it gives `phase_zero` and phase 0.

## Amplitude in dB (`amp_db`)

The amplitude is sqrt(DC1^2 + DC2^2). In dB the square root becomes a
factor of 1/2:

    20*log10(A) = 10*log10(S) = (10 / log2(10)) * log2(S),   S = DC1^2 + DC2^2

The pipeline has four stages:
1. two exact 2M-bit squares;
2. their sum, 2M+1 bits;
3. log2 by linear approximation: with S = 2^e * (1 + x), take log2 S as
   e + x, using the leading-one position e and the next 10 bits as x;
4. multiply by 3.0103 (a Q2.14 constant).

The output is unsigned with 8 fraction bits. It reads low by at most
0.26 dB, the worst case of the e + x approximation, and is exact at powers
of two. 0 dB is an accumulated value of 1. A full-scale sine correlated over
K cycles gives about 20*log10(127*127*K/2), so compare measurements with each
other, not with that absolute level. Both DC values are used, so the
amplitude does not depend on the phase estimate.

## Oscillator (`nco`)

A 24-bit accumulator adds `freq` every clock, so
f_tone = freq * f_clk / 2^24 (2.9 Hz steps at 48.5 MHz). The top 10 bits
address a 1,024-entry full-wave table of round(127*sin(2*pi*i/1024)). The
table is computed at elaboration. A cosine is the same table with
`theta` + 90 deg (`theta` = 0x400000).

## Parameters

| parameter | default | origin |
|---|---|---|
| N (sample, reference and multiplier bits) | 8 | 8-bit DAC and ADC of the original prototype |
| M (accumulator bits) | 40 | one of the tabulated configurations (28..44); this design's pick |
| ACC_W (phase accumulator) | 24 | this design |
| LUT_W (sine table address) | 10 | this design |
| AW (phase result) | 16 | this design |
| R, L, G (divider bits, table step, guard bits) | 14, 6, 4 | this design |
| DB_BITS / DB_FRAC, LF | 16 / 8, 10 | this design |
| SW (`settle` width) | 16 | this design |

Every module takes these as parameters. `mac` has been simulated at
N = 12, M = 32 and N = 16, M = 44 as well.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_nco` | accumulator sequence, every sample against a computed sine, 2-cycle sync latency, period |
| `tb_tpg` | all nine MUX1/MUX2 settings against three reference oscillators, two-tone halving |
| `tb_mac` | three sizes against 64-bit sums, clear priority, full-scale products |
| `tb_ora` | MUX4 and both sums against reference sums |
| `tb_test_controller` | exact cycle of every control output for many K and S; start ignored while busy |
| `tb_phase_calc` | all octants, axes, equal magnitudes, small ratios, extremes; 17-cycle latency |
| `tb_amp_db` | bit-level model of the log approximation; within 0.27 dB of exact; 4-cycle latency |
| `tb_bist_top` | whole design at default sizes with an analog model: see below |
| `tb_freq_sweep` | 1-50 kHz sweep at 48.5 MHz: internal path 0 deg, fixed-K error, converter delay |

`tb_bist_top` puts a behavioural analog path behind `bist_top`: a
D-cycle delay, an optional first-order low-pass as DUT, and 8-bit rounding
and clipping. It predicts DC1/DC2 exactly from the samples it returned,
using its own oscillator model. It then checks the phase against atan2 of
those sums and against the model's known delay, and the dB value against
10*log10. It runs these cases: internal loopback, the converter path at
eight delays (one per octant), the low-pass DUT (within 0.03 deg of its
analytic phase), a two-tone stimulus, phase compensation via `theta`, and a
partial-period accumulation. It fails if any case never ran.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/bist_pkg.sv \
          tb/tb_bist_top.sv --top-module tb_bist_top -Mdir obj
./obj/Vtb_bist_top
```

Use the same command for any other testbench, with its file and module
name. Everything runs in seconds. The top-level tests use the default
parameters.

## Departures and open points

* **Multiplexer inputs.** The block diagram shows MUX1 and MUX2 fed from
  NCO1, NCO2 and their sum, without fixing exactly which input goes where.
  Here both multiplexers can pick any of the three.
* **Two-tone sum** is halved to stay within N bits.
* **Test controller** is only named in the source architecture. The
  settle wait, the 2-cycle restart and the done pulse are this design's.
* **Return-path encoding** (`path_sel`, `mux3_bypass`) is this design's.
* **Arctangent details.** The threshold (1/16), the table step (1/64), the
  interpolation and the divider are this design's. The octant folding and
  the "ratio instead of arctangent for small ratios" idea follow the
  source.
* **Log approximation.** The source allows a table or a linear
  approximation; this is the plain linear one, up to 0.26 dB low. A small
  correction table on x would tighten it if needed.
* **Not built.** Amplitude correction by dividing by cos(phi) is a
  listed alternative that needs a divider and a sine. The analog parts
  (DAC, amplifier, DUT, MUX3, ADC) are only modelled in the testbenches.
* **Reset** is asynchronous, active low, to zero, in every module.
* **Number formats.** Samples are two's complement, so offset-binary
  converters need their MSB inverted at the boundary. The 48.5 MHz clock
  rate of the prototype is only used as a test condition. No timing
  closure was attempted.
