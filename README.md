# Digital gamma-ray spectrometer: trapezoidal shaper and multichannel analyzer

A germanium detector and its charge-sensitive preamplifier turn every gamma
photon into a voltage step that decays exponentially (time constant τd, 5 µs
here). The height of the step is proportional to the photon's energy. A
spectrometer measures that height for every pulse and builds a histogram of
heights: the energy spectrum of the source.

This RTL is the digital part of such a spectrometer, the logic behind a 14-bit
ADC. It does three things:

1. It reshapes each exponential pulse into a **trapezoid** whose flat top equals
   the pulse height. A flat top is easy to measure, tolerates slow charge
   collection (ballistic deficit) and filters noise. The trapezoid also ends
   quickly, so neighbouring pulses pile up less.
2. It detects when each trapezoid starts to fall. It then reads a flat-top sample
   taken a fixed time earlier and turns it into one of **1024 channels**.
3. It **counts** the pulses of each channel in a dual-port RAM. It streams the
   whole histogram, as (channel, count) packets, over AXI4-Stream to a processor
   that passes them on to a display.

Beside the MCA, a small **trace capture** records the input and the trapezoid of
one pulse, so the shaping can be inspected on a PC.

Everything runs at one sample per clock. The default sampling period is 10 ns
(100 MHz).

```
adc_data ─► reg ─► sign_inverter ─► trapezoidal_filter ───────────────► mca ─► AXI4-Stream
                    (invert)        stage1 → stage2 → stage3 → stage4   │
                                    1-βz⁻¹   A-sum    (A+B)-sum   1/A   ├ mca_fall_detector
                                                                        ├ mca_channel_converter
                                                                        ├ mca_maxima_capture
                                                                        └ mca_histogram
                                              └──────────────► trace_capture ─► RAM read port
```

## The trapezoidal shaper

An ideal exponential pulse `E·βⁿ`, with `β = exp(-Δt/τd)`, becomes a symmetric
trapezoid of height `E` under

```
H(z) = (1 - β z⁻¹) · (1 - z⁻ᴬ)/(1 - z⁻¹) · (1 - z⁻⁽ᴬ⁺ᴮ⁾)/(1 - z⁻¹) · z⁻¹/A
```

Here `A` is the length of each sloped edge and `B` the length of the flat top,
both in samples. The defaults are `A = 300` (3 µs) and `B = 200` (2 µs), so a
trapezoid lasts `2A + B = 800` samples. The four factors are four cascaded
recursive stages:

| stage | module | recursion | what comes out |
|---|---|---|---|
| 1 | `dts_stage1` | `I(n) = V(n) − β·V(n−1)` | the exponential collapses into one impulse |
| 2 | `dts_stage2` | `R(n) = R(n−1) + I(n) − I(n−A)` | a rectangle A samples long |
| 3 | `dts_stage3` | `T(n) = T(n−1) + R(n) − R(n−A−B)` | a trapezoid A times too high |
| 4 | `dts_stage4` | `V_TPZ(n) = T(n−1)/A` | the trapezoid at the pulse height |

Stage 1 only cancels the pulse exactly if `β` matches the preamplifier's decay
time. `BETA` is a parameter: `round(exp(-Δt/τd)·2²³)`, which is 8371848 for
10 ns and 5 µs.

### Word lengths

All words are signed fixed point. "W.F" means W bits, F of them fractional.

| signal | format | why |
|---|---|---|
| ADC sample V | 14.13 | 14-bit ADC, range ±1 |
| β | unsigned 23.23 | β's rounding error (at most 2⁻²⁴) is summed over the A-sample window of stage 2; 23 bits keep the result below the ADC's 2⁻¹³ step |
| β·V(n−1) | 24.23, rounded, saturated | |
| I, stage 2 subtractor and accumulator | 25.23, wrapping | the stage 2 sum of a pulse is bounded by its height, so 2 integer bits suffice |
| R (stage 2 output) | 16.14, rounded | the ADC quantisation noise dominates, so 14 fraction bits are enough |
| stage 3 subtractor and accumulator | 26.14, wrapping | 10 bits of growth for A + B < 1024 |
| 1/A | unsigned 18.18 | `round(2¹⁸/A)` = 874 for A = 300 |
| V_TPZ (filter output) | 16.14, rounded, saturated | |

Rounding is to nearest with ties away from zero. The two accumulators may wrap
safely: a moving sum built as "add the new sample, subtract the one that leaves
the window" is exact in modular arithmetic. This holds only because the delayed
copy has exactly the same bits as the sample that entered. For that reason stage
2 delays I at the full 25-bit width.

### Delay lines

Delays of 300 and 500 samples are too long for register chains. `delay_line` is
a 1024-word RAM used as a circular buffer. A counter runs through addresses
`0 … len−1`. Each clock it reads the old word at the counter address and writes
the new sample in its place. An input register, the registered RAM read and an
output register add three clocks, so the total delay is `len + 3`. The stages
therefore program `A − 3` and `A + B − 3`.

Until the counter has wrapped once, the output is forced to zero. This makes the
delay line behave as if the RAM had been cleared at reset, without a clearing
pass.

### Latency

The filter holds 1 + 2 + 1 + 2 = 6 registers, one of which is the `z⁻¹` of the
last stage. A sample on `vin` in clock n gives `T(n)/A` on `vout` in clock n+6.
The top adds one register for the ADC and one for the sign inverter.

## Measuring the height: the fall detector and the 320-sample delay

This is the least obvious part of the design. The height is read on the flat
top, but the logic only knows where the flat top was once the trapezoid has
started to fall. So the MCA watches the fall, and it reads a delayed copy of the
trapezoid.

**Fall detection (`mca_fall_detector`).** It forms a derivative spread over 10
samples, `d(n) = V(n) − V(n−10)`. A first-order low-pass filter
`y ← y + a·(d − y)` with `a = 0.001` smooths it. The sign bit of `y + c` is
then taken, with a small offset `c = 0.0001` so that noise on the flat top does
not count as a fall. `falling` is high while this sign bit has been negative for
two samples in a row.

The low-pass filter is slow: its time constant is 1000 samples. It first charges
positive during the rise. It then crosses −c about **200–230 samples after the fall
begins**: 202 samples for a full-scale pulse, 230 for a 10 % pulse.

**Channel conversion (`mca_channel_converter`).** The trapezoid is delayed by
320 samples. At the moment of detection, the delayed stream shows the sample
from 90–120 samples before the fall, inside the 200-sample flat top. Two
successive delayed samples are averaged and multiplied by 1023. The integer part
is the channel. Negative heights give channel 0; heights above full scale are
clamped to channel 1023.

**Capture (`mca_maxima_capture`).** On the rising edge of `falling`, and only
when the channel is above 0, the channel is output for exactly one clock.
Otherwise the output is 0, so channel 0 also means "no event".

Consequences an engineer should know:

* **Detection threshold.** `a` and `c` together set the smallest pulse that is
  seen. Below about 3 % of full scale (about channel 30), the filtered
  derivative never drops below −c and the pulse is not counted. The MCA
  testbench checks that a 1 % pulse is ignored.
* **Recovery time.** After a large pulse, `y` stays below −c for a long time.
  After a full-scale pulse this lasts about 3500 samples past the fall. A second
  pulse whose fall comes inside that window produces no new rising edge and is
  lost. The parameters assume a pulse period much longer than that: 100 µs =
  10000 samples in the reference configuration.
* **Pile-up.** Two pulses closer than the trapezoid length give one event, at
  the height of their sum (clamped). No pile-up rejection is built.
* `a`, `c`, the 10-sample spread and the 320-sample delay are tuned together for
  A = 300, B = 200. If you change A or B, re-tune them: detection must fall
  between `DELAY − B` and `DELAY` samples after the fall starts.

## Histogram and readout (`mca_histogram`)

The counts sit in a 1024 × 16-bit RAM with two ports.

* **Port A counts.** An event reads its channel in one clock and writes the
  count plus one in the next. Counts saturate at 65535. Events are always at
  least two clocks apart, because each needs a low-to-high edge; an assertion
  checks this.
* **Clearing.** After reset, port A writes zero to all 1024 channels, which takes
  1024 clocks. `ready` is low during that time. Events arriving then are
  dropped and counted on `dropped`.
* **Port B reads out.** A channel counter scans the RAM over and over. Each
  channel is sent as one AXI4-Stream beat:

  ```
  TDATA[31:26] = 0   TDATA[25:16] = channel   TDATA[15:0] = count
  TLAST = 1 on channel 1023
  ```

  TVALID and TDATA stay stable until TREADY; a second assertion checks this. A
  beat takes at least three clocks (set address, read, offer), so a full
  spectrum takes at least 3072 clocks. Counting continues during readout, so a
  scan is a live snapshot, not an atomic one.

## Trace capture (`trace_capture`)

The trace capture shows what the shaper does to real pulses. While armed, it
watches the trapezoid. The first sample above `trace_threshold` starts a
capture. From then on, each clock's pair of values is written to a 1024-entry
RAM at consecutive addresses: the filter input (after the sign inverter) and
the trapezoid. Writing stops at the first sample at or below the threshold, or
when the RAM is full. The trace is then held, and later pulses are ignored,
until `trace_arm` is pulsed. The block is armed after reset.

Only the part above the threshold is kept. The trace therefore starts part-way
up the rising edge and stops part-way down the falling one. For a pulse of
height E and threshold t, it holds about `B + 2·A·(1 − t/E)` pairs: 681 for
E = 0.5, t = 0.1. The processor reads it through `trace_rd_addr` and gets
`trace_rd_data` one clock later. `trace_length` gives the number of pairs.

## Top level (`spectrometer_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | sample clock; synchronous active-high reset |
| `adc_data` | in | 14 | ADC code, two's complement (read as 14.13) |
| `invert` | in | 1 | negate the samples, for negative-polarity preamplifiers |
| `v_tpz` | out | 16 | trapezoid, 16.14, for observation |
| `maxima`, `event_valid` | out | 10, 1 | event channel for one clock |
| `mca_ready`, `dropped` | out | 1, 16 | histogram clearing status |
| `m_axis_*` | | | AXI4-Stream master: `tdata` 32, `tvalid`, `tready`, `tlast` |
| `trace_arm`, `trace_threshold` | in | 1, 16 | re-arm the trace capture; its level (16.14) |
| `trace_done`, `trace_length` | out | 1, 11 | a trace is held; pairs stored |
| `trace_rd_addr`, `trace_rd_data` | in, out | 10, 30 | trace read port: `{input 14.13, trapezoid 16.14}` |

Parameters are `A` (300), `B` (200), `BETA` (8371848) and `DELAY` (320). The
MCA's `a`, `c`, spread and AND length are parameters of `mca` and
`mca_fall_detector`. Word formats and shared types are in `spectro_pkg`.

Outside this RTL: the preamplifier and ADC board (analogue), the clock
generator, the processor that reads the AXI4-Stream and forwards the packets
over a serial port, and the display software.

## Choices made here

These points are not fixed by the reference design. They were decided for this
RTL:

* One clock domain, one sample per clock. The reference filter is specified for
  10 ns samples; the physical ADC clock and any rate conversion are outside.
* Output registers on stage 1, the stage 2 rounding and the sign inverter. They
  only add latency.
* Stage 2's delay line keeps I at the full 25.23 width, not rounded. This keeps
  the wrapping accumulator drift-free.
* The fall detector's low-pass form `y += a(d − y)` and its word lengths. `y` is
  34.30, `a` is rounded to 262/2¹⁸ and `c` to 30 fraction bits.
* The channel is `floor(1023·(x₁+x₂)/2)`, computed exactly, and clamped to
  0…1023.
* Only non-zero channels are counted, so channel 0 never counts. Counts saturate
  rather than wrap.
* The histogram is cleared by a pass after reset.
* TDATA is 32 bits wide around the 26-bit packet. The scan repeats
  continuously, and TLAST marks its end.
* The 320-sample delay reuses the RAM delay line.
* The trace capture sits in the same top as the MCA and shares its filter. In
  the reference it is a separate test build, whose threshold, depth, arming and
  readout are not fixed. Here the threshold is a run-time input, the RAM holds
  1024 pairs, the block is armed after reset and re-armed by `trace_arm`, and
  it is read at random addresses.

The optional S-K prefilter against baseline drift and the baseline restorer are
not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The references are computed
independently of the RTL: direct window sums instead of recursions, and floating
point with the exact β.

| testbench | what it shows |
|---|---|
| `tb_sign_inverter` | negation incl. the −1.0 wrap, latency |
| `tb_delay_line` | delay = len + 3 for three lengths, zero before priming |
| `tb_dts_stage1` | `V − βV(n−1)` within 1 LSB of floating point; pulse → impulse |
| `tb_dts_stage2`, `tb_dts_stage3` | bit-exact window sums; rectangle of A, flat top of B+1 |
| `tb_dts_stage4` | `T/A` within rounding; saturation |
| `tb_trapezoidal_filter` | whole filter against floating-point recursions (±3·10⁻⁴); rise 0.9·A, flat top ≈ B, height = E |
| `tb_mca_fall_detector` | one detection per trapezoid, after the fall, within 3 clocks of a floating-point model; none on the baseline |
| `tb_mca_channel_converter` | every channel against `floor(1023·avg)` with clamping at both ends |
| `tb_mca_maxima_capture` | one-clock output on rising edges only |
| `tb_trace_capture` | 64-entry version: exact stored pairs and length, pulses below the threshold ignored, a second pulse ignored while held, re-arming, stopping when full |
| `tb_mca_histogram` | dropping while clearing, saturation (4-bit counts), full scans under back-pressure, TLAST |
| `tb_mca` | ideal trapezoids → exact channels, clamping, a sub-threshold pulse ignored |
| `tb_spectrometer_top` | full design at default parameters (see below) |
| `tb_count_test` | counting test: 2000 pulses of −0.5 through the inverter, with ±2 LSB ADC noise; events, every channel of the read-out spectrum and the total must match exactly, none dropped (20 M clocks, about 20 s) |
| `tb_bench_spectra` | bench series of negative pulses: fixed −0.21, −0.97, −0.2, −0.5, −0.8 and random heights (±1 V = full scale), 40 each; every pulse in its channel ±2, each fixed series a peak at most 5 channels wide, exact spectrum readout |

`tb_spectrometer_top` runs the design with all default parameters. It drives
rounded exponential pulses of τd = 5 µs, 10000 samples apart:

* a pulse during the clearing pass, which must be dropped by the histogram. The
  trace capture must hold it: 670–695 pairs above 0.1, with a peak of 0.5.
* eight positive pulses from 0.05 to 0.95;
* three negative pulses with `invert` set;
* a piled-up pair above full scale, which must land in channel 1023.

It then reads a whole spectrum with random TREADY. Every pulse lands within ±2
channels of `floor(1023·E)`; in the run, within 1. The testbench counts each
mechanism (inversion, clamping, dropping, back-pressure, trace capture) and fails if any never
happened. The run takes well under a second.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/spectro_pkg.sv tb/tb_spectrometer_top.sv --top-module tb_spectrometer_top
./obj_dir/Vtb_spectrometer_top
```

Replace the testbench name to run another. Lint with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/spectro_pkg.sv rtl/spectrometer_top.sv`.
The remaining lint warnings are package constants that a given module does not
use, and the deliberately dropped upper bits of the stage 2 rounding.

## Resources

The default configuration uses about 500 flip-flop bits after coarse synthesis.
Its memory is five 1024-word RAMs, 103 kbit in total:

* the stage 2 and stage 3 delay lines (25 and 16 bits);
* the 320-sample MCA delay (16 bits);
* the 1024 × 16-bit histogram;
* the 1024 × 30-bit trace capture.

It also uses 256 bits for the fall detector's 10-sample history. It has four
multipliers: β, 1/A, the low-pass coefficient and the constant 1023.

`TDATA[31:26]` is constant zero, as the packet format above says.
