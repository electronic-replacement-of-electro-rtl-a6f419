# Electronic phase sensitive relay

A railway track circuit detects trains electrically. A signal source
drives a 75 Hz (or 275 Hz) sine wave into an insulated section of rail. At
the far end, a phase sensitive relay compares the signal that arrives with a
reference taken from the same source, which is shifted by 90 degrees. While
the section is empty, the rail signal is strong and has the expected phase.
A train's axles short the two rails, so the amplitude collapses, the phase
moves, or both. The classic relay does this comparison with a Ferraris-motor
mechanism.

This RTL does the same thing digitally in one FPGA. It samples both signals,
measures the amplitude and phase of each at the track-circuit frequency, and
decides whether the section is free. The output `efcp_out` of `psr_top` is 1
for a free track and 0 for an occupied one. It has a programmable pull-in
delay and a fixed release delay, like the relay it replaces.

## Signal path

One new sample pair arrives every 1/3600 s. For each pair the design does
the following, in order:

1. **Acquisition** (`clock_gen`, `adc_ctrl`). Two external 16-bit serial
   converters sample the rail and reference signals at the same time. The
   controller clocks both out at 2.4 MHz and keeps the 12 most significant
   bits of each.
2. **History** (`sample_buffer`, two instances). Each channel keeps its last
   720 samples in a circular buffer. That is 200 ms, or 15 periods of 75 Hz.
3. **One-bin DFT** (`coef_rom`, `dft_point`). A Kaiser-windowed (beta = 2)
   correlation of each whole buffer with cos/sin at bin K. 720 samples at
   3.6 kHz give 5 Hz per bin, so 75 Hz is bin 15 and 275 Hz is bin 55. The
   result is one 18-bit complex number per channel. It is recomputed for
   every new sample, so the estimate slides along with the signal.
4. **Rectangular to polar** (`cordic`). Thirteen shift-and-add
   micro-rotations turn each complex number into a 20-bit amplitude and a
   9-bit phase.
5. **Decision** (`threshold`). The rail amplitude is checked against a pair
   of hysteresis thresholds. The phase difference, rail minus reference, is
   checked against a window that also has hysteresis. The track is free
   when both checks pass (an AND).
6. **Output timing** (`pull_drop`). Two saturating counters delay the output:
   it rises after `pull` sample periods of "free" and falls after 360 periods
   (100 ms) of "occupied".

A single DFT unit and a single CORDIC serve both channels one after the
other. The controller (`ctrl_fsm`) sequences the whole path once per sample.

## The sample-period schedule

At 7.2 MHz a sample period is 2000 clocks. The controller walks through a
fixed list of states in every period:

| state | clocks | what happens |
|---|---|---|
| WAIT_DATA | 522 | idle until `adc_out_rdy` (522 is what remains of the 2000) |
| RAM_DATA | 1 | new samples into the buffer input registers |
| RAM_WRITE | 1 | both buffers overwrite their oldest sample |
| DFT1_PRE | 1 | rail buffer: start a read pass; ROM to entry 0; clear sums |
| DFT1 | 720 | one multiply-accumulate per clock |
| DFT1_END | 1 | store the rail complex result |
| DFT2_PRE / DFT2 / DFT2_END | 1 / 720 / 1 | the same for the reference buffer |
| CORDIC1_PRE | 1 | load the rail result into the CORDIC |
| CORDIC1 | 13 | micro-rotations |
| CORDIC1_END | 1 | store rail amplitude and phase |
| CORDIC2_PRE / CORDIC2 / CORDIC2_END | 1 / 13 / 1 | the same for the reference |
| THRESHOLD | 1 | update the amplitude and phase flags |
| DELAY | 1 | one tick of the pull/drop counters |

A START state follows reset. The bit-clock divider restarts with each
sampling strobe, because 2000 is not a multiple of the 3-clock bit period.
Every conversion therefore ends at the same point of its period, and
WAIT_DATA lasts exactly 522 clocks each time. The state list and the clock counts are the
published ones. The signal that ends each variable-length state is this
design's choice: `adc_out_rdy` ends WAIT_DATA, `ram1_read_end` or
`ram2_read_end` ends a DFT, and `crd_done` ends a CORDIC run. The
processing takes 1478 clocks, so about a quarter of each period is slack.

The hardest part to follow is how the memories and the accumulator line up.
Both the buffer and the ROM have synchronous reads, so their data appears
one clock after the request. The DFTn_PRE state therefore acts as a
prefetch:

- `ram_home` reads the oldest sample and sets the read pointer to the next
  one.
- `rom_reset` reads coefficient 0 and sets the ROM address to 1.

As a result, in each of the 720 DFTn clocks the sample on `dout` and the
coefficients on `cos_data`/`sin_data` belong together. `sum_en` can then be
asserted in exactly those 720 clocks. The buffer raises `ram_read_end` while
its 720th sample is on the output, which is the last DFTn clock.

`crd_done` follows the same idea: it is high during the 13th micro-rotation,
so a CORDICn state lasts exactly 13 clocks. Amplitude and phase are valid
from the next clock on.

The buffer's write pointer always points at the oldest sample, so every
read pass runs from oldest to newest. The window coefficient with index i
therefore always weights the i-th oldest sample. The phase measured for
each channel advances by 7.5 degrees per sample, because the start of the
window moves through the sine wave. Both channels move together, so the
phase difference stays put. Only the difference is used.

## Number formats

| quantity | format | scale |
|---|---|---|
| samples | 12-bit two's complement | converter code with its MSB inverted (offset binary assumed) |
| coefficients | 10-bit signed | round(511 * w(i) * cos or sin(2*pi*K*i/720)) |
| DFT sums | 32-bit, output 18-bit | output = sum >>> 12, saturated |
| amplitude | 20-bit unsigned | about 1.6468 * magnitude (CORDIC gain, not removed) |
| phase | 9-bit two's complement | 1/512 turn (0.70 degree) per LSB, -256..255 |

The window is w(i) = I0(2 * sqrt(1 - (2i/719 - 1)^2)) / I0(2), where I0 is the
modified Bessel function of order zero. `coef_rom` computes the whole table
at elaboration from that formula, so there is no data file.

A full-scale 75 Hz sine gives a DFT magnitude of about 73 000. The largest
possible sum is about 93 000, so the 18-bit result never saturates with the
default window. After the CORDIC, a full-scale sine reads as an amplitude of
about 120 000.

The CORDIC works with two guard bits below the input LSB. It pre-rotates
vectors in the left half-plane by +-90 degrees, because the 13
micro-rotations only cover about +-100 degrees. Angles are accumulated in
units of 1/65536 turn and rounded to 9 bits at the output.

## Decision and output timing

`threshold` keeps two flags, both updated once per sample:

- **amp_ok** is set when the rail amplitude reaches `AMP_ON` and cleared when
  it falls below `AMP_OFF`.
- **phase_ok** is set when the phase difference is inside
  [`PH_LO`+`PH_HYST`, `PH_HI`-`PH_HYST`] and cleared when it leaves
  [`PH_LO`, `PH_HI`].

The source of the design gives no threshold values. The defaults are:

- `AMP_ON` = 30000 and `AMP_OFF` = 24000. That is about 25 % and 20 % of full
  scale.
- A phase window of 90 +- 30 degrees (85..171 in 1/512-turn units) with a
  hysteresis of 4 degrees.

Set them to suit the installation.

`pull_drop` follows the published circuit. A "True" counter counts up while
the track is free and down while it is occupied. A "False" counter does the
reverse. Neither counter wraps: True is limited to `pull` and False to
`drop`. The output rises when True reaches `pull` and falls when False
reaches `drop`.

A clean change of the decision therefore moves the output after exactly
`pull` (or `drop`) ticks. Brief disagreements only push the timing back by
their own length. One tick is one sample period:

- `pull` = 504..36000 gives 140 ms..10 s.
- The drop is fixed at 360 ticks (100 ms) by the `DROP_TICKS` parameter.

All flags and the output reset to the occupied state.

The 720-sample window sets the reaction time of the amplitude. In the
system test, the rail signal starts at 80 % of full scale and falls to 5 %.
The amplitude flag clears 547 samples (about 150 ms) later. Add the 100 ms
drop time and the relay releases about 0.25 s after the shunt. A weaker rail
signal clears the flag sooner.

## Converter interface

The source says only that the converters are 16-bit successive-approximation
parts with serial outputs, clocked at 2.4 MHz. `adc_ctrl` assumes a common
bit timing for such parts:

- `scs` falls on the sampling strobe.
- 22 `sclk` pulses follow. Each one is high for one system clock, every
  third clock.
- The converter changes `sdout` after each falling edge.
- It first sends 6 bit times of acquisition and null bits, then the 16
  result bits, MSB first.

The controller shifts every bit into a 16-bit register, so after the frame
only the result is left. Results are taken as offset binary. A converter
with a different frame length needs only `FRAME_BITS` changed. A
two's-complement converter needs `OFFSET_BINARY` = 0.

Rail is on `sdout1` and reference on `sdout2`.

## Files

| file | contents |
|---|---|
| `rtl/psr_pkg.sv` | shared widths, types and the controller state enum |
| `rtl/clock_gen.sv` | 2.4 MHz bit-clock enable and 3.6 kHz sampling strobe |
| `rtl/adc_ctrl.sv` | serial interface of the two converters |
| `rtl/sample_buffer.sv` | 720 x 12 circular buffer (RAM1, RAM2) |
| `rtl/coef_rom.sv` | windowed cos/sin table, computed at elaboration |
| `rtl/dft_point.sv` | one-bin DFT multiply-accumulate |
| `rtl/cordic.sv` | 13-step vectoring CORDIC |
| `rtl/threshold.sv` | amplitude and phase flags with hysteresis |
| `rtl/pull_drop.sv` | pull and drop timing counters |
| `rtl/ctrl_fsm.sv` | per-sample sequencer |
| `rtl/psr_top.sv` | the complete relay |
| `tb/adc_model.sv` | behavioural model of the serial converter (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a 275 Hz system test |

Top-level parameters of `psr_top`:

- `K_BIN` (15 = 75 Hz, 55 = 275 Hz)
- `DROP_TICKS`
- the five threshold values

The design is synchronous to one 7.2 MHz clock with an active-high
synchronous reset. The 2.4 MHz and 3.6 kHz rates are clock enables, not
separate clocks. Synthesis gives about 500 flip-flops. The two buffers
(2 x 8640 bits) and the coefficient ROM (2 x 720 x 10 bits) are memories.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/psr_pkg.sv tb/tb_psr_top.sv --top-module tb_psr_top
    obj_dir/Vtb_psr_top

To run another test, swap in its name, for example `tb_cordic`. The
testbenches do the following:

- **tb_psr_top** runs the complete relay at its default parameters for about
  3 seconds of simulated time (about 9 s of run time). It covers:
  - a free track, with the measured amplitude checked to within 2 % and the
    phase difference to within 2 LSB;
  - the pull after exactly 504 ticks;
  - a shunt, and the drop after exactly 360 ticks;
  - the return to free;
  - a 150 ms loss of signal that briefly clears the amplitude flag but is
    absorbed by the drop time;
  - the amplitude hysteresis band, approached from both sides;
  - a phase fault at full amplitude;
  - every sample period lasting exactly 2000 clocks, 522 of them in
    WAIT_DATA.
- **tb_psr_top_275** builds the 275 Hz relay. It checks pull and drop, and
  that a 75 Hz signal does not count as a free track.
- The block testbenches compare each module with a model written
  independently in the testbench:
  - the ROM against a floating-point Kaiser window;
  - the DFT against 64-bit sums;
  - the CORDIC against `$sqrt`/`$atan2`;
  - the counters and flags against their rules;
  - the controller's state durations against the table above.

## Departures and limits

- **Threshold values, the converter frame, the sample code and the phase
  scaling** are not given by the source. They are choices of this design;
  see the sections above.
- **Micro-rotation formula.** The source prints the y update of the
  micro-rotation with x and y swapped. The standard rotation is
  implemented.
- **`crd_start` input of the threshold block.** The block diagram shows this
  input; its use is not described, and the block here updates on `th_en`
  alone.
- **Extra controller outputs.** The controller has outputs the published
  state diagram does not show: register write strobes, the buffer and
  operand selects, the ROM controls, `th_en` and `pd_clk`. They are needed
  to drive the blocks that are shown.
- **Empty history.** Buffers read zeros for history that was never written
  since reset, so the first 200 ms after reset see a partly empty window.
- **Outside the RTL.** The analog input stage (protection, scaling
  amplifiers, voltage reference, optocouplers), the converters themselves
  and the oscillator are not part of it.
- **Not re-measured.** The published resource use (about 1700 LUTs, 500
  flip-flops, 5.5 kB of RAM on an Altera FPGA) and its 21 MOPS were not
  measured here for a specific FPGA. By count, this design performs
  1440 multiply-accumulates per sample, which is about 21 million
  operations per second.
