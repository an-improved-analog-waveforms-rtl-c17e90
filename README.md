# Direct digital synthesizer (DDS) with quarter-wave sine table

A direct digital synthesizer makes a waveform of any frequency from one fixed
reference clock, with no analog loop. A register holds a *tuning word* K.
On every reference clock a 32-bit phase accumulator adds K to itself. It wraps
around once per output period, so the output frequency is

    F_out = K * F_ref / 2^32        (resolution F_ref / 2^32)

At F_ref = 100 MHz, K = 21475 gives 500.004 Hz, and one step of K is 0.0233 Hz.
The top bits of the phase address a sine table. Its samples go to a DAC and then
through a low pass filter, which smooths the DAC's staircase into an analog
waveform. A change of K changes only the *rate* of the phase, not the phase
itself, so frequency switches are phase-continuous. They take effect after a
fixed latency of a few clocks.

This repository holds synthesizable SystemVerilog for the digital part: the
frequency control register, the numerically controlled oscillator, and the
waveform tables. It also holds behavioural models of the DAC and of the
reconstruction filter, so the whole chain can be simulated down to a voltage.

## Signal path

```
        fcr_we/fcr_din                  pword    wave_sel, duty
              |                           |           |
   +----------v---------+   +-------------v-----------v--------------------+
   | freq_ctrl_reg (FCR)|-->| nco                                          |
   +--------------------+   |  phase_accumulator -> phase_adder -> wave_shaper --> sample
                            |  (increment reg +    (+P, keep top     (sine_lut +
                            |   32-bit acc)         12 bits)          sine_rom)
                            +----------------------------------------------+
                                                                    |
                                        dac_model (zero-order hold) v  --> dac_out
                                        lpf_model (1st-order RC)    v  --> analog_out
clk = reference clock to every block
```

| Module | Role |
|---|---|
| `dds_top` | Whole synthesizer: FCR, NCO, DAC model, filter model |
| `freq_ctrl_reg` | Frequency control register, written by a host |
| `nco` | Numerically controlled oscillator: the three stages below |
| `phase_accumulator` | Increment register, then modulo-2^32 accumulator; `wrap` pulse once per period |
| `phase_adder` | Adds phase control word P; truncates the phase to 12 bits |
| `wave_shaper` | Sine, cosine, square (variable duty) or sawtooth from the phase |
| `sine_lut` | Full sine wave from the quarter-wave table, by folding |
| `sine_rom` | Quarter-wave magnitude table, 1024 x 11 bits, computed at elaboration |
| `dac_model` | Behavioural DAC (not synthesizable) |
| `lpf_model` | Behavioural reconstruction filter (not synthesizable) |
| `dds_pkg` | Default sizes and the `wave_sel_e` waveform enum |

The reference oscillator (a crystal or SAW part) is outside the design. Its clock
is the `clk` port.

## The quarter-wave sine table

This is the least obvious part of the design. A sine wave is symmetric, so only
its first quarter (0 to pi/2) needs storing. That makes the table one quarter
the size of a full-wave table. The 12-bit phase `p` splits into:

- `p[11]`, the half-cycle bit. In the second half-cycle (pi to 2pi) the sine is
  negative, so the magnitude read from the table is negated.
- `p[10]`, the quarter bit. In the second and fourth quarters the sine falls
  instead of rising, so the table is read backwards: the address is `~p[9:0]`
  instead of `p[9:0]`.
- `p[9:0]`, the address within the quarter.

Entry `i` of the table holds

    round(2047 * sin(pi/2 * (i + 0.5) / 1024))

The half-step offset matters. With it, reading the table backwards (`~i` is
`1023 - i`) gives exactly the mirror image, so no quarter repeats or skips a
sample at its boundary. Because no entry is zero, the two half-cycles are exact
negatives of each other. So the folded output for phase `p` is exactly

    round(2047 * sin(2*pi*(p + 0.5) / 4096))

with rounding symmetric about zero. The output range is -2047 to +2047. The code
-2048 is never produced.

The table has 1024 words of 11 bits. Its contents come from a constant function
using `$sin`, evaluated when the design is elaborated, so no data file is
needed. Changing `PHASE_W` or `AMP_W` resizes the table and recomputes it.

## Waveforms

`wave_sel` (type `dds_pkg::wave_sel_e`) chooses the waveform:

| Code | Waveform | How it is formed |
|---|---|---|
| 0 `WAVE_SINE` | sine | quarter-wave table |
| 1 `WAVE_COSINE` | cosine | the same table, addressed a quarter cycle ahead (`p + 1024`) |
| 2 `WAVE_SQUARE` | square | +2047 while `p < duty`, otherwise -2047; duty cycle = `duty / 4096` |
| 3 `WAVE_SAWTOOTH` | sawtooth | the phase as an offset-binary ramp, -2048 rising to +2047 |

For the square wave, `duty = 0` keeps the output low and `duty = 2048` gives
50 %. Every waveform goes through the same number of pipeline stages, so a
waveform switch lands on a clean sample boundary.

## Interface and timing (`dds_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | reference clock F_ref |
| `rst_n` | in | 1 | synchronous reset, active low; clears K, the phase and the pipeline |
| `en` | in | 1 | 1 = advance the phase; 0 = hold it |
| `fcr_we`, `fcr_din` | in | 1, 32 | write K into the FCR for one clock |
| `pword` | in | 32 | phase control word P, added to the phase (2^32 = one full cycle) |
| `wave_sel` | in | 2 | waveform |
| `duty` | in | 12 | square-wave high time, in phase steps |
| `fcr` | out | 32 | the tuning word in use |
| `phase` | out | 12 | table address (truncated phase) |
| `wrap` | out | 1 | one-clock pulse at each accumulator overflow, once per output period |
| `sample` | out | 12 signed | digital sample, one per clock |
| `dac_out`, `analog_out` | out | real | model voltages after the DAC and after the filter |

Latency from the clock edge that samples an input to the first changed `sample`:

| Input | Clocks | Path |
|---|---|---|
| `fcr_din` write | 7 | FCR, increment register, accumulator, phase register, table, sign, output |
| `pword` | 4 | phase register, table, sign, output |
| `wave_sel`, `duty` | 4 | registered alongside the phase |

After reset, K is 0 and the output stands still at phase 0, until a host writes
the FCR.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `ACC_W` | 32 | accumulator width m; sets the frequency resolution |
| `PHASE_W` | 12 | phase bits kept for the table; quarter table has 2^(PHASE_W-2) words |
| `AMP_W` | 12 | signed sample width; table words are AMP_W-1 bits |
| `VREF` | 1.0 | DAC model: volts at code 2^(AMP_W-1) |
| `FS_HZ` | 100e6 | filter model: the reference clock rate |
| `LPF_FC_HZ` | 5e6 | filter model: -3 dB corner |

The 32-bit accumulator and the 100 MHz reference follow the 500 Hz worked
example that this design was built around. Several sizes are this design's own
choices, because the source leaves them open:

- 12 phase bits and 12 amplitude bits;
- the phase truncation;
- the register stages;
- the enable input;
- the reset value;
- the waveform encoding;
- how the cosine, square and sawtooth are formed;
- the filter's order and corner frequency.

## Departures and limits

- **Phase truncation.** Only the top 12 of the 32 phase bits address the table.
  The frequency is still exact to 0.0233 Hz. But truncation adds phase-truncation
  spurs at about -72 dBc, which is the usual trade against table size. Raise
  `PHASE_W` for a cleaner spectrum. The table grows by a factor of 2 per bit.
- **Control latency.** A new P, waveform or duty word reaches the output 4
  clocks after it is sampled. A new tuning word takes 7 clocks. Each change
  applies to whole samples, without a phase jump. But it is pipelined, not
  immediate: the registers between the adder, the table and the output keep
  the clock rate high.
- **One output at a time.** Sine and cosine are selected, not produced at the
  same time. A quadrature output would need a second `sine_lut`.
- **Analog parts are models.** `dac_model` is an ideal zero-order-hold DAC, with
  no glitches, nonlinearity or settling. `lpf_model` is an ideal first-order RC
  filter, updated once per reference clock. A real reconstruction filter would be
  of higher order, with its corner chosen from the highest output frequency.
  Both models use `real` ports and cannot be synthesized. For a chip or FPGA,
  synthesize `nco` with `freq_ctrl_reg` and connect `sample` to a real DAC.
- Verilator reports the low 20 bits of the phase adder's sum as unused. This is
  expected: only their carry into the top 12 bits matters.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference values come from
`tb/dds_ref_pkg.sv`, which computes each waveform in floating point from its
definition, not from the table.

| Testbench | What it checks |
|---|---|
| `freq_ctrl_reg_tb` | reset, write, hold |
| `phase_accumulator_tb` | every cycle against a 64-bit model: increment-register latency, wrap and its pulse, hold while disabled |
| `phase_adder_tb` | random sums, including wrapping ones, and truncation |
| `sine_rom_tb` | all 1024 words, monotonic rise, synchronous read |
| `sine_lut_tb` | all 4096 phases in all four quadrants, plus random phases |
| `wave_shaper_tb` | random phases and waveforms; square wave swept across every phase at four duty words; full sawtooth ramp |
| `nco_tb` | cycle-accurate model of the whole pipeline under random K, P, waveform, duty and enable; period for K = 2^26 (64 clocks); P latency 4, K latency 6 |
| `dac_model_tb` | transfer function and zero-order hold |
| `lpf_model_tb` | exact step response, pass-band gain, attenuation at 25 MHz |
| `dds_top_tb` | whole design at default sizes (see below) |

`dds_top_tb` runs the design with every parameter at its default. It writes
K = 21475 and runs a complete 500 Hz period. It expects 199998 or 199999 clocks between
overflows (2^32/21475 = 199998.5, so 500.004 Hz on average), and sees 199998. Across that period
it checks that the filtered output tracks the DAC to within 5 mV. It then does
the following:

- switches to 100 kHz and checks the 1000-clock period;
- steps P by a quarter cycle;
- runs the cosine, the square at 25 % and 75 % duty, and the sawtooth;
- holds the oscillator;
- plays a 25 MHz tone, which the filter must attenuate.

A model of the register pipeline checks every one of about 410,000 samples. The
test counts FCR writes, wraps, phase steps, holds, folded table reads, sign
flips, duty changes and each waveform. Any mechanism that never occurred counts
as a failure. The test runs in a few seconds.

### Running a testbench with Verilator

```
verilator --binary --timing --timescale 1ns/1ps --top-module dds_top_tb -y rtl -y tb +libext+.sv \
    rtl/dds_pkg.sv tb/dds_ref_pkg.sv tb/dds_top_tb.sv
./obj_dir/Vdds_top_tb
```

For another testbench, replace `dds_top_tb`. Packages must come first on the
command line. The other modules are found through `-y`.
