# Mixed-signal BIST: tone generator and two-MAC spectrum analyser

An analog block inside a mixed-signal system (an amplifier, a filter) is hard
to measure once it is built in. Its pins are not reachable, and bench
equipment changes what it measures. This design tests the block from the
digital side, through the DAC and ADC that the system already has:

* a **direct digital synthesiser** (three NCOs) makes the stimulus, either one
  tone or two;
* the response comes back through the ADC;
* an **output response analyser** made of only **two multiply-accumulators**
  correlates the response with a cosine and a sine at one frequency.

The two sums, DC1 and DC2, hold the magnitude and phase of the response at
that frequency. The controller sweeps that frequency across the band. This
replaces an FFT processor with two multipliers and two adders. The same
hardware measures:

* frequency response (gain and phase delay);
* linearity (intermodulation products of a two-tone stimulus);
* noise (the floor in empty frequency bins next to a tone).

The RTL also contains the digital part of a tunable op-amp test chip. That
chip serves as a known device under test, so the BIST can be judged against
it. It has a three-pin serial command register that sets the op-amp's bias
current and input resistance. Models of the two analog tuning blocks are
included.

## How one measurement works

```
            +------ TPG ------+            DAC   amp   MUX3   DUT / bypass   ADC
 NCO1 ------+--> MUX1 --------+--> stim ---->[ ]--->[ ]--->[ ]-----[ ]---------->[ ]--+
 NCO2 --+(+)+                 |                                                       |
        +---> MUX2 --> ref_i  +--- (loop-back) ---+                                   |
 NCO3 ----sin----> ref_q                          v                                   |
                      |     |                   MUX4 <------------------------ adc ---+
                      |     +---------> MUL2 -> Accm2 -> DC2       |
                      +---------------> MUL1 -> Accm1 -> DC1 <-----+ f(nT)
```

Suppose the stimulus is `A cos(wn)` and the response is
`g A cos(wn - phi)`. Over N samples that are a whole number of periods:

```
DC1 = sum f(n) cos(wn) = g A Aref N/2 cos(phi)
DC2 = sum f(n) sin(wn) = g A Aref N/2 sin(phi)
```

So `sqrt(DC1^2 + DC2^2)` is proportional to the gain g, and
`atan2(DC2, DC1)` is the phase delay phi. Every other frequency in the
response (harmonics, the other tone, noise outside the bin) averages out
over the window. To keep the window a whole number of periods, choose
`samples * fw` as a multiple of `2^16`. For example, 4096 samples with any
frequency word that is a multiple of 16.

The phase delay that is measured includes the latency of the converters and
of this design's pipeline registers between the stimulus and the ADC input.
With the loop-back (MUX4) there is no such latency, because the stimulus and
the references come from the same registers. Through the analog path every
clock of latency adds `360 * fw / 65536` degrees. No calibration for this is
built in; subtract a bypass measurement (MUX3 set to bypass) to remove it.

## Tone generator (`nco`, `tpg`)

Each NCO works in three steps:

1. A 16-bit phase accumulator adds the frequency word `fw` every clock, so
   the tone frequency is `f = fw * f_clk / 65536`.
2. The initial phase word `theta` is added, with `0x4000` = 90 degrees.
3. The top 8 bits address a 256-entry sine/cosine table of 8-bit samples,
   `round(127*sin)` and `round(127*cos)`. The table is computed at
   elaboration.

The outputs are registered. The `restart` input zeroes all accumulators at
once, so every measurement starts from the programmed phases.

The generator's selections:

* **MUX1** chooses the stimulus: NCO1, NCO2, the two-tone sum
  `(NCO1+NCO2)/2`, or NCO3's cosine.
* **MUX2** chooses the in-phase reference for MUL1 from the same set.
* **NCO3's sine** is always the quadrature reference for MUL2.

Two usual set-ups:

* **Single-tone measurement:** NCO1 is the stimulus with `theta = 0x4000`
  (a cosine). NCO2 has the same frequency and `theta = 0x4000` and is the
  cosine reference. NCO3 has `theta = 0` and is the sine reference. All
  three are swept together.
* **Two-tone or noise measurement:** NCO1 and NCO2 are busy or unused, so
  MUX2 takes NCO3's cosine output. NCO3 alone then gives both references at
  the analysis frequency.

## Analyser and post-processing (`ora`, `phase_calc`, `mag_calc`)

`ora` registers the two 8x8 products and adds them into 32-bit accumulators
when `acc_en` is set. The 32 bits hold 65,535 full-scale products without
overflow.

**Phase (`phase_calc`).** The arctangent table covers only 0 to 45 degrees.
The unit works in three steps:

1. It divides the smaller of `|DC1|`, `|DC2|` by the larger. A bit-serial
   restoring divider gives the ratio with 12 fraction bits.
2. It finds `phi_f = atan(ratio)`:
   * below a ratio of 1/8 it uses `atan(r) ~ r`, the first term of the Taylor
     series, so the table keeps only the bins from 1/8 to 1;
   * above that it uses a 224-entry table with mid-bin values.
3. It folds `phi_f` into 0 to 360 degrees from the two signs and from which
   magnitude was larger:

|                 | DC1>=0, DC2>=0 | DC1<0, DC2>=0 | DC1<0, DC2<0 | DC1>=0, DC2<0 |
|-----------------|----------------|---------------|--------------|---------------|
| \|DC1\|>=\|DC2\| | phi_f          | 180 - phi_f   | 180 + phi_f  | 360 - phi_f   |
| \|DC1\|<\|DC2\|  | 90 - phi_f     | 90 + phi_f    | 270 - phi_f  | 270 + phi_f   |

The result is a 12-bit binary angle (4096 = 360 degrees), accurate to about
0.35 degrees. It is ready 15 clocks after `start`. The 16-bit NCO phase word
for the same angle is `phase << 4`.

**Magnitude (`mag_calc`).** The unit gives `floor(sqrt(DC1^2 + DC2^2))`. It
squares both sums and takes the root one bit per clock, with a result 35
clocks after `start`. This method needs neither the phase nor a second run.

The magnitude can also be found with no root at all:

1. Measure the phase.
2. Set the reference phase words to `0x4000 - (phase<<4)` (NCO2) and
   `-(phase<<4)` (NCO3).
3. Measure again. DC1 is then the magnitude and DC2 is close to zero.

The system testbench does this. This route takes twice the test time, and it
cannot be used for noise, which has no single phase.

## Running a test (`test_controller`, `bist_pkg::test_cfg_t`)

A test is one configuration record plus a one-cycle `bist_start`:

| field | meaning |
|---|---|
| `fw[0..2]`, `theta[0..2]` | frequency and initial phase words of NCO1..NCO3 at the first point |
| `fw_step`, `sweep_mask` | added to the frequency word of each NCO whose mask bit is set, after every point |
| `num_points` | points in the sweep (0 counts as 1) |
| `settle` | clocks of stimulus before accumulating, so the analog path reaches steady state |
| `samples` | clocks accumulated per point (0 counts as 1) |
| `mux1_sel`, `mux2_sel`, `mux4_sel`, `dut_path` | generator, analyser and analog MUX3 selections |

For each point the controller goes through these states:

1. **restart:** restarts the NCOs and clears the accumulators;
2. **settle:** waits `settle` clocks;
3. **accumulate:** accumulates for `samples` clocks;
4. **drain:** waits one clock for the last product;
5. **post-process:** starts the phase and magnitude units and waits for both;
6. **report:** presents a `result_t`.

The `result_t` record holds the point index, NCO3's frequency word, DC1,
DC2, the phase and the magnitude, with `result_valid` high for one clock. A
point takes exactly `settle + samples + 40` clocks. After the last point
`bist_done` rises and stays high until the next start. A `bist_start` while
the controller is busy is ignored.

Typical tests:

* **Frequency response:** use the single-tone set-up above, set
  `sweep_mask = 3'b111`, and take a bypass run as the phase reference.
* **Intermodulation:** set `mux1_sel = SRC_SUM` with NCO1 = f1 and
  NCO2 = f2. Put NCO3 at `2*f1 - f2` (or `2*f2 - f1`) and set
  `mux2_sel = SRC_NCO3_COS`.
* **Noise:** use NCO1 as a single tone. Sweep NCO3 over bins away from the
  tone and its harmonics (`sweep_mask = 3'b100`,
  `mux2_sel = SRC_NCO3_COS`). The mean magnitude of an empty bin is
  `sqrt(N/2) * sigma * 127 * sqrt(pi/2)`, where `sigma` is the noise in ADC
  LSB. The signal bin gives the reference level.
* **Self-test:** set `mux4_sel = ORA_FROM_TPG`. The generator's own tone must
  give 0 degrees and `127*127*N/2`.

## System integration (`bist_top`)

The top instantiates the controller, generator, analyser and both
post-processing units:

* `bist_mode` switches the DAC from the system's own data (`sys_dac_data`) to
  the generator.
* The ADC word is always passed on to the system (`sys_adc_data`).
* `mux3_dut` drives the external analog multiplexer, which chooses the device
  under test or a bypass.

The test chip sits beside the BIST with its own pins (`dut_clk`,
`dut_rst_n`, `dut_en`, `dut_din`), because it is a separate die.

## Test chip: command register and tuning (`dut_cmd_shiftreg`, models)

The chip's tuning comes in over three pins:

* while EN is high, each CLK edge shifts in DIN, most significant bit first;
* the first CLK edge with EN low copies the 9-bit word `{cur_sw[3:0],
  res_sw[4:0]}` into the control register that drives the switches.

The switches never see a half-shifted word.

`current_source_model` gives the op-amp bias current as
`I = (8 b3 + 4 b2 + 2 b1 + b0) * I_BIAS`, in nA, with I_BIAS = 10 uA. The op-amp's
bandwidth and linearity follow this current.

`resistor_bank_model` gives the input resistance, in ohms:

* 0 when `b0` shorts the bank;
* otherwise the parallel value of the branches `R1..R4` (1k, 2k, 4k, 8k)
  whose switches `b1..b4` are on;
* open when no branch is on.

The resistance is a thermal-noise source that sets the noise figure. Both
files are behavioural models of analog circuits. They are written as plain
integer logic so that synthesis tools read them, but they stand for mirrors
and resistors.

## Sizes

| parameter | default | where |
|---|---|---|
| NCO phase accumulator n | 16 bits | `bist_pkg::DEF_PHASE_W` |
| truncated phase p (table address) | 8 bits | `DEF_TRUNC_W` |
| DDS / DAC / ADC word | 8 bits | `DEF_SAMPLE_W` |
| accumulators | 32 bits | `DEF_ACC_W` |
| sample, settle, point counters | 16 bits | `DEF_CNT_W` |
| phase result | 12 bits, 4096 = 360 deg | `DEF_ANG_W` |
| arctan table | 224 x 12 bits, linear below r = 1/8 | `phase_calc` parameters |

The 8-bit sample word matches the 8-bit DDS tones of the original
measurements, which were taken at 12.5 MHz. The BIST clock of the original
FPGA version reached 48.5 MHz. The other sizes are this design's own choices.
At 48.5 MHz a 16-bit accumulator gives 740 Hz steps and tones up to
24 MHz. The original FPGA version used 263 flip-flops; this one synthesises to
about 880 flip-flop bits plus 11 kbit of ROM, mostly because it keeps the
whole configuration and result records and has 32-bit post-processing.

## Where this design goes beyond or falls short of the published architecture

Taken from the published architecture:

* the NCO structure;
* three NCOs with an adder and two multiplexers;
* the two-MAC analyser and its input multiplexer;
* the 0 to 45 degree arctangent table with its octant folding and
  small-ratio approximation;
* the square-root magnitude;
* the three-pin command register;
* the weighting of the current and resistor banks.

This design's own choices:

* everything about the controller (states, records, settle time, sweep
  rule);
* what the multiplexers select;
* pipeline registers, widths, table sizes and the square-root and division
  algorithms;
* the serial bit order and the update-on-EN-low rule of the command register.

Not built:

* Stimulus amplitude control. A 1 dB compression measurement needs the input
  power stepped over about 30 dB. The generator only makes full-scale single
  tones and half-scale two-tones.
* Division of DC1 by the cosine of the phase, another way to get the
  magnitude.
* Any calibration of the phase for converter latency.
* The DAC, ADC, buffers, analog multiplexer and the op-amp itself. They are
  analog; the top brings out their digital signals.

## Files and simulation

`rtl/` holds one module or package per file:

* `bist_pkg.sv`: types and sizes;
* `nco.sv`, `tpg.sv`, `ora.sv`, `phase_calc.sv`, `mag_calc.sv`,
  `test_controller.sv`: the BIST blocks;
* `dut_cmd_shiftreg.sv`, `current_source_model.sv`,
  `resistor_bank_model.sv`: the test chip;
* `bist_top.sv`: the top.

`tb/` has a self-checking testbench per module, named `<module>_tb.sv`, and
`analog_path_model.sv`. That model stands in for the analog side: DAC, a
first-order low-pass "op-amp" whose pole follows the bias current switch, an
optional cubic term and noise, a 3-clock converter latency, and an 8-bit ADC.

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with plain
Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/bist_pkg.sv \
    tb/bist_top_tb.sv --top-module bist_top_tb
./obj_dir/Vbist_top_tb
```

`bist_top_tb` runs the top at its default sizes, with no parameter
overrides:

* system-path checks;
* loop-back, bypass, and two 12-point frequency sweeps at two bias settings,
  each set by a serial command;
* the phase-compensated magnitude, a two-tone intermodulation measurement
  and a noise-floor sweep.

It compares every result with the model's response computed in floating
point. Gain agrees to about 0.1 % and phase to about 0.1 degree in the
sweeps. The intermodulation product comes within about 1 % of its expected
value; the check allows 10 %. The noise floor comes within about 10 %; the
check allows 35 %, because the noise is random. The testbench checks the
clock count of every point and counts every mechanism; any mechanism that
never happened counts as a failure.

`bist_workloads_tb` runs two evaluation scenarios at their own
frequencies. The clock frequency is only notional, because the analog model
counts in clock cycles:

* A two-tone test at 98.0 and 99.95 kHz with a 12.5 MHz clock. Both
  third-order products and both tones are measured over 32,768 samples. The
  products come within 0.1 dB of the model's dBc level.
* A frequency response at eight log-spaced points from 1.5 kHz to 9.9 MHz
  with a 48.5 MHz clock. Gain comes within 0.05 dB of the model and phase
  within about 1 degree.

The unit testbenches check the following against values computed
independently:

* every NCO output;
* every multiplexer setting;
* exact accumulator sums, including 65,536 extreme products;
* the phase in all eight octants, on the axes and diagonals, and on both the
  table and the linear path;
* the integer square root, including the extreme values;
* the controller's timing and sweep behaviour;
* the command register's bit order and its update rule.
