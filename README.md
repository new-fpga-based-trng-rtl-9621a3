# TERO true random number generator with built-in malfunction detection

A true random number generator (TRNG) for FPGAs whose randomness comes from
the *transition effect*: the undetermined behaviour of a circuit while it
moves between two stable, deterministic states. The source is a transition
effect ring oscillator (TERO), a loop of just two LUTs configured as XNOR
gates. Every time its control signal is pulsed, the TERO starts to
oscillate, the oscillation dies out after a number of periods, and the loop
settles again. How many periods it makes is random. An asynchronous
counter counts them, and the low bits of the count are the random output.

Two properties follow from this principle and shape the design:

* **No state carries over.** The counter is cleared and the TERO returns to
  its rest state in every control period, so every sample is produced from
  the same starting conditions.
* **The source can check itself.** A healthy TERO makes a number of
  oscillations that lies within a known region. If the source stops, or
  never stops, the count falls outside it. Each count is checked against a
  threshold window. Counts that fail are thrown away and raise an alarm.

The RTL here is written in SystemVerilog (IEEE 1800-2017). The digital part
is synthesizable. The TERO itself is a behavioural model; see below.

## How one sample is made

With the default parameters, `clk` runs at 100 MHz and one control period
lasts 40 cycles (400 ns):

```
cycle in period   0 ............ 19 | 20 ........... 39
tero_ctrl         ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________
TERO output       ______|||||||||___‾‾‾‾‾‾ (random stop level)
counter           counts oscillations  |  held in reset
sample strobe                      _/‾\_          (last high cycle)
alarm / rnd_valid                       one of them, 1-2 cycles later
```

1. `ctrl_sequencer` raises `tero_ctrl` for 20 cycles and releases the
   counter reset for the same time.
2. The TERO oscillates a random number of times after the rising edge and
   then stays still.
3. `async_counter` counts the oscillations. It is a chain of toggle
   flip-flops, each clocked by the one before it, so it needs no clock and
   can follow an oscillator much faster than `clk`.
4. In the last high cycle `sample` is set. On the clock edge that ends the
   high phase, `malfunction_detector` captures the count and checks it
   against `[th_low, th_high]`.
5. A count inside the window goes to `bit_extractor`, which outputs its 1
   to 4 least significant bits (`rnd_data`, `rnd_nbits`, `rnd_valid`). A
   count outside the window gives an `alarm` pulse instead, and no data.
6. For the other 20 cycles the control signal is low and the counter is
   held in reset.

At 4 bits per period this is 10 Mbit/s. Each period gives exactly one
result: `alarm` in the cycle after the capture edge, or `rnd_valid` one
cycle after that.

### Crossing from the oscillator to the clock

The count is produced by the TERO's own edges and read by `clk` without a
synchroniser. This is safe only because the count is read after the
oscillation has died out. When the counter is read, a source that is still
oscillating is itself a malfunction. Such a source makes far more
oscillations than a healthy one, so its count lands above `th_high` or
wraps the counter. The counter has a sticky wrap flag (`ovf`) so that a
wrapped count can never pass as a small one. In an FPGA, choose the high
phase so that the slowest healthy TERO has settled well before the capture
edge.

## The entropy source model (`tero_cell`)

In silicon the TERO is two cross-coupled XNOR LUTs. How it behaves depends
on the exact routing delays, so it must be placed and routed by hand, and
it cannot be described as RTL. `tero_cell` is a behavioural model with the
real cell's ports (`ctrl` in, `tero_out` out). It cannot be synthesized.

* While `ctrl` is low, the output is 0.
* 300 ps after a rising edge of `ctrl`, it makes N full oscillations, each
  1 ns long. It then settles to a random level until `ctrl` falls.
* For each period, N is drawn between `osc_min` and `osc_max` (defaults
  40 and 100) as the rounded mean of four uniform draws. This gives a single
  peak, like the measured counts of one placement at nominal core voltage.
  Other placements measured two-peaked distributions, with counts from
  about 5 up to about 185; the model does not reproduce those.
* `osc_min`, `osc_max` and `half_ps` are variables that a testbench can
  change to mimic other working conditions. `osc_min = osc_max = 0` is a
  source that has stopped.
* `last_count` holds the N of the latest transition, so that testbenches
  can check the count against what the source really did.

Putting the real TERO in an FPGA means replacing this module with two LUT
primitives under placement constraints. That is specific to the FPGA
family and is not included.

## Malfunction detection (`malfunction_detector`)

A count passes when `!ovf && th_low <= count <= th_high`. Both bounds count
as inside. The bounds are inputs, not parameters. The count range of a TERO
depends strongly on its placement and on the core voltage, so the window
has to be set for each implementation after measuring it. The testbenches
use 30..120 with the default model.

The outputs are:

* `pass` and `alarm`: one-cycle pulses, one of them per period.
* `count_q`: the captured count. The top brings it out as `osc_count`, so
  the count distribution can be watched.
* `alarm_sticky`: set by any alarm and held until `alarm_clr`.

## Bit extraction (`bit_extractor`)

The randomness lies in the low bits of the count. The lowest bit alone is
the simplest extractor. Taking more bits raises the rate, but the higher
bits are less uniform. `bits_sel` (0..3) picks 1 to 4 bits per sample at run
time. The unused upper bits of `rnd_data` are zero, and `rnd_nbits` says how
many bits are valid. Bit 0 is the first bit of the stream.

## Top level: `tero_trng`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, 100 MHz for the rates above |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `en` | in | 1 | run control periods; checked only at period boundaries |
| `th_low`, `th_high` | in | 8 | acceptance window for the oscillation count |
| `bits_sel` | in | 2 | bits per sample minus 1 |
| `alarm_clr` | in | 1 | clears `alarm_sticky` |
| `rnd_data` | out | 4 | random bits, LSB first |
| `rnd_nbits` | out | 3 | number of valid bits in `rnd_data` |
| `rnd_valid` | out | 1 | new random data (one-cycle pulse) |
| `alarm` | out | 1 | the current sample was rejected (pulse) |
| `alarm_sticky` | out | 1 | an alarm has occurred since the last clear |
| `osc_count` | out | 8 | last captured oscillation count |

| parameter | default | meaning |
|---|---|---|
| `COUNT_W` | 8 | counter width; counts up to about 185 were measured |
| `XMAX` | 4 | most bits per sample |
| `CTRL_PERIOD` | 40 | cycles per control period |
| `CTRL_HIGH` | 20 | cycles with the control signal high |
| `OSC_MIN`, `OSC_MAX`, `OSC_HALF_PS` | 40, 100, 500 | source model only |

The shared constants and the `bits_sel_t` type live in `tero_trng_pkg`.

## What is given and what is chosen here

These parts follow the generator as it was published:

* the TERO as the source, pulsed once per control period;
* the ripple counter of toggle flip-flops as the extractor, with a common
  reset and all stage outputs used;
* 1 to 4 low bits per sample;
* discarding any sample whose oscillation count lies outside a threshold
  region, and raising an alarm for it;
* the 10 Mbit/s peak rate;
* the count ranges used to size the counter and the model.

These are choices made in this design:

* **Clock and period.** The 100 MHz clock and the 40-cycle period (20 high)
  were chosen to reach 10 Mbit/s at 4 bits per period.
* **Edges.** The TERO fires on the rising edge of `ctrl`, and the counter
  stages toggle on falling edges, so the count runs upwards.
* **Detector details.** The sticky wrap flag, the inclusive window set by
  inputs, and the sticky alarm.
* **Extraction and reset.** Run-time selection of the bit count. The
  counter reset rises on the first clock after system reset, which gives
  the counter's asynchronous reset a clean edge.
* **Source model.** Its count distribution, its 1 ns oscillation period
  and its random stop level.

The first version of this generator used a modified ring oscillator
instead of the TERO. It depended much more on operating conditions and is
not included. No post-processing of the raw bits is included either.

## Verification

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

* `tero_cell_tb`: the pulse count matches the drawn count and lies in
  range, the period is 1 ns, the output is quiet after settling and at rest
  while `ctrl` is low, and a stopped source is silent.
* `async_counter_tb`: bursts of 0 to 300 pulses, with random pulse widths.
  It checks the count modulo 256 and the wrap flag.
* `ctrl_sequencer_tb`: the exact 20-of-40 high time, the strobe position,
  the reset and control signals staying complementary, and stopping only
  at period boundaries.
* `malfunction_detector_tb`: window edges, wrap, no strobe, the sticky flag
  and clearing it, and random cases.
* `bit_extractor_tb`: every bit setting, and holding the output without
  `pass`.
* `tero_trng_tb`: end to end at the default parameters. It runs a healthy
  source with every bit setting, then a weak source, a stopped source, too
  many oscillations, and a source fast enough to wrap the counter. It also
  covers recovery and clearing the alarm, and disabling. Every period must
  give one correct result, 40 cycles apart, and every case must occur.
* `tero_trng_fips_tb`: collects 20,000-bit sequences at 1, 2, 3 and 4 bits
  per sample and runs the FIPS 140-2 monobit, poker, runs and long-run
  tests on them. It prints the verdicts and the count range. With the
  source model all four settings pass. This says more about the model than
  about silicon, where the passing results depend on placement and voltage.

To simulate, for example the top level:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/tero_trng_pkg.sv tb/tero_trng_tb.sv --top-module tero_trng_tb -o sim
obj_dir/sim
```

All files declare `timeunit 1ns; timeprecision 1ps` (the source model uses
1 ps units). `--timing` is needed for the source model's delays.
Testbenches apply reset as a falling edge of `rst_n`, because the
flip-flops use asynchronous resets.
