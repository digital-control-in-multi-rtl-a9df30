# Digital controller for multi-phase interleaved d.c.-d.c. converters

A multi-phase ("interleaved") converter splits one power stage into N smaller
ones, called phases, that share the load. Their switching is spread evenly over
the switching period, so each phase starts T_switch / N later than the one
before it. The ripple of the summed current then partly cancels, and the
filters can be smaller. The catch is control: N phases need N pairs of gate
signals. If the phases are to share current with no per-phase current loop
(passive current sharing), every phase must get the same on-time to within a
tiny fraction of the period.

This controller makes both of those a matter of logic. **One** control law
computes **one** duty-cycle word per period. **One** counter turns that word
into the gate signals of every phase, each copy delayed by a fixed number of
clock cycles. Every phase is decoded from the same counter and the same duty
word, so the on-times are equal by construction, down to a clock cycle. Adding
phases adds a comparator per phase, not another controller.

The default configuration is an 8-phase bi-directional (synchronous) buck
converter, 42 V in and 14 V out, with a 20 MHz clock:

| quantity | value |
|---|---|
| phases | 8, each with a high-side and a low-side switch: 16 gate signals |
| PWM counter | 8 bit, 256 duty steps |
| switching period | 256 clocks = 12.8 µs (78.125 kHz at 20 MHz) |
| phase-to-phase delay | 256 / 8 = 32 clocks = 1.6 µs |
| A/D sample | 12-bit two's complement |
| internal Vout | 11-bit unsigned |
| maximum duty | 0.95, i.e. 243 of 256 clocks |
| dead time | 0 to 15 clocks, set at run time |

## Block structure

```
              vref                       dead_time
               |                             |
 adc_data ->  adc_controller --vout(11)--> duty_controller --duty(8)--> signal_generator
 adc_busy ->      |  ^                         ^                            |      |
 adc_convst <-    |  |                         +-------- new_cycle ---------+      |
 adc_rd     <-    |  |                                                  pulse_h(8) pulse_l(8)
                  |  +-- vout_limit                                         |      |
                  +--------------------vout(11)--------------------> protections --> pulse_h, pulse_l pins
```

| file | role |
|---|---|
| `rtl/mpc_pkg.sv` | default sizes shared by all modules |
| `rtl/adc_controller.sv` | runs the A/D converter and converts 12-bit signed samples to an 11-bit unsigned Vout |
| `rtl/duty_controller.sv` | PI control law, updated once per period |
| `rtl/signal_generator.sv` | one counter; phase-shifted PWM with dead times for all phases |
| `rtl/protections.sv` | overvoltage shut-down and 0.95 duty limit; registers the gate signals |
| `rtl/mpc_top.sv` | connects the four blocks |

## The signal generator: one counter, N phases

This block holds the main idea, so it is described in most detail.

A single free-running `CNT_W`-bit counter `cnt` defines the period
(`2**CNT_W` clocks). Phase `k` computes its own position in the period as
`ph = cnt - k * 2**CNT_W / N_PHASES` (mod `2**CNT_W`). So phase k runs exactly
like phase 0, only `k * 32` clocks later at the default size. Per phase:

* **Duty latch.** When `ph == 0` (the phase's own period start), the phase
  samples `duty` and `dead_time`. It keeps them until its next period start.
  The first clock of the period already uses the new value. A duty change
  therefore never shortens or stretches a pulse that has started. Each phase
  picks up the change at its own period start, so during one period some
  phases may still run the old value. Every phase gets the same sequence of
  duty words.
* **High side.** `pulse_h = (ph < duty)`: on for exactly `duty` clocks from
  the period start. `duty = 0` keeps it off.
* **Low side.** `pulse_l` is on for `duty + dead_time <= ph < 256 - dead_time`.
  Both switches are off for `dead_time` clocks after the high side falls and
  for `dead_time` clocks before it rises again. The dead times come out of the
  low-side interval, so the high-side on-time is exactly `duty`. If the window
  is empty (large duty plus dead time), the low side stays off for the period.
* **Start-up.** After reset a phase keeps both switches off until its own
  first period begins. Without this, the phases would start in the middle of
  a period.

`new_cycle` is high for the one clock with `cnt == 0`, which is phase 0's
period start. It tells the control law to take a new sample. An assertion in
each phase checks that the two switches are never on together.

## The control law

Once per period, on `new_cycle`, `duty_controller` takes the latest Vout
sample and forms `e = vref - vout`. It then updates a PI law in integer
arithmetic, with 8 fraction bits:

```
integ <= clamp(integ + KI*e, 0, 255 << 8)          (integrator with anti wind-up)
duty  <= clamp((integ_new + KP*e) >>> 8, 0, 255)
```

The defaults are `KP = 16` and `KI = 2`. In plain terms, each Vout LSB of
error adds 1/16 of a duty count proportionally and 1/128 of a duty count per
period through the integrator. The new duty appears one clock after
`new_cycle`. These gains were tuned against a simple first-order model of the
power stage (see Verification). For a real converter, derive them from its LC
filter and its A/D scaling. The structure is generic: any law that produces an
8-bit duty word once per `new_cycle` can replace it.

## A/D converter interface

The controller does not depend on a particular converter part. It uses a
generic parallel handshake:

1. `adc_convst` is high for one clock.
2. The controller waits `CONV_WAIT` (2) clocks, then waits for `adc_busy` to
   go low.
3. `adc_rd` is high for `RD_CYCLES` (2) clocks. The data is taken on the last
   of them.
4. The next conversion starts immediately.

With a 6-clock converter one sample takes 10 clocks, about 25 samples per
switching period. A sample is a 12-bit two's-complement number. The output
voltage of a buck converter cannot be negative, so a negative sample is noise:
it is dropped (`sample_rejected` pulses) and the previous Vout is kept.
Non-negative samples 0..2047 map one-to-one onto the 11-bit Vout
(`vout_valid` pulses). To use a different converter, rewrite only
`adc_controller`'s state machine.

## Protections

Both protections sit between the signal generator and the pins, and they
register all 16 gate signals. That adds one clock of delay, the same for every
phase.

* **Vout limit.** While `vout > vout_limit`, every high-side and low-side
  signal is off and `ov_trip` is high. The protection is not latched: switching
  resumes as soon as Vout is back under the limit.
* **Maximum duty 0.95.** Each phase counts how long its high-side input has
  been on. A pulse that reaches 243 clocks (`MAX_ON`) is cut, and `dmax_trip`
  shows it. The protection therefore does not need the duty word and also
  catches a wrong pulse from any source. The low side comes on only where the
  signal generator puts it, so a cut pulse just lengthens the dead interval.

## Parameters

All defaults come from `mpc_pkg`: `N_PHASES = 8`, `CNT_W = 8`, `ADC_W = 12`,
`VOUT_W = 11`, `DT_W = 4`, `MAX_ON = 243`. The period is `2**CNT_W` clocks.
When `N_PHASES` does not divide `2**CNT_W`, each phase offset is rounded down.
When you change `CNT_W`, set `MAX_ON` to `floor(0.95 * 2**CNT_W)`. The
duty-controller gains are `KP`, `KI` and `FRAC`, and the A/D timing is set by
`CONV_WAIT` and `RD_CYCLES`.

## What follows the source design and what is this implementation's choice

These points follow the source design:

* the four-block partitioning and its connections;
* one duty cycle shared by all phases, with a T_switch / N phase shift;
* the 8-bit counter, 256-clock period and 8 phases, with high-side and
  low-side signals per phase;
* programmable dead times;
* 12-bit signed samples converted to 11-bit unsigned, with atypical samples
  filtered out;
* the overvoltage shut-down of all phases and the 0.95 duty limit.

These were not specified and are this implementation's choices:

* the PI law and its gains;
* the A/D handshake, and treating negative samples as the atypical ones;
* where the dead times sit (taken from the low side);
* when a new duty takes effect (at each phase's period start);
* the timing of `new_cycle`;
* the duty limit enforced by timing pulses rather than by clamping the duty
  word;
* non-latching overvoltage behaviour;
* synchronous active-high reset, with all switches off during reset and until
  each phase's first period;
* `vref`, `vout_limit` and `dead_time` as run-time inputs, and the status
  outputs.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `signal_generator_tb` runs a reference model of all 16 signals every clock,
  while duty and dead time change at random moments (0, 255 and the widest
  dead time are included). It also measures the 256-clock period, the
  32-clock phase delay and the on-time.
* `duty_controller_tb` runs an integer reference of the PI law, covering
  saturation at both ends. It checks that duty changes exactly one clock after
  `new_cycle` and not otherwise.
* `adc_controller_tb` drives a behavioural converter model
  (`tb/ad_converter_model.sv`) with random values and injected negative
  samples. It checks the value taken, the handshake and the 10-clock sample
  time.
* `protections_tb` uses random pulse trains and random limit crossings, with
  a cycle-exact reference. It checks that the longest output pulse is 243
  clocks.
* `mpc_top_tb` closes the loop around a behavioural 8-phase power stage
  (`tb/power_stage_model.sv`: 42 V in, 20 mV per LSB, first-order response).
  It runs at the default sizes and 20 MHz through three scenes:
  1. start-up and regulation to 14 V;
  2. an unreachable target, which drives the duty word to 255 so the 0.95
     limit acts;
  3. a load dump to above the Vout limit, so all phases shut down and then
     recover.

  Every clock it checks that there is no shoot-through, the phase delay, the
  period, the dead time, the pulse-length limit and the trip timing. At the
  end of scenes 1 and 3 it checks that Vout is within 8 LSB of the target and
  that all eight on-times are equal. It also counts how often each mechanism
  happened and fails if one never did.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module mpc_top_tb rtl/mpc_pkg.sv tb/mpc_top_tb.sv
./obj_dir/Vmpc_top_tb
```

Replace `mpc_top_tb` with any other testbench name. The top-level run
simulates about 1200 switching periods, which takes under a second.

## Limits

* The power stage and the A/D converter exist only as simple behavioural
  models for simulation. The closed-loop results show that the logic works;
  they say nothing about the dynamics of a real converter.
* The gains are only stable for models similar to the one in the testbench.
* No current measurement or current loop exists, by design. Current balance
  relies on equal on-times plus matched power components.
