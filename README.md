# Digital feedback control of gate drivers for balancing parallel IGBTs

When power devices such as IGBTs are connected in parallel to carry more
current, small differences between the devices and an asymmetric layout make
them switch at slightly different instants. The device that turns on first
briefly carries the whole load and overshoots; the one that turns off last is
left alone with the load and overshoots too. This RTL is a fully digital
closed loop that removes that imbalance. It measures each device current, finds
the current peaks of every switching transient, picks the device with the
largest peak, and shifts that device's gate edge by one 10 ns step per PWM
period. Steps continue until the peaks are level.

Everything runs on one 100 MHz clock. One clock period is the 10 ns delay
step, and there are no asynchronous clock domains between the channels. The
default configuration controls two IGBTs, with one 8-bit ADC each.

## Signal chain

```
           adc_data[i] (8 bit, 50 MS/s)                           per IGBT i
pwm_in ─┬─► adc_interface ─► median_filter ─► peak_detect ◄─► peak_ram ──┐
        │                          │                                     │ peak of the ended phase
        │                          └─► overcurrent_protect (trip)        ▼
        │                                                         maxmin_select (all IGBTs)
        ├─► pwm_phase: phase, start_on, start_off                        │
        │                                                  ┌─────────────┴─────────────┐
        │                                         balance_ctrl (turn-on)     balance_ctrl (turn-off)
        │                                          eval at PWM fall          eval at PWM rise
        │                                                  │ step_on[i]                │ step_off[i]
        │                                          delay_counter (on)        delay_counter (off)
        │                                                  └────────────┬──────────────┘
        └──────────────────────────────────────────────────────► delay_mux ─► gate ─► gate_pattern[i] (8 bit)
```

| module | role |
|---|---|
| `dfc_pkg` | shared constants: 2 channels, 8-bit samples, 5-bit delay counters, median window 5, gate codes |
| `adc_interface` | makes the 50 MHz ADC clock (toggle flip-flop) and captures each ADC word once per sampling period |
| `median_filter` | 5-sample sliding median; removes the narrow noise spikes that appear near the current zero crossing |
| `peak_detect` | marks local maxima and plateau points of the filtered current; keeps the largest of the phase in the RAM |
| `peak_ram` | two words per IGBT: the peak of the turn-on phase and of the turn-off phase |
| `pwm_phase` | synchronises the PWM command and marks the first cycle of each on and off phase |
| `maxmin_select` | the largest and smallest peak over all IGBTs, and which IGBTs hold them |
| `balance_ctrl` | balancing factor and delay decision, one instance per edge type |
| `delay_counter` | saturating step counter, one per IGBT and edge type |
| `delay_mux` | 32-tap PWM delay line; places the turn-on and turn-off edge of one gate |
| `overcurrent_protect` | latched comparator that forces all gates off |
| `dfc_top` | the system above |

## The control decision

This is the part that needs care.

**Phases.** A PWM period has two phases. The *on phase* is while the command
is high and holds the turn-on transient. The *off phase* is while the command
is low and holds the turn-off transient. When a phase begins, its RAM entry is
cleared. Throughout the phase, every new local peak that is larger than the
stored one replaces it. When the phase ends, the entry is final, and the
selection logic reads the entries of all IGBTs. Turn-on peaks are judged at
the falling PWM edge and turn-off peaks at the rising edge. So a decision
always lands well before the next edge of the same kind, and each step applies
to the next period.

**Balancing factor.** For each edge type the logic keeps the largest peak of
the previous period, `Imax(t-1)`. It forms

```
BF = Imax(t) - Imax(t-1)
```

It then steps the counter of the IGBT that holds `Imax(t)` when both of these
are true:

* `|BF| > TOL_BF` (default 2 codes). The peak is still moving, so the last
  step changed something.
* `Imax(t) - Imin(t) > TOL_SPREAD` (default 4 codes). The peaks are still
  unequal.

In practice the loop works like this. In the first period `Imax(t-1)` is 0, so
the first step is always taken. After that, each step lowers the overshoot of
the leading device, `Imax` falls by a few codes per period, and the steps go
on. The loop stops when the spread is inside its tolerance. It also stops when
the peak no longer reacts to the delay, for example a static share imbalance
caused by resistance, which no timing change can fix. In that case `hold_on`
or `hold_off` reports the held decision, and the delay does not run away.

The two tolerances form the tolerance band that keeps measurement noise from
moving the gate edges. Their values are this design's choice. So is the exact
rule for combining the balancing factor with the max-min spread.

**Edge direction.**
* Turn-on: the IGBT with the largest turn-on peak switched first. Its turn-on
  is **delayed** by `delay_on` × 10 ns.
* Turn-off: the IGBT with the largest turn-off peak switched last. Its
  turn-off is made **earlier** by `delay_off` × 10 ns.

A delay line cannot move an edge ahead of its input. For that reason every
turn-off edge carries a nominal delay of `OFF_BASE` = 31 cycles (310 ns), and
the advance is subtracted from it. So the gate pulse is 310 ns longer than the
PWM pulse when no advance is applied. Counters only count up and saturate at
31 steps (310 ns). They are not reset by the loop; `rst_n` clears them.

**Delay line.** `delay_mux` shifts the synchronised PWM command through 32
flip-flops. A rising edge on tap `delay_on` sets the gate, and a falling edge
on tap `31 - delay_off` clears it. A counter step moves the tap by one
position, and the line holds only one moving edge. So changing a select never
creates a false edge, provided that the PWM on and off times are each longer
than the line (about 0.4 µs with the synchroniser).

## Timing

* ADC sampling: 50 MS/s, one sample every second system clock. A word on
  `adc_data` is visible as a filtered sample about 4 cycles later.
* Median filter: one sample of latency. Any feature narrower than 3 samples
  (60 ns) is removed, including a real current peak that short.
* Gate path: `gate_pattern` follows `pwm_in` by 5 cycles + `delay_on` (rising)
  and 5 cycles + 31 − `delay_off` (falling). That includes the 2-flop
  synchroniser, the line and the output register.
* Overcurrent: the gates go off 16 cycles (160 ns) after an ADC sample above
  the limit is taken. Most of that time is the ADC model's 4-sample pipeline.
  The trip latches until `oc_clear` arrives while all currents are below the
  limit.
* Decisions: one step per edge type per PWM period.

## Interface of `dfc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `pwm_in` | in | 1 | PWM command shared by all parallel devices |
| `adc_clk` | out | 1 | 50 MHz sampling clock for the ADCs |
| `adc_data` | in | N × 8 | parallel ADC words, unsigned current codes |
| `gate_pattern` | out | N × 8 | digital gate pattern for a DAC-based gate driver: `ON_CODE` (50) or `OFF_CODE` (0) |
| `oc_clear` | in | 1 | release an overcurrent trip |
| `oc_trip`, `oc_trip_ch` | out | 1, N | trip flag and the channels that caused it |
| `delay_on`, `delay_off` | out | N × 5 | current turn-on delay and turn-off advance, in 10 ns steps |
| `step_on`, `step_off` | out | N | one-cycle pulse when a step is taken |
| `hold_on`, `hold_off` | out | 1 | imbalance seen, but the balancing factor is inside its band |
| `bf_on`, `bf_off` | out | 9 signed | last balancing factor of each edge type |

Parameters: `N` (2), `CW` counter width (5), `WIN` median window (5; 3 also
works), `TOL_BF` (2), `TOL_SPREAD` (4), `OC_LIMIT` (240 codes), `ON_CODE`,
`OFF_CODE`.

The control scheme is written for any number of parallel devices: only the
IGBT with the largest peak is stepped, whatever `N` is. The top compiles for
other values of `N` (checked up to 4), but the closed-loop test covers two
devices only. `maxmin_select` alone is tested with four.

The gate codes assume a gate driver whose DAC and power amplifier give 300 mV
per code from 0 V. Code 50 is then +15 V and code 0 is 0 V. Change the two
parameters to match a different driver. The output only ever takes the two
levels; shaping the gate voltage in several levels is not part of this design.

## What the design assumes

These points are this design's own choices:

* The ADC capture point, the synchroniser and the phase windows.
* The peak candidate rule: the middle of three samples is a candidate when it
  is at least as large as both neighbours and at least 4 codes.
* The decision rule and the tolerance values.
* The counter width, saturation and the 310 ns turn-off offset.
* The overcurrent latch and its limit.
* Reset values: everything resets to zero.

The rest is a standard realisation of an FPGA controller with this structure:
* one 100 MHz clock;
* a 50 MHz ADC clock;
* a 5-sample median filter;
* peak detection with the peaks kept in RAM;
* max-min selection;
* the balancing factor `Imax(t) - Imax(t-1)`;
* counters that drive delay multiplexers in 10 ns steps;
* 8-bit gate patterns.

Not included, because they are analog or off-chip parts:
* the ADC chips (8-bit, 10–60 MS/s parallel converters);
* the gate driver board's buffer, DAC and power op-amp;
* the power stage and its current probes.

The power op-amp limits how fast the gate can switch (about 55 kHz power
bandwidth). That limit is far below what the digital loop supports.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dfc_pkg.sv tb/tb_dfc_top.sv --top-module tb_dfc_top -Mdir obj
./obj/Vtb_dfc_top
```

* Block testbenches compare against independent reference models:
  * random streams against a sorted-window median;
  * random RAM traffic;
  * the balancing rule;
  * gate edge times against the selects;
  * counter saturation.
* `tb_dfc_top` runs the whole controller at its default parameters. It closes
  the loop through `tb/igbt_pair_model.sv`, a behavioural model of two
  parallel IGBTs and their ADCs. In the model:
  * a device that switches alone ramps toward the full load, so the leading
    device's overshoot grows with the timing mismatch;
  * the ADC adds a 4-sample pipeline;
  * one-sample noise spikes can be injected.

  The test runs three phases:
  1. A 520 ns turn-on mismatch and a 100 ns turn-off mismatch. The loop must
     settle at exactly 25 turn-on steps (250 ns) and 9 turn-off steps, with
     the turn-on peaks within 4 codes of each other. Every period the gate
     edge spacing is checked against the counters.
  2. A static share skew that no delay can remove. The loop must hold
     instead of stepping on, and the injected spikes must never appear after
     the filter.
  3. A short circuit on one channel. Both gates must go off within 300 ns and
     come back after `oc_clear`.

  It takes under a second.

The current model is deliberately simple. It shows that the loop converges
and stops. It does not predict how real devices behave, and in particular it
assumes that a delay step changes the peak monotonically. On hardware, the
tolerances and `MIN_LEVEL` must be tuned to the measured noise of the current
probes and ADCs.
