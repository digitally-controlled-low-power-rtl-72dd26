# Cycle-by-cycle efficiency optimisation for a digitally controlled buck converter

A low-power buck converter loses energy in two ways that pull in opposite
directions. Conduction loss falls when the power switches are wider or are
driven harder. Gate-drive loss rises with switch width and with the square of
the gate voltage. The best trade-off therefore depends on the load current.
Earlier optimisers first estimate the steady-state load and then reconfigure
the power stage. With a load that changes every few tens of microseconds,
such as a processor, a graphics device or a display, the converter spends
most of its time in the wrong configuration.

This controller needs no load estimate. In a peak-current-mode converter the
digital voltage loop already computes the peak inductor current it wants,
`i_c[n]`, in every switching cycle. That number is a good instantaneous
measure of the load. So the same `i_c[n]` that sets the current limit also
selects, in the same cycle, the power-stage configuration:

* **heavy load** (above about 1 A): two or three of the three parallel power
  segments switch, each at the full gate voltage;
* **light load** (about 100 mA to 1 A): only the smallest segment switches,
  and its gate voltage is lowered in discrete steps. A switched-capacitor (SC)
  supply provides those steps.

The RTL here is the digital part: the voltage-loop compensator, the
sigma-delta DAC modulator, the switching-cycle logic, the two optimisers, the
controller of the switched-capacitor gate supply, and the per-segment gating.
The reference prototype is a 5 V to 1.8 V, 1 MHz buck with L = 2.2 uH and
C = 47 uF, rated at 3 W to 5 W.

## Signal flow

```
              e[n] (4 b)        i_c[n] (8 b)           bitstream
 windowed ADC ---------> pi_compensator ---+--> sd_dac_modulator ----> RC filter -> v_c(t)
 (off chip)                                 |                                          |
                                            |                     comparator: i_L >= v_c(t)
                                            |                                          |
                                            |        cycle_start   +------------------+
                                            |      +-------------- | cpm_modulator    | <-- cmp_trip
                                            |      |               +------------------+
                                            |      |                  hs_on | ls_on
                                            +--> segment_selector ---> seg_en (3 b) ---+
                                            |                                           v
                                            +--> gate_swing_fsm --> gain_sl (3 b)   segment_gating
                                                                        |           p_on[2:0] n_on[2:0] q1_on
                                                                        v
                                                              sc_switch_controller --> S[17:0]
                                                                                   (to the SC gate supply)
```

`dcdc_top` wires these blocks together. Everything analog lives outside and
connects through top-level ports:

* the windowed ADC and its reference, through `e_in` and `adc_sample`;
* the DAC filter, through `dac_bit`;
* the current comparator, through `cmp_trip`;
* the power MOSFETs and their drivers, through `p_on`, `n_on` and `q1_on`;
* the switched-capacitor circuit, through `sc_sw`.

## One switching cycle

The default clock is 100 MHz, so one 1 MHz switching cycle is 100 clocks.
Edges are counted from the one that raises `cycle_start`:

| edge | what happens |
|------|--------------|
| 0 | `cycle_start` pulses and `adc_sample` goes out. Both switches turn off, which starts dead time 1. |
| 1 | `pi_compensator` reads `e[n]` and updates `i_c[n]`. `ic_valid` pulses. The DAC modulator now integrates the new code. |
| 2 | `segment_selector` and `gate_swing_fsm` load their new outputs from this `i_c[n]`. The high-side switch turns on, in the enabled segments only. |
| 2 + t | The on-time ends when the synchronised comparator trips, but never within the first 4 clocks (blanking). If it does not trip, the on-time ends at 85 clocks. |
| +2 | After dead time 2, the low-side switch conducts until the end of the cycle. |

The configuration changes only while every switch is off, and it always
belongs to the current reference of the same cycle. The comparator path adds
3 clocks (30 ns) from comparator edge to switch-off: two synchroniser flops
and the output register. In closed loop the integrator absorbs this fixed
offset.

## The optimiser

### Segment selector

`seg_en` is a thermometer code. Bit 0 is the smallest segment and is always
on. The selector compares `i_c[n]` with the two thresholds in `SEG_TH`:

| `i_c[n]` | `seg_en` | segments switching |
|----------|----------|--------------------|
| below 85 | `001` | 1 |
| 85 to 139 | `011` | 2 |
| 140 or more | `111` | 3 |

It re-evaluates in every cycle, with no hysteresis. This is deliberate: the
point of the scheme is to follow the load within one cycle. If a noisy
reference makes a segment toggle around a threshold, add hysteresis to
`segment_selector`.

### Gate-swing FSM

The state is the present gate-voltage level, `gain_sl`. The levels run from
0 to 5, and 5 is the full swing. The target level is the number of entries of
`GS_TH = {20, 30, 40, 55, 70}` that `i_c[n]` reaches. In each cycle the FSM
moves **one** level towards the target.

For example, a load step from 500 mA to 1 A takes `gain_sl` through `011`,
`100` and `101` in three consecutive cycles. Stepping one level at a time
also gives the SC supply time to settle on each new voltage.

Because the highest gate-swing threshold (70) is below the first segment
threshold (85), extra segments are only ever added when the smallest segment
is already at full swing. If you recalibrate the thresholds, keep that order.

### Threshold calibration

All thresholds are in units of `i_c`. One LSB is 16 mA of peak inductor
current, so 255 is about 4.1 A. The defaults were chosen for the prototype
values above. At 5 V to 1.8 V the peak current is about the load current
plus 0.26 A of half-ripple, minus the overshoot from the comparator delay.
The defaults put the segment changes near 1.1 A and 2 A of load, and the
gate-swing levels between about 100 mA and 1 A of load.

The real values belong at the crossings of the measured efficiency curves of
the actual power stage. A first estimate comes from a simple loss model for
one segment pair:

* conduction loss is `I_rms^2 * R0 / (K * (Vg - Vth))` for K equal segments
  at gate voltage `Vg`;
* gate-drive loss is `K * Cg * Vg^2 * f_s`.

With that model:

* going from K to K+1 segments pays off once `I_rms^2` exceeds
  `K*(K+1) * Cg * Vg^2 * f_s * (Vg - Vth) / R0`;
* for the single segment, the loss-optimal gate voltage satisfies
  `I_rms^2 = 2 * Cg * f_s * Vg * (Vg - Vth)^2 / R0`.

`tb/tb_efficiency_sweep.sv` evaluates this model along a closed-loop load
sweep. It uses illustrative constants: R0 = 0.5 Ohm*V, Cg = 2.8 nF, Vth = 0.7 V,
and levels of 1.5, 2.2, 2.9, 3.6, 4.3 and 5.0 V. With those constants the
default thresholds select the lowest-loss configuration at every load point
from 0.1 A to 2.8 A. Change them through the parameters `SEG_TH` and
`GS_TH` of `dcdc_top`, or through their defaults in `dcdc_pkg`.

## The switched-capacitor controller

One switched-capacitor circuit serves both transistors of the smallest
segment:

* it supplies `V_gate` to the NMOS driver;
* the PMOS gate is driven through a coupling capacitor `C_x`, so the PMOS sees
  a swing from `V_in` down to `V_in - V_gate`;
* an auxiliary PMOS, Q1, clamps that gate to `V_in` whenever the PMOS must be
  off (`q1_on = ~p_on[0]` in `segment_gating`).

`sc_switch_controller` runs the SC circuit in two phases of `HALF - NOV`
clocks each. Between the phases it inserts `NOV` clocks with every switch
open, so a flying capacitor can never be shorted. It samples `gain_sl` once
per SC period, at the start of phase 1.

The 18-bit switch pattern of each phase comes from two tables, `PH1_TAB` and
`PH2_TAB`, indexed by the gain code. **The default tables are placeholders:**
code g closes switches 3g to 3g+2 in phase 1 and the next three in phase 2.
Before this block can drive real silicon, the tables must be filled with the
switch configurations of the actual capacitor network. The controller itself,
meaning the timing, the gaps, the sampling of the code and the lookup, does
not change.

## Voltage loop

* **Windowed ADC (external).** `e[n]` is 4-bit two's complement. It is
  positive when the output is below the reference, and saturates at +7 and -8
  outside the window.
* **Compensator.** This is an incremental PI law, computed once per cycle:
  `u[n] = u[n-1] + KP*(e[n]-e[n-1]) + KI*e[n]`. Here `u` carries `FRAC = 4`
  fractional bits and is clamped to the range of `i_c`, so the integrator
  does not wind up. The defaults are `KP = 128` and `KI = 12`, that is 8 and
  0.75 codes of `i_c` per LSB of error. With a 10 mV ADC LSB and the
  prototype's 47 uF this gives roughly 40 kHz of crossover.
* **Sigma-delta DAC.** This is a first-order modulator: an 8-bit accumulator
  whose carry is the output bit. Any 256 consecutive bits contain exactly
  `i_c` ones. An external RC filter (a 0.5 us time constant works) turns the
  bitstream into `v_c(t)`.

## Parameters of `dcdc_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `SW_PERIOD` | 100 | clocks per switching cycle |
| `DEAD` | 2 | dead time, clocks |
| `BLANK` | 4 | leading-edge blanking of the comparator, clocks |
| `D_MAX_CLKS` | 85 | maximum on-time, clocks |
| `KP`, `KI`, `FRAC` | 128, 12, 4 | compensator gains and fractional bits |
| `SC_HALF`, `SC_NOV` | 50, 2 | SC half period and break-before-make gap, clocks |
| `SEG_TH` | {85, 140} | segment thresholds, `i_c` codes |
| `GS_TH` | {20, 30, 40, 55, 70} | gate-swing thresholds, `i_c` codes |

The widths in `dcdc_pkg` are:

| width | bits |
|-------|------|
| `e[n]` | 4 |
| `i_c` | 8 |
| segments | 3 |
| `gain_sl` | 3 |
| SC switches | 18 |

The reset is synchronous and active-low. It comes up with all segments on
and `gain_sl` at full swing, which is the safe state before the load is
known. The power switches stay off while `enable` is low.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_pi_compensator` | against an integer model of the PI law, including both clamps and the one-clock latency |
| `tb_sd_dac_modulator` | bit-exact against a reference, and exact ones density over 256-clock windows |
| `tb_cpm_modulator` | period, dead times, blanking, on-time for random comparator delays, the on-time limit, no shoot-through |
| `tb_segment_selector`, `tb_gate_swing_fsm` | threshold decisions, the strobe discipline and single-step moves, including the 011, 100, 101 sequence |
| `tb_sc_switch_controller` | the phase timing, the gaps and per-period sampling of the code |
| `tb_segment_gating` | exhaustively |
| `tb_dcdc_top` | closed loop at default parameters (described below) |
| `tb_load_frequency` | the load as a 0.3 A to 1.5 A square wave at 5 kHz and 14 kHz (described below) |
| `tb_efficiency_sweep` | the closed loop at 11 load points, scored with the loss model above |

`tb_dcdc_top` runs the whole controller at its default parameters against
`tb/buck_plant_model.sv`. That is a behavioural model of the DAC filter, the
comparator, the inductor and capacitor, a segment on-resistance, and the
windowed ADC. The load steps through 0.15, 0.5, 1, 1.5, 2.5, 0.3, 1, 0.15,
3.5 and 0.15 A, then the input sags to 2 V and recovers. The testbench checks
that:

* the output stays within +/-30 mV in every steady state;
* `seg_en` and `gain_sl` follow each cycle's `i_c[n]` as described above;
* each steady state reaches the expected configuration;
* the 500 mA to 1 A step walks `gain_sl` through 011, 100 and 101;
* the SC controller picks up each new code within one period.

It also counts comparator-ended and limit-ended on-times, segment additions
and removals, gate-swing steps in both directions, ADC window saturation and
SC reconfigurations. It fails if any of them never happens.

`tb_load_frequency` drives the 0.3 A to 1.5 A square wave at 5 kHz and
14 kHz. It checks that the controller reconfigures in every half period of
the load.

`tb_efficiency_sweep` settles the closed loop at 11 load points from 0.1 A to
2.8 A. At each point it compares the configuration the controller chose with
all three segments at full swing and with the best configuration. The chosen
configuration must never lose more than the fixed one and must stay within
10 % of the best. The device constants are illustrative, so the efficiency
figures it prints show the trend, not a prediction for real hardware.

To run one testbench with plain Verilator, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dcdc_pkg.sv tb/tb_dcdc_top.sv --top-module tb_dcdc_top -o sim
./obj_dir/sim
```

To lint the design:

```
verilator --lint-only -Wall -y rtl rtl/dcdc_pkg.sv rtl/dcdc_top.sv
```

## How far to trust it, and where it departs from the original design

These parts follow the original design description:

* the architecture: a digital voltage loop around an analog peak-current loop;
* `i_c[n]` used both as the current command and as the optimiser input;
* updates in every switching cycle;
* three segments, with the gate swing scaled only on the smallest one;
* a 3-bit gate-swing code that drives an 18-switch SC controller;
* the Q1 pull-up;
* 1 MHz switching.

These are choices made for this implementation, not taken from the
description:

* the clock rate;
* all word widths except the 3-bit `gain_sl` and the 18 switches;
* the current scaling;
* the compensator law and gains;
* the modulator order;
* the dead times, blanking and on-time limit;
* the comparator synchroniser;
* the one-level-per-cycle rule of the gate-swing FSM and the number of
  levels (six);
* all threshold values;
* the SC phase timing;
* the reset state.

The SC switch tables are placeholders (see above). The closed-loop results
depend on the plant model, which is idealised. It has no parasitics, and its
gate-voltage level does not change the on-resistance. Those results therefore
show that the control logic works together, not how efficient a real power
stage would be.

The steady-state-estimating optimiser that served as the comparison baseline
is not part of this design.
