# Predictor/corrector balancing for multilevel flying-capacitor converters

A flying-capacitor converter (FLC) builds a multilevel phase voltage from a
chain of switching cells with "flying" capacitors between them. For a
given output level there are usually several switch patterns, and each one
charges or discharges a different set of capacitors. The capacitors stay at
their correct voltages only if the controller keeps picking the right
pattern. This RTL does that with one small block, `flc_balancer`, placed
between a multilevel PWM modulator and the switches. The modulator only
decides *how many* upper switches are on, which is the output level. The
balancer decides *which* ones, from the capacitor voltages and the sign of
the phase current.

The balancer does not depend on the modulator type. Its number of levels is
one parameter (`NLEV`), so it needs no hand-made balancing table for each
converter size. The repository also has a complete closed-loop
three-phase, seven-level test system in synthesizable SystemVerilog: a sine
source, a PD-PWM modulator, three balancers, a clocked mathematical model of
the three converter phases, and an R-L load. With it the balancing can be
watched working, and checked.

## The seven-level converter and its numbering

One phase has six switch pairs, `Tx0` (at the DC link) to `Tx5` (at the
output). Each pair is an upper switch and its complementary lower switch.
Five flying capacitors sit between neighbouring cells: `Cx1` between cells 0
and 1, and so on up to `Cx5` between cells 4 and 5. In the RTL, bit `k` of a
switch pattern is upper switch `Txk`. Index `k` of the capacitor arrays
(`uc_low[k]`, `uc_out[k]`) is capacitor `Cx(k+1)`.

Three facts are all that the balancing needs:

* **Level = number of ON upper switches.** With DC-link voltage `Udc`, the
  phase voltage against the DC midpoint is `-Udc/2 + level*Udc/6`. This holds
  when every capacitor is at its reference: `Cx1` at 5/6 `Udc`, down to `Cx5`
  at 1/6 `Udc` (500, 400, 300, 200 and 100 V for 600 V).
* **A capacitor carries current only when its two neighbouring switches
  differ.** If `Tx(k)` and `Tx(k+1)` are equal, `Cx(k+1)` is bypassed.
* **Direction.** With the pair `(Tx(k), Tx(k+1)) = (1, 0)`, a positive phase
  current (flowing out to the load) *charges* `Cx(k+1)`. With `(0, 1)` it
  discharges it. A negative current does the opposite.

## Predictor

Once per switching period the balancer samples two things. The first is
one comparator bit per capacitor, `uc_low[x]`, which is 1 when the reference
is above the measured voltage. The second is the sign of the phase current.
For each capacitor it then decides whether the capacitor should be charged:

    charge(x) = (current > 0) == uc_low[x]

This covers four cases. A low capacitor with a positive current is charged.
A high capacitor with a positive current is discharged. With a negative
current both are reversed.

The predictor walks `x` from the output side (`x = 4`) down to `x = 0`. It
writes `(1, 0)` into switches `(x, x+1)` when `charge(x)` is true and
`(0, 1)` when it is false. Each pass overwrites the switch `x+1` that the
previous pass had set. The result is therefore:

    pred[x+1] = !charge(x)   for x = 0..4
    pred[0]   =  charge(0)

The prediction ignores the modulator completely, so its number of ones is
generally not the required level.

## Corrector

The corrector makes the prediction carry the required level while moving it
as little as possible. `Level` is the number of ones in the modulator
pattern `T`. It walks `i = 0..5`:

* if the pattern has too few ones and switch `i` is 0, set it;
* if the pattern has too many ones and switch `i` is 1, clear it;
* recount the ones after every step.

Every switch is visited once, so the count always reaches `Level` by the end
of the walk. The corrected pattern is then registered as the switch command.
An assertion checks that the count was reached.

Example. The current is positive and `Cx1` and `Cx3` are low
(`uc_low = 5'b00101`). This gives `charge = 1,0,1,0,0` for `x = 0..4`, so the
prediction is `pred = 6'b110101` (4 ones). If the modulator asks for level 2,
the corrector clears switch 0 and then switch 2, giving `6'b110000`.

Predictor and corrector are combinational, and the output is registered. The
balanced pattern therefore follows the modulator pattern with one clock of
latency. Within a switching period the prediction stays fixed. The output
changes only when the modulator's level changes, so the switching frequency
stays close to the modulator's. That is why the measurements are sampled
only once per period.

## The closed-loop test system

`flc_system_top` connects, per phase U, V and W:

    sine3_generator -> pd_pwm_modulator -> flc_balancer -> flc_phase_model -> rl_load3
                                               ^  ^  comparator bits  |            |
                                               |  +-------------------+            |
                                               +---------- phase current ----------+

* **`sine3_generator`**: a 32-bit phase accumulator with a 1024-entry sine
  table. The table is computed at elaboration time, entry
  `n = round(32767*sin(2*pi*n/1024))`. Phases V and W lag U by 1/3 and 2/3 of
  a turn. The frequency is `ftw * f_clk / 2^32`, so 150 Hz at 10 MHz is
  `ftw = 64425`. The amplitude is `amp / 32768`. The outputs are signed
  16-bit.
* **`pd_pwm_modulator`**: phase-disposition PWM. Six triangular carriers,
  all in phase, are stacked over the reference range. One up/down counter
  runs `0..HALF..0`, with `HALF = round(f_clk / (2*f_s))`: 333 for 10 MHz
  and 15 kHz, giving a period of 666 clocks. The reference is scaled to
  `(ref + 32768) * 6*HALF / 65536`. Bit `k` is 1 while that value exceeds
  `k*HALF + counter`. The output is a thermometer code whose bit count is the
  level. `sync` pulses once per period, at the carrier minimum.
* **`flc_phase_model`**: a clocked model of one converter phase, with one
  Euler step per clock (`dt = 1/f_clk`). It walks the switch pattern from
  the DC side. Cell 0 gives `+-udc/2`. Each later cell `i` whose switch
  differs from its neighbour adds `+-uc` and passes `+-i` through that
  capacitor. Each capacitor then integrates `uc <= uc - ic*dt/C`. The
  comparators test `6*uc[k] < (5-k)*udc`, which avoids a divider. The DC
  link is ideal by default (`DC_STIFF = 1`). With `DC_STIFF = 0` it is
  integrated like a capacitor.
* **`rl_load3`**: `i <= i + dt*(u - R*i)/L` per phase. The load star point
  is tied to the DC midpoint. `R` is a run-time input in unsigned Q8.8 ohms
  (2 ohm = 512, 120 ohm = 30720), so load steps can be applied while the
  model runs.

All analogue quantities are `flc_pkg::fx_t`: signed 48-bit with 24
fractional bits, in volts or amperes. `dt/C` and `dt/L` are integer
constants derived from the parameters at elaboration. The parameters are
integers in engineering units:

| module / parameter | default | meaning |
|---|---|---|
| `NLEV` | 7 | levels (NLEV-1 switches, NLEV-2 capacitors) |
| `CLK_HZ` | 10 000 000 | model clock = time step |
| `FS_HZ` | 15 000 | switching frequency |
| `UDC_V` | 600 | DC link |
| `C_NF` | 100 000 | flying capacitance (100 uF) |
| `L_UH` | 20 000 | load inductance (20 mH) |
| `UC_INIT_PCT` | 100 | capacitor voltages at reset, in % of reference |
| `flc_phase_model.DC_STIFF` | 1 | ideal DC link |

`flc_balancer` alone is the part meant for a real controller. Its inputs
are the comparator bits, the signed current (only its sign is used), the
modulator pattern and a once-per-period `sample` strobe. The other modules
are there to drive it and to model the plant.

## How it behaves

At the default set-up the end-to-end test runs 100 ms (one million clocks):
600 V, 15 kHz, 100 uF, 20 mH, 150 Hz at full amplitude, and the load stepping
120 ohm -> 2 ohm -> 120 ohm at 25 ms and 75 ms. It reaches the following:

* the level is kept on every clock in every phase;
* the peak current at 2 ohm is 16.6 A, against 15.8 A for the fundamental
  alone;
* in steady state at 2 ohm the capacitor ripple is 12 to 20 V peak to peak,
  largest on `Cx2`;
* the largest deviation from a reference, including the load-step
  transients, is 16.7 V.

Started with every capacitor 20 % below its reference (2 ohm load), the
balancer brings all five capacitors of each phase within 20 V in 4 to
5.5 ms, which is 0.6 to 0.8 output periods.

With the low-voltage converter (60 V, 40 kHz, 40 uF) and an R-L stand-in for
an unloaded induction machine (1.86 ohm, 38.3 mH), `Cx5` ripples by about
2.5 V peak to peak at 5 Hz / amplitude 0.25 and at 50 Hz / amplitude 1.0.
Measurements on a laboratory converter of this kind have shown about 10 V
peak to peak. Those include measurement noise and dead time, which the
model does not have.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/flc_pkg.sv tb/tb_flc_system_top.sv --top-module tb_flc_system_top
    ./obj_dir/Vtb_flc_system_top

| testbench | what it checks |
|---|---|
| `tb_flc_balancer` | every comparator/current combination and random patterns, at 7 and 5 levels, against a closed-form reference; sampling only on `sample`; one-clock latency |
| `tb_pd_pwm_modulator` | thermometer output, 666-clock period, mean level per period against the reference, extremes |
| `tb_sine3_generator` | values against `sin()` for all three phases, period, amplitude 0.25, hold when disabled |
| `tb_flc_phase_model` | voltages, capacitor integration and comparators against a real-number model, both DC-link options |
| `tb_rl_load3` | current against real-number integration across R steps; steady state `u/R` |
| `tb_flc_system_top` | the full 100 ms run above at default parameters (about 3 s); counts each balancer mechanism and fails if one never occurs |
| `tb_flc_experiment` | the two low-voltage operating points (about 5 s) |
| `tb_flc_recovery` | recovery from capacitors 20 % low, within 20 ms |

To try another number of levels, set `NLEV` on `flc_system_top`. Every
module takes it: the modulator stacks `NLEV-1` carriers, the phase model
derives the capacitor references `udc*(NLEV-2-k)/(NLEV-1)`, and the
balancer's loops follow. The top elaborates at other sizes, but only the
balancer has been simulated at a size other than seven levels (five).

## Departures and own choices

These follow the published method: the predictor and corrector loops,
sampling once per switching period, the model equations, the comparators,
the block structure and all default numbers. The rest is this design's own
choice:

* **Loops unrolled.** The predictor/corrector loops are evaluated in one
  clock. No sequential per-iteration schedule is implied.
* **Sampling instant.** The measurements are sampled at the carrier
  minimum.
* **DC link.** It is ideal by default. The original model equation also
  integrates the DC link through a capacitor. That is available as
  `DC_STIFF = 0`, but with no DC source in the model it drifts.
* **Neutral point.** The load star point is connected to the DC midpoint.
  An isolated neutral, as with a real machine, is not modelled.
* **Modulator details.** Natural sampling, the reference scaling and the
  thermometer coding are not taken from a specification.
* **Laboratory load.** The induction machine is represented only by an
  R-L stand-in in `tb_flc_experiment`.
* **Not included.** There is no power stage, analogue measurement (ADC)
  front end or processor interface. `flc_phase_model` and the comparator
  bits stand in for them.
