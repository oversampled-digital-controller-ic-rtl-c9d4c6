# Oversampled digital controller for a buck converter, with glued PWM corrections

A conventional digital controller for a DC-DC converter samples the output
voltage once per switching period. Its reaction to a load step therefore
comes a whole period late, and the output capacitor has to be sized for that
delay. Sampling faster helps only if the controller may also act faster. But
acting at every sample would switch the power transistors several times per
period, and the switching losses grow quickly with switching rate.

This controller samples the output four times per switching period and keeps
two paths:

* A **PID compensator** uses one sample per period. It sets the duty ratio
  `d[n]` and alone keeps the converter regulated in steady state.
* A **transient path** uses every sample. The *transient current estimator*
  takes the change of the error between two samples as the load current the
  inductor does not yet supply. The *programmable differentiator* turns that
  estimate into a duty correction `dd`, one for each of the three samples the
  PID does not use. A correction is issued only while the deviation is
  growing, and only when its size lies between two programmed thresholds.

The corrections do not become extra pulses of their own. The **oversampled
DPWM (ODPWM)** "glues" each one onto an edge that already exists: the falling
edge of a pulse that is still on, a merged pulse in the middle of the period,
the rising edge of the next period's pulse, or a notch cut out of a long
pulse. As a result the switch turns on at most twice per period, so the
switching rate stays at or below 2·f_sw, while every sample still gets to act.

The RTL targets the reference operating point: a 500 kHz, 12 V to 1.8 V, 60 W
synchronous buck with L = 325 nH and C = 600 µF, an 8-bit DPWM and an ADC with
4 mV steps running at 2 MHz with a 300 ns conversion time.

## One switching period

Everything runs from one clock, the PWM counter clock: 2^8 · 500 kHz =
128 MHz, giving T = 256 counts. The counter's quarter boundaries
(0, 64, 128, 192) start the four ADC conversions.

```
count       0          64         128        192        256=0
            |  quarter 0 |  quarter 1 |  quarter 2 |  quarter 3 |
ADC start   ^            ^            ^            ^
result      ..(38 clk)..e0 ..........e1 ..........e2 ..........e3
uses        dd1 <- e0      dd2 <- e1     dd3 <- e2     PID d <- e3
acts at                 64           128          192          next period
```

* An ADC result arrives 38 clocks (300 ns) after its quarter starts. The
  estimator and the differentiator each add one clock. The correction is then
  held in the ODPWM and acts from the **next quarter boundary**. That boundary
  is the earliest point at which a pulse of up to T/4 can still be placed
  where the glue rules want it.
* The last-quarter sample goes to the PID. Its new duty is latched at the
  start of the next period. Corrections are therefore `dd1`, `dd2` and `dd3`,
  acting at counts 64, 128 and 192.
* The ODPWM receives the sum `u = d + dd` together with an *enable-update*
  strobe, and recovers `dd` as `u` minus the duty it latched at the period
  start.

## How the ODPWM glues corrections (`rtl/odpwm.sv`)

This is the heart of the design. Each period the ODPWM keeps a small edge
schedule, in counts. The switch output is `c = main pulse AND NOT notch, OR
extra pulse, OR pre-pulse`:

| register | meaning |
|---|---|
| `f`        | falling edge of the main pulse `[0, f)`; starts as `d` |
| `xs`, `xe` | extra pulse `[xs, xe)` |
| `ns`, `ne` | notch `[ns, ne)` removed from the main pulse (only for d ≥ 0.75) |
| `p3`       | pre-pulse `[T − p3, T)`, which runs into the next period's pulse |

Corrections are first limited to ±T/4 = ±64 counts. At boundary
`t = k·T/4` (k = 1, 2, 3) a correction `dd` is applied by the first rule that
fits:

1. **Notch (d ≥ 0.75, dd < 0).** If a notch ends at or after `t`, it is
   widened by |dd|. Otherwise, for k < 3, a new notch `[t+T/4−|dd|, t+T/4)`
   is cut, so negative `dd1` and `dd2` form one notch around T/2. For k = 3
   the falling edge moves in by |dd| instead.
2. **Falling edge.** If the main pulse is still on at `t`, or ends exactly at
   `t`, and no notch has swallowed it, then `f += dd`. The edge is never
   pulled in before `t` and never pushed past T.
3. **Extra-pulse edge.** Otherwise, if the extra pulse is on at `t` or ends
   at `t`, then `xe += dd`, with the same limits.
4. **New pulse.** Otherwise a positive `dd` opens a pulse that *ends* at the
   next boundary: `[t+T/4−dd, t+T/4)`. At k = 3 this is the pre-pulse
   `[T−dd3, T)`, which joins the next period's rising edge.
5. Otherwise, a negative `dd` while the output is already off is dropped,
   because there is nothing to subtract from.

Rule 4 is what merges neighbouring corrections. The pulse opened for `dd1`
ends at T/2, where rule 3 lets `dd2` extend it. Likewise `dd2` and `dd3` meet
at 3T/4. The result, per duty region (`#` = on):

```
d < 0.25         ##....................####.........................###|##
                 main pulse          dd1|dd2 at T/2                 dd3 -> next rising edge
                 (if dd1+dd2 reach 3T/4, dd3 moves that pulse's falling edge instead)

0.25 <= d < 0.75 ##########+dd1...........................##|##...........
                 dd1 on the falling edge          dd2|dd3 at 3T/4
                 (while the pulse is still on at T/2 or 3T/4, dd2/dd3 also go to its edge;
                  a dd3 with no pulse to join becomes the pre-pulse)

d >= 0.75        ####################....|....#############+dd...........
                                     -dd1|-dd2 notch at T/2   positive dd on the falling edge
```

Two properties follow, and the testbenches check both:

* **At most two turn-ons per period.** These are the main pulse (or a
  pre-pulse running into it) and one extra pulse, or the main pulse split
  once by a notch.
* **Charge is conserved** when no limit is hit: with positive corrections the
  on-time of the period is exactly `d + dd1 + dd2 + dd3` counts.

The register `evt` reports which rule fired each time (`glue_evt_t` in
`ctrl_pkg`). The register `region` reports the duty region of the current
period.

## Deciding whether to correct

### Transient current estimator (`rtl/transient_current_estimator.sv`)

The capacitor current is C·dv/dt. Between two samples it is proportional to
`di[n] = e[n] − e[n−1]`, where `e = v_ref − v_out` in ADC steps. With the
reference stage, one step per sample (4 mV in 0.5 µs) is 4.8 A of load
current the inductor is not yet carrying. Every new sample already reflects
the corrections made since the previous one, so the estimate is
*successive*. As the inductor current catches up, `di` goes to zero.

`trans` is raised for a sample when all of these hold:

* the transient path is enabled (`nl_en`);
* `|e| ≥ e_th`;
* the deviation is growing (`di` is non-zero and has the sign of `e`).

`trans` drops as soon as the deviation stops growing. From then on the PID
settles the output alone, so the extra switching is confined to the first few
periods of a load step.

### Programmable differentiator (`rtl/programmable_differentiator.sv`)

The correction is

```
|dd| = (|di| · c) >> 4,   c = c1 if di > 0 (inductor current must rise)
                          c = c2 if di < 0 (inductor current must fall)
```

It carries the sign of `di`. The gains `c1` and `c2` are unsigned Q6.4. They
are the duty counts that change the inductor current by one ADC step's worth
of capacitor current, which depends on the rising slope (V_in − V_out)/L and
the falling slope V_out/L respectively. For the reference stage about 20 and
more than 64 counts per step follow from those slopes. The testbench, which
tunes the loop in closed-loop simulation, uses 10 and 25.

A correction is issued only if its size lies inside the window for its
sign: `dd_min_p ≤ dd ≤ dd_max_p` or `dd_min_n ≤ −dd ≤ dd_max_n`.

* **The minimum rejects output ripple and quantisation.** Take the fastest
  steady-state change of the output over one sample, in ADC steps, counting
  one step of quantisation error:
  `Δe_max = (dv/dt)_max · T_s / 4 mV + 1`, where
  `dv/dt = ESR · di_L/dt + i_C/C`. Use half the inductor ripple as `i_C`, and
  the rising or the falling inductor slope for `di_L/dt`. Then
  `dd_min_p = Δe_max⁺ · c1` and `dd_min_n = Δe_max⁻ · c2`.
* **The maximum discards changes too large for any real load step.**
  Examples are a noise spike, or the first ESR step of a load change. Repeat
  the same calculation with the largest load step plus the full ripple as
  `i_C`, and a step of zero rise time. A correction above the maximum is
  dropped, not clamped.

Only samples of quarters 0 to 2 produce corrections. The result is limited so
that `d + dd` stays within 0 to 255. `rej_small` and `rej_large` pulse when
a threshold rejects a correction during a transient.

For the reference stage (0.2 mΩ ESR, `c1 = 10`, `c2 = 25` counts per step)
this rule gives +28..+107 counts for positive corrections and −53..−252 for
negative ones.

## PID compensator (`rtl/pid_compensator.sv`)

The PID is in velocity form and runs once per period on the last-quarter
sample:

```
acc += KA·e[n] + KB·e[n−1] + KC·e[n−2],   d = acc >> 8
KA = Kp+Ki+Kd, KB = −(Kp+2Kd), KC = Kd
```

The coefficients are signed Q8.8. The accumulator carries 8 fraction bits
below the 8-bit duty and saturates at 0 and 255.996, so it cannot wind up.

## Blocks and files

| file | role |
|---|---|
| `rtl/ctrl_pkg.sv` | widths, duty-region enum, glue-event struct |
| `rtl/oversampled_controller.sv` | top: ADC model plus digital core. `vout` is a real input in volts |
| `rtl/controller_core.sv` | synthesizable controller behind the ADC: all blocks below, wired |
| `rtl/adc_model.sv` | behavioural ADC: 4 mV floor quantiser, 10-bit code, 38-clock conversion |
| `rtl/error_calc.sv` | `e = v_ref − code`, saturated to ±127 steps |
| `rtl/pid_compensator.sv` | PID, once per period |
| `rtl/transient_current_estimator.sv` | `di`, `trans` |
| `rtl/programmable_differentiator.sv` | `dd`, enable-update, threshold rejections |
| `rtl/duty_sum.sv` | `u = d + dd`, saturated |
| `rtl/odpwm.sv` | counter, sampling strobes, glue logic, output `c` |
| `tb/buck_model.sv` | behavioural buck power stage for closed-loop tests (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end test |

Configuration inputs of the top are static and programmed from outside the
chip: `vref` (450 = 1.8 V), `ka`, `kb`, `kc`, `nl_en`, `e_th`, `c1`, `c2`,
`dd_min_p`, `dd_max_p`, `dd_min_n`, `dd_max_n`. The remaining outputs (`d`, `dd`, `upd`, `trans`, `e`,
`region`, `evt`, …) are for observation. The digital core synthesizes to
about 340 word-level cells and 160 flip-flops with yosys. The ADC model is
not synthesizable.

## Results in closed-loop simulation

`tb/tb_oversampled_controller.sv` closes the loop around `tb/buck_model.sv`.
That model is a forward-Euler LC model at the controller clock rate, with
0.2 mΩ ESR and 5 mΩ series resistance (chosen values). It uses
`ka, kb, kc = 700, −1180, 500`, `c1 = 160`, `c2 = 400` and `e_th = 4`. It
computes the four thresholds with the rule above for each input voltage. All controller parameters are at their
defaults.

| 30 A load step (1 A → 31 A), 12 V in | PID only | with oversampled corrections |
|---|---|---|
| undershoot | 167 mV | 78 mV |
| time to return within 40 mV | 21.8 µs | 9.3 µs |
| extra switch turn-ons | 0 | 1 |

The original silicon reports 200 mV / 20 µs against 100 mV / 10 µs on a
real board. In the simulation the step draws two corrections, of +50 and
+60 counts, in the first period after the step. The ODPWM merges them into a
single extra pulse, so the step costs exactly one additional switching
action. The PID then carries the recovery. The switch never turns on more than
twice in a period.

The same test also does the following:

* releases the load (heavy-to-light);
* injects a one-sample 120 mV spike on the measurement, which the maximum threshold
  rejects;
* repeats both load directions (a 20 A step) at 2.3 V input, where the duty
  is about 0.8, to exercise the notches.

It checks that no correction occurs in steady state and that each
mechanism (each glue rule, both thresholds, the transient flag, corrections
in the low and the high duty regions) happens at least once. It also checks
that every correction acts exactly at the next quarter boundary, and that each
period has four samples, one PID update and at most two turn-ons.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/ctrl_pkg.sv tb/tb_odpwm.sv --top-module tb_odpwm
./obj_dir/Vtb_odpwm
```

Replace `odpwm` with any of `pid_compensator`, `transient_current_estimator`,
`programmable_differentiator`, `error_calc`, `duty_sum`, `adc_model` or
`oversampled_controller`. The end-to-end run simulates about 13 ms of
converter time (6400 periods) in about a second.

## What comes from the reference design and what is this implementation's own

**Taken from the reference design:**

* the four samples per period;
* a PID on one of them, with externally programmed coefficients;
* a load-change estimator and a programmable differentiator on the samples;
* rising and falling gains `c1` and `c2`, with minimum and maximum thresholds
  for each sign;
* the summing node and enable-update into the ODPWM;
* the threshold rule from the worst-case ripple;
* an 8-bit ODPWM at 500 kHz that limits switching to 2·f_sw;
* the glue cases for d < 0.25, 0.25 ≤ d < 0.5 and d ≥ 0.75: the merge
  around T/2, the pre-pulse before the next rising edge, the merge into the
  falling edge past 3T/4, and negative corrections subtracted from the pulse
  at high duty;
* the ADC figures (4 mV, 2 MHz, 300 ns).

**This implementation's choices:**

* **Glue rules.** The exact rule set above, including:
  * treating 0.5 ≤ d < 0.75 like 0.25 ≤ d < 0.5;
  * the exact notch behaviour;
  * the ±T/4 correction limit;
  * dropping negative corrections while the output is off;
  * acting at the next quarter boundary.
* **Estimator and correction.** The estimator as a first difference of the
  error; the "deviation is growing" condition and `e_th` for the transient
  flag; discarding rather than clamping above the maximum threshold.
* **Averaging.** No separate averager is built. Merging two corrections into
  one pulse delivers their sum, i.e. twice their average, once every other
  sample.
* **PID form.** The velocity-form PID.
* **Widths and clocking.** All word widths and fixed-point formats (10-bit
  ADC code, 8-bit error, Q8.8 PID coefficients, Q6.4 gains); the single
  128 MHz clock with clock enables; asynchronous active-low reset to duty 0.
* **Not modelled.** The programming interface for the configuration, which
  is modelled as plain input ports. The analog front end beyond an ideal
  quantiser.
