# Fuzzy logic voltage controller for a buck converter with constant power loads

In a DC distributed power system, a source converter regulates the main bus and
other converters hang off that bus. A downstream converter whose own output is
tightly regulated draws constant power from the bus. When the bus voltage
rises, its input current falls, and the other way round. This is a negative
incremental resistance, and it erodes the damping of the source converter's
output filter. The bus can then oscillate or collapse. This RTL is an FPGA
controller for the source buck converter in such a system. The main controller
is a fuzzy logic controller (FLC). It regulates the bus voltage from two 12-bit
ADC readings, the voltage reference and the measured bus voltage. Its output is
a 10 kHz PWM gate signal. A conventional PI controller on the same inputs can
be selected instead, for comparison.

The design follows a thesis on FPGA-based fuzzy control of DC
multiconverter systems. The structure, rule matrix, gains, clock rates and bit
widths it gives are used here. The fixed-point number formats, the pipeline,
the divider and the handshakes are this design's own choices. All such
choices are listed in [Departures and own choices](#departures-and-own-choices).

## Structure

```
            50 MHz clk
                |
            clk_div (/50) ----------- ctrl_tick (1 MHz enable) ----------------+
                |                                                              |
 vref  [12] ----+--> flc_controller ------------------ flc_duty --+            |
 vmeas [12] ----|     flc_input_scaling  e, e' -> Ge, Ge'         |            |
                |     flc_fuzzifier x2   5 triangular sets        +-> mux -> pwm_gen -> pwm
                |     flc_inference      4 rules, product         |   ^      (10 kHz sawtooth)
                |       flc_rule_base x4 25-rule matrix           |   |
                |     flc_defuzzifier    centre of gravity        |   ctrl_sel
                |     flc_duty_update    d += beta * delta_d      |
                +--> pi_controller ------------------- pi_duty ---+
```

| File | Contents |
|---|---|
| `rtl/flc_pkg.sv` | number formats, the `fset_t` linguistic values, `fuzzy_t`, set centres, rule matrix |
| `rtl/flc_top.sv` | top level: divider, both controllers, controller select, PWM |
| `rtl/clk_div.sv` | 50 MHz to 1 MHz enable (and square wave) |
| `rtl/flc_controller.sv` | the FLC chain below, with its handshake |
| `rtl/flc_input_scaling.sv` | error, change of error, input gains |
| `rtl/flc_fuzzifier.sv` | crisp input to degrees of NB, NS, Z, PS, PB |
| `rtl/flc_rule_base.sv` | 25-entry rule ROM |
| `rtl/flc_inference.sv` | fires the four active rules, sums the weights |
| `rtl/flc_defuzzifier.sv` | sequential divider for the centre of gravity |
| `rtl/flc_duty_update.sv` | incremental duty law with output gain and clamp |
| `rtl/pi_controller.sv` | fixed-point PI with anti-windup |
| `rtl/pwm_gen.sv` | sawtooth counter and comparator |

Everything runs on the single 50 MHz clock with an asynchronous active-low
reset. The 1 MHz rate is a one-cycle enable (`ctrl_tick`), not a second clock.

## Number formats

| Quantity | Format | 1.0 is |
|---|---|---|
| ADC codes `vref`, `vmeas` | 12-bit unsigned, 0.05 V per code (assumed) | — |
| error `e` | 13-bit signed ADC codes | — |
| normalised inputs, set centres, output singletons, `delta_d` | signed, Q10 | 1024 |
| membership degree | 11-bit unsigned | 1024 |
| rule weight (product of two degrees) | 22-bit unsigned, Q20 | 2^20 |
| duty cycle | 16-bit unsigned, Q15 | 32768 |

The input sets and the output singletons use 12-bit integers, as do the
original design's M1..M5 and D1..D5. The normalised values are 16-bit, as the
original's normalisation is.

## How the fuzzy controller computes a duty cycle

The controller takes one step per `ctrl_tick` (1 µs). A step has five stages.

**1. Input scaling** (`flc_input_scaling`, 1 clock).
The block computes `e(n) = vref - vmeas` and `e'(n) = e(n) - e(n-1)`. It then
scales both into the normalised range:

- `e_norm = Ge · e[V]`, with Ge = 0.4 per volt.
- `de_norm = Ge' · (e'[V] / Ts)`, with Ge' = 1e-6 and Ts = 1 µs. This is just
  the per-sample change of error in volts.

Each gain is folded with the ADC scale into one integer coefficient with 8
fraction bits:

- `GE_COEF = 0.4 · 0.05 · 1024 · 256 = 5243`
- `GDE_COEF = 0.05 · 1024 · 256 = 13107`

Results saturate at 16 bits.

**2. Fuzzification** (`flc_fuzzifier`, combinational, one per input).
There are five triangular sets, NB, NS, Z, PS and PB. They are centred at -1,
-0.5, 0, 0.5 and 1. Each triangle reaches exactly to the centres of its
neighbours. NB and PB are shoulders that stay at 1 beyond ±1. As a result, at
most two adjacent sets are active for any input, and their degrees add up to
1. The centres are a power of two apart (512), so the active pair comes from a
shift and the degrees from a mask, with no division:

```
p = clamp(x, -1024, 1024) + 1024          lo = min(p >> 9, 3)
mu_hi = 2 * (p - 512*lo)                   mu_lo = 1024 - mu_hi
```

The result is a `fuzzy_t`: `{lo, mu_lo, mu_hi}`, where set `lo` has degree
`mu_lo` and set `lo+1` has degree `mu_hi`.

**3. Inference** (`flc_inference` + 4 × `flc_rule_base`, 1 clock).
Each input activates at most two sets. So at most 4 of the 25 rules fire:
(lo,lo), (lo,hi), (hi,lo) and (hi,hi). They are evaluated in parallel. A
rule's weight is the product of its two antecedent degrees. Its consequent is
read from the rule matrix. Rows are the error set and columns the
change-of-error set. Each entry is a normalised change of duty cycle.

| e \ e' | NB | NS | Z | PS | PB |
|---|---|---|---|---|---|
| **NB** | NB | NB | NB | NS | Z |
| **NS** | NB | NB | NS | Z | PS |
| **Z**  | NB | NS | Z | PS | PS |
| **PS** | NS | Z | PS | PB | PB |
| **PB** | Z | PS | PB | PB | PB |

The output singletons are NB = -1, NS = -0.5, Z = 0, PS = 0.5 and PB = 1. The
block outputs two sums: `num = Σ wᵢ·Cᵢ` (Q30) and `den = Σ wᵢ` (Q20). It also
outputs `fired`, which marks the rules with non-zero weight.

**4. Defuzzification** (`flc_defuzzifier`, 12 clocks).
The output is the centre of gravity, `delta_d = num / den`. It is a weighted
average of values in [-1, 1], so its magnitude is at most 1024 and needs only
11 quotient bits. A restoring divider works on magnitudes. It finds one
quotient bit per clock, most significant first, and applies the sign at the
end. The result is truncated toward zero. With these sets `den` is always
2^20, but the divider is general. It would also handle other set shapes or
min-inference.

**5. Duty update** (`flc_duty_update`, 1 clock).
The duty cycle is updated incrementally: `d(i) = d(i-1) + β·delta_d(i)`, with
β = 0.008, the controller's output gain. In fixed point the step is
`(delta_d · 524) >>> 11`, where 524 = 0.008 · 2^16. The duty is clamped to
[0, 1], so the integrating register cannot wind up. `sat` reports whether the
last update was clamped.

**Timing.** If `sample` is seen at clock edge 0:

- the scaled inputs register at edge 0;
- inference registers at edge 1;
- the divider loads at edge 2 and finishes at edge 14;
- the duty registers at edge 15.

So `duty_valid` follows `sample` after **15 clocks** (0.3 µs). That is well
inside the 50-clock control period. Only one step is in flight at a time. A
`sample` that arrives while the previous step is still in the scaler, the
inference register or the divider is dropped and flagged on `overrun`. At the
1 MHz rate this never happens. Assertions in `flc_controller` and
`flc_defuzzifier` check the latency and check that no inference result ever
meets a busy divider.

## PI controller

`pi_controller` works on the same error, one update per tick, with its
registered output one clock later:

- `acc ← clamp(acc + KI·e)`
- `duty = clamp(KP·e + acc)`

The gains Kp = 1 and Ki = 72 (Ki·Ts with Ts = 1 µs) are folded with the ADC
scale into Q15 duty units. The accumulator carries 16 extra fraction bits:

- `KP_COEF = 1638`
- `KI_COEF = 7730`

Both the accumulator and the output are clamped to [0, 1] of duty. The
accumulator clamp is the anti-windup.

## Clock divider and PWM

`clk_div` divides the 50 MHz clock by `SCALE` = 50. It gives `tick`, one pulse
every 50 clocks, and `clk_out`, a 1 MHz square wave. The first tick comes 50
clocks after reset.

`pwm_gen` builds the sawtooth from a counter advanced by the tick. It counts
0..99, which gives 10 kHz. The gate output is high while the sawtooth is below
`duty·100/32768`. The command is latched when the sawtooth wraps, so a pulse
is never split. The resolution is therefore 1 % of duty. 0 % and 100 % are
both reachable. The PWM picks up a new duty, or a controller switch on
`ctrl_sel`, at the start of the next switching period. Both controllers keep
running whichever is selected.

## Top-level interface (`flc_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 50 MHz clock, asynchronous active-low reset |
| `vref`, `vmeas` | in | 12 | reference and measured bus voltage, ADC codes |
| `ctrl_sel` | in | 1 | `CTRL_FLC` (0) or `CTRL_PI` (1) drives the PWM |
| `pwm` | out | 1 | gate command to the switch driver |
| `duty` | out | 16 | selected duty cycle, Q15 |
| `saw`, `pwm_period_start` | out | 7, 1 | sawtooth count; pulse at each period start |
| `ctrl_tick`, `clk_1mhz` | out | 1 | control-rate enable and square wave |
| `flc_duty`, `pi_duty` | out | 16 | each controller's duty |
| `flc_duty_valid`, `flc_dd`, `flc_fired` | out | 1, 16, 4 | FLC update strobe, last `delta_d`, fired rules |
| `flc_sat`, `pi_sat`, `flc_overrun` | out | 1 | duty clamped; dropped sample |

Parameters (defaults):

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_SCALE` | 50 | clock divider ratio |
| `PWM_PERIOD` | 100 | sawtooth steps per period (10 kHz) |
| `GE_COEF` | 5243 | Ge = 0.4 |
| `GDE_COEF` | 13107 | Ge' = 1e-6 |
| `BETA_Q16` | 524 | output gain 0.008 |
| `KP_COEF` | 1638 | Kp = 1 |
| `KI_COEF` | 7730 | Ki = 72 |

If your ADC has a different volts-per-code, rescale `GE_COEF`, `GDE_COEF`,
`KP_COEF` and `KI_COEF` in proportion.

Outside this RTL are:

- the ADCs;
- the voltage transducer;
- the isolated IGBT gate driver;
- the power stage itself.

## Closed-loop behaviour: how far to trust it

The testbenches close the loop around `buck_plant_model`. This is a
behavioural, switched model of the source buck converter, integrated every
clock. It uses:

- 160 V input;
- 1.6 mH and 150 µF;
- a 132 Ω resistor and a 100–200 W constant power load;
- an assumed 0.3 Ω inductor resistance.

The two-stage test cascades two such models. The second model is a load
converter with a 21 Ω load. It takes its input from the first model's bus and
draws its switched input current from the bus capacitor.

With the default gains, this is what the model shows:

- **Fuzzy control.** The controller follows reference steps of 60, 80 and
  100 V and load steps without collapsing. It does **not** settle to a fixed
  duty cycle. The loop goes into a limit cycle, with the duty swinging
  between its clamps. The bus swings about ±8 to ±15 V, and its mean sits 4
  to 12 V above the reference. A load converter under the same controller
  behaves the same way, with a mean 5 to 7 V above its 30 V or 40 V reference.
  It holds that level while the bus is stepped between 80 and 120 V.
- **PI control.** The bus mean is within 0.3 V of 100 V and within 1.5 V of
  80 V, with about ±3.5 V of ripple. Its duty also moves between the clamps
  from period to period, so it is a tighter limit cycle rather than a settled
  operating point.

The likely reason is the scale of the incremental law. Near zero error,
`delta_d ≈ e_norm + de_norm`. Hence the duty integrates `0.4·β ≈ 0.0032` per
volt of error every microsecond, which is a very high integral gain for an
L-C filter resonating at about 330 Hz. Lower `BETA_Q16` values made no
improvement in this model. At 52 (β/10) the swing grew to about ±40 V. At 5
(β/100) the mean came within 2 to 8 V of the reference, but the swing stayed
about ±13 V. So the
closed-loop tests check only that the mean stays in a ±15 V band, tracks the
direction of reference steps, and that each mechanism occurs. They do not
claim tight regulation. The datapath itself is checked exactly, block by
block, against real-valued models. If you tune the loop for your hardware,
start with `BETA_Q16`, `GE_COEF`/`GDE_COEF` and the sample rate.

## Departures and own choices

Each item below is either a choice this design made where the thesis is silent
or a point where it departs from the thesis.

- **ADC scale.** The 0.05 V per code is assumed. Only "12-bit" is given.
- **Output gain.** β in `d(i) = d(i-1) + β·delta_d` is taken to be the
  output gain Go = 0.008. The two are named separately in the original.
- **Inference.** It is product inference, with four rules fired in parallel,
  as in the original's weight equation. The original also describes
  Mamdani max–min in general terms.
- **Rule matrix.** The rule matrix above is used. The original also shows a
  simulated 21×21 control surface that differs from this matrix in places.
  It is not reproduced.
- **Bit widths.** The original gives both 12 and 11 bits for the stored rule
  outputs, and 20 bits for the co-simulated surface. 12 bits are used.
- **Divider and pipeline.** The divider's structure, the pipeline, the 15-clock
  latency, the handshakes (`sample`/`duty_valid`, `overrun`) and the reset
  values are all this design's own.
- **PI controller.** The anti-windup clamp and the Q15/Q16 scaling are added.
- **PWM.** The sawtooth is clocked by the 1 MHz enable, giving 100 steps. The
  duty is latched once per period.
- **Controller select.** `ctrl_sel` exists so that both controllers, which the
  original implements separately, can share one PWM.
- **One channel.** Only one controller channel is built. The original also
  applies the FLC to the load converter, but does not describe two channels
  on one FPGA. Instantiate `flc_top` twice for that.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_flc_top \
    -y rtl -y tb +libext+.sv rtl/flc_pkg.sv tb/tb_flc_top.sv
./obj_dir/Vtb_flc_top
```

| Testbench | What it checks |
|---|---|
| `tb_clk_div` | tick spacing of 50, square-wave duty |
| `tb_pwm_gen` | period of 100 ticks, high time `floor(duty·100/32768)`, 0 % and 100 % |
| `tb_flc_input_scaling` | error, scaled error and change of error against real arithmetic; saturation |
| `tb_flc_fuzzifier` | all five degrees across and beyond [-1, 1]; degrees sum to 1 |
| `tb_flc_rule_base` | all 25 rules |
| `tb_flc_inference` | sums against a full 25-rule evaluation; `fired`; 1-clock latency |
| `tb_flc_defuzzifier` | quotient against integer division; 12-clock latency; busy-ignore; zero divisor |
| `tb_flc_duty_update` | increment, both clamps, `sat` |
| `tb_pi_controller` | against a real-valued PI with clamps; anti-windup recovery |
| `tb_flc_controller` | whole FLC against a real-valued fuzzy controller; 15-clock latency; all 25 rules fire; clamp; overrun |
| `tb_flc_top` | closed loop at default parameters. Reference steps 60→80→100 V, CPL 150→100→200 W, switch to PI, PI reference step. Checks every PWM period against the latched duty and counts each mechanism |
| `tb_flc_top_loads` | two-stage closed loop: a second `flc_top` runs a load converter (21 Ω) fed from the bus. Resistive load 131→57→131 Ω, CPL off/on, load converter reference 30→40→30→40 V, bus reference 100→120→80 V with the load converter held at 40 V |

Each closed-loop testbench simulates 140 ms of converter time and runs in
a few seconds.
