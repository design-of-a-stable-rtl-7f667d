# Digitally controlled buck converter loop

A battery-powered chip that uses dynamic voltage scaling needs a supply that
can be moved quickly to a new voltage and then held there without ripple
or limit cycles. This design is the digital controller of the
synchronous dc-dc buck converter that provides that supply, closed around an
integer model of the converter, so that the whole loop can be simulated
cycle by cycle (and, since the model is synthesizable, run on an FPGA).

Once per switching period the controller measures the output voltage against
the requested reference, turns the difference into a small signed error,
runs an incremental PID law whose two zeros cancel the converter's LC pole
pair, and turns the resulting command into the gate pulse of the next period.

```
                 vg                                  vref (from the load processor)
                 |                                     |
         +-------v--------+   vout (mV)       +--------v----------+
         | buck_converter |------------------>|     adc_error     |  lval = V/37, c0, e(n)
         | SW1 SW2 L C R  |                   +--------+----------+
         +----^-------^---+                            | e(n), 4 bit
              |       |                       +--------v----------+
              |       |                       |  pid_compensator  |  d(n), 14 bit
              |       |                       +--------+----------+
              |       |                       +--------v----------+
              |       +------- pwm_ls --------|       dpwm        |  256 ticks / period
              +------- pwm_hs = d(t) ---------|                   |
                                              +-------------------+
            adc_error + pid_compensator + dpwm = digital_controller
            digital_controller + buck_converter = buck_closed_loop (top)
```

## Units and number formats

Everything on a module boundary is a signed 16-bit integer: voltages in mV,
currents in mA. The design point is

| quantity | value |
|---|---|
| input voltage Vg | 5000 mV |
| reference Vref | 2800 mV |
| inductance, as L/Ts | 46 (46 uH at Ts = 1 us) |
| capacitance, as C/Ts | 48 (48 uF at Ts = 1 us) |
| load | 1 ohm |
| switching frequency | 1 MHz (Ts = 1 us) |
| ADC step | 37 mV |
| PID coefficients a, b, c | 25.42, -48.62, 24.2 |

One clock cycle is one DPWM tick. With the 8-bit DPWM a switching period is
256 ticks, so the 1 MHz switching frequency needs a 256 MHz clock. Nothing in
the RTL depends on the absolute clock rate; the converter model measures time
in ticks.

## The control law and its fixed-point form

The compensator is a PID, `Kp + Ki/s + Kd*s`, mapped to the z domain with
the backward-Euler substitution `s = (1 - z^-1)/Ts`. That gives

```
G(z) = (a + b z^-1 + c z^-2) / (1 - z^-1)
a = Ki*Ts + Kp + Kd/Ts,   b = -(Kp + 2 Kd/Ts),   c = Kd/Ts

d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2)
```

The coefficients come from a pole-zero design: the two zeros of the
numerator are meant to cancel the complex pole pair of the power stage, and
the denominator is a pure integrator, so there is no steady-state error at
DC. With a = 25.42, b = -48.62, c = 24.2 the sum a + b + c is exactly 1: a
constant error e raises the command by e per period once the two history
taps are full. The zeros lie at 0.976 at +/-11.4 degrees. For the converter
model used here (L/Ts = 46, C/Ts = 48, R = 1, sampled once per period) the
poles lie at 0.990 at +/-1.07 degrees, so the cancellation is not exact with
these values: the zeros add phase lead well above the LC resonance. The loop
is stable because of the command scaling described next, not because of an
exact cancellation.

`pid_compensator` computes this in velocity form:

* The coefficients are rounded to 8 fraction bits: 6508, -12447 and 6195
  (/256). They still sum to exactly 256/256, so the integrator gain is not
  disturbed by rounding.
* The accumulator holds d(n) with those 8 fraction bits. Only the integer
  part leaves the block, but the fraction is kept, so corrections smaller
  than one command step still integrate.
* The command `d` is 14 bits unsigned and means a duty of d/16384. This
  scaling sets the loop gain that the given coefficients act on: one ADC
  step of error moves the duty by 25.42/16384 = 0.16 %, about 8 mV of
  output at Vg = 5000 mV. In closed-loop simulation with the same
  coefficients, an 11- or 12-bit command oscillates by roughly +/-1 V and
  +/-0.5 V, a 13-bit command leaves a slow wander of about one ADC step,
  and at 14 bits the output comes to rest with no limit cycle.
* The accumulator saturates at 0 and at 16383 + 255/256. This both keeps
  the duty physical and stops integrator wind-up while the output cannot
  follow (for example when the reference is above Vg). Pulses on `sat_hi` and
  `sat_lo` report each saturated update.

## The error path: quantization and the two error windows

`adc_error` converts both voltages to 8-bit codes by dividing by the ADC step,
`lval1 = Vref/37` and `lval2 = Vout/37` (0..255, i.e. 0 to 9.4 V; negative
inputs read as 0). The raw error is `c0 = lval1 - lval2`, 9 bits signed.

Before it reaches the compensator the error is limited, because a large
error multiplied by a = 25.42 would throw the duty far past where it needs to
go. There are two windows:

* coarse, +/-7 steps, while the output is far from the reference;
* fine, +/-4 steps, once the loop has settled.

The rule that switches between them is this design's own: the limiter goes
to the fine window after 8 consecutive samples with |c0| <= 4, and back to the
coarse window as soon as |c0| > 7. The sample that triggers the change is
already limited with the new window. The window in use is visible on `mode`.

The ADC itself is modelled at the level of the numbers: it receives the
output voltage as an integer. A physical implementation would put a delay-line
converter in front (a chain of CMOS cells whose propagation delay depends on
the supply being measured); that front end is not part of this RTL.

## Loop timing within one switching period

| tick | event |
|---|---|
| 0 | `period_start` high; `adc_error` samples `vref` and `vout` at the end of the tick |
| 1 | `lval1`, `lval2`, `c0`, `e`, `mode` valid; `e_valid` pulse |
| 2 | new `d` valid; `d_valid` pulse |
| 255 | `dpwm` copies the upper 8 bits of `d` into its compare register |
| next 0.. | the new pulse width applies |

So an error sampled at the start of period k sets the pulse width of period
k+1: one switching period of loop delay, and exactly one command per period.

## DPWM

`dpwm` is a counter-comparator. An 8-bit counter runs through the 256 ticks of
a period; the high-side gate `pwm_hs` (the duty signal d(t), switch SW1) is
high for the first `duty` ticks, and the low-side gate `pwm_ls` (synchronous
switch SW2) is its complement. Both gates come straight from flip-flops, so
the set at the period start and the reset at the compare match are single
clock edges rather than overlapping set/reset pulses. A duty of 0 keeps SW1
off for the whole period; the widest pulse is 255 ticks. Dead time is not
modelled. The DPWM step at Vg = 5000 mV is 19.5 mV, finer than one ADC step
(37 mV); a DPWM coarser than the ADC would leave no duty value that lands in
the reference's ADC bin and the loop would hunt between neighbours.

## Converter model

`buck_converter` stands in for the analog power stage (switches SW1 and
SW2, inductor, output capacitor, resistive load). The state is the inductor
current and the output voltage, each with 16 fraction bits in a 48-bit
register. Every tick (Ts/256) is one semi-implicit Euler step, current first
and voltage with the new current:

```
I_L += (Vx - V)          / (L_MOD * 256)
V   += (I_L - V / R_MOD) / (C_MOD * 256)
```

Vx is Vg while SW1 conducts and 0 while SW2 conducts. With both switches
open the body diodes take over, and the current stops at zero instead of
reversing (discontinuous conduction). With the complementary gates of the
DPWM the loop always runs in continuous conduction. Reset puts the model at
V = 2000 mV and I_L = 1 mA. The model has no capacitor ESR and no switch or
inductor losses, so open loop it settles at Vg * duty to within a few mV.

## How well it regulates

From the end-to-end testbench, at the default parameters ("settled" is the
first switching period after which every per-period mean of the output stays
within one ADC step, 37 mV, of the reference):

| step | settled after | mean output | spread of per-period means |
|---|---|---|---|
| reset (V = 2000 mV, d = 0), 50 periods at 1000 mV, then 2800 mV | 1342 periods | 2792 mV | 0 mV |
| 2800 -> 2200 mV | 323 periods | 2207 mV | 0 mV |
| 6000 mV (above Vg) | command at its upper rail, pulse 255/256 | | |
| 0 mV | output below 37 mV (lowest ADC bin) | | |
| 0 -> 2800 mV | 1345 periods | 2792 mV | 0 mV |
| input 5000 -> 4000 mV at 2800 mV | 520 periods | 2781 mV | 0 mV |

The output comes to rest inside the ADC bin of the reference (2800 mV reads
as code 75, the bin 2775 .. 2811 mV), so the static accuracy is one ADC step.
Once the error reads zero the integrator holds, and the DPWM step (19.5 mV)
is small enough that some pulse width lands inside the bin, so the loop does
not hunt between neighbouring codes.

Large reference steps are slew-limited by design: with the error limited to
7 steps, the command can rise by at most 7/16384 of a full duty per period
once the proportional and derivative taps have passed, about 2.1 mV per
microsecond at Vg = 5000 mV. A 600 mV step therefore takes a few hundred
switching periods. A coarser command (13 bits) doubles that rate at the cost
of the one-step wander described above.

## What is specified and what is chosen here

The loop as originally specified fixes the design point in the table above,
the incremental PID law with its three coefficients, the 37 mV ADC step with
8-bit codes, the two error windows (+/-7 and +/-4), the order of the
converter update (current, then voltage) and its start state, and the chain
ADC -> compensator -> DPWM -> switches. Its converter equations are given
only in a compressed integer form; they are read here as the Euler update
shown above, with L/Ts and C/Ts as the divisors. The original integer model
also updates the voltage twice per current update, which this model does
not do (it steps every DPWM tick instead).

Everything below was chosen for this implementation and is the first thing
to revisit when adapting it:

* 14-bit command with 8 fraction bits in the accumulator; saturation at the
  duty rails; reset value d = 0.
* 8-bit counter-comparator DPWM, command truncated to its upper 8 bits,
  loaded on the last tick of the period; complementary gates without dead
  time.
* The fine/coarse window switching rule and its 8-sample settling count.
* Sampling once per switching period, at the period start, on the same clock
  as everything else (a separate ADC reference clock is not modelled).
* The converter is stepped every DPWM tick with the switched node voltage,
  rather than once per period with the averaged duty.
* The reference is a plain port; the load processor that would drive it is
  outside the design.

## Files

| file | contents |
|---|---|
| `rtl/buck_pkg.sv` | shared width, reset state of the converter model, window-mode type |
| `rtl/adc_error.sv` | quantization, raw error, error windows |
| `rtl/pid_compensator.sv` | incremental PID with saturation |
| `rtl/dpwm.sv` | counter-comparator DPWM |
| `rtl/digital_controller.sv` | the three controller blocks wired together |
| `rtl/buck_converter.sv` | integer model of the power stage |
| `rtl/buck_closed_loop.sv` | top: converter model plus controller |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters worth knowing (all have the design-point defaults): `INVERSER`
(ADC step in mV), `A`, `B`, `C` (real-valued PID coefficients, rounded inside
the compensator), `D_W` (command width), `PWM_W` (DPWM counter width; the
converter model follows it), `SETTLE_N` (samples before the fine window),
`L_MOD`, `C_MOD`, `R_MOD` (converter).

## Simulating

Each testbench checks its module against a model of its own and prints one
line `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/buck_pkg.sv tb/tb_buck_closed_loop.sv --top-module tb_buck_closed_loop
./obj_dir/Vtb_buck_closed_loop
```

Replace `tb_buck_closed_loop` with `tb_adc_error`, `tb_pid_compensator`,
`tb_dpwm`, `tb_buck_converter` or `tb_digital_controller` for the block
tests. The end-to-end run covers about 14,000 switching periods (3.7 million
clock cycles) and takes a few seconds. It prints the regulation results per
reference and how often each mechanism occurred (window clipping, fine and
coarse window entries, upper and lower saturation); a mechanism that never
occurs counts as a failure.

`tb_buck_converter` runs the converter model open loop: an exact check of the
first 3000 ticks against a 64-bit reference calculation, the averaged steady
state at four duty ratios, and the diode/discontinuous behaviour with both
switches open.
