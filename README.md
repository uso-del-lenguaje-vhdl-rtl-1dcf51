# Sliding-mode PMSM current controller and inverter firing logic for an FPGA

This RTL controls a three-phase permanent-magnet synchronous motor (PMSM)
from a single FPGA. Each sample of the phase currents goes through a
sliding-mode current control law. The result becomes three pulse trains that
switch the legs of a voltage-source inverter. The logic is meant for a small
FPGA such as a Spartan-3A class device. It has no processor: everything is
fixed-point hardware that runs once per ADC sample.

The design follows a published case study of a top-down, model-first design
flow. In that flow the controller was first modelled in VHDL-AMS and then
refined into synthesizable blocks. The block structure, the control-law
equation for Vd, the number format, the ADC frame and the PWM come from that
case study. Where it gives only block names, this RTL makes its own choices,
and every source file says which parts are which.

## Signal flow

```
             ADC (2 ch, serial)
                  |
           adc_interface         Ia = ch0, Ib = ch1, Ic = -(Ia+Ib)
                  |
   Sa,Sb,Sc --> concordia  <-- E (DC link)
                  |  Id, Iq, Vd_meas, Vq_meas
         +--------+-----------------+
         |                          |
   current_rate               control_voltage  <-- wr, S1, S2, K1, K2
   (Idp, Iqp -> out)                |  Vd, Vq
                                inv_concordia
                                    |  Va, Vb, Vc
                                pwm_control   <-- kv, P
                                    |  T_alpha, T_beta, T_gamma, sector angle
                          inv_firing_controller <-- P
                                    |
                              Sa, Sb, Sc  --> inverter (and back to concordia)

   f1,f2,a,b --> signal_proc --> f3 --> pwm --> fout      (separate example path)
```

`motor_controller_top` wires all of this together. The current errors
`q1 = Idr - Id` and `q2 = Iqr - Iq` are formed in the top. The top also
brings out `Idp` and `Iqp`, because these four signals feed the
switching-surface and gain calculations of the sliding-mode controller. The
source description names those calculations, and the current-reference map
from the accelerator pedal, but gives no equations for them. So they are not
in this RTL: `S1`, `S2`, `K1`, `K2`, `Idr` and `Iqr` are top-level inputs. A
host processor or a later block can supply them.

## Number formats

* The control datapath uses **Q11.20**: 32-bit two's complement with 1 sign
  bit, 11 integer bits and 20 fraction bits. The range is ±2048 and the
  resolution is about 1e-6. The type is `mc_pkg::q_t`. Multiplies form a
  64-bit product, shift it right by 20 (rounding toward minus infinity) and
  saturate. Adds and subtracts saturate as well, so an overflow clips instead
  of wrapping.
* ADC samples, duty words and on-times are **12-bit integers**. ADC samples
  are two's complement. In the top, an ADC code enters Q11.20 shifted left by
  `ADC_SHIFT = 12`, so one LSB is 1/256 A. That scale is a placeholder for
  the real current-sensor gain.
* Motor constants are `real` parameters. They are rounded to Q11.20 at
  elaboration. The defaults are placeholders: R = 1 Ω, Ld = Lq = 10 mH,
  rotor flux 0.1 Wb and 4 pole pairs. Set them for your machine. They appear
  in both `current_rate` and `control_voltage`, so keep the two blocks in
  step.

## The inverter firing controller

This is the least obvious part of the design. It does not use one comparator
per phase. It has three pulse generators, whose outputs are called alpha,
beta and gamma, and a router that decides which phase gets which pulse
train. The router chooses by the 60° sector the voltage angle is in.

* `pulse_gen` (×3) shares one period `P`, counted in clocks. Output *x* is
  high for the first `D_x` clocks of each period. `P` and `D` are sampled at
  the start of a period. Because all three generators are reset together and
  share `P`, their periods stay aligned.
* `sector_decoder` turns the 12-bit angle (4096 = 360°) into a one-hot
  sector `A1..A6`, where sector *k* covers [(k-1)·60°, k·60°).
* `pulse_control` has three 4-input multiplexers. Their data inputs are
  D0 = alpha, D1 = beta, D2 = gamma and D3 = 0. Each multiplexer has two
  select bits, made by OR-ing pairs of sector flags:

  | phase | S0        | S1        |
  |-------|-----------|-----------|
  | Sa    | A3 \| A4  | A2 \| A5  |
  | Sb    | A5 \| A6  | A1 \| A4  |
  | Sc    | A1 \| A2  | A3 \| A6  |

  This gives the following routing (a = alpha, b = beta, g = gamma):

  | sector | 1 | 2 | 3 | 4 | 5 | 6 |
  |--------|---|---|---|---|---|---|
  | Sa     | a | g | b | b | g | a |
  | Sb     | g | a | a | g | b | b |
  | Sc     | b | b | g | a | a | g |

  In every sector each pulse train goes to exactly one phase. The routing
  rotates by two sectors from phase to phase.

The source schematic shows the multiplexers, their data inputs, the OR gates
and an enable that is always on (a grounded bit, inverted). It does not show
legibly which sector flag drives which select line. The table above is the
only assignment of the printed flag names under which no two phases share a
pulse train in any sector. **If you have the original wiring, check this
table first.** A wrong assignment is hard to spot in simulation, because the
outputs still look like PWM.

Read the other way round, the table says that in sector 1 (voltage vector
between 0° and 60°, where Va ≥ Vb ≥ Vc) phase A gets alpha, C gets beta
and B gets gamma. In every sector, alpha goes to the phase with the highest
voltage, gamma to the middle one and beta to the lowest. This is the usual
six-sector switching pattern. `pwm_control` therefore sorts the three
per-phase on-times: the longest goes to `T_alpha`, the middle one to
`T_gamma` and the shortest to `T_beta`. It also outputs the centre angle of
the sector it found. Routing with that angle hands every phase switch its
own on-time. The firing controller keeps an angle input of its own, so it
can also be driven directly, as in a stand-alone test of the firing
controller, inverter and motor.

Timing: the outputs are the registered pulse-generator bits passed through
combinational routing. A change of angle moves the routing at once, in the
middle of a period. New on-times take effect at the next period boundary.

### Driving an inverter and a stator

`tb/tb_firing_inverter_stator.sv` runs the firing controller against a
simple power stage, built into the testbench as behavioural code. Each
inverter leg sits at +100 V while its switch signal is high and at -100 V
while it is low. The lower switch is the complement of the upper one, with no
dead time. The legs feed a star-connected stator with R = 1 Ω and L = 10 mH
per phase. The rotor is held still, so there is no back-EMF and no speed.
The angle is stepped 48 times per electrical turn, one step per firing
period, first forwards and then backwards, with several sets of on-times.
The test checks two things:

* Over every period, each leg's mean voltage is `(2T/P - 1)·100 V`, where
  T is the on-time that the routing table gives that phase in that sector.
* Once the start-up transient has died away, the stator current vector
  follows the angle: two turns forwards, then two turns backwards, each
  within 5 %.

## The control law

All blocks in this section are Q11.20, with a `valid_i` → `valid_o` latency
of one clock.

* **`concordia`** applies the power-invariant, stationary three-to-two-axis
  transform to the measured currents:
  `d = √(2/3)(a − b/2 − c/2)` and `q = (b − c)/√2`.
  Phase voltages are not measured. They are rebuilt from the switch states
  as `Vx = E/3·(2Sx − Sy − Sz)` (star-connected load) and transformed the
  same way.
* **`current_rate`** predicts `dId/dt` and `dIq/dt` from the PMSM voltage
  equations, with `w = p·wr`:
  `Idp = (Vd − R·Id + w·Lq·Iq)/Ld` and
  `Iqp = (Vq − R·Iq − w·(Ld·Id + Φm))/Lq`.
  The divisions are multiplications by constants.
* **`control_voltage`** is the sliding-mode law:
  `Vd = R·Id − p·wr·Lq·Iq − K1·sat(S1)` and
  `Vq = R·Iq + p·wr·(Ld·Id + Φm) − K2·sat(S2)`.
  The Vd equation and its two-multiplier, two-adder datapath come from the
  source. Vq is built the same way from the motor model. `sat(S)` is
  `S·SAT_GAIN` limited to ±1. `sat_o` flags when a surface is at a limit.
* **`inv_concordia`** is the exact inverse of the transform above:
  `Va = √(2/3)·Vd` and `Vb,c = −Vd/√6 ± Vq/√2`.
* **`pwm_control`** computes `T = P/2 + V·kv` for each phase, clamped to
  `[0, P]`, with `kv` in counts per volt (use `P/E`). It then sorts the
  three values into `T_alpha`/`T_gamma`/`T_beta` and outputs the sector
  angle, as described above. `clamp_o` flags when a value was limited.

In the top, a new ADC sample produces new on-times four clocks later. The
pulse generators apply them at their next period start. With the default ADC
settings a sample arrives every 160 clocks.

## ADC interface

`adc_interface` drives SCK and a conversion pulse. It reads a 34-bit frame
MSB first, one bit per falling edge of SCK, and copies out
channel 0 = frame bits 31..20 and channel 1 = frame bits 15..4. This matches
a two-channel serial ADC that sends two filler bits, 14 data bits, two filler
bits and 14 more data bits; the 12 most significant bits of each channel are
kept. The samples read in one frame appear at the conversion pulse that
starts the next frame, together with a one-clock `valid_o`.

* SCK is clk/(2·`SCK_HALF`). The default is clk/4.
* A frame is `CONV_PERIOD` SCK periods long. The default is 40, so a frame
  is 160 clocks.

Both values are this design's choice. `CONV_PERIOD` must be at least 35.

## The DSP-to-PWM example path

The source uses two blocks to show how a controller equation becomes
hardware. `motor_controller_top` keeps them as a separate path with its own
ports:

* `signal_proc` computes `f3 = f2·(a·f1 + b)` on 12-bit unsigned fractions,
  combinationally. The upper 12 bits of each product are kept, and the sum
  wraps modulo 2^12. The source does not say how the 24-bit `a·f1` is
  narrowed before the addition. Taking its upper half is this design's
  reading.
* `pwm` is a centre-aligned PWM with a free-running 12-bit counter. It
  samples the duty `d` at counter zero and sets the output at
  `0x7FF − d/2`. It clears the output at `0xFFF` minus that value, which
  gives a pulse of `2·⌊d/2⌋+1` clocks centred on mid-period. The threshold
  passes through two registers, so a new duty acts two clocks after it is
  sampled.

## How far to trust it, and where it departs from the source

Every block has a self-checking testbench against an independent
floating-point or integer model. The top-level test runs the whole chain at
default parameters through 36 operating points. They put the voltage vector
in all six sectors and cover both saturation limits, the linear region and
duty clamping. The test checks the current errors, the Vd/Vq commands and the
once-per-frame update rate. It also checks that each switch signal's high
time equals the on-time computed from that phase's own voltage.

What the tests do not cover:

* They do not close the loop through a motor model. The inverter test above
  drives a stator open-loop with the rotor locked. It does not model rotor
  speed.
* The top-level test does not check `Idp`/`Iqp` at the top; the block test
  checks them.
* Nothing has been run on hardware.

Choices made here where the source is silent or unclear:

* The Concordia and inverse-Concordia equations (stationary,
  power-invariant). The source names the transform without equations.
* The Vq equation. Only Vd is printed. One drawing of the Vd datapath labels
  a multiplier input "Ld·Iq" and both adders "+". This RTL follows the
  printed equation (Lq, minus signs), which also agrees with the motor model.
* The width of the `sat()` band, the `pwm_control` mapping, the pulse
  generator's internals, the angle encoding, the routing table above, the ADC
  clocking and frame rate, the ADC channel-to-phase assignment, and all motor
  constants.
* Reset is asynchronous and active high throughout, as in the source's ADC
  and PWM blocks.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_motor_controller_top.sv --top-module tb_motor_controller_top
./obj_dir/Vtb_motor_controller_top
```

Replace the testbench name to run one block, for example `tb_pulse_control`
or `tb_adc_interface`. `mc_pkg.sv` must always come first.
`tb/adc_model.sv` is a behavioural model of the serial ADC, used by the ADC
and top-level tests. All testbenches finish in seconds.
`tb_firing_inverter_stator` is run the same way.

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv` | Q11.20 type, constants, saturating arithmetic |
| `rtl/motor_controller_top.sv` | the whole controller and the example path |
| `rtl/adc_interface.sv` | serial ADC reader |
| `rtl/concordia.sv`, `rtl/inv_concordia.sv` | axis transforms |
| `rtl/current_rate.sv`, `rtl/control_voltage.sv` | motor model and sliding-mode law |
| `rtl/pwm_control.sv` | voltages to on-times |
| `rtl/inv_firing_controller.sv`, `rtl/pulse_gen.sv`, `rtl/sector_decoder.sv`, `rtl/pulse_control.sv` | firing controller |
| `rtl/signal_proc.sv`, `rtl/pwm.sv` | DSP-to-PWM example |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/adc_model.sv` | ADC behavioural model |
| `tb/tb_firing_inverter_stator.sv` | firing controller with inverter and stator models |
