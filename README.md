# Field-oriented control of a PMSM in FPGA logic

This is a field-oriented controller (FOC) for a permanent-magnet synchronous
motor, written as plain synthesizable SystemVerilog with no processor. It runs
the whole current loop once every 10 µs, in step with a 100 kHz PWM carrier.
That rate suits GaN inverters, which switch about five times faster than IGBT
stages, and is hard to reach on a microcontroller. One control pass, from ADC
sample to new gate duties, takes 13 clocks (130 ns) at 100 MHz. The rest of
the 10 µs period is idle.

The structure follows a published FPGA design for a Zynq-7010 board. That design
was tested against a hardware-in-the-loop motor emulator, with a 600 V DC link,
100 kHz switching and a 4-pole-pair motor. Every function block (transforms, PI
regulators, SVPWM) is a separate module, so each one can be reused and tested
alone. The number format, the handshakes and several details the reference
leaves open are choices made here. They are listed under
[Departures and choices](#departures-and-choices).

## The control loop

```
 omega_ref ─►(−)─► speed PI ──► I_q* ─►(−)─► q-axis PI ─► U_q ─┐
             ▲                  I_d*=0 ─►(−)─► d-axis PI ─► U_d ─┤
             │                            ▲        ▲             ▼
             │                          I_d      I_q      inverse Park ─► SVPWM ─► 6 gate signals
             │                            └─ Park ◄─ Clarke ◄─ ADC codes (phases a, b)
             │                                 ▲                  ▲
   encoder ─► speed (2 kHz) ──► ∫ω dt + θ0 ──► sin/cos table ─────┘
```

- **Speed loop.** Runs on every 5th pass (20 kHz). Its output, the q-axis current
  reference, is limited to ±22 A.
- **Current loops.** Run on every pass (100 kHz). The d-axis reference is fixed
  at zero. The output voltages are limited to ±18 V.
- **Rotor angle.** The angle is the integral of the speed measured by the
  encoder, starting from an initial angle `theta0` that can be loaded at any
  time. There is no position sensor besides the incremental encoder.
- **Default gains** (speed / current): Kp 0.26 / 8.60, Ki 2.01 / 227.27,
  limits ±22 / ±18. They are parameters of `foc_top`.

## One control pass, clock by clock

`control_timer` pulses `start` every 1000 clocks, at the PWM carrier valley.
Every stage is registered and starts on the `done` pulse of the stage before it:

| clock | stage | module |
|---|---|---|
| 0 | latch both ADC codes and convert them to amperes; I_c = −(I_a + I_b) | `convert_data` |
| 1 | I_α, I_β | `clarke` |
| 2 | I_d, I_q, using the **previous pass's** sine/cosine | `park` |
| 3 | angle += ω·Ts | `omega_to_theta` |
| 4 | table look-up of sin/cos of the new angle; the speed PI starts if this is a speed pass | `sin_cos`, `pi_controller` |
| 6 | both current PIs start | `pi_controller` ×2 |
| 8 | U_α, U_β, using the new sine/cosine | `inv_park` |
| 9 | sector | `sector_detect` |
| 10–11 | d0, d1, d2 | `duty_d012` |
| 12 | leg duties da, db, dc | `duty_abc` |
| 13 | duties written to the comparator's shadow register (`pass_done`) | `pwm_compare` |

The duties of pass *k* take effect at the next carrier valley. They drive the
whole carrier period that follows, so the inverter output lags the ADC sample
by one period (10 µs) plus 130 ns.

Park deliberately uses the sine/cosine of the previous pass, as the reference
timing diagram does. The currents were sampled at the start of the period, when
the angle had not yet been advanced. The inverse transform uses the fresh
angle.

## Number formats

- **Physical quantities.** Every current (A), voltage (V), speed (electrical
  rad/s) and duty ratio is a signed 32-bit fixed-point number with 16 fraction
  bits (type `fx_t` in `foc_pkg`). The range is ±32768 and the resolution is
  1.5·10⁻⁵.
- **Angles.** Angles are unsigned 32-bit fractions of an electrical turn (type
  `angle_t`), where 2³² means 2π. They wrap around without any extra logic.
- **Gains.** Gains are `real` parameters and are converted to fixed point
  during elaboration. Kp has 16 fraction bits. The integral gain is stored as
  Ki·Ts with 32 fraction bits, and the integrator keeps 32 fraction bits. This
  matters for the speed loop: there Ki·Ts ≈ 1·10⁻⁴, and 16 bits would round it
  to 7 LSB, an error of about 4 %.

## The parts

### Current measurement (`convert_data`)
The two 12-bit ADC results are unipolar codes for 0…1 V. The current sensors
map a phase current onto 0.01 V/A + 0.5 V. The current is therefore
`I = 100·code/4095 − 50` A, which gives a measuring range of ±50 A in steps of
24 mA. The ADC itself (the FPGA's on-chip XADC) is not part of this RTL: its two
results enter `foc_top` as `adc_code_a` and `adc_code_b`. Phase c is not
measured.

### Encoder and speed (`encoder_reader`)
1. **Input filter.** Each channel passes a 2-flop synchroniser. A new level is
   then accepted only after 4 equal samples.
2. **Decoding.** The previous and present (a, b) pairs form a 4-bit code.
   - `0100 0010 1011 1101` count forward.
   - `1000 0001 0111 1110` count backward.
   - Codes where both channels changed are reported on `enc_illegal` and are
     not counted.
3. **Speed.** A prescaler makes a 1 MHz tick. Every 500 ticks (2 kHz) the
   number of edges *x* counted in the window becomes the speed:
   `ω_e = x · 2000 · z_p / (4 n) · 2π`. With z_p = 4 and n = 1024 pulses per
   revolution, one edge per window is 12.27 rad/s. The measured speed is
   therefore coarse at low speed: at 30 rad/s it alternates between 24.5 and
   36.8 rad/s. This resolution is the cost of the edge-counting method.

### Angle (`omega_to_theta`, `sin_cos`)
The angle integrates ω·Ts with forward Euler in a 48-bit accumulator.
`sin_cos` reads a quarter-wave table through two read ports, one for sin θ and
one for sin(θ + 90°).
- **Size.** 1024 entries of 16 bits, one block RAM.
- **Contents.** Entry *i* holds `round(32768·sin((i+0.5)·π/2048))`, capped at
  32767. The file is `rtl/sin_quarter.hex`, one hex word per line.
- **Resolution.** The half-step offset makes the table symmetric, so mirrored
  quadrants read `~i`. The angular resolution is 2π/4096, and the error is
  below 10⁻³.

### PI regulators (`pi_controller`)
On each update:
`I' = I + Ki·Ts·e`, `u = Kp·e + I'`. If |u| exceeds the limit, the output is
clamped, `saturation` is raised and the integrator keeps its old value
(anti-windup). Otherwise the integrator takes I'. The update takes 2 clocks.
One module serves the speed loop (Ts = 50 µs) and both current loops
(Ts = 10 µs).

### Space-vector PWM (`svpwm` = `sector_detect` → `duty_d012` → `duty_abc` → `pwm_compare`, plus `triangle_gen`)
This is the hardest part to follow.

**Sector.** The sector is found without computing an angle: U_β is compared
with ±√3·U_α. Sector 1 spans 0–60°, and the sectors count anticlockwise.

**Dwell times.** In every sector the reference vector is made of three parts:
- one vector with a single high leg (V1, V3 or V5), on for ratio **d1**;
- one vector with two high legs (V2, V4 or V6), on for ratio **d2**;
- the zero vectors, on for **d0 = 1 − d1 − d2**.

With a = U_α and b = U_β/√3, `[d1 d2] = 3/(2·Udc) · M_k · [U_α U_β]` reduces to
additions:

| sector | d1 ∝ | d2 ∝ |
|---|---|---|
| 1 | a − b | 2b |
| 2 | −a + b | a + b |
| 3 | 2b | −a − b |
| 4 | −2b | −a + b |
| 5 | −a − b | a − b |
| 6 | a + b | −2b |

The factor 3/(2·Udc) comes from `recip_div`. This restoring divider runs all
the time on the `udc` input and delivers a new result every 51 clocks. Until
its first result, about 0.5 µs after reset, all duties are zero, so the very
first pass outputs zero voltage.

**Over-modulation.** If d1 + d2 > 1, the excess is taken half from each ratio
and d0 becomes 0. `overmod` reports this case.

**Leg duties.** Every leg is on for d0/2, plus d1 if it is high in the
single-leg vector, plus d2 if it is high in the two-leg vector. For example,
sector 1 gives `da = d0/2+d1+d2`, `db = d0/2+d2`, `dc = d0/2`.

**Carrier and comparison.** The carrier counts 0…500…0 (1000 clocks, 100 kHz).
A duty d becomes the level c = round(500·d). The high-side gate is on while
carrier < c on the rising slope and while carrier ≤ c on the falling slope.
This gives exactly 2c on-clocks per period, centred on the valley, in steps of
0.2 % (1.2 V at a 600 V DC link). New levels wait in a shadow register and are
copied on the last clock of a period. The low-side gate is the exact inverse
of the high-side gate.

**No dead time.** The comparator inserts no dead time. Add it in the gate
driver, or after `pwm_compare`, before driving a real bridge.

Bit order of `pwm_top`/`pwm_bot`: bit 0 = phase a, bit 1 = b, bit 2 = c. On the
reference board these signals went to connector pins JC1P/JC3P (phase a),
JC1N/JC3N (phase b) and JC2P/JC4P (phase c), top/bottom. The encoder came in on
JC2N/JC4N. Pin assignment belongs in the board constraints, not in this RTL.

## Top-level interface (`foc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 100 MHz clock, asynchronous active-low reset |
| `adc_code_a/b[11:0]` | in | latest ADC results for phases a and b (sampled at each pass start) |
| `enc_a`, `enc_b` | in | encoder channels (asynchronous) |
| `omega_ref` | in | speed command, electrical rad/s, Q16.16 |
| `theta0`, `theta0_load` | in | initial angle; a 1-clock pulse loads it |
| `udc` | in | DC-link voltage, Q16.16 (values below 1 V count as 1 V) |
| `pwm_top[2:0]`, `pwm_bot[2:0]` | out | gate signals |
| `omega_meas`, `omega_valid` | out | measured speed and its 2 kHz update pulse |
| `theta`, `i_d`, `i_q`, `i_q_ref`, `u_d`, `u_q`, `sector` | out | internal state for monitoring |
| `spd_sat`, `id_sat`, `iq_sat`, `overmod` | out | regulator limit flags, over-modulation |
| `enc_position`, `enc_backward`, `enc_illegal` | out | edge count, last direction, double transition |
| `pass_start`, `pass_done` | out | control pass begins / duties ready |

Parameters: `CLK_HZ` (100 MHz), `F_SW_HZ` (100 kHz, which is both the PWM and
the control rate), `SPEED_DIV` (5), the speed and current gains and limits, and
the encoder settings (`ENC_PRESCALE` 100, `ENC_WINDOW` 500, `POLE_PAIRS` 4,
`ENC_PPR` 1024).

## Departures and choices

These points follow the reference design:
- the loop structure, including the fixed I_d* = 0;
- the transforms;
- the ADC scaling;
- the encoder decoding table and its 2 kHz, 1 MHz/500 sampling;
- the speed formula;
- the PI with a saturation flag;
- the 100 kHz triangle-compare SVPWM with complementary gates;
- the look-up-table sine;
- the stage order.

These points are choices made in this implementation:
- **Number format.** The Q16.16 number format and the turn-fraction angle.
- **Anti-windup.** Anti-windup freezes the integrator while the output is
  limited. The reference only says the integral part is "removed" during
  saturation.
- **Integral term.** The integral increment is Ki·Ts·e (forward Euler).
- **Speed-loop rate.** The speed loop runs at 20 kHz, the rate shown for the
  speed regulator's clock divider in the reference timing diagram. The encoder
  speed itself is only refreshed at 2 kHz, so the speed PI sees the same
  measurement on 10 consecutive updates.
- **M_k matrices.** The sector matrices M_k are derived from the hexagon
  geometry, with d1 on the single-leg vector and d2 on the two-leg vector,
  which is the assignment the reference's leg-duty table implies. They reduce
  to the additions in the dwell-time table above.
- **3/(2·Udc).** 3/(2·Udc) is computed by a sequential divider from a live
  `udc` input.
- **PWM details.** Over-modulation handling, shadow-register duty updates and
  the exact carrier shape (0…500…0).
- **Encoder details.** The encoder input filter (synchroniser + 4-sample
  agreement) and the 1024-pulse encoder. The reference leaves the encoder
  resolution to the application.
- **Phase c.** I_c = −(I_a + I_b). The reference shows a phase-c current but
  only two ADC channels.
- **Current-regulator limit.** The ±18 limit of the current regulators is
  taken as volts, as printed. That is too low for the reference's own 280 rad/s
  test with this motor (see the closed-loop bench below). It is a parameter.
- **Reference timing.** The reference quotes about 224 ns per pass with its
  stage timing. This implementation takes 130 ns.

Not included:
- the XADC hard macro;
- the "flux model" that the reference names but does not describe;
- the GaN inverter, the motor and the emulator.

Dead-time insertion, fault inputs and current-limit trips are not part of the
reference design and are not here.

## How far it is verified

Every module has a self-checking testbench in `tb/` that compares it with
floating-point models. Each testbench was also shown to fail against a broken
copy of its module. `tb_foc_top` runs the complete controller at its default
parameters for 560 control passes (5.6 ms). The bench emulates the motor side
open loop: it generates encoder pulses and ADC codes for chosen d/q currents.
It checks the following:
- the measured I_d/I_q;
- all three PI outputs against a model;
- the voltage rebuilt from the gate on-times of each carrier period against
  the inverse Park of U_d/U_q;
- the angle steps, the measured speed, the 13-clock latency and the
  1000-clock period.

It also counts every mechanism and requires each one to occur at least once:
speed and current limiting, linear operation, speed updates, forward and
backward rotation, all six sectors, over-modulation at a reduced DC link, and
angle loads.

`tb_foc_closed_loop` closes the loop around the controller. It uses a
behavioural motor written in the bench. An average-value inverter turns each
period's gate on-times into phase voltages. These drive a surface PMSM in the
rotor frame: R = 0.5 Ω, L = 2.2 mH, ψf = 0.1861 Wb, 4 pole pairs,
J = 3.24·10⁻³ kg·m², integrated in 1 µs steps. The bench turns the rotor
angle into 1024-line quadrature pulses and the phase currents into ADC codes.
It then runs 500 ms of the reference test sequence:

| time | speed command (electrical) | load | checked |
|---|---|---|---|
| 0–60 ms | 280 rad/s | none | speed within 10 rad/s, I_q ≈ 0, speed limit reached while accelerating |
| 60–200 ms | 280 rad/s | 15 N·m | speed error shrinking and within 25 rad/s; I_q = 13.4 A (load torque / 1.5·p·ψf); phase-current frequency matches speed |
| 200–500 ms | 30 rad/s | 15 N·m | speed within 3 rad/s, I_q = 13.4 A |

The reference speed gains (Kp 0.26, Ki 2.01) give a slow closed-loop pole at
about 8 s⁻¹. So a load step leaves a speed error that decays with a time
constant of roughly 0.13 s. That is why the loaded phases are long. The
reference's speed plot shows a recovery of the same length, about 0.4 s, after
a 15 N·m step. The speed dip here is about 50 rad/s (280 down to 230). The
reference's dip is deeper, about 120 rad/s from 300. Its current limit and
loop details in that run are not known.

The bench raises `CUR_LIMIT` to 340 V, about Udc/√3. At 280 rad/s the
back-EMF alone is 280 × 0.1861 ≈ 52 V. A ±18 V limit, the default taken from
the reference's tuning table, would stop the motor near 100 rad/s. The
reference does not state the unit of that limit. The default is kept as
printed; set `CUR_LIMIT` for a real drive. This bench takes about 45 s.

Not verified:
- timing closure on an FPGA;
- resource use. The reference design reports 6232 LUT, 1751 FF, 1 BRAM and
  24 DSP on a Zynq-7010.

The multipliers here are written as single-cycle 32×32 (and 32×34) products.
At 100 MHz they may need pipelining on a real device. There is spare time for
it: a pass uses 13 of 1000 clocks.

## Simulating

All files are standalone SystemVerilog with no vendor primitives. With
Verilator 5, from the directory that holds `rtl/` and `tb/` (the sine table is
read as `rtl/sin_quarter.hex`, relative to the working directory):

```
verilator --binary --timing --top-module tb_foc_top -Irtl -y rtl \
    rtl/foc_pkg.sv tb/tb_foc_top.sv
./obj_dir/Vtb_foc_top
```

Replace `tb_foc_top` with any other `tb_<module>` to test one block. Use
`tb_foc_closed_loop` for the run with the motor model. Each bench
ends with a line `TB_RESULT checks=N failures=M`. `foc_pkg.sv` must be named first,
because the other files import it. Verilator finds the other modules by their
file names through `-y rtl`. The full-system bench simulates 5.6 ms in
well under a second.
