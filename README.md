# Fuzzy HESS power manager and 100 kHz FOC motor controller

This design holds two controllers, each built as plain synchronous logic.
They are meant for one FPGA each, or for two corners of one device.

1. **A fuzzy-logic power manager for a hybrid energy store.** A stand-alone
   photovoltaic (PV) system keeps its DC bus up with a battery and an
   ultracapacitor (UC). The controller reads four 8-bit measurements:
   - the bus-voltage error;
   - the power demand Pload − Ppv;
   - the battery state of charge (SOC);
   - the UC voltage.

   From them it decides how much power each store should deliver or absorb.
   Its outputs, Pbat and Pcap, are references for the two bidirectional DC/DC
   converters. The UC takes the fast, large swings. The battery takes the
   slow remainder and is kept inside a healthy SOC window. Everything is
   evaluated in parallel in hardware: 4 fuzzifiers, 20 rules and 2 dividers.

2. **A field-oriented controller (FOC) for a permanent-magnet synchronous
   motor (PMSM).** It switches a SiC three-phase inverter at 100 kHz, with
   centre-aligned space-vector PWM and a 300 ns dead band. Once per PWM
   period it samples the phase currents and the rotor angle from a
   quadrature encoder. It runs Clarke → Park → PI → inverse Park → SVPWM and
   loads the new duties for the next period. A torque mode takes an iq
   reference. A speed mode closes an outer speed loop around it.

The two share only clock and reset. `hess_foc_top` places them side by side
and brings every port out.

## The fuzzy power manager

### Number format

Every input is an unsigned byte spanning its whole range. Every grade is
also a byte, where `8'hFF` means full membership.

| signal | code 00 | code 80 | code FF |
|---|---|---|---|
| bus-voltage error | −30 V | 0 V | +30 V |
| power demand Pload − Ppv | −400 W | 0 W | +400 W |
| battery SOC | 0 | 0.5 | 1 |
| UC voltage | 0 V | 200 V | 400 V |
| Pbat (output) | −400 W | 0 W | +400 W |
| Pcap (output) | −550 W | 0 W | +550 W |

Positive output power means the store absorbs power from the bus (charges);
negative means it delivers power. The rule base shows this: a rule that
would make Pbat positive is blocked when the SOC is already OVER.

### Membership functions and the grade pairs

This part is the least obvious. Each input unit does not produce one grade
per fuzzy set. It produces **two** grades:
- **grade1** carries the "even" sets: NL, Z and PL for five-set inputs, or
  UNDER and OVER for the storage-state inputs.
- **grade2** carries the "odd" sets: NS and PS, or NORMAL.

Adjacent sets overlap at most in pairs, so at any input value at most one
even set and one odd set are non-zero. The two grades therefore carry all
the information. The rule evaluator recovers which set a grade belongs to
from the crisp input's range. For example, on the bus error, grade1 is "NL"
when x ≤ 64 and "Z" when 64 ≤ x ≤ 192.

This keeps the unit → evaluator interface at 8 bytes instead of 16.

The shapes are linear ramps in byte arithmetic:
- rising: `(x − a) * slope`
- falling: `FF − (x − a) * slope`

Both saturate at 00 and FF.

| input | sets and breakpoints (hex) | slopes |
|---|---|---|
| bus error | NL, NS, Z, PS, PL; triangle peaks at 00, 40, 80, C0, FF | 4 |
| power demand | NL falls 00→60; NS, Z, PS peak at 60, 80, A0; PL rises A0→FF | 3 (outer), 8 (inner) |
| SOC | UNDER full below 33, gone at 3E; OVER starts at C3, full at CC | 17h, 1Ch |
| UC voltage | UNDER full below 29, gone at 37; OVER starts at DF, full at EF | 17h, 1Ch |

NORMAL is the shape in between: it rises where UNDER falls, is full from
`b` up to `c`, and falls where OVER rises. All constants are in
`rtl/fuzzy_pkg.sv`.

### Rule base

There are 20 rules, each a registered process that runs in parallel.

- **Strength.** A rule's strength is the MIN of its antecedent grades, or
  the one grade for single-term rules.
- **Crisp gates.** Storage-state conditions are not fuzzy terms. They are
  crisp gates on the raw input:
  - "SOC not OVER" means `soc < C3`.
  - "UC not UNDER" means `ucap >= 37`.

  A rule whose gate is closed has strength 0.
- **Aggregation.** All rules are then aggregated with MAX, per output set.

| rules | antecedent | gates | Pbat, Pcap |
|---|---|---|---|
| 1–5 | bus NL / NS / Z / PS / PL | SOC and/or UC not saturated | PS,PS / PS,Z / Z,Z / NS,Z / NS,NS |
| 6–11 | bus NL / NS / PS / PL / NL / PL | as needed | battery-only or UC-only responses |
| 12–16 | demand NL / NS / Z / PS / PL | as needed | compensate the PV/load mismatch |
| 17–20 | UC OVER and demand NL/NS; UC UNDER and demand PS/PL | SOC gate | battery takes over: PL / PS / NS / NL |

`fuzzy_pkg::RULES` lists every rule with its exact gates. The testbench
reference `tb/fuzzy_ref.sv` restates them independently.

### Defuzzification

The output is the weighted average of the output-set centres, weighted by
the aggregated grades:

    P = Σ grade_k · centre_k / Σ grade_k

- Pbat centres: `20 60 80 A0 E0`, i.e. −300, −100, 0, 100, 300 W.
- Pcap centres: `2A 55 80 AA D4`, i.e. ±367 W and ±184 W around 0.

Both sums fit 20 bits. The largest numerator is 5·255·224 = 285 600.
`wa_aggregator` forms the sums in one clock. Two restoring dividers
(`wa_divider`, one quotient bit per clock) run side by side, one per
output. If no rule fires, the denominator is 0. The output is then `8'h80`
(0 W) and `pbat_idle` / `pcap_idle` are raised.

### Timing and handshake

`fuzzy_controller` takes one operating point when `in_valid && in_ready`.
It answers with a one-clock `out_valid` pulse exactly **25 clocks** later,
which is `SUM_W + 5`:

| step | clocks |
|---|---|
| fuzzifier | 1 |
| rules | 1 |
| sums | 1 |
| 20-bit division | 21 |
| output register | 1 |

`in_ready` is low while an operation is in flight, so there is one at a
time. At 200 MHz this allows 8 million decisions per second. A converter
control loop needs orders of magnitude fewer.

### Reference operating points

These nine points are a known-good set for the rule base. The testbenches
reproduce them bit-exactly. Outputs are shown as codes and as watts.

| bus error | demand | SOC | UC | Pbat | Pcap |
|---|---|---|---|---|---|
| 0 V | 0 W | 0.5 | 200 V | 80 (0 W) | 80 (0 W) |
| −15 V | −100 W | 0.5 | 200 V | 90 (+50 W) | 95 (+90 W) |
| +15 V | +100 W | 0.5 | 200 V | 70 (−50 W) | 6A (−90 W) |
| −15 V | −400 W | 0.5 | 200 V | 90 (+50 W) | AA (+180 W) |
| +15 V | +400 W | 0.5 | 200 V | 70 (−50 W) | 55 (−180 W) |
| −15 V | −100 W | 1.0 | 200 V | 80 (0 W) | AA (+180 W) |
| −15 V | −100 W | 0.5 | 400 V | A0 (+100 W) | 80 (0 W) |
| +15 V | +100 W | 0.0 | 200 V | 80 (0 W) | 55 (−180 W) |
| +15 V | +100 W | 0.5 | 0 V | 60 (−100 W) | 80 (0 W) |

Two rows show the storage limits at work:
- At SOC 1.0 the battery's rules are gated off, so the UC alone answers.
- A full UC (400 V) makes the battery take the whole correction.

## The FOC motor controller

### Fixed point and angle

Currents, voltages, sine and cosine are signed Q1.15:
- A current of 1.0 is the full scale of the current sensing.
- A voltage of 1.0 is the DC-link voltage.

The electrical angle is 16 bits per turn:

    theta = position * POLE_PAIRS + ANGLE_OFFSET

`position` is the 16-bit encoder count, with one mechanical turn = 65536
counts. Sine and cosine come from a 256-entry quarter-wave table, sampled
at half-step centres so that the four quadrants mirror exactly.
`ANGLE_BITS = 10` gives 1024 steps per electrical turn.

### One PWM period

The carrier counts up 0…999 and back down, so `PERIOD = 1000` counts give a
2000-clock period. That is 100 kHz at a 200 MHz clock.

At the valley the PWM block raises `period_start`. The same signal is
`adc_trigger`, and it starts the current loop. Each stage takes one clock:

| clock | stage |
|---|---|
| 1 | Clarke, in parallel with sin/cos. Amplitude-invariant: α = ⅔ia − ⅓ib − ⅓ic, β = (ib − ic)/√3. |
| 2 | Park: d = α cos + β sin, q = −α sin + β cos |
| 3 | PI on d (reference 0) and on q (reference: `torque_ref`, or the speed loop's output) |
| 4 | inverse Park of (vd, vq) |
| 5 | SVPWM: sector and three duties |

The duties are ready 5 clocks after the valley and take effect at the next
valley. A half-loaded set is never used.

The currents used are the ones present at the valley. This is the middle of
the zero vector, where the phase currents are least disturbed by switching.

### SVPWM

The voltage reference is projected on three axes:
- Vr1 = vβ
- Vr2 = (√3 vα − vβ)/2
- Vr3 = (−√3 vα − vβ)/2

The sector code is `N = [Vr1>0] + 2[Vr2>0] + 4[Vr3>0]`, with values 1…6.

1. From X = √3·vβ·T, Y and Z, a per-sector table picks the on-times T1 and
   T2 of the two adjacent active vectors.
2. The three switching instants are `ta = (T − T1 − T2)/2`, `tb = ta + T1`
   and `tc = tb + T2`. They are routed to phases A, B and C by sector.
3. Each upper-switch duty is `T − instant`, clamped to
   `DUTY_MIN…DUTY_MAX` (20…980). This keeps a pulse from shrinking below
   what the gate drivers can produce.

The result equals min-max zero-sequence injection. `tb_svpwm` checks it
against that formula.

### PWM and dead band

A phase's raw upper signal is high while the triangle exceeds
`PERIOD − duty`. The upper pulse is therefore centred on the triangle peak,
which is the middle of the period.

Each output switch turns on only after the raw signal has been stable for
`DEAD = 60` clocks (300 ns), so both switches of a leg are off for exactly
300 ns around every transition. A pulse shorter than the dead band is
dropped, not shortened below it.

The outputs are registered. `enable = 0` turns all six off. An assertion
checks that the two switches of a leg are never on together.

### Encoder and speed

`qei` synchronises A, B and Z with two flip-flops each. It decodes all four
edges per line.
- **Direction.** A leading B counts up. The sign convention is only a
  question of which encoder line is wired to A.
- **Illegal steps.** A step that changes both lines at once is illegal. It
  is counted in `enc_err` and ignored.
- **Index.** A rising index edge clears the position.
- **Speed.** Every `SPEED_WIN = 20000` clocks (10 PWM periods), the net
  count over the window becomes `speed`. It is kept on a separate tally, so
  an index clear does not disturb it.

In speed mode, the speed PI runs on each new sample. Its output, limited to
`IQ_LIM`, is the q-current reference.

### PI controllers

`pi_ctrl` computes:

    e = ref − fb
    I = clamp(I + KI·e / 2^12)
    out = clamp(KP·e / 2^12 + I)

Clamping the integrator is the anti-windup. `saturated` flags an output
that hit the limit.

| loop | KP | KI | output limit |
|---|---|---|---|
| current loops | 0.5 | 0.125 | `V_LIM` = 0.55 Vdc |
| speed loop | 1.0 | 1/16 | `IQ_LIM` = 0.5 |

These values are starting points for tuning on a real motor. They are not
derived from motor data.

## Top-level interface (`hess_foc_top`)

Fuzzy side:

| port | dir | meaning |
|---|---|---|
| `fz_in` | in | `crisp_t` {bus, pdem, soc, ucap}, 4 bytes from the A/D converters |
| `fz_in_valid` / `fz_in_ready` | in / out | handshake |
| `fz_out_valid`, `pbat_ref`, `pcap_ref` | out | power references for the converters |
| `pbat_idle`, `pcap_idle` | out | no rule fired; the output is 0 W |
| `fz_fired[19:0]` | out | which rules had non-zero strength |

Motor side:

| port | dir | meaning |
|---|---|---|
| `foc_enable`, `speed_mode` | in | run, and torque/speed mode |
| `torque_ref`, `speed_ref` | in | iq reference (Q1.15); speed in counts per window |
| `enc_a`, `enc_b`, `enc_z` | in | encoder (e.g. from a resolver-to-digital converter's emulation) |
| `ia`, `ib`, `ic` | in | phase currents (Q1.15), sampled at `adc_trigger` |
| `adc_trigger` | out | one-clock pulse at each PWM valley |
| `pwm_h[2:0]`, `pwm_l[2:0]` | out | upper and lower gate signals of phases A, B, C |
| `position`, `speed`, `dir_up`, `enc_err` | out | encoder state |
| `id_meas`, `iq_meas`, `vd`, `vq`, `sector`, `duty`, `duty_valid`, `duty_applied`, `pi_sat` | out | loop observation |

The converters, inverter, motor, A/D converters and resolver-to-digital
converter are outside this RTL.

## How far to trust it, and where it departs from the source design

- **Rule base.** Two versions of the rule base exist. One is an 18-rule
  table with fuzzy SOC/UC terms. The other is the 20-rule version that was
  actually put into hardware, with crisp NOT gates. This RTL follows the
  20-rule hardware version, because it is the one that produces the
  reference operating points above. There is one exception. For a
  saturated or depleted UC, the hardware version has two coarse rules
  ("demand negative" and "demand positive"). Here they are split per demand
  set, as in the table: rules 17–20. Both forms give the same outputs at
  the reference points.
- **Ramp saturation.** The source's membership ramps are written as plain
  8-bit products. These wrap for the slope-3 outer power-demand sets. Here
  every ramp saturates.
- **Clarke scaling.** The Clarke equation can be written with a √(2/3)
  (power-invariant) scale. This design uses the amplitude-invariant
  2/3, −1/3, 1/√3, so α equals the phase-A current.
- **Things the source leaves open, chosen here:**
  - the clock (200 MHz);
  - the fuzzy handshake and latency;
  - the divider structure;
  - the zero-denominator output;
  - every FOC word length;
  - the sine table size;
  - the PI gains and limits;
  - the duty limits 20 and 980;
  - the pole-pair count (4);
  - the current-sampling instant;
  - encoder decoding details, index behaviour and the speed window.
- **Verification.** The FOC loop has been closed only against a
  first-order current model, not against a motor. The fuzzy controller
  matches an independent behavioural model bit-exactly on every tested
  input, including all 256 codes of each membership unit.

## Files

- `rtl/fuzzy_pkg.sv`, `rtl/foc_pkg.sv`: types, constants, rule table and
  fixed-point helpers.
- Fuzzy path: `mf_five`, `mf_three` → `fuzzifier` → `rule_evaluator` →
  `wa_aggregator` + 2 × `wa_divider` = `defuzzifier` → `fuzzy_controller`.
- Motor path: `clarke`, `sincos`, `park`, `pi_ctrl`, `inv_park`, `svpwm`,
  `pwm_3ph`, `qei` → `foc_controller`.
- `hess_foc_top`: both controllers.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`) and the
  behavioural fuzzy reference `fuzzy_ref.sv`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. It also
has a watchdog that fails it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fuzzy_pkg.sv rtl/foc_pkg.sv tb/fuzzy_ref.sv tb/tb_hess_foc_top.sv \
        --top-module tb_hess_foc_top
    ./obj_dir/Vtb_hess_foc_top

Replace the testbench name to run another one. The packages and
`fuzzy_ref.sv` can always be listed.

`tb_hess_foc_top` runs the whole design at its default parameters in about
two seconds. It runs:
- the nine reference points and 300 random operating points, some offered
  while the controller is busy;
- about 500 PWM periods of closed-loop motor control through torque mode,
  current-loop saturation, a d-axis disturbance, speed mode with speed-loop
  saturation, torque reversal, an index pulse, an illegal encoder step,
  reverse rotation and disable.

It counts each of these events and fails if any never happened.

`tb_pv_scenarios` closes a loop around the power manager. It uses a
simple model of the bus, battery SOC and UC voltage. It runs five
situations: both stores normal, battery overcharged, battery
over-discharged, UC over-discharged and UC overcharged. At every step it
checks the storage limits:
- a full battery or a full UC is never charged;
- an empty UC is never discharged;
- an empty battery is discharged only by the one bus-voltage rule that is
  gated on the UC alone. Every
rule must fire, and every sector must be used.

## Changing it

- **Clock.** For another clock, scale `PERIOD` (carrier half-period in
  clocks), `DEAD` and `SPEED_WIN` together. At 100 MHz, `PERIOD = 500` and
  `DEAD = 30` keep 100 kHz and 300 ns. The SVPWM duty range follows
  `PERIOD`.
- **Motor.** Set `POLE_PAIRS` and `ANGLE_OFFSET`, the encoder count at
  which the rotor d axis is aligned with phase A, for the motor.
- **Membership functions and rules.** These are constants in
  `fuzzy_pkg.sv`. The rule evaluator is generated from the `RULES` table,
  so editing a row changes the hardware. The set-range decoding in
  `rule_evaluator.sv` assumes the even/odd set pairing described above.
- **Divider width.** `SUM_W` sets the divider width and therefore the
  latency (`SUM_W + 5`).
