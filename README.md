# Stepper and servo drive controller in programmable logic

This IP block drives a small two-phase stepper motor, for example the one in an
infusion pump. All timing-critical work is done in logic. The processor only
says how fast and where to. In step mode a timed state machine walks the motor
through eight sub-steps per full step, stops at the commanded position, and
drives the MOSFET gates of two H bridges directly. In continuous mode a CORDIC
turns an electrical angle into cosine and sine. A shared triangle carrier
converts these into four PWM signals, one per half bridge, so the windings see
sinusoidal mean voltages and the rotor turns smoothly.

The processor reaches the block over a 32-bit AXI4-Lite slave port. Setting the
speed takes one register store, and so does setting the position. The block
has one clock domain (`s_axi_aclk`) and one synchronous reset
(`s_axi_aresetn`, active low).

```
            AXI4-Lite
               |
         +-----------+  SPDIV  +----------+ step_en +----------+ a1p a1n b1p b1n
         | axil_regs |-------->| tick_div |-------->| step_fsm |-----------------+
         |           |  PREF   +----------+         |          |                 |
         |           |------------------------------>|          |                 v
         |           |<-------------- s_angle -------+----------+          +-------------+
         |           |  MODE                                              | gate_select |--> a1p a1n a2p a2n
         |           |----------------------------------------------------->|             |--> b1p b1n b2p b2n
         |           |  ANGLE  +---------------+ cos,sin  +-----------+ thr  +-----------+  |
         |           |-------->| cordic_sincos |--->>>3-->| pwm_udctr |----->| pwm_      |--+
         +-----------+         +---------------+          +-----------+ cnt  | modulator |
                                              tick_div (PWM_CLKDIV) --^     +-----------+
```

## Register map

Register *k* is at byte offset `4*k` from the block's base address. All
registers reset to 0.

| idx | name   | access | meaning |
|-----|--------|--------|---------|
| 0   | SPDIV  | R/W    | Step timer divider. One sub-step every SPDIV+1 clocks (0 means every clock). |
| 1   | PREF   | R/W    | Position reference in sub-steps, two's complement. The low `STC_BITS` bits are used. |
| 2   | MODE   | R/W    | Bit 0. 0 = step mode, 1 = continuous (PWM) mode. |
| 3   | ANGLE  | R/W    | Bits 14:0. Electrical angle for continuous mode, 2^15 = 360°. |
| 4   | SANGLE | R      | Actual position counter, sign-extended to 32 bits. |

Writes honour `WSTRB`. Any other offset answers with SLVERR. A write to SANGLE
is accepted and ignored. The slave takes write address and write data
together, and serves one transaction per direction at a time.

## Step mode: the eight-state sequencer

A full step of the motor is split into eight sub-steps. Each sub-step is a
fixed combination of winding currents. For a phase, "+" means the current flows
through the H bridge in the positive direction: the `1p` high-side and `2n`
low-side transistors are on. "−" means the opposite diagonal (`1n`, `2p`) is
on. "0" means the bridge is off.

| state | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|-------|---|---|---|---|---|---|---|---|
| phase A | 0 | + | + | + | 0 | − | − | − |
| phase B | − | − | 0 | + | + | + | 0 | − |
| active gates | b1n | a1p b1n | a1p | a1p b1p | b1p | a1n b1p | a1n | a1n b1n |

The two diagonal transistors of a bridge always switch together. So the state
machine only generates `a1p`, `a1n`, `b1p` and `b1n`. `gate_select` derives
`a2n = a1p`, `a2p = a1n`, `b2n = b1p` and `b2p = b1n`.

`step_fsm` contains the state register and a signed position counter
`s_angle`, with one count per sub-step. The state always equals the low three
bits of `s_angle`, and an assertion checks this. On each pulse of the step
timer, the block forms `a_diff = ref_ang - s_angle`:

* If the sign bit of `a_diff` is 0 and `a_diff` is not zero, the state moves
  forward (0→1→…→7→0) and the counter increments.
* If the sign bit is 1, the state moves back and the counter decrements.
* If `a_diff` is zero, nothing moves, so the motor stops at the reference and
  holds it with the current pattern of that sub-step.

The comparison is a wrap-around difference. The motor therefore always takes
the shorter way, provided the distance is less than 2^(STC_BITS−1) sub-steps.

Speed is set by the time between steps. `tick_div` issues one `step_en` pulse
every SPDIV+1 clocks. A state change appears on the gate pins two clocks after
its `step_en` pulse: one clock for the state register and one for the
`gate_select` output register.

## Continuous mode: CORDIC and PWM

**Angle and CORDIC.** The angle is a 15-bit two's-complement number, with
2^15 = one electrical turn, so each input value is exactly one angle in
[−180°, 180°). Rotation-mode CORDIC only converges within ±90°, so the angle
is folded first:

* Bits 14:13 = `01` (+90°…+180°): subtract 180°.
* Bits 14:13 = `10` (−180°…−90°): add 180°.
* In both of these cases the result is negated at the end.

The start vector is (9900, 0). After the micro-rotations, the vector length is
9900·K ≈ 16303, where K ≈ 1.6468 is the CORDIC gain. This is just below the
16-bit limit, so the final scaling by 1/K is not needed. Each stage rotates by
±atan(2^−k). The direction comes from the sign of the residual angle, and the
constants `ZVAL[k] = round(atan(2^−k)·2^15/2π)` are stored in a small table.
There is one pipeline register per stage. The latency is STAGES+1 clocks, and
the block accepts a new angle every clock.

With the default 14 stages, the measured error against floating-point
`16303·cos/sin` is at most 11 LSB, about 0.07 % of full scale. The 2^−15-turn
angle step and the rounded stage angles set this limit. Adding more stages
does not help, because the table entries become 0.

**Carrier.** `pwm_udctr` is a signed 12-bit up-down counter. It starts at 0,
counts up to +2047, down to −2047, and then up again. It advances on each
`clkdiv_p` enable, which comes from a second `tick_div` set by `PWM_CLKDIV`.
One carrier period is 2·(2047+2047) = 8188 enables, about 12.2 kHz at
100 MHz with `PWM_CLKDIV = 0`.

**Thresholds.** When the counter reaches its minimum, it samples the
modulation values:

* Phase A (cosine): `hithr_a = din_0` and `lothr_a = −din_0`.
* Phase B (sine): `hithr_b = din_1` and `lothr_b = −din_1`.

Here `din = CORDIC output >>> 3`, which gives an amplitude of 2037. Loading
the thresholds only at the carrier minimum keeps each PWM period symmetric.

**Modulators.** Four comparators (`pwm_modulator`) set a half bridge high
while the carrier is below its threshold. The left half bridge of a phase
(`hithr`) is high for a fraction (din+2047)/4094 of the period, and the right
one (`lothr`) for (−din+2047)/4094. The mean voltage across the winding is
therefore din/2047 of the supply.

**Gates.** In continuous mode the high-side transistor of each half bridge
follows its PWM signal and the low-side transistor follows the complement:
`a1p = s0`, `a1n = ~s0`, `a2p = s1`, `a2n = ~s1`, and the same for B. No dead
time is inserted (see Limits).

The step sequencer keeps running in continuous mode, but its gate
outputs are ignored. It holds its position unless PREF is written. On a switch
back to step mode, the gates show the pattern of the current position after
one clock.

## Gate outputs

`gate_select` registers all eight gates, so glitches from the decoders never
reach the pins. Reset switches every transistor off. An assertion checks that
neither transistor pair of any half bridge is ever on at the same time.

## Parameters of `scifip`

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 5 | AXI byte-address width |
| `STC_BITS` | 16 | width of the position counter and reference |
| `STAGES` | 14 | CORDIC micro-rotations (1…16) |
| `CNT_BITS` | 12 | carrier counter width |
| `PWM_CLKDIV` | 0 | carrier advances every PWM_CLKDIV+1 clocks |
| `PWM_SHIFT` | 3 | CORDIC output shift that gives the modulation value |

`pwm_udctr` also has `UD_COUNT_MAX`/`UD_COUNT_MIN` (default ±2047), and
`cordic_sincos` has `X_INIT` (9900). If you change `CNT_BITS`, change
`PWM_SHIFT` and the counter limits with it, so that 16303 >>> PWM_SHIFT stays
within the carrier range.

## What follows the original design and what was chosen here

These parts follow the original course design:

* The eight-state table.
* The direction rule (sign bit of `ref − position`).
* The diagonal gate copies.
* The 12-bit up-down carrier with ±din thresholds loaded at the minimum.
* Four modulators on one carrier.
* The CORDIC number format, folding, start value 9900 and stage rule.
* A pipelined stage structure.
* The speed and position registers on a 32-bit AXI4-Lite bus.

These are choices made here:

* **Holding at the reference.** The original selection logic steps forward
  even when the difference is zero, which would make the motor dither around
  the target. This design stops at the target instead.
* **Carrier turning points.** The carrier turns exactly at ±2047. The original
  counter changes direction one count after its compare.
* **Combining the two modes.** Step and continuous drive share one block,
  selected by the MODE register. The ANGLE and SANGLE registers are additions.
* **Register details.** Register indices, reset values and the AXI handshake
  details are chosen here.
* **Step period.** A step takes SPDIV+1 clocks.
* **CORDIC stage count.** STAGES = 14.
* **Carrier prescaler and output shift.** `PWM_CLKDIV = 0` and
  `PWM_SHIFT = 3`.
* **Continuous-mode gate mapping.** The high side follows the PWM signal and
  the low side its complement.

The board LEDs, switches and push buttons that the original IP brings out are
not implemented, because their function is not specified.

## Limits

* **No dead time in continuous mode.** Real MOSFET bridges usually need a short
  gap between turning one transistor of a half bridge off and the other on.
  Add a dead-time stage after `gate_select` before driving hardware.
* **No angle source in continuous mode.** The block does not generate the
  angle itself. Software must update ANGLE to make the motor turn.
* **No position feedback.** Position is counted in sub-steps, not measured. A
  stalled motor is not detected.
* **Modulation range.** Modulation values must stay within the carrier range.
  With the default shift they do (|din| ≤ 2037).

## Files and simulation

`rtl/` holds one module or package per file:

* `scif_pkg` (register map, types)
* `axil_regs`
* `tick_div`
* `step_fsm`
* `cordic_sincos`
* `pwm_udctr`
* `pwm_modulator`
* `gate_select`
* `scifip` (the top)

`tb/` has one self-checking testbench per module. Each ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator 5 from the project
root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/scif_pkg.sv tb/tb_scifip.sv \
          --top-module tb_scifip -o sim && ./obj_dir/sim
```

Replace `tb_scifip` with any other testbench name. The package file must come
first.

| testbench | what it checks |
|-----------|----------------|
| `tb_tick_div` | tick distance div+1 for several dividers, including a change during a count |
| `tb_step_fsm` | gate pattern, state and position after every clock against a model; forward, backward, wrap-around and holding |
| `tb_cordic_sincos` | 3000+ angles against floating-point cos/sin (±12 LSB), latency STAGES+1, valid bubbles |
| `tb_pwm_udctr` | carrier value and direction each clock, threshold loading at the minimum, period 8188 enables, random enable gaps |
| `tb_pwm_modulator` | each comparator output each clock and the duty cycle over a period against (u_c+1)/2 |
| `tb_gate_select` | diagonal copies in step mode, complementary half bridges in continuous mode, all off in reset |
| `tb_axil_regs` | all registers, byte strobes, skewed address/data, stalled read data, SLVERR, read-only register |
| `tb_scifip` | whole block at default parameters, through the bus |
| `tb_scifip_profile` | motion profiles: divider 411 to +60 sub-steps, divider 1869 back to 0, divider 3 to 5; step count, exact step spacing and move time |

`tb_scifip` exercises the whole block at its default parameters, driven
through the bus:

* **Step mode.** It makes forward, backward and wrap-around moves at three
  speeds and checks each step interval against SPDIV+1. It checks holding at
  the reference and the position read back over the bus.
* **Continuous mode.** It measures the mean phase voltages at four angles
  against 0.995·cos/sin, to within 0.005.
* **Mode switching.** It switches from step to continuous mode and back.

It runs in well under a second.
