# Servo current loop on one multiply-accumulate unit

A field-oriented servo drive needs, every PWM period, a chain of small
calculations: Clarke and Park transformations of the measured phase
currents, two PI regulators, an inverse Park transformation, and space-vector
PWM. Written out directly that chain uses more than twenty multipliers. The
observation behind this design is that every step can be rewritten in one
common form,

    y1 = c1*x1 + c2*x2
    y2 = c3*x3 + c4*x4

so a single unit of **four multipliers and two adders**, fed by a coefficient
selector and an operand selector and stepped by a state machine, computes the
whole current loop in turn. In this RTL one control period takes 26 clock
cycles, or 42 when the voltage command has to be scaled back into the
modulator's range. At 50 MHz that is 0.52 µs and 0.84 µs, well inside a 2 µs
budget.

The current loop is the fast "slave" half of a master–slave servo
system-on-chip. The "master" is a soft processor on the same FPGA. It runs
the slower position and speed loops and an active-disturbance-rejection
controller (ADRC: an extended state observer plus error feedback). It
reaches the hardware over an Avalon-MM bus, and its output is the q-axis
current reference. This repository holds the slave side: the vector-control
core, PWM, encoder decoding, current filtering and the bus register file. The
processor and its software are not included.

## The control period, state by state

A trigger at the start of every PWM period (`pwm_gen.period_start`) starts
the state machine `vc_fsm`. Each state takes three cycles: one to issue the
operands chosen for that state, one pipeline cycle inside `vc_mac`, and one
latch cycle, where the results go into the registers owned by the state.

| S[2:0] | step | c1, c2 / c3, c4 | x1, x2 / x3, x4 | stored |
|---|---|---|---|---|
| 0 | electrical angle | gain, 1 / – | count, pole offset / – | θe = y1 mod 4096 |
| 1 | Clarke | 1, 0 / 1/√3, 2/√3 | ia, 0 / ia, ib | iα, iβ |
| 2 | Park | cos, sin / −sin, cos | iα, iβ / iα, iβ | id, iq |
| 3 | incremental PI | Kd_new, Kd_old / Kq_new, Kq_old | ed(k), ed(k−1) / eq(k), eq(k−1) | Vd += y1, Vq += y2 (limited) |
| 4 | inverse Park | cos, −sin / sin, cos | Vd, Vq / Vd, Vq | Vα, Vβ |
| 5 | SVPWM sector | √3, −1 / −√3, −1 | Vα, Vβ / Vα, Vβ | Sect_No from signs of Vβ, y1, y2 |
| 6 | SVPWM X, Y, Z | kx, ky / kx, −ky | Vβ, Vα / Vβ, Vα | Y = y1, Z = y2, X = y1 + y2 |
| 7 | over-modulation | r, 0 / r, 0 | t1, 0 / t2, 0 | t1s, t2s |

Three small blocks sit beside the multiply-accumulate unit:

* **`sincos_rom`**: a 4096-entry sine table, read on two ports, a quarter
  turn apart, to get sin and cos. The electrical angle is stored in state 0,
  and the table has answered by state 2.
* **`svpwm_sector`**: the sector logic, plus the selection of t1 and t2 from
  X, Y and Z (see below).
* **`svpwm_divider`**: produces the scale r = PWMPRD/(t1+t2). It runs only
  when t1 + t2 > PWMPRD. Otherwise r = 1 and state 7 does not wait. When it
  does run, state 7 stalls before its issue cycle until the quotient is
  ready (15 cycles, flagged on `div_wait`).

When the period is done, `svpwm_timing` turns t1s, t2s and the sector into
the three compare values. `vc_core` registers them and pulses `done`.
`pwm_gen` takes them into shadow registers and uses them from the next PWM
period on.

## Space-vector modulation in detail

This is the least obvious part of the core.

**Sector.** The signs of Va = Vβ, Vb = √3Vα − Vβ and Vc = −√3Vα − Vβ give
the bits A, B, C, and Sect_No = A + 2B + 4C. These codes are not in
geometric order. Going round the circle from 0° in 60° steps, the sectors
are 3, 1, 5, 4, 6, 2. A zero voltage vector gives 0.

**Switching times.** With K = PWMPRD/Vdc,

    X = √3·K·Vβ
    Y = (√3/2)·K·Vβ + (3/2)·K·Vα
    Z = (√3/2)·K·Vβ − (3/2)·K·Vα

and, by sector:

| Sect_No | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| t1 | Z | Y | −Z | −X | X | −Y |
| t2 | Y | −X | X | Z | −Y | −Z |

t1 and t2 are the dwell times of the two active vectors next to the
reference, in PWM counts. Small negative values near a sector border are
clamped to zero.

**Over-modulation.** If t1 + t2 > PWMPRD, both times are multiplied by
PWMPRD/(t1+t2). This keeps the direction of the voltage vector and shortens
it to the hexagon edge.

**Compare values.** `svpwm_timing` computes

    taon = (PWMPRD − t1s − t2s)/2
    tbon = taon + t1s
    tcon = tbon + t2s

and assigns them to the phases by sector:

| Sect_No | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| CMPA (U) | tbon | taon | taon | tcon | tcon | tbon |
| CMPB (V) | taon | tcon | tbon | tbon | taon | tcon |
| CMPC (W) | tcon | tbon | tcon | taon | tbon | taon |

**PWM counter.** `pwm_gen` counts 0 … PWMPRD−1 going up and PWMPRD … 1 going
down, so a PWM period is 2·PWMPRD clocks. A phase is on while the counter is
at or above its compare value on the way up, and above it on the way down.
That gives exactly 2·(PWMPRD − CMP) on-clocks per period, centred on the
counter peak. So a compare value is the moment the upper switch turns on:
the smallest value gives the longest on-time.

With this reading, the modulator gives exactly the same phase duties as the
"min–max" (zero-sequence injection) form of SVPWM. The core testbench uses
that form as its independent reference.

## Number formats and scaling

* All datapath words are 18-bit two's complement, to match 18×18 FPGA
  multipliers.
* Coefficients are Q3.14: 1.0 = 16384, and the range is just under ±8.
  `vc_mac` rounds each sum to nearest, shifts right by 14 bits and
  saturates to 18 bits.
* Currents are in ADC LSBs after offset removal. Voltages are in units where
  the DC bus is **Vdc** LSBs. With the default Vdc = 16384, the linear
  modulation limit is Vdc/√3 = 9459. This value is also the reset value of
  the PI output limit.
* The electrical angle is 12 bits per electrical turn. State 0 computes
  `elec_gain·count + offset` and keeps the low 12 bits. For p pole pairs and
  a 4·N-count encoder, elec_gain = p·4096/(4N) in Q3.14. For p = 4 and
  N = 2500 that is 26844.
* The master computes the SVPWM coefficients, so the hardware never divides
  by Vdc:
  * kx = (√3/2)·PWMPRD/Vdc in Q3.14 (2165 at the defaults)
  * ky = (3/2)·PWMPRD/Vdc in Q3.14 (3750 at the defaults)
* The PI regulators are incremental:
  V(k) = V(k−1) + K_new·e(k) + K_old·e(k−1),
  with K_new = Kp + Ki·Ts and K_old = −Kp. The result is limited to ±V_LIM.

## Around the core

* **`current_filter`**: subtracts the zero-current offset from the U and V
  ADC samples (12-bit, offset binary) and takes a 4-sample moving average.
* **`quad_encoder`**: 2-flip-flop synchroniser, a 4-clock stability filter,
  and ×4 decoding. A 2500-line encoder gives 10000 counts per turn. Outputs
  are the position within the turn, a signed 32-bit multi-turn position, and
  the speed as counts per 50000-clock (1 ms) window. A transition of both
  channels at once is flagged on `err` and not counted. Only incremental
  A/B encoders are handled; there is no index channel and no serial
  absolute-encoder interface.
* **`pwm_gen`**: the triangle counter, shadow and active compare registers,
  and the period trigger. There is no dead time: that is left to the gate
  driver.
* **`avalon_regs`**: 32 word registers with no wait states and a read
  latency of one clock:

  | addr | register | addr | register |
  |---|---|---|---|
  | 0 | CTRL: bit0 enable, bit1 clear PI (pulse), bit2 irq enable | 16–19 | I_D, I_Q, V_D, V_Q |
  | 1 | PWMPRD | 20 | θe [11:0], sector [18:16] |
  | 2 | ELEC_GAIN | 21 | POS_MECH |
  | 3 | ANGLE_OFS | 22 | POS_MULTI |
  | 4 | ID_REF | 23 | SPEED |
  | 5 | IQ_REF (ADRC output) | 24, 25 | IA, IB (filtered) |
  | 6–9 | KD_NEW, KD_OLD, KQ_NEW, KQ_OLD | 26–28 | CMPA, CMPB, CMPC |
  | 10, 11 | KX, KY | 29 | LOOPS (periods run) |
  | 12 | V_LIM | 30, 31 | V_ALPHA, V_BETA |
  | 13, 14 | ADC_OFS_A, ADC_OFS_B | | |
  | 15 | IRQ: bit0 period done, bit1 over-modulation seen; write 1 to clear | | |

  `irq` is high while IRQ bit0 is set and interrupts are enabled. Signed
  values are sign-extended on read.

`servo_soc_top` wires these together:

* The period trigger starts the core and is brought out as `adc_convst`.
* The core reads the most recent filtered currents and encoder count.
* The core's compare values go to the PWM shadow registers.

The top's ports are:

* the Avalon slave port and `irq`, for the processor
* the ADC trigger, samples and valid strobe
* the encoder A and B inputs
* the three upper-switch gate commands, `pwm_u`, `pwm_v` and `pwm_w`

## Not in this RTL

* **The soft processor and its software.** This covers the position and
  speed loops, host communication, monitoring and the ADRC. The ADRC
  observer equations are not reproduced here. The ADRC result enters
  through `IQ_REF`.
* **The analog side.** Current sensors, the ADC and the inverter are not
  included. Only their signals appear as ports.

## Choices made here

The following are this design's own, not part of the scheme it implements:

* the 50 MHz reference clock for the timing figures
* the Q3.14 format
* the sine table
* the per-state cycle budget, and results latched on the rising clock edge
* the restoring divider
* the counter shape, shadow loading and trigger point of the PWM
* the moving-average filter
* the encoder filtering and the fixed-window speed measurement
* the register map and interrupt
* the PI output limit and the `ID_REF` register
* the defaults PWMPRD = 2500 (10 kHz at 50 MHz), 4 pole pairs and
  Vdc = 16384 LSB

The t2 column of the sector table follows the standard space-vector
arrangement that the t1 column belongs to.

## How far it is verified

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_vc_core` runs 300 control periods against a floating-point model: the
  transformations, incremental PI, and min–max SVPWM with over-modulation
  scaling. It checks the currents, voltages and compare values within a few
  LSB, and the cycle count (26 or 42).
* `tb_servo_soc_top` runs at the default parameters. It closes the loop
  around an R-L motor-winding model (R·Ts/L = 0.0315, i.e. 3.4 Ω and
  10.8 mH at a 100 µs period), with a bus-master model and an encoder model.
  It checks that:
  * the winding current settles on a q-axis reference and follows a step
    from +800 to −600 LSB, with i_d near zero
  * every PWM period's on-time matches the compare value read back over the
    bus
  * the loop finishes within 100 clocks of the trigger
  * the speed register matches the encoder rate
  * over-modulation is reached, stalls on the divider and is flagged

* `tb_workload_reciprocating` runs the full-size design through a
  reciprocating stroke, from count 145 to 6000 and back, at the rated
  3000 rpm of the target motor (one encoder count every 100 clocks). It
  checks:
  * the speed register (+500 and −500 counts per millisecond)
  * the end positions
  * that the state-0 electrical angle matches the encoder count in every
    period
  * that the average q-axis current stays on its reference while the rotor
    turns

There is no model of back-EMF or of the mechanics, and nothing was checked on
an FPGA.

## Simulating

Each testbench is a plain top-level module. The package has to be read
first. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/servo_pkg.sv rtl/vc_mac.sv rtl/vc_fsm.sv rtl/sincos_rom.sv \
        rtl/svpwm_sector.sv rtl/svpwm_divider.sv rtl/svpwm_timing.sv \
        rtl/vc_core.sv tb/tb_vc_core.sv --top-module tb_vc_core -o sim
    ./obj_dir/sim

For the whole design, use `tb/tb_servo_soc_top.sv` and add
`servo_soc_top.sv`, `avalon_regs.sv`, `current_filter.sv`, `quad_encoder.sv`
and `pwm_gen.sv`. It simulates about 85 PWM periods (420k clocks) in well
under a second.

## Files

| file | content |
|---|---|
| `rtl/servo_pkg.sv` | widths, Q3.14 constants, state encoding, operand/settings/status structs |
| `rtl/vc_mac.sv` | four multipliers, two adders, rounding and saturation |
| `rtl/vc_fsm.sv` | S[2:0] sequencer with issue/latch/stall |
| `rtl/sincos_rom.sv` | sine/cosine table |
| `rtl/svpwm_sector.sv` | sector code, t1/t2 selection |
| `rtl/svpwm_divider.sv` | PWMPRD/(t1+t2) divider |
| `rtl/svpwm_timing.sv` | taon/tbon/tcon and phase assignment |
| `rtl/vc_core.sv` | the current-loop unit: selectors, registers, PI |
| `rtl/pwm_gen.sv` | centre-aligned PWM |
| `rtl/quad_encoder.sv` | encoder decoding, position, speed |
| `rtl/current_filter.sv` | offset removal and moving average |
| `rtl/avalon_regs.sv` | bus register file |
| `rtl/servo_soc_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, the end-to-end test and the reciprocating-motion workload |
