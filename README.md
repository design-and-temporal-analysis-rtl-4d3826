# FPGA front end for a lock-step motor-control HIL simulator

A hardware-in-the-loop (HIL) simulator tests a motor control unit (MCU)
without an inverter or a motor. The MCU's PWM gate signals go into the
simulator; a real-time model of the inverter and the permanent-magnet motor
runs on a host processor; and the simulator returns what the MCU's sensors
would report: phase currents as analog voltages and rotor position as
incremental-encoder pulses.

This RTL is the FPGA between the MCU and the host. It works at *signal level*
with an *average-value* model: it does not simulate switching ripple. Instead
it measures the duty ratio of each phase once per PWM period and hands the
three duties to the model, which computes one step per PWM period.

The main idea is **synchronisation**. If the FPGA, the model and the MCU each
run on their own fixed time step, the delay from an MCU sample to the
simulator's answer wanders between roughly 2.5 and 4.5 PWM periods. Steps can
also be lost when two results arrive within one MCU period. Here the FPGA
derives a synchronisation event from the PWM signals themselves, with no extra
wire. The event starts the model. The model's answer is held back to the
*next* event, so the answer always reaches the MCU at the same point of its
PWM cycle, whatever the model's execution time. The delay is then a fixed
3 PWM periods (half-period duty capture) or 3.5 periods (full-period capture),
and no step is lost.

```
            MCU                                HIL FPGA (hil_fpga_top)                     host
  PWM A/B/C top+bottom ──6──► pwm_duty_capture ──duties, cap_event──► host_regs ◄──register port──► model
                                                                       │  ▲
                                                  position, currents,  │  │ PwmLoad flag / irq
                                                  SimDone              ▼  │
                                                            result_update_sync
                                                              │ update (at next cap_event)
                                          ┌───────────────────┴──────────────┐
  encoder timer ◄── A,B,Z ── encoder_pulse_gen                     dac_interface ── codes ──► DACs ──► MCU ADC
```

## One model step, cycle by cycle

Tpwm is the PWM period. With the default 40 MHz clock and a 62.5 µs
(16 kHz) PWM period, Tpwm = 2500 cycles.

1. **MCU.** At the centre of its PWM cycle (counter at the half-way point)
   the MCU samples currents and position. It then computes new duties, which
   it loads at the *reload* instant half a period later. Reload is the centre
   of the top-switch on pulses (centre-aligned PWM).
2. **Capture, `T_oc`.** `pwm_duty_capture` sees the new duty of a phase at
   one edge of that phase's top signal (next section). When all three phases
   have reported, it copies the three duties to its outputs and pulses
   `cap_event`, 35 cycles after the last of those edges. The `host_regs`
   PwmLoad flag and `host_irq` go high.
3. **Model, `T_ae`.** The host reads `DUTY_A..C` and clears the flag. It runs
   the model, then writes `THETA` and `CUR_A..C` and finally writes `SIMDONE`.
   The step must finish within one PWM period. (The reference setup needs a
   45 µs worst case, 72 % of the period.)
4. **Hold, `T_eu = Tpwm − T_ae`.** `result_update_sync` keeps the result and
   releases it at the next `cap_event`, one PWM cycle after the step began.
   `update` pulses one cycle after that event.
5. **Output, `T_u_delay = Tpwm`.** On `update`, `dac_interface` loads the new
   current codes (`dac_load` one cycle later). In the same cycle
   `encoder_pulse_gen` starts a linear move from the previous position to
   the new one, which takes exactly N = Tpwm/T_n encoder steps.

The response from the MCU's sample to the end of the position update is

    T_r = 0.5 Tpwm  +  T_oc  +  Tpwm  +  Tpwm

* With the half method, T_oc = (largest half on-time among the phases) +
  35 cycles, at most 0.5 Tpwm + 35 cycles. This gives about 3 Tpwm.
* With the full method, T_oc = Tpwm − (smallest half on-time) + 35 cycles,
  at most Tpwm + 35. This gives about 3.5 Tpwm.

`T_oc` depends on the duties because the event comes from PWM edges. Apart
from that, the delay does not depend on the model's execution time. The
end-to-end testbench checks the formula above, to the cycle, for every step.

If the model misses its deadline, no result is pending at the next event.
The outputs then hold, and the `LATE` counter increments. If two `SIMDONE`
writes reach the FPGA between events, the newer result wins and the
`OVERRUN` counter increments.

## Duty capture

`pwm_phase_capture` (one per phase) restarts a counter on each edge of the
top-switch signal. At an edge the counter holds the length of the interval
that just ended. The period Tpwm is configured (register `TPWM`), not
measured, so one edge is enough:

* **Full method** (`CTRL[0] = 0`). At the rising edge that ends an off
  interval: `on = Tpwm − Toff`. Both edges of that off interval belong to the
  same duty, so the result is exact. It is available between half a period
  and a full period after reload.
* **Half method** (`CTRL[0] = 1`, the reset default). The on pulse straddles
  the reload instant. Its first half still has the old duty, and that half
  equals `(Tpwm − Toff_prev)/2` by symmetry. So at the falling edge,
  `on_new = 2·Ton − (Tpwm − Toff_prev)`. The result is available less than
  half a period after reload.

The on time is clamped to `[0, Tpwm]`. A 31-cycle sequential divider
(`udiv_seq`) turns it into a Q1.15 duty (`0x8000` = 100 %). All three phases'
capture edges fall in the same half period, so the event waits for all
three.

**0 % and 100 % duty.** A phase at 0 % or 100 % has no edges. A watchdog then
reports 0 or 1.0 from the level, 1.5 Tpwm after the last edge and every Tpwm
after that. The first edge after such a stretch only restarts the
measurement. After a 100 % stretch, that one PWM cycle is captured with the
full method, because the half method needs a real preceding off interval.

**Side measurements.** `TPWM_MEAS` is phase A's on time plus off time.
`DEAD_x` is the dead time: half of |top on-time − bottom off-time|, i.e. one
of the two gaps around the top pulse.

**Switching method.** Change `CTRL[0]` late in a PWM cycle, after the last
rising edge. A switch earlier in the cycle can produce a second event in that
cycle.

## Encoder emulation

The model gives one position θm per step. Stepping the encoder output by a
whole step's worth of counts at once would make the MCU see a jump. A jump
could also skip quadrature states. So `encoder_pulse_gen` interpolates every
encoder step T_n (default one clock):

    θn = θ(m−1) + (θm − θ(m−1)) · n / N,    n = 0 … N−1,   θN = θm exactly

This costs one step of delay (the `T_u_delay` term above). In exchange the
position is continuous, so the MCU's count never drifts from the model's.

Implementation points:

* **Position format.** Position is an unsigned 32-bit fraction of a turn, so
  it wraps at one turn by itself. The modular difference is the signed travel
  (less than half a turn per step).
* **Division by N.** It is done as a multiplication by `floor(2^32/N)`, which
  is recomputed by a divider whenever `NSTEPS` changes (33 cycles). The step
  keeps 16 extra fraction bits. The last step lands exactly on θm.
* **Quadrature output.** The top 12 bits of θn are the quadrature count
  (1024 lines, 4096 counts per turn). The count's two low bits drive
  (A,B) = 10, 11, 01, 00, so A leads B for a rising count. Z is high while
  the count is 0.
* **Speed limit.** The output can only follow one count per encoder step. At
  4096 counts per turn and 40 MHz that is far above any motor speed. For
  example, 8000 rpm is 34 counts per 2500-step segment.
* **Update spacing.** If updates arrive closer together than N steps, the new
  segment starts from the previous target and the position jumps to it. In
  lock-step operation N = Tpwm/T_n, so this only happens while duties change
  the event timing.

## Current outputs

`dac_interface` latches the three currents on the same `update` pulse as the
position. It converts each one with a linear transducer characteristic:

    code = offset + (gain · i) >>> 8     (gain signed Q8.8, clamped to 0 … 65535)

The offset and gain are registers. At reset they are mid-scale and 1.0. The
converters themselves are outside this RTL. They get the codes and a
`dac_load` strobe.

## Register map (`host_regs`, word addresses)

| addr | name      | access | content |
|------|-----------|--------|---------|
| 0x00 | CTRL      | RW | bit 0: capture method, 1 = half period (reset), 0 = full period |
| 0x01 | TPWM      | RW | PWM period in cycles (reset 2500) |
| 0x02 | NSTEPS    | RW | N, encoder steps per model step (reset 2500) |
| 0x03 | STATUS    | R / W1C | bit 0 PwmLoad flag (= `host_irq`), bit 1 result pending; write 1 to bit 0 to clear |
| 0x04–0x06 | DUTY_A..C | R | Q1.15 duties of the last capture event |
| 0x07–0x09 | DEAD_A..C | R | dead time, cycles |
| 0x0A | TPWM_MEAS | R | measured period of phase A |
| 0x0B | EVENTS    | R | capture events |
| 0x0C | LATE      | R | events with no result ready |
| 0x0D | OVERRUN   | R | results replaced before release |
| 0x0E | THETA     | RW | model position, fraction of a turn |
| 0x0F–0x11 | CUR_A..C | RW | model currents, signed 16 bit |
| 0x12 | SIMDONE   | W | any write: result complete |
| 0x13 | DAC_GAIN  | RW | signed Q8.8 (reset 0x0100) |
| 0x14 | DAC_OFS   | RW | code at zero current (reset 0x8000) |

The port carries one access per cycle. A write takes effect at the clock
edge. Read data arrives one cycle after `host_rd`, with `host_rvalid`. If a
capture event and a flag clear meet in the same cycle, the flag stays set.

## Files

| file | content |
|------|---------|
| `rtl/hil_pkg.sv` | widths, duty/capture types, result struct, register map |
| `rtl/hil_fpga_top.sv` | top level, wiring of the blocks below |
| `rtl/pwm_duty_capture.sv` | six-signal capture, event generation |
| `rtl/pwm_phase_capture.sv` | one phase: intervals, duty formulas, watchdog, dead time |
| `rtl/udiv_seq.sv` | sequential restoring divider |
| `rtl/sync2.sv` | two-flop input synchroniser |
| `rtl/result_update_sync.sv` | result hold and release at the next event |
| `rtl/encoder_pulse_gen.sv` | interpolation and A/B/Z generation |
| `rtl/dac_interface.sv` | current-to-code conversion |
| `rtl/host_regs.sv` | register bank, PwmLoad flag, SimDone |
| `tb/tb_*.sv` | self-checking testbenches, one per block plus the two below |
| `tb/tb_hil_fpga_top.sv` | end-to-end test at default sizes (110 model steps) |
| `tb/tb_speed_steps.sv` | Speed ramp to 4000 rpm, then 1000 / 4000 / 8000 rpm steps, through the whole design |
| `tb/mcu_pwm_model.sv` | behavioural centre-aligned PWM source with dead time (testbench only) |

## Parameters and sizes

| where | parameter | default | meaning |
|-------|-----------|---------|---------|
| `hil_fpga_top` | `TPWM_RESET` | 2500 | reset value of TPWM and NSTEPS (62.5 µs at 40 MHz) |
| `hil_fpga_top`, `encoder_pulse_gen` | `CNT_BITS` | 12 | log2 of encoder counts per turn |
| `hil_fpga_top`, `encoder_pulse_gen` | `TN_CYCLES` | 1 | encoder step T_n in clocks |
| `encoder_pulse_gen` | `FRAC` | 16 | extra fraction bits of the interpolation step |
| `hil_pkg` | `TS_W`, `DUTY_W`, `THETA_W`, `CUR_W`, `DAC_W`, `CNT_W` | 16, 16, 32, 16, 16, 16 | word widths |

Limits that follow from the widths:

* TPWM must stay below 43690 cycles, so the watchdog limit (1.5 Tpwm) fits
  in 16 bits. At 40 MHz that covers 5–20 kHz PWM.
* `NSTEPS` must be at least 2 and should equal TPWM / `TN_CYCLES`.
* One clock domain. Reset is asynchronous and active low. The PWM inputs are
  asynchronous and pass a two-flop synchroniser (2 cycles).

## Where this departs from, or adds to, the published design

The published design fixes the structure, the duty-capture formulas, the
interpolation, the synchronous update rule and the 62.5 µs step. The
following are this implementation's own choices:

* **Widths and clock.** All word widths and the 40 MHz clock are own choices.
* **Encoder format.** The resolution, the A/B phase order and the Z width
  are own choices.
* **Host interface.** The register map and the plain register port stand in
  for the PCI bus of the original board.
* **Capture details.** Waiting for all three phases before the event, the
  watchdog for 0 % / 100 %, and the clamping are own choices.
* **Dead time.** The dead-time formula in the source, |Ton_top − Toff_bottom|,
  spans both gaps. This block reports half of it, one gap, which matches the
  source's timing drawing.
* **Counters.** The LATE and OVERRUN counters are additions.
* **Current output.** The DAC characteristic (offset + Q8.8 gain) is an own
  choice. The source only says the output is fitted to the transducer.

Not included:

* **Asynchronous configuration.** The free-running configuration is the
  baseline the synchronous one improves on.
* **Extrapolating encoder mode.** It is the alternative to interpolation.
* **External parts.** The PCI core, the analog DACs and the host software
  are not part of this RTL. That software includes the fixed/floating-point
  conversion layer and the motor model.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hil_pkg.sv \
          tb/tb_hil_fpga_top.sv --top-module tb_hil_fpga_top -o sim
./obj_dir/sim
```

Replace `tb_hil_fpga_top` with any other `tb_*` name. The other modules are
found through `-Irtl -Itb`.

* **`tb_hil_fpga_top`.** Runs the design with all defaults. A behavioural
  MCU and a behavioural host step through 110 PWM periods. It checks:
  * the duties;
  * that each update happens one cycle after the capture event following
    SimDone;
  * the DAC codes;
  * the response time of every steady step;
  * that the decoded encoder count reaches every model position without an
    illegal quadrature step;
  * the LATE and OVERRUN counts.

  Along the way it passes through both capture methods and a switch between
  them, 0 % / 100 % phases, a late step, an overrun, a gain change, backward
  rotation and index pulses. It counts each of these and fails if any never
  happened.
* **`tb_speed_steps`.** First ramps the speed from 200 to 4000 rpm over 20
  steps. Then it holds 1000, 4000 and 8000 rpm for 12 steps each. For each
  profile the decoded count must match the written position to within one
  count. At the holds that is 4.3, 17.1 and 34.1 counts per step. A full two-second
  drive run (32000 steps, 80 million cycles) was not simulated.
* **Block testbenches.** They cover each block alone. This includes random
  duties in both methods with an exact latency check, interpolation accuracy
  and wrap-around, DAC saturation, and register behaviour.

## Trust

Every testbench above passes. Each block's testbench was also run against a
copy of the block with one deliberate bug, and it caught the bug.

The design was checked only in simulation, against behavioural stand-ins for
the MCU and the model. It has not been run against a real MCU, a PCI core or
a real-time model, and no timing closure was done. The duty formulas assume
centre-aligned PWM with reload at the centre of the on pulse. An MCU whose
PWM unit reloads elsewhere needs the full method.
