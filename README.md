# Six-step BLDC drive on an FPGA, with a G-function sensorless detector

This is the FPGA half of a small brushless-DC motor drive. It is sized for a
12-pole, 18 V, 3000 rpm motor fed by a three-phase MOSFET bridge. The FPGA reads
the three Hall sensors and works out which pair of transistors must conduct.
It chops the upper transistor of that pair with a 25 kHz centre-aligned PWM.
It measures the speed from one Hall line and closes a PID speed loop on it.
It also samples two phase currents and reconstructs the third. From those
currents it computes the *G function*, an experimental way to find the
commutation instants without Hall sensors. A host processor sets the
parameters through plain register ports. It reads back a stream of current,
torque and G samples from a FIFO.

Everything runs from one 40 MHz clock (25 ns per tick). Reset is asynchronous
and active low.

## Structure: parallel loops that share latest values

The controller is a set of independent loops. The loops do not hand-shake with
each other. Each one writes its result into a register, and the next loop reads
whatever value is latest. This keeps the loops decoupled: a slow loop never
stalls a fast one.

```
 hall_in ─► hall_filter ─┬─► pulse_width_meas(A) ─► rpm_calc ─► motor_rpm ─► pid_ctrl ─► duty
  (7 us sample,          │   pulse_width_meas(B,C) (indicators)              (every N us)   │
   N-sample debounce)    │                                                                  ▼
                         └─────────────────────────► gate_ctrl ◄── pwm_center ◄─────────────┘
                                        comm_lut ◄──┘   │  ▲        │ adc_trigger (pulse centre)
                                        dead_time ◄─────┘  │        ▼
                                             │         comm_trig   ADC (outside)
                                           gates           │        │ adc_valid, codes
                                                         g_func ◄── current_meas ◄┘
                                                           │     (Butterworth opt.,
                                                           ▼      scaling, Ic = -(Ia+Ib))
                                                  dma_interleave ─► FIFO ─► host
```

| Block | What it does |
|---|---|
| `hall_filter` | Two-flop synchroniser. It samples the lines every `HALL_SAMPLE_TICKS` (280 = 7 µs). A line accepts a new level only after `filt_cycles` equal samples in a row. |
| `pulse_width_meas` | Measures a line's high time in whole microseconds, up to 65535 µs. |
| `rpm_calc` | Computes rpm = 60·10⁶ / (12·T_high[µs]) as Q16.16, using the sequential divider `seq_divider`. |
| `pid_ctrl` | Speed PID with set-point weighting and a filtered derivative, limited to the duty range. |
| `pwm_center` | Up/down counter that gives the centre-aligned PWM and an ADC trigger at the pulse centre. |
| `comm_lut` | Six-step table: Hall code and direction select the inverter mode and the gate requests. |
| `gate_ctrl` | Selects the mode source (Hall, forced, or sensorless). Applies PWM to the upper gate, the safe state and the dead time. |
| `dead_time` | Delays each gate's turn-on by `dt_ticks`. Turn-off is immediate. |
| `current_meas` | Optional 4th-order Butterworth filter, ADC code to mA, and Ic = −(Ia + Ib). |
| `butterworth_lp4` | Two `biquad` sections, 1 kHz cut-off at 100 kS/s. The coefficients are computed at elaboration. |
| `g_func` | H functions, the ratio G, and a threshold/hysteresis commutation detector. |
| `bemf_observer` | Estimates the three line back EMFs with a PI-corrected current model. The estimates are indicators only. |
| `dma_interleave` | Packs six words per sample into one FIFO (`sync_fifo`). Has a sticky overflow flag. |
| `bldc_fpga_top` | Wires the loops together. Holds the µs PID tick, the duty register and the host ports. |

`bldc_pkg` holds the shared types:

- the Q formats;
- `gates_t`, the six gate bits;
- `mode_t`;
- the safe/PID state enum;
- the PID, G and observer configuration structs;
- the mode-to-gates and next-mode functions.

## Commutation: from Hall code to inverter mode

The bridge uses the usual numbering:

- S1 and S4 are the upper and lower switches of phase A;
- S3 and S6 are those of phase B;
- S5 and S2 are those of phase C.

A mode is one of the six 60° conduction intervals. In each mode one upper and
one lower switch are on, and the third phase floats:

| Mode | Switches | Current path | Hall code C·4+B·2+A, direction 0 |
|---|---|---|---|
| I   | S5 + S6 | C → B | 3 |
| II  | S1 + S6 | A → B | 2 |
| III | S1 + S2 | A → C | 6 |
| IV  | S3 + S2 | B → C | 4 |
| V   | S3 + S4 | B → A | 5 |
| VI  | S5 + S4 | C → A | 1 |

Direction 1 selects the opposite mode, with upper and lower swapped (I↔IV,
II↔V, III↔VI). That reverses the torque.

Codes 0 and 7 cannot come from healthy 120° sensors. Both switch everything off.

Only the entry for code 1 is fixed by the original drive: C upper and A lower.
The other five follow from the Hall sequence of a 120° sensor set. The
top-level testbench confirms them on a motor model: the table must produce
torque in the direction it was asked for. If your motor's sensors are wired
differently, edit the `case` in `comm_lut.sv`.

In every mode the upper switch follows the PWM and the lower switch is held on.
Three things override the table, in this order of priority:

1. The safe state, which switches everything off.
2. `forced_mode` 1–6, for bench tests.
3. `sensorless` = 1. A mode counter is then loaded with the Hall mode and steps
   one mode per G-function trigger. It steps backwards when `direction` = 1.

## PWM, ADC trigger and dead time

`pwm_center` runs a phase counter over a full period of 2·`half_period` ticks.
From it, it derives a triangle that counts down and then up. The output is high
while the triangle is below the compare value, so the pulse is centred on the
bottom of the triangle. The compare value is:

```
cmp = duty · half_period
```

`duty` is in Q16.16, from 0 to 1.

At the default `half_period` = 800 the frequency is 40 MHz / 1600 = 25 kHz.
Duty and period are taken over only at the top of the triangle, so a pulse is
never cut short.

The ADC trigger is issued on the down-count, `trig_lead` ticks before the
bottom. `trig_lead` = 0 puts it at the pulse centre, where the phase current
equals its average over the period. A reset of the PWM block (the safe state)
holds the output low.

`dead_time` delays every rising gate request by `dt_ticks` + 1 clocks. A
falling request clears the gate one clock later. If a request comes back
before its delay has run out, the delay restarts. So the two switches of a leg
can never overlap, and each switch turns on at least `dt_ticks` after its
partner turned off. The reference value is 50 ticks = 1.25 µs.

## Speed measurement and the PID loop

Only Hall A is used for speed. With 6 pole pairs, one revolution gives 6 Hall
periods, that is 12 half-periods. `pulse_width_meas` measures the high half in
µs, and `rpm_calc` computes:

```
rpm = 60e6 / (12 · T_high) = 5e6 / T_high
```

The division is done once per new width, by a 48-bit restoring divider. It
takes 50 clocks, and the result is Q16.16.

- 3000 rpm corresponds to a 1667 µs high time.
- The 16-bit width counter limits the lowest measurable speed to 76 rpm.
- A high time is published only at its falling edge. A motor that stops therefore holds its last speed reading, and a high time longer than 65.5 ms reads as 76 rpm.

`pid_ctrl` runs on a tick every `pid_period_us` µs:

```
e   = SP − PV      e' = β·SP − PV      e'' = γ·SP − PV
uP  = Kp·e'
uI += Ki·(e(k) + e(k−1))/2                        (trapezoidal)
uD  = Kd·(e''(k) − e''(k−1)) + a·uD(k−1)          (filtered derivative)
u   = clamp(uP + uI + uD, out_low, out_high)
```

The gains are per update, not per second. So retuning is needed whenever
`pid_period_us` changes. The integral is clamped to the output range, which
prevents wind-up.

In the safe state the PID is held cleared. Its first update after leaving the
safe state uses e(k−1) = e(k), so the output starts without an integral or
derivative kick. This gives a bumpless start.

The reference limits are:

- 0.7 for the upper limit;
- 0.001 for the lower limit.

The reference gains are Kp = 0, Ki = 10⁻⁶, Kd = 0.002. Those values were found
on the real motor and depend on the loop period. A second reference setting
uses an output range of 0.1 to 0.99 with the same gains.

`tb_bldc_speed_1000rpm` runs that second setting at a 1000 rpm set-point with
a 500 µs PID period. It settles at 993 rpm on the motor model. The end-to-end
testbench uses its own faster tuning, described in its header.

## Phase currents and the optional Butterworth filter

Each ADC frame delivers three signed 16-bit codes: phase A current, phase B
current and a torque channel. `current_meas` computes:

```
I [mA, Q16.16] = (code − uref_code) · i_scale
i_scale        = V_lsb / (amp_gain · R_shunt)          (Q8.24, set by the host)
Ic             = −(Ia + Ib)
```

For the reference hardware:

- the ADC has 164.2 µV per code (±5 V range, 16 bit);
- the current amplifier has a gain of 20;
- the shunt is two 1.5 Ω resistors in parallel, 0.75 Ω;
- so `i_scale` is 0.01095 mA per code.

When `filt_en` is set, both channels first pass through a 4th-order Butterworth
low-pass. It has a 1 kHz cut-off at 100 kS/s and is built from two
direct-form-I biquads. Their coefficients are computed at elaboration by the
bilinear transform. They are stored in Q3.28, and the accumulators carry 16
guard bits.

Latency is 1 clock without the filter and 3 clocks with it. The filter
coefficients assume a 100 kS/s sample rate. At a lower ADC rate the cut-off
scales down with it.

## The G function: finding commutation without Hall sensors

This is the least conventional part of the design.

In six-step drive, one phase floats during each mode. For a line pair xy,
define:

```
H_xy = V_xy − R·i_xy − L·di_xy/dt
```

H_xy is the line back-EMF. It equals speed × dλ_xy/dθ, where λ is the flux
linkage. Take the ratio of two H functions, chosen by the present mode:

| Modes | G |
|---|---|
| I, IV   | H_ca / H_bc |
| II, V   | H_bc / H_ab |
| III, VI | H_ab / H_ca |

The speed cancels in this ratio. The denominator passes through zero exactly at
the next commutation angle. So G rises steeply towards that instant, at any
speed, and commutation becomes a simple threshold test.

Inside `g_func`:

- **Line voltages** come from the mode, not from a measurement:
  `V_xy = Vbus/2 · (SF_x − SF_y)`. The switching function SF is +1 when the
  upper switch is on, −1 when the lower switch is on, and 0 when the phase
  floats.
- **Currents** are the Q16.16 mA values from `current_meas`, multiplied by the
  integer gain `i_upscale`. The derivative is the difference from the previous
  sample times `l_per_dt` = L/Δt. All H terms are in mV, with R in Ω and
  currents in mA. Products are 96 bits wide.
- **The division** is a sequential 80-bit divider. G is a Q16.16 ratio. A
  negative G is clipped to 0. An overflowing G saturates, and so does a zero
  denominator.
- **The detector** has two states. When armed, G ≥ `threshold` gives a one-clock
  `comm_trig` and disarms. G < `threshold` − `hysteresis` re-arms it.
- **Timing**: `g_valid` comes 82 clocks (2.05 µs) after a sample. A sample that
  arrives while a division is still running is skipped, and `busy` is high
  during that time.

The reference G parameters are:

- current upscale 10;
- supply 18 V;
- threshold 20;
- hysteresis 2;
- R 25.5 Ω;
- L 8.3 mH.

In the original work this detector was an experiment, and it was never tuned to
run a motor by itself. Treat it the same way here. The datapath and the
detector are verified against a reference model. The testbench also shows that
each trigger steps the commutation, in the right direction. But the design does
not claim that a real motor will run on it.

## The back-EMF observer

`bemf_observer` is a second way to get at the back EMF, and it needs no current
derivative. For each line pair it runs a model of the winding pair:

```
L di/dt = v_xy − R·i − e_xy
```

The model is driven by the mode's line voltage and by its own back-EMF
estimate. The model current is compared with the measured line current. A PI
controller on the difference produces the estimate. The loop can only drive
the current error to zero when the estimate equals the true back EMF.

Per sample, with a = Δt·R/L and b = Δt/L:

```
err   = î − i_xy
acc   = limit(acc + ki·err, ±Vbus)
ê     = limit(kp·err + acc, ±Vbus)
î     = î + b·(v_xy − ê) − a·î
```

R and L are the line (phase-to-phase) values. The error closes the loop like
a second-order system:

```
s² + ((R + Kp)/L)·s + Ki/L
```

So kp and ki place its poles. The testbenches use a double pole at 2000 rad/s:

- kp = 4000·L − R, about 7.8;
- ki = 4·10⁶·L·Δt, about 1.33 at Δt = 40 µs.

The estimates then settle within about 150 samples (6 ms).

In the top level the observer runs on every current sample and is held cleared
in the safe state. Its three estimates (`bemf_ab/bc/ca`, Q16.16 mV) are
outputs for the host. They do not drive commutation. That would need a
commutation function built on the estimates, and this design leaves it to
future work. The unit testbench checks the arithmetic bit for bit. It also
checks, on a simulated line circuit, that constant back EMFs are recovered to
within 1 %, and again after a step.

## Host stream

On every current sample, `dma_interleave` writes six 32-bit words to one
FIFO: Ia, Ib, Ic, torque code, G, and the trigger flag. The host de-interleaves
them by position. A frame is written one word per clock. The frame is all or
nothing only as long as there is room.

`fifo_overflow` is sticky, and `clr_overflow` clears it. It is set in two
cases:

- a word meets a full FIFO, and that word is dropped;
- a new frame arrives while the previous frame is still being written, and the
  new frame is dropped.

Words already in the FIFO are never corrupted.

The depth is 1024 words, about 170 frames. That is 6.8 ms of data at one frame
per PWM period.

## Number formats

| Format | Used for |
|---|---|
| Q16.16 signed 32 bit | rpm, mA, mV, duty (0..1), G, threshold, R (Ω), L/Δt (Ω) |
| Q8.24 signed 32 bit | PID gains and weights, current scale factor |
| Q3.28 | Butterworth coefficients, internal only |
| 16-bit unsigned | µs widths, PWM half period, dead time, filter lengths, PID period |

The reference controller computed in single-precision floating point. This
design uses fixed point throughout. Fixed point is far cheaper on an FPGA, and
the ranges are known. Where a product can exceed its range, it saturates
rather than wrapping.

## Host registers

The top-level ports correspond to the front panel of the reference
application.

**Inputs:**

- `state`: `ST_SAFE`/`ST_PID`;
- `direction`;
- `sensorless`;
- `forced_mode`;
- `setpoint_rpm`;
- `pid_cfg`;
- `pid_period_us`;
- `pwm_half_period`;
- `pwm_trig_lead`;
- `dead_time_ticks`;
- `hall_filt_cycles`;
- `filt_en`;
- `uref_code`;
- `i_scale`;
- `g_cfg`;
- `obs_cfg`;
- the FIFO read port.

**Outputs:**

- the filtered Hall lines;
- the three high times;
- `motor_rpm`;
- `pwm_duty`;
- `inverter_mode`;
- `i_a`, `i_b`, `i_c`;
- `g_value`;
- `comm_trigger`;
- `bemf_ab`, `bemf_bc`, `bemf_ca`;
- `fifo_empty`;
- `fifo_overflow`.

The controls are sampled directly, with no shadow registers. The host should
change the PID configuration only in the safe state.

## What differs from the reference drive, and what is not here

**Fixed point.** Fixed-point arithmetic replaces the floating point of the
original, as described above.

**ADC trigger.** The ADC trigger is synchronised to the PWM centre. The
reference drive sampled the currents free-running.

**Five table entries.** Five of the six commutation table entries, the rule for
invalid codes, and the exact re-arm rule of the G detector are this design's
choices.

**Current sample rate.** The ADC is triggered once per PWM period, which
gives 25 kS/s. The reference drive sampled its currents every 10 µs, at
100 kS/s. The Butterworth coefficients are designed for 100 kS/s, so at the
PWM-synchronous rate the cut-off falls to 250 Hz. Change `FS_HZ` or the trigger
source if that matters.

**Start-up sequence.** The reference front panel has start-up settings: a
start-up duty of 0.15 and an iteration count. What the sequence does with them
is not described, so it is not built. `forced_mode` and the sensorless counter
let the host step the commutation by hand.

**BEMF observer.** The reference work studied the back-EMF observer only in
simulation. Here it is built in RTL, but only as a monitor. The commutation
function that would turn its estimates into commutation instants is not
built.

**Outside the FPGA.** These parts are outside the FPGA and not modelled in RTL:

- the inverter;
- the current amplifiers;
- the ADC;
- the motor;
- the real-time host.

The end-to-end testbench contains a behavioural motor, Hall and ADC model
(`tb/bldc_motor_model.sv`). It is a first-order speed model: speed follows duty
with a 20 ms time constant, up to 6300 rpm at full duty. It is good enough to
close the loops. It is not a motor simulation.

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench:

- prints `TB_RESULT checks=N failures=M`;
- ends with `$finish`;
- has a watchdog.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -y rtl -y tb rtl/bldc_pkg.sv tb/tb_pid_ctrl.sv --top-module tb_pid_ctrl
./obj_dir/Vtb_pid_ctrl
```

| Testbench | Checks |
|---|---|
| `tb_hall_filter` | Debounce length, sample rate. |
| `tb_pulse_width_meas` | Random widths, to the µs; saturation. |
| `tb_seq_divider` | Random quotients; divide by zero; latency. |
| `tb_rpm_calc` | rpm against a real-number model; latency. |
| `tb_pid_ctrl` | Every term against a model with the same rounding; limits; bumpless clear. |
| `tb_pwm_center` | Period, pulse width and centring; trigger position; reset; duty limits. |
| `tb_comm_lut` | All codes, both directions. |
| `tb_dead_time` | Exact delay; re-trigger; no overlap. |
| `tb_gate_ctrl` | Source priority; PWM only on the upper gate; sensorless stepping; safe state. |
| `tb_butterworth_lp4` | DC gain; magnitude at several frequencies against the ideal response; latency. |
| `tb_current_meas` | Scaling, Ic, filter path, latency. |
| `tb_g_func` | H, G and the detector against a 64-bit model; latency 82; busy skip. |
| `tb_bemf_observer` | Bit-exact updates against a model; convergence to known back EMFs on a simulated line circuit; clear. |
| `tb_dma_interleave` | Word order, sticky overflow, dropped frames. Uses a 16-word FIFO. |
| `tb_bldc_fpga_top` | The whole controller at default parameters (see below). |
| `tb_bldc_speed_1000rpm` | The reference operating point: 1000 rpm set-point with the reference PID settings; speed within 3 %. |

`tb_bldc_fpga_top` runs the complete controller at its default parameters
against the motor model. It simulates about 0.6 s of motor time, which takes
two to three minutes. The sequence is:

1. Safe state.
2. PID from standstill to 3000 rpm. It must settle within 5 %.
3. The Butterworth filter switched in.
4. FIFO overflow and clear.
5. A forced mode.
6. Twelve sensorless steps driven by G-function triggers.
7. Reversal to −3000 rpm.
8. Back to safe state.

Throughout the run, monitors check that:

- no leg ever has both switches on;
- every turn-on lags its request by exactly the dead time;
- every host frame has Ic = −(Ia + Ib) and a 0/1 trigger word;
- ADC triggers are 1600 clocks apart;
- back-EMF estimates stay within ±Vbus and are zero in the safe state.

Each mechanism counts how often it occurred, and a count of zero is a failure.
