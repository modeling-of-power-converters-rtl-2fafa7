# Fixed-point boost converter model for closed-loop controller emulation

A digital controller for a power-factor-correction (PFC) boost converter is hard
to test. A mixed-signal simulation of the controller together with the power stage
takes hours for a few hundred milliseconds of converter time. The alternative used
here is to describe the power stage itself as synthesizable logic: a discrete-time
model that advances the converter by one time step of 10 ns per clock cycle. The
controller's HDL drives that model directly. The pair runs in an ordinary HDL
simulator or, much faster, on an FPGA. At 100 MHz the model runs at real time.

This repository holds that converter model, ADC models and a two-loop PFC
controller to close the loop. A top level wires them together. The controller
stands in for the design under test: it is a conventional one, included so that
the loop can be exercised and checked end to end.

```
            v_g (rectified line)           i_r (load current)
                 |                               |
                 v                               v
   +-------------------------------------------------------+
   |                   boost_plant                         |
   |   i_in* , v_out*  state registers, 1 step per clock   |
   +-------------------------------------------------------+
      ^ sw            | v_g          | i_in         | v_out
      |               v              v              v
      |            [adc]          [adc]          [adc]   <- sample
      |               |              |              |
   +--+---------------+--------------+--------------+------+
   |  pwm <- current_loop <- iref = G_in * v_g <- voltage_loop <- v_ref
   |                    pfc_controller                     |
   +-------------------------------------------------------+
```

## The converter model (`boost_plant`)

### States and equations

The power stage is a boost converter: inductor L in series with the rectified
line, switch Q to ground, diode D to the output capacitor C, and a load.
First-order losses are included:

- the diode-bridge drop v_B,
- the diode drop v_D,
- the inductor series resistance R_L,
- the switch on-resistance R_M.

Every step, the model is in one of three states:

| state | condition | input current update | output update |
|---|---|---|---|
| (a) | switch closed | i += dt/L · (v_g' − i·(R_L+R_M)) | v −= dt/C · i_R |
| (b) | switch open, diode conducting | i += dt/L · (v_g' − v − v_D − i·R_L) | v += dt/C · (i − i_R) |
| (c) | switch open, diode blocking | i = 0 | v −= dt/C · i_R |

Here v_g' = v_g − v_B when v_g > v_B, and 0 otherwise. The model enters state (c)
when the switch is open and the state-(b) update would leave the current at or
below zero, which is discontinuous conduction. With the switch closed the current
is also clamped at zero, because the bridge cannot carry reverse current. The load
current i_R is an input, so the load can be a resistor, a constant-power load or
anything else the environment computes.

### Scaled state variables: why the datapath has no chained products

Written as above, each step needs a product i·R and then a product by dt/L. These
are two multipliers in series, and that chain would set the clock rate. The model
stores scaled variables instead:

    i_in*  = (L/dt) · i_in          v_out* = (C/dt) · v_out          R* = (dt/L) · R

The updates then become plain additions of volts and amperes:

    (a)  i_in*  += v_g' − i_in*·(R_L*+R_M*)            v_out* −= i_R
    (b)  i_in*  += v_g' − (v_out + v_D + i_in*·R_L*)   v_out* += i_in − i_R
    (c)  i_in*   = 0                                   v_out* −= i_R

Converting back to physical units still takes products:

- v_out = (dt/C)·v_out*
- i_in = (dt/L)·i_in*
- i_in*·R*

All of them read the state registers of the previous step, so the four multipliers
work in parallel. Each is followed by a short adder chain and the state registers.
This makes the design use explicit Euler on every right-hand side. Where the
continuous equations would use the new current or voltage of the same step, the
model uses the value from the step before. At dt = 10 ns the effect is negligible.

### Number formats (`hil_pkg`)

| quantity | type | width | fraction bits | range / resolution |
|---|---|---|---|---|
| volts, amperes between blocks | `sig_t` | 32, signed | 20 | ±2048, ≈1 µ |
| scaled states i_in*, v_out* | `st_t` | 48, signed | 20 | ±1.3·10^8, ≈1 µ |
| dt/L, dt/C, R* | `coef_t` | 32, unsigned | 40 | < 0.004, ≈10^-12 |

At 400 V the output changes by about 10^-4 V per step. In the scaled variable that
increment is an ampere-sized number added to about 4·10^6, and 20 fraction bits
resolve it to 10^-6 A. This point decides whether the model works. A 32-bit float
(24-bit mantissa) next to a 400 V value cannot resolve a 10^-4 V increment: it
rounds the increment badly and the steady state ends up far off. A fixed-point
state with enough fraction bits has no such problem.

Coefficients are computed when the design is elaborated from `real` parameters
that hold the component values. To retarget the model to another converter,
change the parameters: no tables need regenerating.

### Default component values

| f_sw | L | C | P | V_out | R_L | R_M | v_D | v_B | dt |
|---|---|---|---|---|---|---|---|---|---|
| 100 kHz | 5 mH | 100 µF | 300 W | 400 V | 0.6965 Ω | 0.4 Ω | 1.03 V | 1.14 V | 10 ns |

Set `LOSSES = 0` for the ideal converter: v_B, v_D, R_L and R_M are then zero.

### Interface and timing

- `sw = 1` closes the switch for the step that ends at the next rising edge.
- `v_out`, `i_in` and `state` are combinational functions of the registers. They
  show the result of the last step.
- A synchronous `rst` clears the current and loads `vout_init` (in volts) into the
  output capacitor. A run can therefore start from a precharged capacitor.
- `en` pauses the model.

## The controller in the loop

### ADC (`adc`)

The ADC samples on a strobe and converts its input to floor(x · 2^BITS /
FULL_SCALE), clamped to the code range. It has a `clipped` flag and one cycle of
latency. The top level uses three 12-bit channels:

- line voltage, 512 V full scale,
- output voltage, 512 V full scale,
- input current, 8 A full scale.

### PWM (`pwm`)

The switching period is 1/(f_sw·dt) = 1000 steps, which gives a duty resolution of
0.1 %.

- The on-pulse is centred in the period.
- The duty is latched on the last step of each period.
- `sample` pulses at the centre of the period. That is the middle of the on-pulse,
  where the sampled inductor current equals its average over the period. Sampling
  at a period edge would measure the ripple valley instead, and would bias the
  current loop by half the ripple.

### Voltage loop (`voltage_loop`)

This is a PI compensator on the output-voltage error, in ADC codes. Its output is
the input conductance G_in, in siemens with 48 fraction bits, limited to
0..`G_MAX` with an integrator clamp. It then forms the current reference
i_ref = G_in · v_g in current-ADC codes.

The loop crosses over at about 10 Hz, so it does not follow the 100 Hz output
ripple. In steady state, G_in times the squared rms line voltage equals the power
drawn from the line. G_in therefore serves as a single number that shows how
accurately the model tracks both current and voltage.

### Current loop (`current_loop`)

This is a PI compensator on the current error. Its output is a duty fraction with
32 fraction bits. The output and the integrator are limited to `D_MIN`..`D_MAX`
(0 and 0.95), and the duty is rounded to PWM steps. `sat_hi` and `sat_lo` report
when a limit was hit. The upper limit is reached near each zero crossing of the
line.

### Sequence (`pfc_controller`)

| cycle | event |
|---|---|
| c | PWM `sample`; the ADCs latch at this edge |
| c+1 | the voltage loop updates |
| c+2 | the new `iref_code` is out and the current loop updates |
| c+3 | the new `duty` is out |
| end of period | the PWM takes the new duty |

Each sample therefore acts on the switch in the next period.

### Top level (`hil_top`)

The top wires the model, the three ADCs and the controller together. Its inputs are:

- the rectified line voltage `v_g`,
- the load current `i_r`,
- `vout_init`,
- the reference `vref_code` (3200 codes = 400 V).

All internal quantities of interest are brought out for observation. The line
source and the load stay outside the top, so the environment can apply any line
waveform, sag or load profile.

## Where the design follows its source, and where it chooses

**Follows the source:**

- the three-state discrete model with losses,
- the scaled-variable form and its parallel products,
- the component values,
- the 10 ns step and the 100 kHz switching frequency,
- the idea of modelling the ADC in the emulated plant,
- the two-loop PFC structure: a voltage loop producing G_in, a multiplier with the
  line voltage, a current loop, and a PWM.

**Chosen here:**

- the fixed-point widths: the source's model is fixed point, but it gives no
  widths;
- explicit Euler everywhere;
- the state-(c) rule and the zero clamp in state (a);
- the ADC resolution, full scales and latency;
- the centred PWM and its sampling instant;
- the PI form, gains and limits of both loops;
- the update sequence;
- synchronous resets.

**Test conditions.** The line is taken as 230 V rms at 50 Hz. The 230 V is
consistent with an ideal conductance of 300 W / (230 V)² = 5.671 mS.

**Equation choice.** The loss term in state (a) uses i·(R_L + R_M): the loss in
the switch adds to the loss in the inductor.

**Not included:**

- other numeric representations of the same model (IEEE floating point, or
  non-synthesizable reals);
- a line-voltage generator: the testbenches compute the line and the load;
- dynamic data on the emulation speed: the reachable clock rate depends on the FPGA
  and the synthesis tool, and is not characterised here.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_boost_plant` | 40,000 random steps of a lossy and an ideal instance. Each step is compared with a floating-point evaluation of the update from the instance's own previous state (tolerance 10^-4). The switch state is compared too, and all three states are reached. Also checks the reset load. |
| `tb_adc` | transfer function, clamping, hold between strobes, latency (two full scales) |
| `tb_pwm` | gate, `sample` and `period_end` every cycle for 60 periods. Period length 1000, high time = latched duty, duty changed mid-period, 0 and over-range duty. |
| `tb_voltage_loop` | PI output and current reference against a real-valued model, both limits, latency, hold |
| `tb_current_loop` | the same for the current loop, with the saturation flags |
| `tb_pfc_controller` | strobe spacing, the cycle offsets of the update sequence, high time per period, loop directions, duty limits |
| `tb_hil_top` | The full design at default parameters: 160 ms of converter time (1.6·10^7 steps) at 300 W. Checks the regulated output (400 V ± 1 %), G_in within 0..3 % above 5.671 mS, current/voltage correlation > 0.98, all three states, duty saturation and ADC sampling. |
| `tb_steady_state` | ideal and lossy systems side by side |
| `tb_load_step` | 136 W → 216 W step at 120 ms, ideal model. The output sags and recovers, and G_in rises with the load. |

Results at the default settings:

| run | G_in vs P/V_rms² | output |
|---|---|---|
| ideal model | +0.35 % | |
| lossy model | +1.53 % | |
| load step | | sags from 395–406 V to a minimum of 377 V, settles around 400 V within about 80 ms; G_in ratio 1.60 |

Both steady-state systems settle in roughly 100 ms from an empty G_in integrator.

## Simulating

Any testbench builds with plain Verilator 5. The package goes first:

```
verilator --binary --timing --assert -O3 -Irtl -Itb rtl/hil_pkg.sv tb/tb_hil_top.sv \
          --top-module tb_hil_top -Mdir obj
./obj/Vtb_hil_top
```

On a typical workstation this runs at about a million model steps per second, so
`tb_hil_top` takes about 20 s.

All sizes are parameters with the default values above. The design has no
memories, and no storage grows with simulated time.
