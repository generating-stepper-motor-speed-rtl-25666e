# Linear-ramp stepper motor controller

A stepper motor that has to start, cruise and stop smoothly needs its step
pulses spaced so that the speed rises and falls linearly: constant
acceleration, then constant speed, then constant deceleration. The exact
spacing involves a square root per step, which is too costly to evaluate in
real time. This peripheral instead updates the inter-step delay with a
one-division recurrence after every step, in hardware. A CPU only has to
compute a handful of numbers once per move and write them into registers.
From then on the peripheral produces the whole move on its own: the
acceleration ramp, the plateau, the deceleration ramp and micro-stepped PWM
drive for the four windings.

The design targets an FPGA next to a soft processor on a 32-bit bus, clocked
with the processor (50 MHz in the reference system). It is written in
synthesizable SystemVerilog (IEEE 1800-2017) with no vendor primitives.

## How the speed ramp is computed

Under constant acceleration ω̇, micro-step `n` (of angle α) is reached at
`t_n = sqrt(2 n α / ω̇)`. The delay before the first step, in base-timer
periods `t_t`, is therefore

    C0 = sqrt(2 α / ω̇) / t_t

Every later delay is `C0 * (sqrt(n+1) - sqrt(n))`. A truncated Taylor
expansion of the ratio of two neighbouring delays gives the recurrence the
hardware uses:

    acceleration:  c_n = c_(n-1) - (2 c_(n-1) + r) / (4n + 1)
    deceleration:  c   = c       + (2 c       + r) / (4m - 1)

Here `n` counts acceleration steps and `m` is the number of deceleration steps
still to come. `r` is the remainder of the previous division, carried into the
next numerator so that rounding does not drift. Deceleration is the exact
inverse of the acceleration step, so a deceleration ramp retraces the
acceleration ramp backwards.

Three properties matter when you use it:

* **The first delay needs compensation.** The recurrence is accurate from a
  few steps on, but started at `C0` it settles about 48 % too slow, because its
  first terms are off. Write `c0 = 0.676 * C0` instead. With that, the delays
  follow the exact law closely. In simulation with `C0 = 5000` periods, the
  worst error over 3019 acceleration steps is 3.3 % (mostly integer rounding
  at the small delays near full speed). Deceleration mirrors acceleration to
  within 2.1 %.
* **Delays must be large numbers.** Once `2c` is small against `4n+1`, the
  quotient is zero and the remainder never catches up. An acceleration ramp
  therefore cannot bring the delay down to 1 or 2 timer periods. Choose the
  timer period so that the delay at full speed is tens of periods or more. A
  full-speed delay of 1 period is available only as an instant start (see
  transition 5 below).
* **The divider decides the minimum timer period.** A division starts when a
  step is taken and must finish before the timer can overflow again. A 32-bit
  division takes at most 33 clocks, and handing the result over takes one
  more. The base timer period is therefore at least 34 clocks (0.68 µs at
  50 MHz). For a 400-step motor at one step per timer period, that is
  2π/400 / 0.68 µs ≈ 23 100 rad/s, far beyond any real motor.

### What the CPU computes per move

All quantities count micro-steps. With acceleration `a`, deceleration `d`
(rad/s²), top speed `ω` and `N` steps of angle `α`:

    c0          = 0.676 * sqrt(2 α / a) / t_t
    min_delay   = α / (t_t * ω)                    (delay at top speed)
    max_s_lim   = ω² / (2 α a)                     (steps to reach top speed)
    accel_lim   = N * d / (a + d)                  (steps before the ramps meet)
    decel_val   = max_s_lim * a / d    if max_s_lim < accel_lim   (trapezoid)
                = N - accel_lim        otherwise                  (triangle)
    decel_start = N - decel_val

For a single step, or when `c0 <= min_delay` (top speed reachable at once),
use `decel_start = N` and `decel_val = 0`. The move then runs at
`min_delay` from the first step.

## State machine (`core_fsm`)

Four states: stopped, acceleration, constant speed, deceleration. The
numbered transitions are:

| # | from → to | when |
|---|-----------|------|
| 1 | stopped → acceleration | START written, ramped move |
| 2 | acceleration → constant speed | the computed delay reached `min_delay` |
| 3 | constant speed → deceleration | step count reached `decel_start` |
| 4 | deceleration → stopped | all `decel_val` deceleration steps done |
| 5 | stopped → constant speed | START written with `steps == 1` or `c0 <= min_delay` |
| 6 | acceleration → deceleration | `decel_start` reached before top speed |

State changes happen only in a clock cycle where the base timer overflows
(`tick`). Transition 2 is known only once the division result arrives, so it
is held and applied at the next overflow. A STOP write is the one exception
to these rules: it halts the motor at once, from any state.

The machine counts timer overflows. When `c` of them have passed since the
last step, it takes a step:

* pulses `step_pulse` for one clock;
* moves `micro_step` by one, down when `dir` is 1;
* moves the full-step counter when `micro_step` wraps;
* starts the divider on the next delay.

Exact step accounting:

* The step that brings the count to `decel_start` is still taken in
  acceleration or constant speed.
* `decel_val` more steps follow in deceleration.
* One delay after the last step, the machine stops without stepping.

A move is therefore `decel_start + decel_val` micro-steps long. Entering
deceleration from constant speed restarts from the last delay the
acceleration ramp produced, so the two ramps match.

A delay never goes below one timer period. An assertion checks that a
division result is never still pending at an overflow.

## Time base and divider

`periph_timer` counts 0 … period−1. Its overflow is the state machine's
time grain, and its count is the PWM carrier. A modulo below 34 (including
0) is raised to 34, and status bit 9 reports that it was. START resets the
timer, so the first delay is made of whole periods.

`divider` is an unsigned 32-bit shift-and-subtract divider. Two priority
encoders (`prio_enc`, instances `u_num_digit` and `u_div_digit`) find the
leading ones of the numerator and the divisor. The divisor is shifted to line
up with the numerator, so the loop runs only over the quotient bits that can
be non-zero. A division takes one loading cycle plus
`msb(num) − msb(den) + 1` cycles, 33 at most. When `num < den` the result is
ready after the loading cycle.

## Micro-stepping and winding outputs

`MICROSTEPS` micro-steps (8 by default) make one full step. The duty table
holds `MICROSTEPS+1` entries in timer counts. After reset it is a quarter sine
wave scaled to the reset timer period:
`duty[k] = round(34 · sin(k · 90° / MICROSTEPS))`. This is evaluated at
elaboration with Bhaskara's rational approximation of the sine, so no real
arithmetic is synthesized. The CPU may overwrite the table. It must do so
whenever it changes the timer period, because the entries are compared with
raw timer counts.

`pwm_gen` makes two signals from the table:

* a rising one, high while `count < duty[micro_step]`;
* a falling one, high while `count < duty[MICROSTEPS − micro_step]`.

`stepping_logic` sends the falling signal to winding `step mod 4` (the
winding being left) and the rising one to the next winding. The other two
windings stay low. The current thus walks round the windings 0 → 1 → 2 → 3,
one full step per winding, and in reverse order when `dir` is 1. When the
motor stops, the last pattern stays on and holds the shaft.

## Register map

32-bit registers, byte address = 4 × word address:

| word | name | access | meaning |
|------|------|--------|---------|
| 0x00 | CTRL | RW | bit 0: direction (1 = reverse) |
| 0x01 | TIMER_MOD | RW | base timer period in clocks (min 34, reset 34) |
| 0x02 | C0 | RW | first delay, timer periods (compensated, see above) |
| 0x03 | MIN_DELAY | RW | delay at top speed |
| 0x04 | STEPS | RW | micro-steps in the move |
| 0x05 | DECEL_START | RW | step count at which deceleration begins |
| 0x06 | DECEL_VAL | RW | number of deceleration steps |
| 0x07 | START | W | any write starts a move; ignored while running or when STEPS = 0 |
| 0x08 | STOP | W | any write stops at once |
| 0x09 | STATUS | R | [1:0] state, [8] busy, [9] timer modulo raised to 34, [10] divider busy |
| 0x0A | STEP_COUNT | R | steps taken in the current/last move |
| 0x0B | POSITION | R | [15:0] micro_step, [31:16] full-step counter |
| 0x0C | DELAY | R | current inter-step delay |
| 0x10… | DUTY[k] | RW | duty table, k = 0 … MICROSTEPS |

State encoding: 0 stopped, 1 acceleration, 2 constant speed, 3 deceleration.

**Bus handshake.** `bus_sel` is held high for one cycle, with `bus_we`,
`bus_addr` and `bus_wdata`. A write takes effect on that clock edge. In the
next cycle `bus_ack` is high, and for a read `bus_rdata` is valid. This
stands in for the processor bus; a bridge to a real bus (PLB, AXI-Lite, …)
only has to produce this one-cycle strobe.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `stepper_pkg.sv` | state enum, register addresses, `motion_cfg_t` |
| `stepper_periph.sv` | top: wires all blocks together |
| `plb_regs.sv` | register file, action registers, reset duty table |
| `periph_timer.sv` | modulo base timer with 34-clock floor |
| `core_fsm.sv` | state machine, delay recurrence, step counters |
| `divider.sv`, `prio_enc.sv` | aligned shift-subtract divider |
| `pwm_gen.sv` | duty-table comparators |
| `stepping_logic.sv` | winding routing |

Parameters of `stepper_periph`:

| parameter | default | meaning |
|-----------|---------|---------|
| `MICROSTEPS` | 8 | micro-steps per full step |
| `TW` | 16 | timer and duty width |
| `SW` | 16 | full-step counter width |
| `MIN_PERIOD` | 34 | timer floor |
| `DEF_PERIOD` | 34 | reset timer period |

The delay arithmetic is 32 bits wide (`stepper_pkg::DATA_W`). Keep `c0`
below 2³¹ so that `2c + r` fits.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/stepper_ref_pkg.sv` is a separately written model of a whole move: the
step times, the transitions taken and the stop time.

* `tb_prio_enc`, `tb_divider`: exhaustive walking-one and random operands.
  The divider's latency is checked against the formula above, including the
  33-cycle worst case.
* `tb_periph_timer`: count sequence, tick spacing, the raise to 34, and clear.
* `tb_pwm_gen`, `tb_stepping_logic`: duty counts over whole periods, and every
  routing case.
* `tb_plb_regs`: reset sine table against `$sin`, read-back, action pulses,
  status words.
* `tb_core_fsm`: trapezoid, triangle, single step, instant start, reverse and
  STOP. It checks every step time against the model, the transitions, the
  stop time and the final position. It also checks that every state change
  falls in a timer-overflow cycle.
* `tb_stepper_periph`: the top at its default parameters, driven only over
  the bus. It runs all move shapes, a timer modulo below 34, top speed (one
  step per 34 clocks), a rewritten duty table and STOP. It checks step
  spacing in clocks, positions and the winding duty over a PWM period, and
  counts that each of transitions 1–6 and each other mechanism occurred.
* `tb_ramp_accuracy`: the accuracy figures quoted above.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/stepper_pkg.sv tb/stepper_ref_pkg.sv tb/tb_stepper_periph.sv \
        --top-module tb_stepper_periph -o sim
    ./obj_dir/sim

Every testbench finishes in seconds. `tb_ramp_accuracy` takes about 10 s.

## Where this design makes its own choices

The block structure, the four states and six transitions, the ramp
recurrence, the 34-clock timer floor, the 33-cycle 32-bit divider with
leading-one encoders, and PWM by comparing the timer with a
micro_step-indexed table all come from the original design description.
Everything below was decided here:

* The bus handshake and the register map. The original sits on a PLB bus;
  no PLB protocol logic is included.
* The divider's iteration. The original names a CORDIC-style division
  without detail; this is a restoring division with the same cycle bound.
* Carrying the remainder, the exact step accounting, resuming deceleration
  from the last acceleration delay, and the immediate STOP.
* The ramp running per micro-step. A delay is the time between micro-steps,
  so full steps run `MICROSTEPS` times slower than the delay suggests.
* Eight micro-steps, four winding outputs in ring order, a bus-writable duty
  table with a sine reset value, and all register widths.
* Holding the winding pattern while stopped. There is no enable or
  current-off control.
* Purely combinational PWM generators. The original is built from five
  clocked processes plus combinational stepping logic, which suggests that
  its PWM generators are registered. Here they are plain comparators, so the
  duty pair and the winding routing change in the same clock as the counters
  and no one-clock misrouting can occur when a full step completes.
* One controller per top. The reference system puts two controllers beside
  the processor. Each is one instance of `stepper_periph`, and the bus
  address decoding between them lies outside this RTL.

**Resource use.** A yosys mapping to Spartan-3A gives about 2 050 4-input LUTs
per controller. That is more than the original's reported 19 % of an
XC3S400A (about 1 360 LUTs). The main contributors are the bus-writable
duty table and the full 32-bit registers and comparators. One controller
fits beside a soft processor using 47 % of that device, but two do not. A
read-only duty table and narrower delay registers are the obvious ways to
save area.
