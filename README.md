# Plant-on-chip: a hardware inverted pendulum for testing controllers on real processors

Digital controllers are usually designed on two assumptions: the sensor is
sampled at a fixed rate, and the processor answers after a fixed delay. On a
shared processor, caches, interrupts, branch prediction and the scheduler
break both assumptions. The resulting jitter can make a loop ring or go
unstable. Simulation tools model that jitter as a probability distribution.
This design takes a different approach: it puts the plant itself into FPGA
logic. A *plant-on-chip* (PoC) advances a state-space model of a physical
system in real time. The processor under test samples and actuates the PoC
through registers, just as it would the real sensors and actuator. A profiler
records every sample and every actuation with a clock-accurate time stamp.
All of the processor's real timing behaviour therefore reaches the plant, and
the host can measure it afterwards.

The default plant is an inverted pendulum on a cart. Its state is
X = [θ, θ̇, x, ẋ]: pendulum angle and angular rate, cart position and
velocity. The input u is the force on the cart.

```
                 +---------------------------- poc_platform ----------------------------+
  processor bus  |  poc_bus_if            poc (plant-on-chip)                            |
  ------------>  |  Control Input reg --> u latch --+                                    |
  (address,      |  CTRL / PERIOD / NOISE           |   A ROM   B ROM    Old X RAM       |
   read, write)  |  X0..X3 sample latch <--+        v      \      |        /             |
  <------------  |                         |   [ MAC: a*b + acc ] --> uB RAM, AX RAM     |
                 |                         |             uB + AX (+noise on x) --> Xnew  |
                 |                         +---- Sample Reg <-- Xnew --> Old X RAM       |
                 |   actuation / sample events          ^ timer, FSM                     |
                 |            v                                                          |
                 |   profiler: time stamp -> FIFO -> frame -> UART  ---------------------+--> prof_txd
                 +---------------------------------------------------------------------- +
```

## One plant update

The PoC computes X ← A·X + B·u once per update period. A and B are the plant's
matrices, already discretised for the update step. There is one multiplier,
so the update runs as a sequence of phases under the controller `poc_fsm`:

| phase | work | clocks |
|-------|------|--------|
| UB    | uB[i] = B[i]·u, one product per element, into the uB RAM | 4 |
| AX    | AX[i] = Σⱼ A[i][j]·X[j], four-long dot products on the accumulator, into the AX RAM | 16 |
| ADD   | Xnew[i] = uB[i] + AX[i], plus the disturbance on x, into the Xnew RAM | 4 |
| COPY  | Xnew → Old X RAM, and all of Xnew → Sample Reg in one clock | 4 |

The ROMs and RAMs read synchronously (one clock), as FPGA block memory does.
Each read issued by the FSM therefore carries a small tag down a two-stage
pipeline:

- stage 1: the memory data is present, so the MAC accumulates, or the ADD/COPY write happens;
- stage 2: the MAC result is valid, so it is written to the uB or AX RAM.

UB and AX issue back to back. Before ADD and before COPY the pipeline
drains, so every phase reads what the previous phase wrote. Counted from the
clock in which `start` is seen to the `update_done` pulse, an update takes
**36 clocks**: 1 + 4 + 16 + 3 + 4 + 2 + 4 + 2. At the default 50 MHz clock
and 1 ms step, that is well under 0.1% of the period.

Points that matter when reading or changing the datapath:

- **u is latched when an update starts.** The processor may write u at any
  time. Each update uses one consistent value.
- **The Sample Reg changes atomically.** It is loaded from Xnew in a single
  clock at the end of COPY, so the processor never sees half an update. On
  the bus side, reading X0 latches all four words. X1 to X3 then return that
  same sample, even if the plant has moved on in the meantime.
- **Arithmetic.** Numbers are signed Q8.24 in 32 bits: range ±128, resolution
  6·10⁻⁸. The MAC keeps full-precision products in a 68-bit accumulator. The
  result is shifted right by 24, rounding toward −∞, and saturated to 32
  bits. The vector adder also saturates. A state that leaves ±128 (a pendulum
  that has fallen and spun away) sticks at the limit rather than wrapping.
- **Reset.** After reset the FSM spends 4 clocks clearing the Old X RAM, so
  the plant starts at rest at X = 0. The other RAMs are always written before
  they are read.
- **Initial state.** The processor can write any element of the state, which
  sets both Old X and the Sample Reg. The write is accepted only while the
  FSM is idle. The bus interface holds it until then, at most one update
  time.

## The pendulum model in the ROMs

The default contents of `A_DEFAULT` and `B_DEFAULT` (in `poc_pkg`) use the
standard linearised cart–pendulum model with these parameters:

- cart mass M = 0.5 kg
- pendulum mass m = 0.2 kg
- cart friction b = 0.1 N/(m/s)
- pendulum inertia I = 0.006 kg·m²
- pivot-to-centre-of-mass length l = 0.3 m
- g = 9.8 m/s²

With p = I(M+m) + M·m·l² and the state order above:

```
Ac = [ 0              1  0   0
       mgl(M+m)/p     0  0  -mlb/p
       0              0  0   1
       m²gl²/p        0  0  -(I+ml²)b/p ]        Bc = [0, ml/p, 0, (I+ml²)/p]ᵀ

Ad = I + Ac·dt + Ac²·dt²/2        Bd = (I·dt + Ac·dt²/2)·Bc        dt = 1 ms
```

Each entry is rounded to the nearest multiple of 2⁻²⁴. The testbench
`tb_coef_rom` recomputes these in floating point and checks every ROM word to
within one LSB.

To emulate another plant, or the same plant with another step, override the
`A_INIT` and `B_INIT` parameters of `poc`. The update period then follows
from the step: period = step × clock frequency, set by the `UPDATE_PERIOD`
parameter or at run time through the PERIOD register. A plant with a
different number of state variables needs `N` in `poc_pkg` changed. The FSM
and the memories follow `N`. The register map and the profiler frame assume
four words.

## Processor interface

`poc_bus_if` is a simple word-addressed slave: `address[3:0]`, `write` with
`writedata`, and `read`. `readdata` is valid with `readdatavalid` one clock
after `read`.

| addr | name   | access | meaning |
|------|--------|--------|---------|
| 0 | CTRL   | R/W | bit 0 run (timer-paced updates), bit 1 disturbance on, bit 2 single step (write-only pulse) |
| 1 | U      | R/W | Control Input reg: force on the cart, Q8.24 newtons; each write is an actuation event |
| 2 | PERIOD | R/W | clocks per plant update, reset value `UPDATE_PERIOD` (50,000) |
| 3 | STATUS | R   | bit 0 busy, bits 31:8 low 24 bits of the update count |
| 4–7 | X0–X3 | R | sample: a read of X0 latches θ, θ̇, x, ẋ and is a sample event; X1–X3 read the latch |
| 4–7 | X0–X3 | W | initial value of θ, θ̇, x, ẋ (applied when the emulator is idle) |
| 8 | NOISE  | R/W | bits 4:0: disturbance amplitude as a right shift (reset 16) |

When run is set, the timer counts `PERIOD` clocks and then starts an update,
and repeats. The first update starts `PERIOD` clocks after run is set.
Clearing run stops the timer; an update already in progress still completes. PERIOD must be at least 37 clocks, one more than an update; a timer tick that
arrives during an update is lost, and simulation flags it with an assertion.

## Disturbance

`noise_lfsr` is a 32-bit maximal-length Galois LFSR with polynomial
x³² + x²² + x² + x + 1. It steps once per update. When CTRL bit 1 is set, its
state, read as a signed number and shifted right by NOISE, is added to the
cart position x in the ADD phase. This reproduces the disturbance-in-x
experiments. The shift sets the amplitude: about ±2^(7−shift) m per update.

## Profiler

The profiler watches the register interface rather than the processor, so
recording costs the software nothing. Each U write and each X0 read is time
stamped with a 32-bit count of clocks since reset, so it wraps after 86 s at
50 MHz. The record is queued in a 16-entry FIFO and sent as one frame over an
8N1 UART (`BAUD_DIV` = 434, 115200 baud at 50 MHz). Each frame is, most
significant byte first:

```
A5 | 01 | ts[31:0] | u                       actuation, 10 bytes
A5 | 02 | ts[31:0] | θ | θ̇ | x | ẋ           sample,    22 bytes
```

The difference between a sample's time stamp and the following actuation's
time stamp is the controller's computation delay, exact to one clock. The
host computes cost, delay statistics and actuator energy from the stream.

A sample frame takes 22 × 10 × 434 clocks, about 1.9 ms. A controller that
samples and actuates more often than the UART can drain eventually fills the
FIFO. New records are then dropped and counted in `prof_dropped`. If an
actuation and a sample arrive in the same clock, the sample is dropped and
counted; a single bus cannot produce that. For fast loops, raise the baud
rate (lower `BAUD_DIV`) or deepen the FIFO.

## What is specified and what is chosen here

These parts follow the published description of the plant-on-chip:

- the pendulum's four state variables and their order;
- the blocks and their roles: Control Input reg, Old X RAM, A and B ROMs,
  uB RAM, AX RAM, Xnew RAM, Sample Reg, accumulator, FSM with internal
  timers, UART register;
- the order of the computation: u·B first, then A·X row by row, then the sum;
- a noise source that disturbs the cart position;
- a profiler that sends X, u and their time stamps non-intrusively.

These are this design's own choices:

- the number format, rounding and saturation;
- the 1 ms update step and the 50 MHz clock;
- the numerical plant parameters, from the standard cart–pendulum model;
- memory read timing and the pipelined FSM, hence the 36-clock update;
- the COPY phase and the atomic sample;
- initial-state loading;
- the register map and bus timing;
- the LFSR disturbance;
- the profiler's frame format, FIFO and drop policy;
- the UART parameters.

Not included:

- the soft processor that runs the controller, and its link to the host PC.
  Their bus is the `bus_*` port group of `poc_platform`;
- the host-side analysis.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each has a watchdog and was also run against
a deliberately broken copy of its module, which it detects.

- `tb_poc` compares the emulator, bit for bit, with an independent
  reference model (`tb_ref_pkg`, wide-integer arithmetic) over more than 80
  updates. These cover free response, random states and inputs, the
  disturbance, saturation and timer-paced runs. It also checks the 36-clock
  update and the update period.
- `tb_poc_platform` is the end-to-end test, run with 200 clocks per plant
  step to keep it short. The testbench acts as the processor: an LQR state
  feedback samples every 15 steps (15 ms) and actuates after 15%, 65%, 85%
  and 90% of the period. Every update is compared with the reference model.
  The pendulum, started 0.05 rad off upright, must settle. Every profiler
  frame is decoded, including the exact sample-to-actuation time-stamp gap.
  It also exercises single steps, disturbance, a held initial-state write and
  a FIFO overflow, and fails if any of these never happened.
- `tb_poc_platform_full` runs the platform with all parameters at their
  defaults: 50,000 clocks per step, 115200-baud UART. It covers one
  timer-paced update, a sample, an actuation and both frames.
- `tb_workload_sweep` runs the controller for 2 s of plant time. The sample
  periods are 1, 2, 5, 10, 15 and 20 ms; the delays are 0, 50 and 100% of the
  period; the disturbance is on. It prints a quadratic cost and the actuator
  energy for each run, and checks every update against the reference. Actuator
  energy grows with both delay and period. The cost grows with the delay at
  periods of 5 ms and above. The loop stays stable across the whole sweep.
  At the longest period, the test requires the cost to grow with the delay.
- Unit tests cover the MAC, ROM contents, RAM timing, timer, LFSR sequence,
  saturating adder, register interface, UART timing and profiler frames.

Not checked:

- timing closure on an FPGA;
- any behaviour of a real processor and its bus.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/poc_pkg.sv tb/tb_ref_pkg.sv tb/tb_poc_platform.sv --top-module tb_poc_platform
./obj_dir/Vtb_poc_platform
```

Replace `tb_poc_platform` with any testbench name. `-Wno-fatal` keeps Verilator's width
and style warnings from stopping the build; none of them marks a circuit problem. Each module lives in the
file of its own name, so `-y` finds it. The testbenches initialise everything
they read and do not rely on X or Z values.

## Files

- `rtl/poc_pkg.sv`: word type, Q8.24 constants, default A and B, register map, profiler record.
- `rtl/poc_platform.sv`: top, with the bus interface, emulator and profiler.
- `rtl/poc.sv`: the plant-on-chip; `poc_fsm.sv` sequences it. Its parts are
  `poc_timer.sv`, `coef_rom.sv` (A and B), `vec_ram.sv` (Old X, uB, AX, Xnew),
  `mac.sv`, `vec_add.sv` and `noise_lfsr.sv`.
- `rtl/poc_bus_if.sv`: processor registers.
- `rtl/profiler.sv`, `rtl/sync_fifo.sv`, `rtl/uart_tx.sv`: the profiler.
- `tb/`: one testbench per module, plus `tb_ref_pkg.sv` (reference
  arithmetic) and `tb_uart_rx_model.sv` (behavioural UART receiver).
