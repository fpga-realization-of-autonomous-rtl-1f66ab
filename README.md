# RK4 chaotic signal generator for the Pandey-Baghel-Singh system

This is a digital chaos source. It produces the three state signals x, y, z
of the autonomous third-order (jerk-type) Pandey-Baghel-Singh (PBS) system:

    dx/dt = y
    dy/dt = z
    dz/dt = -a*x - b*y - c*z - x^2        a = 1, b = 1.1, c = 0.4

It integrates the system numerically with the classical fourth-order
Runge-Kutta method (RK4) in 32-bit fixed point. Each RK4 step turns the
current point (x(n), y(n), z(n)) into the next one, which is fed back as the
start of the following step. A new point appears on the outputs every 142
clock cycles, so the generator streams a sampled trajectory for as long as
its enable input is high. The system has equilibria at (0, 0, 0) and
(-1, 0, 0). The reference initial point is x = 0.1, y = 0, z = 0.

The RTL is plain synthesizable SystemVerilog. It has no vendor primitives and
no memories.

## One RK4 step

With step size h, one step computes four slope triples and a weighted
average:

    K1 = F(P)
    K2 = F(P + h/2 * K1)
    K3 = F(P + h/2 * K2)
    K4 = F(P + h   * K3)
    P(n+1) = P + h/6 * (K1 + 2*K2 + 2*K3 + K4)

Here P = (x, y, z) and F(P) = (y, z, -a*x - b*y - c*z - x^2). Each triple
K_s is written (k_s, lambda_s, xi_s): the slopes of x, y and z. Only the
third component of F needs arithmetic: four products, accumulated. The first
two are copies of y and z at the probe point.

The hardware follows this structure one to one. It has a multiplexer, four
slope stages K1..K4, an update block Ys, and a filter stage on the outputs:

```
            +-----+   state   +----+  +----+  +----+  +----+
 X_in,Y_in, |     |---------->| K1 |->| K2 |->| K3 |->| K4 |
 Z_in ----->| MUX |     |     +----+  +----+  +----+  +----+
            |     |     |        |       |       |       |
      +---->|     |     +------->+-------+-------+-------+--> Ys --> filter --+--> Xn_out, Yn_out, Zn_out, Ready
      |     +-----+                                                           |
      +-----------------------------------------------------------------------+
```

## Number format

All data are 32-bit two's-complement numbers with 24 fraction bits (Q8.24).
The range is -128 to +128 and one LSB is 2^-24 ≈ 6e-8. Examples:

| value | Q8.24 code |
|-------|------------|
| 0.1   | `0x00199999` (the customary step size, truncated) |
| 1.0   | `0x01000000` |
| 1.1   | `0x0119999A` |
| 0.4   | `0x00666666` |
| 1/6   | `0x002AAAAB` |

All arithmetic goes through a multiply-accumulate operation,
`result = addend ± (A*B >>> 24)`. The 64-bit product is truncated toward
minus infinity to Q8.24 before it is added. Additions wrap at 32 bits, and
nothing saturates. The weighted sum K1 + 2K2 + 2K3 + K4 is formed with
adders and shifts, also at 32 bits. This is safe while every slope stays
below about 21 in magnitude.

The per-step error against an exact (double-precision) RK4 step is a few
LSBs. The testbenches require it to stay below 1e-5.

## Schedule: where the 142 cycles go

Speed was not the aim of this generator: it fixes a step latency of 142
cycles at a high clock rate. The RTL meets exactly that number with a
sequential datapath. Each slope stage and the update block own one
multiply-accumulate unit (`pbs_fx_mac`). Each unit carries out one operation
at a time, and every operation takes 5 cycles:

1. operand register
2. three product registers (the register layout of an FPGA DSP multiplier)
3. accumulate register

A caller issues its next operation on the cycle in which the previous one
reports `done`. It can feed the previous result straight back as the addend,
which is how the four products of dz/dt accumulate.

| unit | operations | cycles |
|------|-----------|--------|
| MUX  | load the start point into the state register | 1 |
| K1   | `acc = -a*x`, `acc -= b*y`, `acc -= c*z`, `acc -= x*x` | 20 |
| K2, K3 | probe point `p = P + (h/2)*K` (3 ops), then the 4 ops of dz/dt at p | 35 each |
| K4   | the same with `h` instead of `h/2` | 35 |
| Ys   | `x + (h/6)*Sx`, `y + (h/6)*Sy`, `z + (h/6)*Sz` | 15 |
| filter | register the result, raise Ready | 1 |
| **total** | | **142** |

h/2 is an arithmetic shift. Ys also needs h/6, which takes a multiply by
1/6. Ys computes that product during K1, when its own multiplier is idle, so
it costs no cycles.

The stages run strictly one after another, because each needs the slopes of
the one before. Every stage keeps its outputs stable until it is started
again in the next step, so Ys can read all four triples at the end of a
step.

## Interface of `pbs_chaotic_top`

| port | dir | width | function |
|------|-----|-------|----------|
| `CLK` | in | 1 | clock |
| `RST` | in | 1 | synchronous, active-high reset. Outputs go to 0 and the next step starts from the initial condition. |
| `Start` | in | 1 | enable. While high, steps run back to back. |
| `X_in`, `Y_in`, `Z_in` | in | 32 | initial point, Q8.24. Read only for the first step after reset. |
| `h` | in | 32 | step size, Q8.24. Must hold while steps run. |
| `Xn_out`, `Yn_out`, `Zn_out` | out | 32 | latest point, Q8.24. Held between results. |
| `Ready` | out | 1 | one-cycle pulse with each new point |

Parameters `A`, `B` and `C` (type `fx_t`, Q8.24) set the system constants.
Their defaults are 1, 1.1 and 0.4.

Timing:

- **First result.** `Ready` rises on the 142nd rising edge of `CLK`,
  counting the edge that first samples `Start` high as number 1.
- **Following results.** Each further result comes 142 edges after the one
  before.
- **Dropping Start.** If `Start` falls during a step, that step still
  finishes and delivers its result. No further step begins.
- **Raising Start again.** The trajectory resumes from the last output.
  Only `RST` returns to `X_in`/`Y_in`/`Z_in`.
- **Selecting the start point.** The multiplexer uses the initial condition
  until the first `Ready` after reset. After that it uses the fed-back
  output.

## Files

| file | contents |
|------|----------|
| `rtl/pbs_pkg.sv` | Q8.24 type `fx_t`, point/slope struct `vec3_t`, constants |
| `rtl/pbs_fx_mac.sv` | 5-cycle multiply-accumulate unit |
| `rtl/pbs_k_stage.sv` | slope stage, `STAGE` = 1..4 |
| `rtl/pbs_ys.sv` | RK4 update block (h/6 and the weighted sum) |
| `rtl/pbs_filter.sv` | output register that updates only on a finished result |
| `rtl/pbs_mux.sv` | initial-condition / feedback multiplexer and step launcher |
| `rtl/pbs_rk4_core.sv` | K1..K4, Ys and filter wired together: one RK4 step |
| `rtl/pbs_chaotic_top.sv` | top level: multiplexer plus core |
| `tb/pbs_ref_pkg.sv` | bit-exact fixed-point model and a double-precision RK4 step |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a long run |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

- **`tb_pbs_fx_mac`.** 2000 random multiply-accumulate operations, including
  the extreme codes. Checks the result against 64-bit arithmetic and the
  5-cycle timing.
- **`tb_pbs_k_stage`.** All four stages, 200 random points each. The slopes
  must match the model bit for bit. Latency must be 20 cycles for K1 and 35
  for the others. Outputs must hold after `done`.
- **`tb_pbs_ys`.** 300 random slope sets. Checks bit-exact results, a
  15-cycle latency and a one-cycle `done`.
- **`tb_pbs_filter`.** Random `valid` with new data on the input every cycle.
  Checks the hold behaviour and the `Ready` timing.
- **`tb_pbs_mux`.** Checks the initial-condition load, feedback, pause and
  resume, and return after reset.
- **`tb_pbs_rk4_core`.** 100 single steps from random points with random h.
  Checks bit-exact results, agreement with an exact RK4 step to 1e-5, and a
  141-cycle latency from `go`.
- **`tb_pbs_chaotic_top`.** Runs at the default parameters, in three phases:
  - 250 back-to-back steps from (0.1, 0, 0) with h = `0x00199999`. Every
    result is checked bit for bit. The first 100 steps are also checked
    against the exact trajectory to 1e-4. Each step must take 142 cycles,
    and the outputs must not move between `Ready` pulses.
  - A pause and resume in the middle of a step.
  - A reset to a new initial point (0, 0, 0.1).

  Each mechanism is counted and must have happened.
- **`tb_pbs_workload_1e6`.** 10^6 back-to-back results (1.42e8 cycles). All
  are compared bit for bit with the model, and every step must take 142
  cycles. It runs for about 100 s.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_pbs_chaotic_top \
    rtl/pbs_pkg.sv tb/pbs_ref_pkg.sv tb/tb_pbs_chaotic_top.sv
./obj_dir/Vtb_pbs_chaotic_top
```

The two packages are listed first. `-y` lets Verilator find every module by
its file name. Any other testbench runs the same way with its own name.

## Behaviour of the system with the standard constants

With a = 1, b = 1.1, c = 0.4, the equations above are **not bounded** from
the reference initial point. An exact RK4 integration from (0.1, 0, 0)
oscillates with growing amplitude, then runs away to x → -∞ at about
t = 27.4. From (0, 0, 0.1) the same happens at t = 90.7. This does not
depend on h.

In this fixed-point generator with h = 0.1, the results leave the Q8.24
range after about 266 steps and then wrap around. They remain deterministic
and match the model bit for bit, but they are no longer a trajectory of the
system. This is why the end-to-end test checks accuracy only over the first
250 steps.

To get a bounded chaotic signal, the constants must be changed through the
`A`, `B`, `C` parameters, or the signals must be rescaled. Neither is
decided here.

## Where this RTL departs from, or adds to, the published generator

The published generator fixes the three-level structure: multiplexer,
K1..K4 stages, Ys, filter, and the feedback path. It also fixes the port
names, the 32-bit width, the 142-cycle step, and the use of RK4 on the PBS
equations. Everything else here is this design's own choice:

- **Number format.** The generator was described as using 32-bit IEEE-754
  floating point. The hexadecimal values reported from its simulation
  (h = `0x00199999`, an initial value of `0x00199999`, results such as
  `0x00188a43`) are only meaningful as Q8.24 fixed point, so Q8.24 is used.
- **Step-size input.** `h` is an input port of the top level. The top-level
  port list shown for the generator omits it, but its second-level diagram
  and its simulation both show it.
- **Schedule.** The 5-cycle operation, the order of the operations, and the
  overlap of h/6 with K1 were chosen so that the step takes exactly 142
  cycles.
- **Multipliers.** This RTL uses five 32x32 multipliers: one each in K1..K4
  and Ys. The reported implementation used 4 DSP blocks, which is one 32x32
  multiplier on Artix-7, so it must have shared a single multiplier more
  aggressively. How it did so is not known.
- **Reported numbers not reproduced.** The reported implementation reached
  359.71 MHz with 2637 LUTs and 4692 flip-flops. Those figures have not been
  reproduced. Generic synthesis of this RTL gives about 2600 flip-flop bits.
- **Rounding and overflow.** Products truncate and sums wrap. Neither was
  specified.
- **Reset, enable and pause.** Reset is synchronous and active high. `Start`
  is treated as a level enable. A pause resumes from the last point.
- **First-step values.** The first point reported from the published
  simulation, starting from (0, 0, 0.1) with h = 0.1, is (`0x00002053`,
  `0x000281f5`, `0x00188a43`). An exact RK4 step gives (`0x0000204e`,
  `0x00028139`, `0x0018747e`). This design produces (`0x0000204e`,
  `0x00028138`, `0x0018747e`). The published z value differs from it by about 3.3e-4, so it is not
  used as a test vector.
