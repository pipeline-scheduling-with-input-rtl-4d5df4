# Port-constrained rate-law Solver for an FPGA ODE biochemical simulator

This repository holds SystemVerilog for one *Solver* of an FPGA biochemical
simulator built on ordinary differential equations, modelled on the solvers of
the ReCSiP platform. A Solver steps a set of chemical concentrations forward in
time. It contains two parts:

* A **Solver Core**. This is a deep, statically scheduled floating-point pipeline.
  It evaluates one rate-law function and returns the reaction velocity `v`.
* An **Integrator**. It holds the memories, feeds the reactions into the core, and
  integrates the concentrations.

The Solver Core is the interesting part. Its inputs arrive through a fixed set of
narrow ports:

* one **X port** for concentrations;
* two **k ports** (`k1`, `k2`) for rate coefficients.

A concentration can never enter through a k port. The rate law built here is

```
        Ka * Xa / (Xa / Kb)
v = ---------------------------
     1 + Xa / Kb + Kc / Xb
```

It has two concentrations (Xa, Xb) and three coefficients (Ka, Kb, Kc). Xa and Xb
must share the single X port, so one reaction takes **two input cycles**. This is
the *pipeline pitch* P = 2. Each arithmetic unit therefore needs to start an
operation only every other cycle. Two operations that start in different cycles
of the pitch can share one unit. The order in which the inputs arrive decides how
soon each operation can start. That in turn decides both the latency and how many
units the core needs.

## The data-flow graph

```
 Ka   Xa   Kb        Kc   Xb
  \  /  \  /           \  /
  (x)   (/) op2         (/) op5
   |op1  |  \            |
    \    |   (+) op4 <-1 |
     \   |    \          |
      (/) op3   (+) op6 <-
        \       /
         (/) op7
          |
          v
```

| op | operation       | unit                          |
|----|-----------------|-------------------------------|
| 1  | Ka * Xa         | multiplier                    |
| 2  | Xa / Kb         | divider A                     |
| 3  | op1 / op2       | divider B                     |
| 4  | 1 + op2         | adder                         |
| 5  | Kc / Xb         | divider A                     |
| 6  | op4 + op5       | adder                         |
| 7  | op3 / op6 = v   | divider B                     |

The units have these latencies: adder 5 cycles, multiplier 5 cycles, divider 27
cycles. The three divisions op2, op3 and op7 follow each other, which sets the
core's latency at 3 x 27 = 81 cycles.

## Input order

Three priority measures rank the inputs:

1. **Number of successors.** This is the number of operations between the input and
   the output. It approximates the critical path better than summed latencies,
   because it ignores stalls. Xa and Kb come first.
2. **Number of divider subtrees that cover the input.** Start from the output and
   open a subtree at every divider on the way back to the inputs. The subtree
   counts are Xa 3, Kb 3, Ka 2, Kc 2, Xb 2. Dividers are about five times slower
   than the other units, so an input under many dividers should come early.
3. **Usage frequency (out-degree).** Xa feeds two operations.

The measures are applied in that order. The result is:

| state | X port | k1 port | k2 port  |
|-------|--------|---------|----------|
| 0     | Xa     | Kb      | Ka       |
| 1     | Xb     | Kc      | (unused) |

Ka and Kc tie on all three measures. Ka goes first because it shares a state with
Xa, so op1 can start at once. Which coefficient uses which k port is a free
choice; the table above is the one this RTL uses.

## The schedule and the shared units

Let `t` be the cycle in which state 0 of a reaction is on the ports.

| op | start | done | unit, state      | how it gets its operands                     |
|----|-------|------|------------------|----------------------------------------------|
| 1  | t     | t+5  | multiplier, 0    | ports                                        |
| 2  | t     | t+27 | divider A, 0     | ports                                        |
| 5  | t+1   | t+28 | divider A, 1     | ports                                        |
| 3  | t+27  | t+54 | divider B, 1     | op1 through a 22-cycle delay line; op2 direct |
| 4  | t+27  | t+32 | adder, 1         | constant 1.0; op2 direct                     |
| 6  | t+32  | t+37 | adder, 0         | op4 direct; op5 through a 4-cycle delay line |
| 7  | t+54  | t+81 | divider B, 0     | op3 direct; op6 through a 17-cycle delay line |

Operations that share a unit start in different states, so they never collide.
Seven operations therefore run on **two dividers, one adder and one multiplier**.
A fully spatial design would need four dividers and two adders.

The state counter (`pitch_counter`) runs freely: 0, 1, 0, 1, and so on. Each shared
unit's operand multiplexer selects on the current state. Each unit carries a valid
bit next to its data. A unit's output is used in the state whose parity matches
its schedule:

* divider A results from state 0 are op2 and appear in state 1;
* divider B results in state 1 are op7, so `v_valid = divB.out_valid & state`.

All operand timing relies on the unit latencies being odd (5 and 27). An
elaboration-time check stops the core if the package constants are changed.

This schedule was derived by hand with list scheduling. Operations were placed in
order of least mobility, at the earliest state free on a unit of their kind. The
published scheduler gives the method, not this table. The source design reports
latencies of 64 to 93 cycles for eighteen other rate laws (7 to 34 operations);
it gives no latency for this one, so the 81 cycles here are not checked against
a published number.

### Core interface and timing (`solver_core`)

| port       | dir | width | meaning                                             |
|------------|-----|-------|-----------------------------------------------------|
| `in_valid` | in  | 1     | a reaction word is on the ports                     |
| `x`        | in  | 32    | X port                                              |
| `k1`, `k2` | in  | 32    | k ports                                             |
| `state`    | out | 1     | current pitch state; a reaction must begin in 0     |
| `v_valid`  | out | 1     | `v` holds a result                                  |
| `v`        | out | 32    | reaction rate                                       |

The core follows these rules:

* `in_valid` must stay high for both states of a reaction. An assertion checks this.
* `v` appears 81 cycles after the state-0 cycle.
* Reactions may follow each other every two cycles.
* There is no back-pressure.

## Floating-point units

The units are `fp_add` (add/subtract), `fp_mul` and `fp_div`. All use IEEE-754
single precision and round to nearest, ties to even. Each accepts a new operation
every cycle.

* `fp_add`, 5 stages: order the operands by magnitude, align with guard, round and
  sticky bits, add or subtract, normalise with a leading-zero count, then round
  and pack.
* `fp_mul`, 5 stages: unpack, 24x24 product, normalise, round, pack.
* `fp_div`, 27 stages: a radix-2 restoring divider unrolled to one quotient bit per
  stage. The first stage unpacks and forms the first bit. Stages 2 to 26 form one
  bit each. Stage 27 rounds and packs. Twenty-six quotient bits give 24 result
  bits plus a guard bit, and the final remainder acts as the sticky bit.

Special values are simplified:

* Subnormal inputs are read as zero, and subnormal results are flushed to zero.
* Overflow and x/0 give infinity.
* Any NaN or infinity operand gives the quiet NaN `0x7FC00000`. Infinity
  arithmetic is not modelled.
* An exact cancellation gives +0.

Results within the normal range are correctly rounded. The testbenches check this
bit for bit. The source design fixes only the format (single precision) and the
three latencies; the rounding mode, the special-value policy and the stage split
are this RTL's own.

## The Integrator

The Integrator (`integrator`) holds six memories:

| memory      | words       | content                                                  |
|-------------|-------------|----------------------------------------------------------|
| `[X] RAM`   | `N_X` = 64  | concentrations                                           |
| `k RAM`     | 2 x `N_R`   | word `r*2+s`: the k1 and k2 values of reaction r in state s |
| reaction table | 2 x `N_R` | word `r*2+s`: which species goes to the X port           |
| `d[X] RAM`  | `N_R` = 32  | the rate `v` of each reaction, as returned by the core   |
| update table | `N_U` = 64 | entries (reaction r, species i, sign)                    |

One time step has two phases.

1. **Evaluate.** Reactions `0 .. n_react-1` are streamed back to back into the
   core. The feed is two reads deep: first the reaction table and k RAM, then
   [X] RAM. A reaction's first read is therefore issued when the core's state
   two cycles later will be 0. Rates return in order and are written to d[X] RAM.
2. **Update.** Each entry of the update table does `X[i] = X[i] +/- dt * v[r]`
   (explicit Euler). The entries run one after another. Each takes a read cycle,
   an operand cycle, the 5-cycle multiply and the 5-cycle add, whose result
   is written back as it appears: 12 cycles in all. A species hit by several
   entries therefore always sees the newest value.

A step takes about `2*n_react + 85 + 12*n_upd` cycles. After `n_steps` steps,
`done` rises and the Integrator returns to idle.

This RTL makes several choices of its own:

* explicit Euler as the integration method;
* storing one rate per reaction in d[X] RAM, with the stoichiometry held as
  +/-1 update entries;
* the table formats;
* applying updates one at a time.

Updates are not pipelined. For large update tables this phase dominates the step
time.

## Top level (`solver`)

`solver` connects the Integrator to the Solver Core:

* [X] RAM drives the X port;
* k RAM drives the k1 and k2 ports;
* `v` goes into d[X] RAM.

| port group | meaning |
|------------|---------|
| `host_x_*` | write a concentration; `host_x_rdata` returns `[X]` at `host_x_addr` one cycle later |
| `host_k_*` | write the k1 and k2 words of (reaction, state) |
| `host_rt_*`| write the species index of (reaction, state) |
| `host_u_*` | write an update entry |
| `start`, `n_react`, `n_upd`, `n_steps`, `dt` | run control; pulse `start` while idle |
| `busy`, `done`, `step_cnt` | status |

The memories accept host access only while `busy` is low.

Parameters: `N_X` = 64, `N_R` = 32 and `N_U` = 64 set the memory sizes. The
original design gives no sizes for them; they can be changed freely. At these
sizes, coarse synthesis gives about 1350 word-level cells, 1230 flip-flop bits
and 16 Kbit of memory.

## What is not here

The full simulator has more than one Solver. These parts are not included:

* the switch network that exchanges data between Solvers;
* the PCI host interface. The host ports of `solver` stand in for it.
* Solver Cores for rate laws other than the one above. Each rate law needs its
  own data-flow graph and schedule; only this one is built.
* the software that generates the schedules (input ranking and list scheduling).
  Only its output, the table above, is built into `solver_core`.

## Files

| file | content |
|------|---------|
| `rtl/recsip_pkg.sv` | number type, unit latencies, pitch, constants |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | pipelined arithmetic units |
| `rtl/pitch_counter.sv` | cyclic state counter |
| `rtl/delay_line.sv` | operand delay line |
| `rtl/solver_core.sv` | the scheduled rate-law pipeline |
| `rtl/integrator.sv` | memories, reaction feed, Euler update, run control |
| `rtl/solver.sv` | top level |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/recsip_pkg.sv tb/fp_ref_pkg.sv tb/tb_solver.sv --top-module tb_solver
./obj_dir/Vtb_solver
```

Replace `tb_solver` with any other testbench name. What each testbench checks:

* **Arithmetic units** (`tb_fp_add`, `tb_fp_mul`, `tb_fp_div`): about 6000 random
  and directed operations, one per cycle. Each result is compared with double
  precision rounded to single. Double precision carries more than twice the
  significand bits of single plus two, so this double rounding is exact for
  + - * /. The latency must be exactly 5, 5 or 27 cycles.
* **`tb_pitch_counter`**: counter sequence for P = 2 and P = 3.
* **`tb_solver_core`**:
  * one hand-checked reaction (v = 3/3.5);
  * 400 back-to-back reactions, which must give one result every two cycles;
  * 600 reactions with random gaps;
  * every result bit-exact against the data-flow graph evaluated in the same
    order, and the 81-cycle latency.
* **`tb_integrator`**: small memories (8/4/8), runs of several steps, partial
  tables, and an empty update table. It also checks the run length against
  `2*n_react + 85 + 12*n_upd` cycles per step.
* **`tb_solver`**: the top at its default sizes. It runs three steps of a random
  64-species, 32-reaction network, then a restart, and checks every
  concentration bit for bit against a software model. It also counts that both
  states of the shared divider, back-to-back rates, positive and negative
  updates, and multi-step runs all occurred.

The testbench reference model uses the same formulas as the RTL. It applies the
rate law in the operation order of the graph, and the Euler updates in table
order.
