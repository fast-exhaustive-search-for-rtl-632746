# Gray-code exhaustive search for quadratic systems over GF(2)

This is synthesizable SystemVerilog for a fully pipelined engine that finds every
common zero of a system of quadratic equations over GF(2) by trying all inputs.
The architecture follows the FPGA design in *Fast Exhaustive Search for Quadratic
Systems in F2 on FPGAs* (Bouillaguet, Cheng, Chou, Niederhagen, Yang). The defaults
give the main configuration of that design:

- 48 variables;
- 2^10 = 1024 parallel instances that test 1024 inputs per clock;
- 12 equations screened with the Gray-code method;
- 42 further equations checked by full evaluation;
- two pillars, each with its own candidate bus.

At one input batch per clock, a 48-variable system takes 2^38 clock cycles
(about 23 minutes at 200 MHz).

## The idea: enumerate in Gray-code order and keep derivatives

Write one equation as `f(x) = sum a[k][j] x[k] x[j] + sum a[k] x[k] + c`.
Gray-code order changes exactly one variable between consecutive inputs. At step
`t` the variable that flips is `x[k1]`, where `k1` is the lowest set bit of `t`.
So the new value of `f` is the old value XOR the first derivative `d'[k1]`.

For a quadratic `f`, the first derivative with respect to `x[k1]` is linear. Since
the last time `x[k1]` flipped, only one other variable has changed: `x[k2]`, where
`k2` is the second-lowest set bit of `t`. So `d'[k1]` changes by the second
derivative `d''[k2][k1] = a[k2][k1]`, which is a constant. One step of one
equation is therefore:

```
if (t has two set bits)  d'[k1] ^= a[k2][k1]
y ^= d'[k1]               // y = f(gray(t)), gray(t) = t ^ (t >> 1)
```

The cost is two XORs, a lookup in a constant table of `NL(NL-1)/2` bits, and `NL`
bits of state.

**Parallel instances.** Instance `k` (0 ≤ k < 1024) fixes the top 10 variables to
`x[47:38] = k` and enumerates the other `NL = 38` variables. Fixing variables
changes only the linear and constant terms. So all instances share the same
second-derivative tables. Each instance has its own first derivatives and its own
`y`.

**Screening, then checking.** An input where all 12 Gray-code equations are zero
is a *candidate*. A random input is a candidate with probability 2^-12. With 1024
inputs per clock, one candidate comes out every 4 cycles on average. Each candidate
goes down a chain of 42 fully evaluated equations. Inputs that pass all 54 are
reported. If a system has more equations than that, the host checks the rest on
the few reported inputs.

## Data path

```
enum_counter -> gray_tree -> addr_calc -> d2_table[0] -> d2_table[1] -> ... -> d2_table[MG-1]
   step t         k1,k2,e1,e2   addr           |               |                   |
                                               v               v                   v
                       pillar p:   column 0 --sol--> column 1 --sol--> ... column MG-1
                                   (GROUPS_PP instance groups per column, step passed row to row)
                                                                                   |
                                                   bus segment per row  <----------+
                                                            |
                                        cand_gray (counter2, Gray code) -> sync_fifo
                                                            |
                          rr_merge (round-robin over pillars) -> lane_split -> fe_equation x N_FE -> out
```

| module | role |
|---|---|
| `enum_counter` | step counter: counts 0 .. 2^NL-1, one step per clock |
| `gray_tree` | finds `k1` and `k2` with a divide-and-conquer tree; `e1`/`e2` say whether each is valid |
| `addr_calc` | computes the table address `k2(k2-1)/2 + k1` |
| `d2_table` | one equation's second-derivative table, stored as 64-bit words (one LUT-6 each); it also delays the step bundle by one cycle for the next equation |
| `gray_group` | four instances of one equation that share their inputs; holds `d'` and `y` for each instance and updates the running `sol` word |
| `gray_pillar` | a grid of `MG` × `GROUPS_PP` groups, plus one bus segment per row |
| `bus_segment` | four buffer slots with push-back counters; puts results on the bus |
| `cand_gray` | counter2: recovers each candidate's step from its exit cycle and its push-back count |
| `sync_fifo` | candidate FIFO at the end of each bus |
| `rr_merge` | joins the pillar FIFOs, one record per cycle |
| `lane_split` | splits a group word that holds several candidates into separate records |
| `fe_equation` | evaluates one whole equation in two pipeline stages; the stages are chained |
| `mq_solver` | top level |
| `mq_pkg` | default sizes, configuration targets and record kinds |

## Timing: why no input value travels with a candidate

This is the part that is easiest to get wrong.

**No `x` on the bus.** Nothing in the Gray-code grid carries an input value. The
step number is implied by the clock cycle.

**Alignment across equations.** Equation `j`'s table lookup happens `j` cycles
after equation 0's. Row `g` of a column receives the step bundle `g` cycles after
row 0. So group `(j, g)` works on step `t` in cycle `t + 3 + j + g`. Its `sol`
word, `sol_in | y` (bit = 1: some equation is nonzero), is registered and is read
one cycle later by group `(j+1, g)`. That is exactly when group `(j+1, g)` works on
the same step.

**Alignment along the bus.** The bus moves one segment per clock. Row `g` joins
the bus at segment `g`. So a candidate that is not delayed leaves the end of the
bus `DELAY = 3 + MG + GROUPS_PP` cycles after its step was counted, whatever its
row.

**counter2.** `cand_gray` holds a second counter that is loaded with `-DELAY` on
`start`, then counts every cycle. It therefore shows `t` when the words of step
`t` leave the bus.

**Push-back.** A bus segment can only put a result on the bus when the incoming
bus word is empty. The empty word is all ones, because a 0 bit marks a candidate.
While it waits, a result sits in one of four slots. Its 4-bit counter goes up once
per cycle of waiting. At the end of the bus the candidate's step is
`ctr2 - count`, and its enumerated variables are `gray(ctr2 - count)`. The group
id and the lane give the instance index, which is the value of the top variables.

**Warnings.** A result that waits 15 or more cycles shows count 15 (saturated).
It is reported as `REC_DELAYED`: its step is the one named in `x` or an earlier
one. A result that arrives when all four slots are full is dropped. The segment
then sets the bus warning bit, which is ORed along the bus. The warning becomes a
`REC_OVERFLOW` record for the step leaving the bus. At the nominal load (1/8
candidate per bus per cycle) neither is expected, but both are detected.

**Several candidates in one group.** One group word can hold up to four
candidates. `lane_split` emits them one per cycle after the merge.

## Using it

**Loading.** Load between runs through one port: `cfg_we`, `cfg_target`,
`cfg_eq`, `cfg_addr` and a 64-bit `cfg_data`. There are three targets:

- `CFG_D2`, equation `e < MG`, word `w`. Bit `b` of the word is table bit
  `64w + b`. Table bit `k2(k2-1)/2 + k1` (with `k1 < k2 < NL`) is `a[k2][k1]`.
- `CFG_INST`, equation `e < MG`, instance `k`. The data is `{y, d'[NL-1:0]}`:
  - `y = f_e(x)` with `x[N-1:NL] = k` and all other bits 0;
  - `d'[v]` is the derivative of `f_e` with respect to `x[v]` at the point where
    `x[v]` first flips. That point is `x[N-1:NL] = k`, `x[v-1] = 1` (if `v > 0`),
    and all other bits 0.
  - Equivalently: `d'[0] = a'[0]` and `d'[v] = a[v][v-1] ^ a'[v]`, where `a'` is
    the linear part after fixing the top variables.
- `CFG_FE`, equation `e < N_FE`, word `w` of the flat coefficient vector:
  - `a[k][j]` at bit `k(k-1)/2 + j`;
  - `a[k]` at bit `N(N-1)/2 + k`;
  - `c` at bit `N(N-1)/2 + N`.

  For a system with fewer equations, load all-zero coefficients into the unused
  equations.

**Running.** Pulse `start` for one cycle. `busy` stays high until the last step
has drained. `done` then stays high until the next `start`.

**Output records.** Each cycle with `out_valid` high delivers one record in
`out_kind` and `out_x`:

| `out_kind` | meaning | what the host does |
|---|---|---|
| `REC_SOLUTION` | `out_x` satisfies all `MG + N_FE` equations | checks any equations beyond these |
| `REC_OVERFLOW` | a candidate was lost | rechecks step `out_x[NL-1:0]` for all instances |
| `REC_DELAYED` | `out_x` names an instance and the latest step its candidate can belong to | rechecks that instance at that step and earlier ones |

If `fifo_lost` is high after a run, a FIFO refused a record and the run has to be
repeated.

**Status outputs.** `ev_pushback`, `ev_overflow`, `ev_merge_wait` and `ev_multi`
are one-cycle activity flags, meant for statistics counters.

**Larger systems.** For more than `N_VARS` variables, the host fixes the extra
variables and runs one job per fixed value. A 64-variable system is 2^16 runs of
2^38 cycles each.

## Parameters (`mq_solver`)

| parameter | default | meaning |
|---|---|---|
| `N_VARS` | 48 | variables per run, `n` |
| `LOG_INST` | 10 | `i`: there are 2^i instances, and `x[n-1:n-i]` is fixed per instance |
| `MG` | 12 | Gray-code equations |
| `N_FE` | 42 | full-evaluation equations |
| `N_PILLARS` | 2 | pillars, each with its own bus, counter2 and FIFO |
| `FIFO_DEPTH` | 16 | records per pillar FIFO (this design's choice) |

The following are fixed in `mq_pkg`:

- 4 instances per group;
- 4 slots per bus segment;
- 4-bit push-back counters;
- 64-bit table words.

The `cfg_data` word limits `NL = N_VARS - LOG_INST` to at most 63. `LOG_INST`
must be at least 3, and the number of groups must divide evenly among the pillars.

## Where this RTL departs from the original FPGA build

- **Tables and starting states are loaded through a port.** The original compiles
  them into the FPGA configuration and swaps LUT contents with its own tool. The
  load port makes one build usable for any system. The cost is that the first
  derivatives are written as whole words, so they do not map onto LUT RAM as
  directly.
- **Full evaluation is generic.** The original generates a LUT-6 netlist for each
  equation, covering only its nonzero terms, with greedy set cover. This RTL
  evaluates every possible term with loadable coefficients. The result is the
  same; the area is larger.
- **Choices where the original gives no detail:**
  - pipeline depths of the front end (one register each);
  - the queue discipline of a bus segment: a result goes straight out when
    nothing waits, and waiting results age every cycle they stay;
  - the warning bit rides on any bus word;
  - `counter2` subtracts the push-back count, and keeps counting after a run so
    that late candidates still get their step;
  - the collision split is placed after the merge;
  - FIFO depth, and dropping records with `fifo_lost` when a FIFO is full;
  - the record kinds, the valid/ready handshake between merge and split, and the
    synchronous active-low reset.
- **Not included:** the host software (precomputation and rechecking) and the
  platform's host-communication logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_enum_counter` | the step sequence, 2^NL live cycles, `done` |
| `tb_gray_tree` | every 10-bit value, and random and corner 38-bit values, against a bit scan |
| `tb_addr_calc` | every pair of 38 variables |
| `tb_d2_table` | a random full-size table, every address, latency 1 |
| `tb_gray_group` | all 64 steps of four random instances against direct evaluation |
| `tb_bus_segment` | random traffic against an independent queue model; bypass, pass-through, overflow and saturation all occur |
| `tb_gray_pillar` | a 2 × 3 grid over 256 steps: each bus word decodes to the right step and lanes, and the latency is `MG + GROUPS` |
| `tb_cand_gray` | the step and Gray code recovered from exit cycle and push-back count |
| `tb_sync_fifo`, `tb_rr_merge`, `tb_lane_split`, `tb_fe_equation` | each against a model |
| `tb_mq_solver` | whole runs on random systems, brute-force reference (below) |

`tb_mq_solver` runs two reduced configurations through complete runs on random
systems and compares against brute force:

- A *sparse* configuration loads each bus at the nominal rate. Every common zero
  must be found, and nothing false may be reported.
- A *flood* configuration puts a candidate on a quarter of all inputs. Push-back,
  overflow warnings, saturated counters, merge competition, multi-candidate groups
  and FIFO loss all occur. Every missed zero must be covered by a warning.

Each run's cycle count is checked against 2^NL plus a bounded drain.

`tb_mq_solver_prefix` runs the design at its default size: 48 variables, 1024
instances and 54 equations. It loads a random system with three planted common
zeros and runs the first 256 steps, which is 2^18 inputs. Every common zero in
that window must be reported, and every report must be a true zero. It takes a few
minutes to build and about half a minute to run.

No run at the default size covers a complete operation, which would be 2^38
cycles. `tb_mq_solver` at 12 and 14 variables is the largest complete run
simulated.

To simulate with Verilator (as an example):

```
verilator --binary --timing --assert rtl/mq_pkg.sv rtl/*.sv tb/tb_mq_harness.sv \
          tb/tb_mq_solver.sv --top-module tb_mq_solver -Mdir obj && obj/Vtb_mq_solver
```

A block testbench needs only the package, the block and the modules it
instantiates. For example, `tb_gray_pillar` needs `gray_group.sv` and
`bus_segment.sv`.
