# Hyperplane point generator and load-balancing platform for nested loops

A perfectly nested loop with unit dependencies, such as

```
for I1 = 0..4
  for I2 = 0..3
    a(I1,I2) = a(I1-1,I2) + a(I1,I2-1) + a(I1-1,I2-1)
```

can run many iterations at once. Give every iteration (loop instance) the
"time" `t = I1 + I2 + ... + ID`. All instances with the same `t` lie on one
hyperplane. They do not depend on one another, and they depend only on
instances with a smaller `t`. So the loop can be run as a sequence of parallel
steps `t = 0, 1, ..., L1+...+LD`. Step `t` runs every integer solution of

    i_1 + i_2 + ... + i_D = t,    0 <= i_k <= L_k

This is a first-order Diophantine equation with unit coefficients.

The RTL here does two things:

* **`point_generator`** lists every solution of that equation for a given `t`,
  in lexicographic order, at close to one point every two clock cycles. It does
  this without testing points that cannot be solutions.
* **`load_balancer`** is a complete platform built around the generator. A
  controller steps through `t`. The generator's points go into FIFOs. A
  distributor hands them to a pool of processing elements (PEs). The PEs read
  and write a shared main memory. The controller does not start step `t+1`
  until every PE has finished step `t`.

All code is synthesizable SystemVerilog (IEEE 1800-2017). Main memory and the
host processor are outside the design and connect through top-level ports. A
behavioural memory model for simulation is in `tb/main_memory_model.sv`.

## How the solutions are counted

Without bounds (every `L_k >= t`), let `f_t(D)` be the number of solutions. It
obeys `f_0(D) = 1`, `f_1(D) = D` and

    f_t(D) = f_{t-1}(D) + f_{t-1}(D-1) + ... + f_{t-1}(1)

So `f_t(1) = 1`, `f_t(2) = t + 1` and `f_t(3) = 3 + (4+t)(t-1)/2 = (t+1)(t+2)/2`.
In general `f_t(D) = C(t+D-1, D-1)`. The testbenches use these counts as
reference values: a hyperplane at `t = 1250` with three indices holds 783,126
points.

## Enumerating one hyperplane: the I-module chain

This is the core of the design and the least obvious part.

### The algorithm

Start from the brute-force search: nest `D` loops over the box and keep the
points whose sum is `t`. Then prune it. Write it as a recursion in which level
`k` owns index `i_k` and receives the remainder `r = t - i_1 - ... - i_{k-1}`
that the remaining indices must add up to. Let `RemSumL(k+1) = L_{k+1} + ... + L_D`.
Three rules follow:

1. The indices to the right can absorb at most `RemSumL(k+1)`. So
   `i_k >= r - RemSumL(k+1)`.
2. No index can exceed its bound or the remainder. So `i_k <= min(L_k, r)`.
3. The last index has no choice. It must equal `r`, and rule 1 at the level
   above already guarantees `r <= L_D`.

With these rules each level loops over
`[max(0, r - RemSumL(k+1)), min(L_k, r)]`, and every leaf it reaches is a
solution. No candidate is ever rejected.

### The hardware

`point_generator` turns the recursion into a line of `DMAX` identical stages
(`imodule`), one per index. Each stage is a two-state FSM (`IDLE`, `WAIT`):

```
        EnRight, r            EnRight, r            EnRight, r
 start ───────────▶ [stage 0] ───────────▶ [stage 1] ───────────▶ [stage 2]
 eoh   ◀─────────── [   i1  ] ◀─────────── [   i2  ] ◀─────────── [   i3  ]
          EnLeft                 EnLeft                 EnLeft
                         │ i1                  │ i2                  │ i3, sol
                         └─────────────┬───────┴─────────────────────┘
                                 [check_solution] ──▶ output register ──▶ FIFOs
```

* A **call** is a one-cycle `EnRight` pulse carrying `r`. When a stage in
  `IDLE` is called, it computes its range, loads `i = lo` and calls its right
  neighbour with `r - lo`. It then waits.
* A **return** is a one-cycle `EnLeft` pulse. When a stage in `WAIT` gets a
  return and `i < hi`, it increments `i`, decrements `r_o` and calls right
  again. Otherwise it returns left and goes back to `IDLE`.
* The **last active stage** (position `d-1`) sets `i = r` when it is called,
  raises `sol_o` and returns, all on the next clock edge. At that moment every stage
  holds its index value, and `check_solution` captures the whole vector.
* Stage 0 is called by the generator itself with `r = t`. When stage 0
  returns, the hyperplane is complete. The generator pulses `eoh` once the
  last point has left its output register.

The generator supplies each stage with `RemSumL(k+1)`. This is a suffix sum of
the bounds of the active stages, saturated at all-ones. Saturation keeps the
comparison with an `IW`-bit remainder exact. If `t` exceeds the sum of all
bounds, the hyperplane is empty and the generator reports `eoh` without
starting the chain.

**Run-time depth.** The input `d` picks how many stages take part
(`1 <= d <= DMAX`). Stage `d-1` acts as the last one and stages beyond it are
never called. The same hardware therefore serves loops of any depth up to
`DMAX`. Making the chain longer only means raising `DMAX`.

**Example.** With `L = (4, 3)`, `d = 2` and `t = 5`, stage 0 gets `r = 5` and
`RemSumL(1) = 3`. Its range is `[2, 4]`, so it calls stage 1 with `r = 3`, `2`
and `1`. The points are `(2,3)`, `(3,2)` and `(4,1)`. Indices 0 and 1 are never
tried.

**Timing.** Every call and return is registered, so control moves one stage per
clock.

* The first point appears about `d + 2` cycles after `start`.
* In the innermost loop, a new point comes every 2 cycles.
* Each time an outer index advances, the walk up and down the chain adds about
  `2(d-1)` cycles.
* Measured: `d = 3`, `t = 1250` (783,126 points) takes 1,568,758 cycles from
  start to `eoh`.

The original description promises a new solution "in at most D stages". Here
that holds in the innermost loop. When an outer index advances, up to
`2(d-1)+2` cycles separate two solutions.

**Back-pressure.** `check_solution` holds one vector in its output register.
If the register is full and the FIFOs cannot take it, `stall` freezes every
register of every stage. A pulse in flight simply waits, so no point is lost
or duplicated.

`check_solution` still adds up the active indices and compares the sum with
`t`. With the pruned chain every vector passes. The comparison is kept as a
run-time self-check: refusals are counted in `stats.rejects`, which must stay
at 0.

## The load-balancing platform

```
 host: start, t_last ──▶ controller ───── t ─────▶ point_generator ◀── host: d, L
                          ▲      ▲                    │        │
                          │      └─────── eoh ────────┘        ▼ points
                          │                            index_fifo × DMAX
                          │                                    │
                          └────────── dist_idle ──────  point_distributor
                                                               │ req/gnt, point
                                                           pe × NPE
                                                               │
                                                            mem_bus ──▶ main memory (outside)
```

* **`controller`** is started by the host with `t_last` (normally
  `L_1+...+L_d`). For each `t` it pulses `t_valid`, waits for `eoh`, and then
  waits for `dist_idle`. This last wait is what keeps the loop's dependencies
  intact: points of step `t+1` are only generated once every instance of step
  `t` has written its result.
* **`index_fifo`** is instantiated once per index. All FIFOs are pushed and
  popped together, so entry `n` of each FIFO belongs to the same point.
* **`point_distributor`** pops a point whenever a PE is requesting and grants
  it with a one-cycle `gnt`, choosing PEs round-robin. A PE's `req` means "I am
  idle". So `dist_idle` (FIFOs empty, no grant in flight, every PE requesting)
  means all work handed out so far is finished.
* **`pe`** is built from three units:
  * `point_reception_unit` requests and captures a point;
  * `memory_access_unit` computes addresses, reads the operands and writes the
    result;
  * `calculations` evaluates the loop body.
* **`mem_bus`** grants one PE request per cycle, round-robin. It returns read
  data in the next cycle to the PE that issued the read.

### Data layout and the loop body

The Memory Access Unit finds the element of point `I` at

    addr(I) = base + Σ_k (i_k + 1) · stride_k

The `+1` reserves one halo element in front of every dimension. Reads such as
`a(-1, I2)` then hit ordinary memory words, and the host fills those with the
initial values. Unused dimensions get stride 0. For the example loop the
layout is `stride = (L2+2, 1)`. For a three-deep loop it is
`stride = ((L2+2)(L3+2), L3+2, 1)`.

`calculations` implements the statement of the example loop:

    a(I) = a(I - e1) + a(I - e2) + a(I - e1 - e2)

Here `e1` and `e2` are unit steps in the first two indices. The Memory Access
Unit reads these three operands at `addr - stride_1`, `addr - stride_2` and
`addr - stride_1 - stride_2`. A different loop body means replacing
`calculations`, and the operand addresses in `memory_access_unit` if the
dependences differ.

With an uncontended bus, one instance takes 10 cycles from the moment the
point is offered to the Memory Access Unit until the unit is idle again:

* 1 cycle to take the point;
* 3 reads of 2 cycles each (request, then data);
* 2 cycles for `calculations` (start, then done);
* 1 cycle for the write.

From a grant to the PE's next request is 11 cycles.

### Host interface of `load_balancer`

| port | meaning |
|---|---|
| `start`, `t_last` | start a loop; the last time step (use `L_1+..+L_d`; larger values add empty steps) |
| `d`, `l[k]` | loop depth and bounds; `l` is sampled at every time step and must stay constant during a run |
| `base`, `stride[k]` | array layout, as above |
| `busy`, `done` | running; one-cycle pulse at the end |
| `mem_req/we/addr/wdata`, `mem_rdata` | main-memory port: one request per cycle, read data in the next cycle |
| `stats`, `pe_done` | event counters (`dioph_pkg::lb_stats_t`): points, steps, generator stall cycles, controller wait cycles, empty hyperplanes, rejects, bus conflicts; instances per PE |

## Parameters

Defaults are in `rtl/dioph_pkg.sv`.

| parameter | default | meaning |
|---|---|---|
| `DMAX` | 3 | number of I-module stages (deepest loop supported) |
| `IW` | 16 | width of indices, bounds, `t` and `r` |
| `FDEPTH` | 16 | depth of each index FIFO |
| `NPE` | 4 | number of processing elements |
| `AW`, `DW` | 16, 32 | main-memory address and data width |

`DMAX = 3` matches the three-stage chain this design is modelled on. All other
values are this implementation's choices. The `t` values up to about 1250 used
in the performance sweeps fit easily in 16 bits.

## What follows the original design and what is added here

Taken from the original design:

* the hyperplane formulation and the counting recursion;
* the pruned recursive enumeration;
* the I-module chain, including the signal names `EnRight`, `EnLeft`, `r` and
  CheckSolution, and the summing check against `c`;
* the platform's blocks and their roles (controller, point generator, FIFOs,
  distributor, PEs with reception, memory access and calculation units);
* the controller's wait for idle PEs;
* the example loop body.

Choices made here, where the original says nothing:

* All widths, depths and the PE count.
* Synchronous active-low reset everywhere.
* Every handshake: one-cycle call/return pulses, valid/ready out of the
  generator, req/gnt to the PEs, and the memory bus protocol.
* Stalling the whole chain when the FIFOs are full.
* Starting each stage's loop directly at its lowest useful value. The original
  loops from 0 and skips values that fail rule 1; the points produced are the
  same.
* The empty-hyperplane shortcut.
* The run-time depth input `d`. Stages are added or removed at run time by
  activating them, not by reconfiguring the device.
* The meaning of the distributor-to-controller status (`dist_idle`).
* The address formula with halo elements.
* Round-robin arbitration.
* The event counters.

Not included:

* the software generator that emits a chain for a given `D`; the `DMAX`
  parameter and the `d` input do its job;
* main memory and the host processor;
* loop bodies or dependence sets other than the example statement.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `imodule_tb` | one stage against the range rules: every call, `r_o`, the single return, last-stage behaviour, stall |
| `check_solution_tb` | sum test, masking of inactive indices, counters, output stall |
| `point_generator_tb` | point sequences for d = 1..3 against brute-force enumeration, counts against the recursion, first-point latency ≤ d+3, gap ≤ 2d cycles, random back-pressure, empty hyperplanes |
| `pg_workload_tb` | performance sweeps: d = 2 with t = 0..1100 and d = 3 with t = 0..1250; checks counts (up to 783,126 points), sums, strict lexicographic order and cycle budget |
| `index_fifo_tb`, `mem_bus_tb`, `point_distributor_tb`, `controller_tb`, `point_reception_unit_tb`, `memory_access_unit_tb`, `calculations_tb`, `pe_tb` | each unit against a reference model, including ordering, round-robin fairness, idle reporting, instance timing and the example loop's results |
| `load_balancer_tb` | whole platform at default parameters, covering every mechanism (see below) |

`load_balancer_tb` runs three loops on the platform:

* the example loop;
* a 3-deep 8×8×8 loop, whose large hyperplanes fill the FIFOs;
* the example loop with two surplus time steps.

It compares every array element with a sequential reference. It also requires
each mechanism to occur at least once: generator stall, controller wait for
PEs, empty hyperplane, bus contention, work on every PE, and a depth change.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module load_balancer_tb \
  -y rtl -y tb +libext+.sv rtl/dioph_pkg.sv tb/load_balancer_tb.sv
./obj_dir/Vload_balancer_tb
```

To run another testbench, replace the name in both places. The package file
must come first on the command line. `load_balancer_tb` finishes in about 2,800
cycles. `pg_workload_tb` simulates about 4 million cycles, which takes a few
seconds.

## Limits worth knowing

* Only the example loop body is built in, with its dependences on the first two
  indices. The generator itself is general for any `d <= DMAX`.
* Indices, bounds and `t` are `IW` bits wide. Sums of bounds saturate, so large
  bounds are safe. But `t_last` and `t` must fit in `IW` bits.
* Address arithmetic wraps at `2^AW`. The host must place the array, halo
  included, inside memory.
* There is no deadlock detection. A `d` larger than `DMAX`, or `d = 0`, is
  treated as an empty hyperplane.
