# Per-task energy metering for clustered SMT multicores

When several tasks share a multicore chip, the usual way to charge them for energy
is to divide the chip's energy evenly among them. That is unfair: a memory-bound
task holds more of the shared cache for longer and burns more static and leakage
energy. An ILP-heavy task burns more dynamic energy in its core. This RTL meters
energy **per hardware context**, and therefore per task, by tracking two things for
every context:

* **activity**: counts of LLC accesses by kind, bus transactions, and fetched
  instructions. Dynamic energy follows activity.
* **occupancy**: how many cache lines each context owns in the shared LLC and in
  its core's L1 caches. Static and leakage energy follow occupancy.

Once per metering interval (10,000 cycles), a small sequential engine in every
cluster turns those figures into energy, using per-event and per-cycle energies
from the chip vendor. It adds each running task's share to that context's
**Energy Metering Register (EMR)**. The operating system reads a context's EMR
when it schedules a task out, and clears it when it schedules the next one in.

The scheme follows the PTEM (Per-Task Energy Metering) proposal for
clustered multicores. The processor itself is not part of this RTL: cores,
caches, buses, the per-core power proxy and the OS are outside it. Their
events enter through ports, and the metering logic never stalls them.

## The machine being metered

The default configuration is a chip of 8 clusters. Each cluster has 4
out-of-order, two-way SMT cores, for 64 hardware contexts in all. Each cluster
has:

* per core: private 32 KB 4-way L1 instruction and data caches with 32 B lines
  (256 sets);
* a shared 2 MB 16-way LLC with 64 B lines (2048 sets), reached over an
  intracluster bus;
* an intercluster bus, shared by all clusters, that leads to memory.

In a cluster, hardware context `t` is core `t / 2`, thread `t % 2`.

## How a task's energy is assembled

Each interval has length T. For a cluster with its active contexts, the engine
computes the following.

**Core: split top-down.** Each core's power proxy reports the core energy of
the interval, `Ej`. Three vendor calibration figures are given per interval:

* `Emax`: the energy running a power virus, all dynamic plus leakage;
* `Emin`: the energy running a no-op loop, all static plus leakage;
* `Lea`: the energy in halt mode, leakage only.

The model assumes that every idle resource burns static energy in a fixed
ratio to the dynamic energy it would burn when busy. Then

    Ej = Lea + Dyn + (MaxDyn - Dyn) * MaxSta / MaxDyn,   MaxDyn = Emax - Lea, MaxSta = Emin - Lea

Solving this for the dynamic part gives the form the hardware uses: one multiply
and one divide.

    Dyn = (Ej - Emin) * (Emax - Lea) / (Emax - Emin)
    Sta = Ej - Lea - Dyn

`Ej` is first clamped into `[Emin, Emax]`. The core's three parts are then
shared among its active threads:

* dynamic, in proportion to instructions fetched: `Dyn * fetch_t / fetch_core`.
  If the core fetched nothing, it is split evenly.
* static, split evenly: `Sta / tasks_on_core`. Register-file and issue-queue
  static energy cannot be pinned on a thread.
* leakage, in proportion to L1 occupancy. The instruction and data caches have
  equal weight: `Lea * (occIL1_t + occDL1_t) / (2 * L1_sampled_lines)`.

**LLC.**

* Dynamic: the sum over the six access kinds of `count * E_action`. The kinds
  are read or write hit; read or write miss evicting a clean line; read or write
  miss evicting a dirty line.
* Static and leakage: by occupancy, `occLLC_t / LLC_sampled_lines * (E_st *
  idle_cycles + E_leak * T)`. Static energy is only burned in cycles with no LLC
  access, so the cluster counts those idle cycles.

**Buses.**

* Dynamic: the sum of `count * E_action` for address-only and cache-line
  transfers, for both buses.
* Leakage: split evenly among the tasks that can use the bus. For the
  intracluster bus these are the tasks in the cluster. For the intercluster bus
  they are the tasks in the whole chip. Bus static energy is negligible and is
  not metered.

Each task's interval total is the sum of these terms. It is added to its EMR.
The core part alone (dynamic, static and leakage shares) is also added to a
second register per context, `core_emr`, which keeps the task's core energy.

## Occupancy tracking with sampled owner tables (`ptem_occ_tracker`)

Knowing which context owns each cache line every cycle would be expensive.
This design samples in two ways.

* **In space**: only sets whose `SMP_SHIFT` low index bits are zero are
  tracked. The default, `SMP_SHIFT = 1`, tracks one set in two. Every line of a
  tracked set has an owner id, which is the hardware-context index of the
  context that filled it.
* **In time**: per-context *instant* counters hold the number of tracked lines
  each context owns. They change only on fills: the new owner gains a line, and
  the evicted line's owner loses one. Once per interval the instant counts are
  added to 48-bit *cumulated* counters, which the OS can use for average
  occupancy. They are also latched as the occupancy sample that the energy
  engine uses.

A line always has an owner. Nothing is retagged on a context switch, so an
incoming task inherits the lines of the task it replaces on that context. Those
lines age out of the cache quickly.

Sizes at the defaults:

| cache | tracked lines | owner id | instant counters |
|---|---|---|---|
| LLC (per cluster) | 1024 sets x 16 ways = 16,384 | 3 bits | 8 x 15 bits |
| L1-I and L1-D (per core) | 128 sets x 4 ways = 512 | 1 bit | 2 x 10 bits |

The owner table is a memory with one row per tracked set, holding the owner ids
of all the set's ways. A fill reads the row, replaces one way's id and writes
the row back in the same cycle. The table has no reset. After reset, a sweep
writes context 0 into one row per cycle. This takes 1,024 cycles for an LLC and
128 for an L1, and `init_done` rises when it ends. Fills during the sweep are
still counted as accesses, but they do not change ownership. After reset,
context 0 owns every tracked line.

## Activity counters (`ptem_event_counters`)

A generic bank of saturating counters, one per task and per action. It is used
for:

* the six LLC actions;
* the two actions of each bus;
* fetched instructions per thread (up to 2 per cycle per core);
* LLC idle cycles.

At the tick, each bank copies its counts into a snapshot and restarts. An event
in the tick cycle belongs to the new interval. The energy engine reads the
snapshots during the following interval, while counting goes on.

## The energy engine (`ptem_energy_engine`, `ptem_iter_muldiv`)

The computation is rare and off every critical path, so it runs on one
**iterative** unit. The unit is a radix-2 shift-and-add multiplier (32 cycles)
followed, when needed, by a restoring divider (80 cycles) that computes
`a * b / d`. A microsequencer steps through the following, in this order:

* 4 global steps: LLC occupancy energy, and the two bus leakage shares;
* 2 steps per core that has a running task: `Dyn`, then the static share;
* 13 steps per active context: the fetch share, the L1 leakage share, the LLC
  occupancy share, 6 LLC action products and 4 bus action products.

The engine then emits one EMR increment per active context, together with
its core part for the core energy register.

A full cluster takes about 6,700 cycles, inside the 10,000-cycle interval. A new
interval start while the engine is still busy is dropped and sets the sticky
`engine_overrun` flag. That cannot happen at the default sizes.

Arithmetic is in unsigned integers in an energy unit the integrator chooses.
Energy figures are 32 bits. Each product or quotient term is truncated to an
integer, and results saturate at 64 bits. The LLC occupancy energy of an
interval is saturated to 48 bits before it is used as an operand.

## Timeline of one interval

1. `tick` (from `ptem_sample_timer`, shared by all clusters) pulses for one
   cycle every `PERIOD` cycles. At that edge:
   * all counter snapshots, occupancy samples and each core's energy `Ej` are
     captured;
   * cumulated occupancies are updated.
2. One cycle later, every cluster's engine starts.
3. Roughly 6,700 cycles later, each active context's EMR has been increased
   once. `engine_busy` falls.
4. The OS may read any EMR at any time through `emr_rd_task` / `emr_rd_data`
   (combinational). It may clear one with `emr_clr_valid` / `emr_clr_task`.
   A clear also clears that context's `core_emr` and restarts its cumulated
   occupancy counters.
   If a clear and an engine add hit the same register in one cycle, the
   register ends up holding the added value.

`active` says which contexts run a task. It is read during the computation.
Inactive contexts are charged nothing, and cores with no active context are
skipped. Change `active` between the end of one computation and the next tick.

## Configuration: `ptem_cfg_t`

The vendor energy figures, shared by all clusters (see `rtl/ptem_pkg.sv`):

* `e_llc_action[6]`: energy per LLC access of each kind
  (`llc_action_e` gives the order);
* `e_llc_st`, `e_llc_leak`: LLC static energy per idle cycle and leakage per
  cycle;
* `e_inbus_action[2]`, `e_inbus_leak`, `e_outbus_action[2]`, `e_outbus_leak`:
  bus energy per address or line transfer, and bus leakage per cycle;
* `e_core_max`, `e_core_min`, `e_core_leak`: core energy per interval for the
  power virus, the no-op loop and halt mode.

The figures need `Lea < Emin < Emax`.

## Hierarchy and interfaces

```
ptem_top                     NCLUSTERS clusters, shared tick, chip-wide task count
├─ ptem_sample_timer
└─ ptem_cluster  (x NCLUSTERS)
   ├─ ptem_event_counters    LLC actions, LLC idle cycles, intra- and intercluster bus
   ├─ ptem_occ_tracker       LLC owner table and occupancy
   ├─ ptem_core_slice (x NCORES)
   │  ├─ ptem_occ_tracker    L1-I, L1-D
   │  └─ ptem_event_counters fetched instructions
   ├─ ptem_energy_engine
   │  └─ ptem_iter_muldiv
   └─ ptem_emr
```

Every `ptem_top` port is an array indexed by cluster. Per cycle and per cluster
the inputs are:

* at most one LLC access: task, read/write, hit, dirty victim, set, way. A miss
  is the fill of `set`/`way` by that task.
* at most one transaction on each bus: task, and whether it moves a line or only
  an address.
* per core, at most one L1-I fill, one L1-D fill and one fetch group (thread and
  count).
* per core, the power proxy's energy for the current interval. It is sampled
  at `tick`.

The outputs are:

* all EMRs, plus the EMR read port, and all core energy registers;
* the cumulated occupancies for the LLC, L1-I and L1-D;
* `tick`, `engine_busy`, `engine_overrun` and `init_done`.

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `NCLUSTERS` | 8 | clusters (the evaluated chips had 1, 2, 4 or 8) |
| `NCORES`, `NTHREADS` | 4, 2 | cores per cluster, SMT threads per core (1 for single-threaded cores) |
| `LLC_SETS`, `LLC_WAYS`, `LLC_SMP_SHIFT` | 2048, 16, 1 | LLC geometry; one set in 2 tracked |
| `L1_SETS`, `L1_WAYS`, `L1_SMP_SHIFT` | 256, 4, 1 | L1 geometry; one set in 2 tracked |
| `FETCH_WIDTH` | 2 | instructions fetched per cycle per core |
| `PERIOD` | 10000 | sampling and metering interval in cycles |

After synthesis, the default chip comes to about 15,500 word-level cells,
77,000 flip-flop bits and 426,000 memory bits. Almost all of the memory is the
LLC and L1 owner tables.

## Choices made here that the scheme leaves open

* One metering interval equals one occupancy sampling period. The occupancy used
  for an interval is the instant count at its end, not an average across it.
* The L1 caches use the same set sampling (one in two) and the same period as
  the LLC.
* Occupancy fractions divide by *tracked lines* (sets x ways). The published
  formula for average occupancy is written with the number of sets.
* `Ej` is clamped to the calibration range. A core that fetched nothing in an
  interval has its dynamic energy split evenly.
* The owner tables are cleared by a sweep after reset, and fills during the
  sweep are not tracked. After reset, context 0 owns every tracked line.
* An OS clear of an EMR also clears that context's core energy register and
  restarts its cumulated occupancy counters. The core energy registers have no
  read port of their own; they are brought out as an array.
* Widths: energy figures 32 bits, interval counts 32 bits, EMRs 64 bits.
  Counters and EMRs saturate.
* All clusters share one tick, so their intervals line up.

Not included:

* the per-core power proxy. Its interval energy is an input.
* the suggested extension for several supply voltages and temperature ranges,
  which replicates every event counter per voltage/temperature combination.
  The default configuration assumes a single voltage and no temperature
  dependence.
* the software side: adding EMRs up per application, and charging OS
  housekeeping energy.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/ptem_ref_pkg.sv` holds a transaction-level model of a cluster. It has its
own owner tables and counters, and it computes every task's expected energy
per interval with 128-bit arithmetic. The testbenches check the following:

* `tb_ptem_top`: the whole chip **at its default parameters** over 4 intervals.
  Traffic is random: every LLC access kind, both buses, L1 fills, fetch groups,
  and core energies outside the calibration range. Between intervals the test
  makes OS clears, varies the set of active contexts (idle contexts and whole
  idle cores) and silences some cores' fetch. Every EMR, core energy
  register and cumulated occupancy counter is compared after each interval,
  and each mechanism is counted. It runs in about a second of simulation
  after a half-minute build.
* `tb_ptem_cluster`: the same at reduced size, with the tick and the chip-wide
  task count driven by the testbench.
* `tb_ptem_cluster_st`: the same with single-threaded cores
  (`NTHREADS = 1`), where each core's whole energy goes to its one task.
* `tb_ptem_workloads`: the whole chip at its default size with every context
  busy, under three kinds of cluster. In compute-bound clusters, tasks fetch
  nearly two instructions per cycle and seldom miss. In memory-bound clusters,
  tasks fetch little and miss often. Mixed clusters run one of each kind per
  core. Besides the model comparison, it checks **conservation**, using only
  the traffic: the energy charged to a cluster's tasks must equal the
  cluster's whole energy, less at most a few units of rounding per task. In
  the same way, the core energy registers must add up to the cores' own
  energies. It also checks that memory-bound tasks end up owning more of the
  LLC.
* `tb_ptem_energy_engine`: random snapshots against the model. It also checks
  that each active context is charged exactly once, the cycle budget and the
  overrun flag.
* Unit tests for the occupancy tracker, including the reset sweep, the core
  slice, the counters, the EMR file, the iterative multiply/divide unit
  (including latency) and the timer.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl -Itb rtl/ptem_pkg.sv tb/ptem_ref_pkg.sv \
    tb/tb_ptem_top.sv --top-module tb_ptem_top -o sim && ./obj_dir/sim
```

Testbenches that do not use the reference model need only `rtl/ptem_pkg.sv`
and their own file.

How far to trust it: the energy arithmetic is checked bit-exactly against an
independent model of the formulas above. The integer truncation and the choices
listed in the previous section are this design's own. Nothing here has been
checked against silicon or against an architectural simulator's energy
numbers.
