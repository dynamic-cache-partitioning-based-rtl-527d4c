# MLP-aware dynamic partitioning of a shared L2 cache

In a chip multiprocessor the cores share the last-level cache. Way-partitioning
gives each core a fixed number of the ways of every set, and changes the split
at run time. The usual way to choose the split is to minimise the total number
of misses. That treats every miss as costing the same, and it does not:

- An out-of-order core keeps working while a miss is outstanding. Several
  misses whose instructions sit in the reorder buffer (ROB) together are
  served in parallel and share one memory latency. This is memory-level
  parallelism (MLP).
- A miss with nothing else in flight stalls the core for the whole latency.

This unit therefore gives every L2 access a weight: an estimate of how many
stall cycles it costs, or would cost, as a miss. It then chooses the partition
that minimises the total weight instead of the miss count. Isolated misses
weigh up to 7 and misses inside a cluster of eight weigh about 0. A core whose
misses come in bursts thus gives way to a core whose misses are isolated, even
when both miss equally often.

An optional mode, MLP-IPC-DCP, also scales each core's cost by its measured
IPC. This favours the cores that turn saved stall cycles into the most
instructions.

## The measurement loop

Each L2 access goes through these steps:

```
 L2 access (core, line, hit?)                    memory fill
     |                                                 |
     v                                                 v
 ATD of the core --> stack distance d (1..K, or K+1 = miss at every size)
     |
     +-- L2 miss --> L2 MSHR entry  --+  charged 1/N per cycle
     |                                |  N = in-flight accesses of the same
     +-- L2 hit  --> core's HSHR entry+  core with distance >= d
                                      |
                             quantiser (0..7)
                                      |
                          core's MLP-aware histogram, bin d
```

### Stack distance: the ATD

- Each core has an auxiliary tag directory (ATD): tags and true-LRU positions
  of the last K distinct lines the core touched in each set. It is kept as if
  the core owned the whole cache.
- An access at LRU position d would hit with d or more ways, and miss with
  fewer. A line not in the ATD gets distance K+1.
- Only one set in `SDIST` (16) is tracked. Accesses to the other sets are
  ignored by the whole estimate.
- At the default size the ATD is one memory row per tracked set: 64 rows of
  16 × (valid + 24-bit tag + 4-bit LRU).
- After reset the rows are cleared in one pass of 64 cycles. Accesses in that
  time are reported as untracked.

### Cost of a miss: the L2 MSHR

The shared L2 miss-status registers gain four fields:

- owner core;
- access type;
- stack distance;
- `MLP_cost`, a 16-bit fixed-point cycle count with 7 fraction bits.

While a miss waits for memory it is charged 1/N of each cycle. N comes from
the cluster counters: the number of the same core's accesses now in flight
(misses in the MSHR and hits in the HSHR) whose stack distance is at least
this entry's. This is the cluster of accesses that would be misses together
at the partition where this one turns from hit to miss.

Updating every entry every cycle would need one adder per entry. Instead:

- Four adders serve the entries in fixed groups of four, round robin.
- With 32 entries each entry is visited every P = 8 cycles and adds 8/N,
  read from a constant table.
- The charge is exact to within one visit.

Instruction misses stop fetch and never overlap. They are charged with N = 1
and are left out of other accesses' clusters. The entry leaves on the fill;
its cost goes to the quantiser and then to the owner's histogram.

### Cost of a hit: the HSHR (the subtle part)

A hit at distance d would become a miss if the core had fewer than d ways.
To know what that miss would cost, each core has 24 hit-status registers
(HSHRs). An HSHR entry pretends the hit is a miss in flight and charges it
1/N per cycle, like an MSHR entry. No fill will ever arrive for it, so the
entry ends on the first of two conditions:

1. **ROB condition.** The core has committed a full ROB's worth of
   instructions (256) since the access. No later miss can overlap with it
   any more. The cycles still pending, out of one average memory latency, are
   charged at once, divided by the current N.
2. **Latency condition.** One average memory latency has passed. This
   matters when the core makes no further accesses.

How the entry is kept:

- It holds a *pending* cycle count, loaded with the average latency. The
  adder visits take P from it each time.
- The entry is released once pending ≤ P, or when the ROB condition holds.
  The release adds pending × 1/N, using a reciprocal table and one
  multiplier shared by the HSHR, and frees the lowest done entry each cycle.
- The ROB condition needs the number of instructions committed since the
  access. Each access carries its ROB index extended by two age bits (a
  10-bit sequence number), and each core reports the sequence number of its
  next instruction to commit. The difference, read as a signed number, is
  the count; a negative value means the access has not committed yet.
- Instruction-fetch hits have no ROB entry. They use only the latency
  condition, with N = 1.
- When all 24 entries are busy, the hit is not tracked. This is equivalent to
  the lowest weight; the count of such hits is on `hshr_drops`.

The average memory latency comes from a small monitor. It follows one MSHR
entry at a time from allocation to fill and averages blocks of 16 samples.
Until the first block completes it reports 300 cycles.

### Quantisation and histograms

The final cost of an access, in cycles, maps to a 3-bit weight:

| cycles | < 43 | 43–85 | 86–128 | 129–170 | 171–213 | 214–256 | 257–299 | ≥ 300 |
|--------|------|-------|--------|---------|---------|---------|---------|-------|
| weight | 0    | 1     | 2      | 3       | 4       | 5       | 6       | 7     |

The weight is added to bin d of the core's MLP-aware stack-distance
histogram:

- K+1 saturating counters of 32 bits.
- The MSHR and the HSHR each have an update port, so both can add in the
  same cycle.
- When a decision starts, every bin is halved. Past behaviour thus decays
  with factor 0.5 per interval.

## Choosing the partition

If core i gets w ways, its accesses of distance > w miss. The cost of that
choice is TMLP(i, w) = bins w+1 … K+1 of its histogram. Every 5 million
cycles the decision unit:

1. Snapshots the histograms and forms all suffix sums TMLP(i, w) (1 cycle).
2. Fills a table of c_i × TMLP(i, w), one entry per cycle through one
   multiplier. c_i = 1 for MLP-DCP. c_i = the core's committed-instruction
   count shifted right by `IPC_SHIFT` for MLP-IPC-DCP. That count is
   proportional to IPC, because every core is measured over the same interval.
3. Walks every split with all w_i ≥ 1 and Σ w_i = K, one candidate per cycle,
   and keeps the cheapest. The odometer moves w_0 fastest; the first of equal
   costs wins.
4. Loads the result into the partition register.

Decision time is 2 + N·K + (K−1)^(N−1) cycles:

| Cores and ways | Cycles | Share of the interval |
|----------------|--------|-----------------------|
| 2 cores, 16 ways | 49 | — |
| 4 cores, 16 ways | 3,441 | — |
| 4 cores, 32 ways | 29,921 | 0.6 % |

The old partition stays in force during the decision. The first interval uses
an even split. With more cores and ways, exhaustive search grows quickly; the
greedy searches used in other partitioning work could replace step 3, but
they are not included.

## Enforcing the partition

`partition_victim_select` is the replacement rule for the L2 controller, an
augmented LRU. Given the requesting core and a set's valid bits, owners and
LRU positions, it picks the way to replace:

1. Any invalid way first.
2. Otherwise, if the core already holds its quota of ways in the set, the
   LRU line among its own lines.
3. Otherwise, the LRU line among the other cores' lines.

If the chosen group is empty it falls back to the other group. Ownership
counts are taken from the owner fields of the set.

## Blocks

| File | Role |
|------|------|
| `mlp_dcp_pkg.sv` | default sizes, fixed-point format, quantiser bounds, access type |
| `atd.sv` | per-core sampled tag directory, stack distance |
| `cluster_counters.sv` | per-core N(d) counters, two increment and two decrement ports |
| `l2_mshr.sv` | L2 miss registers with MLP cost, four shared adders |
| `hshr.sv` | per-core hit registers, ROB and latency release |
| `mem_latency_monitor.sv` | average MSHR residency |
| `mlp_quantizer.sv` | cycles to 0..7 |
| `mlp_sdh.sv` | per-core MLP-aware histogram with halving |
| `ipc_counter.sv` | per-core committed-instruction count per interval |
| `partition_decider.sv` | exhaustive minimum-cost search |
| `dcp_controller.sv` | interval timer and partition register |
| `partition_victim_select.sv` | quota-enforcing LRU victim choice |
| `mlp_dcp_top.sv` | everything above, wired together |

### Top-level interface and timing

The L2 arrays, main memory and the cores are outside the unit. They connect
through these ports:

- `acc_*` — one L2 access per cycle: core, type, line address, the L2's
  hit/miss result, ROB sequence number, bytes. The unit looks the access up
  in the ATD in that cycle and places it in the MSHR or HSHR on the next.
  `acc_ready` drops when the MSHR has no room for one more miss.
- `fill_*` — a line arriving from memory. The lowest MSHR entry with that
  line address is released.
- `commit_seq`, `commit_cnt` — per core: the sequence number of the next
  instruction to commit, and the instructions committed this cycle.
- `mode_ipc` — selects MLP-IPC-DCP. It is sampled when a decision starts.
- `ways`, `decision_done` — the current partition. A new partition appears
  one edge after `decision_done`.
- `vs_*` — the victim-selection interface.
- `sdh_hist`, `avg_lat`, `hshr_drops` — observation outputs.

### Parameters (top level)

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NCORES` | 2 | cores sharing the L2 |
| `K` | 16 | L2 associativity |
| `SETS` | 1024 | L2 sets (1MB of 64B lines) |
| `SDIST` | 16 | one ATD-tracked set in SDIST |
| `AW` | 34 | line-address bits (40-bit physical, 64B lines) |
| `N_MSHR` / `N_HSHR` | 32 / 24 | entries |
| `ADDERS` | 4 | shared cost adders per structure |
| `ROB` | 256 | reorder-buffer size (HSHR release) |
| `LAT0` | 300 | latency assumed before the first measurement |
| `HIST_W` | 32 | histogram counter width |
| `INTERVAL` | 5,000,000 | cycles between decisions |
| `IPC_W`, `IPC_SHIFT` | 12, 14 | IPC weight width and scaling |

Four-core systems:

- 1MB 16-way L2: `NCORES=4`.
- 2MB 32-way L2: `NCORES=4`, `K=32`. It still has 1024 sets.

## Where this RTL makes its own choices

The scheme fixes the mechanisms and most sizes. The following are this
implementation's own choices, also noted at the head of each file:

- **Histogram bins counted as misses.** The cost of w ways sums bins w+1
  upward; an access at distance w still hits with w ways. A form of the cost
  that starts the sum at bin w also circulates. It would charge each core for
  its own hits at the boundary.
- **Cluster counters.** There are K+1 counters per core, one for each
  distance including "miss at every size". An access counts itself, so
  N ≥ 1.
- **ROB sequence number.** The ROB index is widened by two age bits (10 bits
  instead of 8) so that commits since an access can be counted without
  ambiguity.
- **Round robin.** The adders rotate over fixed groups of entries, valid or
  not, rather than over the valid entries only.
- **Last charge of an HSHR entry.** The last partial charge is made at
  release.
- **Untracked sets.** Misses to untracked sets still take MSHR entries. They
  are not charged and not counted in clusters.
- **Histogram decay.** Halving happens at the snapshot, a few dozen cycles
  before the new partition is loaded, not after it.
- **IPC.** IPC is the instruction count shifted by a constant, not divided by
  the interval.
- **Minimum share.** Every core keeps at least one way.
- **Not included.** Merging of secondary misses to the same line, the cache
  arrays, memory and the cores.

## Simulation

Every testbench is self-checking. Each prints a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Build and run one
with plain Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/mlp_dcp_pkg.sv tb/tb_mlp_dcp_top.sv --top-module tb_mlp_dcp_top
./obj_dir/Vtb_mlp_dcp_top
```

Unit testbenches exist for every block (`tb_<block>.sv`). Each compares
against values computed in the testbench, for example:

- an LRU-stack model for the ATD;
- exact 1/N cost arithmetic, within one adder period, for the MSHR and HSHR;
- exhaustive search for the decider.

System-level testbenches:

- **`tb_mlp_dcp_top`.** Two cores, interval shortened to 30,000 cycles, eight
  decisions, the last four IPC-weighted; about 10 s.
  - The testbench models the L2 hit/miss outcome, memory with 200–299 cycles
    of latency, and the cores.
  - One core makes isolated misses and the other makes the same misses in
    bursts. The isolated core must win the ways it needs, although plain miss
    counts are equal.
  - Every decision is checked against a reference search over the histograms
    the unit saw. IPC-weighted decisions must differ from unweighted ones at
    least once.
  - It counts each mechanism and fails if any never happens: isolated and
    clustered misses, HSHR release by ROB and by latency, instruction fetches,
    MSHR-full stalls, HSHR overflow, halving, partition changes, both victim
    choices.
- **`tb_mlp_dcp_top_full`.** The same traffic with the unit at its default
  parameters: one full 5-million-cycle interval and its decision; about 30 s.
- **`tb_mlp_dcp_top_4c`.** Five four-core systems side by side, each in a
  `tb_4c_harness` and each run for three 40,000-cycle intervals:
  - 16 ways;
  - 32 ways;
  - 16 ways with a 128-entry ROB;
  - 16 ways with a 512-entry ROB;
  - 16 ways with every set tracked (`SDIST=1`).

  It checks every decision, its exact duration, and the last, IPC-weighted
  one; about 50 s including the build.

How far to trust it: every block passes its own checks, and a deliberately
broken copy of each block fails them. The system-level checks show that the
decisions follow the measured histograms. They do not show that the weights
match what a real core would lose, because the traffic is synthetic and the
cores are not modelled in detail.
