# Stretch: software-steered ROB/LSQ partitioning for a two-thread SMT core

A server core running two hardware threads often hosts one latency-sensitive
service (web search, a key-value store) next to a batch job. While the
service is lightly loaded it has plenty of slack against its tail-latency
target and hardly profits from a deep instruction window. The batch job,
by contrast, often gains a lot from a large reorder buffer, because it
exposes more memory-level parallelism. A conventional SMT core splits the ROB
and the load/store queue into two equal halves and cannot exploit this.

Stretch makes that split programmable. The ROB and the LSQ stay statically
partitioned, but the size of each thread's partition comes from a limit
register that system software can change through a small control register.
The core offers three kinds of partitioning:

| mode | when software picks it | ROB (latency-sensitive / other) | LSQ |
|---|---|---|---|
| Baseline | S bit clear | 96 / 96 | 32 / 32 |
| B-mode (batch boost) | service load is low or moderate | 56 / 136 (main); also 64/128, 48/144, 40/152, 32/160 | 19 / 45 (main) |
| Q-mode (QoS boost, optional) | service load is high | 136 / 56 (main); also 128/64, 144/48, 152/40, 160/32 | 45 / 19 (main) |

All ten boosted splits are built into the default configuration, and a level
number selects among them. Either hardware thread can be the
latency-sensitive one. Every change of split
flushes both threads. The hardware cost is one programmable limit register
and one usage counter per thread per structure, plus the control register.

This repository holds synthesizable SystemVerilog for the instruction-window
back-end of such a core. It covers dispatch into the ROB and LSQ, the
partitioned ROB and LSQ themselves, retirement, the control register and the
mode-change flush. Every block has a self-checking testbench.

## How a partition is enforced

`part_limit_ctr` is the whole mechanism. For one thread in one structure it
holds:

* **limit**: the most entries the thread may hold. It is loaded from the
  configuration table, and only during a flush.
* **usage**: how many entries the thread holds now. It grows with allocations
  and shrinks with releases, with up to 6 of each per cycle.

`blocked` is set when usage has reached the limit. `free_n = limit - usage`
tells dispatch how much of a 6-wide group still fits, so a group never
overshoots the partition. The ROB has two of these pairs (one per thread), and
so does the LSQ.

The ROB and the LSQ also need the entries themselves to be split. In this
RTL, each thread owns a **contiguous region**:

```
entry 0                      limit[0]                     limit[0]+limit[1]
|------ thread 0 region -----|------ thread 1 region ------|
   circular buffer, head/tail     circular buffer, head/tail
   kept as offsets in region      kept as offsets in region
```

An entry's physical index is `base[t] + offset`, with `base[0] = 0` and
`base[1] = limit[0]`. Offsets wrap at `limit[t]`. When the split changes,
both regions move. That is safe only because a mode change always comes with a
flush, which empties both structures in the same cycle in which the new
limits are loaded. Assertions check that a limit is never reloaded without a
flush and that the two regions never exceed the structure.

## Changing mode: control register and flush

`stretch_ctrl_reg` holds six bits, `{LEVEL[2:0], LS_TID, B/Q, S}`:

* S = 0 selects Baseline.
* S = 1 selects B-mode (B/Q = 0) or Q-mode (B/Q = 1).
* LS_TID names the hardware thread that runs the latency-sensitive work.
* LEVEL picks one of the five provisioned splits of that mode, in order of
  growing skew:

| LEVEL | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| B-mode ROB | 64/128 | **56/136** | 48/144 | 40/152 | 32/160 |
| B-mode LSQ | 21/43 | **19/45** | 16/48 | 13/51 | 11/53 |
| Q-mode ROB | 128/64 | **136/56** | 144/48 | 152/40 | 160/32 |
| Q-mode LSQ | 43/21 | **45/19** | 48/16 | 51/13 | 53/11 |

Values 5 to 7 act as 4. A build without Q-mode (`HAS_QMODE = 0`) treats a
Q-mode request as Baseline. The register decodes its bits into a
configuration `{mode, ls_tid, level}`. In Baseline, `ls_tid` and `level` are
forced to 0, so rewriting them while S is clear does nothing.

`mode_flush_ctl` compares the requested configuration with the one in force.
When they differ, a flush runs:

```
cycle      n-1        n              n+1 ... n+11         n+12
csr write  X
cfg_req               new
flush_start           1
flushing              1              1 ... 1              0
ROB/LSQ               cleared, limits loaded at edge n
dispatch/commit       stopped ------------------------->  resume
```

The flush lasts 12 cycles, which is the flush penalty of the modelled core.
Rewriting the same configuration causes no flush. A request that changes
again during a flush is handled by a second flush right after the first. After
a flush, every micro-op that had not retired is gone from both threads. The
front end must refetch from the oldest unretired micro-op of each thread; the
testbench models this.

## Dispatch: ICOUNT and slot filling

Each cycle, each thread offers up to 6 micro-ops in program order.
`dispatch_ctl` works as follows:

1. `icount_sel` picks the *primary* thread: the one with fewer micro-ops in
   the ROB. On a tie, the threads take turns.
2. The primary thread takes its micro-ops in order until one of these:
   * it runs out of micro-ops;
   * the 6 slots are used;
   * its ROB partition is full;
   * a memory op finds its LSQ partition full.
3. The other thread fills the remaining slots in the same cycle, under the
   same rules.

`rob_full[t]` and `lsq_full[t]` report a thread held back by its partition.
Because dispatch is in order, a thread whose LSQ partition is full also stops
its non-memory micro-ops behind the blocked memory op.

## Retirement: round robin with fill

`part_rob` retires up to 6 micro-ops per cycle. A round-robin pointer, which
advances every cycle, names the thread that goes first. That thread retires
its oldest completed micro-ops, in order. If it retires fewer than 6, the
other thread retires from its own head in the remaining slots.

Each memory op that retires releases its LSQ entry in the same cycle.
`part_lsq` shows the leaving entries on `rel_*` (load/store, address, ROB
entry), so that stores can be handed to the data cache. An assertion in the
top checks that the LSQ and the ROB retire the same memory ops.

## The back-end as a block (`stretch_backend`)

| group | ports | timing |
|---|---|---|
| control | `csr_we`, `csr_wdata[5:0]`, `csr_rdata` | written at the edge; a flush starts the next cycle if the configuration changed |
| front end | `in_cnt[t]`, `in_uop[t][0..5]` in, `in_take[t]` out | combinational: `in_take` micro-ops are consumed at the edge |
| dispatch group | `disp_valid/tid/uop/rob_idx/lsq_idx[0..5]` | combinational, same cycle as `in_take` |
| completion | `wb_valid/wb_idx[0..10]` (ROB entry) | registered; the micro-op can retire the next cycle |
| addresses | `agu_valid/idx/addr[0..1]` (LSQ entry) | registered |
| retirement | `cm_valid/tid/uop/idx[0..5]`, `lsq_rel_*[t][0..5]` | combinational; takes effect at the edge |
| status | `cfg_cur`, `flush_start`, `flushing`, `flush_count`, `icount_primary`, `rob_full`, `lsq_full`, `rob/lsq_limit`, `rob/lsq_usage` | |

A micro-op (`uop_t` in `stretch_pkg`) carries a memory flag, a store flag and
a 16-bit tag that the rest of the core uses to name it. A memory op must
receive its address before it completes. The back-end has 11 completion ports
(one per execution unit) and 2 address ports (one per load/store unit).

Defaults: 192-entry ROB, 64-entry LSQ, 6-wide dispatch and commit, 12-cycle
flush, five B-mode and five Q-mode splits. At these sizes the design synthesizes to
about 2,240 word-level cells, 150 flip-flops and 7.8 kbit of entry storage.

## What is outside this RTL

The back-end stops at its ports. Fetch, decode, the instruction and data
caches, branch prediction, the execution units and the memory system are
ordinary parts of an SMT core. Partitioning does not change them, and they are
not included. The software that decides the mode, by watching tail latency
and writing the control register, is not hardware either.

## Choices made here, and departures

These points are this design's own, where the description of the mechanism
leaves them open:

* **Control register encoding.** The bit positions and the LS_TID field are
  chosen here.
* **LSQ split.** The LSQ is sized in proportion to the ROB. Its share is
  computed in `stretch_config_table` as round(64 × ROB share / 192).
* **Region layout.** The contiguous regions, and moving them only during a
  flush, are chosen here. So is the entry contents of the ROB (micro-op and
  done bit) and of the LSQ (kind, ROB entry, address).
* **Flush timing.** The 12 flush cycles are counted from the cycle of
  `flush_start`. Dispatch and commit are both held off during them.
* **Tie-breaks.** ICOUNT ties alternate, and the commit round-robin pointer
  advances every cycle.
* **Selecting a split.** How software chooses among several provisioned
  splits is this design's own scheme: the LEVEL field and its saturation.
* **How many splits.** A product would provision only a few
  configurations: Baseline plus one B-mode split, and optionally one Q-mode
  split. The defaults here provision all ten evaluated splits, so that any of
  them can be tried without rebuilding. `N_LEVELS = 1` gives the minimal
  build.
* **ICOUNT at dispatch only.** ICOUNT selection is built for dispatch only.
  Fetch-side selection belongs to the front end.
* **No other flushes.** Only the mode-change flush exists. Squashes after a
  branch misprediction or an exception, as a full core would need, are not
  modelled.
* **No LSQ disambiguation.** The LSQ does no memory disambiguation and no
  store-to-load forwarding. It only tracks occupancy, order and addresses.

## Simulating

Every module has a testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stretch_pkg.sv \
          tb/tb_stretch_backend.sv --top-module tb_stretch_backend
./obj_dir/Vtb_stretch_backend
```

Replace the testbench name to run another. What each testbench covers:

* **`tb_stretch_backend`** runs the complete back-end at its default size for
  about 21,000 cycles. Two synthetic threads, with occasional 160-cycle misses,
  go through Baseline, the main B-mode and Q-mode splits with each thread
  taking the latency-sensitive role, and then every other provisioned
  level. The test checks that each thread retires in order
  and exactly once, that the LSQ releases carry the right addresses, that the
  limits match the table above after every change, and that each flush lasts
  12 cycles with nothing dispatched or retired. It also checks that a
  miss-free stretch sustains 6 retirements per cycle, and that every
  mechanism occurs at least once: ROB-full and LSQ-full stalls, ICOUNT
  choosing each thread, slot filling at dispatch and commit, and each mode.
* **`tb_stretch_workloads`** shows what the modes are for, at the default
  size. Thread 0 stands for a latency-sensitive service: its 200-cycle
  misses form a dependent chain, one every 24 micro-ops. Thread 1 stands for
  a batch job: one micro-op in 8 misses for 200 cycles, all independent.
  Over 4000-cycle windows the batch thread retires 2067 micro-ops in
  Baseline, 2965 in B-mode 56-136 (×1.43) and 1259 in Q-mode 136-56 (×0.61).
  That is close to the estimate of P / (200 + P/6) per cycle for a ROB
  partition of P entries. The service retires exactly 480 in all three
  modes, because its chain of misses, not its window, limits it. The test
  checks these effects with margins: at least 25% gain and loss for the
  batch thread, and 480 ± 24 for the service.
* **Unit testbenches** compare each block against a reference model written
  independently in the testbench. They cover `part_rob`, `part_lsq`,
  `dispatch_ctl`, `part_limit_ctr`, `icount_sel`, `mode_flush_ctl`,
  `stretch_config_table` and `stretch_ctrl_reg`.

The simulator has no X state, so everything that is read is reset or written
first. The ROB and LSQ entry arrays are not reset; an entry is only read after
it has been allocated.

## Changing it

Sizes, widths and the boosted splits are parameters of `stretch_backend`.
They are passed down to the blocks, and their defaults are the figures above.
`N_LEVELS`, `ROB_LS_B[]` and `ROB_LS_Q[]` list the provisioned boosted
splits, up to 8 per mode. Each is given as the latency-sensitive thread's ROB
share; the LSQ shares follow from it. Every partition must hold at least one
dispatch group (6 entries); assertions check this. Nothing else depends on
how many splits exist. The minimal build, with only the main splits, is

```
stretch_backend #(.N_LEVELS(1), .ROB_LS_B('{default: 56}),
                  .ROB_LS_Q('{default: 136})) u_be (...);
```

The `default:` pattern keeps the array override valid whatever `N_LEVELS`
is.
