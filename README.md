# Power-aware dynamic partitioning of a shared L2 cache

Two cores that share one large L2 get in each other's way. Each one evicts the
other's lines. Meanwhile much of the cache draws leakage power while holding
lines that nobody reuses. This design attacks both problems with one
mechanism, built on a highly associative L2 (32 ways by default):

* **Way allocation.** Every way belongs to exactly one core. The boundary
  between the two areas, the *virtual partition*, moves one way at a time
  towards the core that seems to need more capacity.
* **Power control.** Inside each core's area, only as many ways are powered as
  that core's access pattern justifies. The other ways have their supply cut.

Both decisions come from one cheap measure of locality, taken per core over a
fixed window of L2 accesses:

    D = (hits on the least recently used line) / (hits on the most recently used line)

A program that keeps hitting its MRU line has a small D and gets by with
little cache. A program whose hits spread down to the LRU end of the stack has
a large D and would benefit from more ways.

The RTL is the digital part of this L2: the cache directory (tags, state and
true-LRU stacks), the access monitor, the controller and the way-state
logic. It is written in synthesizable SystemVerilog (IEEE 1800-2017). The
data array, the power switches, the cores and main memory sit outside and
connect through ports.

## The control loop

```
 requests ──► l2_tag_array ──hit/miss, MRU/LRU──► access_monitor
   (core, addr)     ▲   │                               │ every INTERVAL accesses
                    │   └── write-backs ──►             ▼
           use0/use1│flush                       cache_ctrl
                    │                      DIV, DIV ─► D_COMP ──► NALLOC0
               way_manager ◄────────────── T_COMP ─► STATE ────► NACT0
                    │                      T_COMP ─► STATE ────► NACT1
                    └──► way_pwr (to the power switches)
```

1. **Sampling** (`access_monitor`). For each core it counts MRU hits, LRU hits
   and misses. One N-bit counter counts the L2 accesses of both cores. The
   INTERVAL-th access closes the interval (INTERVAL is at most 2^N, and 2^N
   by default). The counts are then frozen for the controller and the
   counters restart.
2. **Calculation** (`cache_ctrl`). Two dividers compute D0 and D1.
3. **Way allocation** (`d_comp`). If D0 > D1, core 0 should get one more way.
   If D0 < D1, core 1 should. If they are equal, nothing changes.
4. **Local power demand** (`t_comp`). Each core's D is compared with two
   thresholds t1 < t2. Above t2 gives *inc*, below t1 gives *dec*, and
   anything in between gives *keep*.
5. **Global filtering** (`resize_fsm`). See the next section.
6. **Applying** (`way_manager`). Allocation is applied first, then power
   control. Allocation is skipped when *both* cores already have an inactive
   way: moving the partition would then only shift idle ways around, and it
   costs a flush.

The thresholds decide the policy. Small thresholds, such as (0.001, 0.005),
produce *inc* often and keep most ways on, so the cache is
performance-oriented. Large thresholds, such as (0.1, 0.5), produce *dec*
often and switch ways off, so it is energy-oriented. The thresholds are input
ports and can be changed at run time.

### Number format of D

D is normally far below one, so the dividers return an unsigned N-bit binary
fraction:

    D = floor(LRU * 2^N / MRU)

A ratio of one or more saturates to all ones. If there were no MRU hits, D is
all ones, unless there were no LRU hits either, in which case D is 0. The
thresholds use the same format, t = round(x * 2^N). With N = 16:

| setting | t1 | t2 |
|---|---|---|
| (0.001, 0.005) | 66 | 328 |
| (0.01, 0.05) | 655 | 3277 |
| (0.1, 0.5) | 6554 | 32768 |

With N = 8, a threshold of 0.001 rounds to 0 and can never be undercut. Small
N therefore only suits the larger thresholds.

## The asymmetric state machine

Shrinking the cache too eagerly hurts performance far more than keeping a way
on for a while. So each core's power request passes through a saturating
state machine (`resize_fsm`) that reacts to *inc* at once and to *dec* only
when it persists. With the default 3 bits:

| state | on *inc* | on *dec* | on *keep* |
|---|---|---|---|
| 000 | INC, stay in 000 | KEEP, go to 001 | KEEP, stay |
| 001 … 101 | INC, go to 000 | KEEP, go to next state | KEEP, stay |
| 110 | INC, go to 000 | DEC, go to 111 | KEEP, stay |
| 111 | INC, go to 000 | DEC, stay in 111 | KEEP, stay |

It takes seven *dec* intervals in a row (seven times 2^16 accesses by
default) before the first way is switched off. After that, each further *dec*
interval switches off one more way. A single *inc* resets the count. *keep*
neither advances nor resets the count; that part of the behaviour is this
design's own choice. `SM_BITS` sets the depth: 2^SM_BITS - 1 *dec* requests
are needed before the first DEC.

## Where the ways are

Core 0 owns ways `0 … alloc0-1` and core 1 owns the rest. In each area, the
active ways are the ones farthest from the partition. The inactive ways
therefore always sit next to the boundary:

```
 way:   0   1   2   3   4 | 5   6   7        (WAYS = 8, alloc0 = 5)
        [A] [A] [A] [ ] [ ] | [ ] [A] [A]      A = powered
        └──── core 0 ─────┘ └─ core 1 ─┘       act0 = 3, act1 = 2
```

`way_manager` keeps only three numbers: `alloc0`, `act0` and `act1`. Every
mask is derived from them.

* **Allocation.** When the partition moves, the boundary way changes owner.
  It is active for its new owner if that owner had no inactive way;
  otherwise it becomes one of the owner's inactive ways. The losing core
  keeps at most `alloc - 1` active ways.
* **Power control.** INC powers the inactive way closest to the active ones.
  DEC switches off the active way closest to the partition.
* **Limits.** Each core keeps at least one allocated and one active way.
* **Reset state.** An even split with every way on.

Any way that a core could use before a command and cannot use afterwards,
whether it was switched off or given to the other core, is flushed.
`flush_mask` lists these ways for one cycle, together with `flush_req`.

Picking the way to move or switch off by position, rather than at random,
keeps the masks simple comparisons. It is this design's choice; the
mechanism works with any selection.

## The directory and its flush walk

`l2_tag_array` holds, per set, the tags, valid and dirty bits, and a true-LRU
rank for each way. Rank 0 is MRU; an access ages every younger way by one.
The ranks span all ways of the set. A core, however, looks up and replaces
only in its usable ways (`use0`/`use1`). Its MRU and LRU hits are counted
relative to those ways:

* **Position** of a hit: the number of usable valid ways that are younger.
* **MRU hit:** position 0.
* **LRU hit:** the last position among the usable ways.

On a miss, the line is placed in the lowest invalid usable way, or else in
the oldest usable way. A dirty victim is written back.

**Flush.** A flush walks all sets:

* In each set, it writes back the dirty lines of the flushed ways, one per
  cycle.
* One more cycle then invalidates those ways in that set.

A flush therefore takes SETS cycles plus one per dirty line (512 plus the
number of dirty lines by default). Requests stall while it runs. The same
walk clears the directory after reset, in SETS cycles. A flush only happens
after a control decision, so at most once every INTERVAL accesses.

## Modes

`part_en = 1` gives the partitioned cache described above. `part_en = 0`
makes it a conventional shared cache: every way is powered and usable by both
cores, and way commands are ignored. Meant for threads of one program that
share data, this mode is chosen by system software.

The sampling logic and the state machines keep running in shared mode.
Entering partitioned mode flushes the whole cache, so that no core is left
with lines in ways it can no longer see.

## Interface and timing of `pac_l2_top`

| group | signals | notes |
|---|---|---|
| control | `part_en`, `t1`, `t2` | mode and thresholds (N-bit fractions) |
| request | `req_vld`, `req_ready`, `req_core`, `req_addr`, `req_we` | taken when `req_vld && req_ready`; one per cycle |
| response | `resp_vld`, `resp_core`, `resp_hit`, `resp_way`, `resp_fill`, `resp_pos` | the cycle after the request is taken; `resp_way` is the hit or newly allocated way for the data array |
| write-back | `wb_vld`, `wb_addr`, `wb_flush` | line address; single-cycle pulse, no back-pressure |
| way state | `way_pwr`, `way_use0`, `way_use1`, `alloc0/1`, `act0/1` | `way_pwr` drives the per-way supply switches |
| observation | `sample_vld`, `d0`, `d1`, `cmd_vld`, `nalloc0`, `nact0/1`, `state0/1`, `miss_count0/1`, `ev_alloc`, `ev_alloc_skip`, `busy` | |

The commands use one 2-bit code, `pac_pkg::resize_e`: KEEP = 00, INC = 01,
DEC = 10.

Timing of one decision. Call the edge that accepts the interval's last
request edge 0:

* edge 1: the response is counted and the interval closes.
* during the next cycle: `sample_vld` is high, and the combinational dividers
  and comparators settle. Their delay grows with N, but the result is needed
  only once per interval.
* edge 2: the state machines step and the commands are registered
  (`cmd_vld`). `t1` and `t2` are compared at this edge, so a threshold change
  applies to the interval whose decision is made at the next such edge.
* edge 3: `way_manager` takes the new configuration and raises `flush_req`.
  `req_ready` goes low.
* edge 4 onward: the flush walk runs, and requests resume when it ends.

Requests accepted up to edge 3 still use the old masks. They count toward the
next interval.

`rst_n` is an asynchronous, active-low reset. `busy` is high during the reset
walk.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WAYS` | 32 | associativity |
| `SETS` | 512 | sets: 1024 kB / (32 × 64 B) |
| `LINE_BYTES` | 64 | line size |
| `ADDR_W` | 32 | byte address width |
| `N` | 16 | counter and D width; the interval can be at most 2^N accesses |
| `INTERVAL` | 2^N | accesses per sampling interval, 2 to 2^N |
| `SM_BITS` | 3 | state machine width |

The cache geometry matches a 1 MB, 32-way L2 with 64-byte lines. N = 16 lies
in the middle of the useful range: intervals of 2^12 to 2^16 accesses work
best, 2^8 reacts too often (each reaction costs a flush), and 2^20 reacts too
slowly. For an interval of 100,000 accesses, set N = 17 and
INTERVAL = 100000. INTERVAL can shorten the interval without narrowing D:
N = 16 with INTERVAL = 4096 keeps 16-bit thresholds, while at N = 8 the
threshold 0.001 rounds to 0.

## Files

| file | contents |
|---|---|
| `rtl/pac_pkg.sv` | the `resize_e` command type |
| `rtl/pac_l2_top.sv` | the top; wires the blocks below |
| `rtl/l2_tag_array.sv` | directory, true LRU, per-core way masking, flush walk |
| `rtl/access_monitor.sv` | per-core MRU/LRU/miss counters and the interval counter |
| `rtl/cache_ctrl.sv` | controller: two DIV, D_COMP, two T_COMP, two STATE |
| `rtl/locality_div.sv` | DIV, a combinational N-stage restoring divider |
| `rtl/d_comp.sv` | D_COMP, allocation comparator |
| `rtl/t_comp.sv` | T_COMP, threshold comparator |
| `rtl/resize_fsm.sv` | STATE, the asymmetric state machine |
| `rtl/way_manager.sv` | allocation and power state, masks, flush requests |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/pac_env.sv` | reference model, stimulus and checker for the top |
| `tb/tb_pac_l2_top.sv` | end-to-end test at 8 ways, 16 sets, N = 8, 200-access intervals |
| `tb/tb_pac_l2_full.sv` | the same test with the top at its default parameters |
| `tb/tb_pac_policy.sv` | compares the three threshold settings on synthetic workloads |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pac_l2_top \
    -y rtl -y tb +libext+.sv rtl/pac_pkg.sv tb/tb_pac_l2_top.sv
./obj_dir/Vtb_pac_l2_top
```

Use the same command for any other `tb_*` module. `tb_pac_l2_full` simulates
about 2 million cycles of the default-size design, which takes about 15
seconds.

`pac_env` checks the top against a complete model of it. The model covers the
directory with explicit LRU lists, the counts, the division, the comparators,
the state machines and the way state. It compares:

* every response and every write-back;
* D0 and D1, and the cycle in which they appear;
* the three commands and the cycle in which they appear;
* the masks, in every cycle;
* the length of every flush.

It also counts how often each mechanism occurred and fails if one never did:

* the partition moving in each direction;
* a skipped allocation;
* power INC and DEC;
* victim and flush write-backs;
* stalls;
* mode switches both ways;
* MRU and LRU hits.

## Behaviour on synthetic programs

`tb_pac_policy` runs the top at 32 ways, 32 sets and 4096-access intervals.
Each core runs a synthetic program that reuses its d-th most recent line
with probability proportional to r^d. Core 0 uses r = 0.9, a large working
set that keeps gaining from more ways. Core 1 uses r = 0.6, a small working
set. Each threshold setting runs for 60 intervals from reset. The table
gives averages over the second half of each run:

| (t1, t2) | powered ways | core 0 / core 1 active | hit rate core 0 / core 1 |
|---|---|---|---|
| (0.001, 0.005) | 32.0 | 25.7 / 6.3 | 0.920 / 0.951 |
| (0.01, 0.05) | 32.0 | 25.9 / 6.1 | 0.919 / 0.951 |
| (0.1, 0.5) | 23.0 | 18.0 / 5.0 | 0.859 / 0.930 |

The partition moves towards the core with the larger working set. Raising
the thresholds trades hit rate for switched-off ways. The testbench checks
these trends, not the exact numbers, which depend on the random stream.

## How far to trust it, and what is not here

* **Behaviour is this design's reading.** The controller structure (two
  dividers, one D comparator, two threshold comparators, two state machines),
  the D metric, the allocation rule, the skip rule and the state machine
  follow the mechanism as published. The following are this design's own
  choices:
  * the fixed-point format;
  * the command encoding;
  * the way layout and limits;
  * the reaction to *keep*;
  * the flush walk;
  * the shared-mode flush;
  * the request interface.
* **Not included.**
  * The L2 data array: a 1 MB SRAM with 14-cycle access.
  * The per-way supply switches: analog circuits driven by `way_pwr`.
  * The cores and their L1 caches.
  * Main memory.

  The directory's response already names the way to read or fill. Refill
  data, and the data of write-backs, travel outside this RTL.
* **Not modelled.** The power-gating overhead (wake-up time and energy of a
  way) is not modelled: a way that is switched on is usable in the next
  cycle.
* **Power estimates.** Energy figures for a design like this come from a
  cache power model that scales the data-array energy with the fraction of
  active ways. `way_pwr` gives that fraction in each cycle.
