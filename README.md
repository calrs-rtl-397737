# CaLRS: critical-aware request scheduling for a GPU's shared L2 bank

A GPU warp that executes a load cannot continue until **every** memory request
it produced has come back. Coalescing turns a warp's 32 thread addresses into
anywhere from 1 to 32 cache-line requests, and these requests pile up in front
of the banks of the shared last-level cache (the L2, called LLC here), which
a plain bank serves first-in first-out.

CaLRS changes the service order in the LLC bank. Each request carries a
**Critical Field (CF)**: the number of requests of its warp that are still
unserved. A warp with a small CF is close to being ready again, so its
requests go first. Serving them first gives the SM more ready warps to pick
from. To keep this cheap, the bank does not sort by CF. It has five FIFO
subqueues, one per CF class, and a rotation rule that stops low-priority
requests from starving.

This repository holds synthesizable SystemVerilog for one LLC bank with CaLRS,
plus the CF logic on the SM side that produces the CF, and self-checking
testbenches for each block.

## How a request gets its CF

```
warp load ─► calrs_coalescer ─► private L1 ─┬─ hit ──► calrs_cf_tracker: warp count − 1
              (CF = N)          (external)  └─ miss ─► calrs_cf_tracker: CF := warp count
                                                              │
                                                              ▼
                                        calrs_scheduler (one LLC bank, 5 SM ports)
                                                              │ one request per cycle
                                                              ▼
                                                    LLC cache pipeline (external)
```

* **Coalescing (`calrs_coalescer`).** Threads whose addresses fall in the same
  128-byte line share one request. For each active thread, the unit checks
  whether it is the first active thread of its line. It uses a triangular
  array of line-address comparators for this. Those first threads become the
  N requests of the warp, and each request carries CF = N. Requests leave one
  per cycle, in thread order.
  The unit also pulses `alloc` with the warp id and N. A new warp is accepted
  in the same cycle that the previous warp's last request leaves.
* **Private-cache update (`calrs_cf_tracker`).** Each time one request of a
  warp hits in the L1, the CF of all the warp's other requests drops by one.
  The tracker does not rewrite requests that are in flight. It keeps one
  6-bit counter per warp (48 warps per SM). The counter is loaded with N on
  `alloc` and lowered on each L1 hit of that warp, stopping at zero. It is
  copied into the CF of each L1 miss as the miss leaves for the LLC. The CF
  that reaches the bank is therefore the number of the warp's requests still
  unserved at that moment, the miss itself included.

## The bank scheduler (`calrs_scheduler`)

This is the core of the design and the part that takes most care to follow.

### Classes and subqueues

`calrs_cf_class` maps CF to one of five classes. The buckets are powers of
two, with the two largest merged:

| class / nominal priority | CF      | subqueue length (default) |
|--------------------------|---------|---------------------------|
| 0                        | 1       | 25 (subqueue0)            |
| 1                        | 2       | 25 (subqueue1)            |
| 2                        | 3–4     | 25 (subqueue2)            |
| 3                        | 5–8     | 25 (subqueue3)            |
| 4                        | 9–32    | 28 (subqueue4)            |

There are 128 entries in total, the same as the FIFO of a conventional bank.
CF 0 goes to class 0 and codes 33–63 go to class 4. These are defensive
defaults: the SM side never produces them for a request that reaches the
bank.

### Rotating priorities

A 3-bit pointer `top` names the subqueue that has priority 0, and subqueue
`(top + p) mod 5` has priority p. After reset, `top` = 0, so subqueue *k* has
priority *k*. A request of class *c* is always aimed at **priority** *c*,
whichever physical subqueue holds that priority at the moment.

**Rotation.** A cycle in which the priority-0 subqueue goes from non-empty to
empty advances `top` by one. Every subqueue then moves up one level, and the
subqueue that just emptied drops to priority 4. After rotation, new CF-1
requests land in a subqueue that may still hold older requests of a higher
class. Those older requests are now served at the highest priority, so no
request waits longer than about five rotations.

An empty priority-0 subqueue that receives nothing does not rotate. The bank
then simply serves the highest non-empty level.

### Insertion with fall-through

Up to one request per SM port arrives each cycle (`NP` = 5 ports, because 30
SMs share 6 banks). The ports are handled in order, port 0 first. For each
request of class *c*:

1. It tries the subqueue at priority *c*.
2. If that one is full, it tries priority *c*+1, and so on down to 4.
3. It never tries a level above its own class, so a request never gains
   priority by insertion.
4. If no level from *c* to 4 has room, the request is refused: its
   `in_ready` stays low and the SM side holds it.

A later port in the same cycle still gets its own attempt.

Free space is counted at the start of the cycle. An entry that is issued in
the same cycle becomes usable in the next cycle.

### Block with delayed cancel

If any request is refused, the bank raises `block` at the next clock edge.
While `block` is high, the bank accepts nothing.

`block` is **not** cancelled as soon as an entry frees up. It stays high until
the priority-0 subqueue is empty, which is normally the rotation event. This
stops `block` from toggling every cycle under heavy load.

`block` is also cancelled when the priority-0 subqueue is already empty
during a block. Without that extra cancel, a bank blocked only by a full
class-4 subqueue would never reopen. In that one case `block` lasts a single
cycle.

### Issue

In each cycle, the head of the non-empty subqueue with the highest priority
is offered on `out_*`. The subqueue is chosen from the state at the start of
the cycle, so the earliest issue is the cycle after insertion. When
`out_ready_i` is held high, the bank issues one request every cycle while it
holds any request.

### Status outputs

The bank reports:

* `block_o`
* `top_o`
* `rotate_o`: a pulse in the cycle the priorities rotate
* `demoted_o`: per port, the request went below its class
* `refused_o`: per port, no level had room
* `occupancy_o`: the fill of each subqueue

## Files

| file | content |
|------|---------|
| `rtl/calrs_pkg.sv` | sizes, the request struct `mem_req_t` (line address, SM, warp, write flag, CF), default subqueue lengths |
| `rtl/calrs_cf_class.sv` | CF → class |
| `rtl/calrs_subqueue.sv` | one FIFO subqueue: several writes per cycle in port order, one read, any depth |
| `rtl/calrs_scheduler.sv` | the bank scheduler described above |
| `rtl/calrs_coalescer.sv` | coalescing unit with CF = N |
| `rtl/calrs_cf_tracker.sv` | per-warp CF counters at the private cache |
| `rtl/calrs_bank_top.sv` | one bank, its scheduler, and a coalescer and tracker for each of its 5 SMs |
| `tb/calrs_ref_pkg.sv` | cycle-level reference model of the bank queue, used by three testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_calrs_workload` |

### Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `NP` | scheduler, top | 5 | SM ports per bank |
| `SUBQ_LEN` | scheduler, top | `'{25,25,25,25,28}` | subqueue lengths, each at most 64 |
| `DEPTH`, `NW` | subqueue | 25, 5 | depth, write ports |
| `NT` | coalescer | 32 | threads per warp |
| `NWARPS` | tracker | 48 | warps per SM (1536 threads / 32) |

Other sizes are fixed in `calrs_pkg`: a 32-bit byte address, a 6-bit CF and
30 SMs, which sets the width of the SM id.

## What lies outside

The following parts are not built. They appear as ports of
`calrs_bank_top`:

* **The SM pipeline and warp scheduler.** Warp memory instructions arrive on
  the `warp_*` ports.
* **The private L1 cache.** The coalesced requests leave on `l1_req_*`, and
  each request's hit or miss result comes back on `l1_rsp_*`.
* **The SM-to-LLC interconnect.** Each SM's tracker connects directly to one
  scheduler port. A refused request waits at the tracker, which back-pressures
  the L1 response.
* **The LLC tag and data arrays, the memory controller and DRAM.** The issued
  request leaves on `llc_*`, and `llc_ready_i` can stall the bank.

A full GPU would use six such banks. The scheme treats every bank on its own,
so one bank is all the design needs.

## Design choices beyond the scheme

The scheme fixes the CF definition and the update-on-hit rule, the class
buckets, the subqueue lengths, fall-through insertion, block with cancel on
draining the top subqueue, one issue per cycle, and rotation on emptying the
top subqueue. The following are choices of this implementation:

* **Multiple arrivals per cycle.** They are handled in port order, and every
  port tries to insert even after an earlier one failed.
* **Extra block cancel.** `block` is also cancelled when the top subqueue is
  already empty (see above).
* **Back-pressure handshakes.** `out_ready_i` on the issue side and
  ready/valid between all stages.
* **CF by counter.** The CF is applied through a per-warp counter that is
  read when a miss leaves the L1. A miss that left earlier keeps its older,
  higher CF.
* **Coalescer timing.** One request per cycle, in thread order.
* **Reset and request fields.** Resets are synchronous and active low. The
  request field widths are this design's own choice.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_calrs_cf_class`: all 64 CF codes, with the expected class computed as
  `min(ceil(log2 CF), 4)`.
* `tb_calrs_subqueue`: random multi-port writes and reads against a queue,
  including full and wrap-around.
* `tb_calrs_scheduler`: two schedulers, one with the default lengths and one
  with lengths 2/2/2/2/3, are compared every cycle against
  `calrs_ref_pkg::sched_model`. The comparison covers accepts, demotions,
  issued request and subqueue, block, `top` and rotation.
  * Phases: light load, heavy load with a slow sink, a flood of CF-1
    requests, and a drain that must issue on every cycle.
  * Rotation, block, fall-through and refusal must each occur.
* `tb_calrs_coalescer`: random warps with 1 to 32 distinct lines. It checks
  the exact request sequence, CF = N, `alloc`, and zero idle cycles for
  back-to-back warps.
* `tb_calrs_cf_tracker`: random allocations, hits and misses against an
  independent per-warp count.
* `tb_calrs_bank_top`: end to end, with every parameter at its default. Five
  SMs run 160 warps each, and the testbench models the L1 with one hit in
  three.
  * It predicts the coalesced requests, the CF of every miss, and the bank's
    behaviour cycle by cycle.
  * A phase where the LLC takes one request in four drives the bank into
    fall-through, refusal, block and rotation, and each of these must occur.
  * At the end, every miss must have been issued exactly once, and each
    class must have been issued at least once.

* `tb_calrs_workload`: a default-size bank under bursty synthetic traffic at
  about 0.97 arrivals per cycle, 20000 cycles per mix. A 128-entry
  first-in first-out bank, modelled in the testbench, receives the same
  arrivals for comparison.
  * The CaLRS bank is also checked cycle by cycle against the reference
    model.
  * The testbench requires every request to be served once, class 0 to be
    served faster than by the FIFO bank, and class 4 slower.
  * Mix A has classes 0–4 in the shares 45.2 / 14.2 / 10.5 / 18.6 / 11.4 %,
    the measured average over a GPU benchmark suite. Mix B draws CF uniformly
    from 1..32, like a strongly divergent application.

  One run gave the following mean latencies, counted from arrival to issue:

  | class | mix A: CaLRS | mix A: FIFO | mix B: CaLRS | mix B: FIFO |
  |-------|--------------|-------------|--------------|-------------|
  | 0     | 4.1          | 16.7        | 2.9          | 21.1        |
  | 4     | 41.3         | 16.8        | 23.6         | 19.9        |

  * Rotation interval: 8.5 cycles (mix A) and 19.9 cycles (mix B).
  * Worst-case latency: 145 cycles against 60 (mix A), and 110 against 72
    (mix B).
  * These numbers come from synthetic traffic. They show the direction of
    the trade-off, not the gains of a full GPU.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_calrs_bank_top rtl/calrs_pkg.sv tb/calrs_ref_pkg.sv tb/tb_calrs_bank_top.sv
./obj_dir/Vtb_calrs_bank_top
```

Replace the top module for the others. `calrs_ref_pkg.sv` is needed by the
scheduler, top and workload testbenches.

## Limits

* The design has not been run on real GPU traffic. The testbench stimulus is
  synthetic, with a skew toward CF values of 1, 2, 4 and 8.
* The "ideal" comparison point of the scheme, with 32 subqueues of unbounded
  size, is not built.
* `SUBQ_LEN` entries above 64 would need a wider occupancy count
  (`MAXLEN` in the scheduler).
* The coalescer compares all 32×31/2 thread pairs in one cycle. This is
  simple but large: about 500 line comparators per SM.
