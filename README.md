# Graph-Waving GPU core in SystemVerilog

Graph kernels written in the vertex-centric style give each vertex to a
group of threads. Much of the work of such a group is the same for all its
threads (loading the vertex, its degree, the loop bounds over its edges): it
is *scalar* work. On a conventional GPU with 32-wide warps, that scalar work
occupies a whole 32-lane SIMD issue slot while only one lane does anything
useful, and the edge loops of low-degree vertices leave most lanes idle too.

The Graph-Waving (GW) core attacks both problems at once:

* **Narrow warps, paired on wide hardware.** Warps are only 8 threads wide.
  Each scheduler owns a 16-lane SIMD unit and tries to issue an even and an
  odd warp that sit at the same PC together, so the unit is full when warps
  agree, and half of it runs alone when they have drifted apart.
* **Scalar-waves.** An instruction marked scalar is not issued per warp.
  Instead, scalar instructions with the same PC from up to 16 warps of a
  scheduler are gathered into one *scalar-wave* and run side by side, one
  lane per warp, whenever the scheduler has no ordinary warp to issue.
  Results go to a *grouped* scalar register: one register entry holds one
  scalar for each of the scheduler's 16 warps.
* **Decoded-instruction reuse.** Narrow warps mean four times as many warps
  fetching the same instructions. Decoded instructions are therefore kept in
  a shared, set-associative *Instruction Storage*; warps point into it, and
  only PCs that nobody has decoded yet are fetched.

This repository holds the RTL of one such core (a "streaming multiprocessor")
with four schedulers and 64 resident warps. It runs a small integer
instruction set of its own, which is enough to execute vertex-centric
kernels working on registers. A self-checking testbench is provided for every
block and for the whole core.

## The core at a glance

```
                    instruction cache (outside the core)
                               |  request: aligned instruction pair + buffer tag
                               v
   +--------------------- front end (shared) ----------------------+
   |  fetch unit: round-robin over ReadyToFetch warps, 2 buffers,   |
   |  two decoders  --->  Instruction Storage (16 sets x 3 ways,    |
   |                      2 decoded instructions per entry,         |
   |                      tag / valid / reference count / scalar)   |
   +------------------------------+---------------------------------+
         lookups, reads, releases |  fetch and fill broadcasts
        +-----------+-------------+-------------+-----------+
        v           v                           v           v
   scheduler 0  scheduler 1                scheduler 2  scheduler 3
   each: Warp Status Table slice (16 warps), Scoreboarding unit,
         Scalar-Wave Formation Unit, pair scheduler,
         vector + grouped scalar register file, 16-lane SIMD unit
```

| Module              | Role |
|---------------------|------|
| `gw_sm`             | top: one core, front end plus four scheduler clusters |
| `gw_cluster`        | one scheduler with everything it owns (wiring and issue stage) |
| `gw_fetch_unit`     | fetch arbitration, fetch buffers, decode, storage fill |
| `gw_decode`         | instruction word to decoded form |
| `gw_inst_storage`   | shared decoded-instruction store with reference counters |
| `gw_wst`            | Warp Status Table of one scheduler |
| `gw_scoreboard`     | warp scoreboard and scalar-wave scoreboard |
| `gw_swfu`           | Scalar-Wave Formation Unit and its status table (SWST) |
| `gw_pair_scheduler` | picks a pair, a single warp or a scalar-wave each cycle |
| `gw_regfile`        | per-warp vector registers and grouped scalar registers |
| `gw_simd_unit`      | 16-lane pipelined integer unit |
| `gw_rr_arbiter`     | round-robin arbiter used by several blocks |
| `gw_pkg`            | constants, instruction format, shared types |

## Warps, pairs and schedulers

The core holds 64 warps of 8 threads. Warps are dealt out in pairs: global
warps `2p` and `2p+1` form pair `p`, and pair `p` belongs to scheduler
`p mod 4`. Inside a scheduler the 16 warps have local slots 0..15; slot `2k`
is the even warp of local pair `k` and runs on lanes 0-7 of the SIMD unit,
slot `2k+1` is the odd warp and runs on lanes 8-15. `gwid_of()` in `gw_pkg`
gives the mapping. Pairs are fixed: a warp is never paired with anyone but
its partner.

Every cycle each scheduler issues at most one thing, chosen in this order:

1. a **full pair**: both warps of a pair are ready *and* at the same PC
   (round-robin among such pairs). 16 lanes busy.
2. a **single warp**: any pair with a ready warp (round-robin); if both
   warps of that pair are ready but at different PCs, the even and the odd
   warp take turns. 8 lanes busy, the other 8 idle with their operand
   registers frozen.
3. the **oldest scalar-wave** of the scheduler's SWST. One lane per member
   warp.

So up to four instructions (one per scheduler) issue per cycle and up to 64
warp-instructions' worth of lanes are busy.

A warp is *ready* when its next instruction is in Instruction Storage, is not
scalar, and has no register hazard. A warp whose next instruction is scalar
and hazard-free is a *scalar candidate* instead; it never issues that
instruction on its own, only as a member of a wave (a wave of one is
allowed).

## Scalar-waves: the hardest part

Scalar-waves involve four blocks at once, and their timing is what the rest
of the design is built around.

**Formation (`gw_swfu`).** The Scalar-Wave Status Table has four entries per
scheduler; the entry index is the wave's *SWID*. An entry holds a PC, a Valid
bit, a 16-bit SW-Mask (one bit per warp of the scheduler) and an Issued bit.
In every cycle, each scalar candidate:

* joins a valid, not yet issued entry with its PC (sets its mask bit), or
* if no entry matches: the lowest-numbered such candidate allocates the
  lowest free entry, and every other unmatched candidate at the same PC
  joins the new entry in the same cycle, or
* if the table is full, waits (and retries next cycle).

A warp that has joined is marked *SW-Valid* in the Warp Status Table and
stays out of both the ready and the candidate sets until its wave issues. An
entry that has been issued accepts no more members; later warps at the same
PC start a new wave.

**Issue.** When a scheduler has no ready warp, it issues the oldest valid,
not issued entry (ages are kept in a small age matrix). The Issued bit is
set, the wave's members are released from SW-Valid, and each member warp's
next PC is computed and looked up like after any other issue.

**Scoreboarding (`gw_scoreboard`).** Issuing a wave creates an entry in the
Scalar-Wave Scoreboard, indexed by SWID: the wave's mask, split into its
even-warp and odd-warp halves, and its destination register. Any warp in the
mask sees that destination as pending, exactly as if it were in its own warp
scoreboard entry. When the wave writes back, the SWID clears the
scoreboard entry and frees the SWST entry. The warp scoreboard, next to it,
holds up to two pending destinations per warp; a third write stalls the warp.

**Operands and results (`gw_regfile`).** The scalar register file is
organised by scheduler: scalar register `sN` is one entry of 16 words, word
`i` belonging to local warp `i`. A wave reads `sN` and gets the operand of
every member on the member's own lane, in one access. A vector source read by
a wave gives lane 0 of each member warp. A wave result with a scalar
destination writes each member's word of the entry; with a vector destination
it is broadcast to all eight lanes of each member warp. Ordinary warp
instructions see scalar registers as a broadcast of their own word, and a
warp instruction with a scalar destination writes the value of its first
lane.

## Decoded-instruction reuse and the front end

**Instruction Storage (`gw_inst_storage`).** 16 sets x 3 ways = 48
entries. An entry holds two consecutive decoded instructions (PC bit 0
selects which), a tag, a Valid bit, a Scalar bit per instruction and a
reference counter. The size, 96 decoded instructions, is that of a
conventional per-warp instruction buffer of two instructions for 48 warps:
reuse is meant to come from sharing, not from more storage.

**Warp Status Table (`gw_wst`).** For each warp: PC, the pointer to its
entry, and a small state machine:

```
LOOKUP --hit-->  VALID --issue--> LOOKUP (next PC) ... --exit--> DONE
   |
   miss
   v
  RTF (ReadyToFetch) --fetch broadcast for its pair--> ICMISS --fill--> LOOKUP
```

After an issue the next PC is computed (branches resolve at issue, see
below), the old entry's reference counter is decremented and the new PC is
looked up. Each scheduler makes one lookup per cycle, round-robin over its
warps in LOOKUP; every warp waiting on that same PC is served by the one
lookup, and the counter rises by that number of warps.

**Fetch unit (`gw_fetch_unit`).** Only ReadyToFetch warps take part in fetch
arbitration (round-robin over all 64). While one of the two fetch buffers is
free, a new aligned instruction pair is requested every cycle. The chosen
block is broadcast: every ReadyToFetch warp of any scheduler waiting on it
moves to ICMISS, so a popular block is fetched once. When the block is
already in a buffer, the broadcast is made without a new request. Returned
words are decoded (`gw_decode`) into the buffer, then inserted into
Instruction Storage; the insert is broadcast as a fill, and waiting warps
look their PC up again.

**Replacement.** An insert takes the lowest invalid way of its set, else the
lowest way whose reference counter is zero and which is not being hit in
this cycle. If every way of the set is referenced, the insert waits in its
buffer until a warp moves on and releases an entry. Entries in use by a warp
are never replaced, so a warp's pointer stays valid until it issues.

## Execution

`gw_simd_unit` has 16 lanes and a latency of `LAT` = 2 cycles: operands are
registered at issue, results pass one more register stage, and one new issue
per cycle is accepted. Lanes not enabled keep their operand registers and
return zero (the idle half of a split pair). Write-back happens `LAT`
cycles after issue and frees the scoreboard entries.

Branches are decided at issue from the warp's lane-0 operand (for a wave,
from each member's own lane), so control flow must be uniform across the 8
threads of a warp. There is no reconvergence stack.

## Instruction set

The core runs its own 32-bit format (see `gw_pkg`):

| bits    | field | meaning |
|---------|-------|---------|
| 31      | S     | scalar instruction (set by the compiler for warp-uniform work) |
| 30:27   | op    | operation |
| 26:22   | dst   | {tag, index}; tag 1 = scalar register |
| 21:17   | src1  | {tag, index} |
| 16:12   | src2  | {tag, index} |
| 11:0    | imm   | sign-extended immediate, or branch target |

Operations: NOP, ADD, SUB, MUL, AND, OR, XOR, SLT (signed), ADDI, MOVI, WID
(global warp id, `get_warp_id`), LID (thread index in the warp,
`get_warp_local_id`), SIMDW (warp width, `get_simd_width`), BNZ/BZ (branch on
src1), EXIT. 16 vector and 16 scalar registers per warp; 10-bit PCs.

## What is and is not here

The core follows the architecture in its warp width (8), SIMD width (16),
number of schedulers (4), pairing of even and odd warps, issue priorities
(pair, then single, then oldest scalar-wave), the fields of Instruction
Storage, the Warp Status Table, the SWST and the two scoreboards, grouped
scalar registers covering 16 warps, and the fetch policy (only ReadyToFetch
warps, one fetch per cycle while a fetch buffer is free).

This design's own choices: the instruction set; 16 warps per scheduler;
Instruction Storage geometry (16 x 3), two fetch buffers, four SWST entries
per scheduler, SIMD latency 2; one Instruction Storage lookup per scheduler
per cycle; round-robin orders; replacement policy; register file layout
and lane mapping; branch handling at issue; one destination per scalar-wave
(the scalar-wave scoreboard has room for a second).

Not built: memory instructions and everything behind them (load/store unit,
L1 and shared memory, L2, memory partitions, crossbar), the special function
unit, the instruction cache (the core has a request/response port for it),
the reconvergence stack for divergent branches, and the "Master PC" column
of the Warp Status Table, whose use the architecture does not describe. A
full GPU of this kind has 14 such cores; one is built.

Consequences for trust: everything here has been simulated against
independent models (see below), but only with register-only kernels. The
performance of real graph workloads depends heavily on memory behaviour,
which this core cannot show.

## Parameters

| Where | Parameter | Default | |
|-------|-----------|---------|---|
| `gw_pkg` | `NUM_SCHED` | 4 | schedulers per core |
| `gw_pkg` | `WARP_WIDTH` | 8 | threads per warp |
| `gw_pkg` | `SIMD_WIDTH` | 16 | lanes per SIMD unit |
| `gw_pkg` | `WARPS_PER_SCHED` | 16 | warps per scheduler (64 per core) |
| `gw_sm` | `IS_SETS`, `IS_WAYS` | 16, 3 | Instruction Storage geometry |
| `gw_sm` | `NBUF` | 2 | fetch buffers |
| `gw_sm` | `NSW` | 4 | SWST entries per scheduler |
| `gw_sm` | `LAT` | 2 | SIMD unit latency |

`WARPS_PER_SCHED` is tied to the 16-bit wave masks and 16-word scalar
register entries; changing it means changing `SIMD_WIDTH` with it.

## Using the core

Load a program into the instruction cache behind `ic_req_*`/`ic_rsp_*`
(any latency, any order, tag returned with the data), pulse `start` with
`nwarps` = number of warps to launch (warps 0..nwarps-1, PC 0), and wait for
`idle`. Registers of any warp can be read through `dbg_gwid`/`dbg_reg`/
`dbg_data`. The `ev_*` outputs flag, per scheduler and cycle, pair / single /
wave issues, wave size, scoreboard stalls, waits for an SWST entry, storage
hits and misses, and in the front end new fetches, joined fetches and held
inserts.

## Testbenches

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gw_sm \
    -y rtl -y tb rtl/gw_pkg.sv tb/gw_tb_pkg.sv tb/tb_gw_sm.sv
obj_dir/Vtb_gw_sm
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_gw_sm` | whole core at default parameters: a vertex-centric kernel (scalar setup per vertex, an edge loop of data-dependent length 0..15, four code regions chosen by warp id that compete for one storage set) on 64 warps, then on 21 warps; every register written is compared with a sequential model of each warp; each mechanism (pair, single and wave issue, multi-warp waves, scoreboard stalls, storage hits and misses, fetches, joined fetches, held inserts, full SWST, four issues in a cycle) must occur |
| `tb_gw_inst_storage` | hits, pointers, data, reference counts, replacement and refusal against a way-exact model |
| `tb_gw_fetch_unit` | arbitration, no duplicate fetch, fetch-per-cycle rate while buffers are free, decoded inserts, all requests filled, bounded waiting; behavioural cache with random latency and back-pressure (`gw_icache_model`) |
| `tb_gw_wst` | per-warp state, PC, pointer, wave membership, lookup counts and releases against a model |
| `tb_gw_scoreboard` | hazards from warp and wave entries, two-destination limit |
| `tb_gw_swfu` | joins, allocation, waiting when full, oldest-first offer |
| `tb_gw_pair_scheduler` | issue priorities and fairness |
| `tb_gw_regfile` | every read and write kind lane by lane |
| `tb_gw_simd_unit` | every operation, lane enables and the `LAT`-cycle latency |
| `tb_gw_decode` | all fields of random words |

`gw_tb_pkg` holds the instruction encoder, the kernel and the reference
model of a warp.
