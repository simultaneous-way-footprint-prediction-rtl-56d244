# Way-footprint prediction for a set-associative instruction cache

A 4-way set-associative instruction cache normally reads the tag and data
arrays of all four ways on every fetch and then throws three of them away.
If the front end knew beforehand which way holds the line, it could switch on
only that way's subarrays, at roughly 29 % of the energy of a full access.

This design gets that knowledge almost for free from the branch predictor.
The branch predictor already maps the current fetch address to the *next*
fetch address every cycle. Here it also predicts the **way-footprint** of
the next fetch, meaning the cache way that fetch will hit. The footprints are
kept in three places:

* a **Way-Footprint Table (WFT)** laid out exactly like the BTB (same sets,
  same ways). It has no tags of its own: a BTB hit in entry *(way, set)*
  selects WFT entry *(way, set)*. Each entry stores two footprints, one for
  the branch target and one for the fall-through path, and the predicted
  direction picks between them.
* the **return address stack**, whose entries hold *(return address,
  footprint)*.
* the **way-footprint queue**, which records the way that actually served
  each fetch and writes it back into the WFT and the RAS once the
  instructions commit.

The RTL covers the complete instruction fetch front end: fetch control, the
way-selective cache, BTB, WFT, the combined direction predictor, the RAS, the
queue and its update logic, and the three BTB allocation policies (TB, AB,
AFA). The out-of-order core and the L2 cache are not included. The front end
exposes a commit port and a refill port for them.

## Footprint encoding

A footprint for an *n*-way cache takes *n* + 1 values: one per way, plus "all
ways". It therefore needs clog2(*n* + 1) bits, which is 3 bits for 4 ways.
Codes 0 to 3 name a way. Code 4 (`WF_ALL`) means all ways. The unused codes
5 to 7 are read as all-way. All of this is in `rtl/wfp_pkg.sv`.

## One fetch, cycle by cycle

The front end fetches one instruction (4 bytes) per cycle. The fetch
register holds `pc_q` and `wf_q`, the footprint predicted for `pc_q` in the
previous cycle. In each cycle:

1. **Predict** (`fetch_predictor`, combinational from `pc_q`). The BTB and
   the WFT are read in parallel with the same set index.

   | BTB result                     | next address           | next footprint                 |
   |--------------------------------|------------------------|--------------------------------|
   | miss                           | pc + 4                 | all-way                        |
   | conditional, BDP says taken    | BTB target             | WFT target field               |
   | conditional, BDP says not taken| pc + 4                 | WFT fall-through field         |
   | jump / call                    | BTB target             | WFT target field (call pushes pc+4 on the RAS) |
   | return                         | RAS top address        | RAS top footprint (pop)        |
   | other (AFA entry)              | stored target (= pc+4) | WFT fall-through field         |

2. **Access** (`icache`). The footprint `wf_q` enables one way bank or all
   of them. Only enabled banks take part in the tag compare.
   * **Hit**: the instruction goes out on `f_valid/f_pc/f_instr/f_pred_pc`.
     The fetch is recorded in the way-footprint queue together with the way
     that hit. `pc_q, wf_q` take the prediction.
   * **Miss in a one-way access**: the footprint was wrong, or the line has
     moved to another way. The same address is accessed again all-way in
     the next cycle. This costs one cycle.
   * **Miss in an all-way access**: `mem_req` is raised with the line
     address. A one-cycle `mem_resp_valid` brings the 32-byte line, which is
     written into the LRU way. The access is then repeated.

   Both kinds of miss mark the fetch `isCacheMiss`, and that forces a WFT
   correction later.
3. Fetch holds, with no cache access, while `f_ready` is low or the queue is
   full.
4. A committed misprediction (`cm.valid && cm.miss_pred`) has priority. Fetch
   restarts at `cm.next_pc` with an all-way access.

## How footprints are learned: the way-footprint queue

This is the subtle part of the design. A footprint is only known after the
fetch has finished, and it may be written into the WFT only after the
instructions involved have committed. Otherwise wrong-path fetches would
pollute the table.

`wf_queue` is a circular buffer of `wfq_entry_t`:

| field             | written when                       |
|-------------------|------------------------------------|
| `addr`, `wf`, `is_cache_miss` | the fetch finishes (at the tail) |
| `is_call`, `is_btb_alloc`, `is_br_miss_pred`, `is_taken` | the instruction commits |

* Entries from `u_head` to the tail are uncommitted fetches.
* When an instruction commits and its address equals `u_head.addr`, the
  commit flags are written into that entry and `u_head` advances.
* The two entries just behind `u_head` are **c_1**, the last committed
  fetch, and **c_2**, the one committed before it. They are never
  overwritten while they hold these roles, so the queue takes at most
  DEPTH − 2 uncommitted fetches.
* A committed misprediction discards every uncommitted entry, in the same
  cycle as the pipeline flush.

In the cycle after each commit, `wf_update_ctrl` looks at the pair. The
instruction after c_2 was fetched with footprint `c_1.wf`, so that is what
the WFT should predict for c_2's address:

* **WFT write** if `c_1.isCacheMiss`, or `c_2.isBrMissPred`, or
  `c_2.isBTBalloc`. The write goes to the entry of `c_2.addr`, in the target
  field if `c_2.isTaken` and otherwise in the fall-through field, with value
  `c_1.wf`. A second tag probe of the BTB finds the way that holds
  `c_2.addr`. If the address is no longer in the BTB, nothing is written.
  For a newly allocated entry, the other field is reset to all-way, so a
  footprint left behind by the entry's previous owner is never used.
* **RAS write** if `c_2.isCall`. The instruction after the call is the
  callee, so `c_1.wf` is no use here. The return address `c_2.addr + 4` is
  normally in the same cache line as the call, and therefore in the same
  way, so its RAS entry takes `c_2.wf`. If the call is the last instruction
  of its 32-byte line, the return address is in the next line and the entry
  gets all-way. The RAS entry is found by searching for the return address
  from the top down.

Example. The branch at A is taken to T. T misses in the predicted way and
is fetched from way 2. A commits, then T commits. In the next cycle c_2 = A
(taken) and c_1 = T (isCacheMiss, wf = 2), so the WFT target field of A's
entry becomes 2. The next time fetch reaches A, the BTB hits, the BDP says
taken, and the fetch of T enables only way 2.

## BTB allocation policies

A footprint can only be predicted when the BTB hits. Who gets a BTB entry
therefore decides how often a one-way access is possible. `policy` is a
run-time input to the top, and `btb_alloc_policy` applies it at commit to
instructions that miss in the BTB:

| `policy` | name | allocates for                          |
|----------|------|----------------------------------------|
| 0        | TB   | taken branches                         |
| 1        | AB   | any branch                             |
| 2        | AFA  | any fetch address, non-branches included |

Entries for not-taken branches and non-branches store pc + 4 as their
target. The prediction for them is the same as for a BTB miss, except that
it now comes with a footprint. Under TB, only fetches right after a taken
branch or a return can be one-way. Under AFA, nearly every fetch in a
working set that fits the BTB can be one-way, at the price of BTB capacity
that would otherwise hold taken branches.

## Direction predictor and BTB details

* **BTB** (`btb`): 2048 entries, 4 ways, 512 sets. The index is bits
  [10:2] and the tag is bits [31:11] (21 bits). Each entry holds valid, tag,
  target and instruction kind. Replacement is LRU, with invalid ways used
  first. At commit, a BTB hit on a taken branch rewrites the target.
* **BDP** (`bdp`): a combined predictor with 2-bit counters.
  * a 4K-entry bimodal table indexed by the address;
  * a 4K-entry global table indexed by a 12-bit global history;
  * a 4K-entry chooser indexed by the address. A chooser value of 2 or more
    selects the global table. The chooser trains toward whichever component
    alone was right.

  Training and the history shift happen at commit. Only conditional
  branches that have, or are just getting, a BTB entry train it.
* **RAS** (`ras`): 32 entries, circular.
  * A predicted call pushes pc + 4 with an all-way footprint. A predicted
    return pops.
  * A committed misprediction resets the pointer to the committed pointer.
    If the mispredicted instruction is a call, its return address is pushed
    at the same time.

## Interfaces of the top (`wfp_frontend`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `policy` | in | `alloc_policy_e`: TB / AB / AFA |
| `f_valid`, `f_pc`, `f_instr`, `f_pred_pc` | out | delivered instruction and its predicted successor |
| `f_ready` | in | back end accepts an instruction this cycle |
| `cm` | in | `commit_t`: `valid, pc, kind, taken, next_pc, miss_pred` for the committed instruction, at most one per cycle, in program order |
| `mem_req`, `mem_addr` | out | line refill request (held) and line address |
| `mem_resp_valid`, `mem_resp_line` | in | one-cycle response carrying the 256-bit line |
| `ic_way_en` | out | way banks enabled this cycle |
| `perf` | out | `perf_t` event counters: fetches, one-way and all-way accesses, WFT reads, way replays, refills, BTB allocations, WFT updates, RAS footprint updates, RAS predictions, flushes, stall cycles |

The back end must report a misprediction when `next_pc` differs from the
`f_pred_pc` delivered with that instruction. It must also drop everything
younger than the mispredicted instruction. `kind` uses `br_kind_e`:
`K_OTHER`, `K_COND`, `K_JUMP`, `K_CALL`, `K_RET`.

Assertions in the RTL check three rules. The refill request and its
address stay stable until the response arrives. Every commit matches the
head of the way-footprint queue. The queue never holds more than DEPTH − 2
uncommitted entries. Simulate with `--assert` to enable them.

All reads are combinational from registered state, and all updates take
effect at the next rising edge. The prediction made in cycle *t* is used by
the access in cycle *t* + 1. The WFT and RAS writes for a commit in cycle *t*
happen at the end of cycle *t* + 1.

## Parameters

| parameter (module) | default | origin |
|--------------------|---------|--------|
| `BTB_ENTRIES`, `BTB_WAYS` | 2048, 4 | system configuration of the scheme |
| `RAS_DEPTH` | 32 | system configuration |
| `BIM_ENTRIES`, `CHO_ENTRIES`, `HIST_W` | 4096, 4096, 12 | system configuration |
| `IC_SIZE`; `IC_WAYS`, `LINE_BYTES` (`wfp_pkg`) | 32768; 4, 32 | system configuration |
| `WFQ_DEPTH` | 128 | own choice: covers a 16-entry fetch queue plus a 64-entry instruction window |
| `RESET_PC` | 0 | own choice |

The WFT always has the BTB's geometry (512 × 4 entries of 2 × 3 bits).

## Where this RTL departs from, or adds to, the scheme

* **One instruction per fetch.** The scheme works per fetch address and
  matches commits to fetch addresses one instruction at a time, so this
  implementation fetches one instruction per cycle. A wider fetch group,
  with one footprint per cache line fetched, is not implemented.
* **Wrong footprints** cost one cycle: the access is repeated all-way. Such
  a fetch also counts as a cache miss for the WFT update rule, so the WFT is
  corrected.
* **Own choices** where the scheme leaves details open:
  * the instruction-kind field in the BTB;
  * LRU replacement in the BTB and the cache;
  * initial values of the tables (all-way footprints, weakly-not-taken
    counters);
  * the RAS search and pointer recovery;
  * the refill handshake;
  * the queue depth.
* **Subarrays.** The cache's physical partitioning (eight data and two tag
  subarrays, with a one-way access touching two data subarrays and one tag
  subarray) is represented by one enabled bank per way.
* **Tables are reset.** The BTB valid bits, the WFT, the BDP tables and the
  LRU state are cleared by the reset in a single cycle. This keeps simulation
  deterministic, but it turns these tables into flip-flop arrays in
  synthesis, and synthesis of the top is slow. A silicon version would use
  SRAM macros with a sequenced clear.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_btb` | fill / LRU eviction by hand, then 3000 random lookups and allocations against a reference model |
| `tb_wft` | reset value, field selection, clear-other, random writes and reads against a reference array |
| `tb_bdp` | reference model of all three tables on every prediction; learns an always-taken branch and an alternating one |
| `tb_ras` | push, pop, update by address, overflow wrap, recovery, mispredicted-call push |
| `tb_wf_queue` | address-matched commit, c_1 / c_2 shift, update pulse one cycle later, flush with a same-cycle wrong-path enqueue, full |
| `tb_wf_update_ctrl` | 4000 random entry pairs against the update rules, including the line-end call |
| `tb_btb_alloc_policy` | exhaustive truth table of the three policies |
| `tb_icache` | one-way and all-way hits, wrong-way miss, bank enables, LRU, 3000 random accesses against a reference |
| `tb_fetch_predictor` | predictions after allocation, WFT and RAS updates, direction learning, policies |
| `tb_wfp_frontend` | the whole front end at default sizes (details below) |

`tb_wfp_frontend` runs a generated program with a behavioural back end and
memory in the testbench:

* The program is a main loop that calls 13 functions, about 6 KB of hot
  code, plus 6 functions placed 8 KB apart. Those 6 fall into the same cache
  sets and evict hot lines on every pass.
* The back end has a 16-entry queue, a fetch-to-commit latency of at least
  5 cycles, random commit stalls, and misprediction detection at commit.
* The memory answers a refill request after 8 cycles.

The program runs for 300,000 committed instructions under each policy. The
testbench checks that:

* every delivered word matches the program;
* every committed instruction lies on the architectural path;
* the access counts add up;
* every mechanism occurs at least once: one-way access, all-way access, way
  replay, refill, BTB allocation, WFT update, RAS footprint update, return
  from RAS, flush, stall and policy switch;
* AFA gives a higher one-way rate and lower energy than TB.

The energy estimate uses per-access costs of 1 (all-way), 0.2896 (one-way)
and 0.054 (WFT read), relative to a cache that always reads all ways. A
typical run gives:

| policy | one-way accesses | normalized hit energy |
|--------|------------------|-----------------------|
| TB     | ≈ 20 %           | ≈ 0.91 |
| AB     | ≈ 20 %           | ≈ 0.92 |
| AFA    | ≈ 92 %           | ≈ 0.40 |

For SPEC95, the savings reported for this scheme are 29 %, 33 % and 62 %.
The synthetic program has fewer branches per instruction than those
benchmarks, which explains the lower TB/AB figures. The AFA figure agrees
closely.

For each module, a copy with one deliberate bug was used to confirm that its
testbench fails.

## Simulating

Each testbench is a top with no ports. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/wfp_pkg.sv tb/tb_wfp_frontend.sv \
          --top-module tb_wfp_frontend -Mdir obj_frontend
./obj_frontend/Vtb_wfp_frontend
```

Replace the testbench name to run any other. The package must be listed
first; the remaining modules are found through `-Irtl`. The end-to-end test
takes a few seconds. The unit tests override parameters to use small tables.

## Files

```
rtl/wfp_pkg.sv           types: footprint, branch kind, policy, queue entry, commit, counters
rtl/wfp_frontend.sv      top: fetch control, refill, counters
  rtl/icache.sv          way-selective instruction cache
  rtl/fetch_predictor.sv next address + footprint prediction, commit-side training
    rtl/btb.sv           branch target buffer
    rtl/wft.sv           way-footprint table
    rtl/bdp.sv           combined direction predictor
    rtl/ras.sv           return address stack with footprints
    rtl/btb_alloc_policy.sv  TB / AB / AFA decision
  rtl/wf_queue.sv        way-footprint queue with c_1 / c_2
  rtl/wf_update_ctrl.sv  WFT / RAS update decision
tb/tb_*.sv               one self-checking testbench per module
```
