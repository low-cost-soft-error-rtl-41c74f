# Turnstile: detection-latency-aware store gating and region recovery

Acoustic particle-strike sensors can tell a core that a soft error happened,
but only some cycles after the strike. The worst-case detection latency (WCDL)
is a few tens of cycles. A core that lets results leave while such an alarm
may still come can no longer be repaired: a corrupted store may already be in
the cache, or the register state you would roll back to may itself be wrong.

Turnstile solves this with a small amount of hardware beside the reorder
buffer and a compiler that shapes the program:

* The compiler cuts the program into short **regions**. Each region ends with a
  **region boundary** instruction. It caps the number of stores per region at
  half the store-queue size. It also adds **checkpoint stores**, which copy
  each live register to a fixed memory slot.
* Every committed store, checkpoint stores included, waits in a **gated store
  queue (GSQ)** and is not written to the data cache.
* A region is **verified** when WCDL cycles have passed since its boundary
  committed with no alarm. Any strike inside the region would have been
  reported by then. Only then are its stores released to the cache. This also
  makes its register checkpoints in memory trustworthy.
* The boundary PC of the most recently verified region is kept in the
  **recovery PC (RP)** register.
* On an alarm, every unverified store is discarded. The registers are reloaded
  from their checkpoint slots, which now hold exactly the state at RP.
  Execution resumes at RP.

Registers and memory are therefore checked by the same mechanism. The register
file needs no protection of its own, and no store leaves the core unverified.

This repository holds the synthesizable hardware part of that scheme:

| module | role |
|---|---|
| `turnstile_top` | Connects the parts. Faces the core's commit stage, the L1 data-cache write port and the alarm input. |
| `rbb` | Region boundary buffer with the ToWait/HasWaited timing logic and the RP register. |
| `rbb_table` | Circular buffer holding the RBB entries. |
| `gsq` | Gated store queue: verified bits, squash, drain to the cache, store-to-load forwarding. |
| `recovery_ctrl` | After an alarm: waits for the verified stores to drain, reloads the checkpointed registers, redirects fetch. |
| `turnstile_pkg` | Shared constants and the `store_t` / `rbb_entry_t` structs. |

The out-of-order core, the sensors, the cache and the compiler are not part of
the RTL. See "What is not here".

## The region boundary buffer: verifying regions with one timer

This is the part of the design that takes the most thought.

**What must happen.** Suppose a region's boundary commits at cycle `b`. That
region may be released at cycle `b + WCDL` and not before. Boundaries arrive
at arbitrary intervals, and several regions can be waiting at once. One
obvious method stores a wide timestamp per region and compares all of them
every cycle. Turnstile instead uses a single down-counter for the oldest
waiting region. It also stores, for every younger region, how long it ran.

**The entry.** Each RBB entry holds three fields:

* `pc`: the PC of the boundary instruction.
* `gsq_ptr`: the GSQ tail pointer just after the region's last store.
* `rt`: the RegionTime, which is the region's length in cycles, capped at
  WCDL.

At the default sizes this is 32 + 6 + 5 = 43 bits. Fourteen entries make 602
bits.

**Two registers, one for the head region:**

* `ToWait` is the number of cycles the head region still has to wait. It counts
  down every cycle.
* `HasWaited` is how long the head region has waited already, but measured as
  of the last boundary. It does not tick. It changes only when a boundary
  arrives or an entry retires.

Between events, `HasWaited + ToWait` is therefore constant. Whatever
`HasWaited + ToWait` falls short of WCDL is the time since the last boundary.

**At a boundary:**

```
RegionTime = WCDL - HasWaited - ToWait   (cycles since the previous boundary, at most WCDL)
HasWaited  = WCDL - ToWait
push (bnd_pc, gsq_tail_after_this_cycle, RegionTime)
```

If the buffer was empty, the new entry becomes the head at once. ToWait is
then loaded with its RegionTime, which is WCDL after an idle stretch, and
HasWaited with 0.

**When ToWait reaches 0** and an entry is present, the head region is
verified:

```
RP        = head.pc
GSQ: mark every entry before head.gsq_ptr verified
pop head
ToWait    = new_head.rt          (Axiom: the next region ends exactly rt cycles later)
HasWaited = HasWaited - new_head.rt
```

A region that ran `rt` cycles after its predecessor's boundary becomes
releasable exactly `rt` cycles after the predecessor. Invariant: HasWaited
always equals the sum of the RegionTimes of the entries behind the head. Both
registers need only `clog2(WCDL+1)` bits, which is 5 bits for WCDL 30.

**Worked timeline (WCDL = 10).** Boundaries r1..r4 commit at cycles 0, 5, 8
and 13. A strike happens in r4, and the alarm comes at cycle 21. The values
are those seen during each cycle, before that cycle's update. `tb_rbb`
replays this timeline and checks every value in the table.

| cycle | event | ToWait | HasWaited | RegionTime written | RP after |
|---|---|---|---|---|---|
| 0  | boundary r1 (buffer empty) | 0 | 0 | 10 | reset PC |
| 5  | boundary r2 | 5 | 0 → 5 | 10-0-5 = 5 | |
| 8  | boundary r3 | 2 | 5 → 8 | 10-5-2 = 3 | |
| 10 | ToWait = 0: r1 verified, r2 becomes head | 0 → 5 | 8 → 3 | | r1 |
| 13 | boundary r4 | 2 | 3 → 8 | 10-3-2 = 5 | |
| 15 | r2 verified | 0 → 3 | 8 → 5 | | r2 |
| 18 | r3 verified | 0 → 5 | 5 → 0 | | r3 |
| 21 | alarm: RBB emptied, GSQ squashed | 2 → 0 | 0 | | r3 |

Each region is released exactly WCDL cycles after its boundary: r1 at 0+10,
r2 at 5+10, r3 at 8+10. Recovery restarts after r3, so only r4 runs again.

**Register timing.** A reload "to V" appears in the register as V−1 in the
next cycle, because the timer keeps counting during the cycle of the reload.
With this convention the `to_wait` output reads exactly the values in the
table above. A region whose boundary commits in cycle `b` raises `ver_valid`
in cycle `b + WCDL`.

**Corner cases (this design's choices):**

* A boundary and a retirement in the same cycle are both handled. The
  RegionTime is computed from the pre-update registers, and the retirement's
  reload uses the pushed entry if it becomes the new head.
* An alarm in the same cycle as ToWait reaching 0 wins: the head is *not*
  verified. The strike might have been in that region.
* After an alarm the buffer is empty. The next boundary gets RegionTime =
  WCDL, because the cycles since the alarm are not known to be error-free.
* When the buffer is full, `bnd_ready` goes low and the core must hold the
  boundary. At least one cycle passes between boundaries, so at most WCDL
  regions can be waiting. With WCDL ≤ 14 a 14-entry RBB never fills. With
  WCDL 30 it can fill, but only when regions are very short.
* Assertions check that RegionTime stays in [1, WCDL] and that HasWaited is 0
  whenever fewer than two entries are held.

## The gated store queue

`gsq` is a circular buffer of `store_t` (32-bit address, 32-bit data, 4 byte
enables) with a head, a tail and a **gate** pointer. The gate pointer marks
the oldest unverified entry. Each entry also has one verified bit.

* **Commit:** a store enters at the tail, unverified. `st_ready` is low when
  the queue is full, so commit stalls.
* **Verify:** `ver_valid` with `ver_ptr` (the retiring RBB entry's
  `gsq_ptr`) sets the verified bit of every entry from the gate up to, but not
  including, `ver_ptr`. The gate then moves to `ver_ptr`.
* **Drain:** while the head entry is verified it is offered on
  `wr_valid`/`wr`. It leaves when the cache raises `wr_ready`. The request
  stays stable until it is accepted, and an assertion checks this.
* **Squash:** the tail is set back to the gate, and all unverified entries
  disappear in one cycle. A store offered in the same cycle is dropped. The
  core is being flushed in that cycle anyway.
* **Forwarding:** a load address is searched against all held entries,
  verified or not. The youngest store to the same 32-bit word is returned with
  its byte enables. Merging partial matches with cache data is left to the
  core's load unit.
* `tail_next` is the tail *after* this cycle's store. The RBB records it at a
  boundary, so a store committed in the same cycle as the boundary belongs to
  the region the boundary closes.

Pointers are `clog2(DEPTH)` bits, which is 6 bits for 40 entries. A region
that filled all 40 entries would therefore look the same as an empty one. The
compiler's cap of DEPTH/2 stores per region rules this out, and an assertion
checks that a verification never covers more entries than are unverified.

## Recovery

`recovery_ctrl` is a five-state sequencer: IDLE → DRAIN → REQ ⇄ WAIT →
REDIRECT → IDLE.

1. **Alarm cycle.** `err_detect` empties the RBB and squashes the GSQ in the
   same cycle. `busy`, exported as `pipe_flush`, rises at once. The core must
   flush its pipeline and hold commit, and the top refuses stores and
   boundaries while `busy` is high.
2. **DRAIN.** Wait until the GSQ is empty. The stores left in it are all
   verified, and some of them may be the checkpoint stores that the reloads
   must see. Also wait until any reload abandoned by an earlier alarm has
   returned.
3. **REQ/WAIT.** For r = 0 … NUM_CKPT_REGS−1, issue a load of
   `ckpt_base + 4·r` on `rl_req_*`, wait for `rl_rsp_valid`, and write the
   value to register r through `rf_we/rf_waddr/rf_wdata`. One load is in
   flight at a time.
4. **REDIRECT.** Pulse `redirect_valid` for one cycle with `redirect_pc = RP`.

An alarm during a recovery restarts the sequence from step 1. RP cannot change
during recovery, because no boundary is accepted then. So a restarted recovery
returns to the same point, and the reloaded slots are those of the last
verified region.

`redirect_pc` is the PC of the boundary instruction that ended the last
verified region. The core resumes fetch at the instruction that follows it,
the first instruction of the region to re-execute. Whether the boundary
instruction itself is skipped or re-executed, as a harmless marker, is up to
the core.

## Interface and timing of `turnstile_top`

All flops use a synchronous, active-low reset `rst_n` on `clk`.

| group | signals | notes |
|---|---|---|
| alarm | `err_detect` | One-cycle pulse from the sensor array. |
| store commit | `st_valid`, `st_ready`, `st` (`store_t`) | At most one store per cycle. |
| boundary commit | `bnd_valid`, `bnd_ready`, `bnd_pc` | At most one per cycle. If a store commits in the same cycle, the store is taken as older. `bnd_ready` also waits for that store to be accepted. |
| forwarding | `ld_addr` → `fwd_hit`, `fwd` | Combinational. |
| cache write | `wr_valid`, `wr_ready`, `wr` | Valid/ready. Only verified stores, in commit order. |
| recovery | `pipe_flush`, `ckpt_base`, `rl_req_*`, `rl_rsp_*`, `rf_*`, `redirect_*` | See "Recovery". |
| status | `rp`, `to_wait`, `has_waited`, `ver_valid`, `rbb_count`, `gsq_count`, `gsq_ucount` | For observation and testing. |

The alarm affects the queues combinationally, in the cycle it is raised.
Verification takes effect in the cycle ToWait is 0. The verified store can
leave on `wr_valid` from the next cycle on.

Parameters (defaults in brackets):

* `WCDL` [30]: worst-case detection latency in cycles.
* `GSQ_DEPTH` [40]
* `RBB_DEPTH` [14]
* `NUM_CKPT_REGS` [15]: ARM r0–r14; the PC is restored by the redirect.
* `RESET_PC` [0x1000]: the value of RP before any region has been verified.

Address, data and PC widths are 32 bits, set in `turnstile_pkg`. The timer,
pointer and count widths follow from the parameters. The configurations the
scheme was evaluated with, WCDL 5/10/30/100 and GSQ 40/80/160, are all
reachable by parameters.

## Where this RTL departs from, or adds to, the scheme as published

* **Boundary at commit.** The published description allocates the RBB entry
  when the boundary instruction "executes" in one place, and when the reorder
  buffer reports it committed in another. This RTL uses commit, because only
  committed work may be verified.
* **HasWaited** is described as a counter. Here it is a register written only
  at boundaries and retirements, which is how the algorithm actually uses it.
  The worked example confirms this.
* **Not specified in the original, chosen here:**
  * the handshakes and the one-store/one-boundary-per-cycle commit width;
  * the same-cycle priorities: alarm over verification, and store before
    boundary;
  * stalling when the RBB is full;
  * the checkpoint slot layout `ckpt_base + 4·r` and the number of registers;
  * the restore load port and the wait for the GSQ to drain before reloading;
  * reset values;
  * forwarding at word granularity.
* **Assumed protected.** The scheme assumes the RBB, GSQ, timer and counter
  are protected against strikes themselves. This RTL adds no ECC or parity for
  that.

## Verification

Every testbench is self-checking, has a watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* `tb_rbb`: the worked timeline above at WCDL 10. It also runs the
  default-size RBB on random boundaries and alarms against a timestamp
  reference, which checks that every region is verified at exactly
  boundary + WCDL with its own PC and GSQ pointer.
* `tb_rbb_table`: random push/pop/flush against a queue model.
* `tb_gsq`: the testbench acts as the RBB. A reference queue predicts
  occupancy, drains, squashes and forwarding. It covers full stalls and a busy
  cache port.
* `tb_recovery_ctrl`: alarms, including alarms during recovery, against a
  memory model with random latency.
* `tb_turnstile_top`: the end-to-end test at the default sizes with no
  parameter overrides. `turnstile_core_model` runs a 400-region synthetic
  program with random strikes. After a strike, the stores the core commits
  carry corrupted data until recovery. `acoustic_sensor_model` raises the
  alarm 1..WCDL cycles after the strike. The test checks that:
  * no corrupted or unverified store reaches memory;
  * each region is verified exactly WCDL cycles after its boundary;
  * the restored registers equal the last verified checkpoints;
  * fetch resumes at RP;
  * the final memory equals an error-free run.

  It also counts 13 mechanisms and fails if any of them never happened:
  boundary, verification, drain, GSQ full, RBB full, store and boundary in the
  same cycle, boundary and verification in the same cycle, squash, restore,
  redirect, alarm during recovery, forwarding hit, busy cache port.
* `tb_turnstile_configs`: the same end-to-end test at these (WCDL, GSQ)
  settings: (5, 40), (10, 40), (100, 40), (10, 80) and (10, 160). The RBB has
  14 entries in all of them. The RBB only fills in the WCDL-100 case.

To run a test with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/turnstile_pkg.sv tb/tb_turnstile_top.sv --top-module tb_turnstile_top
./obj_dir/Vtb_turnstile_top
```

Replace the testbench name to run another test. The full-size test runs about
7000 cycles and finishes in well under a second.

## What is not here

* **The acoustic sensor array.** It is analog: cantilever sensors and their
  placement determine WCDL. Only a behavioural model exists, in
  `tb/acoustic_sensor_model.sv`.
* **The out-of-order core, its reorder buffer and pipeline flush, and the L1
  data cache.** These are the host into which this logic plugs. They appear
  only as ports and as a testbench model.
* **The gated I/O buffer** for uncached I/O stores. It is mentioned as a
  possible GSQ-like buffer, but it is not specified.
* **The compiler** (region formation, checkpoint insertion, loop
  optimisation). It is software. The hardware relies on two guarantees from
  it: at most GSQ_DEPTH/2 stores per region, and a checkpoint store for every
  register that is live into a later region.
