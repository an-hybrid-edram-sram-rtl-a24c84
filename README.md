# Hybrid SRAM/eDRAM first-level data cache

A set-associative L1 data cache in which every bit of the data array is
stored in a **macrocell**. An n-bit macrocell holds one static 6T bit and n-1
dynamic 1T1C bits. The static bit stores way 0 of the set, and the capacitors
store ways 1 to n-1. A one-transistor **bridge** copies the static bit into a
capacitor without using a bit line. Only the static cell leaks. A 4-way cache
built this way therefore leaks about a quarter as much as an all-SRAM cache,
and it uses 6 + 2×3 = 12 transistors per macrocell where four 6T cells need 24.

Dynamic cells have two drawbacks: a read destroys their contents, and their
charge leaks away. This cache has **no refresh logic**. It copes with both
drawbacks at the architecture level, in four ways:

* The most recently used (MRU) block of each set always lives in the static way.
* A dynamic way is read only after its tag has hit.
* A dynamic hit swaps the block into the static way. This rewrites the
  capacitors that were just read.
* A writeback policy makes sure that no dirty data is lost when a capacitor
  discharges.

The RTL here is the whole cache: controller, tag array, tag compare, row
decoder and interval counter, plus a cycle-level model of the macrocell rows.

## The macrocell and its model (`macrocell_row`)

Each row of the data array holds one cache line per way. All macrocells of a
row share three kinds of control line:

| line | what it does |
|------|--------------|
| `WL_s` | static wordline. Read and write through the bit-line pair, as in any SRAM. |
| `WL_d[w]` | dynamic wordline of way `w`. Connects the capacitors to the shared bit line `BLd`. |
| `S2D[w]` | bridge enable. Connects the static node to the capacitors of way `w`. |

The bridge only works in one direction, and it can only **discharge** a
capacitor. To copy a line into way `w`, the capacitors are first precharged
to 1 through `WL_d`/`BLd`. The bridge then pulls down the bits where the static
cell holds 0. Precharging first also keeps the static cell from flipping
during the transfer.

`macrocell_row` is a behavioural model. The real cell is analog, so this
module is not meant for silicon. It is written as clocked, two-state logic so
that it simulates and elaborates with the rest of the design:

* A static read is combinational and non-destructive.
* A dynamic read (`wl_d[w]`, no write) returns the line and marks the way as
  discharged. After that the way reads as zeros.
* A dynamic write (`wl_d[w] & d_we`) charges the way. Writing all ones is the
  precharge.
* `s2d[w]` in the same cycle as the precharge copies the static line into
  way `w`. `s2d[w]` alone computes `cap & static`.
* A way reads as zeros once `RETENTION_CYCLES` cycles have passed since its
  last write. Time is a shared cycle count kept in `hybrid_data_array`.
* Each dynamic way also has a **sentry** cell. This is a smaller capacitor
  that acts as the way's valid bit. It is charged together with the way and
  lost after `SENTRY_RETENTION_CYCLES` cycles (shorter than the data
  retention) or when the way is read.

`row_decoder` turns the set index into a row select and gates `WL_s`, `WL_d`
and `S2D` with it. `hybrid_data_array` is the decoder, one `macrocell_row`
per set, and the read multiplexers of the shared bit lines.

## Keeping the MRU block static (`cache_controller`, `way_lookup`)

In the request cycle the cache reads all tags of the set and the static line
together. Then one of three things happens:

| case | cycles to data | what happens |
|------|----------------|--------------|
| static hit | 1 | The word comes from the static line. A store writes the static line in the same cycle. No capacitor is touched. |
| dynamic hit | 1 + `DYN_ACCESS_CYCLES` | Cycle 1 is only the tag check. The dynamic way is then read, which destroys it, into the **intermediate buffer**, and the word is returned from there. Two more cycles finish the swap: (a) precharge + `S2D` moves the static line into the way just read; (b) the buffer, with any store data merged in, is written into the static way. The cache accepts a new request 4 cycles after the hit was accepted, or 3 + `DYN_ACCESS_CYCLES` in general. |
| miss | L2 latency + about 4 | The victim is a non-MRU entry. If it is dirty, it is read and written back (a *replacement* writeback). The static line moves into the victim's dynamic way through the bridge. The line from L2 is written into the static way. |

**Tags never move.** The tag array uses ordinary static cells, so reading it
is harmless. Each tag entry has a `ptr` field of log2(WAYS) bits that names
the data way holding its block. A swap or a fill only exchanges the `ptr`
values of two entries. The `ptr` fields of a set are always a permutation of
0..WAYS-1, and `tag_array` asserts this on every write. The entry with
`ptr == 0` is the MRU one. A separate `age` field gives the LRU order among
the other entries.

`way_lookup` decides whether an entry is *present*:

* an entry in the static way is present when it is valid;
* an entry in a dynamic way is present when it is valid and either its
  sentry is still charged or it is dirty.

Dirty dynamic blocks are protected by the interval counter (next section), so
they are trusted even after the smaller sentry capacitor has discharged. A
valid, clean entry whose sentry has died counts as a miss. This raises the
`sentry_expired` event, and the entry becomes the preferred victim, so a tag
is never held twice.

## Surviving without refresh: the two writeback policies

The writeback policy is chosen with `POLICY` (`hdc_pkg::wb_policy_e`).

**Delayed writeback (`WB_DELAYED`, default).** Dirty blocks may move into
dynamic ways. `interval_counter` is a single counter that counts down every
cycle. It is reloaded with

    INTERVAL = RETENTION_CYCLES / (SETS × (WAYS-1))

which is 50000 / 192 = 260 cycles at the default size. Each time it reaches
zero, one more dynamic block is owed a check. Blocks are visited in circular
order: set 0 ways 1..3, then set 1, and so on. A full sweep therefore takes
at most `RETENTION_CYCLES` cycles. The controller serves an owed check before
it takes a new request. If the block is dirty, the controller reads it, sends
it to L2 (a *sporadic* writeback) and invalidates it, because the read
destroyed it. The counter keeps running while the controller is busy and
counts unserved checks (up to 15), so a busy period delays a check but does
not shift the schedule.

This guarantee has a margin. A dirty block is safe only if the cells hold
their charge for one full sweep plus the longest time a check can wait. That
wait is a miss with a writeback: about 20 cycles plus the L2 latency. At the
default size the sweep is 49,920 cycles against a retention of 50,000, which
leaves 80 cycles. `RETENTION_CYCLES` sets the counter. `CELL_RETENTION_CYCLES`
sets how long the modelled capacitors actually hold their charge, and it
defaults to the same value. The reduced-size tests give the cells about 10%
more retention than the counter assumes.

**Early writeback (`WB_EARLY`).** Before a dirty static line is moved into a
dynamic way, it is written back, so dynamic ways only ever hold clean data.
The writeback counts as a *replacement* writeback when a miss moves the line,
and as a *swap* writeback when a dynamic hit does. The interval counter is
switched off.

`wb_kind` on the L2 port and the `ev` pulses tell the three kinds of
writeback apart.

## Interfaces and parameters (`hybrid_l1_cache`)

All ports are active high, except `rst_n` (asynchronous, active low).

* **Processor side:**
  * `req_valid`/`req_ready`, `req_we`, `req_addr`, `req_wdata` (one 64-bit
    word) and `req_wstrb`.
  * `resp_valid` is a one-cycle pulse for both loads and stores, with
    `resp_rdata` for loads.
* **L2 fill:** `fill_req_valid`/`fill_req_ready` with a line address, then
  `fill_resp_valid` with the whole line.
* **L2 writeback:** `wb_valid`/`wb_ready`, `wb_addr`, `wb_data` and `wb_kind`.
* **`ev` (`hdc_events_t`):** one-cycle pulses for static hit, dynamic hit,
  miss, bridge move, each writeback kind, interval check and expired sentry.

| parameter | default | meaning |
|-----------|---------|---------|
| `WAYS` | 4 | ways = bits per macrocell (1 static + WAYS-1 dynamic) |
| `CACHE_BYTES` | 16384 | capacity |
| `LINE_BYTES` | 64 | line size |
| `WORD_BYTES`, `ADDR_W` | 8, 32 | processor word and address width |
| `DYN_ACCESS_CYCLES` | 1 | dynamic data access time (2 is the slower variant) |
| `RETENTION_CYCLES` | 50000 | retention time the interval counter is built for |
| `SENTRY_RETENTION_CYCLES` | 45000 | life of a sentry cell (model) |
| `CELL_RETENTION_CYCLES` | = `RETENTION_CYCLES` | life of the data capacitors (model) |
| `POLICY` | `WB_DELAYED` | writeback policy |

At the defaults the cache has 64 sets. Each set has 4 tag entries with 20-bit
tags and 512-bit rows: 1 static line and 3 dynamic lines.

## What follows the original proposal and what is this design's own

These parts follow the original proposal:

* the macrocell organisation;
* the precharge-then-bridge transfer;
* way 0 as the static, MRU way;
* a dynamic access only after a tag hit, with its extra tag cycle;
* the three-step swap through a buffer, and the early return of data from it;
* tag-to-data pointers instead of moving tags;
* the sentry valid bits;
* both writeback policies;
* the global interval counter with its reload value and circular sweep;
* the main configuration: 16 KB, 4 ways, 64-byte lines, a 50K-cycle retention
  and the delayed policy.

These parts are this design's own choices:

* all handshakes, and sending a response for stores;
* word and address widths;
* LRU replacement with invalid or lost entries chosen first;
* doing the miss steps one after the other (writeback, move, fill) rather
  than overlapping them;
* precharge and bridge in the same clock cycle;
* serving owed checks before new requests, and counting unserved checks;
* invalidating a block after a sporadic writeback;
* trusting dirty dynamic blocks whose sentry has discharged;
* the sentry retention value;
* the cycle-based leakage model, in which lost charge reads as 0.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/hdc_pkg.sv tb/tb_mem_pkg.sv tb/tb_hybrid_l1_cache.sv \
      --top-module tb_hybrid_l1_cache
    ./obj_dir/Vtb_hybrid_l1_cache

The system-level testbenches are:

* **`tb_hybrid_l1_cache`** runs six caches side by side, each with 4,000
  random loads and stores, long idle stretches and short retention times
  (about 1,000 cycles). The six configurations are:
  * 2 KB, 4 ways, delayed policy, 1-cycle dynamic access;
  * 2 KB, 4 ways, early policy, 2-cycle dynamic access;
  * 2 KB, 2 ways, delayed policy;
  * 2 KB, 2 ways, early policy;
  * 32 KB, 4 ways, delayed policy;
  * 32 KB, 2 ways, delayed policy.

  Every load is checked against a reference memory.
  Static and dynamic hit latencies are checked cycle-exactly. Each mechanism
  is counted, and any mechanism that should occur but does not is a failure.
* **`tb_hybrid_l1_cache_full`** runs the same kind of traffic on the cache
  with all defaults. It includes two 60,000-cycle idle periods, so sentries
  expire and sporadic writebacks occur. It runs in a few seconds.
* **`tb_cache_controller`** walks one set through every sequence and checks
  the exact latencies, the busy time and the written-back data.

`tb/l2_model.sv` is a behavioural L2 with a 10-cycle fill latency.
`tb/cache_lane.sv` is the traffic generator and checker. `tb_mem_pkg`
defines the initial memory contents, which are a fixed function of the
address.

## Limits

* `macrocell_row` is a model, not a circuit. It has no voltages, boosted
  wordlines or timing inside a cycle. `hybrid_data_array` inherits this: it
  synthesises to flip-flops plus counters that emulate leakage.
* The processor and the L2 are outside the design. Only their ports exist
  here.
* The design was checked only with the testbenches above. Only the default
  configuration was simulated at its real 50,000-cycle retention. The 2-way
  and 32 KB organisations were simulated with retention times of about
  1,000 cycles.
* A very short `RETENTION_CYCLES` makes `INTERVAL` fall below 1 (it is
  clamped to 1). For example, 100 cycles spread over 192 dynamic blocks is
  not enough. The delayed policy then cannot protect dirty data.
