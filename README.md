# ROOW: a dual-mode store buffer for TSO cores

Under Total Store Order (TSO), a core's store buffer must write its stores to
the cache in program order. If the oldest store misses in the cache, every
store behind it waits, and a full store buffer then stalls the core.

Regional out-of-order writes (ROOW) relax this only where nobody can tell.
In a data-race-free program, code between two synchronization operations
(a *DRF region*) writes no location that another thread reads or writes at
the same time. Inside such a region, the order in which this thread's stores
reach the cache cannot be observed. The compiler marks these regions with a
one-bit instruction, `setDRF 1` / `setDRF 0`. The store buffer then runs in two
modes at once:

* **SYNC stores**, from synchronization code or unannotated code, write in
  program order, exactly as in a TSO store buffer.
* **DRF stores** may write out of order: a miss does not hold up the stores
  behind it.

The hardware cost is one processor flag bit, plus a mode bit and a fence bit
per store-buffer entry. This repository holds synthesizable SystemVerilog for
that store path, from commit to the L1 data cache. The L1 cache, its MSHRs
(miss status holding registers) and the core itself are outside it.

## Block structure

```
            commit (in order)                                   L1 data cache
  setDRF ──► roow_region_flag ──mode,fence──┐                  ┌───────────────┐
  fence  ──►                                ▼                  │               │
  store  ───────────────────────► roow_store_buffer ──issue──► roow_cache_pipe ──lookup──► hit?
  load search ◄── roow_sb_forward ◄──┤  (56 entries)  ◄─hit/miss/squash─┘      │
                                     │ roow_issue_select                      │
                                     └──────────◄── fill (miss completed) ────┘
```

| file | role |
|---|---|
| `rtl/roow_pkg.sv` | mode type (`MODE_SYNC`=0, `MODE_DRF`=1) and default sizes |
| `rtl/roow_region_flag.sv` | region flag, mode and fence bits for a committing store |
| `rtl/roow_store_buffer.sv` | circular buffer: insertion, per-entry state, squash/re-issue, retirement |
| `rtl/roow_issue_select.sv` | picks the next store to initiate, and applies the SYNC-miss and fence holds |
| `rtl/roow_sb_forward.sv` | associative store-to-load forwarding search |
| `rtl/roow_cache_pipe.sv` | 4-stage, one-store-per-cycle cache store pipeline, with the SYNC-miss squash |
| `rtl/roow_store_unit.sv` | top: the three blocks above wired together |

## How a store's mode is set

`roow_region_flag` holds the region flag. The flag resets to 0, so code that was
never annotated runs as plain TSO. When `setDRF v` commits, the flag becomes
`v`. Every store committed afterwards copies the flag into its entry's mode
bit. DRF and SYNC stores can therefore sit in the buffer side by side, each
tagged on its own.

Each committed `setDRF` also inserts a store-buffer *fence*
(`FENCE_ON_SETDRF = 1`, which puts a fence on every region boundary). An
explicit `fence_commit` does the same. This is how the variant with fences
only at aliasing boundaries is driven: set `FENCE_ON_SETDRF = 0` and let the
compiler emit the fences.

A fence is held as a pending bit and attached to the next store that enters
the buffer. That store may not start its cache write until every older store
in the buffer has performed. Because initiation is in order, all stores behind
it wait too.

## Ordering rules

This is the part that needs care. Every store carries three state bits:
`issued` (it is in the cache pipeline or the MSHRs), `performed` (its write is
done) and `mode`.

**Initiation is always in program order**, one store per cycle. The
candidate is the oldest store, counted from the head, that is neither issued
nor performed. It is held in two cases:

1. It is a SYNC store and a SYNC miss is outstanding.
2. It has its fence bit set and some older store has not performed yet.

A held store blocks everything younger than it. DRF stores therefore run
ahead only up to the first blocked store.

**A SYNC miss squashes younger SYNC stores.** Stores reach the cache in order,
but without help a younger SYNC hit would write before an older SYNC miss.
When a SYNC store misses in the last pipeline stage, `roow_cache_pipe` drops
every younger SYNC store still in the pipeline, and also one entering it that
cycle. It lists their slots on `squash_valid`/`squash_idx`. The buffer clears
their `issued` bits and records the missing slot. When the cache reports that
slot complete (`fill_valid`), the squashed stores are initiated again, in
order.

DRF stores in the pipeline are never squashed. A DRF miss triggers no squash
and holds nothing: the next DRF stores keep going, and several misses can be
outstanding at once.

**Stores to the same address stay in order.** This is the one rule that ROOW
leaves to the cache, so a user of this RTL must check that their L1 provides
it:

* Stores enter the cache pipeline in program order, so two hits write in
  order.
* If a store misses, a younger store to the same block must also miss.
* The MSHR must then complete the two in arrival order, for example by
  merging them into one entry.

Across a region boundary, the fence keeps stores to the same address in order.

**Retirement is in program order.** A store leaves only from the head and
only once it has performed:

* A performed SYNC head leaves at once, because its data is visible to the
  coherence protocol.
* A performed DRF head **stays**. It keeps answering loads, so the store
  buffer acts as a small cache at no extra cost, since within a DRF region no
  other core writes that data.
* A performed DRF head leaves when a new store is waiting at a full buffer.
  The store then enters in the same cycle. It also leaves when a performed
  SYNC store is waiting behind it, so that SYNC stores go as soon as in-order
  retirement allows. That second case is this design's choice.

**Load forwarding.** `roow_sb_forward` returns the youngest buffered store
that overlaps the load. Insertion and retirement are in program order, so the
youngest match is the latest store to that location, even though DRF writes
reached the cache out of order. If that store supplies every byte the load
asks for, the result is `ld_fwd_hit` with its data. If it supplies only some
of them, the result is `ld_fwd_partial`: the load must wait. Bytes are not
merged across several stores.

## Interface and timing (`roow_store_unit`)

| group | signals | timing |
|---|---|---|
| commit | `st_valid`/`st_ready`, `st_addr` (word address), `st_data`, `st_be` | one store per cycle; `st_ready` is low only when the buffer is full and its head cannot leave |
| region | `setdrf_commit`, `setdrf_val`, `fence_commit` | one-cycle pulses at commit; a store in the same cycle counts as younger |
| load | `ld_valid`, `ld_addr`, `ld_be` → `ld_fwd_hit`, `ld_fwd_partial`, `ld_fwd_data`, `ld_fwd_idx` | combinational, same cycle |
| L1 lookup | `lk_valid`, `lk_idx`, `lk_mode`, `lk_addr`, `lk_data`, `lk_be` → `lk_hit` | the cache answers in the same cycle; on a hit it writes at the clock edge |
| L1 completion | `fill_valid`, `fill_idx` | one pulse per missed store once its write is done; `fill_idx` is the slot from `lk_idx` |
| status/events | `region_flag`, `sb_count`, `sb_full`, `sync_miss_pend`, `fence_pending`, `retire_valid`/`retire_idx`, `ev_*` | `ev_*` are one-cycle pulses for performance counters |

A store is initiated in the cycle after it enters the buffer, at the
earliest. It reaches the lookup stage four cycles after initiation, which
matches the 4-cycle L1 hit latency of the target core.

The reset is asynchronous and active low. Payload storage (address, data,
byte enables) is not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 56 | store buffer entries (one queue for store queue and store buffer in the target core) |
| `STAGES` | 4 | cache store pipeline depth; lookup in the last stage |
| `AW` | 45 | word address width (48-bit byte address, 8-byte words) |
| `DW` | 64 | store data width; `BW = DW/8` byte enables |
| `FENCE_ON_SETDRF` | 1 | every `setDRF` also inserts a fence |

The target core was evaluated with buffers of 16 to 56 entries: set `N`
accordingly. Widths and the reset scheme are this design's choices.

## Departures and limits

* **Committed stores only.** The target core shares one 56-entry queue
  between stores not yet committed (the store queue) and committed stores
  (the store buffer). Here, all `N` entries hold committed stores. Speculative
  stores and their squash on a branch misprediction are not modelled.
* **The fence as an entry bit.** A fence is kept as a bit on the first store
  after it. The fence condition is "every older store has performed"; with
  performed DRF stores kept at the head, this is the intended "the head has
  reached the fenced store".
* **No back-pressure from the cache.** The L1 is assumed always to accept a
  lookup; full MSHRs are not handled.
* **Forwarding needs full coverage.** A partially covered load is flagged,
  not assembled from several stores.
* **Not built:** the core, the L1 and its MSHR coalescing, the compiler pass,
  the optional Sequential Consistency mode (loads held in SYNC regions until
  the buffer drains) and the variant for weakly ordered cores.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* `tb_roow_region_flag`: flag reset value, a directed `setDRF 1` sequence,
  then random setDRF, fence and store pulses against a reference model.
* `tb_roow_issue_select`: the buffer states of the examples: a SYNC miss at
  the head holds the SYNC stores behind it, DRF stores still go, and a fence
  holds a store until older stores are done. Also wrap-around, and 20,000
  random states against a reference walk.
* `tb_roow_sb_forward`: random buffers with repeated addresses and byte
  enables, against a youngest-first reference.
* `tb_roow_cache_pipe`: random traffic and hit/miss. Checks what reaches the
  lookup stage, exactly which SYNC stores a SYNC miss squashes, and the
  4-cycle hit latency.
* `tb_roow_store_buffer`: the miss-and-squash example step by step
  (A misses, B and C are squashed and re-issued, D performs first), SYNC
  retirement, DRF retention and forwarding, a fence, drain, full-buffer
  eviction, and a stall behind an unperformed head.
* `tb_roow_store_unit`: the whole unit at its default size, with a
  behavioural L1 and MSHR model (`tb/l1_model.sv`).
  * First, four stores A (miss), B (hit), C (miss), D (hit) run once as SYNC
    and once as DRF. The DRF run must finish first, and B must write before A.
  * Then 6,000 random stores in random regions, with fences and a load search
    every cycle. It checks SYNC write order, fence order, per-word write order,
    the final memory against program order, in-order retirement after the
    write, and every forwarding answer.
  * It counts each mechanism (squash, SYNC stall, fence stall, out-of-order
    DRF write, full stall, DRF retention and eviction, forwarding from a
    performed store, partial overlap). Any mechanism that never happens is
    counted as a failure.
  * A typical run: 6,009 stores, 1,285 out-of-order DRF writes, 15 squashes,
    3,119 evictions.

* `tb_roow_size_sweep`: one fixed synthetic stream of 3,000 stores,
  scattered over 256 cache lines, with a 30-cycle miss latency. The
  configurations are:
  * TSO ordering (no `setDRF`) at 16, 32 and 56 entries;
  * ROOW (DRF regions of 200 stores, separated by 3-store sync regions) at
    the same three sizes;
  * ROOW at 56 entries without fences.

  Every run must leave memory as program order would. ROOW must be no slower
  than TSO at each size, and ROOW with 16 entries must beat TSO with 56. One
  run gave:

  | entries | TSO cycles (commit stalls) | ROOW cycles (commit stalls) |
  |---|---|---|
  | 16 | 7485 (4470) | 4449 (1404) |
  | 32 | 7485 (4454) | 3587 (526) |
  | 56 | 7485 (4430) | 3347 (263) |

  ROOW at 56 entries without fences took 3072 cycles. This synthetic stream
  misses far more often than real programs, so these gains are much larger
  than a whole core would see.

The L1 model gives a line write permission or not. Lines without it miss, and
complete after a random 10 to 40 cycles. Stores to a line that already has a
miss outstanding join that miss and complete in arrival order. Lines lose
permission now and then.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/roow_pkg.sv \
    tb/tb_roow_store_unit.sv --top-module tb_roow_store_unit
./obj_dir/Vtb_roow_store_unit
```

Replace the testbench name to run another block's test. Every file in `rtl/`
also lints cleanly with `verilator --lint-only -Wall`, apart from unused-item
warnings and a warning that the reset is also used in the assertions.
