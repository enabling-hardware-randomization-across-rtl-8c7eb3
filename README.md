# Randomized cache hierarchy with virtual-memory support

Randomized caches defend against contention-based side channels (prime+probe
and similar) by placing each line in a set chosen by a keyed function of its
address instead of by plain index bits. An attacker must then rediscover
eviction sets every time the key changes. Applying this to last-level caches
is well known. Applying it to the whole hierarchy runs into two problems:

* the L1 is virtually indexed (VIPT), so its randomized index is a function of
  the *virtual* address, while the rest of the hierarchy and the coherence
  protocol only know physical addresses;
* the same physical line can be asked for under different randomized indexes
  (after a key change, a page-table change, or through a synonym), which can
  leave untracked "ghost" copies behind.

This RTL solves both with one rule: **a randomized index is computed once,
when a request enters a cache from below, and is then carried with the line.**
The L1 sends its index with every miss, the L2 directory stores it next to the
line, and every later message about that line (refill, probe) brings the index
back, so no cache ever has to recompute an index from an address it does not
have. Tags are extended with the original, non-randomized index so lines that
land in the same set never alias and victims can be written back.

The design is a two-core, two-level hierarchy in SystemVerilog: per-core L1
data caches (16 KiB, 4-way, 64-byte lines, 3-cycle hits, 8-entry TLB,
2-entry MSHR) and a shared 64 KiB 8-way L2 (8-cycle hits) that is the
last-level cache and holds a MESI directory. Each cache has its own
randomizer and key CSRs, and each can run random modulo or hash placement,
with one shared key or one key per way (skewed).

## How a line's index travels

Take a load from core 0 to virtual address `va`.

1. **L1, randomize once.** `va`'s tag bits (above the page-offset index) and
   index bits go through the L1 randomizer with the L1 keys. With the skewed
   default, each of the 4 ways gets its own set index `ridx[w]`. All four
   sets are read while the TLB translates the virtual page.
2. **Compare.** Way `w` hits if its state is valid and its stored
   `{ppn, original index}` equals `{TLB ppn, va[11:6]}`. The original index
   is part of the tag because two different lines of one page, or of pages
   that randomize alike, can share a set.
3. **Miss.** A way is picked at random. The randomized index *of that way*
   (in skewed mode: the index of the line being evicted) goes into the MSHR
   and into the miss request (`acq`) together with the physical line address
   and the victim line. On a skewed hit the hit way's index is the one that
   counts; on a miss, the victim's.
4. **L2.** The physical line address goes through the L2's own randomizer.
   The L2 absorbs the victim, finds or fetches the line (its own randomized
   index is kept in its miss register while memory answers), and records in
   the directory: core 0 holds this line, at L1 index `acq.rnd_idx`.
5. **Refill, bypassing the randomizer.** The grant carries the index back;
   the L1 writes the line at `grant.rnd_idx` in the chosen way without running
   its randomizer.
6. **Probes, bypassing the randomizer.** Whenever the L2 must invalidate or
   downgrade core 0's copy (another core stores to it, the L2 evicts it), the
   probe carries the stored L1 index. The L1 reads that one set in every way
   and compares the extended tag.

### Ghost copies

Suppose core 0 holds line X at L1 index 17 and the operating system changes
an L1 key, or remaps the page, or core 0 uses a second virtual alias of the
same physical page. The next access to X randomizes to, say, index 40 and
misses, although X is still at 17. With plain MESI, a shared copy at 17 would
be left valid while the directory is overwritten with 40: a ghost that no
probe can reach any more.

The L2 therefore checks, for every request, whether the directory already
lists the requesting core as a holder. If so, it first sends that core an
invalidation at the *old* index (collecting the data if the copy was dirty),
and only then grants the line and stores the new index. This makes rekeying
safe without flushing the L1: old placements are cleaned up lazily, line by
line, as they are touched again, and untouched ones age out through normal
eviction. This design applies the invalidation whatever the old copy's
state, which includes the shared case that breaks plain MESI.

## Randomization functions

`rtl/randomizer.sv` is combinational and works for both levels (tag and index
widths are parameters). `k` is the key of the way (or the single key).

* **Random modulo (`FN_RM`)**:
  `rnd = rotl(idx ^ fold(tag ^ k[low]), fold(tag ^ k[high]) mod IDX_W)`,
  where `fold` XORs all bits onto `IDX_W` bits. For a fixed tag this is a
  permutation of the index, so the lines of one contiguous region (one
  virtual page for the L1) still occupy distinct sets, keeping the spatial
  locality of plain modulo placement while the layout changes with the key.
* **Hash (`FN_HF`)**: `{tag, idx} ^ k` is cut into `IDX_W`-bit chunks, chunk
  `i` rotated left by `i`, all XORed together; then `h ^= rotl(h,1) & ~rotl(h,2)`
  and `h ^= k[high]`. Tag and index bits are mixed, so neighbouring lines can
  collide, which costs locality unless the cache is skewed.
* **Skewed (`SKEWED=1`)**: one function instance per way, each with its own
  key. Only one index per line is ever stored or sent: the index of the way
  the line lives in.

The two formulas are this design's own. They are cheap, uniform over random
inputs, and have the properties above. The testbench checks them against a
separately written model and checks the permutation property. No
cryptographic strength is claimed.

## Keys and the operating-system interface

Every cache has a `key_csr` block of 64-bit keys, one per way when skewed:

| CSR numbers | keys |
|---|---|
| `0x5C0`–`0x5C3` | L1 data cache of the accessing core (4 ways) |
| `0x5D0`–`0x5D7` | shared L2 (8 ways), reachable from every core |

Keys can be read and written from supervisor or machine mode. A user-mode
access changes nothing, reads zero and raises `csr_illegal`, which the core
turns into an illegal-instruction trap. At reset every key is loaded from the
`seed` input, which should come from an entropy source, so each boot starts
with a new layout. A write takes effect in the next cycle.

**L2 rekeying caveat.** Lines already in the L2 are not found under a new L2
key: the L2 is the last level, so no directory above it remembers their old
index. Change L2 keys only while the L2 holds no dirty lines and no L1
copies, for example right after reset. L1 keys can be changed at any time.

## Blocks

| File | Block |
|---|---|
| `rtl/rc_pkg.sv` | geometry, MESI/probe enums, message structs, event structs |
| `rtl/randomizer.sv` | keyed set-index functions, per-way in skewed mode |
| `rtl/key_csr.sv` | key registers as privileged CSRs with random reset value |
| `rtl/tlb.sv` | 8-entry fully associative data TLB, combinational lookup |
| `rtl/l1_mshr.sv` | 2-entry miss registers holding line address, randomized index, way, request |
| `rtl/l1_dcache.sv` | randomized VIPT L1: pipeline, arrays, prober, refill, writeback via the miss message |
| `rtl/l2_cache.sv` | randomized L2 with MESI directory, per-core L1 index, ghost-copy invalidation |
| `rtl/rand_cache_top.sv` | two cores' L1s, their key CSRs, the L2 and its key CSRs |

The core, instruction caches, page-table walker, entropy source and memory
controller are outside the design. They connect through the top's ports; the
testbenches model the walker and memory.

## Interfaces and timing

All channels use valid/ready (grants and probe acks are valid-only: the
receiver is always waiting for them).

| Channel | Direction | Content |
|---|---|---|
| `cpu_req` / `cpu_resp` | core ↔ L1 | 39-bit virtual address, write, 64-bit data, byte mask / read data |
| `acq` | L1 → L2 | physical line address, L1 randomized index, write (ask for M), victim {valid, dirty, address, data} |
| `grant` | L2 → L1 | line data, MESI state, the L1 index echoed |
| `probe` | L2 → L1 | physical line address, stored L1 index, invalidate or downgrade |
| `pack` | L1 → L2 | hit, dirty, line data |
| `mem_req` / `mem_resp` | L2 ↔ memory | line read or write / read data |
| `tlb_miss` / `tlb_fill` | L1 ↔ walker | virtual page / translation |

Timing:

* L1 hit: request accepted in cycle 0, randomizer + array read + TLB in
  cycle 1, compare in cycle 2, `cpu_resp_valid` in cycle 3.
* L2 hit: the grant is valid 8 cycles after the L2 accepts `acq`. Victim
  write-back, probes and memory reads add their own cycles.
* Probes are accepted while the L1 is idle, waiting for a miss to be
  accepted, waiting for its grant, or waiting for a TLB fill. They take
  priority over new core requests (the arbiter in front of the array). The
  acknowledgement comes one cycle after acceptance.

The victim travels inside the miss request instead of on a release channel.
While the request waits to be accepted, its victim fields are read live from
the arrays, so a probe that removes or downgrades the victim in the meantime
is reflected in what the L2 finally receives. Clean victims are reported too,
which keeps the directory exact. A store to a shared line is sent as a write
miss whose victim is that line itself. The L2 then frees the old copy
without probing it and grants M.

## Coherence details

* L1 line states are MESI. Loads are granted E when no other core holds the
  line, otherwise S (an E/M holder is first downgraded and gives up dirty
  data). Stores are granted M after all other copies are invalidated. A
  store to E becomes M silently.
* The L2 is inclusive. When it evicts a line, it invalidates every L1 copy at
  the stored indexes, collects dirty data and writes the line to memory if
  dirty.
* The L2 serves one transaction at a time, with round-robin arbitration
  between the cores. Assertions check a one-hot grant, that an exclusive
  grant has no other holder, and that probe requests stay up until taken.

## Parameters

Sizes are package constants in `rc_pkg` (`L1_NSETS`, `L1_NWAYS`, `L2_NSETS`,
`L2_NWAYS`, `NCORES`, address widths). The top's parameters choose the
placement of each level and the L2 latency:

| Parameter | Default | Meaning |
|---|---|---|
| `L1_FN`, `L2_FN` | `FN_RM` | `FN_RM` random modulo, `FN_HF` hash |
| `L1_SKEWED`, `L2_SKEWED` | `1` | one key and function per way |
| `L2_LAT` | `8` | minimum L2 request-to-grant cycles |

`l1_dcache` also takes `TLB_ENTRIES` (8) and `MSHR_ENTRIES` (2).

## Where this RTL departs from the system it models

* **Two levels.** The general scheme also covers a private L2 plus a shared
  L3, where each level stores the index of the level below. Built here is the
  two-level case: L1 + shared L2/LLC.
* **Blocking L1.** One miss at a time, and no hit-under-miss. The MSHR has
  two entries, but only one is in use at a time.
* **Own message set.** There is no separate release channel and no grant
  acknowledgement (the "finish" of a TileLink-style protocol). The victim
  rides in the miss request instead.
* **The randomization formulas** are original (see above), as are the CSR
  numbers, the 64-bit key width, the two-core count, 32-bit physical and
  Sv39 virtual addresses, the LFSR replacement and the inclusive L2.
* **Replacement** is random, as in the modelled system, but an invalid way
  of the candidate sets is taken first; only when all are valid does a
  free-running LFSR pick the way (2 bits in the L1, 3 in the L2).
* **No L2 rekey without cleaning** (see the caveat above).
* **Arrays** are described behaviourally with combinational reads, as
  LUT-RAM-style memories. Valid/state bits are reset flip-flops. Tags, L1
  indexes and data are memories without reset.

## Simulating

Each testbench in `tb/` is self-checking and ends with one line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_rand_cache_top \
    rtl/rc_pkg.sv rtl/randomizer.sv rtl/key_csr.sv rtl/tlb.sv rtl/l1_mshr.sv \
    rtl/l1_dcache.sv rtl/l2_cache.sv rtl/rand_cache_top.sv tb/tb_rand_cache_top.sv
./obj_dir/Vtb_rand_cache_top
```

Pass `rc_pkg.sv` first. For a block testbench, pass the files that block
uses (for example `rc_pkg.sv randomizer.sv tb_randomizer.sv`).

| Testbench | What it exercises |
|---|---|
| `tb_randomizer` | both functions against an independent model; permutation per tag; skewed ways differ; rekey moves lines; spread over sets |
| `tb_key_csr` | seed-derived reset keys, privileged read/write, user-mode refusal |
| `tb_tlb` | fills, hits, round-robin replacement, flush |
| `tb_l1_mshr` | allocation, fields, match, free |
| `tb_l1_dcache` | L1 against a behavioural L2 and walker: data against an architectural memory, 3-cycle hits, upgrades, dirty victims, probes at the right and wrong index, probes during a pending miss, ghost copies after rekeying and through synonyms |
| `tb_l2_cache` | L2 with two behavioural L1s and memory: latest data at every grant, MESI exclusivity, probe index equals registered index, 8-cycle hits, ghost invalidation, downgrade, back-invalidation, write-back |
| `tb_rand_modes` | the four placement modes (RM, HF, skewed RM, skewed HF) side by side on one access pattern, each checked for correct data; an L1-sized contiguous region must fit without conflict misses under RM and must not under HF; miss counts of every mode are printed. It needs `tb_hier_env.sv` as well |
| `tb_rand_cache_top` | whole hierarchy at its default configuration: two cores, shared and synonym pages, a working set larger than the L2, L1 rekeying through CSRs, a refused user-mode write; every mechanism must occur |

The end-to-end test runs at full size in a few seconds. A typical
`tb_rand_modes` run loses 0 of 256 lines on the second pass over the
region under RM and skewed RM, and about 50 under HF and skewed HF: the
hash does not keep neighbouring lines in distinct sets, as random modulo
does within a page.

What has not been checked: timing on silicon or FPGA, the hash functions'
statistical quality beyond an even spread of random inputs, and behaviour
with a real core, whose memory-ordering and fence interactions are not
modelled.
