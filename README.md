# DT-TLB and fast partition page table for a partitioned DIMM tree

A DIMM tree builds a very large main memory out of DIMMs that route commands to
each other. The T-DIMMs in the top levels of the tree are reached in fewer hops
than the ones deep in the tree. In a *partitioned* DIMM tree the top T-DIMMs form a
small **fast partition**, and everything below them forms a large **slow
partition**. The fast partition works like a 4-way set-associative page cache in
front of the slow one. The operating system only knows slow-partition (physical)
frames. A hardware **fast partition page table (FPPT)** records which slow pages
currently have a copy in the fast partition, and where that copy is.

Checking the FPPT on every memory access would add a table lookup to every
access. This design avoids that with the **DT-TLB**: an ordinary TLB whose entries
carry one extra bit, the **L-flag**.
- L=1: the entry's frame field is a fast-partition frame. An access goes straight
  to the fast partition and never touches the FPPT.
- L=0: the entry's frame field is the slow frame. The FPPT is consulted, and the
  page is uploaded if needed.

Pages move in and out of the fast partition, so the L-flags must be kept correct:
- Uploading a page raises the L-flag of the requesting core's entry.
- Evicting a page searches every DT-TLB by its fast frame. Any entry that still
  points there is demoted to L=0 and given the page's slow frame.

The RTL implements this scheme for the configuration below, with
synthesizable SystemVerilog for everything between the processors and the DRAM
ranks:

| item | value |
|---|---|
| processors | 5, each with a DT-TLB1 (64 entries, 8-way, 1 clock) and a DT-TLB2 (512 entries, 32-way, 5 clocks) |
| T-DIMM | 4 GB (2^20 pages of 4 KB) |
| tree | branch factor 4, 3 levels: 4 + 16 + 64 = 84 T-DIMMs |
| fast partition | the 4 level-1 T-DIMMs: 16 GB, 4-way set-associative |
| slow partition | the 80 deeper T-DIMMs: 320 GB |
| physical address | 39 bits (27-bit slow frame number + 12-bit offset) |
| virtual address | 48 bits (36-bit VPN) |

## Files

| file | contents |
|---|---|
| `rtl/dta_pkg.sv` | widths, sizes, FPPT entry and row types, tree command/response structs, frame-to-T-DIMM mapping |
| `rtl/dt_tlb.sv` | one DT-TLB level: lookup, fill/update, parallel demote-by-frame search |
| `rtl/core_mmu.sv` | one processor's DT-TLB1 + DT-TLB2 and its access sequencer |
| `rtl/fppt_set_lookup.sv` | combinational FPPT row logic: hit, victim choice, LRU update, new row values |
| `rtl/fppt_layout.sv` | where an FPPT row lives in memory (Fast-FPPT or Slow-FPPT) |
| `rtl/fppt_manager.sv` | the FPPT manager of the memory controller: query, upload, eviction, DT-TLB search |
| `rtl/dir_router.sv` | the router (DIR) of one T-DIMM: execute, forward or abort |
| `rtl/dimm_tree.sv` | 84 routers plus the controller root, wired as a 4-ary tree |
| `rtl/dta_top.sv` | 5 cores + manager + command arbiter + DIMM tree |
| `tb/dram_model.sv` | behavioural DRAM ranks for all T-DIMMs (testbench only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The FPPT: address split and row format

A 39-bit physical address is read as follows:

```
 38      32 31                 12 11        0
+----------+---------------------+-----------+
| tag (7)  |   index (20)        | offset(12)|
+----------+---------------------+-----------+
           \___ slow frame number (27) ___/ = {tag, index}
```

The index selects one of 2^20 sets. Each set has 4 ways. A fast frame number is
`{index, way}` (22 bits, 4M frames = 16 GB). Its top two bits pick the fast T-DIMM,
and the low 20 bits pick the page inside it.

Each entry is `{valid, dirty, pending, tag[6:0]}`. A set holds 4 entries and 4 LRU
bits, packed into one 64-bit word:

```
 63     44 43  40 39   30 29   20 19   10 9     0
+---------+------+-------+-------+-------+-------+
| rsvd 20 | lru4 | way 3 | way 2 | way 1 | way 0 |
+---------+------+-------+-------+-------+-------+
```

A 4 KB page therefore holds 512 rows, and the whole table takes 2^20 / 512 =
2048 pages (8 MB). `MODE` decides where those pages live:

- **Fast-FPPT** (`MODE = FAST_FPPT`, the default). FPPT page *p* occupies fast frame
  `{p, way 0}`, for p = 0..2047. Way 0 of sets 0..2047 is therefore never
  given to data. Those 2048 sets are 3-way, and all other sets are 4-way. Table reads
  are served at fast-partition latency.
- **Slow-FPPT** (`MODE = SLOW_FPPT`). FPPT page *p* is slow frame
  `80*2^20 - 2048 + p`, the last 2048 pages of the slow partition. All four ways of
  every set are usable, but every table access goes to the bottom of the tree.

In both modes, set *i* is in page `i >> 9`, at word `i[8:0]`. `fppt_layout` holds
this mapping, and `fppt_set_lookup` masks the reserved way with its
`way0_reserved` output.

**Replacement.** A free usable way is taken first. Otherwise the victim is the
first usable way whose LRU bit is clear. A touch sets the way's bit. If that would
leave every usable bit set, the bits are cleared except the one just touched
(bit-PLRU).

**Pending-replace bit.** While a page is being exchanged, its new entry is already
in the table with `pending = 1`. The bit is cleared when the copy is complete. The
manager handles one request at a time, so no lookup can see a pending entry. An
assertion in `fppt_manager` states this.

## The DT-TLB and the access flow of one core

`core_mmu` serves one processor request at a time. A request is a virtual address
plus two bits: read/write, and whether the access missed the last-level cache.

1. **DT-TLB hit.** The request is looked up in DT-TLB1 (1 clock) and then in DT-TLB2
   (5 more clocks). A DT-TLB2 hit is copied into DT-TLB1.
2. **DT-TLB miss.**
   - The core asks the page-table walker port (`ptw_*`) for the slow frame.
   - It then sends an `FP_QUERY` to the FPPT manager.
   - On an FPPT hit, the entry is installed with L=1 and the fast frame. On a
     miss, it is installed with L=0 and the slow frame.
   - The query only reads; no page is moved.
3. **Memory access**, only for a last-level-cache miss:
   - **L=1:** a read or write goes straight to the fast frame. This is the bypass
     that the L-flag exists for.
   - **L=0:** the core sends an `FP_UPLOAD`. The manager returns the fast frame, if
     necessary after copying the page in. The core then raises the L-flag in both
     DT-TLB levels and accesses the fast frame.

   A request that hit the cache ends after translation. Its response carries the
   L-flag and the frame.

**Race between an eviction and an access.** A core may hold an L=1 translation
for a frame whose eviction starts while the core is still waiting to issue its
memory command. The eviction's DT-TLB search also checks the frame the core is
about to use. On a match, the core withdraws the command and restarts the request
from the DT-TLB lookup. The lookup now finds the demoted L=0 entry. A fill that
races with a search for the same frame is written already demoted.

## The FPPT manager

`fppt_manager` sits in the memory controller and is shared by all cores. Cores are
served round-robin, one request at a time. Every request first reads the FPPT row.

- **Hit:** the row is written back with updated LRU bits (and the dirty bit, for a
  write), and the fast frame is returned.
- **Query miss:** the manager answers "miss".
- **Upload miss**, the exchange:
  1. The victim way is chosen. If it holds a valid page, a **DT-TLB search**
     for the victim's fast frame is broadcast to every core in the same cycle.
     Matching L=1 entries fall back to L=0 with the victim's slow frame
     `{tag, index}`. The search takes one clock, in parallel with the memory
     traffic that follows.
  2. The row is written with the new entry (pending = 1).
  3. A valid victim is copied back fast → slow.
  4. The requested page is copied slow → fast.
  5. The row is written again with pending = 0, and the core is answered.

Copies are single `MEM_MOVE` commands sent to the destination T-DIMM, which names
the source T-DIMM and page: a DIMM-to-DIMM copy inside the tree. `ev_*` outputs
pulse once per FPPT hit, miss, upload, eviction and write-back.

## The DIMM tree

T-DIMMs are numbered level by level. The controller's children are 0..3, and the
children of T-DIMM *i* are `4i+4 .. 4i+7`. This gives 0–3 at level 1 (fast
partition), 4–19 at level 2 and 20–83 at level 3 (slow partition). A slow frame
`s` lives on T-DIMM `s[26:20] + 4`, page `s[19:0]`.

Each `dir_router` has an upper channel, a lower channel shared by its children,
and an internal channel to its own rank. For every command from above, it
- executes it if the command names this T-DIMM,
- forwards it if the named T-DIMM is in its subtree (found by walking up the parent
  chain `j/4 - 1`),
- aborts it otherwise, taking and dropping it at once.

Each direction has one register stage, so a command reaches a level-*k* T-DIMM
*k + 1* clocks after it enters the root. Responses climb back through a
round-robin merge of the rank and the children at every router. `dimm_tree`
generates the 84 routers plus a root router for the controller's channel, and
brings out one command port and one response port per rank.

## Top level and interfaces

`dta_top` connects 5 `core_mmu`, one `fppt_manager` and `dimm_tree`. A round-robin
arbiter merges the memory commands of the 5 cores and the manager onto the single
controller channel. Responses carry a source number (core *k* = *k*, manager = 5)
and are steered back by it. Three things stay outside as ports:
- processor requests and responses (`req_*`, `rsp_*`),
- the operating system's page table walk (`ptw_*`),
- the DRAM ranks (`rank_*`, one command/response pair per T-DIMM, using
  `mem_cmd_t` / `mem_rsp_t` from `dta_pkg`).

All handshakes are valid/ready, except the one-cycle response pulses. Event
outputs (`ev_l1_hit`, `ev_l2_hit`, `ev_tlb_miss`, `ev_fast_direct`, `ev_restart`,
`ev_fppt_*`, `ev_upload`, `ev_evict`, `ev_writeback`) support counting.

## Simulation

Every testbench is self-contained and ends with a line
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_dta_top \
    rtl/dta_pkg.sv rtl/dt_tlb.sv rtl/core_mmu.sv rtl/fppt_layout.sv \
    rtl/fppt_set_lookup.sv rtl/fppt_manager.sv rtl/dir_router.sv \
    rtl/dimm_tree.sv rtl/dta_top.sv tb/dram_model.sv tb/tb_dta_top.sv
./obj_dir/Vtb_dta_top
```

The package must come first. For a unit testbench, list the package, the module
under test with its submodules, and the testbench (plus `tb/dram_model.sv` for the
two end-to-end tests).

| testbench | what it checks |
|---|---|
| `tb_dt_tlb` | fill/update in place, round-robin replacement, demote-by-frame search touches only L=1 entries, fill/search race |
| `tb_fppt_set_lookup` | random rows against a reference model: hit, victim, LRU, reserved way, row values |
| `tb_fppt_layout` | row page/word mapping and reserved range in both modes |
| `tb_dir_router` | execute / forward / abort decisions, response merge |
| `tb_dimm_tree` | every T-DIMM reached, none misrouted, latency = level + 1 clocks, burst traffic |
| `tb_fppt_manager` | query hit/miss, upload with and without eviction, search contents, row contents, move commands |
| `tb_core_mmu` | DT-TLB1/2 hit latencies, miss flow, L=1 bypass, L=0 upload and L-flag raise |
| `tb_dta_top` | whole system at default parameters (Fast-FPPT), with 200-clock DRAM latency |
| `tb_dta_top_slow` | the same test with `MODE = SLOW_FPPT`; the FPPT rows are read back from the slow partition |

`tb_dta_top` runs all 5 cores on a shared set of pages that collide in a few FPPT
sets. This forces a steady stream of uploads, evictions and cross-core DT-TLB
demotions. It checks every read against a reference memory, and checks that no
command is misrouted. It also counts each mechanism, and fails if one never occurs:
- DT-TLB1 hits, DT-TLB2 hits and misses,
- FPPT hits and misses,
- L=1 bypasses,
- uploads, evictions and write-backs,
- translation-only requests.

It takes a few seconds. The restart after an eviction race is counted and reported
but not required, since whether it happens depends on timing.

The configuration is sized for a server whose five processors each run a
memory-intensive program with billions of accesses. Such traces are far beyond RTL
simulation, so both end-to-end tests use short synthetic streams instead. These
streams are built to hit every path of the flow many times.

## Departures and choices

- **Every valid victim is written back.** Writes through an L=1 entry go straight
  to the fast partition and never reach the FPPT, so the dirty bit cannot prove a
  page clean. The dirty bit is still kept, set by writes that do pass through the
  manager.
- **One outstanding FPPT request.** The manager serializes all requests. This makes
  the pending-replace bit a consistency marker rather than a lock.
- **Restart on a lost frame.** This is the race rule described above. It is this
  design's way of closing the window between an L=1 hit and its memory command.
- **Single controller channel** with round-robin arbitration, and one register per
  router direction (1 clock per tree level).
- **DT-TLB replacement** is per-set round-robin. The search is fully parallel in
  one clock.
- **Not in RTL:** the processors and their caches, the OS page table (reached
  through `ptw_*`), and the DRAM ranks. The DRAM is modelled behaviourally in
  `tb/dram_model.sv`, with a fixed latency and whole-page moves executed at once.
  A real T-DIMM would stream a page move in many bursts.
