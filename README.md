# Low-power instruction and data caches for a 32-bit embedded RISC core

This is synthesizable SystemVerilog for a pair of on-chip caches built to
save energy, not just time. Two observations drive it:

* The instruction cache is read almost every cycle. Most fetches are
  sequential and land in the line that was just read. The **line reuse
  buffer** serves those fetches from a one-line register. The tag and data
  arrays stay disabled, so no tag read or compare happens. In the quicksort
  test program, 85 % of fetches are served this way.
* Going off chip costs far more energy than any on-chip access. Both caches
  are simple direct-mapped arrays, each backed by a small fully associative
  **miss cache** that catches conflict misses. The data cache also cuts
  write-back traffic. It keeps **two dirty bits per line**, one per half
  line, and writes back only the dirty halves. Dirty victims wait in the miss
  cache before they go out.

The configuration is 16 KB per cache with 16-byte lines (1024 lines), a
32-entry miss cache per cache, a 2-entry write-back buffer and a 4-entry
write-through buffer. All are parameter defaults.

## Block structure

```
calm_cache_system
├── icache                 16 KB, 16-bit fetches
│   ├── sram_sp  (tag)     1024 x {valid, lock, tag[17:0]}
│   ├── sram_sp  (data)    1024 x 128
│   ├── miss_cache         32 lines, CAM tag, no dirty bits
│   └── line_reuse_buffer  one line
└── dcache                 16 KB, 32-bit loads/stores with byte enables
    ├── sram_sp  (tag)     1024 x {valid, lock, dirty[1:0], tag[17:0]}
    ├── sram_sp  (data)    1024 x 128, bit-maskable writes
    ├── miss_cache         32 lines with two dirty bits each
    ├── wb_buffer          2 dirty lines
    └── wt_buffer          4 stores
```

`cache_pkg` holds the shared widths, the line-address type, the maintenance
operation encodings and the event structs. `sram_sp` models a compiled
single-port SRAM macro: a synchronous read whose output holds while the macro
is disabled. Replace it with the real macro when targeting a process.

The two caches are independent. Each has its own memory port: 16-bit reads
for the instruction side, 32-bit reads and writes for the data side. How they
share an external bus is left to the integrator. The processor, its MMU and
the data-cache control register are outside this design. Their signals are
ports: the fetch and data ports, `d_wt` (this page is write-through) and
`dccr_wt` (force write-through everywhere).

## Instruction fetch and the line reuse buffer

The processor presents `if_addr` together with `if_seq`. `if_seq` means "this
fetch is the previous fetch address + 2". The cache decides in that same
cycle, before the clock edge, whether the arrays are needed:

* `if_seq` is high and the half-word offset `if_addr[3:1]` is not zero. The
  fetch is then in the same line as the previous fetch. Every line delivered
  to the processor is copied into the LRB, so that line is the LRB's line.
  The tag and data SRAM enables stay low, and the half-word comes from the
  LRB one cycle later. No address compare is involved.
* Anything else reads the tag and data arrays. This covers non-sequential
  fetches and sequential fetches that cross into a new line (offset 0).

The "same line" result comes from the sequential hint alone. That is why the
LRB saves the tag access as well as the data access. The processor must set
`if_seq` only for true +2 fetches. An assertion in `icache` checks this.

Fetch outcomes and their latency, counted from the accepting clock edge to
`if_rvalid`:

| outcome | cycles | what happens |
|---|---|---|
| LRB hit | 1 | arrays idle |
| array (L1) hit | 1 | line copied to the LRB; the next fetch can be accepted in the same cycle, so hits stream at one per cycle |
| miss-cache hit | 3 | cycle 1 finds the L1 miss, cycle 2 compares the CAM, cycle 3 reads the entry and delivers. The CAM is not compared on ordinary hits, to save its power. |
| fill | memory-bound | 8 half-word reads. The first is the requested half-word, then the rest in wrap-around order. The processor gets its half-word as soon as it arrives. |

While the fill runs, a sequential fetch in the same line is taken as soon as
its half-word has arrived and is returned one cycle later, from the register
that collects the line. Any other fetch waits until the whole line is in.

### Miss cache and swapping

Each miss cache holds lines recently replaced from its array. On a
miss-cache hit, the line and the array's current line at that index swap
places: the hit line goes into the array and the old line takes over the
miss-cache entry. On a fill, the displaced array line is allocated in the
miss cache. Allocation is FIFO. An entry pushed out of the instruction-side
miss cache is simply dropped.

### Locking

A line written into the array while `lock_fill` is high gets its lock bit set.
A locked line is never replaced. When a miss maps to a locked index:

* the fetched line is placed in the **miss cache** instead of the array
  (`locked_fill` event);
* later miss-cache hits on it do not swap, so the line stays in the miss
  cache.

Repeated sequential use of such a line then costs 3 cycles once and LRB hits
after that. Only invalidation clears lock bits.

### Maintenance

Hold `m_req` with `m_op` until the one-cycle `m_done` pulse:

* `IC_INV_ALL` walks all 1024 tags, one per cycle. It also clears the miss
  cache and the LRB.
* `IC_INV_LINE` checks the tag at `m_addr` and the CAM, then clears whichever
  holds the line.

After reset, each cache invalidates itself (1024 cycles) before it accepts
accesses.

## Data cache

### Write policy and allocation

Each store is write-through when `d_wt` or `dccr_wt` is set, and write-back
otherwise. The value is sampled when the access is accepted. Read misses and
write misses both allocate the line.

* **Write-back store:** updates the line and sets the dirty bit of the 8-byte
  half it touches (`addr[3]`).
* **Write-through store:** updates the line, leaves the dirty bits alone and
  queues the word in `wt_buffer`. The processor stalls only when all four
  entries are waiting.

### Dirty data path

A dirty line leaves the array only as a victim, and it moves into the miss
cache with both dirty bits. Data is written to memory only in these cases:

* the miss cache's FIFO pushes out a dirty entry;
* a synchronize or flush operation reaches the line.

The line then goes to `wb_buffer`, which writes only its dirty halves as two
word writes each. A line with one dirty half costs half the traffic.

### Access timing

| outcome | cycles to `d_rvalid` | notes |
|---|---|---|
| array hit, load | 1 | may overlap the next access |
| array hit, store | 1 | writes the arrays in that cycle, so the next access is accepted one cycle later |
| miss-cache hit | 3 | swap as in the instruction cache; a locked victim keeps the line (and the store) in the miss cache |
| fill, load | memory-bound | word reads start with the requested word. The load completes on its arrival (early restart). The line is placed after the last word. |
| fill, store | memory-bound | word reads start with the stored word. The store is acknowledged on its arrival; the store data is merged in when the line is placed. |

`d_rvalid` also acknowledges stores.

### Ordering against the write buffers

The memory port serves, in priority order:

1. line fills;
2. the write-through buffer;
3. the write-back buffer.

A fill does not start while either buffer still holds data for its line. Both
buffers answer a line-address query (`chk_laddr`/`chk_hit`). The buffers keep
draining during that wait. Draining write-through before write-back is safe:
a write-through store cannot be queued for a line that still waits in the
write-back buffer, because that store would first need a fill of the line,
and the fill waits.

### Maintenance

`m_op` selects an operation, applied either to the whole cache (array, then
miss cache) or to the line holding `m_addr`:

* `DC_INV_*`: invalidate and discard dirty data.
* `DC_SYNC_*`: write dirty halves back and keep the line valid and clean.
* `DC_FLUSH_*`: write back, then invalidate.

Synchronize and flush signal `m_done` only after both write buffers are
empty, so memory is then up to date. A full-cache synchronize reads every
tag, taking about 2 cycles per line plus any write-back stalls.

## Interfaces

All handshakes are valid/ready style on the rising clock edge. Reset is
asynchronous and active low.

* **Processor side.** A request is taken at the edge where `req` and `ready`
  are both high. `ready` depends only on the cache state and `m_req`, never
  on `req`. One access is in flight at a time; its result comes back on
  `rvalid`.
* **Memory side.** A beat is taken at the edge where `mem_req` and `mem_gnt`
  are both high. `mem_gnt` may depend on anything. Read data returns in order
  on `mem_rvalid`, with any latency. Writes have no response.
* **Events.** `ic_events_t` and `dc_events_t` are one-cycle pulses: LRB hit,
  array hit, miss-cache hit, fill, fill placed in the miss cache because of a
  lock, fetch served from a line still being filled, write-through store, line sent to the write-back buffer, and a stall
  on a full buffer. Use them to count accesses for power estimation, or leave
  them unconnected.

## Parameters

| module | parameter | default |
|---|---|---|
| `calm_cache_system` | `IC_BYTES`, `DC_BYTES` | 16384 |
| | `MC_ENTRIES` | 32 |
| | `WBB_DEPTH` | 2 |
| | `WTB_DEPTH` | 4 |
| `icache` | `CACHE_BYTES`, `MC_ENTRIES` | 16384, 32 |
| `dcache` | `CACHE_BYTES`, `MC_ENTRIES`, `WBB_DEPTH`, `WTB_DEPTH` | 16384, 32, 2, 4 |

The cache size must be a power of two, as must `MC_ENTRIES`. The line size
(16 bytes), fetch width (16 bits) and data width (32 bits) are fixed in
`cache_pkg`.

## What follows the original design and what is this implementation's choice

These follow the cache description this RTL was written from:

* the sizes, line size, direct mapping and miss-cache size;
* the sequential-hint line reuse buffer, and the array standby while it
  serves;
* the miss cache being looked up only after a miss, and its 3-cycle hit;
* locking, with conflicting lines allocated in the miss cache;
* whole and single-line invalidation;
* hot-half-word-first and hot-word-first fills with early processor start;
* allocation on every miss and per-page or control-bit write policy;
* two dirty bits per line;
* the 2-entry write-back and 4-entry write-through buffers;
* invalidate, synchronize and flush at line and cache scope.

These are choices made here. The description says nothing on these points,
or does not define them.

* **Widths:** 16-bit fetch width and bus, 32-bit data width and bus.
* **Standby:** it is done by holding the SRAM enables low. No clock-gating
  cell is instantiated.
* **Same-line test:** the offset-zero rule is used to decide "same line".
* **Fetches during a fill:** sequential fetches in the line being filled
  are served as their half-words arrive.
* **Miss-cache behaviour:** hits swap lines with the array, and replacement
  is FIFO.
* **Lock control:** lines are locked through `lock_fill`.
* **Synchronize and flush:** their exact meaning is the one given above.
* **Buffer handling:** the buffer priority, the fill-waits-for-buffer rule
  and the low-half-first write-back order.
* **Store hits:** they take two cycles of array occupancy.
* **Protocols and reset:** the bus protocols and the self-invalidation after
  reset.

Not modelled: the SRAM circuit itself, clock gating at the cell level, and
anything outside the caches (processor, MMU, DSP, on-chip memories,
peripherals, PLLs).

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_sram_sp` | random masked reads and writes against a reference array |
| `tb_miss_cache` | lookups, entry reads, FIFO eviction view and invalidation against a reference model |
| `tb_line_reuse_buffer` | the prediction rule and the read multiplexer |
| `tb_wb_buffer` | only dirty halves are written, in order, under random grants |
| `tb_wt_buffer` | in-order draining with byte enables, full flag, line check |
| `tb_icache` | full size, driven by `tb_icache_env` (below) |
| `tb_dcache` | full size, driven by `tb_dcache_env` (below) |
| `tb_calm_cache_system` | both environments at once on the top with every default |
| `tb_quicksort_workload` | a quicksort program on the top with every default (below) |
| `tb_hit_energy_workload` | access programs that always hit in the array or in the miss cache (below) |
| `tb_writeback_traffic_workload` | write-back traffic of a random load/store stream (below) |

`tb_icache_env` replays fetch streams:

* a locked region;
* random loops;
* two loops that conflict on the same indices;
* loops that conflict with the locked lines;
* single-line and whole-cache invalidation.

It checks every half-word against the memory contents, which it computes
itself from the memory model's hash. It also checks 1-cycle latency for LRB
and array hits and for fetches served during a fill, and 3-cycle latency for
miss-cache hits. A failure is counted
if any of these never occurs: LRB hit, array hit, miss-cache hit, fill,
locked fill, early restart, fetch served during a fill.

`tb_dcache_env` issues random loads and stores over 96 lines that share 24
indices:

* pages alternate between write-back and write-through;
* one phase forces write-through;
* the per-line maintenance operations are run in between.

It keeps a reference image of memory. Every load is compared against it.
After each whole-cache synchronize or flush, the memory model must equal the
reference word for word. This catches a lost dirty half, a stale fill and a
reordered buffer. It also requires at least one stall on a full buffer, one
write-back push and one early restart, and that every access needing a fill
completes when its hot word arrives.

One full run of `tb_calm_cache_system` makes about 5 100 fetches and 4 000
data accesses. About 62 % of the fetches are LRB hits; the random loops are
short and often start mid-line. All checks pass.

`tb_quicksort_workload` runs the kind of program whose supply current the
original design reports: a quicksort of 512 words (2 KB) in a write-back
page, with a fetch loop running beside it. Every element access goes through
the data cache and waits for its result. The program runs twice; the second
run first restores the unsorted values. Each run must leave the array sorted.
The second run must do no fill in either cache, because code and data stay
resident. After a final flush the memory must hold the sorted array. A run
takes about 26 000 cycles, with about 12 300 data accesses and 25 600
fetches; 85 % of the fetches are LRB hits. All checks pass.

`tb_hit_energy_workload` runs the programs used to find the energy of one
access: fetches, loads and stores that always hit in the array, straight-line
code that hits in the LRB, and accesses that alternate between two lines of
the same index, so each one hits in the miss cache. After a warm-up pass,
every measured access must be served the intended way, with no memory
traffic. The access times must be exact: 1 cycle for array hits, 3 for
miss-cache hits. It prints tag-array, data-array, CAM and memory activity per
program. In the straight-line program, 448 of 512 fetches come from the LRB.
On those fetches neither array is enabled.

`tb_writeback_traffic_workload` measures write-back traffic. It runs 20 000
random loads and stores over 64 KB, four times the cache, with most accesses
in a 4 KB hot region. Then it flushes the cache. It counts the lines handed to
the write-back buffer and the words written to memory. With one dirty bit per
line, each of those lines would cost four words. In this run the memory gets
62 % of that. Every load is checked, and after the flush the memory must
equal the reference.

## Simulating

With Verilator 5 (the package first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_calm_cache_system \
    rtl/cache_pkg.sv rtl/*.sv tb/*.sv -o sim
./obj_dir/sim
```

Swap the top module for any other testbench. Each testbench has also been
run with ten seeds (`+verilator+seed+1` to `+verilator+seed+10`), and all of
them pass. Uninitialised state may start
at random values (`+verilator+rand+reset+2`): reset and the post-reset
invalidation make the design independent of the SRAM contents. Lint with `verilator --lint-only -Wall rtl/cache_pkg.sv rtl/*.sv
--top-module calm_cache_system`. The remaining warnings fall into three
groups:

* unused bits: the instruction cache ignores the dirty fields of its miss
  cache, and line offsets are ignored where a line address is used;
* assertion resets;
* package constants that a given module does not use.
