# Augmented-FIFO replacement for highly associative caches

Small embedded processors often use caches with 32 or 64 ways per set,
built around CAM (content-addressable) tag arrays. At that associativity,
true LRU costs too much state and too much update logic. So these caches
usually replace in plain FIFO order: each set has a pointer to its oldest
block, and that block is evicted even if the program is still using it.

This RTL implements three cheap extensions of FIFO that let a recently used
block escape eviction. All three keep the per-set FIFO pointer. They differ
in how much they remember about hits since the last miss:

| policy | extra state per set | on a hit | on a miss |
|---|---|---|---|
| **MH-FIFO** (Move-on-Hit) | none | if the hit way is the pointed way, advance the pointer | replace the pointed way, advance the pointer |
| **SH-FIFO** (Set-on-Hit) | 1 use bit per way | set the hit way's use bit | replace the first way from the pointer with a clear use bit (or the pointed way if every bit is set); clear all use bits; pointer to the way after the victim |
| **CB-FIFO** (Counter-Based) | 2-bit saturating counter per way | increment the hit way's counter (saturate at 3) | replace the way with the smallest count, first from the pointer on a tie; decrement every counter (floor 0), new block's counter = 0; pointer to the way after the victim |

The policies come from the published augmented-FIFO work of S. Cho and
L. Al Moakar. The cache around them, its interfaces and all of the
verification are this design's own. The default build is an 8 kB,
32-way, 32-byte-line cache (8 sets) using CB-FIFO. At that size the
replacement state is 40 bits for MH-FIFO, 296 bits for SH-FIFO and 552 bits
for CB-FIFO. The RTL stores exactly those bits: `log2(32) = 5` pointer bits per
set, plus 32 or 64 bits per set.

## How each policy behaves

**MH-FIFO.** Plain FIFO advances the pointer only on a miss. MH-FIFO also
advances it when a hit lands on the block the pointer names. That block is
the next victim, and it has just shown it is still in use. No state is added.
The only extra logic is one 5-bit comparator between the hit way and the
pointer. Example, 4 ways, pointer at way 2:

- a hit on way 2 moves the pointer to way 3, so the next miss replaces way 3;
- a hit on way 0 leaves the pointer alone, so the next miss replaces way 2.

**SH-FIFO.** The use bits record which blocks were hit since the set's last
miss. A hit sets one bit and reads nothing, which is much simpler than an
LRU update. On a miss, the search starts at the pointer and wraps around.
Example, 4 ways, pointer at way 2, ways 2 and 3 hit since the last miss: the
search skips 2 and 3, wraps, and picks way 0. The pointer then moves to way 1
and all use bits clear. If every way was used, the pointed way is replaced,
exactly as in plain FIFO.

**CB-FIFO.** This generalises SH-FIFO from one bit to a small count. Think of
SH-FIFO as CB-FIFO with 1-bit counters that are cleared on a miss. On a miss,
the ways are sorted into four groups by count (0, 1, 2, 3), using one
comparator per way and per value. The lowest non-empty group is kept, and
the same circular search from the pointer picks the way inside it. Counts
then drop by one, so a block's past hits fade over a few misses instead of
vanishing at once. Example, 4 ways, pointer at way 0, counts 3,1,2,1:

1. The smallest count is 1, held by ways 1 and 3. Way 1 comes first from the
   pointer, so it is the victim.
2. The counts become 2,0,1,0 and the pointer moves to way 2.
3. The next victim is way 3: it has count 0 and is the first such way from
   way 2.

`RESET_ON_MISS = 1` clears all counts on a miss instead of decrementing them.
This variant did slightly worse on average in the original evaluation, so it
is not the default. `CNT_BITS` widens the counters. Wider counters were
reported to bring no real gain, because blocks that are no longer used take
longer to age out.

## Victim search in hardware

`victim_search` is the circular first-one finder shared by SH- and CB-FIFO.
It rotates the candidate mask so that the pointer's way is at bit 0. A
priority encoder then finds the lowest set bit, and the pointer is added back
modulo the number of ways. `WAYS` must be a power of two.

The whole choice is combinational, from the selected set's state to
`victim_way`. All state updates happen at the next clock edge. A hit therefore
changes only its own way's bit or counter (or, for MH-FIFO, the pointer), and
hits keep their one-cycle rate.

## Lock-down

Embedded caches often lock critical lines into the cache. With a FIFO pointer
this is cheap: keep the pointer away from the locked ways. The input
`lock_base` is the first unlocked way:

- the pointer wraps from the last way back to `lock_base`, not to 0;
- a stored pointer below `lock_base` is read as `lock_base`;
- SH- and CB-FIFO also remove the locked ways from their search masks.

`lock_base = 0` locks nothing. To lock lines, load them after reset, while
the pointer still fills ways 0, 1, 2 and so on, and then raise `lock_base`.
There is one `lock_base` for all sets. The upper bound of the pointer is
always the last way.

## The cache (`afifo_cache`)

Address split at the defaults: `tag = addr[31:8]`, `set = addr[7:5]`,
`offset = addr[4:0]`.

- **Tags.** `cam_tag_array` holds a tag, a valid bit and a dirty bit for every
  way. It compares all 32 tags of the addressed set in parallel. An assertion
  checks that at most one way matches.
- **Data.** One array of 256-bit lines, indexed by `{set, way}`. Each access
  reads one line. A store hit writes one 32-bit word under byte enables. A
  fill writes a whole line.
- **Replacement.** The `POLICY` parameter picks `mh_fifo_repl`,
  `sh_fifo_repl` or `cb_fifo_repl` (`POL_MH`, `POL_SH`, `POL_CB`).
- **Write policy.** Write-back with write-allocate. Dirty victims go to
  `wb_buffer`, a 4-entry queue of line address and line data.

### CPU port timing

`cpu_req_valid`/`cpu_req_ready` form a normal valid/ready handshake.
`cpu_req_ready` is high whenever no miss is in progress.

A **hit** taken at clock edge *n* gives a one-cycle `cpu_resp_valid` pulse
that is seen at edge *n+1*, with the load data on `cpu_resp_rdata`. The
replacement state is updated at edge *n*. Back-to-back hits therefore run at
one per cycle.

A **miss** runs through these cycles:

| edge | what happens |
|---|---|
| *n* | Request taken; miss detected. The policy names the victim and updates its state. The victim line is read, and its tag, valid and dirty bits are kept. |
| *n+1* | `EVICT`: a dirty victim is pushed into the write-back buffer. If the buffer is full, the cache waits here. |
| *n+2* | `FETCH`: the fetch claims the memory port, unless the missing line is still in the write-back buffer. In that case the buffer must write it out first. |
| ... | The memory transfer: `mem_req` is held until `mem_done`. |
| `mem_done` edge | The line is written to the victim way, merged with the store data for a write miss. Tag, valid and dirty bits are set. |
| next edge | `cpu_resp_valid` pulse. |

With a memory that answers 24 cycles after it sees a request, an uncontended
miss answers 28 cycles after it was taken (24 + 4). The 24 cycles are the
block-transfer time of the system the policies were evaluated in.

### Memory port and the write-back buffer

The memory port carries a whole line per request: `mem_addr` is a line
address and `mem_wdata`/`mem_rdata` are 256 bits wide. One transfer is in
flight at a time. The bus width and the beat-by-beat transfer (32 bits in
the original system) belong to the memory controller.

Fetches have priority. A queued write-back may take the port only in these
cases:

- the cache is idle or serving a hit;
- the buffer is full and an eviction is waiting for space;
- the line being fetched is itself still queued.

So a fetch never waits behind a write-back it does not depend on. A burst of
dirty misses can fill the buffer, and the buffer then drains in the gaps
between misses. `wb_buffer` answers "is line X queued?" for all entries in
parallel. That check keeps a refetch from reading memory before its own
write-back has arrived.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `afifo_cache` | `CACHE_BYTES` | 8192 | data capacity |
| | `WAYS` | 32 | associativity (power of two) |
| | `LINE_BYTES` | 32 | line size |
| | `POLICY` | `POL_CB` | `POL_MH`, `POL_SH` or `POL_CB` |
| | `CNT_BITS` | 2 | CB-FIFO counter width |
| | `RESET_ON_MISS` | 0 | CB-FIFO: clear instead of decrement |
| | `WBB_DEPTH` | 4 | write-back buffer entries |
| | `ADDR_BITS` | 32 | byte address width |
| `*_fifo_repl` | `NSETS`, `WAYS` | 8, 32 | geometry |
| `wb_buffer` | `DEPTH`, `ADDR_BITS`, `LINE_BITS` | 4, 27, 256 | |

The number of sets is `CACHE_BYTES / (WAYS * LINE_BYTES)` and must be at
least 2. The cache also elaborates, with all three policies, at the other
sizes the policies were studied at: 4, 8 and 16 kB, each with 8, 16 or
32 ways.

## What is specified and what is chosen here

These parts follow the policy definitions:

- the hit and miss rules of the three schemes;
- the state bits and their counts;
- the search from the FIFO pointer, and the value-group comparison;
- decrement as the default miss action for CB-FIFO;
- lock-down as a lower bound on the pointer;
- the 8 kB / 32-way / 32 B geometry and the one-cycle hit;
- a 4-entry write-back buffer.

These are this design's own choices:

- **Pointer after a miss (SH- and CB-FIFO).** The pointer moves to the way
  after the victim. The schemes only say that the FIFO counter is set after
  the search.
- **CB-FIFO details.** Ties go to the first way from the pointer, and a newly
  filled block starts at count 0.
- **Reset.** Reset clears every pointer, use bit, counter, valid bit and dirty
  bit.
- **Lock-down details.** The clamp of a pointer that is below `lock_base`, and
  a single `lock_base` shared by all sets.
- **The rest of the cache.** The CPU and memory handshakes, the line-wide
  memory port, write-allocate, a blocking controller (one miss at a time),
  fetch-first arbitration and the queued-line check.
- **The CAM.** It is written as registers and equality comparators. There is
  no CAM circuit and no SRAM macro.

The original controller was reported to need about 500 flip-flops beyond the
replacement state. This RTL does not try to match that number.

## Verification

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_victim_search` | random masks and start ways against a way-by-way reference, for 32 and 8 ways |
| `tb_mh_fifo_repl` | the worked examples above on a 4-way unit, lock-down wrap, 20,000 random hits and fills at 8x32 against a reference model |
| `tb_sh_fifo_repl` | the same for use bits, including the all-used fallback |
| `tb_cb_fifo_repl` | the worked counts example, saturation, the reset variant, random traffic against a reference |
| `tb_cam_tag_array` | random fills, dirty marks and lookups against a reference tag store |
| `tb_wb_buffer` | random push and pop against a queue, including full, and the queued-line check |
| `tb_afifo_cache` | the default cache end to end (see below) |
| `tb_afifo_cache_policies` | the same traffic through MH-FIFO, SH-FIFO and clearing CB-FIFO caches |

`cache_exerciser` (in `tb/`) drives the end-to-end benches. It provides:

- a 24-cycle memory model;
- a reference copy of memory, against which every load is checked;
- a check that every hit answers in exactly one cycle;
- a fixed sequence of phases: cold fill, then lock four ways, then random
  traffic with hot lines, then a check that the locked lines still hit, then
  streams of stores and reloads that overflow a set, then unlocked random
  traffic, and finally a read-back of every written word.

`tb_afifo_cache` counts the events the cache exists to produce and fails if
any of them never happens:

- hits and misses;
- dirty evictions and write-backs;
- stalls on a full write-back buffer;
- fetches that waited for a queued line;
- CB-FIFO victims other than the pointed way;
- misses while ways were locked, each of which is also checked to pick an
  unlocked way.

It also checks the 28-cycle uncontended miss. The policies bench does the
same for the hit-moves-pointer event of MH-FIFO, SH-FIFO's skip and all-used
cases, and the clearing CB-FIFO.

Running a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_afifo_cache \
    -y rtl -y tb rtl/afifo_pkg.sv tb/tb_afifo_cache.sv
./obj_dir/Vtb_afifo_cache +verilator+rand+reset+2
```

The other benches are run the same way, with their own top-module name. The
benches expect a two-state simulator and do not rely on X values: all state
that is read is reset. Each bench finishes in well under a second of
simulation time on a desktop machine.

## Files

- `rtl/afifo_pkg.sv`: the policy and memory-operation enums.
- `rtl/victim_search.sv`: the circular first-one finder.
- `rtl/mh_fifo_repl.sv`, `rtl/sh_fifo_repl.sv`, `rtl/cb_fifo_repl.sv`: the
  three replacement units. They share one port list:
  `clk, rst_n, lock_base, set_idx, hit, hit_way, fill, victim_way`.
- `rtl/cam_tag_array.sv`: the tag store.
- `rtl/wb_buffer.sv`: the write-back buffer.
- `rtl/afifo_cache.sv`: the top-level cache.
- `tb/`: one testbench per module, plus the shared `cache_exerciser`.
