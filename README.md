# Segmented bitline cache

In an SRAM cache, every read or write has to charge or discharge the whole
bitline, even when the accessed cell sits right next to the sense amplifiers.
A segmented bitline cuts each bitline into segments with transmission gates
("segmenters"). An access to a row near the sense amplifiers then only
drives the short piece of bitline up to that row. Near rows become cheaper to
access than far rows, and the farthest rows cost a little more than in an
unsegmented array, because of the load the segmenters add.

This only saves power if most accesses go to the near rows. L1 access
patterns are strongly skewed: a handful of sets receive most of the
accesses. So this design keeps a small table that says which group of sets
lives in which segment. It counts accesses per group and, from time to
time, moves the busiest group into the segment next to the sense amplifiers.
The RTL here is a complete cache built that way:

* 16 KB, 4-way set associative, 64-byte lines: 64 sets, so 64 rows per array;
* tag and data arrays with bitlines cut into 8 segments of 8 rows;
* 8 clusters of 8 sets each, with one access counter per cluster;
* a cluster-to-segment configuration register, filled by software (static
  mapping) or rewritten by hardware from the counters (two dynamic modes);
* a blocking controller with write-through, LRU replacement and a simple
  line-refill memory port.

The same block serves as the L1 instruction cache or the L1 data cache; a
processor with split L1 caches uses two instances, each with its own
counters and map.

## How an access finds its row

```
req_addr ─► set index (6 bits) ─┬─ cluster = set[5:3] ─► map[cluster] = segment ─┐
                                └─ set[2:0] ────────────────────────────────────┴─► physical row
physical row ─► row decoder ─► wordline WL[row]
segment      ─► segmenter control ─► SC[k] = 1 for k < segment, 0 beyond
```

The cluster bits of the set index are replaced by the segment number stored
for that cluster (`sbl_remap_mux`). The physical row is `{segment, set[2:0]}`,
so a cluster always occupies one whole segment. The only logic added to the
decoder path is one 8:1 multiplexer per segment-address bit. Arbitrary
permutations of individual sets are not supported: that would need a much
slower decoder.

Segment 0 (rows 0–7) is next to the precharge/sense/write circuitry.
Segmenter `k` sits between segment `k` and `k+1`. For an access to segment
`s`, `sbl_segmenter_ctrl` turns on segmenters `0..s-1` and opens every
segmenter beyond. In cycles without an access all segmenters are on. That is
the synchronous stand-in for the circuit's precharge phase, in which the
whole bitline is precharged while the address is still being decoded.

## What the segmented array models

`sbl_segmented_array` is a synchronous-read memory with an explicit logical
model of the segmenters. On each access the array checks that every
segmenter between the addressed row and the sense amplifiers is on:

* if so, the read or (column-masked) write happens normally;
* if not, the row is cut off. A read returns the precharged level (all ones)
  with `rd_ok = 0`, and a write is lost.

This turns a wrong segmenter setting into a functional error that a
simulation can see. `sbl_top` also carries an assertion that every array
read reached its row. Bitline voltages, discharge swing, segmenter delay and
power are analogue effects; they are not modelled.

The top uses one 64×80 tag array (4 ways × 20-bit tags, written per way
through the column mask) and four 64×512 data arrays. All of them share the
wordlines and the segmenter controls.

## Clusters, counters and remapping

This is the part that needs the most care.

**Counting.** `sbl_cluster_counters` keeps one 32-bit saturating counter per
cluster. It increments once for each CPU request the cache accepts. Line
refills and write-hit updates do not count again.

**Modes** (`mode`, type `sbl_pkg::map_mode_e`):

| mode | when the map changes | counters |
|---|---|---|
| `MAP_STATIC` | only when software pulses `static_map_load` with a profiled `static_map` | not used by the hardware |
| `MAP_DCF` (dynamic, counter flush) | every `REMAP_INTERVAL` cycles (default 1,000,000) and on every `context_switch` pulse | cleared at every remap, so each map reflects the last interval |
| `MAP_DNCF` (dynamic, no counter flush) | same triggers | never cleared: the map reflects all accesses since reset |

**Ranking.** At a dynamic remap, `sbl_map_ctrl` gives every cluster the rank
of its count. The rank is the number of clusters with a higher count, plus
the number of clusters with an equal count and a lower index. The cluster
with rank `r` goes to segment `r`. The most accessed cluster lands in
segment 0, the cheapest. Ties go to the lower cluster number. The ranks
always form a permutation, so the map stays one-to-one. The ranking is a
full 8×8 comparator network evaluated in one cycle.

**Why a remap invalidates the cache.** Changing the map moves sets to other
physical rows, so the arrays' contents no longer match their sets. Copying
lines to their new rows would cost a lot of energy, and the copies would
have to be done row by row. Remaps happen
rarely (interval ends, context switches), when much of the cache state is
stale anyway. So every remap simply clears all valid bits.

**Handshake.** A trigger sets a pending request (`remap_req`). The cache
controller accepts no new CPU request while it is pending. Once idle, the
controller answers `remap_ack`. In the cycle where both are high
(`remap_fire`, visible on the top as `remap_event`), three things happen at
the clock edge:

* the configuration register is written;
* all valid bits are cleared;
* in `MAP_DCF` mode, or for a static load, the counters are flushed.

The interval timer restarts after every remap. After reset the map is the
identity (cluster `c` in segment `c`) and the mode input decides what
happens next.

## The cache controller

The segmentation scheme does not depend on the cache controller, so this
one is kept simple. `sbl_cache_ctrl` is blocking and handles one request at
a time:

| state | action |
|---|---|
| `IDLE` | accept a request; read the tag array and all data ways at the (remapped) row |
| `LOOKUP` | compare the four tags. Read hit: `resp_valid` with the word, in the cycle after acceptance. Read miss: go to `MISS_REQ`. Write: go to `WR_HIT` on a hit, else to `WR_MEM` |
| `WR_HIT` | write the word's bytes into the hit way |
| `WR_MEM` | send the word write to memory; `resp_valid` when the memory accepts it |
| `MISS_REQ`, `MISS_WAIT` | request the line; when it arrives, write line and tag into the victim way, set valid, return the word |

Writes go through to memory and do not allocate a line on a miss. The victim
is the first invalid way, otherwise the least recently used one. LRU state is
a 2-bit age per way per set, held in flip-flops like the valid bits, so a
remap can clear the valid bits in one cycle.

## Interface of `sbl_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `req_valid`/`req_ready` | in/out | 1 | request handshake |
| `req_we`, `req_addr`, `req_wdata`, `req_wstrb` | in | 1, 32, 64, 8 | write flag, byte address, data word, byte strobes |
| `resp_valid`, `resp_rdata`, `resp_hit` | out | 1, 64, 1 | one response per request (reads and writes); `resp_hit` reports hit or miss |
| `mem_req_valid`/`mem_req_ready` | out/in | 1 | memory request handshake |
| `mem_req_we`, `mem_req_addr`, `mem_req_wdata`, `mem_req_wstrb` | out | 1, 32, 64, 8 | line read (line-aligned address) or posted word write |
| `mem_resp_valid`, `mem_resp_line` | in | 1, 512 | line returned for a read, any number of cycles later |
| `mode` | in | 2 | `MAP_STATIC`, `MAP_DCF`, `MAP_DNCF` |
| `context_switch` | in | 1 | pulse; requests a remap in the dynamic modes |
| `static_map_load`, `static_map` | in | 1, 8×3 | load a profiled cluster-to-segment map |
| `map` | out | 8×3 | configuration register |
| `cluster_counts` | out | 8×32 | access counters |
| `remap_event` | out | 1 | a remap and invalidation take place this cycle |
| `seg_access_valid`, `seg_access` | out | 1, 3 | physical segment of every array access |
| `sc` | out | 7 | segmenter controls |

Multiplying the `seg_access` counts by the per-segment access energy of a
given array gives the cache's bitline power. Those energies come from
circuit simulation and are not part of the RTL.

## Parameters

| parameter | default | notes |
|---|---|---|
| `SETS` | 64 | rows per array |
| `WAYS` | 4 | |
| `LINE_BYTES` | 64 | |
| `SEGMENTS` | 8 | power of two, at least 2; 2 and 4 are simulated by `tb_sbl_top_segments` |
| `ADDR_W`, `WORD_W` | 32, 64 | own choice; the memory model in `tb/` assumes these |
| `CNT_W` | 32 | counter width, own choice |
| `REMAP_INTERVAL` | 1,000,000 | cycles between dynamic remaps |

## Where this RTL departs from, or adds to, the scheme

* The controller, write policy, replacement policy, memory port, word and
  address widths and counter width are this design's own choices.
* Both remap triggers are built: a fixed interval and context switches.
* Both tag and data arrays are segmented. The arrays are not split into the
  banks and sub-arrays a real L1 would use.
* The clock-low precharge phase, with all segmenters on, is modelled as
  "all segmenters on in every cycle without an access".
* Reads from a cut-off row return all ones, and writes to one are lost. This
  is a modelling choice that makes segmenter errors visible.
* Only equal-size segments are supported. Configurations with unequal
  segments (for example 8/56 rows, 8/16/40 rows or 8/8/8/8/32 rows) would
  need clusters of unequal size and a different remap decoder.
* The analogue behaviour is not modelled: bitline energy per segment,
  segmenter delay, reduced swing at high clock rates and the resulting sense
  margin.

## Testbenches and how to run them

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. Each has a watchdog that counts a
failure if the run does not finish.

| testbench | what it checks |
|---|---|
| `tb_sbl_segmenter_ctrl` | every segment in both phases, and the number of gates on |
| `tb_sbl_remap_mux` | every set under the identity map, the reversed map and random permutations |
| `tb_sbl_row_decoder` | one-hot output, and nothing while disabled |
| `tb_sbl_segmented_array` | writes and reads, masked writes, reads and writes blocked by an open segmenter, near rows unaffected |
| `tb_sbl_cluster_counters` | random increments and flushes against a model; saturation |
| `tb_sbl_map_ctrl` | interval timing, ranking against an independent sort, dcf versus dncf flushing, context switches, waiting for `remap_ack`, static load |
| `tb_sbl_cache_ctrl` | controller on plain arrays: data, hit/miss against a reference LRU cache, read-hit latency, write-through, invalidation |
| `tb_sbl_top` | whole cache with `REMAP_INTERVAL = 2000`: dcf remaps, a context switch, dncf remaps, static load |
| `tb_sbl_top_full` | the same sequence with every parameter at its default, about 2.1 million cycles |
| `tb_sbl_top_segments` | the same sequence on a 4-segment and a 2-segment cache side by side |

The top-level benches use `tb/sbl_top_driver.sv` for stimulus and checks
(`tb/sbl_seg_variant.sv` wraps one cache, its memory and its driver for
the segment-count bench). The stream sends 60 % of accesses to one hot
cluster and the rest anywhere; a quarter are writes. The driver checks:

* every read word against a reference memory;
* every hit or miss against a reference LRU cache;
* the reported cluster counts against its own;
* every new map against its own ranking;
* the segment and segmenter controls of every array access.

It also counts each mechanism (read and write hits and misses, evictions,
dcf, dncf and context-switch remaps, static load, counter flush) and fails a
run in which one never occurs. `tb/sbl_mem_model.sv` is the behavioural
next-level memory; `tb/sbl_tb_pkg.sv` holds the reference models.

Building and running one bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sbl_pkg.sv tb/sbl_tb_pkg.sv tb/tb_sbl_top.sv --top-module tb_sbl_top
./obj_dir/Vtb_sbl_top
```

Replace `tb_sbl_top` by any bench name. `tb_sbl_top_full` runs in about ten
seconds.
