# A system level cache with selectable prefetchers for GPU traffic

A mobile GPU's shader cores share L2 slices, and behind the L2 sits a system
level cache (SLC) in front of DRAM. By the time requests reach the SLC they have
lost most of what classic CPU prefetchers rely on: there is no program counter,
and requests from many threads and cores arrive interleaved. What the SLC still
sees with each request is the line address, the requesting core and a *reason*
code, which says which kind of GPU traffic the request belongs to (48 codes).
This design uses those three fields to predict upcoming reads and fetch them
into the SLC before they are asked for.

The RTL is a 1 MiB, 4-way SLC with five prefetchers built in. One of them,
chosen at run time, watches the SLC's demand reads and sends prefetch addresses
into a queue, from which the cache fetches them:

| Selection | Prefetcher | Idea in one line |
|---|---|---|
| `PF_NONE` | none | the plain SLC, for comparison |
| `PF_NSP`  | naive stride | track up to 8 chains of consecutive lines, prefetch the next 3 |
| `PF_ADP`  | adaptive degree | one stride per reason code; the longer it repeats, the further ahead it fetches |
| `PF_ASDP` | adaptive stream detection | learn how long streams usually are and prefetch only if the current one is likely to go on |
| `PF_MBOP` | modified best offset | find the single address offset that best predicts the next read, use it for the next period |
| `PF_LLC`  | last-level collective | group the strides of different cores that serve the same reason code and prefetch for all of them at once |

Everything is written in synthesizable SystemVerilog; DRAM and the GPU are
outside the design (a behavioural DRAM model is in `tb/`).

## Units and signals used throughout

- Addresses are 32-bit byte addresses; the cache line is 64 bytes. All
  prefetchers work on **line addresses** (byte address >> 6, 26 bits), and their
  strides and offsets are in lines.
- A demand request (`slc_req_t`) carries an 8-bit id (returned with the
  response), the 6-bit reason, the 2-bit core, a write flag, a cacheable flag
  and the line address. Requests are whole lines: the L2 always moves lines.
- A **training event** (`train_t`) is what a prefetcher sees: line address,
  reason, core, and whether the read hit. Only cacheable demand reads train.
- Shared types and constants are in `rtl/slc_pkg.sv`.

## The cache (`slc_cache`)

4096 sets × 4 ways × 64 B, write-back and write-allocate, with round-robin
replacement after invalid ways. One controller does one thing at a time, with a
DRAM response (fill) before a demand request before a prefetch address.

- **Read hit:** the data comes back one cycle after acceptance. If the line was
  brought in by a prefetch and this is its first use, the prefetch is counted
  useful (`pf_useful`).
- **Read miss:** a fill slot (MSHR, 8 of them) is taken and DRAM is read. Only
  one demand miss is outstanding: further demand requests wait, while fills and
  prefetches carry on. If a prefetch for the same line is already in flight,
  the demand joins it instead (`pf_late`).
- **Write:** a hit updates the line and marks it dirty. A miss allocates a way
  and installs the line dirty; a dirty victim is written back first.
- **Non-cacheable** requests bypass the cache (`bypasses`). Reads are not
  allocated. Writes go straight to DRAM and also update a copy already held.
- **Prefetch address:** dropped (`pf_filtered`) if the line is resident or
  already in flight. Otherwise it takes a fill slot and reads DRAM. A prefetch
  needs two free slots, so a demand miss always finds one.
- **Fill:** installed in the victim way, after writing back a dirty victim.

Timing: a read hit is answered on the first edge after the accepting edge; a
miss with a clean victim LAT + 4 edges after it, where LAT is the DRAM round
trip. After reset the controller spends 4096 cycles clearing the tag/state
array (it is not reset, so it can be a plain RAM). The two arrays each have one
write port.

A demand request is only accepted while the prefetcher can take a training
event. A prefetcher that is busy issuing therefore stalls demand traffic for a
few cycles. Prefetchers are fast compared with the DRAM latency, so this costs
little and no training event is ever lost.

## The prefetch path (`slc_top`, `pf_queue`)

All prefetchers share one interface. `train_valid/train_ready/train` takes one
access. The table update happens in the cycle the access is accepted. The
prefetcher then issues its prefetches one per cycle on `pf_valid/pf_ready/pf_addr`,
and keeps `train_ready` low until it has issued the last one. Their
addresses go into a 16-entry FIFO (`pf_queue`) that never pushes back. When it
is full the new address is dropped and counted (`pfq_dropped`). This keeps a
fast prefetcher from ever holding up demand traffic.

`pf_sel` may change at any time. Only the selected prefetcher is trained and
only its addresses are queued. A change flushes the queue. Each prefetcher keeps
its tables while deselected.

## Naive stride prefetcher (`nsp_prefetcher`)

A table of 8 entries, each following a chain of accesses that move by a fixed
stride (one line), up or down. An entry holds the last address, a saturating
confidence, a "recently prefetched" bit, a lifetime and the direction.

On each read:
1. An entry whose address is one stride below or above the access matches. It
   moves to the access, gains confidence, takes that direction, has its
   lifetime extended by 40, and loses its "recently prefetched" bit. The first
   match in table order wins.
2. Without a match, the access takes a free entry, with lifetime 80 and upward
   direction. If the table is full, the access is not tracked.
3. Every lifetime counts down by one. An entry reaching zero is freed.
4. On a miss, every entry with confidence ≥ threshold (0) and not recently
   prefetched prefetches `address ± k·stride` for k = 1…3, and then sets its
   bit. That is 3 prefetches per eligible entry.

The lifetime thus counts reads, not cycles.

## Adaptive degree prefetcher (`adp_prefetcher`)

One entry per reason code (48), each holding an address, a stride and a
confidence. The first access of a reason records the address. The second
records the difference as the stride. From then on a repeat of the stride adds
one to the confidence, and a different stride replaces it and clears the
confidence. On a miss with a non-zero stride the prefetcher issues
`degree = min(confidence − threshold + 1, 8)` lines, starting one stride
beyond the distance (distance 1): `A + s·2 … A + s·(1+degree)`. The reason code
stands in for the program counter a CPU stride prefetcher would use. The degree
is what adapts: a reason whose stride has repeated often is fetched further ahead.

## Adaptive stream detection prefetcher (`asdp_prefetcher`)

This is the most involved of the five. It predicts from **how long streams
tend to be**, not from a fixed stride.

**Stream filter.** Sixteen entries follow streams of consecutive lines, each
holding its last line, its length, its direction and a lifetime. An access one
line beyond a stream's end, in its direction, extends the stream. Either
direction works while the length is 1. Otherwise the access starts a new
stream of length 1 in a free entry. Lifetimes start at 80 and count down on
every read. An extended stream gets 80 more, but only 40 once it is at least
half the longest tracked length (16). This *length-based detection* makes long
streams leave sooner and keeps room for short ones.

**Length histograms.** For each direction there are three 16-bin tables:
- `curr`: what the current epoch predicts from;
- `next`: what is being learnt during this epoch;
- `prev`: what the previous epoch learnt.

Bin i counts reads that belonged to streams of length i or longer. When a
stream of length k leaves the filter, every bin i ≤ k gains one in `next` and
loses one in `curr` (never below zero). `curr` thus holds what is still
expected to come.

**Deciding to prefetch.** After an access has made a stream length i,
the prefetcher looks for the largest k ≤ 2 with

    curr(i) < 2 · curr(i + k)

(bins past 16 count as zero). That is, it asks whether more than half of the
streams that reached length i are expected to reach length i + k. If such a k
exists, it prefetches the next k lines in the stream's direction. Prefetching
is done on hits as well as misses.

**Adaptive epoch.** An epoch is a number of reads, 256 at first. At its end
the prefetcher compares `next` with `prev`. The similarity score is the mean
absolute difference over both directions and all bins. If it is above the
threshold (100), the behaviour changed within the epoch, so the epoch is
halved, to no less than 256. Otherwise it is doubled, to no more than 8000.
Then `next` becomes both `curr` and `prev`, and `next` is cleared. The
current length and each epoch end are visible on the top's `asdp_epoch_*`
ports.

## Modified best-offset prefetcher (`mbop_prefetcher`)

A 16-entry shift register keeps the last 16 read addresses. Each read adds one
point to every offset between it and those 16, if the offset is one of the 64
candidates −32…−1 and +1…+32. After 300 reads the offset with the most points
wins, and all points are cleared. Ties go to the most negative offset. If the
winner scored at least 50, it is used for the whole of the next 300 reads:
each miss prefetches `A + offset`. Otherwise prefetching pauses for that
period. Scoring every offset on every access (instead of one offset per access,
as in the classic best-offset scheme) is what makes it "modified". It suits an
SLC where lines from many sources interleave.

## Last-level collective prefetcher (`llc_prefetcher`)

GPU cores run the same code on different data, so the cores' stride patterns
for one kind of traffic are related. This prefetcher uses that:

- **Reference table** of 192 entries, one per (core, reason) pair, each holding
  a base address, a stride and a confidence. A repeated stride raises the
  confidence. A break in the stride throws the entry away, and the breaking
  access starts a new one.
- **Group table**, one per reason: a bit per core. An entry joins its reason's
  group once it has a non-zero stride with confidence above the threshold (0),
  and leaves when it is thrown away.
- **Firing:** a miss by a group member prefetches for the whole group. The
  members are ordered by base address. The prefetcher issues one stride ahead
  for every member, then two strides ahead for every member (degree 2):
  `B1+S1, …, BN+SN, B1+2·S1, …, BN+2·SN`. Going one stride at a time across
  the group fetches first what is needed first.

A group holds at most one entry per core. So the members are ordered by
ranking the group's four bases when it fires, not by a linked list kept in
base order.

## Parameters

Parameter defaults are the standard configuration:

| Block | Parameters (default) |
|---|---|
| `slc_cache` | `SIZE_BYTES` 1 MiB, `WAYS` 4; package: 64-byte lines, 8 fill slots |
| `pf_queue` | `DEPTH` 16 |
| `nsp_prefetcher` | `TABLESIZE` 8, `DEGREE` 3, `DISTANCE` 0, `CONFTHRESH` 0, `LIFETIME` 80, `LIFETIMEEXT` 40, `PREFETCHHITS` 0, `STRIDE` 1 |
| `adp_prefetcher` | `TABLESIZE` 48, `DISTANCE` 1, `CONFTHRESH` 0, `MAXDEGREE` 8, `PREFETCHHITS` 0 |
| `asdp_prefetcher` | `TABLESIZE` 16, `DEGREE` 2, `DISTANCE` 0, `EPOCHSIMTHRESH` 100, `EPOCHMIN` 256, `EPOCHMAX` 8000, `LIFETIME` 80, `LIFETIMEEXT` 80, `PREFETCHHITS` 1, `FS` 16 |
| `mbop_prefetcher` | `DEGREE` 1, `SCORETHRESH` 50, `EPOCHLENGTH` 300, `MAXOFFSET` 32, `NRRECENT` 16, `PREFETCHHITS` 0 |
| `llc_prefetcher` | `DEGREE` 2, `CONFTHRESH` 0, `NCORES` 4, `GTTABLESIZE` 48, `PREFETCHHITS` 0 |

The top has no parameters; it instantiates everything at these defaults.

## Where this design chooses for itself

The prefetching algorithms and their table sizes and thresholds are taken as
described for this SLC. The following were open, and are this design's
choices:

- 64-byte lines; strides and offsets in lines; NSP stride of one line.
- Eight fill slots; one outstanding demand miss; two free slots needed for a
  prefetch; prefetches of resident or in-flight lines dropped; late prefetches
  merged with the demand.
- Write-back, write-allocate, round-robin replacement; non-cacheable bypass
  as above; the "bufferable" flag is ignored.
- The train/prefetch handshake, and stalling demands while the prefetcher is
  busy.
- Epochs and lifetimes count reads, not clock cycles.
- ADP degree `confidence − threshold + 1`, capped at 8. ASDP longest tracked
  stream 16, with the lifetime extension halved from length 8. MBOP offsets
  symmetric around zero.
- The LLC groups by reason code instead of program counter, since the SLC has
  no program counter. Stride breaks remove the entry instead of lowering its
  confidence.
- In the ASDP, the "k" in the histogram update is read as one count per bin
  i ≤ k. A confidence threshold has no role in stream detection and is
  not built. A feedback throttle for prefetch aggressiveness is not built either.
- The queue flush on a prefetcher switch, and the drop-when-full queue.
- ADP, MBOP and LLC prefetch only on misses; only ASDP prefetches on hits too.

The design has a single SLC slice and four cores. Larger GPUs, with several
slices each holding its own prefetcher, or with up to 14 cores, need a wider
core id, a larger LLC table and a slice-select in front of several `slc_top`s.
These are not provided.

## Verification

Each block has a self-checking testbench in `tb/`. They print
`TB_RESULT checks=N failures=M` at the end.

- The five prefetcher testbenches drive long random access streams: strided
  chains, jumps, mixed reasons and cores, hits and misses, and random back
  pressure on the prefetch port. Each compares every prefetch address, in
  order, against a reference model written independently in the testbench.
  They also check that a trained access that issues n prefetches keeps the
  prefetcher busy exactly n cycles. The ASDP test shortens the epoch bounds
  (64…1024, threshold 3) so that it sees many epochs halve and double. The
  others run at default parameters.
- `tb_pf_queue` checks order, levels, flush and drop counting against a model
  queue.
- `tb_slc_cache` checks the cache against a memory model with random reads,
  writes, non-cacheable traffic and prefetches. It checks data, statistics,
  hit and miss latency, and write-backs.
- `tb_slc_top` runs the complete design at its defaults against a DRAM with a
  100-cycle latency. Its synthetic GPU-like workload has 2500 requests:
  - eight strided streams; pairs of streams share a reason code but come
    from different cores;
  - random reads, writes and non-cacheable reads.

  The identical workload is played once per prefetcher, once switching
  prefetchers every 300 requests, and once per prefetcher with every request
  from a single core. The test checks every read's data. It requires each
  prefetcher to add hits. It counts every mechanism: demand stalls by a busy
  prefetcher, bypasses, write-backs, filtered and late prefetches, ASDP
  epochs, an active MBOP offset, LLC group prefetches (including groups
  spanning cores) and switches. Queue overflows are counted but never occur
  with this traffic; they are exercised in `tb_pf_queue`.

Results of `tb_slc_top` (cycles for the 2500 requests, and demand read hits):

| Prefetcher | 4 cores: cycles | hits | 1 core: cycles | hits |
|---|---|---|---|---|
| none | 244405 | 0    | 244405 | 0   |
| NSP  | 215390 | 277  | 215390 | 277 |
| ADP  | 183127 | 609  | 183127 | 609 |
| ASDP | 227350 | 167  | 227350 | 167 |
| MBOP | 213770 | 313  | 213770 | 313 |
| LLC  | 173391 | 663  | 216479 | 263 |

Only the LLC prefetcher looks at the core, so only its result changes with
the core count. With four cores it can keep apart two streams that share a
reason code, and it prefetches them together. The synthetic workload is
dominated by strided streams. It says nothing about how the prefetchers would
rank on real GPU frames.

## Simulating

With Verilator 5, from the top of the tree (the package comes first):

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/slc_pkg.sv rtl/nsp_prefetcher.sv tb/tb_nsp_prefetcher.sv \
        --top-module tb_nsp_prefetcher
    ./obj_dir/Vtb_nsp_prefetcher

For the complete design:

    verilator --binary --timing --assert -Wno-fatal -Irtl rtl/slc_pkg.sv \
        rtl/pf_queue.sv rtl/slc_cache.sv rtl/nsp_prefetcher.sv \
        rtl/adp_prefetcher.sv rtl/asdp_prefetcher.sv rtl/mbop_prefetcher.sv \
        rtl/llc_prefetcher.sv rtl/slc_top.sv tb/dram_model.sv \
        tb/tb_slc_top.sv --top-module tb_slc_top
    ./obj_dir/Vtb_slc_top

The testbenches drive and sample on the falling clock edge, so they behave the
same on two-state and four-state simulators. Every testbench has a watchdog.

## Files

- `rtl/slc_pkg.sv`: types and constants
- `rtl/slc_cache.sv`: the cache
- `rtl/pf_queue.sv`: the prefetch queue
- `rtl/*_prefetcher.sv`: the five prefetchers
- `rtl/slc_top.sv`: the top
- `tb/dram_model.sv`: fixed-latency DRAM model
- `tb/tb_*.sv`: testbenches
