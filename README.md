# DRAM-cache prefetching for CXL pooled memory

When servers share a memory pool over CXL.mem, each node reaches that
fabric-attached memory (FAM) at several times the latency of its local DRAM,
and all nodes compete for the pool's few DDR channels. This design hides much
of that latency by giving each node's CXL root complex a hardware prefetcher
that copies 256 B sub-page blocks of FAM into a reserved region of the node's
own DRAM, the *DRAM cache*. It also keeps the prefetches from taking
bandwidth away from demand traffic. It does this in two independent ways:

* **at the memory node**, the FAM controller keeps demand and prefetch requests
  in separate queues and serves them by weighted fair queuing. A demand that
  needs a block still queued as a prefetch *promotes* that prefetch;
* **at each compute node**, a bandwidth adaptation unit measures demand
  latency and cuts the prefetch rate when the pool looks congested.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, with a
self-checking testbench per block in `tb/`.

## System view

```
  node n (x NODES)                                      memory node
  +--------------------------------------------+
  | LLC --FAM-bound misses/writebacks-->        |
  |   enhanced_root_complex                     |        fam_ctrl
  |     rc_ctrl ---- dc_metadata (tags)         |   +------------------+
  |       |   \----- prefetch_queue (in flight) |   | demand queue  \  |
  |       |   \----- spp_prefetcher             |==>| prefetch queue -> wfq_sched --> FAM device
  |       |   \----- bw_adapt (rate, credit)    |   | promotion        |
  |       \--------- cxl_agent  ==== link ======|   +------------------+
  |   local memory controller <-- proxy reads/writes, fills, victim reads
  +--------------------------------------------+
```

`cxl_pool_top` instantiates `NODES` root complexes and one FAM controller.
Each node's link is a direct valid/ready channel. The parts around the design
are ports of the top, and the testbenches model them:

* the cores and caches (which deliver only FAM-bound LLC traffic);
* the local memory controller, which holds the DRAM-cache data;
* the FAM DDR device.

The CXL physical layer, switches and address decoders are not modelled.

Shared types are in `cxl_dc_pkg`:

* LLC request and response;
* local-memory request;
* the M2S request and S2M response messages, which carry an opcode (read, write, promote), a prefetch mark, a block mark, the address, a tag and the node number;
* the node statistics.

## Life of a request in the root complex (`rc_ctrl`)

The hardest part to follow is the root complex, because one read can take
several paths. A single state machine handles one event at a time. When
several events are pending, the priority is:

1. FAM completions;
2. local-memory completions;
3. LLC requests;
4. prefetch candidates.

This keeps every table update atomic without locking.

* **LLC read.** The controller looks up the metadata.
  * On a **hit**, it sends a proxy read to the local memory controller at the block's DRAM-cache address, and the completion goes back to the LLC marked "from DRAM cache".
  * On a **miss**, it searches the prefetch queue. If a prefetch of the block is in flight, the read is parked in that slot, and a *promotion* message is sent so the FAM controller can move the prefetch into its demand queue. Otherwise the read goes to FAM as a 64 B demand read.
  * Hit or miss, the address then trains the prefetcher.
* **LLC writeback.**
  * On a metadata hit, the block is marked dirty and the line is written into the DRAM cache.
  * On a miss, the line goes to FAM. A matching in-flight prefetch is marked *stale*, so the old data is not installed when it arrives.
* **Prefetch candidate.** A candidate is dropped in any of these cases:
  * it is already in the prefetch queue;
  * it is already in the DRAM cache;
  * the queue is at 95 % occupancy;
  * the bandwidth unit has no credit.

  Otherwise it takes a queue slot and leaves as a 256 B DRAM-cache prefetch. Its tag is the slot number.
* **Prefetch completion.** The slot is freed.
  * A stale block is discarded.
  * Otherwise it is installed in the metadata. A victim is chosen in this order: an invalid way, the least recently used clean way, and only then the least recently used dirty way. A dirty victim is read from the DRAM cache and written back to FAM. The new block is then written to its DRAM location.
  * A parked demand gets its proxy read.
* **FAM read completion.** The data of a demand or core prefetch returns to the LLC.

A slot records only one parked demand. A second demand for the same block
simply reads FAM.

## The prefetcher (`spp_prefetcher`)

This is a Signature Path Prefetcher that works in 256 B blocks instead of
64 B lines.

* **Signature table.** It is indexed by page and keeps the last block touched in the page and a 12-bit signature. The signature is updated as `(sig << 4) ^ delta`.
* **Pattern table.** It is indexed by signature and holds four (delta, count) pairs.
* **Training.** Each training address strengthens the delta it observed.
* **Walk.** The prefetcher then walks ahead. The strongest delta gives the next block, and the speculative signature indexes the next step.
* **End of the walk.** The walk stops after `DEGREE` (4) candidates, when an entry is empty, or at the page edge. A new training address ends the walk early, so a slow consumer never blocks training.

The tables are twice the classic SPP sizes: 512 signature entries and 1024 pattern entries.

## FAM controller and weighted fair queuing (`fam_ctrl`, `wfq_sched`)

**Intake.** One request per cycle enters, round robin over the nodes whose
request its queue can take now.

* Demand reads and writes, including dirty victims, go to the demand queue.
* Core prefetches and DRAM-cache prefetches go to the prefetch queue.
* A promotion looks up the oldest queued prefetch with its address and moves it to the demand tail. If none is found, the prefetch has already left and the promotion is dropped.

**Issue.** Issue slots model the device's bandwidth. A slot opens every
`ISSUE_INTERVAL` (2) cycles per 64 B moved, so a 256 B block delays the next
slot four times as long. Two DDR4-2400 channels give 38.4 GB/s, which is one
line per 1.67 ns, or 2 cycles at 1.2 GHz.

**Scheduling.** In each slot `wfq_sched` runs a work-conserving deficit
weighted round robin over windows of `W+1` rounds:

* One round prefers prefetches and the other `W` rounds prefer demands.
* The preferred class earns a quantum of 4 deficit, up to a cap of 8.
* A demand issues with a positive deficit and costs 1.
* A prefetch needs a deficit of at least `r` and costs `r`. Here `r` is its size in 64 B units: 4 for a DRAM-cache block, 1 for a core prefetch.
* If the preferred class cannot issue, the other class is tried.

Under saturation this gives exactly `W` demands per DRAM-cache prefetch. The
testbench checks this.

## Bandwidth adaptation (`bw_adapt`)

Every `SAMPLE_CYCLES` (4096) cycles the unit takes and clears four event
counters:

* demand reads arriving;
* demand reads sent to FAM;
* demand reads returned;
* prefetches sent.

It then performs these steps:

1. **Period latency.** The demand latency of the period comes from Little's law: the sum of outstanding demand reads per cycle, divided by the reads returned.
2. **Average.** It is smoothed into a moving average, `avg += (inst - avg)/4`.
3. **Minimum and congestion.** The *minimum latency* is the smallest average of the last 8 periods. The node is *congested* when `avg > 1.30 × minimum`.
4. **Accuracy.** This is the share of demands that did not need FAM, per prefetch issued.
5. **Rate.** The prefetch rate is expressed in prefetches per demand, with 8 fraction bits.
   * Without congestion it grows by 1/8 (×1.125), up to `DEGREE`.
   * With congestion it is cut by a fraction proportional to `(avg − min)/min`, scaled by `(2 − accuracy)/2` and bounded to [1/16, 1/2]. Accurate streams are therefore cut more gently.
   * It never goes below 1/32.

From the rate the unit derives three values: prefetches per demand, demands
per prefetch, and whether prefetches outnumber demands. These feed a credit
counter that gates each prefetch. With `bwa_enable` low the gate is always
open, which gives the non-adaptive mode.

## DRAM-cache metadata (`dc_metadata`)

The cache is 16 MiB per node in 256 B blocks, 16 ways and 4096 sets. The set
index is the block number's low bits XOR-folded with its upper bits. Each way
holds a tag, valid, dirty and a 4-bit LRU age, about 4 B per block and
256 KiB per node. The DRAM address of a block is
`DC_BASE + (set × WAYS + way) × 256`.

* After reset the table clears one set per cycle. For the 4096 sets that takes 4096 cycles, with `req_ready` low.
* Each operation takes two cycles.

## Where this departs from the source description

* **No global history table.** The SPP has no global history table, so a new page starts with no pattern (`spp_prefetcher` is therefore partial).
* **Set-associative metadata.** The metadata is a set-associative table with an XOR-fold hash. Cuckoo hashing was mentioned only as an option.
* **Prefetch deficit test.** The WFQ lets a prefetch issue when its deficit is *at least* the block ratio. A pseudo-code variant says *greater than*. Quantum and caps are this design's values.
* **Choices of this design in bandwidth adaptation.** The source does not specify:
  * the latency measurement (Little's law);
  * the average weight;
  * the exact decrease formula and its bounds;
  * the credit gate.
* **Serial controller.** The root complex handles one event at a time. A real design would pipeline it. It keeps a single parked demand per in-flight prefetch, and writebacks that miss mark in-flight prefetches stale.
* **No fabric.** The CXL fabric is a direct valid/ready link with no flits or fabric latency. Messages carry only the fields this design uses.
* **Unspecified sizes.** Prefetch degree 4, 16 ways, FAM queue depths 32, sampling period 4096 and the issue interval are assumed values. The 256-entry prefetch queue, 95 % threshold, 8-sample history, 130 % margin, ×1.125 increase, 256 B block, 16 MiB cache and WFQ weight 2 are the source's numbers.
* **Single-FIFO baseline not built.** The baseline FAM controller with a single FIFO is not built.

## Parameters of the top (`cxl_pool_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NODES` | 4 | compute nodes sharing the FAM |
| `BLK_OFF` | 8 | log2 of the DRAM-cache block (128/256/512 B: 7/8/9) |
| `PQ_DEPTH` | 256 | prefetch-queue entries per node (threshold 95 %) |
| `DC_BYTES` | 16777216 | DRAM cache per node |
| `DC_WAYS` | 16 | associativity of the metadata |
| `DEGREE` | 4 | prefetches per training, and the maximum rate |
| `SAMPLE_CYCLES` | 4096 | adaptation sampling period |
| `WFQ_WEIGHT` | 2 | demand weight W |
| `FAM_Q_DEPTH` | 32 | FAM demand and prefetch queue depth |
| `ISSUE_INTERVAL` | 2 | cycles per 64 B at the FAM device |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (every bench has a watchdog). Build with Verilator 5, package first:

```
verilator --binary --timing --assert rtl/cxl_dc_pkg.sv \
  $(ls rtl/*.sv | grep -v cxl_dc_pkg) tb/tb_cxl_pool_top.sv \
  --top-module tb_cxl_pool_top -o sim
./obj_dir/sim
```

The same command with `tb/tb_<block>.sv` tests a single block. What each testbench covers:

| Testbench | What it checks |
|---|---|
| `tb_wfq_sched` | against a reference model of the round/deficit rules |
| `tb_spp_prefetcher` | directed streams and the candidate order |
| `tb_prefetch_queue` | allocation, threshold, search, marks and release |
| `tb_dc_metadata` | against a reference cache with clean-first LRU |
| `tb_bw_adapt` | every sample against a reference model, through a congestion phase and recovery |
| `tb_cxl_agent` | message formats and back-pressure |
| `tb_fam_ctrl` | queue order against reference queues, the issue spacing and the exact 2:1 share under saturation, and promotion |
| `tb_enhanced_root_complex` | one node with miss, prefetch, hit, writeback hit and a demand waiting on a prefetch, then random traffic |
| `tb_cxl_pool_top` | four nodes end to end at reduced sizes; it counts every mechanism and fails if any never happens |
| `tb_cxl_pool_top_full` | the whole design with every parameter at its default |
| `tb_wfq_weights` | three FAM controllers with weights 1, 2 and 3 under saturated load; each must give exactly W demands per prefetch |

`tb_cxl_pool_top` runs at reduced sizes:

* an 8 KiB two-way DRAM cache;
* 8-entry prefetch and FAM queues;
* 512-cycle sampling.

At that size evictions and queue overflow happen. It counts every mechanism: hits, misses, writeback hits, prefetch issue, each drop reason, demand waits, promotions done and dropped, fills, dirty evictions, stale prefetches, congestion with a rate cut, both WFQ outcomes and back-pressure. A mechanism that never happened counts as a failure.

`tb_cxl_pool_top_full` runs the whole design with every parameter at its default:

* four nodes;
* 16 MiB caches;
* 256-entry queues;
* 4096-cycle sampling.

It runs about 64 000 cycles in under a second. At this size and run length no block is evicted and the 256-entry queue never overflows. Those two mechanisms are only reported; the others are required.
