# CZone stride prefetching for a chip multiprocessor's shared L2

In a chip multiprocessor (CMP), four processors share one L2 cache. They also share that
chip's off-chip bandwidth and its small pool of transaction buffer entries (TBEs), the
slots that track outstanding memory requests. A prefetcher at this level must work
without program-counter values, and its wrong guesses cost every core on the chip. This
RTL builds one chip's L2 side around three ideas:

1. **CZone stride detection on the L2 miss stream.** Memory is cut into fixed-size
   *concentration zones* (CZones). A small table, indexed by zone, watches the misses in
   each zone. When two successive misses in a zone are the same distance apart, it
   prefetches `d` further lines at that distance, `d` being the *prefetch degree*. No
   program counter is needed, only the miss address.
2. **Prefetched lines are marked.** A prefetched line enters the cache in its own states:
   ISP while its data is in flight and SP once the data is there. A demand load that finds
   such a line is reported to the prefetcher as if it had missed. The prefetcher therefore
   keeps seeing the miss stream the program would have produced without it.
3. **Prefetches yield to demand misses.** A prefetch may leave the chip only while more
   than half of the TBEs are free. Otherwise it is dropped. Clusters of misses from
   several cores therefore cannot fill the TBEs with speculative requests.

The scheme comes from the course report *CS 838 – Chip Multiprocessor Prefetching*. That
report evaluates it in simulation and does not give RTL. The design here follows its
structure, its configuration and its rules. Everything the report leaves open was chosen
here, and the sections below mark those choices.

## Structure

```
 core0..3 L1 requests (GETS / GETX)
        |  |  |  |
   [ l1_req_arbiter ]  round robin
            |
   [ L1->L2 request queue ]      [ prefetch request queue ] <---- pf_addr ----+
            |                              |                                  |
            v                              v                                  |
   +-------------------------------------------------+     miss addresses  +------------------+
   | l2_cache_ctrl                                   |-------------------->| czone_prefetcher |
   |   tag/state array (16384 sets x 4 ways)         |                     |  filter table    |
   |   tbe_file (64 entries, CAM)                    |                     |  address gen.    |
   +-------------------------------------------------+                     +------------------+
            ^                              |
   [ response queue ]            [ L2->directory request queue ]
            ^                              |
      data returned                 GETS / GETX / PREFETCH / PUTX
      (from directory / memory)     (to the home directory)
```

Each request port carries all L2 requests of one processor, from both its instruction
and its data L1. `cmp_l2_prefetch_top` wires these parts together. `prefetch_stats`
counts events for the accuracy and coverage metrics. The processors, the L1 caches, the directory, the
memory controllers and the inter-chip links are not part of this RTL. Their signals are
the top's ports.

## The prefetch line states

These states are the core of the scheme and the least obvious part of the L2 controller.
Each L2 line is in one of these states:

| state | meaning |
|-------|---------|
| NP  | not present (invalid) |
| S   | shared, fetched or used by a demand request |
| M   | exclusive/modified |
| SP  | **shared prefetched**: brought in by a prefetch, not yet touched by a demand request |
| IS, IM | demand GETS / GETX outstanding |
| ISP | **prefetch outstanding**: way and TBE allocated, data not yet back |

Transitions that involve prefetching:

| from | event | to | side effects |
|------|-------|----|--------------|
| NP  | prefetch, line absent, more than NTBE/2 TBEs free | ISP | TBE allocated, PREFETCH sent off chip, `<NP>Prefetch` |
| NP  | prefetch, half or fewer TBEs free | NP | dropped, `pf_drop_tbe` |
| any but NP, or TBE already open | prefetch | unchanged | dropped, `pf_drop_hit` |
| ISP | data returns (PrefetchDataAck) | SP | TBE freed, no completion sent |
| ISP | demand GETS | IS | joins the prefetch's TBE, address sent to the prefetcher, `<ISP>GETS`; completed when the data arrives |
| SP  | demand GETS | S | completed at once, address sent to the prefetcher, `<SP>GETS` (a prefetch hit) |
| SP  | demand GETX | IM | upgrade sent off chip; not reported to the prefetcher |
| SP  | chosen as victim | NP | `sp_replace` (the prefetch was never used) |
| NP  | demand GETS | IS | GETS sent off chip, address sent to the prefetcher, `<NP>GETS` |

Only GETS requests (loads and instruction fetches) train the prefetcher or are ever
prefetched. GETX (store) misses go off chip without passing through the prefetcher.

The source report's diagram shows the NP → ISP → SP → NP cycle. It also shows GETS and
GETX arcs leaving NP, ISP and SP, but not the states they lead to. The targets in the
table above are this design's reading. In the same spirit, a GETS that hits ISP is fed
to the prefetcher just like one that hits SP, because that line has not been used yet
either.

## CZone filter table (`czone_filter_table`)

A line address (34 bits: 40-bit physical byte address, 64-byte lines) splits into:

```
 | CZone tag: row tag (14) | row index (10) | offset within zone (10) |
```

With the defaults a zone is 2^10 lines (64 KB) and the table has 1024 direct-mapped
rows. Each row holds *tag, state, stride, last offset*, which is about 29 bits, or
3.7 KB for the whole table. For a miss `a` whose row tag matches:

```
delta        = a - last        (subtractor)
stride_match = delta == stride (comparator)
first pf     = a + stride      (adder)
```

Row state machine (this design's detail; the report only says that each row keeps
some state deciding when a prefetch is triggered):

* tag mismatch: the row is taken over: `INIT`, last = a;
* `INIT`: stride = delta, go to `TRANSIENT`;
* `TRANSIENT` / `STEADY`: if delta == stride, **trigger** and go to (stay in) `STEADY`;
  otherwise record the new stride and go to `TRANSIENT`;
* delta = 0 (same line again) changes nothing.

A stream therefore triggers on its third miss. The table is read combinationally, so the
trigger appears in the same cycle as the miss, and the row is written at the clock
edge. `prefetch_addr_gen` then offers `a+s, a+2s, …, a+d·s`, one address per cycle from
the next cycle on, into the prefetch request queue. A new trigger cancels whatever is
left of the previous sequence. The degree is a run-time input from 0 (off) to 16.
Prefetches may cross into the next zone.

## TBEs and the prefetch throttle (`tbe_file`)

There are 64 entries, searched by line address in one cycle (a CAM). Each entry holds
the address, a *prefetch* flag, and the core and request type to answer when the data
returns. `pf_allowed = free_count > NTBE/2` is the whole throttle. Demand misses may use
every entry and wait at the head of the request queue when none is free.

## L2 controller operation and timing (`l2_cache_ctrl`)

* Each operation takes two cycles. In IDLE the controller picks a source and reads the
  set from the synchronous-read tag/state array. In LOOK it compares tags, searches the
  TBEs, and at the clock edge updates the set, the TBEs and the outgoing queue. A hit is
  therefore completed two cycles after it reaches the head of the request queue.
* Source priority: returned data first, then demand requests, then prefetches. After a
  demand request has had to wait, one waiting prefetch goes before the demand is retried.
* A queue entry is popped only once it has been handled. A request that must wait stays
  at the head of its queue. This happens when a demand fill for its line is outstanding,
  when a GETX finds its line in ISP, when the TBEs are full, when every way of the set is
  in a transient state, or when the directory queue is full.
* Replacement: an empty way first. Otherwise the first way in a stable state (S, M, SP)
  at or after a round-robin pointer kept per set. Transient ways are never evicted. A
  modified victim is first written back (PUTX) in an operation of its own, and the
  request is then retried. Clean victims are dropped silently.
* The way is allocated when the request leaves, not when the data returns, so a line's
  ISP/IS/IM state is visible to later requests.
* After reset the controller clears the tag array, one set per cycle (16384 cycles at
  full size). `init_done` rises when it starts accepting requests.

## Measuring the prefetcher (`prefetch_stats`)

The controller pulses one flag per event, and the counters accumulate them. The
report's two metrics are formed from four of the counters:

```
accuracy = (<ISP>GETS + <SP>GETS) / <NP>Prefetch
coverage = (<ISP>GETS + <SP>GETS) / (<ISP>GETS + <SP>GETS + <NP>GETS)
```

Further counters cover returned prefetch data, unused prefetched lines evicted,
prefetches dropped for lack of TBEs or because the line is already present, demand
stalls, and write-backs.

## Parameters (top level)

| parameter | default | origin |
|-----------|---------|--------|
| `L2_SETS` | 16384 | 4 MB, 4-way, 64-byte lines (report) |
| `L2_WAYS` | 4 | report |
| `NTBE` | 64 | report |
| `MAX_DEGREE` | 16 | highest degree the report evaluates |
| `ZONE_BITS` | 10 (64 KB zones) | chosen here |
| `FT_ENTRIES` | 1024 | chosen here, sized to the ~4 KB of history the report quotes for stride prefetchers |
| `Q_DEPTH` | 8 | chosen here |
| `CNT_W` | 32 | chosen here |

The 40-bit physical address, the 4 cores per chip (from the report) and the types live
in `cmp_pf_pkg`.

## What is not modelled, and other departures

* **No line data.** The L2 keeps tags and states only. Completions to the L1s carry the
  address, not the data. The data array and data paths would be added beside the tag
  array without changing the control.
* **No external coherence traffic.** Invalidations and forwarded requests from the home
  directory or other chips are not handled. Only the chip-local events of the prefetch
  state diagram are. GETX requests are never prefetched, as in the report.
* **Not built:** the processors, the 64 KB 2-way L1 caches, the directory, the memory
  controller and the inter-chip links. The testbenches use behavioural stand-ins:
  `tb/l1_stream_driver.sv` for a core and its L1, and `tb/dir_mem_model.sv` for a
  400-cycle directory lookup plus memory access, from the report's 200 + 200 cycles.
* Queue depths, arbitration, replacement, the two-cycle pipeline and the exact filter
  table state machine are this design's choices, as described above.
* The report's results come from full-system runs of commercial and scientific
  workloads on 16 processors in 4 chips. Those runs cannot be reproduced at the RTL
  level. The end-to-end testbench prints accuracy and coverage for synthetic streams
  only.

## Simulating

Every file in `rtl/` holds one module or package, and `rtl/cmp_pf_pkg.sv` must be read
first. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_cmp_l2_prefetch_top \
    -y rtl -y tb +libext+.sv rtl/cmp_pf_pkg.sv tb/tb_cmp_l2_prefetch_top.sv
./obj_dir/Vtb_cmp_l2_prefetch_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_cmp_l2_prefetch_top` | whole chip at 16 sets / 8 TBEs / 64 filter rows; the same four-core workload at degrees 0, 1, 2, 4, 8, 16, then one active core (one processor per chip) at degrees 0 and 8. It checks every completion and the counters against the off-chip traffic, checks that each mechanism happened at least once (prefetch hits on SP and ISP, both drop reasons, unused-prefetch eviction, write-back, upgrade, demand stall), and prints accuracy and coverage per degree |
| `tb_cmp_full_size` | whole chip at its default parameters (4 MB, 64 TBEs, 1024 rows), degree 8, 400 requests |
| `tb_l2_cache_ctrl` | directed tests of every transition in the tables above, the two-cycle hit, the TBE rule and the stall on full TBEs |
| `tb_czone_filter_table` | against a reference model: interleaved positive and negative strides, shared rows, random misses |
| `tb_prefetch_addr_gen`, `tb_czone_prefetcher` | address sequence, one per cycle, degree 0 and clamping, replacement by a new trigger |
| `tb_tbe_file`, `tb_sync_fifo`, `tb_l1_req_arbiter`, `tb_prefetch_stats` | unit tests |

Each testbench simulates in well under a second once compiled.
