# Hybrid multi-cache memory system for parallel pointer-chasing accelerators

Accelerators built by high-level synthesis from C/C++ code that uses dynamic,
pointer-linked data structures (trees, linked lists, stacks) keep their heap in
a large off-chip DRAM. Every pointer dereference becomes a slow off-chip access.
If the program has been split into parallel units, all of them compete for that
one memory.

This RTL puts a cache in front of every heap partition. The system is *hybrid*:

* A partition that only one parallel unit ever touches gets a **private cache**.
  Examples are that unit's subtree, its stack and its candidate-centre sets.
  Private caches are cheap and fast, and need no coherence.
* The one region that all units update gets one **coherent cache per unit**, for
  example a global sum of cluster centroids. The coherent caches keep each
  other consistent over a **ring**. A **lock service** makes each
  read-modify-write of the shared data atomic.
* All caches are direct-mapped and write-back, with 64-bit lines. They share
  the single off-chip memory port through an **arbiter**.
* Each private cache has its own size parameter. Left-over on-chip RAM can go
  to the caches that profit from it, such as a big tree, rather than to a
  small stack that already fits.

The architecture follows F. Winterstein, K. Fleming, H.-J. Yang and
G. Constantinides, *Custom Multi-Cache Architectures for Heap Manipulating
Programs* (IEEE TCAD, 2016). That work builds on the LEAP memory framework.
The RTL here is an independent implementation. The section "How far it
follows the reference design" lists what is taken from that work and what is
this implementation's own choice.

## Block structure

```
 unit 0 kernel                 unit 1 ...            unit P-1 ...
  CS bus  ST bus  TR bus  CI bus + lock_req/grant
    |       |       |       |
 [bridge][bridge][bridge][bridge]      (hls_bus_bridge, one per interface)
    |       |       |       |  \__ enable = lock_grant[p]
 [priv ] [priv ] [priv ] [coh  ]<--ring--> coh of unit 1 <--> ... <--> coh of unit P-1
 [cache] [cache] [cache] [cache]          (coherent_ring of coherent_cache)
    |       |       |       |
    +-------+-------+-------+------ ... all NI = P*(NPRIV+NCOH) caches
                    |
              [mem_arbiter]  round robin, region = cache number
                    |
             off-chip memory port (to a DRAM controller, not included)

 [lock_service]  one lock for the shared region, P requesters
```

| Module | Role |
|---|---|
| `mc_pkg` | widths (64-bit data/line, 22-bit word address per region), request structs, MSI states, ring message |
| `cache_bank_store` | the cache RAM: `NBANKS` banks, registered input and output, 3-cycle read |
| `private_cache` | direct-mapped write-back cache for one private partition |
| `coherent_cache` | direct-mapped write-back MSI cache node with ring snooping |
| `coherent_ring` | P coherent caches joined into a ring |
| `lock_service` | round-robin mutual-exclusion lock |
| `hls_bus_bridge` | FIFO-style kernel bus to cache request/response adapter |
| `mem_arbiter` | shares the off-chip port, adds the region number, routes responses |
| `multi_cache_top` | the whole system, with statistics counters |

## Configuration

`multi_cache_top` parameters, with defaults for the main configuration: the
parallelised K-means *filtering* kernel with four units.

| Parameter | Default | Meaning |
|---|---|---|
| `P` | 4 | parallel units (kernels) |
| `NPRIV` | 3 | private caches per unit (centre sets CS, stack ST, tree nodes TR) |
| `NCOH` | 1 | coherent caches per unit (centroid information CI); 0 removes ring and lock |
| `PRIV_LINES[P*NPRIV]` | all 128 | lines of each private cache (128 x 8 B = 1 kB); power of two |
| `COH_LINES` | 128 | lines of each coherent cache |
| `NBANKS` | 4 | banks per cache RAM |
| `BUS_WORDS` | 1 | 64-bit words per kernel datum; wider data is split into line-sized chunks |

The two other applications map onto the same RTL:

* A tree-reflection kernel uses 2 private caches plus 1 coherent cache per
  unit, the coherent one for a running minimum: `NPRIV=2, NCOH=1`, 12 caches.
* A linked-list merger uses 2 private caches per unit and no shared data:
  `NPRIV=2, NCOH=0`, 8 caches.

With the defaults, these two can also run on a subset of the interfaces.

Custom cache sizing means overriding `PRIV_LINES`. For example, with P=1 and
two caches, `'{4096, 262144}` gives a 32 kB stack cache and a 2 MB tree cache.

To pick sizes, a direct-mapped cache can be modelled exactly from a block
address trace. An access hits if and only if no other block that maps to the
same line was referenced since the previous access to the same block. For each
candidate size, the hits and accesses from that model give the aggregate hit
rate of the system. The best per-cache sizes under a RAM budget then come from
a multiple-choice knapsack: pick one size per cache, maximise total hits,
subject to the sum of block RAMs. `private_cache_tb` checks the RTL against
exactly this model: every access must hit or miss as the shadow-tag model
predicts.

## Addressing

Each kernel interface sees its own word-addressed space of 2^22 64-bit words.
The arbiter builds the off-chip word address as `{region, address}`:

* Private interface `i = p*NPRIV + k` (unit `p`, data structure `k`) uses
  region `i`.
* All coherent interfaces use region `P*NPRIV`, so they see one common memory.

With the defaults, the off-chip address is 4 + 22 = 26 bits of 64-bit words
(512 MB).

## Kernel interface and timing

Each interface has a FIFO-style bus of the kind HLS tools generate for a
pointer argument:

* `bus_req_write`, `bus_req_din` (1 = write), `bus_address`, `bus_dataout`.
  A push happens on a clock edge where `bus_req_write` and `bus_req_full_n`
  are both high.
* `bus_rsp_empty_n` / `bus_rsp_read` / `bus_datain` return read data.

The bridge keeps one request outstanding. A write is posted: the kernel may go
on, but the next request waits until the write is done. A kernel stalls
naturally on `req_full_n` and `rsp_empty_n`, so a cache miss simply stretches
the kernel's schedule.

A kernel datum can be wider than a 64-bit cache line. Set
`BUS_WORDS` to the number of 64-bit words per datum; the bus data then has
`64*BUS_WORDS` bits. Item address `a` covers cache words `a*BUS_WORDS` to
`a*BUS_WORDS+BUS_WORDS-1`. The bridge performs these as `BUS_WORDS`
sequential cache accesses, lowest word first, then returns the assembled
read data. For hit-rate modelling, each item access therefore counts as
`BUS_WORDS` line accesses.

Latencies, counted in clock edges:

* Bridge: forwards a request on the edge after the push.
* Cache hit: `rsp_valid` four edges after the cache accepts the request. The
  RAM read takes three of these: input register, bank, output register.
* Private miss: add an optional dirty write-back and one memory read, each
  the full memory latency. A write miss needs no read: a line is one word.
* Coherent miss: add the wait for the ring token, one trip round the ring, any
  snoop write-backs in peers, and the memory read.
* After reset, each cache spends `LINES` cycles clearing its tags before it
  accepts requests.

All state uses a synchronous, active-low reset `rst_n`. There is one clock,
and the design was evaluated at 100 MHz.

## Coherence on the ring

This is the least obvious part of the design. Each coherent line is in state
I (invalid), S (clean copy, others may have one too) or M (only copy, dirty).

* **Local hits.** Reads hit in S or M. Writes hit only in M.
* **Serialisation.** One token circulates on the ring, one register per hop,
  and node 0 owns it after reset. A node that misses first waits for the
  token, then sends its request once round the ring:
  * `GETS` for a read.
  * `GETX` for a write, including a write to a line it holds in S.
  
  Only the token holder can have a request in flight. So requests never race,
  and every node sees them in the same order. This replaces the transient
  states and retries a more concurrent protocol would need. The cost is that
  coherent misses from different units are handled one at a time.
* **Snooping.** When a peer's request passes a node, the node looks up the
  line:
  * M: it writes the line back to memory and waits for the acknowledge. Then
    it drops to S (GETS) or I (GETX).
  * S and a GETX: it drops to I.
  
  Only then does it forward the message. A node buffers at most one snooped
  message, which is enough because only one request is ever in flight.
* **Completion.** When its own message returns, the requester re-reads its
  line, since snoops may have changed it while it waited for the token. It
  writes back a dirty victim of another address, then:
  * for a read, fetches the word from memory into S;
  * for a write, installs the new word in M.
  
  Then it passes the token on. Because every peer finished its write-back
  before forwarding, the fetch always reads the latest value.
* **Flush.** A flush writes back every M line and leaves it in S.

Coherence only keeps the copies consistent. Atomic updates come from the lock:

* A unit raises `lock_req[p]` (`requestLock`) and waits for `lock_grant[p]`
  (`waitForLock`).
* While the grant is low, the unit's coherent bridge refuses requests
  (`enable = lock_grant[p]`), so no shared access can slip in before the lock
  is held.
* The unit drops `lock_req[p]` to release (`releaseLock`). The top keeps the
  request raised until the coherent bridge is idle. This memory fence means
  the last write has completed before another unit can get the lock.
* Grants are round-robin, so no unit starves.

For an update such as `sum += w` this is enough: the units' updates may
interleave in any order, and addition is commutative and associative.

## Statistics

`multi_cache_top` counts, from reset:

* private and coherent hits and accesses; their ratio is the aggregate hit rate;
* write-backs;
* write-backs forced by snoops;
* invalidations;
* cycles in which a lock request waited while another unit held the lock;
* cycles in which several caches wanted the memory port.

## How far it follows the reference design

Taken from the reference design:

* private caches for disjoint heap partitions, and coherent caches joined by a
  ring for shared ones;
* a lock service with request/wait/release;
* a memory fence before the release;
* direct-mapped write-back caches with 64-bit lines and a 1 kB default size;
* cache memories split into banks with buffers at input and output;
* one bridge per kernel interface that stalls the kernel until served;
* splitting data wider than a line into sequential line-sized accesses;
* per-cache sizes;
* P = 4, with 16 caches for the filtering kernel.

This implementation's own choices, because the reference describes only what
these parts do:

* **Coherence protocol.** MSI with one token that serialises requests, and
  GETS/GETX messages on the ring.
* **Cache organisation.** The FSMs allow one outstanding request per cache.
  A write miss allocates without a fetch, which works because a line is one
  word. The bank count (4) and the 3-cycle RAM latency are also choices here.
* **Interfaces.** The exact kernel bus signals, and the absence of bursts.
  For wide data, the address mapping and the chunk order are also choices
  here.
* **Lock.** Level request/grant, round-robin order, one lock for one
  critical region.
* **Memory system.** The off-chip address map and the round-robin memory
  arbiter.
* **Additions.** The flush port and the statistics counters.

Not included:

* the HLS-generated kernels themselves;
* the DRAM controller and DRAM;
* the compiler analyses and the sizing optimiser, which are software.

Timing at 100 MHz on an FPGA has not been checked. Neither has the coherent
caches' throughput under heavy sharing.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. `tb/offchip_mem_model.sv`
is a behavioural DRAM: configurable latency, random back-pressure, in-order
tagged answers, and a deterministic value for never-written words
(`tb_pkg::init_word`).

| Testbench | What it checks |
|---|---|
| `cache_bank_store_tb` | random reads and writes against a reference array; every read answers exactly 3 cycles later |
| `private_cache_tb` | 1800 random and stack-like accesses: read data, hit/miss of every access against a shadow-tag direct-mapped model, dirty write-backs, hit latency 4, memory image after flush |
| `coherent_ring_tb` | 4 nodes: 1200 sequential random accesses from random nodes (every read sees the last write anywhere; an immediate repeat must hit), then concurrent lock-protected increments from all nodes (final counters exact), memory image after flush; snoop write-backs, invalidations, write misses and token waits must occur |
| `lock_service_tb` | mutual exclusion, grant only after a request, one-cycle grant of a free lock, round-robin order, no starvation, contention |
| `hls_bus_bridge_tb` | 3-word items: each becomes three cache requests with the right addresses and write chunks, the first one cycle after the push; read data is assembled correctly; no data for writes; enable holds requests off; idle flag |
| `mem_arbiter_tb` | responses reach the right port, private regions are separate, the two shared ports see one region, `{region,address}` mapping, bounded wait, conflicts |
| `multi_cache_top_tb` | whole system at default parameters: four filtering-style kernels (stack pops/pushes, tree reads/updates, centre-set traffic, lock-protected centroid sums); all reads against a reference image, flushed DRAM image and accumulator sums exact; fails if any mechanism never occurs (private hits/misses, write-backs, coherent misses, snoop write-backs, invalidations, lock waits, coherent requests held off by the lock, port conflicts, flush) |

Three more testbenches run other programs and configurations on the same top
module, with custom cache sizes:

| Testbench | What it runs |
|---|---|
| `workload_merger_tb` | `NPRIV=2, NCOH=0`, unequal sizes from 16 to 256 lines. Each unit builds a sorted linked list by insertion (160 random keys; keys and next pointers in two private regions). The four lists are then merged into one stream and disposed. Checks: the stream is the sorted input, every read is correct, the flushed image is correct, and no coherence or lock activity happens. |
| `workload_reflect_tree_tb` | `NPRIV=2, NCOH=1`, large tree caches and small stack caches. Each unit writes a random 1000-node binary search tree and traverses it depth first with a stack in memory, swapping the children of odd-keyed nodes. For every node, it folds the key into a shared running minimum under the lock. Checks: each reflected tree matches the original, the minimum is exact, and all mechanisms of the top test occur. |
| `workload_cache_sizing_tb` | `P=1, NPRIV=2, NCOH=0`. Two systems run side by side: one with equal 1024 kB caches, one with a 32 kB stack cache and a 2048 kB tree cache. Each builds a 60000-node tree, then traverses it depth first with a stack. Checks: every read, every node visited once, and the tailored split's aggregate hit rate beats the equal split's (about 62 % against 47 %, build phase included). |

In all four system tests, the hardware hit and access counters of the
private caches must equal a direct-mapped model fed with the same address
trace. That model is the basis for choosing cache sizes.

The testbenches change stimulus on the falling clock edge and use only
`$urandom`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_pkg.sv tb/multi_cache_top_tb.sv \
    --top-module multi_cache_top_tb -o sim
./obj_dir/sim
```

Replace the top file and `--top-module` for the other testbenches. The
end-to-end run takes well under a second of CPU time.
