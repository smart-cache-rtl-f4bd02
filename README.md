# Smart cache: a software-steered, energy-aware data cache

A set-associative data cache spends most of its energy reading arrays whose
contents it then throws away: every access reads the tag and data of all ways,
and at most one of them is used. Hardware way prediction can cut that, but a
wrong guess costs a second probe. This design avoids guessing. The program
knows what kind of data each access touches, so it tells the cache where that
data lives. Three mechanisms follow from that:

* **Way partitioning.** Each page's TLB entry holds a bit vector with one bit
  per L1 way. An access reads, compares and replaces only in the ways its page
  allows. With data structures pinned to single ways, a hit reads one way out
  of four, at the same latency as a full probe.
* **Mini-cache.** A small, heavily used buffer goes to a 512-byte
  direct-mapped cache beside the L1. Each access there reads one short line.
  In a video decoder, that buffer is the macroblock being dequantised and
  inverse-transformed.
* **Bypass.** Data that is written and never read back skips the L1
  entirely, so it does not evict useful lines. In a video decoder, that data is
  the decoded output picture.

The target application is a software MPEG-2 video decoder on a small in-order
processor. The hierarchy has an 8 KB 4-way L1 data cache and a 512 KB 4-way
L2.

```
              CPU access: class, virtual address, data
                         |
                   +-----+------+         way bit vector
                   |  way_tlb   |------------------------+
                   +-----+------+                        |
                         | physical address              v
        +----------------+-------------------+
        | CLS_MINI       | CLS_NORMAL        | CLS_BYPASS
  +-----+------+   +-----+--------------+   +-----+-------+
  | mini_cache |   | l1_dcache          |   | bypass_path |
  | 512 B, DM  |   | 8 KB, 4 ways,      |   | no storage  |
  |            |   | way-enabled probe  |   |             |
  +-----+------+   +-----+--------------+   +-----+-------+
        |                |   line bus             |
        +--------+-------+------------------------+
                 |  mem_arbiter (L1 > mini > bypass)
           +-----+------+
           |  l2_cache  |  512 KB, 4 ways
           +-----+------+
                 |  line bus: brought out as the top's memory port
```

## Files

| file | contents |
|------|----------|
| `rtl/smart_cache_pkg.sv` | constants, access-class enum, line-bus structs, TLB entry struct, line helper functions |
| `rtl/way_tlb.sv` | fully associative TLB with per-page way bit vectors |
| `rtl/l1_dcache.sv` | way-partitioned L1 |
| `rtl/mini_cache.sv` | direct-mapped mini-cache |
| `rtl/bypass_path.sv` | L1 bypass |
| `rtl/mem_arbiter.sv` | fixed-priority line-bus arbiter |
| `rtl/l2_cache.sv` | L2 |
| `rtl/smart_cache_top.sv` | the whole hierarchy |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end one |
| `tb/mem_model.sv`, `tb/tb_util_pkg.sv` | behavioural main memory and shared testbench helpers |

## The way bit vector

This is the part of the design that needs the most care, from hardware and from
software alike.

**Where it comes from.** A TLB entry (`tlb_entry_t`) is `{valid, vpn, ppn,
ways}`. The TLB is searched combinationally in the cycle a request is offered.
Its `ways` field goes with the physical address into the L1 in that same
cycle. The L1 arrays are read at the clock edge that accepts the request. The
L1 index and line offset (11 bits) lie inside the 4 KB page offset, so
translation never delays the array read.

**Bit order.** Bit *i* of `ways` enables way *i*. Suppose a diagram lists the
ways left to right as way1..way4 and shows the vector `0 1 0 0`, meaning only
the second way. In this RTL, that vector is `4'b0010`.

**What it controls in the L1.** It controls three things:

1. Read enables. Only enabled ways read their tag and data arrays (`way_en`
   output, one bit per way, high for one cycle at acceptance).
2. Hit detection. A line sitting in a disabled way is invisible. The access
   misses and fetches the line again into an enabled way.
3. Replacement. On a miss, the victim is the first invalid enabled way. If
   there is none, it is the first enabled way at or after the set's round-robin
   pointer. The pointer then moves one past the victim.

An all-zero vector is treated as `4'b1111`. An address with no TLB entry passes
through untranslated, with all ways enabled (`tlb_miss` strobes). So an
unmapped program runs exactly as on a conventional 4-way cache.

**What software must guarantee.** The hardware does not keep the ways coherent
with each other, so software must:

* Give every page of one data structure the same vector, and not change a
  page's vector while its lines may be cached. If a line was brought in under
  `0001` and is later accessed under `0010`, a second copy is made, and the
  first copy is stale but still dirty.
* Keep the classes disjoint. A line accessed as `CLS_NORMAL` must not also be
  accessed as `CLS_MINI` or `CLS_BYPASS`. The L1, the mini-cache and the L2
  hold separate copies, and nothing reconciles them.

**Example partitions.** The end-to-end testbench uses the three-group scheme:

| data | vector |
|------|--------|
| macroblock buffer and decoder state | `0001` |
| lookup tables and stack | `0010` |
| everything else, mostly reference frames | `1100` |

A two-group scheme uses `0001` for the macroblock buffer and `1110` for the
rest. Finer groups save more array reads per access, but each group has less
capacity and suffers more conflict misses.

## Mini-cache

`mini_cache` is a direct-mapped, write-back, write-allocate cache of
`SIZE_BYTES` (default 512, so 16 lines of 32 bytes). Its handshake and timing
are the same as the L1's. Accesses reach it when the CPU marks them
`CLS_MINI`, the way a special load/store opcode would. It is sized for a hot
buffer of a few hundred bytes, such as a macroblock's coefficients or the
stack. `MINI_SIZE` on the top changes its size: 1 KB and 2 KB are natural
alternatives.

## Bypass path

`bypass_path` turns a `CLS_BYPASS` word access into one line-bus transaction
to the L2:

* A store sends the word with only its own byte strobes set.
* A load reads the line and returns the addressed word.

Nothing is buffered or combined, so each bypassed store costs one L2
transaction. The path only pays off for data that is rarely touched through
the CPU, such as output pictures written once.

## Line bus, arbiter and L2

All levels below the CPU port talk over one protocol (`mem_req_t` /
`mem_resp_t` in the package):

* A request carries `valid`, `write`, a line-aligned `addr`, 32 byte strobes
  `be` and a 256-bit `wdata`.
* It is held until `ready`.
* Exactly one response (`resp.valid` for one cycle, `rdata` = the line for a
  read) comes back later.

Assertions in the L1 and the mini-cache check that a request is held until it
is taken. An assertion in the arbiter checks that no response arrives
unrequested.

`mem_arbiter` grants by fixed priority (L1, then mini-cache, then bypass).
It passes the request through combinationally and returns the response to the
granted port only. One transaction is in flight at a time.

`l2_cache` is a 512 KB 4-way write-back, write-allocate cache:

* It always reads all four ways.
* A write merges the strobed bytes, either a full line from an L1 write-back
  or a single word from the bypass path.
* Its valid bits, dirty bits and round-robin pointers sit in RAM arrays next
  to the tags. After reset, the cache clears them one set per cycle: 4096
  cycles at the default size. During that sweep the L2 accepts nothing, so
  early misses above it simply wait.
* A hit responds two cycles after acceptance.
* A miss writes back a dirty victim, fetches the line through the top's memory
  port and then responds.

## CPU port and timing

* `cpu_req_valid`/`cpu_req_ready` handshake. The request also carries
  `cpu_req_write`, `cpu_req_class` (`CLS_NORMAL`, `CLS_BYPASS`, `CLS_MINI`;
  value 3 is treated as normal), `cpu_req_vaddr`, `cpu_req_be` and
  `cpu_req_wdata`.
* `cpu_resp_valid` pulses once per access, in order. `cpu_resp_rdata` is the
  loaded word; it carries nothing for stores.
* Load hit, L1 or mini-cache: the response comes one cycle after acceptance,
  and the next request is accepted in that same cycle. Back-to-back load hits
  therefore run at one per cycle.
* Store hit: the response also comes one cycle after acceptance, but the next
  request waits one more cycle, because the arrays are single-ported.
* Miss: an optional full-line write-back, then a line fetch. The response
  comes in the cycle the line arrives.
* Only one access is in flight across the three paths. A request is accepted
  only when all three are ready.
* The TLB is written through `tlb_wr_en`, `tlb_wr_idx` and `tlb_wr_entry`.
  After reset, all entries are invalid.

Activity strobes show the effect the design is built for: `l1_way_en` (the
L1 ways read this cycle), `l1_miss`, `mini_access`, `mini_miss`, `byp_access`
and `tlb_miss`. Multiplying their counts by per-array energies gives an energy
estimate. The RTL itself holds no energy model.

## Parameters

| parameter (top) | default | note |
|---|---|---|
| `L1_SIZE`, `L1_NWAYS` | 8192, 4 | the vector width in `tlb_entry_t` is `L1_WAYS` = 4 in the package |
| `MINI_SIZE` | 512 | direct-mapped |
| `L2_SIZE`, `L2_WAYS` | 524288, 4 | |
| `TLB_ENTRIES` | 32 | |
| `LINE_BYTES` (package) | 32 | shared by every level |
| `PAGE_BITS` (package) | 12 | 4 KB pages |

The cache sizes and associativities follow the published proposal that this
RTL implements. That proposal leaves several things open, so they were chosen
here:

* line size, page size and TLB size
* write policy and replacement order
* the handshakes and the arbiter's priority
* the behaviour on a TLB miss

## Effect on a decoder-like trace

`tb_decoder_workloads` runs one synthetic macroblock-by-macroblock trace
through seven instances of the top, which differ only in access class, bit
vectors and mini-cache size. The picture is scaled down to 128x64, luma only,
so that the TLB maps the whole working set. For 32 macroblocks, the counts are
as follows. "Way reads" counts L1 tag+data array reads, one per enabled way
per access.

| configuration | L1 accesses | L1 misses | way reads | reads per access | mini accesses | mini misses | bypassed |
|---|---|---|---|---|---|---|---|
| base (all normal, all ways) | 40960 | 2444 | 163840 | 4.00 | 0 | 0 | 0 |
| output bypassed | 38912 | 1865 | 155648 | 4.00 | 0 | 0 | 2048 |
| + block buffer in 512 B mini-cache | 14336 | 757 | 57344 | 4.00 | 24576 | 3072 | 2048 |
| + block buffer in 1 KB mini-cache | 14336 | 757 | 57344 | 4.00 | 24576 | 2064 | 2048 |
| + block buffer in 2 KB mini-cache | 14336 | 757 | 57344 | 4.00 | 24576 | 48 | 2048 |
| partition A: block 1 way, rest 3 | 38912 | 1552 | 67584 | 1.74 | 0 | 0 | 2048 |
| partition B: block+state 1, tables+stack 1, rest 2 | 38912 | 5133 | 43008 | 1.11 | 0 | 0 | 2048 |

Partition B reads the fewest ways but misses about three times as often as
partition A, because each group has less room. Whether the extra L2 traffic
outweighs the saved L1 reads depends on the per-access energies of the two
levels, which the RTL does not model. This trace walks the whole 1.5 KB block
buffer twice per macroblock, so the buffer thrashes a 512 B mini-cache. A
decoder that touches one 8x8 block at a time has a much smaller working set.

## Departures and limits

* All three mechanisms sit together in one hierarchy. Each is steered
  separately: the access class selects bypass or the mini-cache, and the
  vector controls the L1. Any of them can be left unused: give every page
  `1111` and use only `CLS_NORMAL`, and the design is a plain 4-way L1 over
  an L2.
* The processor, the operating system that fills the TLB, and main memory are
  not included. The top brings out the CPU port, the TLB write port and the
  memory port.
* A TLB miss does not trap. It falls back to an identity mapping with all ways
  enabled.
* There is no coherence between the L1, the mini-cache, the bypass path and
  stale copies in disabled ways. See the software rules above.
* Only one access is in flight, and the L2 is blocking. Hit-under-miss and
  write buffers are not modelled.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Run
the end-to-end test with:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/smart_cache_pkg.sv tb/tb_util_pkg.sv tb/mem_model.sv rtl/*.sv \
  tb/tb_smart_cache_top.sv --top-module tb_smart_cache_top -o sim
./obj_dir/sim
```

For a single block, replace the `rtl/*.sv` list with the block's file and
change the testbench name.

| testbench | what it shows |
|-----------|---------------|
| `tb_way_tlb` | translation, vector and hit flag against a reference table; reset empties the table |
| `tb_l1_dcache` | 1-cycle hit; 8 back-to-back load hits in 8 cycles; `way_en` equals the vector; a 1-way partition thrashes where 4 ways do not; dirty write-back; 3000 random accesses with per-page vectors |
| `tb_mini_cache` | 1-cycle hit; lines 512 B apart evict each other; a 512 B buffer stays resident; random traffic |
| `tb_bypass_path` | byte-exact stores and word loads, one transaction each |
| `tb_mem_arbiter` | priority under contention, responses only to their owner |
| `tb_l2_cache` | full 512 KB; 2-cycle hit; byte strobes; set overflow with write-back; random traffic over twice its capacity |
| `tb_smart_cache_top` | all default sizes; a decoder-like address map with the three-group partition; 20,000 mixed accesses; counts and requires every mechanism: TLB hit and miss, L1 hit, miss, write-back, partition eviction, pipelined hits, mini-cache hit, miss, write-back, bypassed store and load, L2 miss and write-back |
| `tb_decoder_workloads` | the same decoder-like trace through seven configurations (base, bypass, mini-cache 512 B/1 KB/2 KB, partitions A and B); data checked on every load; array-read and miss orderings checked; prints the table in the section above |

The memory model fills untouched memory from a fixed hash of the address. It
withholds `ready` at random, which exercises the hold rule on every requester.
