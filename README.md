# Hybrid stream-buffer prefetcher for the L2 / main-memory interface

A miss in the second-level cache costs about 115 processor cycles here: 85 cycles
of address and device latency, then 30 cycles to bring a 64-byte line over a
16-byte data bus. A prefetcher that fetches a line only one miss ahead of its use
hides little of that. The processor often reaches the next miss well before
115 cycles have passed. A useful prefetcher has to run several misses ahead of
the program.

This RTL implements a prefetcher that does that with **stream buffers**. These
are small FIFO-like buffers that sit next to the L2 and keep fetching ahead
along a stream. The buffers are of two kinds:

* **strided buffers** follow a load whose misses step through memory by a constant
  stride (arrays, matrices);
* **LDS buffers** (linked data structure) follow a load that walks a linked list.
  They read each node's "next" pointer out of the line as it comes back from
  memory and then fetch the next node.

The choice is made per miss, from the load's PC. A PC with a confirmed stride
gets a strided buffer. Otherwise, a PC known to dereference list nodes gets an
LDS buffer. Strided buffers take precedence because they pay off most.
Prefetched lines stay in the buffers, never in the L2, so wrong prefetches do
not pollute the cache. When a buffer line is used, it moves to the L1 and the L2
with the latency of an L2 hit.

## Block structure

```
             L1 miss (PC, addr) + L2 hit/miss            committed loads (PC, base, ea, value)
                      |                                            |
                      v                                            v
  +---------------- hybrid_prefetcher -----------------------------------------------+
  |   stride_table (32)          stream_buffer_pool            ppw (128) -> corr_table (256)
  |   PC -> strided? stride      16 x stream_buffer (2 lines)            PC -> pointer/load displ.
  |            \                   ^  lookup / alloc / prefetch            /
  |             +---- allocation policy: strided, else LDS, else none ---+
  |                                |  prefetch requests     demand misses
  |                                v                        v
  |                         mreq_buffer (16 entries, 16 B return bus, demand first)
  +-----------------------------------|----------------------^---------------------+
                                      v                      |
                              memory devices (85-cycle constant latency, not part of the RTL)
```

| module | role |
|---|---|
| `pf_pkg` | widths (32-bit addresses, 64-byte lines, 16-byte bus), types, `line_of()`, `word_at()` |
| `hybrid_prefetcher` | top: request handling, allocation policy, CT training, hit-latency pipe |
| `stride_table` | PC-indexed stride detector on the L2 miss stream |
| `ppw` | potential producer window: recently loaded values that may be pointers |
| `corr_table` | correlation table: PC of a node-dereferencing load -> displacement of the next field and of the load itself |
| `stream_buffer_pool` | 16 buffers, parallel tag search, LRU allocation, request arbitration |
| `stream_buffer` | one buffer: entries, stride or link-following address generation, throttle |
| `mreq_buffer` | memory request buffer and the return data bus |

## What happens to an L1 miss

The L2 and the stream buffers are searched in the same cycle. The L2 is outside
this design: its verdict arrives with the request as `req_l2_hit`.

* **L2 hit**: the prefetcher does nothing.
* **Buffer hit, line present**: the line leaves on `pb_*` exactly `HIT_LAT` = 10
  cycles later, for both L1 and L2. Its buffer entry is freed. The hit also
  lets the buffer fetch further ahead (see throttling below).
* **Buffer hit, line still in flight**: the prefetch was issued but came too
  late. The demand does not go to memory again. The line is handed on
  (`l2_fill_*` with `l2_fill_late` = 1) in the cycle it arrives over the bus.
  This is how a partly timely prefetch shows up.
* **Miss in both**: a demand request enters the mreq buffer. The line arrives on
  `l2_fill_*` 115 cycles later if the bus is free. The same miss trains the
  stride table, probes the correlation table, and may allocate a buffer.

`req_ready` drops only when a demand miss finds all 16 mreq entries in use.
The request must then be held, and it has no effect until accepted.

## Strided streams

`stride_table` keeps, per PC, the line address of the last miss, the last
stride (in lines) and a three-state machine: INIT, TRANSIENT, STEADY. A PC
becomes *strided* when two consecutive misses show the same non-zero stride,
i.e. on its third miss in the pattern. A different stride drops the PC back to
TRANSIENT. The table is direct-mapped on PC bits [6:2] with a PC tag.

A strided buffer starts at `miss line + stride` and walks the stride.

**Incremental prefetching (throttle).** A freshly allocated buffer may issue
one prefetch only. Each hit doubles its *fetch size*, capped at the buffer
depth, and allows that many new prefetches, as far as free entries allow. A
buffer that is not being used therefore costs one line of bandwidth. A buffer
that is used ramps up to its full depth. The prefetch distance comes from two
sources: the depth, and the interleaving of the 16 buffers. While one stream
waits, the others fetch.

## Linked-list streams (the subtle part)

Three structures cooperate. Take a node whose data field is read by
`ld x, 8(p)` (PC_D) and whose next pointer is read by `ld p, 4(p)` (PC_N).

1. **Producer window (`ppw`).** Every committed load writes its loaded value into
   a 128-entry FIFO, together with its displacement (`ea - base`). When PC_N
   loads the pointer to node B, the window holds `B` with displacement 4. The
   displacement records where in a node the pointer sits.
2. **Correlation table (`corr_table`).** When a later committed load uses as its
   base register a value that is in the window, it has consumed that pointer.
   Here that is PC_D with base B. The table then stores, for the consumer's PC,
   both displacements: where the pointer sits in a node (4) and where the
   consumer itself reads (8).
3. **LDS buffer.** The first load to miss on a node is usually the data load,
   not the pointer load, because nodes are read before they are left. When
   PC_D misses in the L2 and hits in the correlation table, an LDS buffer is
   allocated. The node base is `miss address - 8` and
   `link_addr = node base + 4`. The buffer then loops:
   * wait for the line holding `link_addr` to come back from memory. The buffer
     snoops every line on the return bus, so this can be its own prefetch or the
     demand fill of the missing line itself;
   * read the 32-bit pointer at `link_addr`. A null pointer ends the stream;
   * prefetch the line PC_D will read in the next node (`pointer + 8`). If that
     node's next field (`pointer + 4`) lies in a different line, prefetch that
     line as well, because it is needed to go on;
   * set `link_addr = pointer + 4` and repeat.

   The same throttle as for strided buffers applies. Without hits, an LDS buffer
   stops after one line, so a wrong guess costs little bandwidth.

An LDS buffer can get only as far ahead as the memory latency allows, because
every step needs the previous node's data. Lists that are only a few nodes long
gain little.

## Allocation and replacement

On a miss in both the L2 and the buffers:

1. if the stride table classes the PC as strided, a strided buffer is allocated;
2. otherwise, if the PC hits in the correlation table, an LDS buffer is allocated;
3. otherwise, no buffer is allocated.

The buffer chosen is the one already bound to that PC, else an unused one, else
the least recently used. A buffer counts as used when it is allocated or when a
demand takes a line from it. Lines of the old stream that are still in flight
are dropped when they arrive, except a line a demand is already waiting for.
The 16 buffers compete for the single request port round robin. A demand miss
in the same cycle always wins the port.

**No duplicate fetches.** Before a strided buffer's candidate line goes to
memory, two checks are made in the same cycle:

* the L2 is asked through a tag probe (`l2_probe_laddr` out, `l2_probe_hit` in);
* the other buffers are searched with a second tag port.

If either holds the line, the buffer steps past it, and the skipped line uses
up one unit of its fetch budget as if fetched. LDS candidates are always
fetched, because the buffer needs their data to read the next pointer. An
integration without an L2 probe ties `l2_probe_hit` low.

## Memory side: `mreq_buffer` and the return bus

Memory is modelled in a simple way. The address path has unbounded bandwidth,
so a request reaches the devices in the cycle it is accepted. The devices answer
after a constant latency, 85 cycles in the testbenches. The single return bus
is the bottleneck. Each request holds one of 16 entries. A returned line waits
in its entry until the bus is free, and then:

* waiting demand lines go first, oldest first;
* prefetched lines follow in request order.

The bus moves 16 bytes per 7.5 cycles. The half cycle is realised as
alternating beats: beats end 8, 15, 23 and 30 cycles after the grant, so a line
occupies the bus for exactly 30 cycles. `fill_*` presents the whole line in the
cycle of its last beat. One entry is kept for demands: a prefetch is refused
when only one entry is free.

## Interface summary (`hybrid_prefetcher`)

| group | signals | notes |
|---|---|---|
| L1 miss | `req_valid, req_pc, req_addr, req_l2_hit` -> `req_ready` | one per cycle |
| committed loads | `ld_valid, ld_pc, ld_base, ld_ea, ld_value` | one per cycle, never stalled |
| buffer hits | `pb_valid, pb_laddr, pb_data` | 10 cycles after the request |
| memory lines | `l2_fill_valid, l2_fill_laddr, l2_fill_data, l2_fill_late` | demand fills and late buffer hits |
| L2 probe | `l2_probe_laddr` -> `l2_probe_hit` | combinational, same cycle |
| memory devices | `mem_req_valid/idx/laddr`, `mem_resp_valid/idx/data` | answer with the request's index |
| bus | `beat_valid, beat_data, bus_busy` | observation |
| state/events | `sb_active, sb_lds`, `ev_*` | one-cycle pulses for counters |

Addresses are 32-bit byte addresses and line addresses are 26 bits. Lines are
512 bits, with byte 0 in bits [7:0]. Reset `rst_n` is asynchronous and active
low. It clears all tables and buffers.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_SB` | 16 | stream buffers |
| `SB_DEPTH` | 2 | lines per buffer |
| `STRIDE_ENT` | 32 | stride table entries |
| `PPW_ENT` | 128 | producer window entries |
| `CT_ENT` | 256 | correlation table entries |
| `MREQ_ENT` | 16 | memory request buffer entries |
| `HIT_LAT` | 10 | buffer hit latency (= L2 hit latency) |
| `EN_STRIDE` | 1 | strided buffers may be allocated; 0 gives a pure LDS prefetcher |
| `EN_LDS` | 1 | LDS buffers may be allocated; 0 gives a pure strided prefetcher |

These defaults are the configuration the design is built for. Other
configurations worth trying are 4 or 8 buffers and depths of 1, 4 or 8; all of
them are simulated by `tb_buffer_configs`. The default holds 32 lines, 2 KB of
line storage. Almost all storage is in flip-flops: the buffer lines, the mreq
lines and the 10-stage hit pipeline, about 58 k flip-flop bits in total.

## Where the RTL makes its own choices

The overall behaviour follows the reference design. The points below were not
specified and are choices of this implementation:

* the stride-detector states and its direct-mapped, PC-tagged organisation;
* FIFO replacement in the producer window, direct mapping of the correlation
  table, 16-bit displacements, 32-bit pointers, a zero value never treated as
  a pointer;
* the consumer's own displacement kept in the correlation table next to the
  pointer's. This means a data load at a non-zero displacement (the `8` above)
  still follows the list from node base to node base;
* hits on in-flight lines served on arrival, and stale lines after reallocation;
* the duplicate filter applied to strided candidates only, with a skipped
  candidate counting against the fetch budget;
* a buffer already bound to the missing PC reused first, plus round-robin
  request arbitration;
* one mreq entry reserved for demands, and an entry freed when its line gets
  the bus;
* detectors trained only on misses that also miss the buffers;
* a demand that finds its line already in flight as a prefetch waits for it in
  prefetch order. The prefetch is not promoted to demand priority in the mreq
  buffer.

Departures from the reference behaviour:

* An LDS candidate line is fetched even when the L2 already holds it.
* Write-backs from the L2 are not modelled on the memory side. The memory
  system treats them as absorbed by unbounded write buffers.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-limit watchdog.

| testbench | what it checks |
|---|---|
| `tb_stride_table` | random mixes of strided and random misses from 8 PCs against a reference model; aliasing PCs |
| `tb_ppw` | hits and offsets against a reference FIFO of the last 128 values; eviction |
| `tb_corr_table` | random writes and probes against a direct-mapped reference |
| `tb_stream_buffer` | strided: 1 prefetch on allocation, doubling after a hit, late delivery, reallocation, negative strides; LDS: pointer from the demand fill, pointer from a prefetched node, next field in another line, null end, data load at a non-zero displacement |
| `tb_stream_buffer_pool` | round-robin grants, routing by tag, LRU victim against a reference list, same-PC reuse, LDS snoop of demand fills |
| `tb_mreq_buffer` | 115-cycle uncontended miss, beats at 8/15/23/30, demand overtaking prefetches, prefetch FIFO order, demand reserve and full stall |
| `tb_hybrid_prefetcher` | whole design at default parameters: a stride-3 array walk (first miss 115 cycles, buffer hits exactly 10 cycles), a 40-node scattered linked list served mostly from one LDS buffer, a 40-miss burst that stalls on a full mreq; every line checked against memory, every demand answered once, and every mechanism observed; a strided walk into L2-resident lines exercises the duplicate filter |
| `tb_workload_kernels` | whole design on three access-pattern kernels (below) |
| `tb_buffer_configs` | the same kernels on 4x2, 8x2, 16x1, 16x2, 16x4, 16x8 and 8x8 buffers (number x depth), side by side |

`tb/workload_lane.sv` holds the kernels and the processor/L2 stand-in used by
the last two testbenches. It takes the buffer count and depth as parameters.

`tb/dram_model.sv` is a behavioural, non-synthesizable model of the memory
devices. It gives a constant latency, and its content is either written by the
testbench or computed from the line address.

The testbenches were run with Verilator 5. The RTL was also parsed and
synthesized with Yosys through its slang front end.

### Running

```sh
verilator --binary --timing --assert --top-module tb_hybrid_prefetcher \
    rtl/pf_pkg.sv rtl/*.sv tb/dram_model.sv tb/workload_lane.sv \
    tb/tb_hybrid_prefetcher.sv -o sim
./obj_dir/sim
```

Replace the top module and the testbench file to run another test. The
end-to-end test runs in well under a minute.

## Behaviour on typical access patterns

`tb_workload_kernels` runs the default configuration on three small kernels
that stand for the program classes the prefetcher targets. It uses the same
85-cycle memory and blocking requester as the end-to-end test.

| kernel | pattern | accesses served by stream buffers |
|---|---|---|
| A | 6 arrays swept in lockstep, unit line stride, 6 PCs | 342 of 360 |
| B | 4 scattered lists of 25 nodes, each walked once; data read at +8, next pointer at +4 | 94 of 100 |
| C | 64 hash buckets of 4-node lists, 1 or 2 nodes per lookup | 28 of 96 |

Regular sweeps and long lists are almost fully covered. Short lists are not:
the first node of each lookup is always a miss, and only the second node can be
prefetched. This is where the scheme is known to be weak.

`tb_buffer_configs` runs the same kernels with other buffer counts, depths and
buffer types:

| type | buffers x depth | A served | B served | C served |
|---|---|---|---|---|
| hybrid | 4 x 2 | 0 of 360 | 94 of 100 | 28 of 96 |
| hybrid | 8 x 2, 16 x 1, 16 x 2, 16 x 4, 16 x 8, 8 x 8 | 342 of 360 | 94 of 100 | 28 of 96 |
| strided only | 16 x 2 | 342 of 360 | 0 of 100 | 0 of 96 |
| LDS only | 16 x 2, 16 x 4 | 0 of 360 | 94 of 100 | 31 of 96 |

With 4 buffers, the 6 streams of kernel A keep taking buffers from one another
(LRU replacement), and nothing is served. Once there are enough buffers for the
streams, adding more does not help. Depth does not change these kernels
either, because their requester waits for each group of misses. A depth of
1 already keeps one line ahead, and deeper buffers only add prefetches the
demand stream does not reach before the list or sweep moves on. Depths 4 and 8
cost 1 to 2 % more cycles on kernel B for that reason.

Each pure type covers only its own program class, and the hybrid covers both.
On short lists the hybrid does slightly worse than pure LDS buffers. The likely
cause is its preference for strided buffers: a list PC whose last misses
happened to look strided gets a strided buffer instead of an LDS one.

The 16 buffers and the 32-entry stride table are sized for programs in which
about 16 load PCs cause nearly all L2 misses at any moment. A program whose
misses spread over many more PCs, such as 64, will thrash the buffers.

## Limits

The testbenches show that the mechanisms work: stride detection, link
following, throttling, priorities and timing. They do not reproduce any
speed-up figures. Those need a processor and real programs. The testbench's
processor model is a simple in-order requester that waits for each line.
