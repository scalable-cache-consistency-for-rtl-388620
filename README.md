# Limited-broadcast cache consistency for a two-level ring multiprocessor

This is SystemVerilog RTL for a 64-processor shared-memory machine built from a
hierarchy of unidirectional rings, the Hector style of machine. The caches are
kept consistent by broadcasting invalidations rather than through a directory.
On a ring a broadcast is cheap: a packet visits every node anyway. What stops a
broadcast scheme from scaling is that every write would flood every ring and
every station bus. Here two kinds of filter cut the broadcast down. They are
steered by a small bit mask that the memory keeps for each block, and the
filters themselves hold no state. A routing node decides whether to pass an
invalidation by looking at one bit of the packet, as cheaply as it makes an
ordinary routing decision.

The protocol is write-through and invalidating, and it gives sequential
consistency. A processor is blocked after a write until the invalidation for
that write comes back past it. The memory locks the written block until the
invalidation broadcast returns to it.

## The machine

```
                    central ring
     IRI0 ──► IRI1 ──► IRI2 ──► IRI3 ──► (back to IRI0)
      │        │        │        │
   local ring 0 ...  each local ring: IRI ► st0 ► st1 ► st2 ► st3 ► IRI
      │
   station = station controller + station bus
             + 4 processor modules (cache) + 1 memory module
```

* Four local rings hang off one central ring, each through an inter-ring
  interface (IRI). Each local ring carries four stations. Each station has
  four processors, for 64 processors in all (the balanced 4 x 4 x 4
  configuration).
* Every ring node owns one ring segment, a register. It forwards one packet
  per cycle and never stalls the ring. A station puts a packet onto the ring
  only when the segment arriving at it is empty, or when the packet on that
  segment is being taken off at this station. An IRI has an up FIFO and a down
  FIFO for packets that change rings. These hold 64 entries (processors x
  outstanding requests), enough that no flow control is needed. Packets
  already on the central ring have priority over the up FIFO. Packets already
  on the local ring have priority over the down FIFO.
* A packet is one bit-parallel word (`hector_pkg::pkt_t`, 70 bits): type,
  source and destination node IDs, block address, a data word, and the
  8-bit filter mask. A block address `{ring, station, index}` names its home
  memory directly.
* Packet types: `READ`, `WRITE`, `RDATA` (read reply), `NACK` (memory queue
  full, retransmit), `WIP` (write-invalidate-pending, climbing from the memory)
  and `WI` (write-invalidate, broadcast downwards). A `WIP`/`WI` carries the
  writer's ID in its source field.

## Anatomy of a write

1. The processor module updates its own cached copy, if it has one, and sends
   `WRITE` to the home memory. The processor then waits.
2. The memory performs the write. It increments the block's lock counter and
   sends a `WIP` that carries the block's filter mask. It then resets the
   stored mask to the path to the writer alone.
3. The `WIP` climbs. It stops at the lowest node whose subtree holds every
   station that may have a copy, plus the writer and the home memory. That
   node turns it into a `WI`:
   * **station level**: the station controller puts the `WI` on its own bus.
     The `WIP` never reaches the ring.
   * **local-ring level**: the IRI turns it round as a `WI` on the local ring.
     Every station of that ring sees it, and the IRI removes it when it comes
     back.
   * **central level**: the IRI sends the `WI` round the central ring. Each
     IRI on the way copies it down into its own local ring. The IRI that
     formed it removes it after one full circuit and only then copies it
     down its own ring, so the `WI` reaches the home memory after the central
     circuit is complete.
4. Every processor module that sees a `WI` on its station bus invalidates
   its matching copy, unless the `WI` carries its own ID. The writer keeps its
   copy, and its write is complete when its own `WI` arrives.
5. The home memory decrements the lock counter when the `WI` reaches it.
   While the counter is non-zero, reads of the block are held in the memory's
   queue. Further writes are still performed, and each of them adds to the
   count.

A write is therefore complete, for the writer, when the broadcast passes the
writer's station. Copies on stations further round the ring can still be
valid for a few cycles after that. The memory lock and the ordering of the
rings are what keep that window from being observed as a consistency
violation. Ring packets cannot overtake each other, there is only one path
between any two nodes, and every node handles packets in arrival order. The
testbenches wait for the broadcast to finish before they require other
processors to see a new value.

## The filter mask

The mask has one field per ring level:

| field | bits | bit i set means |
|---|---|---|
| central | 4 (one per local ring) | the `WI` descends into local ring i |
| local | 4 (one per station position) | the `WI` is copied onto station i of every local ring it reaches |

* **Incoming filters** read one bit each. An IRI copies a central `WI` down
  only if its ring's central bit is set. A station controller copies a local
  `WI` onto its bus only if its station bit is set.
* **Outgoing filters** read which fields are zero. The memory stores the mask
  with the fields above the needed height cleared. If the central field is
  zero, the `WIP` stops at the home local ring. If both fields are zero, it
  stops at the home station. No separate height value is kept.
* The memory updates the mask for a block on every access (`mask_maint`):
  * a read adds the reader's ring bit and station bit;
  * a write sends the stored mask, plus the writer's path, in the `WIP`, and
    then resets the stored mask to the path between the memory and the
    writer.

  The home path is always implied, because the `WI` must get back to the
  memory. Evictions do not change the mask.

The encoding is deliberately imprecise. Say copies exist on ring 0 station 1
and on ring 2 station 0. The mask is then central `{0,2}` and local `{0,1}`,
so the `WI` also reaches ring 0 station 0 and ring 2 station 1. In exchange,
the mask costs 8 bits per block instead of 16 (one bit per station). It grows
with the number of levels, not the number of stations.

## Modules

| module | role |
|---|---|
| `hector_pkg` | topology constants, packet and mask types, mask encode/decode functions |
| `hector_top` | the whole machine: 4 IRIs on the central ring, 16 stations; processors are outside |
| `inter_ring_if` | IRI: local and central segments, up and down FIFOs, WIP to WI conversion, WI copy and removal, both filters |
| `station` | one station: 4 `proc_module`, 1 `mem_module`, 1 `station_ctrl` |
| `station_ctrl` | station bus arbitration (ring delivery first, then a locally formed WI, then round-robin among modules), ring segment, outbound queue, station-level filters |
| `mem_module` | 256 one-word blocks with a mask and lock counter each, a 4-entry request queue with NACK on overflow, and a reply queue |
| `mask_maint` | combinational mask update for a read or a write |
| `proc_module` | 64-line direct-mapped write-through cache, controller (one outstanding request) and bus interface |
| `sync_fifo` | FIFO used for all queues |

Processor `g = (ring*4 + station)*4 + slot` uses element `g` of the `cpu_*`
ports of `hector_top`. Its request is accepted on the cycle `cpu_req_valid`
and `cpu_req_ready` are both high. `cpu_resp_valid` pulses once for the read
data or for write completion. A read hit answers on the next cycle. The
`ev_*` outputs are event strobes for monitoring and have no function inside
the design.

## Timing

* A ring hop takes one cycle. An on-station transfer takes one bus cycle.
* A station that has a packet to send reaches the ring two cycles after its
  bus grant (it goes through the outbound queue), provided the ring slot is
  free.
* Crossing an IRI's FIFO takes two cycles. Passing straight through an IRI
  takes one cycle.
* A memory serves one queued request per cycle.

## Departures and choices of this implementation

The following are this design's choices:

* Organisation:
  * one memory module per station, in bus slot 4;
  * one-word blocks with 32-bit data;
  * 256 blocks per memory;
  * a 64-line direct-mapped cache with no allocation on a write miss.
* Queues and arbitration:
  * a 4-entry memory request queue;
  * round-robin bus arbitration;
  * a 64-entry outbound queue per station;
  * FIFO priority on the local side.
* Ring order: interface, then stations 0 to 3, then back to the interface.
* A read waiting on a lock holds up the memory queue behind it (in-order
  service).
* Reset clears masks, lock counters, cache valid bits and queues. Memory data
  is not reset.
* The memory module forms the `WIP` itself, because it holds the mask; the
  station controller only forwards it or stops it. In the architecture's
  own description, the station controller forms the `WIP`.
* For the station level, both mask fields are cleared, since a station has no
  field of its own. The mask in a `WIP` always includes the writer's path, so
  that the `WI` is sure to release the writer.
* `IN_FILTER_EN` and `OUT_FILTER_EN` (default 1) switch the two filter kinds
  off. This gives the unfiltered comparison points. With the outgoing filter
  off, the memory sends the full mask and every `WIP` climbs to the central
  ring.

The following are not implemented:

* the write-back and updating variants of the protocol;
* the weaker consistency models;
* atomic read-modify-write;
* more than two ring levels. The mask scheme generalises to more levels, but
  the RTL is written for two;
* the processor itself.

## Simulating

All files use plain SystemVerilog-2017. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module hector_top_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/hector_pkg.sv tb/hector_top_tb.sv
./obj_dir/Vhector_top_tb
```

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a cycle watchdog.

| testbench | what it does |
|---|---|
| `mask_maint_tb` | random read/write sequences against a model that keeps the exact set of sharer stations; includes the two-ring example above |
| `mem_module_tb` | WIP contents, reads held by a lock, two writes needing two WIs, NACK on queue overflow, reply back-pressure |
| `proc_module_tb` | hit/miss, 1-cycle hit latency, NACK retransmission, writer blocked until its own WI, snoop invalidation |
| `station_ctrl_tb` | bus priority, both station-level filters, ring slot waiting, round-robin order |
| `inter_ring_if_tb` | routing of every packet kind in both directions, compared stream by stream; central priority |
| `station_tb` | one station against a scripted ring: local sharing, concurrent writers, remote reads, ring WIs |
| `hector_top_tb` | full 64-processor machine at default parameters; see below |
| `workload_mix_tb` | synthetic streams with the operation mixes of six application traces |
| `filter_compare_tb` | one stream replayed on three builds: no filters, incoming only, both |

`hector_top_tb` has three phases:

* A directed phase. It moves a block's sharers from the home station to the
  home ring and then to a remote ring, so that the `WIP` stops at each of the
  three heights.
* Twelve rounds of concurrent writers followed by reads from all 64
  processors. Every read must return that round's value.
* A phase of mixed concurrent reads and writes of four hot blocks. Afterwards
  all processors must agree on every block.

It counts every mechanism and fails if any one of them never happened:

* hits, misses, invalidations;
* NACK and retry;
* reads held by a lock, unlocks;
* WIs copied to and blocked at stations and rings;
* WIPs stopped at each level;
* ring-slot and FIFO waits.

The directed phase also bounds the time of a write on an idle machine. The
bound is computed from the topology: three local-ring crossings, two
central-ring crossings, and the queues and bus transfers on the way, which
comes to 47 cycles. A central-level write from ring 3 to a block homed on
ring 0 takes 24 cycles.

`workload_mix_tb` drives the operation mixes of Simple, Speech, Weather, SOR,
MP3D and Water (64-processor versions), 40 references per processor each. It
checks that every read returns a written value and that all processors agree
once the machine is quiet. It reports the mean latency and how many `WIP`s
stopped at each level. The original address traces are not used, so its
numbers are not comparable with published latencies.

`filter_compare_tb` replays one stream with the Weather operation mix on
three builds of the machine. A typical run gives:

| build | WI copies onto station buses | WIPs reaching the central ring | mean write latency |
|---|---|---|---|
| no filters | 6416 | 401 | 41 cycles |
| incoming filters | 1174 | 401 | 41 cycles |
| incoming + outgoing | 871 | 91 | 15 cycles |

The testbench requires three things:

* incoming filters reduce the WI copies onto station buses;
* outgoing filters reduce the WIPs that reach the central ring;
* outgoing filters reduce the write latency.

## Changing the configuration

The topology is set by the constants at the top of `hector_pkg`:

* `NUM_RINGS`;
* `STATIONS_PER_RING`;
* `PROCS_PER_STATION`;
* `MEM_LINES`;
* `DATA_W`.

Packet and mask widths follow from them. For example, the 128-processor
4 x 8 x 4 machine needs `STATIONS_PER_RING = 8`. The `FIFO_DEPTH` parameter
of `hector_top` sizes both the IRI FIFOs and the station outbound queues. It
should stay at or above the processor count. Assertions in `sync_fifo` flag
any overflow.
