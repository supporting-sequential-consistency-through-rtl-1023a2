# Sequential consistency by ordering requests in the network

Sequential consistency (SC) asks that all cores see one global order of memory
operations, and that this order keeps each core's program order. Many-core
chips usually get SC by fencing at the cores: a core waits until each store is
visible everywhere before it issues the next access. This design gets SC
another way. The cores are simple in-order cores with no private caches. They
issue requests back to back, and the network and the shared-cache banks put
those requests in order.

Two mechanisms make this work:

* **Circuits.** Every request travels from its core to the bank that owns its
  address on a circuit. A circuit is a path reserved in advance in the
  routers' time-slot tables. A request on a circuit is never buffered or
  arbitrated, so its route and timing are fixed.
* **Tokens.** Every request carries a tag (CoreID, ReqID). The ReqID is a
  per-core counter: 0, 1, 2, and so on. Tokens circulate on a ring through the
  banks. A bank may serve request (c, r) only while it holds core c's token,
  and only if that token says r is next. Each core's requests are therefore
  performed in program order, even when they go to different banks. Different
  cores still proceed in parallel.

Critical sections get one extra rule. A critical section is a run of requests
made under a lock and marked as such. A second kind of token makes each core's
marked run execute as a whole, with no other core's marked request in between.
A core can therefore release a lock right after it *issues* its last store; it
does not wait for the store to complete.

Everything here is synthesizable SystemVerilog. The cores and the memory
controllers are not part of the RTL; their ports are brought out of the top
level.

## Floor plan

The top level `sc_manycore_top` is a 4x4 mesh with the 16-node interleaved
placement: cores on the outer rows, banks in the middle, memory controllers on
the sides. Nodes are numbered `node = y*4 + x`.

```
        x=0   x=1   x=2   x=3
 y=0    C0    C1    C2    C3
 y=1    MC0   M0    M1    MC1
 y=2    MC2   M2    M3    MC3
 y=3    C4    C5    C6    C7
```

* **C** nodes hold a `core_ni`, the network interface of one core. The core
  itself is outside the RTL and talks to the `core_*` ports.
* **M** nodes hold an `ordering_ni` and a `shared_cache_bank`. The four
  `ordering_ni` form the token ring M0 → M1 → M2 → M3 → M0.
* **MC** nodes hold only a router port, brought out as `mc_*`.

Addresses are byte addresses. A request goes to bank `(addr/4) mod 4`, word
`(addr/4) div 4` of that bank, so consecutive words fall in consecutive banks.

## Circuits on a time-division mesh

### Routers

Each `hybrid_router` has five ports: 0 local, 1 north (y-1), 2 east, 3 south
and 4 west. It carries two kinds of traffic on the same links.

* **Circuit flits.** A global counter `slot_now` runs 0..SLOTS-1 and then
  wraps. Each router's `slot_table` says, for every input and slot, whether a
  circuit is reserved and to which output.
  * A flit marked `circ` that arrives on input p while the slot is s goes
    straight to output `table[p][s]`, through the output register, in one
    cycle.
  * The next router sees the flit while the slot is s+1. A circuit therefore
    reserves slot s at its first router, s+1 at its second, and so on.
  * A circuit across k routers takes exactly k cycles from the source's
    injection to the destination's local output.
  * Circuit flits have priority on their output in their slot, and the input
    FIFO never sees them.
* **Packets.** Everything else is a packet: responses and the setup
  messages.
  * Packets are routed X first, then Y.
  * Each input has a 4-entry FIFO.
  * Each output takes packets by round robin among the inputs, except when a
    circuit flit owns that output in this slot.
  * `in_rdy` says at least two FIFO entries are free, which covers a flit
    already on the link.

One output can belong to only one input in a given slot. This is checked
before a reservation is made, so two circuit flits can never collide.

### Setup messages

Circuits are built and removed with four single-flit packet messages that the
routers act on in the head of their input FIFO.

| message | fields used | what a router does |
|---|---|---|
| SETUP | src, dst, slot s, hops h | If input p is free in slot s and the XY output is unused in slot s, it reserves (p, s) → output and forwards the message with slot s+1 and h+1. At the destination router the output is the local port: it reserves that too and turns the message into an **ACK** back to src. If either check fails, it turns the message into a **NACK** back to src, carrying h, the number of routers that did reserve. |
| ACK | src, dst | Routed like a packet. |
| NACK | src, dst, hops | Routed like a packet. |
| TEAR | slot s, hops h | Frees (p, s), follows the output that was reserved, and continues with s+1 and h-1. It is absorbed when h reaches 0, or at the destination. |

A core interface (`core_ni`) opens its circuit to bank b in these steps:

1. It opens the circuit the first time a request needs it, or earlier when the
   core asks through `setup_valid`/`setup_bank`. An early setup lets path
   setup overlap with waiting for a lock.
2. The start slot is `((core*4 + b) * 5) mod SLOTS`, which spreads the cores
   over the table.
3. On a NACK the interface sends a TEAR for the routers that had reserved,
   adds one to the start slot, and tries again.
4. On the ACK the circuit is open and stays open for good.

Only one setup is in flight per interface, so an ACK or NACK always refers to
the latest SETUP. With 8 cores × 4 banks = 32 circuits in 50 slots, the
first-come setups of the end-to-end test settle after 8 NACKs.

Once the circuit is open, a request is put on the link in the cycle whose
slot equals the circuit's start slot.

## Ordering at the banks

This is the core of the design and the part that takes the most care.

### Tags and windows

* `core_ni` gives each accepted request the next ReqID, starting from 0 after
  reset.
* It queues the request in a 4-entry load-store queue and sends the queue in
  order.
* At most `WIN` (4) requests of a core may be outstanding, meaning sent and
  not yet answered. Requests are still sent back to back; the window only
  bounds how far ahead a core may run.
* Requests reach different banks over circuits of different lengths. A bank
  can therefore receive request 5 of a core before request 4 has reached
  another bank, and it must not serve request 5 first.

### Reorder array

Each `ordering_ni` stores arriving requests in a `reorder_array`:

* one direct-mapped set of `DEPTH` entries per core;
* indexed by `ReqID mod DEPTH`, with the full ReqID kept as the tag.

`DEPTH` equals the window, so two live requests of one core never map to the
same entry. Every cycle the array is looked up for every core at once, using
the ReqID that the core's token (held or arriving) says is next.

### Tokens on the ring

There is one token per core, and it carries that core's next ReqID. After
reset all tokens sit at bank 0 and every next ReqID is 0. The ring moves one
stage per cycle. At each bank, in each cycle:

* **Service.** A core is eligible when its token is here and its expected
  request is in the reorder array. Among the eligible cores, one is picked by
  round robin and handed to the bank. Its token's ReqID goes up by one.
* **Holding.** A core's token stays at the bank while that core's expected
  request is present there. It stays one more cycle after the last such
  service, so the next request can follow back to back.
* **Moving on.** All other tokens go to the next bank.

Because a core has exactly one token, only one bank in the whole system can be
serving that core at any time, and it serves the core's ReqIDs in increasing
order. This gives program order per core. Tokens of different cores move
independently, so different banks serve different cores at the same time. The
total order is the order in which the banks perform the requests, and it
interleaves the cores' program orders. That is exactly an SC execution.

An example with cores A and B and banks P and Q:

| | A's requests | B's requests |
|---|---|---|
| ReqID 0 | P | P |
| ReqID 1 | P | Q |
| ReqID 2 | Q | Q |
| ReqID 3 | P | Q |

P serves (A,0), (B,0), (A,1) and (A,3). Q serves (B,1), (A,2), (B,2) and
(B,3). A's token has to visit Q for (A,2) before (A,3) can be served at P,
however early (A,3) arrived there.

`token_ring_memory` checks in every cycle that each token exists exactly once:
either held at one stage or travelling between two stages.

### Service and responses

* A served request reaches the bank in the same cycle.
* The bank answers one cycle later: load data, or the stored word for a store.
* The answer is queued and sent back to the core as a packet.
* Latency is fixed: a request served in cycle t is on the router port in cycle
  t+3 when the port is free.
* A bank serves only when its 4-entry response queue has room, so responses
  are never dropped.
* On the core side, every response frees one place in the window. A store's
  response is its acknowledgement.

## Critical sections

A request may be marked `cs`: it belongs to a critical section. The last
request of a section is also marked `cs_last`; this is normally the store that
releases the lock.

One more token travels the ring, the **critical-section token**. It is either
free or owned by one core.

* A `cs` request needs its core's token, as usual. It also needs the
  critical-section token to be at the same bank and either free or owned by
  its own core.
* Serving a `cs` request claims the critical-section token for that core.
* Serving the `cs_last` request frees it again.
* While a `cs` request waits for the critical-section token, its core's token
  stays at that bank. The critical-section token stays at a bank while that
  bank has `cs` requests it can serve.

As a result, the marked requests of one core's section are performed together,
across all banks, before any other core's marked requests. The lock itself is
ordinary memory or, in the test bench, a simple arbiter. The next lock holder
may start issuing while the previous holder's last stores are still in the
network. Its marked requests simply wait at the banks, with
`ev_cs_block` asserted, until the section ahead of them has finished.

## Module hierarchy

```
sc_manycore_top
├── mesh_noc                 4x4 routers and links
│   └── hybrid_router  x16
│       ├── slot_table
│       └── flit_fifo  x5    packet input buffers
├── core_ni  x8              (flit_fifo as load-store queue)
└── token_ring_memory
    ├── ordering_ni  x4
    │   ├── reorder_array
    │   └── flit_fifo        response queue
    └── shared_cache_bank  x4
```

`scnoc_pkg` holds the shared types, constants and helper functions:

* the flit struct `flit_t` (118 bits), with fields `vld`, `circ`, `kind`,
  `src`, `dst`, `slot`, `hops`, `core`, `rid`, `cs`, `cs_last`, `we`, `addr`
  and `data`;
* the message kinds and the port numbers;
* the node placement functions `core_node`, `bank_node` and `mc_node`.

All state is reset by the asynchronous active-low `rst_n`, except the bank
arrays, which start at zero.

### Top-level interface

All signals are per core unless noted; arrays are indexed by core number.

* **Request** (`core_req_*`): `valid`/`ready` handshake. The fields are `we`,
  `addr`, `data`, `cs` and `cs_last`. `core_req_rid` returns the ReqID given
  to the request in the cycle it is accepted.
* **Early setup**: `core_setup_valid` with `core_setup_bank`.
* **Response** (`core_resp_*`): `valid` for one cycle, with `rid`, `we` and
  `data`.
* **Memory-controller nodes**: `mc_to_rtr`/`mc_to_rtr_rdy` and
  `mc_from_rtr`/`mc_from_rtr_rdy`, raw flit ports of the four MC routers.
* **Status**: `slot_now` and `circ_open` (bit `core*4 + bank`).
* **Event pulses**, one bit per node, core or bank:
  * routers: `ev_circ`, `ev_reserve`, `ev_rtr_nack`, `ev_free`;
  * core interfaces: `ev_setup`, `ev_nack`, `ev_tear`, `ev_win_stall`;
  * ordering points: `ev_service`, `ev_wait`, `ev_cs_block`, `ev_hold`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SLOTS` | 50 | slot-table length; the same for all routers |
| `WIN` | 4 | outstanding requests per core; also the reorder depth |
| `LSQ_D` | 4 | load-store queue per core |
| `WORDS` | 1024 | words per bank |
| `FIFO_D` | 4 | packet buffer per router input |
| `MESH_X`, `MESH_Y`, `NCORE`, `NBANK`, `NMC` (package) | 4, 4, 8, 4, 4 | 16-node configuration |

* **Core, bank and controller counts.** These follow the 16-node
  configuration of the original evaluation.
* **Slot table.** That evaluation fixes one slot-table size per network size
  but gives no number for 16 nodes. Its sweep covers roughly 40 to 100 slots,
  and 50 lies inside that range.
* **Everything else** is this design's own choice.
* **Field widths.** These are set in the package: 16-bit ReqIDs, 32-bit data
  and addresses, 8-bit slot numbers (up to 256 slots), 6-bit node numbers.
* **Larger networks.** The 36-node (20 cores, 8 banks, 8 controllers) and
  64-node (32, 16, 16) configurations need new package constants and a new
  placement in `core_node`/`bank_node`/`mc_node`. The modules themselves are
  parameterised in the mesh size and the core and bank counts.

## Departures and limits

* **Slot allocation.** The original design computes slot assignments offline,
  so that every setup succeeds, and never tears a path down. Here setups run
  first-come: a refused setup is answered by a NACK, its partial path is torn
  down, and it is retried one slot later. Established circuits are still
  never removed. The result is a working allocation without an offline tool.
  The cost is a few retries at start-up.
* **Shared cache bank.** The bank is an always-hit word memory with one cycle
  of latency. It has no tags, no lines, no coherence states and no miss path
  to the memory controllers. A bank that waited on off-chip memory would
  delay the token it holds and so stall that core's next requests.
* **Memory controllers, DRAM and CPU cores.** These are not built. Their
  ports are at the top level.
* **Token organisation and holding rules.** The organisation described above
  (one token per core plus a critical-section token) and the holding rules
  are this design's reading of "tokens that carry the (CoreID, ReqID) of
  serviced requests".
* **Critical-section marks.** The `cs`/`cs_last` marks must come from the core
  (or its software): the hardware cannot know where a critical section ends.
* **Capacity.** The full graph workloads of the original evaluation (graphs of
  10,000 to 100,000 vertices) do not fit in 4 × 1024 words. The
  micro-benchmark patterns, private read-modify-write loops and short and long
  lock-protected sections, do fit. The end-to-end test runs them.

## Verification

Every block has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| test bench | what it checks |
|---|---|
| `tb_slot_table` | random reserve/free against a model, the cross-input output check |
| `tb_hybrid_router` | XY packet routing without loss, setup forwarding (slot+1, hops+1), one-cycle circuit hop, NACK on conflict, ACK at the destination, teardown then successful setup, back-pressure |
| `tb_mesh_noc` | random all-to-all packets (delivery, order per source), ACKed setup, circuit latency of one cycle per router, NACK with the right hop count, teardown freeing exactly the reserved slots, retry |
| `tb_core_ni` | NACK → TEAR → retry, ACK, requests only in their slot, ReqIDs and marks, window stall, responses, early setup |
| `tb_reorder_array` | scrambled arrivals inside the window, lookups and occupancy against a model, tag mismatch |
| `tb_shared_cache_bank` | random loads and stores, one-cycle latency |
| `tb_ordering_ni` | no service without the token, back-to-back service with the token, token leaving with the next ReqID, response order and data, critical-section blocking by an owned token |
| `tb_token_ring_memory` | four cores' random programs over four banks, delivered scrambled: program-order responses, correct data, critical sections never interleaved |
| `tb_sc_manycore_top` | the whole 16-node system at its default parameters, see below |

The end-to-end test `tb_sc_manycore_top` runs the top with no parameter
overrides. Eight core models drive the `core_*` ports: loads block, stores are
posted. The test has five phases:

1. All cores set up all 32 circuits at once.
2. Message passing. Core 0 stores Value to a far bank, then Flag to a near
   one. Core 7 spins on Flag and must then read the new Value. A second pair
   of cores checks that two stores to different banks are never seen
   reversed.
3. Private read-modify-write loops, plus store bursts that overrun the
   window.
4. Lock-protected increments of two shared counters in different banks. The
   lock is handed on as soon as the last store is issued. Both counters must
   end exact.
5. The same with long critical sections: eight counters spread over all four
   banks in every section.

It counts every mechanism and fails if one never occurs. A typical run takes
about 17,200 cycles, with these counts:

| mechanism | count |
|---|---|
| SETUP messages | 40 |
| NACKs | 8 |
| slots freed by teardown | 13 |
| circuit hops | about 4,900 |
| window stalls | 33 |
| bank services | 1,416 |
| reorder waits | about 2,000 |
| token holds | about 1,500 |
| critical-section blocks | 66 |

Assertions in the RTL check these rules in every simulation:

* no circuit flit arrives without a reservation;
* circuit flits never collide;
* the reorder array never receives a write into an occupied entry;
* every bank answers every request;
* each token exists exactly once.

### Running a test with Verilator

The package must come first:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/scnoc_pkg.sv $(ls rtl/*.sv | grep -v scnoc_pkg) \
    tb/tb_sc_manycore_top.sv --top-module tb_sc_manycore_top -Mdir obj -o sim
./obj/sim
```

Replace the test bench name to run another block's test. The design is
two-state clean: every register that is read is reset, so the results do not
depend on Verilator's random initial values.
