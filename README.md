# Spidergon elementary polygon NoC in SystemVerilog

A star and a ring together. One central router is linked point to point to
every one of M peripheral routers (M = 4R; here M = 8). The peripheral
routers are also linked to their two neighbours in a ring. A packet can go
round the ring or cut through the centre, so no node is more than two hops
from any other. One generic router serves every position: a peripheral router
has 4 ports (local, clockwise, counter-clockwise, centre) and the central
router has M+1 ports (local and one per peripheral).

The routers use wormhole switching. The header flit of a packet reserves an
output port through a priority-driven arbiter, and the body flits follow on
the same path. Every flit carries its own CRC. Each link is a 4-phase
request/acknowledge handshake. The receiver acknowledges only flits it has
checked and stored. The sender times out and retransmits ("Aloha"), and gives
up after a fixed number of tries.

The design follows the structure of the generic Spidergon router published by
Zitouni, Zid, Badrouchi and Tourki ("A Generic and Extensible Spidergon NoC").
The RTL, the concrete rules where that description stops, and the
testbenches are this implementation's own. Departures are listed at the end.

## Flits and packets

All flits are 32 bits. The last 8 bits of every flit are its CRC.

| flit   | fields (MSB first) |
|--------|--------------------|
| header | Nat 2, QoS_id 4, Destination 6, Source 6, P 2, Nbre 4, CRC 8 |
| data   | Nat 2, Data 18, Nbre 4, CRC 8 |

* `Nat`: 11 header, 01 body, 10 tail (last flit), 00 unused.
* `P` (priority): 11 signalling, 10 real time, 01 register/memory access,
  00 block transfer. A higher value wins arbitration.
* In a header, `Nbre` is the number of data flits that follow (0 to 15). In a
  data flit it is the flit's order number (1, 2, …). A packet therefore has
  at most 16 flits.
* The CRC is CRC-8 with polynomial x^8+x^2+x+1 (0x07), MSB first, initial
  value 0, taken over bits 31:8. `noc_pkg::seal_flit()` appends it.
* Addresses: the central router is node 0, and the peripheral routers are
  nodes 1..M in clockwise order.

The types (`head_flit_t`, `data_flit_t`, `nat_e`, `prio_e`) and the CRC
function are in `rtl/noc_pkg.sv`.

## The link protocol

Every channel is one-way and has `req`, `data[31:0]` and `ack`. The
top-level local ports use the same protocol, so a core must follow it too.

1. The sender puts the flit on `data` and raises `req`.
2. In the cycle it sees `req`, the receiver (`flow_ctrl`) checks the flit.
   If the flit is good, it is stored and `ack` rises in the next cycle.
3. The sender lowers `req`, and then the receiver lowers `ack`.

The receiver refuses a flit by never acknowledging it. It does this when:

* the CRC is wrong;
* the input FIFO is full;
* a data flit's `Nbre` is not the expected next number.

A header is always accepted, so a packet that was cut short cannot lock the
port. A flit equal to the last one stored is a resend whose acknowledge was
missed. It is acknowledged again but not stored twice.

The sender (`aloha_tx`) works like this:

* It holds `req` for up to `TIMEOUT` cycles (default 16). Then it lowers
  `req` for at least one cycle and sends the flit again.
* An acknowledge that arrives in that gap still counts as a success.
* After `NMAX_RETX` resends (default 8), the flit is dropped and `ev_drop`
  pulses.
* After a drop, the rest of that packet (everything up to the next header)
  is discarded at once, also with an `ev_drop` pulse each. A dropped tail ends
  the discarding.
* A flit takes at least 3 cycles on a link.

Dropping a flit is what keeps a dead or jammed neighbour from stalling the
sender for ever. The cost is that the network can lose data when it is
overloaded (see *Behaviour under load*).

Discarding the remainder matters because a data flit names no packet, only
its order number. Suppose a packet arrives with a hole while the next router
still waits on an earlier packet that was cut short. The later flits could
then match the order numbers that router expects, and be forwarded along the
other packet's path to the wrong node. With the remainder discarded, a
packet arrives whole or as a clean prefix, never as a fragment under
another's header.

## Inside a router (`router.sv`)

```
 in link i ──► PMU i ───────────────┐ UX/ADRX      ┌─► aloha_tx j ──► out link j
  (flow_ctrl → flit_fifo →          ├──► noc_switch ┤
   route_unit, clock_gen)           │               │
          arb_req/port/prio ──► dynamic_arbiter j ◄─┴─ port_table (free/occupied)
```

### PMU: one per input port (`pmu.sv`)

* **flow_ctrl**: the receiver side of the link (see above).
* **flit_fifo**: 6 words, first-word fall-through.
* **route_unit**: takes a header from the FIFO head. It asks `route_fn` for
  a preferred and an alternative output port, then requests the arbiter of
  the preferred port with the packet's priority.
  * The request is held for 3 cycles. If no grant comes, that counts as a
    refusal: the unit waits `TD` cycles (4) and asks again.
  * After `NMAX_REQ` refusals (4) it switches to the other port. This is
    how the central router takes traffic off a congested ring.
  * Once granted, it keeps the request up and passes the header and the
    `Nbre` data flits to the switch. It then drops the request for one
    cycle, which frees the port.
  * A packet also ends early if a new header shows up in the middle of it,
    or if no flit has arrived for `STALL_MAX` cycles (256).
* **clock_gen**: a latch-based clock gate. The PMU's clock runs only when
  one of these holds:
  * reset is applied;
  * a request is on the link;
  * `flow_ctrl` is inside a handshake;
  * the FIFO holds flits;
  * the routing unit is busy.

  An idle port draws no clock. Both the reset term and the handshake term
  are needed: without them, reset does not reach the PMU registers from
  power-up, and a refused request is never seen to drop.

### Arbitration (`dynamic_arbiter.sv`)

There is one arbiter per output port, and each has N requesters (all the
input ports).

* While the port is not held, `prio_comparator` registers which active
  requests carry the highest priority.
* One C-element per requester merges that selection with the request. Its
  output rises when both are high and stays high until the request drops,
  even after the comparator has cleared its selection.
* `rr_arbiter` picks one of the C-element outputs in round-robin order.
  After each grant the pointer moves past the winner.
* A grant needs the `port_table` to report the port free. The grant marks
  the port occupied (`claim`), and is held until the winner lowers its
  request (`release`).
* On a free port a request is granted 2 cycles after it is raised.

Because the C-elements hold, a requester that was selected once stays in the
running after a higher-priority request appears. Priority decides between
requests that arrive together; it does not pre-empt.

### Switch (`noc_switch.sv`)

The switch is a combinational crossbar. Output j carries the flit `UX` of the
input that owns j, provided that input's `ADRX` names j. `ADRX` is
clog2(N) bits wide.

### Routing (`route_fn.sv`)

* **Peripheral router k**:
  * a packet for node k goes to the local port;
  * a packet for node 0 goes to the centre, with clockwise as the
    alternative;
  * any other packet goes the shorter way round the ring (clockwise on a
    tie), with the centre as the alternative.
* **Central router**: a packet goes straight to port d. Its alternative is
  port d-1, which is one clockwise hop short of d.
* Addresses above M are delivered locally.

## Top level (`spidergon_polygon.sv`)

The top has parameters `M` (8), `DEPTH` (6), `TD`, `NMAX_REQ`, `TIMEOUT` and
`NMAX_RETX`.

* The local port of node n is `loc_in_*[n]` (core to network) and
  `loc_out_*[n]` (network to core).
* Per-node event pulses are brought out for statistics: `ev_crc_err`,
  `ev_dup`, `ev_refused`, `ev_rerouted`, `ev_abandon`, `ev_retx`, `ev_drop`.
  `ev_clk_off` means some port clock of that node is stopped.
* Channel wiring (indices modulo M, within 1..M):
  * peripheral k out 1 → peripheral k+1 in 2;
  * peripheral k out 2 → peripheral k-1 in 1;
  * peripheral k out 3 → centre in k;
  * centre out k → peripheral k in 3.

All routers share one clock `clk` and an asynchronous active-low `rst_n`.

## Behaviour under load

Routing is wormhole with no virtual channels, around a ring. Under heavy load,
packets can therefore block each other in a cycle. The Aloha sender breaks
such a cycle by dropping the blocked flit after
`TIMEOUT × (NMAX_RETX+1)` ≈ 150 cycles. The flow control and the routing
units then resynchronise on the next header, or end the packet after
`STALL_MAX` idle cycles.

What the simulations show:

* With 9 cores each sending 40 packets of up to 9 flits, with random gaps of
  up to 300 cycles, every packet arrives whole. Mean latency is about 43
  cycles.
* `tb_load_sweep` measures latency against load on a valence-12 polygon (13
  routers) with 16-flit packets. Latency is counted from packet creation,
  including the wait at the source. Load is the offered flit rate per node
  as a fraction of one link's capacity (1 flit per 3 cycles). Typical
  results:

  | load | mean latency (cycles) | packets cut short |
  |------|-----------------------|-------------------|
  | 5 %  | ~100 | 0 |
  | 20 % | ~150 | < 1 % |
  | 30 % | ~250–300 | ~1–2 % |
  | 40 % | ~850–1100 | ~4–8 % |
  | 70 % | ~3400–4700 | ~6–8 % |

  Accepted throughput levels off at about 0.11 flits per node per cycle,
  about a third of a link. Beyond that point flits are dropped and the
  packets they belong to arrive cut short. The network keeps running.

Software that needs reliable delivery at high load must check packets end to
end.

## Simulation

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5,
give the package first and let `-y` find the modules by file name:

```
verilator --binary --timing --assert -y rtl rtl/noc_pkg.sv \
          tb/tb_spidergon_polygon.sv --top-module tb_spidergon_polygon -o sim
./obj_dir/sim
```

Every testbench builds this way without warnings. Add
`+verilator+seed+N` to the run to change the random traffic.

* `tb_spidergon_polygon` runs the whole network at its default parameters
  (a few seconds once built).
  * Phase 1: random traffic from all 9 cores. The cores sometimes corrupt a
    flit or ignore an acknowledge on purpose.
  * Phase 2: core 5 stops acknowledging. A packet sent to it must be
    dropped, and the network must still deliver afterwards.
  * It fails if any of these mechanisms never happened: arbitration
    refusal, rerouting, retransmission, drop, CRC rejection, duplicate
    suppression, or clock stop.
* `tb_load_sweep` runs the load sweep above (8 load levels, 100 packets per
  node per level; about 10 s once built). It checks every flit that arrives: an intact
  CRC, that it belongs to a packet sent to that node, and that it arrives in
  order. It also checks that nothing is lost at the lowest load and that
  latency grows with load.
* `tb_router` runs one peripheral router with neighbour models on all four
  ports. It checks routing, wormhole contiguity, the alternative port and
  retransmission.
* The block testbenches compare each unit with a reference model: CRC by
  polynomial long division, FIFO against a queue, arbiter against a
  comparator/C-element/round-robin model, routing against hop distances,
  and so on.

The testbenches need a simulator that supports `--timing`, SystemVerilog
queues and associative arrays. They do not rely on x/z values.

## Where this departs from the published router

* **Clocking.** The published router is asynchronous, built from
  speed-independent arbiters and 4-phase handshakes between clock domains.
  Here everything is clocked from one clock. The handshake is kept, but it
  is sampled synchronously and has no synchronisers. The stoppable clock is
  a clock gate on that clock.
* **Full Spidergon not built.** The full network of valence m (3m+1 routers
  in a matrix of elementary polygons, with 9-, 6-, 5- and 4-port routers) is
  not built, because the published description does not say how the
  polygons are joined.
  * Only the elementary polygon is provided.
  * The router's port count follows from its position (4 or M+1).
  * 5- and 6-port routers would need their own routing function.
* **Packet length.** The published simulations use 64-flit packets. With a
  4-bit `Nbre`, a packet here has at most 16 flits.
* **Values of the generic parameters** (`TD`, `NMAX_REQ`, `TIMEOUT`,
  `NMAX_RETX`, `STALL_MAX`), the CRC polynomial, the `Nat` encoding and the
  routing rule are this design's choices.
* **CRC is always on.** The `QoS_id` field is carried but not interpreted.
  CRC checking happens whatever its value, although the source names
  `0001` as the CRC service code.
* **ADRX width.** `ADRX` is 4 bits in the central router, not 3, because
  it has 9 ports.
* **Arbiter size.** Each output arbiter has N requesters, including its own
  port. The published mesh example has N-1.
* **Stalled packets.** Ending a packet after `STALL_MAX` idle cycles is an
  addition, needed because a dropped flit would otherwise hold an output
  port for ever. Discarding the rest of a packet after a drop is also an
  addition.
* **Load results.** The published curves come from a 37-router network with
  64-flit packets. The sweep here uses a 13-router elementary polygon and
  16-flit packets, so its numbers are not comparable with those curves.
