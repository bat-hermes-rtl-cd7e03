# BAT-Hermes router in SystemVerilog

BAT-Hermes is a five-port network-on-chip router for a 2D mesh. Its links
and internal control use **transition signaling** (2-phase handshakes) with
**bundled data**: a sender puts a flit on a plain single-rail bus and then
*toggles* a request wire; the receiver toggles an acknowledge wire when it has
taken the flit. No return-to-zero phase is needed, so one transfer costs
one transition each way. The router was conceived as a clockless circuit
that lets IPs in different clock domains talk over the mesh (a GALS system)
with less energy per byte than an equivalent synchronous router.

This RTL keeps the architecture, the packet format, every 2-phase handshake
and the control algorithm of each block. It evaluates them on a sampling
clock `clk`, with edge-triggered registers in place of latches, XOR phase
matchers, MUTEX cells and delay lines. The result simulates with plain
Verilator and synthesises with standard tools. It does not reproduce the
timing or the energy of the clockless circuit. The section
[How far to trust it](#how-far-to-trust-it) covers the consequences.

## Packets and routing

A packet is:

| flit | contents |
|------|----------|
| 0 | header: target address in the low `FLIT_SIZE/2` bits (X in the upper half of that field, Y in the lower half); the upper bits are free |
| 1 | payload size N |
| 2 .. N+1 | payload |

Flow control is wormhole switching: a packet claims an output when its
header arrives and releases it after its last flit. The route is chosen by
**XY routing**: X is corrected first, then Y. Ports are numbered `EAST=0`,
`WEST=1`, `NORTH=2`, `SOUTH=3`, `LOCAL=4` (`bat_pkg::port_e`). A target X
above the router's X goes EAST; a target Y above the router's Y goes NORTH.
The router's own position is the parameter `ADDRESS` (default `8'h11`, i.e.
X=1, Y=1). A payload size of 0 is legal: the size flit is then the last flit.

There is no end-of-packet wire. The router finds packet boundaries by
**counting flits** from the size flit. That is the main cost of keeping the
same packet format as the synchronous router the design is compared with.

## Distributed control

There is no central controller. Each port has:

* an **Input Interface (II)**, which buffers flits and routes, and
* an **Output Interface (OI)**, which arbitrates.

The II of every port is wired directly to the OIs of the four other ports.
Each II↔OI pair has:

| signal | direction | kind | meaning |
|--------|-----------|------|---------|
| `req_outport` / `ack_outport` | II→OI / OI→II | one pair per OI, 2-phase | header handshake: asks for the output and carries the header |
| `req_data` | II→all four OIs | shared, 2-phase | one transition per non-header flit |
| `ack_data` | each OI→II | 2-phase | only the OI that owns the packet answers; the II XORs the four |
| `last_flit` | II→all four OIs | shared, toggles | toggles together with the request of the last flit |
| `data` | II→all four OIs | shared bus | the flit in the II's output register |

Routing and arbitration happen only in the header handshake. After it,
every flit is a single `req_data`/`ack_data` exchange.

The index an II uses for OI `p`, and the index OI `p` uses for II `i`, are
both `outport_index()` in `bat_pkg` (`(dst < src) ? dst : dst-1`).

### Phase matching: the hardest part

A 2-phase wire carries no level meaning, only "it changed". Shared wires
therefore need care.

* **At the II.** The four `ack_data` lines are XOR-merged. Only one OI answers
  any given flit, so the XOR toggles exactly once per flit. It then equals
  `req_data` again whenever nothing is outstanding.
* **At the OI.** The shared `req_data` of an II also toggles for flits that
  went to *other* OIs. So when a new packet starts, its phase relative to
  this OI is arbitrary. Each Output Control records the phase of `req_data`
  (and of `last_flit`) when it accepts a header. From then on it treats only
  a departure from that recorded phase as a new flit. Without this, an old
  transition would be taken as a flit (`tb_bat_router` counts how often
  this happens).
* **On the output link.** The four Output Controls of an OI drive one link
  request through an XOR, and all four see the link acknowledge. The arbiter
  lets only one of them toggle at a time. That one records the acknowledge
  phase when it sends, and waits for it to change.

## Blocks

| module | role |
|--------|------|
| `bat_router` | top: five IIs and five OIs, point-to-point wiring |
| `bat_input_interface` | FIFO → Input Buffer Control → Routing Control; XOR of the data acknowledges |
| `bat_fifo` | circular buffer, `BUFFER_DEPTH` flits, 2-phase on both sides; a full buffer withholds the write acknowledge (backpressure) |
| `bat_ib_control` | one-flit register stage; flit counter (size flit loads it, the flit seen at 1 is the last); steers the header to `req_header_o` and other flits to `req_data_o` |
| `bat_routing_control` | a pending header enables the routing unit and toggles the chosen OI's request line; XOR of the four header acknowledges |
| `bat_routing_unit` | combinational XY decision, one-hot over the four other ports |
| `bat_output_interface` | four Output Controls, arbiter, data multiplexer selected by the grant, XOR of the link requests |
| `bat_output_control` | per-II state machine: request arbiter → send header → forward data flits → release after the last flit |
| `bat_arbiter` | level request/grant; the grant is held while its request stays high; round-robin among simultaneous requests |
| `bat_pkg` | port numbering and the index-mapping functions |

### Life of a packet (idle router, clock edges)

| edge | event |
|------|-------|
| 1 | FIFO stores the header, toggles the link acknowledge |
| 2 | FIFO offers it |
| 3 | Input Buffer Control takes it into its register and toggles `req_header_o`; the FIFO slot is freed |
| 4 | Routing Control toggles the chosen OI's `req_outport` |
| 5 | Output Control raises its arbiter request and records the phases |
| 6 | arbiter grants |
| 7 | Output Control toggles the link request: **header latency is 7 edges** |

After that, each flit takes three edges per connection:

1. the II register takes the flit;
2. the Output Control forwards it;
3. the acknowledge returns to the II.

Five non-conflicting connections run at once. The total rate is therefore
5 × 16 bits every three edges.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `FLIT_SIZE` | 16 | all; the address is `FLIT_SIZE/2` bits with X and Y of `FLIT_SIZE/4` bits each |
| `BUFFER_DEPTH` | 8 | `bat_fifo`, `bat_input_interface`, `bat_router` |
| `ADDRESS` | `8'h11` | router position (X upper, Y lower) |
| `PORTS_PRESENT` | `5'b11111` | router: one bit per port (bit 0 = EAST); a cleared bit removes that port's II and OI |
| `MY_PORT` | 0 | II and routing blocks: the port they belong to (set by the router) |
| `N` | 4 | arbiter requesters |

16-bit flits and 8-flit buffers are the configuration the design was built
and measured in. At the edges and corners of a mesh, some ports have no
neighbour. Clearing their bits in `PORTS_PRESENT` removes their II and OI.
The removed port's link outputs are then held at 0, and its inputs are
ignored. XY routing never selects a port that is missing in a mesh.

## How far to trust it

**Same as the clockless original:**
* the block structure and signal names;
* the 2-phase protocol on every link and internal channel;
* the counter-based packet framing;
* the rule that decides whether the next flit is a header (after a header: data; after the last flit: header);
* the last-flit detection by phase comparison;
* the programmable phase matcher;
* the level-signaling arbiter handshake.

**Choices made here:**
* **Clocked evaluation.** Every latch became a register, and each handshake
  step costs a clock edge. Cycle counts (7-edge header latency, 3 edges per
  flit) describe this RTL, not the clockless circuit. The clockless
  circuit's measured figures (about 4.5 ns forward latency and 3.85 GB/s
  with five connections in 65 nm) have no counterpart here. Inputs must be
  synchronous to `clk`. To join different clock domains you would add
  synchronisers on the incoming request and acknowledge wires.
* **Arbiter.** The original resolves simultaneous requests with MUTEX cells,
  which pick arbitrarily. Here a synchronous round-robin arbiter is used.
  MUTEX cells and matched delay lines are not modelled.
* **FIFO.** Only its function (a circular 2-phase buffer) was specified, so
  it is a plain array with pointers and a counter.
* **Last-flit timing.** `last_flit_o` toggles on the same edge as the
  request of the last flit. The Output Control checks it when that flit is
  acknowledged.
* **Acknowledge order.** An Output Control acknowledges a flit to its II
  only after the output link has acknowledged it. The II's register thus
  holds the bundled data until the flit has left. This applies to the
  header too: its acknowledge means "granted and sent", not just "granted".
* **Packet layout.** The address layout, the port numbering, the II/OI index
  order and the zero-size packet rule are this design's.
* **Reset.** An asynchronous active-low `rst_n` clears all phases to 0.
  Every link partner must also start with request = acknowledge.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|--------------------|
| `tb_bat_fifo` | order, one-edge read latency, backpressure after `BUFFER_DEPTH` writes |
| `tb_bat_ib_control` | header/data steering, last-flit toggling for sizes 0, 1, 2 and random |
| `tb_bat_routing_unit` | all 256 addresses against an XY reference, for all five ports |
| `tb_bat_routing_control` | one request line toggles per header; acknowledge merging |
| `tb_bat_arbiter` | against a cycle-accurate reference model under heavy contention |
| `tb_bat_output_control` | grant discipline; acknowledge ordering; foreign `req_data` transitions ignored; release after last flit |
| `tb_bat_output_interface` | four competing senders; packets never interleave |
| `tb_bat_input_interface` | XY request per header; in-order data; buffer-full backpressure; 4-edge header latency |
| `tb_bat_router` | 300 random packets across all ports with random sink stalls (details below) |
| `tb_bat_router_full` | default parameters; five simultaneous 4,096-flit packets (details below) |
| `tb_bat_router_param` | the `tb_bat_router` test with 32-bit flits (16-bit address, 8-bit X and Y) and 2-flit buffers |
| `tb_bat_mesh` | 3×3 mesh with edge and corner routers trimmed by `PORTS_PRESENT`; 270 packets between all local ports, including four-hop paths and X-to-Y turns |

`tb_bat_router` checks each packet's destination, integrity and order. It
also requires these events to have happened at least once: contention, a
full buffer, the phase matcher acting, a zero-size packet, and four
concurrent connections.

`tb_bat_router_full` runs one permutation (L→E, E→W, W→N, N→S, S→L) twice:
once with all-zero payload and once with alternating-inverse payload. It
checks every flit, the 7-edge header latency and the 3-edge flit period.
This is the router's heaviest traffic pattern.

The router also asserts the link rules on each of its ports:

* a new output request only after the previous one was acknowledged;
* output data stable while its request is outstanding;
* an input acknowledge only for a pending request.

Any router-level test fails if a rule is broken. Lower blocks assert their
own rules: one outstanding FIFO read, one outstanding request in the Input
Buffer Control, a one-hot route per header, a one-hot grant, and link
requests only under grant.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bat_pkg.sv \
    tb/tb_bat_router.sv --top-module tb_bat_router -Mdir obj -o sim
./obj/sim
```

Replace `tb_bat_router` with any other testbench name. The `-y rtl` option
finds the submodules.
