# Dual-rail packet-switched torus network, 4 x 4

This is a network-on-chip that connects sixteen processors with no shared clock
between them. The sixteen routers sit on a 4 x 4 grid whose rows and columns
close into rings, forming a torus. Every link works in both directions. Each
router talks to its four neighbours and its own processor only through
four-phase handshakes on dual-rail wires. A receiver can tell from the data
wires alone that a word is complete, so no clock or matched delay is needed
on a link.

Packets are self-contained: a 32-bit payload plus a head holding the
destination and two travel directions. The first router works out the
directions once, and every router after that follows them. So a packet's
whole route is fixed when it enters the network.

## Wires and packets

Each logical bit travels on two wires `{t, f}`:

| t f | meaning  |
|-----|----------|
| 0 0 | EMPTY    |
| 0 1 | valid 0  |
| 1 0 | valid 1  |
| 1 1 | not used |

Bit *i* of a word sits on wires `[2i+1:2i]`, true rail on the odd wire. A
transfer goes as follows:

1. The sender drives a complete valid word.
2. The receiver sees every pair valid and raises `ack`.
3. The sender returns all wires to EMPTY.
4. The receiver sees all pairs EMPTY and drops `ack`.

There are two packet formats (wire numbers):

| format             | wires | layout |
|--------------------|-------|--------|
| processor → router | 72    | `[71:68]` X, `[67:64]` Y, `[63:0]` payload |
| router → router    | 76    | `[75:74]` X direction, `[73:70]` X, `[69:68]` Y direction, `[67:64]` Y, `[63:0]` payload |

A direction pair of `01` means right (X) or up (Y); `10` means left or down.
A router's location is a plain 4-bit `{X, Y}`. Router (x, y) has index
`4*y + x`: X grows to the right and Y grows upwards. `torus_pkg` has encode
and decode helpers (`mk_ppkt`, `dr_enc_data`, `dr_dec_data`).

## Routing

The routing rule is the core of the design, and it has three parts.

1. **Head building.** This happens at the source router, for packets coming
   from the processor. For each dimension, take d = destination − location,
   a value from −3 to 3. If d is 1, 2 or −3, the direction is `01`
   (right/up). If d is 0, −1, −2 or 3, it is `10` (left/down). This takes the
   short way round each ring. At distance 2 both ways are equally long: X
   goes right if d = +2 and left if d = −2, and Y does the same.
2. **Arrival.** This happens at every router a packet enters. If both
   coordinates equal the location, the packet goes to the processor.
   Otherwise it goes into the FIFO.
3. **Port choice.** While X differs from the location, the packet moves in
   its X direction: port `00` is right, `01` is left. Once X matches, it
   moves in its Y direction: `10` is up, `11` is down.

Each packet has one fixed path, and packets between the same two routers
take the same path. So they arrive in the order they were sent; the tests
check this. The longest path is 4 hops.

## Router structure

```
 neighbours (4) ──> Arbitrator_One ──> FIFO (5 stages) ──> Arbitrator_Two ──> neighbours (4)
                         │                                      ^
                         v                                      │
                     processor                      processor ──┘ (through head_builder)
```

* **`arbitrator_one`** — the receiving side:
  * A completion detector on each of the four inputs spots a complete packet.
  * A round-robin scanner (`rr_scanner`) picks one input.
  * The packet is copied into a register and the sender is acknowledged.
  * `compare_1` sends the packet to the processor or to the FIFO. The
    acknowledges of those two are ORed together.
* **`dr_fifo`** — a Muller pipeline of five stages (`fifo_register`). Each
  wire of a stage is a C-element fed by the previous stage's wire and the
  next stage's inverted acknowledge. A stage's acknowledge is the completion
  of its own outputs. Packets must be separated by EMPTY spacers, so five
  stages hold at most three packets. The FIFO lets the receiving side keep
  accepting while the sending side is busy.
* **`arbitrator_two`** — the sending side:
  * Its two inputs are the FIFO output and the processor's packets, which
    pass through `head_builder` first.
  * A two-way round-robin scanner picks between them, so neither starves the
    other.
  * `compare_2` picks the port, and the packet is offered there until that
    neighbour acknowledges.
* **`c_element`** and **`completion_detect`** are the basic asynchronous
  primitives. The completion detector works like a C-element with many
  inputs: an AND tree ("all pairs valid") and an OR tree ("any pair valid")
  drive one two-input C-element.

## How the self-timed circuit is modelled

The target circuit is self-timed: C-elements are gates with feedback, and
there is no clock. This RTL keeps that circuit's structure and handshakes
but models every state-holding element as a flip-flop on one `clk`. A clock
period stands for one gate delay. Each link and FIFO stage still uses
completion detection and the four-phase protocol, and none of the logic
depends on how long the delays are. So the model shows the same behaviour
as the self-timed circuit, just quantised into clock steps.

The arbitrators' multiplexers, registers and demultiplexers are written as
small clocked controllers, because their gate-level circuits were not
available. Each controller runs its two jobs side by side:

* releasing the sender: acknowledge, wait for EMPTY, drop the acknowledge;
* delivering the packet: drive it, wait for the acknowledge, return to
  EMPTY, wait for the acknowledge to fall.

It scans for the next packet once both are done.

`rst_n` is an asynchronous, active-low reset of every state element.
`location` must be held constant.

## Timing of the model

Latency, measured in an idle network on packets sent from router (0,3), is
about 8 to 12 clocks per hop. The exact figure depends on where each round-robin
scanner happens to be pointing. Sample results, in clocks:

```
            x=0  x=1  x=2  x=3
   y=3        0    7   16    8
   y=2        8   17   25   17
   y=1       20   29   37   29
   y=0        6   17   29   17
```

These numbers are clock steps of the model, not picoseconds. Delays in a real
self-timed implementation depend on the cell library.

Most of a router's area is in its FIFO: 76 C-elements per stage, five stages.
In generic-gate synthesis a router has about 2900 cells: 2500 in the FIFO,
260 in Arbitrator_One and 200 in Arbitrator_Two. The whole torus has about
47 000 cells and 8900 state bits.

## Deadlock under heavy load

Every router has one input register, one FIFO and one output register,
shared by all four directions. This allows a closed chain of waits:

1. Router A's Arbitrator_Two offers a packet to B.
2. B's Arbitrator_One cannot take it, because B's FIFO is full.
3. B's FIFO only drains through B's Arbitrator_Two.
4. B's Arbitrator_Two is offering a packet to A, whose FIFO is also full.

Nothing in the structure prevents this, whatever the gate delays are.
`tb_torus_full_load` shows it. With every processor sending back-to-back to
random routers, the network stops after a few dozen packets. The test then
finds chains such as 9 → 10 → 9 or 5 → 9 → 10 → 6 → 5. A cycle forms only
when the FIFO of every router in it is full (three packets). So lighter
traffic, or traffic whose routes cannot close a ring, runs to completion.
The end-to-end test only uses such traffic.

Packet switching with dimension-ordered routes is not enough on its own to
rule this out. If the network must survive saturation, it needs something
extra, such as separate buffers per direction or virtual channels, or a
bound on the packets each processor may have in flight. None of these is
built here.

## Where this design departs from or interprets its source description

* The clocked model of the self-timed circuit (see above).
* Arbitrator_One uses round robin. One passage in the source description
  instead gives a fixed priority order: up, down, left, right.
* Routing goes X first, then Y, following the routing algorithm and its path
  figures. One printed decision table reads as Y first.
* When X is 2 hops away in either direction, the source's own example path
  goes right, while the rule it states (d = −2 → left) goes left. The rule
  is implemented. Both paths are 2 hops.
* A processor sending to its own router is not handled specially. The packet
  goes out and circles one Y ring back to its source.
* The gate-level internals of the multi-input C-element, the FIFO register
  and the arbitrators' muxes are this design's own (see above).
* The uni-directional torus that served as a comparison baseline is not
  included.

## Files

| file | contents |
|------|----------|
| `rtl/torus_pkg.sv` | widths, packet types, port numbers, dual-rail helpers, direction rule |
| `rtl/c_element.sv` | C-element with reset |
| `rtl/completion_detect.sv` | completion detector of a dual-rail word |
| `rtl/fifo_register.sv`, `rtl/dr_fifo.sv` | Muller pipeline stage, 5-stage FIFO |
| `rtl/head_builder.sv`, `rtl/compare_1.sv`, `rtl/compare_2.sv` | routing logic |
| `rtl/rr_scanner.sv` | round-robin scanner |
| `rtl/arbitrator_one.sv`, `rtl/arbitrator_two.sv` | receiving and sending sides |
| `rtl/router.sv` | one node |
| `rtl/torus_top.sv` | the 4 x 4 torus; processor channels as ports, indexed 4*y+x |

Parameters: `FIFO_STAGES` (default 5) on `router` and `torus_top`, and
`STAGES` on `dr_fifo`. The grid size and the packet layout are fixed by the
2-bit coordinates in the head.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. They
simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_torus_top \
    -y rtl -y tb +libext+.sv rtl/torus_pkg.sv tb/tb_torus_top.sv
./obj_dir/Vtb_torus_top
```

* `tb_torus_top` runs the whole network at its default size in three parts:
  1. the latency table above;
  2. random traffic with one packet in flight per processor;
  3. a burst from every processor into one slowly-accepting router.

  It traces every packet's path against the routing rule and checks payload,
  delivery point and order. It also counts head builds, deliveries, FIFO
  forwarding, wrap-around transfers, contention in both arbitrators and FIFO
  back-pressure, and fails if any of them never happened.
* `tb_torus_full_load` runs the saturation experiment described above.
* `tb_router`, `tb_arbitrator_one`, `tb_arbitrator_two` and `tb_dr_fifo`
  check the blocks with random traffic and random receiver delays. They cover
  round-robin fairness, FIFO capacity (three packets) and FIFO latency (one
  clock per stage).
* `tb_head_builder`, `tb_compare_1`, `tb_compare_2` and `tb_c_element` check
  every input combination against tables written independently in the
  testbench.

Every state element is reset, so results do not depend on the values signals
start with.
