# AIOS: a congestion-aware mesh router with adaptive input and output selection

This is a wormhole-switched network-on-chip router for a 2-D mesh of tiles. It
tries to keep traffic away from hot spots in two ways:

* **Output selection.** Each router has several allowed directions toward a
  destination. It prefers the minimal directions. When the neighbours in those
  directions report congestion, it takes a permitted non-minimal detour.
  Routing follows the Hamiltonian-path based *Enhanced HAMUM* rules. These rules
  handle unicast and path-based multicast with the same hardware and are free
  of deadlock.
* **Input selection.** Each output port has a weighted round-robin (WRR)
  arbiter. An input behind a congested upstream router gets a larger weight, so
  it can send up to four packets in one turn. Every other input still gets its
  turn, so no input starves.

The RTL is SystemVerilog-2017 and synthesizable. `aios_noc` is the top level:
an 8 x 8 mesh with 32-bit flits and 8-flit input buffers. The congestion
threshold is 6 flits (75 %).

## Node labels and the two subnetworks

Tile (x, y) is in column x and row y. Row 0 is the southern row. Nodes are
numbered along a snake-shaped Hamiltonian path:

    label(x, y) = y*COLS + x            (even rows, path runs east)
    label(x, y) = y*COLS + COLS-1-x     (odd rows, path runs west)

A packet whose destination has a higher label than the current node travels in
the **high-channel subnetwork**. There it may only move to neighbours with a
higher label: north, east in even rows, west in odd rows. A packet whose
destination has a lower label uses the **low-channel subnetwork**: south, west
in even rows, east in odd rows. Each unidirectional physical link belongs to
exactly one subnetwork. Labels only ever grow (or only ever shrink) along a
path, so no channel dependency cycle can form. This needs no virtual channels.

## The routing function (`ehamum_route`)

For the current node C and destination D the function returns up to three
candidates: `min1`, `min2` (minimal) and `nonmin`.

| case | min1 | min2 | nonmin |
|---|---|---|---|
| same row | E / W / Local | – | – |
| high, even row, D east of C | E | N if D is more than one row up | – |
| high, even row, D west or same column | N | – | E |
| high, odd row, D west of C | W | N if more than one row up | – |
| high, odd row, D east or same column | N | – | W |
| low, even row, D west of C | W | S if more than one row down | – |
| low, even row, D east or same column | S | – | W |
| low, odd row, D east of C | E | S if more than one row down | – |
| low, odd row, D west or same column | S | – | E |

When D is exactly one row away, only the horizontal move is offered. This keeps
the packet on the Hamiltonian path, because after the vertical step it could no
longer turn the right way. This design drops a non-minimal candidate that would
leave the mesh at the east or west edge.

`routing_unit` then picks the first candidate whose neighbour has *not* raised
its congestion flag, in the order min1, min2, nonmin. If all are congested it
picks min1. Output ports use 3-bit codes: S = 000, N = 001, W = 010, E = 011,
Local = 100.

## Congestion sensing

* **Congestion flag (CF), per input buffer** (`congestion_detector`). The
  buffer is *warning full* when it holds at least `THRESH` flits. CF is raised
  when the buffer is warning full **and** its fill level rose since the
  previous clock edge. A full buffer that is draining does not repel traffic.
  Each CF goes to the upstream neighbour, whose routing unit reads it.
* **Congestion level (CL), per router** (`cars`). CL is the sum of the four
  neighbour-facing CFs, from 0 to 4, in 3 bits. It is sent to all four
  neighbours. There it becomes the WRR weight of the input port that faces
  this router.

## Weighted round-robin arbitration (`wrr_arbiter`)

The core is a round-robin arbiter. A programmable priority encoder grants the
first request at or after the pointer `P_enc`. Each input also has a 3-bit
down-counter:

1. When input *i* wins and its counter is zero, the counter loads *i*'s weight
   (CL). A weight of 0 counts as 1.
2. Each granted packet decrements the counter.
3. While packets remain, the pointer stays on *i*, so *i* keeps the highest
   priority. When the counter reaches zero, the pointer moves to *i*+1.
4. The counters of inputs that were not granted are cleared.

An input with CL = c therefore sends max(c, 1) packets in a row. With four
competing neighbour inputs, an input waits at most 16 packet times. One
arbitration decides one packet. The output then stays with the winner until
its tail flit has passed.

## Multicast

A message lists its destinations in the order it visits them, one destination
address per header flit. The source is expected to split a destination set
into at most four such ordered lists: higher or lower labels, times the two
column groups. The split is outside this RTL.

When a multicast header reaches a router that is its first destination, there
are two cases:

* **More destinations follow.** The input channel requests the local delivery
  port and the output toward the next destination at the same time. Each flit
  then moves to both ports in the same cycle. The first header flit is
  rewritten with the next destination, and the second header flit is dropped.
  The next router therefore sees its own target first.
* **This was the last destination.** Only the local delivery port is
  requested.

Each node has **two delivery ports**: port 0 for packets that arrived in the
high subnetwork, port 1 for the low subnetwork. Sharing one consumption
channel between the two subnetworks can deadlock. Two multicast messages,
each holding one node's delivery channel, would wait for each other.

## Flit format (32 bits)

| bits | first header flit | further header flit | payload flit |
|---|---|---|---|
| 31 | EoM | EoM (0) | EoM (1 on tail) |
| 30 | BoM = 1 | 0 | 0 |
| 29 | EoH = 0 | 0 | EoH = 1 |
| 28 | T (0 unicast, 1 multicast) | – | data[28:0] |
| 27:22 | SA (source y,x) | – | |
| 21:14 | MID (message id) | – | |
| 5:0 | DA (destination y,x) | DA | |

SA and MID let the destination put packets back in order: adaptive routing can
deliver messages from the same source out of order. That reordering is done by
the receiving core, not by this RTL. Helper functions `make_head`, `make_dest`
and `make_data` in `aios_pkg` build flits.

## Router structure and timing

`aios_router` contains five `input_channel`s (N, E, S, W, Local), each built
from `input_fifo`, `congestion_detector` and `routing_unit`. It also has a
`switch_allocator` with six `wrr_arbiter`s (one per output), a `crossbar` and
`cars`.

* Links use valid/ready handshaking. `in_ready` means "buffer not full" and
  depends only on registers. `out_valid` is raised only in the cycle a flit
  actually moves, because a multicast flit must leave on two ports together.
  A receiver must therefore not make `ready` depend on `valid`.
* A header written into an idle router at clock edge *t* is decoded and
  granted in the next cycle. Its first flit leaves in the cycle after that.
  That makes **two cycles per hop**, and after it one flit per cycle.
* The request is raised in the same cycle the header is decoded. An input that
  has just finished a packet therefore competes in the very next arbitration,
  which lets a weighted input keep its turn. An output sits idle for one cycle
  between packets.
* The reset `rst_n` is asynchronous and active low. It empties the buffers and
  clears all arbiters.

## Mesh top (`aios_noc`)

Parameters: `COLS = 8`, `ROWS = 8`, `DEPTH = 8`, `THRESH = 6`. Node k = y*COLS
+ x indexes the per-tile arrays:

* `inj_valid/inj_flit/inj_ready[k]`: injection from tile k.
* `ej_valid/ej_flit/ej_ready[k][p]`: delivery port p (0 high, 1 low).
* `cl[k]`: congestion level.
* `lcf[k]`: congestion flag of the local input buffer, so the tile can hold
  back new traffic.
* `ev_*[k]`: one-cycle event strobes for monitoring. They mark a decision for
  the second minimal path, the non-minimal path, a multicast copy, and a grant
  that kept its weighted turn.

At the mesh edge the missing neighbour never sends and is never ready. Its
congestion flag reads as raised. `COORD_W = 3` in `aios_pkg` limits each side
to 8 tiles. Widen it (together with the header field positions) for larger
meshes. Non-square meshes such as 6 x 5 are supported.

## Where this design makes its own choices

* Buffer depth is 8 flits with a threshold of 6. A 10-flit variant is
  `DEPTH = 10`, `THRESH = 8`. The warning-full test is `count >= THRESH`.
* Header packing: one destination per header flit, and the SA/MID/DA widths.
* The multicast copy-and-strip mechanism at intermediate destinations.
* The second local delivery port (code 101).
* WRR details: a weight of 0 is served as 1; the pointer stays on the winner
  while its count is non-zero; the counters of non-granted inputs are cleared;
  the local input is weighted by the router's own CL.
* Non-minimal candidates are suppressed at the mesh edge. The routing decision
  is latched once per packet.
* There is no processing element or network interface. The split of multicast
  destination sets, packet generation and reordering belong to the tiles.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_ehamum_route` | all 64 x 64 node pairs against a reference model built from the label-monotone path rules (`tb_route_model.svh`) |
| `tb_routing_unit` | all pairs x all 16 congestion patterns against the selection rule |
| `tb_congestion_detector`, `tb_cars`, `tb_input_fifo`, `tb_crossbar` | unit behaviour against simple models |
| `tb_wrr_arbiter` | exact grant sequence for fixed weights, random traffic against a model, 16-grant starvation bound |
| `tb_switch_allocator` | single ownership, no mid-packet loss, every request served |
| `tb_input_channel` | route choice (minimal, second minimal, non-minimal), multicast copy and header rewrite, CF behaviour with a blocked output |
| `tb_aios_router` | 2-cycle hop latency, WRR packet order with upstream CLs 2/0/1/3, multicast copy to delivery and west ports, CL rising from a filling buffer |
| `tb_aios_noc` | full 8 x 8 mesh at default parameters (see below) |
| `tb_noc_workloads` | a 6 x 5 mesh with a hotspot at (3, 2) and multicasts to up to 20 destinations, same scoreboard |

`tb_aios_noc` runs uniform traffic: 80 % unicast and 20 % multicast to about
10 destinations, with packets of 5 to 25 flits. It then runs a hotspot phase
toward node (4, 4), whose consumer accepts only every fourth cycle. A
scoreboard checks that every copy arrives exactly once, at a listed
destination, on the right delivery port, with an intact payload. The test also
counts each mechanism: CL >= 2, second-minimal and non-minimal choices,
multicast copies, weighted grants, back-pressure, and both delivery ports. If
any of them never occurs, the test fails. It finishes in about one second of
simulation time.

To run a test with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/aios_pkg.sv \
        tb/tb_aios_noc.sv --top-module tb_aios_noc
    ./obj_dir/Vtb_aios_noc

Not covered: the VOPD application traffic, because its per-flow bandwidths are
not reproduced here; latency and saturation curves; and power or area
estimates.
