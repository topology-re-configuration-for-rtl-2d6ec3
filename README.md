# Reconfigurable network-on-chip with back-tracking path set-up

A system-on-chip that runs several applications at different times sees a
different traffic pattern for each one, and a network-on-chip tuned for one
application is a poor fit for the next. This design keeps a regular 2-D grid
of routers but never wires two routers together directly. Every link between
routers passes through small **configuration switches**: boxes of four 3:1
multiplexers. Setting those multiplexers rewires the grid. It can be a plain
mesh, or it can have long direct links between distant routers, trees or any
other topology an application wants. A configuration is stored for each
application, and the whole network changes topology when the application
changes.

Traffic is **circuit-switched**. A source first sends a *probe* towards the
destination. The probe reserves links hop by hop. When it reaches the
destination an ACK travels back, and only then does data flow over the
reserved path. A probe that meets a busy or broken link does not wait. It
**back-tracks**: it releases that link and tries a pre-configured
alternative. When a node has no alternative left, it sends a NACK one hop
further back. Because nothing ever waits on a held resource, paths cannot
deadlock. The source retries after a back-off.

## Grid layout

For M x N nodes the grid has (2M-1) x (2N-1) positions. Node (r, c) sits at
position (2r, 2c). Every other position holds a configuration switch, and
every position is linked to its four neighbours:

```
 R - s - R - s - R - s - R        R  node (router + wrapper + IP core)
 |   |   |   |   |   |   |        s  configuration switch
 s - s - s - s - s - s - s
 |   |   |   |   |   |   |
 R - s - R - s - R - s - R
 ...
```

Two neighbouring routers are joined through the switch between them, so one
conventional channel becomes two channel segments. A chain of switches forms
a long link. For 4 x 4 nodes the grid has 84 links and 33 switches.

Positions are numbered `y*(2N-1)+x`, and node (r, c) is number `r*N+c`,
counted from 0.

## Links and handshake

Each link is made of two independent one-way sub-links. A sub-link carries:

* `fwd_t` (sender to receiver): `req`, `vld`, `data[63:0]`.
* `bwd_t` (receiver to sender): `ack`, `nack`.

The protocol on a sub-link:

1. **Probe.** The sender raises `req` with the destination number in
   `data[7:0]`.
2. **ACK or NACK.** Each hop forwards the probe or refuses it. The
   destination wrapper answers `ack`, which every hop holds while `req` stays
   high. A refusal is a `nack`, held until `req` falls.
3. **Data.** After `ack` the source sends one word per clock with `vld`.
4. **Tear-down.** The source drops `req`. Each hop releases its output as it
   sees `req` fall. `tx_done` at the source means the path is released there.
   The last words may still be in flight; `rx_done` marks their arrival at
   the destination.

A hop may reuse an output only after the hop behind that output has
withdrawn its `ack`/`nack`. Without that rule, a new path could follow an old
one so closely that the downstream hop never sees `req` fall.

## Configuration switch (`cfg_switch`)

Each switch has four ports: N=0, E=1, S=2, W=3. Each output is a multiplexer
controlled by a 2-bit field of an 8-bit word: bits `[2o+1:2o]` name the input
port that feeds output `o`. A field that names the output's own port switches
the output off, since a connection never loops back into the port it came
from.

The switch stores two words for every application:

* **primary**: the normal topology;
* **alternate**: a detour.

A probe arriving on input `i` takes the output that the primary word gives
`i`. If that output is damaged (`fault`), already owned, or answers NACK, the
switch drops the probe there and reconnects `i` to its alternate output. If
that fails as well, the switch answers NACK. An input with only an alternate
output, such as a switch that lies only on a detour, uses the alternate.

Data and ACK pass through the switch without a register. Taking a connection
costs one clock.

This has a consequence for the assembled network: every ring of switches is
a structural combinational loop, and linters report it (`UNOPTFLAT` in
Verilator). A correct configuration never closes such a ring, and every
unused output is off, so the loops are never active.

## Router (`bt_router`)

The router has five ports: N, E, S, W towards the switches, and L towards
the node's wrapper. A per-application table gives a primary and an alternate
output port for every destination, as 3-bit codes (`7` means none). A probe
for the router's own node goes to L.

Each input runs a small state machine: IDLE → TRY → WAIT → CONN, plus NACK.

* **TRY** takes the first candidate that is free. Free means not owned, not
  the input port itself, and with no ACK/NACK still pending from downstream.
* **WAIT** lasts until the path behind answers.
  * On ACK the input moves to CONN.
  * On NACK the input releases the output and tries the alternate. With no
    candidate left it moves to NACK, which sends the probe back upstream.
* **Arbitration:** when several inputs want the same output in the same
  clock, the lowest-numbered input wins. The others see the output as busy.

Forward signals are registered once per router. ACK and NACK leave from
state registers.

Timing:

* A probe crosses a router in two clocks.
* Data crosses a router in one clock and flows at one word per clock.

## Wrapper (`ni_wrapper`) and configuration manager (`cfg_manager`)

**Wrapper, sending side.** The core starts a transfer with
`tx_start`/`tx_dest`/`tx_len`. The wrapper then sends the probe. On NACK it
waits `BACKOFF` clocks (default 4) and probes again, pulsing `ev_retry`. On
ACK it streams the words, taking each from `tx_data` and pulsing `tx_pop`.

**Wrapper, receiving side.** An incoming probe gets ACK when `rx_ready` is
high and NACK otherwise. Words then appear on `rx_vld`/`rx_data`.

The wrapper carries assertions for the handshake seen from the node: ACK
and NACK are never raised together, ACK stays up while the source sends,
and words arrive only on an acknowledged path.

**Configuration manager.** It registers the host's configuration bus and
owns `app_sel`. On `app_req` it raises `hold`, which stops wrappers from
starting new probes. It changes application after the network has held no
path for two clocks in a row. `switch_cycles` reports how long the change
took.

## Configuration bus (`noc_top`)

Words are addressed by grid position (`cfg_pos`) and application (`cfg_app`):

* **Switch:** `cfg_data = {alternate[7:0], primary[7:0]}`.
* **Router:** `cfg_idx` = destination, and `cfg_data[5:0]` = `{alternate,
  primary}` port codes (N=0, E=1, S=2, W=3, L=4, none=7).

After reset every switch output is off and every table entry is empty.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M`, `N` | 4, 4 | nodes per column and row |
| `NAPP` | 2 | stored applications |
| `BACKOFF` | 4 | clocks before a refused source retries |
| `noc_pkg::DW_DEF` | 64 | link data width |
| `noc_pkg::NODE_W` | 8 | destination field of a probe |

`cfg_pos` is 8 bits wide, so the grid must have at most 256 positions
(M = N = 8).

## Where this departs from the source description, and what is assumed

* **Grid layout.** The routers-between-switches layout is inferred from a
  description in which routers are joined only through switch boxes, and
  from an example that numbers 84 nets on a 4 x 4 network. Its example path
  (core 14 to core 3, counted from 1) maps onto this grid exactly. It is
  reproduced in the test with nodes 13 and 2.
* **Switch detour logic.** The configuration switch is described as having no
  controller logic. It is also said to hold the pre-configured alternate
  route that handles a blockage, and that needs some state. This design
  gives each switch input a three-state machine and each output an
  ownership register.
* **Router internals.** These are this design's own: table routing with two
  candidates, fixed-priority arbitration and one register per hop. Only the
  router's behaviour was given: probing, back-tracking, ACK and five ports.
* **Handshake signals.** The ACK/NACK handshake signals, the wrapper's core
  interface, the back-off, the drain-before-switch rule and the bus format
  are this design's choices.
* **Damaged links.** Damaged links are marked by the `fault` input. How they
  are detected is outside this design.
* **Single clock.** Everything runs on one clock. Source-synchronous transfer
  is modelled as one word per clock.
* **Long links are not pipelined.** A long link is one combinational path
  through all its switches, so its length limits the clock rate. Pipelined
  long links would need registers in the switches, which are kept as plain
  multiplexers here.
* **Tree embedding.** The binary tree in `tb_tree4x4` uses only
  mesh-neighbour links. That embedding is this design's choice.
* **Not built.** The benchmark applications' own topologies (VOPD, MWD) are
  not built as configurations; their traffic runs on the mesh. The
  processing elements are outside the design: their ports are the
  `tx_*`/`rx_*` arrays of `noc_top`. Power and area figures are not
  reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

* `tb_cfg_switch`: multiplexer words, pass-through without a register, the
  detour taken on NACK and on a damaged link, NACK back-tracking, and the
  application select.
* `tb_bt_router`: probe latency, ACK/data forwarding, taking the alternate
  when the primary is busy or answers NACK, back-tracking, local delivery,
  and the second application's table.
* `tb_ni_wrapper`: probe, back-off and retry, word order and count, `hold`,
  and the receiving side's ACK/NACK.
* `tb_cfg_manager`: hold, the wait for a drained network, and the switch
  duration.
* `tb_noc_top`: the whole 4 x 4, 64-bit network at its defaults. It has two
  applications:
  * a mesh with XY routing;
  * the mesh plus a long link from node 13 to node 2, with the switch detour
    of the example.

  The test checks every delivered word. It makes routers back-track, a
  source retry, a switch take its detour (once for a damaged link, once on
  NACK) and send NACK, and the application switch wait for a running
  transfer. It also checks that the long link sets up faster than the mesh
  path: 16 clocks against 22.

* `tb_mesh5x5`: a 5 x 5 network (`M = N = 5`) configured as a mesh. All 25
  nodes send 12 words at once, each to its transposed node.
* `tb_tree4x4`: the default network holding two topologies. Application 0
  is the mesh; application 1 is a binary tree rooted at node 5, built from
  mesh-neighbour links. The test switches between the two and runs all 16
  nodes at once on each. The transfer 1 → 3 sets up in 15 clocks on the
  mesh and 31 on the tree.

* `tb_vopd_mwd`: two multimedia workloads run one after the other, with an
  application switch between them. Both are approximations of the published
  task graphs: a video object plane decoder and a multi-window display,
  12 cores and 14 flows each. The flows run on the mesh, and every word is
  checked.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_noc_top.sv \
          --top-module tb_noc_top -Wno-fatal && ./obj_dir/Vtb_noc_top
```
