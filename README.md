# LCIA: a low-cost all-to-all interconnect for layered spiking neural network hardware

Spiking neural network (SNN) hardware is usually split into tiles. Each tile
computes a group of neurons from one layer, and the tiles exchange spike
events as small packets. Mesh networks-on-chip are the usual way to link
tiles. A mesh suits layered networks poorly: every neuron of one layer talks
to every neuron of the next, so spikes pass through intermediate hops, and
the fabric grows with the network.

This design links consecutive layers directly instead:

* One router sits next to each neuron tile (an "ENA" tile).
* The router of tile *j* in layer *l*−1 broadcasts every spike its tile
  emits to input channel *j* of **every** router in layer *l*.
* A router with *N* predecessors has *N* small input FIFOs. One arbiter
  picks which buffered spike goes into the local tile in each cycle.

The router is cheap because its only shared resource is a single output
towards its tile. Its performance therefore rests on the arbiter. The
arbiter must be fast when only a few channels are active (bursty or sparse
spiking), and fair when all channels are active (regular spiking).

```
 layer l-1                               layer l
 tile 0 -> router 0 --broadcast--+--> ch 0 of router 0 .. router N-1 -> tile
 tile 1 -> router 1 --broadcast--+--> ch 1 of router 0 .. router N-1 -> tile
  ...                                   ...
```

## The scheduler (`rtl/scheduler.sv`)

This is the least obvious part of the design, and it sets the router's
throughput. It combines a fixed-priority search with a rotating starting
point. A one-cycle "shield" stops any port from keeping the output.

Parts, for *N* requesters:

* **Ring counter** (`ring_counter.sv`). A one-hot register, `0…01` after
  reset. It rotates one place towards the MSB on every clock, whether or not
  there are requests.
* **Shield**. A flip-flop holds the previous cycle's grant. The requests that
  take part in arbitration are `and_y = req & ~grant_q`. A port granted in
  cycle *t* is therefore invisible in cycle *t*+1.
* **N priority blocks** (`priority_logic.sv`). Each is a fixed-priority
  one-hot encoder with an enable, where `in[0]` wins. Block *k* is wired to
  the rotated requests: its `in[i]` is `and_y[(k+i) mod N]`. Only the block
  whose ring-counter bit is set produces a grant.
* **N OR gates**. These un-rotate the block outputs back into `grant`.

The net effect in cycle *t*, with the ring counter at position *k*: grant the
first port at or after *k*, wrapping around, that requests and was not
granted in cycle *t*−1. Two consequences follow:

* **Idle ports cost nothing.** When at least two ports request, some port is
  granted every cycle. A plain round-robin arbiter would spend a cycle on
  each idle port.
* **A lone requester gets half the bandwidth.** When a single port requests
  continuously, it is granted every second cycle, because the shield blanks
  it in between.

`grant` is combinational from `req` in the same cycle, so the path from
request to grant is the critical path. Example for *N* = 4 with all four
ports requesting, starting from ring position `0010`:

| ring `rc_o` | `and_y` | `grant` |
|-------------|---------|---------|
| 0010 | 1111 | 0010 |
| 0100 | 1101 | 0100 |
| 1000 | 1011 | 1000 |
| 0001 | 0111 | 0001 |

If the requests then drop to `0111`, the grants are `0010`, `0100`, `0001`:
idle port 3 is skipped, and port 0 is not granted twice in a row.

The service order is not a strict rotation over the active ports. With
ports 1, 3 and 4 of six requesting, the order is 1, 3, 4, 1, 3, 1, 3, 4, …
and not 1, 3, 4 repeated. The ring counter runs freely, so the starting
point drifts against the set of active ports. No port waits more than about
*N* cycles.

## Router datapath (`rtl/lcia_router.sv`)

A packet follows this path through the router:

1. **Input FIFOs** (`spike_fifo.sv`). There is one per channel, five packets
   deep and 36 bits wide. Each is first-word-fall-through: the oldest packet
   is always visible at the output. Each FIFO sends `full` back to the
   sender, which waits while it is high. Each sends `data_present` to the
   scheduler as its request.
2. **Request gating.** When the output stage towards the tile cannot take a
   packet, the scheduler sees no requests at all. Nothing is read that could
   not be delivered.
3. **Input controller** (`input_controller.sv`). It is combinational. The
   grant becomes the FIFO read enables, which pop the FIFO at the next edge.
   In the same cycle the input controller selects the granted FIFO's head
   packet. It also gives the granted channel's number (`position_o`).
4. **Output controller** (`output_controller.sv`). It has two independent
   one-packet register stages:
   * **Towards the tile** (`spikes_to_ena`, `ena_wr_o`). A packet is written
     only while the tile's `ena_full_i` is low. Otherwise it is held.
   * **From the tile to all next-layer routers** (`spikes_out`,
     `next_wr_o`). A packet is written only while `next_full_i` is low.
     `ena_full_o` tells the tile to wait.

Timing:

* A packet written into a channel FIFO at clock edge *t* can be granted in
  the following cycle.
* It appears on `spikes_to_ena` with `ena_wr_o` one cycle after its grant,
  which is two cycles after the write.
* A router delivers one packet per cycle while two or more channels hold
  data.

**Multicast.** Broadcast is the normal mode, and the router does not
interpret packets in that mode. With `cfg_mask_en` high, a router stores an
arriving packet only if the packet's top 16 bits share a set bit with the
router's `cfg_mask`. Other packets are dropped at the FIFO input. This
design chose the position and width of the mask field. Time stamps, if an
application needs them, travel inside the packet and are not touched.

## The network (`rtl/lcia_top.sv`)

`lcia_top` builds `LAYERS × NODES` routers. Router *j* of layer *l*−1 drives
channel *j* of every router in layer *l*.

**Flow control.** A broadcast write happens only when none of the receiving
FIFOs is full, so every receiver gets every packet. For each channel, the
full flag seen by the sender is the OR of that channel's full flags over the
whole receiving layer.

**Top-level ports:**

* **First layer.** Its channels come from the `ext_*` ports: source *j*
  broadcasts to channel *j* of every first-layer router.
* **Last layer.** Its routers send their tiles' spikes to the `out_*` ports.
* **Tiles.** The neuron tiles are not part of this RTL. Each router's tile
  signals are ports indexed `[layer][node]`:
  * `ena_rx_*`: router to tile.
  * `ena_tx_*`: tile to router.
* **Observation.** `grant[layer][node]` shows each router's arbitration.

Default parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `LAYERS`  | 2  | layers of routers |
| `NODES`   | 16 | routers per layer = input channels per router |
| `W`       | 36 | packet width |
| `DEPTH`   | 5  | packets per input FIFO |
| `MASK_W` (package) | 16 | multicast mask field, top bits of the packet |

The defaults make a 16 × 2 array, the size used for throughput evaluation.
Setting `NODES = 5` gives the five-port router used for area figures.
Setting `NODES = 6` gives the 6 × 2 demonstration array. The buffer depth of
five trades throughput against area and power. Each extra packet of depth
costs roughly a sixth more router area, and FIFOs dominate the router's area
and power.

All resets are synchronous and active high. `lcia_pkg.sv` holds the shared
constants, the packet type and the mask-match function.

## Throughput measured in simulation

`tb/tb_lcia_top.sv` runs the default 16 × 2 network. First-layer tiles
inject spikes at a spike injection rate (SIR). An SIR of 1/32 means one
packet every 32 cycles per generator. Second-layer tiles count what they
receive. The aggregate rate assumes 16 receiving routers, 36 bits and
100 MHz.

| enabled generators | SIR 1/32: packets/cycle per router | Gbit/s | SIR 1/2: packets/cycle per router | Gbit/s |
|----|-------|------|-----|------|
| 16 | 0.50  | 28.9 | 1.0 | 57.6 |
| 8  | 0.25  | 14.4 | 1.0 | 57.6 |
| 2  | 0.063 | 3.6  | 1.0 | 57.6 |
| 1  | 0.031 | 1.8  | 0.5 | 28.8 |

The results follow three rules:

* At low load, the router passes everything that is offered.
* With two or more active channels, it runs at one packet per cycle.
* A single active channel is limited to half rate by the shield.

The published evaluation reports the same SIR 1/32 curve, and about 57
Gbit/s for 16 generators at SIR 1/2. For fewer generators at SIR 1/2 it
reports lower values than this table. Those values depend on the behaviour
of its spike generators, which is not specified, so they are not reproduced
here.

## Where this RTL departs from, or adds to, the published description

Behaviour this RTL defines itself:

* **Packet format.** None is specified. Packets are opaque apart from the
  multicast mask field, whose position is this design's choice.
* **FIFO organisation, back-pressure and output stages.** The
  first-word-fall-through FIFO, the gating of requests while the tile is
  full, and the single register per direction in the output controller
  are the simplest logic that gives the behaviour described. The one-cycle
  grant-to-output latency matches the published router waveform.
* **Broadcast flow control.** A sender waits for all receivers, using the
  OR of their full flags. The description only says that traffic status is
  passed back.

Differences from the published examples, and parts not built:

* **Grant order.** The published six-channel waveform shows grants strictly
  rotating 1, 3, 4, 1, 3, 4, …. The scheduler logic as described (free-running
  ring counter, rotated priority blocks, one-cycle shield) cannot produce
  that order from any starting phase. This RTL implements the logic, so the
  order differs as explained above. Nine packets on three channels take nine
  or ten cycles instead of nine.
* **Hierarchy.** A hierarchical arrangement for very large networks (a
  whole LCIA acting as one node of a higher-level LCIA) is mentioned in the
  description but not built.
* **Neuron tiles and test instruments.** The neuron tiles, the spike
  generators and the spike counters are outside the RTL. The testbenches
  model their behaviour at the ports.

## Files and simulation

`rtl/` contains one module or package per file:

* `lcia_pkg`
* `ring_counter`
* `priority_logic`
* `scheduler`
* `spike_fifo`
* `input_controller`
* `output_controller`
* `lcia_router`
* `lcia_top`

`tb/` contains one self-checking testbench per block. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* **Unit testbenches.** `tb_ring_counter`, `tb_priority_logic`,
  `tb_scheduler` (the printed sequences, a reference model and fairness),
  `tb_spike_fifo`, `tb_input_controller` and `tb_output_controller`.
* **`tb_lcia_router`.** Six channels: three simultaneous arrivals, rate
  with one and two active channels, random traffic with back-pressure, and
  multicast.
* **`tb_lcia_top`.** The default 16 × 2 network: the throughput sweep
  above, random traffic on every path, and multicast. It also counts every
  mechanism: broadcast, idle-port skip, shield, full FIFO, tile stall,
  next-layer stall, output stall, multicast drop and mode switch.
* **`tb_lcia_fig10`.** The 6 × 2 demonstration: three tiles emit together
  and every receiving tile gets all nine packets.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lcia_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/lcia_pkg.sv tb/tb_lcia_top.sv -o sim
./obj_dir/sim
```

Replace `tb_lcia_top` with any other testbench name. `tb_lcia_top` takes
about 15 s to build and 2 s to run.

Assertions in `scheduler` check that the grant is one-hot, that it is one of
the shielded requests, and that it is never idle while a shielded request
is pending. Assertions in `output_controller` check that no packet is
offered when the stage is not ready, and that the tile never writes while
told to wait.
