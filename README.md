# QoS-capable mesh NoC for a message-passing MPSoC

Several applications sharing one network-on-chip (NoC) disturb each
other: a best-effort flow that happens to share a link with a video
pipeline can halve the pipeline's throughput. This RTL implements a
NoC whose quality-of-service (QoS) mechanisms can be driven from
software, packet by packet. The goal is to keep a real-time application
*composable*: it should behave the same whatever else runs beside it. It
provides two mechanisms:

* **Soft QoS with two fixed priorities.** Every router direction has two
  physical channels instead of one. Channel 0 carries only high-priority
  packets. Channel 1 carries both classes. A high-priority packet
  therefore always has a path that low-priority traffic cannot block. Two
  high-priority flows can also travel side by side in the same direction.
* **Hard QoS through circuit switching.** A source opens a connection
  with a *connection establishment* packet. That packet reserves channel
  0 hop by hop as it travels to the target. Later packets, marked GT
  (guaranteed throughput), follow the reserved path without any
  arbitration. A *release* packet frees the path. Circuits exist only on
  channel 0, so channel 1 is always left for packet switching.

Software chooses the mechanism for each packet through the header it
writes. It uses the priority bit, or the GT/connection service codes.

The fabric is a 4×4 mesh of wormhole routers (16-bit flits) with one
network interface (NI) per processing node. The processors, their
memories and peripherals, and the micro-kernel are not included. The NI
exposes the interface they would use.

## Packet format

| bits  | field   | meaning |
|-------|---------|---------|
| 15:12 | service | `0` packet switched, `1` connection establishment, `2` connection release, `3` GT data |
| 11:9  | unused  | written as 0 |
| 8     | P       | priority: `0` high, `1` low |
| 7:0   | target  | node address, X in [7:4], Y in [3:0] |

The header is followed by any number of payload flits. A side-band `eop`
bit marks the last flit of a packet. A packet with no payload carries
`eop` on its header. Types and codes are in `rtl/qos_pkg.sv`.

The field layout and the priority encoding are the published format of
this NoC. The numeric service codes and the X/Y split of the address are
this implementation's choices.

## Links and flow control

Each physical channel is a `link_t` (`tx`, 16-bit data, `eop`) in the
forward direction and a single `credit` bit backwards. A flit moves in
every cycle in which `tx` and `credit` are both high. A router input
raises `credit` while its buffer has room. That depends only on
registered state, so there is no combinational path from `tx` to
`credit` between routers.

Ports are numbered `2*direction + channel`, with directions North,
South, East, West, Local = 0..4. North is +Y. This gives the ten ports
of the 10×10 crossbar.

## The router (`qos_router`)

The router contains:

* ten input FIFOs (`qos_input_buffer`, depth 8, first-word fall-through);
* one switch control shared by all ports (`qos_switch_control`);
* a 10×10 crossbar (`qos_crossbar`).

**Routing.** The routing is Hamiltonian-path routing
(`ham_routing`). Nodes are labelled along a snake through the rows: in
even rows the label grows with X, in odd rows it falls:
`label = y*NX + (y even ? x : NX-1-x)`.

* If the target's label is higher than the current node's, the packet
  moves to the neighbour with the largest label that does not pass the
  target.
* If the target's label is lower, the packet moves to the neighbour
  with the smallest label that does not pass the target.

Labels change monotonically along every route. The "up" and "down"
networks are therefore acyclic, and wormhole routing cannot deadlock.
Routes are not always minimal. For example, (0,3)→(3,1) goes
S, S, E, E, E.

**Channel allocation.** In every cycle the switch control evaluates the
header at the head of every idle input. A request is *feasible* if a
suitable output channel is free:

| packet | output channel |
|--------|----------------|
| low priority (P=1) | channel 1 only |
| high priority (P=0) | channel 0 if free, otherwise channel 1 |
| connection establishment | channel 0 only |

At most one feasible request is granted per cycle. High-priority
requests (and establishment packets) always win over low-priority ones.
Within each class there is a separate round-robin pointer. With a
single shared pointer, the frequent high-priority grants kept resetting
the rotation, and some low-priority inputs starved completely.

A granted input owns its output until the flit with `eop` leaves, which
is ordinary wormhole switching.

**Circuits.** When the `eop` of an establishment packet leaves, the
input/output pair is *not* freed. The input is marked as holding a
circuit (`conn_o`). From then on, every flit on that input is forwarded
straight to the reserved channel-0 output. GT headers are not routed:
their target field is only read by the destination. The switch control
still tracks packet boundaries on the circuit. When a packet whose first
flit has the *release* service has fully passed, the pair is freed.

Because circuits hold only channel-0 outputs, a high-priority packet
that meets a circuit moves to channel 1. A low-priority packet is never
affected by a circuit, because it only uses channel 1 anyway. Each
channel-0 output carries at most one circuit.

**Timing.** A header written into an input buffer at clock edge *t* is
granted at edge *t+1* if its output is free. It is written into the next
buffer at edge *t+2*. An uncontended hop therefore costs two cycles, and
payload flits follow one per cycle. Through an idle mesh, a packet
crossing four routers reaches the target's Local port 8 cycles after
injection. The testbenches check both figures.

## The network interface (`qos_ni`)

**Sending.** The processor side writes a descriptor: service, priority,
8-bit target, and payload length in flits (`LEN_W` = 8 bits). It then
streams the payload. The NI builds the header and sets `eop` on the last
flit. It picks the Local channel itself:

* establishment, release and GT packets use channel 0;
* high-priority packets use channel 0 unless this NI has a connection
  open, and channel 1 otherwise;
* low-priority packets use channel 1.

`conn_open_o` is set once an establishment packet has been sent and
cleared once a release has been sent. Only one connection per node is
intended. The NI does not refuse a second establishment packet: making a
second task wait is left to software, which reads `conn_open_o`. A
second establishment packet sent anyway would travel down the existing
circuit as ordinary data, and an assertion in `qos_ni` reports it. Large
messages are expected to be cut into packets by software. The NI handles
one packet per descriptor.

**Receiving.** The two Local output channels are merged into one stream
(`rx_*`), one whole packet at a time:

* channel 0 goes first when packets start on both channels in the same
  cycle;
* `rx_first_o` flags the header flit;
* `rx_ch_o` tells which channel the packet arrived on.

## Top level (`hs_scale_qos_mpsoc`)

The top level has two parts:

* `hermes_qos_noc`: the NX×NY mesh. Edge ports are tied off.
* One `qos_ni` per node.

Processor-side ports are arrays indexed by node number `n = y*NX + x`.
The node address is `{x, y}`. For observation, the top also brings out:

* per-router circuit status (`conn_o[n][port]`);
* grant strobes (`grant_o`, `grant_high_o`).

Default parameters: `NX = NY = 4`, `BUF_DEPTH = 8`, `LEN_W = 8`.

## Files

| file | contents |
|------|----------|
| `rtl/qos_pkg.sv` | flit, header, link types; service codes; port numbering |
| `rtl/qos_input_buffer.sv` | input FIFO with credit |
| `rtl/ham_routing.sv` | Hamiltonian routing decision |
| `rtl/qos_switch_control.sv` | channel allocation, priorities, circuits, arbitration |
| `rtl/qos_crossbar.sv` | 10×10 crossbar |
| `rtl/qos_router.sv` | router |
| `rtl/qos_ni.sv` | network interface |
| `rtl/hermes_qos_noc.sv` | mesh |
| `rtl/hs_scale_qos_mpsoc.sv` | top: mesh plus NIs |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/qos_pkg.sv tb/tb_hs_scale_qos_mpsoc.sv --top-module tb_hs_scale_qos_mpsoc
./obj_dir/Vtb_hs_scale_qos_mpsoc
```

Replace the testbench name to run another one. All of them finish in a
few seconds.

What the testbenches cover:

* `tb_qos_input_buffer`, `tb_qos_crossbar`: random traffic compared
  with a reference model.
* `tb_ham_routing`: compares every (node, target) pair with a
  brute-force reference, and walks every route to its end.
* `tb_qos_switch_control`: directed scenarios:
  * low priority kept off channel 0;
  * high priority spilling onto channel 1;
  * high priority winning arbitration;
  * a circuit's whole life: establishment, GT packet, release;
  * local delivery.
* `tb_qos_router`: random traffic from eight inputs with random
  back-pressure. It checks route, channel class, packet integrity and
  the two-cycle hop latency.
* `tb_hermes_qos_noc`: the whole mesh. It covers the 8-cycle four-router
  latency, a circuit across the mesh, and about 800 random packets from
  all nodes.
* `tb_hs_scale_qos_mpsoc`: the top at its default size. It replays a
  use case of an audio/video decoder disturbed by four best-effort
  applications, described below.

### The audio/video use case

The decoder has seven tasks:

* video pipeline: SPLIT → MJ1 → MJ2 → MJ3 → JOIN;
* audio pipeline: SPLIT → AD → FIR → JOIN.

Four disturbing flows (T1, T2 → MEM and T3, T4 → OUT) run beside it,
placed so that they share links with the decoder.

The processors are replaced by traffic sources:

* SPLIT emits a 16-flit video packet every 60 cycles and an 8-flit
  audio packet every 120 cycles;
* each pipeline stage forwards one packet per packet it receives;
* the disturbers send 32-flit packets back to back.

The test runs six priority assignments:

| | low priority | high priority | GT |
|---|---|---|---|
| S1 | T1–T4 | audio, video | – |
| S2 | T1–T3 | audio, video, T4 | – |
| S3 | T1, T2 | audio, video, T3, T4 | – |
| S4 | T2 | audio, video, T1, T3, T4 | – |
| S5 | – | all | – |
| S6 | – | audio, T1–T4 | video |

Before the six scenarios, a reference run places the decoder alone in a
compact layout (the two pipelines side by side in columns 0 and 1), with
no disturbing traffic. Results for a 6000-cycle window, in which SPLIT
emits 100 video packets. "Interval" is the time between video packets
arriving at JOIN, as mean ± standard deviation; its spread is the jitter.

| run | video packets at JOIN | interval at JOIN (cycles) | mean MJ1→MJ2 latency (cycles) |
|-----|----|----|----|
| reference | 100 | 60.0 ± 3.3 | 19 |
| S1 | 100 | 60.1 ± 8.1 | 27 |
| S2 | 99 | 60.1 ± 17.3 | 46 |
| S3 | 45 | 133.5 ± 15.0 | 283 |
| S4 | 60 | 99.5 ± 12.9 | 215 |
| S5 | 51 | 117.4 ± 18.9 | 250 |
| S6 | 100 | 60.0 ± 4.1 | 21 |

With the decoder alone in high priority (S1), or with the video on
circuits (S6), the video keeps the reference rate, and its jitter stays
close to the reference. As more disturbers are promoted to high
priority, the rate drops and the latency grows roughly tenfold. The
exact numbers depend on the synthetic load and are not a prediction for
real software.

In S6 the audio flows share the high-priority class with four saturating
high-priority disturbers, and they lose about half their rate. The
testbench reports this but does not check it.

The testbench checks:

* each delivered packet and its payload;
* the rates in S1 and S6;
* that S5 is worse than S1 (fewer packets, longer latency);
* that S5 has more jitter than S1 and S6;
* that each mechanism occurred at least once: high-priority grants,
  spills onto channel 1, low-priority traffic, circuits opened and
  released, GT packets, and back-pressure at an NI.

## Limits and departures

* **Not included:** the processors (a 3-stage MIPS-I core), their local
  RAM, UART, timer and interrupt controller, and the multitasking
  micro-kernel with its software FIFOs and messaging API. The NI's
  descriptor interface stands in for the processor's bus interface,
  which is not specified here.
* **One connection per router.** The intended system allows one
  connection per router. Here the router does not enforce it: any
  channel-0 output can carry one circuit, so a router can carry several
  circuits that pass through it. The one-per-node rule is kept by the NI
  (`conn_open_o`) and software. Circuits whose channel-0 paths overlap
  simply wait for each other. An establishment packet waits in a buffer
  until the channel-0 output it needs is released.
* **Choices with no stated value in the design description:**
  * buffer depth (8);
  * the credit flow control;
  * the service codes;
  * the address split;
  * the snake labelling of the Hamiltonian path;
  * the one-grant-per-cycle arbiter and its per-class round robin;
  * the NI interface and its channel policy.

  All are parameters or are isolated in one module.
* **Not reproduced:** FPGA area figures and application-level rates
  (frames per second), because they depend on the processors and the
  software.
