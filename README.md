# A 16-port 10GbE switch fabric on a hard network-on-chip

This design is the crossbar of a 16x16 10-Gigabit Ethernet switch on an FPGA.
It does not build a crossbar out of soft logic or block RAM. Instead it sends
the frames through a hardened 8x8 mesh network-on-chip (NoC) that the FPGA is
assumed to have. The NoC has 64 routers and 64-bit links, and it runs at
926 MHz while the FPGA fabric runs at 160 MHz. Each switch port attaches to
one router. A frame from port *s* to port *d* is cut into 64-bit flits. A
header flit that names the destination router goes in front. The mesh
carries the flits, and the frame is put back together at the router of
port *d*.

The FPGA fabric does only three small jobs per port:

* it adds the header when a frame enters;
* it carries the flits to the router with soft wiring, registered where the
  wire is long;
* it buffers the whole frame at the output, because an Ethernet frame must
  leave with no gaps between its words.

Everything else is done by the hard NoC: the switching, the arbitration
between ports, the buffering and the backpressure.

Two free choices decide how well this works:

* **Where the 16 ports attach to the mesh** (the *placement*). The soft
  wiring can reach any router, not only the edge column next to the
  transceivers.
* **How packets are routed.** The options are plain YX dimension-order
  routing, two-phase routing through an intermediate router, or minimal
  adaptive routing.

Both choices are parameters of the top module.

```
 rx[0..15] ──► pkt_ingress ──► soft_link ──► fabric_port ──► ┌──────────────┐
 (160 MHz)     header flit     0/1 register  async FIFO,     │  mesh_noc    │
                + mid router   stage         credits         │  8x8 routers │
 tx[0..15] ◄── pkt_egress  ◄── soft_link ◄── fabric_port ◄── │  926 MHz     │
               store frame,                  async FIFO,     └──────────────┘
               send gap-free                 VC buffers
```

## Placements (`CFG`)

Ports 0-7 come from the transceivers on the west side of the chip, and ports
8-15 from the east side. Port `8+i` is the mirror image of port `i`. The
table uses (row y, column x), with row 0 at the north.

| `CFG` | west ports 0..7 attach to | soft links with a register stage |
|---|---|---|
| `CFG_TWO_SIDED` | column 0, rows 0..7 | none |
| `CFG_FOUR_SIDED` | (0,3) (0,1) (1,0) (3,0) (4,0) (6,0) (7,1) (7,3) | rows 0 and 7 (8 links) |
| `CFG_DIAMOND` (default) | (0,3) (1,2) (2,1) (3,0) (4,0) (5,1) (6,2) (7,3) | rows 0,1,6,7 (8 links) |
| `CFG_DENSE` | 4x4 block in the centre: (2+i/2, 2+i%2) | all 16 |

In the two-sided placement all north–south traffic has to run in the two
edge columns. Under YX routing the worst permutation then loads one link
with four times the port rate, 40 Gb/s. A link carries 64 bit × 926 MHz =
59.3 Gb/s, so even this case is covered. The other placements, and the
custom routing algorithms, bring the worst-case link load down to twice the
port rate.

The diamond placement is the default. It keeps the paths of different
source–destination pairs apart best under permutation traffic. The exact
routers of the dense placement, and which links of each placement get a
register stage, are this design's own reading of the layout. They follow
only the numbers of registered links (8, 8, 16 and 0).

## Routing (`ROUTING`)

Apart from the adaptive option, every packet is routed YX: first along the
column (north/south) to the target row, then along the row. What differs
between these algorithms is the *target*. A two-phase packet first goes to an intermediate router chosen at
the source (phase 0). From there it goes to its destination (phase 1).
The `mid_select` module makes the choice:

* **`RT_YX`**: no intermediate router. The packet goes straight to its
  destination.
* **`RT_COLUMN_SELECT`** (for the two-sided placement): the intermediate
  router is in the source's row. The algorithm picks its column to pull
  traffic out of the two crowded edge columns:
  * For a destination on the same side fewer than 4 rows away, it uses the
    source's own column, which is a plain minimal route.
  * For a destination farther away on the same side, it picks at random
    either the source's column or the next column inward.
  * For a destination on the other side, it picks a random column from 1
    to 6.

  Random numbers come from a 16-bit LFSR in each ingress block. Packets of
  one flow can take different columns, so frames can arrive out of order.
  Nothing in this design puts them back in order.
* **`RT_MIN_ADAPTIVE`** (any placement): there is no intermediate router.
  A header bit instead lets each router choose, hop by hop, between the two
  minimal directions. This option is described below.
* **`RT_SMART_DOR`** (for the four-sided placement): the algorithm takes the
  turning corner of the XY route if that router is not on the mesh edge.
  Failing that, it takes the corner of the YX route if that one is
  interior. Failing both, the packet is plain YX. This steers the turn of
  the route inside the mesh, away from the edge routers where the ports
  sit.

### Deadlock and the two VCs

Plain YX routing cannot deadlock, so a YX packet may use either virtual
channel. Two-phase routing joins two YX routes, and this can build a cycle
of waits. To prevent that, the VC is tied to the phase:

* a two-phase packet travels on VC0 until it reaches its intermediate
  router, and on VC1 after that;
* a packet whose intermediate router is its source starts directly in
  phase 1.

Minimal adaptive packets use the two VCs differently:

* **VC0 is adaptive.** At every hop, a head flit in VC0 may take either
  productive direction. It takes the one whose VC0 is free and has more
  credits. More credits means a shorter queue downstream. On a tie it takes
  the YX direction.
* **VC1 is an escape network** that uses plain YX routing. A packet moves
  to VC1 only when neither of its VC0 choices is free, and once on VC1 it
  stays there.

Because the escape network is deadlock-free and always reachable, the
adaptive VC cannot deadlock either. Frames of one flow may overtake each
other with this option, just as with Column-Select.

`route_compute` works out the following for every head flit:

* the YX output port;
* the second minimal port, used by adaptive packets;
* the new phase;
* a mask of allowed output VCs.

The router rewrites the phase bit in the header flit as the flit leaves.

## The router (`vc_router`)

Each router has five ports (N, E, S, W, local). Each input has 2 VCs ×
10-flit buffers, and flow control uses credits. These sizes are given. The
pipeline is this design's own:

* **Cycle 0:** the flit is written into its input VC buffer.
* **Cycle 1:** the head flit at the front of the buffer does three things
  at once:
  * route computation;
  * a request for an output VC: the lowest free one its mask allows, with a
    round-robin arbiter per output VC;
  * a *speculative* bid for the crossbar.

  The switch allocator is separable and input-first: one round-robin pick
  per input port, then one per output port. Bids from flits that already
  own a VC beat speculative bids at both stages. A speculative grant counts
  only if the VC was won in the same cycle. The winner is registered into
  the output port.
* **Cycle 2:** the flit is on the link, and the next router writes it.

A hop therefore takes **2 cycles** when speculation succeeds, which is
always the case at zero load. It takes **3 cycles** when the head flit has
to win a VC first. Body flits follow one per cycle. An output VC belongs to
one packet until its tail flit leaves. A credit goes back upstream for each
flit that leaves an input buffer.

The router's own coordinates come in on a constant input port, `here`,
rather than as parameters. All 64 mesh positions therefore share one
router design.

At zero load a packet crossing *h* links takes exactly 2(*h*+1) NoC cycles
from injection to ejection.

## Crossing between the fabric and the NoC (`fabric_port`)

Both sides are 64 bits wide, so the crossing needs no width change, only
the clock change. Each direction has a dual-clock FIFO with Gray-coded
pointers and two-flop synchronizers.

* **Towards the NoC:** the FIFO holds 256 flits, which is more than the 191
  flits of a maximum-size frame. A packet is released into the NoC only
  once all its flits are in the FIFO; the header's length field tells how
  many flits that is. The packet then leaves on consecutive 926 MHz cycles.
  A credit counter per VC of the router's local input (starting at 10)
  gates every flit.
* **Out of the NoC:** the fabric port has its own 2 × 10-flit VC buffers.
  To the router's local output it looks like one more downstream router.
  It drains them round-robin into an 8-flit FIFO towards the fabric and
  returns credits.

Releasing whole packets is the subtle part. Without it, a frame would enter
the NoC at the 10 Gb/s port rate, about one flit every six NoC cycles. In
wormhole flow control a packet owns one VC on every link of its path until
its tail passes, so it would hold those VCs for the whole frame time while
using only a sixth of the link bandwidth. Each link has only two VCs, so at
most two frames could share a link. With two-phase routing only one of the
two VCs is open to each phase, which leaves one frame per link. Simulation
of the two-sided placement with Column-Select showed exactly this: it lost
line rate under permutation traffic although its worst link load is only
20 Gb/s. Bursting each packet at the NoC rate frees the VCs about six times
sooner. The cost is one frame's worth of store-and-forward delay at the
input.

## Packet preparation

**`pkt_ingress`** takes 64-bit frame words with valid/ready. The first word
(`sop`) must carry the output port and the frame length in bytes. The
lookup that finds the output port from the Ethernet header is left to
logic upstream.

The block sends a header flit first, then every frame word as a body flit;
the last word is the tail. The header costs one cycle per frame, during
which `rx_ready` is low. All frames are injected on VC0.

Header flit layout (64 bits, LSB first):

| bits | field |
|---|---|
| 2:0 / 5:3 | destination router x / y |
| 8:6 / 11:9 | intermediate router x / y |
| 12 | phase |
| 13 | two_phase (VC class enforced) |
| 17:14 | source port |
| 21:18 | destination port |
| 37:22 | frame length in bytes |
| 38 | adaptive (minimal adaptive routing) |
| 63:39 | reserved, zero |

**`pkt_egress`** is the hardest part of the fabric side. The NoC may hand
over two frames interleaved, one per VC, with gaps in between. The output
must be gap-free. So each VC has:

* a word FIFO of `EG_WORDS` = 256 words. A 1518-byte frame is 190 words.
* a small FIFO of frame descriptors (length and source port), written when
  the tail flit arrives.

A flit is accepted only when its VC has room. Backpressure therefore flows
back through the fabric port's credits into the mesh, and nothing is ever
dropped. The sender takes complete frames from the two VCs in turn and
sends each frame in consecutive cycles. The first word goes out two cycles
after the tail flit arrives. On output, the `port` field of the sop word
carries the source port.

## Soft links (`soft_link`)

The soft link is the programmable wiring between the port logic and the
fabric port. It has one register stage in each direction where the wire
spans 3–4 routers, and none elsewhere. A stage here is a full valid/ready
register slice with a skid register. That costs more flip-flops than the
bare 64-bit data register per direction that such a link would strictly
need, but it keeps the backpressure path registered too.

## Top module and interface (`hns_switch`)

```
hns_switch #(
  cfg_e     CFG      = CFG_DIAMOND,
  routing_e ROUTING  = RT_YX,
  int       EG_WORDS = 256)
```

* `clk_f`, `rst_f_n`: fabric clock (160 MHz) and its synchronous
  active-low reset.
* `clk_n`, `rst_n_n`: NoC clock (926 MHz) and its reset.
* `rx_valid[16]`, `rx_ready[16]`, `rx_word[16]`: the receive streams. Each
  `eth_word_t` has `sop`, `eop`, `len`, `port` and `data[63:0]`; `port` is
  the output port.
* `tx_valid[16]`, `tx_ready[16]`, `tx_word[16]`: the transmit streams. Here
  `port` is the source port, and the words of a frame come on consecutive
  cycles whenever `tx_ready` is high.

The transceivers (serial links, clock recovery and 64-bit word framing) are
outside the design.

All shared types and sizes are in `rtl/hns_pkg.sv`: mesh size, link width,
VC count and depth, and the placement functions.

## Measured behaviour

These figures come from the testbenches, with default parameters, a
160 MHz fabric clock and a 926 MHz NoC clock:

* **Router latency:** 2 cycles per hop at zero load, checked exactly over
  random router pairs.
* **Zero-load latency:** a 64-byte frame from port 0 to port 15 takes
  168 ns from its first word in to its first word out. This includes both
  clock crossings and the store-and-forward at both ends (the frame is
  held whole at the input fabric port and at the egress).
* **Permutation traffic:** every port sends to port `p^4` at full line
  rate, with frame sizes 64–1504 B drawn from a bell-shaped mix with a mean
  near 580 B. The input is stalled only for the one header cycle per frame,
  so line rate is sustained. This holds for all four placement/routing
  pairs tested: diamond with YX, two-sided with Column-Select, four-sided
  with Smart DOR, and dense with minimal adaptive.
* **Uniform random traffic:** several sources compete for one output, with
  random output backpressure. Every frame arrives once, intact and
  gap-free. With YX and Smart DOR, frames also arrive in order per
  source/destination pair. With Column-Select and adaptive routing, one or
  two frames in about 220 were overtaken.

## Where it departs from the original proposal, and what is missing

* The router's allocators and exact pipeline are this design's own. Only
  the outline is given: 5 ports, 2 VCs of 10 flits, credits, 3 stages or 2
  with speculation.
* The soft-link register stages are register slices with a skid register,
  not plain registers.
* The fabric port holds each packet until it is complete and then bursts
  it into the NoC. Only the rate up-conversion itself is given; this
  buffering is what makes that up-conversion real at a 64-bit fabric-side
  width.
* The dense placement's router-to-port map, and which links are registered
  in each placement, are assumptions.
* The frame length must be known with the first word. All frames enter the
  NoC on VC0.
* Minimal adaptive routing measures queue length as the credit count of
  the downstream VC0. The rule for when to fall back to the escape VC is
  also this design's own.
* **Not built:**
  * the transceivers;
  * header lookup (the output port is an input);
  * the 128-bit NoC and 40GbE channel-bonding extensions, which are only
    proposed for scaling;
  * the DDR overflow buffering;
  * frame re-ordering for Column-Select and adaptive routing.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl rtl/hns_pkg.sv tb/tb_hns_switch.sv --top-module tb_hns_switch -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_route_compute` | YX ports, second minimal port, phase change and VC mask along random paths |
| `tb_mid_select` | intermediate-router rules of all three algorithms, two routing examples of the four-sided layout |
| `tb_inject_map` | port positions of all placements, number of registered links |
| `tb_vc_router` | routing, VC classes, 2-cycle hop, 3 cycles when blocked, credit stall after 10 flits, adaptive port choice |
| `tb_mesh_noc` | zero-load latency 2(h+1), loaded mesh with plain, two-phase and adaptive packets, no deadlock |
| `tb_fabric_port` | clock crossing both ways, whole-packet release and burst at the NoC rate, credit limit, ordering |
| `tb_pkt_ingress` | header contents, one stall per frame, two placement/routing pairs |
| `tb_pkt_egress` | gap-free output from interleaved VCs with backpressure |
| `tb_soft_link` | one register stage of latency, full throughput, backpressure |
| `tb_hns_switch` | the whole switch end to end, as above |
| `tb_hns_two_sided_cs`, `tb_hns_four_sided_sdor`, `tb_hns_dense_adaptive` | the same end-to-end test on the other placement/routing pairs; reordered frames are counted where the routing allows them |

`tb_hns_switch` runs the top at its defaults. It takes about three minutes
to compile and a few seconds to run. To try another placement or
algorithm, give the top a parameter list, for example
`hns_switch #(.CFG(CFG_TWO_SIDED), .ROUTING(RT_COLUMN_SELECT))`. The three
extra end-to-end testbenches do exactly this.
