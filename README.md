# CTorus: a concentrated-torus network-on-chip with channel buffers and a split crossbar

Router buffers and crossbars use a large share of a network-on-chip's power and area. This
design moves most of the buffering out of the router and into the wires, and replaces the
router's one large crossbar with four small ones:

* **Channel buffers.** A link between two routers is a chain of repeater stages. Each
  stage is a three-state repeater. While released it drives like a normal repeater. When
  held it is tri-stated and keeps the flit it has. When the downstream router's input
  register is full, flits stop in the link one stage after another. The link itself is the
  buffer.
* **Dual channels (dc).** Each direction between two routers has two such links, VC0 and
  VC1. Each link ends in its own one-flit input register. A packet blocked on one link
  therefore does not block the other (no head-of-line blocking). The network gets the
  capacity of a doubled network without doubling the routers.
* **Multi-crossbar (mx).** The router switch is split into four 3x3 crossbars, one per
  quadrant of travel: NE (+x,+y), NW (-x,+y), SE (+x,-y) and SW (-x,-y). A packet travels
  inside one quadrant from source to destination, on a minimal path. Where the rules allow
  both VCs of a direction, it takes whichever is free.
* **Concentrated torus.** Four cores share each router. Routers form a K x K torus with
  wrap-around links in both dimensions. The default is 4 x 4 routers for 64 cores, with a
  diameter of 4 hops.

All of this is synthesizable SystemVerilog in `rtl/`, with a self-checking testbench for
every module in `tb/`.

## Numbers at a glance

| Item | Value | Parameter |
|---|---|---|
| Routers / cores | 4 x 4 / 64 | `K = 4` (top), `CONC = 4` (package) |
| Flit | 128 data bits + head/tail marks | `FLIT_W = 128` |
| Packet | 4 flits (512 bits) | `PKT_FLITS = 4` |
| Links per direction | 2 (VC0, VC1) | `NVC = 2` |
| Repeater stages per link | 11 (a design choice) | `STAGES = 11` |
| Buffering per link | 11 stages + 1 input register = 12 flits (3 packets) | |
| Router pipeline | RC+VA, SA, ST, LT: 4 cycles per hop for a head flit | |
| Crossbars per router | four 3x3 (quadrants) + two 4x4 (cores) | |
| Longest minimal path | 4 hops | |

## Topology and addressing

Router (x, y) is number `y*K + x`. Core `c` (0..3) of that router is core `(y*K + x)*4 + c`
of `ctorus_top`. The link of direction +x leaving (x, y) enters ((x+1) mod K, y). The same
holds for -x, +y and -y. A link's `full` and `room` signals run back against it and its `vc_en`
announcement runs along it.

Within a router a link is numbered `dir*2 + vc`, with directions XP=0, XN=1, YP=2, YN=3.
The VC of a link fixes which quadrant crossbar it feeds at the downstream router:

| Link | VC0 enters | VC1 enters |
|---|---|---|
| +x | NE | SE |
| -x | NW | SW |
| +y | NE | NW |
| -y | SE | SW |

Every quadrant crossbar has three inputs and three outputs:

* inputs: one x-travelling link, one y-travelling link, and its injection input;
* outputs: its x direction, its y direction, and ejection.

Each output direction is driven by two crossbars. For example, +x is driven by NE and SE.
A DEMUX puts each crossbar's flit onto link VC0 or VC1 according to the flit's VC.

A packet is one head flit, body flits and one tail flit. The head flit carries its
destination in its low data bits:

| Bits | Field |
|---|---|
| `data[3:0]` | destination x |
| `data[7:4]` | destination y |
| `data[9:8]` | destination core |

All other bits are payload.

## Channel buffers (`tsr_link`, `cb_ctrl`)

This is the least conventional part of the design. Stage 0 of a link is the stage next to
the downstream input register.

* **Free link.** A flit put on the link in its link-traversal cycle reaches the input
  register at the end of that cycle.
* **Register full.** The arriving flit stops in stage 0. The next one stops in stage 1, and
  so on: an arriving flit always stops just above the highest held stage.
* **Release.** The router sets bits of `rel_stage` to release stages. Here it sets all of
  them whenever its input register can take a flit. A released stage passes its flit one
  stage forward if the place in front is free or is being freed. The flit in stage 0 enters
  the register. Flits never overtake each other.
* **Stage state.** Each stage has a two-state machine, PASS and HOLD. Its output is the
  stage's single control line, so one control block per link drives every stage. In
  silicon the held value lives in the tri-stated repeaters. In this RTL each stage is a
  flit-wide register that is loaded when a flit stops there.

**Full and vc_en.** The upstream router must not send into a link that has no room left.
It decides in its switch-allocation (SA) cycle, two cycles before the flit is on the link,
so some flits are already in flight when `full` rises. Two signals handle this:

* In the SA cycle the upstream switching control raises `vc_en` for the chosen link.
* The control block counts the occupied input register, the held stages and the flits
  announced but not yet arrived.
* `full` is registered. It is high when that count reaches `STAGES + 1`.
* The upstream SA does not grant a flit towards a full link.

As a result a flit that has been granted always finds a stage. An assertion in `cb_ctrl`
checks this. With the register emptied every cycle, a link carries one flit per cycle and
nothing is held.

**Room flags.** From the same count the control block also sends upstream two registered
flags, `room[0]` and `room[1]`. They say whether one or two whole packets would still fit in
the channel. The upstream router uses them to allocate the link (see the next section).
Because a packet is only allocated a link it fits into, `full` never stops a packet halfway
onto a link. `full` remains as the flit-level safety net.

```
cycle        t        t+1      t+2
upstream     SA       ST       LT ---> flit on the link, into the register (or a stage)
vc_en        1
pending      +1 ......................  -1 when the flit arrives
```

## Routing, the VC rule and deadlock freedom (`route_unit`, `input_port`)

At injection a packet is given the quadrant that points the minimal way round each ring.
A tie of K/2 hops goes the positive way. If a dimension needs no move, the core's own
quadrant bit decides: core c owns quadrant c, with NE=0, NW=1, SE=2, SW=3. A packet to
another core of the same router therefore stays in its core's crossbar and is ejected
straight away.

In its quadrant crossbar a head flit is offered at most two resources:

* **At the destination router:** the destination core's ejection port.
* **Hops left in both x and y:** the x link. Its VC is fixed, because the packet must
  arrive in the same quadrant crossbar: the x link uses the quadrant's yneg bit as VC.
  Routing goes x first, then y; the reason is below.
* **Hops left in one dimension only:** both VCs of that direction, since either downstream
  quadrant can finish the route. On the last hop only VC0 is offered.

The input port requests whichever offered resource is free. If both are free it picks one
at random, using a 16-bit LFSR per router. If neither is free it waits. Each hop therefore
brings the packet one hop closer along the torus (checked exhaustively by `tb_route_unit`).

**Why x before y, and what "free" means.** The natural reading of the mx scheme lets a packet
with hops left in both dimensions take the x or the y move, whichever VC is free, and
relies on the two VCs to avoid deadlock. On a torus that is not enough. The wrap-around links
close every ring. Under uniform traffic at 0.3 flits/cycle/core, a first version of this RTL
locked up: packets on x links waited to turn into full y channels, whose packets waited to
turn into full x channels. This design therefore adds three rules:

1. **Whole-packet allocation (virtual cut-through).** A link VC is granted only when its
   channel has room for the whole packet (`room[0]`). A blocked packet then sits inside one
   channel and holds nothing else.
2. **Bubble on entry.** Each (direction, VC) pair forms a ring of channels, a *link class*.
   A packet continuing on its input's link class needs room for one packet. Entering a class
   needs room for two (`room[1]`). A packet enters a class when it comes from a core, turns
   from the other dimension, or switches VC. So no ring can ever be filled completely, and
   some packet in it can always move. A switch from VC0 to VC1 within a direction is never
   offered, so classes are entered in a fixed order.
3. **Dimension order.** x is routed before y. y channels never wait for x channels, so the
   rings depend on each other without a cycle. The adaptive choice between the two VCs of a
   direction is kept.

Together these follow the standard bubble argument for tori. After the change no lock-up
occurred in any test, including all nine synthetic patterns driven far past saturation.
Rule 2 is the reason for eleven stages: with three packets of space per channel, a packet
can enter while another is still in the channel.

## Router pipeline (`ctorus_router`)

| Cycle | Stage | What happens |
|---|---|---|
| 0 | RC+VA | A head flit in an input register computes its candidates. `va_alloc` grants a free output link (not held, and with room as above) or ejection port. The packet keeps it until its tail flit leaves. |
| 1 | SA | Per quadrant crossbar, one round-robin winner per output (`sa_alloc`), only towards links that are not full. The winner leaves its register into the ST register, and `vc_en` is raised to the downstream control block. |
| 2 | ST | The flit crosses the 3x3 quadrant crossbar into an output register. |
| 3 | LT | The flit goes through the direction's DEMUX onto the link and reaches the next router's input register (or a repeater stage) at the end of the cycle. |

Body and tail flits skip RC+VA and follow at one flit per cycle. The input register takes a
new flit in the cycle the old one leaves.

* **Latency.** On an empty network a head flit that a core hands over in cycle t reaches
  the destination core in cycle `t + 4*hops + 4`. The extra four cycles are the RC+VA, SA
  and ST stages at the destination router and the ejection crossbar.
* **Injection.** Cores inject through `core_inject`, a 4x4 crossbar. A quadrant's injection
  input belongs to one core from the head flit to the tail flit, chosen by round robin.
* **Ejection.** A 4x4 crossbar connects the four quadrants' ejection outputs to the cores.
  The ejection port is allocated per packet like a link, so packets never mix at a core.
  Cores always accept.

## Files

| File | What it is |
|---|---|
| `rtl/ctorus_pkg.sv` | Sizes, flit type, direction/quadrant encodings, routing helpers, router event flags |
| `rtl/ctorus_top.sv` | K x K torus of routers (the top) |
| `rtl/ctorus_router.sv` | One router: links, input ports, allocators, crossbars, DEMUXes |
| `rtl/tsr_link.sv` | Link of three-state repeater stages with its control block |
| `rtl/cb_ctrl.sv` | Control block: per-stage hold/pass, release, full and room flags |
| `rtl/input_port.sv` | Input register, RC+VA packet state and the allocation (room) rule |
| `rtl/route_unit.sv` | Route computation and VC rule |
| `rtl/va_alloc.sv` | VC allocator (links and ejection ports) |
| `rtl/sa_alloc.sv` | Switch allocator of one 3x3 crossbar |
| `rtl/xbar.sv` | Generic N x M crossbar (3x3 quadrant and 4x4 core crossbars) |
| `rtl/dc_demux.sv` | Output DEMUX and `vc_en` generation of one direction |
| `rtl/core_inject.sv` | Injection 4x4 crossbar with per-packet arbitration |
| `rtl/rr_arbiter.sv` | Round-robin arbiter |

Each file opens with a description of its interface and timing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example,
the whole network at full size:

```
verilator --binary --timing --assert -Irtl rtl/ctorus_pkg.sv tb/tb_ctorus_top.sv \
    -y rtl --top-module tb_ctorus_top -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_<module>.sv` and its top module name. The files are plain
IEEE 1800-2017, and the package must be read first.

## What the testbenches establish

* `tb_ctorus_top` runs the full 64-core network with default parameters and checks every
  bit of every flit at its destination core. It runs four phases:
  * single packets, checking the exact latency above for 0 to 4 hops, including a
    wrap-around hop;
  * uniform random traffic;
  * complement traffic at a high rate;
  * a hotspot.

  It counts each mechanism and fails if one never happens: held repeater stages, full
  links, random and forced adaptive choices, VC1 use, VA and SA conflicts, injection
  waits, wrap-around traffic and ejection. It takes well under a second.
* `tb_ctorus_traffic` runs nine synthetic patterns open-loop on the full network:
  * uniform and non-uniform random;
  * bit reversal and butterfly;
  * complement and transpose;
  * perfect shuffle;
  * neighbor and tornado.

  Each runs at 0.1, 0.3 and 0.5 offered flits/cycle/core. The bench checks every flit and
  that every packet is delivered after the sources stop. It also prints accepted throughput
  and average latency. Measured accepted throughput at 0.5 offered load, in
  flits/cycle/core:

  | Pattern | Accepted |
  |---|---|
  | uniform | 0.22 |
  | non-uniform | 0.26 |
  | bit reversal | 0.27 |
  | butterfly | 0.11 |
  | complement | 0.19 |
  | transpose | 0.19 |
  | shuffle | 0.25 |
  | neighbor | 0.20 |
  | tornado | 0.19 |

  At 0.1 every pattern is carried in full. Butterfly is low because only 32 of the 64 cores
  send in this pattern on 64 cores. The bench takes under a minute.
* `tb_ctorus_router` drives one router from all eight links and four cores with a model of
  its downstream neighbours. It checks:
  * the 4-cycle hop latency and the `vc_en`-to-flit timing;
  * that no link overflows and no packet is ever cut by `full`;
  * that x is routed before y;
  * that every packet leaves whole on a legal link.
* The block testbenches check each module against an independent model. Examples: the
  exact hold pattern and `full` of `cb_ctrl`; in-order, lossless delivery and 1 flit/cycle
  of `tsr_link`; an exhaustive walk of every source, destination and starting quadrant
  through `route_unit`.

## Choices this design makes where the source description is silent

These are the points to review before relying on the RTL:

* **Repeater stages.** There are 11 per link, and a held stage is modelled as a register.
* **Flit format.** The head and tail marks ride beside the 128 data bits. The destination
  field layout is as given above.
* **Link-to-quadrant mapping.** Only +x is described (VC0 into NE, VC1 into SE); the other
  directions follow by symmetry.
* **VC rule.** The rule is "either VC when more than one hop away, VC0 on the last hop".
  This design combines it with the quadrant constraint: while hops remain in the other
  dimension, the VC is whatever keeps the packet in its quadrant.
* **Allocation.** VCs and ejection ports are held per packet, from head to tail. Links are
  allocated only with room for the whole packet, and for two when entering a link class.
* **Routing order.** Routing is x before y instead of an adaptive choice of dimension. This
  is the main departure, made for deadlock freedom (see above).
* **Timing of `vc_en` and `full`.** `vc_en` is raised in the SA cycle. `full` counts
  announced flits and is registered.
* **Arbitration.** All arbiters are round robin. The random choice between two free routes
  uses an LFSR.
* **Injection quadrant.** Any core can reach any quadrant through the 4x4 crossbar. The
  core's own quadrant is used only for a dimension that needs no move.
* **Ejection.** Cores always accept flits. There is no ejection back-pressure.
* **Reset.** Reset is synchronous and active low.

## Not included

* **Cores, caches and memory controllers.** The cores, their private L1/L2 caches and the
  16 memory controllers are outside the network. Each core position is a plain flit port.
* **Repeater circuit.** The transistor-level three-state repeater is represented only by
  its logic function.
* **Adaptive choice of dimension.** The adaptive choice between x and y at each hop is not
  built, for the deadlock reason above. Only the adaptive choice between the two VCs of a
  direction is. The deadlock-freedom argument above is the standard bubble argument; it is
  not formally verified for this RTL.
* **Classes of service.** The two VCs of a direction could carry different classes of
  traffic. Here both carry all packets alike.
* **Look-ahead routing.** Route computation is done in the router, in the RC+VA cycle.
* **Power and area.** The power, timing and area results depend on a standard-cell library
  and link models, not on this RTL.
