# TESH network router with adaptive routing

A TESH (Tori-connected mESH) network joins processing elements with a
two-level idea: nodes sit in small 2D meshes, and the meshes are joined by
a few long links arranged as tori, level over level. Only a handful of
links leave each mesh. That matters when each mesh (or each Level-2 block
of meshes) is a separate die in a 3D stack, because links between dies
(through-silicon vias) are expensive in area.

This repository holds synthesizable SystemVerilog for the whole network:
a wormhole router with four virtual channels per link, and the wiring that
builds a TESH(2,L,0) network out of it. The router implements four routing
algorithms, selectable at run time:

* dimension-order routing (DOR),
* channel select (CS): freer use of the two virtual-channel classes,
* link select (LS): a choice of ring direction when both are equally short,
* dynamic dimension reversal (DDR): adaptive virtual channels on which a
  packet may take higher-level links out of dimension order, with
  deterministic escape channels to stay deadlock-free.

CS, LS and DDR can be combined freely.

## Topology

A basic module (BM) is a 4x4 2D mesh (no wraparound). Sixteen BMs, placed
on a 4x4 2D torus, form a Level-2 network of 256 nodes; sixteen Level-2
networks on a 4x4 torus form a Level-3 network of 4096 nodes, and so on up
to Level 5. A node address is 2L base-4 digits:

```
n = (n[2L-1] n[2L-2]) ... (n3 n2) (n1 n0)
      level-L torus        level 2  position in the BM: (y, x)
```

Odd digits are vertical torus positions, even digits horizontal ones. Two
nodes in different BMs are linked when their addresses differ by +-1
(mod 4) in exactly one digit of index 2 or more.

**Inter-BM links.** A 4x4 mesh has 16 contour ports without a mesh
neighbour. With inter-level connectivity q = 0 each level uses four of them,
one per dimension and direction. This design places them as follows:

| level l link           | leaves from node (y, x) | port | arrives at (y, x) | port |
|------------------------|-------------------------|------|-------------------|------|
| vertical, plus         | (3, l-2)                | N    | (0, l-2)          | S    |
| vertical, minus        | (0, l-2)                | S    | (3, l-2)          | N    |
| horizontal, plus       | (l-2, 3)                | E    | (l-2, 0)          | W    |
| horizontal, minus      | (l-2, 0)                | W    | (l-2, 3)          | E    |

These nodes are the *outlet PEs*. The link between digit values 3 and 0 of
a ring is its wraparound link. Contour ports not used by any level are tied
off and never routed to. Because an inter-BM link is just the mesh port
that would otherwise be unused, the router is the same for every node; only
its address input differs.

## Router

`tesh_router` has five ports: N (+y), E (+x), S, W and the local port of
the node's processing element. Each input port has four virtual channels
(VCs), each a 2-flit buffer.

```
 in_link --> VC buffers (4 x 2 flits) --> route unit per VC
                                          |
            round-robin over VCs of an input port
            round-robin over input ports per output port
                                          |
                       output register --> out_link --> next router's buffer
```

Every cycle, each input VC holding a head flit and no output VC asks its
route unit for an output port and a set of allowed output VCs; it requests
the lowest allowed VC there that is unowned and has a credit. A VC whose
packet already owns an output VC requests while that VC has a credit. A
two-stage round-robin allocator picks at most one flit per input port and
per output port. A head that wins owns its output VC until the tail passes
(wormhole switching).

**Timing.** A flit moves from an input buffer to the output register in
one cycle and from there into the next router's buffer in the next, so a
hop takes two cycles and a 16-flit packet streams at one flit per cycle
when nothing blocks it. Flow control is by credits: an output VC starts
with two (the downstream buffer depth), spends one per flit and gets one
back, one cycle after the downstream router forwards that flit.

**Link format** (`tesh_pkg`):

| type       | fields                                       |
|------------|----------------------------------------------|
| `link_t`   | `valid`, `vc[1:0]`, `flit` (`ftype[1:0]`, `data[31:0]`) |
| `credit_t` | `valid`, `vc[1:0]`                           |
| `ftype`    | 0 head, 1 body, 2 tail, 3 head+tail          |

**Header** (`head_t`, the data of a head flit), from MSB: `dest[19:0]`,
`dr[2:0]` (DDR reversal count), `cls_h` (packet is on Channel-H in the ring
it is crossing), `phase[3:0]` (address digit being routed, 0 in the final
BM), `dir_set`/`dir_minus` (ring direction fixed by LS), `det` (DDR packet
moved to the deterministic VCs), one reserved bit. A source writes only
`dest` and leaves the rest zero; routers rewrite the header as the head
passes.

## Routing

### Dimension order (R1)

Each router finds the highest address digit p >= 2 in which it differs from
the destination. That digit is routed first: the packet goes inside the BM
to the outlet PE of digit p's ring (vertical ring for odd p, horizontal for
even p, level p/2 + 1) and takes its inter-BM link. The direction is plus
when (d[p] - c[p]) mod 4 <= 2, else minus. Inside a BM a packet moves in y
first, then in x. When no digit above 1 differs, the packet is routed in
the BM to (d1, d0) and ejected on the local port. So at each level the
vertical ring is done before the horizontal one, and higher levels before
lower ones.

### Virtual channels and deadlock

A ring of four BMs needs two VC classes: Channel-L and Channel-H. A packet
starts every ring phase on Channel-L, and switches to Channel-H after it has
crossed that ring's wraparound link. The wraparound hop itself is taken on
the packet's current class, so a route that ends right after the wraparound
link never needs Channel-H. The class bit is reset when the routed digit
changes. Without DDR, VCs 0 and 2 are Channel-L and VCs 1 and 3 Channel-H:
two pairs, both usable. With DDR, VCs 0/1 are the deterministic Channel-L/H
and VCs 2/3 the adaptive VCs.

### Channel select (CS, R2)

Channel-H is only needed after a wraparound. While the rest of the current
ring route uses no wraparound link, or ends at the node the wraparound link
enters, a Channel-L packet may take either class; once on Channel-H it
stays there. This roughly doubles the VCs usable on non-wrapping routes.

### Link select (LS, R3)

In a 4-node ring a destination two steps away is equally far both ways
(|s - d| = 2). DOR always goes plus. With LS, the first router of such a
phase goes minus if no allowed VC is free towards the plus outlet and one
is free towards the minus outlet. The choice is stored in the header
(`dir_set`, `dir_minus`) so later routers in the BM head for the same
outlet.

### Dynamic dimension reversal (DDR, R4)

Packets start on the adaptive VCs (2, 3). Routing on adaptive VCs follows
DOR, with one addition (path 1): at an outlet PE whose inter-BM link
shortens any still-differing digit, the packet takes that link if an
adaptive VC is free on it, even if dimension order would route a higher
digit first. Taking a link of a lower digit than p is a dimension reversal
and increments the packet's DR number. Each output VC is labelled with the
DR number of the packet holding it. If no adaptive VC is free on the DOR
port and every adaptive VC there is held by a packet with a DR number no
higher than the waiting packet's, that packet moves to the deterministic
VCs (0, 1) for good and is routed by DOR (with CS and LS if enabled).
Otherwise it waits for an adaptive VC.

## Files

| file | contents |
|------|----------|
| `rtl/tesh_pkg.sv` | sizes, flit/link/header types, event record |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/vc_fifo.sv` | 2-flit VC buffer |
| `rtl/tesh_route_unit.sv` | routing function (DOR, CS, LS, DDR) |
| `rtl/tesh_router.sv` | 5-port, 4-VC wormhole router |
| `rtl/tesh_network.sv` | TESH(2,L,0) network, top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tesh_network` brings out, per node, the local port (`inj_link`,
`inj_credit`, `ej_link`, `ej_credit`) and an event record `ev`
(flit sent, credit stall, inter-BM hop, wraparound hop, CS early Channel-H,
LS minus choice, DDR reversal, DDR escape). `mode` selects the routing
algorithm for all routers and should only change while the network is
empty. A processing element injects a packet on any of the four local VCs
against the credits returned on `inj_credit`, and returns one credit on
`ej_credit` per flit it takes from `ej_link`.

## Sizes

| parameter | value | note |
|-----------|-------|------|
| `L` (network level) | 2 in `tesh_network` (256 nodes) | the reference configuration is Level 3 (4096 nodes); see below |
| VCs per physical channel | 4 | |
| VC buffer depth | 2 flits | |
| packet length | 16 flits | used by the testbenches; the router handles any length |
| flit | 2-bit type + 32-bit data | |

`tesh_network` defaults to L = 2 because a Level-3 network (4096 routers,
81,920 route units) is beyond what Verilator can elaborate in 32 GB: the
Level-2 network alone takes about 7 GB to lint. Set `L` to 3 (up to 5) for
synthesis or for a simulator that can hold it; nothing else changes.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. With plain
Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tesh_pkg.sv tb/tb_tesh_router.sv --top-module tb_tesh_router
obj_dir/Vtb_tesh_router
```

| testbench | what it checks |
|-----------|----------------|
| `tb_rr_arbiter` | grants against a reference round-robin model; fairness |
| `tb_vc_fifo` | random push/pop against a queue; flags |
| `tb_tesh_route_unit` | hand-worked routes: BM routing, rings in both directions, wraparound and Channel-H, CS relaxations, LS tie-break, DDR path 1, escape, wait |
| `tb_tesh_router` | port, VC and header of packets, flit order and payload, 2-cycle hop, credit stall and resume, two packets sharing an output on two VCs, credit return |
| `tb_tesh_network` | 256-node network, all routing modes under uniform, hotspot, perfect-shuffle, complement and local traffic; every packet checked at its destination; every phase must drain (no deadlock); each mechanism above must occur |

The network testbench elaborates 256 routers; Verilator needs several GB and the C++ compile takes tens of minutes.

## Departures and limits

* Inter-BM link placement on the BM contour is this design's own (table
  above).
* The network default is Level 2, not Level 3 (Sizes).
* There is one output register per port, not a buffer per output VC;
  transfer still takes the two cycles per hop of the reference model.
* DDR's escape test looks at the DOR output port only; a DR number
  saturates at 7.
* The routing mode is a run-time input; a real chip would build one
  algorithm.
* Processing elements, the through-silicon vias and the chip-level
  reconfiguration logic are outside this RTL.
