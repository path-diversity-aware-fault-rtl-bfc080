# PDA-FTR: a path-diversity-aware fault-tolerant mesh router

When routers of a mesh network-on-chip are permanently broken, an adaptive
router has fewer ways to reach a destination, and traffic piles up next to the
broken routers. PDA-FTR routes each packet by two pieces of information at
once:

* **path diversity** — for every destination and every output direction, how
  many fault-free minimal paths lead from the neighbour in that direction to
  the destination (the *FPD*, "faulty-network path diversity"). It is worked
  out once, after the faults are known, and kept in a table in each router;
* **buffer occupancy** — how many free slots the neighbour's input buffer has
  right now.

Their product, the *effective buffer length* (EBL), rates an output: a
direction with many surviving paths behind it and room in the next buffer is
preferred. Routes obey the odd-even turn model, which keeps the network free
of deadlock without virtual channels. When every minimal direction leads
nowhere (FPD 0), the packet takes a non-minimal detour that the odd-even rules
still allow.

This repository holds synthesizable SystemVerilog for the router and for an
8x8 mesh of them, plus self-checking testbenches.

## Conventions

* Router (x, y): (0,0) is the south-west corner, x grows to the east, y to the
  north. In the mesh, node index n = y·MESH_X + x.
* Ports and directions are numbered N=0, E=1, W=2, S=3, L=4 (L = local core).
  The port that faces direction d on the neighbour is 3−d.
* "Even/odd column" means the parity of x.
* A flit (`flit_t`, 72 bits) is `{ftype, src_x, src_y, dst_x, dst_y, data[31:0]}`.
  Every flit carries the addresses; only the head's copy is used for routing.
  `ftype` is HEAD, BODY, TAIL or HEADTAIL.

## Router structure

`pdaftr_router` contains, per input port, a 4-flit FIFO (`pdaftr_fifo`), a
routing function and a selection function; shared by all inputs are the
regional FPD table (`pdaftr_fpd_table`, five read ports), the allocator
(`pdaftr_allocator`, one matrix arbiter per output plus the reservation table)
and a 5x5 crossbar (`pdaftr_crossbar`). The router is not pipelined.

### Timing of one packet

```
edge P0   head flit written into the input FIFO
P0..P1    head at the FIFO front: table read, routing function, selection
          function and the output's matrix arbiter all settle combinationally
edge P1   grant registered: output reserved for this input (owner), input
          remembers its output (route)
P1..P2    head crosses the crossbar (req_out high), if the downstream buffer
          reports a free slot
then      one flit per cycle while the downstream buffer has room
tail      the cycle the tail crosses, the reservation is released
```

So a head leaves two clock edges after it arrived, and a packet streams at
one flit per cycle.

### Link protocol

Each direction of a link carries `flit`, `req` (flit valid), `ack` (taken this
cycle) and, backwards, `buf` — the number of free slots in the receiving input
buffer, taken from registers. A router sends only while the `buf` it sees is
non-zero, so every `req` is acknowledged; an assertion checks this. The local
port works the same way; the core supplies the free space of its receive
buffer on `buf_in[L]`.

## The regional FPD table

A table for every possible destination would grow with the square of the mesh
size. Instead each router stores FPD values only for the 24 other positions
of a 5x5 window centred on itself: 24 entries of four 4-bit values (one per
direction), 96 values in all, whatever the mesh size.

Lookup: the offset (dst − cur) is clamped to ±2 on each axis. A destination
inside the window reads its own entry; one outside reads the entry of the
furthest window router in its direction (`rd_far` flags this), so the packet
heads for that router and looks again there. A router's own address reads 0.

The table is written during warm-up through `cfg_we/cfg_dx/cfg_dy/cfg_fpd`
(a signed offset and four values). Writes outside the window or at the centre
are ignored. In the mesh, `cfg_x/cfg_y` pick the router.

### What the values mean

The warm-up computation itself is not part of the RTL; the testbenches compute
the tables with a behavioural model (`tb/pdaftr_fpd_model_pkg.sv`) and load
them. For router c, window target t and direction d:

* FPD = number of minimal paths from the neighbour of c in direction d to t
  that obey the odd-even turn rules (counting the turn into the neighbour) and
  cross no faulty router; 0 if the neighbour is off the mesh or faulty.
* If no faulty router lies in the rectangle between c and t, routers one hop
  from a fault (where traffic piles up) are also avoided, provided some path
  is left.
* The target itself is always allowed, because a clamped target may be a faulty
  router.
* Values saturate at 15.

## Routing function

`pdaftr_routing_function` produces at most two candidate output channels, c0
and c1, in the order N, E, W, S.

* **At the destination:** c0 = L.
* **Minimal mode:** the directions of the odd-even minimal routing function,
  restricted to turns that are legal for the port the packet arrived on, whose
  FPD is non-zero.
* **Non-minimal mode (`nonmin`):** used when minimal mode leaves nothing. Every
  direction that is legal under the turn rules counts, with these limits:
  * no U-turn;
  * no turn to N/S when arriving from the west in an even column;
  * no turn to W when arriving from N or S in an odd column;
  * not off the mesh;
  * only directions from which the destination can still be reached. East is
    allowed only if the destination lies to the east. In an odd column, N and S
    are blocked when the destination lies to the west. In the destination's own
    column, only the direction towards it is allowed.

  Directions with non-zero FPD come first. If all of them have FPD 0, any of
  these directions whose neighbour is not faulty (`nbr_fault`) is used.
* **No candidate at all:** the packet cannot be delivered from here. The
  router discards it from the input buffer, one flit per cycle up to its tail,
  and raises `ev.unreachable`.

## Selection function

For each candidate, EBL = FPD(o) × free_slots(o). The published metric divides
this by the sum of the candidates' FPD values. That divisor is the same for
both candidates, so it is left out: one small multiplier per candidate and one
comparator, no divider. An output already reserved by another packet is
unavailable. There are three cases:

| case | candidates available | request |
|------|----------------------|---------|
| (a)  | none                 | nothing; retried next cycle |
| (b)  | one                  | that one |
| (c)  | both                 | the larger EBL (c0 on a tie) |

FPD of the local port counts as 0. At the destination, only c0 = L exists.

## Allocation and switching

For each output, a 5-input matrix arbiter (`pdaftr_matrix_arbiter`) grants one
of the inputs whose selection function asked for it. The matrix resets to
fixed priority (lower index first). After each grant the winner drops below
every other input. A granted output stays reserved (wormhole switching) until
its tail flit crosses. A reserved output receives no new requests. The
crossbar connects each reserved output to its owner input.
`xb_en[o] = reserved[o] && flit at owner's front && buf_in[o] != 0`.

## Mesh and faults

`pdaftr_mesh` (the top) instantiates MESH_X×MESH_Y routers, 8x8 by default,
and wires facing ports together with no link registers. Ports on the mesh
boundary receive nothing and see no free space.

`fault_map[n]` marks router n as permanently faulty. This information is
assumed to come from chip test and diagnosis. A faulty router is cut off:
* its outgoing links are gated off;
* it reports no free space;
* its local port accepts nothing;
* its neighbours see it on `nbr_fault`.

Per-router event flags come out on `ev[n]`: minimal route, non-minimal
route, out-of-window lookup, selection cases (a)/(b)/(c), stall on a full
downstream buffer, and packets discarded as unreachable.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| MESH_X, MESH_Y | 8 | mesh, router, routing function |
| DEPTH | 4 flits | input FIFOs |
| W_OB | 5 (window side) | package |
| COORD_W | 5 bits (meshes up to 32x32) | package |
| FPD_W | 4 bits | package |
| DATA_W | 32 bits | package |

The 8x8 mesh, the 4-flit buffers, 8-flit packets, the 5x5 window, the
matrix arbitration and wormhole switching are the published configuration.
The widths, the flit format, the link handshake and the unreachable-packet
policy are this design's own. The published evaluation also uses a 5x5 mesh
for one application trace and meshes up to 18x18 for scaling. Both are
parameter settings; 18x18 still fits the 5-bit coordinates.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_pdaftr_fifo` | random push/pop against a queue model: ack, free slots, head |
| `tb_pdaftr_fpd_table` | random loads and lookups, clamping to the furthest router, far flag |
| `tb_pdaftr_routing_function` | hand-worked odd-even cases, then 20,000 random vectors against an independent reference |
| `tb_pdaftr_selection_function` | cases (a)/(b)/(c) and 20,000 random vectors compared with the full normalised EBL formula in real arithmetic |
| `tb_pdaftr_allocator` | grants, no double reservation, owner/route registers against a priority-list model |
| `tb_pdaftr_crossbar` | random permutations |
| `tb_pdaftr_router` | single router: 2-edge head latency, 1 flit/cycle, EBL choice both ways, no interleaving on a shared output, stall on a full downstream buffer, non-minimal detour, discard of an unreachable packet |
| `tb_pdaftr_mesh` | full 8x8 mesh at default parameters (described below) |

**How `tb_pdaftr_mesh` runs.** It runs four fault scenarios: none, one, two
and four faulty routers. For each scenario it:
1. computes and loads every router's FPD table;
2. injects 12 packets of 8 flits from every working node to random working
   destinations.

**What `tb_pdaftr_mesh` checks.**
* Every flit arrives at the right node.
* Within each packet, flits keep their order and type, and the payload is
  intact.
* Every packet is either delivered or counted as unreachable.
* With no faults, nothing is lost.
* Each mechanism occurs at least once: minimal and non-minimal routing,
  out-of-window lookup, selection cases (a)/(b)/(c), downstream stall,
  injection back-pressure and discard.

To run one testbench with plain verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pdaftr_pkg.sv tb/pdaftr_fpd_model_pkg.sv rtl/pdaftr_*.sv tb/tb_pdaftr_mesh.sv \
  --top-module tb_pdaftr_mesh -o sim && obj_dir/sim
```

The mesh test takes a few seconds.

## Known differences and limits

* **Unreachable packets.** The test's scenarios lose 0 %, about 4.6 %, 4.8 %
  and 7.5 % of packets with 0, 1, 2 and 4 faulty routers. The published
  figure is that more than 98 % of packets are delivered. The difference
  comes from two things:
  * the detour rules above, which keep the odd-even model but give up on some
    source/destination pairs next to faults;
  * the simple per-hop discard when nothing is left.

  The fault positions here are also this design's own.
* **Warm-up computation not in hardware.** How the FPD values are obtained
  (the counting, the test of whether a fault lies between source and
  destination, the avoidance of the congested region) exists only in the
  testbench model. The model follows the description above. A hardware
  implementation of the warm-up step, and the fault diagnosis that feeds it,
  are not included.
* **Performance not characterised.** Latency, throughput and traffic-load
  distribution under the published traffic patterns are not measured. The
  router provides the event flags to count them.
* **Open lint warnings.** `src_y` is an input of the routing function but is
  not needed; Chiu's rule uses only the source column.
