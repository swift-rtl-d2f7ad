# SWIFT: a token-flow-control mesh network-on-chip in SystemVerilog

A packet crossing a conventional on-chip router is written into an input
buffer, waits for route computation, VC allocation and switch allocation,
and is read out again, hop after hop. SWIFT removes most of that work at
low and medium load. Each router tells its neighbourhood, with one-bit
**tokens**, which nearby input ports still have buffers to spare. Each flit
is announced one cycle ahead by a small **lookahead** that carries its route.
A router that gets the lookahead in time reserves its crossbar for the flit,
and the flit then goes straight from the input link to the output link
without being buffered. A flit that cannot bypass falls back to a
conventional three-stage pipeline.

This repository holds a synthesizable model of the whole network:
- an 8x8 mesh of five-port routers;
- the inter-router links;
- a traffic-generating network interface (NIC) at every node;
- a self-checking testbench for every block and for the full network.

The published chip implements the crossbar and links with reduced-swing
analog circuits. Here they are modelled by their logic function: a
registered, clock-gated crossbar and a one-cycle link.

Defaults:

| Parameter | Value |
|---|---|
| Mesh | 8x8 (`MESH_X`, `MESH_Y`) |
| Flit width | 64 bits |
| Packet length | 5 flits |
| Ports per router | 5 (N, E, S, W, Local) |
| VCs per input port | 2 |
| Buffers per input port | 8, shared by the VCs |
| Token threshold | ON while more than 3 spare buffers |
| Token reach | 3 hops |
| Switch-priority epoch | 20 cycles |
| Routing | minimal, west-first, adaptive by tokens |

## How a flit travels

Port numbering is North 0, East 1, South 2, West 3, Local 4 everywhere.

### The bypass path: two cycles per hop

Say a lookahead reaches router R in cycle t. In that cycle R does four
things in parallel:

1. **LA-CC** (`la_conflict_check`) decides whether the flit may bypass.
   - A head flit needs a free VC at the next router.
   - A body or tail flit needs room at the next router, and no earlier flit
     of its packet may still be buffered in R.
   - When several lookaheads want the same output port, a per-output
     priority pointer picks the winner. The pointer moves to the next input
     port every 20 cycles.
2. **SA-O** (one `matrix_arbiter` per output) arbitrates among buffered
   flits. Any SA-O grant that collides with a winning lookahead is killed.
   Lookaheads always have priority.
3. **VA**: a winning head takes the next free VC of the downstream port from
   that output's `vc_free_queue`.
4. **LA-RC** (`la_route_compute`) works out, for each winner, the output
   port the flit will use at the *next* router.

At the end of cycle t, R registers the new lookahead toward the next router.
The new lookahead has the hop count stepped, plus the new output port and VC.

- Cycle t+1: the flit arrives and crosses the crossbar (ST) into the output
  register.
- Cycle t+2: the flit crosses the link (LT).
- The next router sees the lookahead in t+2 and the flit in t+3.

A bypassing flit thus costs one router cycle plus one link cycle per hop.

### The buffered path: four cycles per hop

A flit whose lookahead lost is written into the shared buffer when it
arrives. It then goes through these stages:

| Cycle | Stages |
|---|---|
| 1 | BW (buffer write) + SA-I |
| 2 | SA-O + VA + BR (buffer read), and its lookahead is sent |
| 3 | ST |
| 4 | LT |

SA-I (`rr_arbiter`) picks one VC per input port. It keeps offering the same
VC until that VC wins SA-O. It only offers a VC whose front flit could win
its output now: a head needs a free VC downstream, a body flit needs room
downstream. Without that rule, a head waiting for a VC could block the other
VC of the same port indefinitely.

`tb_swift_router` checks both timings:
- bypass: the flit leaves 2 cycles after its lookahead arrives;
- buffered: it leaves 4 cycles after.

### Lookahead and flit formats

Flit, 64 bits:

| Bits | Field |
|---|---|
| 63..3 | data |
| 2..0 | type: HEAD=001, BODY=010, TAIL=100, HEAD_TAIL=101 |

Lookahead, 14 bits (`la_t`):

| Bits | Field | Meaning |
|---|---|---|
| 13..9 | outport | one-hot output port at the receiving router |
| 8 | vcid | VC at the receiving router |
| 7..5 | y_hops | remaining Y hops |
| 4 | y_dir | 1 = North |
| 3..1 | x_hops | remaining X hops |
| 0 | x_dir | 1 = East |

The lookahead has no type field. A router treats a lookahead as a head when
its VC is idle at that input port.

## Tokens and routing

### What a token means

Every input port produces `own_tok`: ON while the port has more than three
free buffers, not counting one buffer kept back for each VC that holds no
flit. The margin of three covers flits already committed upstream before the
upstream router sees the token drop. The token is decoded combinationally
from registered counts, so the upstream router reacts in the same cycle.

### How tokens are spread

Tokens travel in a bundle on every port (`tok_bundle_t`):

- `own`: the sender's token for the port facing the receiver.
- `res`: one bit per VC of that port, see the deadlock section below.
- `t1`: the tokens the sender received from its N, E and S neighbours.
- `t2`: the tokens those neighbours received straight on.

`token_relay` registers `t1` and `t2` at every hop. So a router knows:
- the facing tokens of its four neighbours;
- for each neighbour, the tokens one and two hops beyond it.

That three-hop neighbourhood is what route computation needs. West-first
routing never looks beyond the West neighbour, so bundles sent East carry
only `own`. This leaves 22 network tokens plus the local one per router.

### Route choice

`la_route_compute` decides one hop ahead:

1. If there are West hops left, go West (west-first turn rule).
2. If there are no hops left, eject to Local.
3. If only one productive direction is left, take it.
4. Otherwise compare East against North/South by score 2*t1 + t2 from the
   tokens around the next router. The higher score wins; East wins a tie.

## Flow control and deadlock

A head flit needs a free VC downstream. Each output has a `vc_free_queue`:
- it fills when a downstream tail leaves that router's crossbar, signalled
  back over the link (`vcfree`);
- it empties when a head is granted.

Body and tail flits need room downstream. Each input port has 8 buffers in a
shared pool, tracked with a linked free list (`free_buffer_list`). A per-VC
queue of buffer addresses keeps each packet in order.

One buffer per VC is reserved for deadlock avoidance. A plain on/off token
cannot honour that reservation: the upstream router does not know which VC
a buffer is kept for. In simulation the network deadlocked at high load
this way:
1. One VC of a port filled the shared pool with a packet whose head waited
   for a downstream VC.
2. That downstream VC belonged to a packet on the port's *other* VC.
3. That other packet's body flits could not enter, because the token was OFF.

This design therefore adds `res[v]` to the token bundle. It is set while VC
`v` of the port holds no flit and none is announced or arriving. A body or
tail flit may go when:
- the token is ON, or
- the reserved buffer of its VC is free, and nothing went to that VC in the
  previous cycle (a flit the downstream port cannot see yet).

This rule is applied in three places: SA-I readiness, SA-O requests and
LA-CC eligibility in the router, and in the NIC. The buffer overflow
assertions in `input_port` and `free_buffer_list` stay silent in all tests.

## Crossbar, link and NIC

- **`lowswing_xbar`**
  - A 5x5 crossbar built as 64 one-bit slices.
  - Its output register stands for the clocked sense-amplifier receivers of
    the reduced-swing crossbar, which end the ST stage.
  - Each output register is clocked only when its port is used, which models
    per-port clock gating.
- **`swift_link`**: one register stage for the flit and the lookahead going
  downstream, and for the VC release going upstream.
- **`swift_nic`**
  - Injection:
    - Each cycle, a packet to a uniformly random other node is offered with
      probability `inj_rate`/256, drawn from a xorshift32 generator.
    - One packet waits at a time; further offers are counted as dropped.
    - Flits go out with their lookaheads under the same VC and token rules
      as a router.
  - Ejection: each flit is checked for destination and type, and the NIC
    accumulates latency from offer to tail arrival.
  - Payload:

    | Bits | Field |
    |---|---|
    | 60..55 | src |
    | 54..49 | dst |
    | 48..33 | sequence number |
    | 32..30 | flit index |
    | 29..0 | offer time |

## Top level: `swift_noc`

- Parameters: `MESH_X`, `MESH_Y` (default 8x8). `EDGE_GEN`, `ORG_X` and
  `ORG_Y` build the test-chip slice described below.
- Node `(x, y)` has id `y*MESH_X + x`; row 0 is the North edge.
- By default, mesh-edge router ports are tied off: no traffic and tokens
  OFF. Minimal routing never uses them.
- Inputs:
  - `bypass_en`: 0 forces every flit through the buffers;
  - `inj_en` and `inj_rate`: drive all NICs.
- Outputs: network-wide counters for cycles, packets and flits sent and
  received, latency sum, errors, dropped offers, and router events:
  - `n_bypass`: flits bypassed;
  - `n_buffered`: flits buffered;
  - `n_sao_killed`: SA-O grants killed;
  - `n_la_lost`: lookaheads that lost.

Results of `tb_swift_noc` on the full 8x8 mesh (uniform random traffic,
3000 injection cycles, then drain):

| Offered load (packets/node/cycle) | Bypass | Average latency (cycles) | Delivered |
|---|---|---|---|
| 3/256 | on | 21.7 | all 2191 packets |
| 3/256 | off | 34.5 | all 2191 packets |
| 40/256 | on | 114.7 (past saturation) | all 4053 packets |

The published 8x8 results are about 19 cycles with bypassing against about
31 for a baseline router, with saturation near 0.06 packets/node/cycle. The
low-load gain from bypassing matches in size. The absolute numbers differ:
- latency here is measured from the cycle the packet is offered, including
  source queueing;
- the exact pipeline timing of the published design is not fully known.

## The test-chip slice: `EDGE_GEN`

The fabricated SWIFT chip is a 2x2 piece of the 8x8 network. To load it
as the whole network would, each of its eight unused edge ports carries a
congestion NIC (C-NIC), `swift_cnic`. With the four local NICs, that gives twelve
traffic generators. Set `EDGE_GEN=1` (with `MESH_X=MESH_Y=2`) and
`swift_noc` builds this slice.

A C-NIC stands for every node of the virtual 8x8 mesh that lies beyond its
edge. How it works:
- Each cycle it may draw a destination, uniform over the virtual mesh.
- It keeps the destination only if a minimal west-first route would enter
  the slice through its edge. Any other draw is discarded.
- The slice's place in the virtual mesh is set by `ORG_X`/`ORG_Y`.
- Packets bound for a node outside the slice carry the id 63. Routing uses
  only the hop fields, so the id never matters inside the slice.
- On the output side it is an ideal sink. It releases a VC at the tail
  flit and always shows its tokens ON.

`tb_swift_cnic` runs the slice from reset three times, each followed by a
drain:

| Offered load (packets/generator/cycle) | Bypass | Average latency (cycles) | Delivered bandwidth |
|---|---|---|---|
| 6/256 | on | 12.9 | 51.6 bits/cycle |
| 6/256 | off | 17.4 | 51.5 bits/cycle |
| 80/256 | on | 30.3 | 179.4 bits/cycle |

The fabricated slice peaks at 113 bits/cycle. This model delivers more at
high load because its edge sinks never push back.

## Where this model departs from the published design

- **Analog parts.** Reduced-swing drivers, sense-amplifier receivers and
  link shielding are not modelled. Only their logic function is, inside
  `lowswing_xbar` and `swift_link`.
- **Reserved buffers.** The per-VC reserved-buffer flag in the token bundle
  (see above) is this design's way to make the reservation work.
- **SA-I readiness.** Offering only VCs that can win now is a choice made
  here.
- **Pipeline timing.**
  - The exact cycle of lookahead generation is a choice here.
  - A VC is released when its tail crosses the crossbar.
  - An SA-O grant is also killed when its *input* port carries a bypassing
    flit in the same cycle.
- **Routing and tokens.**
  - The token score 2*t1 + t2 is a choice here.
  - Which 22 tokens make up the neighbourhood is a choice here.
- **Encodings and formats.**
  - The flit-type encoding and the port numbering are choices here.
  - The published chip uses foundry register files for the flit buffers;
    here the buffer is a plain array with a registered read port.
  - The 4:1 SA-O arbiters are 5:1 here, with the U-turn input never
    requesting.
- **Test-chip generators.** The published slice has traffic generators on
  its edge ports, but how they pick destinations is not known. The
  filtering rule of `swift_cnic`, the slice's place in the 8x8 network
  (centred by default) and the ideal edge sinks are all choices made here.

## Files

`rtl/`, one module or package per file:

| File | Contents |
|---|---|
| `swift_pkg.sv` | constants, flit / lookahead / token types, helpers |
| `swift_noc.sv` | mesh top |
| `swift_router.sv` | router |
| `input_port.sv` | input port, using `free_buffer_list`, `flit_buffer_rf`, `rr_arbiter` |
| `la_conflict_check.sv` | LA-CC |
| `matrix_arbiter.sv` | SA-O arbiter |
| `vc_free_queue.sv` | VC allocation queue |
| `la_route_compute.sv` | LA-RC |
| `token_relay.sv` | token distribution |
| `lowswing_xbar.sv` | crossbar |
| `swift_link.sv` | link |
| `swift_nic.sv` | network interface and traffic generator |
| `swift_cnic.sv` | edge congestion NIC for the test-chip slice |

`tb/`: one self-checking testbench per module, named `tb_<module>.sv`. Each
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- `tb_swift_noc` is the end-to-end run on the full 8x8 mesh at default
  parameters. It counts every mechanism and fails if one never happens:
  - bypass;
  - buffering;
  - killed SA-O grant;
  - lost lookahead;
  - source back-pressure;
  - both bypass modes.
- `tb_swift_cnic` runs the 2x2 test-chip slice with all twelve generators.
  It checks that every packet is delivered, that bypassing lowers latency,
  and that high load carries more data.
- `tb_swift_router` checks the one-cycle bypass and the three-stage
  buffered pipeline cycle by cycle.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/swift_pkg.sv tb/tb_swift_noc.sv \
          --top-module tb_swift_noc -j 8
./obj_dir/Vtb_swift_noc
```

Replace `tb_swift_noc` with any other testbench name to run that block's
test. The 8x8 build takes about a minute and a half, and the run about ten
seconds.

To try other loads or sizes, change the `run(...)` calls in
`tb/tb_swift_noc.sv`, or instantiate `swift_noc` with other `MESH_X`/`MESH_Y`
values. Node ids are 6 bits and hop counts 3 bits, so a mesh is at most 8x8.
