# ReDC: a bufferless deflection router that picks the better of two permutation networks

A bufferless router has no input buffers. Every flit that enters must leave
a fixed number of cycles later. If two flits want the same output link, one
wins and the other is *deflected* onto some other free link. It then takes a
longer path. Deflections cost latency, link energy and, at high load, network
throughput.

ReDC is a two-stage deflection router in the style of CHIPPER. Its output
stage uses a *Permutation Deflection Network* (PDN): a small two-stage
network of 2x2 arbiter blocks. How well a PDN avoids deflections depends on
which inputs share a first-stage block. So ReDC builds two PDNs fed with the
same four flits in different pairings. It counts the deflections each would
cause and keeps the result with fewer. This costs area and some delay in the
second pipeline stage. It does not add a cycle.

This repository holds synthesizable SystemVerilog for:

- the router (`redc_router`);
- each of its units;
- an 8x8 mesh of routers (`redc_mesh`, the top level);
- self-checking testbenches for all of them.

## Flit format

| field | bits | meaning |
|---|---|---|
| `valid` | 1 | the link or channel holds a flit (sideband, not counted in the 140) |
| `hdr.dst_x`, `hdr.dst_y` | 3 + 3 | destination column and row |
| `hdr.src_x`, `hdr.src_y` | 3 + 3 | source column and row (used for golden priority) |
| `data` | 128 | payload |

The link carries 140 bits: a 12-bit header and a 128-bit payload. The split
of the 12 header bits into four 3-bit coordinates is this design's own
choice. It limits the mesh to 8x8. Packets are single flits. Every flit
carries its own header and is routed on its own.

Inside the router a flit travels on an *internal channel* (`chan_t`). The
channel adds the flit's productive direction (`dir`: N, E, S, W or LOCAL) and
its golden bit. Both are computed once, in stage 1.

## Router pipeline

```
 links N,E,S,W ──► [A] ──► route computation ──► ejection ──► injection ──► [B] ──► PDN1 ─┐
                           (XY, golden check)      │             ▲                 PDN2 ─┤► DCCU ──► [C] ──► links N,E,S,W
                                                   ▼             │                        │
                                             [ejection reg]   core flit                   └ defl_count, pdn2_sel
```

- **Register A** captures the four input links. It is the end of the link
  traversal.
- **Stage 1 (A to B)** does four things:
  - computes each flit's XY direction and golden bit;
  - ejects at most one flit destined for this node;
  - injects at most one flit from the core into a channel that is now empty;
  - stores the four channels in register B.

  Channel *i* of B holds the flit that arrived on input port *i*, or the
  injected flit if that channel was empty.
- **Stage 2 (B to C)** has two parts:
  - the *permuter unit* runs both PDNs in parallel;
  - the *DCCU* (deflection counter and comparator unit) counts the
    deflections of each result and loads the better one into register C.

  Register C drives the output links.

Timing, in clock edges:

| path | edges |
|---|---|
| input link to output link | 3 (A, B, C) |
| input link to ejection port | 2 (A, then the ejection register, loaded with B) |
| core injection to output link | 2 (B, C) |
| one hop in the mesh | 3 |
| zero-load latency from injection to ejection, *h* hops | 3*h* + 1 |

The mesh testbench checks the zero-load latency exactly.

Ejection has no backpressure. When `ej_flit.valid` is high for a cycle, the
core must take the flit.

Injection uses a valid/ready handshake. `inj_ready` is high when at least one
channel is empty after ejection. It does not depend on `inj_valid`. While all
four channels are busy the core must hold its flit; the router never buffers
it.

## The permutation deflection network

This is the part of the design that needs the most care.

### One arbiter block (`pdn_arbiter`)

A block takes two flits. Each flit says whether it wants output 0 or output 1.
The block chooses a winner, which gets the output it wants. The loser takes
the other output.

The winner is chosen in this order:

1. A golden flit that wants a real output port wins. If both flits are
   golden, input *a* wins.
2. Otherwise a flit that wants a real port beats one that does not. A flit
   wants no port when the channel is empty, or when the flit is destined for
   this router but lost the ejection.
3. Otherwise a pseudo-random bit decides.

A block never drops or duplicates a flit. It is a 2x2 switch that is either
straight or crossed.

### Two stages (`pdn`)

```
 in0 ─┐            ┌─ out0 ─► Y block ─► N (out0), S (out1)
      ├─ block 0 ──┤
 in1 ─┘            └─ out1 ─┐
                            │
 in2 ─┐            ┌─ out0 ─┼► Y block
      ├─ block 1 ──┤        │
 in3 ─┘            └─ out1 ─┴► X block ─► E (out0), W (out1)
```

- **Stage 1** sorts flits by dimension. Output 0 goes to the Y block (N/S)
  and output 1 goes to the X block (E/W).
- **Stage 2** picks the port within the dimension.

Two flits in the same first-stage block that want the same dimension
conflict. The loser crosses to the other dimension's block and is certainly
deflected. A flit that loses in the second stage gets the opposite port of
its own dimension.

With XY routing, every flit that has not reached its destination wants
exactly one port.

The N,S / E,W grouping of the second stage is this design's own choice.

### Two input orders (`permuter_unit`)

| network | first-stage block 0 | first-stage block 1 |
|---|---|---|
| PDN1 | N, E | S, W |
| PDN2 | N, W | E, S |

Example: the flit from N wants E, the flit from E wants W, and the other
channels are empty.

- In PDN1 both flits share block 0 and both want X. One is pushed to the Y
  block, so there is one deflection.
- In PDN2 they sit in different blocks. Both reach the X block and get E and
  W. There are no deflections.

The reverse happens when N and W both head along X. The router testbench
drives both cases. In random all-ports traffic the two networks disagree on
the deflection count in about a third of the cases (`tb_permuter_unit`).

Both networks use the same four random bits.

### Counting and choosing (`dcu`, `comparator_unit`, `dccu`)

A deflection counter unit counts the valid flits that sit on an output port
other than their XY direction. A flit for this router that lost the
ejection is counted too. It leaves on some link whatever happens, so it adds
the same amount to both counts.

The comparator selects PDN2 only when its count is strictly lower. On a tie
it keeps PDN1.

The chosen count and the choice are registered with register C and brought
out as `defl_count` and `pdn2_sel`. They are for statistics.

## Golden flits and livelock

A deflected flit could in principle wander forever. As in CHIPPER, one
source is *golden* at a time. Its flits beat every non-golden flit in every
arbiter block, so a golden flit travels on a minimal path.

`golden_ctrl` advances the golden source id every `GOLDEN_EPOCH` cycles
(default 128). That is longer than a 14-hop corner-to-corner trip of 42
cycles. Every source therefore gets its turn.

Each router keeps its own copy of the counter. All copies agree because they
leave reset together.

The header has no sequence number. All flits of the golden source are golden
together. If two of them meet, the fixed rule "input *a* wins" applies.

## Ejection and injection

`ejection_unit` ejects at most one flit per cycle. A golden local flit goes
first. Otherwise the lowest channel wins, in the order N, E, S, W. Any other
local flit stays in its channel. The PDN deflects it, and it retries when it
comes back.

`injection_unit` places the core's flit in the lowest empty channel after
ejection. A flit ejected this cycle therefore frees a slot for an injection
in the same cycle.

## The mesh (`redc_mesh`)

Nodes are numbered `y*MESH_X + x`. Row 0 is the northern edge and columns
grow to the east.

Neighbouring routers are wired port to port:

- the E output of node (x,y) feeds the W input of (x+1,y), and the reverse;
- the S output of node (x,y) feeds the N input of (x,y+1), and the reverse.

An edge router has an output port with no neighbour. A deflection router
must be able to send a flit anywhere, so that output is looped back into the
same router's input on that side. A flit deflected off the edge comes back
one hop-time later. XY routing never chooses such a port on purpose.

The top level's ports are arrays indexed by node: `inj_valid`, `inj_flit`,
`inj_ready`, `ej_flit`, `defl_count` and `pdn2_sel`.

## What the simulations show

`tb_redc_mesh` runs the seven synthetic traffic patterns on the full 8x8
mesh with single-flit packets, 1500 cycles each. Latency counts from flit
creation, including time in the source queue. The counts below are from one
run of the testbench. They vary slightly with the random seed.

| pattern | rate (flits/node/cycle) | avg latency (cycles) | deflections per flit |
|---|---|---|---|
| uniform random | 0.15 | 19.3 | 0.46 |
| transpose | 0.10 | 20.7 | 0.49 |
| bit-complement | 0.10 | 27.5 | 0.51 |
| tornado | 0.10 | 13.6 | 0.20 |
| bit-reverse | 0.10 | 21.4 | 0.54 |
| shuffle | 0.10 | 14.7 | 0.24 |
| neighbor | 0.20 | 6.2 | 0.00 |

A final phase drives uniform traffic at 0.6 flits/node/cycle, far beyond
saturation. The network then drains completely: every one of about 110,000
flits arrives once, at the right node, with its payload intact.

`tb_redc_mesh_sweep` raises the offered load step by step on the full 8x8
mesh. It uses uniform random, transpose and bit-complement traffic. Each step
has 300 warm-up cycles and a 1200-cycle measured window, then the network
drains. The testbench takes the saturation point as the first rate at which
average latency passes five times the zero-load latency.

| pattern | zero-load latency | deflections/flit at 0.10 | last rate below saturation | saturation |
|---|---|---|---|---|
| uniform random | 17.8 | 0.27 | 0.30 (latency 41, 4.1 deflections/flit) | about 0.35 |
| transpose | 18.9 | 0.46 | 0.20 | about 0.25 |
| bit-complement | 25.4 | 0.50 | 0.20 | about 0.25 |

Deflections per flit stay below one up to about two thirds of the
saturation rate. Near saturation they rise steeply, and accepted throughput
levels off (about 0.30 for uniform traffic and 0.19-0.20 for the other
two).

These numbers describe this RTL only. The testbench has no CHIPPER
(single-PDN) baseline to compare against.

## Choices this RTL makes

The design fixes the units, their order in the pipeline, the two PDN input
pairings, the counting of deflections and the choice of the network with
fewer. The points below are choices made here:

- the header layout and the separate `valid` bit;
- golden priority keyed on the source node, the epoch length, and "input *a*
  wins" between two golden flits;
- the random tie-break, a 16-bit LFSR per router (x^16+x^14+x^13+x^11+1)
  seeded from the node number;
- the N,S / E,W grouping of the PDN's second stage;
- PDN1 on a tie;
- a failed-ejection flit counted as a deflection;
- ejection order (golden, then N, E, S, W) and injection into the lowest
  empty channel;
- register A placed at the router input, a registered ejection port, and a
  synchronous active-low reset that clears every pipeline register;
- edge loopback in the mesh.

Not included:

- the processing cores and network interfaces (the testbenches model the
  source queues);
- reassembly of multi-flit packets, which single-flit packets do not need;
- any power or timing model.

## Files

| module | role |
|---|---|
| `redc_pkg` | types (`flit_t`, `hdr_t`, `chan_t`, `dir_e`) and constants |
| `xy_route` | XY route computation |
| `golden_ctrl` | golden source rotation |
| `prng_lfsr` | random tie-break bits |
| `ejection_unit`, `injection_unit` | stage 1 |
| `pdn_arbiter`, `pdn`, `permuter_unit` | stage 2 permuter |
| `dcu`, `comparator_unit`, `dccu` | stage 2 deflection counting and choice |
| `redc_router` | the router, registers A, B, C |
| `redc_mesh` | top level: MESH_X x MESH_Y mesh |

Each `rtl/<name>.sv` has a testbench `tb/tb_<name>.sv`. Each testbench
checks its block against values it works out itself and prints
`TB_RESULT checks=N failures=M`.

The router testbench checks the exact cycle timing of each path. It also
runs 20,000 cycles of random traffic on all ports with a per-flit
scoreboard.

The mesh testbench counts each mechanism and fails if any never happened:

- deflection;
- PDN2 chosen;
- two local flits at one router;
- injection refused;
- edge loopback;
- golden flits.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_redc_mesh \
    -y rtl -y tb +libext+.sv -Irtl rtl/redc_pkg.sv tb/tb_redc_mesh.sv
./obj_dir/Vtb_redc_mesh
```

Replace `tb_redc_mesh` with any other testbench name to run that one
(`tb_redc_mesh_sweep` for the load sweep, about one minute of run time). The
mesh testbench runs at the default 8x8 size. It takes about two minutes to
build and a few seconds to run. For lint only, use
`verilator --lint-only -Wall -y rtl -Irtl rtl/redc_pkg.sv rtl/redc_mesh.sv`.

## Changing it

- **Mesh size:** `MESH_X`, `MESH_Y` on `redc_mesh`. Up to 8x8 with the
  3-bit coordinates. For a larger mesh, raise `COORD_W` in `redc_pkg`. The
  header then grows beyond 12 bits.
- **Payload width:** `DATA_W` in `redc_pkg`.
- **Golden epoch:** `GOLDEN_EPOCH` on `redc_mesh` or `redc_router`. Keep it
  above the longest uncontended trip.
- **PDN input orders:** the two assignments in `permuter_unit`.
- **Tie rule:** `comparator_unit`.
