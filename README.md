# Network-on-chip router with run-time shared input buffers

A wormhole router spends most of its area and power in its input buffers,
and sizing every input for the worst case wastes most of them most of the
time. This router keeps the usual fixed buffer per input, but lets the four
mesh inputs (North, East, South, West) **lend and borrow buffer slots with
their neighbouring inputs while the router runs**. A busy channel can grow to
three times its design depth by using slots that its two neighbours do not
need; a quiet channel can shrink to nothing. The change is made one slot at
a time and only on free slots, so traffic keeps flowing while the split
changes.

Default size: 5 ports, 8-bit flit payload plus 2 framing bits, 4 slots per
input (`DEPTH = 4`), so 20 flit slots in total, of which the 16 of the mesh
inputs are shareable.

## Router at a glance

```
 in[L] ── rr_fifo (4 slots, not shared) ─────────────── rr_route_xy ─┐
 in[N] ──┐                                                          │
 in[E] ──┤ rr_channel_ctrl x4  <──>  rr_recfg_buffer x4 (banks)      ├─ rr_crossbar ── out[L,N,E,S,W]
 in[S] ──┤        ^                        ^                        │   (round-robin
 in[W] ──┘        └──── rr_alloc_ctrl ─────┘ (bank splits)          │    per output)
                                        rr_route_xy x4 ─────────────┘
```

* Buffering is at the inputs only. Each input presents the flit at the head
  of its queue to a routing unit and then to a 5x5 crossbar.
* Each output has a round-robin arbiter. An output is won by a header flit
  and stays with that input until the packet's tail flit has passed
  (wormhole switching), so packets never interleave.
* Ports are numbered L=0, N=1, E=2, S=3, W=4. Arrays of the four mesh
  channels (`req_depth`, `capacity`, internal bank arrays) use N=0, E=1, S=2,
  W=3.

### Flits and packets

`rr_pkg::flit_t` is `{bop, eop, data[7:0]}`. `bop` marks the header (first
flit), `eop` the tail (last flit); a flit with both is a one-flit packet.
The header's data carries two signed 4-bit offsets written by the source:
`data[7:4] = dx` (positive = East), `data[3:0] = dy` (positive = North).

Routing is XY: East/West while `dx != 0`, then North/South while `dy != 0`,
then Local. The router moves the offset of the dimension it routes one step
toward zero in the header it forwards, so the next router sees what is left.
Offsets are limited to -8..+7 hops.

## How buffer sharing works

This is the heart of the design and the part that takes the most care.

### The ring of neighbours

Each mesh channel can only borrow from its two neighbours, never across the
router. The neighbours form a ring, and "right" is a fixed direction around
it:

```
   right of South = East, right of East = North,
   right of North = West, right of West  = South      (left is the reverse)
```

A channel that needs more than its own slots asks its **right** neighbour
first and its **left** neighbour for the rest. The Local channel takes no
part in sharing.

### Banks and regions

The slots physically belong to banks (`rr_recfg_buffer`), one per mesh
channel, `DEPTH` flits each. A bank is split into three consecutive regions:

```
 address 0                                         DEPTH-1
 | own (used by the owner) | lent to left neighbour | lent to right neighbour |
```

For the South bank that is `[South | West | East]`. A bank has one write
port, fed through a 3:1 multiplexer from the owner's input and the two
neighbours' inputs; if two of them want to write in the same cycle a
round-robin arbiter grants one and the other waits (its `in_ready` stays
low). A bank has three read ports, one per region: the owner's, and one
return path to each neighbour. A flit that South parked in East's bank comes
back over East's "lent to left" read port to South's output multiplexer, and
only then goes to the crossbar. Routing therefore never needs to know where
a flit was stored.

### A channel's queue over three segments

`rr_channel_ctrl` sees its queue as three segments: its own region
(`SEG_OWN`), the region its right neighbour lends it (`SEG_RIGHT`) and the
region its left neighbour lends it (`SEG_LEFT`). Each segment is a circular
FIFO with its own read and write pointer: six pointers per channel. The
segment sizes and base addresses come from the allocation control.

First-in-first-out order across segments is kept by one rule: a new flit
goes to the current tail segment until it is full, then to the next segment
in the cyclic order own -> right -> left -> own, **but only if that segment
is empty**. All stored flits therefore lie in a run of segments from a head
segment to the tail segment, and every flit in one segment is older than
every flit in the next one. The output always reads the head segment; when
it empties, the head moves to the next non-empty segment. An idle channel
starts again in its own segment, so it fills own, then right, then left.

Consequences worth knowing:

* Filled from empty, a channel holds exactly the sum of its segment sizes.
* After a partial drain, the segment at the head may have free slots that
  cannot be used until it empties, because the tail may not wrap into it.
  The usable capacity is then temporarily below the allocated one.
* A full channel does not accept a flit in the same cycle it sends one (no
  combinational path from `out_ready` to `in_ready`).

### Choosing the split: `rr_alloc_ctrl`

The input `req_depth[c]` says how many slots each mesh channel should have
(0 to `3*DEPTH`; larger values are clipped). The target split is:

```
keep[c]  = min(req[c], DEPTH)                 own slots kept
need[c]  = min(req[c], 3*DEPTH) - keep[c]     slots to borrow
spare[b] = DEPTH - keep[b]                    slots bank b can lend
rb[c]    = min(need[c], spare[right(c)])                       from the right
lb[c]    = min(need[c] - rb[c], spare[left(c)] - rb[left(left(c))])  from the left
```

Each bank serves the borrower on its left (who sees it as a right-hand
neighbour) before the one on its right, so two borrowers never claim the
same slot. Slots nobody borrows stay with their owner, so a channel may
end up with more than it asked for.

Example with `DEPTH = 4` and requests N=4, E=2, S=9, W=1: South keeps 4,
borrows East's 2 spare slots and 3 of West's; capacities become N=4, E=2,
S=9, W=1. With `DEPTH = 10` and requests N=10, E=13, S=2, W=15 the South bank
is split South 2 / West 5 / East 3.

### Changing the split while traffic flows

The allocation is registered and moves toward its target **one slot per bank
per cycle**: a slot passes from the first region above target to the first
region below it. Because regions are contiguous, a move changes the size
or base address of up to three regions; it is made only in a cycle where
every such region is empty and nobody is asking to write into it. No stored
flit is ever moved or lost. Under heavy traffic a move may wait until a
region drains; `reconfig_busy` is high until every bank has reached its
target. Each channel returns the pointers of an empty segment to 0, which
is what allows an empty segment to be resized safely.

## Interface and timing (`rr_router`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous reset, active high |
| `in_flit[5]`, `in_valid[5]`, `in_ready[5]` | flit, 1, 1 | input handshake per port |
| `out_flit[5]`, `out_valid[5]`, `out_ready[5]` | flit, 1, 1 | output handshake per port |
| `req_depth[4]` | `$clog2(3*DEPTH+1)` | requested depth of N, E, S, W |
| `occupancy[5]` | same | flits stored per input port |
| `capacity[4]` | same | slots currently allocated to N, E, S, W |
| `reconfig_busy` | 1 | allocation not yet equal to the request |

* A flit moves at a rising edge where valid and ready are both high. Valid
  may be dropped before it is accepted; ready is not registered.
* Latency: a flit accepted at edge *t* can leave the router at edge *t+1*
  (one buffer stage, combinational routing, arbitration and crossbar).
* Throughput: one flit per cycle per input and per output, except when two
  channels write into the same bank in one cycle, or when a mesh channel is
  full (it then accepts a new flit only in the cycle after one leaves).
* Reset empties every queue, frees every output and gives every bank back to
  its owner. The buffer slots themselves are not reset.
* `occupancy` and `capacity` are there for a traffic monitor that would set
  `req_depth`; such a monitor is not part of this RTL.

## Where this design fills in or departs from the original description

Taken from the original router description: five ports, buffering only at
the inputs, wormhole switching, a header/payload/tail marking with two bits
per flit, a round-robin arbiter per output, a default depth of 4, lending
only between adjacent channels with the right neighbour asked first, one-slot
loan granularity, six pointers per channel, a single input multiplexer and
three read multiplexers per channel, the return of borrowed flits to their
own channel before the crossbar, no sharing for the Local channel, and
slot-by-slot reconfiguration on free slots.

This design's own choices:

* 8-bit payload; valid/ready handshake; bop/eop encoding of the two framing
  bits; XY routing with signed relative offsets in the header (the original
  routes deterministically and deadlock-free, which XY satisfies).
* The FIFO-order rule across segments, the allocation formulas and the
  "affected regions empty" condition for a reconfiguration step.
* Round-robin arbitration of a bank's single write port.
* The payload width is a package constant (`rr_pkg::DATA_W`), not a module
  parameter, and the header offsets are fixed at 4 bits each; only `DEPTH` is
  a parameter.

Not built:

* The controller that watches traffic and decides the depths. Its rule is
  not specified, so the depths are an input.
* Power reduction itself. Unused slots are not gated; slots that nobody
  borrows are simply left to their owner. Power savings would need a gating
  scheme and a power model, neither of which is in this RTL.
* The surrounding 2-D mesh and network interfaces.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter` | grants against a reference round-robin model; rotation fairness |
| `tb_rr_fifo` | order, count, full/ready, one-cycle latency |
| `tb_rr_route_xy` | port and rewritten header for random offsets; payload follows the header |
| `tb_rr_recfg_buffer` | write-port arbitration and three read ports against a slot model |
| `tb_rr_channel_ctrl` | own -> right -> left fill order, capacity, FIFO order under random grants, for six segment geometries |
| `tb_rr_alloc_ctrl` | reset split, the N4/E2/S9/W1 example, one slot per cycle, busy regions never resized, 200 random requests against a reference |
| `tb_rr_crossbar` | no interleaving, per-pair order, no move without ready, contention |
| `tb_rr_router` | whole router at default size: latency, random traffic, the N4/E2/S9/W1 example (South fills to 9), North borrowing all 8 neighbour slots (fills to 12), reconfiguration under load; counts borrowing, return paths, bank conflicts, reconfiguration steps and deferrals, contention, wormhole holds and back-pressure, and fails if any never happened |
| `tb_rr_router_fig6` | router at `DEPTH = 10`: South bank split 2/5/3, West/East/South filling to 15/13/2, then random traffic |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/rr_pkg.sv tb/tb_rr_router.sv \
          --top-module tb_rr_router
./obj_dir/Vtb_rr_router
```

Each runs in well under a second. The modules also carry assertions (one-hot
grants, segment counts within their sizes, bank splits adding up to `DEPTH`),
checked when simulating with `--assert`.

## Files

| file | content |
|---|---|
| `rtl/rr_pkg.sv` | flit type, port enum, segment indices, ring helpers |
| `rtl/rr_router.sv` | top level and the ring wiring of banks and channel controls |
| `rtl/rr_recfg_buffer.sv` | one shareable bank: write arbiter, input mux, three read ports |
| `rtl/rr_channel_ctrl.sv` | six pointers, segment order, output multiplexer of one channel |
| `rtl/rr_alloc_ctrl.sv` | target split and slot-by-slot reconfiguration |
| `rtl/rr_fifo.sv` | plain FIFO of the Local input |
| `rtl/rr_route_xy.sv` | XY routing unit with header rewrite and wormhole route register |
| `rtl/rr_crossbar.sv` | 5x5 crossbar with a round-robin arbiter per output |
| `rtl/rr_arbiter.sv` | round-robin arbiter |

To change the buffer size, set `DEPTH` on `rr_router` (at least 2). To
change the payload width, edit `rr_pkg::DATA_W`; the header layout in
`rr_route_xy` assumes 8 bits.
