# Five-port NoC router with dual-clock channel FIFOs

A network-on-chip connects the cores of a system-on-chip through small
routers instead of a shared bus. This router sits at one tile of a 2D mesh.
It has four neighbour channels (north, east, south, west) and one local
channel for the tile's own processing element, all joined by a 5x5 crossbar.
The main idea is that **every channel has its own clock on its input side**.
Each channel starts with a FIFO whose write side runs on the sender's clock
and whose read side runs on the router clock. A sender that is faster or
slower than the router therefore loses no data. Flits are steered by
dimension-ordered **XY routing**, which cannot deadlock in a mesh.

The router is the main block. `noc_mesh` tiles sixteen of them into a 4x4
mesh, which is the top of the design. The design is plain synthesizable
SystemVerilog (IEEE 1800-2017). Its default sizes are small: four-flit FIFOs
and 12-bit flits.

## Block structure

```
              clk_in[N] din[N]            dout[N]
                    |                        ^
        +-----------v------------------------|-----------+
        |  input_channel N                   |           |
        |  (async_fifo + xy_route)           |           |
  W --->|  input_channel W    +---------+   mux4 (out N) |---> E
        |  input_channel E -->| crossbar|-> mux4 (out E) |
  E --->|  input_channel S    |  5 x 5  |-> mux4 (out S) |---> W
        |  input_channel L    +---------+   mux4 (out W) |
        |                      rr_arbiter x5, mux4 (out L)|
        +------------------------------------------------+
```

| module          | role |
|-----------------|------|
| `noc_mesh`      | top: 4x4 mesh of routers |
| `noc_router`    | one router: five channels, five arbiters, crossbar |
| `input_channel` | one channel's input side: dual-clock FIFO, route computation, U-turn discard |
| `async_fifo`    | FIFO with separate write and read clocks; full, half-full and empty flags |
| `mem_buffer`    | the FIFO's storage array: synchronous write, combinational read |
| `write_ctrl`    | write pointer, full and half-full flags (write clock) |
| `read_ctrl`     | read pointer and empty flag (read clock) |
| `gray_sync`     | two-flop synchronizer for a Gray-coded pointer |
| `xy_route`      | XY route computation |
| `rr_arbiter`    | round-robin arbiter, one per output |
| `crossbar`      | 5x5 switch built from five `mux4` |
| `mux4`          | 4:1 multiplexer in AND-OR form |
| `noc_pkg`, `gray_pkg` | shared types, constants and Gray-code functions |

## The dual-clock channel FIFO

This is the part that needs the most care, because it is the only place
where two clock domains meet.

`async_fifo` is made of three parts: a storage array (`mem_buffer`), write
control logic (`write_ctrl`) and read control logic (`read_ctrl`). Its port
names are `data_in`, `write_to_stack`, `clk_write`, `rst`, `stack_full`,
`stack_half`, `stack_empty`, `data_out`, `read_from_stack` and `clk_read`.

- **Pointers.** Each side keeps a binary pointer that steps by one per access.
  The pointer is one bit wider than the memory address. Equal pointers mean
  *empty*. Pointers that differ by exactly `DEPTH` mean *full*. `DEPTH` must
  be a power of two.
- **Crossing.** Each pointer is also kept as a Gray-coded register, so that
  only one bit changes per step. Only the Gray copy goes to the other domain.
  There it passes through two flip-flops (`gray_sync`) and is turned back to
  binary. A pointer seen in the other domain may therefore be a few cycles old
  but is never corrupt.
- **Flags are pessimistic.** The write side may see the FIFO as fuller than
  it is, and the read side may see it as emptier. Neither can overflow or
  underflow it.
- **Timing.** The write side stores `data_in` on a rising `clk_write` edge
  when `write_to_stack` is high and `stack_full` is low. On the read side,
  `data_out` shows the oldest word whenever `stack_empty` is low; this is
  first-word fall-through, and `data_out` is zero when the FIFO is empty. A
  rising `clk_read` edge with `read_from_stack` high removes that word. A
  word written into an empty FIFO reaches `data_out` after two or three
  `clk_read` edges.
- `stack_half` is high while at least `DEPTH/2` words are held, as seen from
  the write side.
- The storage array has a single clock, which is the write clock. Its read
  port is combinational, so the read domain needs no clock to see the head
  word.
- `rst` is asynchronous and active high. It must be held for a few edges of
  both clocks.

## Routing, arbitration and the crossbar

**Flit format.** A packet is a single 12-bit flit: `{dst_x[1:0],
dst_y[1:0], payload[7:0]}` (`noc_pkg::flit_t`). There are no head or tail
flits.

**Routing.** `xy_route` compares the destination with the router's own
coordinates (`X_POS`, `Y_POS`). A flit first moves along X: east if the
destination column is larger, west if it is smaller. Once the column
matches, it moves along Y: north if the row is larger, south if smaller. It
leaves through the local port when both coordinates match. No Y-to-X turn
is possible, and that is what keeps a mesh of these routers deadlock-free.

**Arbitration.** Each input channel requests exactly one output, the one its
head flit routes to. Each output has an `rr_arbiter` over the four *other*
channels:

- A request only counts while that output's `out_full` is low.
- The winner's head flit goes through the crossbar and is popped from its
  FIFO on the same clock edge.
- The arbiter's priority pointer then moves just past the winner. Each
  waiting channel is therefore served within four grants.

**Crossbar.** A flit never leaves through the port it entered, so each of
the five outputs needs only a 4:1 multiplexer (`mux4`). For output `o`,
select value `k` means input `k` if `k < o`, and input `k+1` otherwise
(`noc_pkg::sel_to_in`).

**U-turns.** A head flit whose route is its own input port would be a
U-turn. Correctly addressed XY traffic never produces one. The channel
discards such a flit in one cycle and pulses `drop[p]`.

## Interface of `noc_router`

Ports are arrays indexed by `noc_pkg::port_e`: N=0, E=1, S=2, W=3, L=4.

| port | dir | width | clock | meaning |
|------|-----|-------|-------|---------|
| `clk` | in | 1 | – | router clock |
| `rst` | in | 1 | async | reset, active high |
| `clk_in` | in | 5 | – | clock of each sender |
| `din`, `din_valid` | in | 5 x 12, 5 | `clk_in[p]` | flit written when `din_valid[p]` is high and `in_full[p]` is low |
| `in_full`, `in_half` | out | 5, 5 | `clk_in[p]` | channel FIFO full / half full |
| `dout`, `dout_valid` | out | 5 x 12, 5 | `clk` | a flit for the receiver; the receiver must take it on this rising edge |
| `out_full` | in | 5 | `clk` | receiver cannot accept; no flit is offered while it is high |
| `drop` | out | 5 | `clk` | U-turn flit discarded |

To chain routers into a mesh:

- Connect `dout`/`dout_valid` of one router to `din`/`din_valid` of its
  neighbour.
- Connect the neighbour's `in_full` back to `out_full`.
- Feed the upstream router's `clk` to the neighbour's `clk_in` for that
  channel.

**Throughput and latency.** Each output carries at most one flit per
router clock. With the output free, a flit takes two to three router clock
edges from the sender's write edge to `dout_valid`. This is the latency of
the FIFO's synchronizer.

## The mesh: `noc_mesh`

`noc_mesh` places `MESH_X` x `MESH_Y` routers (default 4x4). The router in
column x, row y has coordinates (x, y) and tile index `t = y*MESH_X + x`.

- **Links.** Each router's east output feeds the west input of its east
  neighbour, and its north output feeds the south input of the router above.
  The opposite directions are wired the same way. Each link carries the flit,
  its valid bit and, going back, the receiving FIFO's full flag.
- **Clocks.** All routers and links run on one mesh clock `clk`. Only the
  local channels cross clocks: each processing element writes on its own
  `clk_in_l[t]`.
- **Local ports.** Per tile the mesh brings out `din_l`, `din_valid_l`,
  `in_full_l`, `in_half_l` (on `clk_in_l[t]`) and `dout_l`, `dout_valid_l`,
  `out_full_l` (on `clk`), with the router's handshake. `drop[t]` has the
  five U-turn drop pulses of tile t.
- **Boundary channels** have idle inputs, and their outputs are always
  accepted and left open. A flit addressed outside the mesh would leave there
  and be lost. This can only happen in a mesh smaller than 4x4, because the
  2-bit coordinates address exactly 4x4.
- **Latency.** A flit crosses one channel FIFO per router it enters, at two
  to three mesh clock edges each. From corner to corner (six hops, seven
  FIFOs) that is 14 to 21 edges when nothing is in the way.
- **Order.** XY routing gives each source/destination pair a single path, so
  flits between one pair arrive in the order they were sent.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size (`noc_mesh`), at most 4 each with 2-bit coordinates |
| `DEPTH` | 4 | FIFO locations per channel |
| `X_POS`, `Y_POS` | 1, 1 | router tile coordinates |
| `NUM_PORTS` | 5 | `noc_pkg` (fixed by the crossbar structure) |
| `COORD_W`, `PAYLOAD_W` | 2, 8 | `noc_pkg`; change them to widen the flit |

## What follows the source description and what is this design's own

Taken from the description this design follows:

- four neighbour channels and a local channel around a 5x5 crossbar;
- a FIFO per channel with separate write and read clocks;
- binary read and write pointers that step by one;
- the full and empty rules;
- a FIFO of four locations;
- the port names of the FIFO and of its memory;
- the AND-OR 4:1 multiplexer;
- XY routing;
- arbiters as part of the router;
- building the network from these routers.

One structural difference: the reference drawing puts each output's
multiplexer inside its channel. Here the five output multiplexers sit
together in `crossbar`. The circuit is the same.

Chosen here, because the description does not give them:

- the flit format and width;
- the Gray-coded pointer crossing with two-flop synchronizers;
- the half-full threshold;
- round-robin arbitration;
- the valid/full handshake between routers;
- the discarding of U-turn flits;
- the asynchronous active-high reset;
- which direction counts as east and north;
- the mesh size and the handling of boundary channels.

The description calls its routing an "extended" XY algorithm without
saying what is extended, so plain XY routing is used. It also mentions power
gating to cut leakage. That is a physical implementation technique with no
logic given, so it is not part of this RTL. The description further claims
that the router reconfigures itself at run time, for example its switching
mode and packet size, but gives no mechanism for it. This router's
configuration is fixed at elaboration. The network interface that would
packetize a core's data is not part of the design either: the local channel
is brought out as ports.

Size after coarse synthesis, at the defaults: one router has 130 flip-flop
bits plus 240 bits of FIFO storage, and 157 signal pins. The 4x4 mesh has
1744 flip-flop bits plus 3072 storage bits. Such a router fits a small FPGA
like a Spartan-3E XC3S500E (9312 registers, 232 user I/O).

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. To run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/noc_pkg.sv rtl/gray_pkg.sv tb/tb_noc_router.sv --top-module tb_noc_router
./obj_dir/Vtb_noc_router
```

Swap in `tb_noc_mesh` for the mesh. Both end-to-end testbenches use every
default parameter.

`tb_noc_mesh` is the test of the whole design.

- Each of the sixteen processing elements sends 120 random flits to random
  tiles, on its own clock, while the receivers block at random.
- Every flit must reach the right tile unchanged, in order per
  source/destination pair, with none lost after the mesh is drained.
- Self-addressed flits must be dropped instead.
- It also measures the corner-to-corner latency.
- It fails unless each of these happens at least once: a local FIFO full, a
  mesh link blocked by a full neighbour, output contention inside a router, a
  receiver blocking, a drop, and a six-hop delivery.

`tb_noc_router` tests a single router at its default parameters.

- **Latency.** It first checks the latency of a single flit through an idle
  router.
- **Random traffic.** All five senders then send at once, each on its own
  clock; some are faster and some slower than the router. The receivers
  raise `out_full` at random.
- **Checking.** The testbench works out each flit's output with its own copy
  of the XY rule. It checks that every flit arrives on the right port,
  unchanged and in order per input/output pair, and that nothing is lost.
  Flits addressed back to their own input must produce a `drop` pulse
  instead.
- **Mechanisms.** It counts how often each mechanism happens and fails if one
  never does: input FIFO full, half-full flag, output blocked, two or more
  inputs competing for one output, U-turn drop, and crossings from faster and
  from slower clocks.

The block testbenches are:

- `tb_async_fifo`: dual-clock FIFO at three clock ratios, plus a latency check.
- `tb_write_ctrl`, `tb_read_ctrl`: pointers, flags and synchronizer delay.
- `tb_mem_buffer`: the storage array.
- `tb_input_channel`: routing requests and U-turn discard.
- `tb_rr_arbiter`: the round-robin order.
- `tb_crossbar`: the select mapping.
- `tb_xy_route`: every destination of a 4x4 mesh.
- `tb_mux4`: the multiplexer.
