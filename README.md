# A fine-grained FPGA fabric for bit-sliced datapaths

This is a small island-style FPGA. The logic block is built for
arithmetic datapaths: adders, subtractors, comparators, absolute-value
units and 2:1 multiplexers, laid out as bit slices. It is not built for
random logic. Each logic block is an **nlb** ("new logic block"). An nlb
holds two 2-bit slices. Each slice can act as:

- a full adder or subtractor of 2-bit operands;
- a 2-bit 2:1 multiplexer;
- two 4-input functions.

The two slices can also be combined into 5- and 6-input lookup tables.
The carry passes from one tile to its east neighbour over a dedicated
direct connection, so a ripple-carry chain does not use the general
routing.

The architecture follows the thesis *Architectures and placement
algorithms for fine-grained reconfigurable computing*. That work
describes the logic block and routing elements at the level of an FPGA
architecture description. It evaluates them with placement and routing
experiments on one datapath benchmark, a direction detector. This RTL
makes that architecture a concrete, configurable, simulatable circuit. It
also adds the details the architecture description leaves open:

- the configuration memory;
- the way pass switches are modelled;
- the bit encodings.

All such additions are marked below as design choices.

Default size: 6 x 23 tiles, 12 tracks per channel and 24 I/O pads per
edge position. This is the array the benchmark was placed and routed on,
at the minimum channel width reported for single-length wires with
bit-sliced placement.

## The nlb logic block

`nlb.sv`, `nlb_slice.sv`, `and_plane.sv` and `local_crossbar.sv`
implement the nlb.

### Pins

The block has 15 logic input pins plus a clock, and 6 outputs:

| Group | Pins |
|---|---|
| Slice A major inputs | A0-A3 |
| Slice A extension inputs | EA0, EA1 |
| Slice A carry-in / 5-LUT select | ICA |
| Slice B (same pattern) | B0-B3, EB0, EB1, ICB |
| Shared control | IC |
| Major outputs | O0-O3 |
| Carry outputs | OCA (slice A), OCB (slice B) |

Every pin meets the routing on one fixed side of the tile:

| Side | Inputs | Outputs |
|---|---|---|
| top | A0, EA0, B0, IC | O0 |
| right | A1, B1, EB0, ICB | O1, OCB |
| bottom | A2, EA1, B2 | O2 |
| left | A3, ICA, B3, EB1 | O3, OCA |

The east direct connection joins OCB of tile (x,y) to ICA of tile (x+1,y).

### Slice

A slice has two 16-entry truth tables, one per output. The table index is
{i3,i2,i1,i0}. With `arith` set, the outputs are instead the two sum bits
of x + (y xor s) + cin, with:

- x = {i1,i0};
- y = {i3,i2};
- s = the ADD/SUB control.

This matches the pin assignment of ADD mode: A0 = x[0], A1 = x[1],
A2 = y[0], A3 = y[1]. A subtraction is `s = 1` together with carry-in 1
(two's complement).

Each slice's ADD/SUB control is a constant 0, a constant 1, or the IC pin.
When IC drives it, one configuration can add and subtract at run time.

Each slice's carry-in comes either from its own control pin (ICA or ICB)
or from the other slice's carry-out. Configurations that can result:

- A before B: a 4-bit adder in one tile, carry out on OCB.
- B before A.
- Two independent 2-bit adders.

Configuring both slices to take the other slice's carry closes a
combinational loop. A configuration must not do that.

### AND plane (MUX mode)

The four major inputs pass through an AND plane before the slice. Inputs
0 and 2 can be ANDed with an extension pin (EA0 or EA1). Inputs 1 and 3
can be ANDed with the inverse of one. With the slice set to
`out0 = i0 | i1` and `out1 = i2 | i3`, and pins A0 = x0, A1 = y0,
A2 = x1, A3 = y1, the slice computes `sel ? x : y`. That is the 2-bit
multiplexer of the multiplexer mode.

### Wide LUTs

- **5-input LUT:** ICA (or ICB) selects between the two outputs of its
  slice. This makes a 5-input LUT out of the two 16-entry tables.
- **6-input LUT:** IC selects between the two 5-input results.

### Output crossbar

A local crossbar drives each of O0-O3 from one of seven sources, or 0:

- the four slice outputs;
- the two 5-input results;
- the 6-input result.

Each major output has an optional D flip-flop. It has an asynchronous
active-low reset and resets to 0, and it adds one clock of latency.

## Routing

Routing is in `switch_box.sv`, `track_driver.sv`, `ipin_cbox.sv`,
`direct_mux.sv` and `io_pad.sv`, wired up by `fpga_fabric.sv`.

### Channels and segments

Horizontal channels `chx(x,y)` run above tile row y (y = 0..NY). Vertical
channels `chy(x,y)` run right of tile column x (x = 0..NX). Every channel
segment spans one tile (length-1 wires) and holds `CHAN_W` tracks.

A switch box sits at every channel crossing. Its sides are:

- left = chx(x,y);
- top = chy(x,y+1);
- right = chx(x+1,y);
- bottom = chy(x,y).

Switch boxes are *disjoint*: track t connects only to track t. A net
therefore keeps one track number from source to sink.

### How bidirectional switches are modelled

A real FPGA joins segments with bidirectional pass transistors or
tri-state buffers. This RTL gives every segment track exactly one driver
multiplexer (`track_driver`) instead. The multiplexer selects one of:

- nothing, so the track is 0;
- the value the switch box at the segment's low end offers;
- the value the switch box at the high end offers;
- one of the output pins facing the segment: O0/O2 of the tiles above and
  below, O1/OCB and O3/OCA of the tiles left and right, or an I/O pad.

The switch box (`switch_box`) produces the "offered" values. For each
side and track it selects which other side's segment to forward, if any.
A routed net is therefore a tree of one-way paths from its source, which
is what a router produces on pass switches. Signal direction is a
configuration choice.

One property follows from this model. The routing mesh is full of
combinational paths that form loops when a configuration closes them (for
example segment a takes b while b takes a). Lint tools report these paths
as circular logic. They are inherent to any programmable interconnect; a
valid configuration has no such loop.

### Full and half switch boxes

With `HALF_SB = 0`, the four segments meeting at a track are joined by
six switches, one for every pair of sides.

With `HALF_SB = 1` (the "half" switch box), only three switches are kept:

- left-right;
- top-bottom;
- right-bottom.

The other turns need two switches and pass through a third segment.
Example: bottom to left goes bottom -> right -> left, using the right
segment on the way. This saves switches and capacitive load. In exchange
the routing is less flexible.

Design choice: this RTL turns the three-switch fragment by 90 degrees
from one track number to the next, so track t uses the fragment rotated
by t mod 4. If every track had the same orientation, no net could leave
the bottom I/O channel upward. With rotation, every turn exists on some
track. The cost of the half box is visible in the tests: on a given track
a net can make only turns of one orientation, so the router must pick its
track with more care.

### Connection boxes

Connection boxes are fully populated (Fc = 1):

- Each input pin multiplexer (`ipin_cbox`) can pick any track of the
  channel on the pin's side. It can also pick constant 0 or 1.
- The ICA pin's multiplexer can also take the direct connection from the
  west neighbour (`direct_mux`).
- Every output pin can drive any track of its segment.

Tying a pin to a constant is part of the architecture. It lets a
subtractor's first carry-in be 1 without routing.

### I/O pads

`IO_RAT` pads per edge position line the four sides of the array. A pad is:

- unused;
- an input, which drives its channel segment like an output pin;
- an output, which reads one track of its segment.

Either direction can go through a flip-flop. Design choice: the pad
register, and the separate `pad_o` / `pad_oe` / `pad_i` signals, which
stand in for a bidirectional pad.

## Configuration

Design choice: the configuration interface. The architecture only
requires that "configuration bits" set every switch and table. This RTL
uses a simple word-addressed frame bus: `cfg_we`, `cfg_addr[15:0]` and
`cfg_data[255:0]`.

Every configurable element owns one frame (`cfg_frame.sv`):

- each tile (connection boxes plus nlb, 156 bits);
- each switch box;
- each channel segment's drivers;
- each pad position (IO_RAT pads x 7 bits).

A write with a frame's address loads the frame on the rising clock edge.
All frames clear to zero on reset, and zero means "unused" everywhere, so
a reset array is idle.

Frame layouts are the packed structs in `fpga_pkg.sv`: `tile_cfg_t`,
`sb_cfg_t`, `chan_cfg_t` and `pad_cfg_t`. Addresses come from
`addr_clb`, `addr_sb`, `addr_chx`, `addr_chy` and `addr_pad`, in that
order:

1. tiles, row by row;
2. switch boxes;
3. horizontal segments;
4. vertical segments;
5. pad positions: bottom, top, left, right.

The default array has 669 frames.

## Files

| File | Contents |
|---|---|
| `rtl/fpga_pkg.sv` | Sizes, pin and side enums, configuration structs, address map |
| `rtl/fpga_fabric.sv` | Top: the NX x NY array with channels, switch boxes, segment drivers and pads |
| `rtl/clb_tile.sv` | One tile: configuration frame, 15 input connection boxes, nlb |
| `rtl/nlb.sv` | Logic block: two slices, carry and ADD/SUB multiplexers, 5/6-LUT multiplexers, crossbar, output flip-flops |
| `rtl/nlb_slice.sv` | 2-output 4-input LUT / 2-bit adder-subtractor |
| `rtl/and_plane.sv` | Gating of the major inputs by the extension pins |
| `rtl/local_crossbar.sv` | 7-source to 4-output crossbar |
| `rtl/ipin_cbox.sv` | Input-pin connection box (track, constant or direct) |
| `rtl/direct_mux.sv` | Direct connection switch in front of an input pin |
| `rtl/switch_box.sv` | Full or half disjoint switch box |
| `rtl/track_driver.sv` | Driver multiplexers of one channel segment |
| `rtl/io_pad.sv` | Configurable I/O pad with optional register |
| `rtl/cfg_frame.sv` | One configuration frame on the frame bus |

Parameters of `fpga_fabric`: `NX` = 6, `NY` = 23, `IO_RAT` = 24,
`HALF_SB` = 0. The channel width `CHAN_W` = 12 is a package constant
because the configuration structs depend on it.

## Where the RTL departs from the architecture description

- **Pads per position.** The text asks for 8 pads per column (two 8-bit
  operands, 4 bits per column). The architecture file it used sets 24.
  The RTL follows the 24, and 8 fit inside it.
- **Two segment types, one model.** Half the wires of the evaluated
  architecture are pass-transistor switched and half are tri-state-buffer
  switched. Both are logically identical here. Switch strengths, delays
  and areas are not modelled.
- **Wire length.** Only length-1 segments are built. The L = 2 and L = 4
  variants of the experiments would need segments that bypass switch
  boxes.
- **Connection box patterns.** Sparse (Fc < 1) patterns, including the
  "balanced" connection box, are not built. The benchmark architecture
  uses full connection boxes.
- **Clock.** There is no clock network: one `clk` port feeds every
  flip-flop.
- **Choices made for this RTL.** These were all chosen here: the
  configuration bus, the pad register, reset values, the crossbar's
  constant-0 source, the 0/1/IC encoding of ADD/SUB, and the per-track
  rotation of the half switch box.

## Capacity

The direction-detector benchmark fits the default array. It needs:

- 55 logic blocks, against 138 tiles;
- 16 inputs, against 144 bottom pads;
- 2 outputs, against 144 top pads.

Its bit-sliced placement routes with 12 tracks per channel. The
placements produced without the bit-slice constraint needed 13 tracks,
which this channel width does not provide.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Verilator 5 example:

```
verilator --binary --timing -Irtl -Itb rtl/fpga_pkg.sv tb/tb_nlb.sv --top-module tb_nlb -Mdir obj -o sim
./obj/sim
```

The two fabric tests also need `tb/fabric_image_pkg.sv` on the command
line, after `rtl/fpga_pkg.sv`. Expect UNOPTFLAT warnings from the routing
mesh and the nlb carry multiplexers; the section on bidirectional
switches explains why. Pass `-Wno-fatal` or `-Wno-UNOPTFLAT`.

`tb/fabric_image_pkg.sv` contains a small router and configuration-image
builder. It holds a configuration for every frame. It routes a net on
one track by breadth-first search over the segments, obeying the full or
half switch-box rules, and it writes every driver select, switch-box
select, pin select and pad setting along the way. `frames()` lists the
frames for loading.

On top of it sit two fabric tests.

**`tb_fpga_fabric`** builds the same three circuits on a 4 x 3 array
with 12 pads per position, once with full and once with half switch
boxes:

- an 8-bit subtractor over two tiles, with the carry over the direct
  connection and a >= b on a pad;
- a registered 2-bit multiplexer;
- a random 6-input function behind a registered pad.

It loads both configurations over the bus and checks 300 random vectors.
It also counts the mechanisms it exercises:

- direct-carry propagation with and without a carry;
- both mux selections;
- both halves of the 6-LUT;
- registered outputs;
- switch-box turns.

It also checks that the half image uses only switches a half box has.

**`tb_fpga_fabric_full`** runs the same flow on the array at its default
size, with no parameter overrides. It compiles in about 5 minutes and
simulates in seconds.

Not simulated: the direction detector itself. Its gate-level netlist is
not available, so capacity is established by counting, not by running
it.
