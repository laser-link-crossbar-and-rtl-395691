# Defect-avoiding wafer-scale bus: laser-link crossbars and omega networks

A wafer-scale system is built from many copies of each circuit block
("cells"). Some cells, and some bus tracks, come out of fabrication defective,
so the bus that joins the cells has to be able to route around the bad ones.
There are two ways to do that:

* **Permanent laser links.** The bus crosses itself in crossbar arrays of
  link sites. After wafer test a laser melts selected gaps, which joins a
  horizontal track to a vertical one, or it cuts a metal track. Such a bus is
  small and fast, but it cannot change once the system is in service.
* **Electronic switches.** An omega network of transmission-gate "full
  switches" sits between groups of cells. A shift-register control string
  programs it. It can be re-routed at any time, even in service. The cost is
  area, speed, and a new weakness: one bad switch can take down the whole bus.

This RTL implements both kinds of network: a grid bus built only from laser
links, and a string of programmable omega networks. It also implements a combined bus
that uses each technique where it is strongest. It is a string of 8 × 8 omega
networks. A laser-link bypass around each omega network removes the single
point of failure. Laser-linked spare tracks between the networks give 20 %
track redundancy without doubling the omega networks. A row of full switches
puts each cell on the bus or passes it by.

The RTL is a logical model. Resistance, delay and power of the links and
transmission gates are outside it (see *Limits of the model*).

## How a bus line is modelled

The physical networks are passive. A transmission gate or a laser link either
joins two wires or leaves them apart, and a wire joined to nothing floats. In
the RTL every bus line is therefore a `wsi_pkg::line_t`:

| field | meaning |
|-------|---------|
| `drv` | 1 if something drives the line, 0 if it floats |
| `val` | the logic value; always 0 when `drv` is 0 |

If several sources end up wired onto one line, the model ORs their driven
values (`line_merge`). `line_gate(a, on)` is a line seen through a link or
gate that may be open. Every data path in the design is combinational. Only
the control string has flip-flops.

The omega bus is **unidirectional**. The real transmission gates and links
carry signals both ways. A two-state model of such nets would need
combinational loops: an omega network whose switches are in the
"inputs-joined" state already forms one. So in the model, signals flow from
the omega inputs to its outputs and from the left to the right of the bus.

The crossbars and the laser-link bus system are different: they contain
only links, with no gates and no control. There, every line has a driver
input and reads back its whole net, in either direction. `link_net` finds the
nets by propagating values across a link array between two sets of lines,
`a` and `b`. One round crosses the links from `a` to `b` and then back. A
chain that visits `k` of the `b` lines needs `k + 1` rounds, so
`min(NA, NB) + 1` rounds cover every chain. The logic is therefore a fixed
cascade with no loop.

## The full switch (`full_switch`)

The full switch has four terminals, N, W, S and E. Six transmission gates
join them, one gate for each pair of terminals. Three controls close the
gates two at a time:

| D0 D1 | C1 C2 C3 | joined | as a 2 × 2 element (N, W in; E, S out) |
|-------|----------|--------|----------------------------------------|
| 00 | 000 | nothing | off: both outputs float |
| 01 | 100 | N-W, S-E | inputs tied together, outputs tied together: nothing driven |
| 10 | 010 | W-S, N-E | **straight**: N→E, W→S |
| 11 | 001 | N-S, W-E | **exchange**: N→S, W→E |

The model treats N as the upper input, W as the lower input, E as the upper
output and S as the lower output. The controls are active high, as the
decoder produces them. The original circuit documentation also lists the same
control table with all three controls inverted (active low). If two or more
controls are set, all four terminals join, and both outputs carry the OR of
the driven inputs. The decoder never produces this, but the switch models it.

## The omega transfer block (`omega_transfer`)

An N × N omega network has log2 N identical stages. Each stage is a perfect
shuffle followed by N/2 full switches. For N = 8 that is 3 stages of 4
switches, 12 switches in a 3 × 4 array.

* **Shuffle.** The line at position `s1 s2 s3` moves to `s2 s3 s1` (a left
  rotation of the position bits).
* **Switches.** Switch `k` of a stage takes shuffled positions `2k` (its N
  input) and `2k+1` (its W input). It drives positions `2k` (E) and `2k+1`
  (S).
* **Indexing.** Switch `stage*4 + k` gets control word `c[stage*4 + k]`.
  Stage 0 is next to the inputs.

**Routing (destination tag).** To send input S to output `d1 d2 d3`, set the
switch the line meets in stage i so that the line leaves on the upper output
if `di = 0`, or on the lower output if `di = 1`. A line on a switch's upper
input gets *straight* (10) for 0 and *exchange* (11) for 1. A line on the
lower input gets the opposite.

Example: input 010 to output 110.

* Stage 0: the shuffle moves the line to position 100, the upper input of
  switch 2. `d1 = 1`, so switch 2 is set to exchange, and the line leaves at
  101.
* Stage 1: the shuffle moves it to 011, the lower input of switch 1.
  `d2 = 1`, so switch 1 is set to straight, and the line leaves at 011.
* Stage 2: the shuffle moves it to 110, the upper input of switch 3.
  `d3 = 0`, so switch 3 is set to straight, and the line leaves at 110.

Each input/output pair has exactly one path. So a mapping of several inputs
is realizable only if no switch is needed in two states. The network is
blocking, and not every permutation can be set up. `tb/omega_ref_pkg.sv`
holds this algorithm as `route()`, which the testbenches use as the reference.
With decoded controls an output is fed by one input at most; there is no
broadcast.

## Programming: the control string

Each full switch has its own **control block** (`omega_ctrl_block`). A control
block has three parts:

1. **Shift-register cell** (`ctrl_shift_cell`). This is a 2-bit register
   `R0 R1`. With `dprl` it loads its own pins `dp` (parallel load). With
   `left` it takes `leftin`, the contents of the cell to its right (left
   shift). Otherwise it holds. `dprl` wins if both are high.
2. **Steering flip-flop** (`steer_ff`). A 2-bit register that copies the
   shift register when `latch` is high. New data can therefore be shifted in
   while the switches keep their old setting.
3. **Decoder** (`ctrl_decoder`). It turns `D0 D1` into `C1 C2 C3`, as in the
   table above.

`omega_control` chains 12 control blocks, and `omega_network` puts the chain
together with the transfer block.

Serial data `sin = {D0, D1}` enters the **last** block (index 11) and moves
one block toward block 0 on each clock. So the pair for block 0 is sent first,
and after 12 shifts every block holds its own pair. One more clock with
`latch` high copies all twelve pairs into the flip-flops. The data path
changes right after that edge. Programming one omega network serially takes
13 clocks. A parallel load takes two: `dprl`, then `latch`. `sout` shows block
0's register, for chaining to a further string.

All registers use one rising-edge clock and an active-low asynchronous reset.
Reset clears every pair to 00, so after reset every switch is off and every
data output floats.

## Laser-link parts

All laser links and cuts are permanent. They are set once after wafer test,
so here they are static configuration inputs, one bit per link site.

* **Two-sided crossbar** (`ll_crossbar`). 8 horizontal × 8 vertical lines
  with a link at each of the 64 crossings. `link[i][j]` joins `h_i` and
  `v_j`. Each line has a driver (`h_drive`, `v_drive`) and a resolved value
  (`h_net`, `v_net`). A chain such as `h0 – v3 – h5 – v1` joins all four
  lines into one net.
* **One-sided crossbar** (`ll_crossbar_1s`). 16 port lines cross 8 internal
  buses, an 8 × 16 link array. A connection between ports `p` and `q` uses
  any free bus `b` and makes two links, `lk[p][b]` and `lk[q][b]`. A
  defective bus costs no connection. The buses have no driver of their own;
  `bus_net` shows what they carry.
* Both crossbars use `link_net` for their nets. When several drivers share a
  net, the model ORs their values.
* **Spare-line segment** (`spare_line_segment`). This is the bus between two
  omega networks: 8 regular tracks plus 2 spares. Every regular track has a
  cut site. Every spare has a link to each of the 8 left ports (`lin`) and
  each of the 8 right ports (`lout`). That makes 32 links and 8 cuts, the 40
  link sites of the original proposal. The exact placement is this design's
  choice. To replace track `i` by spare `k`, set `cut[i]`, `lin[k][i]` and
  `lout[k][i]`.
* **Omega bypass** (`omega_ll_node`). This is one link from each input line
  `i` to output line `i` of an omega network. If the network turns out bad,
  the links are made and the signals go straight through. The omega output
  stays wired in parallel. So a network that is bypassed must be held
  all-off: steering pairs 00, as after reset.

## The laser-link bus system (`ll_bus_system`)

This is the all-laser way to build the wafer bus. `ROWS × COLS` cells
(default 3 × 3) sit in a grid of bus channels. There are `ROWS + 1`
horizontal and `COLS + 1` vertical channels, each of `TRACKS` tracks
(default 8). At every crossing of two channels sits an 8 × 8 crossbar. Each
cell brings `PINS` pins (default 4) out on stubs. A stub crosses all tracks
of the vertical channel to the cell's left, with a link site at every
crossing.

A route from one cell to another is made from links only, for example:

```
pin (0,0).0 ─stub link─► v-channel 0, track 2 ─crossbar (1,0)─► h-channel 1, track 5
            ─crossbar (1,2)─► v-channel 2, track 6 ─stub link─► pin (1,2).1
```

A defective track is avoided by choosing another track for the route. A
track shorted to a supply spoils every signal linked onto it, so it must be
left out of every route. Nothing in the grid is active.

Link indexing:

* `xlink[x*TRACKS + i][j]` is the crossbar link at crossing
  `x = r*(COLS+1) + c`. It joins horizontal track `i` of channel `r` to
  vertical track `j` of channel `c`.
* `stub[p][t]` joins pin `p = (r*COLS + c)*PINS + k` of cell `(r, c)` to
  track `t` of vertical channel `c`.
* Track `n` of channel `ch` is line `ch*TRACKS + n` in `h_drive` and `h_net`
  (or `v_drive` and `v_net`).

The whole grid is one `link_net`. The horizontal tracks and the pins are on
one side, the vertical tracks on the other. This resolves every net of the
grid at once, however many crossbars a route passes. Resolving each crossbar
on its own and chaining them would need combinational loops.

## The cell tap (`cell_tap`)

A cell joins the bus through a row of 8 full switches, one per line. One
control block drives all eight, and that block is one link in the control
string. Each switch uses W as the bus from the left, N as the cell's output,
E as the bus to the right and S as the cell's input:

* steering 10 (W-S, N-E) **integrates** the cell: the bus feeds the cell, and
  the cell drives the bus on;
* steering 11 (W-E, N-S) **bypasses** the cell: the bus passes to the next
  omega network and the spare cells beyond it;
* steering 00 isolates both.

## Top level (`wsi_bus_top`)

```
bus_in ─► omega node 0 ─► spare segment 0 ─► cell tap 0 ─► omega node 1 ─► … ─► omega node NODES-1 ─► bus_out
          (12 ctl blocks)                    (1 ctl block)   (12 ctl blocks)
                                             │ ▲
                                      cell_in │ │ cell_out   (function block, outside)
```

`NODES` (default 2) is the number of omega networks in the row. Between two
neighbouring networks sit one spare segment and one cell tap. All control
blocks form a single chain, in left-to-right order: omega node 0 (chain
indices 0-11), tap 0 (12), omega node 1 (13-24), and so on. There are
`NCTL = 13*NODES - 1` blocks in all. Serial data `ctl_sin` enters at the right
end. `ctl_steer` shows every stored pair by chain index, and `ctl_dp` loads
them in parallel.

The laser-link bus system (`bs_*` ports, 3 × 3 cells) and the two single
crossbars (`xb_*`, `xb1s_*`) sit beside the omega bus with their own ports.
They are the other way of building the wafer bus and are not wired to the
omega string. The two-sided crossbar is the network found at each crossing
of the bus system, brought out on its own. The one-sided crossbar is another
layout of an 8 × 8 network.

Laser inputs: `bypass_link[NODES]`, `seg_cut / seg_lin / seg_lout[NODES-1]`,
`xb_link`, `xb1s_lk`. Crossbar drivers: `xb_h_drive`, `xb_v_drive`,
`xb1s_drive`. Resolved crossbar lines: `xb_h`, `xb_v`, `xb1s_port`,
`xb1s_bus`. The bus system's ports are those of `ll_bus_system` with a `bs_`
prefix. The spare tracks are visible on `seg_spare`.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. To
run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/wsi_pkg.sv rtl/link_net.sv tb/omega_ref_pkg.sv tb/tb_omega_network.sv \
    --top-module tb_omega_network -o sim
./obj_dir/sim
```

`tb_wsi_bus_top` runs the whole design at its default size. It programs the
25-block chain serially and in parallel, and checks the 26-clock serial
programming time. It integrates and bypasses the cell, replaces cut tracks by
spares, and takes omega node 1 out of service through its bypass links. It
also routes permutations through both crossbars. It makes cell-to-cell
routes through the laser-link bus system, half of them first over a shorted
track and then relinked around it. It counts each of these
mechanisms and fails if one never happened. The omega tests draw random
permutations and keep those that the network can realize. The expected
results come from the destination-tag routine, not from the RTL.

`tb_redundancy_workload` runs the redundancy cases of one 8 × 8 omega bus:
4, 6, 7 and 8 signals cross two omega nodes while one track between them is
defective (cut). First it shows that a signal routed over the bad track is
lost. With fewer than 8 signals, the free lines are the spares: both omega
nodes are reprogrammed so that no signal uses the bad track. With 8 signals
no line is free, and a laser-linked spare track carries the signal instead.

## Limits of the model, and choices that are this design's own

* **Direction and clocking.** The omega bus is unidirectional. Only the
  crossbars and the laser-link bus system resolve nets both ways (see
  above).
  The original shift register is a two-phase dynamic register. Here it is a
  static register on one clock.
* **Control polarity.** The controls are active high. An active-low
  implementation would invert `C1..C3`.
* **Select block.** The original control block names a select block that
  picks which node latches. The first built version left it out, and so does
  this design: one `latch` signal serves the whole chain. The shift
  register cell belongs to a family that can also shift right. Like the
  first built version, this one uses only parallel load and left shift, and
  holds its value otherwise.
* **Not modelled.** Link resistance (about 76 Ω for a made link, about 837 Ω
  through the omega transfer block), delays (about 20 ns rise and 13 ns fall
  through the omega block), power and area are analog properties. They are
  outside this model. The optional output buffer after an omega network is
  logically a wire and is not included. The laser links themselves, and the
  laser equipment, appear only as configuration bits.
* **Not built.**
  * The exact track and stub layout of a laser-link bus grid: it is a
    matter of layout, so the grid here uses a regular arrangement (below).
    The 4 × 5 grid needs `ROWS = 4, COLS = 5`.
  * The two-level bus (laser crossbars below, omega networks above) is only
    sketched in the original work.
  * The function blocks are the user's circuits.
  * Several rows of omega strings, with lines between rows and to the I/O
    pins, are only outlined in the original work; this design builds one row.
* **Own choices.**
  * The number of omega networks in a row (2).
  * The order segment-then-tap between two networks.
  * The link placement in the spare segment.
  * Which terminals of the cell-tap switches face the bus and which face the
    cell.
  * Treating lines wired together as an OR.
  * In the bus system: the channels around every cell, the stubs reaching
    only the vertical channel to the cell's left, and 4 pins per cell.
  * In the bus system: tracks that run unbroken across the grid. The grid
    has no cut sites along its tracks, so one track carries one net.
