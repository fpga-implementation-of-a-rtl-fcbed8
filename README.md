# L3M: a multilayer maze-routing accelerator in SystemVerilog

Maze routing with the Lee algorithm finds the shortest wire between two
grid points around obstacles. It works in three phases:

* **Expansion.** A wavefront grows out from the source. Each node it reaches
  records which way it was reached.
* **Backtrace.** From the target, the recorded directions are followed back
  to the source. The nodes on the way become obstacles for later wires.
* **Cleanup.** The remaining labels are erased.

In software, expansion costs O(d²) node visits for a wire of length d, and
cleanup costs one visit per grid node.

This RTL implements L3M, a *full-grid* accelerator for this algorithm. There
is one small processing element (a *cell*) per (x, y) point of the routing
grid. All nodes at distance k from the source are labelled in the same step,
so expansion takes time proportional to d, and cleanup is one broadcast
command. The third dimension, the routing layers, is time-multiplexed. Each
cell keeps the states of all NL layers of its (x, y) column in a small shift
register and processes one layer per clock, bottom to top. This lets an
NX × NY array of cells route on an NX × NY × NL grid. The cost is that a
wavefront step takes about NL clock cycles instead of one.

The design follows the published L3M architecture:

* the cell with its layer shift register;
* the state table of the cells;
* the row, column and layer selection;
* the control unit's datapath;
* the vertical-preference signal PFV, which speeds up the backtrace.

The encodings, the host byte protocol and some timing details are this
design's own choices. They are listed under "Departures and open points".
The default size is the prototype's 8 × 8 × 4 grid.

## Cells and their states

A cell's state, for each layer, is one of eight 3-bit codes:

| code | state | meaning | backtrace step from here |
|---|---|---|---|
| 0 | E  | empty | trace fails |
| 1 | BL | blocked: an obstacle or a routed wire | trace fails |
| 2 | XE | expanded through EI, from the west neighbour | x − 1 |
| 3 | XW | expanded through WI, from the east neighbour | x + 1 |
| 4 | XN | expanded through NI, from the south neighbour | y + 1 |
| 5 | XS | expanded through SI, from the north neighbour | y − 1 |
| 6 | XU | expanded from the node on the layer above | z + 1 |
| 7 | XD | expanded from the node on the layer below | z − 1 |

Coordinates: x grows eastward and y grows southward, so row 0 is the north
edge. The horizontal names describe the direction the wavefront was moving,
which is the reverse of the backtrace step. Each cell's output XO means "my
state is expanded". XO drives four inputs:

* WI of the west neighbour;
* EI of the east neighbour;
* NI of the north neighbour;
* SI of the south neighbour.

For example, a cell in state XE was reached by its west neighbour, so the
backtrace moves west.

The cells obey a 2-bit command broadcast on the CMD bus:

| CMD | selected cell | unselected cell |
|---|---|---|
| CLEAR  | → E | an expanded cell → E; E and BL are kept |
| SET    | → XE (marks the source) | unchanged |
| EXPAND | an E cell becomes expanded if a neighbour is; it pulls STATUS[0] low while expanded | same, without STATUS[0] |
| TRACE  | drives its code on STATUS, then → BL | unchanged |

Under EXPAND, an E cell checks its neighbours in the order EI, WI, NI, SI,
then the layer above, then the layer below. The first one found expanded
decides the new state. Two preference bits gate the horizontal inputs: PF[1]
for east–west and PF[0] for north–south. Clearing one of them biases routing
toward the other direction. The control unit drives PF from a per-layer
table, `pf_in[z]`, indexed by the layer being processed. A layer can
therefore be restricted to horizontal-only or vertical-only wiring, as
routing layers with a preferred direction are.

A cell entering an expanded state pulls STATUS[1] low. CLEAR with nothing
selected is the one-cycle cleanup: it erases labels and keeps obstacles.

STATUS is a 3-bit wired-NOR bus: each bit is low if any cell pulls it low.
In RTL it is the AND of all cells' drives. The bits mean different things
under different commands:

* **Under EXPAND**, STATUS[1] high means no cell changed on this cycle, and
  STATUS[0] low means the selected target has been reached.
* **Under TRACE**, only one cell is selected, so the bus carries that cell's
  3-bit code.

## Time-multiplexing the layers (the hard part)

`l3m_cell` holds the state of the current layer in **ST0**. The other NL−1
layers wait in a shift register. On each clock, with PFV = 1:

* the sequencer's next state goes into the top stage of the shift register;
* the bottom stage moves into ST0;
* the layer counter in the control unit advances. Its /TOP output goes low
  while layer NL−1 is processed.

Every cell of the array processes the same layer on the same cycle. So XO,
EI, WI, NI and SI always refer to nodes on a single layer.

The vertical neighbours come from two places:

* **HI (node above)** is "the bottom stage of the shift register is
  expanded". That stage holds layer z+1. It is masked by /TOP, so the top
  layer does not see layer 0 as its upper neighbour.
* **LI (node below)** is "ST0 was expanded", registered for one cycle and
  masked by /TOP. On the next cycle, while layer z+1 is processed, it says
  whether layer z was expanded *before* its latest update.

The resulting wavefront timing decides several numbers in the control unit.
A node entered on cycle t passes the label on as follows:

| move | cycles after t |
|---|---|
| to the same layer, horizontally | NL, when the layer comes round again |
| to the layer below | NL − 1 |
| to the layer above | NL + 1 (LI sees the new state only on the layer's next visit) |

The wavefront therefore advances one node per layer visit, and a route of
length d expands in about d·NL cycles. No cell changes for at most NL
consecutive cycles while the wavefront is still alive. So the control unit
declares an expansion failure (XFAIL) only after NL+1 cycles in a row with
STATUS[1] high.

**PFV = 0** freezes the rotation. The shift register, the LI flip-flop and the
layer counter hold, and the next state goes straight back into ST0, so the
same layer is processed again on the next cycle. The control unit uses this
to speed up the backtrace. Backtrace cost per step:

| step | USE_VP = 1 | USE_VP = 0 |
|---|---|---|
| horizontal | 1 cycle (PFV driven low on that cycle) | NL cycles |
| up | 1 cycle (the next layer arrives anyway) | 1 cycle |
| down | NL − 1 cycles | NL − 1 cycles |

With USE_VP = 1, PFV is computed combinationally from the STATUS code in the
same cycle. This adds a path from the STATUS bus through the control unit to
every cell; the original FPGA version with this feature needed a slower clock
(45 ns instead of 41 ns). PFV is also held low whenever the control unit waits for the
host, which freezes the whole array.

The shift register has no reset, as in an SRL16-based implementation. After
reset, the control unit spends NL cycles applying CLEAR to every cell.

## Array and selection

`l3m_array` contains the NX × NY cells and two range decoders
(`l3m_range_decoder`), one for rows and one for columns. Each decoder selects
every line between two addresses. A cell is selected when its row and its
column are selected and `lsel` is high.

`lsel` comes from the layer selection logic (`l3m_layer_sel`). It is high
while the layer being processed lies in the selected range z1..z2. A command
therefore reaches a rectangular region of nodes over a range of layers,
once per rotation.

With `sel_same_pt` high, both ends of every range are taken from x1, y1, z1.
This selects one point: the target during expansion, or the cell being traced.

## Control unit and host protocol

`l3m_control` contains the datapath of the original control unit:

* up/down counters x1, y1, z1;
* registers x2, y2, z2;
* three equality comparators;
* the layer counter and layer selection;
* 16-bit cycle counters xcount (expansion) and tcount (backtrace);
* the reply multiplexer.

A 15-state FSM sequences this datapath. The host link is a byte stream with
valid/ready handshakes (`rx_*` in, `tx_*` out). The original system ran it
over RS-232; any UART can be attached to these ports.

| opcode | command | argument bytes | reply |
|---|---|---|---|
| 0x01 | ROUTE | sx sy sz tx ty tz | endpoint triples, then F0 / F1 / F2 |
| 0x02 | SELECT | x1 y1 z1 x2 y2 z2 | – |
| 0x03 | CLEAR  | – | – (the selected region → E, for one rotation) |
| 0x04 | CLEARX | – | – (removes all expansion labels, keeps obstacles) |
| 0x05 | EXPAND | – | – (one rotation of EXPAND on the region) |
| 0x06 | SET    | – | – (one rotation of SET on the region) |
| 0x07 | TRACE  | – | 1 byte: the code of cell x1,y1,z1, which becomes BL |
| 0x08 | GET_XCOUNT | – | 2 bytes, high byte first |
| 0x09 | GET_TCOUNT | – | 2 bytes, high byte first |

Reply codes: F0 = SUCCESS, F1 = XFAIL (expansion failed), F2 = TFAIL
(backtrace failed).

SELECT + CLEAR is how a routed net is ripped up: the cleared nodes go back
to E.

A **ROUTE** runs as follows:

1. The source coordinates load both counter and register sets. The counters
   are cleared.
2. Cleanup: NL cycles of CLEAR with nothing selected.
3. SET marks the source. This happens on the cycle when the source's layer is
   processed.
4. The target coordinates load x1, y1, z1.
5. Expansion: EXPAND is broadcast with the target selected. It ends with
   SUCCESS when STATUS[0] goes low. It ends with XFAIL after NL+1 quiet cycles.
6. Backtrace: on the cycle when layer z1 is processed, TRACE is applied to
   x1, y1, z1. The code read from STATUS steps one counter, and the traced
   cell becomes part of the wire. This repeats until the comparators report
   x1, y1, z1 = x2, y2, z2, after which the source is traced too.
7. The reply lists wire endpoints as x, y, z byte triples: first the target,
   then every node where the direction changes (including the layer changes,
   which are vias), then the source. The code F0 follows.

A failed expansion replies F1 alone. It leaves its labels in place; the next
ROUTE's cleanup removes them. A backtrace that reads a code other than an
expanded state replies with the endpoints sent so far, then F2. The cells
traced before the failure stay blocked.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `l3m_router`, `l3m_control`, `l3m_array` | NX, NY | 8, 8 | grid columns and rows |
| same | NL | 4 | layers, at least 2. An SRL16 holds up to 16 layers per bit |
| `l3m_router`, `l3m_control` | USE_VP | 1 | use PFV to make horizontal backtrace steps one cycle |
| `l3m_control` | CW | 16 | cycle counter width |

Coordinates travel in single bytes, so NX, NY and NL must be at most 240.
That keeps them below the reply codes.

## Files

| file | contents |
|---|---|
| `rtl/l3m_pkg.sv` | state and command enums, opcodes, reply codes |
| `rtl/l3m_sequencer.sv` | the cell's command and state table (combinational) |
| `rtl/l3m_cell.sv` | one time-multiplexed cell |
| `rtl/l3m_range_decoder.sv` | row/column range decoder |
| `rtl/l3m_array.sv` | cell grid, decoders, STATUS bus |
| `rtl/l3m_layer_sel.sv` | layer counter, /TOP, layer range flags |
| `rtl/l3m_control.sv` | control FSM and datapath |
| `rtl/l3m_router.sv` | top level |
| `tb/tb_l3m_ref_pkg.sv` | reference cell rules shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus top-level runs with USE_VP = 0 and at 5 × 6 × 3 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/l3m_pkg.sv tb/tb_l3m_ref_pkg.sv rtl/l3m_*.sv tb/tb_l3m_router.sv \
  --top-module tb_l3m_router
./obj_dir/Vtb_l3m_router
```

Replace `tb_l3m_router` with any other testbench name. Each run finishes in
seconds.

What the testbenches check:

* **`tb_l3m_sequencer`** checks all 16384 input combinations of the
  sequencer against the reference table.
* **`tb_l3m_cell`** and **`tb_l3m_array`** run random command streams against
  a cycle-by-cycle model. The array test uses a 5 × 4 × 3 grid and compares
  every cell's ST0 and the STATUS bus on every cycle.
* **`tb_l3m_control`** drives the control unit against a scripted stand-in
  for the array. This is how it reaches TFAIL, which a real array never
  produces.
* **`tb_l3m_router`** (default parameters) and **`tb_l3m_router_novp`**
  (USE_VP = 0) act as the host, with a breadth-first-search model of the
  grid. They route ten fixed source/target pairs on an empty grid, then run:
  * every debug command;
  * an enclosed target, which must fail;
  * routes under per-layer preferences, where the model allows only the
    enabled in-layer moves;
  * region rip-ups;
  * 60 random routes.

  For each route they check three things:
  * that the wire is a shortest path over free nodes;
  * that every reported endpoint is a real corner;
  * that tcount equals NL + H·(1 or NL) + U + (NL−1)·D, for H horizontal, U
    upward and D downward steps.
* **`tb_l3m_router_small`** runs the same checks on a 5 × 6 × 3 router, a
  size that is not a power of two. It uses 90 random routes, some under
  random per-layer preferences, plus rip-ups and a failing route. Setting its
  sizes to 4 × 4 × 16 (the 16-layer limit of an SRL16 shift register) and
  moving its fixed coordinates onto that grid also passes.

## Cycle counts against the published measurements

For the ten-connection benchmark of the original 8 × 8 × 4 prototype (same
source/target pairs, empty grid, routed in order), this RTL takes:

| phase | this RTL, USE_VP = 1 | published | this RTL, USE_VP = 0 | published |
|---|---|---|---|---|
| cleanup | 40 | 40 | 40 | 40 |
| expansion | 209 | 227 | 209 | 227 |
| backtrace | 112 | 82 | 253 | 319 |

The totals differ for three reasons:

* the control sequence's exact timing;
* the choice among equal-length paths;
* the trace cost per step, which depends on when each trace starts in the
  layer rotation.

The order of magnitude and the ratio between the two backtrace versions
agree.

## Departures and open points

* **CLEARX** clears expansion labels in the whole array, not only the selected
  region. The 2-bit CMD bus has no command that clears only expanded cells
  inside a selection; CLEAR with nothing selected is the closest one.
* **The source is marked before the target is received.** The decoders can
  select a single point only at x1/y1/z1, so the ROUTE sequence loads the
  source there first, does cleanup and SET, and then loads the target.
* **Vertical expansion is not gated by PFV.** While PFV is low, only the held
  layer is processed, so no other layer can expand. The held layer itself can
  still be expanded from above or below.
* **Neighbour priority.** The priority of the vertical neighbours after the
  four horizontal ones is this design's choice.
* **Expansion-failure timeout.** The NL+1-cycle timeout follows from the
  timing analysis above; no count was published.
* **Encodings are this design's own.** This covers the state and trace codes,
  the opcodes, the reply layout, the 16-bit counters and the clear after
  reset.
* **No serial interface.** The host byte stream is brought out directly.
* **Preference input.** The per-layer preferences `pf_in[z]` are a port of
  the top level and set PF during ROUTE and the debug EXPAND. The command set
  has no host command for them.
* **Horizontal bias through PFV is not used during expansion.** Holding PFV
  low for some cycles biases expansion horizontally, and the cell supports
  this. The control unit does not use it, because no policy for it was
  published.
