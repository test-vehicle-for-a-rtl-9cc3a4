# A restructurable FPGA test vehicle for wafer-scale integration

A wafer-sized FPGA will always have manufacturing defects. This design avoids them
without any active repair circuitry. The FPGA is a regular array of small tiles.
After fabrication, every tile is tested, and a laser then permanently rewires the
array around the bad tiles:

- it makes metal-to-metal links (laser *links*);
- it severs lines (laser *cuts*).

Nothing in the signal path is switched at run time for the repair. The repaired array
looks like a smaller, defect-free FPGA, so ordinary place-and-route and a plain
configuration bitstream still work.

This RTL models the two test-vehicle chips built to try the idea:

| chip | array | cell |
|---|---|---|
| large chip | 1 row × 12 large cells | 3-input look-up table, D flip-flop, EN pin, 6 single + 4 double + 2 clock lines per channel |
| small chip | 2 × 5 small cells | 2-input look-up table, D flip-flop, 2 single + 2 double lines per channel |

Both cell types contain the same defect-avoidance structures. The two chips share no
signals. They sit side by side in the top module `wsfpga_test_vehicle`. Ports starting
with `l_` belong to the large chip, and ports starting with `s_` to the small chip.

## The tile

Each tile (`fpga_cell`) is an ordinary island-style FPGA tile with some extra repair
structures.

- **Logic block** (`logic_block`): a K-input look-up table followed by a D flip-flop.
  - An output-select bit picks either the direct output or the registered output.
  - On the large cell, an enable-select bit lets the EN pin control the output
    buffer. Otherwise the buffer is always on.
- **Connection box** (`connection_box`): one pass transistor per configuration bit,
  between each logic-block pin and each channel line it can reach. In the large cell
  each pin reaches 6 lines. A pin may connect to none, one or several lines.
- **Channels**: each has single-length lines, double-length lines and two clock
  lines.
  - A double-length line spans two tiles. The two lines of a pair swap positions
    ("cross") inside every tile, so each line meets a switch only in every other tile.
  - One configuration bit per tile chooses clock line a or b for the flip-flop.
- **Switch matrix** (`switch_box`): one `routing_switch` per single line, plus one
  per double-line pair (8 switches in the large cell). A routing switch has six pass
  transistors, one for each pair of its N, E, S and W ports.
- **Configuration register** (`cell_config_sr`, built from `sr_bit`): a static-RAM
  shift register of two-phase master/slave latches on the non-overlapping clocks
  `clk1` and `clk2`.
  - The large cell has 89 bits; the small cell has 36.
  - One chain runs down each physical column.
  - On the large chip, every cell's serial output is brought out.
- **Power link** (`testable_power_link`): the tile's supply connection.

## Defect avoidance

The laser settings of a tile are one packed struct, `laser_cfg_t` in `wsfpga_pkg`. It
is a static input of every cell: a fabricated chip fixes these values once, by laser.

| field | structure | effect |
|---|---|---|
| `power_link` | testable power link | The tile is powered only once the laser link is made. Before that, a test transistor in parallel lets one tile at a time be powered and its supply current measured. A tile with a power short is found this way and is never connected. |
| `sr_bypass` | shift-register bypass link | `sin` goes straight to `sout`, so the column's chain skips the tile. The bitstream therefore only needs configurations for the logical array. |
| `bypass_ew`, `bypass_ns` | laser pass transistors | Every routing switch has laser pass transistors in parallel with its E-W and N-S transistors. Making them joins the lines straight across a dead tile without using any of its configuration bits. |
| `uncross_h`, `uncross_v` | double-line uncrossing | A double line that passes a removed tile would otherwise become a single line followed by a triple-length one. Cutting the crossing and relinking it straight keeps the double lines' "switch every second tile" rhythm. |
| `lsw` | laser switch box | Between each pair of columns runs a vertical *restructuring bus*, with a laser switch box on it in every row. See the patterns below. |

The laser switch box has four patterns:

| `lsw` | connections |
|---|---|
| `LSW_STRAIGHT` | W–E (as fabricated) |
| `LSW_DOWNWARD` | W–S and N–E: the row on the left continues one or more rows lower |
| `LSW_UPWARD` | W–N and S–E: the row on the left continues higher |
| `LSW_STRAIGHT_DOWN` | N–S: the bus passes this row |

### Cell-by-cell substitution (the small chip)

Columns keep their identity: physical column *j* is logical column *j*. This is why a
single shift chain per column still works. Inside a column, logical row *i* may live
in a different physical row in each column. Each logical row takes, per column, the
first usable tile from the top.

When logical row *i* sits in physical row *e* in column *j* and in row *f* in column
*j+1*, the bus between the two columns carries it:

- the laser switch boxes in rows *e* and *f* are set downward (or upward);
- the boxes in the rows between are set straight-down.

A bus can carry only one detour per row position. So the tiles that such a detour
passes over become **pseudo-faults**: they are treated as defective for the rows below.
This keeps detours from crossing.

Unused tiles are unpowered, bypassed in the chain, and passed N–S. The testbench
package `wsfpga_repair_pkg` has this planning function. Given a defect map, it returns
the physical row of every logical cell and the complete `laser_cfg_t` of every tile.

### Column substitution (the large chip)

A single row can only drop whole columns. The dead tile is then joined E–W by its
laser pass transistors, its double lines are uncrossed, and its register is bypassed.

### Spare lines (line redundancy)

The fabricated chips have no spare routing lines. The scheme that follows them adds
one, and `line_redundancy` models a single channel segment with it, standing beside
the two chips in the top (ports `r_`).

- One extra line (or `NX` of them, shared among the lines alternately) runs alongside
  the channel.
- Every line has laser links to its extra line at both ends of the segment, and the
  cell's connection to the line has one too.
- To replace an open line, the laser makes its two end links and its tap link. The
  extra line then carries the signal from end to end and to the cell.

Inside the model, each line is three points: west end, tap and east end. Each point
reads the OR of the other drivers it is joined to, the same rule as the routing
switches.

## Configuration bit layout

Within a cell, bit 0 is the first bit after the cell's serial input. A word is
shifted in last-bit first, so after a full shift bit *b* holds the *b*-th bit of the
word. Offsets come from functions in `wsfpga_pkg`, so other sizes follow
automatically.

| field | large cell (K=3, EN, 6+4 lines, 6 per pin) | small cell (K=2, 2+2 lines, 4 per pin) |
|---|---|---|
| look-up table | 0–7 | 0–3 |
| output select (1 = registered) | 8 | 4 |
| enable select (1 = EN pin controls output) | 9 | — |
| clock select (1 = clock line b) | 10 | 5 |
| connection box, `pin*CBL + line` | 11–40 (pins: LUT inputs, EN, output) | 6–17 (pins: LUT inputs, output) |
| switch matrix, `switch*6 + transistor` | 41–88 (8 switches) | 18–35 (3 switches) |

Details of the two bit ranges:

- **Connection box**: the pins reach the last `CBL` lines of the channel.
- **Switch matrix**:
  - the switches are numbered single lines first, then one per double pair;
  - the transistors of a switch are NE, NS, NW, ES, EW, SW (`SW_*` in `wsfpga_pkg`);
  - line numbering is single lines first, then the double pairs.

## How the wires are modelled

Pass transistors are bidirectional. A two-state RTL simulator and synthesis both need
directed signals. So every channel line is modelled as **two directed wires**, one for
each direction. A port of a routing switch outputs the OR of the inputs it is
connected to on its other three sides. It never echoes its own input back. A line with
no driver reads 0, and a driven-high line reads 1, which matches an NMOS pass-transistor
network pulled low.

What this means:

- **Combinational loops.** The array is structurally cyclic, because a signal can leave
  through one port and come back through another. Lint tools therefore report
  combinational loops (`UNOPTFLAT`, yosys "logic loop") across the array and cells.
  For any configuration whose nets are trees (every routed design) no loop is actually
  active. A configuration that closes a loop of ORs just latches a 1, as a real
  shorted net would.
- **Logic-block output delay.** `logic_block` drives its output through a 6.7 ns
  delay (the logic-block delay of the published delay table). Without it, two cases
  would not settle in zero time:
  - a ring oscillator;
  - a half-shifted configuration that happens to form an inverting loop.

  With the delay, they run in simulated time. Synthesis ignores the delay. No other
  delays (routing, laser links) are modelled.
- **Tri-state outputs** are value + enable pairs.
- **Lint notes.** Besides the loop reports above, the linter reports the slave latch
  of `sr_bit` as "no latches detected" when the bit sits in a chain; synthesis infers
  the two latches per bit as intended.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -o sim \
    rtl/wsfpga_pkg.sv tb/wsfpga_repair_pkg.sv tb/wsfpga_test_vehicle_tb.sv
./obj_dir/sim
```

The packages come first on the command line; `-y` lets Verilator find every module
from its file name. Adding `+verilator+rand+reset+2` to the run starts all
uninitialised state at random values, which the testbenches tolerate.

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/wsfpga_repair_pkg.sv` is needed only by `wsfpga_array_tb` and
`wsfpga_test_vehicle_tb`.

| testbench | what it checks |
|---|---|
| `sr_bit_tb` | master/slave timing of a configuration bit |
| `cell_config_sr_tb` | shifting, serial read-back, bypass, and the chain broken by an unpowered tile |
| `logic_block_tb` | every table entry, the registered output, EN, and the output delay |
| `connection_box_tb`, `routing_switch_tb`, `switch_box_tb`, `laser_switch_box_tb` | random or exhaustive comparison with independent models, including crossed and uncrossed double lines and all four laser patterns |
| `line_redundancy_tb` | a spare line replacing an open line, then random defects and links for one and for two extra lines, against a graph-flooding model |
| `testable_power_link_tb` | powering and the supply current, including a shorted tile |
| `fpga_cell_tb` | one large tile configured through its own shift register: read-back, an XOR onto a double line, EN, the clock-b select, switch and laser switch box, laser E–W bypass, and power and bypass |
| `wsfpga_array_tb` | a 4 × 3 small-cell array repaired by cell-by-cell substitution for three defect maps, with a pipeline checked cycle by cycle |
| `wsfpga_test_vehicle_tb` | both chips at full size, described below |
| `ring_oscillator_tb` | the ring-oscillator experiments: a 5-inverter ring on the small chip with 0 to 4 defective cells repaired cell by cell, and on the large chip with 0 to 4 columns skipped, by active switching and by laser linking; each period must be 2 × 5 × 6.7 ns = 67 ns |

`wsfpga_test_vehicle_tb` runs both chips at their full sizes:

1. Large chip:
   - power test of each tile;
   - a 12-stage registered pipeline using single and double lines and EN;
   - column substitution of a tile;
   - a negative test showing that without uncrossing the function breaks.
2. Small chip:
   - the two-input XOR experiment;
   - a 5-stage pipeline before and after cell-by-cell repair.
3. Spare-line segment: each line in turn open, then replaced by the spare line.

It counts every mechanism and fails if any never happened. It runs in well under a
second.

## What follows the source design and what does not

**Follows the source design:**

- array sizes, line counts and lines per pin;
- the logic block contents;
- the two-phase configuration register with its bypass link;
- the testable power link;
- the routing switch with laser pass transistors on E-W and N-S;
- the double-line uncrossing;
- the four laser switch patterns;
- cell-by-cell and column substitution;
- the spare line with laser links at both ends and on the cell's connections.

**Choices made here, where the source is silent or differs:**

- the bit order of the configuration register;
- which lines a pin reaches (the last `CBL` lines, so that pins reach both single and
  double lines);
- how a double pair is crossed, and which of its positions meets the switch;
- the EN selection as a configuration bit;
- the clock selection between two global clock lines as a configuration bit. The
  source instead keeps a redundant clock line in each cell and re-routes it with laser
  links;
- the small cell's pins reaching all four of its lines;
- no reset anywhere (every bit is written by shifting);
- the power-link current values, which are illustrative;
- the spare-line segment as a stand-alone block, one tap per line, and the
  alternating assignment of lines to extra lines.

**Not built:**

- Redundant clock and shift-clock routing inside the tile, and the global clock tree.
  The clocks are ideal nets.
- Pads and probe loads.
- The test access the source design proposes: reading each shift-register output through a
  row-column access, and built-in self test. The source only outlines
  how the wafer would be tested. The testbenches read the configuration back through
  the serial output only.
- All analog timing except the single logic-block delay. The measured resistances,
  delays and ring-oscillator frequencies cannot be reproduced by this model.
  Logically, a ring oscillator fits on either chip.
- A full wafer-scale array. `wsfpga_array` takes `ROWS` and `COLS` as parameters, but
  only the test-vehicle sizes were simulated.
