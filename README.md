# Square-area detection with node automata

This design finds square objects in a binary image, and reports where they are and how big they are, in a time that grows with the object size rather than with the image size. It has no frame buffer and no per-pixel scan. There are two parts:

1. **Erosion by node automata.** Every pixel has a one-bit automaton. All automata step together: a node stays 1 only if it and its eight neighbours are 1. An object therefore loses one node along each edge per step. A square of side *s* is gone after ⌈*s*/2⌉ steps. Its last node, or its last 2×2 group, marks the centre. The step at which it disappears gives the size.
2. **Area-division search.** After each step, the nodes that have just disappeared *with all their neighbours* raise a flag. Those nodes are the centres. Reading every flag one at a time would take ROWS×COLS cycles. Instead, a controller reads the OR of the flags over a square subarea of the image, in one cycle per read. It splits each subarea whose OR is 1 into four, down to single nodes. Cost therefore depends on the number of centres, not on the image size.

The RTL contains two circuits. They share only clock and reset, and `sqd_top` places them side by side:

* **`sqd_detect_search`**: the complete detector. It holds a 64 × 57 node array with eliminating flags, the subarea OR readout, the search controller and a sequencer that runs the whole procedure.
* **`sqd_eval1`**: a small circuit that does detection only. It has 5 × 6 pixels, with 4 × 5 automata sitting between them. Node states can be observed only as the OR of each node row and each node column.

## The node automaton and the eliminating flag

`sqd_node` has one state flip-flop with a two-way multiplexer in front of it:

| mode | `mode_load` | next state on `en` |
|---|---|---|
| load (pixel) | 1 | `ser_in`, the state of the next node in the serial chain |
| automaton | 0 | `s & (&nbr)`: the AND of itself and its 8 neighbours |

A second flip-flop holds the state from before the last transition, S<sup>n−1</sup>. The flag is

```
f = S(n-1) & ~S(n) & ~(any neighbour S(n))
```

The flag marks a node that has just gone from 1 to 0 while all eight of its neighbours are already 0. A node on the edge of a shrinking object also goes from 1 to 0, but it still has live neighbours inside the object, so it raises no flag. Only the final remnant does. In load mode both flip-flops take the pixel, so no flag can be raised before the first transition. Nodes outside the array read as 0. An object touching the border is therefore eroded from that side as well.

What the flags show for different shapes:

| object | vanishes at step | flagged nodes |
|---|---|---|
| odd square, side 2k+1 | k+1 | the single centre node |
| even square, side 2k | k | the 2×2 centre |
| rectangle m×n, m<n | ⌈m/2⌉ | a line of n−m+1 (m odd) or a 2×(n−m+2) strip (m even) along the long axis |
| object with a concave outline | varies | each remnant that vanishes in isolation |

Each hit therefore carries the step number n: an isolated hit at step n means a square of side 2n−1, and a 2×2 group of hits at step n means side 2n.

## The node array

`sqd_node_array` instantiates ROWS × COLS nodes and wires each one to its eight neighbours. For loading, the nodes form a single shift chain in raster order. A pixel enters at the last node (bottom right) and everything moves one place toward (0,0). After ROWS×COLS shifts, the first pixel sent sits at row 0, column 0. The image must therefore be sent top row first, left to right. The array outputs the state map, the flag map and `any_alive`, which is the OR of all states.

## The area-division search

### Subarea readout (`sqd_area_or`)

The array is treated as if it were padded to 2<sup>D</sup> × 2<sup>D</sup>, with D = ⌈log2 max(ROWS, COLS)⌉ (6 for 64 × 57). A query `sqd_query_t {level, row, col}` selects the square of side 2<sup>D−level</sup> whose top-left corner is at (row, col).

Row *r* is selected when the top `level` bits of *r* match the top `level` bits of `row`; columns are selected the same way. The answer is the OR of `flag & row_sel & col_sel`. It is combinational and valid in the same cycle as the query. The missing rows 57–63 contain no nodes and read as 0.

### Traversal (`sqd_search_ctrl`)

The cursor is (level, row, col). It starts at level 0, the whole array. Each clock it issues one query:

* **OR = 1, above node level:** go down one level. The first child has the same corner as its parent.
* **OR = 1, at node level:** present a hit for this one cycle (`hit_valid`, `hit = {row, col, step}`), then move on.
* **OR = 0:** move on.

"Move on" goes to the next sibling at the deepest level that still has one. Siblings are taken in the order upper-left, upper-right, lower-left, lower-right. Any finished levels are popped in the same clock, so backing up costs no extra cycle. When no level has a sibling left, the search pulses `done`.

The child index at level *l* is the bit pair {row[D−l], col[D−l]}. Moving to the next sibling therefore means:

* increment that pair (00 → 01 → 10 → 11);
* clear the row and column bits below it.

Consequences:

* Hits come out in Z (Morton) order of their (row, col).
* A search takes exactly **1 + 4 × (number of subareas above node level whose OR is 1)** clocks.
* An empty flag map costs 1 clock.

## The procedure (`sqd_sequencer`)

```
start ─► LOAD: pix_ready=1, one node shift per accepted pixel (pix_valid & pix_ready),
               ROWS*COLS pixels
     ┌─► STEP: one transition of all nodes, step_no += 1          (1 clock)
     │   SEARCH: pulse the search controller's start               (1 clock)
     │   WAIT: until the search's done                            (search clocks + 1)
     └── any_alive ? STEP : DONE   (done stays high; step_no = transitions made)
```

A search runs after every transition, whether or not a flag is set; with no flags it costs 1 clock. Once the pixels are loaded, each transition costs `search clocks + 3`.

**Measured, full size (64 × 57), ten separated 10×10 squares:**

* All ten vanish at step 5 and produce 40 hits, four per square.
* Detection plus search takes 240 clocks, which is 48 µs at a 5 MHz clock. This is close to the roughly 40 µs (200 clocks at 5 MHz) given for that workload when the design was first described.
* The serial read-in of 3648 pixels comes on top of that.

### Interface of `sqd_detect_search`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse: begin reading in an image (from idle or done) |
| `pix_valid`, `pix`, `pix_ready` | in/in/out | 1 | serial binary image, ready/valid, raster order |
| `hit_valid`, `hit` | out | 1, 24 | one eliminating node per cycle: `sqd_hit_t {row[8], col[8], step[8]}` |
| `step_no` | out | 8 | transitions made so far |
| `busy`, `done` | out | 1 | procedure running; procedure finished (level, until next `start`) |

## The transition evaluation circuit (`sqd_eval1`)

This circuit separates pixels from nodes. A node sits at the centre of each 2×2 group of pixels, so 5 × 6 pixels give 4 × 5 nodes.

* **Load:** pixels are shifted in raster order with `pix_en`.
* **First `step` after a load:** each node becomes the AND of its four pixels. A 1 then means the node is the centre of a 2×2 block.
* **Every later `step`:** each node takes the AND of its own 3×3 neighbourhood of nodes, as in the main array.
* **Readout:** `row_or[i]` is the OR of node row *i*, `col_or[j]` is the OR of node column *j*, and `any_alive` is the OR of all nodes. They are registered and valid the clock after a step.
* **Stepping:** steps come from outside. The user keeps stepping until `any_alive` falls.

An even square of side 2k gives a single node at step k and is all zero at step k+1.

## Files

| file | contents |
|---|---|
| `rtl/sqd_pkg.sv` | widths, default size, `sqd_query_t`, `sqd_hit_t`, sequencer state enum, `levels_for()` |
| `rtl/sqd_node.sv` | one node automaton with its flag |
| `rtl/sqd_node_array.sv` | node grid, neighbour wiring, load chain, `any_alive` |
| `rtl/sqd_area_or.sv` | subarea OR readout |
| `rtl/sqd_search_ctrl.sv` | quadtree search |
| `rtl/sqd_sequencer.sv` | load / step / search procedure |
| `rtl/sqd_detect_search.sv` | the detector: the four blocks above wired together |
| `rtl/sqd_eval1.sv` | the 5 × 6 transition evaluation circuit |
| `rtl/sqd_top.sv` | both circuits side by side (`ds_*` and `e1_*` ports) |
| `tb/sqd_ref_pkg.sv` | reference model: erosion, flags, expected hits in search order, expected search clocks |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_sqd_full` runs the top at default size |

Parameters: `ROWS` = 57 and `COLS` = 64 on the array, area readout, search, sequencer, detector and top. `PROWS` = 5 and `PCOLS` = 6 on `sqd_eval1` and the top. Coordinates travel in 8-bit fields, so either side of the array may be at most 256.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example, to run the full-size workload:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sqd_pkg.sv tb/sqd_ref_pkg.sv tb/tb_sqd_full.sv --top-module tb_sqd_full -o sim
./obj_dir/sim
```

Replace `tb_sqd_full` with any other `tb_sqd_*` to run that testbench.

* **Unit testbenches:** most use small arrays (7 × 9 to 13 × 11) with random images of squares and rectangles. `tb_sqd_search_ctrl` answers the subarea queries itself from its own map. `tb_sqd_sequencer` stands in for the array and the search.
* **`tb_sqd_top`:** runs both circuits at once and fails if any of these mechanisms never occurred: pixel stall, transition, hit, division, backing up, empty search, multi-step run, or the evaluation circuit's pixel step, node step and readout.
* **`tb_sqd_full`:** runs at the default sizes.
* **`tb_sqd_sizes`:** runs the default 64 × 57 detector on one square of every side from 1 to 57 and on random rectangles. It checks the step count and the centre hits listed in the table above.

Every testbench finishes within seconds.

## Choices made where the original description is silent

These points are this design's own choices. They are the first things to revisit when matching a specific chip:

* **2-D transition rule:** the AND of the node's own state and its 8 neighbours. The one-dimensional rule ANDs only the two neighbours. Including the node itself makes the state monotone (a 0 never becomes 1) and gives the stated n/2 steps for an n-wide square.
* **Flag timing:** S<sup>n−1</sup> is kept in a second flip-flop, and the flag is evaluated after the transition.
* **Edges:** nodes outside the array count as 0.
* **Load order:** raster, top row first, through a single shift chain, with a ready/valid handshake.
* **Array orientation:** 64 columns × 57 rows.
* **Search:** depth-first, visiting all four children of every non-empty subarea in the order UL, UR, LL, LR. Each found node is reported with its step number.
* **Sequencing:** the search runs after every transition, and the procedure ends when a search finishes with no node left alive.
* **`sqd_eval1`:** the AND-of-2×2-pixels first step followed by 3×3 steps among nodes, and stepping from outside.
* **Timing:** the RTL sets none. The detector was estimated at about 5 MHz, and a 7.8 ns cycle was measured on the small circuit; both depend on the process.

Not included:

* the colour-to-binary digitizer that would sit ahead of the serial input (its criterion is not specified);
* photodetectors.

Both circuits take an already binarized 1-bit serial image.
