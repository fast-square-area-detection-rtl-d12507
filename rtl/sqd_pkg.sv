// sqd_pkg: types and constants shared by the square-area detection circuits.
//
// The detector erodes a binary image with a grid of node automata and locates
// the "eliminating" nodes (Eq. 1 of the algorithm) with a quadtree area
// division search. Coordinates are carried in fixed COORD_W-bit fields so
// that the same structs serve every array size up to 2**COORD_W on a side.
// The default array size (64 columns x 57 rows) is that of the published
// detection-and-search evaluation circuit; the field widths are this
// design's choice.
package sqd_pkg;

  localparam int unsigned COORD_W = 8;   // row/column field width
  localparam int unsigned LEVEL_W = 4;   // quadtree level field width
  localparam int unsigned STEP_W  = 8;   // transition-step counter width

  localparam int unsigned DEF_ROWS = 57; // node rows of the evaluation chip
  localparam int unsigned DEF_COLS = 64; // node columns of the evaluation chip

  // Subarea selected for an OR readout: at quadtree level L the subarea is
  // 2**(D-L) nodes on a side, D = number of division levels. row and col
  // hold the subarea's top-left corner (their low D-L bits are zero).
  typedef struct packed {
    logic [LEVEL_W-1:0] level;
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
  } sqd_query_t;

  // One eliminating node found by the search, with the transition step at
  // which it was eliminated (an s x s square disappears at step ceil(s/2)).
  typedef struct packed {
    logic [COORD_W-1:0] row;
    logic [COORD_W-1:0] col;
    logic [STEP_W-1:0]  step;
  } sqd_hit_t;

  // Phases of the overall procedure: read in, transition, search, repeat.
  typedef enum logic [2:0] {
    SEQ_IDLE,
    SEQ_LOAD,
    SEQ_STEP,
    SEQ_SEARCH,
    SEQ_WAIT,
    SEQ_DONE
  } sqd_seq_state_t;

  // Number of quadtree division levels needed to reach single nodes.
  function automatic int unsigned levels_for(input int unsigned rows,
                                             input int unsigned cols);
    int unsigned side;
    int unsigned d;
    side = (rows > cols) ? rows : cols;
    d = 0;
    while ((1 << d) < side) d++;
    return d;
  endfunction

endpackage
