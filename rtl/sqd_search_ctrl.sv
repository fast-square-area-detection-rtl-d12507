// sqd_search_ctrl: area-division search for eliminating nodes.
//
// Scanning every node for a flag would take ROWS*COLS cycles, so the search
// divides the area recursively into four: starting from the whole area it
// reads the OR of the flags of a subarea, and where the OR is 1 it divides
// that subarea into four smaller ones (upper-left, upper-right, lower-left,
// lower-right, in that order) and reads those, down to single nodes. A
// single node whose OR is 1 is reported as a hit. Subareas whose OR is 0 are
// not divided further. The traversal is depth first, so the hits come out
// in Z (Morton) order of their positions, and every subarea with a flag is
// visited once.
//
// Interface: a start pulse begins a search of the current flag map; query
// drives an sqd_area_or and area_or is its answer in the same cycle. Each
// hit is presented for one cycle on hit_valid/hit, tagged with step_no.
// done pulses in the cycle after the last query.
// Timing: one query per clock, no extra cycle to move back up the tree, so a
// search takes 1 + 4*(number of subareas above node level whose OR is 1)
// clocks. The division scheme is the published one; the depth-first order
// and the one-query-per-clock schedule are this design's choices.
module sqd_search_ctrl #(
  parameter int unsigned ROWS = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS = sqd_pkg::DEF_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [sqd_pkg::STEP_W-1:0] step_no,
  output sqd_pkg::sqd_query_t        query,
  input  logic                       area_or,
  output logic                       hit_valid,
  output sqd_pkg::sqd_hit_t          hit,
  output logic                       busy,
  output logic                       done
);
  import sqd_pkg::*;

  localparam int unsigned D = levels_for(ROWS, COLS);

  logic               run;
  logic [LEVEL_W-1:0] lvl;
  logic [COORD_W-1:0] row, col;

  // Next position after the current subarea is finished (its OR was 0, or
  // it was a single node): the next sibling at the deepest level that still
  // has one, or nothing left.
  logic               adv_ok;
  logic [LEVEL_W-1:0] adv_lvl;
  logic [COORD_W-1:0] adv_row, adv_col;

  always_comb begin
    int unsigned bit_i;
    adv_ok  = 1'b0;
    adv_lvl = '0;
    adv_row = row;
    adv_col = col;
    for (int unsigned l = 1; l <= D; l++) begin
      bit_i = D - l;
      if (l <= lvl && !(row[bit_i] && col[bit_i])) begin
        adv_ok  = 1'b1;
        adv_lvl = LEVEL_W'(l);
      end
    end
    if (adv_ok) begin
      bit_i = D - int'(adv_lvl);
      for (int unsigned b = 0; b < COORD_W; b++)
        if (b < bit_i) begin
          adv_row[b] = 1'b0;
          adv_col[b] = 1'b0;
        end
      // Increment the two-bit child index {row bit, column bit}.
      if (col[bit_i]) begin
        adv_row[bit_i] = 1'b1;
        adv_col[bit_i] = 1'b0;
      end else begin
        adv_col[bit_i] = 1'b1;
      end
    end
  end

  assign query = '{level: lvl, row: row, col: col};
  assign busy  = run;

  always_comb begin
    hit_valid = run && area_or && (lvl == LEVEL_W'(D));
    hit       = '{row: row, col: col, step: step_no};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      lvl  <= '0;
      row  <= '0;
      col  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          lvl <= '0;
          row <= '0;
          col <= '0;
        end
      end else if (area_or && lvl != LEVEL_W'(D)) begin
        lvl <= lvl + 1'b1;          // divide: first child keeps the corner
      end else if (adv_ok) begin
        lvl <= adv_lvl;
        row <= adv_row;
        col <= adv_col;
      end else begin
        run  <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // A new search is only started when the previous one has finished.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !run);

endmodule
