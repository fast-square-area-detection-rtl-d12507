// tb_sqd_area_or: self-checking test of the subarea OR readout at
// 11 x 13 nodes (a 16 x 16 quadtree, four division levels). Sparse random
// flag maps are queried at every level and corner, and each answer is
// compared with the OR computed here over the same square.
module tb_sqd_area_or;
  import sqd_pkg::*;
  import sqd_ref_pkg::*;
  localparam int ROWS = 11, COLS = 13, D = 4;

  logic [ROWS-1:0][COLS-1:0] flag;
  sqd_query_t                query;
  logic                      area_or;
  int checks = 0, failures = 0, ones = 0;
  map_t m;

  sqd_area_or #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      automatic int density = $urandom_range(1, 40);
      foreach (m[r, c]) m[r][c] = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          m[r][c] = ($urandom_range(0, 399) < density);
          flag[r][c] = m[r][c];
        end
      for (int l = 0; l <= D; l++) begin
        automatic int side = 1 << (D - l);
        for (int r0 = 0; r0 < 16; r0 += side)
          for (int c0 = 0; c0 < 16; c0 += side) begin
            automatic bit exp = sqd_ref_pkg::area_or(m, ROWS, COLS, D, l, r0, c0);
            query = '{level: LEVEL_W'(l), row: COORD_W'(r0), col: COORD_W'(c0)};
            #1;
            checks++;
            ones += exp;
            if (area_or !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL level %0d corner (%0d,%0d): got %0b", l, r0, c0, area_or);
            end
          end
      end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
