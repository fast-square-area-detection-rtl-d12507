// tb_sqd_search_ctrl: self-checking test of the area-division search at
// 11 x 13 nodes. The testbench holds a random flag map and answers every
// subarea query itself. It checks that the hits come out in depth-first
// quadtree order (UL, UR, LL, LR), tagged with the step number, and that
// the search takes exactly 1 + 4 * (non-empty subareas above node level)
// busy cycles, one query per clock. Empty maps and full maps are included.
module tb_sqd_search_ctrl;
  import sqd_pkg::*;
  import sqd_ref_pkg::*;
  localparam int ROWS = 11, COLS = 13, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, area_or, hit_valid, busy, done;
  logic [STEP_W-1:0] step_no;
  sqd_query_t query;
  sqd_hit_t   hit;
  int checks = 0, failures = 0;
  int backtracks = 0;
  map_t m;

  sqd_search_ctrl #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  // Subarea OR answered from the testbench's own map.
  always_comb area_or = sqd_ref_pkg::area_or(m, ROWS, COLS, D, int'(query.level),
                                             int'(query.row), int'(query.col));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int exp_q[$];
    int got_q[$];
    int cyc, exp_cyc;
    logic [LEVEL_W-1:0] last_lvl;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      automatic int density = (t == 0) ? 0 : (t == 1) ? 400 : $urandom_range(1, 30);
      foreach (m[r, c]) m[r][c] = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) m[r][c] = ($urandom_range(0, 399) < density);
      hits_zorder(m, ROWS, COLS, exp_q);
      exp_cyc = search_cycles(m, ROWS, COLS);
      got_q.delete();
      step_no = STEP_W'(t);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      last_lvl = '0;
      while (!done) begin
        if (busy) begin
          cyc++;
          if (query.level < last_lvl) backtracks++;
          last_lvl = query.level;
        end
        if (hit_valid) begin
          got_q.push_back(int'(hit.row) * 256 + int'(hit.col));
          check(hit.step == STEP_W'(t), "hit step tag");
        end
        @(negedge clk);
        check(cyc < 5000, "search ends");
        if (cyc >= 5000) break;
      end
      check(!busy, "idle after done");
      check(got_q == exp_q, $sformatf("hit list (%0d expected, %0d got)",
                                      exp_q.size(), got_q.size()));
      check(cyc == exp_cyc, $sformatf("search cycles %0d expected %0d", cyc, exp_cyc));
    end
    check(backtracks > 0, "search moved back up the tree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
