// tb_sqd_full: the top at its default size (64 x 57 node detection-and-
// search circuit, 5 x 6 pixel evaluation circuit). Workload: ten 10 x 10
// squares placed apart in the 64 x 57 image. Each must be found at step 5
// as the 2x2 group at its centre (40 hits), in search order; the step count
// and the cycles from the last pixel to done must match the reference
// model. The detection-and-search time is printed in clocks and in
// microseconds at a 5 MHz clock. The evaluation circuit is run through one
// image of a 4 x 4 square: 3 x 3 nodes after the pixel-to-node step, the
// centre node after the next step, all zero after the third.
module tb_sqd_full;
  import sqd_pkg::*;
  import sqd_ref_pkg::*;
  localparam int ROWS = 57, COLS = 64, OBJ = 10, NOBJ = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ds_start = 0, ds_pix_valid = 0, ds_pix = 0, ds_pix_ready;
  logic ds_hit_valid, ds_busy, ds_done;
  sqd_hit_t ds_hit;
  logic [STEP_W-1:0] ds_step_no;
  logic e1_pix_en = 0, e1_pix = 0, e1_step = 0, e1_any_alive;
  logic [3:0] e1_row_or;
  logic [4:0] e1_col_or;
  int checks = 0, failures = 0;

  sqd_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int got_q[$];
  always @(posedge clk)
    if (ds_hit_valid)
      got_q.push_back(int'(ds_hit.step) * 65536 + int'(ds_hit.row) * 256 + int'(ds_hit.col));

  map_t img, cur, nxt, fl;

  initial begin
    int exp_q[$], step_q[$];
    int exp_cyc, exp_steps, cyc, placed;
    int centre_hits;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Ten squares on a 4 x 5 grid of 14 x 12 cells, with some jitter.
    foreach (img[r, c]) img[r][c] = 0;
    placed = 0;
    for (int slot = 0; slot < 20 && placed < NOBJ; slot++) begin
      if ($urandom_range(0, 1) == 0 && (20 - slot) > (NOBJ - placed)) continue;
      begin
        automatic int r0 = (slot / 5) * 14 + $urandom_range(0, 2);
        automatic int c0 = (slot % 5) * 12 + $urandom_range(0, 1);
        for (int r = r0; r < r0 + OBJ; r++)
          for (int c = c0; c < c0 + OBJ; c++) img[r][c] = 1;
      end
      placed++;
    end
    check(placed == NOBJ, "ten objects placed");
    // Reference run.
    exp_q.delete();
    cur = img;
    exp_cyc = 0;
    exp_steps = 0;
    do begin
      exp_steps++;
      erode(cur, nxt, ROWS, COLS);
      elim_flags(cur, nxt, fl, ROWS, COLS);
      hits_zorder(fl, ROWS, COLS, step_q);
      foreach (step_q[i]) exp_q.push_back(exp_steps * 65536 + step_q[i]);
      exp_cyc += search_cycles(fl, ROWS, COLS) + 3;
      cur = nxt;
    end while (any(cur, ROWS, COLS));
    check(exp_steps == OBJ / 2, "model: a 10 x 10 square vanishes at step 5");
    // Send the image without gaps, one pixel per clock.
    @(negedge clk);
    ds_start = 1; @(negedge clk); ds_start = 0;
    for (int k = 0; k < ROWS * COLS; k++) begin
      ds_pix_valid = 1; ds_pix = img[k / COLS][k % COLS];
      #1;
      check(ds_pix_ready, "ready during load");
      @(negedge clk);
    end
    ds_pix_valid = 0;
    cyc = 0;
    while (!ds_done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    centre_hits = 0;
    foreach (got_q[i]) begin
      automatic int r = (got_q[i] >> 8) & 255, c = got_q[i] & 255;
      // The hit must be one of the four centre nodes of a 10 x 10 square
      // of object pixels: the node sits at offset 4 or 5 in both directions.
      automatic bit ok = 0;
      for (int orr = 4; orr <= 5; orr++)
        for (int occ = 4; occ <= 5; occ++) begin
          automatic bit all1 = 1;
          for (int rr = r - orr; rr < r - orr + OBJ; rr++)
            for (int cc = c - occ; cc < c - occ + OBJ; cc++)
              if (rr < 0 || cc < 0 || rr >= ROWS || cc >= COLS || !img[rr][cc]) all1 = 0;
          if (all1) ok = 1;
        end
      check(ok, $sformatf("hit (%0d,%0d) is a square centre", r, c));
      if (((got_q[i] >> 16) == OBJ / 2)) centre_hits++;
    end
    check(got_q.size() == 4 * NOBJ, $sformatf("40 centre hits, got %0d", got_q.size()));
    check(centre_hits == 4 * NOBJ, "all hits at step 5");
    check(got_q == exp_q, "hit list matches model");
    check(int'(ds_step_no) == exp_steps, "step count");
    check(cyc == exp_cyc, $sformatf("detection and search cycles %0d expected %0d", cyc, exp_cyc));
    $display("load: %0d clocks; detection and search: %0d clocks = %0.1f us at 5 MHz",
             ROWS * COLS, cyc, real'(cyc) / 5.0);
    // Evaluation circuit: a 4 x 4 square at pixel rows/cols 0..3.
    for (int k = 0; k < 30; k++) begin
      e1_pix_en = 1; e1_pix = (k / 6 < 4) && (k % 6 < 4);
      @(negedge clk);
    end
    e1_pix_en = 0;
    e1_step = 1; @(negedge clk); e1_step = 0;
    check(e1_row_or == 4'b0111 && e1_col_or == 5'b00111, "eval1 step 1: 3 x 3 nodes");
    e1_step = 1; @(negedge clk); e1_step = 0;
    check(e1_row_or == 4'b0010 && e1_col_or == 5'b00010 && e1_any_alive, "eval1 step 2: centre node");
    e1_step = 1; @(negedge clk); e1_step = 0;
    check(!e1_any_alive && e1_row_or == 0 && e1_col_or == 0, "eval1 step 3: all zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
