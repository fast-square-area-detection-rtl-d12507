// tb_sqd_detect_search: end-to-end test of the detection-and-search
// circuit at 13 x 11 nodes. Random images of squares and rectangles (and
// some empty and full images) are sent through the ready/valid pixel port
// with random gaps. The reference model erodes the image step by step,
// applies Eq. (1) and lists the eliminating nodes in search order; the hits
// (position and step), the final step count and the number of cycles from
// the last pixel to done (sum over steps of search cycles + 3) must match.
module tb_sqd_detect_search;
  import sqd_pkg::*;
  import sqd_ref_pkg::*;
  localparam int ROWS = 13, COLS = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, pix_valid = 0, pix = 0, pix_ready, hit_valid, busy, done;
  sqd_hit_t hit;
  logic [STEP_W-1:0] step_no;
  int checks = 0, failures = 0;

  sqd_detect_search #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  map_t img, cur, nxt, fl;
  int got_q[$];

  always @(posedge clk)
    if (hit_valid) got_q.push_back(int'(hit.step) * 65536 + int'(hit.row) * 256 + int'(hit.col));

  initial begin
    int exp_q[$], step_q[$];
    int exp_cyc, exp_steps, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      foreach (img[r, c]) img[r][c] = 0;
      if (t == 1) foreach (img[r, c]) img[r][c] = (r < ROWS && c < COLS);
      else if (t > 1)
        for (int k = 0; k < $urandom_range(1, 4); k++) begin
          automatic int h = $urandom_range(1, 9);
          automatic int w = (k % 2 == 0) ? h : $urandom_range(1, 9);
          automatic int r0 = $urandom_range(0, ROWS - 1);
          automatic int c0 = $urandom_range(0, COLS - 1);
          for (int r = r0; r < r0 + h && r < ROWS; r++)
            for (int c = c0; c < c0 + w && c < COLS; c++) img[r][c] = 1;
        end
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
      // Run the circuit.
      got_q.delete();
      @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      for (int k = 0; k < ROWS * COLS; k++) begin
        pix_valid = 0;
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        pix_valid = 1; pix = img[k / COLS][k % COLS];
        #1;
        check(pix_ready, "ready during load");
        @(negedge clk);
      end
      pix_valid = 0;
      cyc = 0;
      while (!done && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      check(got_q == exp_q, $sformatf("hit list (%0d expected, %0d got)", exp_q.size(), got_q.size()));
      check(int'(step_no) == exp_steps, $sformatf("steps %0d expected %0d", step_no, exp_steps));
      check(cyc == exp_cyc, $sformatf("cycles %0d expected %0d", cyc, exp_cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
