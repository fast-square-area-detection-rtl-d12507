// tb_sqd_sizes: step count against object size on the default 64 x 57
// detection-and-search circuit. One square of side s = 1 .. 57 is placed at
// a random position; it must vanish at step ceil(s/2) and be reported as its
// single centre node (odd s) or its 2x2 centre (even s), all at that step.
// Then rectangles m x n check that the step count follows the shorter side.
module tb_sqd_sizes;
  import sqd_pkg::*;
  localparam int ROWS = 57, COLS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, pix_valid = 0, pix = 0, pix_ready, hit_valid, busy, done;
  sqd_hit_t hit;
  logic [STEP_W-1:0] step_no;
  int checks = 0, failures = 0;

  sqd_detect_search dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  sqd_hit_t hits[$];
  always @(posedge clk) if (hit_valid) hits.push_back(hit);

  // Runs one image holding an h x w rectangle with corner (r0, c0).
  task automatic run(input int h, input int w, input int r0, input int c0);
    hits.delete();
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < ROWS * COLS; k++) begin
      automatic int r = k / COLS, c = k % COLS;
      pix_valid = 1;
      pix = (r >= r0 && r < r0 + h && c >= c0 && c < c0 + w);
      @(negedge clk);
    end
    pix_valid = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 1; s <= ROWS; s++) begin
      automatic int r0 = $urandom_range(0, ROWS - s);
      automatic int c0 = $urandom_range(0, COLS - s);
      automatic int n = (s + 1) / 2;
      automatic int ok = 1;
      run(s, s, r0, c0);
      check(int'(step_no) == n, $sformatf("square %0d: %0d steps, expected %0d", s, step_no, n));
      check(hits.size() == ((s % 2 == 1) ? 1 : 4), $sformatf("square %0d: %0d hits", s, hits.size()));
      foreach (hits[i]) begin
        // Centre rows/columns: r0 + (s-1)/2 and r0 + s/2.
        automatic int hr = int'(hits[i].row), hc = int'(hits[i].col);
        if ((hr != r0 + (s - 1) / 2 && hr != r0 + s / 2) ||
            (hc != c0 + (s - 1) / 2 && hc != c0 + s / 2) ||
            int'(hits[i].step) != n) ok = 0;
      end
      check(ok == 1, $sformatf("square %0d: hits at the centre at step %0d", s, n));
    end
    for (int t = 0; t < 10; t++) begin
      automatic int m = $urandom_range(1, 20);
      automatic int l = m + $urandom_range(1, 30);
      run(m, l, $urandom_range(0, ROWS - m), $urandom_range(0, COLS - l));
      check(int'(step_no) == (m + 1) / 2, $sformatf("rectangle %0d x %0d steps", m, l));
      check(hits.size() == ((m % 2 == 1) ? l - m + 1 : 2 * (l - m + 2)),
            $sformatf("rectangle %0d x %0d: %0d hits", m, l, hits.size()));
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
