// tb_sqd_node: self-checking test of one node automaton.
// Shifts values through load mode, then applies random neighbour patterns
// and checks the next state (AND of self and eight neighbours) and the
// eliminating flag of Eq. (1) against values computed here.
module tb_sqd_node;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, mode_load, ser_in, s, f;
  logic [7:0] nbr;
  int checks = 0, failures = 0;

  sqd_node dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (s=%0b f=%0b nbr=%b)", what, s, f, nbr);
    end
  endtask

  initial begin
    bit exp_s, exp_prev;
    en = 0; mode_load = 0; ser_in = 0; nbr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(s == 0 && f == 0, "reset");
    for (int t = 0; t < 400; t++) begin
      // Load a random pixel, then run a few transitions.
      mode_load = 1; en = 1; ser_in = 1'($urandom);
      nbr = 8'($urandom);
      @(negedge clk);
      exp_s = ser_in; exp_prev = ser_in;
      check(s == exp_s, "load value");
      check(f == 0, "no flag after load");
      mode_load = 0;
      for (int k = 0; k < 3; k++) begin
        en = ($urandom_range(0, 3) != 0);
        // Bias towards all-ones and all-zeros neighbourhoods.
        case ($urandom_range(0, 3))
          0: nbr = 8'hff;
          1: nbr = 8'h00;
          default: nbr = 8'($urandom);
        endcase
        @(negedge clk);
        if (en) begin
          exp_prev = exp_s;
          exp_s = exp_s & (nbr == 8'hff);
        end
        check(s == exp_s, "transition state");
        // Flag seen with the neighbours after the step.
        nbr = (nbr == 8'hff) ? 8'h00 : nbr;
        #1;
        check(f == (exp_prev && !exp_s && nbr == 0), "eliminating flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
