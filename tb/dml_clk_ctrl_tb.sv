// dml_clk_ctrl_tb: checks the DML clock in both modes and across mode
// switches.
//
// nr_ex is changed only at rising edges of clk, as a pipeline register
// would. The DML clock is sampled in the middle of each clock phase: it must
// be 1 in both halves of a normal-mode (static) cycle, and 0 in the first
// half (precharge) then 1 in the second half (evaluation) of an
// extended-mode (dynamic) cycle.
module dml_clk_ctrl_tb;

  logic clk;
  logic nr_ex = 1'b1;
  logic dml_clk;
  int   checks = 0, failures = 0;
  int   n_static = 0, n_dynamic = 0, n_switch = 0;

  dml_clk_ctrl dut (.clk(clk), .nr_ex(nr_ex), .dml_clk(dml_clk));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (dml_clk !== exp) begin
      failures++;
      $display("FAIL %s at %0t: nr_ex=%0b dml_clk=%0b", what, $time, nr_ex, dml_clk);
    end
  endtask

  initial begin
    automatic logic prev = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      nr_ex = ($urandom_range(3) != 0);
      if (nr_ex != prev) n_switch++;
      prev = nr_ex;
      #2;   // middle of the high phase
      check(nr_ex ? 1'b1 : 1'b0, "first half");
      @(negedge clk);
      #2;   // middle of the low phase
      check(1'b1, "second half");
      if (nr_ex) n_static++; else n_dynamic++;
    end
    checks++;
    if (n_static == 0 || n_dynamic == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL coverage static=%0d dynamic=%0d switches=%0d", n_static, n_dynamic, n_switch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
