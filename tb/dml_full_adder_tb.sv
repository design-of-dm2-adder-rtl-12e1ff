// dml_full_adder_tb: exhaustive check of both DML full adder types.
//
// For every combination of a, b, ci and dml_clk the outputs of a Type A and
// a Type B cell are compared with a reference written from the truth table
// (carry = at least two inputs set, sum = odd number of inputs set), then
// complemented; with dml_clk = 0 Type A must read 1 and Type B 0 (precharge).
module dml_full_adder_tb;
  import dm2_pkg::*;

  logic a, b, ci, dml_clk;
  logic co_a, s_a, co_b, s_b;
  int   checks = 0, failures = 0;
  logic tick;

  dml_full_adder #(.TYPE(FA_TYPE_A)) dut_a (
    .a(a), .b(b), .ci(ci), .dml_clk(dml_clk), .co_inv(co_a), .s_inv(s_a));
  dml_full_adder #(.TYPE(FA_TYPE_B)) dut_b (
    .a(a), .b(b), .ci(ci), .dml_clk(dml_clk), .co_inv(co_b), .s_inv(s_b));

  initial tick = 1'b0;
  always #5 tick = ~tick;

  initial begin : watchdog
    repeat (1000) @(posedge tick);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b ci=%0b clk=%0b got=%0b exp=%0b",
               what, a, b, ci, dml_clk, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      logic exp_co, exp_s;
      {dml_clk, a, b, ci} = v[3:0];
      #1;
      ones   = int'(a) + int'(b) + int'(ci);
      exp_co = (ones >= 2) ? 1'b0 : 1'b1;  // inverted carry
      exp_s  = (ones % 2 == 1) ? 1'b0 : 1'b1;  // inverted sum
      if (dml_clk) begin
        check(co_a, exp_co, "typeA carry");
        check(s_a,  exp_s,  "typeA sum");
        check(co_b, exp_co, "typeB carry");
        check(s_b,  exp_s,  "typeB sum");
      end else begin
        check(co_a, 1'b1, "typeA carry precharge");
        check(s_a,  1'b1, "typeA sum precharge");
        check(co_b, 1'b0, "typeB carry discharge");
        check(s_b,  1'b0, "typeB sum discharge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
