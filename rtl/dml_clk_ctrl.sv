// dml_clk_ctrl: switches the DML gates between static and dynamic mode,
// one clock cycle at a time.
//
// For a normal-mode addition (nr_ex = 1) the DML clock is held at 1, the
// static mode, in which the gates behave like static CMOS at low energy.
// For an extended-mode addition (nr_ex = 0) the DML clock is the inverted
// pipeline clock: the first half of the cycle (clk high) is the precharge
// phase and the second half (clk low) the evaluation phase, the fast
// dynamic mode, so the result is ready by the next rising edge of clk.
//
// Interface: nr_ex must come from a register clocked by the rising edge of
// clk (the decode-to-ALU pipeline register), so it only changes at the same
// instant clk rises. Then dml_clk is 1 during every low phase of clk and
// changes only at rising edges (to 0 or stays 1) and falling edges (to 1):
// the precharge pulse is exactly the high phase of an extended-mode cycle.
// Switching mode per cycle follows the design; the choice of which clock
// half precharges is this model's.
module dml_clk_ctrl (
  input  logic clk,
  input  logic nr_ex,
  output logic dml_clk
);

  assign dml_clk = nr_ex | ~clk;

endmodule
