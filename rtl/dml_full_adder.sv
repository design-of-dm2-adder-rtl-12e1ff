// dml_full_adder: one-bit inverting full adder written as a dual mode logic
// (DML) gate.
//
// The gate is a mirror full adder: it returns the complement of the carry
// (majority) and of the sum (three-input XOR) of its inputs. Because a full
// adder is self-dual, feeding it inverted operands gives true outputs, which
// is how Type A and Type B cells alternate along a ripple chain without an
// inverter in the carry path.
//
// DML adds one clocked transistor per output node:
//   Type A  a pMOS to the supply driven by the clock. Static mode holds the
//           clock high; in dynamic mode a low clock precharges the outputs
//           to 1 and a high clock lets them evaluate.
//   Type B  an nMOS to ground driven by the complement clock. Static mode
//           holds clk_bar low; in dynamic mode a high clk_bar discharges the
//           outputs to 0 and a low clk_bar lets them evaluate.
// Both types take the same dml_clk here (Type B forms clk_bar internally),
// so dml_clk = 1 means "static mode or evaluation phase" and dml_clk = 0
// means "precharge phase" for either type.
//
// Timing: purely combinational; the transistor sizing that makes the dynamic
// mode faster than the static one has no logic-level equivalent and is not
// modelled. The two gate types, the precharge values and the static/dynamic
// behaviour follow the design; expressing the precharge as a forced output
// value is this model's choice.
module dml_full_adder
  import dm2_pkg::*;
#(
  parameter fa_type_e TYPE = FA_TYPE_A
) (
  input  logic a,        // operand bit, in this gate's input polarity
  input  logic b,        // operand bit, in this gate's input polarity
  input  logic ci,       // carry in, in this gate's input polarity
  input  logic dml_clk,  // 1: static mode or evaluation, 0: precharge
  output logic co_inv,   // complement of the majority of a, b, ci
  output logic s_inv     // complement of a ^ b ^ ci
);

  // Value an output node takes during the precharge phase.
  localparam logic PRECHARGE = (TYPE == FA_TYPE_A) ? 1'b1 : 1'b0;

  logic clk_bar;
  logic evaluate;
  logic maj, parity;

  // Type A evaluates while clk is high; Type B while clk_bar is low.
  assign clk_bar  = ~dml_clk;
  assign evaluate = (TYPE == FA_TYPE_A) ? dml_clk : ~clk_bar;

  assign maj    = (a & b) | (ci & (a | b));
  assign parity = a ^ b ^ ci;

  always_comb begin
    if (evaluate) begin
      co_inv = ~maj;
      s_inv  = ~parity;
    end else begin
      co_inv = PRECHARGE;
      s_inv  = PRECHARGE;
    end
  end

endmodule
