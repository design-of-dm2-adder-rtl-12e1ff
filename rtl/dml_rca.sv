// dml_rca: K-bit ripple-carry adder of DML full adders of alternating
// polarity.
//
// Bit 0 is a Type A cell fed with true operands; it returns the carry and
// sum inverted. Bit 1 is a Type B cell fed with inverted operands and the
// inverted carry straight from bit 0; by self-duality its outputs are true
// again. The pattern repeats, so the carry passes from cell to cell with no
// inverter in between, which roughly halves the ripple delay of a chain of
// non-inverting full adders. Inverters sit only off the carry path: on the
// operands of Type B (odd) bits and on the sums of Type A (even) bits, plus
// one on the carry out when K is odd.
//
// Interface: x, y, cin, s and cout are all true polarity. dml_clk is shared
// by every cell (see dml_full_adder): in dynamic mode, while dml_clk is 0 the
// whole block reads s = 0 and cout = 0; in static mode and while dml_clk is 1
// it is an ordinary combinational adder, s + 2^K*cout = x + y + cin.
//
// The four-bit size and the alternating Type A / Type B arrangement follow
// the design; where exactly the inverters sit is this model's choice.
module dml_rca
  import dm2_pkg::*;
#(
  parameter int unsigned K = DM2_K
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic         cin,
  input  logic         dml_clk,
  output logic [K-1:0] s,
  output logic         cout
);

  // c[i] is the carry into bit i in the polarity bit i expects:
  // true for even (Type A) bits, inverted for odd (Type B) bits.
  logic [K:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < K; i++) begin : g_bit
    logic s_raw;
    if (i % 2 == 0) begin : g_type_a
      dml_full_adder #(.TYPE(FA_TYPE_A)) u_fa (
        .a      (x[i]),
        .b      (y[i]),
        .ci     (c[i]),
        .dml_clk(dml_clk),
        .co_inv (c[i+1]),
        .s_inv  (s_raw)
      );
      assign s[i] = ~s_raw;        // sum inverter
    end else begin : g_type_b
      dml_full_adder #(.TYPE(FA_TYPE_B)) u_fa (
        .a      (~x[i]),           // operand inverters
        .b      (~y[i]),
        .ci     (c[i]),
        .dml_clk(dml_clk),
        .co_inv (c[i+1]),
        .s_inv  (s_raw)
      );
      assign s[i] = s_raw;
    end
  end

  // After an even number of cells the carry is true again.
  assign cout = (K % 2 == 0) ? c[K] : ~c[K];

endmodule
