// dm2_adder: the DM2 adder datapath, NUM_BLOCKS ripple-carry blocks of K
// DML full adders chained by their carries.
//
// The operands are cut into NUM_BLOCKS blocks of K bits; block j adds bits
// [j*K +: K] with the carry out of block j-1 (block 0 takes cin). Every
// block shares one DML clock. In static mode the whole adder is static
// logic, fast enough when no carry runs longer than one block; in dynamic
// mode the DML gates are fast enough for the carry to ripple through all
// blocks within the same cycle, so every addition takes one cycle.
//
// Interface: s + 2^(K*NUM_BLOCKS)*cout = x + y + cin whenever dml_clk = 1;
// while dml_clk = 0 (dynamic-mode precharge) s and cout read 0.
// Timing: combinational. The three four-bit DML blocks follow the design.
module dm2_adder
  import dm2_pkg::*;
#(
  parameter int unsigned K          = DM2_K,
  parameter int unsigned NUM_BLOCKS = DM2_NUM_BLOCKS
) (
  input  logic [K*NUM_BLOCKS-1:0] x,
  input  logic [K*NUM_BLOCKS-1:0] y,
  input  logic                    cin,
  input  logic                    dml_clk,
  output logic [K*NUM_BLOCKS-1:0] s,
  output logic                    cout
);

  // carry[j] is the carry into block j.
  logic [NUM_BLOCKS:0] carry;

  assign carry[0] = cin;

  for (genvar j = 0; j < NUM_BLOCKS; j++) begin : g_blk
    dml_rca #(.K(K)) u_rca (
      .x      (x[j*K +: K]),
      .y      (y[j*K +: K]),
      .cin    (carry[j]),
      .dml_clk(dml_clk),
      .s      (s[j*K +: K]),
      .cout   (carry[j+1])
    );
  end

  assign cout = carry[NUM_BLOCKS];

endmodule
