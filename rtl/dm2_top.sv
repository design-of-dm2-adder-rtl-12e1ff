// dm2_top: a DM2 adder placed in a pipeline, decode stage to ALU stage.
//
// The DM2 adder merges two ideas. Dual-mode addition: a ripple adder built
// for the expected longest carry (one K-bit block) rather than the worst
// case, with a mode decision that tells when an operand pair may carry
// further. Dual mode logic (DML): gates that run as low-energy static CMOS
// or, clocked, as faster dynamic logic, switchable every cycle. Here the
// mode decision picks the DML mode instead of extra cycles, so every
// addition completes in one cycle and the pipeline never stalls:
//   normal mode   (nr_ex = 1)  DML static, the common case;
//   extended mode (nr_ex = 0)  DML dynamic, precharge then evaluate.
//
// Pipeline: in the decode stage nrex_detect looks at the incoming operands.
// On the rising edge of clk the operands, carry in and decision are
// registered into the ALU stage, where dml_clk_ctrl drives the DML clock and
// dm2_adder adds. The sum is read in the same cycle: at any time in a
// static-mode cycle, and in the second half (clk low, evaluation) of a
// dynamic-mode cycle; res_valid marks when it is readable. An operation
// accepted at edge n has its result ready before edge n+1 (latency one
// cycle, one operation per cycle).
//
// Choosing the mode in the decode stage, before the ALU stage, follows the
// design; the valid flag, the synchronous active-low reset and the
// half-cycle phasing of the dynamic mode are this model's choices.
module dm2_top
  import dm2_pkg::*;
#(
  parameter int unsigned K          = DM2_K,
  parameter int unsigned NUM_BLOCKS = DM2_NUM_BLOCKS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // decode stage
  input  logic                    id_valid,
  input  logic [K*NUM_BLOCKS-1:0] id_x,
  input  logic [K*NUM_BLOCKS-1:0] id_y,
  input  logic                    id_cin,
  output logic [NUM_BLOCKS-1:0]   id_blk_prop,  // blocks a carry could cross
  // ALU stage
  output logic                    ex_valid,
  output dml_mode_e               ex_mode,      // DML mode of this cycle
  output logic                    dml_clk,      // clock of the DML gates
  output logic                    res_valid,    // ex_valid and not precharging
  output logic [K*NUM_BLOCKS-1:0] ex_sum,
  output logic                    ex_cout
);

  localparam int unsigned N = K * NUM_BLOCKS;

  logic         id_nr_ex;
  logic         ex_nr_ex;
  logic [N-1:0] ex_x, ex_y;
  logic         ex_cin;

  // Decode stage: normal / extended decision.
  nrex_detect #(.K(K), .NUM_BLOCKS(NUM_BLOCKS)) u_detect (
    .x       (id_x),
    .y       (id_y),
    .blk_prop(id_blk_prop),
    .nr_ex   (id_nr_ex)
  );

  // Decode-to-ALU pipeline register. After reset the gates are static.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_nr_ex <= 1'b1;
      ex_x     <= '0;
      ex_y     <= '0;
      ex_cin   <= 1'b0;
    end else begin
      ex_valid <= id_valid;
      ex_nr_ex <= id_valid ? id_nr_ex : 1'b1;  // idle cycles stay static
      ex_x     <= id_x;
      ex_y     <= id_y;
      ex_cin   <= id_cin;
    end
  end

  // ALU stage: DML mode per cycle, then the adder itself.
  dml_clk_ctrl u_clk_ctrl (
    .clk    (clk),
    .nr_ex  (ex_nr_ex),
    .dml_clk(dml_clk)
  );

  dm2_adder #(.K(K), .NUM_BLOCKS(NUM_BLOCKS)) u_adder (
    .x      (ex_x),
    .y      (ex_y),
    .cin    (ex_cin),
    .dml_clk(dml_clk),
    .s      (ex_sum),
    .cout   (ex_cout)
  );

  assign ex_mode   = ex_nr_ex ? DML_STATIC : DML_DYNAMIC;
  assign res_valid = ex_valid & dml_clk;

endmodule
