// nrex_detect: normal / extended mode decision of the dual-mode adder.
//
// A carry can run further than one K-bit block only through a block in
// which every bit propagates (x[i] ^ y[i] = 1). For each block an AND of its
// K propagate bits flags that case; a NOR of the block flags gives nr_ex:
//   nr_ex = 1  normal mode: no carry chain can be longer than the block
//              width, the adder settles within the short normal-mode time;
//   nr_ex = 0  extended mode: some carry may cross a whole block.
// The per-block AND gates and the NOR that combines them follow the design;
// using the XOR propagate signals as the AND inputs is this model's reading
// of how operand bits feed those gates.
//
// Interface: x, y are the full-width operands; blk_prop[j] is block j's AND
// output. Timing: combinational, meant to be evaluated in the decode stage,
// a cycle ahead of the addition.
module nrex_detect
  import dm2_pkg::*;
#(
  parameter int unsigned K          = DM2_K,
  parameter int unsigned NUM_BLOCKS = DM2_NUM_BLOCKS
) (
  input  logic [K*NUM_BLOCKS-1:0] x,
  input  logic [K*NUM_BLOCKS-1:0] y,
  output logic [NUM_BLOCKS-1:0]   blk_prop,
  output logic                    nr_ex
);

  logic [K*NUM_BLOCKS-1:0] p;

  assign p = x ^ y;

  for (genvar j = 0; j < NUM_BLOCKS; j++) begin : g_blk
    assign blk_prop[j] = &p[j*K +: K];
  end

  assign nr_ex = ~(|blk_prop);

endmodule
