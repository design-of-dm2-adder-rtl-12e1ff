// nrex_detect_tb: checks the normal / extended decision.
//
// The reference walks the operands bit by bit and flags a block when every
// bit in it has exactly one operand bit set; nr_ex must be 1 only when no
// block is flagged. Directed cases put a full-propagate block in each
// position; random operands, half of them shaped so a chosen block
// propagates fully, cover the rest.
module nrex_detect_tb;
  import dm2_pkg::*;

  localparam int K  = DM2_K;
  localparam int NB = DM2_NUM_BLOCKS;
  localparam int N  = K * NB;

  logic [N-1:0]  x, y;
  logic [NB-1:0] blk_prop;
  logic          nr_ex;
  int            checks = 0, failures = 0;
  int            n_normal = 0, n_extended = 0;
  logic          tick;

  nrex_detect dut (.x(x), .y(y), .blk_prop(blk_prop), .nr_ex(nr_ex));

  initial tick = 1'b0;
  always #5 tick = ~tick;

  initial begin : watchdog
    repeat (100000) @(posedge tick);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    logic [NB-1:0] exp_blk;
    logic          exp_nr;
    #1;
    for (int j = 0; j < NB; j++) begin
      exp_blk[j] = 1'b1;
      for (int i = 0; i < K; i++)
        if (x[j*K+i] == y[j*K+i]) exp_blk[j] = 1'b0;
    end
    exp_nr = (exp_blk == '0);
    checks++;
    if (blk_prop !== exp_blk || nr_ex !== exp_nr) begin
      failures++;
      $display("FAIL x=%h y=%h blk=%b exp=%b nr_ex=%0b exp=%0b",
               x, y, blk_prop, exp_blk, nr_ex, exp_nr);
    end
    if (exp_nr) n_normal++; else n_extended++;
  endtask

  initial begin
    // directed: zero operands, one full-propagate block at a time, all blocks
    x = '0; y = '0; apply_and_check();
    for (int j = 0; j < NB; j++) begin
      x = '0; y = '0;
      x[j*K +: K] = K'($urandom);
      y[j*K +: K] = ~x[j*K +: K];
      apply_and_check();
      y[j*K] = ~y[j*K];  // one bit short of full propagation
      apply_and_check();
    end
    x = N'($urandom); y = ~x; apply_and_check();
    // random
    for (int t = 0; t < 20000; t++) begin
      x = N'($urandom);
      y = N'($urandom);
      if (t % 2 == 0) begin
        automatic int j = $urandom_range(NB - 1);
        y[j*K +: K] = ~x[j*K +: K];
      end
      apply_and_check();
    end
    checks++;
    if (n_normal == 0 || n_extended == 0) begin
      failures++;
      $display("FAIL a mode was never seen: normal=%0d extended=%0d", n_normal, n_extended);
    end
    $display("normal=%0d extended=%0d", n_normal, n_extended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
