// dm2_top_tb: end-to-end test of the pipelined DM2 adder at its default
// size (three 4-bit blocks, 12 bits).
//
// A stream of operations is fed into the decode stage, one per cycle, with
// idle cycles and a mid-run reset mixed in. A third of the operand pairs are
// shaped so that at least one block propagates fully (extended mode); the
// rest are random, which is mostly normal mode. A reference model, written
// independently of the RTL, holds the operation accepted at the last rising
// edge and predicts:
//   mode     static when no 4-bit block has x ^ y all ones, else dynamic;
//   phase 1  (clk high) static: the sum is already valid; dynamic: the
//            adder precharges, res_valid = 0 and the sum reads 0;
//   phase 2  (clk low) the sum equals x + y + cin in either mode, so every
//            operation finishes one cycle after it was accepted.
// Counted mechanisms, each of which must occur: normal-mode and
// extended-mode operations, a precharge seen, switches static->dynamic and
// dynamic->static, a carry out, a carry rippling through all 12 bits, idle
// cycles and a reset.
module dm2_top_tb;
  import dm2_pkg::*;

  localparam int K  = DM2_K;
  localparam int NB = DM2_NUM_BLOCKS;
  localparam int N  = K * NB;
  localparam int NUM_CYCLES = 200000;

  logic          clk;
  logic          rst_n;
  logic          id_valid;
  logic [N-1:0]  id_x, id_y;
  logic          id_cin;
  logic [NB-1:0] id_blk_prop;
  logic          ex_valid, dml_clk, res_valid, ex_cout;
  dml_mode_e     ex_mode;
  logic [N-1:0]  ex_sum;

  int checks = 0, failures = 0;
  int n_normal = 0, n_extended = 0, n_precharge = 0;
  int n_to_dynamic = 0, n_to_static = 0, n_cout = 0, n_full_ripple = 0;
  int n_idle = 0, n_reset = 0;

  dm2_top dut (
    .clk(clk), .rst_n(rst_n),
    .id_valid(id_valid), .id_x(id_x), .id_y(id_y), .id_cin(id_cin),
    .id_blk_prop(id_blk_prop),
    .ex_valid(ex_valid), .ex_mode(ex_mode), .dml_clk(dml_clk),
    .res_valid(res_valid), .ex_sum(ex_sum), .ex_cout(ex_cout)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NUM_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state: the operation now in the ALU stage.
  logic          m_valid;
  logic [N-1:0]  m_x, m_y;
  logic          m_cin;
  logic          m_dynamic;
  logic          prev_dynamic;

  function automatic logic needs_extended(input logic [N-1:0] a, input logic [N-1:0] b);
    for (int j = 0; j < NB; j++) begin
      logic all_p = 1'b1;
      for (int i = 0; i < K; i++)
        if (a[j*K+i] == b[j*K+i]) all_p = 1'b0;
      if (all_p) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: x=%h y=%h cin=%0b mode=%s sum=%h cout=%0b",
                 what, $time, m_x, m_y, m_cin, ex_mode.name(), ex_sum, ex_cout);
    end
  endtask

  task automatic drive_next(input int t);
    id_valid = ($urandom_range(9) != 0);
    id_x     = N'($urandom);
    id_y     = N'($urandom);
    id_cin   = 1'($urandom);
    case ($urandom_range(5))
      0, 1: begin                      // force one block to propagate fully
        automatic int j = $urandom_range(NB - 1);
        id_y[j*K +: K] = ~id_x[j*K +: K];
      end
      2: if ($urandom_range(19) == 0) begin  // full-length ripple
        id_y = ~id_x;
        id_cin = 1'b1;
      end
      default: ;
    endcase
    if (t < 4) begin                   // a fixed start: 0xFFF + 0 + 1
      id_valid = 1'b1; id_x = '1; id_y = '0; id_cin = 1'b1;
    end
    #1;
    for (int j = 0; j < NB; j++)
      check(id_blk_prop[j] == (((id_x ^ id_y) >> (j*K)) % (1 << K) == (1 << K) - 1),
            "decode-stage block propagate");
  endtask

  initial begin
    prev_dynamic = 1'b0;
    rst_n = 1'b0;
    id_valid = 1'b0; id_x = '0; id_y = '0; id_cin = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(ex_valid == 1'b0 && ex_mode == DML_STATIC, "reset state");
    n_reset++;
    rst_n = 1'b1;
    drive_next(0);
    for (int t = 0; t < NUM_CYCLES; t++) begin
      // Reference: what the pipeline register captures at this edge.
      logic do_reset;
      do_reset  = (t == NUM_CYCLES / 2);
      @(posedge clk);
      m_valid   = rst_n && id_valid;
      m_x       = rst_n ? id_x : '0;
      m_y       = rst_n ? id_y : '0;
      m_cin     = rst_n ? id_cin : 1'b0;
      m_dynamic = m_valid && needs_extended(m_x, m_y);
      #2;  // first half of the cycle
      check(ex_valid == m_valid, "valid");
      check(ex_mode == (m_dynamic ? DML_DYNAMIC : DML_STATIC), "mode");
      if (m_dynamic) begin
        check(dml_clk == 1'b0 && res_valid == 1'b0 && ex_sum == '0 && ex_cout == 1'b0,
              "precharge");
        n_precharge++;
      end else begin
        check(dml_clk == 1'b1 && res_valid == m_valid, "static phase 1");
        check({ex_cout, ex_sum} == (N+1)'(m_x) + (N+1)'(m_y) + (N+1)'(m_cin),
              "static sum phase 1");
      end
      if (!rst_n) n_reset++;
      else if (!m_valid) n_idle++;
      else if (m_dynamic) n_extended++;
      else n_normal++;
      if (m_valid && m_dynamic && !prev_dynamic) n_to_dynamic++;
      if (m_valid && !m_dynamic && prev_dynamic) n_to_static++;
      if (m_valid) prev_dynamic = m_dynamic;
      // Next operation into the decode stage; reset once mid-run.
      rst_n = !do_reset;
      drive_next(t + 1);
      @(negedge clk);
      #2;  // second half of the cycle: result due in every mode
      check(dml_clk == 1'b1 && res_valid == m_valid, "phase 2 valid");
      check({ex_cout, ex_sum} == (N+1)'(m_x) + (N+1)'(m_y) + (N+1)'(m_cin), "sum");
      if (m_valid && ex_cout) n_cout++;
      if (m_valid && m_cin && (m_x ^ m_y) == '1) n_full_ripple++;
    end
    $display("normal=%0d extended=%0d precharge=%0d to_dynamic=%0d to_static=%0d",
             n_normal, n_extended, n_precharge, n_to_dynamic, n_to_static);
    $display("cout=%0d full_ripple=%0d idle=%0d reset=%0d",
             n_cout, n_full_ripple, n_idle, n_reset);
    checks++;
    if (n_normal == 0 || n_extended == 0 || n_precharge == 0 || n_to_dynamic == 0 ||
        n_to_static == 0 || n_cout == 0 || n_full_ripple == 0 || n_idle == 0 ||
        n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
