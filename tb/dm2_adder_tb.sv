// dm2_adder_tb: checks the 12-bit DM2 adder datapath against integer
// addition.
//
// Directed cases make a carry travel from bit 0 through all blocks to the
// carry out; random cases (a third with a fully propagating block) cover
// the rest. Each case is checked with the DML clock high, where
// {cout, s} = x + y + cin, and low, where everything reads 0 (precharge).
module dm2_adder_tb;
  import dm2_pkg::*;

  localparam int K  = DM2_K;
  localparam int NB = DM2_NUM_BLOCKS;
  localparam int N  = K * NB;

  logic [N-1:0] x, y, s;
  logic         cin, dml_clk, cout;
  int           checks = 0, failures = 0;
  int           n_full_ripple = 0, n_cout = 0;
  logic         tick;

  dm2_adder dut (.x(x), .y(y), .cin(cin), .dml_clk(dml_clk), .s(s), .cout(cout));

  initial tick = 1'b0;
  always #5 tick = ~tick;

  initial begin : watchdog
    repeat (200000) @(posedge tick);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case();
    longint exp;
    exp = longint'(x) + longint'(y) + longint'(cin);
    if ((x ^ y) == '1 && cin) n_full_ripple++;
    if (exp[N]) n_cout++;
    dml_clk = 1'b1;
    #1;
    checks++;
    if ({cout, s} !== exp[N:0]) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%0b got=%h exp=%h", x, y, cin, {cout, s}, exp[N:0]);
    end
    dml_clk = 1'b0;
    #1;
    checks++;
    if ({cout, s} !== '0) begin
      failures++;
      $display("FAIL precharge x=%h y=%h got=%h", x, y, {cout, s});
    end
  endtask

  initial begin
    x = '1; y = '0; cin = 1'b1; run_case();        // carry from bit 0 to cout
    x = '0; y = '1; cin = 1'b1; run_case();
    x = N'(12'hA5A); y = ~x; cin = 1'b1; run_case();
    x = '1; y = '1; cin = 1'b1; run_case();
    x = '0; y = '0; cin = 1'b0; run_case();
    for (int t = 0; t < 50000; t++) begin
      x   = N'($urandom);
      y   = N'($urandom);
      cin = 1'($urandom);
      if (t % 3 == 0) begin
        automatic int j = $urandom_range(NB - 1);
        y[j*K +: K] = ~x[j*K +: K];
      end
      run_case();
    end
    checks++;
    if (n_full_ripple == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL coverage full_ripple=%0d cout=%0d", n_full_ripple, n_cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
