// dml_rca_tb: exhaustive check of the alternating-polarity DML ripple-carry
// block at its default width (4 bits) and at an odd width (3 bits, which
// ends on a Type A cell).
//
// Every x, y, cin is applied with the DML clock high (static mode or
// evaluation), where {cout, s} must equal x + y + cin computed with integer
// arithmetic, and with it low (precharge), where s and cout must read 0.
module dml_rca_tb;

  localparam int K4 = 4;
  localparam int K3 = 3;

  logic [K4-1:0] x4, y4, s4;
  logic [K3-1:0] x3, y3, s3;
  logic          cin, dml_clk, co4, co3;
  int            checks = 0, failures = 0;
  logic          tick;

  dml_rca dut4 (.x(x4), .y(y4), .cin(cin), .dml_clk(dml_clk), .s(s4), .cout(co4));
  dml_rca #(.K(K3)) dut3 (.x(x3), .y(y3), .cin(cin), .dml_clk(dml_clk), .s(s3), .cout(co3));

  initial tick = 1'b0;
  always #5 tick = ~tick;

  initial begin : watchdog
    repeat (10000) @(posedge tick);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int clkv = 0; clkv < 2; clkv++) begin
      for (int v = 0; v < 512; v++) begin
        int exp4, exp3;
        dml_clk = clkv[0];
        {cin, x4, y4} = v[8:0];
        x3 = x4[K3-1:0];
        y3 = y4[K3-1:0];
        #1;
        exp4 = dml_clk ? int'(x4) + int'(y4) + int'(cin) : 0;
        exp3 = dml_clk ? int'(x3) + int'(y3) + int'(cin) : 0;
        checks++;
        if (int'({co4, s4}) != exp4) begin
          failures++;
          $display("FAIL K=4 clk=%0b x=%h y=%h cin=%0b got=%h exp=%h",
                   dml_clk, x4, y4, cin, {co4, s4}, exp4);
        end
        checks++;
        if (int'({co3, s3}) != exp3) begin
          failures++;
          $display("FAIL K=3 clk=%0b x=%h y=%h cin=%0b got=%h exp=%h",
                   dml_clk, x3, y3, cin, {co3, s3}, exp3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
