// Self-checking testbench for approx_compressor42_d1.
// Applies all 32 input patterns and compares cout, carry and sum with the
// published truth table of Design 1 (masks indexed by {cin,x4,x3,x2,x1}).
// Also checks that exactly 12 of the 32 patterns are wrong and that each
// error is at most one unit.
module tb_approx_compressor42_d1;
  localparam logic [31:0] COUT_TT  = 32'heee0eee0;
  localparam logic [31:0] CARRY_TT = 32'hffff0000;
  localparam logic [31:0] SUM_TT   = 32'h0000f99f;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0, wrong = 0;

  approx_compressor42_d1 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int exact, got;
      {cin, x4, x3, x2, x1} = 5'(i);
      #1;
      checks++;
      if ({cout, carry, sum} !== {COUT_TT[i], CARRY_TT[i], SUM_TT[i]}) begin
        failures++;
        $display("FAIL in=%05b got cout=%b carry=%b sum=%b", 5'(i), cout, carry, sum);
      end
      exact = int'(x1) + x2 + x3 + x4 + cin;
      got   = int'(sum) + 2 * (int'(carry) + cout);
      if (exact != got) wrong++;
      checks++;
      if (got - exact > 1 || exact - got > 1) begin
        failures++;
        $display("FAIL error above one unit in=%05b", 5'(i));
      end
    end
    checks++;
    if (wrong != 12) begin
      failures++;
      $display("FAIL %0d wrong patterns, expected 12", wrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
