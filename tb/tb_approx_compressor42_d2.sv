// Self-checking testbench for approx_compressor42_d2.
// Applies all 16 input patterns and compares carry and sum with the
// published truth table of Design 2 (masks indexed by {x4,x3,x2,x1}).
// Also checks that exactly 4 patterns are wrong, each by one unit.
module tb_approx_compressor42_d2;
  localparam logic [15:0] CARRY_TT = 16'heee0;
  localparam logic [15:0] SUM_TT   = 16'hf99f;

  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0, wrong = 0;

  approx_compressor42_d2 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exact, got;
      {x4, x3, x2, x1} = 4'(i);
      #1;
      checks++;
      if ({carry, sum} !== {CARRY_TT[i], SUM_TT[i]}) begin
        failures++;
        $display("FAIL in=%04b got carry=%b sum=%b", 4'(i), carry, sum);
      end
      exact = int'(x1) + x2 + x3 + x4;
      got   = int'(sum) + 2 * int'(carry);
      if (exact != got) wrong++;
      checks++;
      if (got - exact > 1 || exact - got > 1) begin
        failures++;
        $display("FAIL error above one unit in=%04b", 4'(i));
      end
    end
    checks++;
    if (wrong != 4) begin
      failures++;
      $display("FAIL %0d wrong patterns, expected 4", wrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
