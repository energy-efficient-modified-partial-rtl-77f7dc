// Self-checking testbench for exact_compressor42.
// Applies all 32 input patterns and compares cout, carry and sum with the
// columns of the compressor's published truth table, held as 32-bit masks
// indexed by {cin,x4,x3,x2,x1}.  Also checks the arithmetic identity
// x1+x2+x3+x4+cin = sum + 2*(carry+cout).
module tb_exact_compressor42;
  localparam logic [31:0] COUT_TT  = 32'he8e8e8e8;
  localparam logic [31:0] CARRY_TT = 32'hff969600;
  localparam logic [31:0] SUM_TT   = 32'h96696996;

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  exact_compressor42 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, x4, x3, x2, x1} = 5'(i);
      #1;
      checks++;
      if ({cout, carry, sum} !== {COUT_TT[i], CARRY_TT[i], SUM_TT[i]}) begin
        failures++;
        $display("FAIL in=%05b got cout=%b carry=%b sum=%b", 5'(i), cout, carry, sum);
      end
      checks++;
      if (32'(x1) + x2 + x3 + x4 + cin != 32'(sum) + 2 * (32'(carry) + cout)) begin
        failures++;
        $display("FAIL arithmetic in=%05b", 5'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
