// Self-checking testbench for zero_detect (N = 8).
// Random products with zero and non-zero operands: the output must be 0
// with the zero flag set when an operand is 0, and the input product
// unchanged otherwise.
module tb_zero_detect;
  logic [7:0]  a, b;
  logic [15:0] p_in, p_out;
  logic        zero;
  int checks = 0, failures = 0;

  zero_detect #(.N(8)) dut (.a, .b, .p_in, .p_out, .zero);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic z;
      a    = (t % 3 == 0) ? 8'h00 : 8'($urandom);
      b    = (t % 5 == 0) ? 8'h00 : 8'($urandom);
      p_in = 16'($urandom) | 16'h0001;
      #1;
      z = (a == 0) || (b == 0);
      checks++;
      if (zero !== z || p_out !== (z ? 16'h0000 : p_in)) begin
        failures++;
        $display("FAIL a=%h b=%h p_in=%h p_out=%h zero=%b", a, b, p_in, p_out, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
