// Self-checking testbench for cpa_adder (W = 16).
// Random and corner operands; the sum is compared with a 32-bit addition
// reduced to 16 bits.
module tb_cpa_adder;
  logic [15:0] x, y, s;
  int checks = 0, failures = 0;

  cpa_adder #(.W(16)) dut (.x, .y, .s);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int unsigned ref_sum;
      case (t)
        0: begin x = 16'hffff; y = 16'h0001; end
        1: begin x = 16'h7fff; y = 16'h7fff; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      ref_sum = 32'(x) + 32'(y);
      checks++;
      if (s !== ref_sum[15:0]) begin
        failures++;
        $display("FAIL %h + %h = %h", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
