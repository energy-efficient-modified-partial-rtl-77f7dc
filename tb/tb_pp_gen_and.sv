// Self-checking testbench for pp_gen_and (N = 8).
// For random and corner operands, checks every partial product bit
// against a[i]&b[j] and that the weighted sum of all bits equals a*b.
module tb_pp_gen_and;
  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  pp_gen_and #(.N(8)) dut (.a, .b, .pp);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int unsigned acc;
      case (t)
        0: begin a = 8'h00; b = 8'hff; end
        1: begin a = 8'hff; b = 8'hff; end
        2: begin a = 8'h01; b = 8'h80; end
        default: begin a = 8'($urandom); b = 8'($urandom); end
      endcase
      #1;
      acc = 0;
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (pp[j][i] !== (a[i] & b[j])) begin
            failures++;
            $display("FAIL a=%h b=%h bit j=%0d i=%0d", a, b, j, i);
          end
          acc += int'(pp[j][i]) << (i + j);
        end
      checks++;
      if (acc != 32'(a) * 32'(b)) begin
        failures++;
        $display("FAIL a=%h b=%h weighted sum %0d", a, b, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
