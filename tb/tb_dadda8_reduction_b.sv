// Self-checking testbench for dadda8_reduction_b (Multiplier 2 layout).
// Feeds the partial product matrix of every operand pair (built here),
// adds the two output rows here, and compares the exhaustive figures with
// the reference of mult_ref_pkg.  A second check bounds the error: for
// every non-zero pair the result stays within 8688 below and 8184 above
// a*b.
module tb_dadda8_reduction_b;
  import mult_ref_pkg::*;

  logic [7:0][7:0] pp;
  logic [14:0] r0, r1;
  int checks = 0, failures = 0;

  dadda8_reduction_b dut (.pp(pp), .row0(r0), .row1(r1));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    stats_acc acc;
    stats_t   e;
    acc = new();
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++)
            pp[j][i] = a[i] & b[j];
        #1;
        acc.add(a, b, int'(r0) + int'(r1));
      end
    end
    e = expected(2);
    $display("exact=%0d sumerr=%0d hi=%0d lo=%0d zero_wrong=%0d hash=%h",
             acc.s.ok, acc.s.sumerr, acc.s.hi, acc.s.lo, acc.s.zbad, acc.s.hash);
    check(acc.s.ok == e.ok, "exact count");
    check(acc.s.sumerr == e.sumerr, "error sum");
    check(acc.s.hi == e.hi && acc.s.lo == e.lo, "error extremes");
    check(acc.s.zbad == e.zbad, "zero-operand errors");
    check(acc.s.hash == e.hash, "fingerprint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
