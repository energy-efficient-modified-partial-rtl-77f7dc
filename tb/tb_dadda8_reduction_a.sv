// Self-checking testbench for dadda8_reduction_a.
// Four instances (exact, Multipliers 1, 3 and 4) are fed the partial
// product matrix of every operand pair; the matrix is built here, and the
// two output rows are added here.  The exact instance must give a*b for
// every pair; the approximate ones must reproduce the reference figures of
// mult_ref_pkg, and Multipliers 3 and 4 the published error figures.
module tb_dadda8_reduction_a;
  import cmp42_pkg::*;
  import mult_ref_pkg::*;

  localparam mult_kind_e KINDS [4] = '{MULT_EXACT, MULT_1, MULT_3, MULT_4};
  localparam int         IDS   [4] = '{0, 1, 3, 4};

  logic [7:0][7:0] pp;
  logic [3:0][14:0] r0, r1;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    dadda8_reduction_a #(.MULT(KINDS[k])) dut (.pp(pp), .row0(r0[k]), .row1(r1[k]));
  end

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
    stats_acc acc [4];
    for (int k = 0; k < 4; k++) acc[k] = new();
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++)
            pp[j][i] = a[i] & b[j];
        #1;
        for (int k = 0; k < 4; k++)
          acc[k].add(a, b, int'(r0[k]) + int'(r1[k]));
      end
    end
    for (int k = 0; k < 4; k++) begin
      stats_t e;
      e = expected(IDS[k]);
      $display("variant %0d: exact=%0d sumerr=%0d hi=%0d lo=%0d zero_wrong=%0d hash=%h",
               IDS[k], acc[k].s.ok, acc[k].s.sumerr, acc[k].s.hi, acc[k].s.lo,
               acc[k].s.zbad, acc[k].s.hash);
      check(acc[k].s.ok == e.ok, $sformatf("variant %0d exact count", IDS[k]));
      check(acc[k].s.sumerr == e.sumerr, $sformatf("variant %0d error sum", IDS[k]));
      check(acc[k].s.hi == e.hi && acc[k].s.lo == e.lo,
            $sformatf("variant %0d error extremes", IDS[k]));
      check(acc[k].s.zbad == e.zbad, $sformatf("variant %0d zero-operand errors", IDS[k]));
      check(acc[k].s.hash == e.hash, $sformatf("variant %0d fingerprint", IDS[k]));
      if (IDS[k] >= 3)
        check(paper_ned_match(IDS[k], acc[k].s), $sformatf("variant %0d published NED", IDS[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
