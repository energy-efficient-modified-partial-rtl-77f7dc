// Self-checking testbench for approx_mult8.
// One instance of every variant (exact and Multipliers 1..4) is driven
// with all 65536 operand pairs.  The exact variant must equal a*b for
// every pair; each approximate variant must reproduce the exhaustive
// reference figures of mult_ref_pkg (count of exact products, error sum,
// extremes, zero-operand errors and fingerprint), and Multipliers 3 and 4
// the published error-distance figures.
module tb_approx_mult8;
  import cmp42_pkg::*;
  import mult_ref_pkg::*;

  localparam mult_kind_e KINDS [5] = '{MULT_EXACT, MULT_1, MULT_2, MULT_3, MULT_4};

  logic [7:0] a, b;
  logic [4:0][15:0] p;
  int checks = 0, failures = 0;
  int exact_bad = 0;

  for (genvar k = 0; k < 5; k++) begin : g_dut
    approx_mult8 #(.MULT(KINDS[k])) dut (.a(a), .b(b), .p(p[k]));
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
    stats_acc acc [5];
    for (int k = 0; k < 5; k++) acc[k] = new();
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia);
        b = 8'(ib);
        #1;
        if (int'(p[0]) != ia * ib) exact_bad += 1;
        for (int k = 0; k < 5; k++) acc[k].add(ia, ib, int'(p[k]));
      end
    end
    check(exact_bad == 0, $sformatf("exact variant wrong for %0d pairs", exact_bad));
    for (int k = 1; k < 5; k++) begin
      stats_t e;
      e = expected(k);
      $display("Multiplier %0d: exact=%0d of 65025, mean NED=%.4e", k, acc[k].s.ok,
               real'(acc[k].s.sumerr) / 65025.0 / 65025.0);
      check(acc[k].s.ok == e.ok, $sformatf("M%0d exact count", k));
      check(acc[k].s.sumerr == e.sumerr, $sformatf("M%0d error sum", k));
      check(acc[k].s.hi == e.hi && acc[k].s.lo == e.lo, $sformatf("M%0d extremes", k));
      check(acc[k].s.zbad == e.zbad, $sformatf("M%0d zero-operand errors", k));
      check(acc[k].s.hash == e.hash, $sformatf("M%0d fingerprint", k));
      if (k >= 3) check(paper_ned_match(k, acc[k].s), $sformatf("M%0d published NED", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
