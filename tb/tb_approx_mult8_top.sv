// End-to-end testbench for approx_mult8_top at its default parameters.
//
// Sweeps all 65536 operand pairs through the top (zero detection on) and,
// alongside, the four multiplier variants on their own (no correction).  Checks per multiplier:
// the exhaustive reference figures of mult_ref_pkg on the raw products
// (count of exact products out of 65025, error sum, extremes, fingerprint);
// that with zero detection every zero operand gives 0 and every non-zero
// pair the raw product; the published figures for Multipliers 3 and 4.
// Counts how often each mechanism acted: a zero operand being corrected
// (511 pairs per multiplier), the zero flag, and each multiplier giving an
// exact and an inexact product; a mechanism that never acted is a failure.
module tb_approx_mult8_top;
  import mult_ref_pkg::*;

  logic [7:0] a, b;
  logic [15:0] p1, p2, p3, p4, r1, r2, r3, r4;
  logic zero;
  int checks = 0, failures = 0;
  int zero_flags = 0, bad_pass = 0, bad_zero = 0, bad_flag = 0;

  approx_mult8_top dut (.a, .b, .p1, .p2, .p3, .p4, .zero);
  // Raw products of the same four variants, without zero correction.
  approx_mult8 #(.MULT(cmp42_pkg::MULT_1)) raw1 (.a, .b, .p(r1));
  approx_mult8 #(.MULT(cmp42_pkg::MULT_2)) raw2 (.a, .b, .p(r2));
  approx_mult8 #(.MULT(cmp42_pkg::MULT_3)) raw3 (.a, .b, .p(r3));
  approx_mult8 #(.MULT(cmp42_pkg::MULT_4)) raw4 (.a, .b, .p(r4));

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
    int corrected [5];
    int n_exact [5];
    int n_inexact [5];
    for (int k = 1; k < 5; k++) begin
      acc[k] = new();
      corrected[k] = 0;
      n_exact[k] = 0;
      n_inexact[k] = 0;
    end
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        logic [3:0][15:0] fixed, rawp;
        bit z;
        a = 8'(ia);
        b = 8'(ib);
        #1;
        fixed = {p4, p3, p2, p1};
        rawp  = {r4, r3, r2, r1};
        z = (ia == 0) || (ib == 0);
        if (zero) zero_flags += 1;
        if (zero !== z) bad_flag += 1;
        for (int k = 1; k < 5; k++) begin
          acc[k].add(ia, ib, int'(rawp[k-1]));
          if (z) begin
            if (fixed[k-1] != 0) bad_zero += 1;
            if (rawp[k-1] != 0) corrected[k]++;
          end else begin
            if (fixed[k-1] != rawp[k-1]) bad_pass += 1;
            if (int'(fixed[k-1]) == ia * ib) n_exact[k]++;
            else n_inexact[k]++;
          end
        end
      end
    end
    check(bad_flag == 0, $sformatf("zero flag wrong %0d times", bad_flag));
    check(bad_zero == 0, $sformatf("zero operand not corrected %0d times", bad_zero));
    check(bad_pass == 0, $sformatf("non-zero product altered %0d times", bad_pass));
    check(zero_flags == 511, $sformatf("zero flag raised %0d times, expected 511", zero_flags));
    for (int k = 1; k < 5; k++) begin
      stats_t e;
      e = expected(k);
      $display("Multiplier %0d: exact=%0d inexact=%0d corrected_zero=%0d mean NED=%.4e",
               k, n_exact[k], n_inexact[k], corrected[k],
               real'(acc[k].s.sumerr) / 65025.0 / 65025.0);
      check(acc[k].s.ok == e.ok, $sformatf("M%0d exact count", k));
      check(acc[k].s.sumerr == e.sumerr, $sformatf("M%0d error sum", k));
      check(acc[k].s.hi == e.hi && acc[k].s.lo == e.lo, $sformatf("M%0d extremes", k));
      check(acc[k].s.hash == e.hash, $sformatf("M%0d fingerprint", k));
      check(corrected[k] == 511, $sformatf("M%0d zero corrections %0d", k, corrected[k]));
      check(n_exact[k] > 0, $sformatf("M%0d never exact", k));
      check(n_inexact[k] > 0, $sformatf("M%0d never inexact", k));
      if (k >= 3) check(paper_ned_match(k, acc[k].s), $sformatf("M%0d published NED", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
