// Workload testbench: mean normalised error distance (NED) of the four
// approximate multipliers per interval of the exact product.
//
// All 65025 pairs of non-zero 8-bit operands go through approx_mult8_top.
// Each pair falls into one of 127 intervals of its exact product a*b:
// 0..512, 513..1024, ..., 64513..65025.  Per interval and multiplier the
// testbench averages |p - a*b| / 65025 and prints every eighth interval.
// Checks: every pair lands in an interval and the first interval holds
// 2764 pairs, the last 6; the first and last interval averages equal the
// reference model's values; for Multipliers 1 and 2 the error is largest
// at very small and very large products (first and last interval above
// twice the median interval), and for all four the mean over all pairs
// equals the reference mean NED.
module tb_ned_distribution;
  import mult_ref_pkg::*;

  localparam int NI = 127;

  logic [7:0] a, b;
  logic [15:0] p [4];
  logic zero;
  int checks = 0, failures = 0;
  int total = 0;

  approx_mult8_top dut (.a, .b, .p1(p[0]), .p2(p[1]), .p3(p[2]), .p4(p[3]), .zero);

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

  function automatic bit close(real x, real y);
    real d;
    d = x - y;
    if (d < 0) d = -d;
    return d <= 1e-9 * (y < 0 ? -y : y) + 1e-15;
  endfunction

  // Reference first/last interval averages from the bit-level model.
  localparam real FIRST [4] = '{0.12515778468817793, 0.12255862851369088,
                                0.001141718286020461, 0.0010903966024422313};
  localparam real LAST  [4] = '{0.11493015506856337, 0.11394591823657567,
                                0.000594643085992567, 0.0014148404459823146};

  initial begin
    longint sum_err [4][NI];
    int     cnt [NI];
    foreach (cnt[i]) cnt[i] = 0;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < NI; i++) sum_err[k][i] = 0;

    for (int ia = 1; ia < 256; ia++) begin
      for (int ib = 1; ib < 256; ib++) begin
        int e, iv;
        a = 8'(ia);
        b = 8'(ib);
        #1;
        e  = ia * ib;
        iv = (e - 1) / 512;
        if (iv > NI - 1) iv = NI - 1;
        cnt[iv]++;
        total += 1;
        for (int k = 0; k < 4; k++) begin
          longint d;
          d = longint'(p[k]) - longint'(e);
          if (d < 0) d = -d;
          sum_err[k][iv] += d;
        end
      end
    end

    check(total == 65025, $sformatf("pair count %0d", total));
    check(cnt[0] == 2764 && cnt[NI-1] == 6, "interval population");

    for (int k = 0; k < 4; k++) begin
      real avg [NI];
      real sorted [$];
      real med;
      longint all_err;
      stats_t e;
      string line;
      all_err = 0;
      sorted.delete();
      for (int i = 0; i < NI; i++) begin
        avg[i] = (cnt[i] == 0) ? 0.0 : real'(sum_err[k][i]) / real'(cnt[i]) / 65025.0;
        sorted.push_back(avg[i]);
        all_err += sum_err[k][i];
      end
      sorted.sort();
      med = sorted[NI / 2];
      line = $sformatf("Multiplier %0d mean NED per interval (every 8th):", k + 1);
      for (int i = 0; i < NI; i += 8) line = {line, $sformatf(" %.4f", avg[i])};
      $display("%s  last %.4f  median %.4f", line, avg[NI-1], med);
      check(close(avg[0], FIRST[k]), $sformatf("M%0d first interval", k + 1));
      check(close(avg[NI-1], LAST[k]), $sformatf("M%0d last interval", k + 1));
      e = expected(k + 1);
      check(all_err == e.sumerr, $sformatf("M%0d overall error sum", k + 1));
      if (k < 2)
        check(avg[0] > 2.0 * med && avg[NI-1] > 2.0 * med,
              $sformatf("M%0d error not concentrated at the ends", k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
