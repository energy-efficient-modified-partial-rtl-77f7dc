// Reference figures for the exhaustive tests of the 8x8 multipliers.
//
// An exhaustive sweep runs a over 0..255 (outer loop) and b over 0..255
// (inner loop) and gathers, for products with both operands non-zero:
// the number of exact products, the sum of |p - a*b|, the largest excess
// and the largest shortfall; for products with a zero operand, the number
// of wrong ones; and over all 65536 products, a fingerprint
// h = h*31 + p (mod 2^32).  The expected figures come from an independent
// bit-level model of the reduction layouts.  For Multipliers 3 and 4 the
// count of exact products and the three error-distance figures equal the
// published ones (5888 and 9320 exact out of 65025; mean NED 0.9199e-3 and
// 0.7827e-3; largest excess 0.3199e-2 and 0.1845e-2, largest shortfall
// 0.2707e-2 and 0.3076e-2, normalised by 65025).
package mult_ref_pkg;

  typedef struct {
    int          ok;
    longint      sumerr;
    int          hi;
    int          lo;
    int          zbad;
    int unsigned hash;
  } stats_t;

  // index: 0 exact, 1..4 Multipliers 1..4
  function automatic stats_t expected(int m);
    case (m)
      1:       return '{134,  64'd229855192, 9936, 9120, 511, 32'hbcf7df80};
      2:       return '{563,  64'd212115384, 8184, 8688, 511, 32'h57d73000};
      3:       return '{5888, 64'd3889656,   208,  176,  511, 32'hfe544e00};
      4:       return '{9320, 64'd3309624,   120,  200,  511, 32'h00520400};
      default: return '{65025, 64'd0,        0,    0,    0, 32'h50bfc000};
    endcase
  endfunction

  class stats_acc;
    stats_t s;
    function new();
      s = '{0, 0, 0, 0, 0, 0};
    endfunction
    function void add(int a, int b, int p);
      int e, d;
      longint ad;
      e = a * b;
      d = p - e;
      s.hash = s.hash * 31 + p;
      if (a == 0 || b == 0) begin
        if (d != 0) s.zbad++;
      end else begin
        if (d == 0) s.ok++;
        ad = longint'(d);
        if (ad < 0) ad = -ad;
        s.sumerr += ad;
        if (d > s.hi) s.hi = d;
        if (-d > s.lo) s.lo = -d;
      end
    endfunction
  endclass

  // Published mean NED, largest excess and largest shortfall (Table X
  // values as printed, 4 significant digits), for Multipliers 3 and 4.
  function automatic bit paper_ned_match(int m, stats_t s);
    real ned, hi, lo, pn, ph, pl;
    ned = real'(s.sumerr) / 65025.0 / 65025.0;
    hi  = real'(s.hi) / 65025.0;
    lo  = real'(s.lo) / 65025.0;
    if (m == 3) begin pn = 0.9199e-3; ph = 0.3199e-2; pl = 0.2707e-2; end
    else        begin pn = 0.7827e-3; ph = 0.1845e-2; pl = 0.3076e-2; end
    return (ned - pn < pn * 1e-3) && (pn - ned < pn * 1e-3) &&
           (hi - ph < ph * 1e-3) && (ph - hi < ph * 1e-3) &&
           (lo - pl < pl * 1e-3) && (pl - lo < pl * 1e-3);
  endfunction

endpackage
