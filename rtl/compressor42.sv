// 4-2 compressor slice with a selectable cell.
//
// A uniform wrapper so that a reduction tree can place any of the three
// cells in any column: KIND selects the exact compressor, approximate
// Design 1 or approximate Design 2.  Ports and weights are those of the
// exact compressor: x1..x4 and cin weight 1, sum weight 1, carry and cout
// weight 2.  Design 2 has no carry-in or carry-out: with KIND = CMP_D2, cin
// is not used and cout is 0, so a chain of these slices carries nothing
// sideways (the source notes cout = cin and that cin is 0 from the first
// stage on).  Combinational.
module compressor42
  import cmp42_pkg::*;
#(
  parameter cmp_kind_e KIND = CMP_EXACT
) (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (KIND == CMP_D1) begin : g_d1
    approx_compressor42_d1 u_cmp (
      .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
      .sum(sum), .carry(carry), .cout(cout)
    );
  end else if (KIND == CMP_D2) begin : g_d2
    // cin is deliberately left unused: Design 2 has no carry-in.
    approx_compressor42_d2 u_cmp (
      .x1(x1), .x2(x2), .x3(x3), .x4(x4),
      .sum(sum), .carry(carry)
    );
    assign cout = 1'b0;
  end else begin : g_exact
    exact_compressor42 u_cmp (
      .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
      .sum(sum), .carry(carry), .cout(cout)
    );
  end
endmodule
