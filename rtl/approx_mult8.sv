// 8x8 unsigned Dadda multiplier with exact or approximate 4-2 compressors.
//
// Three parts: an AND-gate partial product generator, a two-stage Dadda
// reduction built from half adders, full adders and 4-2 compressors, and an
// exact carry-propagate adder for the last two rows.  MULT picks the
// variant:
//   MULT_EXACT  exact compressors everywhere (reference, exact product)
//   MULT_1      approximate Design 1 in every column
//   MULT_2      approximate Design 2 in every column, with its own
//               reduction layout (no sideways carries)
//   MULT_3      Design 1 in columns 0..6, exact cells in columns 7..14
//   MULT_4      Design 2 in columns 0..6, exact cells in columns 7..14
// The approximation sits only in the reduction; the adder is exact.
// Product p is 16 bits.  Purely combinational: p follows a and b after the
// delay of the three parts, no clock.  With a zero operand the approximate
// variants give a non-zero product (the cells turn an all-zero input into
// a 1); zero_detect can correct that.
module approx_mult8
  import cmp42_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_4
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0][7:0] pp;
  logic [14:0]     row0, row1;

  pp_gen_and #(.N(8)) u_ppg (.a(a), .b(b), .pp(pp));

  if (MULT == MULT_2) begin : g_red_b
    dadda8_reduction_b u_red (.pp(pp), .row0(row0), .row1(row1));
  end else begin : g_red_a
    dadda8_reduction_a #(.MULT(MULT)) u_red (.pp(pp), .row0(row0), .row1(row1));
  end

  cpa_adder #(.W(16)) u_cpa (.x({1'b0, row0}), .y({1'b0, row1}), .s(p));
endmodule
