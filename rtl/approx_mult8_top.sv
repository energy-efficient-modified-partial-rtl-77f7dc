// Four approximate 8x8 multipliers side by side on shared operands.
//
// Multipliers 1 to 4 differ in which approximate 4-2 compressor their
// Dadda reduction uses and where (see approx_mult8).  All four take the
// same unsigned operands a and b and give their 16-bit products p1..p4 at
// once, so one set of test vectors compares them directly.  With
// ZERO_DETECT set (the default) each product passes through a zero_detect
// block, so a zero operand gives a zero product, as the source assumes when
// it leaves zero operands out of its error figures; with ZERO_DETECT clear
// the raw products come out.  zero reports that an operand is zero; the
// four zero_detect blocks compute the same flag, so only the first one's
// flag is used and synthesis merges the copies.
// Combinational, no clock.
module approx_mult8_top
  import cmp42_pkg::*;
#(
  parameter bit ZERO_DETECT = 1'b1
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p1,
  output logic [15:0] p2,
  output logic [15:0] p3,
  output logic [15:0] p4,
  output logic        zero
);
  localparam mult_kind_e KINDS [4] = '{MULT_1, MULT_2, MULT_3, MULT_4};

  logic [3:0][15:0] raw, fixed;
  logic [3:0]       zflag;

  for (genvar m = 0; m < 4; m++) begin : g_mult
    approx_mult8 #(.MULT(KINDS[m])) u_mult (.a(a), .b(b), .p(raw[m]));
    zero_detect #(.N(8)) u_zd (
      .a(a), .b(b), .p_in(raw[m]), .p_out(fixed[m]), .zero(zflag[m]));
  end

  assign p1   = ZERO_DETECT ? fixed[0] : raw[0];
  assign p2   = ZERO_DETECT ? fixed[1] : raw[1];
  assign p3   = ZERO_DETECT ? fixed[2] : raw[2];
  assign p4   = ZERO_DETECT ? fixed[3] : raw[3];
  assign zero = zflag[0];
endmodule
