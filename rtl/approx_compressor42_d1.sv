// Approximate 4-2 compressor, Design 1.
//
// Same ports and weights as the exact compressor (sum weight 1, carry and
// cout weight 2), but simplified so that it errs by at most one unit in 12
// of its 32 input patterns:
//   carry = cin                          (the exact carry equals cin in 24 of
//                                          32 cases)
//   sum   = ~cin & (~(x1^x2) | ~(x3^x4)) (0 whenever cin is 1)
//   cout  = (x1 | x2) & (x3 | x4)
// The three equations reproduce the source's truth table of this design
// row by row.  The all-zero input gives sum=1, so a multiplier built from it
// is wrong for a zero operand (see zero_detect).  Combinational; carry is a
// wire from cin, cout does not depend on cin.
module approx_compressor42_d1 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic xn12, xn34;

  assign xn12  = ~(x1 ^ x2);
  assign xn34  = ~(x3 ^ x4);
  assign sum   = ~cin & (xn12 | xn34);
  assign carry = cin;
  assign cout  = (x1 | x2) & (x3 | x4);
endmodule
