// Approximate 4-2 compressor, Design 2.
//
// Four inputs and two outputs, no carry-in or carry-out: Design 1 with its
// carry and cout equations exchanged and cin tied to zero.
//   carry = (x1 | x2) & (x3 | x4)        (weight 2)
//   sum   = ~(x1^x2) | ~(x3^x4)          (weight 1)
// It is wrong in 4 of its 16 input patterns, by one unit each time (the
// all-zero input gives 1; 0011, 1100 and 1111 give one less than the true
// count).  Combinational, two gate levels.
module approx_compressor42_d2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  assign sum   = ~(x1 ^ x2) | ~(x3 ^ x4);
  assign carry = (x1 | x2) & (x3 | x4);
endmodule
