// Zero-operand correction for an approximate multiplier.
//
// The approximate compressors map an all-zero input pattern to a non-zero
// output, so an approximate multiplier gives a wrong, non-zero product when
// either operand is zero.  This block detects a zero operand (an N-input
// NOR on each) and forces the product to zero; otherwise it passes the
// multiplier's product p_in through.  The source only says that such a
// detector restores the zero cases; the NOR-and-mask form is this design's
// choice.  Combinational.
module zero_detect #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] p_in,
  output logic [2*N-1:0] p_out,
  output logic           zero    // 1 when a or b is zero
);
  assign zero  = ~|a | ~|b;
  assign p_out = zero ? '0 : p_in;
endmodule
