// Partial product generator of an unsigned N x N array multiplier.
//
// Row j of the partial product matrix is the multiplicand a gated by
// multiplier bit b[j]: pp[j][i] = a[i] & b[j], of weight 2^(i+j).  One AND
// gate per bit, N*N gates, no encoding.  Combinational.
module pp_gen_and #(
  parameter int N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[j] = row j, bit i has weight 2^(i+j)
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = a & {N{b[j]}};
    end
  end
endmodule
