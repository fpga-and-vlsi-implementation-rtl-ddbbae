// gf2_vecmat: row vector times matrix over GF(2).
//
// p = XOR of the rows m[i] for which v[i] is 1. In the decoder this forms a
// candidate codeword from an information vector and G_new (c = r_partial x
// G_new), and, one row at a time, the product G_inv x G. Purely combinational
// AND-XOR array; the structure is this design's own, the function is the
// decoder's.
module gf2_vecmat #(
  parameter int K = 4,
  parameter int N = 7
) (
  input  logic [K-1:0]         v,
  input  logic [K-1:0][N-1:0]  m,
  output logic [N-1:0]         p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < K; i++)
      if (v[i]) p = p ^ m[i];
  end
endmodule
