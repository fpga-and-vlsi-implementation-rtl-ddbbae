// gf2_matmul: matrix product over GF(2), p = a x b with a K x K and b K x N.
//
// Used to form G_new = G_inv x G: row i of the result is the XOR of the rows of
// b selected by row i of a. Bit j of a[i] is element (i, j). One gf2_vecmat per
// row; purely combinational.
module gf2_matmul #(
  parameter int K = 4,
  parameter int N = 7
) (
  input  logic [K-1:0][K-1:0]  a,
  input  logic [K-1:0][N-1:0]  b,
  output logic [K-1:0][N-1:0]  p
);
  for (genvar i = 0; i < K; i++) begin : g_row
    gf2_vecmat #(.K(K), .N(N)) u_row (.v(a[i]), .m(b), .p(p[i]));
  end
endmodule
