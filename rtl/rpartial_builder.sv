// rpartial_builder: gathers the hard decisions at the information-set
// positions, r_partial[j] = r[is_idx[j]].
//
// Bit j of r_partial belongs to the j-th (j-th most reliable) IS position,
// which is also the position where row j of G_new has its unit entry, so
// r_partial x G_new reproduces r on the information set. K parallel N:1
// multiplexers; purely combinational.
module rpartial_builder #(
  parameter int N = 7,
  parameter int K = 4,
  localparam int IW = $clog2(N)
) (
  input  logic [N-1:0]          r,
  input  logic [K-1:0][IW-1:0]  is_idx,
  output logic [K-1:0]          r_partial
);
  always_comb begin
    for (int j = 0; j < K; j++) r_partial[j] = r[is_idx[j]];
  end
endmodule
