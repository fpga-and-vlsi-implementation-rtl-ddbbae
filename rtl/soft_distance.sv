// soft_distance: soft distance between a candidate codeword and the received
// quantized word.
//
// dist = sum over i of |cstar[i] - L(cand[i])|, where L(0) = 0 and
// L(1) = 2^Q - 1 are the ideal received levels of a 0 and a 1. For a 0 bit the
// term is the symbol itself, for a 1 bit its bitwise complement. The decoder
// names a soft distance but does not define it; this Manhattan distance to the
// ideal levels is this design's choice. Purely combinational.
module soft_distance #(
  parameter int N = 7,
  parameter int Q = 3,
  localparam int DW = $clog2(N * (2**Q - 1) + 1)
) (
  input  logic [N-1:0]         cand,
  input  logic [N-1:0][Q-1:0]  cstar,
  output logic [DW-1:0]        sdist
);
  always_comb begin
    logic [Q-1:0] term;
    sdist = '0;
    for (int i = 0; i < N; i++) begin
      term  = cand[i] ? ~cstar[i] : cstar[i];
      sdist = sdist + DW'(term);
    end
  end
endmodule
