// isd_block3: Block III of the decoder - candidate codeword generator.
//
// On start it latches r_partial and G_new and, one per clock for K+1 clocks,
// presents the candidate codewords c_0 = r_partial x G_new and
// c_i = (r_partial with information bit i-1 flipped) x G_new, i = 1..K.
// cand_valid is high from the cycle after the start edge; cand_idx numbers the
// candidate and cand_last marks the final one. The candidates are formed
// combinationally from the latched inputs and the pattern register of
// bitflip_gen. Serial generation, one candidate per clock, is this design's
// choice; the candidate set is the decoder's.
module isd_block3 #(
  parameter int N = 7,
  parameter int K = 4,
  localparam int CW = $clog2(K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [K-1:0]         r_partial,
  input  logic [K-1:0][N-1:0]  g_new,
  output logic                 busy,
  output logic                 cand_valid,
  output logic [N-1:0]         cand,
  output logic [CW-1:0]        cand_idx,
  output logic                 cand_last
);
  logic [K-1:0]         rp_q;
  logic [K-1:0][N-1:0]  gn_q;
  logic [K-1:0]         pattern;
  logic                 accept;

  assign accept = start && !cand_valid;
  assign busy   = cand_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp_q <= '0;
      gn_q <= '0;
    end else if (accept) begin
      rp_q <= r_partial;
      gn_q <= g_new;
    end
  end

  bitflip_gen #(.K(K)) u_flip (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (accept),
    .valid   (cand_valid),
    .pattern (pattern),
    .idx     (cand_idx),
    .last    (cand_last)
  );

  gf2_vecmat #(.K(K), .N(N)) u_mul (.v(rp_q ^ pattern), .m(gn_q), .p(cand));
endmodule
