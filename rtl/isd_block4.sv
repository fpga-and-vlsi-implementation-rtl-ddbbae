// isd_block4: Block IV of the decoder - soft distance and best candidate.
//
// Each candidate from Block III is compared with the received word c*
// (soft_distance, combinational) and the running minimum is kept
// (best_select). out_valid pulses one cycle after the last candidate; best is
// the decoded codeword. Candidate 0 marks the start of a word. Both the
// distance measure and the tie rule are this design's choices, documented in
// the two sub-modules.
module isd_block4 #(
  parameter int N = 7,
  parameter int K = 4,
  parameter int Q = 3,
  localparam int CW = $clog2(K + 1),
  localparam int DW = $clog2(N * (2**Q - 1) + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cand_valid,
  input  logic [N-1:0]         cand,
  input  logic [CW-1:0]        cand_idx,
  input  logic                 cand_last,
  input  logic [N-1:0][Q-1:0]  cstar,
  output logic                 out_valid,
  output logic [N-1:0]         best,
  output logic [DW-1:0]        best_dist,
  output logic [CW-1:0]        best_idx
);
  logic [DW-1:0] sdist;

  soft_distance #(.N(N), .Q(Q)) u_sd (.cand(cand), .cstar(cstar), .sdist(sdist));

  best_select #(.N(N), .DW(DW), .IW(CW)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid     (cand_valid),
    .first     (cand_idx == '0),
    .last      (cand_last),
    .cand      (cand),
    .sdist      (sdist),
    .idx       (cand_idx),
    .out_valid (out_valid),
    .best      (best),
    .best_dist (best_dist),
    .best_idx  (best_idx)
  );
endmodule
