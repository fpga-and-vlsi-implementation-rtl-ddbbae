// isd_decoder: information-set soft-decision decoder for a binary (N, K) block
// code, by default the C(7,4) code of isd_pkg.
//
// Four blocks in a chain, one received word at a time:
//   Block I   (isd_block1) hard decision r and reliability sort s, N clocks;
//   Block II  (isd_block2) information set, G_partial check, inversion,
//             G_new = G_partial^-1 x G and r_partial, 2K clocks (+K per
//             rejected set);
//   Block III (isd_block3) the K+1 candidates r_partial x G_new with no or one
//             information bit flipped, one per clock;
//   Block IV  (isd_block4) soft distance to c* and the best candidate.
// Each block's done pulse starts the next. in_ready is high while all blocks
// are idle; a word is taken when in_valid and in_ready are both high. For
// C(7,4) with an invertible first set, out_valid pulses 7 + 1 + 8 + 1 + 5 = 22
// clocks after the accepting edge (K more per rejected information-set
// position). codeword, message, distance and
// best_idx hold until the next result. message is codeword bits 0..K-1, the
// message itself when G is systematic as the default is. info_set and the
// ev_* pulses expose what Block II did, for observation and test.
//
// The block partition and the algorithm are the reference design's; the
// start/done chaining between blocks is this design's own.
module isd_decoder
  import isd_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF,
  parameter int Q = Q_DEF,
  parameter logic [K-1:0][N-1:0] G = G_C74,
  localparam int IW = $clog2(N),
  localparam int CW = $clog2(K + 1),
  localparam int DW = $clog2(N * (2**Q - 1) + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [N-1:0][Q-1:0]  cstar,
  output logic                 out_valid,
  output logic [N-1:0]         codeword,
  output logic [K-1:0]         message,
  output logic [DW-1:0]        distance,
  output logic [CW-1:0]        best_idx,
  // observation of Block II, one cycle per event
  output logic [K-1:0][IW-1:0] info_set,   // accepted IS of the current word
  output logic                 ev_retry,   // a singular G_partial was rejected
  output logic                 ev_chk_swap,// pivot row exchange in the check
  output logic                 ev_inv_swap // pivot row exchange in the inversion
);
  logic                 b1_busy, b1_done, b2_busy, b2_done, b3_busy;
  logic                 b3_valid, b3_last, b4_pending;
  logic [N-1:0]         r, b3_cand;
  logic [N-1:0][IW-1:0] s;
  logic [N-1:0][Q-1:0]  cstar_q;
  logic [K-1:0][N-1:0]  g_new;
  logic [K-1:0]         r_partial;
  logic [CW-1:0]        b3_idx;

  assign in_ready = !(b1_busy || b1_done || b2_busy || b2_done || b3_busy || b4_pending);

  isd_block1 #(.N(N), .Q(Q)) u_b1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && in_ready),
    .cstar     (cstar),
    .busy      (b1_busy),
    .out_valid (b1_done),
    .r         (r),
    .s         (s),
    .cstar_q   (cstar_q)
  );

  isd_block2 #(.N(N), .K(K), .G(G)) u_b2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (b1_done),
    .r         (r),
    .s         (s),
    .busy      (b2_busy),
    .out_valid (b2_done),
    .g_new     (g_new),
    .r_partial (r_partial),
    .is_idx    (info_set),
    .retry     (ev_retry),
    .chk_swap  (ev_chk_swap),
    .inv_swap  (ev_inv_swap)
  );

  isd_block3 #(.N(N), .K(K)) u_b3 (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (b2_done),
    .r_partial  (r_partial),
    .g_new      (g_new),
    .busy       (b3_busy),
    .cand_valid (b3_valid),
    .cand       (b3_cand),
    .cand_idx   (b3_idx),
    .cand_last  (b3_last)
  );

  isd_block4 #(.N(N), .K(K), .Q(Q)) u_b4 (
    .clk        (clk),
    .rst_n      (rst_n),
    .cand_valid (b3_valid),
    .cand       (b3_cand),
    .cand_idx   (b3_idx),
    .cand_last  (b3_last),
    .cstar      (cstar_q),
    .out_valid  (out_valid),
    .best       (codeword),
    .best_dist  (distance),
    .best_idx   (best_idx)
  );

  // Block IV reports one cycle after the last candidate.
  always_ff @(posedge clk) begin
    if (!rst_n) b4_pending <= 1'b0;
    else        b4_pending <= b3_valid && b3_last;
  end

  assign message = codeword[K-1:0];
endmodule
