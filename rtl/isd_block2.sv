// isd_block2: Block II of the decoder - information set, G_new and r_partial.
//
// On in_valid (accepted while not busy) the block takes the hard decision r
// and the sorted index vector s from Block I. gpartial_check builds G_partial
// from the K most reliable columns of the generator matrix G and reduces it in
// K clocks; if it is singular it retries on another set, K clocks per pass.
// On the edge that ends a successful pass, gj_inverter loads [G_partial | I]
// and inverts it in K more clocks. G_new = G_inv x G is formed
// combinationally from the inverter's result, and r_partial from r and the
// accepted information set; both are valid when out_valid pulses and are held
// until the next word.
//
// Latency: out_valid is high 2K clock edges after the accepting edge when the
// first set is invertible (8 for C(7,4), as in the reference design), plus K
// per rejected set. Row j of G_new has its single 1 among the IS positions at
// IS position j. G is a parameter (a fixed table, not a memory).
module isd_block2
  import isd_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF,
  parameter logic [K-1:0][N-1:0] G = G_C74,
  localparam int IW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0]          r,
  input  logic [N-1:0][IW-1:0]  s,
  output logic                  busy,
  output logic                  out_valid,
  output logic [K-1:0][N-1:0]   g_new,
  output logic [K-1:0]          r_partial,
  output logic [K-1:0][IW-1:0]  is_idx,
  output logic                  retry,      // a G_partial was rejected
  output logic                  chk_swap,   // pivot exchange in the check
  output logic                  inv_swap    // pivot exchange in the inversion
);
  logic                 accept, chk_busy, chk_done, inv_busy;
  logic [N-1:0]         r_q;
  logic [K-1:0][K-1:0]  gpartial, g_inv;

  assign accept = in_valid && !busy;
  assign busy   = chk_busy || inv_busy;

  always_ff @(posedge clk) begin
    if (!rst_n)      r_q <= '0;
    else if (accept) r_q <= r;
  end

  gpartial_check #(.N(N), .K(K), .G(G)) u_chk (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (accept),
    .s        (s),
    .busy     (chk_busy),
    .done     (chk_done),
    .retry    (retry),
    .row_swap (chk_swap),
    .is_idx   (is_idx),
    .gpartial (gpartial)
  );

  gj_inverter #(.K(K)) u_inv (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (chk_done),
    .mat_in   (gpartial),
    .busy     (inv_busy),
    .done     (out_valid),
    .row_swap (inv_swap),
    .inv      (g_inv)
  );

  gf2_matmul #(.K(K), .N(N)) u_mul (.a(g_inv), .b(G), .p(g_new));

  rpartial_builder #(.N(N), .K(K)) u_rp (.r(r_q), .is_idx(is_idx), .r_partial(r_partial));
endmodule
