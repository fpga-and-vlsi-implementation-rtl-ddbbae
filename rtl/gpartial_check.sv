// gpartial_check: chooses the information set and checks that G_partial is
// invertible over GF(2).
//
// G_partial is the K x K matrix made of the columns of G named by the current
// information set (IS), in IS order: element (m, j) is G[m][IS_j]. On start the
// IS is the first K entries of the sorted index vector s (the K most reliable
// positions). The matrix is then reduced one column per clock, K clocks in all.
// In the clock for column j: (1) pivot adjustment - if X(j,j) is 0 the first row
// below it with a 1 in column j is swapped in; (2) every other row, above or
// below, with a 1 in column j is marked; (3) the pivot row is XORed into the
// marked rows. If no pivot exists the column depends on the earlier ones and
// the determinant is 0. After the K-th column: determinant 1 raises done (a
// combinational signal in the cycle of the last step, so that a following unit
// can load G_partial on that same edge); determinant 0 raises retry and starts
// a new K-clock pass on a new IS. The new IS drops the first column found
// dependent and appends the next index of s not yet used, so the accepted IS
// is the most reliable set of K independent positions.
//
// The three-step column reduction and the K clocks per pass follow the
// reference design; the rule for forming the next IS and the done timing are
// this design's own. is_idx and gpartial hold the accepted set until the next
// start. G must have rank K, otherwise no IS exists (an assertion flags it).
module gpartial_check
  import isd_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int K = K_DEF,
  parameter logic [K-1:0][N-1:0] G = G_C74,
  localparam int IW = $clog2(N),
  localparam int CW = $clog2(K),
  localparam int PW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0][IW-1:0]  s,
  output logic                  busy,
  output logic                  done,
  output logic                  retry,
  output logic                  row_swap,   // a pivot exchange happens this cycle
  output logic [K-1:0][IW-1:0]  is_idx,
  output logic [K-1:0][K-1:0]   gpartial
);
  logic [N-1:0][IW-1:0] s_q;        // copy of s
  logic [PW-1:0]        nxt;        // next unused position of s
  logic [CW-1:0]        col;        // column being reduced
  logic [K-1:0][K-1:0]  m_q, m_d;   // working matrix, row m bit j
  logic                 dep_seen;   // a dependent column was found
  logic [CW-1:0]        dep_col;    // the first one
  logic                 piv_ok;     // this column has a pivot
  logic [K-1:0][IW-1:0] is_next;    // IS for the next pass
  logic [K-1:0][K-1:0]  gp_next;
  logic                 last_step, det_one, fail_now;
  logic [CW-1:0]        dep_col_d;

  // Build G_partial of an information set.
  function automatic logic [K-1:0][K-1:0] build(input logic [K-1:0][IW-1:0] idx);
    logic [K-1:0][K-1:0] g;
    for (int m = 0; m < K; m++)
      for (int j = 0; j < K; j++)
        g[m][j] = G[m][idx[j]];
    return g;
  endfunction

  // One column of the reduction.
  always_comb begin
    logic [K-1:0][K-1:0] a;
    logic [K-1:0]        prow;
    int                  p;
    prow     = '0;
    a        = m_q;
    p        = -1;
    row_swap = 1'b0;
    for (int i = K - 1; i >= 0; i--)
      if (i >= int'(col) && a[i][col]) p = i;
    piv_ok = (p >= 0);
    if (piv_ok && p != int'(col)) begin
      row_swap = busy;
      prow     = a[p];
      a[p]     = a[col];
      a[col]   = prow;
    end
    if (piv_ok) begin
      for (int i = 0; i < K; i++)
        if (i != int'(col) && a[i][col]) a[i] = a[i] ^ a[col];
    end
    m_d = a;
  end

  assign last_step = busy && (col == CW'(K - 1));
  assign fail_now  = dep_seen || !piv_ok;
  assign det_one   = !fail_now;
  assign done      = last_step && det_one;
  assign retry     = last_step && fail_now;
  assign dep_col_d = dep_seen ? dep_col : col;

  // Next IS: drop the first dependent column, append s[nxt].
  always_comb begin
    for (int j = 0; j < K; j++) begin
      if (j < int'(dep_col_d))  is_next[j] = is_idx[j];
      else if (j < K - 1)       is_next[j] = is_idx[j+1];
      else                      is_next[j] = s_q[nxt[IW-1:0]];
    end
    gp_next = build(is_next);
  end

  assign gpartial = build(is_idx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      s_q      <= '0;
      nxt      <= '0;
      col      <= '0;
      m_q      <= '0;
      dep_seen <= 1'b0;
      dep_col  <= '0;
      is_idx   <= '0;
    end else if (start && !busy) begin
      s_q      <= s;
      for (int j = 0; j < K; j++) is_idx[j] <= s[j];
      m_q      <= build(s[K-1:0]);
      nxt      <= PW'(K);
      col      <= '0;
      dep_seen <= 1'b0;
      busy     <= 1'b1;
    end else if (busy) begin
      if (!last_step) begin
        m_q <= m_d;
        col <= col + 1'b1;
        if (!piv_ok && !dep_seen) begin
          dep_seen <= 1'b1;
          dep_col  <= col;
        end
      end else if (det_one) begin
        m_q  <= m_d;
        busy <= 1'b0;
      end else begin
        // New pass on the next information set.
        is_idx   <= is_next;
        m_q      <= gp_next;
        nxt      <= nxt + 1'b1;
        col      <= '0;
        dep_seen <= 1'b0;
      end
    end
  end

  // With a rank-K generator matrix an independent set is always found before
  // the positions of s run out.
  a_has_candidate : assert property (@(posedge clk) disable iff (!rst_n)
    retry |-> (nxt < PW'(N)));
endmodule
