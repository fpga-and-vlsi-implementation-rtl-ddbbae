// gj_inverter: K x K matrix inversion over GF(2) by the shift-left-up variant
// of Gauss-Jordan elimination.
//
// On start the K x 2K augmented matrix [M | I] is loaded. Every clock then does
// one step with the pivot always at the top-left element X(1,1): (1) if X(1,1)
// is 0 the first row below it with a 1 in the first column, among the rows not
// yet used as pivot, is swapped to the top; (2) the top row is XORed into every other row having a 1 in the first
// column; (3) the whole matrix moves one place left and one place up - the
// finished first column leaves, zeros enter on the right and the pivot row
// wraps round to the bottom. After K steps the rows are back in order and the
// left half holds M^-1. done pulses in the cycle after the K-th step edge and
// inv holds the result until the next start. M must be invertible (the caller
// has checked it); a missing pivot is flagged by an assertion.
//
// The pivot-at-X(1,1) and shift-left-up steps and the K clocks follow the
// reference design. The wrap of the pivot row to the bottom and the zero fill
// are this design's reading of "move one position to the left and one up".
module gj_inverter #(
  parameter int K = 4,
  localparam int CW = $clog2(K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [K-1:0][K-1:0]  mat_in,   // row m, bit j = column j
  output logic                 busy,
  output logic                 done,
  output logic                 row_swap, // a pivot exchange happens this cycle
  output logic [K-1:0][K-1:0]  inv
);
  logic [K-1:0][2*K-1:0] a_q, a_d;   // row i, bit j = column j
  logic [CW-1:0]         cnt;
  logic                  piv_ok;

  always_comb begin
    logic [K-1:0][2*K-1:0] a;
    logic [2*K-1:0]        prow;
    int                    p;
    prow     = '0;
    a        = a_q;
    p        = -1;
    row_swap = 1'b0;
    // rows K-cnt..K-1 are earlier pivot rows and are not candidates
    for (int i = K - 1; i >= 0; i--)
      if (i < K - int'(cnt) && a[i][0]) p = i;
    piv_ok = (p >= 0);
    if (p > 0) begin
      row_swap = busy;
      prow     = a[p];
      a[p]     = a[0];
      a[0]     = prow;
    end
    for (int i = 1; i < K; i++)
      if (a[i][0]) a[i] = a[i] ^ a[0];
    // shift left-up
    a_d = '0;
    for (int i = 0; i < K; i++)
      a_d[i] = {1'b0, a[(i + 1) % K][2*K-1:1]};
  end

  always_comb begin
    for (int i = 0; i < K; i++) inv[i] = a_q[i][K-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        for (int i = 0; i < K; i++) begin
          a_q[i]                <= '0;
          a_q[i][K-1:0]         <= mat_in[i];
          a_q[i][K+i]           <= 1'b1;
        end
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        a_q <= a_d;
        if (cnt == CW'(K - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  a_pivot : assert property (@(posedge clk) disable iff (!rst_n) busy |-> piv_ok);
endmodule
