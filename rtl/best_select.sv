// best_select: keeps the candidate with the smallest soft distance.
//
// Candidates arrive one per valid cycle. The first of a word (first = 1) is
// always taken; a later one replaces the stored best only if its distance is
// strictly smaller, so ties keep the earlier candidate (this design's rule).
// When the last candidate has been seen, out_valid pulses in the next cycle
// with best, best_dist and best_idx, which stay until the next word's first
// candidate.
module best_select #(
  parameter int N  = 7,
  parameter int DW = 6,
  parameter int IW = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid,
  input  logic           first,
  input  logic           last,
  input  logic [N-1:0]   cand,
  input  logic [DW-1:0]  sdist,
  input  logic [IW-1:0]  idx,
  output logic           out_valid,
  output logic [N-1:0]   best,
  output logic [DW-1:0]  best_dist,
  output logic [IW-1:0]  best_idx
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      best      <= '0;
      best_dist <= '0;
      best_idx  <= '0;
    end else begin
      out_valid <= valid && last;
      if (valid && (first || sdist < best_dist)) begin
        best      <= cand;
        best_dist <= sdist;
        best_idx  <= idx;
      end
    end
  end
endmodule
