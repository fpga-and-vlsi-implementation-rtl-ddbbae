// bitflip_gen: sequencer of the K+1 bit-flipping patterns.
//
// On start it emits, one per clock, the pattern 0 (candidate c_0, r_partial
// unchanged) and then the one-hot patterns that flip information bit 0, 1, ...,
// K-1. valid is high for K+1 cycles beginning the cycle after the start edge;
// idx numbers the pattern (0..K) and last marks the final one. A start while a
// sequence is running is ignored. The order of the patterns is this design's
// own; the set of K+1 patterns is the decoder's.
module bitflip_gen #(
  parameter int K = 4,
  localparam int CW = $clog2(K + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           valid,
  output logic [K-1:0]   pattern,
  output logic [CW-1:0]  idx,
  output logic           last
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      idx   <= '0;
    end else if (start && !valid) begin
      valid <= 1'b1;
      idx   <= '0;
    end else if (valid) begin
      if (last) valid <= 1'b0;
      else      idx   <= idx + 1'b1;
    end
  end

  always_comb begin
    last    = valid && (idx == CW'(K));
    pattern = '0;
    for (int i = 0; i < K; i++)
      if (int'(idx) == i + 1) pattern[i] = 1'b1;
  end
endmodule
