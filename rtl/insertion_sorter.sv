// insertion_sorter: the classic register-chain insertion sorter.
//
// N cells D_0..D_{N-1} each hold a key and a payload. When ins is high the new
// element d is compared with every cell at once (d >= D_i). A cell whose
// comparison fails keeps its value. The first cell whose comparison succeeds
// takes d, and every cell after it takes its left neighbour's value, so the
// chain stays sorted from s_0 (largest key) to s_{N-1} (smallest) and the last
// element drops off the end. Because of the ">=" a new key lands ahead of
// equal keys already stored. One element per cycle; after N insertions into a
// cleared chain all N are in order. The cell structure (comparator, enable,
// two-input mux per cell) is the textbook circuit; the separate payload and
// the clear input are this design's own. Empty cells hold key 0, so an
// inserted element always lands ahead of them.
//
// Timing: clear and ins are sampled on the rising clock edge; s_key/s_pay are
// the register contents. rst_n is synchronous, active low.
module insertion_sorter #(
  parameter int N  = 7,
  parameter int KW = 2,
  parameter int PW = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   ins,
  input  logic [KW-1:0]          d_key,
  input  logic [PW-1:0]          d_pay,
  output logic [N-1:0][KW-1:0]   s_key,
  output logic [N-1:0][PW-1:0]   s_pay
);
  logic [N-1:0] ge;      // d >= D_i
  logic [N-1:0] from_l;  // left neighbour also moves: take its value

  always_comb begin
    for (int i = 0; i < N; i++) ge[i] = (d_key >= s_key[i]);
    from_l = {ge[N-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      s_key <= '0;
      s_pay <= '0;
    end else if (ins) begin
      for (int i = 0; i < N; i++) begin
        if (ge[i]) begin
          if (from_l[i]) begin
            s_key[i] <= s_key[i-1];
            s_pay[i] <= s_pay[i-1];
          end else begin
            s_key[i] <= d_key;
            s_pay[i] <= d_pay;
          end
        end
      end
    end
  end
endmodule
