// isd_block1: Block I of the decoder - hard decision and reliability sort.
//
// On in_valid (accepted only while not busy) the N received symbols c* are
// latched. The hard decision r is formed from the latched word right away
// (r[i] is the MSB of symbol i). Then the symbols are fed into an N-cell
// insertion sorter one per clock, symbol 0 first, keyed by their reliability
// level and carrying their index. After the N-th insertion s holds the symbol
// indexes from most to least reliable (equal levels: the later index first)
// and out_valid pulses for one cycle. Latency: out_valid is high in the cycle
// that follows the N-th clock edge after the accepting edge, i.e. N = 7 cycles
// for C(7,4), as the reference design reports. r, s and cstar_q stay valid
// until the next word is accepted.
//
// The in_valid/busy handshake, the single-cycle out_valid pulse and the
// exported copy of c* are this design's own choices.
module isd_block1 #(
  parameter int N  = 7,
  parameter int Q  = 3,
  localparam int IW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][Q-1:0]   cstar,
  output logic                  busy,
  output logic                  out_valid,
  output logic [N-1:0]          r,
  output logic [N-1:0][IW-1:0]  s,
  output logic [N-1:0][Q-1:0]   cstar_q
);
  logic [IW-1:0]       cnt;     // index of the next symbol to insert
  logic [N-1:0][Q-2:0] rel;
  logic [N-1:0][Q-2:0] s_key;
  logic                accept;

  assign accept = in_valid && !busy;

  for (genvar i = 0; i < N; i++) begin : g_hd
    hard_decision #(.Q(Q)) u_hd (.sym(cstar_q[i]), .bit_o(r[i]), .rel(rel[i]));
  end

  insertion_sorter #(.N(N), .KW(Q-1), .PW(IW)) u_sort (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (accept),
    .ins   (busy),
    .d_key (rel[cnt]),
    .d_pay (cnt),
    .s_key (s_key),
    .s_pay (s)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
      cstar_q   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        cstar_q <= cstar;
        cnt     <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (cnt == IW'(N - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
