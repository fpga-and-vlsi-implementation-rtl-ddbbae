// hard_decision: hard decision and reliability level of one received symbol.
//
// A symbol is a Q-bit quantized BPSK sample, 0 the most confident "0" and
// 2^Q-1 the most confident "1". The hard decision is the symbol's MSB
// (values >= 2^(Q-1) decide 1). The reliability level is the distance from the
// mid-point in steps of one: the low bits themselves when the MSB is 1, their
// complement when it is 0. For Q = 3 this gives level 3 for 0 and 7 and level 0
// for 3 and 4, as the decoder's reference example defines; the levels of the
// other values (2 for 1 and 6, 1 for 2 and 5) are this design's reading,
// chosen so that the sort order of the reference waveforms comes out.
// Purely combinational.
module hard_decision #(
  parameter int Q = 3
) (
  input  logic [Q-1:0] sym,
  output logic         bit_o,
  output logic [Q-2:0] rel
);
  always_comb begin
    bit_o = sym[Q-1];
    rel   = sym[Q-1] ? sym[Q-2:0] : ~sym[Q-2:0];
  end
endmodule
