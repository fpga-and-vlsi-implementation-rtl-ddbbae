// tb_isd_block4: streams of K+1 random candidates against random received
// words; the winner must be the first candidate of minimum sum |c*_i - 7 c_i|,
// reported one clock after the last candidate.
module tb_isd_block4;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, cand_valid = 0, cand_last = 0;
  logic [N-1:0] cand;
  logic [2:0] cand_idx;
  logic [N-1:0][2:0] cstar;
  logic out_valid;
  logic [N-1:0] best;
  logic [5:0] best_dist;
  logic [2:0] best_idx;
  int checks = 0, failures = 0;

  isd_block4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int q [N];
      logic [N-1:0] c [K+1];
      int bi, bd;
      bi = 0; bd = 1000;
      for (int i = 0; i < N; i++) begin q[i] = $urandom_range(7, 0); cstar[i] = 3'(q[i]); end
      for (int i = 0; i <= K; i++) begin
        c[i] = 7'($urandom);
        if (ref_soft(c[i], q) < bd) begin bd = ref_soft(c[i], q); bi = i; end
      end
      for (int i = 0; i <= K; i++) begin
        cand_valid = 1; cand = c[i]; cand_idx = 3'(i); cand_last = (i == K);
        @(posedge clk); #1;
      end
      cand_valid = 0; cand_last = 0;
      checks++;
      if (!out_valid || best != c[bi] || int'(best_dist) != bd || int'(best_idx) != bi) begin
        failures++;
        $display("FAIL t=%0d idx %0d exp %0d dist %0d exp %0d", t, best_idx, bi, best_dist, bd);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
