// tb_gpartial_check: random orderings s of the 7 positions. The accepted
// information set must equal the greedy most-reliable independent set of the
// reference model (found there by brute-force span tests), gpartial must hold
// the matching columns of G, and done must come K clocks per pass after the
// start edge, one pass plus one per rejected position. Rejections and pivot
// row exchanges must both occur.
module tb_gpartial_check;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][2:0] s;
  logic busy, done, retry, row_swap;
  logic [K-1:0][2:0] is_idx;
  logic [K-1:0][K-1:0] gpartial;
  int checks = 0, failures = 0, n_retry = 0, n_swap = 0;

  gpartial_check dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (retry) n_retry++;
    if (row_swap) n_swap++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    idx_arr_t sv;
    is_arr_t  eis;
    bit       first_ok;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int cyc, rejected, last_t;
      cyc = 0; last_t = 0;
      for (int i = 0; i < N; i++) sv[i] = i;
      if (t == 0) sv = '{6, 0, 5, 4, 1, 3, 2};
      else sv.shuffle();
      for (int i = 0; i < N; i++) s[i] = 3'(sv[i]);
      eis = ref_is(sv, first_ok);
      for (int i = 0; i < N; i++) if (sv[i] == eis[K-1]) last_t = i;
      rejected = last_t + 1 - K;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(posedge clk); #1; cyc++; end
      chk(cyc == K * (1 + rejected), $sformatf("cycles %0d exp %0d", cyc, K * (1 + rejected)));
      for (int j = 0; j < K; j++) begin
        chk(int'(is_idx[j]) == eis[j], $sformatf("is[%0d]=%0d exp %0d", j, is_idx[j], eis[j]));
        for (int m = 0; m < K; m++)
          chk(gpartial[m][j] == g_row(m)[eis[j]], "gpartial");
      end
      @(posedge clk); #1;
      chk(!busy, "idle after done");
    end
    chk(n_retry > 0, "a singular G_partial was seen");
    chk(n_swap > 0, "a pivot exchange was seen");
    $display("retries=%0d swaps=%0d", n_retry, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
