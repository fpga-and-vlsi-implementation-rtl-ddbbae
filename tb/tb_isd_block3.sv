// tb_isd_block3: the candidates for the worked example (information set
// 0,4,5,6, r_partial 1,0,0,1 in set order) must start with c_0 = 1010001;
// then random information sets and r vectors: candidate i must be the codeword
// equal to r_partial, with bit i-1 flipped for i > 0, on the information set.
// The K+1 candidates must come on consecutive cycles starting one clock after
// start.
module tb_isd_block3;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] r_partial;
  logic [K-1:0][N-1:0] g_new;
  logic busy, cand_valid, cand_last;
  logic [N-1:0] cand;
  logic [2:0] cand_idx;
  int checks = 0, failures = 0;

  isd_block3 dut (.*);

  always #5 clk = ~clk;

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

  task automatic run(is_arr_t is, logic [K-1:0] rp, output logic [N-1:0] c0);
    for (int j = 0; j < K; j++) begin
      logic [K-1:0] e;
      e = '0; e[j] = 1'b1;
      g_new[j] = ref_cw_on_is(is, e);
    end
    r_partial = rp;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    r_partial = ~rp;          // latched: must not matter
    for (int i = 0; i <= K; i++) begin
      logic [K-1:0] pat;
      pat = rp;
      if (i > 0) pat[i-1] = ~pat[i-1];
      chk(cand_valid && int'(cand_idx) == i, $sformatf("valid/idx at %0d", i));
      chk(cand == ref_cw_on_is(is, pat), $sformatf("candidate %0d", i));
      chk(cand_last == (i == K), "last");
      if (i == 0) c0 = cand;
      @(posedge clk); #1;
    end
    chk(!cand_valid, "idle");
  endtask

  initial begin
    is_arr_t is;
    idx_arr_t sv;
    logic [N-1:0] c0;
    bit first_ok;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    is = '{0, 4, 5, 6};
    run(is, 4'b1001, c0);
    chk(c0 == 7'b1000101, "worked example c_0 = 1010001");
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) sv[i] = i;
      sv.shuffle();
      is = ref_is(sv, first_ok);
      run(is, 4'($urandom), c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
