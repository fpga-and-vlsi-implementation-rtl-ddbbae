// tb_isd_block2: Block II against the reference model. First the input of the
// reference waveform, s = [6,0,5,4,1,3,2] with r = 1110000 read as positions
// 4, 5, 6 set: G_new must be the rows 0111001, 1101000, 0011010, 0110100
// (position 0 first), r_partial = 1101 (bit 3 first), after exactly 8 clocks.
// Then random s and r: each G_new row j must be the codeword that is 1 at IS
// position j and 0 at the other IS positions, r_partial[j] = r[IS_j], and the
// latency must be 2K + K per rejected position.
module tb_isd_block2;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] r;
  logic [N-1:0][2:0] s;
  logic busy, out_valid, retry, chk_swap, inv_swap;
  logic [K-1:0][N-1:0] g_new;
  logic [K-1:0] r_partial;
  logic [K-1:0][2:0] is_idx;
  int checks = 0, failures = 0, n_retry = 0;

  isd_block2 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (retry) n_retry++;

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

  function automatic logic [N-1:0] from_text(string t);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (t[i] == "1");
    return v;
  endfunction

  task automatic run(idx_arr_t sv, logic [N-1:0] rv);
    is_arr_t eis;
    bit first_ok;
    int cyc = 0, last_t = 0, rejected;
    for (int i = 0; i < N; i++) s[i] = 3'(sv[i]);
    r = rv;
    eis = ref_is(sv, first_ok);
    for (int i = 0; i < N; i++) if (sv[i] == eis[K-1]) last_t = i;
    rejected = last_t + 1 - K;
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    r = ~rv;                     // inputs are latched: changes must not matter
    while (!out_valid && cyc < 100) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 2 * K + K * rejected, $sformatf("latency %0d", cyc));
    for (int j = 0; j < K; j++) begin
      logic [K-1:0] e = '0;
      e[j] = 1'b1;
      chk(int'(is_idx[j]) == eis[j], "is_idx");
      chk(g_new[j] == ref_cw_on_is(eis, e), $sformatf("g_new row %0d", j));
      chk(r_partial[j] == rv[eis[j]], "r_partial");
    end
  endtask

  initial begin
    idx_arr_t sv;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sv = '{6, 0, 5, 4, 1, 3, 2};
    run(sv, 7'b1110000);
    chk(g_new[0] == from_text("0111001"), "reference waveform row 0");
    chk(g_new[1] == from_text("1101000"), "reference waveform row 1");
    chk(g_new[2] == from_text("0011010"), "reference waveform row 2");
    chk(g_new[3] == from_text("0110100"), "reference waveform row 3");
    chk(r_partial == 4'b1101, "reference waveform r_partial");
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) sv[i] = i;
      sv.shuffle();
      run(sv, 7'($urandom));
    end
    chk(n_retry > 0, "a rejected G_partial was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
