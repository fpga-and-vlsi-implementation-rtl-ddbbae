// tb_isd_decoder: end-to-end test of the decoder at its default size, C(7,4).
//
// Decodes the worked example c* = [6,1,5,3,0,0,7] (expected 1010001, distance
// 7), the word of the Block I waveform, then random received words: noisy
// BPSK images of random codewords and fully random words. Each result is
// compared with the reference model (sort, greedy information set, the K+1
// candidates by brute force, minimum soft distance, first on ties), and the
// latency with 22 clocks + K per rejected information-set position. Words are
// offered back to back with in_valid held, so the in_ready back-pressure is
// exercised. Counts, and fails if never seen: equal reliabilities in a word,
// a singular G_partial retried, a pivot row exchange in the check and in the
// inversion, a flipped candidate beating c_0, a word held off by in_ready.
module tb_isd_decoder;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic [N-1:0][2:0] cstar;
  logic [N-1:0] codeword;
  logic [K-1:0] message;
  logic [5:0] distance;
  logic [2:0] best_idx;
  logic [K-1:0][2:0] info_set;
  logic ev_retry, ev_chk_swap, ev_inv_swap;
  int checks = 0, failures = 0;
  int n_tie = 0, n_retry = 0, n_chk_swap = 0, n_inv_swap = 0, n_flip_win = 0, n_stall = 0;

  isd_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_retry)    n_retry++;
    if (ev_chk_swap) n_chk_swap++;
    if (ev_inv_swap) n_inv_swap++;
    if (in_valid && !in_ready) n_stall++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic decode(int q [N], output logic [N-1:0] got, output int got_d);
    idx_arr_t s;
    is_arr_t  is;
    bit first_ok;
    int last_t, bi, bd, cyc, exp_lat;
    logic [K-1:0] rp;
    logic [N-1:0] bc;
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = (q[i] >= 4);
    s  = ref_sort(q);
    is = ref_is(s, first_ok);
    last_t = 0;
    for (int i = 0; i < N; i++) if (s[i] == is[K-1]) last_t = i;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (reliability(q[i]) == reliability(q[j])) n_tie++;
    for (int j = 0; j < K; j++) rp[j] = r[is[j]];
    bi = 0; bd = 1000; bc = '0;
    for (int c = 0; c <= K; c++) begin
      logic [K-1:0] pat;
      logic [N-1:0] cw;
      pat = rp;
      if (c > 0) pat[c-1] = ~pat[c-1];
      cw = ref_cw_on_is(is, pat);
      if (ref_soft(cw, q) < bd) begin bd = ref_soft(cw, q); bi = c; bc = cw; end
    end
    exp_lat = 22 + K * (last_t + 1 - K);
    // offer the word; in_valid stays high until it is taken
    for (int i = 0; i < N; i++) cstar[i] = 3'(q[i]);
    in_valid = 1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;            // the accepting edge
    in_valid = 0;
    for (int i = 0; i < N; i++) cstar[i] = 3'($urandom);   // must not matter
    cyc = 0;
    while (!out_valid && cyc < 200) begin @(posedge clk); #1; cyc++; end
    chk(cyc == exp_lat, $sformatf("latency %0d exp %0d", cyc, exp_lat));
    chk(codeword == bc, $sformatf("codeword %b exp %b", codeword, bc));
    chk(int'(distance) == bd, $sformatf("distance %0d exp %0d", distance, bd));
    chk(int'(best_idx) == bi, "best_idx");
    chk(message == bc[K-1:0], "message");
    for (int j = 0; j < K; j++) chk(int'(info_set[j]) == is[j], "info_set");
    if (bi != 0) n_flip_win++;
    got = codeword;
    got_d = int'(distance);
    // ask for the next word at once, while the decoder still reports
    in_valid = 1;
  endtask

  initial begin
    int q [N];
    logic [N-1:0] got;
    int got_d;
    int ex [N] = '{6, 1, 5, 3, 0, 0, 7};
    int w4 [N] = '{7, 5, 4, 3, 2, 1, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    decode(ex, got, got_d);
    chk(got == 7'b1000101 && got_d == 7, "worked example decodes to 1010001");
    decode(w4, got, got_d);
    for (int t = 0; t < 2000; t++) begin
      if (t % 2 == 0) begin
        logic [N-1:0] c;
        c = encode(4'($urandom));
        for (int i = 0; i < N; i++) begin
          int v;
          v = (c[i] ? 7 : 0) + (c[i] ? -1 : 1) * $urandom_range(5, 0);
          q[i] = v;
        end
      end else begin
        for (int i = 0; i < N; i++) q[i] = $urandom_range(7, 0);
      end
      decode(q, got, got_d);
    end
    $display("ties=%0d retries=%0d check_swaps=%0d inv_swaps=%0d flip_wins=%0d stalls=%0d",
             n_tie, n_retry, n_chk_swap, n_inv_swap, n_flip_win, n_stall);
    chk(n_tie > 0, "tie in the sort");
    chk(n_retry > 0, "singular G_partial retried");
    chk(n_chk_swap > 0, "pivot exchange in the check");
    chk(n_inv_swap > 0, "pivot exchange in the inversion");
    chk(n_flip_win > 0, "a flipped candidate won");
    chk(n_stall > 0, "a word waited for in_ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
