// tb_gj_inverter: random invertible 4x4 GF(2) matrices (full rank tested by
// trying every non-empty row combination). The result must satisfy
// inv x M = I, arrive exactly K clocks after the start edge, and pivot
// exchanges must occur.
module tb_gj_inverter;
  localparam int K = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [K-1:0][K-1:0] mat_in, inv;
  logic busy, done, row_swap;
  int checks = 0, failures = 0, n_swap = 0;

  gj_inverter #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (row_swap) n_swap++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit full_rank(logic [K-1:0][K-1:0] m);
    for (int c = 1; c < (1 << K); c++) begin
      logic [K-1:0] x = '0;
      for (int r = 0; r < K; r++) if (c[r]) x ^= m[r];
      if (x == '0) return 0;
    end
    return 1;
  endfunction

  initial begin
    int done_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (done_cnt < 400) begin
      logic [K-1:0][K-1:0] m;
      int cyc;
      for (int r = 0; r < K; r++) m[r] = 4'($urandom);
      if (!full_rank(m)) continue;
      done_cnt++;
      mat_in = m;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 0;
      while (!done && cyc < 50) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != K) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          logic e; e = 1'b0;
          for (int x = 0; x < K; x++) e ^= inv[i][x] & m[x][j];
          checks++;
          if (e != (i == j)) begin failures++; $display("FAIL product (%0d,%0d)", i, j); end
        end
    end
    checks++;
    if (n_swap == 0) begin failures++; $display("FAIL no pivot exchange seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
