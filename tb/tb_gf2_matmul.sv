// tb_gf2_matmul: random 4x4 by 4x7 products over GF(2) against a triple-loop
// parity computation, plus identity x G = G.
module tb_gf2_matmul;
  import isd_ref_pkg::*;
  logic [K-1:0][K-1:0] a;
  logic [K-1:0][N-1:0] b, p;
  int checks = 0, failures = 0;

  gf2_matmul #(.K(K), .N(N)) dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < K; r++) begin a[r] = '0; a[r][r] = 1'b1; b[r] = g_row(r); end
    #1;
    for (int r = 0; r < K; r++) begin
      checks++;
      if (p[r] !== g_row(r)) begin failures++; $display("FAIL identity row %0d", r); end
    end
    for (int t = 0; t < 500; t++) begin
      for (int r = 0; r < K; r++) begin a[r] = 4'($urandom); b[r] = 7'($urandom); end
      #1;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < N; j++) begin
          logic e; e = 1'b0;
          for (int x = 0; x < K; x++) e ^= a[i][x] & b[x][j];
          checks++;
          if (p[i][j] !== e) begin failures++; $display("FAIL (%0d,%0d)", i, j); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
