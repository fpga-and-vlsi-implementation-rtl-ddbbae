// tb_gf2_vecmat: every 4-bit vector times the C(7,4) generator matrix must give
// the codeword of the reference encoder; random matrices are checked against a
// bit-by-bit parity computation.
module tb_gf2_vecmat;
  import isd_ref_pkg::*;
  logic [K-1:0] v;
  logic [K-1:0][N-1:0] m;
  logic [N-1:0] p;
  int checks = 0, failures = 0;

  gf2_vecmat #(.K(K), .N(N)) dut (.v(v), .m(m), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < K; r++) m[r] = g_row(r);
    for (int u = 0; u < 16; u++) begin
      v = 4'(u); #1;
      checks++;
      if (p !== encode(4'(u))) begin failures++; $display("FAIL u=%0d", u); end
    end
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] e;
      v = 4'($urandom);
      for (int r = 0; r < K; r++) m[r] = 7'($urandom);
      #1;
      for (int b = 0; b < N; b++) begin
        e[b] = 1'b0;
        for (int r = 0; r < K; r++) e[b] = e[b] ^ (v[r] & m[r][b]);
      end
      checks++;
      if (p !== e) begin failures++; $display("FAIL random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
