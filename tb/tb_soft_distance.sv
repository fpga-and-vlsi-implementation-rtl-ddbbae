// tb_soft_distance: random candidates and received words against
// sum |c*_i - 7 c_i|; includes the worked example (c_0 = 1010001 against
// c* = [6,1,5,3,0,0,7] gives 7).
module tb_soft_distance;
  import isd_ref_pkg::*;
  logic [N-1:0] cand;
  logic [N-1:0][2:0] cstar;
  logic [5:0] sdist;
  int checks = 0, failures = 0;

  soft_distance #(.N(N), .Q(3)) dut (.cand(cand), .cstar(cstar), .sdist(sdist));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q [N] = '{6, 1, 5, 3, 0, 0, 7};
    for (int i = 0; i < N; i++) cstar[i] = 3'(q[i]);
    cand = 7'b1000101;
    #1;
    checks++;
    if (sdist != 6'd7) begin failures++; $display("FAIL example %0d", sdist); end
    for (int t = 0; t < 1000; t++) begin
      cand = 7'($urandom);
      for (int i = 0; i < N; i++) begin q[i] = $urandom_range(7, 0); cstar[i] = 3'(q[i]); end
      #1;
      checks++;
      if (int'(sdist) != ref_soft(cand, q)) begin failures++; $display("FAIL random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
