// tb_rpartial_builder: random r and information sets; r_partial[j] must be
// r at position is_idx[j].
module tb_rpartial_builder;
  import isd_ref_pkg::*;
  logic [N-1:0] r;
  logic [K-1:0][2:0] is_idx;
  logic [K-1:0] r_partial;
  int checks = 0, failures = 0;

  rpartial_builder #(.N(N), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      r = 7'($urandom);
      for (int j = 0; j < K; j++) is_idx[j] = 3'($urandom_range(N - 1, 0));
      #1;
      for (int j = 0; j < K; j++) begin
        checks++;
        if (r_partial[j] !== ((r >> is_idx[j]) & 1)) begin failures++; $display("FAIL j=%0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
