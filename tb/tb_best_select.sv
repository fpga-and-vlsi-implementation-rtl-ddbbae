// tb_best_select: random streams of 5 candidates with random distances
// (small range, so ties happen). The result must be the first candidate with
// the smallest distance, reported in the cycle after the last one.
module tb_best_select;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0;
  logic [6:0] cand;
  logic [5:0] sdist;
  logic [2:0] idx;
  logic out_valid;
  logic [6:0] best;
  logic [5:0] best_dist;
  logic [2:0] best_idx;
  int checks = 0, failures = 0, ties = 0;

  best_select #(.N(7), .DW(6), .IW(3)) dut (.*);

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
      int d [5];
      logic [6:0] c [5];
      int bi;
      bi = 0;
      for (int i = 0; i < 5; i++) begin
        d[i] = $urandom_range(6, 0);
        c[i] = 7'($urandom);
        if (d[i] < d[bi]) bi = i;
      end
      for (int i = 0; i < 5; i++) if (i != bi && d[i] == d[bi]) ties++;
      for (int i = 0; i < 5; i++) begin
        valid = 1; first = (i == 0); last = (i == 4);
        cand = c[i]; sdist = 6'(d[i]); idx = 3'(i);
        @(posedge clk); #1;
        checks++;
        if (out_valid != (i == 4)) begin failures++; $display("FAIL out_valid timing"); end
      end
      valid = 0; last = 0;
      checks++;
      if (best != c[bi] || int'(best_dist) != d[bi] || int'(best_idx) != bi) begin
        failures++;
        $display("FAIL t=%0d got idx %0d exp %0d", t, best_idx, bi);
      end
      if ($urandom_range(1, 0)) begin @(posedge clk); #1; end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no ties exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
