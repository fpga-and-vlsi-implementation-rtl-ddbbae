// tb_isd_block1: Block I against the reference model. Checks the word of the
// reference waveform (c* = [7,5,4,3,2,1,0] -> r = 1110000, s = [6,0,5,4,1,3,2])
// and the worked example (c* = [6,1,5,3,0,0,7] -> r = 1010001), then random
// words. For every word the cycle count from the accepting edge to out_valid
// must be 7, and in_valid while busy must be ignored.
module tb_isd_block1;
  import isd_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0][2:0] cstar;
  logic busy, out_valid;
  logic [N-1:0] r;
  logic [N-1:0][2:0] s;
  logic [N-1:0][2:0] cstar_q;
  int checks = 0, failures = 0;

  isd_block1 #(.N(N), .Q(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int q [N]);
    idx_arr_t es;
    int cyc = 0;
    for (int i = 0; i < N; i++) cstar[i] = 3'(q[i]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 1;          // held high: must be ignored while busy
    for (int i = 0; i < N; i++) cstar[i] = 3'(7 - q[i]);
    while (!out_valid && cyc < 50) begin @(posedge clk); #1; cyc++; end
    in_valid = 0;
    chk(cyc == N, $sformatf("latency %0d", cyc));
    es = ref_sort(q);
    for (int i = 0; i < N; i++) begin
      chk(r[i] == (q[i] >= 4), $sformatf("r[%0d]", i));
      chk(int'(s[i]) == es[i], $sformatf("s[%0d]=%0d exp %0d", i, s[i], es[i]));
      chk(int'(cstar_q[i]) == q[i], "cstar_q");
    end
    @(posedge clk); #1;
    chk(!out_valid, "out_valid is a pulse");
  endtask

  initial begin
    int q [N];
    int w1 [N] = '{7, 5, 4, 3, 2, 1, 0};
    int w2 [N] = '{6, 1, 5, 3, 0, 0, 7};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(w1);
    chk(r == 7'b0000111, "reference waveform r");
    chk(s == {3'd2, 3'd3, 3'd1, 3'd4, 3'd5, 3'd0, 3'd6}, "reference waveform s");
    run(w2);
    chk(r == 7'b1000101, "example r");
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) q[i] = $urandom_range(7, 0);
      run(q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
