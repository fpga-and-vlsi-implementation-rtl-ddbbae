// tb_bitflip_gen: after a start the generator must present K+1 patterns on
// consecutive cycles - 0, then bit 0, 1, .., K-1 alone - with idx counting
// 0..K, last only on the final one, then go idle; a start while running is
// ignored.
module tb_bitflip_gen;
  localparam int K = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic valid, last;
  logic [K-1:0] pattern;
  logic [2:0] idx;
  int checks = 0, failures = 0;

  bitflip_gen #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(!valid, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      start = 1;
      @(posedge clk); #1;
      start = (t % 2 == 1);       // a held start must not restart the sequence
      for (int p = 0; p <= K; p++) begin
        chk(valid, $sformatf("valid at %0d", p));
        chk(int'(idx) == p, $sformatf("idx %0d", idx));
        chk(pattern == ((p == 0) ? 4'b0 : 4'(1 << (p - 1))), $sformatf("pattern %b at %0d", pattern, p));
        chk(last == (p == K), "last");
        @(posedge clk); #1;
      end
      start = 0;
      chk(!valid, "idle after last");
      repeat ($urandom_range(3, 0)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
