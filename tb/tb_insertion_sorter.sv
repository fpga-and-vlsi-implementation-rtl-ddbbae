// tb_insertion_sorter: inserts random key/payload streams (one per clock) into
// a cleared 7-cell sorter and compares the chain after every insertion with a
// software insertion sort (new key ahead of equal keys). Also replays the
// reliability sequence of the reference waveform, whose intermediate states
// must be [0,1,..], [0,1,2,..], [0,1,3,2,..], [0,4,1,3,2,..], [0,5,4,1,3,2,..]
// and finally [6,0,5,4,1,3,2].
module tb_insertion_sorter;
  localparam int N = 7, KW = 2, PW = 3;
  logic clk = 0, rst_n = 0, clear = 0, ins = 0;
  logic [KW-1:0] d_key;
  logic [PW-1:0] d_pay;
  logic [N-1:0][KW-1:0] s_key;
  logic [N-1:0][PW-1:0] s_pay;
  int checks = 0, failures = 0;
  int mk [N], mp [N];

  insertion_sorter #(.N(N), .KW(KW), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_insert(int k, int p);
    int pos = N;
    for (int i = N - 1; i >= 0; i--) if (k >= mk[i]) pos = i;
    for (int i = N - 1; i > pos; i--) begin mk[i] = mk[i-1]; mp[i] = mp[i-1]; end
    if (pos < N) begin mk[pos] = k; mp[pos] = p; end
  endtask

  task automatic compare(string tag);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(s_key[i]) != mk[i] || int'(s_pay[i]) != mp[i]) begin
        failures++;
        $display("FAIL %s cell %0d: got %0d/%0d exp %0d/%0d", tag, i, s_key[i], s_pay[i], mk[i], mp[i]);
      end
    end
  endtask

  task automatic run(int keys [N]);
    @(negedge clk); clear = 1; ins = 0;
    @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) begin mk[i] = 0; mp[i] = 0; end
    compare("clear");
    for (int i = 0; i < N; i++) begin
      d_key = KW'(keys[i]); d_pay = PW'(i); ins = 1;
      @(negedge clk);
      model_insert(keys[i], i);
      compare("ins");
    end
    ins = 0;
  endtask

  initial begin
    int keys [N];
    int exp_s [N] = '{6, 0, 5, 4, 1, 3, 2};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reliability levels of c* = [7,5,4,3,2,1,0]
    keys = '{3, 1, 0, 0, 1, 2, 3};
    run(keys);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(s_pay[i]) != exp_s[i]) begin failures++; $display("FAIL ref order %0d", i); end
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) keys[i] = $urandom_range(3, 0);
      run(keys);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
