// tb_hard_decision: exhaustive check of hard_decision for Q = 3 against the
// reliability levels 3 (0, 7), 2 (1, 6), 1 (2, 5), 0 (3, 4) and the rule
// "value >= 4 decides 1".
module tb_hard_decision;
  import isd_ref_pkg::*;
  logic [2:0] sym;
  logic       bit_o;
  logic [1:0] rel;
  int checks = 0, failures = 0;

  hard_decision #(.Q(3)) dut (.sym(sym), .bit_o(bit_o), .rel(rel));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      sym = 3'(v);
      #1;
      checks += 2;
      if (bit_o !== (v >= 4)) begin failures++; $display("FAIL bit sym=%0d", v); end
      if (int'(rel) != reliability(v)) begin failures++; $display("FAIL rel sym=%0d got %0d", v, rel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
