// tb_adder_tree: checks the adder tree for several sizes against a plain
// loop sum, with random signed addends including large magnitudes.
module tb_adder_tree;
  import fibha_pkg::*;
  int checks = 0, failures = 0;

  acc_t [3:0] in4;  acc_t s4;
  acc_t [8:0] in9;  acc_t s9;
  acc_t [0:0] in1;  acc_t s1;
  adder_tree #(.N(4)) u4 (.in(in4), .sum(s4));
  adder_tree #(.N(9)) u9 (.in(in9), .sum(s9));
  adder_tree #(.N(1)) u1 (.in(in1), .sum(s1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      acc_t e4, e9;
      e4 = 0; e9 = 0;
      for (int i = 0; i < 4; i++) begin in4[i] = acc_t'($urandom % 200000) - 100000; e4 += in4[i]; end
      for (int i = 0; i < 9; i++) begin in9[i] = acc_t'($urandom % 40000) - 20000;  e9 += in9[i]; end
      in1[0] = acc_t'($urandom);
      #1;
      checks += 3;
      if (s4 != e4) begin failures++; $display("N=4 mismatch %0d %0d", s4, e4); end
      if (s9 != e9) begin failures++; $display("N=9 mismatch %0d %0d", s9, e9); end
      if (s1 != in1[0]) begin failures++; $display("N=1 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
