// tb_bn_relu: checks folded batch norm, ReLU and saturation against the
// integer reference for random accumulators, scales and biases, with and
// without ReLU, plus the saturation corners.
module tb_bn_relu;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  int checks = 0, failures = 0;

  acc_t acc; bn_t bn; logic relu; act_t y;
  bn_relu dut (.acc, .bn, .relu_en(relu), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int a, int sc, int bi, bit r);
    int e;
    acc = a; bn.scale = scale_t'(sc); bn.bias = bi; relu = r;
    #1;
    e = ref_bn(a, sc, bi, r);
    checks++;
    if (int'(y) != e) begin
      failures++;
      $display("acc=%0d scale=%0d bias=%0d relu=%0d: got %0d want %0d", a, sc, bi, r, y, e);
    end
  endtask

  initial begin
    int nsat = 0, nrelu = 0;
    check_one(100000, 100, 0, 0);     // positive saturation
    check_one(-100000, 100, 0, 0);    // negative saturation
    check_one(-100000, 100, 0, 1);    // ReLU clamp
    check_one(256, 1, 0, 1);          // exact 1
    check_one(-1, 1, 0, 0);           // arithmetic shift of -1/256 -> -1
    for (int it = 0; it < 2000; it++) begin
      int a, sc, bi;
      a  = rnd(-20000, 20000);
      sc = rnd(-40, 40);
      bi = rnd(-30000, 30000);
      check_one(a, sc, bi, it[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
