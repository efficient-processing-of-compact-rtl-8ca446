// tb_dw_engine: runs whole frames through the depthwise engine (line buffer
// plus MAC lanes) for several runtime shapes, strides and channel counts,
// with random input gaps and output back-pressure, and compares every
// output pixel with the depthwise reference (zero padding, folded BN,
// optional ReLU). Also checks out_last on the last pixel of each frame.
module tb_dw_engine;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int C = 6, WM = 10, HM = 10, K = 3, PAR = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] cfg_h, cfg_w; logic [1:0] cfg_stride; logic [2:0] cfg_c; logic cfg_relu;
  logic wt_we, bn_we; logic [2:0] wt_ch, bn_ch; logic [3:0] wt_tap; act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr, olast;
  act_t [C-1:0] id, od;

  dw_engine #(.C_MAX(C), .W_MAX(WM), .H_MAX(HM), .K(K), .PAR(PAR)) dut (
    .clk, .rst_n, .cfg_h, .cfg_w, .cfg_stride, .cfg_c, .cfg_relu,
    .wt_we, .wt_ch, .wt_tap, .wt_data, .bn_we, .bn_ch, .bn_data,
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od),
    .out_last(olast));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int Wq[$], SQ[$], BQ[$];

  task automatic run(int h, int w, int s, int nc, bit relu);
    int img[$], ref_q[$], wsub[$];
    int ho, wo, sent, got;
    cfg_h = 4'(h); cfg_w = 4'(w); cfg_stride = 2'(s); cfg_c = 3'(nc); cfg_relu = relu;
    rnd_fill(img, h * w * nc, -128, 127);
    wsub = {};
    for (int c = 0; c < nc; c++) for (int t = 0; t < K*K; t++) wsub.push_back(Wq[c*K*K+t]);
    ref_dw(img, h, w, nc, wsub, SQ, BQ, K, s, relu, ref_q);
    ho = out_dim(h, K, s); wo = out_dim(w, K, s);
    sent = 0; got = 0;
    while (got < ho * wo) begin
      iv = (sent < h * w) && ($urandom % 5 != 0);
      id = '0;
      for (int c = 0; c < nc; c++) id[c] = act_t'((sent < h * w) ? img[sent * nc + c] : 0);
      orr = ($urandom % 4 != 0);
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < C; c++) begin
          int e;
          e = (c < nc) ? ref_q[got * nc + c] : 0;
          checks++;
          if (int'(od[c]) != e) begin
            failures++;
            $display("h%0d w%0d s%0d pix %0d ch %0d got %0d want %0d", h, w, s, got, c, od[c], e);
          end
        end
        checks++;
        if (olast != (got == ho * wo - 1)) begin failures++; $display("out_last wrong"); end
        got++;
      end
      if (iv && ir) sent++;
      @(posedge clk); #1;
    end
    iv = 0; orr = 0;
    repeat (4) @(posedge clk); #1;
  endtask

  initial begin
    iv = 0; orr = 0; wt_we = 0; bn_we = 0; id = '0; wt_ch = 0; wt_tap = 0; wt_data = 0;
    bn_ch = 0; bn_data = '0; cfg_h = 10; cfg_w = 10; cfg_stride = 1; cfg_c = 6; cfg_relu = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < C; c++) begin
      for (int t = 0; t < K*K; t++) begin
        Wq.push_back(rnd(-30, 30));
        wt_we = 1; wt_ch = 3'(c); wt_tap = 4'(t); wt_data = act_t'(Wq[c*K*K+t]);
        @(posedge clk); #1;
      end
      wt_we = 0;
      SQ.push_back(rnd(1, 16)); BQ.push_back(rnd(-4000, 4000));
      bn_we = 1; bn_ch = 3'(c); bn_data.scale = scale_t'(SQ[c]); bn_data.bias = BQ[c];
      @(posedge clk); #1;
      bn_we = 0;
    end
    run(10, 10, 1, 6, 1);
    run(9, 7, 2, 5, 0);
    run(10, 10, 2, 6, 1);
    run(4, 6, 1, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
