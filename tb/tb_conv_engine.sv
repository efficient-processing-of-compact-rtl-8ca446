// tb_conv_engine: two back-to-back 16x16x3 frames through the stride-2 3x3
// stem convolution engine at its default size, with random input gaps and
// output back-pressure; every output pixel (8 channels, ReLU) is compared
// with the standard-convolution reference. The second frame checks that
// the engine restarts cleanly after a frame.
module tb_conv_engine;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int CIN = 3, COUT = 8, H = 16, W = 16, K = 3, S = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wt_we, bn_we; logic [2:0] wt_co, bn_co; logic [4:0] wt_ci; act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr;
  act_t [CIN-1:0] id; act_t [COUT-1:0] od;

  conv_engine dut (
    .clk, .rst_n, .wt_we, .wt_co, .wt_ci, .wt_data, .bn_we, .bn_co, .bn_data,
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int Wq[$], SQ[$], BQ[$];

  task automatic frame();
    int img[$], ref_q[$];
    int ho, wo, sent, got;
    rnd_fill(img, H * W * CIN, 0, 127);
    ref_conv(img, H, W, CIN, Wq, SQ, BQ, COUT, K, S, 1'b1, ref_q);
    ho = out_dim(H, K, S); wo = out_dim(W, K, S);
    sent = 0; got = 0;
    while (got < ho * wo) begin
      iv = (sent < H * W) && ($urandom % 4 != 0);
      for (int c = 0; c < CIN; c++) id[c] = act_t'((sent < H * W) ? img[sent * CIN + c] : 0);
      orr = ($urandom % 3 != 0);
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < COUT; c++) begin
          checks++;
          if (int'(od[c]) != ref_q[got * COUT + c]) begin
            failures++;
            $display("pix %0d ch %0d got %0d want %0d", got, c, od[c], ref_q[got * COUT + c]);
          end
        end
        got++;
      end
      if (iv && ir) sent++;
      @(posedge clk); #1;
    end
    iv = 0;
  endtask

  initial begin
    iv = 0; orr = 0; wt_we = 0; bn_we = 0; id = '0; wt_co = 0; wt_ci = 0; wt_data = 0;
    bn_co = 0; bn_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int co = 0; co < COUT; co++) begin
      for (int k = 0; k < K*K*CIN; k++) begin
        Wq.push_back(rnd(-12, 12));
        wt_we = 1; wt_co = 3'(co); wt_ci = 5'(k); wt_data = act_t'(Wq[co*K*K*CIN+k]);
        @(posedge clk); #1;
      end
      wt_we = 0;
      SQ.push_back(rnd(1, 6)); BQ.push_back(rnd(-3000, 3000));
      bn_we = 1; bn_co = 3'(co); bn_data.scale = scale_t'(SQ[co]); bn_data.bias = BQ[co];
      @(posedge clk); #1;
      bn_we = 0;
    end
    frame();
    frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
