// tb_window_gen: streams frames of several shapes and strides through the
// line buffer with random input valid and output ready, and compares every
// window tap (including zero padding) with the pixel it must hold. Checks
// out_last on the last window of each frame and that each frame yields
// exactly ho*wo windows; frames follow one another without reset. Before
// the first frame it holds height and width at 0 and checks that the block
// then neither issues a window nor accepts a pixel.
module tb_window_gen;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int C = 3, WM = 16, HM = 16, K = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] cfg_h, cfg_w; logic [1:0] cfg_stride;
  logic iv, ir, ov, orr, olast;
  act_t [C-1:0] id; act_t [K*K-1:0][C-1:0] ow;

  window_gen #(.C_MAX(C), .W_MAX(WM), .H_MAX(HM), .K(K)) dut (
    .clk, .rst_n, .cfg_h, .cfg_w, .cfg_stride, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_win(ow), .out_last(olast));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int h, int w, int s);
    int img[$];
    int ho, wo, sent, got;
    cfg_h = 5'(h); cfg_w = 5'(w); cfg_stride = 2'(s);
    rnd_fill(img, h * w * C, -128, 127);
    ho = out_dim(h, K, s); wo = out_dim(w, K, s);
    sent = 0; got = 0;
    while (got < ho * wo) begin
      iv = (sent < h * w) && ($urandom % 4 != 0);
      for (int c = 0; c < C; c++) id[c] = act_t'((sent < h * w) ? img[sent * C + c] : 0);
      orr = ($urandom % 3 != 0);
      @(negedge clk);
      if (ov && orr) begin
        int r, cc;
        r = got / wo; cc = got % wo;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            for (int c = 0; c < C; c++) begin
              int rr, c2, e;
              rr = r * s - 1 + i; c2 = cc * s - 1 + j;
              e = (rr >= 0 && rr < h && c2 >= 0 && c2 < w) ? img[(rr * w + c2) * C + c] : 0;
              checks++;
              if (int'(ow[i*K+j][c]) != e) begin
                failures++;
                $display("h%0d w%0d s%0d win(%0d,%0d) tap %0d,%0d ch%0d got %0d want %0d",
                         h, w, s, r, cc, i, j, c, ow[i*K+j][c], e);
              end
            end
        checks++;
        if (olast != (got == ho * wo - 1)) begin failures++; $display("out_last wrong at %0d", got); end
        got++;
      end
      if (iv && ir) sent++;
      @(posedge clk); #1;
    end
    iv = 0; orr = 0;
    // the frame must be fully consumed before the next one
    while (sent < h * w) begin failures++; $display("input not consumed"); break; end
    repeat (3) @(posedge clk); #1;
    checks++;
    if (ov) begin failures++; $display("extra window after frame"); end
  endtask

  initial begin
    iv = 0; orr = 0; id = '0; cfg_h = 0; cfg_w = 0; cfg_stride = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // unconfigured (empty) frame: no window may appear and no pixel is taken
    iv = 1; orr = 0;
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (ov || ir) begin failures++; $display("activity on an empty frame"); end
      @(posedge clk); #1;
    end
    iv = 0;
    run(5, 7, 1);
    run(8, 8, 2);
    run(16, 16, 1);
    run(7, 6, 2);
    run(3, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
