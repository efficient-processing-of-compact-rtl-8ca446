// tb_firb: runs three 8x8 frames through the fused inverted residual
// bottleneck at its default size (8 -> 16 -> 8 channels, 3x3 depthwise,
// stride 1, residual add) with random input gaps and output back-pressure.
// The expected output is computed layer by layer with the reference models
// (pointwise, depthwise, pointwise, saturating add of the block input).
// It also requires that the shortcut FIFO held the input back at least once
// (a slow consumer fills it), and reports how often that happened.
module tb_firb;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int CIN = 8, CEXP = 16, COUT = 8, H = 8, W = 8, K = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wt_we, bn_we; logic [1:0] wt_eng, bn_eng; logic [7:0] wt_row, wt_col, bn_row;
  act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr;
  act_t [CIN-1:0] id; act_t [COUT-1:0] od;
  logic [31:0] skip_stalls;

  firb dut (.clk, .rst_n, .wt_we, .wt_eng, .wt_row, .wt_col, .wt_data, .bn_we, .bn_eng, .bn_row,
            .bn_data, .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr),
            .out_data(od), .skip_stalls);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int We[$], Se[$], Be[$], Wd[$], Sd[$], Bd[$], Wp[$], Sp[$], Bp[$];

  task automatic wr(int eng, int row, int col, int v);
    wt_we = 1; wt_eng = 2'(eng); wt_row = 8'(row); wt_col = 8'(col); wt_data = act_t'(v);
    @(posedge clk); #1;
    wt_we = 0;
  endtask
  task automatic wbn(int eng, int row, int sc, int bi);
    bn_we = 1; bn_eng = 2'(eng); bn_row = 8'(row); bn_data.scale = scale_t'(sc); bn_data.bias = bi;
    @(posedge clk); #1;
    bn_we = 0;
  endtask

  task automatic frame(int slow);
    int img[$], e1[$], e2[$], e3[$];
    int sent, got;
    rnd_fill(img, H * W * CIN, -60, 127);
    ref_conv(img, H, W, CIN, We, Se, Be, CEXP, 1, 1, 1'b1, e1);
    ref_dw(e1, H, W, CEXP, Wd, Sd, Bd, K, 1, 1'b1, e2);
    ref_conv(e2, H, W, CEXP, Wp, Sp, Bp, COUT, 1, 1, 1'b1, e3);
    sent = 0; got = 0;
    while (got < H * W) begin
      iv = (sent < H * W) && ($urandom % 4 != 0);
      for (int c = 0; c < CIN; c++) id[c] = act_t'((sent < H * W) ? img[sent * CIN + c] : 0);
      orr = ($urandom % slow == 0);
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < COUT; c++) begin
          int e;
          e = sat8(e3[got * COUT + c] + img[got * CIN + c]);
          checks++;
          if (int'(od[c]) != e) begin
            failures++;
            $display("pix %0d ch %0d got %0d want %0d", got, c, od[c], e);
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
    iv = 0; orr = 0; wt_we = 0; bn_we = 0; id = '0; wt_eng = 0; bn_eng = 0; wt_row = 0;
    wt_col = 0; bn_row = 0; wt_data = 0; bn_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int co = 0; co < CEXP; co++) begin
      for (int ci = 0; ci < CIN; ci++) begin We.push_back(rnd(-16, 16)); wr(0, co, ci, We[$]); end
      Se.push_back(rnd(1, 8)); Be.push_back(rnd(-2000, 4000)); wbn(0, co, Se[$], Be[$]);
      for (int t = 0; t < K*K; t++) begin Wd.push_back(rnd(-16, 16)); wr(1, co, t, Wd[$]); end
      Sd.push_back(rnd(1, 8)); Bd.push_back(rnd(-2000, 4000)); wbn(1, co, Sd[$], Bd[$]);
    end
    for (int co = 0; co < COUT; co++) begin
      for (int ci = 0; ci < CEXP; ci++) begin Wp.push_back(rnd(-12, 12)); wr(2, co, ci, Wp[$]); end
      Sp.push_back(rnd(1, 6)); Bp.push_back(rnd(-4000, 4000)); wbn(2, co, Sp[$], Bp[$]);
    end
    frame(1);
    frame(2);
    frame(6);
    $display("shortcut FIFO back-pressure cycles: %0d", skip_stalls);
    checks++;
    if (skip_stalls == 0) begin failures++; $display("shortcut FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
