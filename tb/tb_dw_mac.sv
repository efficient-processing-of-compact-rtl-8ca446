// tb_dw_mac: random windows through the depthwise MAC for 16 and 5 active
// channels, with and without ReLU, checked against a direct per-channel
// dot product with BN; also checks the latency ceil(c/PAR)+1 from
// acceptance to output valid when the output is not stalled.
module tb_dw_mac;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int C = 16, K = 3, PAR = 2, NWIN = 30;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [4:0] cfg_c; logic cfg_relu;
  logic wt_we, bn_we; logic [3:0] wt_ch, bn_ch; logic [3:0] wt_tap; act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr;
  act_t [K*K-1:0][C-1:0] iw; act_t [C-1:0] od;

  dw_mac #(.C_MAX(C), .K(K), .PAR(PAR)) dut (
    .clk, .rst_n, .cfg_c, .cfg_relu, .wt_we, .wt_ch, .wt_tap, .wt_data, .bn_we, .bn_ch, .bn_data,
    .in_valid(iv), .in_ready(ir), .in_win(iw), .out_valid(ov), .out_ready(orr), .out_data(od));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int W[C][K*K]; int SC[C]; int BI[C];

  task automatic run(int nc, bit relu, bit bp);
    int sent, got, t_acc;
    act_t [K*K-1:0][C-1:0] wins[$];
    cfg_c = 5'(nc); cfg_relu = relu;
    sent = 0; got = 0; t_acc = 0;
    for (int n = 0; n < NWIN; n++) begin
      act_t [K*K-1:0][C-1:0] x;
      for (int t = 0; t < K*K; t++) for (int c = 0; c < C; c++) x[t][c] = act_t'($urandom);
      wins.push_back(x);
    end
    while (got < NWIN) begin
      iv = (sent < NWIN);
      iw = wins[(sent < NWIN) ? sent : 0];
      orr = bp ? ($urandom % 2 == 0) : 1'b1;
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < C; c++) begin
          longint acc;
          int e;
          acc = 0;
          for (int t = 0; t < K*K; t++) acc += longint'(wins[got][t][c]) * longint'(W[c][t]);
          e = (c < nc) ? ref_bn(acc, SC[c], BI[c], relu) : 0;
          checks++;
          if (int'(od[c]) != e) begin failures++; $display("win %0d ch %0d got %0d want %0d", got, c, od[c], e); end
        end
        if (!bp) begin
          checks++;
          if (cyc - t_acc != (nc + PAR - 1) / PAR + 1) begin
            failures++; $display("latency %0d", cyc - t_acc);
          end
        end
        got++;
      end
      if (iv && ir) begin sent++; t_acc = cyc; end
      @(posedge clk); #1;
    end
    iv = 0;
  endtask

  initial begin
    iv = 0; orr = 0; wt_we = 0; bn_we = 0; iw = '0; wt_ch = 0; wt_tap = 0; wt_data = 0;
    bn_ch = 0; bn_data = '0; cfg_c = 16; cfg_relu = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < C; c++) begin
      for (int t = 0; t < K*K; t++) begin
        W[c][t] = rnd(-30, 30);
        wt_we = 1; wt_ch = 4'(c); wt_tap = 4'(t); wt_data = act_t'(W[c][t]);
        @(posedge clk); #1;
      end
      wt_we = 0;
      SC[c] = rnd(1, 16); BI[c] = rnd(-4000, 4000);
      bn_we = 1; bn_ch = 4'(c); bn_data.scale = scale_t'(SC[c]); bn_data.bias = BI[c];
      @(posedge clk); #1;
      bn_we = 0;
    end
    run(16, 1, 1);
    run(5, 0, 1);
    run(16, 1, 0);
    run(7, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
