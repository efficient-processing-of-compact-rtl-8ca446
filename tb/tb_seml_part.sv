// tb_seml_part: programs a five-layer sequence into the reusable-engine part
// and runs two frames: a residual bottleneck (PW 8->16 ReLU saving its input,
// DW 16 stride 1 ReLU, PW 16->8 linear with the residual add) on an 8x8 map,
// then DW 8 stride 2 ReLU and PW 8->12 ReLU on the 4x4 result. A weight agent answers each
// weight request by writing the requested layer's weights and BN parameters
// into the right engine, as an off-chip memory with a DMA would. Every output
// pixel is compared with the layer-by-layer reference. The test also checks
// the number of weight requests and the per-engine and residual-add layer
// counters, i.e. that both engines were reused, the buffers swapped roles on
// every layer and the shortcut buffer was used.
module tb_seml_part;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int C = 16, HM = 8, WM = 8, K = 3, L = 8, NL = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ltab_we; logic [2:0] ltab_idx; layer_kind_e ltab_kind;
  logic [7:0] ltab_cin, ltab_cout, ltab_h, ltab_w; logic [1:0] ltab_stride; logic ltab_relu;
  logic ltab_save, ltab_add;
  logic [3:0] cfg_layers;
  logic wreq, wdone; logic [2:0] wreq_layer;
  logic wt_we, wt_dw, bn_we, bn_dw; logic [7:0] wt_row, wt_col, bn_row; act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr, olast;
  act_t [C-1:0] id, od;
  logic [31:0] pw_layers_run, dw_layers_run, add_layers_run;

  seml_part dut (.clk, .rst_n, .ltab_we, .ltab_idx, .ltab_kind, .ltab_cin, .ltab_cout, .ltab_h,
    .ltab_w, .ltab_stride, .ltab_relu, .ltab_save, .ltab_add, .cfg_layers, .wreq, .wreq_layer, .wdone,
    .wt_we, .wt_dw, .wt_row, .wt_col, .wt_data, .bn_we, .bn_dw, .bn_row, .bn_data,
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od),
    .out_last(olast), .pw_layers_run, .dw_layers_run, .add_layers_run);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // layer program
  int kind[NL] = '{0, 1, 0, 1, 0};
  int lcin[NL] = '{8, 16, 16, 8, 8};
  int lcout[NL] = '{16, 16, 8, 8, 12};
  int lh[NL] = '{8, 8, 8, 8, 4};
  int ls[NL] = '{1, 1, 1, 2, 1};
  int lrelu[NL] = '{1, 1, 0, 1, 1};
  int lsave[NL] = '{1, 0, 0, 0, 0};
  int ladd[NL] = '{0, 0, 1, 0, 0};
  int Wt[NL][$], Sc[NL][$], Bi[NL][$];
  int nreq = 0;

  // weight agent
  initial begin
    wdone = 0; wt_we = 0; bn_we = 0; wt_dw = 0; bn_dw = 0; wt_row = 0; wt_col = 0; bn_row = 0;
    wt_data = 0; bn_data = '0;
    forever begin
      @(negedge clk);
      if (wreq && rst_n) begin
        int l;
        l = int'(wreq_layer);
        nreq++;
        @(posedge clk); #1;
        for (int r = 0; r < lcout[l]; r++) begin
          int ncol;
          ncol = kind[l] ? K * K : lcin[l];
          for (int c = 0; c < ncol; c++) begin
            wt_we = 1; wt_dw = kind[l][0]; wt_row = 8'(r); wt_col = 8'(c);
            wt_data = act_t'(Wt[l][r * ncol + c]);
            @(posedge clk); #1;
          end
          wt_we = 0;
          bn_we = 1; bn_dw = kind[l][0]; bn_row = 8'(r);
          bn_data.scale = scale_t'(Sc[l][r]); bn_data.bias = Bi[l][r];
          @(posedge clk); #1;
          bn_we = 0;
        end
        wdone = 1;
        @(posedge clk); #1;
        wdone = 0;
      end
    end
  end

  task automatic frame();
    int img[$], cur[$], nxt[$], saved[$];
    int h, sent, got, nout, cout_last;
    rnd_fill(img, 8 * 8 * 8, -50, 127);
    cur = img; h = 8;
    for (int l = 0; l < NL; l++) begin
      if (lsave[l]) saved = cur;
      if (kind[l] == 0) ref_conv(cur, h, h, lcin[l], Wt[l], Sc[l], Bi[l], lcout[l], 1, 1, lrelu[l][0], nxt);
      else              ref_dw(cur, h, h, lcin[l], Wt[l], Sc[l], Bi[l], K, ls[l], lrelu[l][0], nxt);
      if (kind[l] == 1) h = out_dim(h, K, ls[l]);
      if (ladd[l]) foreach (nxt[i]) nxt[i] = sat8(nxt[i] + saved[i]);
      cur = nxt;
    end
    nout = h * h; cout_last = lcout[NL-1];
    sent = 0; got = 0;
    while (got < nout) begin
      iv = (sent < 64) && ($urandom % 3 != 0);
      id = '0;
      for (int c = 0; c < 8; c++) id[c] = act_t'((sent < 64) ? img[sent * 8 + c] : 0);
      orr = ($urandom % 2 == 0);
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < C; c++) begin
          int e;
          e = (c < cout_last) ? cur[got * cout_last + c] : 0;
          checks++;
          if (int'(od[c]) != e) begin
            failures++;
            $display("pix %0d ch %0d got %0d want %0d", got, c, od[c], e);
          end
        end
        checks++;
        if (olast != (got == nout - 1)) begin failures++; $display("out_last wrong"); end
        got++;
      end
      if (iv && ir) sent++;
      @(posedge clk); #1;
    end
    iv = 0;
  endtask

  initial begin
    iv = 0; orr = 0; id = '0; ltab_we = 0; ltab_idx = 0; ltab_kind = LAYER_PW; ltab_cin = 0;
    ltab_cout = 0; ltab_h = 0; ltab_w = 0; ltab_stride = 1; ltab_relu = 0; cfg_layers = NL;
    ltab_save = 0; ltab_add = 0;
    for (int l = 0; l < NL; l++) begin
      int nw;
      nw = kind[l] ? lcout[l] * K * K : lcout[l] * lcin[l];
      for (int i = 0; i < nw; i++) Wt[l].push_back(rnd(-16, 16));
      for (int i = 0; i < lcout[l]; i++) begin Sc[l].push_back(rnd(1, 8)); Bi[l].push_back(rnd(-3000, 3000)); end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      ltab_we = 1; ltab_idx = 3'(l); ltab_kind = layer_kind_e'(kind[l][0]);
      ltab_cin = 8'(lcin[l]); ltab_cout = 8'(lcout[l]); ltab_h = 8'(lh[l]); ltab_w = 8'(lh[l]);
      ltab_stride = 2'(ls[l]); ltab_relu = lrelu[l][0];
      ltab_save = lsave[l][0]; ltab_add = ladd[l][0];
      @(posedge clk); #1;
    end
    ltab_we = 0;
    frame();
    frame();
    checks += 4;
    if (nreq != 2 * NL) begin failures++; $display("weight requests %0d", nreq); end
    if (pw_layers_run != 6) begin failures++; $display("pw layers %0d", pw_layers_run); end
    if (dw_layers_run != 4) begin failures++; $display("dw layers %0d", dw_layers_run); end
    if (add_layers_run != 2) begin failures++; $display("residual layers %0d", add_layers_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
