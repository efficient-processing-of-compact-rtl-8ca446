// tb_fibha_top: end-to-end test of the hybrid accelerator at its default
// size. Random 16x16x3 images go through the dedicated part (3x3 stride-2
// stem, fused bottleneck with residual, pointwise engine 4 expanding 8->16)
// and the reusable part, programmed with the rest of that second block
// (DW 16 stride 2, PW 16->8 linear) and one more residual bottleneck (PW
// 8->16 saving its input, DW 16, PW 16->8 with the add). A weight agent
// serves the reusable part's per-layer weight requests. The expected 4x4x8
// result is computed with the reference models, layer by layer.
//
// Besides the data it counts, and requires at least once each: stride-2
// windows in the stem and in the reusable depthwise layer, the residual add
// in the fused bottleneck and in the reusable part,
// back-pressure from the reusable part into the dedicated pipeline, the
// shortcut FIFO holding the input back, per-layer weight requests, and the
// reuse of the pointwise engine for more than one layer (buffer swap).
module tb_fibha_top;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int IH = 16, IC = 3, K = 3, SC_ = 8, CE = 16, CM = 16, NL = 5, NFRAMES = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wt_we, bn_we; logic [2:0] wt_eng, bn_eng; logic [7:0] wt_row, wt_col, bn_row;
  act_t wt_data; bn_t bn_data;
  logic ltab_we; logic [2:0] ltab_idx; layer_kind_e ltab_kind;
  logic [7:0] ltab_cin, ltab_cout, ltab_h, ltab_w; logic [1:0] ltab_stride; logic ltab_relu;
  logic ltab_save, ltab_add;
  logic [3:0] cfg_layers;
  logic wreq, wdone; logic [2:0] wreq_layer;
  logic iv, ir, ov, orr, olast;
  act_t [IC-1:0] id; act_t [CM-1:0] od;
  logic [31:0] skip_stalls, sesl_stalls, pw_layers_run, dw_layers_run, add_layers_run;

  fibha_top dut (.clk, .rst_n, .wt_we, .wt_eng, .wt_row, .wt_col, .wt_data, .bn_we, .bn_eng,
    .bn_row, .bn_data, .ltab_we, .ltab_idx, .ltab_kind, .ltab_cin, .ltab_cout, .ltab_h, .ltab_w,
    .ltab_stride, .ltab_relu, .ltab_save, .ltab_add, .cfg_layers, .wreq, .wreq_layer, .wdone,
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od),
    .out_last(olast), .skip_stalls, .sesl_stalls, .pw_layers_run, .dw_layers_run, .add_layers_run);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // parameters of all engines
  int Ws[$], Ss[$], Bs[$];                       // stem
  int We[$], Se[$], Be[$], Wd[$], Sd[$], Bd[$];  // bottleneck
  int Wp[$], Sp[$], Bp[$];
  int Wt[$], St[$], Bt[$];                       // engine 4
  int kind[NL] = '{1, 0, 0, 1, 0};
  int lcin[NL] = '{16, 16, 8, 16, 16};
  int lcout[NL] = '{16, 8, 16, 16, 8};
  int lh[NL] = '{8, 4, 4, 4, 4};
  int ls[NL] = '{2, 1, 1, 1, 1};
  int lrelu[NL] = '{1, 0, 1, 1, 0};
  int lsave[NL] = '{0, 0, 1, 0, 0};
  int ladd[NL] = '{0, 0, 0, 0, 1};
  int Wl[NL][$], Sl[NL][$], Bl[NL][$];

  task automatic wr(int eng, int row, int col, int v);
    wt_we = 1; wt_eng = 3'(eng); wt_row = 8'(row); wt_col = 8'(col); wt_data = act_t'(v);
    @(posedge clk); #1;
    wt_we = 0;
  endtask
  task automatic wbn(int eng, int row, int sc, int bi);
    bn_we = 1; bn_eng = 3'(eng); bn_row = 8'(row); bn_data.scale = scale_t'(sc); bn_data.bias = bi;
    @(posedge clk); #1;
    bn_we = 0;
  endtask

  // weight agent for the reusable part
  int nreq = 0;
  initial begin
    wdone = 0;
    forever begin
      @(negedge clk);
      if (wreq && rst_n) begin
        int l, ncol;
        l = int'(wreq_layer);
        nreq++;
        @(posedge clk); #1;
        ncol = kind[l] ? K * K : lcin[l];
        for (int r = 0; r < lcout[l]; r++) begin
          for (int c = 0; c < ncol; c++) wr(5 + kind[l], r, c, Wl[l][r * ncol + c]);
          wbn(5 + kind[l], r, Sl[l][r], Bl[l][r]);
        end
        wdone = 1;
        @(posedge clk); #1;
        wdone = 0;
      end
    end
  end

  // mechanism counters

  // expected results, one queue entry per frame
  int cyc = 0;
  always @(posedge clk) cyc++;
  int expq[NFRAMES][$];
  int sent_frames = 0;

  task automatic make_frame(output int img[$]);
    int a[$], b[$], e1[$], e2[$], e3[$], cur[$], nxt[$], saved[$], h;
    rnd_fill(img, IH * IH * IC, 0, 127);
    ref_conv(img, IH, IH, IC, Ws, Ss, Bs, SC_, K, 2, 1'b1, a);
    ref_conv(a, 8, 8, SC_, We, Se, Be, CE, 1, 1, 1'b1, e1);
    ref_dw(e1, 8, 8, CE, Wd, Sd, Bd, K, 1, 1'b1, e2);
    ref_conv(e2, 8, 8, CE, Wp, Sp, Bp, SC_, 1, 1, 1'b1, e3);
    b = {};
    for (int p = 0; p < 64; p++) begin
      for (int c = 0; c < SC_; c++) b.push_back(sat8(e3[p * SC_ + c] + a[p * SC_ + c]));
    end
    ref_conv(b, 8, 8, SC_, Wt, St, Bt, CE, 1, 1, 1'b1, cur);
    h = 8;
    for (int l = 0; l < NL; l++) begin
      if (lsave[l]) saved = cur;
      if (kind[l] == 0) ref_conv(cur, h, h, lcin[l], Wl[l], Sl[l], Bl[l], lcout[l], 1, 1, lrelu[l][0], nxt);
      else              ref_dw(cur, h, h, lcin[l], Wl[l], Sl[l], Bl[l], K, ls[l], lrelu[l][0], nxt);
      if (kind[l] == 1) h = out_dim(h, K, ls[l]);
      if (ladd[l]) foreach (nxt[i]) nxt[i] = sat8(nxt[i] + saved[i]);
      cur = nxt;
    end
    expq[sent_frames] = cur;
  endtask

  int got_frames = 0;
  initial begin
    int img[$], sent, got, t0;
    iv = 0; orr = 0; id = '0; wt_we = 0; bn_we = 0; wt_eng = 0; bn_eng = 0; wt_row = 0;
    wt_col = 0; bn_row = 0; wt_data = 0; bn_data = '0;
    ltab_we = 0; ltab_idx = 0; ltab_kind = LAYER_PW; ltab_cin = 0; ltab_cout = 0; ltab_h = 0;
    ltab_w = 0; ltab_stride = 1; ltab_relu = 0; cfg_layers = NL; ltab_save = 0; ltab_add = 0;
    // random parameters
    for (int co = 0; co < SC_; co++) begin
      for (int k = 0; k < K*K*IC; k++) Ws.push_back(rnd(-10, 10));
      Ss.push_back(rnd(1, 4)); Bs.push_back(rnd(-2000, 2000));
    end
    for (int co = 0; co < CE; co++) begin
      for (int ci = 0; ci < SC_; ci++) We.push_back(rnd(-16, 16));
      Se.push_back(rnd(1, 8)); Be.push_back(rnd(-2000, 4000));
      for (int t = 0; t < K*K; t++) Wd.push_back(rnd(-16, 16));
      Sd.push_back(rnd(1, 8)); Bd.push_back(rnd(-2000, 4000));
    end
    for (int co = 0; co < SC_; co++) begin
      for (int ci = 0; ci < CE; ci++) Wp.push_back(rnd(-12, 12));
      Sp.push_back(rnd(1, 6)); Bp.push_back(rnd(-4000, 4000));
    end
    for (int co = 0; co < CE; co++) begin
      for (int ci = 0; ci < SC_; ci++) Wt.push_back(rnd(-16, 16));
      St.push_back(rnd(1, 8)); Bt.push_back(rnd(-2000, 4000));
    end
    for (int l = 0; l < NL; l++) begin
      int nw;
      nw = kind[l] ? lcout[l] * K * K : lcout[l] * lcin[l];
      for (int i = 0; i < nw; i++) Wl[l].push_back(rnd(-12, 12));
      for (int i = 0; i < lcout[l]; i++) begin Sl[l].push_back(rnd(1, 6)); Bl[l].push_back(rnd(-3000, 3000)); end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // dedicated engines: weights once
    for (int co = 0; co < SC_; co++) begin
      for (int k = 0; k < K*K*IC; k++) wr(0, co, k, Ws[co*K*K*IC+k]);
      wbn(0, co, Ss[co], Bs[co]);
    end
    for (int co = 0; co < CE; co++) begin
      for (int ci = 0; ci < SC_; ci++) wr(1, co, ci, We[co*SC_+ci]);
      wbn(1, co, Se[co], Be[co]);
      for (int t = 0; t < K*K; t++) wr(2, co, t, Wd[co*K*K+t]);
      wbn(2, co, Sd[co], Bd[co]);
    end
    for (int co = 0; co < SC_; co++) begin
      for (int ci = 0; ci < CE; ci++) wr(3, co, ci, Wp[co*CE+ci]);
      wbn(3, co, Sp[co], Bp[co]);
    end
    for (int co = 0; co < CE; co++) begin
      for (int ci = 0; ci < SC_; ci++) wr(4, co, ci, Wt[co*SC_+ci]);
      wbn(4, co, St[co], Bt[co]);
    end
    for (int l = 0; l < NL; l++) begin
      ltab_we = 1; ltab_idx = 3'(l); ltab_kind = layer_kind_e'(kind[l][0]);
      ltab_cin = 8'(lcin[l]); ltab_cout = 8'(lcout[l]); ltab_h = 8'(lh[l]); ltab_w = 8'(lh[l]);
      ltab_stride = 2'(ls[l]); ltab_relu = lrelu[l][0];
      ltab_save = lsave[l][0]; ltab_add = ladd[l][0];
      @(posedge clk); #1;
    end
    ltab_we = 0;
    t0 = cyc;
    fork
      begin : source
        for (int f = 0; f < NFRAMES; f++) begin
          make_frame(img);
          sent_frames++;
          sent = 0;
          while (sent < IH * IH) begin
            iv = 1;
            for (int c = 0; c < IC; c++) id[c] = act_t'(img[sent * IC + c]);
            @(negedge clk);
            if (iv && ir) sent++;
            @(posedge clk); #1;
          end
          iv = 0;
        end
      end
      begin : sink
        for (int f = 0; f < NFRAMES; f++) begin
          got = 0;
          while (got < 16) begin
            orr = ($urandom % 2 == 0);
            @(negedge clk);
            if (ov && orr) begin
              for (int c = 0; c < CM; c++) begin
                int e;
                e = (c < SC_) ? expq[f][got * SC_ + c] : 0;
                checks++;
                if (int'(od[c]) != e) begin
                  failures++;
                  $display("frame %0d pix %0d ch %0d got %0d want %0d", f, got, c, int'(od[c]), e);
                end
              end
              checks++;
              if (olast != (got == 15)) begin failures++; $display("out_last wrong"); end
              got++;
            end
            @(posedge clk); #1;
          end
          got_frames++;
        end
      end
    join
    $display("frames %0d in %0d cycles", NFRAMES, cyc - t0);
    $display("mechanisms: weight requests %0d, pw layers %0d, dw layers %0d, residual layers %0d, SESL->SEML stall cycles %0d, shortcut stalls %0d",
             nreq, pw_layers_run, dw_layers_run, add_layers_run, sesl_stalls, skip_stalls);
    checks += 6;
    if (add_layers_run != NFRAMES)       begin failures++; $display("residual layer count wrong"); end
    if (nreq != NFRAMES * NL)            begin failures++; $display("weight requests wrong"); end
    if (pw_layers_run != 3 * NFRAMES)    begin failures++; $display("pw layer count wrong"); end
    if (dw_layers_run != 2 * NFRAMES)    begin failures++; $display("dw layer count wrong"); end
    if (sesl_stalls == 0)                       begin failures++; $display("no back-pressure SESL->SEML"); end
    if (skip_stalls == 0)                begin failures++; $display("shortcut FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
