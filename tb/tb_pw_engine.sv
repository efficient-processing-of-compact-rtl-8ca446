// tb_pw_engine: drives random pixels through the pointwise engine for two
// runtime shapes (full 8->16 with ReLU, partial 5->7 without ReLU), with
// random output back-pressure, and compares every output pixel with the
// integer reference. It also checks the latency from input acceptance to
// output valid, which must be ceil(cin/PAR_IN)*ceil(cout/PAR_OUT)+1 cycles.
module tb_pw_engine;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;
  localparam int CIN_MAX = 8, COUT_MAX = 16, PAR_IN = 4, PAR_OUT = 2, NPIX = 24;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [3:0] cfg_cin; logic [4:0] cfg_cout; logic cfg_relu;
  logic wt_we, bn_we; logic [3:0] wt_co, bn_co; logic [2:0] wt_ci; act_t wt_data; bn_t bn_data;
  logic iv, ir, ov, orr;
  act_t [CIN_MAX-1:0] id; act_t [COUT_MAX-1:0] od;

  pw_engine #(.CIN_MAX(CIN_MAX), .COUT_MAX(COUT_MAX), .PAR_IN(PAR_IN), .PAR_OUT(PAR_OUT)) dut (
    .clk, .rst_n, .cfg_cin, .cfg_cout, .cfg_relu, .wt_we, .wt_co, .wt_ci, .wt_data,
    .bn_we, .bn_co, .bn_data, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int W[COUT_MAX][CIN_MAX]; int SC[COUT_MAX]; int BI[COUT_MAX];

  task automatic load_params();
    for (int co = 0; co < COUT_MAX; co++) begin
      for (int ci = 0; ci < CIN_MAX; ci++) begin
        W[co][ci] = rnd(-20, 20);
        wt_we = 1; wt_co = 4'(co); wt_ci = 3'(ci); wt_data = act_t'(W[co][ci]);
        @(posedge clk); #1;
      end
      SC[co] = rnd(1, 12); BI[co] = rnd(-3000, 3000);
      bn_we = 1; bn_co = 4'(co); bn_data.scale = scale_t'(SC[co]); bn_data.bias = BI[co];
      wt_we = 0;
      @(posedge clk); #1;
      bn_we = 0;
    end
  endtask

  task automatic run(int cin, int cout, bit relu, bit bp);
    int in_q[$], ref_q[$], wq[$], sq[$], bq[$];
    int sent, got, t_acc, lat_exp;
    cfg_cin = 4'(cin); cfg_cout = 5'(cout); cfg_relu = relu;
    rnd_fill(in_q, NPIX * cin, -128, 127);
    wq = {}; sq = {}; bq = {};
    for (int co = 0; co < cout; co++) begin
      for (int ci = 0; ci < cin; ci++) wq.push_back(W[co][ci]);
      sq.push_back(SC[co]); bq.push_back(BI[co]);
    end
    ref_conv(in_q, 1, NPIX, cin, wq, sq, bq, cout, 1, 1, relu, ref_q);
    lat_exp = ((cin + PAR_IN - 1) / PAR_IN) * ((cout + PAR_OUT - 1) / PAR_OUT) + 1;
    sent = 0; got = 0; t_acc = 0;
    while (got < NPIX) begin
      iv = (sent < NPIX);
      id = '0;
      for (int c = 0; c < cin; c++) if (sent < NPIX) id[c] = act_t'(in_q[sent * cin + c]);
      for (int c = cin; c < CIN_MAX; c++) id[c] = act_t'($urandom);  // unused channels: noise
      orr = bp ? ($urandom % 3 != 0) : 1'b1;
      @(negedge clk);
      if (ov && orr) begin
        for (int c = 0; c < COUT_MAX; c++) begin
          int e;
          e = (c < cout) ? ref_q[got * cout + c] : 0;
          checks++;
          if (int'(od[c]) != e) begin
            failures++;
            $display("pix %0d ch %0d: got %0d want %0d", got, c, od[c], e);
          end
        end
        got++;
      end
      if (!bp && ov) begin
        checks++;
        if (cyc - t_acc != lat_exp) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - t_acc, lat_exp);
        end
      end
      if (iv && ir) begin sent++; t_acc = cyc; end
      @(posedge clk); #1;
    end
    iv = 0;
  endtask

  initial begin
    iv = 0; orr = 0; wt_we = 0; bn_we = 0; id = '0; wt_co = 0; wt_ci = 0; wt_data = 0;
    bn_co = 0; bn_data = '0; cfg_cin = 8; cfg_cout = 16; cfg_relu = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load_params();
    run(8, 16, 1, 1);
    run(5, 7, 0, 1);
    run(8, 16, 1, 0);
    run(3, 2, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
