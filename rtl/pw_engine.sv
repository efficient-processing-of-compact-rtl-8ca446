// pw_engine: pointwise (1x1) convolution engine with folded BN and ReLU.
//
// The engine takes one pixel (all input channels) per transaction and
// returns the same pixel with all output channels. It has PAR_OUT lanes; each
// lane owns a vector of PAR_IN multipliers, an adder tree and an accumulator
// register, followed by BN and ReLU, as in the pointwise engines of the
// bottleneck pipeline. In each cycle every lane multiplies PAR_IN input
// channels with their weights and adds the tree's sum to its accumulator, so
// an output channel is finished after ceil(cin/PAR_IN) cycles and the whole
// pixel after ceil(cin/PAR_IN)*ceil(cout/PAR_OUT) cycles.
//
// The channel counts are runtime inputs (cfg_cin <= CIN_MAX, cfg_cout <=
// COUT_MAX), so the same module serves as a dedicated per-layer engine (the
// configuration tied to constants) and as the reusable engine that runs many
// layers. Weights and BN parameters live in on-chip registers written through
// the wt_* and bn_* ports; a reusable engine has them rewritten before each
// layer. Output channels at or above cfg_cout read as zero.
//
// Interface: valid/ready on both streams. Timing: the input is accepted in
// state IDLE, the result is offered one cycle after the last MAC cycle and
// held until out_ready; a pixel therefore occupies the engine for
// ceil(cin/PAR_IN)*ceil(cout/PAR_OUT) + 2 cycles when the output is not
// stalled. Lane counts, widths and the sequential schedule are this design's
// own choices; the lane structure (multipliers, adder tree, accumulator, BN,
// ReLU) follows the engine drawings.
module pw_engine
  import fibha_pkg::*;
#(
  parameter int unsigned CIN_MAX  = 8,
  parameter int unsigned COUT_MAX = 16,
  parameter int unsigned PAR_IN   = 4,
  parameter int unsigned PAR_OUT  = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration (hold stable while a pixel is in flight)
  input  logic [$clog2(CIN_MAX+1)-1:0]  cfg_cin,
  input  logic [$clog2(COUT_MAX+1)-1:0] cfg_cout,
  input  logic                          cfg_relu,
  // weight and BN parameter write ports
  input  logic                          wt_we,
  input  logic [$clog2(COUT_MAX)-1:0]   wt_co,
  input  logic [$clog2(CIN_MAX)-1:0]    wt_ci,
  input  act_t                          wt_data,
  input  logic                          bn_we,
  input  logic [$clog2(COUT_MAX)-1:0]   bn_co,
  input  bn_t                           bn_data,
  // input pixel stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  act_t [CIN_MAX-1:0]            in_data,
  // output pixel stream
  output logic                          out_valid,
  input  logic                          out_ready,
  output act_t [COUT_MAX-1:0]           out_data
);
  localparam int unsigned NCI_MAX = (CIN_MAX + PAR_IN - 1) / PAR_IN;
  localparam int unsigned NCO_MAX = (COUT_MAX + PAR_OUT - 1) / PAR_OUT;
  localparam int unsigned CIW = $clog2(NCI_MAX + 1);
  localparam int unsigned COW = $clog2(NCO_MAX + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_e;
  state_e state;

  act_t w   [COUT_MAX][CIN_MAX];
  bn_t  bnp [COUT_MAX];

  act_t [CIN_MAX-1:0]  x;
  act_t [COUT_MAX-1:0] y;
  acc_t                acc [PAR_OUT];
  logic [CIW-1:0]      ci_blk;
  logic [COW-1:0]      co_blk;
  logic [CIW-1:0]      nci;
  logic [COW-1:0]      nco;

  assign nci = CIW'((32'(cfg_cin) + PAR_IN - 1) / PAR_IN);
  assign nco = COW'((32'(cfg_cout) + PAR_OUT - 1) / PAR_OUT);

  always_ff @(posedge clk) begin
    if (wt_we) w[wt_co][wt_ci] <= wt_data;
    if (bn_we) bnp[bn_co]      <= bn_data;
  end

  // MAC lanes
  acc_t [PAR_IN-1:0] prod    [PAR_OUT];
  acc_t              tree    [PAR_OUT];
  acc_t              acc_nxt [PAR_OUT];
  act_t              res     [PAR_OUT];
  bn_t               lane_bn [PAR_OUT];

  for (genvar l = 0; l < PAR_OUT; l++) begin : g_lane
    always_comb begin
      int unsigned co;
      co = 32'(co_blk) * PAR_OUT + l;
      for (int p = 0; p < PAR_IN; p++) begin
        int unsigned ci;
        ci = 32'(ci_blk) * PAR_IN + p;
        if (ci < 32'(cfg_cin) && co < COUT_MAX && ci < CIN_MAX)
          prod[l][p] = acc_t'(x[ci]) * acc_t'(w[co][ci]);
        else
          prod[l][p] = '0;
      end
      lane_bn[l] = (co < COUT_MAX) ? bnp[co] : '0;
    end
    adder_tree #(.N(PAR_IN)) u_tree (.in(prod[l]), .sum(tree[l]));
    assign acc_nxt[l] = acc[l] + tree[l];
    bn_relu u_bn (.acc(acc_nxt[l]), .bn(lane_bn[l]), .relu_en(cfg_relu), .y(res[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ci_blk <= '0;
      co_blk <= '0;
      x      <= '0;
      y      <= '0;
      for (int l = 0; l < PAR_OUT; l++) acc[l] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          x      <= in_data;
          y      <= '0;
          ci_blk <= '0;
          co_blk <= '0;
          for (int l = 0; l < PAR_OUT; l++) acc[l] <= '0;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (ci_blk == nci - 1'b1) begin
            for (int l = 0; l < PAR_OUT; l++) begin
              int unsigned co;
              co = 32'(co_blk) * PAR_OUT + l;
              if (co < 32'(cfg_cout) && co < COUT_MAX) y[co] <= res[l];
              acc[l] <= '0;
            end
            ci_blk <= '0;
            if (co_blk == nco - 1'b1) state <= S_OUT;
            else                      co_blk <= co_blk + 1'b1;
          end else begin
            for (int l = 0; l < PAR_OUT; l++) acc[l] <= acc_nxt[l];
            ci_blk <= ci_blk + 1'b1;
          end
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_data  = y;

  // an accepted output may not change until it is taken
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
