// dw_mac: depthwise multiply-accumulate stage with folded BN and ReLU.
//
// Takes one KxK window of all channels and produces one output pixel. It has
// PAR lanes; each lane holds a KxK grid of multipliers, an adder tree over
// the K*K products, and BN and ReLU, as drawn for the depthwise engine. There
// is no cross-channel sum: lane l computes channel ch_blk*PAR+l from that
// channel's window and that channel's KxK filter. A pixel takes
// ceil(cfg_c/PAR) cycles plus one cycle to accept and one to hand over.
//
// Weights (cfg_c filters of K*K taps) and BN parameters are registers written
// through the wt_*/bn_* ports. cfg_c <= C_MAX is a runtime input; channels at
// or above it read as zero. Interface: valid/ready on both sides, output held
// until taken. Lane count and schedule are this design's own choices.
module dw_mac
  import fibha_pkg::*;
#(
  parameter int unsigned C_MAX = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned PAR   = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(C_MAX+1)-1:0]  cfg_c,
  input  logic                        cfg_relu,
  input  logic                        wt_we,
  input  logic [$clog2(C_MAX)-1:0]    wt_ch,
  input  logic [$clog2(K*K)-1:0]      wt_tap,
  input  act_t                        wt_data,
  input  logic                        bn_we,
  input  logic [$clog2(C_MAX)-1:0]    bn_ch,
  input  bn_t                         bn_data,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  act_t [K*K-1:0][C_MAX-1:0]   in_win,
  output logic                        out_valid,
  input  logic                        out_ready,
  output act_t [C_MAX-1:0]            out_data
);
  localparam int unsigned NB_MAX = (C_MAX + PAR - 1) / PAR;
  localparam int unsigned BW     = $clog2(NB_MAX + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_e;
  state_e state;

  act_t w   [C_MAX][K*K];
  bn_t  bnp [C_MAX];

  act_t [K*K-1:0][C_MAX-1:0] x;
  act_t [C_MAX-1:0]          y;
  logic [BW-1:0]             blk, nblk;

  assign nblk = BW'((32'(cfg_c) + PAR - 1) / PAR);

  always_ff @(posedge clk) begin
    if (wt_we) w[wt_ch][wt_tap] <= wt_data;
    if (bn_we) bnp[bn_ch]       <= bn_data;
  end

  acc_t [K*K-1:0] prod    [PAR];
  acc_t           tree    [PAR];
  act_t           res     [PAR];
  bn_t            lane_bn [PAR];

  for (genvar l = 0; l < PAR; l++) begin : g_lane
    always_comb begin
      int unsigned ch;
      ch = 32'(blk) * PAR + l;
      for (int t = 0; t < K * K; t++) begin
        if (ch < C_MAX) prod[l][t] = acc_t'(x[t][ch]) * acc_t'(w[ch][t]);
        else            prod[l][t] = '0;
      end
      lane_bn[l] = (ch < C_MAX) ? bnp[ch] : '0;
    end
    adder_tree #(.N(K*K)) u_tree (.in(prod[l]), .sum(tree[l]));
    bn_relu u_bn (.acc(tree[l]), .bn(lane_bn[l]), .relu_en(cfg_relu), .y(res[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      blk   <= '0;
      x     <= '0;
      y     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          x     <= in_win;
          y     <= '0;
          blk   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          for (int l = 0; l < PAR; l++) begin
            int unsigned ch;
            ch = 32'(blk) * PAR + l;
            if (ch < 32'(cfg_c) && ch < C_MAX) y[ch] <= res[l];
          end
          if (blk == nblk - 1'b1) state <= S_OUT;
          else                    blk   <= blk + 1'b1;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_data  = y;

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
