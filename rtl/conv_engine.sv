// conv_engine: standard KxK convolution engine (the first layer of the CNN).
//
// A window_gen produces KxK windows of the CIN-channel input; the window is
// flattened into a K*K*CIN vector (index (i*K+j)*CIN + c) and handed to a
// pw_engine, which then performs the full KxK x CIN dot product per output
// channel with its multiplier lanes, accumulator, BN and ReLU. The shape is
// fixed by parameters because this engine is dedicated to one layer; only
// the stride is chosen by parameter STRIDE. Weight address wt_ci uses the same
// flattened index. Interface: valid/ready pixel streams. Timing per output
// pixel: ceil(K*K*CIN/PAR_IN)*ceil(COUT/PAR_OUT)+2 cycles.
module conv_engine
  import fibha_pkg::*;
#(
  parameter int unsigned CIN     = 3,
  parameter int unsigned COUT    = 8,
  parameter int unsigned H       = 16,
  parameter int unsigned W       = 16,
  parameter int unsigned K       = 3,
  parameter int unsigned STRIDE  = 2,
  parameter int unsigned PAR_IN  = 9,
  parameter int unsigned PAR_OUT = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            wt_we,
  input  logic [$clog2(COUT)-1:0]         wt_co,
  input  logic [$clog2(K*K*CIN)-1:0]      wt_ci,
  input  act_t                            wt_data,
  input  logic                            bn_we,
  input  logic [$clog2(COUT)-1:0]         bn_co,
  input  bn_t                             bn_data,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  act_t [CIN-1:0]                  in_data,
  output logic                            out_valid,
  input  logic                            out_ready,
  output act_t [COUT-1:0]                 out_data
);
  localparam int unsigned NFLAT = K * K * CIN;

  logic                    win_valid, win_ready, win_last;
  act_t [K*K-1:0][CIN-1:0] win;

  window_gen #(.C_MAX(CIN), .W_MAX(W), .H_MAX(H), .K(K)) u_win (
    .clk, .rst_n,
    .cfg_h($clog2(H+1)'(H)), .cfg_w($clog2(W+1)'(W)), .cfg_stride(2'(STRIDE)),
    .in_valid, .in_ready, .in_data,
    .out_valid(win_valid), .out_ready(win_ready), .out_win(win), .out_last(win_last)
  );

  pw_engine #(.CIN_MAX(NFLAT), .COUT_MAX(COUT), .PAR_IN(PAR_IN), .PAR_OUT(PAR_OUT)) u_mac (
    .clk, .rst_n,
    .cfg_cin($clog2(NFLAT+1)'(NFLAT)), .cfg_cout($clog2(COUT+1)'(COUT)), .cfg_relu(1'b1),
    .wt_we, .wt_co, .wt_ci, .wt_data, .bn_we, .bn_co, .bn_data,
    .in_valid(win_valid), .in_ready(win_ready), .in_data(win),
    .out_valid, .out_ready, .out_data
  );

  logic unused_last;
  assign unused_last = win_last;
endmodule
