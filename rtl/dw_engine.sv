// dw_engine: depthwise KxK convolution engine (line buffer + MAC lanes).
//
// A window_gen turns the incoming raster stream of pixels into KxK windows
// (zero padding, stride 1 or 2) and a dw_mac computes each output pixel with
// PAR lanes of KxK multipliers, adder trees, BN and ReLU. Shape (cfg_h,
// cfg_w, cfg_stride, cfg_c) is set at run time so the same engine can be
// dedicated to one layer or reused across layers. Interface: valid/ready
// pixel streams; out_last marks the last pixel of an output frame. Timing:
// ceil(cfg_c/PAR)+2 cycles per output pixel once windows are available.
module dw_engine
  import fibha_pkg::*;
#(
  parameter int unsigned C_MAX = 16,
  parameter int unsigned W_MAX = 16,
  parameter int unsigned H_MAX = 16,
  parameter int unsigned K     = 3,
  parameter int unsigned PAR   = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(H_MAX+1)-1:0]  cfg_h,
  input  logic [$clog2(W_MAX+1)-1:0]  cfg_w,
  input  logic [1:0]                  cfg_stride,
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
  input  act_t [C_MAX-1:0]            in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output act_t [C_MAX-1:0]            out_data,
  output logic                        out_last
);
  logic                      win_valid, win_ready, win_last;
  act_t [K*K-1:0][C_MAX-1:0] win;
  logic                      last_q;

  window_gen #(.C_MAX(C_MAX), .W_MAX(W_MAX), .H_MAX(H_MAX), .K(K)) u_win (
    .clk, .rst_n, .cfg_h, .cfg_w, .cfg_stride,
    .in_valid, .in_ready, .in_data,
    .out_valid(win_valid), .out_ready(win_ready), .out_win(win), .out_last(win_last)
  );

  dw_mac #(.C_MAX(C_MAX), .K(K), .PAR(PAR)) u_mac (
    .clk, .rst_n, .cfg_c, .cfg_relu,
    .wt_we, .wt_ch, .wt_tap, .wt_data, .bn_we, .bn_ch, .bn_data,
    .in_valid(win_valid), .in_ready(win_ready), .in_win(win),
    .out_valid, .out_ready, .out_data
  );

  // carry the end-of-frame flag alongside the pixel inside dw_mac
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= 1'b0;
    else if (win_valid && win_ready) last_q <= win_last;
  end
  assign out_last = last_q;
endmodule
