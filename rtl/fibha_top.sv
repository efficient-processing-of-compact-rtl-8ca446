// fibha_top: fixed-budget hybrid CNN accelerator (dedicated + reusable engines).
//
// The first layers of a compact CNN differ strongly from one another, the
// later ones much less. The accelerator therefore splits the network in two:
//   * a dedicated (single-engine-single-layer) part, where each of the first
//     layers has an engine sized for it and the engines run concurrently as a
//     pixel-level pipeline: engine 0 is the standard KxK convolution of the
//     stem, followed by one fused inverted residual bottleneck (firb) whose
//     expansion, depthwise and projection engines form engines 1-3, and a
//     pointwise engine 4 that computes the expansion layer of the next
//     bottleneck (the split between the two parts may fall inside a block);
//   * a reusable (single-engine-multiple-layer) part, seml_part, with one
//     pointwise and one depthwise engine that run all remaining layers one
//     after another from on-chip feature-map buffers.
// The dedicated part streams its output straight into the reusable part's
// input buffer, so the large early feature maps are never stored whole.
//
// Interface: input image pixels (IMG_C channels, raster order) on a
// valid/ready stream; output pixels of the last reusable layer on another.
// Weights and BN parameters are written through one bus whose wt_eng/bn_eng
// field selects the engine: 0 stem convolution, 1 bottleneck expansion,
// 2 bottleneck depthwise, 3 bottleneck projection, 4 dedicated pointwise,
// 5 reusable pointwise, 6 reusable depthwise. wt_row is the output channel (depthwise: channel),
// wt_col the input index (stem: (i*K+j)*IMG_C+c, depthwise: tap i*K+j).
// The reusable part asks for each layer's weights with wreq/wreq_layer and
// continues on wdone; its layer table is written through the ltab_* port.
//
// Activity counters: add_layers_run counts residual adds done by the
// reusable part, skip_stalls counts cycles the bottleneck's shortcut
// FIFO held the input back, sesl_stalls cycles the dedicated pipeline waited
// for the reusable part, pw_/dw_layers_run the layers each reusable engine ran.
//
// Sizes: all defaults are this design's choice (the architecture is
// described without concrete numbers): a 16x16x3 image, an 8-channel stride-2
// stem, a 8->16->8 bottleneck with residual, an 8->16 pointwise engine 4,
// and reusable engines for up to 16 channels and 8x8 maps.
module fibha_top
  import fibha_pkg::*;
#(
  parameter int unsigned IMG_H       = 16,
  parameter int unsigned IMG_W       = 16,
  parameter int unsigned IMG_C       = 3,
  parameter int unsigned K           = 3,
  parameter int unsigned STEM_C      = 8,
  parameter int unsigned STEM_STRIDE = 2,
  parameter int unsigned FIRB_CEXP   = 16,
  parameter int unsigned TAIL_C      = 16,
  parameter int unsigned SEML_C_MAX  = 16,
  parameter int unsigned SEML_L_MAX  = 8,
  parameter int unsigned PW_PAR_IN   = 4,
  parameter int unsigned PW_PAR_OUT  = 2,
  parameter int unsigned DW_PAR      = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // parameter bus
  input  logic                          wt_we,
  input  logic [2:0]                    wt_eng,
  input  logic [7:0]                    wt_row,
  input  logic [7:0]                    wt_col,
  input  act_t                          wt_data,
  input  logic                          bn_we,
  input  logic [2:0]                    bn_eng,
  input  logic [7:0]                    bn_row,
  input  bn_t                           bn_data,
  // reusable-part layer table and weight hand-shake
  input  logic                          ltab_we,
  input  logic [$clog2(SEML_L_MAX)-1:0] ltab_idx,
  input  layer_kind_e                   ltab_kind,
  input  logic [7:0]                    ltab_cin,
  input  logic [7:0]                    ltab_cout,
  input  logic [7:0]                    ltab_h,
  input  logic [7:0]                    ltab_w,
  input  logic [1:0]                    ltab_stride,
  input  logic                          ltab_relu,
  input  logic                          ltab_save,
  input  logic                          ltab_add,
  input  logic [$clog2(SEML_L_MAX+1)-1:0] cfg_layers,
  output logic                          wreq,
  output logic [$clog2(SEML_L_MAX)-1:0] wreq_layer,
  input  logic                          wdone,
  // image in, result out
  input  logic                          in_valid,
  output logic                          in_ready,
  input  act_t [IMG_C-1:0]              in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output act_t [SEML_C_MAX-1:0]         out_data,
  output logic                          out_last,
  // activity counters
  output logic [31:0]                   skip_stalls,
  output logic [31:0]                   sesl_stalls,
  output logic [31:0]                   pw_layers_run,
  output logic [31:0]                   dw_layers_run,
  output logic [31:0]                   add_layers_run
);
  localparam int unsigned FM_H = (IMG_H - 1) / STEM_STRIDE + 1;
  localparam int unsigned FM_W = (IMG_W - 1) / STEM_STRIDE + 1;

  // engine 0: stem convolution
  logic              s_valid, s_ready;
  act_t [STEM_C-1:0] s_data;
  conv_engine #(.CIN(IMG_C), .COUT(STEM_C), .H(IMG_H), .W(IMG_W), .K(K),
                .STRIDE(STEM_STRIDE), .PAR_IN(K*K), .PAR_OUT(PW_PAR_OUT)) u_stem (
    .clk, .rst_n,
    .wt_we(wt_we && wt_eng == 3'd0), .wt_co($clog2(STEM_C)'(wt_row)),
    .wt_ci($clog2(K*K*IMG_C)'(wt_col)), .wt_data,
    .bn_we(bn_we && bn_eng == 3'd0), .bn_co($clog2(STEM_C)'(bn_row)), .bn_data,
    .in_valid, .in_ready, .in_data,
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  // engines 1-3: fused inverted residual bottleneck
  logic              b_valid, b_ready;
  act_t [STEM_C-1:0] b_data;
  firb #(.CIN(STEM_C), .CEXP(FIRB_CEXP), .COUT(STEM_C), .H(FM_H), .W(FM_W), .K(K),
         .STRIDE(1), .RESIDUAL(1'b1), .PW_PAR_IN(PW_PAR_IN), .PW_PAR_OUT(PW_PAR_OUT),
         .DW_PAR(DW_PAR)) u_firb (
    .clk, .rst_n,
    .wt_we(wt_we && wt_eng inside {3'd1, 3'd2, 3'd3}), .wt_eng(2'(wt_eng - 3'd1)),
    .wt_row, .wt_col, .wt_data,
    .bn_we(bn_we && bn_eng inside {3'd1, 3'd2, 3'd3}), .bn_eng(2'(bn_eng - 3'd1)),
    .bn_row, .bn_data,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data),
    .skip_stalls
  );

  // engine 4: dedicated pointwise engine at the end of the dedicated part
  logic              t_valid, t_ready;
  act_t [TAIL_C-1:0] t_data;
  pw_engine #(.CIN_MAX(STEM_C), .COUT_MAX(TAIL_C), .PAR_IN(PW_PAR_IN), .PAR_OUT(PW_PAR_OUT)) u_tail (
    .clk, .rst_n,
    .cfg_cin($clog2(STEM_C+1)'(STEM_C)), .cfg_cout($clog2(TAIL_C+1)'(TAIL_C)), .cfg_relu(1'b1),
    .wt_we(wt_we && wt_eng == 3'd4), .wt_co($clog2(TAIL_C)'(wt_row)), .wt_ci($clog2(STEM_C)'(wt_col)),
    .wt_data,
    .bn_we(bn_we && bn_eng == 3'd4), .bn_co($clog2(TAIL_C)'(bn_row)), .bn_data,
    .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data)
  );

  // cycles in which the dedicated pipeline waits for the reusable part
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                   sesl_stalls <= '0;
    else if (t_valid && !t_ready) sesl_stalls <= sesl_stalls + 1;

  // reusable engines
  act_t [SEML_C_MAX-1:0] t_wide;
  always_comb begin
    t_wide = '0;
    for (int c = 0; c < TAIL_C && c < SEML_C_MAX; c++) t_wide[c] = t_data[c];
  end

  seml_part #(.C_MAX(SEML_C_MAX), .H_MAX(FM_H), .W_MAX(FM_W), .K(K), .L_MAX(SEML_L_MAX),
              .PW_PAR_IN(PW_PAR_IN), .PW_PAR_OUT(PW_PAR_OUT), .DW_PAR(DW_PAR)) u_seml (
    .clk, .rst_n,
    .ltab_we, .ltab_idx, .ltab_kind, .ltab_cin, .ltab_cout, .ltab_h, .ltab_w,
    .ltab_stride, .ltab_relu, .ltab_save, .ltab_add, .cfg_layers,
    .wreq, .wreq_layer, .wdone,
    .wt_we(wt_we && wt_eng inside {3'd5, 3'd6}), .wt_dw(wt_eng == 3'd6),
    .wt_row, .wt_col, .wt_data,
    .bn_we(bn_we && bn_eng inside {3'd5, 3'd6}), .bn_dw(bn_eng == 3'd6),
    .bn_row, .bn_data,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_wide),
    .out_valid, .out_ready, .out_data, .out_last,
    .pw_layers_run, .dw_layers_run, .add_layers_run
  );
endmodule
