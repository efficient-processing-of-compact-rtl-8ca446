// firb: Fused Inverted Residual Bottleneck, a dedicated pipeline of three
// engines that computes one inverted residual bottleneck of a compact CNN.
//
// Structure: pointwise expansion (CIN -> CEXP) -> short FIFO -> depthwise
// KxK (CEXP channels, stride STRIDE) -> short FIFO -> pointwise projection
// (CEXP -> COUT) -> optional residual add of the block input. The engines
// pass single pixels to each other through FIFOs of FIFO_DEPTH entries, so
// the expanded feature map is never stored; only the depthwise line buffer
// (K+1 rows) and the shortcut FIFO hold data. This replaces the double
// buffers that a conventional layer pipeline places between every pair of
// engines, which is the point of the fused module.
//
// Residual: when RESIDUAL is set (it needs STRIDE == 1 and CIN == COUT) each
// input pixel is also pushed into a shortcut FIFO of SKIP_DEPTH entries and
// added, with saturation, to the projected pixel of the same position.
//
// Replication: the expansion engine, its link FIFO and the depthwise engine
// exist REP times, each copy working on CEXP/REP of the expanded channels,
// so the copies run side by side on the same pixel; the projection engine
// joins their outputs (it takes a pixel once every copy has one). Weight
// rows are global channel numbers; row / (CEXP/REP) picks the copy.
//
// Interface: valid/ready pixel streams in raster order, one frame after the
// other. Weight/BN write ports select one of the three engines with wt_eng
// (0 expansion, 1 depthwise, 2 projection); wt_row is the output channel (or
// depthwise channel), wt_col the input channel (or depthwise tap).
// Timing: the pipeline's pixel rate is set by its slowest engine.
// The engine order, the ReLU after every engine, the buffer placement and
// the stacked copies of the expansion and depthwise engines, each with its
// own small FIFO, follow the drawings of the fused module. That each copy
// owns a slice of the channels, the copy count, FIFO depths, lane counts
// and the port layout are this design's own choices.
module firb
  import fibha_pkg::*;
#(
  parameter int unsigned CIN          = 8,
  parameter int unsigned CEXP         = 16,
  parameter int unsigned COUT         = 8,
  parameter int unsigned H            = 8,
  parameter int unsigned W            = 8,
  parameter int unsigned K            = 3,
  parameter int unsigned STRIDE       = 1,
  parameter bit          RESIDUAL     = 1'b1,
  parameter bit          PROJ_RELU    = 1'b1,
  parameter int unsigned PW_PAR_IN    = 4,
  parameter int unsigned PW_PAR_OUT   = 2,
  parameter int unsigned DW_PAR       = 2,
  parameter int unsigned REP          = 2,
  parameter int unsigned FIFO_DEPTH   = 2,
  parameter int unsigned SKIP_DEPTH   = 2 * W + 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wt_we,
  input  logic [1:0]           wt_eng,
  input  logic [7:0]           wt_row,
  input  logic [7:0]           wt_col,
  input  act_t                 wt_data,
  input  logic                 bn_we,
  input  logic [1:0]           bn_eng,
  input  logic [7:0]           bn_row,
  input  bn_t                  bn_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  act_t [CIN-1:0]       in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output act_t [COUT-1:0]      out_data,
  output logic [31:0]          skip_stalls
);
  localparam bit USE_SKIP = RESIDUAL && (STRIDE == 1) && (CIN == COUT);

  // Expansion and depthwise engines, replicated REP times. Copy r owns the
  // expanded channels r*CE_R .. r*CE_R+CE_R-1: its expansion engine computes
  // only those channels, its link FIFO carries only them, and its depthwise
  // engine (with its own line buffer slice) filters only them. All copies
  // take the same input pixel in the same cycle; the projection engine takes
  // a pixel when every copy has one ready.
  localparam int unsigned CE_R = CEXP / REP;
  localparam int unsigned RW   = (REP > 1) ? $clog2(REP) : 1;
  if (CEXP % REP != 0 || CE_R < 2) begin : g_bad_rep
    $error("firb: REP must divide CEXP into slices of at least 2 channels");
  end

  logic [REP-1:0]  e_in_ready, f2_valid_r, f2_ready_r;
  logic            all_e_ready, f2_valid, f2_ready;
  act_t [CEXP-1:0] f2_data;
  logic [RW-1:0]   wt_sel, bn_sel;
  logic [7:0]      wt_lrow, bn_lrow;

  assign all_e_ready = &e_in_ready;
  assign wt_sel  = RW'(wt_row / 8'(CE_R));
  assign wt_lrow = wt_row % 8'(CE_R);
  assign bn_sel  = RW'(bn_row / 8'(CE_R));
  assign bn_lrow = bn_row % 8'(CE_R);

  for (genvar r = 0; r < REP; r++) begin : g_rep
    logic            e_valid, e_ready, f1_valid, f1_ready, d_valid, d_ready, d_last;
    act_t [CE_R-1:0] e_data, f1_data, d_data, f2_part;
    logic            sel_w, sel_b;
    assign sel_w = (REP == 1) || (int'(wt_sel) == r);
    assign sel_b = (REP == 1) || (int'(bn_sel) == r);

    pw_engine #(.CIN_MAX(CIN), .COUT_MAX(CE_R), .PAR_IN(PW_PAR_IN), .PAR_OUT(PW_PAR_OUT)) u_expand (
      .clk, .rst_n,
      .cfg_cin($clog2(CIN+1)'(CIN)), .cfg_cout($clog2(CE_R+1)'(CE_R)), .cfg_relu(1'b1),
      .wt_we(wt_we && wt_eng == 2'd0 && sel_w), .wt_co($clog2(CE_R)'(wt_lrow)),
      .wt_ci($clog2(CIN)'(wt_col)), .wt_data,
      .bn_we(bn_we && bn_eng == 2'd0 && sel_b), .bn_co($clog2(CE_R)'(bn_lrow)), .bn_data,
      .in_valid(in_valid && in_ready), .in_ready(e_in_ready[r]), .in_data,
      .out_valid(e_valid), .out_ready(e_ready), .out_data(e_data)
    );

    stream_fifo #(.WIDTH(CE_R*DW_BITS), .DEPTH(FIFO_DEPTH)) u_fifo1 (
      .clk, .rst_n, .in_valid(e_valid), .in_ready(e_ready), .in_data(e_data),
      .out_valid(f1_valid), .out_ready(f1_ready), .out_data(f1_data)
    );

    dw_engine #(.C_MAX(CE_R), .W_MAX(W), .H_MAX(H), .K(K), .PAR(DW_PAR)) u_dw (
      .clk, .rst_n,
      .cfg_h($clog2(H+1)'(H)), .cfg_w($clog2(W+1)'(W)), .cfg_stride(2'(STRIDE)),
      .cfg_c($clog2(CE_R+1)'(CE_R)), .cfg_relu(1'b1),
      .wt_we(wt_we && wt_eng == 2'd1 && sel_w), .wt_ch($clog2(CE_R)'(wt_lrow)),
      .wt_tap($clog2(K*K)'(wt_col)), .wt_data,
      .bn_we(bn_we && bn_eng == 2'd1 && sel_b), .bn_ch($clog2(CE_R)'(bn_lrow)), .bn_data,
      .in_valid(f1_valid), .in_ready(f1_ready), .in_data(f1_data),
      .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data), .out_last(d_last)
    );

    stream_fifo #(.WIDTH(CE_R*DW_BITS), .DEPTH(FIFO_DEPTH)) u_fifo2 (
      .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
      .out_valid(f2_valid_r[r]), .out_ready(f2_ready_r[r]), .out_data(f2_part)
    );

    assign f2_ready_r[r] = f2_ready && f2_valid;
    for (genvar c = 0; c < CE_R; c++) begin : g_ch
      assign f2_data[r*CE_R+c] = f2_part[c];
    end

    logic unused_last;
    assign unused_last = d_last;
  end

  assign f2_valid = &f2_valid_r;

  // projection
  logic            p_valid, p_ready;
  act_t [COUT-1:0] p_data;
  pw_engine #(.CIN_MAX(CEXP), .COUT_MAX(COUT), .PAR_IN(PW_PAR_IN), .PAR_OUT(PW_PAR_OUT)) u_project (
    .clk, .rst_n,
    .cfg_cin($clog2(CEXP+1)'(CEXP)), .cfg_cout($clog2(COUT+1)'(COUT)), .cfg_relu(PROJ_RELU),
    .wt_we(wt_we && wt_eng == 2'd2), .wt_co($clog2(COUT)'(wt_row)), .wt_ci($clog2(CEXP)'(wt_col)),
    .wt_data,
    .bn_we(bn_we && bn_eng == 2'd2), .bn_co($clog2(COUT)'(bn_row)), .bn_data,
    .in_valid(f2_valid), .in_ready(f2_ready), .in_data(f2_data),
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data)
  );

  if (USE_SKIP) begin : g_skip
    logic           s_in_ready, s_valid;
    act_t [CIN-1:0] s_data;
    stream_fifo #(.WIDTH(CIN*DW_BITS), .DEPTH(SKIP_DEPTH)) u_skip (
      .clk, .rst_n, .in_valid(in_valid && in_ready), .in_ready(s_in_ready), .in_data(in_data),
      .out_valid(s_valid), .out_ready(out_valid && out_ready), .out_data(s_data)
    );
    assign in_ready  = all_e_ready && s_in_ready;
    assign out_valid = p_valid && s_valid;
    assign p_ready   = out_ready && s_valid;
    always_comb
      for (int c = 0; c < COUT; c++)
        out_data[c] = sat8(48'(p_data[c]) + 48'(s_data[c]));
    // count cycles in which the shortcut path holds the input back
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)                               skip_stalls <= '0;
      else if (in_valid && all_e_ready && !s_in_ready) skip_stalls <= skip_stalls + 1;
  end else begin : g_noskip
    assign in_ready    = all_e_ready;
    assign out_valid   = p_valid;
    assign p_ready     = out_ready;
    assign out_data    = p_data;
    assign skip_stalls = '0;
  end
endmodule
