// seml_part: the reusable-engine part of the hybrid accelerator.
//
// One pointwise engine and one depthwise engine are shared by all the layers
// that follow the dedicated pipeline. Because a layer is processed as a whole
// before the next one starts, its output feature map is stored completely in
// on-chip memory: two feature-map buffers (FM_DEPTH pixels of C_MAX channels
// each) are used in ping-pong fashion, one as the source and one as the
// destination of the running layer.
//
// Sequence of one frame:
//   FILL  the incoming stream (output of the dedicated part) is written to
//         buffer 0;
//   WREQ  for each layer the block raises wreq with the layer index and waits
//         for wdone, while an external agent writes that layer's weights and
//         BN parameters into the selected engine (weights are not assumed to
//         fit on chip, so they are brought in per layer);
//   RUN   the source buffer is streamed through the engine named in the layer
//         table and the results are written to the other buffer; the roles
//         of the buffers are then swapped;
//   DRAIN after the last layer the source buffer is streamed out.
//
// Residual bottlenecks: a layer marked "save" (the expansion layer of a
// bottleneck) copies each input pixel into a third buffer, the shortcut
// buffer, as it feeds the engine; a later layer marked "add" (the projection
// layer) adds that buffer, pixel by pixel and with saturation, to its
// results before they are written. The saved map must have the same size as
// the output of the "add" layer (stride 1, equal channel counts).
//
// The layer table (up to L_MAX entries of kind, channels, height, width,
// stride, ReLU and the two residual flags) is written through the ltab_* port; cfg_layers gives the
// number of entries used. Interface: valid/ready pixel streams; the input
// frame has the first layer's height and width. Timing: a PW layer costs
// about h*w*(ceil(cin/PAR_IN)*ceil(cout/PAR_OUT)+2) cycles, a DW layer about
// ho*wo*(ceil(c/DW_PAR)+2) cycles after the line buffer has filled.
// The FSM, the table format and the weight hand-shake are this design's own.
module seml_part
  import fibha_pkg::*;
#(
  parameter int unsigned C_MAX      = 16,
  parameter int unsigned H_MAX      = 8,
  parameter int unsigned W_MAX      = 8,
  parameter int unsigned K          = 3,
  parameter int unsigned L_MAX      = 8,
  parameter int unsigned PW_PAR_IN  = 4,
  parameter int unsigned PW_PAR_OUT = 2,
  parameter int unsigned DW_PAR     = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // layer table
  input  logic                        ltab_we,
  input  logic [$clog2(L_MAX)-1:0]    ltab_idx,
  input  layer_kind_e                 ltab_kind,
  input  logic [7:0]                  ltab_cin,
  input  logic [7:0]                  ltab_cout,
  input  logic [7:0]                  ltab_h,
  input  logic [7:0]                  ltab_w,
  input  logic [1:0]                  ltab_stride,
  input  logic                        ltab_relu,
  input  logic                        ltab_save,
  input  logic                        ltab_add,
  input  logic [$clog2(L_MAX+1)-1:0]  cfg_layers,
  // per-layer weight hand-shake and engine write ports
  output logic                        wreq,
  output logic [$clog2(L_MAX)-1:0]    wreq_layer,
  input  logic                        wdone,
  input  logic                        wt_we,
  input  logic                        wt_dw,
  input  logic [7:0]                  wt_row,
  input  logic [7:0]                  wt_col,
  input  act_t                        wt_data,
  input  logic                        bn_we,
  input  logic                        bn_dw,
  input  logic [7:0]                  bn_row,
  input  bn_t                         bn_data,
  // streams
  input  logic                        in_valid,
  output logic                        in_ready,
  input  act_t [C_MAX-1:0]            in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output act_t [C_MAX-1:0]            out_data,
  output logic                        out_last,
  // activity counters
  output logic [31:0]                 pw_layers_run,
  output logic [31:0]                 dw_layers_run,
  output logic [31:0]                 add_layers_run
);
  localparam int unsigned FM_DEPTH = H_MAX * W_MAX;
  localparam int unsigned AW       = $clog2(FM_DEPTH + 1);
  localparam int unsigned IW       = $clog2(FM_DEPTH);     // buffer index width
  localparam int unsigned CW       = $clog2(C_MAX + 1);
  localparam int unsigned LW       = $clog2(L_MAX);

  typedef struct packed {
    layer_kind_e kind;
    logic [7:0]  cin;
    logic [7:0]  cout;
    logic [7:0]  h;
    logic [7:0]  w;
    logic [1:0]  stride;
    logic        relu;
    logic        save;   // copy this layer's input into the shortcut buffer
    logic        add;    // add the shortcut buffer to this layer's output
  } layer_t;

  typedef enum logic [2:0] {S_FILL, S_WREQ, S_RUN, S_DRAIN} state_e;
  state_e state;

  layer_t ltab [L_MAX];
  always_ff @(posedge clk)
    if (ltab_we) ltab[ltab_idx] <= '{ltab_kind, ltab_cin, ltab_cout, ltab_h, ltab_w,
                                     ltab_stride, ltab_relu, ltab_save, ltab_add};

  act_t [C_MAX-1:0] fm [2][FM_DEPTH];
  act_t [C_MAX-1:0] sc_buf [FM_DEPTH];   // block input kept for the residual add

  logic          src;          // buffer holding the current layer's input
  logic [LW-1:0] lidx;
  logic [AW-1:0] rd_cnt, wr_cnt;
  layer_t        cur;
  int            n_in, n_out, s_cur;

  assign cur = ltab[lidx];
  always_comb begin
    s_cur = (cur.stride == 2'd2) ? 2 : 1;
    n_in  = int'(cur.h) * int'(cur.w);
    if (cur.kind == LAYER_DW)
      n_out = ((int'(cur.h) - 1) / s_cur + 1) * ((int'(cur.w) - 1) / s_cur + 1);
    else
      n_out = n_in;
  end

  // engines
  logic             pw_in_valid, pw_in_ready, pw_out_valid, pw_out_ready;
  logic             dw_in_valid, dw_in_ready, dw_out_valid, dw_out_ready, dw_last;
  act_t [C_MAX-1:0] pw_out, dw_out, src_pix;

  assign src_pix = fm[src][IW'(rd_cnt)];

  pw_engine #(.CIN_MAX(C_MAX), .COUT_MAX(C_MAX), .PAR_IN(PW_PAR_IN), .PAR_OUT(PW_PAR_OUT)) u_pw (
    .clk, .rst_n,
    .cfg_cin(CW'(cur.cin)), .cfg_cout(CW'(cur.cout)), .cfg_relu(cur.relu),
    .wt_we(wt_we && !wt_dw), .wt_co($clog2(C_MAX)'(wt_row)), .wt_ci($clog2(C_MAX)'(wt_col)),
    .wt_data,
    .bn_we(bn_we && !bn_dw), .bn_co($clog2(C_MAX)'(bn_row)), .bn_data,
    .in_valid(pw_in_valid), .in_ready(pw_in_ready), .in_data(src_pix),
    .out_valid(pw_out_valid), .out_ready(pw_out_ready), .out_data(pw_out)
  );

  dw_engine #(.C_MAX(C_MAX), .W_MAX(W_MAX), .H_MAX(H_MAX), .K(K), .PAR(DW_PAR)) u_dw (
    .clk, .rst_n,
    .cfg_h($clog2(H_MAX+1)'(cur.h)), .cfg_w($clog2(W_MAX+1)'(cur.w)), .cfg_stride(cur.stride),
    .cfg_c(CW'(cur.cin)), .cfg_relu(cur.relu),
    .wt_we(wt_we && wt_dw), .wt_ch($clog2(C_MAX)'(wt_row)), .wt_tap($clog2(K*K)'(wt_col)),
    .wt_data,
    .bn_we(bn_we && bn_dw), .bn_ch($clog2(C_MAX)'(bn_row)), .bn_data,
    .in_valid(dw_in_valid), .in_ready(dw_in_ready), .in_data(src_pix),
    .out_valid(dw_out_valid), .out_ready(dw_out_ready), .out_data(dw_out), .out_last(dw_last)
  );

  logic is_dw, rd_more, eng_in_ready, eng_out_valid;
  act_t [C_MAX-1:0] eng_out;
  assign is_dw         = (cur.kind == LAYER_DW);
  assign rd_more       = (state == S_RUN) && (int'(rd_cnt) < n_in);
  assign pw_in_valid   = rd_more && !is_dw;
  assign dw_in_valid   = rd_more && is_dw;
  assign eng_in_ready  = is_dw ? dw_in_ready : pw_in_ready;
  assign eng_out_valid = (state == S_RUN) && (is_dw ? dw_out_valid : pw_out_valid);
  assign eng_out       = is_dw ? dw_out : pw_out;
  assign pw_out_ready  = (state == S_RUN) && !is_dw;
  assign dw_out_ready  = (state == S_RUN) && is_dw;

  logic unused_last;
  assign unused_last = dw_last;

  // residual add of the saved block input (channels below cout only)
  act_t [C_MAX-1:0] res_out;
  always_comb begin
    res_out = eng_out;
    if (cur.add)
      for (int c = 0; c < C_MAX; c++)
        res_out[c] = (c < int'(cur.cout)) ? sat8(48'(eng_out[c]) + 48'(sc_buf[IW'(wr_cnt)][c])) : '0;
  end

  // input, result and output writes into the buffers
  always_ff @(posedge clk) begin
    if (state == S_FILL && in_valid)  fm[0][IW'(wr_cnt)]  <= in_data;
    if (eng_out_valid)                fm[!src][IW'(wr_cnt)] <= res_out;
    if (cur.save && rd_more && eng_in_ready) sc_buf[IW'(rd_cnt)] <= src_pix;
  end

  assign in_ready   = (state == S_FILL);
  assign wreq       = (state == S_WREQ);
  assign wreq_layer = lidx;
  assign out_valid  = (state == S_DRAIN);
  assign out_data   = fm[src][IW'(rd_cnt)];
  assign out_last   = (state == S_DRAIN) && (int'(rd_cnt) == n_out - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_FILL;
      src           <= 1'b0;
      lidx          <= '0;
      rd_cnt        <= '0;
      wr_cnt        <= '0;
      pw_layers_run <= '0;
      dw_layers_run <= '0;
      add_layers_run <= '0;
    end else begin
      unique case (state)
        S_FILL: if (in_valid) begin
          if (int'(wr_cnt) == n_in - 1) begin
            wr_cnt <= '0;
            src    <= 1'b0;
            state  <= S_WREQ;
          end else begin
            wr_cnt <= wr_cnt + 1'b1;
          end
        end
        S_WREQ: if (wdone) begin
          rd_cnt <= '0;
          wr_cnt <= '0;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (rd_more && eng_in_ready) rd_cnt <= rd_cnt + 1'b1;
          if (eng_out_valid) begin
            if (int'(wr_cnt) == n_out - 1) begin
              wr_cnt <= '0;
              rd_cnt <= '0;
              src    <= !src;
              if (is_dw) dw_layers_run <= dw_layers_run + 1;
              else       pw_layers_run <= pw_layers_run + 1;
              if (cur.add) add_layers_run <= add_layers_run + 1;
              if (32'(lidx) + 1 >= 32'(cfg_layers)) begin
                state <= S_DRAIN;
              end else begin
                lidx  <= lidx + 1'b1;
                state <= S_WREQ;
              end
            end else begin
              wr_cnt <= wr_cnt + 1'b1;
            end
          end
        end
        S_DRAIN: if (out_ready) begin
          if (int'(rd_cnt) == n_out - 1) begin
            rd_cnt <= '0;
            lidx   <= '0;
            state  <= S_FILL;
          end else begin
            rd_cnt <= rd_cnt + 1'b1;
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end

  a_fm_fits: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_RUN |-> n_in <= int'(FM_DEPTH));
endmodule
