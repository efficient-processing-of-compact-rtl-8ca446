// window_gen: sliding-window line buffer for KxK convolutions.
//
// Pixels (all channels of one position) arrive in raster order. They are kept
// in a circular buffer of NB = K+1 image rows, so the buffer never holds a
// whole feature map, only the rows the current window row still needs plus
// one row being filled. For output position (r,c) the window covers input rows
// r*S-P .. r*S-P+K-1 and columns c*S-P .. c*S-P+K-1 with P = K/2 ("same"
// zero padding); taps outside the image read as zero. A window is issued as
// soon as its last input pixel has arrived, and an input pixel is accepted
// only while its row slot is no longer needed, which gives natural
// back-pressure in both directions.
//
// Height, width and stride (1 or 2) are runtime inputs bounded by H_MAX and
// W_MAX, so the block serves both dedicated engines and the reusable engine.
// After the last window of a frame has been taken and the last pixel has been
// read, the block starts over with the next frame. A height or width of 0
// means "not configured": nothing is accepted or issued.
//
// Interface: valid/ready in and out; out_win is indexed [i*K+j][channel].
// Timing: one window per cycle once available; the first window of a frame
// follows the input pixel (P, P) (or the end of a short frame) by one cycle.
// The buffer organisation is this design's own choice; the description only
// shows that the depthwise engine needs KxK windows of its input.
module window_gen
  import fibha_pkg::*;
#(
  parameter int unsigned C_MAX = 16,
  parameter int unsigned W_MAX = 16,
  parameter int unsigned H_MAX = 16,
  parameter int unsigned K     = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(H_MAX+1)-1:0]   cfg_h,
  input  logic [$clog2(W_MAX+1)-1:0]   cfg_w,
  input  logic [1:0]                   cfg_stride,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  act_t [C_MAX-1:0]             in_data,
  output logic                         out_valid,
  input  logic                         out_ready,
  output act_t [K*K-1:0][C_MAX-1:0]    out_win,
  output logic                         out_last
);
  localparam int NB = K + 1;
  localparam int P  = K / 2;
  localparam int RW = $clog2(H_MAX + 1);
  localparam int CW = $clog2(W_MAX + 1);

  act_t [C_MAX-1:0] rows [NB][W_MAX];

  logic [RW-1:0] in_r, out_r;
  logic [CW-1:0] in_c, out_c;
  logic          in_done, out_done;
  int            ho, wo, s;

  always_comb begin
    s  = (cfg_stride == 2'd2) ? 2 : 1;
    ho = (int'(cfg_h) + 2 * P - K) / s + 1;
    wo = (int'(cfg_w) + 2 * P - K) / s + 1;
  end

  // availability of the window for (out_r, out_c)
  logic win_avail, slot_free;
  always_comb begin
    int rr, cc;
    rr = int'(out_r) * s - P + K - 1;
    cc = int'(out_c) * s - P + K - 1;
    if (rr > int'(cfg_h) - 1) rr = int'(cfg_h) - 1;
    if (cc > int'(cfg_w) - 1) cc = int'(cfg_w) - 1;
    // an empty frame (height or width 0, e.g. before the engine is
    // configured) issues no window and takes no pixel
    win_avail = (cfg_h != '0) && (cfg_w != '0) && !out_done &&
                (in_done || int'(in_r) > rr || (int'(in_r) == rr && int'(in_c) > cc));
    slot_free = (cfg_h != '0) && (cfg_w != '0) && !in_done &&
                (int'(in_r) + P < int'(out_r) * s + NB);
  end

  // window assembly with zero padding
  act_t [K*K-1:0][C_MAX-1:0] win;
  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        int r, c;
        r = int'(out_r) * s - P + i;
        c = int'(out_c) * s - P + j;
        if (r >= 0 && r < int'(cfg_h) && c >= 0 && c < int'(cfg_w))
          win[i*K+j] = rows[r % NB][c];
        else
          win[i*K+j] = '0;
      end
    end
  end

  logic take_in, issue;
  assign in_ready = slot_free;
  assign take_in  = in_valid && slot_free;
  assign issue    = win_avail && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (take_in) rows[int'(in_r) % NB][$clog2(W_MAX)'(in_c)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_r      <= '0;
      in_c      <= '0;
      in_done   <= 1'b0;
      out_r     <= '0;
      out_c     <= '0;
      out_done  <= 1'b0;
      out_valid <= 1'b0;
      out_win   <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready && !issue) out_valid <= 1'b0;
      if (in_done && out_done && !(out_valid && !out_ready)) begin
        // frame finished: start over
        in_r     <= '0;
        in_c     <= '0;
        in_done  <= 1'b0;
        out_r    <= '0;
        out_c    <= '0;
        out_done <= 1'b0;
      end else begin
        if (take_in) begin
          if (int'(in_c) == int'(cfg_w) - 1) begin
            in_c <= '0;
            if (int'(in_r) == int'(cfg_h) - 1) in_done <= 1'b1;
            else                               in_r <= in_r + 1'b1;
          end else begin
            in_c <= in_c + 1'b1;
          end
        end
        if (issue) begin
          out_valid <= 1'b1;
          out_win   <= win;
          out_last  <= (int'(out_r) == ho - 1) && (int'(out_c) == wo - 1);
          if (int'(out_c) == wo - 1) begin
            out_c <= '0;
            if (int'(out_r) == ho - 1) out_done <= 1'b1;
            else                       out_r <= out_r + 1'b1;
          end else begin
            out_c <= out_c + 1'b1;
          end
        end
      end
    end
  end
endmodule
