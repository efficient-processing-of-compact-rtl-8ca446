// stream_fifo: small synchronous FIFO for valid/ready streams.
//
// Used for the short register stages that connect the engines of a fused
// bottleneck (instead of full double buffers) and for the shortcut path of
// the residual add. DEPTH entries of WIDTH bits in a circular array with
// read and write pointers and an occupancy counter. in_ready is high while
// not full; out_valid while not empty; out_data shows the oldest entry.
// A push and a pop may happen in the same cycle. Depths are this design's
// choice.
module stream_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0]        mem [DEPTH];
  logic [AW-1:0]           wp, rp;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);
  logic [CNTW-1:0] cnt;
  logic push, pop;

  assign in_ready  = (32'(cnt) < DEPTH);
  assign out_valid = (cnt != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + CNTW'(push) - CNTW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    32'(cnt) <= DEPTH);
endmodule
