// bn_relu: folded batch normalisation followed by ReLU, one output channel.
//
// The engines of the accelerator end every lane with a "BN" and a "ReLU"
// stage behind the adder tree (or accumulator). Here batch normalisation is
// folded into a fixed-point affine map y = (acc*scale + bias) >>> BN_SHIFT,
// ReLU clamps negative results to zero when relu_en is set (clear it for the
// linear projection layer of a bottleneck), and the result is saturated to
// the signed 8-bit activation range. Purely combinational; the fixed-point
// format is this design's own choice.
module bn_relu
  import fibha_pkg::*;
(
  input  acc_t acc,
  input  bn_t  bn,
  input  logic relu_en,
  output act_t y
);
  logic signed [47:0] prod;
  logic signed [47:0] shifted;

  always_comb begin
    prod    = 48'(acc) * 48'(bn.scale) + 48'(bn.bias);
    shifted = prod >>> BN_SHIFT;
    if (relu_en && shifted < 0) y = '0;
    else                        y = sat8(shifted);
  end
endmodule
