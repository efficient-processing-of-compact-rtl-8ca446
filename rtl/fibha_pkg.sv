// fibha_pkg: types and constants shared by the hybrid CNN accelerator.
//
// Feature-map values and weights are signed 8-bit fixed-point numbers,
// products are summed in 32-bit accumulators, and the batch-normalisation
// stage rescales an accumulator with a signed 16-bit multiplier, a 32-bit
// bias and an arithmetic right shift before it is saturated back to 8 bits.
// None of these widths is fixed by the architecture description; they are
// this design's own choice (8-bit inference is the usual FPGA setting).
package fibha_pkg;
  localparam int unsigned DW_BITS  = 8;   // activation / weight width
  localparam int unsigned ACC_BITS = 32;  // accumulator width
  localparam int unsigned SC_BITS  = 16;  // batch-norm scale width
  localparam int unsigned BN_SHIFT = 8;   // batch-norm output shift

  typedef logic signed [DW_BITS-1:0]  act_t;
  typedef logic signed [ACC_BITS-1:0] acc_t;
  typedef logic signed [SC_BITS-1:0]  scale_t;

  // Folded batch normalisation of one output channel: y = (acc*scale + bias) >>> BN_SHIFT
  typedef struct packed {
    scale_t scale;
    acc_t   bias;
  } bn_t;

  // Layer kinds executed by the reusable (SEML) engines
  typedef enum logic [0:0] {
    LAYER_PW = 1'b0,
    LAYER_DW = 1'b1
  } layer_kind_e;

  // Saturate a wide signed value to the activation range
  function automatic act_t sat8(input logic signed [47:0] v);
    if (v > 48'sd127)       return act_t'(8'sd127);
    else if (v < -48'sd128) return act_t'(-8'sd128);
    else                    return act_t'(v[7:0]);
  endfunction
endpackage
