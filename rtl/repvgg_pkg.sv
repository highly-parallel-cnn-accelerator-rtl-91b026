// repvgg_pkg: shared number format, channel tiling and helper functions of the
// RepVGG-like training accelerator.
//
// All activations, errors, weights and momentum velocities are 16-bit signed
// fixed point. The 16-bit width and the tile of 8 channels processed in parallel
// follow the accelerator description; the split into 8 integer and 8 fraction
// bits (Q8.8), the 40-bit accumulators and round-half-up / saturate on every
// narrowing are this design's own choices.
package repvgg_pkg;

  localparam int DATA_W = 16;   // fixed-point word
  localparam int FRAC_W = 8;    // fraction bits of DATA_W (Q8.8)
  localparam int ACC_W  = 40;   // accumulator width (Q24.16 for sums of products)
  localparam int CH_T   = 8;    // channel parallelism (input and output)

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef data_t [CH_T-1:0]         vec_t;   // one pixel of a channel tile
  typedef acc_t  [CH_T-1:0]         avec_t;  // accumulators of a channel tile

  localparam data_t DATA_MAX = data_t'(16'sh7fff);
  localparam data_t DATA_MIN = data_t'(-16'sh8000);

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return DATA_MAX;
    else if (v < -48'sd32768) return DATA_MIN;
    else                      return data_t'(v[DATA_W-1:0]);
  endfunction

  // Product-domain value (2*FRAC_W fraction bits) back to Q8.8: round half up, saturate.
  function automatic data_t requant(input logic signed [47:0] v);
    logic signed [47:0] r;
    r = (v + 48'sd128) >>> FRAC_W;
    return sat16(r);
  endfunction

  // Q8.8 multiply with rounding and saturation.
  function automatic data_t qmul(input data_t a, input data_t b);
    logic signed [47:0] p;
    p = 48'(a) * 48'(b);
    return requant(p);
  endfunction

  typedef enum logic [1:0] {
    OP_IDLE = 2'd0,
    OP_FWD  = 2'd1,   // forward basic block of one output-channel tile
    OP_BWD  = 2'd2,   // deConv + dilated Conv + weight update of one input-channel tile
    OP_BNB  = 2'd3    // BN&ReLU backward of one output-channel tile
  } op_e;

endpackage
