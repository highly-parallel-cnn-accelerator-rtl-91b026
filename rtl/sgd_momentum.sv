// sgd_momentum: stochastic gradient descent with momentum, CH_T weights per cycle.
//
//   v' = momentum * v + g
//   w' = w - lr * v'
//
// Weights, velocities and gradients stream in as CH_T-lane words; the updated
// weights and velocities leave one cycle later on `out_valid`, ready to be
// written back (velocities are kept off chip in the accelerator). `lr` and
// `momentum` are Q8.8 (0.05 and 0.9 in the reference training run, which round
// to 13/256 and 230/256).
//
// The momentum update and off-chip velocities follow the accelerator
// description; the rounding, saturation and timing are this design's own.
module sgd_momentum
  import repvgg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t lr,
  input  data_t momentum,
  input  logic  in_valid,
  input  vec_t  w_in,
  input  vec_t  v_in,
  input  vec_t  g_in,
  output logic  out_valid,
  output vec_t  w_out,
  output vec_t  v_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; w_out <= '0; v_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < CH_T; c++) begin
          data_t vn;
          vn = sat16(48'(qmul(momentum, v_in[c])) + 48'(g_in[c]));
          v_out[c] <= vn;
          w_out[c] <= sat16(48'(w_in[c]) - 48'(qmul(lr, vn)));
        end
    end
  end
endmodule
