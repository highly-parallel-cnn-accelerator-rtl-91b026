// bn_relu: fused batch normalization and ReLU (forward) for one tile of CH_T
// channels of a feature map of N = 2**log2n pixels.
//
// Batch 1 training normalizes every channel over the pixels of its own map.
// The unit works in two passes over the same pixels, read twice from a static
// buffer:
//   1. statistics: `start` loads gamma/beta and clears the sums; N pixels on
//      `in_valid` accumulate sum(x) and sum(x^2). Then mean = sum/N,
//      var = sum(x^2)/N - mean^2 and inv_std = 1/sqrt(var + eps) are formed by
//      a sequential unit (24 cycles of bit-serial square root, kept with 16
//      fraction bits so that small deviations stay accurate, and 15 of
//      bit-serial reciprocal, all CH_T lanes side by side). `stat_done` pulses
//      when inv_std is ready, and `mean`/`inv_std` stay valid until the next start.
//   2. apply: each further pixel on `in_valid` gives, one cycle later on
//      `out_valid`, xhat = (x-mean)*inv_std, y = max(0, gamma*xhat + beta) and the
//      ReLU mask (y > 0). xhat and the mask are what the backward path reuses.
// eps = 2^-16 (one LSB of the Q16.16 variance), close to the customary 1e-5.
//
// Fusing BN with ReLU, batch statistics per channel group of 8 and reuse of
// the normalized input in the backward path follow the accelerator
// description. The two-pass structure, the square-root and reciprocal method,
// eps and the handshakes are this design's own.
module bn_relu
  import repvgg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  log2n,
  input  vec_t        gamma,
  input  vec_t        beta,
  input  logic        in_valid,
  input  vec_t        in_data,
  output logic        stat_done,
  output vec_t        mean,
  output vec_t        inv_std,
  output logic        out_valid,
  output vec_t        out_data,
  output vec_t        xhat,
  output logic [CH_T-1:0] mask
);
  typedef enum logic [2:0] {S_IDLE, S_STAT, S_SQRT, S_RECIP, S_APPLY} state_e;
  state_e state;

  logic [3:0]  c_log2n;
  vec_t        c_gamma, c_beta;
  logic [10:0] cnt;
  logic [4:0]  bitn;
  acc_t        [CH_T-1:0] s1, s2;
  logic [CH_T-1:0][31:0] var_q;     // Q16.16, variance + eps
  logic [CH_T-1:0][23:0] sq;       // sqrt, Q8.16
  logic [CH_T-1:0][15:0] rc;       // reciprocal, Q8.8

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; bitn <= '0; stat_done <= 1'b0;
      s1 <= '0; s2 <= '0; var_q <= '0; sq <= '0; rc <= '0; mean <= '0;
      c_log2n <= '0; c_gamma <= '0; c_beta <= '0;
    end else begin
      stat_done <= 1'b0;
      case (state)
        S_IDLE, S_APPLY: if (start) begin
          state <= S_STAT; cnt <= '0; s1 <= '0; s2 <= '0;
          c_log2n <= log2n; c_gamma <= gamma; c_beta <= beta;
        end
        S_STAT: if (in_valid) begin
          for (int c = 0; c < CH_T; c++) begin
            s1[c] <= s1[c] + ACC_W'(in_data[c]);
            s2[c] <= s2[c] + ACC_W'(in_data[c] * in_data[c]);
          end
          if (cnt == 11'((1 << c_log2n) - 1)) begin
            state <= S_SQRT; bitn <= 5'd23;
            for (int c = 0; c < CH_T; c++) begin
              acc_t m, ms, v, t1, t2;
              t1 = s1[c] + ACC_W'(in_data[c]);
              t2 = s2[c] + ACC_W'(in_data[c] * in_data[c]);
              m  = (t1 + (ACC_W'(1 << c_log2n) >>> 1)) >>> c_log2n;  // Q8.8, rounded
              ms = ACC_W'(m * m);                  // Q16.16
              v  = (t2 >>> c_log2n) - ms;          // Q16.16
              if (v < 0) v = '0;
              mean[c]  <= sat16(48'(m));
              var_q[c] <= 32'(v) + 32'd1;
              sq[c]    <= '0;
              rc[c]    <= '0;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_SQRT: begin
          for (int c = 0; c < CH_T; c++) begin
            logic [23:0] tr;
            tr = sq[c] | (24'd1 << bitn);
            if (48'(tr) * 48'(tr) <= {var_q[c], 16'd0}) sq[c] <= tr;
          end
          if (bitn == 0) begin state <= S_RECIP; bitn <= 5'd14; end
          else bitn <= bitn - 1'b1;
        end
        S_RECIP: begin
          // largest rc with rc * sq <= 2^24 (rc Q8.8, sq Q8.16)
          for (int c = 0; c < CH_T; c++) begin
            logic [15:0] tr;
            tr = rc[c] | (16'd1 << bitn);
            if (40'(tr) * 40'(sq[c]) <= 40'h100_0000) rc[c] <= tr;
          end
          if (bitn == 0) begin state <= S_APPLY; stat_done <= 1'b1; end
          else bitn <= bitn - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb for (int c = 0; c < CH_T; c++) inv_std[c] = data_t'(rc[c]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; xhat <= '0; mask <= '0;
    end else begin
      out_valid <= (state == S_APPLY) && in_valid && !start;
      if (state == S_APPLY && in_valid)
        for (int c = 0; c < CH_T; c++) begin
          data_t xh, y;
          xh = qmul(sat16(48'(in_data[c]) - 48'(mean[c])), inv_std[c]);
          y  = sat16(48'(qmul(c_gamma[c], xh)) + 48'(c_beta[c]));
          xhat[c]     <= xh;
          out_data[c] <= (y > 0) ? y : '0;
          mask[c]     <= (y > 0);
        end
    end
  end
endmodule
