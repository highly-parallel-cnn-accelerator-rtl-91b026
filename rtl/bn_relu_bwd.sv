// bn_relu_bwd: backward pass of the fused BN&ReLU for one tile of CH_T channels
// of a map of N = 2**log2n pixels.
//
// Inputs per pixel are the incoming error dy, the ReLU mask and the normalized
// activation xhat saved by the forward pass. Like the forward unit it makes two
// passes over the pixels:
//   1. `start` latches gamma and inv_std and clears the sums; N pixels on
//      `in_valid` accumulate, with d = mask ? dy : 0,
//        dbeta = sum d,  dgamma = sum d*xhat.
//      `grad_done` pulses after the last pixel; `dgamma`/`dbeta` (Q8.8) then
//      hold the BN parameter gradients used for their weight update. The
//      per-pixel terms dbeta/N and dgamma/N are kept in Q16.16 internally.
//   2. every further pixel gives, one cycle later on `out_valid`,
//        dx = gamma*inv_std*(d - dbeta/N - xhat*dgamma/N).
//
// That BN backward is not an affine map, produces the BN weight and bias
// gradients before the error, and reuses the forward ReLU mask and normalized
// input follows the accelerator description; the two-pass order, rounding and
// handshakes are this design's own.
module bn_relu_bwd
  import repvgg_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [3:0]      log2n,
  input  vec_t            gamma,
  input  vec_t            inv_std,
  input  logic            in_valid,
  input  vec_t            dy,
  input  logic [CH_T-1:0] mask,
  input  vec_t            xhat,
  output logic            grad_done,
  output vec_t            dgamma,
  output vec_t            dbeta,
  output logic            out_valid,
  output vec_t            dx
);
  typedef enum logic [1:0] {S_IDLE, S_SUM, S_ERR} state_e;
  state_e state;

  logic [3:0]      c_log2n;
  vec_t            c_gamma, c_inv;
  logic [10:0]     cnt;
  acc_t [CH_T-1:0] sb, sg;        // Q8.8 and Q16.16 sums
  logic signed [CH_T-1:0][31:0] mb, mg;  // dbeta/N and dgamma/N, Q16.16
  vec_t            d;

  always_comb for (int c = 0; c < CH_T; c++) d[c] = mask[c] ? dy[c] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; sb <= '0; sg <= '0; grad_done <= 1'b0;
      dgamma <= '0; dbeta <= '0; mb <= '0; mg <= '0;
      c_log2n <= '0; c_gamma <= '0; c_inv <= '0;
    end else begin
      grad_done <= 1'b0;
      case (state)
        S_IDLE, S_ERR: if (start) begin
          state <= S_SUM; cnt <= '0; sb <= '0; sg <= '0;
          c_log2n <= log2n; c_gamma <= gamma; c_inv <= inv_std;
        end
        S_SUM: if (in_valid) begin
          for (int c = 0; c < CH_T; c++) begin
            sb[c] <= sb[c] + ACC_W'(d[c]);
            sg[c] <= sg[c] + ACC_W'(d[c] * xhat[c]);
          end
          if (cnt == 11'((1 << c_log2n) - 1)) begin
            state     <= S_ERR;
            grad_done <= 1'b1;
            for (int c = 0; c < CH_T; c++) begin
              acc_t tb, tg;
              tb = sb[c] + ACC_W'(d[c]);
              tg = sg[c] + ACC_W'(d[c] * xhat[c]);
              dbeta[c]  <= sat16(48'(tb));
              dgamma[c] <= requant(48'(tg));
              mb[c]     <= 32'((48'(tb) <<< 8) >>> c_log2n);
              mg[c]     <= 32'(48'(tg) >>> c_log2n);
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; dx <= '0;
    end else begin
      out_valid <= (state == S_ERR) && in_valid && !start;
      if (state == S_ERR && in_valid)
        for (int c = 0; c < CH_T; c++) begin
          logic signed [47:0] core;   // Q16.16
          logic signed [63:0] prod;
          core  = (48'(d[c]) <<< 8) - 48'($signed(mb[c])) - ((48'(xhat[c]) * 48'($signed(mg[c]))) >>> 8);
          prod  = 64'(qmul(c_gamma[c], c_inv[c])) * 64'(core);
          dx[c] <= sat16(48'((prod + 64'sd32768) >>> 16));
        end
    end
  end
endmodule
