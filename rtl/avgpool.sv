// avgpool: global average pooling over a map of N = 2**log2n pixels, forward
// and backward, CH_T channels in parallel.
//
// Forward (`bwd` = 0): `start` clears the sums, N pixels on `in_valid` are
// accumulated per channel, and the average (sum / N, rounded, Q8.8) leaves on
// `out_valid` one cycle after the last pixel. Backward (`bwd` = 1): the error
// of the pooled pixel, `err`, sampled at `start`, is spread back as err / N to
// every one of the N pixels, one pixel per cycle on `out_valid`, and
// `out_last` marks the final one.
//
// Forward averaging and backward replacement of one pixel by N pixels that
// carry its average follow the accelerator description; pooling over the whole
// map (the 8x8 map of the last 64-channel layer down to 1x1), the rounding and
// the handshakes are this design's own.
module avgpool
  import repvgg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       bwd,
  input  logic [3:0] log2n,
  input  vec_t       err,
  input  logic       in_valid,
  input  vec_t       in_data,
  output logic       out_valid,
  output logic       out_last,
  output vec_t       out_data
);
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_e;
  state_e state;

  logic [3:0]  c_log2n;
  logic [10:0] cnt;
  acc_t [CH_T-1:0] sum;
  vec_t        spread;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; sum <= '0; spread <= '0; c_log2n <= '0;
      out_valid <= 1'b0; out_last <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          cnt <= '0; sum <= '0; c_log2n <= log2n;
          if (bwd) begin
            state <= S_BWD;
            for (int c = 0; c < CH_T; c++)
              spread[c] <= sat16((48'(err[c]) + (48'sd1 <<< log2n >>> 1)) >>> log2n);
          end else state <= S_FWD;
        end
        S_FWD: if (in_valid) begin
          for (int c = 0; c < CH_T; c++) sum[c] <= sum[c] + ACC_W'(in_data[c]);
          if (cnt == 11'((1 << c_log2n) - 1)) begin
            state     <= S_IDLE;
            out_valid <= 1'b1;
            out_last  <= 1'b1;
            for (int c = 0; c < CH_T; c++)
              out_data[c] <= sat16((48'(sum[c]) + 48'(in_data[c])
                                    + (48'sd1 <<< c_log2n >>> 1)) >>> c_log2n);
          end else cnt <= cnt + 1'b1;
        end
        S_BWD: begin
          out_valid <= 1'b1;
          out_data  <= spread;
          if (cnt == 11'((1 << c_log2n) - 1)) begin
            state    <= S_IDLE;
            out_last <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
