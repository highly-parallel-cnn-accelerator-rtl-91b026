// conv_pe_array: the processing-element array of a Conv block, CH_T output
// channels x CH_T input channels x K x K multipliers.
//
// Each cycle that `in_valid` is high it multiplies a KxK window of CH_T input
// channels by the KxK kernels of all CH_T x CH_T (output, input) channel pairs
// and sums, per output channel, over the input channels and kernel taps. The
// products keep 2*FRAC_W fraction bits; the CH_T sums leave on `psum` one cycle
// later with `out_valid` (fully pipelined, initiation interval one).
//
// The 8x8x3x3 PE organisation with channel-level parallelism on both input and
// output channels follows the accelerator description; the single register
// stage and the accumulator width are this design's own choices.
module conv_pe_array
  import repvgg_pkg::*;
#(
  parameter int K = 3
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  vec_t [K-1:0][K-1:0]                  win,      // [row][col][ci]
  input  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] wt,   // [co][ci][row][col]
  output logic                                 out_valid,
  output avec_t                                psum      // [co]
);
  avec_t sum_c;

  always_comb begin
    for (int co = 0; co < CH_T; co++) begin
      sum_c[co] = '0;
      for (int ci = 0; ci < CH_T; ci++)
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            sum_c[co] = sum_c[co] + ACC_W'(win[r][c][ci] * wt[co][ci][r][c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      psum      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) psum <= sum_c;
    end
  end
endmodule
