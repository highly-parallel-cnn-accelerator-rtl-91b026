// tb_conv_pe_array: self-checking test of the 8 x 8 x 3 x 3 PE array.
// Random windows and kernels, including the extreme values -32768 and 32767,
// are applied back to back; each cycle's eight channel sums are compared, one
// cycle later, with an integer evaluation of sum_ci sum_r sum_c w*x.
`timescale 1ns/1ps
module tb_conv_pe_array;
  import repvgg_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  vec_t [K-1:0][K-1:0] win;
  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] wt;
  avec_t psum;
  conv_pe_array #(.K(K)) dut (.*);
  int checks = 0, failures = 0;

  function automatic data_t rnd(int t);
    int r;
    r = int'($urandom_range(0, 9));
    if (t > 10 && r == 0) return data_t'(-32768);
    if (t > 10 && r == 1) return data_t'(32767);
    return data_t'(int'($urandom_range(0, 4095)) - 2048);
  endfunction

  initial begin
    longint exp_s [CH_T];
    in_valid = 0; win = '0; wt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          for (int i = 0; i < CH_T; i++) win[r][c][i] = rnd(t);
      for (int o = 0; o < CH_T; o++)
        for (int i = 0; i < CH_T; i++)
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++) wt[o][i][r][c] = rnd(t);
      for (int o = 0; o < CH_T; o++) begin
        exp_s[o] = 0;
        for (int i = 0; i < CH_T; i++)
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++) exp_s[o] += longint'(win[r][c][i]) * longint'(wt[o][i][r][c]);
      end
      in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid"); end
      for (int o = 0; o < CH_T; o++)
        if (longint'(psum[o]) != exp_s[o]) begin
          failures++; $display("FAIL t%0d co%0d got %0d exp %0d", t, o, psum[o], exp_s[o]); break;
        end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
