// tb_bn_relu: self-checking test of the forward fused BN&ReLU unit.
// Feeds a 64-pixel map (log2n = 6) twice: statistics, then apply. The expected
// mean, inverse standard deviation and outputs are computed in real arithmetic
// and compared with a tolerance of a few Q8.8 LSBs. Also checks that the
// statistics finish 39 cycles (24 square root + 15 reciprocal steps) after the last pixel
// and that the ReLU mask matches the sign of the pre-activation.
`timescale 1ns/1ps
module tb_bn_relu;
  import repvgg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, stat_done, out_valid;
  logic [3:0] log2n;
  vec_t gamma, beta, in_data, mean, inv_std, out_data, xhat;
  logic [CH_T-1:0] mask;

  bn_relu dut (.*);

  int checks = 0, failures = 0;
  int X [64][CH_T];
  real rmean [CH_T];
  real rinv [CH_T];

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    int cyc, k;
    start = 0; in_valid = 0; in_data = '0; log2n = 6;
    for (int c = 0; c < CH_T; c++) begin
      gamma[c] = data_t'(128 + 32 * c);      // 0.5 .. 1.375
      beta[c]  = data_t'(-64 + 20 * c);
    end
    for (int p = 0; p < 64; p++)
      for (int c = 0; c < CH_T; c++) X[p][c] = int'($urandom_range(0, 1023)) - 512 + 40 * c;
    for (int c = 0; c < CH_T; c++) begin
      real s, ss, m, v;
      s = 0; ss = 0;
      for (int p = 0; p < 64; p++) begin s += X[p][c] / 256.0; ss += (X[p][c] / 256.0) ** 2; end
      m = s / 64; v = ss / 64 - m * m;
      rmean[c] = m; rinv[c] = 1.0 / $sqrt(v + 1.0 / 256 / 256);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < 64; p++) begin
      in_valid = 1;
      for (int c = 0; c < CH_T; c++) in_data[c] = data_t'(X[p][c]);
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!stat_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 39) begin failures++; $display("FAIL stat latency %0d", cyc); end
    for (int c = 0; c < CH_T; c++) begin
      checks += 2;
      if (!near(mean[c] / 256.0, rmean[c], 2.0 / 256)) begin
        failures++; $display("FAIL mean ch%0d %f vs %f", c, mean[c] / 256.0, rmean[c]);
      end
      if (!near(inv_std[c] / 256.0, rinv[c], 0.02 * rinv[c] + 2.0 / 256)) begin
        failures++; $display("FAIL inv_std ch%0d %f vs %f", c, inv_std[c] / 256.0, rinv[c]);
      end
    end
    // apply pass
    k = 0;
    fork
      for (int p = 0; p < 64; p++) begin
        in_valid = 1;
        for (int c = 0; c < CH_T; c++) in_data[c] = data_t'(X[p][c]);
        @(negedge clk);
      end
      begin
        @(negedge clk);
        for (int p = 0; p < 64; p++) begin
          checks++;
          if (!out_valid) begin failures++; $display("FAIL no output %0d", p); end
          for (int c = 0; c < CH_T; c++) begin
            real xh, y;
            xh = (X[p][c] / 256.0 - rmean[c]) * rinv[c];
            y  = gamma[c] / 256.0 * xh + beta[c] / 256.0;
            if (!near(xhat[c] / 256.0, xh, 0.03 * (xh < 0 ? -xh : xh) + 4.0 / 256)
                || !near(out_data[c] / 256.0, (y > 0 ? y : 0.0), 0.03 * (y < 0 ? -y : y) + 5.0 / 256)
                || (y > 0.05 && !mask[c]) || (y < -0.05 && mask[c])) begin
              failures++;
              if (k++ < 5) $display("FAIL p%0d ch%0d xh %f/%f y %f/%f", p, c, xhat[c] / 256.0, xh,
                                    out_data[c] / 256.0, y);
              break;
            end
          end
          @(negedge clk);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
