// tb_bn_relu_bwd: self-checking test of the backward BN&ReLU unit.
// A 64-pixel tile with random error, normalized activations and ReLU mask is
// fed twice. dgamma/dbeta and the propagated error are compared with a
// real-arithmetic evaluation of the BN backward formulas (tolerance of a few
// Q8.8 LSBs). Also checks that the gradient pass ends one cycle after the last
// pixel and that masked pixels contribute nothing.
`timescale 1ns/1ps
module tb_bn_relu_bwd;
  import repvgg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, grad_done, out_valid;
  logic [3:0] log2n;
  vec_t gamma, inv_std, dy, xhat, dgamma, dbeta, dx;
  logic [CH_T-1:0] mask;

  bn_relu_bwd dut (.*);

  int checks = 0, failures = 0;
  int DY [64][CH_T];
  int XH [64][CH_T];
  bit MK [64][CH_T];
  real rdg [CH_T];
  real rdb [CH_T];

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic drive(int p);
    in_valid = 1;
    for (int c = 0; c < CH_T; c++) begin
      dy[c] = data_t'(DY[p][c]); xhat[c] = data_t'(XH[p][c]); mask[c] = MK[p][c];
    end
  endtask

  initial begin
    int k;
    start = 0; in_valid = 0; dy = '0; xhat = '0; mask = '0; log2n = 6;
    for (int c = 0; c < CH_T; c++) begin
      gamma[c] = data_t'(200 + 10 * c);
      inv_std[c] = data_t'(300 - 20 * c);
    end
    for (int p = 0; p < 64; p++)
      for (int c = 0; c < CH_T; c++) begin
        DY[p][c] = int'($urandom_range(0, 255)) - 128;
        XH[p][c] = int'($urandom_range(0, 511)) - 256;
        MK[p][c] = $urandom_range(0, 1);
      end
    for (int c = 0; c < CH_T; c++) begin
      rdg[c] = 0; rdb[c] = 0;
      for (int p = 0; p < 64; p++)
        if (MK[p][c]) begin
          rdb[c] += DY[p][c] / 256.0;
          rdg[c] += DY[p][c] / 256.0 * XH[p][c] / 256.0;
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < 64; p++) begin drive(p); @(negedge clk); end
    in_valid = 0;
    checks++;
    if (!grad_done) begin failures++; $display("FAIL grad_done not one cycle after last pixel"); end
    for (int c = 0; c < CH_T; c++) begin
      checks += 2;
      if (!near(dbeta[c] / 256.0, rdb[c], 2.0 / 256)) begin
        failures++; $display("FAIL dbeta ch%0d %f vs %f", c, dbeta[c] / 256.0, rdb[c]);
      end
      if (!near(dgamma[c] / 256.0, rdg[c], 2.0 / 256)) begin
        failures++; $display("FAIL dgamma ch%0d %f vs %f", c, dgamma[c] / 256.0, rdg[c]);
      end
    end
    k = 0;
    fork
      for (int p = 0; p < 64; p++) begin drive(p); @(negedge clk); end
      begin
        @(negedge clk);
        for (int p = 0; p < 64; p++) begin
          checks++;
          if (!out_valid) begin failures++; $display("FAIL no output %0d", p); end
          for (int c = 0; c < CH_T; c++) begin
            real d, e;
            d = MK[p][c] ? DY[p][c] / 256.0 : 0.0;
            e = gamma[c] / 256.0 * inv_std[c] / 256.0
              * (d - rdb[c] / 64 - XH[p][c] / 256.0 * rdg[c] / 64);
            if (!near(dx[c] / 256.0, e, 0.02 * (e < 0 ? -e : e) + 5.0 / 256)) begin
              failures++;
              if (k++ < 5) $display("FAIL p%0d ch%0d dx %f vs %f", p, c, dx[c] / 256.0, e);
              break;
            end
          end
          @(negedge clk);
        end
      end
    join
    in_valid = 0;
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
