// tb_sgd_momentum: self-checking test of the momentum SGD update with the
// reference run's lr = 0.05 and momentum = 0.9 (Q8.8: 13 and 230). Random
// weights, velocities and gradients; results are compared one cycle later with
// v' = m*v + g, w' = w - lr*v' evaluated in real arithmetic (1-LSB tolerance).
`timescale 1ns/1ps
module tb_sgd_momentum;
  import repvgg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  data_t lr, momentum;
  logic in_valid, out_valid;
  vec_t w_in, v_in, g_in, w_out, v_out;
  sgd_momentum dut (.*);
  int checks = 0, failures = 0;

  initial begin
    real ev [CH_T];
    real ew [CH_T];
    lr = 13; momentum = 230; in_valid = 0; w_in = '0; v_in = '0; g_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      in_valid = 1;
      for (int c = 0; c < CH_T; c++) begin
        w_in[c] = data_t'(int'($urandom_range(0, 1023)) - 512);
        v_in[c] = data_t'(int'($urandom_range(0, 511)) - 256);
        g_in[c] = data_t'(int'($urandom_range(0, 511)) - 256);
        ev[c] = 230.0 / 256 * v_in[c] / 256.0 + g_in[c] / 256.0;
        ew[c] = w_in[c] / 256.0 - 13.0 / 256 * ev[c];
      end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid"); end
      for (int c = 0; c < CH_T; c++)
        if ((v_out[c] / 256.0 - ev[c]) ** 2 > (1.5 / 256) ** 2 ||
            (w_out[c] / 256.0 - ew[c]) ** 2 > (2.5 / 256) ** 2) begin
          failures++;
          $display("FAIL t%0d ch%0d v %f/%f w %f/%f", t, c, v_out[c] / 256.0, ev[c], w_out[c] / 256.0, ew[c]);
          break;
        end
    end
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
