// tb_avgpool: self-checking test of global average pooling. Forward: an 8x8
// map (log2n = 6) is averaged and compared with the rounded integer mean, with
// the result one cycle after the last pixel. Backward: an error is spread to
// 64 pixels of err/64 each, and the count of output pixels and the last flag
// are checked.
`timescale 1ns/1ps
module tb_avgpool;
  import repvgg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, bwd, in_valid, out_valid, out_last;
  logic [3:0] log2n;
  vec_t err, in_data, out_data;
  avgpool dut (.*);
  int checks = 0, failures = 0;

  initial begin
    int sum [CH_T];
    int n;
    start = 0; bwd = 0; in_valid = 0; log2n = 6; err = '0; in_data = '0;
    for (int c = 0; c < CH_T; c++) sum[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    for (int p = 0; p < 64; p++) begin
      in_valid = 1;
      for (int c = 0; c < CH_T; c++) begin
        in_data[c] = data_t'(int'($urandom_range(0, 4095)) - 2048);
        sum[c] += int'(in_data[c]);
      end
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (!out_valid || !out_last) begin failures++; $display("FAIL forward result not ready"); end
    for (int c = 0; c < CH_T; c++) begin
      checks++;
      if (int'(out_data[c]) != ((sum[c] + 32) >>> 6)) begin
        failures++; $display("FAIL fwd ch%0d got %0d exp %0d", c, out_data[c], (sum[c] + 32) >>> 6);
      end
    end
    // backward
    for (int c = 0; c < CH_T; c++) err[c] = data_t'(64 * (c - 3) + 5);
    bwd = 1; start = 1; @(negedge clk); start = 0; bwd = 0;
    n = 0;
    for (int t = 0; t < 80; t++) begin
      if (out_valid) begin
        n++;
        for (int c = 0; c < CH_T; c++)
          if (int'(out_data[c]) != ((64 * (c - 3) + 5 + 32) >>> 6)) begin
            failures++; $display("FAIL bwd ch%0d got %0d", c, out_data[c]); break;
          end
        checks++;
        if (out_last != (n == 64)) begin failures++; $display("FAIL last flag at %0d", n); end
      end
      @(negedge clk);
    end
    checks++;
    if (n != 64) begin failures++; $display("FAIL bwd produced %0d pixels", n); end
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
