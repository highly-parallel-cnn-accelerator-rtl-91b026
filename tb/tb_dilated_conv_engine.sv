// tb_dilated_conv_engine: self-checking test of the 3x3 weight-gradient block.
// Computes the gradient of a 3x3 kernel from an 8x8 activation map and (1) an
// 8x8 error (stride 1) and (2) a 4x4 error of a stride-2 layer, comparing all
// 8x8x3x3 gradients with the direct sum G[co][ci][kh][kw] =
// sum_{i,j} E[co][i][j] * A[ci][s*i+kh-1][s*j+kw-1]. Run (3) repeats (1) without
// clearing and expects twice the gradient (accumulation over images). The cycle
// count of a run is checked against regions * ((4+2)^2 + 1 + 9).
`timescale 1ns/1ps
module tb_dilated_conv_engine;
  import repvgg_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, stride2, first, busy, done;
  logic [6:0] a_h, a_w;
  logic a_rd_en, e_rd_en;
  logic [9:0] a_rd_addr, e_rd_addr;
  vec_t a_rd_data, e_rd_data;
  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] grad;

  dilated_conv_engine #(.K(K)) dut (.*);

  vec_t amem [64];
  vec_t emem [64];
  always_ff @(posedge clk) begin
    if (a_rd_en) a_rd_data <= amem[a_rd_addr];
    if (e_rd_en) e_rd_data <= emem[e_rd_addr];
  end

  int checks = 0, failures = 0;
  int A [CH_T][8][8];
  int E [CH_T][8][8];

  function automatic int rq(longint v);
    longint r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic run(input logic s2, input logic f, output int cycles);
    @(negedge clk);
    stride2 = s2; first = f; a_h = 8; a_w = 8; start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic check(int s, int mult, string what);
    int bad;
    bad = 0;
    for (int co = 0; co < CH_T; co++)
      for (int ci = 0; ci < CH_T; ci++)
        for (int kh = 0; kh < 3; kh++)
          for (int kw = 0; kw < 3; kw++) begin
            longint acc;
            acc = 0;
            for (int i = 0; i < 8 / s; i++)
              for (int j = 0; j < 8 / s; j++) begin
                int y, x;
                y = s*i + kh - 1; x = s*j + kw - 1;
                if (y >= 0 && x >= 0 && y < 8 && x < 8)
                  acc += longint'(E[co][i][j]) * A[ci][y][x];
              end
            checks++;
            if (int'(grad[co][ci][kh][kw]) != rq(acc * mult)) begin
              failures++;
              if (bad++ < 5)
                $display("FAIL %s g[%0d][%0d][%0d][%0d] got %0d exp %0d", what, co, ci, kh, kw,
                         int'(grad[co][ci][kh][kw]), rq(acc * mult));
            end
          end
  endtask

  initial begin
    int cyc;
    start = 0; stride2 = 0; first = 0; a_h = 0; a_w = 0;
    for (int c = 0; c < CH_T; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          A[c][y][x] = int'($urandom_range(0, 511)) - 256;
          E[c][y][x] = int'($urandom_range(0, 127)) - 64;
        end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        for (int c = 0; c < CH_T; c++) begin
          amem[y*8 + x][c] = data_t'(A[c][y][x]);
          emem[y*8 + x][c] = data_t'(E[c][y][x]);
        end
    repeat (3) @(negedge clk);
    rst_n = 1;

    run(0, 1, cyc);
    checks++;
    if (cyc != 4 * (36 + 1 + 9) + 1) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, 4 * (36 + 1 + 9) + 1);
    end
    check(1, 1, "stride 1");

    run(0, 0, cyc);
    check(1, 2, "accumulate");

    // stride 2: error is 4x4, stored row-major with width 4
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int c = 0; c < CH_T; c++) emem[i*4 + j][c] = data_t'(E[c][i][j]);
    run(1, 1, cyc);
    check(2, 1, "stride 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
