// tb_conv_engine: self-checking test of the 3x3 Conv block.
// Runs (1) a forward stride-1 Conv accumulated over two input-channel tiles,
// (2) a forward stride-2 Conv and (3) a stride-2 deConv, and compares every
// output pixel with a direct evaluation of the convolution sums (the deConv
// reference scatters each error pixel through the forward connectivity, so it
// does not share the engine's dilate-and-rotate method). Also checks the cycle
// count of a run: (H+2)*(W+2) streaming cycles plus the drain.
`timescale 1ns/1ps
module tb_conv_engine;
  import repvgg_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, deconv, stride2, first, last, busy, done, rd_en, out_valid;
  logic [6:0] in_h, in_w;
  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] wt;
  logic [9:0] rd_addr, out_addr;
  vec_t rd_data, out_data;

  conv_engine #(.K(K)) dut (.*);

  vec_t mem [1024];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;
  vec_t got [1024];
  logic gotv [1024];
  always_ff @(posedge clk) if (out_valid) begin got[out_addr] <= out_data; gotv[out_addr] <= 1'b1; end

  // data of the runs
  int A0 [CH_T][8][8];
  int A1 [CH_T][8][8];
  int W0 [CH_T][CH_T][3][3];
  int W1 [CH_T][CH_T][3][3];
  longint ref_acc [CH_T][8][8];

  function automatic int rq(longint v);
    longint r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int a_at(int which, int c, int y, int x, int h, int w);
    if (y < 0 || x < 0 || y >= h || x >= w) return 0;
    return which == 0 ? A0[c][y][x] : A1[c][y][x];
  endfunction

  task automatic load_mem(int which, int h, int w);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int c = 0; c < CH_T; c++)
          mem[y*w + x][c] = data_t'(which == 0 ? A0[c][y][x] : A1[c][y][x]);
  endtask

  task automatic set_w(int which);
    for (int o = 0; o < CH_T; o++)
      for (int i = 0; i < CH_T; i++)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            wt[o][i][r][c] = data_t'(which == 0 ? W0[o][i][r][c] : W1[o][i][r][c]);
  endtask

  task automatic run(input logic dc, input logic s2, input logic f, input logic l,
                     input int h, input int w, output int cycles);
    @(negedge clk);
    deconv = dc; stride2 = s2; first = f; last = l; in_h = 7'(h); in_w = 7'(w);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic compare(int oh, int ow, string what);
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++) begin
        checks++;
        if (!gotv[y*ow + x]) begin
          failures++; $display("FAIL %s: no output at (%0d,%0d)", what, y, x);
        end else
          for (int c = 0; c < CH_T; c++)
            if (int'(got[y*ow + x][c]) != rq(ref_acc[c][y][x])) begin
              failures++;
              $display("FAIL %s (%0d,%0d) ch%0d: got %0d exp %0d", what, y, x, c,
                       int'(got[y*ow + x][c]), rq(ref_acc[c][y][x]));
              break;
            end
      end
  endtask

  initial begin
    int cyc;
    start = 0; deconv = 0; stride2 = 0; first = 0; last = 0; in_h = 0; in_w = 0; wt = '0;
    for (int i = 0; i < 1024; i++) begin gotv[i] = 0; mem[i] = '0; end
    for (int c = 0; c < CH_T; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          A0[c][y][x] = int'($urandom_range(0, 1023)) - 512;
          A1[c][y][x] = int'($urandom_range(0, 1023)) - 512;
        end
    for (int o = 0; o < CH_T; o++)
      for (int i = 0; i < CH_T; i++)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            W0[o][i][r][c] = int'($urandom_range(0, 255)) - 128;
            W1[o][i][r][c] = int'($urandom_range(0, 255)) - 128;
          end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- (1) forward, stride 1, two input-channel tiles
    for (int o = 0; o < CH_T; o++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          ref_acc[o][y][x] = 0;
          for (int i = 0; i < CH_T; i++)
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++)
                ref_acc[o][y][x] += longint'(W0[o][i][r][c]) * a_at(0, i, y+r-1, x+c-1, 8, 8)
                                  + longint'(W1[o][i][r][c]) * a_at(1, i, y+r-1, x+c-1, 8, 8);
        end
    load_mem(0, 8, 8); set_w(0);
    run(0, 0, 1, 0, 8, 8, cyc);
    checks++;
    if (cyc != 10*10 + 5) begin failures++; $display("FAIL cycles %0d, expected %0d", cyc, 105); end
    for (int i = 0; i < 1024; i++) gotv[i] = 0;
    @(negedge clk);
    checks++;
    if (gotv[0]) begin failures++; $display("FAIL output before last tile"); end
    load_mem(1, 8, 8); set_w(1);
    run(0, 0, 0, 1, 8, 8, cyc);
    @(negedge clk);
    compare(8, 8, "fwd s1");

    // ---- (2) forward, stride 2, one tile: output 4x4
    for (int i = 0; i < 1024; i++) gotv[i] = 0;
    for (int o = 0; o < CH_T; o++)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          ref_acc[o][y][x] = 0;
          for (int i = 0; i < CH_T; i++)
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++)
                ref_acc[o][y][x] += longint'(W0[o][i][r][c]) * a_at(0, i, 2*y+r-1, 2*x+c-1, 8, 8);
        end
    load_mem(0, 8, 8); set_w(0);
    run(0, 1, 1, 1, 8, 8, cyc);
    @(negedge clk);
    compare(4, 4, "fwd s2");

    // ---- (3) deConv of a stride-2 layer: error 4x4 (A1 top-left used as error),
    //      result 8x8; W0 is the forward kernel [co][ci]
    for (int i = 0; i < 1024; i++) gotv[i] = 0;
    for (int ci = 0; ci < CH_T; ci++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) ref_acc[ci][y][x] = 0;
    for (int co = 0; co < CH_T; co++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int ci = 0; ci < CH_T; ci++)
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++) begin
                int y, x;
                y = 2*i + r - 1; x = 2*j + c - 1;
                if (y >= 0 && x >= 0 && y < 8 && x < 8)
                  ref_acc[ci][y][x] += longint'(W0[co][ci][r][c]) * A1[co][i][j];
              end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int c = 0; c < CH_T; c++) mem[i*4 + j][c] = data_t'(A1[c][i][j]);
    set_w(0);
    run(1, 1, 1, 1, 4, 4, cyc);
    @(negedge clk);
    compare(8, 8, "deconv s2");

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
