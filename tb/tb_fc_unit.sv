// tb_fc_unit: self-checking test of the fully connected layer (64 -> 10).
// Loads random weights, biases, input x and output error dy, then checks the
// forward outputs y = W x + b, the backward error dx = W^T dy and every weight
// gradient dW = dy x^T against integer evaluations of the same sums. Checks the
// run times: NOUT * NIN/8 cycles for each command.
`timescale 1ns/1ps
module tb_fc_unit;
  import repvgg_pkg::*;
  localparam int NIN = 64, NOUT = 10, NT = NIN / CH_T;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_wr, b_wr, x_wr, dy_wr, start_fwd, start_bwd, busy, done;
  logic [3:0] w_o, b_o, dy_o, y_idx, g_o;
  logic [2:0] w_tile, x_tile, dx_tile, g_tile;
  vec_t w_data, x_data, dx_data, g_data;
  data_t b_data, dy_data, y_data;
  logic y_valid, dx_valid, g_valid;
  fc_unit #(.NIN(NIN), .NOUT(NOUT)) dut (.*);

  int checks = 0, failures = 0;
  int W [NOUT][NIN];
  int B [NOUT];
  int X [NIN];
  int DY [NOUT];
  int ny, ndx, ng;

  function automatic int rq(longint v);
    longint r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      longint acc;
      acc = longint'(B[y_idx]) * 256;
      for (int i = 0; i < NIN; i++) acc += longint'(W[y_idx][i]) * X[i];
      ny++; checks++;
      if (int'(y_data) != rq(acc)) begin failures++; $display("FAIL y[%0d] %0d vs %0d", y_idx, y_data, rq(acc)); end
    end
    if (dx_valid) begin
      ndx++; checks++;
      for (int c = 0; c < CH_T; c++) begin
        longint acc;
        acc = 0;
        for (int o = 0; o < NOUT; o++) acc += longint'(W[o][dx_tile*CH_T + c]) * DY[o];
        if (int'(dx_data[c]) != rq(acc)) begin
          failures++; $display("FAIL dx[%0d] %0d vs %0d", dx_tile*CH_T + c, dx_data[c], rq(acc)); break;
        end
      end
    end
    if (g_valid) begin
      ng++; checks++;
      for (int c = 0; c < CH_T; c++)
        if (int'(g_data[c]) != rq(longint'(DY[g_o]) * X[g_tile*CH_T + c])) begin
          failures++; $display("FAIL g[%0d][%0d]", g_o, g_tile*CH_T + c); break;
        end
    end
  end

  initial begin
    int cyc;
    w_wr = 0; b_wr = 0; x_wr = 0; dy_wr = 0; start_fwd = 0; start_bwd = 0;
    w_o = 0; b_o = 0; dy_o = 0; w_tile = 0; x_tile = 0; w_data = '0; x_data = '0; b_data = 0; dy_data = 0;
    ny = 0; ndx = 0; ng = 0;
    for (int o = 0; o < NOUT; o++) begin
      B[o] = int'($urandom_range(0, 255)) - 128;
      DY[o] = int'($urandom_range(0, 255)) - 128;
      for (int i = 0; i < NIN; i++) W[o][i] = int'($urandom_range(0, 255)) - 128;
    end
    for (int i = 0; i < NIN; i++) X[i] = int'($urandom_range(0, 1023)) - 512;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < NOUT; o++) begin
      for (int t = 0; t < NT; t++) begin
        w_wr = 1; w_o = 4'(o); w_tile = 3'(t);
        for (int c = 0; c < CH_T; c++) w_data[c] = data_t'(W[o][t*CH_T + c]);
        @(negedge clk);
      end
      w_wr = 0;
      b_wr = 1; b_o = 4'(o); b_data = data_t'(B[o]);
      dy_wr = 1; dy_o = 4'(o); dy_data = data_t'(DY[o]);
      @(negedge clk);
      b_wr = 0; dy_wr = 0;
    end
    for (int t = 0; t < NT; t++) begin
      x_wr = 1; x_tile = 3'(t);
      for (int c = 0; c < CH_T; c++) x_data[c] = data_t'(X[t*CH_T + c]);
      @(negedge clk);
    end
    x_wr = 0;
    start_fwd = 1; @(negedge clk); start_fwd = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NOUT * NT) begin failures++; $display("FAIL fwd cycles %0d", cyc); end
    start_bwd = 1; @(negedge clk); start_bwd = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NOUT * NT) begin failures++; $display("FAIL bwd cycles %0d", cyc); end
    @(negedge clk);
    checks++;
    if (ny != NOUT || ndx != NT || ng != NOUT * NT) begin
      failures++; $display("FAIL counts y=%0d dx=%0d g=%0d", ny, ndx, ng);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
