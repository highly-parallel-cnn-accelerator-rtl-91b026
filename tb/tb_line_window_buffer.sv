// tb_line_window_buffer: self-checking test of the line/window buffers (K = 3).
// Streams two 10-pixel-wide frames of 6 rows (a restart in between, and idle
// cycles inside the stream) and checks every window against the frame
// contents, the window coordinates, and the number of windows
// ((rows-2) * (cols-2) per frame), each one cycle after its last pixel.
`timescale 1ns/1ps
module tb_line_window_buffer;
  import repvgg_pkg::*;
  localparam int K = 3, RW = 34, CW = $clog2(RW + 1);
  localparam int R = 6, C = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, pix_valid, win_valid;
  logic [CW-1:0] row_len, win_row, win_col;
  vec_t pix;
  vec_t [K-1:0][K-1:0] win;
  line_window_buffer #(.K(K), .ROW_W(RW)) dut (.*);

  int checks = 0, failures = 0, nwin = 0;
  int F [R][C][CH_T];

  always @(posedge clk) if (rst_n && win_valid) begin
    int bad;
    bad = 0;
    nwin++; checks++;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        for (int ch = 0; ch < CH_T; ch++)
          if (int'(win[r][c][ch]) != F[int'(win_row) + r][int'(win_col) + c][ch]) bad++;
    if (bad != 0) begin
      failures++;
      $display("FAIL window (%0d,%0d): %0d wrong taps", win_row, win_col, bad);
    end
  end

  initial begin
    start = 0; pix_valid = 0; pix = '0; row_len = CW'(C);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < R; y++)
        for (int x = 0; x < C; x++)
          for (int ch = 0; ch < CH_T; ch++) F[y][x][ch] = int'($urandom_range(0, 60000)) - 30000;
      start = 1; @(negedge clk); start = 0;
      for (int y = 0; y < R; y++)
        for (int x = 0; x < C; x++) begin
          pix_valid = 1;
          for (int ch = 0; ch < CH_T; ch++) pix[ch] = data_t'(F[y][x][ch]);
          @(negedge clk);
          if ((x + y) % 7 == 3) begin pix_valid = 0; @(negedge clk); end
        end
      pix_valid = 0;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (nwin != (f + 1) * (R - 2) * (C - 2)) begin
        failures++; $display("FAIL frame %0d: %0d windows", f, nwin);
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
