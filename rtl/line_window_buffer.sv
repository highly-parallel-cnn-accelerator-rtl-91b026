// line_window_buffer: local buffering of a channel tile of a feature map for a
// sliding-window convolution, built from K-1 line buffers and a KxK window buffer.
//
// Pixels arrive in raster order, one pixel of CH_T channels per valid cycle,
// over a frame whose row length is `row_len` (the padded width). Each line buffer
// holds one earlier row; the window buffer is a KxK shift register that takes one
// new column (K-1 line-buffer words plus the incoming pixel) per pixel. Once at
// least K rows and K columns have been seen, the window holds the KxK
// neighbourhood whose bottom-right pixel is the one just accepted, and `win_valid`
// rises with the coordinates of the window's top-left corner. `start` clears the
// row and column counters for a new frame. Latency: one cycle from `pix_valid` to
// `win_valid`; throughput one window per pixel (initiation interval one).
//
// Line buffers with a window buffer and 8 parallel channels follow the
// accelerator description; counters, widths and the one-cycle latency are this
// design's own choices. Window index [r][c] is row r, column c of the window.
module line_window_buffer
  import repvgg_pkg::*;
#(
  parameter int K     = 3,     // window size
  parameter int ROW_W = 34     // longest row (32 pixels + 2 padding)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(ROW_W+1)-1:0]    row_len,
  input  logic                          pix_valid,
  input  vec_t                          pix,
  output logic                          win_valid,
  output vec_t [K-1:0][K-1:0]           win,
  output logic [$clog2(ROW_W+1)-1:0]    win_row,
  output logic [$clog2(ROW_W+1)-1:0]    win_col
);
  localparam int CW = $clog2(ROW_W+1);

  vec_t               lines [K > 1 ? K-1 : 1][ROW_W];
  logic [CW-1:0]      col, row;
  vec_t [K-1:0]       new_col;

  // new column: rows from oldest line buffer down to the incoming pixel
  always_comb begin
    for (int r = 0; r < K-1; r++) new_col[r] = lines[r][col];
    new_col[K-1] = pix;
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      for (int r = 0; r < K-2; r++) lines[r][col] <= lines[r+1][col];
      if (K > 1) lines[K > 1 ? K-2 : 0][col] <= pix;
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K-1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= new_col[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; win_valid <= 1'b0; win_row <= '0; win_col <= '0;
    end else if (start) begin
      col <= '0; row <= '0; win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (row >= CW'(K-1)) && (col >= CW'(K-1));
      if (pix_valid) begin
        win_row <= row - CW'(K-1);
        win_col <= col - CW'(K-1);
        if (col == row_len - 1'b1) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
