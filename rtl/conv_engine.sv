// conv_engine: Conv block for forward Conv and backward deConv of one
// (output-channel tile, input-channel tile) pair, with output-stationary
// accumulation of partial sums over input-channel tiles.
//
// How it works. After `start` the engine walks a virtual, zero-padded frame in
// raster order, one position per cycle, and reads the stored map through a
// one-cycle-latency memory port (`rd_en`/`rd_addr`/`rd_data`, one CH_T-channel
// word per address, address = y*in_w + x). Padding positions, and in deConv
// mode the zeros inserted between error pixels, are produced without a read.
// The stream passes a line_window_buffer and a conv_pe_array; every window
// yields CH_T partial sums that are added into the psum buffer (one ACC_W word
// per channel per output pixel). `first` starts the sums at zero; when `last`
// is set the finished sums are also requantised to Q8.8 and streamed out on
// `out_valid`/`out_addr`/`out_data`. `done` pulses once the last result is out.
//
// Modes (`deconv`):
//  0  forward Conv, stride `stride2` ? 2 : 1, padding (K-1)/2. Unit-stride Conv
//     is computed over the whole map and every other output row and column is
//     dropped for stride 2. Output map (in_h/s) x (in_w/s).
//  1  backward deConv. The error map (in_h x in_w) is dilated by inserting
//     s-1 zeros after each pixel (virtual map (s*in_h) x (s*in_w)), then a
//     unit-stride Conv runs with the kernel rotated by 180 degrees and the
//     channel roles swapped, wt[co][ci] acting as [ci][co]. Output map
//     (s*in_h) x (s*in_w).
//
// Timing: (H+2P)*(W+2P) cycles of streaming, P = (K-1)/2, plus a 4-cycle drain.
//
// The line/window buffers, the CH_T x CH_T x K x K PE array, output-stationary
// dataflow, drop-every-other-output for stride 2 and zero dilation with rotated
// weights for deConv follow the accelerator description. The memory port, the
// psum buffer organisation, the drain and the handshakes are this design's own.
module conv_engine
  import repvgg_pkg::*;
#(
  parameter int K     = 3,
  parameter int H_MAX = 32,
  parameter int W_MAX = 32
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // command
  input  logic                                     start,
  input  logic                                     deconv,
  input  logic                                     stride2,
  input  logic                                     first,
  input  logic                                     last,
  input  logic [6:0]                               in_h,
  input  logic [6:0]                               in_w,
  input  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] wt,     // [co][ci][row][col]
  output logic                                     busy,
  output logic                                     done,
  // input map read port (1-cycle latency)
  output logic                                     rd_en,
  output logic [$clog2(H_MAX*W_MAX)-1:0]           rd_addr,
  input  vec_t                                     rd_data,
  // finished output pixels (when `last`)
  output logic                                     out_valid,
  output logic [$clog2(H_MAX*W_MAX)-1:0]           out_addr,
  output vec_t                                     out_data
);
  localparam int P  = (K - 1) / 2;
  localparam int AW = $clog2(H_MAX*W_MAX);
  localparam int RW = W_MAX + 2*P;
  localparam int CW = $clog2(RW+1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic       c_deconv, c_s2, c_first, c_last;
  logic [6:0] c_in_h, c_in_w;
  logic [7:0] vh, vw;          // virtual (dilated) map size
  logic [7:0] py, px;          // padded stream position
  logic [2:0] drain;

  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] w_eff;
  data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] w_reg;

  assign vh = c_deconv && c_s2 ? {c_in_h, 1'b0} : {1'b0, c_in_h};
  assign vw = c_deconv && c_s2 ? {c_in_w, 1'b0} : {1'b0, c_in_w};

  // effective kernel: deConv rotates by 180 degrees and swaps channel roles
  always_comb begin
    for (int o = 0; o < CH_T; o++)
      for (int i = 0; i < CH_T; i++)
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            w_eff[o][i][r][c] = deconv ? wt[i][o][K-1-r][K-1-c] : wt[o][i][r][c];
  end

  // ---------------------------------------------------------------- reader
  logic signed [8:0] vy, vx;
  logic              in_map, present;
  logic              pend_valid, pend_zero;

  assign vy      = $signed({1'b0, py}) - 9'(P);
  assign vx      = $signed({1'b0, px}) - 9'(P);
  assign in_map  = (vy >= 0) && (vx >= 0) && (vy < $signed({1'b0, vh})) && (vx < $signed({1'b0, vw}));
  assign present = in_map && (!(c_deconv && c_s2) || (!vy[0] && !vx[0]));

  assign rd_en   = (state == S_RUN) && present;
  always_comb begin
    logic [7:0] ry, rx;
    ry = (c_deconv && c_s2) ? 8'(vy[8:1]) : vy[7:0];
    rx = (c_deconv && c_s2) ? 8'(vx[8:1]) : vx[7:0];
    rd_addr = AW'(ry * c_in_w + rx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; py <= '0; px <= '0; drain <= '0; done <= 1'b0;
      pend_valid <= 1'b0; pend_zero <= 1'b0;
      c_deconv <= 1'b0; c_s2 <= 1'b0; c_first <= 1'b0; c_last <= 1'b0;
      c_in_h <= '0; c_in_w <= '0;
    end else begin
      done       <= 1'b0;
      pend_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; py <= '0; px <= '0;
          c_deconv <= deconv; c_s2 <= stride2; c_first <= first; c_last <= last;
          c_in_h <= in_h; c_in_w <= in_w;
        end
        S_RUN: begin
          pend_valid <= 1'b1;
          pend_zero  <= !present;
          if (px == vw + 8'(2*P) - 1'b1) begin
            px <= '0;
            if (py == vh + 8'(2*P) - 1'b1) begin
              state <= S_DRAIN; drain <= '0;
            end else py <= py + 1'b1;
          end else px <= px + 1'b1;
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd3) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) if (start && state == S_IDLE) w_reg <= w_eff;

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------ window and PEs
  vec_t                 pix;
  logic                 win_valid;
  vec_t [K-1:0][K-1:0]  win;
  logic [CW-1:0]        win_row, win_col;
  logic                 pe_valid;
  avec_t                psum;

  assign pix = pend_zero ? '0 : rd_data;

  line_window_buffer #(.K(K), .ROW_W(RW)) u_lwb (
    .clk, .rst_n, .start(start && state == S_IDLE),
    .row_len(CW'(vw + 8'(2*P))), .pix_valid(pend_valid), .pix,
    .win_valid, .win, .win_row, .win_col
  );

  conv_pe_array #(.K(K)) u_pe (
    .clk, .rst_n, .in_valid(win_valid), .win, .wt(w_reg),
    .out_valid(pe_valid), .psum
  );

  // window coordinates follow the PE pipeline by one cycle
  logic [CW-1:0] pe_row, pe_col;
  always_ff @(posedge clk) begin
    pe_row <= win_row;
    pe_col <= win_col;
  end

  // ------------------------------------- output-stationary psum buffer
  avec_t      psum_mem [H_MAX*W_MAX];
  logic       keep;
  logic [7:0] oy, ox, ow;
  logic [AW-1:0] waddr;
  avec_t      acc_new;

  always_comb begin
    logic s2f;
    s2f  = c_s2 && !c_deconv;
    keep = pe_valid && (!s2f || (!pe_row[0] && !pe_col[0]));
    oy   = s2f ? 8'(pe_row >> 1) : 8'(pe_row);
    ox   = s2f ? 8'(pe_col >> 1) : 8'(pe_col);
    ow   = s2f ? (vw >> 1) : vw;
    waddr = AW'(oy * ow + ox);
    for (int c = 0; c < CH_T; c++)
      acc_new[c] = (c_first ? '0 : psum_mem[waddr][c]) + psum[c];
  end

  always_ff @(posedge clk) if (keep) psum_mem[waddr] <= acc_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_addr <= '0; out_data <= '0;
    end else begin
      out_valid <= keep && c_last;
      if (keep) begin
        out_addr <= waddr;
        for (int c = 0; c < CH_T; c++) out_data[c] <= requant(48'(acc_new[c]));
      end
    end
  end
endmodule
