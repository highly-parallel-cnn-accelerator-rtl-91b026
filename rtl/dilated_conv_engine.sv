// dilated_conv_engine: weight-gradient block (dilated Conv) for one
// (output-channel tile, input-channel tile) pair, using a 4x4 partition of the
// error map that acts as the convolution kernel.
//
// The gradient of a KxK kernel is G[co][ci][kh][kw] = sum_{y,x} D[co][y][x] *
// A[ci][y+kh-P][x+kw-P], P = (K-1)/2, where A is the layer input (a_h x a_w,
// zero outside) and D the output error, dilated with zeros for stride 2
// (D[s*i][s*j] = E[i][j]; E is (a_h/s) x (a_w/s)). The error is as large as the
// feature map, so it is cut into non-overlapping TxT regions (T = 4). For each
// region the engine loads the TxT error region of CH_T channels and the
// (T+K-1)x(T+K-1) activation region of CH_T channels into local window
// registers, one word per cycle from each of two one-cycle-latency read ports,
// then spends K*K cycles sliding the error region over the activation region,
// each cycle adding CH_T x CH_T x T x T products into the gradient
// accumulators of one kernel tap. `first` clears the accumulators; otherwise
// gradients from further images add up (batch accumulation). `grad` holds the
// requantised (Q8.8) gradients and is stable while the engine is idle.
//
// Timing per region: (T+K-1)^2 load cycles + 1 + K*K compute cycles; a full map
// takes (a_h/T)*(a_w/T) regions. a_h and a_w must be multiples of T.
//
// The partition of the error into 4x4 regions, local buffering of the
// partitioned error and of the activations, and channel-parallel, output-
// stationary accumulation follow the accelerator description. Loading a region
// before computing on it, instead of overlapping the two, and the port
// protocol are this design's own simplifications.
module dilated_conv_engine
  import repvgg_pkg::*;
#(
  parameter int K     = 3,
  parameter int T     = 4,
  parameter int H_MAX = 32,
  parameter int W_MAX = 32
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     start,
  input  logic                                     stride2,
  input  logic                                     first,
  input  logic [6:0]                               a_h,
  input  logic [6:0]                               a_w,
  output logic                                     busy,
  output logic                                     done,
  // activation read port (a_h x a_w, address y*a_w + x)
  output logic                                     a_rd_en,
  output logic [$clog2(H_MAX*W_MAX)-1:0]           a_rd_addr,
  input  vec_t                                     a_rd_data,
  // error read port ((a_h/s) x (a_w/s), address i*(a_w/s) + j)
  output logic                                     e_rd_en,
  output logic [$clog2(H_MAX*W_MAX)-1:0]           e_rd_addr,
  input  vec_t                                     e_rd_data,
  output data_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] grad      // [co][ci][row][col]
);
  localparam int P  = (K - 1) / 2;
  localparam int AR = T + K - 1;          // activation region edge
  localparam int NA = AR * AR;
  localparam int AW = $clog2(H_MAX*W_MAX);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP} state_e;
  state_e state;

  logic       c_s2;
  logic [6:0] c_h, c_w;
  logic [6:0] ty, tx;                     // region origin in D coordinates
  logic [$clog2(NA+1)-1:0] n;             // load counter
  logic [$clog2(K*K+1)-1:0] kk;           // compute counter

  vec_t [T-1:0][T-1:0]   e_win;           // [i][j][co]
  vec_t [AR-1:0][AR-1:0] a_win;           // [y][x][ci]
  acc_t [CH_T-1:0][CH_T-1:0][K-1:0][K-1:0] acc;

  // ------------------------------------------------------ load addressing
  logic [6:0]        ly, lx;              // position inside the activation region
  logic signed [8:0] ay, ax;
  logic              a_ok, e_ok;
  logic [6:0]        dy, dx;
  logic              a_pend, e_pend, a_zero, e_zero;
  logic [6:0]        p_ly, p_lx;

  assign ly = 7'(n / AR);
  assign lx = 7'(n % AR);
  assign ay = $signed({2'b0, ty}) + $signed({2'b0, ly}) - 9'(P);
  assign ax = $signed({2'b0, tx}) + $signed({2'b0, lx}) - 9'(P);
  assign a_ok = (ay >= 0) && (ax >= 0) && (ay < $signed({2'b0, c_h})) && (ax < $signed({2'b0, c_w}));
  assign dy = ty + ly;
  assign dx = tx + lx;
  assign e_ok = (ly < 7'(T)) && (lx < 7'(T)) && (!c_s2 || (!dy[0] && !dx[0]));

  assign a_rd_en   = (state == S_LOAD) && (n < NA) && a_ok;
  assign a_rd_addr = AW'(ay[7:0] * c_w + ax[7:0]);
  assign e_rd_en   = (state == S_LOAD) && (n < NA) && e_ok;
  assign e_rd_addr = c_s2 ? AW'((dy >> 1) * (c_w >> 1) + (dx >> 1)) : AW'(dy * c_w + dx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n <= '0; kk <= '0; ty <= '0; tx <= '0; done <= 1'b0;
      c_s2 <= 1'b0; c_h <= '0; c_w <= '0;
      a_pend <= 1'b0; e_pend <= 1'b0; a_zero <= 1'b0; e_zero <= 1'b0;
      p_ly <= '0; p_lx <= '0;
    end else begin
      done <= 1'b0;
      a_pend <= (state == S_LOAD) && (n < NA);
      e_pend <= (state == S_LOAD) && (n < NA) && (ly < 7'(T)) && (lx < 7'(T));
      a_zero <= !a_ok;
      e_zero <= !e_ok;
      p_ly <= ly;
      p_lx <= lx;
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD; n <= '0; ty <= '0; tx <= '0;
          c_s2 <= stride2; c_h <= a_h; c_w <= a_w;
        end
        S_LOAD: begin
          if (n == NA) begin state <= S_COMP; kk <= '0; end
          else n <= n + 1'b1;
        end
        S_COMP: begin
          if (kk == K*K - 1) begin
            n <= '0;
            state <= S_LOAD;
            if (tx + 7'(T) == c_w) begin
              tx <= '0;
              if (ty + 7'(T) == c_h) begin state <= S_IDLE; done <= 1'b1; end
              else ty <= ty + 7'(T);
            end else tx <= tx + 7'(T);
          end else kk <= kk + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // window registers fill one cycle after each read
  always_ff @(posedge clk) begin
    if (a_pend) a_win[p_ly][p_lx] <= a_zero ? '0 : a_rd_data;
    if (e_pend) e_win[p_ly[$clog2(T)-1:0]][p_lx[$clog2(T)-1:0]] <= e_zero ? '0 : e_rd_data;
  end

  // ------------------------------------------------------ compute one tap
  logic [6:0] kh, kw;
  assign kh = 7'(kk / K);
  assign kw = 7'(kk % K);

  acc_t [CH_T-1:0][CH_T-1:0] tap_sum;
  always_comb begin
    for (int co = 0; co < CH_T; co++)
      for (int ci = 0; ci < CH_T; ci++) begin
        tap_sum[co][ci] = '0;
        for (int i = 0; i < T; i++)
          for (int j = 0; j < T; j++)
            tap_sum[co][ci] = tap_sum[co][ci]
                            + ACC_W'(e_win[i][j][co] * a_win[i + 32'(kh)][j + 32'(kw)][ci]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (start && state == S_IDLE && first) acc <= '0;
    else if (state == S_COMP)
      for (int co = 0; co < CH_T; co++)
        for (int ci = 0; ci < CH_T; ci++)
          acc[co][ci][kh][kw] <= acc[co][ci][kh][kw] + tap_sum[co][ci];
  end

  always_comb
    for (int co = 0; co < CH_T; co++)
      for (int ci = 0; ci < CH_T; ci++)
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            grad[co][ci][r][c] = requant(48'(acc[co][ci][r][c]));

  assign busy = (state != S_IDLE);
endmodule
