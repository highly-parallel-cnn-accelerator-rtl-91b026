// fc_unit: fully connected layer (NIN inputs -> NOUT outputs) for the forward
// path, the backward error and the weight gradient, with CH_T multipliers.
//
// The weights W[o][i] and biases b[o] are held on chip and written through
// `w_wr`/`b_wr` (CH_T inputs of one output per write). The input vector x is
// written tile by tile through `x_wr`, the output error dy element by element
// through `dy_wr`.
//  - `start_fwd`: y[o] = b[o] + sum_i W[o][i]*x[i]. One cycle per (o, tile of
//    CH_T inputs); y[o] leaves on `y_valid`/`y_idx`/`y_data` after its last tile.
//  - `start_bwd`: for each input tile t, the error dx[i] = sum_o W[o][i]*dy[o]
//    (the transposed weights) leaves on `dx_valid`/`dx_tile`/`dx_data` after
//    NOUT cycles, and in each of those cycles the weight gradient
//    dW[o][t] = dy[o]*x[t] of one (o, t) leaves on `g_valid`/`g_o`/`g_tile`/`g_data`.
// `done` pulses after the last result. NOUT*NIN/CH_T cycles per command.
//
// The forward linear map and the backward pass with transposed weights follow
// the accelerator description; the sizes 64 -> 10 come from the evaluated
// network (64 channels, AvgPool, FC, 10 classes of CIFAR-10); the sequencing,
// storage and ports are this design's own.
module fc_unit
  import repvgg_pkg::*;
#(
  parameter int NIN  = 64,
  parameter int NOUT = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // parameter and operand writes
  input  logic                        w_wr,
  input  logic [$clog2(NOUT)-1:0]     w_o,
  input  logic [$clog2(NIN/CH_T)-1:0] w_tile,
  input  vec_t                        w_data,
  input  logic                        b_wr,
  input  logic [$clog2(NOUT)-1:0]     b_o,
  input  data_t                       b_data,
  input  logic                        x_wr,
  input  logic [$clog2(NIN/CH_T)-1:0] x_tile,
  input  vec_t                        x_data,
  input  logic                        dy_wr,
  input  logic [$clog2(NOUT)-1:0]     dy_o,
  input  data_t                       dy_data,
  // commands
  input  logic                        start_fwd,
  input  logic                        start_bwd,
  output logic                        busy,
  output logic                        done,
  // forward result
  output logic                        y_valid,
  output logic [$clog2(NOUT)-1:0]     y_idx,
  output data_t                       y_data,
  // backward results
  output logic                        dx_valid,
  output logic [$clog2(NIN/CH_T)-1:0] dx_tile,
  output vec_t                        dx_data,
  output logic                        g_valid,
  output logic [$clog2(NOUT)-1:0]     g_o,
  output logic [$clog2(NIN/CH_T)-1:0] g_tile,
  output vec_t                        g_data
);
  localparam int NT = NIN / CH_T;
  localparam int OW = $clog2(NOUT);
  localparam int TW = $clog2(NT);

  vec_t  wmem [NOUT][NT];
  data_t bias [NOUT];
  vec_t  xv   [NT];
  data_t dyv  [NOUT];

  always_ff @(posedge clk) begin
    if (w_wr)  wmem[w_o][w_tile] <= w_data;
    if (b_wr)  bias[b_o]         <= b_data;
    if (x_wr)  xv[x_tile]        <= x_data;
    if (dy_wr) dyv[dy_o]         <= dy_data;
  end

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_e;
  state_e state;
  logic [OW-1:0] o;
  logic [TW-1:0] t;
  acc_t          acc;
  avec_t         vacc;

  // one tile of products per cycle
  acc_t  dot;
  avec_t col;
  always_comb begin
    dot = '0;
    for (int c = 0; c < CH_T; c++) begin
      dot    = dot + ACC_W'(wmem[o][t][c] * xv[t][c]);
      col[c] = vacc[c] + ACC_W'(wmem[o][t][c] * dyv[o]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; o <= '0; t <= '0; acc <= '0; vacc <= '0; done <= 1'b0;
      y_valid <= 1'b0; y_idx <= '0; y_data <= '0;
      dx_valid <= 1'b0; dx_tile <= '0; dx_data <= '0;
      g_valid <= 1'b0; g_o <= '0; g_tile <= '0; g_data <= '0;
    end else begin
      done <= 1'b0; y_valid <= 1'b0; dx_valid <= 1'b0; g_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          o <= '0; t <= '0; acc <= '0; vacc <= '0;
          if (start_fwd)      state <= S_FWD;
          else if (start_bwd) state <= S_BWD;
        end
        S_FWD: begin
          if (t == TW'(NT-1)) begin
            y_valid <= 1'b1;
            y_idx   <= o;
            y_data  <= requant(48'(acc + dot) + (48'(bias[o]) <<< FRAC_W));
            acc     <= '0;
            t       <= '0;
            if (o == OW'(NOUT-1)) begin state <= S_IDLE; done <= 1'b1; end
            else o <= o + 1'b1;
          end else begin
            acc <= acc + dot;
            t   <= t + 1'b1;
          end
        end
        S_BWD: begin
          g_valid <= 1'b1;
          g_o     <= o;
          g_tile  <= t;
          for (int c = 0; c < CH_T; c++) g_data[c] <= qmul(dyv[o], xv[t][c]);
          if (o == OW'(NOUT-1)) begin
            dx_valid <= 1'b1;
            dx_tile  <= t;
            for (int c = 0; c < CH_T; c++) dx_data[c] <= requant(48'(col[c]));
            vacc <= '0;
            o    <= '0;
            if (t == TW'(NT-1)) begin state <= S_IDLE; done <= 1'b1; end
            else t <= t + 1'b1;
          end else begin
            vacc <= col;
            o    <= o + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
