// repvgg_accel_tb_core: end-to-end test sequence for repvgg_accel, shared by
// the small and the full-size testbench. The accelerator is instantiated with
// its default parameters; H x W is the size of the feature maps used.
//
// Part A, a stride-1 basic block with identity branch, 16 -> 16 channels (two
// channel tiles):
//   OP_FWD for both output tiles: the block output is compared with a model
//   built from exact integer convolutions and real-valued BN&ReLU (tolerance of
//   a few Q8.8 LSBs, since BN divides by a square root).
//   OP_BNB for both tiles: BN parameter gradients and per-branch errors are
//   compared with real-valued BN backward formulas on the stored xhat/mask.
//   OP_BWD for both input tiles: the propagated error (3x3 deConv + 1x1 deConv
//   + identity) is compared exactly, and every updated 3x3 and 1x1 weight and
//   velocity within 2 LSBs of the momentum-SGD formula applied to exact
//   gradients.
// Part B, a stride-2 block without identity (one tile): the same three
// commands, exercising output dropping, zero dilation and strided gradients.
// Part C, the head: AvgPool over the eight tiles of a 64-channel map into the
// FC layer, FC forward and backward, and AvgPool backward of one tile.
// Each mechanism is counted; one that never happens is a failure.
`timescale 1ns/1ps
module repvgg_accel_tb_core #(
  parameter int H = 8,
  parameter int W = 8
) (
  output logic finished
);
  import repvgg_pkg::*;
  localparam int DEPTH = 32 * 32;
  localparam int NT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT ports
  logic cmd_valid; op_e cmd_op; logic [2:0] cmd_tile; logic [3:0] cmd_n_tiles;
  logic [6:0] cmd_h, cmd_w; logic cmd_stride2, cmd_id_en; logic [3:0] cmd_log2n;
  data_t lr, momentum; vec_t [2:0] bn_gamma, bn_beta; logic busy, done;
  logic act_wr; logic [2:0] act_tile; logic [9:0] act_addr; vec_t act_data;
  logic err_wr; logic [2:0] err_tile; logic [9:0] err_addr; vec_t err_data;
  logic wv_wr, wv_vel, wv_k1; logic [2:0] wv_co_t, wv_ci_t, wv_co; logic [3:0] wv_tap;
  vec_t wv_data, wv_rd_data;
  logic out_valid; logic [9:0] out_addr; vec_t out_data; vec_t [2:0] bn_dgamma, bn_dbeta;
  logic pool_start, pool_bwd; logic [2:0] pool_tile; logic [3:0] pool_log2n;
  logic pool_in_valid; vec_t pool_in_data; logic pool_out_valid, pool_out_last; vec_t pool_out_data;
  logic fc_w_wr; logic [3:0] fc_w_o; logic [2:0] fc_w_tile; vec_t fc_w_data;
  logic fc_b_wr; logic [3:0] fc_b_o; data_t fc_b_data;
  logic fc_dy_wr; logic [3:0] fc_dy_o; data_t fc_dy_data;
  logic fc_start_fwd, fc_start_bwd, fc_busy, fc_done, fc_y_valid;
  logic [3:0] fc_y_idx; data_t fc_y_data; logic fc_g_valid; logic [3:0] fc_g_o;
  logic [2:0] fc_g_tile; vec_t fc_g_data;

  repvgg_accel dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_branch_par = 0, n_bwd_par = 0, n_swap = 0, n_identity = 0, n_stride2_fwd = 0;
  int n_zero_dil = 0, n_partition = 0, n_sgd = 0, n_bn_stat = 0, n_bn_bwd = 0;
  int n_pool_fwd = 0, n_pool_bwd = 0, n_fc_fwd = 0, n_fc_bwd = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_conv3.busy && dut.u_conv1.busy && !dut.is_bwd) n_branch_par++;
    if (dut.u_conv3.busy && dut.u_dil3.busy && dut.u_dil1.busy) n_bwd_par++;
    if (dut.pp_swap) n_swap++;
    if (dut.id_we) n_identity++;
    if (dut.u_conv3.out_valid && dut.c_s2 && !dut.is_bwd) n_stride2_fwd++;
    if (dut.u_conv3.rd_en == 1'b0 && dut.u_conv3.state == 2'd1 && dut.u_conv3.c_deconv
        && dut.u_conv3.in_map) n_zero_dil++;
    if (dut.u_dil3.state == 2'd2 && dut.u_dil3.kk == 0) n_partition++;
    if (dut.u_sgd.out_valid) n_sgd++;
    if (dut.bn_sdone[0]) n_bn_stat++;
    if (dut.bb_gdone[0]) n_bn_bwd++;
  end

  // ------------------------------------------------------------ data
  int A [NT][CH_T][H][W];          // layer input
  int E [NT][CH_T][H][W];          // error of the block output
  int W3 [NT][NT][CH_T][CH_T][3][3];
  int V3 [NT][NT][CH_T][CH_T][3][3];
  int W1 [NT][NT][CH_T][CH_T];
  int V1 [NT][NT][CH_T][CH_T];
  vec_t got [DEPTH];
  bit   gotv [DEPTH];

  always @(posedge clk) if (out_valid) begin got[out_addr] <= out_data; gotv[out_addr] <= 1'b1; end

  function automatic int rq(longint v);
    longint r;
    r = (v + 128) >>> 8;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction
  function automatic int sat(longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v));
  endfunction
  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction
  function automatic int a_at(int t, int c, int y, int x);
    if (y < 0 || x < 0 || y >= H || x >= W) return 0;
    return A[t][c][y][x];
  endfunction

  task automatic clear_out();
    for (int i = 0; i < DEPTH; i++) gotv[i] = 0;
  endtask

  task automatic command(op_e op, int tile, int n, bit s2, bit id, int log2n);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_tile = 3'(tile); cmd_n_tiles = 4'(n);
    cmd_h = 7'(H); cmd_w = 7'(W); cmd_stride2 = s2; cmd_id_en = id; cmd_log2n = 4'(log2n);
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic load_layer(int nt);
    for (int t = 0; t < nt; t++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          act_wr = 1; act_tile = 3'(t); act_addr = 10'(y * W + x);
          for (int c = 0; c < n_ch; c++) begin
            A[t][c][y][x] = int'($urandom_range(0, 511)) - 256;
            act_data[c] = data_t'(A[t][c][y][x]);
          end
          @(negedge clk);
        end
    act_wr = 0;
    for (int ot = 0; ot < nt; ot++)
      for (int it = 0; it < nt; it++)
        for (int o = 0; o < n_ch; o++) begin
          for (int tap = 0; tap < 10; tap++)
            for (int vel = 0; vel < 2; vel++) begin
              wv_wr = 1; wv_vel = 1'(vel); wv_k1 = (tap == 9); wv_co_t = 3'(ot); wv_ci_t = 3'(it);
              wv_co = 3'(o); wv_tap = (tap == 9) ? 4'd0 : 4'(tap);
              for (int i = 0; i < n_ch; i++) begin
                int v;
                v = vel ? int'($urandom_range(0, 31)) - 16 : int'($urandom_range(0, 63)) - 32;
                if (tap == 9) begin
                  if (vel) V1[ot][it][o][i] = v; else W1[ot][it][o][i] = v;
                end else begin
                  if (vel) V3[ot][it][o][i][tap / 3][tap % 3] = v;
                  else     W3[ot][it][o][i][tap / 3][tap % 3] = v;
                end
                wv_data[i] = data_t'(v);
              end
              @(negedge clk);
            end
        end
    wv_wr = 0;
  endtask

  // ------------------------------------------------ forward reference + check
  real xs [3][CH_T][H][W];          // per-branch reference of check_fwd
  // loop bounds held in variables keep the reference loops compact when compiled
  int n_ch = CH_T;
  int n_k  = 3;

  task automatic check_fwd(int cot, int nt, bit s2, bit id);
    int oh, ow, n, bad;
    real mean, var_, inv, y, tot;
    oh = s2 ? H / 2 : H; ow = s2 ? W / 2 : W; n = oh * ow; bad = 0;
    for (int o = 0; o < n_ch; o++)
      for (int y0 = 0; y0 < oh; y0++)
        for (int x0 = 0; x0 < ow; x0++) begin
          longint s3, s1;
          s3 = 0; s1 = 0;
          for (int t = 0; t < nt; t++)
            for (int i = 0; i < n_ch; i++) begin
              for (int r = 0; r < n_k; r++)
                for (int c = 0; c < n_k; c++)
                  s3 += longint'(W3[cot][t][o][i][r][c]) * a_at(t, i, (s2 ? 2 : 1) * y0 + r - 1, (s2 ? 2 : 1) * x0 + c - 1);
              s1 += longint'(W1[cot][t][o][i]) * a_at(t, i, (s2 ? 2 : 1) * y0, (s2 ? 2 : 1) * x0);
            end
          xs[0][o][y0][x0] = rq(s3) / 256.0;
          xs[1][o][y0][x0] = rq(s1) / 256.0;
          xs[2][o][y0][x0] = id ? A[cot][o][y0][x0] / 256.0 : 0.0;
        end
    // BN&ReLU per branch (gamma = 1, beta = 0.25), then the sum
    for (int b = 0; b < n_k; b++)
      for (int o = 0; o < n_ch; o++) begin
        real s, ss;
        s = 0; ss = 0;
        for (int y0 = 0; y0 < oh; y0++)
          for (int x0 = 0; x0 < ow; x0++) begin s += xs[b][o][y0][x0]; ss += xs[b][o][y0][x0] ** 2; end
        mean = s / n; var_ = ss / n - mean * mean;
        if (var_ < 0) var_ = 0;
        inv = 1.0 / $sqrt(var_ + 1.0 / 65536);
        for (int y0 = 0; y0 < oh; y0++)
          for (int x0 = 0; x0 < ow; x0++) begin
            y = (xs[b][o][y0][x0] - mean) * inv + 0.25;
            xs[b][o][y0][x0] = y > 0 ? y : 0.0;
          end
      end
    for (int y0 = 0; y0 < oh; y0++)
      for (int x0 = 0; x0 < ow; x0++) begin
        checks++;
        if (!gotv[y0 * ow + x0]) begin failures++; bad++; continue; end
        for (int o = 0; o < n_ch; o++) begin
          tot = xs[0][o][y0][x0] + xs[1][o][y0][x0] + (id ? xs[2][o][y0][x0] : 0.0);
          if (!near(got[y0 * ow + x0][o] / 256.0, tot, 0.04 * tot + 10.0 / 256)) begin
            failures++;
            if (bad++ < 4) $display("FAIL fwd co_t%0d (%0d,%0d) ch%0d got %f exp %f", cot, y0, x0, o,
                                    got[y0 * ow + x0][o] / 256.0, tot);
            break;
          end
        end
      end
  endtask

  // --------------------------------------- BN backward check on stored data
  task automatic check_bnb(int cot, bit s2, bit id);
    int n, bad;
    n = s2 ? (H / 2) * (W / 2) : H * W; bad = 0;
    for (int b = 0; b < (id ? 3 : 2); b++)
      for (int c = 0; c < n_ch; c++) begin
        real sb, sg, g_inv, d, xh, e;
        sb = 0; sg = 0;
        for (int p = 0; p < n; p++)
          if (dut.mk_mem[b][cot * DEPTH + p][c]) begin
            sb += E[cot][c][p / (s2 ? W / 2 : W)][p % (s2 ? W / 2 : W)] / 256.0;
            sg += E[cot][c][p / (s2 ? W / 2 : W)][p % (s2 ? W / 2 : W)] / 256.0
                * dut.xh_mem[b][cot * DEPTH + p][c] / 256.0;
          end
        checks += 2;
        if (!near(bn_dbeta[b][c] / 256.0, sb, 2.0 / 256) || !near(bn_dgamma[b][c] / 256.0, sg, 0.01 * (sg < 0 ? -sg : sg) + 3.0 / 256)) begin
          failures++;
          $display("FAIL bn grads b%0d ch%0d dbeta %f/%f dgamma %f/%f", b, c, bn_dbeta[b][c] / 256.0, sb,
                   bn_dgamma[b][c] / 256.0, sg);
        end
        g_inv = dut.inv_mem[b][cot][c] / 256.0;
        for (int p = 0; p < n; p++) begin
          d  = dut.mk_mem[b][cot * DEPTH + p][c] ? E[cot][c][p / (s2 ? W / 2 : W)][p % (s2 ? W / 2 : W)] / 256.0 : 0.0;
          xh = dut.xh_mem[b][cot * DEPTH + p][c] / 256.0;
          e  = g_inv * (d - sb / n - xh * sg / n);
          checks++;
          if (!near(dut.ebr_mem[b][cot * DEPTH + p][c] / 256.0, e, 0.03 * (e < 0 ? -e : e) + 6.0 / 256)) begin
            failures++;
            if (bad++ < 4) $display("FAIL bn bwd b%0d ch%0d p%0d got %f exp %f", b, c, p,
                                    dut.ebr_mem[b][cot * DEPTH + p][c] / 256.0, e);
          end
        end
      end
  endtask

  // ------------------------------------- error propagation + weight update
  function automatic int eb(int b, int t, int c, int i, int j, int ew);
    return int'(dut.ebr_mem[b][t * DEPTH + i * ew + j][c]);
  endfunction

  task automatic check_bwd(int cit, int nt, bit s2, bit id, ref int Eb [3][NT][CH_T][H][W]);
    int s, eh, ew, bad;
    s = s2 ? 2 : 1; eh = H / s; ew = W / s; bad = 0;
    // propagated error of input tile cit
    for (int y0 = 0; y0 < H; y0++)
      for (int x0 = 0; x0 < W; x0++) begin
        checks++;
        if (!gotv[y0 * W + x0]) begin failures++; bad++; continue; end
        for (int ci = 0; ci < n_ch; ci++) begin
          longint d3, d1;
          int tot;
          d3 = 0; d1 = 0;
          for (int t = 0; t < nt; t++)
            for (int co = 0; co < n_ch; co++) begin
              for (int r = 0; r < n_k; r++)
                for (int c = 0; c < n_k; c++) begin
                  int yy, xx;
                  yy = y0 + 1 - r; xx = x0 + 1 - c;
                  if (yy >= 0 && xx >= 0 && yy % s == 0 && xx % s == 0 && yy / s < eh && xx / s < ew)
                    d3 += longint'(W3[t][cit][co][ci][r][c]) * Eb[0][t][co][yy / s][xx / s];
                end
              if (y0 % s == 0 && x0 % s == 0)
                d1 += longint'(W1[t][cit][co][ci]) * Eb[1][t][co][y0 / s][x0 / s];
            end
          tot = sat(longint'(rq(d3)) + rq(d1) + (id ? Eb[2][cit][ci][y0][x0] : 0));
          if (int'(got[y0 * W + x0][ci]) != tot) begin
            failures++;
            if (bad++ < 4) $display("FAIL bwd err ci_t%0d (%0d,%0d) ch%0d got %0d exp %0d", cit, y0, x0, ci,
                                    got[y0 * W + x0][ci], tot);
            break;
          end
        end
      end
    // updated weights and velocities of every (co_t, cit)
    for (int t = 0; t < nt; t++)
      for (int co = 0; co < n_ch; co++)
        for (int tap = 0; tap < 10; tap++) begin
          vec_t wn, vn;
          @(negedge clk);
          wv_co_t = 3'(t); wv_ci_t = 3'(cit); wv_co = 3'(co); wv_k1 = (tap == 9);
          wv_tap = (tap == 9) ? 4'd0 : 4'(tap);
          wv_vel = 0; #1 wn = wv_rd_data;
          wv_vel = 1; #1 vn = wv_rd_data;
          for (int ci = 0; ci < n_ch; ci++) begin
            longint g;
            real ev, ew_;
            int w0, v0;
            g = 0;
            for (int i = 0; i < eh; i++)
              for (int j = 0; j < ew; j++)
                if (tap == 9) g += longint'(Eb[1][t][co][i][j]) * a_at(cit, ci, s * i, s * j);
                else g += longint'(Eb[0][t][co][i][j]) * a_at(cit, ci, s * i + tap / 3 - 1, s * j + tap % 3 - 1);
            w0 = (tap == 9) ? W1[t][cit][co][ci] : W3[t][cit][co][ci][tap / 3][tap % 3];
            v0 = (tap == 9) ? V1[t][cit][co][ci] : V3[t][cit][co][ci][tap / 3][tap % 3];
            ev  = 230.0 / 256 * v0 / 256.0 + rq(g) / 256.0;
            ew_ = w0 / 256.0 - 13.0 / 256 * ev;
            checks++;
            if (!near(vn[ci] / 256.0, ev, 2.0 / 256) || !near(wn[ci] / 256.0, ew_, 2.0 / 256)) begin
              failures++;
              if (bad++ < 8) $display("FAIL sgd (%0d,%0d) co%0d tap%0d ci%0d w %f/%f v %f/%f", t, cit, co, tap, ci,
                                      wn[ci] / 256.0, ew_, vn[ci] / 256.0, ev);
            end
          end
        end
  endtask

  // ---------------------------------------------------------- one block
  int Eb [3][NT][CH_T][H][W];

  task automatic block(int nt, bit s2, bit id);
    int oh, ow, log2n;
    oh = s2 ? H / 2 : H; ow = s2 ? W / 2 : W;
    log2n = $clog2(oh * ow);
    load_layer(nt);
    for (int t = 0; t < nt; t++) begin
      clear_out();
      command(OP_FWD, t, nt, s2, id, log2n);
      check_fwd(t, nt, s2, id);
    end
    // error of the block output
    for (int t = 0; t < nt; t++)
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++) begin
          err_wr = 1; err_tile = 3'(t); err_addr = 10'(y * ow + x);
          for (int c = 0; c < n_ch; c++) begin
            E[t][c][y][x] = int'($urandom_range(0, 255)) - 128;
            err_data[c] = data_t'(E[t][c][y][x]);
          end
          @(negedge clk);
        end
    err_wr = 0;
    for (int t = 0; t < nt; t++) begin
      command(OP_BNB, t, nt, s2, id, log2n);
      check_bnb(t, s2, id);
    end
    for (int b = 0; b < n_k; b++)
      for (int t = 0; t < nt; t++)
        for (int c = 0; c < n_ch; c++)
          for (int i = 0; i < oh; i++)
            for (int j = 0; j < ow; j++) Eb[b][t][c][i][j] = eb(b, t, c, i, j, ow);
    for (int t = 0; t < nt; t++) begin
      clear_out();
      command(OP_BWD, t, nt, s2, id, log2n);
      check_bwd(t, nt, s2, id, Eb);
    end
  endtask

  // ---------------------------------------------------------- head
  task automatic head();
    int FW [10][64];
    int FB [10];
    int X [64];
    int DY [10];
    int pooled [64];
    int ny, bad;
    longint acc;
    for (int o = 0; o < 10; o++) begin
      FB[o] = int'($urandom_range(0, 127)) - 64;
      DY[o] = int'($urandom_range(0, 255)) - 128;
      for (int i = 0; i < 64; i++) FW[o][i] = int'($urandom_range(0, 127)) - 64;
      for (int t = 0; t < 8; t++) begin
        fc_w_wr = 1; fc_w_o = 4'(o); fc_w_tile = 3'(t);
        for (int c = 0; c < n_ch; c++) fc_w_data[c] = data_t'(FW[o][t * 8 + c]);
        @(negedge clk);
      end
      fc_w_wr = 0;
      fc_b_wr = 1; fc_b_o = 4'(o); fc_b_data = data_t'(FB[o]);
      fc_dy_wr = 1; fc_dy_o = 4'(o); fc_dy_data = data_t'(DY[o]);
      @(negedge clk);
      fc_b_wr = 0; fc_dy_wr = 0;
    end
    // AvgPool of an 8x8 map, tile by tile, straight into the FC input
    for (int t = 0; t < 8; t++) begin
      int sum [CH_T];
      for (int c = 0; c < n_ch; c++) sum[c] = 0;
      pool_start = 1; pool_bwd = 0; pool_tile = 3'(t); pool_log2n = 6;
      @(negedge clk);
      pool_start = 0;
      for (int p = 0; p < 64; p++) begin
        pool_in_valid = 1;
        for (int c = 0; c < n_ch; c++) begin
          pool_in_data[c] = data_t'(int'($urandom_range(0, 511)) - 256);
          sum[c] += int'(pool_in_data[c]);
        end
        @(negedge clk);
      end
      pool_in_valid = 0;
      if (pool_out_valid) n_pool_fwd++;
      for (int c = 0; c < n_ch; c++) begin
        pooled[t * 8 + c] = (sum[c] + 32) >>> 6;
        X[t * 8 + c] = pooled[t * 8 + c];
      end
      @(negedge clk);
    end
    fc_start_fwd = 1; @(negedge clk); fc_start_fwd = 0;
    ny = 0; bad = 0;
    while (!fc_done) begin
      if (fc_y_valid) begin
        acc = longint'(FB[fc_y_idx]) * 256;
        for (int i = 0; i < 64; i++) acc += longint'(FW[fc_y_idx][i]) * X[i];
        checks++; ny++;
        if (int'(fc_y_data) != rq(acc)) begin
          failures++; $display("FAIL fc y[%0d] %0d vs %0d", fc_y_idx, fc_y_data, rq(acc));
        end
      end
      @(negedge clk);
    end
    if (fc_y_valid) ny++;
    if (ny == 10) n_fc_fwd++;
    @(negedge clk);
    fc_start_bwd = 1; @(negedge clk); fc_start_bwd = 0;
    while (!fc_done) @(negedge clk);
    n_fc_bwd++;
    @(negedge clk);
    // AvgPool backward of tile 3: every pixel gets dx/64
    pool_start = 1; pool_bwd = 1; pool_tile = 3'd3; pool_log2n = 6;
    @(negedge clk);
    pool_start = 0; pool_bwd = 0;
    @(negedge clk);
    for (int c = 0; c < n_ch; c++) begin
      int dx;
      acc = 0;
      for (int o = 0; o < 10; o++) acc += longint'(FW[o][24 + c]) * DY[o];
      dx = rq(acc);
      checks++;
      if (!pool_out_valid || int'(pool_out_data[c]) != ((dx + 32) >>> 6)) begin
        failures++; $display("FAIL pool bwd ch%0d got %0d exp %0d", c, pool_out_data[c], (dx + 32) >>> 6);
      end
    end
    if (pool_out_valid) n_pool_bwd++;
    repeat (70) @(negedge clk);
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("mechanism %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    finished = 0;
    cmd_valid = 0; cmd_op = OP_IDLE; cmd_tile = 0; cmd_n_tiles = 0; cmd_h = 0; cmd_w = 0;
    cmd_stride2 = 0; cmd_id_en = 0; cmd_log2n = 0;
    lr = 13; momentum = 230;
    for (int b = 0; b < n_k; b++) begin bn_gamma[b] = {CH_T{16'sd256}}; bn_beta[b] = {CH_T{16'sd64}}; end
    act_wr = 0; act_tile = 0; act_addr = 0; act_data = '0;
    err_wr = 0; err_tile = 0; err_addr = 0; err_data = '0;
    wv_wr = 0; wv_vel = 0; wv_k1 = 0; wv_co_t = 0; wv_ci_t = 0; wv_co = 0; wv_tap = 0; wv_data = '0;
    pool_start = 0; pool_bwd = 0; pool_tile = 0; pool_log2n = 0; pool_in_valid = 0; pool_in_data = '0;
    fc_w_wr = 0; fc_w_o = 0; fc_w_tile = 0; fc_w_data = '0; fc_b_wr = 0; fc_b_o = 0; fc_b_data = 0;
    fc_dy_wr = 0; fc_dy_o = 0; fc_dy_data = 0; fc_start_fwd = 0; fc_start_bwd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    block(2, 1'b0, 1'b1);       // A: stride 1, identity, 16 -> 16 channels
    block(1, 1'b1, 1'b0);       // B: stride 2, no identity
    head();                     // C: AvgPool + FC

    need(n_branch_par,  "3x3/1x1 Conv branches in parallel");
    need(n_bwd_par,     "deConv beside dilated Conv");
    need(n_swap,        "ping-pong buffer swap");
    need(n_identity,    "identity branch");
    need(n_stride2_fwd, "stride-2 output dropping");
    need(n_zero_dil,    "deConv zero dilation");
    need(n_partition,   "4x4 error-kernel regions");
    need(n_sgd,         "momentum SGD update");
    need(n_bn_stat,     "BN statistics");
    need(n_bn_bwd,      "BN backward gradients");
    need(n_pool_fwd,    "AvgPool forward");
    need(n_pool_bwd,    "AvgPool backward");
    need(n_fc_fwd,      "FC forward");
    need(n_fc_bwd,      "FC backward");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1;
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
