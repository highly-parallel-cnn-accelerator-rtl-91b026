// repvgg_accel: training accelerator for RepVGG-like networks. It runs the
// forward and backward passes of one RepVGG basic block (3x3 Conv branch, 1x1
// Conv branch and identity branch, each followed by fused BN&ReLU, joined by a
// shortcut addition) on channel tiles of CH_T = 8 channels, and holds the
// AvgPool + FC head of the network beside it.
//
// Commands (`cmd_valid` with `cmd_op`, accepted when `busy` is low; `done`
// pulses at the end):
//  OP_FWD  (tile = output-channel tile co_t, n_tiles = input-channel tiles).
//          For each input tile: load_weight (72 cycles) reads the 3x3 and 1x1
//          kernels of (co_t, ci) into the engines, then the 3x3 and 1x1 Conv
//          engines run at the same time on the same input tile, accumulating
//          partial sums in place. The identity branch copies input tile co_t.
//          The three branch results sit in three groups of ping-pong buffers;
//          three bn_relu units then run together (statistics pass, apply pass)
//          and the shortcut addition streams the block output on `out_*`.
//          xhat, the ReLU mask and inv_std of every branch are kept for the
//          backward pass.
//  OP_BNB  (tile = co_t). The error of the block output, err tile co_t, goes
//          through the three bn_relu_bwd units together. Their errors are kept
//          per branch; the BN parameter gradients appear on `bn_dgamma`/`bn_dbeta`.
//  OP_BWD  (tile = input-channel tile ci_t, n_tiles = output-channel tiles).
//          For each output tile co: load_weight also reads the velocities, then
//          3x3 deConv, 1x1 deConv, 3x3 dilated Conv and 1x1 dilated Conv run
//          concurrently (error back-propagation beside weight-gradient
//          calculation), and sgd_momentum writes back the updated weights and
//          velocities of (co, ci_t). After the last co the deConv results and
//          the identity-branch error are added by the shortcut unit and stream
//          out on `out_*` as the error of input tile ci_t.
// The memories for activations, errors, weights and velocities stand for the
// off-chip DDR data of one layer and are filled and read through the host ports.
//
// Sizes: maps up to H_MAX x W_MAX, up to NT_MAX channel tiles (64 channels).
// Q8.8 data throughout. Identity branch only for stride 1 with equal channel
// counts (`id_en`). Stride 2 (`stride2`) halves the output map.
//
// Branch parallelism, parallel deConv and dilated Conv in the backward path,
// load_weight per channel-tile pair, three groups of double buffers and the
// ReLU moved before the shortcut addition follow the accelerator description.
// The command set, running the branch BN phase after (not overlapped with)
// the next tile's Conv, the BWD loop order (ci outer, co inner, so that deConv
// accumulates output-stationary), the on-chip stand-ins for DDR and the
// per-image weight update are this design's own.
module repvgg_accel
  import repvgg_pkg::*;
#(
  parameter int H_MAX  = 32,
  parameter int W_MAX  = 32,
  parameter int NT_MAX = 8,
  parameter int NIN_FC = 64,
  parameter int NOUT_FC = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // command
  input  logic                        cmd_valid,
  input  op_e                         cmd_op,
  input  logic [$clog2(NT_MAX)-1:0]   cmd_tile,
  input  logic [$clog2(NT_MAX):0]     cmd_n_tiles,
  input  logic [6:0]                  cmd_h,        // layer input height
  input  logic [6:0]                  cmd_w,        // layer input width
  input  logic                        cmd_stride2,
  input  logic                        cmd_id_en,
  input  logic [3:0]                  cmd_log2n,    // log2 of output-map pixels
  input  data_t                       lr,
  input  data_t                       momentum,
  input  vec_t [2:0]                  bn_gamma,     // [branch] 0:3x3 1:1x1 2:identity
  input  vec_t [2:0]                  bn_beta,
  output logic                        busy,
  output logic                        done,
  // host access to the layer data
  input  logic                        act_wr,
  input  logic [$clog2(NT_MAX)-1:0]   act_tile,
  input  logic [$clog2(H_MAX*W_MAX)-1:0] act_addr,
  input  vec_t                        act_data,
  input  logic                        err_wr,
  input  logic [$clog2(NT_MAX)-1:0]   err_tile,
  input  logic [$clog2(H_MAX*W_MAX)-1:0] err_addr,
  input  vec_t                        err_data,
  input  logic                        wv_wr,        // write a weight or velocity word
  input  logic                        wv_vel,       // 1: velocity, 0: weight
  input  logic                        wv_k1,        // 1: 1x1 kernel, 0: 3x3 kernel
  input  logic [$clog2(NT_MAX)-1:0]   wv_co_t,
  input  logic [$clog2(NT_MAX)-1:0]   wv_ci_t,
  input  logic [2:0]                  wv_co,        // output channel inside the tile
  input  logic [3:0]                  wv_tap,       // row*3+col (0 for 1x1)
  input  vec_t                        wv_data,      // CH_T input channels
  output vec_t                        wv_rd_data,   // same address, read back
  // block output stream (FWD: activations of co_t; BWD: errors of ci_t)
  output logic                        out_valid,
  output logic [$clog2(H_MAX*W_MAX)-1:0] out_addr,
  output vec_t                        out_data,
  output vec_t [2:0]                  bn_dgamma,
  output vec_t [2:0]                  bn_dbeta,
  // network head: AvgPool -> FC
  input  logic                        pool_start,
  input  logic                        pool_bwd,
  input  logic [$clog2(NIN_FC/CH_T)-1:0] pool_tile,
  input  logic [3:0]                  pool_log2n,
  input  logic                        pool_in_valid,
  input  vec_t                        pool_in_data,
  output logic                        pool_out_valid,
  output logic                        pool_out_last,
  output vec_t                        pool_out_data,
  input  logic                        fc_w_wr,
  input  logic [$clog2(NOUT_FC)-1:0]  fc_w_o,
  input  logic [$clog2(NIN_FC/CH_T)-1:0] fc_w_tile,
  input  vec_t                        fc_w_data,
  input  logic                        fc_b_wr,
  input  logic [$clog2(NOUT_FC)-1:0]  fc_b_o,
  input  data_t                       fc_b_data,
  input  logic                        fc_dy_wr,
  input  logic [$clog2(NOUT_FC)-1:0]  fc_dy_o,
  input  data_t                       fc_dy_data,
  input  logic                        fc_start_fwd,
  input  logic                        fc_start_bwd,
  output logic                        fc_busy,
  output logic                        fc_done,
  output logic                        fc_y_valid,
  output logic [$clog2(NOUT_FC)-1:0]  fc_y_idx,
  output data_t                       fc_y_data,
  output logic                        fc_g_valid,
  output logic [$clog2(NOUT_FC)-1:0]  fc_g_o,
  output logic [$clog2(NIN_FC/CH_T)-1:0] fc_g_tile,
  output vec_t                        fc_g_data
);
  localparam int DEPTH = H_MAX * W_MAX;
  localparam int AW    = $clog2(DEPTH);
  localparam int TW    = $clog2(NT_MAX);
  localparam int NW3   = NT_MAX * NT_MAX * CH_T * 9;
  localparam int NW1   = NT_MAX * NT_MAX * CH_T;

  // ------------------------------------------------------------ layer data
  vec_t act_mem [NT_MAX * DEPTH];
  vec_t err_mem [NT_MAX * DEPTH];
  vec_t ebr_mem [3][NT_MAX * DEPTH];      // per-branch errors after BN backward
  vec_t xh_mem  [3][NT_MAX * DEPTH];      // per-branch xhat from forward
  logic [CH_T-1:0] mk_mem [3][NT_MAX * DEPTH];
  vec_t inv_mem [3][NT_MAX];
  vec_t w3_mem [NW3];
  vec_t v3_mem [NW3];
  vec_t w1_mem [NW1];
  vec_t v1_mem [NW1];

  function automatic int w3a(int cot, int cit, int co, int tap);
    return ((cot * NT_MAX + cit) * CH_T + co) * 9 + tap;
  endfunction
  function automatic int w1a(int cot, int cit, int co);
    return (cot * NT_MAX + cit) * CH_T + co;
  endfunction

  // ------------------------------------------------------------ sequencer
  typedef enum logic [4:0] {
    S_IDLE, S_F_IDCOPY, S_LOADW, S_ENG_START, S_ENG_WAIT, S_SGD,
    S_F_STAT, S_F_STAT_WAIT, S_F_APPLY, S_F_DRAIN,
    S_B_SUM, S_B_DRAIN, S_N_SUM, S_N_ERR, S_N_DRAIN, S_DONE
  } state_e;
  state_e state;

  op_e          c_op;
  logic [TW-1:0] c_tile;
  logic [TW:0]  c_n;
  logic [6:0]   c_h, c_w;
  logic         c_s2, c_id;
  logic [3:0]   c_log2n;
  logic [TW:0]  it;                 // loop tile (ci for FWD, co for BWD)
  logic [10:0]  cnt;
  logic [AW:0]  n_out, n_in;

  assign n_in  = (AW+1)'(c_h * c_w);
  assign n_out = c_s2 ? (AW+1)'((c_h >> 1) * (c_w >> 1)) : n_in;

  logic [TW-1:0] co_t, ci_t;         // current channel-tile pair
  assign co_t = (c_op == OP_BWD) ? it[TW-1:0] : c_tile;
  assign ci_t = (c_op == OP_BWD) ? c_tile : it[TW-1:0];

  // ------------------------------------------------ weights in the engines
  data_t [CH_T-1:0][CH_T-1:0][2:0][2:0] w3_cur, v3_cur;
  data_t [CH_T-1:0][CH_T-1:0][0:0][0:0] w1_cur, v1_cur;

  // ---------------------------------------------------------------- engines
  logic eng_start;
  logic c3_busy, c3_done, c1_busy, c1_done, d3_busy, d3_done, d1_busy, d1_done;
  logic c3_rd, c1_rd, d3a_rd, d3e_rd, d1a_rd, d1e_rd;
  logic [AW-1:0] c3_ra, c1_ra, d3a_ra, d3e_ra, d1a_ra, d1e_ra;
  vec_t c3_rdat, c1_rdat, d3a_rdat, d3e_rdat, d1a_rdat, d1e_rdat;
  logic c3_ov, c1_ov;
  logic [AW-1:0] c3_oa, c1_oa;
  vec_t c3_od, c1_od;
  data_t [CH_T-1:0][CH_T-1:0][2:0][2:0] g3;
  data_t [CH_T-1:0][CH_T-1:0][0:0][0:0] g1;
  logic is_bwd, eng_first, eng_last;
  logic [6:0] eng_h, eng_w;
  logic f3, f1, fd3, fd1;            // done flags of the current round

  assign is_bwd    = (c_op == OP_BWD);
  assign eng_first = (it == 0);
  assign eng_last  = (it == c_n - 1'b1);
  // deConv reads the output error map; Conv reads the input map
  assign eng_h = is_bwd && c_s2 ? (c_h >> 1) : c_h;
  assign eng_w = is_bwd && c_s2 ? (c_w >> 1) : c_w;

  conv_engine #(.K(3), .H_MAX(H_MAX), .W_MAX(W_MAX)) u_conv3 (
    .clk, .rst_n, .start(eng_start), .deconv(is_bwd), .stride2(c_s2),
    .first(eng_first), .last(eng_last), .in_h(eng_h), .in_w(eng_w), .wt(w3_cur),
    .busy(c3_busy), .done(c3_done), .rd_en(c3_rd), .rd_addr(c3_ra), .rd_data(c3_rdat),
    .out_valid(c3_ov), .out_addr(c3_oa), .out_data(c3_od));

  conv_engine #(.K(1), .H_MAX(H_MAX), .W_MAX(W_MAX)) u_conv1 (
    .clk, .rst_n, .start(eng_start), .deconv(is_bwd), .stride2(c_s2),
    .first(eng_first), .last(eng_last), .in_h(eng_h), .in_w(eng_w), .wt(w1_cur),
    .busy(c1_busy), .done(c1_done), .rd_en(c1_rd), .rd_addr(c1_ra), .rd_data(c1_rdat),
    .out_valid(c1_ov), .out_addr(c1_oa), .out_data(c1_od));

  dilated_conv_engine #(.K(3), .T(4), .H_MAX(H_MAX), .W_MAX(W_MAX)) u_dil3 (
    .clk, .rst_n, .start(eng_start && is_bwd), .stride2(c_s2), .first(1'b1),
    .a_h(c_h), .a_w(c_w), .busy(d3_busy), .done(d3_done),
    .a_rd_en(d3a_rd), .a_rd_addr(d3a_ra), .a_rd_data(d3a_rdat),
    .e_rd_en(d3e_rd), .e_rd_addr(d3e_ra), .e_rd_data(d3e_rdat), .grad(g3));

  dilated_conv_engine #(.K(1), .T(4), .H_MAX(H_MAX), .W_MAX(W_MAX)) u_dil1 (
    .clk, .rst_n, .start(eng_start && is_bwd), .stride2(c_s2), .first(1'b1),
    .a_h(c_h), .a_w(c_w), .busy(d1_busy), .done(d1_done),
    .a_rd_en(d1a_rd), .a_rd_addr(d1a_ra), .a_rd_data(d1a_rdat),
    .e_rd_en(d1e_rd), .e_rd_addr(d1e_ra), .e_rd_data(d1e_rdat), .grad(g1));

  // memory read ports of the engines (one-cycle latency)
  always_ff @(posedge clk) begin
    if (c3_rd)  c3_rdat  <= is_bwd ? ebr_mem[0][co_t * DEPTH + 32'(c3_ra)] : act_mem[ci_t * DEPTH + 32'(c3_ra)];
    if (c1_rd)  c1_rdat  <= is_bwd ? ebr_mem[1][co_t * DEPTH + 32'(c1_ra)] : act_mem[ci_t * DEPTH + 32'(c1_ra)];
    if (d3a_rd) d3a_rdat <= act_mem[ci_t * DEPTH + 32'(d3a_ra)];
    if (d3e_rd) d3e_rdat <= ebr_mem[0][co_t * DEPTH + 32'(d3e_ra)];
    if (d1a_rd) d1a_rdat <= act_mem[ci_t * DEPTH + 32'(d1a_ra)];
    if (d1e_rd) d1e_rdat <= ebr_mem[1][co_t * DEPTH + 32'(d1e_ra)];
  end

  // ------------------------------------------------- branch ping-pong buffers
  logic          pp_swap;
  logic [2:0]    pp_bank;
  logic [2:0]    pp_we;
  logic [AW-1:0] pp_wa [3];
  vec_t          pp_wd [3];
  logic          pp_re;
  logic [AW-1:0] pp_ra;
  vec_t          pp_rd [3];
  logic          id_we;
  logic [AW-1:0] id_wa;
  vec_t          id_wd;

  assign pp_we[0] = c3_ov;  assign pp_wa[0] = c3_oa;  assign pp_wd[0] = c3_od;
  assign pp_we[1] = c1_ov;  assign pp_wa[1] = c1_oa;  assign pp_wd[1] = c1_od;
  assign pp_we[2] = id_we;  assign pp_wa[2] = id_wa;  assign pp_wd[2] = id_wd;

  for (genvar b = 0; b < 3; b++) begin : g_pp
    pingpong_buffer #(.DEPTH(DEPTH)) u_pp (
      .clk, .rst_n, .swap(pp_swap), .wr_bank(pp_bank[b]),
      .wr_en(pp_we[b]), .wr_addr(pp_wa[b]), .wr_data(pp_wd[b]),
      .rd_en(pp_re), .rd_addr(pp_ra), .rd_data(pp_rd[b]));
  end

  // ------------------------------------------------------ BN&ReLU, forward
  logic          bn_start, bn_in_valid;
  logic [2:0]    bn_sdone, bn_ov;
  vec_t          bn_mean [3];
  vec_t          bn_inv [3];
  vec_t          bn_out [3];
  vec_t          bn_xh [3];
  logic [CH_T-1:0] bn_mk [3];

  for (genvar b = 0; b < 3; b++) begin : g_bn
    bn_relu u_bn (
      .clk, .rst_n, .start(bn_start), .log2n(c_log2n), .gamma(bn_gamma[b]), .beta(bn_beta[b]),
      .in_valid(bn_in_valid), .in_data(pp_rd[b]), .stat_done(bn_sdone[b]),
      .mean(bn_mean[b]), .inv_std(bn_inv[b]), .out_valid(bn_ov[b]), .out_data(bn_out[b]),
      .xhat(bn_xh[b]), .mask(bn_mk[b]));
  end

  // ------------------------------------------------------ BN&ReLU, backward
  logic          bb_start, bb_in_valid;
  logic [2:0]    bb_gdone, bb_ov;
  vec_t          bb_dy, bb_dx [3];
  vec_t          bb_xh [3];
  logic [CH_T-1:0] bb_mk [3];
  vec_t          bb_dg [3];
  vec_t          bb_db [3];

  for (genvar b = 0; b < 3; b++) begin : g_bb
    bn_relu_bwd u_bb (
      .clk, .rst_n, .start(bb_start), .log2n(cmd_log2n), .gamma(bn_gamma[b]),
      .inv_std(inv_mem[b][cmd_tile]), .in_valid(bb_in_valid), .dy(bb_dy),
      .mask(bb_mk[b]), .xhat(bb_xh[b]), .grad_done(bb_gdone[b]),
      .dgamma(bb_dg[b]), .dbeta(bb_db[b]), .out_valid(bb_ov[b]), .dx(bb_dx[b]));
    assign bn_dgamma[b] = bb_dg[b];
    assign bn_dbeta[b]  = bb_db[b];
  end

  // ------------------------------------------------------ shortcut addition
  logic sc_in_valid, sc_ov;
  vec_t sc_a, sc_b, sc_c, sc_out;
  logic [2:0] sc_en;

  shortcut_add u_sc (
    .clk, .rst_n, .in_valid(sc_in_valid), .br_en(sc_en),
    .br3(sc_a), .br1(sc_b), .brid(sc_c), .out_valid(sc_ov), .out_data(sc_out));

  // ------------------------------------------------------------------ SGD
  logic          sgd_in_valid, sgd_ov;
  vec_t          sgd_w, sgd_v, sgd_g, sgd_wo, sgd_vo;

  sgd_momentum u_sgd (
    .clk, .rst_n, .lr, .momentum, .in_valid(sgd_in_valid),
    .w_in(sgd_w), .v_in(sgd_v), .g_in(sgd_g),
    .out_valid(sgd_ov), .w_out(sgd_wo), .v_out(sgd_vo));

  // ------------------------------------------------------- pipeline tags
  logic [AW-1:0] ra_d1, ra_d2;
  logic          re_d1, re_d2;
  logic [6:0]    sg_idx, sg_idx_d;   // SGD word index: 0..71 3x3, 72..79 1x1
  vec_t          id_rd;
  logic          id_rd_v;

  always_ff @(posedge clk) begin
    ra_d1 <= pp_ra;
    ra_d2 <= ra_d1;
    sg_idx_d <= sg_idx;
  end

  // identity branch (forward): copy of input tile co_t into its buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin id_rd_v <= 1'b0; id_rd <= '0; end
    else begin
      id_rd_v <= (state == S_F_IDCOPY);
      if (state == S_F_IDCOPY) id_rd <= act_mem[c_tile * DEPTH + 32'(cnt)];
    end
  end
  assign id_we = id_rd_v;
  assign id_wa = ra_d1;
  assign id_wd = id_rd;

  // ------------------------------------------------------ the state machine
  assign busy = (state != S_IDLE);
  assign eng_start = (state == S_ENG_START);
  assign pp_swap   = ((state == S_ENG_WAIT) && f3 && f1 && fd3 && fd1 && eng_last && !is_bwd)
                   || (state == S_SGD && sg_idx == 7'd80 && eng_last);
  assign bn_start  = (state == S_ENG_WAIT) && f3 && f1 && eng_last && !is_bwd;
  assign pp_re     = ((state == S_F_STAT || state == S_F_APPLY) && (cnt < 11'(n_out)))
                   || ((state == S_B_SUM) && (cnt < 11'(n_in)));
  assign pp_ra       = AW'(cnt);
  assign bn_in_valid = re_d1;
  assign bb_start    = (state == S_IDLE) && cmd_valid && (cmd_op == OP_BNB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin re_d1 <= 1'b0; re_d2 <= 1'b0; end
    else begin re_d1 <= pp_re; re_d2 <= re_d1; end
  end

  // shortcut inputs: forward = BN outputs, backward = deConv results + identity error
  vec_t  idb_rd;
  always_ff @(posedge clk)
    if (state == S_B_SUM) idb_rd <= ebr_mem[2][c_tile * DEPTH + 32'(pp_ra)];

  always_comb begin
    if (c_op == OP_FWD) begin
      sc_in_valid = bn_ov[0];
      sc_a = bn_out[0]; sc_b = bn_out[1]; sc_c = bn_out[2];
    end else begin
      sc_in_valid = re_d1 && (state == S_B_SUM || state == S_B_DRAIN);
      sc_a = pp_rd[0]; sc_b = pp_rd[1]; sc_c = idb_rd;
    end
    sc_en = {c_id, 2'b11};
  end

  logic [AW-1:0] sc_addr;
  always_ff @(posedge clk) sc_addr <= (c_op == OP_FWD) ? ra_d2 : ra_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin out_valid <= 1'b0; out_addr <= '0; out_data <= '0; end
    else begin
      out_valid <= sc_ov && (c_op == OP_FWD || c_op == OP_BWD);
      out_addr  <= sc_addr;
      out_data  <= sc_out;
    end
  end

  // keep xhat / mask / inv_std of the forward pass
  always_ff @(posedge clk) begin
    if (bn_ov[0])
      for (int b = 0; b < 3; b++) begin
        xh_mem[b][c_tile * DEPTH + 32'(ra_d2)] <= bn_xh[b];
        mk_mem[b][c_tile * DEPTH + 32'(ra_d2)] <= bn_mk[b];
      end
    if (bn_sdone[0])
      for (int b = 0; b < 3; b++) inv_mem[b][c_tile] <= bn_inv[b];
  end

  // BN backward streams: dy, xhat, mask read at cnt, used one cycle later
  logic          bb_re;
  logic [AW-1:0] bb_ra, bb_ra_d1, bb_ra_d2;
  assign bb_re = (state == S_N_SUM || state == S_N_ERR) && (cnt < 11'(n_out));
  assign bb_ra = AW'(cnt);
  always_ff @(posedge clk) begin
    bb_ra_d1 <= bb_ra;
    bb_ra_d2 <= bb_ra_d1;
    if (bb_re) begin
      bb_dy <= err_mem[c_tile * DEPTH + 32'(bb_ra)];
      for (int b = 0; b < 3; b++) begin
        bb_xh[b] <= xh_mem[b][c_tile * DEPTH + 32'(bb_ra)];
        bb_mk[b] <= mk_mem[b][c_tile * DEPTH + 32'(bb_ra)];
      end
    end
    if (bb_ov[0])
      for (int b = 0; b < 3; b++) ebr_mem[b][c_tile * DEPTH + 32'(bb_ra_d2)] <= bb_dx[b];
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bb_in_valid <= 1'b0;
    else        bb_in_valid <= bb_re;

  // SGD operands: one word (CH_T input channels) of (co, tap) per cycle
  always_comb begin
    logic [2:0] co; logic [3:0] tap;
    co  = (sg_idx < 7'd72) ? 3'(sg_idx / 9) : 3'(sg_idx - 7'd72);
    tap = (sg_idx < 7'd72) ? 4'(sg_idx % 9) : 4'd0;
    sgd_in_valid = (state == S_SGD) && (sg_idx < 7'd80);
    for (int c = 0; c < CH_T; c++) begin
      if (sg_idx < 7'd72) begin
        sgd_w[c] = w3_cur[co][c][tap / 3][tap % 3];
        sgd_v[c] = v3_cur[co][c][tap / 3][tap % 3];
        sgd_g[c] = g3[co][c][tap / 3][tap % 3];
      end else begin
        sgd_w[c] = w1_cur[co][c][0][0];
        sgd_v[c] = v1_cur[co][c][0][0];
        sgd_g[c] = g1[co][c][0][0];
      end
    end
  end

  // weight / velocity memories: host port, load_weight, SGD write-back
  logic [6:0] lw_idx, lw_idx_d;
  logic       lw_v;
  vec_t       lw_w3, lw_v3, lw_w1, lw_v1;
  always_ff @(posedge clk) begin
    if (wv_wr) begin
      if (wv_k1) begin
        if (wv_vel) v1_mem[w1a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co))] <= wv_data;
        else        w1_mem[w1a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co))] <= wv_data;
      end else begin
        if (wv_vel) v3_mem[w3a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co), 32'(wv_tap))] <= wv_data;
        else        w3_mem[w3a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co), 32'(wv_tap))] <= wv_data;
      end
    end
    if (sgd_ov) begin
      if (sg_idx_d < 7'd72) begin
        w3_mem[w3a(32'(co_t), 32'(ci_t), 32'(sg_idx_d / 9), 32'(sg_idx_d % 9))] <= sgd_wo;
        v3_mem[w3a(32'(co_t), 32'(ci_t), 32'(sg_idx_d / 9), 32'(sg_idx_d % 9))] <= sgd_vo;
      end else begin
        w1_mem[w1a(32'(co_t), 32'(ci_t), 32'(sg_idx_d - 7'd72))] <= sgd_wo;
        v1_mem[w1a(32'(co_t), 32'(ci_t), 32'(sg_idx_d - 7'd72))] <= sgd_vo;
      end
    end
    // load_weight: one 3x3 word (and, for the first 8, one 1x1 word) per cycle
    lw_w3 <= w3_mem[w3a(32'(co_t), 32'(ci_t), 32'(lw_idx / 9), 32'(lw_idx % 9))];
    lw_v3 <= v3_mem[w3a(32'(co_t), 32'(ci_t), 32'(lw_idx / 9), 32'(lw_idx % 9))];
    lw_w1 <= w1_mem[w1a(32'(co_t), 32'(ci_t), 32'(lw_idx[2:0]))];
    lw_v1 <= v1_mem[w1a(32'(co_t), 32'(ci_t), 32'(lw_idx[2:0]))];
    lw_idx_d <= lw_idx;
    lw_v     <= (state == S_LOADW) && (lw_idx < 7'd72);
    if (lw_v)
      for (int c = 0; c < CH_T; c++) begin
        w3_cur[lw_idx_d / 9][c][(lw_idx_d % 9) / 3][(lw_idx_d % 9) % 3] <= lw_w3[c];
        v3_cur[lw_idx_d / 9][c][(lw_idx_d % 9) / 3][(lw_idx_d % 9) % 3] <= lw_v3[c];
        if (lw_idx_d < 7'd8) begin
          w1_cur[lw_idx_d[2:0]][c][0][0] <= lw_w1[c];
          v1_cur[lw_idx_d[2:0]][c][0][0] <= lw_v1[c];
        end
      end
  end
  assign wv_rd_data = wv_k1
    ? (wv_vel ? v1_mem[w1a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co))]
              : w1_mem[w1a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co))])
    : (wv_vel ? v3_mem[w3a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co), 32'(wv_tap))]
              : w3_mem[w3a(32'(wv_co_t), 32'(wv_ci_t), 32'(wv_co), 32'(wv_tap))]);

  // host writes of activations and errors
  always_ff @(posedge clk) begin
    if (act_wr) act_mem[act_tile * DEPTH + 32'(act_addr)] <= act_data;
    if (err_wr) err_mem[err_tile * DEPTH + 32'(err_addr)] <= err_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; cnt <= '0; it <= '0; lw_idx <= '0; sg_idx <= '0;
      c_op <= OP_IDLE; c_tile <= '0; c_n <= '0; c_h <= '0; c_w <= '0;
      c_s2 <= 1'b0; c_id <= 1'b0; c_log2n <= '0;
      f3 <= 1'b0; f1 <= 1'b0; fd3 <= 1'b0; fd1 <= 1'b0;
    end else begin
      done <= 1'b0;
      if (c3_done) f3  <= 1'b1;
      if (c1_done) f1  <= 1'b1;
      if (d3_done) fd3 <= 1'b1;
      if (d1_done) fd1 <= 1'b1;
      case (state)
        S_IDLE: if (cmd_valid) begin
          c_op <= cmd_op; c_tile <= cmd_tile; c_n <= cmd_n_tiles; c_h <= cmd_h; c_w <= cmd_w;
          c_s2 <= cmd_stride2; c_id <= cmd_id_en && !cmd_stride2; c_log2n <= cmd_log2n;
          it <= '0; cnt <= '0; lw_idx <= '0;
          case (cmd_op)
            OP_FWD:   state <= (cmd_id_en && !cmd_stride2) ? S_F_IDCOPY : S_LOADW;
            OP_BWD:   state <= S_LOADW;
            OP_BNB: state <= S_N_SUM;
            default:  state <= S_IDLE;
          endcase
        end
        S_F_IDCOPY: begin
          if (cnt == 11'(n_in) - 1'b1) begin state <= S_LOADW; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_LOADW: begin
          if (lw_idx == 7'd73) begin state <= S_ENG_START; lw_idx <= '0; end
          else lw_idx <= lw_idx + 1'b1;
        end
        S_ENG_START: begin
          state <= S_ENG_WAIT;
          f3 <= 1'b0; f1 <= 1'b0;
          fd3 <= !is_bwd; fd1 <= !is_bwd;
        end
        S_ENG_WAIT: if (f3 && f1 && fd3 && fd1) begin
          if (is_bwd) begin state <= S_SGD; sg_idx <= '0; end
          else if (eng_last) begin state <= S_F_STAT; cnt <= '0; end
          else begin state <= S_LOADW; it <= it + 1'b1; end
        end
        S_SGD: begin
          if (sg_idx == 7'd80) begin
            sg_idx <= '0;
            if (eng_last) begin state <= S_B_SUM; cnt <= '0; end
            else begin state <= S_LOADW; it <= it + 1'b1; end
          end else sg_idx <= sg_idx + 1'b1;
        end
        S_F_STAT: begin
          if (cnt >= 11'(n_out)) begin
            state <= S_F_STAT_WAIT;
          end else cnt <= cnt + 1'b1;
        end
        S_F_STAT_WAIT: if (bn_sdone[0]) begin state <= S_F_APPLY; cnt <= '0; end
        S_F_APPLY: begin
          if (cnt >= 11'(n_out)) begin state <= S_F_DRAIN; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_F_DRAIN, S_B_DRAIN, S_N_DRAIN: begin
          if (cnt == 11'd4) state <= S_DONE;
          cnt <= cnt + 1'b1;
        end
        S_B_SUM: begin
          if (cnt >= 11'(n_in)) begin state <= S_B_DRAIN; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_N_SUM: begin
          if (bb_gdone[0]) begin state <= S_N_ERR; cnt <= '0; end
          else if (cnt < 11'(n_out)) cnt <= cnt + 1'b1;
        end
        S_N_ERR: begin
          if (cnt >= 11'(n_out)) begin state <= S_N_DRAIN; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        S_DONE: begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- AvgPool -> FC
  vec_t fc_dx_keep [NIN_FC/CH_T];
  logic fc_dx_valid;
  logic [$clog2(NIN_FC/CH_T)-1:0] fc_dx_tile;
  vec_t fc_dx_data;
  logic [$clog2(NIN_FC/CH_T)-1:0] pool_tile_q;

  always_ff @(posedge clk) begin
    if (pool_start) pool_tile_q <= pool_tile;
    if (fc_dx_valid) fc_dx_keep[fc_dx_tile] <= fc_dx_data;
  end

  avgpool u_pool (
    .clk, .rst_n, .start(pool_start), .bwd(pool_bwd), .log2n(pool_log2n),
    .err(fc_dx_keep[pool_tile]), .in_valid(pool_in_valid), .in_data(pool_in_data),
    .out_valid(pool_out_valid), .out_last(pool_out_last), .out_data(pool_out_data));

  fc_unit #(.NIN(NIN_FC), .NOUT(NOUT_FC)) u_fc (
    .clk, .rst_n,
    .w_wr(fc_w_wr), .w_o(fc_w_o), .w_tile(fc_w_tile), .w_data(fc_w_data),
    .b_wr(fc_b_wr), .b_o(fc_b_o), .b_data(fc_b_data),
    .x_wr(pool_out_valid && !pool_bwd), .x_tile(pool_tile_q), .x_data(pool_out_data),
    .dy_wr(fc_dy_wr), .dy_o(fc_dy_o), .dy_data(fc_dy_data),
    .start_fwd(fc_start_fwd), .start_bwd(fc_start_bwd), .busy(fc_busy), .done(fc_done),
    .y_valid(fc_y_valid), .y_idx(fc_y_idx), .y_data(fc_y_data),
    .dx_valid(fc_dx_valid), .dx_tile(fc_dx_tile), .dx_data(fc_dx_data),
    .g_valid(fc_g_valid), .g_o(fc_g_o), .g_tile(fc_g_tile), .g_data(fc_g_data));
endmodule
