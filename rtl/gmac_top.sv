// gmac_top: point-cloud accelerator with geometric mapping and parallel
// down-sampling / feature computation.
// Idea: each point is split by geometric mapping into a voxel (its global
// location on a coarse grid) and a local coordinate inside that voxel.
// Down-sampling (farthest point sampling) then only needs the small integer
// voxel coordinates, while the local feature network only needs the local
// coordinates, so the two run at the same time and meet at the end through a
// Hadamard product (here: the FPS result gates which voxel features enter the
// global pooling).
// Phases of one frame:
//  1. Load: points stream in on pt_valid/pt, one per clock. First-level
//     mapping gives voxel and local coordinate, second-level mapping of the
//     local coordinate gives the left/right pointer bits. Each point is
//     appended to the D-P buffer; its voxel is activated in the voxel map.
//  2. Run (on 'start'): the down-sampling unit picks n_samples voxels by FPS
//     while, in parallel, the feature path walks every activated voxel's page
//     in the D-P buffer, pushes each point through the local MLP layer and
//     max-pools the group into the local feature buffer. Group selection is
//     set by cfg_grp_* (whole voxel, or one half along an axis with optional
//     half-step bias).
//  3. Global: when both are done, the local features of FPS-sampled voxels are
//     max-pooled, passed through the global fully-connected layer and
//     batch-norm/activation, and leave on score_valid/score; 'done' pulses.
// 'frame_clear' empties the map and buffer for the next frame.
// Programming ports (cfg_*) load the mapping boundaries, address-index
// weights, MLP and FC weights and the BN parameters; reset values are a
// 10-segment grid on [-1,1), alpha = 1 and zero weights.
// Block structure follows the architecture; the phase sequencing, group
// selection port and number formats are this design's choices.
module gmac_top
  import gmac_pkg::*;
#(
  parameter int NPTS  = 10000,
  parameter int LANES = 4,
  parameter int C     = 64,
  parameter int NCLS  = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_gm_en,
  input  logic                    cfg_gm_level,      // 0 first, 1 second level
  input  logic [1:0]              cfg_gm_axis,
  input  logic [3:0]              cfg_gm_idx,
  input  coord_t                  cfg_gm_val,
  input  coord_t                  cfg_half_step,
  input  logic                    cfg_ac_en,
  input  logic [1:0]              cfg_ac_axis,
  input  logic [1:0]              cfg_ac_row,
  input  logic [3:0]              cfg_ac_col,
  input  logic [7:0]              cfg_ac_val,
  input  logic                    cfg_wl_en,
  input  logic [1:0]              cfg_wl_row,
  input  logic [$clog2(C)-1:0]    cfg_wl_col,
  input  logic signed [7:0]       cfg_wl_val,
  input  logic                    cfg_wg_en,
  input  logic [$clog2(C)-1:0]    cfg_wg_row,
  input  logic [$clog2(NCLS)-1:0] cfg_wg_col,
  input  logic signed [7:0]       cfg_wg_val,
  input  logic                    cfg_bn_en,
  input  logic [$clog2(NCLS)-1:0] cfg_bn_ch,
  input  logic signed [15:0]      cfg_bn_gamma,
  input  logic signed [15:0]      cfg_bn_beta,
  input  logic                    cfg_bn_relu,
  input  logic                    cfg_grp_half,      // 1: half-voxel groups
  input  logic [1:0]              cfg_grp_axis,
  input  logic                    cfg_grp_side,
  input  logic                    cfg_grp_bias,
  // frame
  input  logic                    frame_clear,
  input  logic                    pt_valid,
  input  point_t                  pt,
  input  logic                    start,
  input  logic [AIW:0]            n_samples,
  // results and status
  output logic                    smp_valid,
  output vaddr_t                  smp_vox,
  output logic                    score_valid,
  output logic [NCLS-1:0][XW-1:0] score,
  output logic                    done,
  output logic [AIW:0]            n_act,
  output logic [$clog2(NPTS+1)-1:0] n_pts,
  output logic                    map_overflow,
  output logic                    buf_full,
  output logic                    ds_busy,
  output logic                    fe_busy
);
  // ======================= load path =======================
  logic   g1_v, g2_v;
  voxel_t g1_vox, g2_vox;
  point_t g1_loc, g2_loc;
  voxel_t g1_vox_q;
  point_t g1_loc_q;

  gm_unit #(.NB(16), .SECOND(1'b0)) u_gm1 (
    .clk, .rst_n,
    .prog_en(cfg_gm_en && !cfg_gm_level), .prog_axis(cfg_gm_axis), .prog_idx(cfg_gm_idx), .prog_val(cfg_gm_val),
    .in_valid(pt_valid), .in_pt(pt), .out_valid(g1_v), .out_vox(g1_vox), .out_loc(g1_loc));

  gm_unit #(.NB(16), .SECOND(1'b1)) u_gm2 (
    .clk, .rst_n,
    .prog_en(cfg_gm_en && cfg_gm_level), .prog_axis(cfg_gm_axis), .prog_idx(cfg_gm_idx), .prog_val(cfg_gm_val),
    .in_valid(g1_v), .in_pt(g1_loc), .out_valid(g2_v), .out_vox(g2_vox), .out_loc(g2_loc));

  always_ff @(posedge clk) begin
    if (g1_v) begin
      g1_vox_q <= g1_vox;
      g1_loc_q <= g1_loc;
    end
  end

  // pointer bits for the buffer, 1 = right half: bit0 = x, bit1 = y, bit2 = z
  logic [2:0] ptr_xyz;
  assign ptr_xyz = {g2_vox.z != 0, g2_vox.y != 0, g2_vox.x != 0};

  logic unused_g2;
  assign unused_g2 = ^g2_loc;

  // ======================= voxel map =======================
  logic                 act_new;
  logic [AIW-1:0]       act_idx;
  logic [AIW-1:0]       ds_row;
  vaddr_t               ds_vox [LANES];
  logic [AIW-1:0]       fe_idx;
  vaddr_t               fe_vox;
  logic                 smp_en;
  logic [AIW-1:0]       smp_idx;
  logic [AIW-1:0]       gl_idx;
  logic                 gl_sampled;

  voxel_map #(.NV(NVOX), .MAXA(MAXACT), .LANES(LANES)) u_map (
    .clk, .rst_n, .clear(frame_clear),
    .act_en(g2_v), .act_vox(vox2addr(g1_vox_q)), .act_new(act_new), .act_idx(act_idx),
    .n_act(n_act), .overflow(map_overflow),
    .rd_row_a(ds_row), .rd_vox_a(ds_vox),
    .rd_idx_b(fe_idx), .rd_vox_b(fe_vox),
    .smp_en(smp_en), .smp_idx(smp_idx),
    .q_idx(gl_idx), .q_sampled(gl_sampled));

  logic unused_map;
  assign unused_map = act_new ^ (^act_idx);

  // ======================= D-P buffer =======================
  logic   q_start, q_busy, o_valid, o_done;
  point_t o_loc;

  dp_buffer #(.NPTS(NPTS), .NV(NVOX)) u_dpb (
    .clk, .rst_n, .clear(frame_clear),
    .wr_en(g2_v), .wr_vox(vox2addr(g1_vox_q)), .wr_loc(g1_loc_q), .wr_ptr(ptr_xyz),
    .full(buf_full), .n_pts(n_pts),
    .q_start(q_start), .q_vox(fe_vox), .q_mode(cfg_grp_half), .q_axis(cfg_grp_axis),
    .q_side(cfg_grp_side), .q_bias(cfg_grp_bias), .half_step(cfg_half_step),
    .q_busy(q_busy), .o_valid(o_valid), .o_loc(o_loc), .o_done(o_done));

  logic unused_dpb;
  assign unused_dpb = q_busy;

  // ======================= down-sampling =======================
  logic ds_start, ds_done;

  ds_unit #(.LANES(LANES), .MAXA(MAXACT)) u_ds (
    .clk, .rst_n, .start(ds_start), .n_samples(n_samples), .n_act(n_act),
    .rd_row(ds_row), .rd_vox(ds_vox),
    .smp_en(smp_en), .smp_idx(smp_idx), .smp_vox(smp_vox),
    .ac_prog_en(cfg_ac_en), .ac_prog_axis(cfg_ac_axis), .ac_prog_row(cfg_ac_row),
    .ac_prog_col(cfg_ac_col), .ac_prog_val(cfg_ac_val),
    .busy(ds_busy), .done(ds_done));

  assign smp_valid = smp_en;

  // ======================= local feature path =======================
  logic                mlp_v;
  logic [C-1:0][XW-1:0] mlp_y;
  logic                last_d;
  logic                pool_v;
  logic [C-1:0][XW-1:0] pool_y;

  cim_mvm #(.IN(3), .OUT(C), .XW(XW), .WW(8), .SHIFT(7), .RELU(1'b1)) u_mlp (
    .clk, .rst_n, .w_en(cfg_wl_en), .w_row(cfg_wl_row), .w_col(cfg_wl_col), .w_val(cfg_wl_val),
    .in_valid(o_valid), .in_vec({o_loc.z, o_loc.y, o_loc.x}),
    .out_valid(mlp_v), .out_vec(mlp_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= 1'b0;
    else        last_d <= o_done;
  end

  maxpool #(.C(C), .XW(XW)) u_pool (
    .clk, .rst_n, .in_valid(mlp_v), .in_first(1'b0), .in_last(last_d), .in_vec(mlp_y),
    .out_valid(pool_v), .out_vec(pool_y));

  // ======================= global stage =======================
  logic                 lfb_rd;
  logic [C-1:0][XW-1:0] lfb_q;

  local_feat_buffer #(.DEPTH(MAXACT), .C(C), .XW(XW)) u_lfb (
    .clk, .wr_en(pool_v), .wr_idx(fe_idx), .wr_vec(pool_y),
    .rd_en(lfb_rd), .rd_idx(gl_idx), .rd_vec(lfb_q));

  logic                 gp_v, gp_last, gp_sel;
  logic                 gpool_v;
  logic [C-1:0][XW-1:0] gpool_y;

  maxpool #(.C(C), .XW(XW)) u_gpool (
    .clk, .rst_n, .in_valid(gp_v && gp_sel), .in_first(1'b0), .in_last(gp_last), .in_vec(lfb_q),
    .out_valid(gpool_v), .out_vec(gpool_y));

  logic                    fc_v;
  logic [NCLS-1:0][XW-1:0] fc_y;

  cim_mvm #(.IN(C), .OUT(NCLS), .XW(XW), .WW(8), .SHIFT(7), .RELU(1'b0)) u_fc (
    .clk, .rst_n, .w_en(cfg_wg_en), .w_row(cfg_wg_row), .w_col(cfg_wg_col), .w_val(cfg_wg_val),
    .in_valid(gpool_v), .in_vec(gpool_y), .out_valid(fc_v), .out_vec(fc_y));

  act_bn #(.C(NCLS), .XW(XW)) u_bn (
    .clk, .rst_n, .p_en(cfg_bn_en), .p_ch(cfg_bn_ch), .p_gamma(cfg_bn_gamma), .p_beta(cfg_bn_beta),
    .relu(cfg_bn_relu), .in_valid(fc_v), .in_vec(fc_y), .out_valid(score_valid), .out_vec(score));

  // ======================= sequencing =======================
  typedef enum logic [2:0] {T_IDLE, T_RUN, T_GLOBAL, T_WAIT} tstate_t;
  tstate_t tstate;

  typedef enum logic [1:0] {F_IDLE, F_QUERY, F_WAIT} fstate_t;
  fstate_t fstate;

  logic ds_fin, fe_fin;
  logic [AIW:0] n_act_l;

  assign fe_busy = (fstate != F_IDLE);
  assign lfb_rd  = (tstate == T_GLOBAL) && (n_act_l != '0);
  assign q_start = (fstate == F_QUERY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE; fstate <= F_IDLE; ds_start <= 1'b0; ds_fin <= 1'b0; fe_fin <= 1'b0;
      fe_idx <= '0; gl_idx <= '0; gp_v <= 1'b0; gp_last <= 1'b0; gp_sel <= 1'b0;
      n_act_l <= '0; done <= 1'b0;
    end else begin
      ds_start <= 1'b0;
      done     <= 1'b0;
      gp_v     <= lfb_rd;
      gp_sel   <= gl_sampled;
      gp_last  <= lfb_rd && (int'(gl_idx) + 1 == int'(n_act_l));
      if (ds_done) ds_fin <= 1'b1;

      // feature walker: one voxel page at a time
      unique case (fstate)
        F_IDLE:  ;
        F_QUERY: fstate <= F_WAIT;
        F_WAIT:  if (pool_v) begin
          if (int'(fe_idx) + 1 >= int'(n_act_l)) begin
            fstate <= F_IDLE;
            fe_fin <= 1'b1;
          end else begin
            fe_idx <= fe_idx + 1'b1;
            fstate <= F_QUERY;
          end
        end
        default: fstate <= F_IDLE;
      endcase

      unique case (tstate)
        T_IDLE: if (start) begin
          n_act_l  <= n_act;
          ds_start <= 1'b1;
          ds_fin   <= 1'b0;
          fe_idx   <= '0;
          if (n_act == '0) begin
            fe_fin <= 1'b1;
          end else begin
            fe_fin <= 1'b0;
            fstate <= F_QUERY;
          end
          tstate <= T_RUN;
        end
        T_RUN: if (ds_fin && fe_fin && !ds_start) begin
          gl_idx <= '0;
          tstate <= T_GLOBAL;
        end
        T_GLOBAL: begin
          if (n_act_l == '0) begin
            tstate <= T_WAIT;
          end else begin
            if (int'(gl_idx) + 1 >= int'(n_act_l)) tstate <= T_WAIT;
            else gl_idx <= gl_idx + 1'b1;
          end
        end
        T_WAIT: if (score_valid || (n_act_l == '0)) begin
          done   <= 1'b1;
          tstate <= T_IDLE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end
endmodule
