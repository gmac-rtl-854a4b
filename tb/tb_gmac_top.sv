// tb_gmac_top: end-to-end frames through the whole accelerator, all
// parameters at their defaults.
// A reference model written here maps every point (segment search on the
// programmed grid), builds the activated-voxel list in first-seen order,
// runs the local layer and per-voxel max-pooling, farthest point sampling over
// the voxel list, global max-pooling of the sampled voxels, the FC layer and
// batch-norm, and the results are compared with the design: the FPS sample
// sequence and every class score.
// Frames:
//  1. 300 clustered points, whole-voxel groups, 20 samples
//  2. the same points, half-voxel groups along y (right side, biased)
//  3. 40 points with more samples requested than voxels (clipped)
//  4. a full 10,000-point frame on the 10x10x10 grid, 512 samples
//  then the full-frame points again on 4x4x4 and 8x8x8 grids
//  5. a 16x16x16 grid with 3,000 points: more than 1,024 voxels (overflow)
// Mechanisms counted (each must occur): parallel down-sampling and feature
// computation, points joining an already active voxel, left and right
// pointers, biased half-voxel groups, voxels excluded by the FPS gating,
// clipped sample count, voxel-list overflow, frame clear.
module tb_gmac_top;
  import gmac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_gm_en = 0, cfg_gm_level = 0; logic [1:0] cfg_gm_axis = 0; logic [3:0] cfg_gm_idx = 0; coord_t cfg_gm_val = 0;
  coord_t cfg_half_step = 16'sd3277;
  logic cfg_ac_en = 0; logic [1:0] cfg_ac_axis = 0, cfg_ac_row = 0; logic [3:0] cfg_ac_col = 0; logic [7:0] cfg_ac_val = 0;
  logic cfg_wl_en = 0; logic [1:0] cfg_wl_row = 0; logic [5:0] cfg_wl_col = 0; logic signed [7:0] cfg_wl_val = 0;
  logic cfg_wg_en = 0; logic [5:0] cfg_wg_row = 0; logic [5:0] cfg_wg_col = 0; logic signed [7:0] cfg_wg_val = 0;
  logic cfg_bn_en = 0; logic [5:0] cfg_bn_ch = 0; logic signed [15:0] cfg_bn_gamma = 0, cfg_bn_beta = 0; logic cfg_bn_relu = 0;
  logic cfg_grp_half = 0; logic [1:0] cfg_grp_axis = 0; logic cfg_grp_side = 0, cfg_grp_bias = 0;
  logic frame_clear = 0, pt_valid = 0, start = 0;
  point_t pt = '0;
  logic [10:0] n_samples = 0;
  logic smp_valid; vaddr_t smp_vox; logic score_valid; logic [39:0][15:0] score; logic done;
  logic [10:0] n_act; logic [13:0] n_pts; logic map_overflow, buf_full, ds_busy, fe_busy;

  gmac_top dut (.*);

  // ---------------- mechanism counters ----------------
  int m_parallel = 0, m_dup = 0, m_left = 0, m_right = 0, m_half = 0, m_gated = 0, m_clip = 0, m_ovf = 0, m_clear = 0;
  always @(posedge clk) if (rst_n && ds_busy && fe_busy) m_parallel++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
  endtask

  // ---------------- model state ----------------
  int bnd [16];          // first-level grid (shared by the three axes)
  int nseg;
  int h2;                // second-level split
  int wl [3][64];
  int wg [64][40];
  int gam [40], bet [40];
  bit relu_on;

  point_t pts [$];
  int     got_smp [$];
  logic [39:0][15:0] got_score;
  bit     got_score_v;

  always @(posedge clk) if (rst_n) begin
    if (smp_valid) got_smp.push_back(int'(smp_vox));
    if (score_valid) begin got_score = score; got_score_v = 1; end
  end

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic void map1(int c, output int idx, output int loc);
    idx = 0;
    for (int k = 1; k < nseg; k++) if (c >= bnd[k]) idx = k;
    loc = c - bnd[idx];
  endfunction

  // ---------------- configuration ----------------
  task automatic program_grid(int segs, int step);
    nseg = segs;
    for (int k = 0; k < 16; k++) begin
      bnd[k] = (k < segs) ? (step == 0 ? -32768 + (k * 32768) / 5 : -32768 + k * step) : 32767;
      for (int a = 0; a < 3; a++) begin
        @(negedge clk); cfg_gm_en = 1; cfg_gm_level = 0; cfg_gm_axis = 2'(a); cfg_gm_idx = 4'(k); cfg_gm_val = coord_t'(bnd[k]);
      end
    end
    h2 = (step == 0 ? 6554 : step) / 2;
    cfg_half_step = coord_t'(h2);
    for (int a = 0; a < 3; a++) begin
      @(negedge clk); cfg_gm_en = 1; cfg_gm_level = 1; cfg_gm_axis = 2'(a); cfg_gm_idx = 4'd1; cfg_gm_val = coord_t'(h2);
    end
    @(negedge clk); cfg_gm_en = 0;
  endtask

  task automatic program_weights();
    for (int i = 0; i < 3; i++) for (int o = 0; o < 64; o++) begin
      wl[i][o] = int'($urandom_range(0, 80)) - 40;
      @(negedge clk); cfg_wl_en = 1; cfg_wl_row = 2'(i); cfg_wl_col = 6'(o); cfg_wl_val = 8'(wl[i][o]);
    end
    @(negedge clk); cfg_wl_en = 0;
    for (int i = 0; i < 64; i++) for (int o = 0; o < 40; o++) begin
      wg[i][o] = int'($urandom_range(0, 6)) - 3;
      @(negedge clk); cfg_wg_en = 1; cfg_wg_row = 6'(i); cfg_wg_col = 6'(o); cfg_wg_val = 8'(wg[i][o]);
    end
    @(negedge clk); cfg_wg_en = 0;
    for (int c = 0; c < 40; c++) begin
      gam[c] = int'($urandom_range(128, 512)); bet[c] = int'($urandom_range(0, 2000)) - 1000;
      @(negedge clk); cfg_bn_en = 1; cfg_bn_ch = 6'(c); cfg_bn_gamma = 16'(gam[c]); cfg_bn_beta = 16'(bet[c]);
    end
    @(negedge clk); cfg_bn_en = 0;
    relu_on = 0; cfg_bn_relu = 0;
  endtask

  // ---------------- one frame ----------------
  task automatic run_frame(string name, int m, bit half, int axis, bit side, bit bias);
    int vlist [$];
    int vpos [int];
    int locs [$][3];
    int vox_of [$];
    int ptrs [$];
    int feat [][64];
    bit has [];
    int exp_smp [$];
    int gmax [64];
    bit gany;
    int cnt, n, t_start, t_end;
    longint acc;
    int exp_sc [40];

    // clear and stream the points
    @(negedge clk); frame_clear = 1;
    @(negedge clk); frame_clear = 0;
    m_clear++;
    foreach (pts[i]) begin
      int c [3], vi [3], lo [3], key, pb;
      c[0] = int'(pts[i].x); c[1] = int'(pts[i].y); c[2] = int'(pts[i].z);
      pb = 0;
      for (int a = 0; a < 3; a++) begin
        map1(c[a], vi[a], lo[a]);
        if (lo[a] >= h2) begin pb |= (1 << a); m_right++; end else m_left++;
      end
      key = vi[0] * 256 + vi[1] * 16 + vi[2];
      if (vpos.exists(key)) m_dup++;
      else if (vlist.size() < 1024) begin vpos[key] = vlist.size(); vlist.push_back(key); end
      else m_ovf += 0;
      locs.push_back('{lo[0], lo[1], lo[2]});
      vox_of.push_back(key);
      ptrs.push_back(pb);
      @(negedge clk); pt_valid = 1; pt = pts[i];
    end
    @(negedge clk); pt_valid = 0;
    repeat (3) @(negedge clk);
    n = vlist.size();
    chk(int'(n_act) == n, $sformatf("%s n_act %0d exp %0d", name, n_act, n));
    chk(int'(n_pts) == pts.size(), $sformatf("%s n_pts", name));
    if (map_overflow) m_ovf++;

    // reference: local features per voxel
    feat = new[n]; has = new[n];
    for (int i = 0; i < n; i++) begin
      has[i] = 0;
      for (int c = 0; c < 64; c++) feat[i][c] = 0;
    end
    foreach (locs[p]) begin
      int x [3], vi;
      if (!vpos.exists(vox_of[p])) continue;
      vi = vpos[vox_of[p]];
      if (half && ((ptrs[p] >> axis) & 1) != int'(side)) continue;
      for (int a = 0; a < 3; a++) x[a] = locs[p][a];
      if (bias) x[axis] += (((ptrs[p] >> axis) & 1) != 0) ? h2 : -h2;
      for (int c = 0; c < 64; c++) begin
        int y;
        acc = 0;
        for (int a = 0; a < 3; a++) acc += longint'(x[a]) * wl[a][c];
        acc = acc >>> 7;
        if (acc < 0) acc = 0;
        y = sat16(acc);
        if (!has[vi] || y > feat[vi][c]) feat[vi][c] = y;
      end
      has[vi] = 1;
    end
    if (half) m_half++;

    // reference: FPS
    cnt = (m > n) ? n : m;
    if (m > n) m_clip++;
    if (cnt > 0) begin
      int mind [];
      int k;
      mind = new[n];
      for (int i = 0; i < n; i++) mind[i] = 1 << 30;
      exp_smp.push_back(0); k = 0;
      while (exp_smp.size() < cnt) begin
        int best, bv;
        best = -1; bv = -1;
        for (int i = 0; i < n; i++) begin
          int d, a1, a2;
          d = 0;
          for (int s = 8; s >= 0; s -= 4) begin
            a1 = (vlist[i] >> s) & 15; a2 = (vlist[k] >> s) & 15;
            d += (a1 - a2) * (a1 - a2);
          end
          if (d < mind[i]) mind[i] = d;
          if (mind[i] > bv) begin bv = mind[i]; best = i; end
        end
        k = best; exp_smp.push_back(best);
      end
    end
    if (cnt < n) m_gated++;

    // reference: global pooling over sampled voxels, FC, BN
    gany = 0;
    for (int c = 0; c < 64; c++) gmax[c] = 0;
    foreach (exp_smp[j]) begin
      for (int c = 0; c < 64; c++) if (!gany || feat[exp_smp[j]][c] > gmax[c]) gmax[c] = feat[exp_smp[j]][c];
      gany = 1;
    end
    for (int o = 0; o < 40; o++) begin
      longint t;
      acc = 0;
      for (int c = 0; c < 64; c++) acc += longint'(gmax[c]) * wg[c][o];
      t = sat16(acc >>> 7);
      t = ((t * gam[o]) >>> 8) + bet[o];
      if (relu_on && t < 0) t = 0;
      exp_sc[o] = sat16(t);
    end

    // run
    got_smp.delete(); got_score_v = 0;
    cfg_grp_half = half; cfg_grp_axis = 2'(axis); cfg_grp_side = side; cfg_grp_bias = bias;
    @(negedge clk); start = 1; n_samples = 11'(m); t_start = $time;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t_end = $time;
    @(negedge clk);
    chk(got_score_v, {name, " score_valid"});
    chk(got_smp.size() == cnt, $sformatf("%s samples %0d exp %0d", name, got_smp.size(), cnt));
    if (got_smp.size() == cnt)
      foreach (exp_smp[j]) chk(got_smp[j] == vlist[exp_smp[j]], $sformatf("%s sample %0d", name, j));
    for (int o = 0; o < 40; o++)
      chk($signed(got_score[o]) == exp_sc[o], $sformatf("%s score %0d = %0d exp %0d", name, o, $signed(got_score[o]), exp_sc[o]));
    $display("%s: %0d points, %0d voxels, %0d samples, %0d cycles from start to done",
             name, pts.size(), n, cnt, (t_end - t_start) / 10);
  endtask

  function automatic coord_t rc(int lo, int hi);
    return coord_t'(int'($urandom_range(0, hi - lo)) + lo);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_weights();
    program_grid(10, 0);
    // 1: clustered points
    pts.delete();
    for (int i = 0; i < 300; i++) pts.push_back('{rc(-20000, 3000), rc(0, 20000), rc(-5000, 12000)});
    run_frame("clustered", 20, 0, 0, 0, 0);
    // 2: half-voxel groups along y, right side, with bias
    run_frame("half-y", 20, 1, 1, 1, 1);
    // 3: more samples than voxels
    pts.delete();
    for (int i = 0; i < 40; i++) pts.push_back('{rc(-32768, 32767), rc(-32768, 32767), rc(-32768, 32767)});
    run_frame("clip", 200, 0, 0, 0, 0);
    // 4: full frame
    pts.delete();
    for (int i = 0; i < 10000; i++) pts.push_back('{rc(-32768, 32767), rc(-32768, 32767), rc(-32768, 32767)});
    run_frame("full", 512, 0, 0, 0, 0);
    // design-space points: 4 and 8 segments per axis
    program_grid(4, 16384);
    run_frame("n4", 16, 0, 0, 0, 0);
    program_grid(8, 8192);
    run_frame("n8", 64, 1, 0, 0, 1);
    // 5: 16 segments of 0.125 per axis, more voxels than the list holds
    program_grid(16, 4096);
    pts.delete();
    for (int i = 0; i < 3000; i++) pts.push_back('{rc(-32768, 32767), rc(-32768, 32767), rc(-32768, 32767)});
    run_frame("overflow", 64, 1, 2, 0, 1);

    $display("mechanisms: parallel=%0d dup=%0d left=%0d right=%0d half=%0d gated=%0d clip=%0d overflow=%0d clear=%0d",
             m_parallel, m_dup, m_left, m_right, m_half, m_gated, m_clip, m_ovf, m_clear);
    chk(m_parallel > 0, "parallel never happened");
    chk(m_dup > 0, "no shared voxel");
    chk(m_left > 0 && m_right > 0, "pointer sides");
    chk(m_half > 0, "half groups");
    chk(m_gated > 0, "FPS gating");
    chk(m_clip > 0, "clipping");
    chk(m_ovf > 0, "overflow");
    chk(m_clear > 1, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
