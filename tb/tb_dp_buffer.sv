// tb_dp_buffer: fills the double-pointer buffer with random points in a few
// voxels, then queries every voxel in whole-voxel mode and in half-voxel mode
// (each axis and side, with and without the half-step bias) and compares the
// returned points, their order (newest first) and the o_done timing with a
// per-voxel queue model. Also checks an empty voxel, clear, and the full flag
// of a small instance.
module tb_dp_buffer;
  import gmac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, wr_en = 0, q_start = 0, q_mode = 0, q_side = 0, q_bias = 0;
  vaddr_t wr_vox = '0, q_vox = '0;
  point_t wr_loc = '0;
  logic [2:0] wr_ptr = 0;
  logic [1:0] q_axis = 0;
  coord_t half_step = 16'sd3277;
  logic full, q_busy, o_valid, o_done;
  logic [13:0] n_pts;
  point_t o_loc;

  dp_buffer dut (.*);

  logic s_full, s_busy, s_ov, s_od; logic [3:0] s_n; point_t s_loc;
  dp_buffer #(.NPTS(8)) dut_s (.clk, .rst_n, .clear, .wr_en, .wr_vox, .wr_loc, .wr_ptr, .full(s_full), .n_pts(s_n),
    .q_start(1'b0), .q_vox('0), .q_mode(1'b0), .q_axis(2'd0), .q_side(1'b0), .q_bias(1'b0), .half_step,
    .q_busy(s_busy), .o_valid(s_ov), .o_loc(s_loc), .o_done(s_od));

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  typedef struct { point_t loc; logic [2:0] ptr; } ent_t;
  ent_t   pages [int][$];
  vaddr_t vox_set [8];

  task automatic query(vaddr_t v, bit mode, int axis, bit side, bit bias);
    point_t exp_q[$];
    int n_out, t0, t_done;
    ent_t e;
    point_t p;
    if (pages.exists(int'(v)))
      for (int i = pages[int'(v)].size() - 1; i >= 0; i--) begin
        e = pages[int'(v)][i];
        if (!mode || e.ptr[axis] == side) begin
          p = e.loc;
          if (bias) begin
            coord_t b;
            b = e.ptr[axis] ? half_step : -half_step;
            if (axis == 0) p.x = p.x + b; else if (axis == 1) p.y = p.y + b; else p.z = p.z + b;
          end
          exp_q.push_back(p);
        end
      end
    @(negedge clk);
    q_start = 1; q_vox = v; q_mode = mode; q_axis = 2'(axis); q_side = side; q_bias = bias;
    @(negedge clk); q_start = 0;
    n_out = 0; t0 = 1;
    forever begin
      @(posedge clk); #1;
      t0++;
      if (o_valid) begin
        if (exp_q.size() == 0) chk(0, "extra point");
        else begin
          p = exp_q.pop_front();
          chk(o_loc == p, $sformatf("point v=%0d mode=%0d axis=%0d", v, mode, axis));
        end
      end
      if (o_done) break;
      if (t0 > 2000) break;
    end
    chk(exp_q.size() == 0, "points missing");
    // the walk takes one clock per stored point of the page
    chk(t0 == 1 + (pages.exists(int'(v)) ? pages[int'(v)].size() : 1), $sformatf("done timing %0d", t0));
    @(negedge clk);
    chk(!q_busy, "busy after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      pages.delete();
      for (int i = 0; i < 8; i++) vox_set[i] = vaddr_t'($urandom);
      for (int n = 0; n < 400; n++) begin
        ent_t e;
        vaddr_t v;
        v = vox_set[$urandom_range(0, 6)];  // vox_set[7] stays empty
        e.loc = '{coord_t'($urandom_range(0, 6553)), coord_t'($urandom_range(0, 6553)), coord_t'($urandom_range(0, 6553))};
        e.ptr = 3'($urandom);
        @(negedge clk); wr_en = 1; wr_vox = v; wr_loc = e.loc; wr_ptr = e.ptr;
        pages[int'(v)].push_back(e);
      end
      @(negedge clk); wr_en = 0;
      chk(n_pts == 400, "n_pts");
      chk(s_full && s_n == 8, "small buffer full");
      for (int i = 0; i < 8; i++) begin
        query(vox_set[i], 0, 0, 0, 0);
        for (int a = 0; a < 3; a++) begin
          query(vox_set[i], 1, a, 0, 0);
          query(vox_set[i], 1, a, 0, 1);
          query(vox_set[i], 1, a, 1, 1);
          query(vox_set[i], 0, a, 0, 1);
        end
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      chk(n_pts == 0 && !s_full, "clear");
      pages.delete();
      query(vox_set[0], 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
