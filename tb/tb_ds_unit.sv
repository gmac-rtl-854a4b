// tb_ds_unit: farthest point sampling over voxel lists held by the testbench.
// The sampled sequence is compared with a reference FPS written here
// (first sample = entry 0, squared distances, largest minimum distance,
// lowest index on ties). Also checks the clipping of n_samples to the list
// size, the empty and single-voxel cases, that each sample after the first
// takes ceil(n/LANES)+4 clocks, and reprogramming of one axis' arrays (all
// square-row x weights doubled, so x distances count twice).
module tb_ds_unit;
  import gmac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [10:0] n_samples = 0, n_act = 0;
  logic [9:0] rd_row;
  vaddr_t rd_vox [4];
  logic smp_en; logic [9:0] smp_idx; vaddr_t smp_vox;
  logic ac_prog_en = 0; logic [1:0] ac_prog_axis = 0, ac_prog_row = 0; logic [3:0] ac_prog_col = 0; logic [7:0] ac_prog_val = 0;
  logic busy, done;

  ds_unit dut (.*);

  vaddr_t list [1024];
  always_comb for (int l = 0; l < 4; l++) rd_vox[l] = list[10'(int'(rd_row) * 4 + l)];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int got_idx[$];
  int got_cyc[$];
  always @(posedge clk) if (rst_n && smp_en) begin
    got_idx.push_back(int'(smp_idx));
    got_cyc.push_back(cyc);
    checks++;
    if (smp_vox != list[smp_idx]) begin failures++; $display("FAIL smp_vox idx=%0d %h exp %h", smp_idx, smp_vox, list[smp_idx]); end
  end

  function automatic int sqdist(vaddr_t a, vaddr_t b, int wx);
    voxel_t va, vb;
    va = addr2vox(a); vb = addr2vox(b);
    return wx * (int'(va.x) - int'(vb.x)) ** 2 + (int'(va.y) - int'(vb.y)) ** 2 + (int'(va.z) - int'(vb.z)) ** 2;
  endfunction

  task automatic run(int n, int m, int wx);
    int exp_idx[$];
    int mind[];
    int k, cnt;
    got_idx.delete(); got_cyc.delete();
    // reference
    cnt = (m > n) ? n : m;
    mind = new[n];
    if (cnt > 0) begin
      exp_idx.push_back(0);
      for (int i = 0; i < n; i++) mind[i] = 1 << 30;
      k = 0;
      while (exp_idx.size() < cnt) begin
        int best, bv;
        best = -1; bv = -1;
        for (int i = 0; i < n; i++) begin
          int d;
          d = sqdist(list[i], list[k], wx);
          if (d < mind[i]) mind[i] = d;
          if (mind[i] > bv) begin bv = mind[i]; best = i; end
        end
        k = best;
        exp_idx.push_back(best);
      end
    end
    @(negedge clk);
    start = 1; n_act = 11'(n); n_samples = 11'(m);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (got_idx.size() != exp_idx.size()) begin
      failures++; $display("FAIL n=%0d m=%0d got %0d samples exp %0d", n, m, got_idx.size(), exp_idx.size());
    end else begin
      for (int i = 0; i < exp_idx.size(); i++) begin
        checks++;
        if (got_idx[i] != exp_idx[i]) begin failures++; $display("FAIL n=%0d sample %0d got %0d exp %0d", n, i, got_idx[i], exp_idx[i]); end
        if (i > 0) begin
          checks++;
          if (got_cyc[i] - got_cyc[i-1] != (n + 3) / 4 + 4) begin
            failures++; $display("FAIL timing %0d exp %0d", got_cyc[i] - got_cyc[i-1], (n + 3) / 4 + 4);
          end
        end
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  task automatic make_list(int n);
    bit used[int];
    for (int i = 0; i < n; i++) begin
      int v;
      do v = $urandom_range(0, 4095); while (used.exists(v));
      used[v] = 1;
      list[i] = vaddr_t'(v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_list(50);  run(50, 12, 1);
    make_list(37);  run(37, 37, 1);
    make_list(9);   run(9, 20, 1);    // clipped to 9
    make_list(1);   run(1, 5, 1);
    run(0, 5, 1);
    // all voxels of a 10x10x10 grid
    for (int i = 0; i < 1000; i++) list[i] = vox2addr('{vidx_t'(i / 100), vidx_t'((i / 10) % 10), vidx_t'(i % 10)});
    run(1000, 16, 1);
    // x axis arrays with doubled weights
    for (int c = 0; c < 16; c++) begin
      @(negedge clk); ac_prog_en = 1; ac_prog_axis = 0; ac_prog_row = 2'd2; ac_prog_col = 4'(c); ac_prog_val = 8'(2 * c);
    end
    @(negedge clk); ac_prog_en = 0;
    make_list(64); run(64, 20, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
