// tb_voxel_map: activation, list order, both read ports, sampled bits, clear
// and overflow of the searched voxel map, against a queue/associative-array
// model. A second instance with an 8-entry list exercises overflow.
module tb_voxel_map;
  import gmac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, act_en = 0, smp_en = 0;
  vaddr_t act_vox = '0;
  logic act_new, overflow, q_sampled;
  logic [9:0] act_idx, rd_row_a = 0, rd_idx_b = 0, smp_idx = 0, q_idx = 0;
  logic [10:0] n_act;
  vaddr_t rd_vox_a [4];
  vaddr_t rd_vox_b;

  voxel_map dut (.*);

  // small instance
  logic s_new, s_ovf, s_qs; logic [2:0] s_idx; logic [3:0] s_n; vaddr_t s_a [4]; vaddr_t s_b;
  voxel_map #(.MAXA(8)) dut_s (.clk, .rst_n, .clear, .act_en, .act_vox, .act_new(s_new), .act_idx(s_idx),
    .n_act(s_n), .overflow(s_ovf), .rd_row_a(3'd0), .rd_vox_a(s_a), .rd_idx_b(3'd0), .rd_vox_b(s_b),
    .smp_en(1'b0), .smp_idx(3'd0), .q_idx(3'd0), .q_sampled(s_qs));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  vaddr_t model[$];
  bit     seen[int];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      model.delete(); seen.delete();
      for (int n = 0; n < 600; n++) begin
        vaddr_t v;
        v = vaddr_t'($urandom_range(0, 399) * 7);  // many repeats
        @(negedge clk);
        act_en = 1; act_vox = v;
        #1;
        chk(act_new == !seen.exists(int'(v)), $sformatf("act_new v=%0d", v));
        if (!seen.exists(int'(v))) chk(int'(act_idx) == model.size(), "act_idx");
        if (!seen.exists(int'(v))) begin seen[int'(v)] = 1; model.push_back(v); end
      end
      @(negedge clk); act_en = 0;
      chk(int'(n_act) == model.size(), $sformatf("n_act %0d exp %0d", n_act, model.size()));
      chk(!overflow, "no overflow");
      chk(s_ovf, "small map overflow");
      chk(s_n == 4'd8, "small map holds 8");
      for (int i = 0; i < model.size(); i++) begin
        rd_idx_b = 10'(i); rd_row_a = 10'(i / 4);
        #1;
        chk(rd_vox_b == model[i], "port b");
        chk(rd_vox_a[i % 4] == model[i], "port a");
      end
      // mark every third entry sampled
      for (int i = 0; i < model.size(); i += 3) begin
        @(negedge clk); smp_en = 1; smp_idx = 10'(i);
      end
      @(negedge clk); smp_en = 0;
      for (int i = 0; i < model.size(); i++) begin
        q_idx = 10'(i); #1;
        chk(q_sampled == (i % 3 == 0), "sampled bit");
      end
      // clear for next round
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      chk(n_act == 0 && !s_ovf, "clear");
      q_idx = 0; #1; chk(!q_sampled, "clear sampled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
