// tb_local_feat_buffer: writes all 1024 entries with random features and
// reads them back in random order, checking data and the one-clock read
// latency, with writes to other entries in the same clocks.
module tb_local_feat_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0; logic [9:0] wr_idx = 0, rd_idx = 0;
  logic [63:0][15:0] wr_vec = '0, rd_vec;
  local_feat_buffer dut (.*);
  logic [63:0][15:0] model [1024];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0][15:0] rnd();
    logic [63:0][15:0] v;
    for (int c = 0; c < 64; c++) v[c] = 16'($urandom);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); wr_en = 1; wr_idx = 10'(i); wr_vec = rnd(); model[i] = wr_vec;
    end
    for (int n = 0; n < 3000; n++) begin
      logic [9:0] r;
      @(negedge clk);
      r = 10'($urandom);
      rd_en = 1; rd_idx = r;
      wr_en = $urandom_range(0, 1); wr_idx = 10'($urandom); if (wr_idx == r) wr_idx = r + 1;
      wr_vec = rnd();
      @(posedge clk); #1;
      checks++;
      if (rd_vec != model[r]) begin failures++; if (failures < 10) $display("FAIL idx %0d", r); end
      if (wr_en) model[wr_idx] = wr_vec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
