// tb_act_bn: programs random per-channel gamma/beta and checks
// ((x*gamma)>>>8)+beta, optional ReLU and saturation against a reference,
// including the reset values gamma = 1.0 and beta = 0.
module tb_act_bn;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic p_en = 0; logic [5:0] p_ch = 0; logic signed [15:0] p_gamma = 0, p_beta = 0;
  logic relu = 0, in_valid = 0; logic [39:0][15:0] in_vec = '0;
  logic out_valid; logic [39:0][15:0] out_vec;
  act_bn dut (.*);
  int g [40], b [40];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_check(bit r);
    int x [40];
    @(negedge clk);
    relu = r; in_valid = 1;
    for (int c = 0; c < 40; c++) begin x[c] = int'($urandom_range(0, 65535)) - 32768; in_vec[c] = 16'(x[c]); end
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    for (int c = 0; c < 40; c++) begin
      longint t;
      t = (longint'(x[c]) * g[c]) >>> 8;
      t += b[c];
      if (r && t < 0) t = 0;
      if (t > 32767) t = 32767;
      if (t < -32768) t = -32768;
      checks++;
      if ($signed(out_vec[c]) != int'(t)) begin failures++; if (failures < 10) $display("FAIL c=%0d %0d exp %0d", c, $signed(out_vec[c]), t); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin g[c] = 256; b[c] = 0; end
    for (int n = 0; n < 20; n++) drive_check(n % 2);
    for (int c = 0; c < 40; c++) begin
      @(negedge clk); p_en = 1; p_ch = 6'(c);
      g[c] = int'($urandom_range(0, 2047)) - 1024; b[c] = int'($urandom_range(0, 8191)) - 4096;
      p_gamma = 16'(g[c]); p_beta = 16'(b[c]);
    end
    @(negedge clk); p_en = 0;
    for (int n = 0; n < 200; n++) drive_check(n % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
