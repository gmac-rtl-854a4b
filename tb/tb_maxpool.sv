// tb_maxpool: random groups of 0..9 signed feature vectors, with in_last alone
// or together with the last vector, against a reference channel maximum;
// empty groups give zero; in_first restarts a group.
module tb_maxpool;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [63:0][15:0] in_vec = '0;
  logic out_valid; logic [63:0][15:0] out_vec;
  maxpool dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      int n, m [64]; bit together, restart;
      n = $urandom_range(0, 9);
      together = $urandom_range(0, 1);
      restart = (g % 7 == 3) && n > 0;
      for (int c = 0; c < 64; c++) m[c] = 0;
      if (restart) begin
        // a stray vector that in_first must discard
        @(negedge clk); in_valid = 1; in_last = 0; in_first = 0;
        for (int c = 0; c < 64; c++) in_vec[c] = 16'h7fff;
      end
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = restart && k == 0;
        in_last = together && k == n - 1;
        for (int c = 0; c < 64; c++) begin
          int v;
          v = int'($urandom_range(0, 65535)) - 32768;
          in_vec[c] = 16'(v);
          if (k == 0 || v > m[c]) m[c] = v;
        end
      end
      if (!together || n == 0) begin
        @(negedge clk); in_valid = 0; in_first = 0; in_last = 1;
      end
      @(negedge clk); in_valid = 0; in_last = 0; in_first = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
      for (int c = 0; c < 64; c++) begin
        checks++;
        if ($signed(out_vec[c]) != m[c]) begin failures++; if (failures < 10) $display("FAIL g=%0d c=%0d %0d exp %0d", g, c, $signed(out_vec[c]), m[c]); end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
