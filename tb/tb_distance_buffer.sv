// tb_distance_buffer: random masked row writes and reads against a model,
// including reads and writes to different rows in the same clock; checks the
// one-clock read latency.
module tb_distance_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rd_en = 0, wr_en = 0;
  logic [7:0] rd_row = 0, wr_row = 0;
  logic [3:0] wr_mask = 0;
  logic [3:0][15:0] rd_data, wr_data = '0;
  distance_buffer dut (.*);

  logic [3:0][15:0] model [256];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int r = 0; r < 256; r++) begin
      @(negedge clk); wr_en = 1; wr_row = 8'(r); wr_mask = 4'hf;
      wr_data = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      model[r] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] rr;
      @(negedge clk);
      rr = 8'($urandom);
      rd_en = 1; rd_row = rr;
      wr_en = $urandom_range(0, 1); wr_row = 8'($urandom); wr_mask = 4'($urandom);
      if (wr_row == rr) wr_row = rr + 1;
      wr_data = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[rr]) begin failures++; if (failures < 10) $display("FAIL row %0d %h exp %h", rr, rd_data, model[rr]); end
      if (wr_en) for (int l = 0; l < 4; l++) if (wr_mask[l]) model[wr_row][l] = wr_data[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
