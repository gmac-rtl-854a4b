// tb_cim_mvm: programs random weights into a 3x64 layer with ReLU and a 64x40
// layer without, drives random vectors back to back and compares each output
// with a reference dot product (shift, ReLU, saturation). Checks the one-clock
// latency and that large inputs saturate.
module tb_cim_mvm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wa_en = 0; logic [1:0] wa_row = 0; logic [5:0] wa_col = 0; logic signed [7:0] wa_val = 0;
  logic a_in = 0; logic [2:0][15:0] a_vec = '0; logic a_ov; logic [63:0][15:0] a_out;
  cim_mvm dut_a (.clk, .rst_n, .w_en(wa_en), .w_row(wa_row), .w_col(wa_col), .w_val(wa_val),
    .in_valid(a_in), .in_vec(a_vec), .out_valid(a_ov), .out_vec(a_out));

  logic wb_en = 0; logic [5:0] wb_row = 0; logic [5:0] wb_col = 0; logic signed [7:0] wb_val = 0;
  logic b_in = 0; logic [63:0][15:0] b_vec = '0; logic b_ov; logic [39:0][15:0] b_out;
  cim_mvm #(.IN(64), .OUT(40), .RELU(1'b0)) dut_b (.clk, .rst_n, .w_en(wb_en), .w_row(wb_row), .w_col(wb_col), .w_val(wb_val),
    .in_valid(b_in), .in_vec(b_vec), .out_valid(b_ov), .out_vec(b_out));

  int wa [3][64];
  int wb [64][40];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(longint acc, bit relu);
    acc = acc >>> 7;
    if (relu && acc < 0) acc = 0;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) for (int o = 0; o < 64; o++) begin
      @(negedge clk); wa_en = 1; wa_row = 2'(i); wa_col = 6'(o); wa[i][o] = $urandom_range(0, 255) - 128; wa_val = 8'(wa[i][o]);
    end
    @(negedge clk); wa_en = 0;
    for (int i = 0; i < 64; i++) for (int o = 0; o < 40; o++) begin
      @(negedge clk); wb_en = 1; wb_row = 6'(i); wb_col = 6'(o); wb[i][o] = $urandom_range(0, 255) - 128; wb_val = 8'(wb[i][o]);
    end
    @(negedge clk); wb_en = 0;
    for (int n = 0; n < 200; n++) begin
      int xa [3]; int xb [64];
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        xa[i] = (n < 5) ? 32767 : int'($urandom_range(0, 65535)) - 32768;
        a_vec[i] = 16'(xa[i]);
      end
      for (int i = 0; i < 64; i++) begin xb[i] = int'($urandom_range(0, 2047)) - 1024; b_vec[i] = 16'(xb[i]); end
      a_in = 1; b_in = 1;
      @(negedge clk); a_in = 0; b_in = 0;
      // result registered at the clock edge after in_valid
      checks += 2;
      if (!a_ov || !b_ov) begin failures++; $display("FAIL latency"); end
      for (int o = 0; o < 64; o++) begin
        longint acc; acc = 0;
        for (int i = 0; i < 3; i++) acc += longint'(xa[i]) * wa[i][o];
        checks++;
        if ($signed(a_out[o]) != ref_y(acc, 1)) begin failures++; if (failures < 10) $display("FAIL a o=%0d %0d exp %0d", o, $signed(a_out[o]), ref_y(acc, 1)); end
      end
      for (int o = 0; o < 40; o++) begin
        longint acc; acc = 0;
        for (int i = 0; i < 64; i++) acc += longint'(xb[i]) * wb[i][o];
        checks++;
        if ($signed(b_out[o]) != ref_y(acc, 0)) begin failures++; if (failures < 10) $display("FAIL b o=%0d %0d exp %0d", o, $signed(b_out[o]), ref_y(acc, 0)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
