// tb_ac_unit: checks the address-index computation array.
// All 256 coordinate pairs must give (X1-X2)^2 (times alpha) exactly two
// clocks after the request, with back-to-back requests; a second instance
// uses alpha = 2. Reprogramming one square-row cell must change only the
// results whose |X1-X2| selects that column.
module tb_ac_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_en = 0; logic [1:0] prog_row = 0; logic [3:0] prog_col = 0; logic [7:0] prog_val = 0;
  logic in_valid = 0; logic [3:0] p1 = 0, p2 = 0;
  logic ov1, ov2; logic signed [4:0] sub1, sub2; logic [11:0] out1, out2;

  ac_unit #(.ALPHA(1)) dut1 (.clk, .rst_n, .prog_en, .prog_row, .prog_col, .prog_val,
    .in_valid, .p1, .p2, .out_valid(ov1), .sub(sub1), .out(out1));
  ac_unit #(.ALPHA(2)) dut2 (.clk, .rst_n, .prog_en(1'b0), .prog_row(2'd0), .prog_col(4'd0), .prog_val(8'd0),
    .in_valid, .p1, .p2, .out_valid(ov2), .sub(sub2), .out(out2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results queue, popped when out_valid is seen
  int exp_q[$];
  int exp_d[$];
  int issue_cyc[$];
  int cyc = 0;
  bit patched = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && ov1) begin
    int e, d, t;
    e = exp_q.pop_front(); d = exp_d.pop_front(); t = issue_cyc.pop_front();
    checks += 4;
    if (int'(out1) != (patched && (d == 3 || d == -3) ? 0 : e)) begin failures++; $display("FAIL out1=%0d exp=%0d d=%0d", out1, e, d); end
    if (int'(out2) != 2 * e) begin failures++; $display("FAIL out2=%0d exp=%0d", out2, 2 * e); end
    if (int'(sub1) != d || int'(sub2) != d) begin failures++; $display("FAIL sub=%0d exp=%0d", sub1, d); end
    if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  task automatic run_all();
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        in_valid = 1; p1 = 4'(a); p2 = 4'(b);
        exp_q.push_back((a - b) * (a - b)); exp_d.push_back(a - b); issue_cyc.push_back(cyc);
      end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_all();
    // the square row device at column 3 is switched off
    @(negedge clk); prog_en = 1; prog_row = 2; prog_col = 3; prog_val = 0;
    @(negedge clk); prog_en = 0; patched = 1;
    run_all();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
