// tb_max_comparator: random values and valid masks, with many ties, against a
// reference maximum search (lowest position wins ties); also an 8-input
// instance.
module tb_max_comparator;
  int checks = 0, failures = 0;
  logic [3:0] valid; logic [3:0][15:0] val; logic [3:0][9:0] idx;
  logic mv; logic [15:0] mval; logic [9:0] midx;
  max_comparator dut (.valid, .val, .idx, .max_valid(mv), .max_val(mval), .max_idx(midx));
  logic [7:0] v8; logic [7:0][15:0] val8; logic [7:0][9:0] idx8;
  logic mv8; logic [15:0] mval8; logic [9:0] midx8;
  max_comparator #(.N(8)) dut8 (.valid(v8), .val(val8), .idx(idx8), .max_valid(mv8), .max_val(mval8), .max_idx(midx8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int bi, bv, bi8, bv8;
      valid = 4'($urandom); v8 = 8'($urandom);
      for (int i = 0; i < 4; i++) begin val[i] = 16'($urandom_range(0, 5)); idx[i] = 10'($urandom); end
      for (int i = 0; i < 8; i++) begin val8[i] = 16'($urandom_range(0, 700)); idx8[i] = 10'(i + 100); end
      #1;
      bi = -1; bv = -1;
      for (int i = 0; i < 4; i++) if (valid[i] && int'(val[i]) > bv) begin bv = int'(val[i]); bi = i; end
      bi8 = -1; bv8 = -1;
      for (int i = 0; i < 8; i++) if (v8[i] && int'(val8[i]) > bv8) begin bv8 = int'(val8[i]); bi8 = i; end
      checks += 2;
      if (mv != (bi >= 0) || (bi >= 0 && (int'(mval) != bv || midx != idx[bi]))) begin
        failures++; if (failures < 10) $display("FAIL n4 valid=%b mv=%0d val=%0d idx=%0d exp %0d", valid, mv, mval, midx, bv);
      end
      if (mv8 != (bi8 >= 0) || (bi8 >= 0 && (int'(mval8) != bv8 || midx8 != idx8[bi8]))) begin
        failures++; if (failures < 10) $display("FAIL n8");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
