// tb_flash_adc: exhaustive check of the 4-bit flash quantiser for two step
// sizes: code = min(floor(in/LSB), 15).
module tb_flash_adc;
  int checks = 0, failures = 0;
  logic [11:0] in_mag;
  logic [3:0]  code1, code3;

  flash_adc #(.IN_W(12), .LSB(1)) dut1 (.in_mag(in_mag), .code(code1));
  flash_adc #(.IN_W(12), .LSB(3)) dut3 (.in_mag(in_mag), .code(code3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int e1, e3;
      in_mag = 12'(v);
      #1;
      e1 = (v > 15) ? 15 : v;
      e3 = (v / 3 > 15) ? 15 : v / 3;
      checks += 2;
      if (int'(code1) != e1) begin failures++; if (failures < 10) $display("FAIL lsb1 in=%0d code=%0d exp=%0d", v, code1, e1); end
      if (int'(code3) != e3) begin failures++; if (failures < 10) $display("FAIL lsb3 in=%0d code=%0d exp=%0d", v, code3, e3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
