// flash_adc: 4-bit flash quantiser for the address-index computation array.
// Fifteen comparators compare the input magnitude (the source-line difference
// current, in units of the array weight step) with thresholds LSB, 2*LSB, ..
// 15*LSB; the thermometer code they form is converted to a binary count, which
// saturates at 15. Purely combinational. The resolution follows the 4-bit
// flash ADC of the design; the threshold placement is this design's choice.
module flash_adc #(
  parameter int IN_W = 12,
  parameter int LSB  = 1
) (
  input  logic [IN_W-1:0] in_mag,
  output logic [3:0]      code
);
  logic [14:0] therm;

  always_comb begin
    for (int k = 0; k < 15; k++)
      therm[k] = (int'(in_mag) >= (k + 1) * LSB);
    code = '0;
    for (int k = 0; k < 15; k++)
      code = code + 4'(therm[k]);
  end
endmodule
