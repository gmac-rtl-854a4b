// ac_unit: address-index computation array for one axis (3 rows x NCOL columns).
// Each column L of every row stores the weight ALPHA*L, so a weight encodes its
// own column address. For voxel coordinates X1 and X2 the positive row is read
// at column X1 and the negative row at column X2; their difference is the
// subtraction current. A 4-bit flash ADC quantises its magnitude to |X1-X2|,
// which is applied to the third row while the device in column |X1-X2| is
// selected, so the product is ALPHA*(X1-X2)^2, the squared distance on this
// axis. Weights are reprogrammable (as RRAM cells are); reset restores ALPHA*L.
// Timing: two pipeline stages, matching the two ~10 ns phases (subtract and
// sample, then square) at a 100 MHz clock: in_valid -> out_valid in 2 cycles.
// Integer currents and the one-cycle phases are this design's model of the
// analog array.
module ac_unit #(
  parameter int NCOL  = 16,
  parameter int ALPHA = 1,
  parameter int OUT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prog_en,
  input  logic [1:0]       prog_row,
  input  logic [3:0]       prog_col,
  input  logic [7:0]       prog_val,
  input  logic             in_valid,
  input  logic [3:0]       p1,
  input  logic [3:0]       p2,
  output logic             out_valid,
  output logic signed [4:0] sub,
  output logic [OUT_W-1:0] out
);
  logic [7:0] w [3][NCOL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < NCOL; c++) w[r][c] <= 8'(ALPHA * c);
    end else if (prog_en && prog_row != 2'd3) begin
      w[prog_row][prog_col] <= prog_val;
    end
  end

  // phase 1: differential read of rows 0/1 and quantisation
  logic signed [9:0] i_diff;
  logic [8:0]        i_mag;
  logic [3:0]        adc_code;

  always_comb begin
    i_diff = $signed({2'b0, w[0][p1]}) - $signed({2'b0, w[1][p2]});
    i_mag  = i_diff[9] ? 9'(-i_diff) : 9'(i_diff);
  end

  flash_adc #(.IN_W(9), .LSB(ALPHA)) u_adc (.in_mag(i_mag), .code(adc_code));

  logic       v1;
  logic [3:0] code_q;
  logic       neg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; code_q <= '0; neg_q <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        code_q <= adc_code;
        neg_q  <= i_diff[9];
      end
    end
  end

  // phase 2: the code drives the bit line of row 2, column code_q is selected
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out <= '0; sub <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out <= OUT_W'(code_q * w[2][code_q]);
        sub <= neg_q ? -$signed({1'b0, code_q}) : $signed({1'b0, code_q});
      end
    end
  end
endmodule
