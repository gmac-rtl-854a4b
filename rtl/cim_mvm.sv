// cim_mvm: crossbar matrix-vector multiply, the compute-in-memory layer.
// An IN x OUT array of signed weights (the resistive crossbar conductances,
// differential pairs giving the sign) multiplies an IN-element input vector;
// every output column sums its products at once, as the column currents of the
// crossbar do. Results are arithmetically shifted right by SHIFT, optionally
// passed through ReLU and saturated to XW bits.
// Weights are written one at a time through w_en/w_row/w_col/w_val and reset
// to zero. Timing: in_valid -> out_valid one clock later, one vector per clock.
// The fixed-point formats (16-bit data, 8-bit weights, 32-bit sums) stand in
// for the half-precision arithmetic of the original and are this design's
// choice.
module cim_mvm #(
  parameter int IN    = 3,
  parameter int OUT   = 64,
  parameter int XW    = 16,
  parameter int WW    = 8,
  parameter int SHIFT = 7,
  parameter bit RELU  = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            w_en,
  input  logic [$clog2(IN)-1:0]           w_row,
  input  logic [$clog2(OUT)-1:0]          w_col,
  input  logic signed [WW-1:0]            w_val,
  input  logic                            in_valid,
  input  logic [IN-1:0][XW-1:0]           in_vec,
  output logic                            out_valid,
  output logic [OUT-1:0][XW-1:0]          out_vec
);
  localparam longint YMAX = (64'sd1 <<< (XW - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (XW - 1));

  logic signed [WW-1:0] g [IN][OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IN; i++)
        for (int o = 0; o < OUT; o++) g[i][o] <= '0;
    end else if (w_en) begin
      g[w_row][w_col] <= w_val;
    end
  end

  logic [OUT-1:0][XW-1:0] y;

  always_comb begin
    for (int o = 0; o < OUT; o++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int i = 0; i < IN; i++)
        acc = acc + $signed(in_vec[i]) * g[i][o];
      acc = acc >>> SHIFT;
      if (RELU && acc < 0) acc = '0;
      if (longint'(acc) > YMAX)      y[o] = XW'(YMAX);
      else if (longint'(acc) < YMIN) y[o] = XW'(YMIN);
      else                           y[o] = XW'(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_vec <= y;
    end
  end
endmodule
