// act_bn: per-channel batch-norm affine transform and activation.
// y = ((x * gamma) >>> 8) + beta with gamma in Q8.8, then ReLU when 'relu' is
// set, saturated to XW bits. gamma/beta are programmed per channel and reset
// to 1.0 and 0. Timing: in_valid -> out_valid one clock later.
// The number formats are this design's choice.
module act_bn #(
  parameter int C  = 40,
  parameter int XW = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      p_en,
  input  logic [$clog2(C)-1:0]      p_ch,
  input  logic signed [15:0]        p_gamma,
  input  logic signed [XW-1:0]      p_beta,
  input  logic                      relu,
  input  logic                      in_valid,
  input  logic [C-1:0][XW-1:0]      in_vec,
  output logic                      out_valid,
  output logic [C-1:0][XW-1:0]      out_vec
);
  localparam longint YMAX = (64'sd1 <<< (XW - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (XW - 1));

  logic signed [15:0]   gamma [C];
  logic signed [XW-1:0] beta  [C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < C; c++) begin
        gamma[c] <= 16'sd256;
        beta[c]  <= '0;
      end
    end else if (p_en) begin
      gamma[p_ch] <= p_gamma;
      beta[p_ch]  <= p_beta;
    end
  end

  logic [C-1:0][XW-1:0] y;
  always_comb begin
    for (int c = 0; c < C; c++) begin
      logic signed [47:0] t;
      t = (48'($signed(in_vec[c])) * 48'(gamma[c])) >>> 8;
      t = t + 48'(beta[c]);
      if (relu && t < 0) t = '0;
      if (t > 48'(YMAX))      y[c] = XW'(YMAX);
      else if (t < 48'(YMIN)) y[c] = XW'(YMIN);
      else                    y[c] = XW'(t);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_vec <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_vec <= y;
    end
  end
endmodule
