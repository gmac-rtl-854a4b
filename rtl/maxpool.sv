// maxpool: channel-wise max-pooling with its aggregation register.
// Feature vectors of one group arrive on in_valid; the register keeps the
// per-channel (signed) maximum. in_first marks the first vector of a group
// and restarts the maximum from it. in_last closes the group: out_vec then
// holds the maximum and out_valid pulses one clock later. in_last may come
// with or without a vector; a group that received no vector yields zero.
// The group framing signals are this design's choice.
module maxpool #(
  parameter int C  = 64,
  parameter int XW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [C-1:0][XW-1:0]  in_vec,
  output logic                  out_valid,
  output logic [C-1:0][XW-1:0]  out_vec
);
  logic [C-1:0][XW-1:0] acc, nxt;
  logic                 have, have_n;

  always_comb begin
    nxt    = acc;
    have_n = have && !in_first;
    if (in_valid) begin
      for (int c = 0; c < C; c++)
        if (!have_n || $signed(in_vec[c]) > $signed(acc[c])) nxt[c] = in_vec[c];
      have_n = 1'b1;
    end else if (!have_n) begin
      nxt = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; have <= 1'b0; out_valid <= 1'b0; out_vec <= '0;
    end else begin
      out_valid <= in_last;
      if (in_last) begin
        out_vec <= nxt;
        have    <= 1'b0;
        acc     <= '0;
      end else begin
        acc  <= nxt;
        have <= have_n;
      end
    end
  end
endmodule
