// local_feat_buffer: on-chip store of the pooled local feature of every
// activated voxel, addressed by the voxel's activated-list index. 1024 entries
// of 64 channels x 16 bits = 128 KB, the largest feature output of one frame.
// One write port, one synchronous read port (data one clock after rd_en).
module local_feat_buffer #(
  parameter int DEPTH = 1024,
  parameter int C     = 64,
  parameter int XW    = 16
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_idx,
  input  logic [C-1:0][XW-1:0]      wr_vec,
  input  logic                      rd_en,
  input  logic [$clog2(DEPTH)-1:0]  rd_idx,
  output logic [C-1:0][XW-1:0]      rd_vec
);
  logic [C-1:0][XW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_vec;
    if (rd_en) rd_vec <= mem[rd_idx];
  end
endmodule
