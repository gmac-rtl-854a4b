// distance_buffer: minimum-distance store for farthest point sampling.
// DEPTH 16-bit words (1024 x 16 bit = 2 KB), one per activated voxel, organised
// as DEPTH/LANES rows of LANES words so the sampling loop reads one row and
// writes back one row every clock. Synchronous read (data one cycle after
// rd_en), write with a per-lane mask. Read and write may target different
// rows in the same cycle. The row organisation is this design's choice.
module distance_buffer #(
  parameter int DEPTH = 1024,
  parameter int LANES = 4,
  parameter int DW    = 16
) (
  input  logic                              clk,
  input  logic                              rd_en,
  input  logic [$clog2(DEPTH/LANES)-1:0]    rd_row,
  output logic [LANES-1:0][DW-1:0]          rd_data,
  input  logic                              wr_en,
  input  logic [$clog2(DEPTH/LANES)-1:0]    wr_row,
  input  logic [LANES-1:0]                  wr_mask,
  input  logic [LANES-1:0][DW-1:0]          wr_data
);
  localparam int ROWS = DEPTH / LANES;

  logic [LANES-1:0][DW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int l = 0; l < LANES; l++)
        if (wr_mask[l]) mem[wr_row][l] <= wr_data[l];
    if (rd_en) rd_data <= mem[rd_row];
  end
endmodule
