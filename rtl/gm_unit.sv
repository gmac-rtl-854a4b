// gm_unit: geometric mapping unit (one 3 x NB boundary array).
// Each of the three rows (x, y, z) holds NB programmed boundaries. A boundary
// "matches" when the input coordinate is at or above it; the count of matched
// boundaries is the segment (voxel) index on that axis, and subtracting the
// lower boundary of that segment gives the local coordinate. This is the
// digital function of the resistive boundary array, whose cells discharge the
// sensing line past the half-supply threshold only for inputs above the stored
// boundary.
// Programming: column 0 of a row holds the origin (lower end of the range) and
// columns 1..NB-1 the interior boundaries in ascending order; columns not used
// are programmed to the largest code (0x7fff), which marks a cell as unused
// and never matches. The number of
// segments per axis is therefore set purely by programming, as in the
// original array. Reset loads a 10-segment grid over [-1,1) (step 0.2), or
// with SECOND set the half-step split of [0,0.2) at 0.1.
// Used twice in the top: first level with step S1, second level on the local
// coordinate with a single boundary at S1/2, where the index is the
// left(0)/right(1) pointer.
// Timing: in_valid -> out_valid after one clock; one point per clock.
// Matching on equality and the reset grid are this design's choices.
module gm_unit
  import gmac_pkg::*;
#(
  parameter int NB     = 16,
  parameter bit SECOND = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_en,
  input  logic [1:0]        prog_axis,
  input  logic [3:0]        prog_idx,
  input  coord_t            prog_val,
  input  logic              in_valid,
  input  point_t            in_pt,
  output logic              out_valid,
  output voxel_t            out_vox,
  output point_t            out_loc
);
  localparam coord_t CMAX = coord_t'(16'sh7fff);

  coord_t bnd [3][NB];

  // default grid, first level: origin -1.0, boundaries -0.8 .. 0.8 (Q1.15),
  // rest unused; second level: origin 0, one boundary at 0.1 (half of 0.2)
  function automatic coord_t default_bnd(int k);
    if (SECOND) return (k == 0) ? coord_t'(0) : (k == 1) ? coord_t'(3277) : CMAX;
    if (k == 0) return coord_t'(-32768);
    if (k < 10) return coord_t'(-32768 + (k * 32768) / 5);
    return CMAX;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 3; a++)
        for (int k = 0; k < NB; k++) bnd[a][k] <= default_bnd(k);
    end else if (prog_en && prog_axis != 2'd3) begin
      bnd[prog_axis][prog_idx] <= prog_val;
    end
  end

  coord_t in_c  [3];
  vidx_t  idx_c [3];
  coord_t loc_c [3];

  always_comb begin
    in_c[0] = in_pt.x;
    in_c[1] = in_pt.y;
    in_c[2] = in_pt.z;
    for (int a = 0; a < 3; a++) begin
      // thermometer code of the interior boundaries, then its population count
      int unsigned cnt;
      cnt = 0;
      for (int k = 1; k < NB; k++)
        if (in_c[a] >= bnd[a][k] && bnd[a][k] != CMAX) cnt++;
      idx_c[a] = vidx_t'(cnt);
      loc_c[a] = in_c[a] - bnd[a][cnt];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vox   <= '0;
      out_loc   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_vox <= '{x: idx_c[0], y: idx_c[1], z: idx_c[2]};
        out_loc <= '{x: loc_c[0], y: loc_c[1], z: loc_c[2]};
      end
    end
  end
endmodule
