// dp_buffer: scalable double-pointer (D-P) buffer for point coordinates.
// Every point is stored once, as its local x, y and z (three arrays sharing
// one address) plus three pointer bits from the second mapping level: bit a is
// 0 when the point lies in the left half [0, S1/2) of its voxel along axis a
// and 1 for the right half. Points are paged by their first-level voxel: a
// head table holds the newest point of each voxel and each point links to the
// previous point of the same voxel, so a voxel's page is walked without
// searching the whole buffer.
// A query walks one voxel's page, one point per clock, newest first. In mode
// 0 every point is returned; in mode 1 only points whose pointer on q_axis
// equals q_side, which gives the half-voxel (overlapping or multi-scale)
// groups from the single stored copy. With q_bias set, the q_axis coordinate
// of each returned point gets +half_step if its pointer is right and
// -half_step if left.
// Timing: write one point per clock. After q_start the walk begins on the next
// clock; a point appears on o_valid/o_loc one clock after it is walked, and
// o_done pulses in the same clock as the output slot of the last point of the
// page (two clocks after q_start for an empty page). q_busy is high meanwhile.
// Writes beyond NPTS are dropped and set 'full'.
// The linked-page layout, walk order and bias arithmetic are this design's
// reading of the pointer scheme.
module dp_buffer
  import gmac_pkg::*;
#(
  parameter int NPTS = 10000,
  parameter int NV   = NVOX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        wr_en,
  input  vaddr_t      wr_vox,
  input  point_t      wr_loc,
  input  logic [2:0]  wr_ptr,
  output logic        full,
  output logic [$clog2(NPTS+1)-1:0] n_pts,
  input  logic        q_start,
  input  vaddr_t      q_vox,
  input  logic        q_mode,
  input  logic [1:0]  q_axis,
  input  logic        q_side,
  input  logic        q_bias,
  input  coord_t      half_step,
  output logic        q_busy,
  output logic        o_valid,
  output point_t      o_loc,
  output logic        o_done
);
  localparam int PW = $clog2(NPTS + 1);
  localparam logic [PW-1:0] NIL = '1;

  coord_t          mem_x [NPTS];
  coord_t          mem_y [NPTS];
  coord_t          mem_z [NPTS];
  logic [2:0]      mem_p [NPTS];
  logic [PW-1:0]   mem_n [NPTS];
  logic [PW-1:0]   head  [NV];
  logic [NV-1:0]   hvalid;

  // ---------------- write side ----------------
  logic do_wr;
  assign do_wr = wr_en && !clear && (int'(n_pts) < NPTS);
  assign full  = (int'(n_pts) >= NPTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_pts  <= '0;
      hvalid <= '0;
    end else if (clear) begin
      n_pts  <= '0;
      hvalid <= '0;
    end else if (do_wr) begin
      n_pts          <= n_pts + 1'b1;
      hvalid[wr_vox] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem_x[n_pts] <= wr_loc.x;
      mem_y[n_pts] <= wr_loc.y;
      mem_z[n_pts] <= wr_loc.z;
      mem_p[n_pts] <= wr_ptr;
      mem_n[n_pts] <= hvalid[wr_vox] ? head[wr_vox] : NIL;
      head[wr_vox] <= n_pts;
    end
  end

  // ---------------- query side ----------------
  logic [PW-1:0] cur;
  logic          walking;
  logic          l_mode, l_side, l_bias;
  logic [1:0]    l_axis;

  assign q_busy = walking || q_start;

  logic          hit;
  point_t        loc_b;
  coord_t        bias;
  logic [2:0]    cur_p;

  always_comb begin
    cur_p = mem_p[cur];
    hit   = (l_mode == 1'b0) || (cur_p[l_axis] == l_side);
    bias  = cur_p[l_axis] ? half_step : -half_step;
    loc_b = '{x: mem_x[cur], y: mem_y[cur], z: mem_z[cur]};
    if (l_bias) begin
      unique case (l_axis)
        2'd0:    loc_b.x = loc_b.x + bias;
        2'd1:    loc_b.y = loc_b.y + bias;
        default: loc_b.z = loc_b.z + bias;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= NIL; walking <= 1'b0;
      l_mode <= 1'b0; l_side <= 1'b0; l_bias <= 1'b0; l_axis <= '0;
      o_valid <= 1'b0; o_loc <= '0; o_done <= 1'b0;
    end else begin
      o_valid <= 1'b0;
      o_done  <= 1'b0;
      if (q_start && !walking) begin
        walking <= 1'b1;
        cur     <= hvalid[q_vox] ? head[q_vox] : NIL;
        l_mode  <= q_mode;
        l_side  <= q_side;
        l_bias  <= q_bias;
        l_axis  <= (q_axis == 2'd3) ? 2'd2 : q_axis;
      end else if (walking) begin
        if (cur == NIL) begin
          walking <= 1'b0;
          o_done  <= 1'b1;
        end else begin
          o_valid <= hit;
          o_loc   <= loc_b;
          cur     <= mem_n[cur];
          if (mem_n[cur] == NIL) begin
            walking <= 1'b0;
            o_done  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
