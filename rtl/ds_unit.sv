// ds_unit: down-sampling unit, voxel-based farthest point sampling (FPS).
// FPS runs on the integer voxel coordinates of the activated voxels instead of
// the raw points. The first sample is list entry 0. Each following iteration
// streams the whole activated-voxel list, LANES voxels per clock, through
// LANES x 3 address-index arrays (one per axis per lane) whose squared axis
// distances to the last sample are added per lane. For every voxel the
// distance buffer keeps the minimum distance to the samples taken so far; the
// comparator finds the largest of the updated minima in each row and a
// running maximum across rows picks the next sample (lowest index on ties).
// Sampled voxels have distance 0 to themselves and are never picked again.
// Each sample is marked in the voxel map (smp_en) and streamed out
// (smp_valid, smp_vox, smp_idx).
// Interface: 'start' with n_samples and n_act latched; busy until 'done'
// pulses. n_samples above n_act is clipped to n_act.
// Timing: first sample 1 clock after start; every further sample takes
// ceil(n_act/LANES) + 4 clocks (list streaming plus the 2-stage array and
// buffer pipeline and one selection cycle).
// The starting point, clipping rule and loop schedule are this design's
// choices; the per-axis array arithmetic follows the address-index scheme.
module ds_unit
  import gmac_pkg::*;
#(
  parameter int LANES = 4,
  parameter int MAXA  = MAXACT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(MAXA):0]    n_samples,
  input  logic [$clog2(MAXA):0]    n_act,
  // activated-voxel list (voxel map read port A)
  output logic [$clog2(MAXA)-1:0]  rd_row,
  input  vaddr_t                   rd_vox [LANES],
  // FPS result to the voxel map
  output logic                     smp_en,
  output logic [$clog2(MAXA)-1:0]  smp_idx,
  output vaddr_t                   smp_vox,
  // array reprogramming, broadcast to all arrays of one axis
  input  logic                     ac_prog_en,
  input  logic [1:0]               ac_prog_axis,
  input  logic [1:0]               ac_prog_row,
  input  logic [3:0]               ac_prog_col,
  input  logic [7:0]               ac_prog_val,
  output logic                     busy,
  output logic                     done
);
  localparam int AW   = $clog2(MAXA);
  localparam int ROWS = MAXA / LANES;
  localparam int RW   = $clog2(ROWS);

  typedef enum logic [2:0] {S_IDLE, S_FIRST, S_SCAN, S_DRAIN, S_PICK} state_t;
  state_t state;

  logic [AW:0]   target, taken;
  logic [AW:0]   act_cnt;
  logic [RW:0]   row, nrows;
  logic [1:0]    drain;
  logic          first_pass;
  vaddr_t        last_vox;
  voxel_t        last_v;

  // running maximum
  logic          best_valid;
  logic [DW-1:0] best_val;
  logic [AW-1:0] best_idx;

  assign last_v = addr2vox(last_vox);
  assign rd_row = AW'(row);
  assign busy   = (state != S_IDLE);

  // ---------------- stage 0: issue a row ----------------
  logic issue;
  assign issue = (state == S_SCAN);

  // ---------------- address-index arrays ----------------
  logic [LANES-1:0]             ac_v;
  logic [LANES-1:0][2:0][11:0]  ac_out;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    voxel_t v;
    assign v = addr2vox(rd_vox[l]);
    logic [2:0] vv;
    for (genvar a = 0; a < 3; a++) begin : g_axis
      logic [3:0] p1;
      logic [3:0] p2;
      logic signed [4:0] sub_unused;
      assign p1 = (a == 0) ? v.x : (a == 1) ? v.y : v.z;
      assign p2 = (a == 0) ? last_v.x : (a == 1) ? last_v.y : last_v.z;
      ac_unit u_ac (
        .clk, .rst_n,
        .prog_en  (ac_prog_en && ac_prog_axis == 2'(a)),
        .prog_row (ac_prog_row), .prog_col(ac_prog_col), .prog_val(ac_prog_val),
        .in_valid (issue), .p1(p1), .p2(p2),
        .out_valid(vv[a]), .sub(sub_unused), .out(ac_out[l][a]));
    end
    assign ac_v[l] = &vv;
  end

  // ---------------- pipeline bookkeeping ----------------
  logic [RW:0] row_d1, row_d2;
  logic        v_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_d1 <= '0; row_d2 <= '0; v_d1 <= 1'b0;
    end else begin
      v_d1   <= issue;
      row_d1 <= row;
      row_d2 <= row_d1;
    end
  end

  logic [LANES-1:0][DW-1:0] old_min;
  logic [LANES-1:0][DW-1:0] new_min;
  logic [LANES-1:0]         lane_ok;
  logic [LANES-1:0][AW-1:0] lane_idx;

  distance_buffer #(.DEPTH(MAXA), .LANES(LANES), .DW(DW)) u_dbuf (
    .clk,
    .rd_en  (issue), .rd_row(RW'(row)), .rd_data(old_min),
    .wr_en  (ac_v[0]), .wr_row(RW'(row_d2)), .wr_mask(lane_ok), .wr_data(new_min));

  // old_min arrives one cycle after issue; hold it one more cycle to meet
  // the arrays' second stage
  logic [LANES-1:0][DW-1:0] old_min_q;
  always_ff @(posedge clk) if (v_d1) old_min_q <= old_min;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [DW-1:0] d;
      d           = DW'(ac_out[l][0]) + DW'(ac_out[l][1]) + DW'(ac_out[l][2]);
      lane_idx[l] = AW'(int'(row_d2) * LANES + l);
      lane_ok[l]  = ac_v[l] && ((AW+1)'(int'(row_d2) * LANES + l) < act_cnt);
      new_min[l]  = (first_pass || d < old_min_q[l]) ? d : old_min_q[l];
    end
  end

  logic          row_max_valid;
  logic [DW-1:0] row_max_val;
  logic [AW-1:0] row_max_idx;

  max_comparator #(.N(LANES), .DW(DW), .IW(AW)) u_cmp (
    .valid(lane_ok), .val(new_min), .idx(lane_idx),
    .max_valid(row_max_valid), .max_val(row_max_val), .max_idx(row_max_idx));

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; target <= '0; taken <= '0; act_cnt <= '0; row <= '0; nrows <= '0;
      drain <= '0; first_pass <= 1'b0; last_vox <= '0;
      best_valid <= 1'b0; best_val <= '0; best_idx <= '0;
      smp_en <= 1'b0; smp_idx <= '0; smp_vox <= '0; done <= 1'b0;
    end else begin
      smp_en <= 1'b0;
      done   <= 1'b0;
      if (ac_v[0] && row_max_valid && (!best_valid || row_max_val > best_val)) begin
        best_valid <= 1'b1;
        best_val   <= row_max_val;
        best_idx   <= row_max_idx;
      end
      unique case (state)
        S_IDLE: if (start) begin
          target  <= (n_samples > n_act) ? n_act : n_samples;
          act_cnt <= n_act;
          nrows   <= (RW+1)'((int'(n_act) + LANES - 1) / LANES);
          taken   <= '0;
          row     <= '0;
          state   <= S_FIRST;
        end
        S_FIRST: begin
          if (target == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            smp_en     <= 1'b1;
            smp_idx    <= '0;
            smp_vox    <= rd_vox[0];
            last_vox   <= rd_vox[0];
            taken      <= 1;
            first_pass <= 1'b1;
            best_valid <= 1'b0;
            row        <= '0;
            if (target == 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_SCAN;
            end
          end
        end
        S_SCAN: begin
          if (row + 1'b1 == nrows) begin
            state <= S_DRAIN;
            drain <= 2'd2;
          end
          row <= row + 1'b1;
        end
        S_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 2'd0) begin
            row   <= (RW+1)'(best_idx / AW'(LANES));
            state <= S_PICK;
          end
        end
        S_PICK: begin
          smp_en     <= 1'b1;
          smp_idx    <= best_idx;
          smp_vox    <= rd_vox[int'(best_idx) % LANES];
          last_vox   <= rd_vox[int'(best_idx) % LANES];
          taken      <= taken + 1'b1;
          first_pass <= 1'b0;
          best_valid <= 1'b0;
          if (taken + 1'b1 == target) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_SCAN;
          end
          row <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
