// voxel_map: the searched voxel map.
// Keeps one "activated" bit per voxel of the 16x16x16 space and, in
// activation order, the list of activated voxel addresses. Each list entry also
// has an "FPS sampled" bit, so every voxel is in one of three states: no
// point, activated but not sampled, or sampled.
// Activation (act_en) of a voxel not yet active appends it to the list: act_new
// and act_idx tell the caller, combinationally, that it is new and where it
// goes. A voxel that would exceed MAXACT entries is dropped and sets the
// sticky 'overflow'. 'clear' empties the map in one cycle for a new frame.
// Read ports: port A returns LANES consecutive entries (one row) for the
// sampling engine, port B one entry for the feature path; both combinational.
// The list organisation and its 1024-entry size (the 2 KB distance buffer
// holds one 16-bit distance per entry) are this design's choices.
module voxel_map
  import gmac_pkg::*;
#(
  parameter int NV     = NVOX,
  parameter int MAXA   = MAXACT,
  parameter int LANES  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          act_en,
  input  vaddr_t                        act_vox,
  output logic                          act_new,
  output logic [$clog2(MAXA)-1:0]       act_idx,
  output logic [$clog2(MAXA):0]         n_act,
  output logic                          overflow,
  input  logic [$clog2(MAXA)-1:0]       rd_row_a,
  output vaddr_t                        rd_vox_a [LANES],
  input  logic [$clog2(MAXA)-1:0]       rd_idx_b,
  output vaddr_t                        rd_vox_b,
  input  logic                          smp_en,
  input  logic [$clog2(MAXA)-1:0]       smp_idx,
  input  logic [$clog2(MAXA)-1:0]       q_idx,
  output logic                          q_sampled
);
  localparam int AW = $clog2(MAXA);

  logic [NV-1:0]   active;
  logic [MAXA-1:0] sampled;
  vaddr_t          list [MAXA];

  assign act_new = act_en && !active[act_vox] && (n_act < (AW+1)'(MAXA));
  assign act_idx = AW'(n_act);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= '0;
      sampled  <= '0;
      n_act    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      active   <= '0;
      sampled  <= '0;
      n_act    <= '0;
      overflow <= 1'b0;
    end else begin
      if (act_new) begin
        active[act_vox] <= 1'b1;
        n_act           <= n_act + 1'b1;
      end else if (act_en && !active[act_vox]) begin
        overflow <= 1'b1;
      end
      if (smp_en) sampled[smp_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (act_new && !clear) list[act_idx] <= act_vox;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      rd_vox_a[l] = list[AW'(int'(rd_row_a) * LANES + l)];
    rd_vox_b  = list[rd_idx_b];
    q_sampled = sampled[q_idx];
  end
endmodule
