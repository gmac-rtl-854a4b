// tb_gm_unit: checks the geometric mapping unit against an independent model.
// Uses the three example points of the 10-segment grid on [-1,1) (voxels and
// local coordinates known by hand), then random points against floor-division
// arithmetic, then a reprogrammed 4-segment grid and the second-level split.
// Also checks the one-clock latency.
module tb_gm_unit;
  import gmac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_en = 0; logic [1:0] prog_axis = 0; logic [3:0] prog_idx = 0; coord_t prog_val = 0;
  logic in_valid = 0; point_t in_pt = '0;
  logic out_valid; voxel_t out_vox; point_t out_loc;
  int checks = 0, failures = 0;

  gm_unit dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coord_t q(real r); return coord_t'($rtoi(r * 32768.0 + (r < 0 ? -0.5 : 0.5))); endfunction

  task automatic apply(point_t p);
    @(negedge clk); in_valid = 1; in_pt = p;
    @(negedge clk); in_valid = 0;
    // one clock after in_valid the result must be present
  endtask

  task automatic expect_pt(point_t p, voxel_t ev, point_t el, int tol);
    apply(p);
    checks++;
    if (!out_valid || out_vox != ev ||
        (out_loc.x - el.x) > tol || (el.x - out_loc.x) > tol ||
        (out_loc.y - el.y) > tol || (el.y - out_loc.y) > tol ||
        (out_loc.z - el.z) > tol || (el.z - out_loc.z) > tol) begin
      failures++;
      $display("FAIL in=%0d,%0d,%0d vox=%h exp %h loc=%0d,%0d,%0d exp %0d,%0d,%0d v=%0d",
        p.x, p.y, p.z, out_vox, ev, out_loc.x, out_loc.y, out_loc.z, el.x, el.y, el.z, out_valid);
    end
  endtask

  function automatic void ref10(coord_t c, output vidx_t i, output coord_t l);
    int k;
    k = ((int'(c) + 32768) * 5) / 32768;
    // boundaries are rounded down, so re-check against them
    while (k < 9 && int'(c) >= -32768 + ((k + 1) * 32768) / 5) k++;
    while (k > 0 && int'(c) < -32768 + (k * 32768) / 5) k--;
    i = vidx_t'(k);
    l = coord_t'(int'(c) - (-32768 + (k * 32768) / 5));
  endfunction

  initial begin
    point_t p, el; voxel_t ev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // example points: p2, p1, p0
    expect_pt('{q(0.09), q(0.75), q(-0.23)},  '{4'd5, 4'd8, 4'd3}, '{q(0.09), q(0.15), q(0.17)}, 2);
    expect_pt('{q(-0.65), q(0.51), q(-0.11)}, '{4'd1, 4'd7, 4'd4}, '{q(0.15), q(0.11), q(0.09)}, 2);
    expect_pt('{q(0.32), q(-0.19), q(0.98)},  '{4'd6, 4'd4, 4'd9}, '{q(0.12), q(0.01), q(0.18)}, 2);
    // boundary case: exactly on 0.0 (5th boundary) belongs to segment 5
    expect_pt('{16'sd0, -16'sd32768, 16'sd32767}, '{4'd5, 4'd0, 4'd9}, '{16'sd0, 16'sd0, coord_t'(32767 - (-32768 + (9*32768)/5))}, 0);
    // random points
    for (int n = 0; n < 300; n++) begin
      p = '{coord_t'($urandom), coord_t'($urandom), coord_t'($urandom)};
      ref10(p.x, ev.x, el.x); ref10(p.y, ev.y, el.y); ref10(p.z, ev.z, el.z);
      expect_pt(p, ev, el, 0);
    end
    // reprogram x axis to 4 segments of 0.5: origin -1, boundaries -0.5, 0, 0.5
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); prog_en = 1; prog_axis = 0; prog_idx = 4'(k);
      prog_val = (k == 0) ? -16'sd32768 : (k < 4) ? coord_t'(-32768 + k * 16384) : 16'sh7fff;
    end
    @(negedge clk); prog_en = 0;
    for (int n = 0; n < 100; n++) begin
      int k;
      p = '{coord_t'($urandom), 16'sd0, 16'sd0};
      k = (int'(p.x) + 32768) / 16384;
      ev = '{vidx_t'(k), 4'd5, 4'd5};
      el = '{coord_t'(int'(p.x) + 32768 - k * 16384), 16'sd0, 16'sd0};
      expect_pt(p, ev, el, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
