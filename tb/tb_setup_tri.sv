// tb_setup_tri: self-checking test of triangle setup. Random triangles of
// both orientations (plus degenerate ones and ones that miss the tile) are
// fed with random back-pressure, interleaved with end-of-tile markers. The
// expected stream is computed by the reference model: culled triangles
// produce nothing, end markers pass through, and for every other triangle
// the bounding box, edge coefficients, edge values and depth at the box
// corner, depth gradients and colour must match exactly.
module tb_setup_tri;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  tri_item_t in_data;
  tri_setup_t out_data;
  tri_setup_t exp_q [$];
  int checks = 0, failures = 0, culled = 0, sent = 0;

  setup_tri dut (.*);
  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tri_setup_t expect_of(hybris_ref_pkg::rtri_t t, int tx, int ty);
    hybris_ref_pkg::rsetup_t s;
    tri_setup_t e;
    s = ref_setup(t, tx, ty);
    e = '0;
    e.tile.tx = 6'(tx); e.tile.ty = 6'(ty);
    e.xmin = 5'(s.xmin); e.xmax = 5'(s.xmax); e.ymin = 5'(s.ymin); e.ymax = 5'(s.ymax);
    e.a0 = edge_t'(s.a[0]); e.a1 = edge_t'(s.a[1]); e.a2 = edge_t'(s.a[2]);
    e.b0 = edge_t'(s.b[0]); e.b1 = edge_t'(s.b[1]); e.b2 = edge_t'(s.b[2]);
    e.e0 = edge_t'(s.a[0] * s.xmin + s.b[0] * s.ymin + s.c[0]);
    e.e1 = edge_t'(s.a[1] * s.xmin + s.b[1] * s.ymin + s.c[1]);
    e.e2 = edge_t'(s.a[2] * s.xmin + s.b[2] * s.ymin + s.c[2]);
    e.z = zf_t'(ref_zf(s, s.xmin, s.ymin));
    e.dzdx = zf_t'(s.dzdx); e.dzdy = zf_t'(s.dzdy);
    e.color = color_t'(t.color);
    return e;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q[0]) begin
        failures++;
        if (failures < 4 && exp_q.size() != 0) $display("got %h\nexp %h", out_data, exp_q[0]);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      hybris_ref_pkg::rtri_t t;
      int tx, ty, kind;
      tx = int'($urandom_range(0, 19)); ty = int'($urandom_range(0, 14));
      kind = int'($urandom_range(0, 19));
      t = rand_tri(tx, ty);
      if (kind == 0) begin            // degenerate: three points on a line
        t.x[2] = 2 * t.x[1] - t.x[0]; t.y[2] = 2 * t.y[1] - t.y[0];
      end else if (kind == 1) begin   // entirely left of the tile
        for (int k = 0; k < 3; k++) t.x[k] = tx * 32 - 1 - int'($urandom_range(0, 20));
      end
      if (kind == 2) begin
        in_data = to_item(t, tx, ty, 1, 1);
        exp_q.push_back(tri_setup_t'({1'b1, in_data.tile, {($bits(tri_setup_t) - 1 - $bits(tile_info_t)){1'b0}}}));
      end else begin
        in_data = to_item(t, tx, ty, 0, 0);
        if (ref_setup(t, tx, ty).ok) exp_q.push_back(expect_of(t, tx, ty));
        else culled++;
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent++;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    checks++;
    if (culled == 0) failures++;
    $display("culled %0d of %0d", culled, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
