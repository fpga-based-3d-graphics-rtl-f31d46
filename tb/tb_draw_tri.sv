// tb_draw_tri: self-checking test of the Draw Triangle / Setup Span stage.
// Random set-up triangles (random boxes inside the tile, random edge and
// depth values and increments) and end-of-tile markers go in; with random
// back-pressure the test checks that each triangle yields one span per box
// row, top to bottom, with edge values e + B*(row-ymin) and depth
// z + dz/dy*(row-ymin) computed directly, and that end markers come out as
// end spans. It also checks that a span leaves every clock when the
// consumer is always ready.
module tb_draw_tri;
  import hybris_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  tri_setup_t in_data;
  span_t out_data;
  span_t exp_q [$];
  int checks = 0, failures = 0;
  bit always_ready = 0;

  draw_tri dut (.*);
  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data.is_end != exp_q[0].is_end || out_data.tile != exp_q[0].tile
          || (!out_data.is_end && out_data != exp_q[0])) begin
        failures++;
        if (failures < 4) $display("span mismatch row %0d", out_data.row);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready <= always_ready || ($urandom_range(0, 2) != 0);

  task automatic send(tri_setup_t t);
    in_data = t; in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic tri_setup_t rand_setup();
    tri_setup_t t;
    int a, b;
    t = tri_setup_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom});
    t.is_end = 0;
    a = int'($urandom_range(0, 31)); b = int'($urandom_range(0, 31));
    t.ymin = 5'((a < b) ? a : b); t.ymax = 5'((a < b) ? b : a);
    a = int'($urandom_range(0, 31)); b = int'($urandom_range(0, 31));
    t.xmin = 5'((a < b) ? a : b); t.xmax = 5'((a < b) ? b : a);
    t.e0 = edge_t'($signed($urandom_range(0, 200000)) - 100000);
    t.b0 = edge_t'($signed($urandom_range(0, 2000)) - 1000);
    t.dzdy = zf_t'($signed($urandom_range(0, 2000000)) - 1000000);
    return t;
  endfunction

  task automatic expect_spans(tri_setup_t t);
    for (int r = int'(t.ymin); r <= int'(t.ymax); r++) begin
      span_t s;
      int d;
      d = r - int'(t.ymin);
      s = '0;
      s.tile = t.tile; s.row = 5'(r); s.xs = t.xmin; s.xe = t.xmax;
      s.e0 = t.e0 + t.b0 * d; s.e1 = t.e1 + t.b1 * d; s.e2 = t.e2 + t.b2 * d;
      s.a0 = t.a0; s.a1 = t.a1; s.a2 = t.a2;
      s.z = t.z + t.dzdy * zf_t'(d); s.dzdx = t.dzdx; s.color = t.color;
      exp_q.push_back(s);
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      tri_setup_t t;
      t = rand_setup();
      if (n % 7 == 6) begin
        span_t e;
        t.is_end = 1;
        e = '0; e.is_end = 1; e.tile = t.tile;
        exp_q.push_back(e);
      end else expect_spans(t);
      send(t);
    end
    // rate: a full-height triangle with an always-ready consumer
    always_ready = 1;
    begin
      tri_setup_t t;
      int c0;
      t = rand_setup(); t.ymin = 0; t.ymax = 31;
      expect_spans(t);
      send(t);
      c0 = 0;
      while (out_valid) begin @(negedge clk); c0++; end
      checks++;
      if (c0 != 32) begin failures++; $display("32 spans took %0d clocks", c0); end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d spans missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
