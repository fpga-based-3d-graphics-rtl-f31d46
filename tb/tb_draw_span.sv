// tb_draw_span: self-checking test of the Draw Span / Draw Pixel stage.
// Random triangles are set up and cut into spans by the reference model
// (edge values and depths evaluated directly per row) and fed, with random
// gaps, to the stage, which draws into a tile buffer model (synchronous
// read, cleared to depth 0xFFFF). After each tile the buffer must equal the
// reference rendering, overlapping triangles included, so the depth test
// must both pass and reject pixels. The end-of-tile handshake is checked:
// tile_valid with the tile's position, held until tile_ready, with no new
// span taken meanwhile; and buf_ok low must keep the stage from starting.
module tb_draw_span;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, tb_we, buf_ok, tile_valid, tile_ready;
  span_t in_data;
  logic [9:0] tb_waddr, tb_raddr;
  tpix_t tb_wdata, tb_rdata;
  tile_info_t tile_info;
  tpix_t mem [1024];
  int col [1024], dep [1024];
  int checks = 0, failures = 0, rejected = 0;

  draw_span dut (.*);
  always #5 clk = !clk;
  always_ff @(posedge clk) begin
    if (tb_we) mem[tb_waddr] <= tb_wdata;
    tb_rdata <= mem[tb_raddr];
  end
  // count depth-test rejections: a covered pixel read but not written
  always_ff @(posedge clk) if (rst) rejected <= 0; else if (dut.state == 2 && !tb_we) rejected <= rejected + 1;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(span_t s);
    in_data = s; in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
    if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = '0; buf_ok = 0; tile_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int tile = 0; tile < 6; tile++) begin
      int tx, ty, ntri;
      tx = int'($urandom_range(0, 19)); ty = int'($urandom_range(0, 14));
      for (int i = 0; i < 1024; i++) begin
        mem[i] = '{z: 16'hFFFF, color: 24'h101010};
        col[i] = 24'h101010; dep[i] = 65535;
      end
      ntri = int'($urandom_range(3, 10));
      for (int n = 0; n < ntri; n++) begin
        hybris_ref_pkg::rtri_t t;
        hybris_ref_pkg::rsetup_t s;
        t = rand_tri(tx, ty);
        s = ref_setup(t, tx, ty);
        ref_draw(t, tx, ty, col, dep);
        if (s.ok)
          for (int r = s.ymin; r <= s.ymax; r++) begin
            span_t sp;
            sp = '0;
            sp.tile.tx = 6'(tx); sp.tile.ty = 6'(ty);
            sp.row = 5'(r); sp.xs = 5'(s.xmin); sp.xe = 5'(s.xmax);
            sp.e0 = edge_t'(s.a[0] * s.xmin + s.b[0] * r + s.c[0]);
            sp.e1 = edge_t'(s.a[1] * s.xmin + s.b[1] * r + s.c[1]);
            sp.e2 = edge_t'(s.a[2] * s.xmin + s.b[2] * r + s.c[2]);
            sp.a0 = edge_t'(s.a[0]); sp.a1 = edge_t'(s.a[1]); sp.a2 = edge_t'(s.a[2]);
            sp.z = zf_t'(ref_zf(s, s.xmin, r)); sp.dzdx = zf_t'(s.dzdx);
            sp.color = color_t'(t.color);
            if (tile == 0 && n == 0 && r == s.ymin) begin
              // buf_ok low: the stage must not take the span
              in_data = sp; in_valid = 1;
              repeat (5) begin
                @(negedge clk);
                checks++; if (in_ready || dut.state != 0) failures++;
              end
              in_valid = 0;
              buf_ok = 1;
            end
            send(sp);
          end
      end
      begin
        span_t e;
        e = '0; e.is_end = 1; e.tile.tx = 6'(tx); e.tile.ty = 6'(ty); e.tile.frame_end = 1'(tile);
        send(e);
        while (!tile_valid) @(negedge clk);
        repeat (4) begin
          checks++;
          if (!tile_valid || in_ready || tile_info != e.tile) failures++;
          @(negedge clk);
        end
        tile_ready = 1; @(negedge clk); tile_ready = 0;
        checks++; if (tile_valid) failures++;
      end
      for (int i = 0; i < 1024; i++) begin
        checks++;
        if (int'(mem[i].color) != col[i] || int'(mem[i].z) != dep[i]) begin
          failures++;
          if (failures < 6) $display("tile %0d pixel %0d: got %h/%h exp %h/%h", tile, i, mem[i].color, mem[i].z, col[i], dep[i]);
        end
      end
    end
    checks++;
    if (rejected == 0) failures++;
    $display("depth test rejected %0d pixels", rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
