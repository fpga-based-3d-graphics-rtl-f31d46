// tb_bunny_workload: the full design rendering a frame of the size the
// source uses for its frame-rate figure: 70,000 triangles (the Stanford
// Bunny), 12 frames/s at a 25 MHz render clock, i.e. at most 2,083,333
// render clocks per frame. The bunny mesh itself is not available, so the
// frame is synthetic: 70,000 small triangles (vertices within 5 pixels of
// each other) scattered over a 320x320-pixel area in the middle of the
// 640x480 screen, with depth rising from the centre outward.
//
// The host model bins the triangles into tiles (a triangle goes to every
// tile its bounding box touches), packs tiles into 2-Mbyte input banks and
// refills whichever bank the FPGA has released, so the frame streams
// through the two banks several times. The test checks every framebuffer
// word against the reference renderer and reports the render time from
// the first bank hand-over to the frame's bank-swap request, which must
// not exceed the source's 12 frames/s budget; the synthetic mesh only
// approximates the real one. The wait for vertical blanking before the
// swap completes is reported separately.
module tb_bunny_workload;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  localparam int W = 640, H = 480, HT = 20, VT = 15, NT = HT * VT, NTRI = 70000;
  localparam int BANK_WORDS = 1 << 19;
  logic clk = 0, rst = 1, pix_clk = 0, pix_rst = 1;
  color_t bg_color = 24'h000000;
  logic [1:0] host_full, bank_free;
  logic [SRAM_AW-1:0] in_addr [2];
  logic in_oe_n [2];
  logic [WORD_W-1:0] in_dq [2];
  logic [SRAM_AW-1:0] fb_addr [2];
  logic fb_we_n [2], fb_oe_n [2], fb_dq_oe [2];
  logic [WORD_W-1:0] fb_dq_o [2], fb_dq_i [2];
  logic [7:0] red, green, blue;
  logic hsync_n, vsync_n, blank_n;

  logic [31:0] bank0 [1 << 19], bank1 [1 << 19];
  logic [31:0] fbm [2][1 << SRAM_AW];
  int frame [W * H];
  hybris_ref_pkg::rtri_t tiles [NT][$];
  int checks = 0, failures = 0;
  longint cyc;

  hybris_top dut (.*);

  always #20 clk = !clk;
  always #19.86 pix_clk = !pix_clk;
  assign in_dq[0] = in_oe_n[0] ? '0 : bank0[in_addr[0]];
  assign in_dq[1] = in_oe_n[1] ? '0 : bank1[in_addr[1]];
  for (genvar b = 0; b < 2; b++) begin : g_fb
    always @(posedge clk)
      if (!fb_we_n[b] && fb_dq_oe[b]) fbm[b][fb_addr[b]] = fb_dq_o[b];
    assign fb_dq_i[b] = fb_oe_n[b] ? '0 : fbm[b][fb_addr[b]];
  end
  always_ff @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pack tiles starting at t into bank image m; returns the next tile.
  function automatic int pack(ref logic [31:0] m[1 << 19], input int t);
    int a;
    a = 0;
    while (t < NT && a + 1 + 16 * tiles[t].size() < BANK_WORDS - 1) begin
      a = put_tile(m, a, t % HT, t / HT, t == NT - 1, tiles[t]);
      t++;
    end
    put_end(m, a);
    return t;
  endfunction

  initial begin
    int t, b, loads, records, rendered_bank;
    longint t0, t1;
    host_full = 0;
    // build the scene
    records = 0;
    for (int n = 0; n < NTRI; n++) begin
      hybris_ref_pkg::rtri_t tr;
      int cx, cy, x0, x1, y0, y1;
      cx = 160 + int'($urandom_range(0, 319)); cy = 80 + int'($urandom_range(0, 319));
      for (int k = 0; k < 3; k++) begin
        tr.x[k] = cx + int'($urandom_range(0, 4));
        tr.y[k] = cy + int'($urandom_range(0, 4));
        tr.z[k] = 1000 * ((cx > 320 ? cx - 320 : 320 - cx) + (cy > 240 ? cy - 240 : 240 - cy))
                  / 10 + int'($urandom_range(0, 200));
      end
      tr.color = int'($urandom & 32'hFFFFFF);
      x0 = tr.x[0]; x1 = tr.x[0]; y0 = tr.y[0]; y1 = tr.y[0];
      for (int k = 1; k < 3; k++) begin
        if (tr.x[k] < x0) x0 = tr.x[k];
        if (tr.x[k] > x1) x1 = tr.x[k];
        if (tr.y[k] < y0) y0 = tr.y[k];
        if (tr.y[k] > y1) y1 = tr.y[k];
      end
      for (int ty = y0 / 32; ty <= y1 / 32 && ty < VT; ty++)
        for (int tx = x0 / 32; tx <= x1 / 32 && tx < HT; tx++) begin
          tiles[ty * HT + tx].push_back(tr);
          records++;
        end
    end
    for (int tt = 0; tt < NT; tt++) begin
      int col[1024], dep[1024];
      for (int i = 0; i < 1024; i++) begin col[i] = int'(bg_color); dep[i] = 65535; end
      foreach (tiles[tt][n]) ref_draw(tiles[tt][n], tt % HT, tt / HT, col, dep);
      for (int i = 0; i < 1024; i++) frame[((tt / HT) * 32 + i / 32) * W + (tt % HT) * 32 + i % 32] = col[i];
    end
    $display("%0d triangles, %0d tile records after binning", NTRI, records);
    repeat (4) @(negedge clk);
    rst = 0; pix_rst = 0;
    rendered_bank = dut.fb_sel ? 1 : 0;
    // host: keep both input banks filled
    t = 0; b = 0; loads = 0; t0 = cyc;
    while (t < NT) begin
      while (!bank_free[b]) @(negedge clk);
      if (b == 0) t = pack(bank0, t); else t = pack(bank1, t);
      host_full = 2'(1 << b); @(negedge clk); host_full = 0;
      loads++;
      b = 1 - b;
    end
    while (!dut.swap_req) @(negedge clk);
    t1 = cyc;
    $display("frame rendered in %0d render clocks = %0.2f frames/s at 25 MHz (%0d bank loads)",
             t1 - t0, 25.0e6 / real'(t1 - t0), loads);
    checks++; if (loads < 3) begin failures++; $display("banks were not refilled"); end
    checks++; if (t1 - t0 > 25000000 / 12) begin failures++; $display("slower than 12 frames/s"); end
    while (!dut.swap_done) @(negedge clk);
    $display("bank swap completed %0d clocks after the request", cyc - t1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (fbm[rendered_bank][ref_fb_addr(x, y, HT)] != 32'(frame[y * W + x])) begin
          failures++;
          if (failures < 6) $display("pixel %0d,%0d wrong", x, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
