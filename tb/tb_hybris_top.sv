// tb_hybris_top: end-to-end test of the whole FPGA at its default size
// (640x480 frame, 20x15 tiles of 32x32 pixels, 800x525 raster). The
// testbench plays the host and the board: it fills input bank 0 with the
// first 150 tiles of a frame and announces it, then, while the FPGA reads
// bank 0, fills bank 1 with the other 150 tiles, the last one closing the
// frame. Two different frames are rendered this way, one after the other. It models the four external SRAM banks and reads the video DAC
// outputs. Render clock 25 MHz, pixel clock 25.175 MHz.
//
// Checks: after the renderer has finished a frame, the framebuffer banks
// swap at vertical blanking; the next displayed frame must equal, pixel for
// pixel, the reference rendering of all 300 tiles. Mechanisms counted, each
// of which must occur: input bank switches (4), tile buffer switches (600),
// empty tiles, culled triangles, pipeline stalls at the stage FIFOs,
// depth-test rejections, framebuffer bank swaps (2).
module tb_hybris_top;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  localparam int W = 640, H = 480, HT = 20, VT = 15, NT = HT * VT;
  logic clk = 0, rst = 1, pix_clk = 0, pix_rst = 1;
  color_t bg_color = 24'h00_20_40;
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
  int checks = 0, failures = 0;
  int n_rd_done, n_switch, n_cull, n_stall, n_reject, n_swap, n_empty;

  hybris_top dut (.*);

  always #20 clk = !clk;          // 25 MHz
  always #19.86 pix_clk = !pix_clk; // 25.175 MHz

  assign in_dq[0] = in_oe_n[0] ? '0 : bank0[in_addr[0]];
  assign in_dq[1] = in_oe_n[1] ? '0 : bank1[in_addr[1]];
  for (genvar b = 0; b < 2; b++) begin : g_fb
    always @(posedge clk)
      if (!fb_we_n[b] && fb_dq_oe[b]) fbm[b][fb_addr[b]] = fb_dq_o[b];
    assign fb_dq_i[b] = fb_oe_n[b] ? '0 : fbm[b][fb_addr[b]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_rd_done <= 0; n_switch <= 0; n_cull <= 0; n_stall <= 0; n_reject <= 0; n_swap <= 0;
    end else begin
      if (dut.rd_done) n_rd_done <= n_rd_done + 1;
      if (dut.u_engine.tile_valid && dut.u_engine.tile_ready) n_switch <= n_switch + 1;
      if (dut.u_engine.u_setup.state == 1 && dut.u_engine.u_setup.cull) n_cull <= n_cull + 1;
      if ((dut.u_engine.su_valid && !dut.u_engine.su_ready) || (dut.u_engine.dt_valid && !dut.u_engine.dt_ready))
        n_stall <= n_stall + 1;
      if (dut.u_engine.u_draw_span.state == 2 && !dut.u_engine.d_we) n_reject <= n_reject + 1;
      if (dut.swap_done) n_swap <= n_swap + 1;
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build one bank image with tiles [t0, t1) and the matching reference.
  task automatic fill_bank(ref logic [31:0] m[1 << 19], input int t0, int t1);
    int a;
    a = 0;
    for (int t = t0; t < t1; t++) begin
      hybris_ref_pkg::rtri_t q[$];
      int tx, ty, nt, col[1024], dep[1024];
      tx = t % HT; ty = t / HT;
      nt = (t % 37 == 5) ? 0 : int'($urandom_range(0, 3));
      if (nt == 0) n_empty++;
      for (int i = 0; i < 1024; i++) begin col[i] = int'(bg_color); dep[i] = 65535; end
      for (int n = 0; n < nt; n++) begin
        q.push_back(rand_tri(tx, ty));
        ref_draw(q[n], tx, ty, col, dep);
      end
      for (int i = 0; i < 1024; i++) frame[(ty * 32 + i / 32) * W + tx * 32 + i % 32] = col[i];
      a = put_tile(m, a, tx, ty, t == NT - 1, q);
    end
    put_end(m, a);
  endtask

  initial begin
    logic sel0;
    int n, mism;
    host_full = 0; n_empty = 0;
    repeat (4) @(negedge clk);
    rst = 0; pix_rst = 0;
    for (int f = 0; f < 2; f++) begin
      // host: bank 0, then bank 1 while the FPGA reads bank 0
      while (bank_free[0] !== 1'b1) @(negedge clk);
      fill_bank(bank0, 0, NT / 2);
      @(negedge clk); host_full = 2'b01; @(negedge clk); host_full = 0;
      repeat (1000) @(negedge clk);
      checks++; if (bank_free[0] != 1'b0) begin failures++; $display("bank 0 not taken"); end
      while (bank_free[1] !== 1'b1) @(negedge clk);
      fill_bank(bank1, NT / 2, NT);
      @(negedge clk); host_full = 2'b10; @(negedge clk); host_full = 0;
      // wait for the frame to be rendered and the banks to swap
      sel0 = dut.fb_sel;
      while (n_swap == f) @(negedge clk);
      checks++; if (dut.fb_sel == sel0) begin failures++; $display("no bank swap"); end
      checks++; if (n_rd_done != 2 * (f + 1) || bank_free != 2'b11) begin failures++; $display("input banks %0d %b", n_rd_done, bank_free); end
      // capture the next displayed frame
      @(negedge vsync_n);
      n = 0; mism = 0;
      while (n < W * H) begin
        @(posedge pix_clk); #1;
        if (blank_n) begin
          checks++;
          if ({red, green, blue} != 24'(frame[n])) begin
            failures++; mism++;
            if (mism < 6) $display("frame %0d pixel %0d,%0d: %h vs %h", f, n % W, n / W, {red, green, blue}, frame[n]);
          end
          n++;
        end
      end
    end
    $display("bank switches %0d tile switches %0d empty tiles %0d culled %0d stalls %0d rejected %0d fb swaps %0d",
             n_rd_done, n_switch, n_empty, n_cull, n_stall, n_reject, n_swap);
    checks++; if (n_switch != 2 * NT) failures++;
    checks++; if (n_empty == 0) failures++;
    checks++; if (n_cull == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_reject == 0) failures++;
    checks++; if (n_swap != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
