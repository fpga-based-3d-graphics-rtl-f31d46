// tb_output_tile_ctrl: self-checking test of the output tile controller,
// with the tile crossbar and two tile buffers around it and the testbench
// playing the drawing stage. It checks: buf_ok stays low while both block
// RAMs are cleared after reset and both then read as the clear value; a
// finished tile is accepted at once, the switch flips, all 1024 pixels
// reach their tiled framebuffer addresses in 1024 consecutive write clocks;
// the copied buffer is handed back cleared; a tile offered during a copy
// waits; and after a frame's last tile the controller requests the bank
// swap and takes no tile until swap_done.
module tb_output_tile_ctrl;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic clk = 0, rst = 1;
  color_t bg_color = 24'h203040;
  logic buf_ok, tile_valid, tile_ready, sel, o_we, d_we, fb_we, swap_req, swap_done;
  tile_info_t tile_info;
  logic [9:0] o_waddr, o_raddr, d_waddr, d_raddr;
  tpix_t o_wdata, o_rdata, d_wdata, d_rdata;
  logic [SRAM_AW-1:0] fb_addr;
  logic [WORD_W-1:0] fb_wdata;
  logic b_we [2];
  logic [9:0] b_waddr [2], b_raddr [2];
  tpix_t b_wdata [2], b_rdata [2];
  logic [31:0] fb [307200];
  int checks = 0, failures = 0, fb_writes = 0, swaps = 0;

  output_tile_ctrl dut (.*);
  tile_xbar u_x (.*);
  for (genvar b = 0; b < 2; b++) begin : g_buf
    tile_buffer u_b (.clk, .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b]),
                     .raddr(b_raddr[b]), .rdata(b_rdata[b]));
  end
  always #5 clk = !clk;
  always_ff @(posedge clk) begin
    if (fb_we) begin fb[int'(fb_addr)] <= fb_wdata; fb_writes <= fb_writes + 1; end
    if (rst) swaps <= 0;
    else if (swap_req) swaps <= swaps + 1;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_draw_buffer_clear();
    for (int i = 0; i < 1024; i++) begin
      d_raddr = 10'(i);
      @(negedge clk);
      checks++;
      if (d_rdata.z != 16'hFFFF || d_rdata.color != bg_color) begin
        failures++;
        if (failures < 4) $display("pixel %0d not clear", i);
      end
    end
  endtask

  task automatic draw_tile(int seed, output int pat[1024]);
    for (int i = 0; i < 1024; i++) begin
      pat[i] = int'($urandom & 32'hFFFFFF);
      d_we = 1; d_waddr = 10'(i); d_wdata = '{z: 16'(i), color: 24'(pat[i])};
      @(negedge clk);
    end
    d_we = 0;
  endtask

  initial begin
    int pat [1024];
    int cnt, w0, tx, ty;
    for (int i = 0; i < 307200; i++) fb[i] = 32'hFFFFFFFF;
    d_we = 0; d_waddr = 0; d_raddr = 0; d_wdata = '0; tile_valid = 0; tile_info = '0; swap_done = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    cnt = 0;
    while (!buf_ok) begin @(negedge clk); cnt++; end
    checks++; if (cnt != 2048) begin failures++; $display("init clear took %0d", cnt); end
    check_draw_buffer_clear();
    for (int t = 0; t < 4; t++) begin
      logic s0;
      tx = int'($urandom_range(0, 19)); ty = int'($urandom_range(0, 14));
      draw_tile(t, pat);
      s0 = sel;
      w0 = fb_writes;
      tile_valid = 1; tile_info = '{tx: 6'(tx), ty: 6'(ty), frame_end: (t == 2)};
      #1;
      checks++; if (!tile_ready) begin failures++; $display("check 1 failed"); end
      @(negedge clk);
      tile_valid = 0;
      checks++; if (sel == s0) begin failures++; $display("check 2 failed"); end
      // the buffer now on the drawing side must be clean
      check_draw_buffer_clear();
      // offer the next tile during the copy: it must wait
      tile_valid = 1;
      checks++; if (tile_ready) begin failures++; $display("check 3 failed"); end
      tile_valid = 0;
      while (dut.state == 3) @(negedge clk);
      checks++; if (fb_writes != w0 + 1024) begin failures++; $display("fb writes %0d", fb_writes - w0); end
      for (int i = 0; i < 1024; i++) begin
        int a;
        a = ref_fb_addr(tx * 32 + i % 32, ty * 32 + i / 32, 20);
        checks++;
        if (fb[a] != pat[i]) begin
          failures++;
          if (failures < 6) $display("fb pixel %0d wrong", i);
        end
      end
      if (t == 2) begin
        repeat (3) @(negedge clk);
        checks++; if (swaps != 1 || tile_ready) begin failures++; $display("check 4 failed"); end
        repeat (20) @(negedge clk);
        checks++; if (tile_ready) begin failures++; $display("check 5 failed"); end
        swap_done = 1; @(negedge clk); swap_done = 0;
        @(negedge clk);
        checks++; if (!tile_ready) begin failures++; $display("check 6 failed"); end
      end
    end
    checks++; if (swaps != 1) begin failures++; $display("check 7 failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
