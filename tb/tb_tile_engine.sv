// tb_tile_engine: end-to-end test of the tile rendering engine. Eight tiles
// of random triangles (overlapping, partly outside the tile, some culled,
// one tile empty, the last one closing the frame) are fed as the input
// triangle controller would. A framebuffer model takes the copied tiles and
// the bank swap is acknowledged after a delay. Every pixel of every tile
// must equal the reference rendering. The test also counts that the
// mechanisms of the pipeline happened: stage FIFOs full (stall), triangles
// culled, depth-test rejections, tile buffer switches, a bank swap.
module tb_tile_engine;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic clk = 0, rst = 1;
  color_t bg_color = 24'h0A0B0C;
  logic tri_valid, tri_ready, fb_we, swap_req, swap_done;
  tri_item_t tri_data;
  logic [SRAM_AW-1:0] fb_addr;
  logic [WORD_W-1:0] fb_wdata;
  logic [31:0] fb [307200];
  int checks = 0, failures = 0;
  int n_stall, n_cull, n_reject, n_switch, n_swap;

  tile_engine dut (.*);
  always #5 clk = !clk;

  always_ff @(posedge clk) begin
    if (fb_we) fb[int'(fb_addr)] <= fb_wdata;
    if (rst) begin
      n_stall <= 0; n_cull <= 0; n_reject <= 0; n_switch <= 0; n_swap <= 0;
    end else begin
      if ((dut.su_valid && !dut.su_ready) || (dut.dt_valid && !dut.dt_ready)) n_stall <= n_stall + 1;
      if (dut.u_setup.state == 1 && dut.u_setup.cull) n_cull <= n_cull + 1;
      if (dut.u_draw_span.state == 2 && !dut.d_we) n_reject <= n_reject + 1;
      if (dut.tile_valid && dut.tile_ready) n_switch <= n_switch + 1;
      if (swap_req) n_swap <= n_swap + 1;
    end
  end

  // bank swap acknowledged 50 clocks after the request
  initial begin
    swap_done = 0;
    forever begin
      @(posedge clk);
      if (swap_req) begin
        repeat (50) @(posedge clk);
        #1 swap_done = 1;
        @(posedge clk);
        #1 swap_done = 0;
      end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(tri_item_t it);
    tri_data = it; tri_valid = 1;
    @(posedge clk);
    while (!tri_ready) @(posedge clk);
    @(negedge clk);
    tri_valid = 0;
  endtask

  int col [8][1024], dep [8][1024], txs [8], tys [8];

  initial begin
    tri_valid = 0; tri_data = '0;
    for (int i = 0; i < 307200; i++) fb[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      int nt;
      txs[t] = (t * 3) % 20; tys[t] = (t * 2) % 15;
      for (int i = 0; i < 1024; i++) begin col[t][i] = int'(bg_color); dep[t][i] = 65535; end
      nt = (t == 3) ? 0 : int'($urandom_range(2, 12));
      for (int n = 0; n < nt; n++) begin
        hybris_ref_pkg::rtri_t tr;
        tr = rand_tri(txs[t], tys[t]);
        ref_draw(tr, txs[t], tys[t], col[t], dep[t]);
        send(to_item(tr, txs[t], tys[t], 0, t == 7));
      end
      send(to_item(rand_tri(0, 0), txs[t], tys[t], 1, t == 7));
    end
    // wait for the last tile to be written and the swap to finish
    while (n_swap == 0) @(negedge clk);
    while (dut.u_out.state != 2) @(negedge clk);
    for (int t = 0; t < 8; t++)
      for (int i = 0; i < 1024; i++) begin
        int a;
        a = ref_fb_addr(txs[t] * 32 + i % 32, tys[t] * 32 + i / 32, 20);
        checks++;
        if (fb[a] != 32'(col[t][i])) begin
          failures++;
          if (failures < 6) $display("tile %0d pixel %0d: %h vs %h", t, i, fb[a], col[t][i]);
        end
      end
    $display("stalls %0d culled %0d rejected %0d switches %0d swaps %0d", n_stall, n_cull, n_reject, n_switch, n_swap);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_cull == 0) failures++;
    checks++; if (n_reject == 0) failures++;
    checks++; if (n_switch != 8) failures++;
    checks++; if (n_swap != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
