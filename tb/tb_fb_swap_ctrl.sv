// tb_fb_swap_ctrl: self-checking test of the framebuffer bank swap across
// two unrelated clocks (render 10 ns, pixel 39.7 ns). For several requests
// it checks that the bank select does not change before the next vertical
// blanking pulse, that it flips exactly once at it, that swap_busy covers
// the whole exchange and that swap_done pulses once in the render clock.
module tb_fb_swap_ctrl;
  logic clk = 0, rst = 1, pix_clk = 0, pix_rst = 1;
  logic swap_req, swap_busy, swap_done, vblank, sel;
  int checks = 0, failures = 0;
  int pcnt = 0, done_cnt = 0;

  fb_swap_ctrl dut (.*);
  always #5 clk = !clk;
  always #19.85 pix_clk = !pix_clk;

  // vblank every 200 pixel clocks
  always_ff @(posedge pix_clk) begin
    pcnt   <= (pcnt == 199) ? 0 : pcnt + 1;
    vblank <= (pcnt == 199);
  end
  always_ff @(posedge clk) if (swap_done) done_cnt <= done_cnt + 1;

  // sel may only change in the pixel clock right after a vblank pulse
  logic sel_q, vb_q;
  always_ff @(posedge pix_clk) begin
    sel_q <= sel;
    vb_q  <= vblank;
    if (!pix_rst && sel != sel_q) begin
      checks++;
      if (!vb_q) begin failures++; $display("sel changed outside vblank"); end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s0;
    swap_req = 0;
    repeat (4) @(posedge pix_clk);
    rst = 0; pix_rst = 0;
    for (int n = 0; n < 5; n++) begin
      int d0;
      repeat ($urandom_range(3, 300)) @(negedge clk);
      s0 = sel;
      d0 = done_cnt;
      swap_req = 1;
      @(negedge clk);
      swap_req = 0;
      checks++; if (!swap_busy) failures++;
      while (!swap_done) begin
        @(negedge clk);
        if (!swap_done) begin
          checks++; if (!swap_busy) failures++;
        end
      end
      @(negedge clk);
      checks++; if (sel == s0) begin failures++; $display("no swap"); end
      checks++; if (swap_busy) failures++;
      checks++; if (done_cnt != d0 + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
