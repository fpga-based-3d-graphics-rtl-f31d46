// tb_vga_timing: self-checking test of the 640x480 VGA timing at its
// default parameters. Over two full frames it measures, independently of
// the counters, the line length (800 clocks), the hsync pulse (95 clocks),
// the visible pixels per line (640), the frame length (525 lines), the
// vsync pulse (2 lines), the visible lines (480) and one vblank pulse per
// frame, and checks that hcnt/vcnt follow the raster.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic [10:0] hcnt, vcnt;
  logic active, hsync_n, vsync_n, vblank;
  int checks = 0, failures = 0;

  vga_timing dut (.*);
  always #2 clk = !clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hs_fall, hs_len, cyc, act_line, act_lines, line_clk, vs_lines, vb_cnt, frame_start;
    int ph, pv;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // expected raster position runs from (0,0)
    ph = 0; pv = 0;
    hs_len = 0; act_line = active ? 1 : 0; act_lines = 0; vs_lines = 0; vb_cnt = 0; line_clk = 0;  // pixel (0,0) is shown during reset release
    for (cyc = 0; cyc < 2 * 800 * 525; cyc++) begin
      @(posedge clk); #1;
      ph = ph + 1;
      if (ph == 800) begin ph = 0; pv = (pv == 524) ? 0 : pv + 1; end
      if (int'(hcnt) != ph || int'(vcnt) != pv) begin
        if (failures < 5) $display("raster %0d,%0d vs %0d,%0d", hcnt, vcnt, ph, pv);
        failures++;
      end
      if (!hsync_n) hs_len++;
      if (active) act_line++;
      if (vblank) vb_cnt++;
      if (ph == 799) begin
        // end of a line
        checks++;
        if (hs_len != 95) begin failures++; $display("hsync len %0d", hs_len); end
        checks++;
        if (act_line != ((pv < 480) ? 640 : 0)) begin failures++; $display("active %0d line %0d", act_line, pv); end
        if (act_line != 0) act_lines++;
        if (!vsync_n) vs_lines++;
        hs_len = 0; act_line = 0;
        if (pv == 524) begin
          checks++; if (act_lines != 480) begin failures++; $display("lines %0d", act_lines); end
          checks++; if (vs_lines != 2) begin failures++; $display("vsync lines %0d", vs_lines); end
          checks++; if (vb_cnt != 1) begin failures++; $display("vblank %0d", vb_cnt); end
          act_lines = 0; vs_lines = 0; vb_cnt = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
