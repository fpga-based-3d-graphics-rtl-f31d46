// tb_vga_display: self-checking test of the VGA display processor at a
// reduced raster (64x64 visible, 84x70 total) so that frames are short.
// A framebuffer SRAM model answers each address combinationally with a
// random word. The test follows the DAC outputs: the n-th visible pixel
// after a vsync pulse must be pixel (n mod 64, n div 64) fetched from its
// tiled framebuffer address; blanked pixels must be black; the hsync pulse
// must start H_FP clocks after the end of the visible part of a line, so
// that sync and pixels stay aligned through the fetch pipeline.
module tb_vga_display;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  localparam int HV = 64, HFP = 4, HS = 8, HT = 84, VV = 64, VFP = 2, VS = 2, VT = 70;
  logic clk = 0, rst = 1;
  logic [SRAM_AW-1:0] fb_addr;
  logic [WORD_W-1:0] fb_rdata;
  logic [7:0] red, green, blue;
  logic hsync_n, vsync_n, blank_n, vblank;
  logic [WORD_W-1:0] mem [4096];
  int checks = 0, failures = 0;

  vga_display #(.H_VIS(HV), .H_FP(HFP), .H_SYNC(HS), .H_TOTAL(HT),
                .V_VIS(VV), .V_FP(VFP), .V_SYNC(VS), .V_TOTAL(VT)) dut (.*);
  assign fb_rdata = mem[fb_addr[11:0]];
  always #20 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, frames, since_blank;
    logic vs_q, bl_q, hs_q;
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst = 0;
    n = -1; frames = 0; vs_q = 1; bl_q = 0; hs_q = 1; since_blank = 0;
    while (frames < 3) begin
      @(negedge clk);
      if (!vsync_n && vs_q) begin
        if (n >= 0) begin
          checks++;
          if (n != HV * VV) begin failures++; $display("pixels per frame %0d", n); end
        end
        n = 0; frames++;
      end
      if (blank_n) begin
        if (n >= 0) begin
          int x, y;
          x = n % HV; y = n / HV;
          checks++;
          if ({red, green, blue} != mem[ref_fb_addr(x, y, 2)][23:0]) begin
            failures++;
            if (failures < 5) $display("pixel %0d,%0d", x, y);
          end
          n++;
        end
      end else begin
        checks++;
        if ({red, green, blue} != 0) failures++;
      end
      if (!blank_n && bl_q) since_blank = 0; else since_blank++;
      if (!hsync_n && hs_q && vsync_n && n > 0 && since_blank < HT) begin
        checks++;
        if (since_blank != HFP) begin failures++; $display("hsync at %0d after blank", since_blank); end
      end
      vs_q = vsync_n; bl_q = blank_n; hs_q = hsync_n;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
