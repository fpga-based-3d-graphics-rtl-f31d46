// vga_display: the VGA video display processor. It runs in the pixel clock
// domain, fetches one pixel per pixel clock from the framebuffer bank it
// owns during the raster scan of the visible area, and drives the 3 x 8 bit
// video DAC and the two sync signals. The framebuffer holds 32x32 tiles, so
// the fetch address comes from the tiled address calculation (fb_addr_gen):
// each scanline reads one 32-pixel row from each tile it crosses.
//
// Pipeline: cycle 0 the timing generator gives the pixel position, cycle 1
// the SRAM address is registered on the pins, cycle 2 the data read back
// from the asynchronous SRAM is registered as the pixel; sync and blank are
// delayed by the same two cycles so that all DAC outputs line up. During
// blanking the colour outputs are zero. A framebuffer word holds the colour
// in [23:16]=red, [15:8]=green, [7:0]=blue (this design's choice).
module vga_display
  import hybris_pkg::*;
#(
  parameter int H_VIS   = 640,
  parameter int H_FP    = 16,
  parameter int H_SYNC  = 95,
  parameter int H_TOTAL = 800,
  parameter int V_VIS   = 480,
  parameter int V_FP    = 10,
  parameter int V_SYNC  = 2,
  parameter int V_TOTAL = 525
) (
  input  logic               clk,      // pixel clock
  input  logic               rst,
  output logic [SRAM_AW-1:0] fb_addr,
  input  logic [WORD_W-1:0]  fb_rdata,
  output logic [7:0]         red, green, blue,
  output logic               hsync_n,
  output logic               vsync_n,
  output logic               blank_n,
  output logic               vblank    // start of vertical blanking, for the bank swap
);
  localparam int HW = 11, VW = 11;
  localparam int H_TILES = (H_VIS + TILE - 1) / TILE;

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          act0, hs0, vs0;
  logic          act1, hs1, vs1;
  logic [SRAM_AW-1:0] addr0;

  vga_timing #(
    .H_VIS(H_VIS), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_TOTAL(H_TOTAL),
    .V_VIS(V_VIS), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_TOTAL(V_TOTAL),
    .HW(HW), .VW(VW)
  ) u_timing (
    .clk, .rst, .hcnt, .vcnt, .active(act0), .hsync_n(hs0), .vsync_n(vs0), .vblank
  );

  fb_addr_gen #(.H_TILES(H_TILES), .XW(HW), .YW(VW)) u_addr (
    .x(hcnt), .y(vcnt), .base('0), .addr(addr0)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      fb_addr <= '0;
      act1    <= 1'b0;
      hs1     <= 1'b1;
      vs1     <= 1'b1;
      red     <= '0;
      green   <= '0;
      blue    <= '0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      blank_n <= 1'b0;
    end else begin
      // stage 1: address to the SRAM
      fb_addr <= act0 ? addr0 : fb_addr;
      act1    <= act0;
      hs1     <= hs0;
      vs1     <= vs0;
      // stage 2: pixel to the DAC
      {red, green, blue} <= act1 ? fb_rdata[23:0] : 24'd0;
      hsync_n <= hs1;
      vsync_n <= vs1;
      blank_n <= act1;
    end
  end
endmodule
