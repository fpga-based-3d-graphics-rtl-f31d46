// hybris_top: the FPGA of a PCI-board 3D graphics processor built around a
// tile rendering engine. Data flow, as in the design description:
//
//   host (PCI, PLX local bus) -> external SRAM input banks 0/1
//     -> input multiplexer -> input triangle controller
//     -> tile rendering engine (32x32 tiles, on-chip double-buffered tiles)
//     -> 2x2 framebuffer crossbar -> external SRAM framebuffer banks 0/1
//     -> VGA video display processor -> 3 x 8 bit video DAC, hsync, vsync
//
// Two clock domains: clk runs the input side and the renderer, pix_clk
// (25.175 MHz for 640x480 at 60 Hz) runs the display. Each has its own
// synchronous active-high reset. The input banks form a two-entry FIFO of
// large buffers: the host fills one bank while the FPGA reads the other.
// The framebuffer is double buffered across the other two banks: the
// renderer writes one frame into one bank while the display reads the
// other, and the banks are exchanged at vertical blanking after the
// renderer has written the last tile of a frame.
//
// Ports: host_full/bank_free are the control/status link with the host
// side; in_* are the read pins of the input banks; fb_* the pins of the
// framebuffer banks, with the tristate data bus split into dq_o/dq_oe/dq_i;
// red/green/blue/hsync_n/vsync_n/blank_n go to the video DAC. bg_color is
// the colour of pixels no triangle covers.
module hybris_top
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
  input  logic               clk,
  input  logic               rst,
  input  logic               pix_clk,
  input  logic               pix_rst,
  input  color_t             bg_color,
  // host control / status
  input  logic [1:0]         host_full,
  output logic [1:0]         bank_free,
  // external SRAM input banks (read side)
  output logic [SRAM_AW-1:0] in_addr  [2],
  output logic               in_oe_n  [2],
  input  logic [WORD_W-1:0]  in_dq    [2],
  // external SRAM framebuffer banks
  output logic [SRAM_AW-1:0] fb_addr  [2],
  output logic               fb_we_n  [2],
  output logic               fb_oe_n  [2],
  output logic [WORD_W-1:0]  fb_dq_o  [2],
  output logic               fb_dq_oe [2],
  input  logic [WORD_W-1:0]  fb_dq_i  [2],
  // video DAC
  output logic [7:0]         red,
  output logic [7:0]         green,
  output logic [7:0]         blue,
  output logic               hsync_n,
  output logic               vsync_n,
  output logic               blank_n
);
  localparam int H_TILES = (H_VIS + TILE - 1) / TILE;

  logic               rd_avail, rd_done;
  logic [SRAM_AW-1:0] rd_addr;
  logic [WORD_W-1:0]  rd_data;
  logic               tri_valid, tri_ready;
  tri_item_t          tri_data;
  logic               r_we, swap_req, swap_done, swap_busy, vblank, fb_sel;
  logic [SRAM_AW-1:0] r_addr, d_addr;
  logic [WORD_W-1:0]  r_wdata, d_rdata;

  input_mux u_in_mux (
    .clk, .rst, .host_full, .bank_free,
    .rd_avail, .rd_addr, .rd_data, .rd_done,
    .bank_addr(in_addr), .bank_oe_n(in_oe_n), .bank_dq(in_dq)
  );

  input_tri_ctrl u_in_ctrl (
    .clk, .rst, .rd_avail, .rd_addr, .rd_data, .rd_done,
    .tri_valid, .tri_ready, .tri_data
  );

  tile_engine #(.H_TILES(H_TILES)) u_engine (
    .clk, .rst, .bg_color,
    .tri_valid, .tri_ready, .tri_data,
    .fb_we(r_we), .fb_addr(r_addr), .fb_wdata(r_wdata),
    .swap_req, .swap_done
  );

  fb_swap_ctrl u_swap (
    .clk, .rst, .swap_req, .swap_busy, .swap_done,
    .pix_clk, .pix_rst, .vblank, .sel(fb_sel)
  );

  fb_xbar u_fb_xbar (
    .sel(fb_sel),
    .r_we, .r_addr, .r_wdata,
    .d_addr, .d_rdata,
    .fb_addr, .fb_we_n, .fb_oe_n, .fb_dq_o, .fb_dq_oe, .fb_dq_i
  );

  vga_display #(
    .H_VIS(H_VIS), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_TOTAL(H_TOTAL),
    .V_VIS(V_VIS), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_TOTAL(V_TOTAL)
  ) u_vga (
    .clk(pix_clk), .rst(pix_rst),
    .fb_addr(d_addr), .fb_rdata(d_rdata),
    .red, .green, .blue, .hsync_n, .vsync_n, .blank_n, .vblank
  );
endmodule
