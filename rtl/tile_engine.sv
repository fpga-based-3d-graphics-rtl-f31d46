// tile_engine: the tile rendering engine. It renders the triangles of one
// 32x32-pixel tile at a time and writes finished tiles into the external
// framebuffer. The structure follows the design description: Setup
// Triangle, a FIFO, Draw Triangle / Setup Span, a FIFO, Draw Span / Draw
// Pixel, then two on-chip tile buffers (colour and depth) behind a 2x2
// crossbar that the output tile controller switches, so one tile is drawn
// while the previous one is copied out and cleared. The FIFOs between the
// stages have a depth of one, as in the FPGA version described.
//
// Interface: triangles and end-of-tile markers enter on tri_valid/
// tri_ready/tri_data (tri_item_t, from the input triangle controller). The
// framebuffer write port (fb_we/fb_addr/fb_wdata) and the bank swap request
// (swap_req/swap_done) come from the output tile controller. bg_color is
// the colour a cleared tile holds. All in one clock domain.
module tile_engine
  import hybris_pkg::*;
#(
  parameter int H_TILES    = 20,
  parameter int FIFO_DEPTH = 1
) (
  input  logic               clk,
  input  logic               rst,
  input  color_t             bg_color,
  input  logic               tri_valid,
  output logic               tri_ready,
  input  tri_item_t          tri_data,
  output logic               fb_we,
  output logic [SRAM_AW-1:0] fb_addr,
  output logic [WORD_W-1:0]  fb_wdata,
  output logic               swap_req,
  input  logic               swap_done
);
  localparam int AW = $clog2(TILE_PIX);

  tri_setup_t su_data, f1_data;
  logic       su_valid, su_ready, f1_valid, f1_ready;
  span_t      dt_data, f2_data;
  logic       dt_valid, dt_ready, f2_valid, f2_ready;

  logic          d_we, o_we, sel, buf_ok, tile_valid, tile_ready;
  logic [AW-1:0] d_waddr, d_raddr, o_waddr, o_raddr;
  tpix_t         d_wdata, d_rdata, o_wdata, o_rdata;
  tile_info_t    tile_info;
  logic          b_we    [2];
  logic [AW-1:0] b_waddr [2];
  tpix_t         b_wdata [2];
  logic [AW-1:0] b_raddr [2];
  tpix_t         b_rdata [2];

  setup_tri u_setup (
    .clk, .rst,
    .in_valid(tri_valid), .in_ready(tri_ready), .in_data(tri_data),
    .out_valid(su_valid), .out_ready(su_ready), .out_data(su_data)
  );

  hs_fifo #(.W($bits(tri_setup_t)), .DEPTH(FIFO_DEPTH)) u_fifo_tri (
    .clk, .rst,
    .in_valid(su_valid), .in_ready(su_ready), .in_data(su_data),
    .out_valid(f1_valid), .out_ready(f1_ready), .out_data(f1_data)
  );

  draw_tri u_draw_tri (
    .clk, .rst,
    .in_valid(f1_valid), .in_ready(f1_ready), .in_data(f1_data),
    .out_valid(dt_valid), .out_ready(dt_ready), .out_data(dt_data)
  );

  hs_fifo #(.W($bits(span_t)), .DEPTH(FIFO_DEPTH)) u_fifo_span (
    .clk, .rst,
    .in_valid(dt_valid), .in_ready(dt_ready), .in_data(dt_data),
    .out_valid(f2_valid), .out_ready(f2_ready), .out_data(f2_data)
  );

  draw_span u_draw_span (
    .clk, .rst,
    .in_valid(f2_valid), .in_ready(f2_ready), .in_data(f2_data),
    .tb_we(d_we), .tb_waddr(d_waddr), .tb_wdata(d_wdata),
    .tb_raddr(d_raddr), .tb_rdata(d_rdata),
    .buf_ok, .tile_valid, .tile_ready, .tile_info
  );

  tile_xbar u_xbar (
    .sel,
    .d_we, .d_waddr, .d_wdata, .d_raddr, .d_rdata,
    .o_we, .o_waddr, .o_wdata, .o_raddr, .o_rdata,
    .b_we, .b_waddr, .b_wdata, .b_raddr, .b_rdata
  );

  for (genvar b = 0; b < 2; b++) begin : g_buf
    tile_buffer u_buf (
      .clk,
      .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b]),
      .raddr(b_raddr[b]), .rdata(b_rdata[b])
    );
  end

  output_tile_ctrl #(.H_TILES(H_TILES)) u_out (
    .clk, .rst, .bg_color,
    .buf_ok, .tile_valid, .tile_ready, .tile_info,
    .sel, .o_we, .o_waddr, .o_wdata, .o_raddr, .o_rdata,
    .fb_we, .fb_addr, .fb_wdata,
    .swap_req, .swap_done
  );
endmodule
