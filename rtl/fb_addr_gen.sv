// fb_addr_gen: the SRAM address calculation datapath of the framebuffer.
// The renderer writes the framebuffer a 32x32 tile at a time, so the
// framebuffer is stored tile by tile: the 1024 pixels of a tile occupy
// consecutive words, row by row, and the tiles follow each other in raster
// order, H_TILES tiles per tile row. The video processor uses the same
// mapping to fetch a scanline as one 32-pixel row from each tile the line
// crosses. Address = ((y/32)*H_TILES + x/32)*1024 + (y%32)*32 + x%32, plus
// a base word address. The tile-wise layout follows the design description;
// the exact order of tiles and of pixels in a tile is this design's choice.
// Purely combinational.
module fb_addr_gen
  import hybris_pkg::*;
#(
  parameter int H_TILES = 20,   // 640 pixels / 32
  parameter int XW      = 11,
  parameter int YW      = 11
) (
  input  logic [XW-1:0]      x,
  input  logic [YW-1:0]      y,
  input  logic [SRAM_AW-1:0] base,
  output logic [SRAM_AW-1:0] addr
);
  logic [SRAM_AW-1:0] tile_idx;

  always_comb begin
    tile_idx = SRAM_AW'(y >> TILE_LG) * SRAM_AW'(H_TILES) + SRAM_AW'(x >> TILE_LG);
    addr = base + (tile_idx << (2 * TILE_LG))
                + SRAM_AW'({y[TILE_LG-1:0], x[TILE_LG-1:0]});
  end
endmodule
