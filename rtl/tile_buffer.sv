// tile_buffer: one local SRAM tile buffer holding colour and depth for the
// 32x32 pixels of a tile. As in the design description it is a dual-ported
// block RAM without any reset or clear of its contents: the tile is cleared
// by writing it (the output tile controller does that). One port writes,
// the other reads; the read is synchronous, with the data one cycle after
// the address. A read of the address being written in the same cycle
// returns the old contents.
module tile_buffer
  import hybris_pkg::*;
#(
  parameter int DEPTH = TILE_PIX,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  tpix_t         wdata,
  input  logic [AW-1:0] raddr,
  output tpix_t         rdata
);
  tpix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
