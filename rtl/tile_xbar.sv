// tile_xbar: the 2x2 crossbar switch between the two users of the tile
// buffers (the Draw Span/Draw Pixel stage and the output tile controller)
// and the two tile buffers. With sel=0 the drawing stage reaches buffer 0
// and the output controller buffer 1; with sel=1 the other way round. Each
// user has a full read and write port, so both may read and write their
// buffer in the same cycle. The switch is purely combinational; sel is
// driven by the output tile controller, which changes it only while neither
// user has an access in flight (read data returns one cycle after the
// address through the same setting of sel).
module tile_xbar
  import hybris_pkg::*;
#(
  parameter int AW = $clog2(TILE_PIX)
) (
  input  logic          sel,
  // drawing stage
  input  logic          d_we,
  input  logic [AW-1:0] d_waddr,
  input  tpix_t         d_wdata,
  input  logic [AW-1:0] d_raddr,
  output tpix_t         d_rdata,
  // output tile controller
  input  logic          o_we,
  input  logic [AW-1:0] o_waddr,
  input  tpix_t         o_wdata,
  input  logic [AW-1:0] o_raddr,
  output tpix_t         o_rdata,
  // tile buffers
  output logic          b_we    [2],
  output logic [AW-1:0] b_waddr [2],
  output tpix_t         b_wdata [2],
  output logic [AW-1:0] b_raddr [2],
  input  tpix_t         b_rdata [2]
);
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (sel == b[0]) begin
        b_we[b]    = d_we;
        b_waddr[b] = d_waddr;
        b_wdata[b] = d_wdata;
        b_raddr[b] = d_raddr;
      end else begin
        b_we[b]    = o_we;
        b_waddr[b] = o_waddr;
        b_wdata[b] = o_wdata;
        b_raddr[b] = o_raddr;
      end
    end
    d_rdata = sel ? b_rdata[1] : b_rdata[0];
    o_rdata = sel ? b_rdata[0] : b_rdata[1];
  end
endmodule
