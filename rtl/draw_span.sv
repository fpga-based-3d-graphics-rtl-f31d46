// draw_span: the Draw Span / Draw Pixel stage, the last stage of the
// rendering pipeline. It walks a span left to right. A pixel whose three
// edge values are all >= 0 is covered: its tile buffer entry is read, and
// one clock later, if the new depth is less than the stored depth, the
// colour and depth are written (a read-modify-write made possible by the
// dual-ported tile buffer). An uncovered pixel takes one clock, a covered
// one two. Moving right one pixel adds A to each edge value and dz/dx to
// the depth.
//
// An end span closes the tile: the stage offers the tile on tile_valid
// (with tile_info) to the output tile controller and waits for tile_ready,
// which the controller gives after it has switched the tile buffers; the
// next tile is then drawn into the other buffer. buf_ok low (the controller
// is still clearing the buffers after reset) holds the stage. The
// handshake with the output tile controller follows the design
// description; the pixel method and the less-than depth test are this
// design's own.
module draw_span
  import hybris_pkg::*;
#(
  parameter int AW = $clog2(TILE_PIX)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  span_t         in_data,
  // tile buffer (through the crossbar)
  output logic          tb_we,
  output logic [AW-1:0] tb_waddr,
  output tpix_t         tb_wdata,
  output logic [AW-1:0] tb_raddr,
  input  tpix_t         tb_rdata,
  // output tile controller
  input  logic          buf_ok,
  output logic          tile_valid,
  input  logic          tile_ready,
  output tile_info_t    tile_info
);
  typedef enum logic [1:0] {S_IDLE, S_PIX, S_WRITE, S_TILE} state_t;
  state_t state;
  span_t  s;          // running copy: e0..e2, z follow the current pixel
  tpos_t  x;
  z_t     pz;         // depth of the pixel being tested

  logic covered, last;
  assign covered = !s.e0[EDGE_W-1] && !s.e1[EDGE_W-1] && !s.e2[EDGE_W-1];
  assign last    = (x == s.xe);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      x     <= '0;
      pz    <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid && buf_ok) begin
          s     <= in_data;
          x     <= in_data.xs;
          state <= in_data.is_end ? S_TILE : S_PIX;
        end
        S_PIX: begin
          pz <= zf_to_z(s.z);
          if (covered) begin
            state <= S_WRITE;           // depth read issued this clock
          end else begin
            state <= last ? S_IDLE : S_PIX;
            x    <= x + 1'b1;
            s.e0 <= s.e0 + s.a0;  s.e1 <= s.e1 + s.a1;  s.e2 <= s.e2 + s.a2;
            s.z  <= s.z + s.dzdx;
          end
        end
        S_WRITE: begin
          state <= last ? S_IDLE : S_PIX;
          x    <= x + 1'b1;
          s.e0 <= s.e0 + s.a0;  s.e1 <= s.e1 + s.a1;  s.e2 <= s.e2 + s.a2;
          s.z  <= s.z + s.dzdx;
        end
        S_TILE: if (tile_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready   = (state == S_IDLE) && buf_ok;
  assign tb_raddr   = AW'({s.row, x});
  assign tb_waddr   = AW'({s.row, x});
  assign tb_we      = (state == S_WRITE) && (pz < tb_rdata.z);
  assign tb_wdata   = '{z: pz, color: s.color};
  assign tile_valid = (state == S_TILE);
  assign tile_info  = s.tile;
endmodule
