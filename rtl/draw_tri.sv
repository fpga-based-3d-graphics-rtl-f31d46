// draw_tri: the Draw Triangle / Setup Span stage. It walks the rows of a
// set-up triangle's bounding box inside the tile, top to bottom, and emits
// one span per row: the row, the box's x range, the three edge function
// values and the depth at the span's first pixel, and the per-pixel
// increments. Moving down one row adds B to each edge value and dz/dy to
// the depth. End-of-tile markers pass through as an end span. The stage is
// only named in the design description; the row walk is this design's own.
//
// Interface: in_valid/in_ready/in_data (tri_setup_t), out_valid/out_ready/
// out_data (span_t). A triangle is taken when the stage is idle; after that
// one span leaves per clock in which out_ready is high.
module draw_tri
  import hybris_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  tri_setup_t in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output span_t      out_data
);
  logic       busy;
  tri_setup_t t;       // running copy: e0..e2 and z follow the current row
  tpos_t      row;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      row  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        t    <= in_data;
        row  <= in_data.ymin;
        busy <= 1'b1;
      end
    end else if (out_ready) begin
      if (t.is_end || row == t.ymax) begin
        busy <= 1'b0;
      end else begin
        row  <= row + 1'b1;
        t.e0 <= t.e0 + t.b0;
        t.e1 <= t.e1 + t.b1;
        t.e2 <= t.e2 + t.b2;
        t.z  <= t.z + t.dzdy;
      end
    end
  end

  assign in_ready  = !busy;
  assign out_valid = busy;

  always_comb begin
    out_data        = '0;
    out_data.is_end = t.is_end;
    out_data.tile   = t.tile;
    out_data.row    = row;
    out_data.xs     = t.xmin;
    out_data.xe     = t.xmax;
    out_data.e0     = t.e0;
    out_data.e1     = t.e1;
    out_data.e2     = t.e2;
    out_data.a0     = t.a0;
    out_data.a1     = t.a1;
    out_data.a2     = t.a2;
    out_data.z      = t.z;
    out_data.dzdx   = t.dzdx;
    out_data.color  = t.color;
  end
endmodule
