// setup_tri: the Setup Triangle stage of the tile rendering engine. For
// each triangle of the current tile it prepares what the later stages need
// to rasterize it inside the 32x32 tile; end-of-tile markers pass through
// unchanged. The design description names the stage only; the method here
// (edge functions and a depth plane, evaluated at pixel corners) is this
// design's own, chosen as the simplest complete one.
//
// Work per triangle: vertex positions are made relative to the tile origin
// (tx*32, ty*32). The doubled signed area decides the orientation; a
// clockwise triangle has v1 and v2 exchanged, a zero-area one is dropped.
// The bounding box is clipped to the tile, and a triangle whose box misses
// the tile is dropped. Edge k from va to vb gets E(x,y) = A*x + B*y + C with
// A = ya-yb and B = xb-xa, so a pixel (x,y) is covered when all three E are
// >= 0. The depth gradients dz/dx and dz/dy are computed in 16.16 fixed
// point by two sequential dividers (4 quotient bits per clock, 15 clocks),
// and the depth is
// evaluated at the box's top-left pixel. A triangle takes 20 clocks from
// acceptance to output.
//
// Interface: in_valid/in_ready/in_data (tri_item_t), out_valid/out_ready/
// out_data (tri_setup_t). One triangle is in work at a time; in_ready is
// high only when idle.
module setup_tri
  import hybris_pkg::*;
#(
  parameter int DIV_W = 56
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  tri_item_t  in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output tri_setup_t out_data
);
  typedef enum logic [2:0] {S_IDLE, S_CALC, S_DIV, S_WAIT, S_Z, S_OUT} state_t;
  state_t state;

  tri_item_t  item;
  tri_setup_t res;
  edge_t      x0, y0;                   // vertex 0 relative to the tile
  z_t         z0;
  logic signed [DIV_W-1:0] num_x, num_y, area;
  logic       div_start, dx_done, dy_done, dx_busy, dy_busy;
  logic signed [DIV_W-1:0] q_x, q_y;
  logic       got_x, got_y;

  // Combinational set-up of the latched triangle.
  edge_t  cx [3], cy [3];
  z_t     cz [3];
  edge_t  car, ca [3], cb [3], cc [3];
  edge_t  bx0, bx1, by0, by1;
  logic   cull;
  logic signed [DIV_W-1:0] cnx, cny;

  function automatic edge_t emin(edge_t a, edge_t b, edge_t c);
    edge_t m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic edge_t emax(edge_t a, edge_t b, edge_t c);
    edge_t m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  always_comb begin
    edge_t ox, oy, tx_, ty_;
    z_t    tz;
    tx_ = '0;  ty_ = '0;  tz = '0;
    ca  = '{default: '0};  cb = '{default: '0};  cc = '{default: '0};
    ox = edge_t'({item.tile.tx, 5'd0});
    oy = edge_t'({item.tile.ty, 5'd0});
    cx[0] = edge_t'(item.v0.x) - ox;  cy[0] = edge_t'(item.v0.y) - oy;  cz[0] = item.v0.z;
    cx[1] = edge_t'(item.v1.x) - ox;  cy[1] = edge_t'(item.v1.y) - oy;  cz[1] = item.v1.z;
    cx[2] = edge_t'(item.v2.x) - ox;  cy[2] = edge_t'(item.v2.y) - oy;  cz[2] = item.v2.z;
    car = (cx[1] - cx[0]) * (cy[2] - cy[0]) - (cx[2] - cx[0]) * (cy[1] - cy[0]);
    if (car < 0) begin                   // make the triangle counter-clockwise
      tx_ = cx[1]; cx[1] = cx[2]; cx[2] = tx_;
      ty_ = cy[1]; cy[1] = cy[2]; cy[2] = ty_;
      tz  = cz[1]; cz[1] = cz[2]; cz[2] = tz;
      car = -car;
    end
    ca[0] = cy[0] - cy[1];  cb[0] = cx[1] - cx[0];  cc[0] = cx[0] * cy[1] - cx[1] * cy[0];
    ca[1] = cy[1] - cy[2];  cb[1] = cx[2] - cx[1];  cc[1] = cx[1] * cy[2] - cx[2] * cy[1];
    ca[2] = cy[2] - cy[0];  cb[2] = cx[0] - cx[2];  cc[2] = cx[2] * cy[0] - cx[0] * cy[2];
    bx0 = emin(cx[0], cx[1], cx[2]);  bx1 = emax(cx[0], cx[1], cx[2]);
    by0 = emin(cy[0], cy[1], cy[2]);  by1 = emax(cy[0], cy[1], cy[2]);
    if (bx0 < 0) bx0 = 0;
    if (by0 < 0) by0 = 0;
    if (bx1 > TILE - 1) bx1 = TILE - 1;
    if (by1 > TILE - 1) by1 = TILE - 1;
    cull = (car == 0) || (bx0 > bx1) || (by0 > by1);
    cnx = ((DIV_W'(signed'({1'b0, cz[1]})) - DIV_W'(signed'({1'b0, cz[0]}))) * DIV_W'(cy[2] - cy[0])
         - (DIV_W'(signed'({1'b0, cz[2]})) - DIV_W'(signed'({1'b0, cz[0]}))) * DIV_W'(cy[1] - cy[0]))
         <<< ZFRAC;
    cny = (DIV_W'(cx[1] - cx[0]) * (DIV_W'(signed'({1'b0, cz[2]})) - DIV_W'(signed'({1'b0, cz[0]})))
         - DIV_W'(cx[2] - cx[0]) * (DIV_W'(signed'({1'b0, cz[1]})) - DIV_W'(signed'({1'b0, cz[0]}))))
         <<< ZFRAC;
  end

  assign div_start = (state == S_DIV);

  seq_div #(.W(DIV_W)) u_div_x (
    .clk, .rst, .start(div_start), .num(num_x), .den(area),
    .busy(dx_busy), .done(dx_done), .quo(q_x)
  );
  seq_div #(.W(DIV_W)) u_div_y (
    .clk, .rst, .start(div_start), .num(num_y), .den(area),
    .busy(dy_busy), .done(dy_done), .quo(q_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      got_x <= 1'b0;
      got_y <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          item  <= in_data;
          state <= in_data.is_end ? S_OUT : S_CALC;
          res        <= '0;
          res.is_end <= in_data.is_end;
          res.tile   <= in_data.tile;
        end
        S_CALC: begin
          if (cull) begin
            state <= S_IDLE;
          end else begin
            res.xmin  <= tpos_t'(bx0);  res.xmax <= tpos_t'(bx1);
            res.ymin  <= tpos_t'(by0);  res.ymax <= tpos_t'(by1);
            res.a0 <= ca[0];  res.a1 <= ca[1];  res.a2 <= ca[2];
            res.b0 <= cb[0];  res.b1 <= cb[1];  res.b2 <= cb[2];
            res.e0 <= ca[0] * bx0 + cb[0] * by0 + cc[0];
            res.e1 <= ca[1] * bx0 + cb[1] * by0 + cc[1];
            res.e2 <= ca[2] * bx0 + cb[2] * by0 + cc[2];
            res.color <= item.color;
            x0    <= cx[0];
            y0    <= cy[0];
            z0    <= cz[0];
            num_x <= cnx;
            num_y <= cny;
            area  <= DIV_W'(car);
            got_x <= 1'b0;
            got_y <= 1'b0;
            state <= S_DIV;
          end
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: begin
          if (dx_done) begin res.dzdx <= zf_t'(q_x); got_x <= 1'b1; end
          if (dy_done) begin res.dzdy <= zf_t'(q_y); got_y <= 1'b1; end
          if ((got_x || dx_done) && (got_y || dy_done)) state <= S_Z;
        end
        S_Z: begin
          res.z <= (zf_t'({1'b0, z0}) <<< ZFRAC)
                 + res.dzdx * (zf_t'(res.xmin) - zf_t'(x0))
                 + res.dzdy * (zf_t'(res.ymin) - zf_t'(y0));
          state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_data  = res;
endmodule
