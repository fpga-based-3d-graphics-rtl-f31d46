// hybris_ref_pkg: reference model for the testbenches. It renders triangles
// into a 32x32 tile by evaluating, at every pixel, the three edge functions
// and the depth plane directly from the vertices (no incremental stepping),
// with the same conventions as the RTL: pixel (x,y) sampled at its integer
// position relative to the tile origin, covered when every edge function of
// the counter-clockwise triangle is >= 0, depth in 16.16 fixed point with
// gradients truncated toward zero, rounded to an integer and clamped, and a
// write when the new depth is less than the stored one. It also holds the
// tiled framebuffer address formula and a random triangle generator.
package hybris_ref_pkg;
  import hybris_pkg::*;

  typedef struct {
    int x[3], y[3], z[3];
    int color;
  } rtri_t;

  typedef struct {
    bit      ok;
    longint  a[3], b[3], c[3];
    longint  dzdx, dzdy;
    longint  x0, y0, z0;
    int      xmin, xmax, ymin, ymax;
  } rsetup_t;

  function automatic rsetup_t ref_setup(rtri_t t, int tx, int ty);
    rsetup_t s;
    longint x[3], y[3], z[3], ar, tmp, nx, ny;
    for (int k = 0; k < 3; k++) begin
      x[k] = t.x[k] - tx * 32;  y[k] = t.y[k] - ty * 32;  z[k] = t.z[k];
    end
    ar = (x[1] - x[0]) * (y[2] - y[0]) - (x[2] - x[0]) * (y[1] - y[0]);
    if (ar < 0) begin
      tmp = x[1]; x[1] = x[2]; x[2] = tmp;
      tmp = y[1]; y[1] = y[2]; y[2] = tmp;
      tmp = z[1]; z[1] = z[2]; z[2] = tmp;
      ar = -ar;
    end
    for (int k = 0; k < 3; k++) begin
      int j = (k + 1) % 3;
      s.a[k] = y[k] - y[j];
      s.b[k] = x[j] - x[k];
      s.c[k] = x[k] * y[j] - x[j] * y[k];
    end
    s.xmin = int'(x[0]); s.xmax = int'(x[0]); s.ymin = int'(y[0]); s.ymax = int'(y[0]);
    for (int k = 1; k < 3; k++) begin
      if (x[k] < s.xmin) s.xmin = int'(x[k]);
      if (x[k] > s.xmax) s.xmax = int'(x[k]);
      if (y[k] < s.ymin) s.ymin = int'(y[k]);
      if (y[k] > s.ymax) s.ymax = int'(y[k]);
    end
    if (s.xmin < 0) s.xmin = 0;
    if (s.ymin < 0) s.ymin = 0;
    if (s.xmax > 31) s.xmax = 31;
    if (s.ymax > 31) s.ymax = 31;
    s.ok = (ar != 0) && (s.xmin <= s.xmax) && (s.ymin <= s.ymax);
    nx = ((z[1] - z[0]) * (y[2] - y[0]) - (z[2] - z[0]) * (y[1] - y[0])) * 65536;
    ny = ((x[1] - x[0]) * (z[2] - z[0]) - (x[2] - x[0]) * (z[1] - z[0])) * 65536;
    s.dzdx = (ar != 0) ? nx / ar : 0;
    s.dzdy = (ar != 0) ? ny / ar : 0;
    s.x0 = x[0];  s.y0 = y[0];  s.z0 = z[0];
    return s;
  endfunction

  function automatic bit ref_covered(rsetup_t s, int px, int py);
    for (int k = 0; k < 3; k++)
      if (s.a[k] * px + s.b[k] * py + s.c[k] < 0) return 0;
    return 1;
  endfunction

  function automatic longint ref_zf(rsetup_t s, int px, int py);
    return s.z0 * 65536 + s.dzdx * (px - s.x0) + s.dzdy * (py - s.y0);
  endfunction

  function automatic int ref_z(rsetup_t s, int px, int py);
    longint r;
    r = (ref_zf(s, px, py) + 32768) >>> 16;
    if (r < 0) r = 0;
    if (r > 65535) r = 65535;
    return int'(r);
  endfunction

  // Render triangles, in order, into a tile of colour/depth.
  function automatic void ref_draw(rtri_t t, int tx, int ty, ref int col[1024], ref int dep[1024]);
    rsetup_t s;
    int zz;
    s = ref_setup(t, tx, ty);
    if (!s.ok) return;
    for (int py = s.ymin; py <= s.ymax; py++)
      for (int px = s.xmin; px <= s.xmax; px++)
        if (ref_covered(s, px, py)) begin
          zz = ref_z(s, px, py);
          if (zz < dep[py * 32 + px]) begin
            dep[py * 32 + px] = zz;
            col[py * 32 + px] = t.color;
          end
        end
  endfunction

  function automatic int ref_fb_addr(int x, int y, int h_tiles);
    return ((y / 32) * h_tiles + (x / 32)) * 1024 + (y % 32) * 32 + (x % 32);
  endfunction

  // Random triangle around tile (tx,ty); may reach into neighbouring tiles.
  function automatic rtri_t rand_tri(int tx, int ty);
    rtri_t t;
    for (int k = 0; k < 3; k++) begin
      t.x[k] = tx * 32 - 12 + int'($urandom_range(0, 55));
      t.y[k] = ty * 32 - 12 + int'($urandom_range(0, 55));
      t.z[k] = int'($urandom_range(0, 65535));
    end
    t.color = int'($urandom & 32'hFF_FFFF);
    return t;
  endfunction

  function automatic tri_item_t to_item(rtri_t t, int tx, int ty, bit is_end, bit frame_end);
    tri_item_t it;
    it = '0;
    it.is_end = is_end;
    it.tile.tx = TILE_ID_W'(tx);
    it.tile.ty = TILE_ID_W'(ty);
    it.tile.frame_end = frame_end;
    if (!is_end) begin
      it.v0 = '{x: coord_t'(t.x[0]), y: coord_t'(t.y[0]), z: z_t'(t.z[0])};
      it.v1 = '{x: coord_t'(t.x[1]), y: coord_t'(t.y[1]), z: z_t'(t.z[1])};
      it.v2 = '{x: coord_t'(t.x[2]), y: coord_t'(t.y[2]), z: z_t'(t.z[2])};
      it.color = color_t'(t.color);
    end
    return it;
  endfunction
  // Writes one tile (header and triangle records) into an input bank image
  // at word address addr; returns the address after it.
  function automatic int put_tile(ref logic [31:0] m[1 << 19], input int addr, int tx, int ty,
                                  bit fe, rtri_t tris[$]);
    m[addr] = {2'b01, fe, 5'd0, 12'(tris.size()), 6'(ty), 6'(tx)};
    addr++;
    foreach (tris[i]) begin
      for (int w = 0; w < 16; w++) m[addr + w] = $urandom;   // unused words hold junk
      for (int k = 0; k < 3; k++) begin
        m[addr + k]     = {4'h0, 12'(tris[i].y[k]), 4'h0, 12'(tris[i].x[k])};
        m[addr + 3 + k] = {16'h0, 16'(tris[i].z[k])};
      end
      m[addr + 6] = {8'h0, 24'(tris[i].color)};
      addr += 16;
    end
    return addr;
  endfunction

  function automatic void put_end(ref logic [31:0] m[1 << 19], input int addr);
    m[addr] = {2'b10, 30'd0};
  endfunction
endpackage
