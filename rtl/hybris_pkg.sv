// hybris_pkg: types and constants shared by the tile rendering engine, the
// input side and the video side.
//
// The renderer works on 32x32-pixel tiles (the tile size follows the
// design description); a frame of 640x480 pixels is 20x15 tiles. The external
// SRAM banks are 32 bits wide and 2 Mbyte deep (512K words), as on the
// prototyping board. Pixel colour is 24-bit true colour (3 x 8 bits, matching
// the video DAC); the 16-bit depth, the 12-bit signed vertex coordinates and
// the 16.16 fixed-point depth interpolation are this design's own choices.
//
// Input buffer format (this design's own choice; a triangle record is 64
// bytes, the per-triangle heap size the design description implies):
//   header word : [31:30] kind (HDR_TILE or HDR_END_OF_BANK), [29] last tile
//                 of the frame, [23:12] number of triangles, [11:6] tile y,
//                 [5:0] tile x
//   triangle    : 16 words; word k (k=0..2) = {y[27:16], x[11:0]} of vertex
//                 k as signed 12-bit screen coordinates, word 3+k = depth of
//                 vertex k in [15:0], word 6 = colour in [23:0], words 7..15
//                 unused.
package hybris_pkg;

  localparam int TILE      = 32;           // tile edge in pixels
  localparam int TILE_LG   = 5;
  localparam int TILE_PIX  = TILE * TILE;  // 1024 pixels per tile
  localparam int COORD_W   = 12;           // signed screen coordinate
  localparam int Z_W       = 16;           // depth
  localparam int COLOR_W   = 24;           // 3 x 8 bit RGB
  localparam int EDGE_W    = 32;           // edge function values
  localparam int ZF_W      = 64;           // 16.16 fixed-point depth, wide
  localparam int ZFRAC     = 16;
  localparam int WORD_W    = 32;           // external SRAM word
  localparam int SRAM_AW   = 19;           // 512K words = 2 Mbyte per bank
  localparam int TILE_ID_W = 6;
  localparam int TRI_WORDS = 16;           // 64-byte triangle record
  localparam int NTRI_W    = 12;

  localparam logic [1:0] HDR_TILE        = 2'd1;
  localparam logic [1:0] HDR_END_OF_BANK = 2'd2;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic [Z_W-1:0]            z_t;
  typedef logic [COLOR_W-1:0]        color_t;
  typedef logic [TILE_LG-1:0]        tpos_t;   // position inside a tile
  typedef logic signed [EDGE_W-1:0]  edge_t;
  typedef logic signed [ZF_W-1:0]    zf_t;

  // Identifies a tile and whether it closes the frame.
  typedef struct packed {
    logic [TILE_ID_W-1:0] tx;
    logic [TILE_ID_W-1:0] ty;
    logic                 frame_end;
  } tile_info_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    z_t     z;
  } vertex_t;

  // Input triangle controller -> Setup Triangle.
  typedef struct packed {
    logic       is_end;     // 1: end-of-tile marker, tri is ignored
    tile_info_t tile;
    vertex_t    v0, v1, v2;
    color_t     color;
  } tri_item_t;

  // Setup Triangle -> Draw Triangle. Edge values and depth are taken at the
  // top-left corner (xmin, ymin) of the bounding box inside the tile.
  typedef struct packed {
    logic       is_end;
    tile_info_t tile;
    tpos_t      xmin, xmax, ymin, ymax;
    edge_t      e0, e1, e2;      // edge functions at (xmin, ymin)
    edge_t      a0, a1, a2;      // per +1 in x
    edge_t      b0, b1, b2;      // per +1 in y
    zf_t        z;               // depth at (xmin, ymin), 16.16
    zf_t        dzdx, dzdy;      // 16.16
    color_t     color;
  } tri_setup_t;

  // Draw Triangle -> Draw Span.
  typedef struct packed {
    logic       is_end;
    tile_info_t tile;
    tpos_t      row, xs, xe;
    edge_t      e0, e1, e2;      // edge functions at (xs, row)
    edge_t      a0, a1, a2;
    zf_t        z;               // depth at (xs, row)
    zf_t        dzdx;
    color_t     color;
  } span_t;

  // One tile buffer entry: depth and colour.
  typedef struct packed {
    z_t     z;
    color_t color;
  } tpix_t;

  // 16.16 depth to integer depth, rounded and clamped to the depth range.
  function automatic z_t zf_to_z(zf_t zf);
    zf_t r;
    r = (zf + (zf_t'(1) <<< (ZFRAC - 1))) >>> ZFRAC;
    if (r < 0) return '0;
    if (r > zf_t'({Z_W{1'b1}})) return '1;
    return z_t'(r);
  endfunction

endpackage
