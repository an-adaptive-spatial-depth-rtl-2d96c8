// df_pkg: types and constants shared by the depth-filter pipeline.
//
// The pipeline renders to a 512 x 512 screen (the screen size the published
// algorithm was evaluated on) with a 24-bit depth value, where 0 is the near plane and all ones
// is the far plane (1.0). The depth filter keeps two bit planes per pixel,
// encoded in two bits as in the published "encoded depth filter":
//   bit 0 (SDBR)  the pixel has been rendered in this frame, so its z-buffer
//                 entry is valid and must be read by the depth test;
//   bit 1 (MASK)  a fragment in front of the filter plane has been rendered
//                 at this pixel, so anything behind the plane is hidden.
// The 24-bit depth and the exact bit order are this design's choices.
package df_pkg;

  localparam int unsigned SCREEN_W = 512;            // pixels per line
  localparam int unsigned SCREEN_H = 512;            // lines
  localparam int unsigned X_W      = $clog2(SCREEN_W);
  localparam int unsigned Y_W      = $clog2(SCREEN_H);
  localparam int unsigned Z_W      = 24;              // depth precision

  // A tile of the filter planes is 8 x 8 pixels: one external-memory transfer
  // carries 64 pixels of each plane.
  localparam int unsigned TILE_SHIFT = 3;
  localparam int unsigned TILE_PIX   = 64;
  localparam int unsigned DF_BITS    = 2;             // bits per pixel
  localparam int unsigned LINE_W     = TILE_PIX * DF_BITS;
  localparam int unsigned TILE_OFF_W = 2 * TILE_SHIFT;               // pixel in tile
  localparam int unsigned TILE_IDX_W = (X_W - TILE_SHIFT) + (Y_W - TILE_SHIFT);

  typedef logic [X_W-1:0] x_t;
  typedef logic [Y_W-1:0] y_t;
  typedef logic [Z_W-1:0] z_t;

  // Bit positions inside one pixel's 2-bit filter code.
  localparam int unsigned DF_SDBR = 0;
  localparam int unsigned DF_MASK = 1;

  // Fragment as produced by the rasterizer.
  typedef struct packed {
    x_t x;
    y_t y;
    z_t z;
  } frag_t;

  // Fragment leaving the depth filter: the SDBR bit tells the depth test
  // whether the stored depth is valid (1) or may be overwritten without a
  // read (0).
  typedef struct packed {
    x_t   x;
    y_t   y;
    z_t   z;
    logic sdbr;
  } dfrag_t;

endpackage
