// conv_pkg: types and constants shared by the 3x3 Gaussian convolver.
// Pixels are 8-bit grey levels. The 3x3 kernel is [1 2 1; 2 4 2; 1 2 1] with
// weight sum 16, so a full-precision window sum needs PIX_W+4 bits. A
// pix_tag_t travels beside every pixel in the pipeline and says where in
// the image the pixel sits, so the datapath needs no counters of its own
// to find the image borders.
package conv_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned SUM_W = PIX_W + 4;   // 16 * 255 = 4080 < 2**12

  // Largest image the counters in a tag can address.
  localparam int unsigned TAG_CW = 12;

  typedef logic [PIX_W-1:0] pixel_t;

  // Which row-kernel implementation a convolver uses.
  typedef enum logic {
    DP_BARREL = 1'b0,   // weights as fixed shifts (shift_121 / shift_242)
    DP_MULT   = 1'b1    // weights as constant multipliers (mult_kernel)
  } datapath_e;

  // Position of a pixel in the raster scan, and whether the slot holds one.
  typedef struct packed {
    logic              valid;
    logic [TAG_CW-1:0] row;
    logic [TAG_CW-1:0] col;
  } pix_tag_t;

  // 3x3 neighbourhood: win[r][c], r = 0 the oldest (top) row,
  // c = 0 the leftmost column.
  typedef pixel_t [2:0][2:0] window_t;

endpackage
