// Shared constants of the image-statistics core.
//
// The defaults describe the configuration evaluated for this design: 8-bit
// grey-level pixels, an 8x8 image (64 pixels, so every division by the pixel
// count is a 6-bit right shift), a 16-bit variance output and a 16-bit
// skewness output. The helper functions give the widths that follow from
// them, so that every block sizes its arithmetic the same way.
package mvs_pkg;

  localparam int unsigned PIX_W_DEF    = 8;   // grey-level pixel width
  localparam int unsigned IMG_ROWS_DEF = 8;   // image height
  localparam int unsigned IMG_COLS_DEF = 8;   // image width
  localparam int unsigned VAR_W_DEF    = 16;  // variance output width
  localparam int unsigned SKEW_W_DEF   = 16;  // skewness output width

  // Width needed to hold the sum of n_pixels values of val_w bits each.
  function automatic int unsigned sum_width(int unsigned val_w, int unsigned n_pixels);
    return val_w + $clog2(n_pixels);
  endfunction

endpackage
