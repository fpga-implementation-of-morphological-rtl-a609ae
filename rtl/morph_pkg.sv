// morph_pkg: types and constants shared by the morphological decomposition
// filter. Pixels are 8-bit gray levels. The structuring elements (SE) are
// flat squares whose side doubles minus one from level to level
// (3, 5, 9, 17, 33): each SE is the previous one dilated by itself, so the
// half-width of level l is 2**l. Outside the image a window position is
// filled with the neutral value of the operation: the top of the range for a
// minimum and the bottom for a maximum, so the margin never wins a compare.
package morph_pkg;

  localparam int PIX_W    = 8;   // gray level width
  localparam int DECOMP_LEVELS = 5;  // levels of detail (SE 3..33)

  typedef logic [PIX_W-1:0] pix_t;

  localparam pix_t PIX_MAX = '1;
  localparam pix_t PIX_MIN = '0;

  // erosion (minimum) and dilation (maximum) of one window, one level
  typedef struct packed {
    pix_t mn;
    pix_t mx;
  } minmax_t;

  // phases of one pixel step
  typedef enum logic [1:0] {
    PH_LOAD  = 2'd0,  // waiting for the very first column after reset
    PH_COL   = 2'd1,  // column min/max, one pyramid level per cycle
    PH_LINE  = 2'd2,  // line min/max, one level per cycle
    PH_SHIFT = 2'd3   // queue shift, one level per cycle; window load
  } phase_t;

  // side of the square SE of level l
  function automatic int se_size(input int l);
    return (1 << (l + 1)) + 1;
  endfunction

  // half-width of the SE of level l
  function automatic int se_half(input int l);
    return 1 << l;
  endfunction

  function automatic pix_t pmin(input pix_t a, input pix_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic pix_t pmax(input pix_t a, input pix_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
