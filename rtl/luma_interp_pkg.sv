// Shared types and constants of the H.264/AVC 8x8 luma sub-pixel interpolator.
//
// The interpolator works on one 8x8 prediction block at a time. The 6-tap
// half-pixel filters need two integer pixels before and three after each
// block pixel, so a 13x13 window of 8-bit integer pixels feeds one block.
// Widths follow from 8-bit samples and the 6-tap kernel (1,-5,20,20,-5,1):
//   first-stage sum  (unrounded b', h'): -2550 .. 10710   -> 15 bits signed
//   second-stage sum (unrounded j)     : -214200 .. 475320 -> 20 bits signed
// The block size, window size and sample width are fixed by the standard
// and by the 8x8 block the design is built around.
package luma_interp_pkg;

  localparam int unsigned PIX_W  = 8;   // luma sample width
  localparam int unsigned MID_W  = 15;  // first-stage unrounded filter sum
  localparam int unsigned JSUM_W = 20;  // second-stage unrounded filter sum
  localparam int unsigned BLK    = 8;   // prediction block edge (8x8)
  localparam int unsigned WIN    = 13;  // integer window edge (BLK + 5)
  localparam int unsigned TAPS   = 6;

  typedef logic        [PIX_W-1:0] pix_t;
  typedef logic signed [MID_W-1:0] mid_t;

  // Fractional motion-vector part in quarter-sample units (0..3).
  typedef logic [1:0] frac_t;

  // How the constant factors 5 and 20 of the filter are realised.
  typedef enum logic {
    MULT_ADD_SHIFT = 1'b0,  // shifts and adds (the design's main choice)
    MULT_DSP       = 1'b1   // plain constant multiplication
  } mult_style_e;

  // Saturate a signed value to the 8-bit sample range.
  function automatic pix_t clip_pix(input logic signed [JSUM_W-1:0] v);
    if (v < 0)                          return '0;
    else if (v > (2**PIX_W) - 1)        return '1;
    else                                return v[PIX_W-1:0];
  endfunction

endpackage
