// qpi_filter: quarter-pixel filter.
//
// A quarter-sample position of H.264/AVC is the rounded average
// (p + q + 1) >> 1 of its two nearest integer or half samples. When the
// selected position is itself an integer or half sample (avg = 0) the
// filter passes p through so one output path serves all 16 positions.
// The average is the standard's and the design description's; the
// pass-through is this design's choice.
// Purely combinational.
module qpi_filter
  import luma_interp_pkg::*;
(
  input  pix_t p,
  input  pix_t q,
  input  logic avg,
  output pix_t y
);

  always_comb
    y = avg ? pix_t'(({1'b0, p} + {1'b0, q} + (PIX_W+1)'(1)) >> 1) : p;

endmodule
