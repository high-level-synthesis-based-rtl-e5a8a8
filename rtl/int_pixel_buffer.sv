// int_pixel_buffer: the 13x13 integer pixel window of one 8x8 block.
//
// Rows of 13 integer pixels arrive one per clock (wr_en, wr_row) and are
// stored in plain registers, so every pixel of the window is visible at
// once on `pix`: the vertical half-pixel filters read six rows of a column
// in one cycle, and the quarter-pixel stage reads the integer neighbours.
// Keeping the window in registers rather than a RAM lets all readers work
// in parallel. Row 0 holds window line -2 of the block (two lines above
// it), row 12 line +10. A write becomes visible in the next cycle. No
// reset: each row is written before it is read. The 13x13 register window
// follows the design description; the row-write port is this design's.
module int_pixel_buffer
  import luma_interp_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_row,
  input  pix_t       wr_data [WIN],
  output pix_t       pix     [WIN][WIN]
);

  pix_t mem [WIN][WIN];

  always_ff @(posedge clk)
    if (wr_en && wr_row < 4'(WIN))
      mem[wr_row] <= wr_data;

  assign pix = mem;

endmodule
