// j_pixel_buffer: registers for the 8x8 centre half pixels j of one block.
//
// One row of 8 j samples arrives per clock from the second-stage filters
// and is stored at row wr_row; the whole 8x8 array is readable at once.
// Writes are visible in the next cycle; no reset, rows are written before
// they are read. Registered j storage follows the design description; the
// row-write port is this design's.
module j_pixel_buffer
  import luma_interp_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [2:0] wr_row,
  input  pix_t       wr_data [BLK],
  output pix_t       pix     [BLK][BLK]
);

  pix_t mem [BLK][BLK];

  always_ff @(posedge clk)
    if (wr_en)
      mem[wr_row] <= wr_data;

  assign pix = mem;

endmodule
