// half_pixel_buffer: registers for the b and h half pixels of one block.
//
// b side: 13 rows x 8 columns, one row per clock from the horizontal
// first-stage filters. Each entry is kept twice, as the unrounded sum b'
// (read by the second-stage filters, which need all 13 rows) and as the
// finished 8-bit half pixel b (read by the quarter-pixel stage).
// h side: two stores of 8 rows x 8 columns of finished 8-bit vertical half
// pixels, one row per clock from the same filters working down columns.
// h_wr_m = 0 writes the h store (columns 0..7 of the block); h_wr_m = 1
// writes the m store (columns 1..8, the h one column to the right, which
// positions g, k and r need).
// b row index r holds block line r-2; h row index y holds block line y.
// Writes are visible in the next cycle; no reset, every entry is written
// before it is read. Registers for b and h follow the design description;
// keeping b twice and the m store are this design's choices.
module half_pixel_buffer
  import luma_interp_pkg::*;
(
  input  logic       clk,
  input  logic       b_wr_en,
  input  logic [3:0] b_wr_row,
  input  mid_t       b_wr_mid [BLK],
  input  pix_t       b_wr_pix [BLK],
  input  logic       h_wr_en,
  input  logic [2:0] h_wr_row,
  input  logic       h_wr_m,
  input  pix_t       h_wr_pix [BLK],
  output mid_t       b_mid    [WIN][BLK],
  output pix_t       b_pix    [WIN][BLK],
  output pix_t       h_pix    [BLK][BLK],
  output pix_t       m_pix    [BLK][BLK]
);

  mid_t b_mid_q [WIN][BLK];
  pix_t b_pix_q [WIN][BLK];
  pix_t h_pix_q [BLK][BLK];
  pix_t m_pix_q [BLK][BLK];

  always_ff @(posedge clk) begin
    if (b_wr_en && b_wr_row < 4'(WIN)) begin
      b_mid_q[b_wr_row] <= b_wr_mid;
      b_pix_q[b_wr_row] <= b_wr_pix;
    end
    if (h_wr_en && !h_wr_m)
      h_pix_q[h_wr_row] <= h_wr_pix;
    if (h_wr_en && h_wr_m)
      m_pix_q[h_wr_row] <= h_wr_pix;
  end

  assign b_mid = b_mid_q;
  assign b_pix = b_pix_q;
  assign h_pix = h_pix_q;
  assign m_pix = m_pix_q;

endmodule
