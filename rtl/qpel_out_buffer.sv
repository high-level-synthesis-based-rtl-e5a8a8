// qpel_out_buffer: output buffer for the interpolated 8x8 block.
//
// Collects the rows produced by the eight quarter-pixel filters. Each
// written row is also presented for one cycle on row_valid/row_idx/row_data
// (one cycle after the write), so a consumer may either stream rows or wait
// for blk_valid, which pulses for one cycle when row 7 has been stored; the
// complete block then stays on `blk` until the first row of the next block
// is written. Rows may arrive in any order, but blk_valid only follows a
// write to row 7. Each row carries the fractional position it belongs to
// (wr_frac_x/y), passed on with the row (row_frac_x/y); in the
// all-positions mode the 16 positions of a block follow one another and
// blk then holds a position's block only in its blk_valid cycle.
// Reset clears the valid flags only. The output buffer follows the design
// description; the row stream, tags and pulse are this design's.
module qpel_out_buffer
  import luma_interp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [2:0] wr_row,
  input  pix_t       wr_data  [BLK],
  input  frac_t      wr_frac_x,
  input  frac_t      wr_frac_y,
  output logic       row_valid,
  output logic [2:0] row_idx,
  output pix_t       row_data [BLK],
  output frac_t      row_frac_x,
  output frac_t      row_frac_y,
  output logic       blk_valid,
  output pix_t       blk      [BLK][BLK]
);

  pix_t mem [BLK][BLK];

  always_ff @(posedge clk)
    if (wr_en) begin
      mem[wr_row] <= wr_data;
      row_data    <= wr_data;
      row_idx     <= wr_row;
      row_frac_x  <= wr_frac_x;
      row_frac_y  <= wr_frac_y;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      row_valid <= 1'b0;
      blk_valid <= 1'b0;
    end else begin
      row_valid <= wr_en;
      blk_valid <= wr_en && (wr_row == 3'(BLK-1));
    end

  assign blk = mem;

endmodule
