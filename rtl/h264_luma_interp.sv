// h264_luma_interp: H.264/AVC luma sub-pixel interpolator for 8x8 blocks.
//
// Given the 13x13 integer pixel window around an 8x8 block (two pixels
// before and three after it in each direction) and a fractional motion
// vector part (frac_x, frac_y) in quarter samples, produces the 8x8
// prediction at that position: integer, half (b, h, j) or quarter sample.
// Larger blocks are handled as several 8x8 blocks. In the all-positions
// mode (in_all_pos with the first row), meant for fractional motion
// estimation, the block is produced at all 16 positions in turn.
//
// Structure: eight first-stage 6-tap filters (hpi1), eight second-stage
// filters (hpi2), a selection encoder and eight quarter-pixel filters (qpi),
// with register buffers between them:
//   - 13 LOAD cycles: one window row per accepted in_valid; the hpi1 filters
//     work along the row and give its 8 b half pixels. The window row and
//     the b row (unrounded b' and rounded b) are stored.
//   - 8 HJ cycles: the hpi1 filters are re-indexed to run down the stored
//     integer columns and give one row of h; at the same time the hpi2
//     filters run down the stored b' columns and give one row of j.
//   - QPI, one cycle behind HJ: the encoder picks two samples per column
//     and the qpi filters average them into one output row.
// When frac_x = 3 the positions g, k, r need h one column to the right
// (m), so the h filters read columns shifted by one for such a block and
// fill the m store; that keeps eight h filters enough. The all-positions
// mode runs the column pass twice (h, then m) and then sweeps the encoder
// and qpi filters over the 16 positions, 8 rows each.
//
// Interface and timing: in_row carries one window row (index 0 = leftmost,
// line -2 first) per in_valid && in_ready; in_frac_x/in_frac_y are sampled
// with the first row, as is in_all_pos. Output row y appears on out_row_valid/out_row_idx/
// out_row 15+y cycles after the first row was accepted (with no pauses);
// out_blk_valid pulses in the cycle after row 7 and out_blk then holds the
// whole block for at least 13 cycles. Blocks can be accepted every 21
// cycles. In the all-positions mode position (fx, fy) row y appears
// 31 + 8*(4*fx + fy) + y cycles after the first row, out_blk_valid pulses
// after each position's row 7 (out_blk valid in that cycle only), and the
// next block is accepted 157 cycles after the first. out_frac_x/y tag
// every output row and block with its position. The filter arithmetic, filter counts and phase order follow the
// design description; the handshake, the column-shift trick, the sweep
// order of the all-positions mode, the overlap of
// one block's last row with the next block's loading and sample saturation
// are this design's own. Active-low asynchronous reset.
module h264_luma_interp
  import luma_interp_pkg::*;
#(
  parameter mult_style_e MULT_STYLE = MULT_ADD_SHIFT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  frac_t      in_frac_x,
  input  frac_t      in_frac_y,
  input  logic       in_all_pos,
  input  pix_t       in_row        [WIN],
  output logic       out_row_valid,
  output logic [2:0] out_row_idx,
  output pix_t       out_row       [BLK],
  output frac_t      out_frac_x,
  output frac_t      out_frac_y,
  output logic       out_blk_valid,
  output pix_t       out_blk       [BLK][BLK]
);

  logic       load_en, hj_en, hj_ox, j_en, q_en;
  logic [3:0] load_row;
  logic [2:0] hj_row, q_row;
  frac_t      q_frac_x, q_frac_y;

  luma_interp_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_frac_x, .in_frac_y, .in_all_pos,
    .load_en, .load_row, .hj_en, .hj_row, .hj_ox, .j_en,
    .q_en, .q_row, .q_frac_x, .q_frac_y
  );

  // Buffers ---------------------------------------------------------------
  pix_t int_pix [WIN][WIN];
  mid_t b_mid   [WIN][BLK];
  pix_t b_pix   [WIN][BLK];
  pix_t h_pix   [BLK][BLK];
  pix_t m_pix   [BLK][BLK];
  pix_t j_pix   [BLK][BLK];

  mid_t hpi1_mid [BLK];
  pix_t hpi1_pix [BLK];
  pix_t hpi2_pix [BLK];

  int_pixel_buffer u_int_buf (
    .clk, .wr_en(load_en), .wr_row(load_row), .wr_data(in_row), .pix(int_pix)
  );

  half_pixel_buffer u_bh_buf (
    .clk,
    .b_wr_en(load_en), .b_wr_row(load_row), .b_wr_mid(hpi1_mid), .b_wr_pix(hpi1_pix),
    .h_wr_en(hj_en),   .h_wr_row(hj_row),   .h_wr_m(hj_ox), .h_wr_pix(hpi1_pix),
    .b_mid, .b_pix, .h_pix, .m_pix
  );

  j_pixel_buffer u_j_buf (
    .clk, .wr_en(j_en), .wr_row(hj_row), .wr_data(hpi2_pix), .pix(j_pix)
  );

  // Half-pixel filter arrays with their input indexing ----------------------
  for (genvar k = 0; k < BLK; k++) begin : g_hpi
    pix_t hpi1_tap [TAPS];
    mid_t hpi2_tap [TAPS];

    always_comb
      for (int t = 0; t < TAPS; t++) begin
        // LOAD: along the incoming row; HJ: down stored column k+2(+1).
        if (hj_en)
          hpi1_tap[t] = int_pix[int'(hj_row) + t][k + 2 + int'(hj_ox)];
        else
          hpi1_tap[t] = in_row[k + t];
        hpi2_tap[t] = b_mid[int'(hj_row) + t][k];
      end

    hpi1_filter #(.MULT_STYLE(MULT_STYLE)) u_hpi1 (
      .tap(hpi1_tap), .mid(hpi1_mid[k]), .pix(hpi1_pix[k])
    );

    hpi2_filter #(.MULT_STYLE(MULT_STYLE)) u_hpi2 (
      .tap(hpi2_tap), .pix(hpi2_pix[k])
    );
  end

  // Selection encoder and quarter-pixel filters ----------------------------
  pix_t op_p [BLK];
  pix_t op_q [BLK];
  pix_t qpi_y [BLK];
  logic avg;

  qpel_select_encoder u_enc (
    .frac_x(q_frac_x), .frac_y(q_frac_y), .row(q_row),
    .int_pix, .b_pix, .h_pix, .m_pix, .j_pix, .op_p, .op_q, .avg
  );

  for (genvar k = 0; k < BLK; k++) begin : g_qpi
    qpi_filter u_qpi (.p(op_p[k]), .q(op_q[k]), .avg, .y(qpi_y[k]));
  end

  qpel_out_buffer u_out_buf (
    .clk, .rst_n, .wr_en(q_en), .wr_row(q_row), .wr_data(qpi_y),
    .wr_frac_x(q_frac_x), .wr_frac_y(q_frac_y),
    .row_valid(out_row_valid), .row_idx(out_row_idx), .row_data(out_row),
    .row_frac_x(out_frac_x), .row_frac_y(out_frac_y),
    .blk_valid(out_blk_valid), .blk(out_blk)
  );

endmodule
