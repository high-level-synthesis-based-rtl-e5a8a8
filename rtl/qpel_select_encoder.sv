// qpel_select_encoder: operand selection for the quarter-pixel filters.
//
// For block row `row` and fractional position (frac_x, frac_y) in quarter
// samples, picks for each of the 8 columns the two samples p, q whose
// rounded average is the wanted sample, and whether to average at all.
// Every H.264/AVC position uses at most four candidate sources:
//   A  integer pixel, moved one right when frac_x = 3 and one down when
//      frac_y = 3 (gives G, H, M of the standard)
//   b  horizontal half pixel, one row down when frac_y = 3
//   h  vertical half pixel, taken from the m store (the h one column to
//      the right) when frac_x = 3
//   j  centre half pixel
// giving
//   frac_y=0: A | avg(A,b) | b | avg(A,b)        (frac_x = 0..3)
//   frac_x=0: A | avg(A,h) | h | avg(A,h)        (frac_y = 0..3)
//   frac_x,frac_y both odd: avg(b,h)   (e, g, p, r)
//   frac_x=2, frac_y odd  : avg(b,j)   (f, q)
//   frac_y=2, frac_x odd  : avg(h,j)   (i, k)
//   frac_x=frac_y=2       : j
// The design description names this encoder and the position table is
// the standard's; the shifted-source scheme (rather than separate buffers
// for every neighbour) is this design's choice. Purely combinational.
module qpel_select_encoder
  import luma_interp_pkg::*;
(
  input  frac_t      frac_x,
  input  frac_t      frac_y,
  input  logic [2:0] row,
  input  pix_t       int_pix [WIN][WIN],
  input  pix_t       b_pix   [WIN][BLK],
  input  pix_t       h_pix   [BLK][BLK],
  input  pix_t       m_pix   [BLK][BLK],
  input  pix_t       j_pix   [BLK][BLK],
  output pix_t       op_p    [BLK],
  output pix_t       op_q    [BLK],
  output logic       avg
);

  typedef enum logic [1:0] {SRC_A, SRC_B, SRC_H, SRC_J} src_e;

  src_e       src_p, src_q;
  logic [3:0] a_row, b_row;
  logic       ox;

  always_comb begin
    ox    = (frac_x == 2'd3);
    a_row = 4'(row) + 4'd2 + 4'(frac_y == 2'd3);
    b_row = 4'(row) + 4'd2 + 4'(frac_y == 2'd3);
    src_p = SRC_A;
    src_q = SRC_A;
    avg   = 1'b0;
    if (frac_y == 2'd0) begin
      unique case (frac_x)
        2'd0: src_p = SRC_A;
        2'd2: src_p = SRC_B;
        default: begin src_p = SRC_A; src_q = SRC_B; avg = 1'b1; end
      endcase
    end else if (frac_x == 2'd0) begin
      unique case (frac_y)
        2'd2: src_p = SRC_H;
        default: begin src_p = SRC_A; src_q = SRC_H; avg = 1'b1; end
      endcase
    end else if (frac_x == 2'd2 && frac_y == 2'd2) begin
      src_p = SRC_J;
    end else if (frac_x == 2'd2) begin
      src_p = SRC_B; src_q = SRC_J; avg = 1'b1;
    end else if (frac_y == 2'd2) begin
      src_p = SRC_H; src_q = SRC_J; avg = 1'b1;
    end else begin
      src_p = SRC_B; src_q = SRC_H; avg = 1'b1;
    end
  end

  function automatic pix_t pick(src_e s, int unsigned x, logic [3:0] ar,
                                logic [3:0] br, logic [2:0] r, logic o,
                                pix_t ip [WIN][WIN], pix_t bp [WIN][BLK],
                                pix_t hp [BLK][BLK], pix_t mp [BLK][BLK],
                                pix_t jp [BLK][BLK]);
    unique case (s)
      SRC_A:   return ip[ar][x + 2 + int'(o)];
      SRC_B:   return bp[br][x];
      SRC_H:   return o ? mp[r][x] : hp[r][x];
      default: return jp[r][x];
    endcase
  endfunction

  always_comb
    for (int unsigned x = 0; x < BLK; x++) begin
      op_p[x] = pick(src_p, x, a_row, b_row, row, ox, int_pix, b_pix, h_pix, m_pix, j_pix);
      op_q[x] = pick(src_q, x, a_row, b_row, row, ox, int_pix, b_pix, h_pix, m_pix, j_pix);
    end

endmodule
