// hpi1_filter: first-stage half-pixel filter on integer luma samples.
//
// Computes the 6-tap FIR sum t0 - 5*t1 + 20*t2 + 20*t3 - 5*t4 + t5 of six
// consecutive integer pixels (a row gives half pixel b, a column gives h).
// Two results leave the filter:
//   mid : the unrounded sum (b' or h'), kept for the second filter stage
//   pix : (mid + 16) >> 5 saturated to 0..255, the finished half pixel
// The kernel and rounding are those of H.264/AVC. Saturation to the sample
// range is the standard's and is applied here although the design
// description leaves it out. MULT_STYLE chooses how 5x and 20x are built:
// shifts and adds (5x = 4x + x, 20x = 16x + 4x, the default) or constant
// multipliers. Purely combinational; the surrounding buffers register it.
module hpi1_filter
  import luma_interp_pkg::*;
#(
  parameter mult_style_e MULT_STYLE = MULT_ADD_SHIFT
) (
  input  pix_t tap [TAPS],
  output mid_t mid,
  output pix_t pix
);

  logic signed [MID_W-1:0] s_out, s_mid, s_in;  // pairs (t0+t5),(t1+t4),(t2+t3)
  logic signed [MID_W-1:0] sum;

  always_comb begin
    s_out = MID_W'(tap[0]) + MID_W'(tap[5]);
    s_mid = MID_W'(tap[1]) + MID_W'(tap[4]);
    s_in  = MID_W'(tap[2]) + MID_W'(tap[3]);
    if (MULT_STYLE == MULT_ADD_SHIFT)
      sum = s_out - ((s_mid <<< 2) + s_mid) + ((s_in <<< 4) + (s_in <<< 2));
    else
      sum = s_out - s_mid * 5 + s_in * 20;
  end

  assign mid = sum;
  assign pix = clip_pix((JSUM_W'(sum) + 16) >>> 5);

endmodule
