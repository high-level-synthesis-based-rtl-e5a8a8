// hpi2_filter: second-stage half-pixel filter giving the centre sample j.
//
// Applies the same 6-tap kernel (1,-5,20,20,-5,1) to six unrounded
// first-stage sums b' taken in the other direction, then rounds with
// (sum + 512) >> 10 and saturates to 0..255. Filtering unrounded
// intermediates keeps j exact, as H.264/AVC requires; saturation is the
// standard's. MULT_STYLE chooses shift-and-add (default) or constant
// multipliers for 5x and 20x. Purely combinational.
module hpi2_filter
  import luma_interp_pkg::*;
#(
  parameter mult_style_e MULT_STYLE = MULT_ADD_SHIFT
) (
  input  mid_t tap [TAPS],
  output pix_t pix
);

  logic signed [JSUM_W-1:0] s_out, s_mid, s_in, sum;

  always_comb begin
    s_out = JSUM_W'(tap[0]) + JSUM_W'(tap[5]);
    s_mid = JSUM_W'(tap[1]) + JSUM_W'(tap[4]);
    s_in  = JSUM_W'(tap[2]) + JSUM_W'(tap[3]);
    if (MULT_STYLE == MULT_ADD_SHIFT)
      sum = s_out - ((s_mid <<< 2) + s_mid) + ((s_in <<< 4) + (s_in <<< 2));
    else
      sum = s_out - s_mid * 5 + s_in * 20;
  end

  assign pix = clip_pix((sum + 512) >>> 10);

endmodule
