// Testbench of hpi2_filter: random and extreme unrounded first-stage sums
// (within their reachable range -2550..10710) for both multiplication
// styles, compared with (sum + 512) >> 10 saturated, worked out by
// integer multiply.
module tb_hpi2_filter;
  import luma_interp_pkg::*;
  import luma_ref_pkg::*;

  mid_t tap [TAPS];
  pix_t pix_as, pix_dsp;
  int checks = 0, failures = 0;

  hpi2_filter dut_as (.tap, .pix(pix_as));
  hpi2_filter #(.MULT_STYLE(MULT_DSP)) dut_dsp (.tap, .pix(pix_dsp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mid_t rnd_mid();
    return mid_t'(int'($urandom_range(13260)) - 2550);
  endfunction

  task automatic check_one();
    int s, p;
    #1;
    s = tap6(tap[0], tap[1], tap[2], tap[3], tap[4], tap[5]);
    p = clip255((s + 512) >>> 10);
    checks += 2;
    if (int'(pix_as) != p)  begin failures++; $display("pix %0d exp %0d", pix_as, p); end
    if (int'(pix_dsp) != p) begin failures++; $display("dsp pix %0d exp %0d", pix_dsp, p); end
  endtask

  initial begin
    tap = '{-2550, -2550, 10710, 10710, -2550, -2550}; check_one();
    tap = '{10710, 10710, -2550, -2550, 10710, 10710}; check_one();
    tap = '{8000, 8000, 8000, 8000, 8000, 8000};       check_one();
    tap = '{0, 0, 0, 0, 0, 0};                         check_one();
    for (int i = 0; i < 20000; i++) begin
      foreach (tap[t]) tap[t] = rnd_mid();
      check_one();
      // values near the rounding point of real images: all taps alike
      foreach (tap[t]) tap[t] = mid_t'(int'($urandom_range(255)) * 32 + int'($urandom_range(40)) - 20);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
