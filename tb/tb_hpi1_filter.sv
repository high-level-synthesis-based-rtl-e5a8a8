// Testbench of hpi1_filter: drives both multiplication styles with random
// and extreme tap sets and compares the unrounded sum and the rounded,
// saturated half pixel with the kernel worked out by integer multiply.
module tb_hpi1_filter;
  import luma_interp_pkg::*;
  import luma_ref_pkg::*;

  pix_t tap [TAPS];
  mid_t mid_as, mid_dsp;
  pix_t pix_as, pix_dsp;
  int checks = 0, failures = 0;

  hpi1_filter dut_as (.tap, .mid(mid_as), .pix(pix_as));
  hpi1_filter #(.MULT_STYLE(MULT_DSP)) dut_dsp (.tap, .mid(mid_dsp), .pix(pix_dsp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int s, p;
    #1;
    s = tap6(tap[0], tap[1], tap[2], tap[3], tap[4], tap[5]);
    p = clip255((s + 16) >>> 5);
    checks += 4;
    if (int'(mid_as) != s)  begin failures++; $display("mid %0d exp %0d", mid_as, s); end
    if (int'(pix_as) != p)  begin failures++; $display("pix %0d exp %0d", pix_as, p); end
    if (int'(mid_dsp) != s) begin failures++; $display("dsp mid %0d exp %0d", mid_dsp, s); end
    if (int'(pix_dsp) != p) begin failures++; $display("dsp pix %0d exp %0d", pix_dsp, p); end
  endtask

  initial begin
    // extremes: largest positive and most negative sums
    tap = '{0, 0, 255, 255, 0, 0};       check_one();
    tap = '{255, 255, 255, 255, 255, 255}; check_one();
    tap = '{255, 0, 255, 255, 0, 255};   check_one();
    tap = '{0, 255, 0, 0, 255, 0};       check_one();
    tap = '{0, 0, 0, 0, 0, 0};           check_one();
    for (int i = 0; i < 20000; i++) begin
      foreach (tap[t]) tap[t] = pix_t'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
