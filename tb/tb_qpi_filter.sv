// Testbench of qpi_filter: every pair of 8-bit samples, averaging and
// pass-through, against (p + q + 1) >> 1 worked out in integers.
module tb_qpi_filter;
  import luma_interp_pkg::*;

  pix_t p, q, y;
  logic avg;
  int checks = 0, failures = 0;

  qpi_filter dut (.p, .q, .avg, .y);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int m = 0; m < 2; m++) begin
          p = pix_t'(a); q = pix_t'(b); avg = m[0];
          #1;
          checks++;
          if (int'(y) != (m ? (a + b + 1) / 2 : a)) begin
            failures++;
            if (failures < 10) $display("p=%0d q=%0d avg=%0d y=%0d", a, b, m, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
