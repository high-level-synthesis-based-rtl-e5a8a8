// Testbench of int_pixel_buffer: writes the 13 rows of several random
// windows in shuffled order, with idle cycles and out-of-range row
// numbers mixed in, and checks after every write that the whole window
// matches a shadow copy kept by the testbench.
module tb_int_pixel_buffer;
  import luma_interp_pkg::*;

  logic clk = 0;
  logic wr_en;
  logic [3:0] wr_row;
  pix_t wr_data [WIN];
  pix_t pix [WIN][WIN];
  int shadow [WIN][WIN];
  bit written [WIN];
  int checks = 0, failures = 0;

  int_pixel_buffer dut (.clk, .wr_en, .wr_row, .wr_data, .pix);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < WIN; r++)
      if (written[r])
        for (int c = 0; c < WIN; c++) begin
          checks++;
          if (int'(pix[r][c]) != shadow[r][c]) begin
            failures++;
            if (failures < 10) $display("row %0d col %0d got %0d exp %0d", r, c, pix[r][c], shadow[r][c]);
          end
        end
  endtask

  initial begin
    wr_en = 0; wr_row = 0;
    foreach (wr_data[i]) wr_data[i] = '0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      wr_en  = ($urandom_range(3) != 0);
      wr_row = 4'($urandom_range(15));
      foreach (wr_data[i]) wr_data[i] = pix_t'($urandom);
      @(negedge clk);
      if (wr_en && wr_row < WIN) begin
        foreach (wr_data[i]) shadow[wr_row][i] = int'(wr_data[i]);
        written[wr_row] = 1;
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
