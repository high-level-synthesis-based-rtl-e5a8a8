// Testbench of j_pixel_buffer: random row writes with idle cycles, the
// whole 8x8 array checked against a shadow copy after every cycle.
module tb_j_pixel_buffer;
  import luma_interp_pkg::*;

  logic clk = 0;
  logic wr_en;
  logic [2:0] wr_row;
  pix_t wr_data [BLK];
  pix_t pix [BLK][BLK];
  int shadow [BLK][BLK];
  bit written [BLK];
  int checks = 0, failures = 0;

  j_pixel_buffer dut (.clk, .wr_en, .wr_row, .wr_data, .pix);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      wr_en  = $urandom_range(1);
      wr_row = 3'($urandom_range(7));
      foreach (wr_data[i]) wr_data[i] = pix_t'($urandom);
      @(negedge clk);
      if (wr_en) begin
        written[wr_row] = 1;
        foreach (wr_data[i]) shadow[wr_row][i] = int'(wr_data[i]);
      end
      for (int r = 0; r < BLK; r++)
        if (written[r])
          for (int c = 0; c < BLK; c++) begin
            checks++;
            if (int'(pix[r][c]) != shadow[r][c]) begin
              failures++;
              if (failures < 10) $display("j[%0d][%0d] got %0d exp %0d", r, c, pix[r][c], shadow[r][c]);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
