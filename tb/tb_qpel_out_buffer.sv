// Testbench of qpel_out_buffer: writes blocks row by row, in order and
// with gaps, and checks the one-cycle row stream with its position tag,
// that blk_valid pulses
// exactly once per block in the cycle after row 7, and the stored block.
module tb_qpel_out_buffer;
  import luma_interp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [2:0] wr_row;
  pix_t wr_data [BLK];
  logic row_valid, blk_valid;
  logic [2:0] row_idx;
  frac_t wr_frac_x, wr_frac_y, row_frac_x, row_frac_y;
  pix_t row_data [BLK];
  pix_t blk [BLK][BLK];
  int exp_blk [BLK][BLK];
  int checks = 0, failures = 0;
  int pulses = 0;

  qpel_out_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    wr_en = 0; wr_row = 0; wr_frac_x = 0; wr_frac_y = 0;
    foreach (wr_data[i]) wr_data[i] = '0;
    repeat (2) @(negedge clk);
    chk(!row_valid && !blk_valid, "flags cleared by reset");
    rst_n = 1;
    for (int blkn = 0; blkn < 20; blkn++) begin
      for (int r = 0; r < BLK; r++) begin
        // optional idle cycles between rows
        while ($urandom_range(2) == 0) begin
          wr_en = 0;
          @(negedge clk);
          chk(!row_valid && !blk_valid, "no flags when idle");
        end
        wr_en = 1; wr_row = 3'(r);
        wr_frac_x = frac_t'(blkn); wr_frac_y = frac_t'(blkn / 4);
        foreach (wr_data[i]) begin
          wr_data[i] = pix_t'($urandom);
          exp_blk[r][i] = int'(wr_data[i]);
        end
        @(negedge clk);
        wr_en = 0;
        chk(row_valid && row_idx == 3'(r), "row_valid/row_idx");
        chk(row_frac_x == frac_t'(blkn) && row_frac_y == frac_t'(blkn / 4), "row position tag");
        foreach (row_data[i]) chk(int'(row_data[i]) == exp_blk[r][i], "row_data");
        chk(blk_valid == (r == BLK - 1), "blk_valid only after row 7");
        if (blk_valid) begin
          pulses++;
          for (int y = 0; y < BLK; y++)
            for (int x = 0; x < BLK; x++)
              chk(int'(blk[y][x]) == exp_blk[y][x], "block contents");
        end
      end
      wr_en = 0;
      @(negedge clk);
      chk(!blk_valid, "blk_valid lasts one cycle");
    end
    chk(pulses == 20, "one pulse per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
