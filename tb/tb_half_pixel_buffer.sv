// Testbench of half_pixel_buffer: random writes to the b side (unrounded
// and rounded) and to the h and m stores, independently and in the same
// cycle, with the full contents checked against a shadow copy after every
// cycle.
module tb_half_pixel_buffer;
  import luma_interp_pkg::*;

  logic clk = 0;
  logic b_wr_en, h_wr_en, h_wr_m;
  logic [3:0] b_wr_row;
  logic [2:0] h_wr_row;
  mid_t b_wr_mid [BLK];
  pix_t b_wr_pix [BLK];
  pix_t h_wr_pix [BLK];
  mid_t b_mid [WIN][BLK];
  pix_t b_pix [WIN][BLK];
  pix_t h_pix [BLK][BLK];
  pix_t m_pix [BLK][BLK];
  int sb_mid [WIN][BLK], sb_pix [WIN][BLK], sh_pix [BLK][BLK], sm_pix [BLK][BLK];
  bit bw [WIN], hw [BLK], mw [BLK];
  int checks = 0, failures = 0;

  half_pixel_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    b_wr_en = 0; h_wr_en = 0; h_wr_m = 0; b_wr_row = 0; h_wr_row = 0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      b_wr_en  = $urandom_range(1);
      h_wr_en  = $urandom_range(1);
      h_wr_m   = $urandom_range(1);
      b_wr_row = 4'($urandom_range(14));
      h_wr_row = 3'($urandom_range(7));
      foreach (b_wr_mid[i]) begin
        b_wr_mid[i] = mid_t'(int'($urandom_range(13260)) - 2550);
        b_wr_pix[i] = pix_t'($urandom);
        h_wr_pix[i] = pix_t'($urandom);
      end
      @(negedge clk);
      if (b_wr_en && b_wr_row < WIN) begin
        bw[b_wr_row] = 1;
        foreach (b_wr_mid[i]) begin
          sb_mid[b_wr_row][i] = int'(b_wr_mid[i]);
          sb_pix[b_wr_row][i] = int'(b_wr_pix[i]);
        end
      end
      if (h_wr_en && !h_wr_m) begin
        hw[h_wr_row] = 1;
        foreach (h_wr_pix[i]) sh_pix[h_wr_row][i] = int'(h_wr_pix[i]);
      end
      if (h_wr_en && h_wr_m) begin
        mw[h_wr_row] = 1;
        foreach (h_wr_pix[i]) sm_pix[h_wr_row][i] = int'(h_wr_pix[i]);
      end
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < BLK; c++) begin
          if (bw[r]) begin
            chk(int'(b_mid[r][c]), sb_mid[r][c], "b_mid");
            chk(int'(b_pix[r][c]), sb_pix[r][c], "b_pix");
          end
          if (r < BLK && hw[r]) chk(int'(h_pix[r][c]), sh_pix[r][c], "h_pix");
          if (r < BLK && mw[r]) chk(int'(m_pix[r][c]), sm_pix[r][c], "m_pix");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
