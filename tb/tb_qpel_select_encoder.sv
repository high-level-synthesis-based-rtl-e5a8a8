// Testbench of qpel_select_encoder: fills the integer, b, h and j arrays
// with random samples (h holding columns 0..7 and m columns 1..8 of one
// random set of vertical half pixels), and for every fractional
// position and row checks that averaging the chosen operands gives the
// sample the H.264/AVC position table names (G, a, b, c, d, ..., r, j).
module tb_qpel_select_encoder;
  import luma_interp_pkg::*;

  frac_t frac_x, frac_y;
  logic [2:0] row;
  pix_t int_pix [WIN][WIN];
  pix_t b_pix [WIN][BLK];
  pix_t h_pix [BLK][BLK];
  pix_t m_pix [BLK][BLK];
  pix_t j_pix [BLK][BLK];
  pix_t op_p [BLK], op_q [BLK];
  logic avg;
  int h_full [BLK][BLK+1];   // h for columns 0..8
  int checks = 0, failures = 0;

  qpel_select_encoder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int av(int a, int b);
    return (a + b + 1) >> 1;
  endfunction

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      foreach (int_pix[r, c]) int_pix[r][c] = pix_t'($urandom);
      foreach (b_pix[r, c])   b_pix[r][c]   = pix_t'($urandom);
      foreach (j_pix[r, c])   j_pix[r][c]   = pix_t'($urandom);
      foreach (h_full[r, c])  h_full[r][c]  = $urandom_range(255);
      foreach (h_pix[r, c]) begin
        h_pix[r][c] = pix_t'(h_full[r][c]);
        m_pix[r][c] = pix_t'(h_full[r][c + 1]);
      end
      for (int fx = 0; fx < 4; fx++)
        for (int fy = 0; fy < 4; fy++) begin
          frac_x = frac_t'(fx); frac_y = frac_t'(fy);
          for (int y = 0; y < BLK; y++) begin
            row = 3'(y);
            #1;
            for (int x = 0; x < BLK; x++) begin
              int G, H, M, b, s, h, m, j, e, got;
              G = int_pix[y+2][x+2]; H = int_pix[y+2][x+3]; M = int_pix[y+3][x+2];
              b = b_pix[y+2][x];     s = b_pix[y+3][x];
              h = h_full[y][x];      m = h_full[y][x+1];
              j = j_pix[y][x];
              case ({fx[1:0], fy[1:0]})
                4'b00_00: e = G;          4'b01_00: e = av(G, b);
                4'b10_00: e = b;          4'b11_00: e = av(b, H);
                4'b00_01: e = av(G, h);   4'b00_10: e = h;
                4'b00_11: e = av(M, h);   4'b01_01: e = av(b, h);
                4'b11_01: e = av(b, m);   4'b01_11: e = av(h, s);
                4'b11_11: e = av(m, s);   4'b10_01: e = av(b, j);
                4'b10_11: e = av(j, s);   4'b01_10: e = av(h, j);
                4'b11_10: e = av(j, m);   default:  e = j;
              endcase
              got = avg ? av(op_p[x], op_q[x]) : int'(op_p[x]);
              checks++;
              if (got != e) begin
                failures++;
                if (failures < 10) $display("fx=%0d fy=%0d y=%0d x=%0d got %0d exp %0d", fx, fy, y, x, got, e);
              end
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
