// End-to-end testbench of h264_luma_interp at its default parameters.
//
// Streams 13x13 windows (random, smooth ramps and 0/255 patterns that
// drive the half-sample filters past the sample range) through the
// interpolator. Most blocks ask for one position, covering all 16;
// some ask for all positions. Blocks come first back to back, then with
// random pauses in in_valid. Every streamed row (with its position tag)
// and every completed block is compared with the reference model.
// Checked timing, for blocks whose rows arrive without pauses: block
// interval 21 cycles (157 after an all-positions block); single position:
// row y out 15+y and blk_valid 22 cycles after the first row; all
// positions: row y of position p = 4*frac_x + frac_y out 31+8p+y cycles
// after it. Counted mechanisms (each must occur): every fractional
// position, the shifted h columns (frac_x = 3), back-to-back overlap of a
// block's last row with the next block's loading, input pauses, switches
// between the two modes in both directions, and saturation at 0 and 255.
module tb_h264_luma_interp;
  import luma_interp_pkg::*;
  import luma_ref_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_all_pos;
  frac_t in_frac_x, in_frac_y, out_frac_x, out_frac_y;
  pix_t in_row [WIN];
  logic out_row_valid, out_blk_valid;
  logic [2:0] out_row_idx;
  pix_t out_row [BLK];
  pix_t out_blk [BLK][BLK];

  h264_luma_interp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NBLK * 80 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Stimulus and expected results, one entry per block.
  win_t      wins [NBLK];
  int        fxs [NBLK], fys [NBLK];
  bit        alls [NBLK];
  blk_pred_t exp_pred [NBLK];
  int        t_first [NBLK];   // cycle of the first accepted row
  bit        paused [NBLK];    // a pause occurred within the block's rows

  // Expected output rows, in order.
  typedef struct { int blk, fx, fy, row, lat; } exp_row_t;
  exp_row_t exp_q [$];

  // Mechanism counters.
  int pos_seen [4][4];
  int n_shift = 0, n_b2b = 0, n_pause = 0, n_sat_lo = 0, n_sat_hi = 0;
  int n_to_all = 0, n_to_one = 0;

  task automatic make_window(int n);
    int kind = $urandom_range(3);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        case (kind)
          0, 1: wins[n][r][c] = $urandom_range(255);
          2:    wins[n][r][c] = (((r >> int'($urandom_range(1))) + c) & 1) ? 255 : 0;
          default: wins[n][r][c] = (r * 13 + c * 7 + n) & 255;
        endcase
  endtask

  task automatic count_saturation(int n);
    for (int y = 0; y < BLK + 1; y++)
      for (int x = 0; x < BLK + 1; x++) begin
        int v [3];
        v[0] = (b1(wins[n], x, y) + 16) >>> 5;
        v[1] = (h1(wins[n], x, y) + 16) >>> 5;
        v[2] = (x < BLK && y < BLK) ? (j1(wins[n], x, y) + 512) >>> 10 : 0;
        foreach (v[i]) begin
          if (v[i] < 0)   n_sat_lo++;
          if (v[i] > 255) n_sat_hi++;
        end
      end
  endtask

  // Driver.
  initial begin
    in_valid = 0; in_frac_x = 0; in_frac_y = 0; in_all_pos = 0;
    foreach (in_row[i]) in_row[i] = '0;
    for (int n = 0; n < NBLK; n++) begin
      make_window(n);
      fxs[n]  = (n < 32) ? (n % 16) / 4 : $urandom_range(3);
      fys[n]  = (n < 32) ? n % 4 : $urandom_range(3);
      alls[n] = (n >= 32) && (n % 10 == 3 || n == 34);
      all_pred(wins[n], exp_pred[n]);
      count_saturation(n);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      if (!alls[n]) pos_seen[fxs[n]][fys[n]]++;
      if (!alls[n] && fxs[n] == 3) n_shift++;
      if (n > 0 && alls[n] && !alls[n-1]) n_to_all++;
      if (n > 0 && !alls[n] && alls[n-1]) n_to_one++;
      for (int r = 0; r < WIN; r++) begin
        // pauses only in the second half of the run
        while (n >= NBLK / 2 && $urandom_range(4) == 0) begin
          in_valid = 0;
          if (r > 0) paused[n] = 1;
          if (in_ready) n_pause++;
          @(negedge clk);
        end
        in_valid   = 1;
        in_frac_x  = (r == 0) ? frac_t'(fxs[n]) : frac_t'($urandom);
        in_frac_y  = (r == 0) ? frac_t'(fys[n]) : frac_t'($urandom);
        in_all_pos = (r == 0) ? alls[n] : 1'($urandom);
        foreach (in_row[i]) in_row[i] = pix_t'(wins[n][r][i]);
        while (!in_ready) @(negedge clk);
        if (r == 0) begin
          t_first[n] = cyc;
          if (n > 0 && t_first[n] - t_first[n-1] == 21 && !paused[n-1]) n_b2b++;
          if (n > 0 && n < NBLK / 2)
            chk(t_first[n] - t_first[n-1] == (alls[n-1] ? 157 : 21), "block interval");
          if (alls[n]) begin
            for (int p = 0; p < 16; p++)
              for (int y = 0; y < BLK; y++)
                exp_q.push_back('{n, p / 4, p % 4, y, 31 + 8 * p + y});
          end else begin
            for (int y = 0; y < BLK; y++)
              exp_q.push_back('{n, fxs[n], fys[n], y, 15 + y});
          end
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // Monitor: rows stream out in order.
  exp_row_t cur;
  int blocks_done = 0, rows_seen = 0;
  always @(negedge clk) if (rst_n) begin
    if (out_row_valid) begin
      if (exp_q.size() == 0) begin
        chk(0, "unexpected output row");
      end else begin
        cur = exp_q.pop_front();
        rows_seen++;
        chk(int'(out_row_idx) == cur.row, "row order");
        chk(int'(out_frac_x) == cur.fx && int'(out_frac_y) == cur.fy, "row position tag");
        for (int x = 0; x < BLK; x++) begin
          checks++;
          if (int'(out_row[x]) != exp_pred[cur.blk][cur.fx][cur.fy][cur.row][x]) begin
            failures++;
            if (failures < 20)
              $display("blk %0d (fx=%0d fy=%0d all=%0d) row %0d col %0d got %0d exp %0d",
                       cur.blk, cur.fx, cur.fy, alls[cur.blk], cur.row, x, out_row[x],
                       exp_pred[cur.blk][cur.fx][cur.fy][cur.row][x]);
          end
        end
        if (!paused[cur.blk])
          chk(cyc - t_first[cur.blk] == cur.lat, "row latency");
      end
    end
    if (out_blk_valid) begin
      chk(out_row_valid && cur.row == BLK - 1, "blk_valid with row 7");
      for (int y = 0; y < BLK; y++)
        for (int x = 0; x < BLK; x++)
          chk(int'(out_blk[y][x]) == exp_pred[cur.blk][cur.fx][cur.fy][y][x], "block contents");
      if (cur.blk == NBLK - 1 && cur.fx == (alls[cur.blk] ? 3 : fxs[cur.blk])
          && cur.fy == (alls[cur.blk] ? 3 : fys[cur.blk]))
        finish_run();
    end
  end

  task automatic finish_run();
    chk(exp_q.size() == 0, "all expected rows seen");
    for (int fx = 0; fx < 4; fx++)
      for (int fy = 0; fy < 4; fy++)
        chk(pos_seen[fx][fy] > 0, "fractional position exercised");
    chk(n_shift > 0,  "shifted h columns exercised");
    chk(n_b2b > 0,    "back-to-back blocks exercised");
    chk(n_pause > 0,  "input pauses exercised");
    chk(n_to_all > 0, "switch to all-positions mode exercised");
    chk(n_to_one > 0, "switch to single-position mode exercised");
    chk(n_sat_lo > 0, "saturation at 0 exercised");
    chk(n_sat_hi > 0, "saturation at 255 exercised");
    $display("mechanisms: back_to_back=%0d pauses=%0d shifted_h=%0d to_all=%0d to_one=%0d sat_lo=%0d sat_hi=%0d rows=%0d",
             n_b2b, n_pause, n_shift, n_to_all, n_to_one, n_sat_lo, n_sat_hi, rows_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
