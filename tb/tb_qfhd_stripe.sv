// Workload testbench: one 16-line stripe of a 3840-pixel-wide (QFHD)
// reference picture, predicted with 16x16 partitions whose motion vectors
// carry random integer and quarter-sample parts. Each 16x16 partition is
// sent as its four 8x8 parts, each with its own 13x13 window taken from
// the picture; positions outside the picture repeat the nearest edge
// sample, as H.264/AVC reference pictures do. Every predicted sample is
// checked against the reference model, and the run time is measured:
// with rows arriving without pauses a block must take 21 cycles, which
// for a 3840x2160 picture (129600 blocks of 8x8) is 2,721,600 cycles per
// frame, printed as frames per second at a 102 MHz clock.
module tb_qfhd_stripe;
  import luma_interp_pkg::*;
  import luma_ref_pkg::*;

  localparam int W = 3840, H = 2160, LINES = 16;
  localparam int NPU = W / 16;          // 16x16 partitions in the stripe
  localparam int NBLK = NPU * 4;        // 8x8 parts

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  frac_t in_frac_x, in_frac_y, out_frac_x, out_frac_y;
  logic in_all_pos = 1'b0;
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
    repeat (NBLK * 25 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Synthetic textured picture: a smooth gradient plus a fine pattern.
  function automatic int img(int x, int y);
    int cx = (x < 0) ? 0 : (x >= W) ? W - 1 : x;
    int cy = (y < 0) ? 0 : (y >= H) ? H - 1 : y;
    return ((cx >> 3) + (cy << 2) + ((cx * cy * 7 + cx * cx) >> 4) % 61) & 255;
  endfunction

  typedef struct { int x0, y0, fx, fy; } blkjob_t;
  blkjob_t jobs [NBLK];
  win_t cur;
  int exp_blk [BLK][BLK];
  int t_first = -1, t_last = 0, done = 0;

  task automatic window_of(int n, output win_t w);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        w[r][c] = img(jobs[n].x0 + c - 2, jobs[n].y0 + r - 2);
  endtask

  initial begin
    // partitions and their motion vectors
    for (int p = 0; p < NPU; p++) begin
      int mvx, mvy, fx, fy;
      mvx = $urandom_range(8) - 4;  mvy = $urandom_range(8) - 4;
      fx  = $urandom_range(3);      fy  = $urandom_range(3);
      for (int k = 0; k < 4; k++) begin
        jobs[p * 4 + k].x0 = p * 16 + (k % 2) * 8 + mvx;
        jobs[p * 4 + k].y0 = (k / 2) * 8 + mvy;
        jobs[p * 4 + k].fx = fx;
        jobs[p * 4 + k].fy = fy;
      end
    end
    in_valid = 0; in_frac_x = 0; in_frac_y = 0;
    foreach (in_row[i]) in_row[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      win_t w;
      window_of(n, w);
      for (int r = 0; r < WIN; r++) begin
        in_valid = 1;
        in_frac_x = frac_t'(jobs[n].fx);
        in_frac_y = frac_t'(jobs[n].fy);
        foreach (in_row[i]) in_row[i] = pix_t'(w[r][i]);
        while (!in_ready) @(negedge clk);
        if (n == 0 && r == 0) t_first = cyc;
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // Checker: one completed block after another, in order.
  always @(negedge clk) if (rst_n && out_blk_valid) begin
    win_t w;
    window_of(done, w);
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        int e;
        e = pred(w, jobs[done].fx, jobs[done].fy, x, y);
        checks++;
        if (int'(out_blk[y][x]) != e) begin
          failures++;
          if (failures < 10) $display("block %0d (%0d,%0d) got %0d exp %0d", done, x, y, out_blk[y][x], e);
        end
      end
    done++;
    if (done == NBLK) begin
      int cycles_per_frame;
      t_last = cyc;
      checks++;
      // the last block completes 22 cycles after its first row
      if (t_last - t_first != (NBLK - 1) * 21 + 22) begin
        failures++;
        $display("stripe took %0d cycles, expected %0d", t_last - t_first, (NBLK - 1) * 21 + 22);
      end
      cycles_per_frame = (W / 8) * (H / 8) * 21;
      $display("stripe of %0d blocks: %0d cycles; QFHD frame %0d cycles; %0d.%0d fps at 102 MHz",
               NBLK, t_last - t_first, cycles_per_frame,
               102_000_000 / cycles_per_frame, (1020_000_000 / cycles_per_frame) % 10);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
