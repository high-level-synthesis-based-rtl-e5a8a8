// Testbench of luma_interp_ctrl: feeds blocks in single-position and
// all-positions mode, with and without random pauses in in_valid, and
// checks every output cycle by cycle against a model of the schedule:
// 13 accepted LOAD rows numbered 0..12, 8 HJ cycles (in_ready low, j
// written, columns shifted when frac_x = 3 in single-position mode),
// in all-positions mode 8 HM cycles (shifted) and a 128-cycle sweep over
// the 16 positions, and the QPI stage one cycle behind. Also checks the
// block interval: 21 cycles in single-position mode, 157 in
// all-positions mode, when rows arrive without pauses.
module tb_luma_interp_ctrl;
  import luma_interp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_all_pos;
  frac_t in_frac_x, in_frac_y;
  logic load_en, hj_en, hj_ox, j_en, q_en;
  logic [3:0] load_row;
  logic [2:0] hj_row, q_row;
  frac_t q_frac_x, q_frac_y;
  int checks = 0, failures = 0;

  luma_interp_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // model state: phase 0 LOAD, 1 HJ, 2 HM, 3 QALL
  int m_phase = 0, m_cnt = 0;
  int m_fx = 0, m_fy = 0, m_all = 0;
  int p_q = 0, p_row = 0, p_fx = 0, p_fy = 0;  // what QPI must show
  int first_acc = -1, first_all = 0, cyc = 0;
  int iv_mc [$], iv_all [$];
  int seg;   // 0: single, no pauses; 1: all, no pauses; 2: mixed with pauses

  initial begin
    in_valid = 0; in_frac_x = 0; in_frac_y = 0; in_all_pos = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      seg = (n < 600) ? 0 : (n < 1600) ? 1 : 2;
      in_valid   = (seg == 2) ? ($urandom_range(3) != 0) : 1'b1;
      in_all_pos = (seg == 0) ? 1'b0 : (seg == 1) ? 1'b1 : ($urandom_range(3) == 0);
      in_frac_x  = frac_t'($urandom);
      in_frac_y  = frac_t'($urandom);
      #1;
      chk(in_ready == (m_phase == 0), "in_ready");
      chk(load_en == (m_phase == 0 && in_valid), "load_en");
      if (m_phase == 0) chk(int'(load_row) == m_cnt, "load_row");
      chk(hj_en == (m_phase == 1 || m_phase == 2), "hj_en");
      chk(j_en == (m_phase == 1), "j_en");
      if (hj_en) begin
        chk(int'(hj_row) == m_cnt, "hj_row");
        chk(hj_ox == (m_phase == 2 || (m_all == 0 && m_fx == 3)), "hj_ox");
      end
      chk(q_en == (p_q != 0), "q_en");
      if (p_q != 0) begin
        chk(int'(q_row) == p_row, "q_row");
        chk(int'(q_frac_x) == p_fx && int'(q_frac_y) == p_fy, "q_frac");
      end
      // what the QPI stage shows next cycle
      p_q   = (m_phase == 1 && m_all == 0) || (m_phase == 3);
      p_row = m_cnt % 8;
      p_fx  = (m_phase == 3) ? m_cnt / 32 : m_fx;
      p_fy  = (m_phase == 3) ? (m_cnt / 8) % 4 : m_fy;
      // advance the model
      case (m_phase)
        0: if (in_valid) begin
             if (m_cnt == 0) begin
               m_fx = int'(in_frac_x); m_fy = int'(in_frac_y); m_all = int'(in_all_pos);
               if (first_acc >= 0 && seg == 0) iv_mc.push_back(cyc - first_acc);
               if (first_acc >= 0 && seg == 1 && first_all) iv_all.push_back(cyc - first_acc);
               if (seg == 1) first_all = 1;
               first_acc = cyc;
             end
             if (m_cnt == 12) begin m_cnt = 0; m_phase = 1; end else m_cnt++;
           end
        1: if (m_cnt == 7) begin m_cnt = 0; m_phase = m_all ? 2 : 0; end else m_cnt++;
        2: if (m_cnt == 7) begin m_cnt = 0; m_phase = 3; end else m_cnt++;
        default: if (m_cnt == 127) begin m_cnt = 0; m_phase = 0; end else m_cnt++;
      endcase
      @(negedge clk);
      cyc++;
    end
    chk(iv_mc.size() > 10, "back-to-back single-position blocks seen");
    chk(iv_all.size() > 3, "back-to-back all-positions blocks seen");
    foreach (iv_mc[i])  chk(iv_mc[i] == 21, "block interval of 21 cycles");
    foreach (iv_all[i]) chk(iv_all[i] == 157, "all-positions block interval of 157 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
