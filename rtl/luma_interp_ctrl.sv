// luma_interp_ctrl: schedule of the 8x8 luma sub-pixel interpolator.
//
// A block passes through these phases:
//   LOAD (13 accepted input rows): each row of 13 integer pixels is stored
//        and the eight first-stage filters make the row's eight b pixels.
//        in_ready is high; in_valid low simply pauses the phase.
//   HJ   (8 cycles, rows 0..7): the same first-stage filters run down the
//        stored columns to make h, while the eight second-stage filters
//        make j from the stored b' sums. When frac_x = 3 the filters read
//        the columns one to the right (hj_ox) and the result, m, goes to
//        the m store instead of the h store (h_to_m).
//   HM   (8 cycles, all-positions mode only): a second column pass with
//        the shift, so that both h and m are held.
//   QPI  one cycle behind the filters: the selection encoder and the eight
//        quarter-pixel filters make one output row per cycle.
//        Single-position mode: rows 0..7 of the requested position,
//        one cycle behind HJ. All-positions mode (QALL, 128 cycles, after
//        HM): rows 0..7 of each of the 16 positions in turn, position
//        (frac_x, frac_y) = (0,0), (0,1), ... (3,3).
// The mode and position are taken with the first row of a block and are
// carried down the pipeline, so in single-position mode the next block's
// LOAD may start in the cycle after the last HJ cycle while QPI finishes
// row 7: blocks are accepted every 21 cycles and a block's last row
// leaves the quarter-pixel filters 22 cycles after its first row. In
// all-positions mode a block takes 13 + 8 + 8 + 128 = 157 cycles.
// The phase split (13 loading cycles, then h and j in parallel on the
// same filters) follows the design description; the handshake, the
// column shift, the all-positions sweep order, the overlap of QPI with
// the next LOAD and the reset are this design's choices. Active-low
// asynchronous reset.
module luma_interp_ctrl
  import luma_interp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  frac_t      in_frac_x,
  input  frac_t      in_frac_y,
  input  logic       in_all_pos,  // produce all 16 positions of the block
  // LOAD phase
  output logic       load_en,
  output logic [3:0] load_row,
  // HJ / HM phases
  output logic       hj_en,       // first-stage filters run down columns
  output logic [2:0] hj_row,
  output logic       hj_ox,       // read columns shifted by one; write m
  output logic       j_en,        // second-stage filters write j
  // QPI stage
  output logic       q_en,
  output logic [2:0] q_row,
  output frac_t      q_frac_x,
  output frac_t      q_frac_y
);

  typedef enum logic [1:0] {S_LOAD, S_HJ, S_HM, S_QALL} state_e;

  state_e     state;
  logic [6:0] cnt;      // row counter; position and row in QALL
  frac_t      fx, fy;
  logic       all_pos;

  assign in_ready = (state == S_LOAD);
  assign load_en  = in_ready && in_valid;
  assign load_row = cnt[3:0];
  assign hj_en    = (state == S_HJ) || (state == S_HM);
  assign hj_row   = cnt[2:0];
  assign hj_ox    = (state == S_HM) || (state == S_HJ && !all_pos && fx == 2'd3);
  assign j_en     = (state == S_HJ);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_LOAD;
      cnt      <= '0;
      fx       <= '0;
      fy       <= '0;
      all_pos  <= 1'b0;
      q_en     <= 1'b0;
      q_row    <= '0;
      q_frac_x <= '0;
      q_frac_y <= '0;
    end else begin
      // QPI stage, one cycle behind the filter phases
      q_en     <= (state == S_HJ && !all_pos) || (state == S_QALL);
      q_row    <= cnt[2:0];
      q_frac_x <= (state == S_QALL) ? cnt[6:5] : fx;
      q_frac_y <= (state == S_QALL) ? cnt[4:3] : fy;
      unique case (state)
        S_LOAD:
          if (load_en) begin
            if (cnt == 7'd0) begin
              fx      <= in_frac_x;
              fy      <= in_frac_y;
              all_pos <= in_all_pos;
            end
            if (cnt == 7'(WIN-1)) begin
              cnt   <= '0;
              state <= S_HJ;
            end else begin
              cnt <= cnt + 7'd1;
            end
          end
        S_HJ:
          if (cnt == 7'(BLK-1)) begin
            cnt   <= '0;
            state <= all_pos ? S_HM : S_LOAD;
          end else begin
            cnt <= cnt + 7'd1;
          end
        S_HM:
          if (cnt == 7'(BLK-1)) begin
            cnt   <= '0;
            state <= S_QALL;
          end else begin
            cnt <= cnt + 7'd1;
          end
        S_QALL:
          if (cnt == 7'(16*BLK-1)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 7'd1;
          end
        default: state <= S_LOAD;
      endcase
    end

  // The counter never leaves its phase's range.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LOAD) |-> (cnt < 7'(WIN)));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_HJ || state == S_HM) |-> (cnt < 7'(BLK)));

endmodule
