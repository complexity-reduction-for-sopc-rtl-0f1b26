// sad_reuse_engine: the SAD reuse architecture. Full-search integer motion
// estimation of one 16x16 macroblock over a [-SR, SR] search range for all
// seven H.264 block modes at once.
//
// How it works
//   1. LOAD: the current macroblock (16 rows x 4 words) and the reference
//      search window ((16+2SR) rows x (16+2SR)/4 words) arrive on two
//      valid/ready word streams (4 samples per word, leftmost sample in
//      the low byte) and are written into two register buffers. Both
//      streams are accepted in parallel.
//   2. SEARCH: for each of the (2SR+1)^2 candidate vectors, in raster
//      order (dy = -SR..SR, and within it dx = -SR..SR), the 16 4x4 blocks
//      of the macroblock are sent, one per clock, through the SAD4x4
//      processing element (four SAD1x4 rows in parallel). The 16 results
//      are stored; once complete they are combined into the 41 partition
//      SADs and passed to the Lagrangian MV decision. Every pixel
//      difference is computed once per candidate and reused by all modes.
//   3. FINISH: the mode decision picks the block mode of least total cost.
//
// Timing: one 4x4 block per clock, 16 clocks per candidate, 81 x 16 = 1296
// clocks of search for SR = 4, plus a 4-clock pipeline drain and the mode
// decision. `done` pulses for one clock; results stay valid until the next
// `start`. `start` is ignored while busy; `lambda` and `pred` are sampled
// at `start`.
//
// The search range, the 4x4 SAD unit with four parallel row units and the
// reuse of SAD4x4 terms follow the reference description; the buffering,
// scan order and stream format are this design's own.
module sad_reuse_engine
  import sad_pkg::*;
#(
  parameter int unsigned SR = 4     // search range [-SR, SR]
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [LAMBDA_W-1:0]  lambda,
  input  mv_t                  pred,
  // current macroblock stream
  input  logic                 cur_valid,
  output logic                 cur_ready,
  input  logic [31:0]          cur_data,
  // reference window stream
  input  logic                 ref_valid,
  output logic                 ref_ready,
  input  logic [31:0]          ref_data,
  // status and results
  output logic                 busy,
  output logic                 done,
  output cost_t                best_cost [NPART],
  output mv_t                  best_mv   [NPART],
  output mcost_t               mode_cost [NMODE],
  output mode_e                best_mode
);

  localparam int unsigned WIN       = MB + 2 * SR;
  localparam int unsigned WIN_WORDS = WIN / 4;
  localparam int unsigned CUR_TOTAL = MB * MB / 4;
  localparam int unsigned WIN_TOTAL = WIN * WIN_WORDS;
  localparam int unsigned CW        = $clog2(WIN_TOTAL + 1);
  localparam int unsigned OW        = $clog2(2 * SR + 1);
  localparam int unsigned TAG_W     = 4 + 2 * MV_W;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SEARCH, S_DRAIN, S_FINISH, S_WAIT} state_e;
  state_e state;

  pix_t cur_buf [MB][MB];
  pix_t ref_buf [WIN][WIN];

  logic [CW-1:0]    cur_cnt, ref_cnt;
  logic [OW-1:0]    off_x, off_y;      // candidate offset into the window
  logic [3:0]       blk;               // 4x4 block index 4*i + j
  logic [2:0]       drain;

  logic             pe_in_valid;
  logic [TAG_W-1:0] pe_in_tag, pe_out_tag;
  pix_t             pe_cur [4][4];
  pix_t             pe_ref [4][4];
  logic             pe_out_valid;
  sad4_t            pe_sad4;

  sad4_t            sad4_store [NBLK];
  logic             comb_in_valid;
  mv_t              comb_in_mv;
  logic             comb_out_valid;
  mv_t              comb_out_mv;
  sad_t             part_sad [NPART];

  logic             dec_clear, dec_finish, dec_done;
  logic [LAMBDA_W-1:0] lambda_q;
  mv_t              pred_q;
  mv_t              cand_mv;

  if (WIN % 4 != 0) begin : g_bad_sr
    $error("search window width must be a whole number of 4-sample words");
  end

  // ---------------------------------------------------------------- load
  assign cur_ready = (state == S_LOAD) && (cur_cnt < CW'(CUR_TOTAL));
  assign ref_ready = (state == S_LOAD) && (ref_cnt < CW'(WIN_TOTAL));

  always_ff @(posedge clk) begin
    if (cur_valid && cur_ready)
      for (int k = 0; k < 4; k++)
        cur_buf[int'(cur_cnt) / 4][(int'(cur_cnt) % 4) * 4 + k] <= cur_data[8*k +: 8];
    if (ref_valid && ref_ready)
      for (int k = 0; k < 4; k++)
        ref_buf[int'(ref_cnt) / WIN_WORDS][(int'(ref_cnt) % WIN_WORDS) * 4 + k] <= ref_data[8*k +: 8];
  end

  // ------------------------------------------------------ block addressing
  assign cand_mv.x = mvc_t'(int'(off_x) - int'(SR));
  assign cand_mv.y = mvc_t'(int'(off_y) - int'(SR));

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        pe_cur[r][c] = cur_buf[4 * blk[3:2] + r][4 * blk[1:0] + c];
        pe_ref[r][c] = ref_buf[int'(off_y) + 4 * blk[3:2] + r][int'(off_x) + 4 * blk[1:0] + c];
      end
  end

  assign pe_in_valid = (state == S_SEARCH);
  assign pe_in_tag   = {cand_mv, blk};

  sad_4x4_pe #(.TAG_W(TAG_W)) u_pe (
    .clk, .rst_n,
    .in_valid (pe_in_valid),
    .in_tag   (pe_in_tag),
    .cur      (pe_cur),
    .ref_px   (pe_ref),
    .out_valid(pe_out_valid),
    .out_tag  (pe_out_tag),
    .sad4     (pe_sad4)
  );

  // ------------------------------------------------- SAD4x4 reuse storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBLK; b++) sad4_store[b] <= '0;
      comb_in_valid <= 1'b0;
      comb_in_mv    <= '0;
    end else begin
      comb_in_valid <= 1'b0;
      if (pe_out_valid) begin
        sad4_store[pe_out_tag[3:0]] <= pe_sad4;
        if (pe_out_tag[3:0] == 4'd15) begin
          comb_in_valid <= 1'b1;
          comb_in_mv    <= pe_out_tag[TAG_W-1:4];
        end
      end
    end
  end

  sad_reuse_combiner u_comb (
    .clk, .rst_n,
    .in_valid (comb_in_valid),
    .in_mv    (comb_in_mv),
    .sad4     (sad4_store),
    .out_valid(comb_out_valid),
    .out_mv   (comb_out_mv),
    .sad      (part_sad)
  );

  mv_mode_decision u_dec (
    .clk, .rst_n,
    .clear    (dec_clear),
    .lambda   (lambda_q),
    .pred     (pred_q),
    .in_valid (comb_out_valid),
    .in_mv    (comb_out_mv),
    .sad      (part_sad),
    .finish   (dec_finish),
    .best_cost,
    .best_mv,
    .mode_cost,
    .best_mode,
    .done     (dec_done)
  );

  // ------------------------------------------------------------- control
  assign busy       = (state != S_IDLE);
  assign dec_clear  = (state == S_IDLE) && start;
  assign dec_finish = (state == S_FINISH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur_cnt <= '0;
      ref_cnt <= '0;
      off_x   <= '0;
      off_y   <= '0;
      blk     <= '0;
      drain   <= '0;
      done    <= 1'b0;
      lambda_q <= '0;
      pred_q  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          lambda_q <= lambda;
          pred_q  <= pred;
          cur_cnt <= '0;
          ref_cnt <= '0;
        end
        S_LOAD: begin
          if (cur_valid && cur_ready) cur_cnt <= cur_cnt + 1'b1;
          if (ref_valid && ref_ready) ref_cnt <= ref_cnt + 1'b1;
          if ((cur_cnt + CW'(cur_valid && cur_ready) == CW'(CUR_TOTAL)) &&
              (ref_cnt + CW'(ref_valid && ref_ready) == CW'(WIN_TOTAL))) begin
            state <= S_SEARCH;
            off_x <= '0;
            off_y <= '0;
            blk   <= '0;
          end
        end
        S_SEARCH: begin
          blk <= blk + 1'b1;
          if (blk == 4'd15) begin
            if (off_x == OW'(2 * SR)) begin
              off_x <= '0;
              if (off_y == OW'(2 * SR)) begin
                state <= S_DRAIN;
                drain <= '0;
              end else begin
                off_y <= off_y + 1'b1;
              end
            end else begin
              off_x <= off_x + 1'b1;
            end
          end
        end
        // PE register, store, combiner register, decision register
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd3) state <= S_FINISH;
        end
        S_FINISH: state <= S_WAIT;
        S_WAIT: if (dec_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
