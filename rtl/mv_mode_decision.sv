// mv_mode_decision: Lagrangian motion-vector selection for every partition
// and the final choice among the seven block modes.
//
// For each candidate vector d delivered with the 41 partition SADs it forms
//     J(d) = SAD(d) + lambda * R(d - p)
// where R is the number of bits of the vector difference, taken as the
// length of the signed Exp-Golomb code of each component (sum of both).
// Each partition keeps the smallest J seen so far and its vector; on a tie
// the earlier candidate stays. `clear` (one cycle) starts a new search.
// `finish` (one cycle, after the last candidate) sums the kept costs of
// the partitions of each mode and registers the mode with the smallest sum
// (the lower mode number wins a tie); `done` pulses on the next cycle.
//
// The predictor p is one vector for the whole macroblock, supplied from
// outside; the bit-count model, tie rules and the mode-cost sum are this
// design's choices, not given in detail by the reference description.
module mv_mode_decision
  import sad_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [LAMBDA_W-1:0]  lambda,
  input  mv_t                  pred,
  input  logic                 in_valid,
  input  mv_t                  in_mv,
  input  sad_t                 sad [NPART],
  input  logic                 finish,
  output cost_t                best_cost [NPART],
  output mv_t                  best_mv   [NPART],
  output mcost_t               mode_cost [NMODE],
  output mode_e                best_mode,
  output logic                 done
);

  cost_t  cost;
  cost_t  cand_cost [NPART];
  logic [6:0] rbits;
  mcost_t msum [NMODE];
  mode_e  bm;

  // Rate term is common to all partitions for one candidate.
  always_comb begin
    rbits = 7'(se_bits((MV_W+1)'(in_mv.x) - (MV_W+1)'(pred.x)))
          + 7'(se_bits((MV_W+1)'(in_mv.y) - (MV_W+1)'(pred.y)));
    cost  = COST_W'(lambda) * COST_W'(rbits);
    for (int p = 0; p < NPART; p++)
      cand_cost[p] = COST_W'(sad[p]) + cost;
  end

  // Partitions of one mode are numbered consecutively.
  for (genvar m = 0; m < NMODE; m++) begin : g_mode
    localparam int unsigned B = part_base(m);
    localparam int unsigned N = mode_nparts(m);
    always_comb begin
      msum[m] = '0;
      for (int k = 0; k < N; k++) msum[m] += MCOST_W'(best_cost[B + k]);
    end
  end

  always_comb begin
    bm = MODE_16X16;
    for (int m = 1; m < NMODE; m++)
      if (msum[m] < msum[bm]) bm = mode_e'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPART; p++) begin
        best_cost[p] <= '1;
        best_mv[p]   <= '0;
      end
      for (int m = 0; m < NMODE; m++) mode_cost[m] <= '0;
      best_mode <= MODE_16X16;
      done      <= 1'b0;
    end else begin
      done <= finish;
      if (clear) begin
        for (int p = 0; p < NPART; p++) begin
          best_cost[p] <= '1;
          best_mv[p]   <= '0;
        end
      end else if (in_valid) begin
        for (int p = 0; p < NPART; p++)
          if (cand_cost[p] < best_cost[p]) begin
            best_cost[p] <= cand_cost[p];
            best_mv[p]   <= in_mv;
          end
      end
      if (finish) begin
        for (int m = 0; m < NMODE; m++) mode_cost[m] <= msum[m];
        best_mode <= bm;
      end
    end
  end

  // A search is closed by `finish` only when no candidate is still arriving.
  assert property (@(posedge clk) disable iff (!rst_n) !(finish && in_valid));
  assert property (@(posedge clk) disable iff (!rst_n) !(clear && in_valid));

endmodule
