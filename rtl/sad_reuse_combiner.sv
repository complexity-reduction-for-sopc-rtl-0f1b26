// sad_reuse_combiner: builds the SADs of all seven block modes from the
// sixteen stored SAD4x4 terms of one candidate motion vector.
//
// For a mode of m x n pixels (m high, n wide) each partition's SAD is the
// sum of the (m/4) x (n/4) SAD4x4 terms it covers, so no pixel difference
// is computed twice. All 41 partition sums (1 of 16x16, 2 of 16x8, 2 of
// 8x16, 4 of 8x8, 8 of 8x4, 8 of 4x8, 16 of 4x4) are formed in parallel
// and registered. Which block belongs to which partition comes from
// sad_pkg::part_has_blk, evaluated at elaboration time.
//
// Timing: `sad4`/`in_mv` are sampled when `in_valid` is high; `sad` and
// `out_mv` are valid with `out_valid` one cycle later.
module sad_reuse_combiner
  import sad_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  mv_t    in_mv,
  input  sad4_t  sad4 [NBLK],      // index 4*i + j
  output logic   out_valid,
  output mv_t    out_mv,
  output sad_t   sad  [NPART]
);

  sad_t sum [NPART];

  for (genvar p = 0; p < NPART; p++) begin : g_part
    always_comb begin
      sum[p] = '0;
      for (int b = 0; b < NBLK; b++)
        if (part_has_blk(p, b)) sum[p] += SAD_W'(sad4[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mv    <= '0;
      for (int p = 0; p < NPART; p++) sad[p] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mv <= in_mv;
        for (int p = 0; p < NPART; p++) sad[p] <= sum[p];
      end
    end
  end

endmodule
