// sad_4x4_pe: SAD of one 4x4 block, one block per clock.
//
// Four sad_1x4 units work in parallel, one per row of the block, and their
// four row sums are added into SAD4x4 (the basic term that every larger
// block mode reuses). The result is registered: when `in_valid` is high,
// `sad4` and the accompanying `in_tag` appear on the next clock edge with
// `out_valid`. Throughput is one 4x4 block per cycle; latency one cycle.
//
// The one-cycle register and the tag passed alongside are this design's
// choice; the four parallel row units follow the described PE.
module sad_4x4_pe
  import sad_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  pix_t              cur    [4][4],   // [row][col]
  input  pix_t              ref_px [4][4],
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output sad4_t             sad4
);

  logic [PIX_W+1:0] row_sad [4];
  sad4_t            sum;

  for (genvar r = 0; r < 4; r++) begin : g_row
    sad_1x4 u_row (.cur(cur[r]), .ref_px(ref_px[r]), .sad(row_sad[r]));
  end

  always_comb begin
    sum = '0;
    for (int r = 0; r < 4; r++) sum += SAD4_W'(row_sad[r]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      sad4      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        sad4    <= sum;
      end
    end
  end

endmodule
