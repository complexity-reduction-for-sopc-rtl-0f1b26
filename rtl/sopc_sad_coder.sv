// sopc_sad_coder: the SAD reuse motion-estimation accelerator as it sits in
// a system-on-programmable-chip. Seen from the system it has two ports:
//   * an Avalon-MM slave (s_*) on the system interconnect, through which
//     the soft CPU writes the search parameters, starts a macroblock and
//     reads back the motion vectors, costs and chosen block mode;
//   * a pipelined read master (m_*) toward the external frame memory
//     (SDRAM behind its controller), from which the current macroblock
//     and the search window are fetched.
// Inside, mem_fetch_ctrl streams both pictures through two FIFOs (one per
// stream: the distributed buffer) into sad_reuse_engine, which runs the
// full search and the mode decision. Start-to-done for one macroblock with
// an immediately answering memory is about 150 clocks of fetch/load plus
// 1296 clocks of search plus a few of pipeline and decision.
//
// The soft CPU, its standard peripherals, the interconnect and the SDRAM
// itself are outside this module; their signals are the ports.
module sopc_sad_coder
  import sad_pkg::*;
#(
  parameter int unsigned SR         = 4,   // search range [-SR, SR]
  parameter int unsigned ADDR_W     = 24,  // frame memory word address
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave (from the soft CPU)
  input  logic [7:0]        s_address,
  input  logic              s_read,
  input  logic              s_write,
  input  logic [31:0]       s_writedata,
  output logic [31:0]       s_readdata,
  output logic              s_readdatavalid,
  output logic              irq,
  // frame memory read master
  output logic [ADDR_W-1:0] m_address,
  output logic              m_read,
  input  logic              m_waitrequest,
  input  logic [31:0]       m_readdata,
  input  logic              m_readdatavalid
);

  localparam int unsigned WIN = MB + 2 * SR;
  localparam int unsigned FW  = $clog2(FIFO_DEPTH + 1);

  logic                start, busy, done, fetch_busy, fetch_done;
  logic [ADDR_W-1:0]   cur_base, ref_base, stride;
  logic [LAMBDA_W-1:0] lambda;
  mv_t                 pred;
  cost_t               best_cost [NPART];
  mv_t                 best_mv   [NPART];
  mcost_t              mode_cost [NMODE];
  mode_e               best_mode;

  logic              cur_wr_valid, cur_wr_ready, ref_wr_valid, ref_wr_ready;
  logic [31:0]       cur_wr_data, ref_wr_data, cur_rd_data, ref_rd_data;
  logic              cur_rd_valid, cur_rd_ready, ref_rd_valid, ref_rd_ready;
  logic [FW-1:0]     cur_count, ref_count;

  avalon_sad_regs #(.ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_address, .s_read, .s_write, .s_writedata, .s_readdata, .s_readdatavalid, .irq,
    .start, .cur_base, .ref_base, .stride, .lambda, .pred,
    .busy, .done, .best_cost, .best_mv, .mode_cost, .best_mode
  );

  mem_fetch_ctrl #(
    .ADDR_W(ADDR_W), .CUR_ROWS(MB), .CUR_WORDS(MB / 4),
    .WIN_ROWS(WIN), .WIN_WORDS(WIN / 4), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_fetch (
    .clk, .rst_n, .start, .cur_base, .ref_base, .stride,
    .busy(fetch_busy), .done(fetch_done),
    .m_address, .m_read, .m_waitrequest, .m_readdata, .m_readdatavalid,
    .cur_wr_valid, .cur_wr_ready, .cur_wr_data, .cur_count,
    .ref_wr_valid, .ref_wr_ready, .ref_wr_data, .ref_count
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_cur_fifo (
    .clk, .rst_n,
    .wr_valid(cur_wr_valid), .wr_ready(cur_wr_ready), .wr_data(cur_wr_data),
    .rd_valid(cur_rd_valid), .rd_ready(cur_rd_ready), .rd_data(cur_rd_data),
    .count(cur_count)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_ref_fifo (
    .clk, .rst_n,
    .wr_valid(ref_wr_valid), .wr_ready(ref_wr_ready), .wr_data(ref_wr_data),
    .rd_valid(ref_rd_valid), .rd_ready(ref_rd_ready), .rd_data(ref_rd_data),
    .count(ref_count)
  );

  sad_reuse_engine #(.SR(SR)) u_engine (
    .clk, .rst_n, .start, .lambda, .pred,
    .cur_valid(cur_rd_valid), .cur_ready(cur_rd_ready), .cur_data(cur_rd_data),
    .ref_valid(ref_rd_valid), .ref_ready(ref_rd_ready), .ref_data(ref_rd_data),
    .busy, .done, .best_cost, .best_mv, .mode_cost, .best_mode
  );

  // The fetch always finishes before the engine, which needs all its data.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !fetch_busy);
  assert property (@(posedge clk) disable iff (!rst_n) fetch_done |-> busy);

endmodule
