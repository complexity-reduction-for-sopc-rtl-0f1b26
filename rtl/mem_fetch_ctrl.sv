// mem_fetch_ctrl: memory-controller side of the accelerator. It reads the
// current macroblock and the reference search window out of external frame
// memory and pumps them, word by word, into the two FIFOs that feed the SAD
// reuse architecture.
//
// Frame memory is word addressed, 4 luma samples per 32-bit word (sample
// x = 4w + k in bits 8k+7..8k). On `start` it reads CUR_ROWS rows of
// CUR_WORDS words from `cur_base` and then WIN_ROWS rows of WIN_WORDS words
// from `ref_base`, row to row `stride` words apart (all three are sampled
// at `start`). The memory port is an
// Avalon-MM style pipelined read master: `m_read` with `m_address` is held
// until `m_waitrequest` is low; data return in order with
// `m_readdatavalid`, any number of cycles later. A read is issued only
// while the FIFO it will land in has room for it and for all reads of that
// stream still in flight, so returned words are always accepted. `done`
// pulses when the last word has been written into its FIFO.
//
// The reference description names an SDRAM controller and FIFOs in this
// place but gives no protocol; the read port, word packing and credit rule
// are this design's own. SDRAM command timing is left to the memory side.
module mem_fetch_ctrl #(
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned CUR_ROWS  = 16,
  parameter int unsigned CUR_WORDS = 4,
  parameter int unsigned WIN_ROWS  = 24,
  parameter int unsigned WIN_WORDS = 6,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] cur_base,
  input  logic [ADDR_W-1:0] ref_base,
  input  logic [ADDR_W-1:0] stride,
  output logic              busy,
  output logic              done,
  // memory read master
  output logic [ADDR_W-1:0] m_address,
  output logic              m_read,
  input  logic              m_waitrequest,
  input  logic [31:0]       m_readdata,
  input  logic              m_readdatavalid,
  // FIFO write sides
  output logic              cur_wr_valid,
  input  logic              cur_wr_ready,
  output logic [31:0]       cur_wr_data,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] cur_count,
  output logic              ref_wr_valid,
  input  logic              ref_wr_ready,
  output logic [31:0]       ref_wr_data,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] ref_count
);

  localparam int unsigned CUR_TOTAL = CUR_ROWS * CUR_WORDS;
  localparam int unsigned WIN_TOTAL = WIN_ROWS * WIN_WORDS;
  localparam int unsigned TOTAL     = CUR_TOTAL + WIN_TOTAL;
  localparam int unsigned CW        = $clog2(TOTAL + 1);
  localparam int unsigned RW        = $clog2((CUR_ROWS > WIN_ROWS ? CUR_ROWS : WIN_ROWS) + 1);
  localparam int unsigned WW        = $clog2((CUR_WORDS > WIN_WORDS ? CUR_WORDS : WIN_WORDS) + 1);
  localparam int unsigned FW        = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_CUR, S_REF, S_WAIT} state_e;
  state_e state;

  logic [ADDR_W-1:0] row_addr, ref_base_q, stride_q;
  logic [RW-1:0]     row;
  logic [WW-1:0]     word;
  logic [CW-1:0]     returned;
  logic [FW:0]       pend_cur, pend_ref;
  logic              issue, ret_cur, ret_ref;
  logic              last_word;

  assign m_address = row_addr + ADDR_W'(word);
  assign m_read    = ((state == S_CUR) && ((FW+1)'(cur_count) + pend_cur < (FW+1)'(FIFO_DEPTH)))
                  || ((state == S_REF) && ((FW+1)'(ref_count) + pend_ref < (FW+1)'(FIFO_DEPTH)));
  assign issue     = m_read && !m_waitrequest;
  assign busy      = (state != S_IDLE);

  assign ret_cur      = m_readdatavalid && (returned < CW'(CUR_TOTAL));
  assign ret_ref      = m_readdatavalid && !(returned < CW'(CUR_TOTAL));
  assign cur_wr_valid = ret_cur;
  assign ref_wr_valid = ret_ref;
  assign cur_wr_data  = m_readdata;
  assign ref_wr_data  = m_readdata;

  assign last_word = (state == S_CUR)
      ? (row == RW'(CUR_ROWS - 1)) && (word == WW'(CUR_WORDS - 1))
      : (row == RW'(WIN_ROWS - 1)) && (word == WW'(WIN_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      row_addr <= '0;
      ref_base_q <= '0;
      stride_q <= '0;
      row      <= '0;
      word     <= '0;
      returned <= '0;
      pend_cur <= '0;
      pend_ref <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      // reads in flight per stream
      pend_cur <= pend_cur + (FW+1)'(issue && state == S_CUR) - (FW+1)'(ret_cur);
      pend_ref <= pend_ref + (FW+1)'(issue && state == S_REF) - (FW+1)'(ret_ref);
      if (m_readdatavalid) returned <= returned + 1'b1;

      case (state)
        S_IDLE: if (start) begin
          state    <= S_CUR;
          row_addr <= cur_base;
          ref_base_q <= ref_base;
          stride_q <= stride;
          row      <= '0;
          word     <= '0;
          returned <= '0;
        end
        S_CUR, S_REF: if (issue) begin
          if (last_word) begin
            row  <= '0;
            word <= '0;
            if (state == S_CUR) begin
              state    <= S_REF;
              row_addr <= ref_base_q;
            end else begin
              state <= S_WAIT;
            end
          end else if (word == WW'((state == S_CUR ? CUR_WORDS : WIN_WORDS) - 1)) begin
            word     <= '0;
            row      <= row + 1'b1;
            row_addr <= row_addr + stride_q;
          end else begin
            word <= word + 1'b1;
          end
        end
        S_WAIT: if (returned + CW'(m_readdatavalid) == CW'(TOTAL)) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Credits guarantee that a returning word always finds room.
  assert property (@(posedge clk) disable iff (!rst_n) cur_wr_valid |-> cur_wr_ready);
  assert property (@(posedge clk) disable iff (!rst_n) ref_wr_valid |-> ref_wr_ready);

endmodule
