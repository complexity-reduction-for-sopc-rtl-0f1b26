// avalon_sad_regs: Avalon-MM slave through which the soft CPU drives the
// SAD reuse accelerator over the system interconnect (loosely coupled
// accelerator: the CPU only configures, starts and collects results).
//
// Register map (32-bit word addresses):
//   0x00 CTRL    write: bit0 start, bit1 clear done/irq, bit2 irq enable
//                read : bit0 busy, bit1 done, bit2 irq enable
//   0x01 CUR_BASE   word address of the current macroblock's first word
//   0x02 REF_BASE   word address of the search window's first word
//   0x03 STRIDE     words per frame row
//   0x04 LAMBDA     Lagrangian multiplier (bits 7..0)
//   0x05 PRED       MV predictor: x in bits 7..0, y in bits 15..8 (signed)
//   0x06 MODE       best block mode (sad_pkg::mode_e) of the last search
//   0x08..0x0E      total cost of mode 0..6
//   0x40..0x68      best MV of partition 0..40 (x bits 7..0, y bits 15..8)
//   0x80..0xA8      best cost of partition 0..40
// Unmapped addresses read as 0. Reads have a fixed latency of one clock
// (`readdatavalid`); there is no wait state. `irq` is high while a search
// has completed, its interrupt is enabled and it has not been cleared.
// A start written while busy is ignored.
//
// The register map, the interrupt and the read latency are this design's
// choices; the reference description only places the accelerator on the
// Avalon switch fabric.
module avalon_sad_regs
  import sad_pkg::*;
#(
  parameter int unsigned ADDR_W = 24      // memory word-address width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Avalon-MM slave
  input  logic [7:0]           s_address,
  input  logic                 s_read,
  input  logic                 s_write,
  input  logic [31:0]          s_writedata,
  output logic [31:0]          s_readdata,
  output logic                 s_readdatavalid,
  output logic                 irq,
  // accelerator control
  output logic                 start,
  output logic [ADDR_W-1:0]    cur_base,
  output logic [ADDR_W-1:0]    ref_base,
  output logic [ADDR_W-1:0]    stride,
  output logic [LAMBDA_W-1:0]  lambda,
  output mv_t                  pred,
  input  logic                 busy,
  input  logic                 done,
  input  cost_t                best_cost [NPART],
  input  mv_t                  best_mv   [NPART],
  input  mcost_t               mode_cost [NMODE],
  input  mode_e                best_mode
);

  logic        done_flag, irq_en;
  logic [31:0] rdata;

  always_comb begin
    rdata = '0;
    if (s_address < 8'h40) begin
      case (s_address)
        8'h00: rdata = {29'd0, irq_en, done_flag, busy};
        8'h01: rdata = 32'(cur_base);
        8'h02: rdata = 32'(ref_base);
        8'h03: rdata = 32'(stride);
        8'h04: rdata = 32'(lambda);
        8'h05: rdata = {16'd0, pred.y, pred.x};
        8'h06: rdata = {29'd0, best_mode};
        default:
          if (s_address >= 8'h08 && s_address < 8'h08 + 8'(NMODE))
            rdata = 32'(mode_cost[int'(s_address) - 8]);
      endcase
    end else if (s_address < 8'h40 + 8'(NPART)) begin
      rdata = {16'd0, best_mv[int'(s_address) - 64].y, best_mv[int'(s_address) - 64].x};
    end else if (s_address >= 8'h80 && s_address < 8'h80 + 8'(NPART)) begin
      rdata = 32'(best_cost[int'(s_address) - 128]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_readdata      <= '0;
      s_readdatavalid <= 1'b0;
      start           <= 1'b0;
      cur_base        <= '0;
      ref_base        <= '0;
      stride          <= '0;
      lambda          <= '0;
      pred            <= '0;
      done_flag       <= 1'b0;
      irq_en          <= 1'b0;
    end else begin
      s_readdatavalid <= s_read;
      if (s_read) s_readdata <= rdata;
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (s_write) begin
        case (s_address)
          8'h00: begin
            if (s_writedata[0] && !busy) begin
              start     <= 1'b1;
              done_flag <= 1'b0;
            end
            if (s_writedata[1]) done_flag <= 1'b0;
            irq_en <= s_writedata[2];
          end
          8'h01: cur_base <= s_writedata[ADDR_W-1:0];
          8'h02: ref_base <= s_writedata[ADDR_W-1:0];
          8'h03: stride   <= s_writedata[ADDR_W-1:0];
          8'h04: lambda   <= s_writedata[LAMBDA_W-1:0];
          8'h05: pred     <= s_writedata[2*MV_W-1:0];
          default: ;
        endcase
      end
    end
  end

  assign irq = done_flag && irq_en;

  // Avalon allows only one of read and write per transfer.
  assert property (@(posedge clk) disable iff (!rst_n) !(s_read && s_write));

endmodule
