// tb_sopc_sad_coder: end-to-end test of the accelerator at its default
// size (search range +/-4). A frame of 64x48 samples sits in a memory model
// with random wait states and latencies. Acting as the CPU, the test writes
// the registers over Avalon-MM, starts one macroblock at a time, waits for
// the interrupt and reads back all 41 vectors and costs, the mode totals
// and the chosen mode, comparing them with a software full search.
// Mechanisms that must each occur at least once: memory wait states,
// the engine waiting on an empty FIFO, a
// start ignored while busy, the interrupt, and at least two different
// block modes chosen. (The engine takes a word per clock on each stream,
// faster than the memory delivers, so here the FIFOs never fill and the
// fetch is never held back by them; the printed hold-off count shows this.
// tb_mem_fetch_ctrl exercises that case.)
module tb_sopc_sad_coder;
  import sad_pkg::*;
  import tb_me_ref_pkg::*;

  localparam int FW = 64, FH = 48, STRIDE = FW / 4, SR = 4, WIN = 16 + 2 * SR;
  localparam int CUR_AT = FH * STRIDE;

  logic        clk = 0, rst_n = 1;
  logic [7:0]  s_address;
  logic        s_read, s_write, s_readdatavalid, irq;
  logic [31:0] s_writedata, s_readdata;
  logic [23:0] m_address;
  logic        m_read, m_waitrequest, m_readdatavalid;
  logic [31:0] m_readdata;
  int          stalls, reads;
  int          checks = 0, failures = 0;
  int          frame [FH][FW];     // reference frame, at word address 0
  int          curf  [FH][FW];     // current frame, at word address CUR_AT
  int          holdoffs = 0, starved = 0, ignored = 0, irqs = 0;
  int          starts = 0, start_writes = 0;
  bit          mode_seen [7];

  sopc_sad_coder dut (.clk, .rst_n, .s_address, .s_read, .s_write, .s_writedata, .s_readdata,
    .s_readdatavalid, .irq, .m_address, .m_read, .m_waitrequest, .m_readdata, .m_readdatavalid);

  tb_sdram_model #(.ADDR_W(24), .WORDS(2 * FH * STRIDE), .STALL_PCT(20)) u_mem (.clk,
    .address(m_address), .read(m_read), .waitrequest(m_waitrequest), .readdata(m_readdata),
    .readdatavalid(m_readdatavalid), .stalls, .reads);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if ((dut.u_fetch.state == 1 || dut.u_fetch.state == 2) && !m_read) holdoffs++;
    if (dut.u_regs.start) starts++;
    if (dut.u_engine.state == 1 && dut.u_engine.ref_ready && !dut.u_engine.ref_valid) starved++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    s_address = 8'(a); s_writedata = d; s_write = 1;
    @(negedge clk);
    s_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    s_address = 8'(a); s_read = 1;
    @(negedge clk);
    s_read = 0;
    if (!s_readdatavalid) begin failures++; $display("FAIL no readdatavalid"); end
    d = s_readdata;
  endtask

  task automatic load_frame();
    for (int y = 0; y < FH; y++)
      for (int w = 0; w < STRIDE; w++)
        u_mem.mem[y * STRIDE + w] = {8'(frame[y][4*w+3]), 8'(frame[y][4*w+2]),
                                     8'(frame[y][4*w+1]), 8'(frame[y][4*w])};
    for (int y = 0; y < FH; y++)
      for (int w = 0; w < STRIDE; w++)
        u_mem.mem[CUR_AT + y * STRIDE + w] = {8'(curf[y][4*w+3]), 8'(curf[y][4*w+2]),
                                              8'(curf[y][4*w+1]), 8'(curf[y][4*w])};
  endtask

  task automatic search(input int mbx, input int mby, input int lam, input int px, input int py);
    pic_t cur, win;
    int bc [NP], bx [NP], by [NP], mc [7], bm;
    logic [31:0] d;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = curf[mby + y][mbx + x];
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++)
      win[y][x] = frame[mby - SR + y][mbx - SR + x];
    full_search(cur, win, SR, lam, px, py, bc, bx, by, mc, bm);
    wr(1, 32'(CUR_AT + mby * STRIDE + mbx / 4));
    wr(2, 32'((mby - SR) * STRIDE + (mbx - SR) / 4));
    wr(3, STRIDE);
    wr(4, 32'(lam));
    wr(5, {16'd0, 8'(py), 8'(px)});
    wr(0, 32'h5);                                  // start, irq enabled
    repeat (20) @(negedge clk);
    wr(2, 32'(0));                                 // parameters are latched at start:
    wr(3, 32'(7));                                 // changing them now has no effect
    wr(4, 32'(200));
    wr(0, 32'h5);                                  // start while busy: ignored
    start_writes += 2;
    if (!irq) begin
      @(posedge irq);
      irqs++;
    end
    rd(0, d);
    checks++;
    if (d[1:0] != 2'b10) begin failures++; $display("FAIL status %0h", d); end
    for (int p = 0; p < NP; p++) begin
      rd(8'h40 + p, d);
      checks++;
      if (int'($signed(d[7:0])) != bx[p] || int'($signed(d[15:8])) != by[p]) begin
        failures++;
        $display("FAIL MB(%0d,%0d) part %0d mv (%0d,%0d) exp (%0d,%0d)", mbx, mby, p,
                 $signed(d[7:0]), $signed(d[15:8]), bx[p], by[p]);
      end
      rd(8'h80 + p, d);
      checks++;
      if (int'(d) != bc[p]) begin
        failures++;
        $display("FAIL MB(%0d,%0d) part %0d cost %0d exp %0d", mbx, mby, p, d, bc[p]);
      end
    end
    for (int m = 0; m < 7; m++) begin
      rd(8 + m, d);
      checks++;
      if (int'(d) != mc[m]) begin failures++; $display("FAIL mode %0d cost %0d/%0d", m, d, mc[m]); end
    end
    rd(6, d);
    checks++;
    if (int'(d) != bm) begin failures++; $display("FAIL best mode %0d/%0d", d, bm); end
    mode_seen[d[2:0]] = 1;
    $display("MB(%0d,%0d) lambda %0d: mode %0d, 16x16 vector (%0d,%0d)", mbx, mby, lam, d[2:0],
             bx[0], by[0]);
    wr(0, 32'h6);                                  // acknowledge
    checks++;
    if (irq) begin failures++; $display("FAIL irq not cleared"); end
  endtask

  initial begin
    int nmodes;
    s_address = 0; s_read = 0; s_write = 0; s_writedata = 0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noise frames: unrelated current and reference
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) begin
      frame[y][x] = $urandom % 256;
      curf[y][x]  = $urandom % 256;
    end
    load_frame();
    search(16, 16, 0, 0, 0);
    // smooth reference; the current frame is it moved by (-2,+3) with a little noise
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++)
      frame[y][x] = (x * 3 + y * 5 + ((x * y) % 7) * 9) % 256;
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++)
      curf[y][x] = (frame[(y + 3) % FH][(x + FW - 2) % FW] + $urandom % 3) % 256;
    load_frame();
    search(32, 16, 6, 0, 0);
    search(16, 16, 2, 1, -1);
    ignored = start_writes - starts;
    nmodes = 0;
    for (int m = 0; m < 7; m++) nmodes += int'(mode_seen[m]);
    $display("wait states %0d, fetch hold-offs %0d, engine starved %0d, irqs %0d, modes %0d",
             stalls, holdoffs, starved, irqs, nmodes);
    checks++;
    if (starts != 3 || ignored != 3) begin
      failures++;
      $display("FAIL %0d starts from %0d start writes", starts, start_writes);
    end
    if (stalls == 0 || starved == 0 || irqs == 0 || nmodes < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
