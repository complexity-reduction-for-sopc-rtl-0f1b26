// tb_mem_fetch_ctrl: the fetch controller reads a macroblock and its search
// window from a memory model with random wait states and latencies into two
// shallow FIFOs that are drained at random. Checks that every word reaches
// the right FIFO in order, from the right address, that no FIFO ever
// overflows (assertion in the design), that `done` comes once, and that
// memory stalls and full-FIFO hold-offs both happened.
module tb_mem_fetch_ctrl;
  localparam int ADDR_W = 24, DEPTH = 4, STRIDE = 40;
  localparam int CUR_ROWS = 16, CUR_WORDS = 4, WIN_ROWS = 24, WIN_WORDS = 6;

  logic              clk = 0, rst_n = 1;
  logic              start, busy, done;
  logic [ADDR_W-1:0] cur_base, ref_base, stride;
  logic [ADDR_W-1:0] m_address;
  logic              m_read, m_waitrequest, m_readdatavalid;
  logic [31:0]       m_readdata;
  logic              cur_wr_valid, cur_wr_ready, ref_wr_valid, ref_wr_ready;
  logic [31:0]       cur_wr_data, ref_wr_data, cur_rd_data, ref_rd_data;
  logic              cur_rd_valid, cur_rd_ready, ref_rd_valid, ref_rd_ready;
  logic [2:0]        cur_count, ref_count;
  int                stalls, reads;
  int                checks = 0, failures = 0, dones = 0, holdoffs = 0;
  int                ncur, nref;

  mem_fetch_ctrl #(.ADDR_W(ADDR_W), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .cur_base, .ref_base, .stride, .busy, .done,
    .m_address, .m_read, .m_waitrequest, .m_readdata, .m_readdatavalid,
    .cur_wr_valid, .cur_wr_ready, .cur_wr_data, .cur_count,
    .ref_wr_valid, .ref_wr_ready, .ref_wr_data, .ref_count);

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_cf (.clk, .rst_n,
    .wr_valid(cur_wr_valid), .wr_ready(cur_wr_ready), .wr_data(cur_wr_data),
    .rd_valid(cur_rd_valid), .rd_ready(cur_rd_ready), .rd_data(cur_rd_data), .count(cur_count));
  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_rf (.clk, .rst_n,
    .wr_valid(ref_wr_valid), .wr_ready(ref_wr_ready), .wr_data(ref_wr_data),
    .rd_valid(ref_rd_valid), .rd_ready(ref_rd_ready), .rd_data(ref_rd_data), .count(ref_count));

  tb_sdram_model #(.ADDR_W(ADDR_W), .WORDS(4096)) u_mem (.clk, .address(m_address), .read(m_read),
    .waitrequest(m_waitrequest), .readdata(m_readdata), .readdatavalid(m_readdatavalid),
    .stalls, .reads);

  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(input int a);
    return 32'(a) * 32'h9e3779b1 ^ 32'h5a5a0000;
  endfunction

  always @(posedge clk) begin
    if (!m_read && (dut.state == 1 || dut.state == 2)) holdoffs++;
    if (rst_n && done) dones++;
  end

  // drain the FIFOs at random and check the order
  always @(posedge clk) begin
    int r, w, exp;
    if (rst_n) begin
      if (cur_rd_valid && cur_rd_ready) begin
        r = ncur / CUR_WORDS; w = ncur % CUR_WORDS;
        exp = int'(word_at(int'(cur_base) + r * STRIDE + w));
        checks++;
        if (cur_rd_data != 32'(exp)) begin failures++; $display("FAIL cur word %0d got %h exp %h base %0d", ncur, cur_rd_data, exp, cur_base); end
        ncur++;
      end
      if (ref_rd_valid && ref_rd_ready) begin
        r = nref / WIN_WORDS; w = nref % WIN_WORDS;
        exp = int'(word_at(int'(ref_base) + r * STRIDE + w));
        checks++;
        if (ref_rd_data != 32'(exp)) begin failures++; $display("FAIL ref word %0d", nref); end
        nref++;
      end
    end
  end

  always @(negedge clk) begin
    cur_rd_ready <= ($urandom % 100) < 40;
    ref_rd_ready <= ($urandom % 100) < 40;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) u_mem.mem[a] = word_at(a);
    start = 0; cur_base = 0; ref_base = 0; stride = STRIDE;
    cur_rd_ready = 0; ref_rd_ready = 0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      ncur = 0; nref = 0;
      cur_base = ADDR_W'(STRIDE * 5 + 3 + t * 8);
      ref_base = ADDR_W'(STRIDE * 1 + 2 + t * 8);
      start = 1;
      @(negedge clk);
      start = 0;
      wait (dones == t + 1);
      repeat (30) @(negedge clk);
      checks++;
      if (ncur != CUR_ROWS * CUR_WORDS || nref != WIN_ROWS * WIN_WORDS || busy) begin
        failures++;
        $display("FAIL run %0d: %0d cur, %0d ref words, busy %0d", t, ncur, nref, busy);
      end
    end
    checks++;
    if (dones != 3 || stalls == 0 || holdoffs == 0) begin
      failures++;
      $display("FAIL dones=%0d stalls=%0d holdoffs=%0d", dones, stalls, holdoffs);
    end
    $display("memory stalls %0d, credit hold-offs %0d", stalls, holdoffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
