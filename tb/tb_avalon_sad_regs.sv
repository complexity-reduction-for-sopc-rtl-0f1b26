// tb_avalon_sad_regs: Avalon-MM register file. Writes and reads back the
// parameter registers, checks the one-clock start pulse (and that a start
// while busy is ignored), the done flag, interrupt enable and clear, the
// one-clock read latency, and reads of every mode cost and partition
// result through the address map.
module tb_avalon_sad_regs;
  import sad_pkg::*;

  logic                clk = 0, rst_n = 1;
  logic [7:0]          s_address;
  logic                s_read, s_write, s_readdatavalid, irq;
  logic [31:0]         s_writedata, s_readdata;
  logic                start, busy, done;
  logic [23:0]         cur_base, ref_base, stride;
  logic [LAMBDA_W-1:0] lambda;
  mv_t                 pred;
  cost_t               best_cost [NPART];
  mv_t                 best_mv   [NPART];
  mcost_t              mode_cost [NMODE];
  mode_e               best_mode;
  int                  checks = 0, failures = 0, starts = 0;

  avalon_sad_regs dut (.clk, .rst_n, .s_address, .s_read, .s_write, .s_writedata, .s_readdata,
    .s_readdatavalid, .irq, .start, .cur_base, .ref_base, .stride, .lambda, .pred,
    .busy, .done, .best_cost, .best_mv, .mode_cost, .best_mode);

  always #5 clk = ~clk;
  always @(negedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic expect_rd(input int a, input logic [31:0] exp, input string what);
    @(negedge clk);
    s_address = 8'(a); s_read = 1;
    @(negedge clk);
    s_read = 0;
    s_address = 8'($urandom);   // must not matter after the request
    checks++;
    if (!s_readdatavalid || s_readdata != exp) begin
      failures++;
      $display("FAIL read %s @%0h: %0h valid %0d, expected %0h", what, a, s_readdata,
               s_readdatavalid, exp);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    s_address = 0; s_read = 0; s_write = 0; s_writedata = 0; busy = 0; done = 0;
    best_mode = MODE_8X8;
    for (int p = 0; p < NPART; p++) begin
      best_cost[p] = cost_t'(1000 + 37 * p);
      best_mv[p].x = mvc_t'(p - 20);
      best_mv[p].y = mvc_t'(7 - p);
    end
    for (int m = 0; m < NMODE; m++) mode_cost[m] = mcost_t'(50000 + 1111 * m);
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(1, 32'h00_1234);  wr(2, 32'h00_0abc);  wr(3, 32'd120);
    wr(4, 32'h1_05);     wr(5, 32'h0000_fd04);
    check(cur_base == 24'h1234 && ref_base == 24'habc && stride == 24'd120, "base/stride");
    check(lambda == 8'h05 && pred.x == 4 && pred.y == -3, "lambda/pred");
    expect_rd(1, 32'h1234, "cur_base");
    expect_rd(3, 32'd120, "stride");
    expect_rd(5, 32'hfd04, "pred");
    // start pulse
    wr(0, 32'h5);                       // start + irq enable
    busy = 1;
    repeat (2) @(negedge clk);
    check(starts == 1, "start pulse lasts one clock");
    wr(0, 32'h5);                       // ignored while busy
    repeat (2) @(negedge clk);
    check(starts == 1, "start ignored while busy");
    expect_rd(0, 32'h5, "status busy, irq enabled");
    @(negedge clk); done = 1; @(negedge clk); done = 0; busy = 0;
    check(irq, "irq after done");
    expect_rd(0, 32'h6, "status done");
    expect_rd(6, 32'(MODE_8X8), "best mode");
    for (int m = 0; m < NMODE; m++) expect_rd(8 + m, 32'(50000 + 1111 * m), "mode cost");
    for (int p = 0; p < NPART; p++) begin
      expect_rd(8'h40 + p, {16'd0, 8'(7 - p), 8'(p - 20)}, "partition mv");
      expect_rd(8'h80 + p, 32'(1000 + 37 * p), "partition cost");
    end
    expect_rd(8'h3f, 0, "unmapped");
    wr(0, 32'h6);                       // clear done, keep irq enabled
    check(!irq, "irq cleared");
    expect_rd(0, 32'h4, "status cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
