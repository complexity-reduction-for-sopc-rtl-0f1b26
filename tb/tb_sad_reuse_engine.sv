// tb_sad_reuse_engine: full motion search of several macroblocks. The
// current block and the search window are streamed in with random gaps on
// both streams; afterwards every partition's best vector and cost, each
// mode's total and the chosen mode are compared with a pixel-level software
// full search. Pictures: pure noise, a window that contains the current
// block shifted by a known vector plus noise, and a flat picture (all
// candidates tie). The search must take exactly 16 clocks per candidate:
// from the last accepted word to `done` is 16*(2SR+1)^2 + 7 clocks.
module tb_sad_reuse_engine;
  import sad_pkg::*;
  import tb_me_ref_pkg::*;

  localparam int SR  = 4;
  localparam int WIN = 16 + 2 * SR;
  localparam int LAT = 16 * (2 * SR + 1) * (2 * SR + 1) + 7;

  logic                clk = 0, rst_n = 1;
  logic                start, busy, done;
  logic [LAMBDA_W-1:0] lambda;
  mv_t                 pred;
  logic                cur_valid, cur_ready, ref_valid, ref_ready;
  logic [31:0]         cur_data, ref_data;
  cost_t               best_cost [NPART];
  mv_t                 best_mv   [NPART];
  mcost_t              mode_cost [NMODE];
  mode_e               best_mode;
  int                  checks = 0, failures = 0;
  pic_t                cur, win;
  longint              cyc = 0, last_load = 0, done_at = 0;
  int                  ndone = 0;

  sad_reuse_engine #(.SR(SR)) dut (.clk, .rst_n, .start, .lambda, .pred,
    .cur_valid, .cur_ready, .cur_data, .ref_valid, .ref_ready, .ref_data,
    .busy, .done, .best_cost, .best_mv, .mode_cost, .best_mode);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if ((cur_valid && cur_ready) || (ref_valid && ref_ready)) last_load = cyc;
    if (done) begin done_at = cyc; ndone++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed_cur();
    for (int n = 0; n < 64; n++) begin
      while (($urandom % 3) == 0) @(negedge clk);
      cur_valid = 1;
      for (int k = 0; k < 4; k++) cur_data[8*k +: 8] = 8'(cur[n / 4][(n % 4) * 4 + k]);
      #1;
      while (!cur_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      cur_valid = 0;
    end
  endtask

  task automatic feed_ref();
    for (int n = 0; n < WIN * WIN / 4; n++) begin
      while (($urandom % 4) == 0) @(negedge clk);
      ref_valid = 1;
      for (int k = 0; k < 4; k++)
        ref_data[8*k +: 8] = 8'(win[n / (WIN / 4)][(n % (WIN / 4)) * 4 + k]);
      #1;
      while (!ref_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      ref_valid = 0;
    end
  endtask

  task automatic run(input int lam, input int px, input int py, input string name);
    int bc [NP], bx [NP], by [NP], mc [7], bm;
    full_search(cur, win, SR, lam, px, py, bc, bx, by, mc, bm);
    @(negedge clk);
    lambda = 8'(lam);
    pred.x = mvc_t'(px);
    pred.y = mvc_t'(py);
    start  = 1;
    @(negedge clk);
    start = 0;
    fork
      feed_cur();
      feed_ref();
    join
    while (!(done_at > last_load)) @(negedge clk);
    @(negedge clk);
    checks++;
    if (done_at - last_load != LAT || busy) begin
      failures++;
      $display("FAIL %s: %0d clocks from last word to done, expected %0d", name,
               done_at - last_load, LAT);
    end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (int'(best_cost[p]) != bc[p] || int'(best_mv[p].x) != bx[p] || int'(best_mv[p].y) != by[p]) begin
        failures++;
        $display("FAIL %s part %0d: cost %0d/%0d mv (%0d,%0d)/(%0d,%0d)", name, p, best_cost[p],
                 bc[p], best_mv[p].x, best_mv[p].y, bx[p], by[p]);
      end
    end
    for (int m = 0; m < 7; m++) begin
      checks++;
      if (int'(mode_cost[m]) != mc[m]) begin failures++; $display("FAIL %s mode %0d cost", name, m); end
    end
    checks++;
    if (int'(best_mode) != bm) begin failures++; $display("FAIL %s best mode %0d/%0d", name, best_mode, bm); end
    $display("%s: mode %0d, 16x16 vector (%0d,%0d) cost %0d", name, best_mode, int'(best_mv[0].x),
             int'(best_mv[0].y), best_cost[0]);
  endtask

  initial begin
    int sx, sy;
    start = 0; lambda = 0; pred = '0; cur_valid = 0; ref_valid = 0; cur_data = 0; ref_data = 0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: noise
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) win[y][x] = $urandom % 256;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = $urandom % 256;
    run(0, 0, 0, "noise");
    // 2: known motion (+3,-2) with small noise
    sx = 3; sy = -2;
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) win[y][x] = $urandom % 256;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      cur[y][x] = (win[y + SR + sy][x + SR + sx] + $urandom % 3) % 256;
    run(4, 1, 0, "shift");
    checks++;
    if (best_mv[0].x != 3 || best_mv[0].y != -2) begin failures++; $display("FAIL shift not found"); end
    // 3: flat picture, every candidate has SAD 0: the predictor wins
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) win[y][x] = 77;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = 77;
    run(10, -1, 2, "flat");
    // 4: extreme samples, large lambda and predictor outside the range
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) win[y][x] = ($urandom % 2) ? 255 : 0;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = ($urandom % 2) ? 255 : 0;
    run(255, -100, 90, "extreme");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
