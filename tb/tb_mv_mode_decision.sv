// tb_mv_mode_decision: feeds sets of 41 partition SADs for a sequence of
// candidate vectors, with random lambda and predictor, and checks the best
// cost and vector of every partition, the per-mode totals and the chosen
// mode against a software model of J = SAD + lambda * R(d - p). Includes
// searches built so that ties occur, and lambda = 0.
module tb_mv_mode_decision;
  import sad_pkg::*;
  import tb_me_ref_pkg::*;

  logic                clk = 0, rst_n = 1;
  logic                clear, in_valid, finish, done;
  logic [LAMBDA_W-1:0] lambda;
  mv_t                 pred, in_mv;
  sad_t                sad [NPART];
  cost_t               best_cost [NPART];
  mv_t                 best_mv   [NPART];
  mcost_t              mode_cost [NMODE];
  mode_e               best_mode;
  int                  checks = 0, failures = 0;

  mv_mode_decision dut (.clk, .rst_n, .clear, .lambda, .pred, .in_valid, .in_mv, .sad,
                        .finish, .best_cost, .best_mv, .mode_cost, .best_mode, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ncand, input int lam, input int px, input int py, input bit ties);
    int ec [NPART], emx [NPART], emy [NPART], mc [7], bm, c, mx, my, r;
    @(negedge clk);
    lambda = 8'(lam);
    pred.x = mvc_t'(px);
    pred.y = mvc_t'(py);
    clear  = 1;
    @(negedge clk);
    clear = 0;
    for (int p = 0; p < NPART; p++) ec[p] = 32'h7fffffff;
    for (int n = 0; n < ncand; n++) begin
      mx = ties ? n % 2 : int'($urandom % 9) - 4;
      my = ties ? 1 - n % 2 : int'($urandom % 9) - 4;
      in_valid = 1;
      in_mv.x  = mvc_t'(mx);
      in_mv.y  = mvc_t'(my);
      r = rate(mx, my, px, py);
      for (int p = 0; p < NPART; p++) begin
        sad[p] = ties ? 16'(100 * p) : 16'($urandom % 65281);
        c = int'(sad[p]) + lam * r;
        if (c < ec[p]) begin ec[p] = c; emx[p] = mx; emy[p] = my; end
      end
      @(negedge clk);
    end
    in_valid = 0;
    for (int m = 0; m < 7; m++) mc[m] = 0;
    for (int p = 0; p < NPART; p++) mc[part_mode(p)] += ec[p];
    bm = 0;
    for (int m = 1; m < 7; m++) if (mc[m] < mc[bm]) bm = m;
    finish = 1;
    @(negedge clk);
    finish = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL done not one clock after finish"); end
    for (int p = 0; p < NPART; p++) begin
      checks++;
      if (int'(best_cost[p]) != ec[p] || int'(best_mv[p].x) != emx[p] || int'(best_mv[p].y) != emy[p]) begin
        failures++;
        $display("FAIL part %0d cost %0d/%0d mv (%0d,%0d)/(%0d,%0d)", p, best_cost[p], ec[p],
                 best_mv[p].x, best_mv[p].y, emx[p], emy[p]);
      end
    end
    for (int m = 0; m < 7; m++) begin
      checks++;
      if (int'(mode_cost[m]) != mc[m]) begin
        failures++;
        $display("FAIL mode %0d cost %0d/%0d", m, mode_cost[m], mc[m]);
      end
    end
    checks++;
    if (int'(best_mode) != bm) begin
      failures++;
      $display("FAIL best mode %0d exp %0d", best_mode, bm);
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; finish = 0; lambda = 0; pred = '0; in_mv = '0;
    for (int p = 0; p < NPART; p++) sad[p] = '0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(81, 0, 0, 0, 0);
    run(81, 255, 3, -2, 0);
    run(4, 4, 0, 0, 1);            // equal costs: first candidate must stay
    for (int k = 0; k < 40; k++)
      run(1 + int'($urandom % 81), int'($urandom % 256), int'($urandom % 17) - 8,
          int'($urandom % 17) - 8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
