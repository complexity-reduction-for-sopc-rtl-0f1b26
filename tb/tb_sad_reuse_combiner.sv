// tb_sad_reuse_combiner: random SAD4x4 sets (including all-maximum) are
// combined; each of the 41 outputs must equal the sum of the 4x4 terms
// lying inside that partition's pixel rectangle, one clock after the input,
// and the vector must travel with it.
module tb_sad_reuse_combiner;
  import sad_pkg::*;
  import tb_me_ref_pkg::*;

  logic   clk = 0, rst_n = 1;
  logic   in_valid, out_valid;
  mv_t    in_mv, out_mv;
  sad4_t  sad4 [NBLK];
  sad_t   sad  [NPART];
  int     checks = 0, failures = 0;
  int     exp [NPART];
  mv_t    exp_mv;

  sad_reuse_combiner dut (.clk, .rst_n, .in_valid, .in_mv, .sad4, .out_valid, .out_mv, .sad);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, y0, x0, h, w;
    in_valid = 0; in_mv = '0;
    for (int b = 0; b < 16; b++) sad4[b] = '0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_mv    = mv_t'($urandom);
      for (int b = 0; b < 16; b++) sad4[b] = (n == 0) ? 12'd4080 : 12'($urandom % 4081);
      for (int p = 0; p < NPART; p++) begin
        part_geom(p, m, y0, x0, h, w);
        exp[p] = 0;
        for (int bi = y0 / 4; bi < (y0 + h) / 4; bi++)
          for (int bj = x0 / 4; bj < (x0 + w) / 4; bj++)
            exp[p] += int'(sad4[4 * bi + bj]);
      end
      exp_mv = in_mv;
      @(negedge clk);
      in_valid = 0;
      for (int b = 0; b < 16; b++) sad4[b] = 12'($urandom);   // must not leak
      checks++;
      if (!out_valid || out_mv != exp_mv) begin
        failures++;
        $display("FAIL valid/mv n=%0d", n);
      end
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (int'(sad[p]) != exp[p]) begin
          failures++;
          $display("FAIL n=%0d part %0d sad=%0d exp=%0d", n, p, sad[p], exp[p]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
