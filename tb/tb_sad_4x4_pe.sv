// tb_sad_4x4_pe: drives one random 4x4 block pair per clock, some clocks
// idle, and checks that each SAD4x4 and its tag come out exactly one clock
// later, matching a software sum over the 16 samples.
module tb_sad_4x4_pe;
  import sad_pkg::*;

  logic        clk = 0, rst_n = 1;
  logic        in_valid;
  logic [7:0]  in_tag;
  pix_t        cur [4][4];
  pix_t        ref_px [4][4];
  logic        out_valid;
  logic [7:0]  out_tag;
  sad4_t       sad4;
  int          checks = 0, failures = 0;
  int          exp_sad, exp_tag;
  bit          exp_valid;

  sad_4x4_pe #(.TAG_W(8)) dut (.clk, .rst_n, .in_valid, .in_tag, .cur, .ref_px,
                               .out_valid, .out_tag, .sad4);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin cur[r][c] = 0; ref_px[r][c] = 0; end
    exp_valid = 0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what the previous edge produced
      checks++;
      if (out_valid !== exp_valid || (exp_valid && (int'(sad4) != exp_sad || int'(out_tag) != exp_tag))) begin
        failures++;
        $display("FAIL n=%0d valid=%0d/%0d sad=%0d/%0d tag=%0d/%0d", n, out_valid, exp_valid,
                 sad4, exp_sad, out_tag, exp_tag);
      end
      in_valid = (n < 2) ? 1'b1 : (($urandom % 4) != 0);
      in_tag   = 8'($urandom);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        cur[r][c]    = (n == 0) ? 8'hff : 8'($urandom);
        ref_px[r][c] = (n == 0) ? 8'h00 : 8'($urandom);
      end
      exp_valid = in_valid;
      if (in_valid) begin
        exp_tag = in_tag;
        exp_sad = 0;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          exp_sad += (cur[r][c] > ref_px[r][c]) ? cur[r][c] - ref_px[r][c] : ref_px[r][c] - cur[r][c];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
