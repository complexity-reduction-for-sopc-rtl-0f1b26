// tb_sad_1x4: checks the 4-sample row SAD against |c-r| summed in
// software, for corner cases and random samples.
module tb_sad_1x4;
  import sad_pkg::*;

  pix_t        cur [4];
  pix_t        ref_px [4];
  logic [9:0]  sad;
  int          checks = 0, failures = 0;

  sad_1x4 dut (.cur, .ref_px, .sad);

  task automatic check_one();
    int exp;
    exp = 0;
    for (int k = 0; k < 4; k++)
      exp += (cur[k] > ref_px[k]) ? int'(cur[k]) - int'(ref_px[k]) : int'(ref_px[k]) - int'(cur[k]);
    #1;
    checks++;
    if (int'(sad) != exp) begin
      failures++;
      $display("FAIL sad=%0d exp=%0d", sad, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin cur[k] = 8'hff; ref_px[k] = 8'h00; end
    check_one();                                   // maximum 1020
    for (int k = 0; k < 4; k++) begin cur[k] = 8'h00; ref_px[k] = 8'hff; end
    check_one();
    for (int k = 0; k < 4; k++) begin cur[k] = 8'(k * 50); ref_px[k] = 8'(k * 50); end
    check_one();                                   // zero
    repeat (2000) begin
      for (int k = 0; k < 4; k++) begin cur[k] = 8'($urandom); ref_px[k] = 8'($urandom); end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
