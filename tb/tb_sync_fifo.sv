// tb_sync_fifo: random writes and reads against a queue model; checks
// data order, the full/empty handshakes and `count` every cycle. Phases
// with writes favoured fill the FIFO, phases with reads favoured drain it.
module tb_sync_fifo;
  localparam int DEPTH = 8;

  logic        clk = 0, rst_n = 1;
  logic        wr_valid, wr_ready, rd_valid, rd_ready;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  count;
  logic [31:0] model [$];
  bit          do_rd, do_wr;
  int          checks = 0, failures = 0, fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data,
                                              .rd_valid, .rd_ready, .rd_data, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    #1 rst_n = 0;                       // power-on reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // state checks
      checks++;
      if (int'(count) != model.size() || wr_ready != (model.size() < DEPTH) ||
          rd_valid != (model.size() > 0) || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL n=%0d count=%0d model=%0d", n, count, model.size());
      end
      if (model.size() == DEPTH) fulls++;
      if (model.size() == 0) empties++;
      wr_valid = ($urandom % 100) < (((n / 500) % 2) ? 30 : 80);
      rd_ready = ($urandom % 100) < (((n / 500) % 2) ? 80 : 30);
      wr_data  = $urandom;
      #1;
      do_rd = rd_valid && rd_ready;
      do_wr = wr_valid && wr_ready;
      @(posedge clk);
      if (do_rd) void'(model.pop_front());
      if (do_wr) model.push_back(wr_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL full or empty never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
