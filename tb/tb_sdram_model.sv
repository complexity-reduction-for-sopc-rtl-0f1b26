// tb_sdram_model: behavioural model of the external frame memory (SDRAM
// behind its controller) as seen through a pipelined read port. Not
// synthesizable; testbench use only.
//
// Word array `mem` (filled by the testbench). A read is accepted when
// `read` is high and `waitrequest` low; `waitrequest` is raised at random
// on STALL_PCT percent of cycles. Each accepted read returns its word in
// order, between MIN_LAT and MAX_LAT clocks later, with `readdatavalid`.
// `stalls` counts the cycles a read was held off by `waitrequest`.
module tb_sdram_model #(
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned STALL_PCT = 25,
  parameter int unsigned MIN_LAT   = 2,
  parameter int unsigned MAX_LAT   = 6
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] address,
  input  logic              read,
  output logic              waitrequest,
  output logic [31:0]       readdata,
  output logic              readdatavalid,
  output int                stalls,
  output int                reads
);

  logic [31:0] mem [WORDS];
  logic [31:0] q_data [$];
  longint      q_due  [$];
  longint      cyc = 0, last_due = 0;

  initial begin
    waitrequest   = 1'b0;
    readdatavalid = 1'b0;
    readdata      = '0;
    stalls        = 0;
    reads         = 0;
  end

  always @(posedge clk) begin
    longint due;
    cyc++;
    if (read && waitrequest) stalls++;
    if (read && !waitrequest) begin
      reads++;
      due = cyc + MIN_LAT + ($urandom % (MAX_LAT - MIN_LAT + 1));
      if (due <= last_due) due = last_due + 1;
      last_due = due;
      q_data.push_back(mem[int'(address) % WORDS]);
      q_due.push_back(due);
    end
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      readdata      <= q_data.pop_front();
      void'(q_due.pop_front());
      readdatavalid <= 1'b1;
    end else begin
      readdatavalid <= 1'b0;
    end
    waitrequest <= (($urandom % 100) < STALL_PCT);
  end

endmodule
