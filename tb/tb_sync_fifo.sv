// tb_sync_fifo: the 256-entry FIFO against a queue model with random simultaneous reads and
// writes, runs to full and to empty, and dropped writes when full / reads when empty.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic       clk = 0, rst = 1, wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic       full, empty;
  logic [7:0] q [$];
  int checks = 0, failures = 0;

  sync_fifo #(.DEPTH(256), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 6000; k++) begin
      int phase;
      phase = (k / 1000) % 3;               // 0: fill-biased, 1: drain-biased, 2: balanced
      wr    = (phase == 0) ? ($urandom_range(9) < 8) : (phase == 1) ? ($urandom_range(9) < 2) : $urandom_range(1);
      rd    = (phase == 0) ? ($urandom_range(9) < 2) : (phase == 1) ? ($urandom_range(9) < 8) : $urandom_range(1);
      wdata = 8'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 256), "full flag");
      if (q.size() > 0) check(rdata == q[0], "head word");
      @(posedge clk);
      if (rd && q.size() > 0) void'(q.pop_front());
      if (wr && q.size() < 256 + (rd ? 1 : 0) && !(full)) q.push_back(wdata);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
