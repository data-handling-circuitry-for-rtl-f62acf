// tb_flow_detect: drives write/read strobes with a software level model; underflow must be
// high exactly when the level is 0 and overflow exactly when it is at least 231 of 256
// (within 10% of full). Also checks clear.
`timescale 1ns/1ps
module tb_flow_detect;
  logic clk = 0, clear = 1, write = 0, read = 0;
  logic underflow, overflow;
  int   level;
  int checks = 0, failures = 0;
  int   saw_ovf = 0;

  flow_detect dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (level %0d)", what, level); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    clear = 0;
    level = 0;
    for (int k = 0; k < 4000; k++) begin
      int phase;
      phase = (k / 500) % 2;
      write = phase == 0 ? ($urandom_range(9) < 8) : ($urandom_range(9) < 2);
      read  = phase == 0 ? ($urandom_range(9) < 2) : ($urandom_range(9) < 8);
      @(negedge clk);
      // strobes act on the level before this cycle: no read from empty, no write to full
      level = level + ((write && level < 256) ? 1 : 0) - ((read && level > 0) ? 1 : 0);
      check(underflow == (level == 0), "underflow flag");
      check(overflow == (level >= 231), "overflow flag");
      if (overflow) saw_ovf++;
    end
    check(saw_ovf > 0, "overflow level reached");
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(underflow && !overflow, "clear empties the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
