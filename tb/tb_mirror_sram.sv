// tb_mirror_sram: fills the 1024 x 8 mirror memory through its write port, reads every
// column back through the read port (one-cycle latency) and compares with a shadow copy;
// then checks that a write does not disturb a simultaneous read of another column.
`timescale 1ns/1ps
module tb_mirror_sram;
  logic       clk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] sh [1024];
  int checks = 0, failures = 0;

  mirror_sram dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = 10'(i); wdata = 8'($urandom); sh[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(1023 - i);
      @(negedge clk);
      check(rdata == sh[1023 - i], $sformatf("column %0d", 1023 - i));
    end
    we = 1; waddr = 10'd17; wdata = ~sh[17]; raddr = 10'd18;
    @(negedge clk);
    check(rdata == sh[18], "read of another column during a write");
    sh[17] = wdata; we = 0; raddr = 10'd17;
    @(negedge clk);
    check(rdata == sh[17], "new word at column 17");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
