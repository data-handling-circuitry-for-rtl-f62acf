// tb_count10: the 10-bit address counter against a software count under random increment
// (stall) and clear patterns, including the wrap from 1023 to 0 and clear beating inc.
`timescale 1ns/1ps
module tb_count10;
  logic       clk = 0, rst = 1, clr = 0, inc = 0;
  logic [9:0] count;
  int         model;
  int checks = 0, failures = 0;

  count10 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    model = 0;
    for (int k = 0; k < 3000; k++) begin
      clr = ($urandom_range(999) == 0);
      inc = (k < 1500) ? 1'b1 : ($urandom_range(3) != 0);
      @(negedge clk);
      if (clr) model = 0;
      else if (inc) model = (model + 1) % 1024;
      checks++;
      if (count != 10'(model)) begin
        failures++;
        $display("FAIL: step %0d count=%0d model=%0d", k, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
