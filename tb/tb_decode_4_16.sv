// tb_decode_4_16: all 16 select codes with enable high give exactly that one output bit;
// with enable low every output is 0.
`timescale 1ns/1ps
module tb_decode_4_16;
  logic        en;
  logic [3:0]  sel;
  logic [15:0] y;
  int checks = 0, failures = 0;

  decode_4_16 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 16; s++) begin
        en = e[0]; sel = 4'(s);
        #1;
        checks++;
        if (y !== (e ? (16'd1 << s) : 16'd0)) begin
          failures++;
          $display("FAIL: en=%0d sel=%0d y=%h", e, s, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
