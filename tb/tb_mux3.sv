// tb_mux3: random inputs through both widths (16 and 8 bits); select 0, 1, 2 pick the
// corresponding input and the unused code 3 falls back to input 0.
`timescale 1ns/1ps
module tb_mux3;
  logic [15:0] a, b, c, y16;
  logic [7:0]  d, e, f, y8;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  mux3 #(.WIDTH(16)) u16 (.in0(a), .in1(b), .in2(c), .sel, .y(y16));
  mux3 #(.WIDTH(8))  u8  (.in0(d), .in1(e), .in2(f), .sel, .y(y8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      logic [15:0] exp16;
      logic [7:0]  exp8;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      d = 8'($urandom);  e = 8'($urandom);  f = 8'($urandom);
      sel = 2'(k % 4);
      #1;
      exp16 = (sel == 1) ? b : (sel == 2) ? c : a;
      exp8  = (sel == 1) ? e : (sel == 2) ? f : d;
      checks += 2;
      if (y16 !== exp16) begin failures++; $display("FAIL: 16-bit sel=%0d", sel); end
      if (y8 !== exp8)   begin failures++; $display("FAIL: 8-bit sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
