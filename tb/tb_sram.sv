// tb_sram: checks the synchronous single-port RAM at both sizes used for the Huffman
// memories (16 x 16 and 256 x 8): random writes, then reads compared with a shadow array,
// one-cycle read latency, read-during-write returning the old word, and en = 0 holding
// rdata.
`timescale 1ns/1ps
module tb_sram;
  logic        clk = 0;
  logic        en16 = 0, we16 = 0, en8 = 0, we8 = 0;
  logic [3:0]  a16 = 0;
  logic [7:0]  a8 = 0;
  logic [15:0] d16 = 0, q16;
  logic [7:0]  d8 = 0, q8;
  logic [15:0] sh16 [16];
  logic [7:0]  sh8 [256];
  int checks = 0, failures = 0;

  sram #(.DEPTH(16),  .WIDTH(16)) u16 (.clk, .en(en16), .we(we16), .addr(a16), .wdata(d16), .rdata(q16));
  sram #(.DEPTH(256), .WIDTH(8))  u8  (.clk, .en(en8),  .we(we8),  .addr(a8),  .wdata(d8),  .rdata(q8));

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
    for (int i = 0; i < 16; i++) begin
      en16 = 1; we16 = 1; a16 = 4'(i); d16 = 16'($urandom); sh16[i] = d16;
      @(negedge clk);
    end
    for (int i = 0; i < 256; i++) begin
      en8 = 1; we8 = 1; a8 = 8'(i); d8 = 8'($urandom); sh8[i] = d8;
      @(negedge clk);
    end
    we16 = 0; we8 = 0;
    for (int k = 0; k < 300; k++) begin
      int i16, i8;
      i16 = $urandom_range(15); i8 = $urandom_range(255);
      a16 = 4'(i16); a8 = 8'(i8);
      @(negedge clk);
      check(q16 == sh16[i16], $sformatf("16x16 read %0d", i16));
      check(q8 == sh8[i8], $sformatf("256x8 read %0d", i8));
    end
    // read during write returns the old word, the new one is read next time
    a16 = 4'd5; we16 = 1; d16 = ~sh16[5];
    @(negedge clk);
    check(q16 == sh16[5], "read-during-write gives old data");
    sh16[5] = d16; we16 = 0;
    @(negedge clk);
    check(q16 == sh16[5], "written word read back");
    // disabled port holds its output and ignores writes
    en16 = 0; we16 = 1; a16 = 4'd6; d16 = 16'hdead;
    @(negedge clk);
    check(q16 == sh16[5], "en=0 holds rdata");
    en16 = 1; we16 = 0;
    @(negedge clk);
    check(q16 == sh16[6], "en=0 blocks write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
