// tb_smem_array: the 128-cell systolic LZ array.
// 1. The decoding example "ABCDEFG<3,2><4,2>ABC" must give "ABCDEFGEFFGABC".
// 2. A long byte string compressed in software (window 256, copies up to 256 long, many
//    overlapping) is fed token by token with random stalls; the bytes leaving the array
//    must equal the original string.
// 3. Latency: a token is on fdata_out after exactly 128 advances, counting the one that
//    took it in, so the first 127 outputs after reset are the cleared registers.
`timescale 1ns/1ps
module tb_smem_array;
  import mlx_tb_pkg::*;
  localparam int CELLS = 128;

  logic       clk = 0, rst = 1, adv = 0, copy_in = 0, out_valid;
  logic [7:0] fdata_in = 0, fdata_out;
  bit   [7:0] got [$], exp_b [$], src [$];
  token_t     toks [$];
  int checks = 0, failures = 0;
  int nadv = 0;

  smem_array dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) got.push_back(fdata_out);

  // Expand the tokens one array input per cycle (adv) with random stalls.
  task automatic feed(input token_t t [$]);
    foreach (t[i]) begin
      int reps;
      reps = t[i].match ? t[i].len : 1;
      for (int k = 0; k < reps; k++) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) begin
          adv = 0;
          fdata_in = 8'($urandom);
          copy_in = 1'($urandom);
          @(negedge clk);
        end
        adv = 1;
        fdata_in = t[i].value;
        copy_in = t[i].match;
        nadv++;
      end
    end
    @(negedge clk);
    adv = 0;
  endtask

  task automatic flush();
    token_t z [$];
    for (int i = 0; i < CELLS; i++) z.push_back('{match: 1'b0, value: 8'h00, len: 0});
    feed(z);
  endtask

  initial begin
    token_t ex [$];
    string  s;
    repeat (2) @(negedge clk);
    rst = 0;

    // 1. the worked example
    s = "ABCDEFG";
    foreach (s[i]) ex.push_back('{match: 1'b0, value: s[i], len: 0});
    ex.push_back('{match: 1'b1, value: 8'd2, len: 2});   // <3,2>
    ex.push_back('{match: 1'b1, value: 8'd3, len: 2});   // <4,2>
    s = "ABC";
    foreach (s[i]) ex.push_back('{match: 1'b0, value: s[i], len: 0});
    feed(ex);
    flush();
    @(negedge clk);
    check(got.size() == 14 + CELLS, $sformatf("output count %0d", got.size()));
    for (int i = 0; i < CELLS - 1; i++) check(got[i] == 0, "reset contents lead the output (latency 128)");
    s = "ABCDEFGEFFGABC";
    for (int i = 0; i < 14; i++) check(got[CELLS - 1 + i] == s[i], $sformatf("example byte %0d", i));

    // 2. random compressed string
    rst = 1;
    got = {};
    @(negedge clk);
    rst = 0;
    make_payload(3000, 5, src);
    lz_compress(src, 2*CELLS, toks);
    feed(toks);
    flush();
    @(negedge clk);
    check(got.size() == src.size() + CELLS, "one output per advance");
    for (int i = 0; i < src.size(); i++)
      check(got[CELLS - 1 + i] == src[i], $sformatf("byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
