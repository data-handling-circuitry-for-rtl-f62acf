// tb_huffman_decoder: the bit-serial Huffman decoder with its table bank.
//
// The literal stream uses the example code of eight symbols A..H (A = 0, B = 100,
// C..H = 1010..1111); the testbench first checks that its canonical construction gives the
// MIN/MAX table of that example (lengths 1..4: 0/1, 10/10, 100/101, 1010/10000). The
// offset and length streams use 3-bit/9-bit codes. Checks:
// 1. "ABAAACAADAAA" needs 20 code bits and decodes to those 12 literals.
// 2. A random mix of literals and offset/length pairs, with random input gaps, decodes to
//    the same tokens (match flag, literal or distance-1, run length).
// 3. Timing: with back-to-back bits each token is written exactly one cycle after the last
//    bit of its (literal or length) code.
`timescale 1ns/1ps
module tb_huffman_decoder;
  import mlx_tb_pkg::*;
  import mlx_pkg::*;

  logic        clk = 0, rst = 1;
  logic        bit_in = 0, bit_valid = 0;
  logic        load = 0;
  logic [3:0]  load_sel = 0;
  logic [15:0] load_data = 0;
  logic [3:0]  tab_addr;
  stream_e     tab_sel, sym_sel;
  logic [15:0] qmin, qmax, qbase;
  logic [7:0]  sym_addr, qsym;
  logic        tok_wr, tok_match, code_error;
  logic [7:0]  tok_lit_off;
  logic [8:0]  tok_run_len;

  huffman_tables u_tab (.*);
  huffman_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  token_t exp_t [$];
  int     exp_cyc [$];             // cycle of the last bit of each token (-1: not timed)
  bit     timed = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && code_error) begin failures++; $display("FAIL: code error"); end
    if (!rst && tok_wr) begin
      token_t e;
      int     c;
      e = exp_t.pop_front();
      c = exp_cyc.pop_front();
      checks++;
      if (tok_match !== e.match || tok_lit_off !== e.value ||
          (e.match && tok_run_len !== 9'(e.len))) begin
        failures++;
        $display("FAIL: token got %b %h %0d expected %b %h %0d", tok_match, tok_lit_off, tok_run_len,
                 e.match, e.value, e.len);
      end
      if (c >= 0) begin
        checks++;
        if (cyc != c + 1) begin
          failures++;
          $display("FAIL: token at cycle %0d, last bit at %0d", cyc, c);
        end
      end
    end
  end

  task automatic load_table(input int sel, input int unsigned words [], input int n);
    @(negedge clk);
    load = 1;
    load_sel = 4'(sel);
    for (int i = 0; i < n; i++) begin
      load_data = 16'(words[i]);
      @(negedge clk);
    end
    load = 0;
    @(negedge clk);
  endtask

  task automatic load_code(input int s, input canon_code c);
    int unsigned w [];
    w = new[256];
    for (int i = 0; i < 16; i++) w[i] = c.mincode[i];
    load_table(3*s + 0, w, 16);
    for (int i = 0; i < 16; i++) w[i] = c.maxcode[i];
    load_table(3*s + 1, w, 16);
    for (int i = 0; i < 16; i++) w[i] = c.base[i];
    load_table(3*s + 2, w, 16);
    for (int i = 0; i < 256; i++) w[i] = c.symtab[i];
    load_table(9 + s, w, 256);
  endtask

  // Send the bits of tokens; gaps = random idle cycles between bits.
  task automatic send(input token_t t [$], input canon_code lit, input canon_code off,
                      input canon_code len, input bit gaps);
    foreach (t[i]) begin
      bit b [$];
      token_t one [$];
      one = {t[i]};
      encode(one, lit, off, len, b);
      foreach (b[k]) begin
        @(negedge clk);
        while (gaps && $urandom_range(3) == 0) begin
          bit_valid = 0;
          bit_in = $urandom_range(1);
          @(negedge clk);
        end
        bit_valid = 1;
        bit_in = b[k];
        if (k == b.size() - 1) begin
          exp_t.push_back(t[i]);
          exp_cyc.push_back(gaps ? -1 : cyc);
        end
      end
    end
    @(negedge clk);
    bit_valid = 0;
  endtask

  canon_code lit, off, len;

  initial begin
    token_t t [$];
    string  s;
    int     nbits;

    lit = new(0, 0, 0, 0);
    foreach (lit.clen[i]) lit.clen[i] = 0;
    lit.clen["A"] = 1;
    lit.clen["B"] = 3;
    for (int c = "C"; c <= "H"; c++) lit.clen[c] = 4;
    lit.build();
    check(lit.mincode[0] == 0  && lit.maxcode[0] == 1,  "length 1 row 0 / 1");
    check(lit.mincode[1] == 2  && lit.maxcode[1] == 2,  "length 2 row 10 / 10");
    check(lit.mincode[2] == 4  && lit.maxcode[2] == 5,  "length 3 row 100 / 101");
    check(lit.mincode[3] == 10 && lit.maxcode[3] == 16, "length 4 row 1010 / 10000");
    off = new(8'd0, 8'd1, 8'd2, 8'd3);
    len = new(8'd255, 8'd3, 8'd4, 8'd5);

    repeat (2) @(negedge clk);
    rst = 0;
    load_code(0, lit);
    load_code(1, off);
    load_code(2, len);

    // 1. the example string, back to back (timed)
    s = "ABAAACAADAAA";
    nbits = 0;
    foreach (s[i]) begin
      t.push_back('{match: 1'b0, value: s[i], len: 0});
      nbits += lit.clen[s[i]];
    end
    check(nbits == 20, $sformatf("example needs %0d code bits", nbits));
    send(t, lit, off, len, 1'b0);

    // 2. random literals and matches, timed then with gaps
    for (int pass = 0; pass < 2; pass++) begin
      t = {};
      for (int i = 0; i < 300; i++) begin
        if ($urandom_range(1)) t.push_back('{match: 1'b0, value: 8'("A" + $urandom_range(7)), len: 0});
        else t.push_back('{match: 1'b1, value: 8'($urandom), len: $urandom_range(1, 256)});
      end
      send(t, lit, off, len, pass == 1);
    end
    repeat (5) @(negedge clk);
    check(exp_t.size() == 0, $sformatf("%0d tokens never came out", exp_t.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
