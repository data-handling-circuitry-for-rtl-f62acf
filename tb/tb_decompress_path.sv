// tb_decompress_path: end-to-end test of one decompression row.
//
// Loads canonical Huffman tables, compresses two framed payloads in software (LZ77 with the
// array's 256-byte window, then Huffman), feeds the bits one per cycle with random gaps and
// honours the overflow flag. Checks: the first frame is found, its CRC passes and all 1024
// bytes read back from the mirror memory equal the payload; the second frame carries a
// corrupted CRC byte, which must be flagged, and its payload must also be in memory.
`timescale 1ns/1ps
module tb_decompress_path;
  import mlx_tb_pkg::*;

  localparam int CELLS = 128;
  localparam int FRAME = 1024;

  logic        clk = 0, rst = 1;
  logic        bit_in = 0, bit_valid = 0;
  logic        load = 0;
  logic [3:0]  load_sel = 0;
  logic [15:0] load_data = 0;
  logic [9:0]  mirror_raddr = 0;
  logic [7:0]  mirror_rdata;
  logic        overflow, sync_found, frame_done, crc_error, code_error;

  int checks = 0, failures = 0;
  int syncs = 0, dones = 0;

  decompress_path dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (sync_found) syncs++;
    if (frame_done) dones++;
    if (code_error) begin
      failures++;
      $display("FAIL: code error");
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

  task automatic send_bits(ref bit bits [$]);
    int i;
    i = 0;
    while (i < bits.size()) begin
      @(negedge clk);
      if (overflow || ($urandom_range(9) == 0)) begin
        bit_valid = 0;
        bit_in    = $urandom_range(1);
      end else begin
        bit_valid = 1;
        bit_in    = bits[i];
        i++;
      end
    end
    @(negedge clk);
    bit_valid = 0;
  endtask

  task automatic check_memory(ref bit [7:0] payload [$], input string tag);
    int bad;
    bad = 0;
    for (int a = 0; a < FRAME; a++) begin
      @(negedge clk);
      mirror_raddr = 10'(a);
      @(posedge clk);
      #1;
      if (mirror_rdata !== payload[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d mirror bytes differ", tag, bad));
  endtask

  canon_code lit, off, len;
  bit [7:0]  p1 [$], p2 [$], f1 [$], f2 [$], back [$];
  token_t    t1 [$], t2 [$];
  bit        b1 [$], b2 [$];

  initial begin
    lit = new(8'h20, "e", "t", 8'h00);
    off = new(8'd0, 8'd1, 8'd2, 8'd3);
    len = new(8'd255, 8'd3, 8'd4, 8'd5);

    make_payload(FRAME, 7, p1);
    make_payload(FRAME, 11, p2);
    make_frame(p1, 1'b0, 300, f1);
    make_frame(p2, 1'b1, 300, f2);
    lz_compress(f1, 2*CELLS, t1);
    lz_compress(f2, 2*CELLS, t2);
    lz_expand(t1, back);
    check(back == f1, "software LZ model round trip");
    encode(t1, lit, off, len, b1);
    encode(t2, lit, off, len, b2);
    $display("frame 1: %0d bytes -> %0d tokens -> %0d bits", f1.size(), t1.size(), b1.size());

    repeat (3) @(negedge clk);
    rst = 0;
    load_code(0, lit);
    load_code(1, off);
    load_code(2, len);

    send_bits(b1);
    wait (dones == 1);
    @(negedge clk);
    check(syncs == 1, "frame 1 start bytes found once");
    check(crc_error == 0, "frame 1 CRC accepted");
    check_memory(p1, "frame 1");

    send_bits(b2);
    wait (dones == 2);
    @(negedge clk);
    check(syncs == 2, "frame 2 start bytes found");
    check(crc_error == 1, "frame 2 corrupted CRC flagged");
    check_memory(p2, "frame 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
