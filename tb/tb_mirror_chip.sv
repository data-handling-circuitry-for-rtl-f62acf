// tb_mirror_chip: end-to-end test of the writer-interface chip at its default size
// (8 paths, 128-cell LZ arrays, 1024-byte frames, 256-entry FIFOs).
//
// 1. Loads the Huffman tables of all paths through the shared load pins.
// 2. Sends a different compressed frame into each path at once (one bit per path per
//    cycle, random gaps), waits for every path's CRC check, requires flash_ready, and reads
//    all eight mirror memories back through read_mirrors/mirror_reset.
// 3. Sends a frame with a corrupted CRC into path 3 only: crc_error[3] and no flash_ready.
// 4. Sends path 0 a long, highly compressible stream (long copy runs) so that its FIFO
//    fills; the source pauses whenever the overflow pin is high, and the data must still
//    decode to the right bytes.
// Mechanisms counted (each must occur): literal tokens, copy tokens, LZ-array stalls on an
// empty FIFO, the overflow pin, start-byte sync, good and bad CRCs, flash_ready, readout.
// The peak output rate is checked too: path 0 must run at one byte per cycle for at least
// 256 cycles in a row (the 8 bits/cycle per path behind the chip's 6.4 Gb/s at 100 MHz).
`timescale 1ns/1ps
module tb_mirror_chip;
  import mlx_tb_pkg::*;

  localparam int NP    = 8;
  localparam int CELLS = 128;
  localparam int FRAME = 1024;

  logic          clk = 0, rst = 1;
  logic [NP-1:0] data_in = '0, data_valid = '0;
  logic [15:0]   load_data = 0;
  logic          load = 0;
  logic [3:0]    we_sel = 0;
  logic [2:0]    read_mirrors = 0;
  logic          mirror_reset = 0;
  logic [7:0]    mirror_data;
  logic          overflow;
  logic [NP-1:0] sync_found, frame_done, crc_error, code_error;
  logic          flash_ready;

  mirror_chip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lit = 0, n_copy = 0, n_stall = 0, n_ovf = 0, n_sync = 0, n_done = 0;
  int n_crc_bad = 0, n_flash = 0;
  int adv_run = 0, adv_run_max = 0;   // longest stretch of one output byte per cycle, path 0
  int dones [NP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed on path ports and inside path 0.
  logic prev_ovf = 0;
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < NP; p++) begin
      if (sync_found[p]) n_sync++;
      if (frame_done[p]) begin
        n_done++;
        dones[p]++;
      end
      if (code_error[p]) begin
        failures++;
        $display("FAIL: code error on path %0d", p);
      end
    end
    if (dut.g_path[0].u_path.adv && !dut.g_path[0].u_path.copy) n_lit++;
    if (dut.g_path[0].u_path.adv && dut.g_path[0].u_path.copy)  n_copy++;
    if (!dut.g_path[0].u_path.adv && dut.g_path[0].u_path.fifo_empty) n_stall++;
    if (dut.g_path[0].u_path.adv) begin
      adv_run++;
      if (adv_run > adv_run_max) adv_run_max = adv_run;
    end else begin
      adv_run = 0;
    end
    if (overflow && !prev_ovf) n_ovf++;
    prev_ovf <= overflow;
    if (flash_ready) n_flash++;
  end

  task automatic load_table(input int sel, input int unsigned words [], input int n);
    @(negedge clk);
    load   = 1;
    we_sel = 4'(sel);
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

  typedef bit bitq_t [$];
  bitq_t streams [NP];

  // Feed the streams of all paths in parallel; every path pauses while overflow is high.
  task automatic send_all();
    int pos [NP];
    bit busy;
    foreach (pos[p]) pos[p] = 0;
    do begin
      @(negedge clk);
      busy = 0;
      for (int p = 0; p < NP; p++) begin
        if (pos[p] < streams[p].size() && !overflow && $urandom_range(7) != 0) begin
          data_valid[p] = 1;
          data_in[p]    = streams[p][pos[p]];
          pos[p]++;
        end else begin
          data_valid[p] = 0;
          data_in[p]    = 0;
        end
        if (pos[p] < streams[p].size()) busy = 1;
      end
    end while (busy);
    @(negedge clk);
    data_valid = '0;
  endtask

  task automatic read_back(input int p, input bit [7:0] payload [$], input string tag);
    int bad;
    bad = 0;
    @(negedge clk);
    read_mirrors = 3'(p);
    mirror_reset = 1;
    @(negedge clk);
    mirror_reset = 0;
    // address 0 is presented in this cycle; data follows one cycle later
    for (int a = 0; a < FRAME; a++) begin
      @(posedge clk);
      #1;
      if (mirror_data !== payload[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: path %0d, %0d mirror bytes differ", tag, p, bad));
  endtask

  canon_code lit, off, len;
  bit [7:0]  pay [NP][$];
  bit [7:0]  fr [$], back [$], bad_pay [$];
  token_t    toks [$];
  int        t0, t1, ovf_before;

  initial begin
    lit = new(8'h20, "e", "t", 8'h00);
    off = new(8'd0, 8'd1, 8'd2, 8'd3);
    len = new(8'd255, 8'd3, 8'd4, 8'd5);
    foreach (dones[p]) dones[p] = 0;

    repeat (3) @(negedge clk);
    rst = 0;
    load_code(0, lit);
    load_code(1, off);
    load_code(2, len);

    // Phase 2: one good frame per path.
    for (int p = 0; p < NP; p++) begin
      make_payload(FRAME, 100 + p, pay[p]);
      fr = {};
      make_frame(pay[p], 1'b0, 2*CELLS, fr);
      lz_compress(fr, 2*CELLS, toks);
      streams[p] = {};
      encode(toks, lit, off, len, streams[p]);
    end
    t0 = $time;
    send_all();
    for (int p = 0; p < NP; p++) wait (dones[p] == 1);
    t1 = $time;
    $display("8 frames decoded in %0d cycles", (t1 - t0) / 10);
    @(negedge clk);
    check(crc_error == '0, "all first frames pass CRC");
    check(flash_ready == 1, "flash_ready after all rows loaded");
    for (int p = 0; p < NP; p++) read_back(p, pay[p], "phase 2");

    // Phase 3: corrupted CRC on path 3.
    make_payload(FRAME, 77, bad_pay);
    fr = {};
    make_frame(bad_pay, 1'b1, 2*CELLS, fr);
    lz_compress(fr, 2*CELLS, toks);
    foreach (streams[p]) streams[p] = {};
    encode(toks, lit, off, len, streams[3]);
    send_all();
    wait (dones[3] == 2);
    @(negedge clk);
    check(crc_error[3] == 1, "corrupted CRC flagged on path 3");
    check(crc_error[2] == 0 && crc_error[4] == 0, "other paths keep a good CRC");
    check(flash_ready == 0, "no flash_ready with a bad row");
    read_back(3, bad_pay, "phase 3");
    n_crc_bad = crc_error[3] ? 1 : 0;

    // Phase 4: a long run-heavy stream on path 0 to fill its FIFO.
    bad_pay = {};
    for (int i = 0; i < FRAME; i++) bad_pay.push_back(8'(i % 3));
    fr = {};
    make_frame(bad_pay, 1'b0, 0, fr);
    for (int i = 0; i < 80000; i++) fr.push_back(8'h00);
    lz_compress(fr, 2*CELLS, toks);
    foreach (streams[p]) streams[p] = {};
    encode(toks, lit, off, len, streams[0]);
    ovf_before = n_ovf;
    send_all();
    wait (dones[0] == 2);
    @(negedge clk);
    check(n_ovf > ovf_before, "overflow pin raised by the run-heavy stream");
    check(crc_error[0] == 0, "run-heavy frame passes CRC");
    read_back(0, bad_pay, "phase 4");

    $display("mechanisms: literal=%0d copy=%0d stall=%0d overflow=%0d sync=%0d done=%0d bad_crc=%0d flash=%0d",
             n_lit, n_copy, n_stall, n_ovf, n_sync, n_done, n_crc_bad, n_flash);
    check(n_lit > 0,     "literal tokens occurred");
    check(n_copy > 0,    "copy tokens occurred");
    check(n_stall > 0,   "LZ array stalled on an empty FIFO");
    check(n_ovf > 0,     "overflow occurred");
    check(n_sync >= 10,  "start bytes found in every frame");
    check(n_done >= 10,  "every frame checked");
    check(n_crc_bad > 0, "a CRC error was detected");
    check(n_flash > 0,   "flash_ready occurred");
    // Peak rate: with a well-filled FIFO a path produces one byte (8 mirror bits) every cycle.
    $display("longest run of one byte per cycle on path 0: %0d cycles", adv_run_max);
    check(adv_run_max >= 256, "path sustains 8 bits/cycle over a full-length match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
