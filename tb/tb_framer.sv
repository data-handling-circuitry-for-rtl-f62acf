// tb_framer: feeds byte streams with random stalls (valid low) into the framer, with the
// address counter modelled in the testbench (cleared by sync_found, advanced by we).
// Checks: garbage and a near-miss start word ("masklesS") give no sync; "maskless" gives
// exactly one sync_found on its last byte; exactly 1024 write strobes follow, at counter
// values 0..1023, carrying the data bytes; frame_done comes on the CRC byte; a correct CRC
// clears crc_error and a corrupted one sets it; the framer then hunts again.
`timescale 1ns/1ps
module tb_framer;
  import mlx_tb_pkg::*;

  logic       clk = 0, rst = 1, valid = 0;
  logic [7:0] data = 0;
  logic [9:0] count;
  logic       sync_found, we, frame_done, crc_error;
  int         cnt = 0;
  int checks = 0, failures = 0;
  int syncs = 0, writes = 0, dones = 0, bad_writes = 0;
  bit [7:0] exp_w [$];

  framer dut (.*);
  assign count = 10'(cnt);
  always #5 clk = ~clk;

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

  always @(posedge clk) if (!rst) begin
    if (sync_found) begin syncs++; cnt <= 0; end
    else if (we) cnt <= cnt + 1;
    if (we) begin
      writes++;
      if (exp_w.size() == 0 || data !== exp_w[0] || count !== 10'(writes - 1 - 1024 * (dones))) bad_writes++;
      if (exp_w.size() > 0) void'(exp_w.pop_front());
    end
    if (frame_done) dones++;
  end

  task automatic send(input bit [7:0] b [$]);
    foreach (b[i]) begin
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        valid = 0;
        data = 8'($urandom);
        @(negedge clk);
      end
      valid = 1;
      data = b[i];
    end
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    bit [7:0] g [$], p [$], f [$];
    string    miss;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 50; i++) g.push_back(8'($urandom));
    miss = "masklesS";
    foreach (miss[i]) g.push_back(miss[i]);
    send(g);
    check(syncs == 0 && writes == 0, "no sync on garbage or a near-miss");

    for (int fr = 0; fr < 2; fr++) begin
      p = {};
      f = {};
      for (int i = 0; i < 1024; i++) p.push_back(8'($urandom));
      make_frame(p, fr == 1, 20, f);
      foreach (p[i]) exp_w.push_back(p[i]);
      send(f);
      repeat (2) @(negedge clk);
      check(syncs == fr + 1, $sformatf("frame %0d: one sync", fr));
      check(writes == 1024 * (fr + 1), $sformatf("frame %0d: %0d writes", fr, writes));
      check(dones == fr + 1, $sformatf("frame %0d: done", fr));
      check(crc_error == (fr == 1), $sformatf("frame %0d: crc_error=%0d", fr, crc_error));
      check(bad_writes == 0, $sformatf("frame %0d: %0d writes with wrong data/address", fr, bad_writes));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
