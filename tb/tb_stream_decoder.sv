// tb_stream_decoder: feeds a queue of literal and match tokens through a FIFO model whose
// head is randomly unavailable, and compares the decoder's (fdata, copy) stream, taken in
// cycles with adv high, with the expansion of the tokens: a literal once with copy = 0, a
// match's distance run_len times with copy = 1. Also checks that a run of length L takes
// exactly L consecutive cycles, that the FIFO is popped only once per token, and that adv
// is low whenever nothing is available.
`timescale 1ns/1ps
module tb_stream_decoder;
  logic       clk = 0, rst = 1;
  logic       empty, match, req, adv, copy;
  logic [7:0] lit_off, fdata;
  logic [8:0] run_len;

  typedef struct { bit m; bit [7:0] v; int l; } tok_t;
  tok_t q [$];
  bit [8:0] exp_out [$];               // {copy, fdata}
  int checks = 0, failures = 0;
  int outs = 0, pops = 0, ntok, hide;
  int run_start, run_cycles;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  stream_decoder dut (.*);
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

  // FIFO head model, updated between clock edges
  always @(negedge clk) begin
    empty   = (q.size() == 0) || (hide != 0);
    match   = (q.size() > 0) ? q[0].m : 1'b0;
    lit_off = (q.size() > 0) ? q[0].v : 8'd0;
    run_len = (q.size() > 0) ? 9'(q[0].l) : 9'd0;
  end

  always @(posedge clk) if (!rst) begin
    if (adv) begin
      bit [8:0] e;
      e = exp_out.pop_front();
      checks++;
      if ({copy, fdata} !== e) begin
        failures++;
        $display("FAIL: output %0d got %b/%h expected %b/%h", outs, copy, fdata, e[8], e[7:0]);
      end
      outs++;
    end else begin
      checks++;
      if (!empty) begin failures++; $display("FAIL: idle although a token is available"); end
    end
    if (req) begin
      void'(q.pop_front());
      pops++;
    end
    hide <= ($urandom_range(3) == 0);
  end

  initial begin
    hide = 0;
    ntok = 400;
    for (int i = 0; i < ntok; i++) begin
      tok_t t;
      t.m = $urandom_range(1);
      t.v = 8'($urandom);
      t.l = t.m ? (($urandom_range(9) == 0) ? 256 : $urandom_range(1, 20)) : 0;
      q.push_back(t);
      if (!t.m) exp_out.push_back({1'b0, t.v});
      else for (int k = 0; k < t.l; k++) exp_out.push_back({1'b1, t.v});
    end
    repeat (2) @(negedge clk);
    rst = 0;
    wait (q.size() == 0);
    wait (exp_out.size() == 0);
    repeat (3) @(negedge clk);
    check(pops == ntok, "one pop per token");

    // Rate: a 256-long run issues one copy per cycle with no gap.
    @(negedge clk);
    q.push_back('{m: 1'b1, v: 8'h42, l: 256});
    for (int k = 0; k < 256; k++) exp_out.push_back({1'b1, 8'h42});
    run_start = -1;
    run_cycles = 0;
    forever begin
      #1;
      if (run_start < 0 && adv) run_start = cyc;
      if (exp_out.size() == 0) break;
      @(posedge clk);
    end
    run_cycles = cyc - run_start;
    check(run_cycles == 256, $sformatf("256-copy run took %0d cycles", run_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
