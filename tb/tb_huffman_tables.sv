// tb_huffman_tables: loads all twelve Huffman memories with distinct random contents
// through the burst load port (4:16 select, auto-incrementing address), then reads them
// back: for each stream select the MIN/MAX/BASE words at every index (one-cycle latency)
// and the symbol words at random addresses must equal what was loaded into that stream's
// memories. Also checks that select codes 12..15 write nothing.
`timescale 1ns/1ps
module tb_huffman_tables;
  import mlx_pkg::*;

  logic        clk = 0, rst = 1, load = 0;
  logic [3:0]  load_sel = 0, tab_addr = 0;
  logic [15:0] load_data = 0, qmin, qmax, qbase;
  stream_e     tab_sel = STRM_LIT, sym_sel = STRM_LIT;
  logic [7:0]  sym_addr = 0, qsym;
  logic [15:0] tv [9][16];
  logic [7:0]  sv [3][256];
  int checks = 0, failures = 0;

  huffman_tables dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    for (int m = 0; m < 12; m++) begin
      load = 1;
      load_sel = 4'(m);
      for (int a = 0; a < ((m < 9) ? 16 : 256); a++) begin
        load_data = 16'($urandom);
        if (m < 9) tv[m][a] = load_data;
        else sv[m-9][a] = load_data[7:0];
        @(negedge clk);
      end
      load = 0;
      @(negedge clk);
    end
    // codes 12..15 must not disturb anything
    load = 1;
    for (int a = 0; a < 64; a++) begin
      load_sel = 4'(12 + a % 4);
      load_data = 16'($urandom);
      @(negedge clk);
    end
    load = 0;
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      tab_sel = stream_e'(s);
      sym_sel = stream_e'(s);
      for (int a = 0; a < 16; a++) begin
        int sa;
        sa = $urandom_range(255);
        tab_addr = 4'(a);
        sym_addr = 8'(sa);
        @(negedge clk);
        check(qmin == tv[3*s][a] && qmax == tv[3*s+1][a] && qbase == tv[3*s+2][a],
              $sformatf("stream %0d length tables at %0d", s, a));
        check(qsym == sv[s][sa], $sformatf("stream %0d symbol at %0d", s, sa));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
