// tb_smem_cell: one SMEM cell (index 5) against a model of its registers: random forward
// tokens, copy flags and reverse data, with random stalls. A copy token whose distance-1
// has upper bits 5 takes rdata_in (bit 0 = 0) or the cell's own reverse register (bit 0 =
// 1) and leaves with the copy flag cleared; every other token passes unchanged; the
// reverse register always follows rdata_in; nothing moves while adv is low.
`timescale 1ns/1ps
module tb_smem_cell;
  logic       clk = 0, rst = 1, adv = 0, copy_in = 0, copy_out;
  logic [6:0] mem_id = 7'd5;
  logic [7:0] fdata_in = 0, rdata_in = 0, fdata_out, rdata_out;
  logic [7:0] m_f, m_r;
  logic       m_c;
  int checks = 0, failures = 0, hits = 0;

  smem_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 0;
    m_f = 0; m_r = 0; m_c = 0;
    for (int k = 0; k < 3000; k++) begin
      adv      = ($urandom_range(4) != 0);
      copy_in  = $urandom_range(1);
      fdata_in = ($urandom_range(1) != 0) ? {7'd5, 1'($urandom)} : 8'($urandom);
      rdata_in = 8'($urandom);
      if (adv) begin
        if (copy_in && fdata_in[7:1] == 7'd5) begin
          m_f = fdata_in[0] ? m_r : rdata_in;
          m_c = 0;
          hits++;
        end else begin
          m_f = fdata_in;
          m_c = copy_in;
        end
        m_r = rdata_in;
      end
      @(negedge clk);
      checks++;
      if (fdata_out !== m_f || copy_out !== m_c || rdata_out !== m_r) begin
        failures++;
        $display("FAIL: step %0d got %h/%b/%h expected %h/%b/%h", k, fdata_out, copy_out, rdata_out, m_f, m_c, m_r);
      end
    end
    checks++;
    if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
