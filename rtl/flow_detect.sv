// flow_detect: FIFO level detector.
//
// Keeps its own count of the words in the FIFO from the write and read strobes and raises
// two flags from it: underflow while the FIFO is empty, which stalls the runlength decoder
// and the systolic LZ array, and overflow once the FIFO is within 10% of full (level >=
// OVF_LEVEL, 231 of 256 by default), which drives the chip's Overflow pin so the source
// stops sending bits. Both flags are registered level signals (they change on the clock
// edge after the strobe). clear empties the count, like the FIFO's own reset. The 10%
// margin is the prototype's; rounding it to 231 is this design's choice.
module flow_detect #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned OVF_LEVEL = DEPTH - (DEPTH / 10),
  localparam int unsigned LW       = $clog2(DEPTH) + 1
) (
  input  logic clk,
  input  logic clear,
  input  logic write,
  input  logic read,
  output logic underflow,
  output logic overflow
);

  logic [LW-1:0] level, level_n;
  logic          do_wr, do_rd;

  assign do_wr   = write && (level != LW'(DEPTH));
  assign do_rd   = read && (level != '0);
  assign level_n = level + LW'(do_wr) - LW'(do_rd);

  always_ff @(posedge clk) begin
    if (clear) begin
      level     <= '0;
      underflow <= 1'b1;
      overflow  <= 1'b0;
    end else begin
      level     <= level_n;
      underflow <= (level_n == '0);
      overflow  <= (level_n >= LW'(OVF_LEVEL));
    end
  end

endmodule
