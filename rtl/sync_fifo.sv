// sync_fifo: first-in first-out buffer between the Huffman decoder and the runlength decoder.
//
// The Huffman decoder produces a token only every few cycles (one input bit per cycle),
// while the LZ array consumes one token per cycle except during long copy runs, so the two
// ends run at different, data-dependent rates and this buffer absorbs the difference. A
// word written with wr is appended; rdata always shows the oldest word (first-word
// fall-through) and rd removes it. Writes to a full FIFO and reads from an empty one are
// dropped; the separate level detector (flow_detect) tells the producer and consumer when
// to stop. Single clock. The prototype used an asynchronous vendor FIFO driven by strobes;
// this synchronous equivalent is this design's choice.
module sync_fifo #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      level;
  logic             do_wr, do_rd;

  assign full  = (level == (AW+1)'(DEPTH));
  assign empty = (level == '0);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
