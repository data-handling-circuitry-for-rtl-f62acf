// stream_decoder: the runlength decoder between the FIFOs and the systolic LZ array.
//
// Each FIFO token is either a literal (match = 0: lit_off is the byte) or a match (match =
// 1: lit_off is the copy distance minus one, run_len the number of bytes to copy, 1..256).
// A literal is handed to the array once with copy = 0. For a match the decoder loads its
// counter with run_len and hands the same distance to the array run_len times with copy = 1,
// one per cycle, counting down; the array turns each into the byte that distance back, so
// consecutive copies rebuild the matched string. The next token is popped (req) only when
// the counter has run out.
//
// Timing: one output per cycle (adv high) while a run is in progress or the FIFO has a
// token; with the FIFO empty (empty high) and no run pending, adv is low and the whole
// downstream datapath stalls. fdata/copy/adv are combinational from the counter state and
// the FIFO head (first-word fall-through); req pops in the same cycle. Carrying the length
// as run_len = symbol + 1 is this design's choice.
module stream_decoder #(
  parameter int unsigned DW = 8,      // literal / distance width
  parameter int unsigned LW = 9       // run length width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          empty,        // FIFO level detector: no token available
  input  logic          match,
  input  logic [DW-1:0] lit_off,
  input  logic [LW-1:0] run_len,
  output logic          req,          // pop the FIFO head this cycle
  output logic          adv,          // a token is handed to the array this cycle
  output logic [DW-1:0] fdata,
  output logic          copy
);

  logic [LW-1:0] count;               // copies still to issue for the current match
  logic [DW-1:0] off_q;
  logic          busy;

  assign busy = (count != '0);
  assign req  = !busy && !empty;
  assign adv  = busy || !empty;

  always_comb begin
    if (busy) begin
      fdata = off_q;
      copy  = 1'b1;
    end else begin
      fdata = lit_off;
      copy  = match;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      off_q <= '0;
    end else if (busy) begin
      count <= count - 1'b1;
    end else if (req && match) begin
      count <= run_len - 1'b1;
      off_q <= lit_off;
    end
  end

endmodule
