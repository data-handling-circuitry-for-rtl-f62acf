// smem_cell: one processing element of the systolic Lempel-Ziv history array.
//
// A token moves left to right through the forward registers (fdata, copy); the decoded
// output stream moves right to left through the reverse registers (rdata). Because the two
// streams travel in opposite directions, cell k sees the output bytes 2k+1 and 2k+2
// positions behind the token that is passing it: the first on rdata_in (the neighbour's
// reverse register), the second in its own reverse register. A copy token carries e =
// distance-1 in fdata. The cell compares e[7:1] with its index MEM_ID; on a match it
// replaces the token by the history byte, chosen by e[0] (0: rdata_in, 1: its own
// register), and clears the copy flag. Any other token passes unchanged. fdata is 8 bits
// wide, or IDW+1 bits when the history needs longer distances (512 cells and more).
//
// This is the structure of the standard-cell SMEM cell of the prototype: 17 flip-flops
// (8 forward data, 1 copy, 8 reverse data), an 8-bit equality comparator, two 8-bit 2:1
// multiplexers and three gates. Comparing the upper offset bits with the cell index (so
// bit 0 picks one of the cell's two bytes) is how this design reads that comparator. All
// registers advance only when adv is high (the stall enable); rst clears them.
module smem_cell #(
  parameter int unsigned IDW = 7,     // width of the cell index (distance width - 1)
  parameter int unsigned FW  = 8      // forward data width: max(8, IDW+1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           adv,         // advance; low = stall
  input  logic [IDW-1:0] mem_id,      // this cell's index k
  input  logic [FW-1:0]  fdata_in,    // literal, or distance-1 when copy_in is set
  input  logic           copy_in,
  input  logic [7:0]     rdata_in,    // reverse data from the cell on the output side
  output logic [FW-1:0]  fdata_out,
  output logic           copy_out,
  output logic [7:0]     rdata_out
);

  logic       mem_sel, take;
  logic [7:0] hist;

  assign mem_sel = (fdata_in[IDW:1] == mem_id);
  assign take    = copy_in && mem_sel;
  assign hist    = fdata_in[0] ? rdata_out : rdata_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      fdata_out <= '0;
      copy_out  <= 1'b0;
      rdata_out <= '0;
    end else if (adv) begin
      fdata_out <= take ? FW'(hist) : fdata_in;
      copy_out  <= copy_in && !mem_sel;
      rdata_out <= rdata_in;
    end
  end

endmodule
