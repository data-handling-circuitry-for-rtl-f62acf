// mux3: 3:1 multiplexer that hands the Huffman decoder the table output of the stream it is
// decoding (0 = literal, 1 = offset, 2 = length). The select code 3 is unused and returns
// the literal input. WIDTH is 16 for the length tables and 8 for the symbol tables.
// Purely combinational.
module mux3 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd1:    y = in1;
      2'd2:    y = in2;
      default: y = in0;
    endcase
  end

endmodule
