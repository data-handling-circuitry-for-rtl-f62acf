// decode_4_16: 4-to-16 one-hot decoder with enable.
//
// Turns the 4-bit memory-select code of the Huffman table loading port into a write strobe
// for one of up to 16 memories: y[sel] = en, every other output 0. Purely combinational.
module decode_4_16 (
  input  logic        en,
  input  logic [3:0]  sel,
  output logic [15:0] y
);

  always_comb begin
    y = '0;
    y[sel] = en;
  end

endmodule
