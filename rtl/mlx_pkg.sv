// mlx_pkg: constants and types shared by the maskless-lithography writer-interface datapath.
//
// Holds the frame format (eight start bytes spelling "maskless", a data block and one CRC-8
// byte), the CRC-8 generator x^8 + x^2 + x + 1, and the encoding of the three symbol streams
// that the single bit-serial Huffman decoder interleaves (literal, offset, length). The start
// string, the polynomial and the frame sizes are the prototype's; the stream encoding and the
// select codes of the Huffman memories are this design's own choice.
package mlx_pkg;

  // Frame format: 8 start bytes, FRAME_BYTES data bytes, 1 CRC byte.
  localparam int unsigned START_BYTES = 8;
  localparam logic [63:0] START_WORD  = "maskless";   // first byte received is 'm'
  localparam logic [7:0]  CRC8_POLY   = 8'h07;        // x^8 + x^2 + x + 1

  // Symbol streams multiplexed through the one Huffman decoder.
  typedef enum logic [1:0] {
    STRM_LIT = 2'd0,
    STRM_OFF = 2'd1,
    STRM_LEN = 2'd2
  } stream_e;

  // Huffman memory select codes carried on the 4-bit WE pin.
  // code = 3*stream + table for the 16x16 length tables, 9 + stream for the 256x8 symbol tables.
  typedef enum logic [1:0] {
    TAB_MIN  = 2'd0,   // first canonical code of each length
    TAB_MAX  = 2'd1,   // first code past the last code of each length (exclusive bound)
    TAB_BASE = 2'd2    // symbol-table index of the first code of each length
  } table_e;
  localparam int unsigned SEL_SYM0 = 9;

  // One step of a bytewise CRC-8, MSB first, no reflection, no final xor.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ CRC8_POLY) : (c << 1);
    return c;
  endfunction

endpackage
