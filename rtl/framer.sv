// framer: frame synchronisation and CRC-8 check on the decompressed byte stream.
//
// A frame is 8 start bytes ("maskless"), FRAME_BYTES data bytes and one CRC byte. In the
// HUNT state the framer compares the last eight bytes with the start word; on a match it
// pulses sync_found, which clears the writer-interface address counter, and enters DATA.
// In DATA every byte is written to the mirror memory (we) at the counter's address (count)
// and folded into a CRC-8 with generator x^8 + x^2 + x + 1 (initial value 0, MSB first);
// the byte written while count = FRAME_BYTES-1 is the last one. The next byte is the
// received CRC: crc_error is set if it differs from the computed value (and held until the
// next frame's CRC byte), frame_done pulses, and the framer hunts again. Bytes outside a
// frame are ignored, which also discards the array's start-up contents.
//
// Timing: the framer acts only in cycles with valid high (a new byte from the LZ array;
// otherwise the datapath is stalled). sync_found, we and frame_done are combinational
// strobes in the cycle of the byte concerned. The frame format and polynomial are the
// prototype's; which bytes the CRC covers (data bytes only) and its initial value are this
// design's choice.
module framer
  import mlx_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 1024,
  localparam int unsigned CW         = $clog2(FRAME_BYTES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic [7:0]    data,
  input  logic [CW-1:0] count,
  output logic          sync_found,
  output logic          we,
  output logic          frame_done,
  output logic          crc_error
);

  typedef enum logic [1:0] {F_HUNT, F_DATA, F_CHECK} fstate_e;

  fstate_e     st;
  logic [8*(START_BYTES-1)-1:0] hist; // the seven bytes before this one
  logic [7:0]  crc;

  assign sync_found = valid && (st == F_HUNT) && ({hist, data} == START_WORD);
  assign we         = valid && (st == F_DATA);
  assign frame_done = valid && (st == F_CHECK);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= F_HUNT;
      hist      <= '0;
      crc       <= '0;
      crc_error <= 1'b0;
    end else if (valid) begin
      unique case (st)
        F_HUNT: begin
          hist <= {hist[8*(START_BYTES-2)-1:0], data};
          if (sync_found) begin
            st  <= F_DATA;
            crc <= '0;
          end
        end
        F_DATA: begin
          crc <= crc8_byte(crc, data);
          if (count == CW'(FRAME_BYTES - 1)) st <= F_CHECK;
        end
        default: begin
          crc_error <= (data != crc);
          hist      <= '0;
          st        <= F_HUNT;
        end
      endcase
    end
  end

endmodule
