// mirror_chip: the writer-interface test chip for a mirror-based maskless lithography system.
//
// The chip receives the compressed mask image as NUM_PATHS one-bit serial streams and turns
// each into a row of the mirror-interface memory. Every path (decompress_path) undoes the
// two compression stages (Huffman, then Lempel-Ziv with a systolic history array), finds
// the frame start bytes, checks the frame's CRC-8 and writes the FRAME_BYTES data bytes,
// in thermometer-coded form one bit per mirror, into its 1024 x 8 mirror SRAM; together
// the paths hold a 64 x 1024 mirror array at the defaults.
//
// Pins: data_in/data_valid carry one bit per path per cycle; load, we_sel and load_data load
// the Huffman tables of all paths at once (every path uses the same tables); overflow is the
// OR of the paths' FIFO-nearly-full flags and asks the source to pause; read_mirrors picks
// the path whose memory drives mirror_data, at a readout address that starts at 0 after
// mirror_reset and rises by one every cycle (mirror_data lags the address by one cycle).
// sync_found, frame_done and crc_error report each path's framing, code_error a
// Huffman code that never ended, and flash_ready is high
// once every path has received a complete frame whose CRC matched (cleared when any path
// finds new start bytes), which is the condition for firing the light source.
//
// Single clock, synchronous active-high reset. The number of paths, the array and frame
// sizes, the FIFO depth and the pin list follow the prototype; data_valid and the
// framing/flash status outputs are additions of this design.
module mirror_chip #(
  parameter int unsigned NUM_PATHS   = 8,
  parameter int unsigned SMEM_CELLS  = 128,
  parameter int unsigned FRAME_BYTES = 1024,
  parameter int unsigned FIFO_DEPTH  = 256,
  localparam int unsigned AW         = $clog2(FRAME_BYTES),
  localparam int unsigned PSW        = (NUM_PATHS > 1) ? $clog2(NUM_PATHS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_PATHS-1:0] data_in,
  input  logic [NUM_PATHS-1:0] data_valid,
  input  logic [15:0]          load_data,
  input  logic                 load,
  input  logic [3:0]           we_sel,
  input  logic [PSW-1:0]       read_mirrors,
  input  logic                 mirror_reset,
  output logic [7:0]           mirror_data,
  output logic                 overflow,
  output logic [NUM_PATHS-1:0] sync_found,
  output logic [NUM_PATHS-1:0] frame_done,
  output logic [NUM_PATHS-1:0] crc_error,
  output logic [NUM_PATHS-1:0] code_error,
  output logic                 flash_ready
);

  logic [AW-1:0]        raddr;
  logic [7:0]           rdata [NUM_PATHS];
  logic [NUM_PATHS-1:0] ovf, done_ok;

  count10 #(.WIDTH(AW)) u_raddr (
    .clk, .rst, .clr(mirror_reset), .inc(1'b1), .count(raddr)
  );

  for (genvar p = 0; p < NUM_PATHS; p++) begin : g_path
    decompress_path #(
      .SMEM_CELLS(SMEM_CELLS), .FRAME_BYTES(FRAME_BYTES), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_path (
      .clk, .rst,
      .bit_in      (data_in[p]),
      .bit_valid   (data_valid[p]),
      .load, .load_sel(we_sel), .load_data,
      .mirror_raddr(raddr),
      .mirror_rdata(rdata[p]),
      .overflow    (ovf[p]),
      .sync_found  (sync_found[p]),
      .frame_done  (frame_done[p]),
      .crc_error   (crc_error[p]),
      .code_error  (code_error[p])
    );

    // A path is ready once its last frame ended with a good CRC.
    always_ff @(posedge clk) begin
      if (rst || sync_found[p]) done_ok[p] <= 1'b0;
      else if (frame_done[p])   done_ok[p] <= 1'b1;
    end
  end

  assign overflow    = |ovf;
  assign flash_ready = &(done_ok & ~crc_error);
  assign mirror_data = rdata[read_mirrors];

endmodule
