// mirror_sram: the mirror-interface memory of one decompression path (1024 words x 8 bits).
//
// Each bit of a word sits under one mirror: the eight bits are eight mirror rows and the
// address is the mirror column, so one path feeds 8 rows x 1024 columns of the array. The
// decompressor writes one byte per cycle at the address counter's value. A separate read
// port (registered, one cycle latency) lets the array be read back for test. The
// prototype used a single-port generated SRAM; a write port plus a read port is this
// design's choice so that loading and readout need no arbitration.
module mirror_sram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
