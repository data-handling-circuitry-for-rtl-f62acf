// sram: single-port synchronous RAM, the model of the small Huffman memories of each path
// (16 x 16 length tables and 256 x 8 symbol tables).
//
// One address port shared by reads and writes, as in the single-port macros of the
// prototype. A write stores wdata at addr on the clock edge when we is high. Every cycle
// with en high the word at addr is registered onto rdata, so read data appears one cycle
// after its address (on a write cycle rdata shows the old word). Active-high enables are
// this design's choice; the macros themselves use active-low CSN/WEN/OEN.
module sram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,      // port enable (chip select)
  input  logic             we,      // write enable
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
