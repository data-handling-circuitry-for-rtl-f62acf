// huffman_tables: the Huffman memory bank of one decompression path.
//
// Twelve synchronous single-port memories: for each of the literal, offset and length
// streams a 16x16 MIN, MAX and BASE table (codes of length 1..16 at index 0..15) and a
// 256x8 symbol table. The decoder reads all three streams' tables at the same index every
// cycle and two 3:1 multiplexers pass on the words of the stream it is decoding (tab_sel
// for the length tables, sym_sel for the symbol tables).
//
// Loading: while load is high, load_data is written into the memory chosen by load_sel
// (through a 4:16 decoder) at an address that starts at 0 on the first load cycle and
// rises by one every load cycle; a memory is therefore filled with one burst. Memory codes:
// 3*stream + table for the length tables (table 0 MIN, 1 MAX, 2 BASE; stream 0 literal, 1
// offset, 2 length), 9 + stream for the symbol tables (which take load_data[7:0]). Codes
// 12..15 select nothing. During loading the memories' ports serve the load, so the decoder
// must be idle. The sizes, the shared 16-bit load bus, the 4-bit select and the 3:1 muxes
// follow the prototype's pin list and block library; the burst addressing and the code
// assignment are this design's choice.
module huffman_tables
  import mlx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [3:0]  load_sel,
  input  logic [15:0] load_data,
  input  logic [3:0]  tab_addr,
  input  stream_e     tab_sel,
  input  logic [7:0]  sym_addr,
  input  stream_e     sym_sel,
  output logic [15:0] qmin,
  output logic [15:0] qmax,
  output logic [15:0] qbase,
  output logic [7:0]  qsym
);

  logic [7:0]  load_addr;
  logic [15:0] wsel;
  logic [15:0] tq [9];                // length-table read words, index 3*stream + table
  logic [7:0]  sq [3];                // symbol-table read words, index stream

  always_ff @(posedge clk) begin
    if (rst || !load) load_addr <= '0;
    else              load_addr <= load_addr + 1'b1;
  end

  decode_4_16 u_dec (.en(load), .sel(load_sel), .y(wsel));

  for (genvar i = 0; i < 9; i++) begin : g_len_tab
    sram #(.DEPTH(16), .WIDTH(16)) u_tab (
      .clk  (clk),
      .en   (1'b1),
      .we   (wsel[i]),
      .addr (load ? load_addr[3:0] : tab_addr),
      .wdata(load_data),
      .rdata(tq[i])
    );
  end

  for (genvar s = 0; s < 3; s++) begin : g_sym_tab
    sram #(.DEPTH(256), .WIDTH(8)) u_sym (
      .clk  (clk),
      .en   (1'b1),
      .we   (wsel[SEL_SYM0+s]),
      .addr (load ? load_addr : sym_addr),
      .wdata(load_data[7:0]),
      .rdata(sq[s])
    );
  end

  mux3 #(.WIDTH(16)) u_mux_min (.in0(tq[0]), .in1(tq[3]), .in2(tq[6]), .sel(tab_sel), .y(qmin));
  mux3 #(.WIDTH(16)) u_mux_max (.in0(tq[1]), .in1(tq[4]), .in2(tq[7]), .sel(tab_sel), .y(qmax));
  mux3 #(.WIDTH(16)) u_mux_bas (.in0(tq[2]), .in1(tq[5]), .in2(tq[8]), .sel(tab_sel), .y(qbase));
  mux3 #(.WIDTH(8))  u_mux_sym (.in0(sq[0]), .in1(sq[1]), .in2(sq[2]), .sel(sym_sel), .y(qsym));

endmodule
