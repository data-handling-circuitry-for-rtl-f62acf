// decompress_path: one decompression row of the writer-interface chip, from one compressed
// input bit per cycle to one byte (eight mirror rows) per cycle in the mirror memory.
//
//   bit_in -> huffman_decoder (+ huffman_tables) -> literal/offset FIFO + length FIFO
//          -> stream_decoder (runlength) -> smem_array (systolic LZ) -> framer (sync, CRC)
//          -> mirror_sram at the address of count10
//
// The Huffman decoder writes one token per literal or per offset/length pair into both
// FIFOs at once (literal/offset byte in one, {match, run length} in the other); flow_detect
// follows their level, stalls the runlength decoder, the LZ array, the framer and the
// address counter while they are empty, and raises overflow when they are within 10% of
// full so the source can pause (bit_valid low). The framer discards everything until the
// start bytes, clears the address counter, writes the FRAME_BYTES data bytes to columns
// 0..FRAME_BYTES-1 and checks the CRC byte. The mirror memory has its own read port for
// readout (mirror_raddr -> mirror_rdata, one cycle).
//
// Throughput: at most one output byte per cycle; the LZ array adds SMEM_CELLS cycles of
// latency, so the last bytes of a frame leave it only when SMEM_CELLS further tokens
// (for example the next frame's start bytes) have been fed in behind them.
module decompress_path
  import mlx_pkg::*;
#(
  parameter int unsigned SMEM_CELLS  = 128,
  parameter int unsigned FRAME_BYTES = 1024,
  parameter int unsigned FIFO_DEPTH  = 256,
  localparam int unsigned AW         = $clog2(FRAME_BYTES),
  localparam int unsigned SFW        = ($clog2(SMEM_CELLS) + 1 > 8) ? $clog2(SMEM_CELLS) + 1 : 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          bit_in,
  input  logic          bit_valid,
  input  logic          load,
  input  logic [3:0]    load_sel,
  input  logic [15:0]   load_data,
  input  logic [AW-1:0] mirror_raddr,
  output logic [7:0]    mirror_rdata,
  output logic          overflow,
  output logic          sync_found,
  output logic          frame_done,
  output logic          crc_error,
  output logic          code_error
);

  // Huffman decoder and its memories
  logic [3:0]  tab_addr;
  stream_e     tab_sel, sym_sel;
  logic [15:0] qmin, qmax, qbase;
  logic [7:0]  sym_addr, qsym;
  logic        tok_wr, tok_match;
  logic [7:0]  tok_lit_off;
  logic [8:0]  tok_run_len;

  huffman_tables u_tables (
    .clk, .rst, .load, .load_sel, .load_data,
    .tab_addr, .tab_sel, .sym_addr, .sym_sel,
    .qmin, .qmax, .qbase, .qsym
  );

  huffman_decoder u_huff (
    .clk, .rst, .bit_in, .bit_valid,
    .tab_addr, .tab_sel, .qmin, .qmax, .qbase,
    .sym_addr, .sym_sel, .qsym,
    .tok_wr, .tok_match, .tok_lit_off, .tok_run_len, .code_error
  );

  // FIFOs and level detector
  logic        req, fifo_empty;
  logic [7:0]  head_lit_off;
  logic [9:0]  head_len;
  logic        lo_full, lo_empty, ln_full, ln_empty;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_fifo_litoff (
    .clk, .rst, .wr(tok_wr), .wdata(tok_lit_off), .rd(req), .rdata(head_lit_off),
    .full(lo_full), .empty(lo_empty)
  );

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(10)) u_fifo_len (
    .clk, .rst, .wr(tok_wr), .wdata({tok_match, tok_run_len}), .rd(req), .rdata(head_len),
    .full(ln_full), .empty(ln_empty)
  );

  flow_detect #(.DEPTH(FIFO_DEPTH)) u_flow (
    .clk, .clear(rst), .write(tok_wr), .read(req),
    .underflow(fifo_empty), .overflow
  );

  // Runlength decoder and systolic LZ array
  logic        adv, copy;
  logic [7:0]  fdata;
  logic [7:0]  lz_byte;
  logic        lz_valid;

  stream_decoder #(.DW(8), .LW(9)) u_rle (
    .clk, .rst, .empty(fifo_empty), .match(head_len[9]), .lit_off(head_lit_off),
    .run_len(head_len[8:0]), .req, .adv, .fdata, .copy
  );

  smem_array #(.CELLS(SMEM_CELLS)) u_lz (
    .clk, .rst, .adv, .fdata_in(SFW'(fdata)), .copy_in(copy),
    .fdata_out(lz_byte), .out_valid(lz_valid)
  );

  // Framing, CRC check, address counter and mirror memory
  logic [AW-1:0] waddr;
  logic          we;

  framer #(.FRAME_BYTES(FRAME_BYTES)) u_framer (
    .clk, .rst, .valid(lz_valid), .data(lz_byte), .count(waddr),
    .sync_found, .we, .frame_done, .crc_error
  );

  count10 #(.WIDTH(AW)) u_addr (
    .clk, .rst, .clr(sync_found), .inc(we), .count(waddr)
  );

  mirror_sram #(.DEPTH(FRAME_BYTES), .WIDTH(8)) u_mirror (
    .clk, .we, .waddr, .wdata(lz_byte), .raddr(mirror_raddr), .rdata(mirror_rdata)
  );

  // The two FIFOs are written and read together, so they must agree.
  a_fifos_in_step: assert property (@(posedge clk) disable iff (rst) lo_empty == ln_empty)
    else $error("literal/offset and length FIFOs out of step");
  a_no_fifo_overrun: assert property (@(posedge clk) disable iff (rst) !(tok_wr && (lo_full || ln_full)))
    else $error("FIFO written while full: source ignored the overflow flag");

endmodule
