// huffman_decoder: bit-serial canonical Huffman decoder with the stream controller.
//
// Input is one compressed bit per cycle (bit_in when bit_valid). The bit stream is a
// sequence of LZ tokens: a raw flag bit (0 = literal, 1 = match) followed by either a
// literal code, or an offset code and then a length code. One decoder serves all three
// symbol streams; the controller FSM (FLAG -> LIT -> FLAG, or FLAG -> OFF -> LEN -> FLAG)
// knows which stream the next code belongs to and selects that stream's tables (tab_sel).
//
// Decoding uses the canonical-code tables of the chosen stream, indexed by code length - 1:
// MIN (first code of that length), MAX (one past the last code of that length; equal to
// MIN when the length is unused) and BASE (symbol-table index of the first code of that
// length). Bits are shifted into a code register; after L bits the code is complete when
// code < MAX[L], and the symbol index is BASE[L] + code - MIN[L]. The tables sit in
// synchronous SRAMs, so the decoder presents the table index for the next cycle on
// tab_addr (derived from the next state) and finds the words on qmin/qmax/qbase when the
// bit arrives; the symbol-table read is issued on sym_addr in the cycle the code completes
// and its word (qsym, stream sym_sel) is used one cycle later. A complete literal, or an
// offset/length pair, is pushed to the FIFOs with tok_wr: tok_match, tok_lit_off (literal
// or distance-1) and tok_run_len (length symbol + 1). Codes are at most MAX_CODE_LEN bits;
// a longer code has no valid ending and sends the controller back to FLAG.
//
// The canonical tables, the one-bit-per-cycle input and the three-stream controller follow
// the prototype; the raw flag bit, the token format and the table index convention are this
// design's own choices.
module huffman_decoder
  import mlx_pkg::*;
#(
  parameter int unsigned MAX_CODE_LEN = 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bit_in,
  input  logic        bit_valid,
  // length-table port (shared index into MIN/MAX/BASE of the selected stream)
  output logic [3:0]  tab_addr,
  output stream_e     tab_sel,
  input  logic [15:0] qmin,
  input  logic [15:0] qmax,
  input  logic [15:0] qbase,
  // symbol-table port
  output logic [7:0]  sym_addr,
  output stream_e     sym_sel,
  input  logic [7:0]  qsym,
  // token output to the literal/offset and length FIFOs
  output logic        tok_wr,
  output logic        tok_match,
  output logic [7:0]  tok_lit_off,
  output logic [8:0]  tok_run_len,
  output logic        code_error      // pulse: no code ended within MAX_CODE_LEN bits
);

  typedef enum logic [1:0] {S_FLAG, S_LIT, S_OFF, S_LEN} state_e;

  state_e      st, st_n;
  logic [3:0]  len, len_n;            // bits of the current code already received
  logic [15:0] code, code_n;
  logic [15:0] cand;                  // code including this cycle's bit
  logic        hit;
  logic        pend_v;                // a symbol read is in flight
  stream_e     pend_t;
  logic [7:0]  off_hold;              // offset symbol waiting for its length

  assign cand = {code[14:0], bit_in};
  assign hit  = bit_valid && (st != S_FLAG) && (cand < qmax);

  always_comb begin
    unique case (st)
      S_OFF:   tab_sel = STRM_OFF;
      S_LEN:   tab_sel = STRM_LEN;
      default: tab_sel = STRM_LIT;
    endcase
  end

  always_comb begin
    st_n       = st;
    len_n      = len;
    code_n     = code;
    code_error = 1'b0;
    if (bit_valid) begin
      if (st == S_FLAG) begin
        st_n   = bit_in ? S_OFF : S_LIT;
        len_n  = '0;
        code_n = '0;
      end else if (hit) begin
        st_n   = (st == S_OFF) ? S_LEN : S_FLAG;
        len_n  = '0;
        code_n = '0;
      end else if (32'(len) + 1 >= MAX_CODE_LEN) begin
        st_n       = S_FLAG;
        len_n      = '0;
        code_n     = '0;
        code_error = 1'b1;
      end else begin
        len_n  = len + 1'b1;
        code_n = cand;
      end
    end
  end

  assign tab_addr = rst ? 4'd0 : len_n;
  assign sym_addr = 8'(qbase + (cand - qmin));
  assign sym_sel  = pend_t;

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_FLAG;
      len    <= '0;
      code   <= '0;
      pend_v <= 1'b0;
      pend_t <= STRM_LIT;
    end else begin
      st     <= st_n;
      len    <= len_n;
      code   <= code_n;
      pend_v <= hit;
      if (hit) pend_t <= tab_sel;
    end
  end

  // The symbol word arrives one cycle after the code completed.
  always_ff @(posedge clk) begin
    if (rst) off_hold <= '0;
    else if (pend_v && pend_t == STRM_OFF) off_hold <= qsym;
  end

  always_comb begin
    tok_wr      = pend_v && (pend_t != STRM_OFF);
    tok_match   = (pend_t == STRM_LEN);
    tok_lit_off = (pend_t == STRM_LEN) ? off_hold : qsym;
    tok_run_len = (pend_t == STRM_LEN) ? ({1'b0, qsym} + 9'd1) : 9'd0;
  end

endmodule
