// mlx_tb_pkg: reference models shared by the testbenches of the writer-interface datapath.
//
// Independent of the RTL: builds canonical Huffman codes from a list of code lengths, LZ77-
// compresses a byte string greedily into literal and <distance, length> tokens, turns the
// tokens into the serial bit stream the chip expects (flag bit, then the literal code or
// the offset and length codes, each MSB first), decodes that bit stream back in software,
// and computes the frame CRC-8 bit by bit from the polynomial x^8 + x^2 + x + 1.
package mlx_tb_pkg;

  typedef struct {
    bit       match;
    bit [7:0] value;     // literal byte, or distance-1
    int       len;       // copy length (1..256) for a match
  } token_t;

  // A canonical Huffman code for one 256-symbol stream.
  class canon_code;
    int          clen [256];   // code length per symbol, 1..15
    int unsigned code [256];
    int unsigned mincode [16]; // index = length-1
    int unsigned maxcode [16];
    int unsigned base [16];
    bit [7:0]    symtab [256]; // symbols in canonical order

    // Four popular symbols get 3-bit codes, all others 9-bit codes (Kraft sum 0.992).
    function new(bit [7:0] pop0, bit [7:0] pop1, bit [7:0] pop2, bit [7:0] pop3);
      foreach (clen[s]) clen[s] = 9;
      clen[pop0] = 3; clen[pop1] = 3; clen[pop2] = 3; clen[pop3] = 3;
      build();
    endfunction

    // Assign canonical codes from clen (0 = symbol not used): codes of each length are
    // consecutive, in symbol order, and start where the previous length left off, doubled.
    function void build();
      int cnt [17];
      int idx;
      int unsigned c;
      foreach (cnt[l]) cnt[l] = 0;
      foreach (clen[s]) if (clen[s] > 0) cnt[clen[s]]++;
      foreach (symtab[i]) symtab[i] = 0;
      c   = 0;
      idx = 0;
      for (int l = 1; l <= 16; l++) begin
        if (l > 1) c = (c + cnt[l-1]) << 1;
        mincode[l-1] = c;
        maxcode[l-1] = c + cnt[l];
        base[l-1]    = idx;
        for (int s = 0; s < 256; s++) if (clen[s] == l) begin
          code[s]     = c + (idx - base[l-1]);
          symtab[idx] = 8'(s);
          idx++;
        end
      end
    endfunction
  endclass

  // Greedy LZ77 with a window of `window` bytes and copies of 3..256 bytes.
  function automatic void lz_compress(input bit [7:0] data [$], input int window,
                                      output token_t toks [$]);
    int i, n;
    toks = {};
    n = data.size();
    i = 0;
    while (i < n) begin
      int best_len, best_d;
      best_len = 0;
      best_d   = 0;
      for (int d = 1; d <= window && d <= i; d++) begin
        int l;
        l = 0;
        while (l < 256 && i + l < n && data[i+l] == data[i+l-d]) l++;
        if (l > best_len) begin
          best_len = l;
          best_d   = d;
        end
      end
      if (best_len >= 3) begin
        toks.push_back('{match: 1'b1, value: 8'(best_d - 1), len: best_len});
        i += best_len;
      end else begin
        toks.push_back('{match: 1'b0, value: data[i], len: 0});
        i++;
      end
    end
  endfunction

  function automatic void put_code(ref bit bits [$], input int unsigned c, input int l);
    for (int b = l - 1; b >= 0; b--) bits.push_back(c[b]);
  endfunction

  // Serialise tokens: flag, then literal code, or offset code and length code.
  function automatic void encode(input token_t toks [$], input canon_code lit,
                                 input canon_code off, input canon_code len,
                                 ref bit bits [$]);
    foreach (toks[t]) begin
      if (!toks[t].match) begin
        bits.push_back(1'b0);
        put_code(bits, lit.code[toks[t].value], lit.clen[toks[t].value]);
      end else begin
        bits.push_back(1'b1);
        put_code(bits, off.code[toks[t].value], off.clen[toks[t].value]);
        put_code(bits, len.code[toks[t].len-1], len.clen[toks[t].len-1]);
      end
    end
  endfunction

  // Expand tokens in software (the model the LZ hardware is checked against).
  function automatic void lz_expand(input token_t toks [$], ref bit [7:0] out [$]);
    foreach (toks[t]) begin
      if (!toks[t].match) out.push_back(toks[t].value);
      else for (int k = 0; k < toks[t].len; k++) out.push_back(out[out.size() - 1 - toks[t].value]);
    end
  endfunction

  // Bit-serial CRC-8, x^8 + x^2 + x + 1, initial value 0, MSB first.
  function automatic bit [7:0] crc8_ref(input bit [7:0] data [$]);
    bit [7:0] r;
    r = 0;
    foreach (data[i]) for (int b = 7; b >= 0; b--) begin
      bit fb;
      fb = r[7] ^ data[i][b];
      r  = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r;
  endfunction

  // A framed stream: "maskless", payload, CRC (optionally corrupted), then `pad` zero
  // bytes so that the frame's last bytes are pushed out of the LZ array.
  function automatic void make_frame(input bit [7:0] payload [$], input bit bad_crc,
                                     input int pad, ref bit [7:0] frame [$]);
    bit [7:0] start [8] = '{"m", "a", "s", "k", "l", "e", "s", "s"};
    bit [7:0] c;
    foreach (start[i]) frame.push_back(start[i]);
    foreach (payload[i]) frame.push_back(payload[i]);
    c = crc8_ref(payload);
    frame.push_back(bad_crc ? ~c : c);
    for (int i = 0; i < pad; i++) frame.push_back(8'h00);
  endfunction

  // Test payload: readable text with repeats, some random bytes and a long run.
  function automatic void make_payload(input int nbytes, input int seed, ref bit [7:0] p [$]);
    string txt;
    int    s;
    txt = "This is a longer, more repetitive test message for the mirror array. ";
    s   = seed;
    p   = {};
    while (p.size() < nbytes) begin
      s = s * 1103515245 + 12345;
      case ((s >>> 16) & 3)
        0, 1: for (int i = 0; i < txt.len() && p.size() < nbytes; i++) p.push_back(txt[i]);
        2:    for (int i = 0; i < 20 && p.size() < nbytes; i++) begin
                s = s * 1103515245 + 12345;
                p.push_back(8'(s >>> 16));
              end
        default: for (int i = 0; i < 300 && p.size() < nbytes; i++) p.push_back(8'(seed));
      endcase
    end
  endfunction

endpackage
