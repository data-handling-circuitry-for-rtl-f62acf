# Mirror-array writer interface with on-chip LZ + Huffman decompression

A maskless lithography tool draws a chip layer by flashing light onto the wafer from a large array of
micro-mirrors. Each mirror is tilted on or off by one bit stored in a memory cell underneath it. A
whole wafer layer in a minute means tens of terabits per second of pixel data. No set of pins can
bring that much onto one chip. So the image is sent compressed: first Lempel-Ziv, then Huffman. The
chip under the mirrors decompresses it in many parallel rows and writes the result straight into the
mirror memory.

This repository is synthesizable SystemVerilog for the scaled-down test chip of that architecture:

* 8 independent decompression paths, each taking **one compressed bit per clock** and writing
  **up to one byte per clock** into its own 1024 x 8 mirror memory row. Together that is a
  64 x 1024 mirror array.
* Each path: canonical Huffman decoder with a stream controller -> two 256-entry FIFOs ->
  runlength decoder -> 128-cell systolic LZ array -> framer with CRC-8 -> address counter ->
  mirror SRAM.
* Grey levels use a thermometer code. Each 5-bit grey value is sent as 31 successive one-bit
  frames, so every stored bit drives one mirror for one flash. No conversion happens on chip. The
  bytes coming out of the decompressor are the mirror bits themselves, eight rows at a time.
* Single clock, synchronous active-high reset.

The top is `mirror_chip`. Its sizes are parameters: `NUM_PATHS` = 8, `SMEM_CELLS` = 128,
`FRAME_BYTES` = 1024 and `FIFO_DEPTH` = 256.

## One decompression path

```
 bit_in ─► huffman_decoder ──tok_wr──► sync_fifo (8 bit: literal / distance-1) ─┐
            ▲  tab/sym reads     └────► sync_fifo (10 bit: match, run length)  ─┤
            │                            flow_detect (level: empty / 90 % full) │
      huffman_tables                                                            ▼
   (9 x 16x16 + 3 x 256x8,               stream_decoder (runlength) ◄───────────┘
    loaded from the pins)                         │ byte or distance, copy flag
                                                  ▼
                                        smem_array (128 x smem_cell)
                                                  │ decoded byte
                                                  ▼
                              framer (start bytes, CRC-8) ──we──► mirror_sram[count10]
```

`decompress_path.sv` wires this up. The files are one module each:

| Module | Role |
|---|---|
| `mirror_chip` | top: 8 paths, table-load broadcast, overflow OR, readout mux, flash_ready |
| `decompress_path` | one row, as drawn above |
| `huffman_decoder` | bit-serial canonical decoder + literal/offset/length controller FSM |
| `huffman_tables` | table memories of one path, load address, write decoder, stream muxes |
| `sram` | synchronous single-port RAM (16x16 and 256x8 tables) |
| `decode_4_16` | one-hot decode of the 4-bit table select |
| `mux3` | 3:1 stream multiplexer |
| `sync_fifo` | 256-entry first-word-fall-through FIFO |
| `flow_detect` | FIFO level detector: empty and within 10 % of full |
| `stream_decoder` | runlength decoder: expands a match into one copy token per byte |
| `smem_cell`, `smem_array` | systolic LZ history array |
| `framer` | start-byte search, frame length, CRC-8 check |
| `count10` | 10-bit write address counter with clear and stall |
| `mirror_sram` | 1024 x 8 mirror memory, one write and one read port |
| `mlx_pkg` | shared constants: start bytes, CRC polynomial, stream/table enums, CRC function |

## The compressed bit stream

A path's input is a sequence of LZ tokens with no gaps:

```
literal : 0  <literal code>
match   : 1  <offset code>  <length code>
```

* The first bit is a plain, uncoded flag.
* The three codes are canonical Huffman codes, each with its own table set. Literals, offsets and
  lengths have very different statistics, so each stream gets its own code.
* The offset symbol is `distance - 1`. The distance is 1..256, counted back from the byte
  being produced.
* The length symbol is `run length - 1`. A match copies 1..256 bytes.
* A match may overlap the bytes it produces: distance 1 with length 20 repeats the last byte
  20 times.

The uncompressed byte sequence of one frame is:

```
"maskless" (8 bytes, 'm' first) | FRAME_BYTES data bytes | CRC-8 of the data bytes
```

Anything before the start bytes is thrown away. That includes the history-fill bytes described in
the LZ section.

## Canonical Huffman decoding

For every stream and every code length L (1..16), three 16-bit tables hold:

* `MIN[L]`: the first code of length L.
* `MAX[L]`: one past the last code of length L. It equals `MIN[L]` if no code has that length.
* `BASE[L]`: the index in the 256-entry symbol table of the first code of length L.

Codes are built in the usual canonical way: `MIN[L+1] = MAX[L] << 1`. The decoder shifts one bit
per cycle into a code register. After L bits the code is complete exactly when `code < MAX[L]`.
The symbol is then `SYM[BASE[L] + code - MIN[L]]`. A small example, with symbol A coded as `0`,
B as `10` and C/D as `110`/`111`:

| L | MIN (binary) | MAX (binary) | BASE |
|---|-----|------|------|
| 1 | 0   | 1    | 0    |
| 2 | 10  | 11   | 1    |
| 3 | 110 | 1000 | 2    |

With symbol table A, B, C, D, the bits `110` fail the tests at L=1 (1 < 1 is false) and L=2
(11 < 11 is false). They pass at L=3, giving SYM[2 + 110 - 110] = C. `tb_huffman_decoder` uses
an eight-symbol code: A = `0`, B = `100` and C..H = `1010`..`1111`. Its (MIN, MAX) rows for
L = 1..4 are (0, 1), (10, 10), (100, 101) and (1010, 10000). It decodes "ABAAACAADAAA" from the
20 bits of that code.

**Timing.** The tables are synchronous SRAMs.

* The decoder drives `tab_addr` = (length of the code after the next bit) - 1, one cycle ahead.
  The MIN/MAX/BASE words are therefore waiting when that bit arrives.
* When a code completes, the symbol-table read is issued in the same cycle.
* The symbol is used one cycle later. So a literal token reaches the FIFOs one cycle after its
  last code bit.
* A match token is written one cycle after the last bit of its length code. The offset symbol is
  held until then.
* Decoding never stalls the input: one bit per cycle, always.
* Codes longer than `MAX_CODE_LEN` = 15 bits cannot be represented, because `MAX` of a 16-bit code
  would need 17 bits. Such a code raises `code_error` for one cycle, and the decoder restarts at
  a flag bit.

**Loading the tables.** Every path has 9 length tables (16 x 16) and 3 symbol tables (256 x 8). All
paths are loaded at once from the `load`, `we_sel` and `load_data` pins:

* Raise `load` and hold `we_sel` at the code of one memory.
* Give one word per cycle on `load_data`. The words go to addresses 0, 1, 2, ...
* Drop `load` for at least one cycle before the next memory. The address counter clears while
  `load` is low.

| `we_sel` | memory |
|---|---|
| 0, 1, 2 | literal MIN, MAX, BASE |
| 3, 4, 5 | offset MIN, MAX, BASE |
| 6, 7, 8 | length MIN, MAX, BASE |
| 9, 10, 11 | literal, offset, length symbol table (`load_data[7:0]`) |

Index L-1 of a length table holds the entry for code length L. The testbench package
`tb/mlx_tb_pkg.sv` has a class `canon_code` that builds such tables from a list of code
lengths. It also has the matching encoder.

## Runlength decoder and the FIFOs

The Huffman decoder and the LZ array run at changing and different rates. The Huffman decoder
emits a token every 2 to ~31 cycles. The LZ array consumes one token per output byte, and a
match gives up to 256 bytes. Two 256-entry FIFOs sit between them:

* An 8-bit FIFO holds the literal or `distance - 1`.
* A 10-bit FIFO holds `{match, run length[8:0]}`.

Both FIFOs are written by the same strobe and popped together, so they always hold the same
number of entries. `flow_detect` follows that number from the two strobes:

* **Empty** (underflow). The runlength decoder, the LZ array, the framer and the address counter
  all hold their state: every one of their flip-flops has a stall enable. The LZ array moves
  only when a real token is fed in, so stalling cannot corrupt the history.
* **Level at or above 231 of 256** (within 10 % of full). This drives the chip's `overflow` pin.
  The source must then stop sending (`data_valid` low) until it falls again. Writing a full FIFO
  loses the token, and an assertion in `decompress_path` reports it.

The runlength decoder (`stream_decoder`) pops a literal and passes it on in one cycle. For a match
it sends `distance - 1` with the copy flag set for `run length` cycles, then pops. Its output rate
is one token per cycle whenever the FIFO is not empty, so a 256-byte match takes exactly 256
cycles.

## Systolic LZ decoding (the SMEM array)

A conventional LZ decoder keeps the last N output bytes in a RAM and reads `history[now - d]` for
every copied byte. That needs a wide random-access read every cycle. The systolic array replaces it
with 128 identical cells that talk only to their neighbours:

```
 token in ──► cell 127 ──► cell 126 ──► ... ──► cell 1 ──► cell 0 ──►─┬─► decoded byte out
  (forward)                                                           │
              ◄── r ◄──────── r ◄── ... ◄───────── r ◄────────── r ◄──┘  (reverse: output fed back)
```

* Tokens move **forward** (towards cell 0) one cell per advance. A literal is a byte with copy=0.
  A copy token carries `d - 1` with copy=1.
* Every byte that leaves cell 0 is the decompressed output. It is also fed into the **reverse**
  chain, which moves the other way, one cell per advance.
* Because the two streams move in opposite directions, the gap between a forward token and a
  reverse byte closes by two positions per advance. So a forward token meets every earlier output
  byte exactly once. It meets the byte output d places before itself in cell `(d-1) >> 1`:
  * In the **incoming reverse wire** of that cell when `d-1` is even.
  * In the cell's **own reverse register** when `d-1` is odd.

  That is why 128 cells cover distances 1..256, and why the history window is `2 * SMEM_CELLS`
  bytes.
* A cell holds 17 flip-flops: 8 forward data bits, 1 copy bit and 8 reverse data bits. It has a
  comparator of `d-1` bits [7:1] against its own index, and two 2:1 muxes.
  * If the token is a copy and the index matches, the cell replaces the token's data with the
    selected history byte (bit 0 of `d-1` chooses the wire or the register) and clears the copy
    bit.
  * From then on the token is an ordinary byte.
* Overlapping copies work with no special case. A token with d = 1 is the byte directly behind
  the previous token. It meets that byte in cell 0, right after the byte has been resolved and
  has left the array.

Worked example, from the usual textbook case: the tokens `A B C D E F G <d=3,len=2> <d=4,len=2> A B C`
expand to `ABCDEFGEFFGABC`. `tb_smem_array` checks it and also random streams against a software
LZ expander.

**Timing.** A token appears on `fdata_out` after `SMEM_CELLS` advances. The advance is the
runlength decoder's `adv`, high in every cycle it hands over a token. The array only advances when
fed, so the last bytes of a frame leave only when later tokens push them out. A source must
therefore follow a frame with at least `SMEM_CELLS` tokens, which are normally the next frame's
start bytes and data. After reset the array holds 127 zero bytes, which come out first and are
dropped by the framer.

**Stall.** All three registers of every cell load only when `adv` is high, so the forward and
reverse chains freeze together and their relative alignment is kept.

## Framing, CRC and the mirror memory

The `framer` watches the decoded bytes for the eight start bytes. When it finds them:

1. `sync_found` pulses and clears the write address counter (`count10`).
2. The next `FRAME_BYTES` bytes are written into the path's mirror SRAM at addresses 0, 1, 2, ...
   The counter advances only on written bytes, so it stalls with the array.
3. The following byte is compared against a CRC-8 computed over the data bytes:
   * generator x^8 + x^2 + x + 1 (0x07)
   * register starting at 0, MSB first
   * no final inversion
4. `frame_done` pulses. `crc_error` shows the result until the next start bytes.
5. The framer goes back to hunting for start bytes.

A software reference: for each data byte, `crc ^= byte`, then 8 times
`crc = crc[7] ? (crc << 1) ^ 0x07 : crc << 1`.

`flash_ready` is high when every path has finished a frame since its last start bytes and none of
those frames has a CRC error. That is the point where all rows are loaded and the light source may
fire. It drops when any path finds new start bytes.

The mirror memories can be read back for test:

* `mirror_reset` clears a shared 10-bit read address, which then counts up every cycle.
* `read_mirrors` picks a path.
* `mirror_data` is that path's byte at the address of the previous cycle.

## Pins of `mirror_chip`

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | the only clock |
| `rst` | in | 1 | synchronous reset, active high |
| `data_in` | in | 8 | one compressed bit per path |
| `data_valid` | in | 8 | `data_in` of that path is valid this cycle |
| `load` | in | 1 | Huffman table load enable |
| `we_sel` | in | 4 | table being loaded (see the table above) |
| `load_data` | in | 16 | table word |
| `read_mirrors` | in | 3 | path selected for readout |
| `mirror_reset` | in | 1 | restart the readout address at 0 |
| `mirror_data` | out | 8 | readout byte |
| `overflow` | out | 1 | some path's FIFO is within 10 % of full: pause the input |
| `sync_found` | out | 8 | start bytes found (pulse per path) |
| `frame_done` | out | 8 | CRC byte received (pulse per path) |
| `crc_error` | out | 8 | last frame of that path failed its CRC |
| `code_error` | out | 8 | a Huffman code ran past 15 bits |
| `flash_ready` | out | 1 | all paths hold a complete, CRC-clean frame |

## Where this RTL departs from the original test chip

* **FIFOs.** The original used a vendor asynchronous FIFO macro. Its write was on the falling edge
  of the write strobe, and reads and writes had to be kept apart with a delay line and a
  clock-phase gate. Here `sync_fifo` is an ordinary synchronous RTL FIFO that may read and write
  in the same cycle. The delay line and gate therefore have no counterpart.
* **Memories** are behavioural arrays with registered read data, not generator macros. The mirror
  memory has a separate read port for test readout. The write-only 5-transistor cell meant for
  under the mirrors is not modelled.
* **These are this design's own choices**, since the original does not spell them out:
  * the token format (raw flag bit, then codes)
  * the `distance - 1` and `length - 1` symbol mapping
  * the table layout and `we_sel` codes
  * the load protocol
  * the CRC initial value and coverage
  * the readout sequence
  * the extra status pins and `data_valid`
  * the exact 10 % threshold (231 of 256)
* **Full-scale chip not built.** The architecture targets a 70 nm chip with 1024 paths, a
  1024-byte history (512 cells), a 16,384 x 16,368 mirror array, 128 serial inputs at
  3.125 Gb/s with 1:8 demultiplexing, and banked parallel-load mirror SRAM. That chip is not
  built. `NUM_PATHS` and `SMEM_CELLS` scale, but a history beyond 256 bytes also needs wider
  offset symbols and offset tables than the 8-bit ones used here.
* **Rates.** The prototype aims at 100 MHz. With 8 paths at one byte per cycle that is 6.4 Gb/s
  out. The RTL reaches one byte per cycle per path while the FIFO has data. Since the input is one
  bit per cycle, that is sustained only at a compression ratio of 8 or more. No timing closure has
  been done.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops, and each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mlx_pkg.sv tb/mlx_tb_pkg.sv tb/tb_mirror_chip.sv --top-module tb_mirror_chip \
    --Mdir obj_tb_mirror_chip -o sim
./obj_tb_mirror_chip/sim
```

Replace `tb_mirror_chip` with any other `tb_<module>`.

* `tb_mirror_chip` runs the chip at its default parameters:
  * it loads the Huffman tables
  * it sends 10 frames of 1024 bytes, compressed in software, to all 8 paths; one frame has a
    corrupted CRC
  * it checks every mirror byte through the readout port, and checks `crc_error` and
    `flash_ready`
* It counts each mechanism and fails if any never happened: literals, copies, stalls on an empty
  FIFO, overflow warnings obeyed by the source, start-byte syncs, finished frames, CRC errors and
  flash-ready.
* It also requires a path to run at one byte per cycle for at least 256 cycles in a row. That is the
  per-path peak rate behind the 6.4 Gb/s figure.
* It takes well under a second.

`tb/mlx_tb_pkg.sv` holds the software model used by the testbenches. It contains a greedy LZ
compressor, a canonical Huffman code builder and encoder, an LZ expander, a bit-serial CRC-8 and a
frame builder. It can be reused to generate stimulus for new tests.

To change the design size, override the top's parameters. For example,
`mirror_chip #(.NUM_PATHS(4), .SMEM_CELLS(64))` gives a 128-byte history. The source must then
compress with that window.
