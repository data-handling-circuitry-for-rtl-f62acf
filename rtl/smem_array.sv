// smem_array: systolic Lempel-Ziv history lookup (the SMEM vector), CELLS cells long.
//
// Tokens from the runlength decoder enter at cell CELLS-1 and leave from cell 0 one cell per
// advance; the byte leaving cell 0 is the decompressed output and is also fed back into the
// reverse registers, which carry it back towards cell CELLS-1. A literal rides through
// unchanged. A copy token with distance d (1 <= d <= 2*CELLS, carried as d-1) meets the
// output byte written d positions earlier in cell (d-1)/2 and picks it up there, so every
// token leaves as a plain byte, including copies that overlap the bytes they produce.
// The history window is therefore 2*CELLS bytes (256 for the prototype's 128 cells).
//
// Timing: a token given on fdata_in/copy_in with adv high appears on fdata_out after CELLS
// advances; out_valid marks the cycle after each advance, when fdata_out holds a new byte.
// With adv low the whole array, forward and reverse, holds still (stall).
module smem_array #(
  parameter int unsigned CELLS = 128,
  localparam int unsigned IDW  = $clog2(CELLS),
  localparam int unsigned OW   = IDW + 1,        // distance-1 width
  localparam int unsigned FW   = (OW > 8) ? OW : 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          adv,
  input  logic [FW-1:0] fdata_in,
  input  logic          copy_in,
  output logic [7:0]    fdata_out,
  output logic          out_valid
);

  // index k: cell k; f[k+1]/c[k+1] are cell k's forward inputs, r[k] its reverse output.
  logic [FW-1:0] f [CELLS+1];
  logic          c [CELLS+1];
  logic [7:0]    r [CELLS];

  assign f[CELLS] = fdata_in;
  assign c[CELLS] = copy_in;

  for (genvar k = 0; k < CELLS; k++) begin : g_cell
    logic [7:0] rin;
    if (k == 0) begin : g_first
      assign rin = f[0][7:0];
    end else begin : g_rest
      assign rin = r[k-1];
    end
    smem_cell #(.IDW(IDW), .FW(FW)) u_cell (
      .clk      (clk),
      .rst      (rst),
      .adv      (adv),
      .mem_id   (IDW'(k)),
      .fdata_in (f[k+1]),
      .copy_in  (c[k+1]),
      .rdata_in (rin),
      .fdata_out(f[k]),
      .copy_out (c[k]),
      .rdata_out(r[k])
    );
  end

  assign fdata_out = f[0][7:0];

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= adv;
  end

endmodule
