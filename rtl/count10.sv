// count10: the writer-interface address counter (10 bits for a 1024-column mirror row).
//
// Counts up by one on every clock edge with inc high, wraps at 2^WIDTH, and returns to zero
// on clr. The framer pulses clr when it finds the start bytes of a frame, so the first data
// byte of every frame is written to column 0; inc is the "byte written" strobe, which stays
// low while the datapath is stalled (the counter's stall enable). clr wins over inc. The
// same module, reset by the Mirror_Reset pin, steps the readout address of the mirror memory.
module count10 #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clr) count <= '0;
    else if (inc)   count <= count + 1'b1;
  end

endmodule
