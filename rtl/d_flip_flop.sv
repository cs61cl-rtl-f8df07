// d_flip_flop: one-bit D-type flip-flop with synchronous reset.
//
// q takes d at every rising clock edge (one clock-to-Q later); d must be
// stable for the setup time before the edge and the hold time after it. rst,
// active high and sampled at the edge, loads RESET_VALUE instead; the reset
// is this design's addition. en_register is built from N of these.
module d_flip_flop #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,    // D, "data"
  output logic q     // Q, output
);
  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d;
  end
endmodule
