// en_register: N-bit register with a write enable, built of N D flip-flops.
//
// Each bit is a d_flip_flop whose D input is a 2:1 choice between the new
// data bit and its own output: when we (Write Enable) is 1 at a rising clock
// edge, q takes d; when we is 0, q keeps its value. Output q changes only after
// a rising edge (one clock-to-Q later). The N flip-flop structure and the write
// enable follow the register building block; the synchronous, active-high rst
// that loads RESET_VALUE is this design's addition.
module en_register #(
  parameter int unsigned      N           = 32,
  parameter logic [N-1:0]     RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,   // synchronous reset, active high
  input  logic         we,    // Write Enable
  input  logic [N-1:0] d,     // Data In
  output logic [N-1:0] q      // Data Out
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    logic d_i;
    assign d_i = we ? d[i] : q[i];
    d_flip_flop #(.RESET_VALUE(RESET_VALUE[i])) u_ff (
      .clk(clk), .rst(rst), .d(d_i), .q(q[i])
    );
  end
endmodule
