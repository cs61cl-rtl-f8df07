// mux2: W-bit two-input multiplexer, the datapath's selector building block.
//
// y follows a when sel is 0 and b when sel is 1. The datapath uses it to pick
// the register written (rt or rd), the ALU's B operand (busB or the extended
// immediate), the write-back value (ALU result or memory data) and the next
// PC. Purely combinational. Width W defaults to the 32 bits of the datapath.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,    // selected when sel = 0
  input  logic [W-1:0] b,    // selected when sel = 1
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? b : a;
endmodule
