// extender: widens the 16-bit immediate field to 32 bits.
//
// With ext_op = 0 the upper 16 bits are zero (ZeroExt, used by ori); with
// ext_op = 1 they are copies of bit 15 (SignExt, used by lw, sw, beq and
// slti). Purely combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,   // 1: sign-extend, 0: zero-extend
  output logic [31:0] imm32
);
  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};
endmodule
