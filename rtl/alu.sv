// alu: 32-bit ALU for the MIPS-lite datapath.
//
// Operations: add and subtract (both through one addsub ripple adder/
// subtractor), bitwise OR and AND, and signed set-less-than. SLT subtracts
// B from A and takes the sign of the true difference, which is the sign bit
// of the result XOR the overflow flag. zero is 1 when the result is all
// zeros; with the SUB operation it is the equality test used by beq.
// overflow reports the adder's signed overflow for ADD and SUB (0 otherwise);
// the unsigned MIPS instructions built here ignore it.
// Operation set and zero test follow the ALU requirements of MIPS-lite plus
// the AND and SLT additions; the ALUctr encoding (mips_pkg::alu_op_e) is this
// design's own. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      op,       // ALUctr
  output logic [N-1:0] result,
  output logic         zero,     // result == 0
  output logic         overflow  // signed overflow of ADD/SUB
);
  logic [N-1:0] sum;
  logic         cout, ovf;
  logic         do_sub;

  assign do_sub = (op == ALU_SUB) || (op == ALU_SLT);

  addsub #(.N(N)) u_addsub (
    .a        (a),
    .b        (b),
    .sub      (do_sub),
    .sum      (sum),
    .carry_out(cout),
    .overflow (ovf)
  );

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {{(N-1){1'b0}}, sum[N-1] ^ ovf};
      default:          result = sum;
    endcase
  end

  assign zero     = (result == '0);
  assign overflow = ((op == ALU_ADD) || (op == ALU_SUB)) ? ovf : 1'b0;

  logic unused_cout;
  assign unused_cout = cout;
endmodule
