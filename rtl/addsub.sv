// addsub: N-bit ripple-carry adder/subtractor with signed overflow detection.
//
// N one-bit full adders are chained carry-out to carry-in. Each b input passes
// through an XOR with the sub control, which acts as a conditional inverter,
// and sub also drives the carry into bit 0, so sub=1 computes a + ~b + 1 =
// a - b in two's complement. Signed overflow is the XOR of the carries into
// and out of the top bit (c_n xor c_{n-1}). carry_out is c_n; for a
// subtraction it is 1 when no borrow occurred. Purely combinational.
// All of this follows the adder/subtractor construction; the port names are
// this design's own.
module addsub #(
  parameter int unsigned N = 32   // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,       // 0: a + b, 1: a - b
  output logic [N-1:0] sum,
  output logic         carry_out, // c_n
  output logic         overflow   // c_n xor c_{n-1}
);
  logic [N:0]   c;     // c[i] is the carry into bit i
  logic [N-1:0] b_x;   // b after the conditional inverter

  assign c[0] = sub;

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign b_x[i] = b[i] ^ sub;
    full_adder u_fa (
      .a   (a[i]),
      .b   (b_x[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign carry_out = c[N];
  assign overflow  = c[N] ^ c[N-1];
endmodule
