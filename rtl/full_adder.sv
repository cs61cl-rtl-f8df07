// full_adder: one-bit full adder.
//
// The sum is the three-input XOR of a, b and the carry in; the carry out is
// the majority of the three inputs, a*b + a*c + b*c. Both equations are the
// ones given for the one-bit adder cell; chaining N of these cells gives an
// N-bit ripple-carry adder (see addsub). Purely combinational.
module full_adder (
  input  logic a,     // operand bit a_i
  input  logic b,     // operand bit b_i
  input  logic cin,   // carry in c_i
  output logic s,     // sum bit s_i
  output logic cout   // carry out c_{i+1}
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
