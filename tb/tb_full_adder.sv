// tb_full_adder: exhaustive check of the one-bit full adder against the
// truth table of a + b + cin (sum = bit 0, carry = bit 1 of the 2-bit total).
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .cin, .s, .cout);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] total;
      {a, b, cin} = 3'(i);
      total = 2'(a) + 2'(b) + 2'(cin);
      #1;
      checks++;
      if ({cout, s} !== total) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: got c=%0b s=%0b, want %02b", a, b, cin, cout, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
