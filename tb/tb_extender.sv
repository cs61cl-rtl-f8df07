// tb_extender: checks zero extension (ext_op = 0) and sign extension
// (ext_op = 1) of the 16-bit immediate for every value of imm16.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i += 7) begin
      for (int m = 0; m < 2; m++) begin
        logic [31:0] want;
        imm16 = 16'(i); ext_op = 1'(m);
        #1;
        want = m ? 32'($signed(imm16)) : {16'h0, imm16};
        checks++;
        if (imm32 !== want) begin
          failures++;
          $display("FAIL imm16=%h ext_op=%b got %h want %h", imm16, ext_op, imm32, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
