// tb_mux2: checks that the 32-bit multiplexer passes a when sel = 0 and b when
// sel = 1, on random data, and a 5-bit instance used for register selection.
module tb_mux2;
  logic [31:0] a, b, y;
  logic [4:0]  a5, b5, y5;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut   (.a, .b, .sel, .y);
  mux2 #(.W(5))  dut5  (.a(a5), .b(b5), .sel, .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; a5 = 5'($urandom); b5 = 5'($urandom); sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? b : a) || y5 !== (sel ? b5 : a5)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
