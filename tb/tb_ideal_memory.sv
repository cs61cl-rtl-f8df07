// tb_ideal_memory: random writes and reads on a 256-word instance, checked
// against an array model. Reads must be combinational (data valid without a
// clock edge), writes take effect at the rising edge only when we = 1, and the
// two low byte-address bits are ignored.
module tb_ideal_memory;
  localparam int AW = 8;
  logic clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  ideal_memory #(.W(32), .AW(AW)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) model[i] = '0;
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < 4000; i++) begin
      logic [AW-1:0] idx;
      we = (i < 300) ? 1'b1 : 1'($urandom);
      addr = $urandom; din = $urandom;
      idx = addr[AW+1:2];
      #1;
      checks++;
      if (dout !== model[idx]) begin
        failures++;
        $display("FAIL read addr=%h got %h want %h", addr, dout, model[idx]);
      end
      @(posedge clk); #1;
      if (we) model[idx] = din;
      we = 0;
      #1;
      checks++;
      if (dout !== model[idx]) begin
        failures++;
        $display("FAIL after write addr=%h got %h want %h", addr, dout, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
