// tb_d_flip_flop: checks that q takes d at each rising edge, holds between
// edges, and loads the reset value when rst is 1 at the edge, for both reset
// values.
module tb_d_flip_flop;
  logic clk = 0, rst, d, q0, q1;
  logic m0, m1;
  int checks = 0, failures = 0;

  d_flip_flop #(.RESET_VALUE(1'b0)) dut0 (.clk, .rst, .d, .q(q0));
  d_flip_flop #(.RESET_VALUE(1'b1)) dut1 (.clk, .rst, .d, .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 0;
    @(posedge clk); #1;
    m0 = 0; m1 = 1;
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 19) == 0); d = 1'($urandom);
      #2;
      checks++;
      if (q0 !== m0 || q1 !== m1) begin failures++; $display("FAIL q changed between edges"); end
      @(posedge clk); #1;
      m0 = rst ? 1'b0 : d;
      m1 = rst ? 1'b1 : d;
      checks++;
      if (q0 !== m0 || q1 !== m1) begin
        failures++;
        $display("FAIL cycle %0d rst=%b d=%b: q=%b%b want %b%b", i, rst, d, q0, q1, m0, m1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
