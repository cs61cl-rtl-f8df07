// tb_en_register: checks the enabled register cycle by cycle against a model:
// q takes d at a rising edge only when we = 1, holds otherwise, and loads the
// reset value on rst. Also checks q does not change between edges.
module tb_en_register;
  localparam int N = 32;
  localparam logic [N-1:0] RV = 32'h0040_0000;
  logic clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;

  en_register #(.N(N), .RESET_VALUE(RV)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    model = RV;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset value %h", q); end
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      logic [N-1:0] q_prev;
      we = 1'($urandom); d = $urandom; rst = ($urandom_range(0, 49) == 0);
      #2;
      q_prev = q;
      checks++;
      if (q_prev !== model) begin failures++; $display("FAIL q changed without an edge"); end
      @(posedge clk); #1;
      if (rst) model = RV; else if (we) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d we=%b rst=%b d=%h: q=%h want %h", i, we, rst, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
