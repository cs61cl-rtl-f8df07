// tb_regfile: random reads and writes on the 32 x 32-bit register file,
// checked against an array model. Checks both read ports each cycle, that
// reads are combinational (valid before the edge), that a write only shows
// after the edge, and that register 0 reads zero whatever is written to it.
module tb_regfile;
  logic clk = 0, rst, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32), .W(32)) dut (.clk, .rst, .we, .rw, .bus_w, .ra, .rb, .bus_a, .bus_b);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; bus_w = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); rw = 5'($urandom); bus_w = $urandom;
      ra = 5'($urandom); rb = (i % 4 == 0) ? rw : 5'($urandom);
      #1;
      checks++;
      if (bus_a !== model[ra] || bus_b !== model[rb]) begin
        failures++;
        $display("FAIL read ra=%0d rb=%0d: %h %h want %h %h", ra, rb, bus_a, bus_b, model[ra], model[rb]);
      end
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = bus_w;
    end
    // register 0 stays zero
    we = 1; rw = 0; bus_w = 32'hdeadbeef; ra = 0; rb = 0;
    @(posedge clk); #1;
    checks++;
    if (bus_a !== 0 || bus_b !== 0) begin failures++; $display("FAIL r0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
