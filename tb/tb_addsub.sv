// tb_addsub: checks the 32-bit ripple adder/subtractor against arithmetic on
// 33-bit and signed 64-bit values: sum, carry out and signed overflow, for
// directed corner cases and random operands, in both modes.
module tb_addsub;
  localparam int N = 32;
  logic [N-1:0] a, b, sum;
  logic         sub, carry_out, overflow;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  addsub #(.N(N)) dut (.a, .b, .sub, .sum, .carry_out, .overflow);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y, input logic s);
    logic [N:0]      wide;
    longint          sx, sy, sr;
    logic            exp_ovf;
    a = x; b = y; sub = s;
    #1;
    wide = s ? ({1'b0, x} + {1'b0, ~y} + (N+1)'(1)) : ({1'b0, x} + {1'b0, y});
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    sr = s ? sx - sy : sx + sy;
    exp_ovf = (sr > longint'(2**(N-1) - 1)) || (sr < -longint'(2**(N-1)));
    checks++;
    if (sum !== wide[N-1:0] || carry_out !== wide[N] || overflow !== exp_ovf) begin
      failures++;
      $display("FAIL %h %s %h: got sum=%h c=%b v=%b, want sum=%h c=%b v=%b",
               x, s ? "-" : "+", y, sum, carry_out, overflow, wide[N-1:0], wide[N], exp_ovf);
    end
    if (overflow) n_ovf++;
  endtask

  initial begin
    check(32'h7fffffff, 32'h00000001, 1'b0);   // positive overflow
    check(32'h80000000, 32'hffffffff, 1'b0);   // negative overflow
    check(32'h80000000, 32'h00000001, 1'b1);   // negative overflow on subtract
    check(32'h7fffffff, 32'hffffffff, 1'b1);   // positive overflow on subtract
    check(32'h00000005, 32'h00000005, 1'b1);   // zero difference
    check(32'h00000000, 32'h00000001, 1'b1);   // borrow
    check(32'hffffffff, 32'h00000001, 1'b0);   // carry out, no overflow
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    if (n_ovf == 0) begin
      failures++;
      $display("FAIL overflow never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
