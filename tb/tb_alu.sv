// tb_alu: checks every ALU operation (ADD, SUB, OR, AND, SLT) against a
// reference computed with SystemVerilog operators, including the zero flag
// and the overflow flag, on directed and random operands.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero, overflow;
  int checks = 0, failures = 0;

  alu #(.N(32)) dut (.a, .b, .op, .result, .zero, .overflow);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input alu_op_e o);
    logic [31:0] r;
    logic        v;
    longint      sr;
    a = x; b = y; op = o;
    #1;
    v = 1'b0;
    case (o)
      ALU_ADD: begin r = x + y; sr = longint'($signed(x)) + longint'($signed(y)); v = sr != longint'($signed(r)); end
      ALU_SUB: begin r = x - y; sr = longint'($signed(x)) - longint'($signed(y)); v = sr != longint'($signed(r)); end
      ALU_OR:  r = x | y;
      ALU_AND: r = x & y;
      ALU_SLT: r = ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: r = 'x;
    endcase
    checks++;
    if (result !== r || zero !== (r == 0) || overflow !== v) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: got %h z=%b v=%b, want %h z=%b v=%b",
               o.name(), x, y, result, zero, overflow, r, r == 0, v);
    end
  endtask

  initial begin
    alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    // SLT across the overflow boundary, and equality via SUB
    check(32'h80000000, 32'h00000001, ALU_SLT);
    check(32'h7fffffff, 32'hffffffff, ALU_SLT);
    check(32'hffffffff, 32'h00000001, ALU_SLT);
    check(32'h00000011, 32'h00000011, ALU_SLT);
    check(32'h12345678, 32'h12345678, ALU_SUB);
    check(32'h7fffffff, 32'h00000001, ALU_ADD);
    check(32'h00000000, 32'h00000000, ALU_OR);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = ($urandom_range(0, 3) == 0) ? x : $urandom;
      check(x, y, ops[$urandom_range(0, 4)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
