// tb_control: checks the main decoder's control points for every implemented
// instruction against a table written from the instruction definitions, and
// that unimplemented opcodes and funct codes write nothing and flag invalid.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.op, .funct, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_dst, reg_wr, ext_op, alu_src, mem_wr, mem_to_reg, branch, valid}, alu op
  task automatic expect_ctrl(input string name, input logic [5:0] o, input logic [5:0] f,
                             input logic [7:0] bits, input alu_op_e aop, input logic check_alu);
    logic [7:0] got;
    op = o; funct = f;
    #1;
    got = {ctrl.reg_dst, ctrl.reg_wr, ctrl.ext_op, ctrl.alu_src, ctrl.mem_wr,
           ctrl.mem_to_reg, ctrl.branch, ctrl.valid};
    checks++;
    // reg_dst and ext_op/alu_src do not matter when nothing uses them
    if (bits[6] == 1'b0 && bits[3] == 1'b0) got[7] = bits[7];
    if (got !== bits || (check_alu && ctrl.alu_ctr !== aop)) begin
      failures++;
      $display("FAIL %s: got %b alu=%0d, want %b alu=%0d", name, got, ctrl.alu_ctr, bits, aop);
    end
  endtask

  initial begin
    //                                  dst wr ext src mw m2r br v
    expect_ctrl("addu", 6'h00, 6'h21, 8'b1_1_0_0_0_0_0_1, ALU_ADD, 1);
    expect_ctrl("add",  6'h00, 6'h20, 8'b1_1_0_0_0_0_0_1, ALU_ADD, 1);
    expect_ctrl("subu", 6'h00, 6'h23, 8'b1_1_0_0_0_0_0_1, ALU_SUB, 1);
    expect_ctrl("and",  6'h00, 6'h24, 8'b1_1_0_0_0_0_0_1, ALU_AND, 1);
    expect_ctrl("or",   6'h00, 6'h25, 8'b1_1_0_0_0_0_0_1, ALU_OR,  1);
    expect_ctrl("slt",  6'h00, 6'h2a, 8'b1_1_0_0_0_0_0_1, ALU_SLT, 1);
    expect_ctrl("ori",  6'h0d, 6'h3f, 8'b0_1_0_1_0_0_0_1, ALU_OR,  1);
    expect_ctrl("slti", 6'h0a, 6'h00, 8'b0_1_1_1_0_0_0_1, ALU_SLT, 1);
    expect_ctrl("lw",   6'h23, 6'h21, 8'b0_1_1_1_0_1_0_1, ALU_ADD, 1);
    expect_ctrl("sw",   6'h2b, 6'h00, 8'b0_0_1_1_1_0_0_1, ALU_ADD, 1);
    expect_ctrl("beq",  6'h04, 6'h00, 8'b0_0_1_0_0_0_1_1, ALU_SUB, 1);
    // every other opcode / funct: no state change
    for (int o = 0; o < 64; o++) begin
      if (o inside {6'h00, 6'h04, 6'h0a, 6'h0d, 6'h23, 6'h2b}) continue;
      op = 6'(o); funct = 6'($urandom);
      #1;
      checks++;
      if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch || ctrl.valid) begin
        failures++;
        $display("FAIL opcode %h not a no-op", o);
      end
    end
    for (int f = 0; f < 64; f++) begin
      if (f inside {6'h20, 6'h21, 6'h23, 6'h24, 6'h25, 6'h2a}) continue;
      op = 6'h00; funct = 6'(f);
      #1;
      checks++;
      if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch || ctrl.valid) begin
        failures++;
        $display("FAIL funct %h not a no-op", f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
