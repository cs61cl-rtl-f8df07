// control: main decoder of the single-cycle CPU.
//
// From the opcode (instruction bits 31:26) and, for R-type instructions, the
// funct field (bits 5:0) it sets every control point of the datapath for the
// whole cycle:
//   addu/add/subu/and/or/slt : RegDst=rd, RegWr, ALUSrc=busB, ALUctr per funct
//   ori                      : RegDst=rt, RegWr, ZeroExt imm16, ALU OR
//   slti                     : RegDst=rt, RegWr, SignExt imm16, ALU SLT
//   lw                       : RegDst=rt, RegWr, SignExt, ALU ADD, MemtoReg
//   sw                       : SignExt, ALU ADD, MemWr
//   beq                      : ALU SUB, Branch (taken when the ALU result is 0)
// Anything else decodes as a no-op (no register or memory write) with
// valid = 0. add is executed like addu: no overflow trap. RegWr and ALUctr are
// the names used for the add/subtract datapath; the other signal names, the
// opcode numbers (standard MIPS) and the encoding are this design's own.
// Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
             alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0, branch: 1'b0,
             valid: 1'b1};
    case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        ctrl.reg_wr  = 1'b1;
        case (funct)
          FN_ADD, FN_ADDU: ctrl.alu_ctr = ALU_ADD;
          FN_SUBU:         ctrl.alu_ctr = ALU_SUB;
          FN_AND:          ctrl.alu_ctr = ALU_AND;
          FN_OR:           ctrl.alu_ctr = ALU_OR;
          FN_SLT:          ctrl.alu_ctr = ALU_SLT;
          default: begin
            ctrl.reg_wr = 1'b0;
            ctrl.valid  = 1'b0;
          end
        endcase
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_SLTI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_SLT;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
        ctrl.branch  = 1'b1;
      end
      default: ctrl.valid = 1'b0;
    endcase
  end
endmodule
