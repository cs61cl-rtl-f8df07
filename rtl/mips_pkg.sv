// mips_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// The instruction formats follow the MIPS R-type (op|rs|rt|rd|shamt|funct,
// 6/5/5/5/5/6 bits from bit 31 down) and I-type (op|rs|rt|imm16, 6/5/5/16
// bits) layouts. The opcode and funct numbers are the standard MIPS encodings;
// the ALU control encoding and the control-signal bundle are this design's own.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data and instruction width
  localparam int unsigned NREG = 32;  // general purpose registers

  // Primary opcodes (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_SLTI  = 6'h0a,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // funct field (bits 5:0) of R-type instructions
  typedef enum logic [5:0] {
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_SLT  = 6'h2a
  } funct_e;

  // ALU operation select (ALUctr)
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // Decoded instruction fields
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } rtype_t;

  // Control points of the single-cycle datapath
  typedef struct packed {
    logic    reg_dst;    // 1: write rd, 0: write rt
    logic    reg_wr;     // register file write enable
    logic    ext_op;     // 1: sign-extend imm16, 0: zero-extend
    logic    alu_src;    // 1: ALU B input is the extended immediate, 0: busB
    alu_op_e alu_ctr;    // ALU operation
    logic    mem_wr;     // data memory write enable
    logic    mem_to_reg; // 1: write-back value comes from data memory
    logic    branch;     // 1: take PC+4+SignExt(imm16)*4 when the ALU result is zero
    logic    valid;      // instruction is one this CPU implements
  } ctrl_t;

endpackage
