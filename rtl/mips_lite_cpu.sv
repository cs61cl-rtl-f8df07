// mips_lite_cpu: single-cycle CPU for the MIPS-lite subset.
//
// Every instruction runs all five steps - fetch, decode/register read,
// execute, memory, register write - within one clock cycle; the cycle must be
// as long as the slowest instruction (lw, whose path runs through the PC,
// instruction memory, register file, ALU, data memory and back to the
// register file). State changes only at the rising edge: the PC, the one
// register written, and the one data memory word written.
//
// Datapath (all combinational between the edges):
//   ifetch      PC, PC+4 / branch target, instruction memory
//   control     op/funct -> RegDst, RegWr, ExtOp, ALUSrc, ALUctr, MemWr,
//               MemtoReg, Branch
//   regfile     Ra = rs, Rb = rt, Rw = rd or rt (RegDst mux)
//   extender    imm16 -> 32 bits, zero (ori) or sign extended
//   alu         A = busA, B = busB or the immediate (ALUSrc mux)
//   ideal_memory data memory, address = ALU result, Data In = busB
//   mux2        write-back = ALU result or memory data (MemtoReg mux)
// Instructions: addu, subu, add (as addu), and, or, slt, ori, slti, lw, sw,
// beq. Anything else writes nothing and raises illegal for that cycle.
//
// The structure follows the single-cycle datapath; the memory sizes, the reset,
// the instruction-memory load port and the observation outputs (write-back
// and store traces) are this design's own.
module mips_lite_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW = 10,   // instruction memory: 2**IMEM_AW words
  parameter int unsigned DMEM_AW = 10    // data memory: 2**DMEM_AW words
) (
  input  logic        clk,
  input  logic        rst,        // synchronous: PC <= 0, registers <= 0
  // instruction memory load port (use while rst is held)
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        wb_en,      // a register is written at the next edge
  output logic [4:0]  wb_reg,
  output logic [31:0] wb_data,
  output logic        st_en,      // a data memory word is written at the next edge
  output logic [31:0] st_addr,
  output logic [31:0] st_data,
  output logic        br_taken,   // the next PC is a branch target
  output logic        alu_ovf,    // signed overflow in the ALU adder (ignored)
  output logic        illegal     // unimplemented instruction this cycle
);
  ctrl_t       ctrl;
  rtype_t      f;
  logic [31:0] pc_plus4, bus_a, bus_b, imm32, alu_b, alu_y, mem_q, bus_w;
  logic [4:0]  rw;
  logic        zero;

  assign f = rtype_t'(instr);

  ifetch #(.IMEM_AW(IMEM_AW)) u_ifetch (
    .clk(clk), .rst(rst),
    .branch(ctrl.branch), .equal(zero),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .pc_plus4(pc_plus4), .instr(instr)
  );

  control u_ctrl (.op(f.op), .funct(f.funct), .ctrl(ctrl));

  mux2 #(.W(5)) u_regdst (.a(f.rt), .b(f.rd), .sel(ctrl.reg_dst), .y(rw));

  regfile #(.NREGS(NREG), .W(XLEN)) u_rf (
    .clk(clk), .rst(rst), .we(ctrl.reg_wr & ~rst), .rw(rw), .bus_w(bus_w),
    .ra(f.rs), .rb(f.rt), .bus_a(bus_a), .bus_b(bus_b)
  );

  extender u_ext (.imm16(instr[15:0]), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.W(32)) u_alusrc (.a(bus_b), .b(imm32), .sel(ctrl.alu_src), .y(alu_b));

  alu #(.N(32)) u_alu (
    .a(bus_a), .b(alu_b), .op(ctrl.alu_ctr), .result(alu_y), .zero(zero), .overflow(alu_ovf)
  );

  ideal_memory #(.W(32), .AW(DMEM_AW)) u_dmem (
    .clk(clk), .we(ctrl.mem_wr & ~rst), .addr(alu_y), .din(bus_b), .dout(mem_q)
  );

  mux2 #(.W(32)) u_memtoreg (.a(alu_y), .b(mem_q), .sel(ctrl.mem_to_reg), .y(bus_w));

  assign wb_en    = ctrl.reg_wr & ~rst;
  assign wb_reg   = rw;
  assign wb_data  = bus_w;
  assign st_en    = ctrl.mem_wr & ~rst;
  assign st_addr  = alu_y;
  assign st_data  = bus_b;
  assign br_taken = ctrl.branch & zero;
  assign illegal  = ~ctrl.valid;

  logic unused;
  assign unused = ^{pc_plus4, f.shamt};
endmodule
