// single_cycle_top: the two designs side by side - the MIPS-lite single-cycle
// CPU and the three-consecutive-ones detector FSM.
//
// They share the clock and reset and nothing else; each has its own ports
// brought out unchanged (the FSM's with the fsm_ prefix). See mips_lite_cpu and
// three_ones_fsm for behaviour and timing.
module single_cycle_top #(
  parameter int unsigned IMEM_AW = 10,
  parameter int unsigned DMEM_AW = 10
) (
  input  logic        clk,
  input  logic        rst,
  // CPU: instruction memory load port
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // CPU: observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        wb_en,
  output logic [4:0]  wb_reg,
  output logic [31:0] wb_data,
  output logic        st_en,
  output logic [31:0] st_addr,
  output logic [31:0] st_data,
  output logic        br_taken,
  output logic        alu_ovf,
  output logic        illegal,
  // FSM
  input  logic        fsm_din,
  output logic        fsm_detect
);
  mips_lite_cpu #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_cpu (
    .clk, .rst, .load_we, .load_addr, .load_data,
    .pc, .instr, .wb_en, .wb_reg, .wb_data, .st_en, .st_addr, .st_data,
    .br_taken, .alu_ovf, .illegal
  );

  three_ones_fsm u_fsm (.clk, .rst, .din(fsm_din), .detect(fsm_detect));
endmodule
