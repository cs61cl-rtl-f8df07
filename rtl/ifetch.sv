// ifetch: instruction fetch unit - program counter, next address logic and
// instruction memory.
//
// Every rising clock edge the PC register takes the next address: PC + 4 for
// sequential code, or PC + 4 + SignExt(imm16) * 4 when the current
// instruction is a branch (branch = 1) and its condition holds (equal = 1).
// imm16 is the low half of the instruction word fetched from the PC. The
// instruction memory is read combinationally, so instr is the word at the
// current PC within the same cycle. Both adders are addsub ripple adders.
// This follows the fetch unit and branch datapath of the single-cycle design.
// This design adds: a synchronous reset that sets the PC to RESET_PC, and a
// load port (load_we/load_addr/load_data) that writes the instruction memory;
// while load_we is 1 the memory is addressed by load_addr instead of the PC,
// so programs are loaded while the CPU is held in reset.
module ifetch #(
  parameter int unsigned  IMEM_AW  = 10,     // log2 of instruction words
  parameter logic [31:0]  RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst,        // synchronous, active high: PC <= RESET_PC
  input  logic        branch,     // nPC_sel: current instruction is a branch
  input  logic        equal,      // branch condition (ALU zero)
  input  logic        load_we,    // instruction memory load port
  input  logic [31:0] load_addr,  // byte address
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] instr
);
  logic [31:0] pc_next, br_target, br_offset, imem_addr;
  logic        take;
  logic        c_seq, v_seq, c_br, v_br;

  en_register #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(pc_next), .q(pc)
  );

  // PC + 4
  addsub #(.N(32)) u_inc (
    .a(pc), .b(32'd4), .sub(1'b0), .sum(pc_plus4), .carry_out(c_seq), .overflow(v_seq)
  );

  // Sign extender for the PC: SignExt(imm16) * 4
  assign br_offset = {{14{instr[15]}}, instr[15:0], 2'b00};

  addsub #(.N(32)) u_br (
    .a(pc_plus4), .b(br_offset), .sub(1'b0), .sum(br_target), .carry_out(c_br), .overflow(v_br)
  );

  assign take = branch & equal;

  mux2 #(.W(32)) u_nextpc (.a(pc_plus4), .b(br_target), .sel(take), .y(pc_next));

  mux2 #(.W(32)) u_imaddr (.a(pc), .b(load_addr), .sel(load_we), .y(imem_addr));

  ideal_memory #(.W(32), .AW(IMEM_AW)) u_imem (
    .clk(clk), .we(load_we), .addr(imem_addr), .din(load_data), .dout(instr)
  );

  // Address wrap-around is not an error for the PC adders
  logic unused;
  assign unused = c_seq ^ v_seq ^ c_br ^ v_br;
endmodule
