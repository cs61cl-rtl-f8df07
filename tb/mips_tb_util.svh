// mips_tb_util.svh: testbench helpers for the MIPS-lite CPU, included inside a
// testbench module.
//
// - Instruction encoders (standard MIPS R-type and I-type layouts).
// - A reference model of the instruction set: an instruction-level
//   interpreter with its own register, instruction and data arrays, written
//   from the instruction definitions and sharing no code with the RTL.
//   ref_step() executes one instruction and reports what the CPU is expected
//   to do in that cycle (register write, store, branch taken).
// The including module must define localparam REF_IAW and REF_DAW (log2 of
// the instruction and data memory words).

function automatic logic [31:0] enc_r(input logic [5:0] funct, input int rd, input int rs, input int rt);
  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
endfunction

function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs, input logic [15:0] imm);
  return {op, 5'(rs), 5'(rt), imm};
endfunction

function automatic logic [31:0] i_addu(int rd, int rs, int rt); return enc_r(6'h21, rd, rs, rt); endfunction
function automatic logic [31:0] i_add (int rd, int rs, int rt); return enc_r(6'h20, rd, rs, rt); endfunction
function automatic logic [31:0] i_subu(int rd, int rs, int rt); return enc_r(6'h23, rd, rs, rt); endfunction
function automatic logic [31:0] i_and (int rd, int rs, int rt); return enc_r(6'h24, rd, rs, rt); endfunction
function automatic logic [31:0] i_or  (int rd, int rs, int rt); return enc_r(6'h25, rd, rs, rt); endfunction
function automatic logic [31:0] i_slt (int rd, int rs, int rt); return enc_r(6'h2a, rd, rs, rt); endfunction
function automatic logic [31:0] i_ori (int rt, int rs, logic [15:0] imm); return enc_i(6'h0d, rt, rs, imm); endfunction
function automatic logic [31:0] i_slti(int rt, int rs, logic [15:0] imm); return enc_i(6'h0a, rt, rs, imm); endfunction
function automatic logic [31:0] i_lw  (int rt, int rs, logic [15:0] imm); return enc_i(6'h23, rt, rs, imm); endfunction
function automatic logic [31:0] i_sw  (int rt, int rs, logic [15:0] imm); return enc_i(6'h2b, rt, rs, imm); endfunction
function automatic logic [31:0] i_beq (int rs, int rt, logic [15:0] imm); return enc_i(6'h04, rt, rs, imm); endfunction

// Reference machine state
logic [31:0] ref_r   [32];
logic [31:0] ref_im  [2**REF_IAW];
logic [31:0] ref_dm  [2**REF_DAW];
logic [31:0] ref_pc;

typedef struct {
  logic        wb_en;
  int          wb_reg;
  logic [31:0] wb_data;
  logic        st_en;
  logic [31:0] st_addr;
  logic [31:0] st_data;
  logic        br_taken;
  logic        illegal;
  logic        ovf;       // signed overflow of an R-type add/subtract
} ref_effect_t;

// Reset clears the registers and the PC; the memories keep their contents,
// as the CPU's do. clear_mem also empties both memories (power-up state).
function automatic void ref_reset(input bit clear_mem);
  for (int i = 0; i < 32; i++) ref_r[i] = '0;
  if (clear_mem) begin
    for (int i = 0; i < 2**REF_IAW; i++) ref_im[i] = '0;
    for (int i = 0; i < 2**REF_DAW; i++) ref_dm[i] = '0;
  end
  ref_pc = '0;
endfunction

function automatic ref_effect_t ref_step();
  ref_effect_t e;
  logic [31:0] ins, a, b, se, ze, ea;
  int rs, rt, rd;
  longint sres;
  ins = ref_im[ref_pc[REF_IAW+1:2]];
  rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
  a  = ref_r[rs]; b = ref_r[rt];
  se = {{16{ins[15]}}, ins[15:0]};
  ze = {16'h0, ins[15:0]};
  ea = a + se;
  e = '{wb_en: 1'b0, wb_reg: 0, wb_data: '0, st_en: 1'b0, st_addr: '0, st_data: '0,
        br_taken: 1'b0, illegal: 1'b0, ovf: 1'b0};
  case (ins[31:26])
    6'h00: begin
      e.wb_en = 1'b1; e.wb_reg = rd;
      case (ins[5:0])
        6'h20, 6'h21: begin
          e.wb_data = a + b;
          sres = longint'($signed(a)) + longint'($signed(b));
          e.ovf = sres != longint'($signed(e.wb_data));
        end
        6'h23: begin
          e.wb_data = a - b;
          sres = longint'($signed(a)) - longint'($signed(b));
          e.ovf = sres != longint'($signed(e.wb_data));
        end
        6'h24: e.wb_data = a & b;
        6'h25: e.wb_data = a | b;
        6'h2a: e.wb_data = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
        default: begin e.wb_en = 1'b0; e.illegal = 1'b1; end
      endcase
    end
    6'h0d: begin e.wb_en = 1'b1; e.wb_reg = rt; e.wb_data = a | ze; end
    6'h0a: begin e.wb_en = 1'b1; e.wb_reg = rt; e.wb_data = ($signed(a) < $signed(se)) ? 32'd1 : 32'd0; end
    6'h23: begin e.wb_en = 1'b1; e.wb_reg = rt; e.wb_data = ref_dm[ea[REF_DAW+1:2]]; end
    6'h2b: begin e.st_en = 1'b1; e.st_addr = ea; e.st_data = b; end
    6'h04: e.br_taken = (a == b);
    default: e.illegal = 1'b1;
  endcase
  if (e.wb_en && e.wb_reg != 0) ref_r[e.wb_reg] = e.wb_data;
  if (e.st_en) ref_dm[e.st_addr[REF_DAW+1:2]] = e.st_data;
  ref_pc = e.br_taken ? ref_pc + 32'd4 + {se[29:0], 2'b00} : ref_pc + 32'd4;
  return e;
endfunction

// A random instruction: mostly arithmetic on registers 0..7 so that operands
// collide often (beq taken, slt ties), forward branches only.
function automatic logic [31:0] rand_instr();
  int k, d, s, t;
  logic [15:0] imm;
  k = $urandom_range(0, 14);
  d = $urandom_range(0, 7); s = $urandom_range(0, 7); t = $urandom_range(0, 7);
  imm = 16'($urandom);
  case (k)
    0:  return i_addu(d, s, t);
    1:  return i_subu(d, s, t);
    2:  return i_add (d, s, t);
    3:  return i_and (d, s, t);
    4:  return i_or  (d, s, t);
    5:  return i_slt (d, s, t);
    6, 7: return i_ori (d, s, imm);
    8:  return i_slti(d, s, imm);
    9:  return i_lw  (d, s, 16'($urandom_range(0, 255) * 4));
    10: return i_sw  (t, s, 16'($urandom_range(0, 255) * 4));
    11, 12: return i_beq (s, t, 16'($urandom_range(0, 3)));
    13: return i_addu(d, s, s);
    default: return {6'h3f, 26'($urandom)};   // not implemented
  endcase
endfunction
