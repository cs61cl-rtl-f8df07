// tb_single_cycle_top: end-to-end test of the whole design at its default
// sizes (1024-word instruction and data memories), no parameter overrides.
//
// CPU: the walkthrough program (add, sw, lw, slti, ori, subu, beq), whose
// results are compared with hand-computed values, then random programs that
// fill the instruction memory and run long enough for the PC to wrap. Every
// cycle write-back, store, branch, illegal and (for R-type add/subtract) the
// ALU overflow flag are compared with the reference interpreter, and the PC
// must advance at every edge (one instruction per cycle).
// FSM: a random bit stream runs alongside and detect is compared each cycle
// with a run-length reference.
// Each mechanism - every instruction kind, ZeroExt and SignExt immediates,
// branch taken and not taken, backward branch, writes to r0 discarded,
// overflow, unimplemented instruction, PC wrap-around, FSM detection - is
// counted, and one that never happened counts as a failure.
module tb_single_cycle_top;
  localparam int REF_IAW = 10;
  localparam int REF_DAW = 10;

  logic        clk = 0, rst, load_we, fsm_din, fsm_detect;
  logic [31:0] load_addr, load_data, pc, instr, wb_data, st_addr, st_data;
  logic [4:0]  wb_reg;
  logic        wb_en, st_en, br_taken, alu_ovf, illegal;
  int checks = 0, failures = 0;
  bit done = 0;

  typedef enum int {
    M_ADDU, M_ADD, M_SUBU, M_AND, M_OR, M_SLT, M_ORI_ZEXT, M_SLTI_SEXT, M_LW, M_SW,
    M_BEQ_TAKEN, M_BEQ_NOT, M_BEQ_BACK, M_R0_WRITE, M_OVERFLOW, M_ILLEGAL, M_PC_WRAP,
    M_FSM_DETECT, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  `include "mips_tb_util.svh"

  single_cycle_top dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .pc, .instr, .wb_en, .wb_reg,
    .wb_data, .st_en, .st_addr, .st_data, .br_taken, .alu_ovf, .illegal,
    .fsm_din, .fsm_detect
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- FSM: random stream, checked every cycle (runs while the CPU runs) ----
  initial begin
    int run = 0;
    fsm_din = 0;
    @(negedge rst); #2;
    while (!done) begin
      logic want, rst_at_edge;
      fsm_din = ($urandom_range(0, 3) != 0);
      #1;
      rst_at_edge = rst;
      want = fsm_din && (run == 2);
      check(fsm_detect === want, $sformatf("fsm detect %b want %b (run %0d)", fsm_detect, want, run));
      if (fsm_detect) mech[M_FSM_DETECT]++;
      @(posedge clk); #2;
      if (rst_at_edge) run = 0;
      else if (!fsm_din || run == 2) run = 0;
      else run++;
    end
  end

  logic [31:0] seen_r [32];
  logic [31:0] seen_m [logic [31:0]];

  always @(posedge clk) begin
    if (wb_en && wb_reg != 0) seen_r[wb_reg] <= wb_data;
    if (st_en) seen_m[st_addr] = st_data;
  end

  task automatic load_program(input logic [31:0] prog[$]);
    rst = 1;
    for (int i = 0; i < 2**REF_IAW; i++) begin
      ref_im[i] = (i < prog.size()) ? prog[i] : 32'h0;
      load_we = 1; load_addr = 32'(i * 4); load_data = ref_im[i];
      @(posedge clk); #1;
    end
    load_we = 0; load_addr = 0; load_data = 0;
    @(posedge clk); #1;
    ref_reset(0);
    rst = 0;
    #1;
  endtask

  task automatic count(input logic [31:0] ins, input ref_effect_t e, input logic [31:0] pc_now);
    case (ins[31:26])
      6'h00: case (ins[5:0])
        6'h21: mech[M_ADDU]++;
        6'h20: mech[M_ADD]++;
        6'h23: mech[M_SUBU]++;
        6'h24: mech[M_AND]++;
        6'h25: mech[M_OR]++;
        6'h2a: mech[M_SLT]++;
        default: ;
      endcase
      6'h0d: if (ins[15]) mech[M_ORI_ZEXT]++;
      6'h0a: if (ins[15]) mech[M_SLTI_SEXT]++;
      6'h23: mech[M_LW]++;
      6'h2b: mech[M_SW]++;
      6'h04: begin
        if (e.br_taken) mech[M_BEQ_TAKEN]++; else mech[M_BEQ_NOT]++;
        if (e.br_taken && ins[15]) mech[M_BEQ_BACK]++;
      end
      default: ;
    endcase
    if (e.wb_en && e.wb_reg == 0) mech[M_R0_WRITE]++;
    if (e.ovf) mech[M_OVERFLOW]++;
    if (e.illegal) mech[M_ILLEGAL]++;
    if (pc_now == 32'(2**REF_IAW * 4 - 4) && !e.br_taken) mech[M_PC_WRAP]++;
  endtask

  task automatic run_checked(input int n);
    for (int c = 0; c < n; c++) begin
      ref_effect_t e;
      logic [31:0] pc_exp, ins;
      pc_exp = ref_pc;
      ins = ref_im[ref_pc[REF_IAW+1:2]];
      e = ref_step();
      #1;
      check(pc === pc_exp && instr === ins, $sformatf("pc %h instr %h want %h %h", pc, instr, pc_exp, ins));
      check(wb_en === e.wb_en && (!e.wb_en || (wb_reg === 5'(e.wb_reg) && wb_data === e.wb_data)),
            $sformatf("pc %h instr %h: wb %b r%0d=%h want %b r%0d=%h", pc, instr, wb_en, wb_reg,
                      wb_data, e.wb_en, e.wb_reg, e.wb_data));
      check(st_en === e.st_en && (!e.st_en || (st_addr === e.st_addr && st_data === e.st_data)),
            $sformatf("pc %h instr %h: store %b [%h]=%h want %b [%h]=%h", pc, instr, st_en,
                      st_addr, st_data, e.st_en, e.st_addr, e.st_data));
      check(br_taken === e.br_taken && illegal === e.illegal,
            $sformatf("pc %h instr %h: br %b ill %b", pc, instr, br_taken, illegal));
      if (ins[31:26] == 6'h00 && ins[5:0] inside {6'h20, 6'h21, 6'h23})
        check(alu_ovf === e.ovf, $sformatf("pc %h instr %h: overflow %b want %b", pc, instr, alu_ovf, e.ovf));
      count(ins, e, pc_exp);
      @(posedge clk); #1;
      check(pc === ref_pc, $sformatf("next pc %h want %h (one instruction per cycle)", pc, ref_pc));
    end
  endtask

  initial begin
    logic [31:0] prog[$];
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 32; i++) seen_r[i] = '0;
    for (int m = 0; m < int'(M_COUNT); m++) mech[m] = 0;
    ref_reset(1);

    // ---- walkthrough program ----
    prog = '{
      i_ori (1, 0, 16'h0100),       // r1 = 0x100
      i_ori (2, 0, 16'h0005),       // r2 = 5
      i_add (3, 1, 2),              // add r3, r1, r2      -> 0x105
      i_sw  (3, 1, 16'h0010),       // sw r3, 16(r1)       -> M[0x110] = 0x105
      i_lw  (4, 1, 16'h0010),       // lw r4, 16(r1)       -> 0x105
      i_slti(5, 1, 16'd17),         // slti r5, r1, 17     -> 0
      i_slti(6, 2, 16'd17),         // slti r6, r2, 17     -> 1
      i_subu(7, 3, 2),              // r7 = 0x100
      i_beq (7, 1, 16'd1),          // taken: skip next
      i_ori (8, 0, 16'hdead),       // skipped
      i_beq (7, 2, 16'd1),          // not taken
      i_ori (9, 0, 16'hbeef),       // r9 = 0x0000beef (zero-extended)
      i_ori (10, 0, 16'hffff),      // r10 = 0x0000ffff
      i_addu(11, 10, 10),           // r11 = 0x1fffe
      i_slti(12, 10, 16'hffff),     // 0xffff < -1 ? -> 0
      i_subu(13, 0, 2),             // r13 = -5
      i_slti(14, 13, 16'hfffc),     // -5 < -4 ? -> 1
      i_beq (0, 0, 16'hffff)        // loop here forever
    };
    load_program(prog);
    run_checked(40);
    check(seen_r[1] == 32'h100 && seen_r[2] == 32'h5 && seen_r[3] == 32'h105 &&
          seen_r[4] == 32'h105 && seen_r[5] == 32'h0 && seen_r[6] == 32'h1 &&
          seen_r[7] == 32'h100 && seen_r[8] == 32'h0 && seen_r[9] == 32'h0000beef &&
          seen_r[10] == 32'h0000ffff && seen_r[11] == 32'h0001fffe && seen_r[12] == 32'h0 &&
          seen_r[13] == 32'hfffffffb && seen_r[14] == 32'h1,
          "walkthrough program final registers");
    check(seen_m.exists(32'h110) && seen_m[32'h110] == 32'h105, "walkthrough program stored word");
    check(pc == 32'd17 * 4, "walkthrough program ends in its loop");

    // ---- an overflow, then random programs filling the memory ----
    prog = '{
      i_ori (1, 0, 16'h7fff),
      i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1),
      i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1),
      i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1),
      i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1), i_addu(1, 1, 1),
      i_ori (1, 1, 16'hffff),        // r1 = 0x7fffffff
      i_add (2, 1, 1),               // overflows
      i_beq (0, 0, 16'hffff)
    };
    load_program(prog);
    run_checked(24);
    for (int p = 0; p < 3; p++) begin
      prog = {};
      for (int i = 0; i < 2**REF_IAW - 16; i++) prog.push_back(rand_instr());
      // a backward branch that is taken once per pass: beq r0,r0 over 3 words back
      prog.push_back(i_ori (20, 0, 16'h0001));
      prog.push_back(i_addu(21, 21, 20));
      prog.push_back(i_slti(22, 21, 16'd2));
      prog.push_back(i_beq (22, 20, 16'hfffd));   // loops back to the addu once
      load_program(prog);
      run_checked(2**REF_IAW * 3);
    end
    done = 1;

    for (int m = 0; m < int'(M_COUNT); m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("  %-12s %0d", me.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
