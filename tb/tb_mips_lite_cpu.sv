// tb_mips_lite_cpu: end-to-end test of the single-cycle CPU.
//
// 1. A directed program built from the datapath walkthroughs (add, sw, lw,
//    slti, ori, subu, beq taken and not taken) is run and the final register
//    file and the stored word are compared with values worked out by hand.
// 2. Random programs (all implemented instructions, forward branches, some
//    unimplemented opcodes) are run for several thousand cycles each. Every
//    cycle the CPU's write-back, store, branch and PC are compared with a
//    reference interpreter (mips_tb_util.svh). Instruction memory is kept
//    small (256 words) so the PC wraps around and programs re-execute.
// Also checks that every instruction completes in exactly one cycle: the PC
// advances at every clock edge.
module tb_mips_lite_cpu;
  localparam int REF_IAW = 8;
  localparam int REF_DAW = 8;

  logic        clk = 0, rst, load_we;
  logic [31:0] load_addr, load_data, pc, instr, wb_data, st_addr, st_data;
  logic [4:0]  wb_reg;
  logic        wb_en, st_en, br_taken, alu_ovf, illegal;
  int checks = 0, failures = 0;
  // Architectural state as seen from the CPU's write-back and store outputs
  logic [31:0] seen_r [32];
  logic [31:0] seen_m [logic [31:0]];

  always @(posedge clk) begin
    if (wb_en && wb_reg != 0) seen_r[wb_reg] <= wb_data;
    if (st_en) seen_m[st_addr] = st_data;
  end

  `include "mips_tb_util.svh"

  mips_lite_cpu #(.IMEM_AW(REF_IAW), .DMEM_AW(REF_DAW)) dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .pc, .instr, .wb_en, .wb_reg,
    .wb_data, .st_en, .st_addr, .st_data, .br_taken, .alu_ovf, .illegal
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Hold reset, write the whole instruction memory, release reset.
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

  // Run n cycles comparing every cycle against the reference interpreter.
  task automatic run_checked(input int n);
    for (int c = 0; c < n; c++) begin
      ref_effect_t e;
      logic [31:0] pc_exp;
      pc_exp = ref_pc;
      e = ref_step();
      #1;
      check(pc === pc_exp, $sformatf("pc %h want %h", pc, pc_exp));
      check(wb_en === e.wb_en && (!e.wb_en || (wb_reg === 5'(e.wb_reg) && wb_data === e.wb_data)),
            $sformatf("pc %h instr %h: wb %b r%0d=%h want %b r%0d=%h", pc, instr, wb_en, wb_reg,
                      wb_data, e.wb_en, e.wb_reg, e.wb_data));
      check(st_en === e.st_en && (!e.st_en || (st_addr === e.st_addr && st_data === e.st_data)),
            $sformatf("pc %h instr %h: store %b [%h]=%h want %b [%h]=%h", pc, instr, st_en,
                      st_addr, st_data, e.st_en, e.st_addr, e.st_data));
      check(br_taken === e.br_taken && illegal === e.illegal,
            $sformatf("pc %h instr %h: br %b ill %b", pc, instr, br_taken, illegal));
      @(posedge clk); #1;
      check(pc === ref_pc, $sformatf("next pc %h want %h (one instruction per cycle)", pc, ref_pc));
    end
  endtask

  initial begin
    logic [31:0] prog[$];
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 32; i++) seen_r[i] = '0;
    ref_reset(1);

    // ---- directed program ----
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
      i_ori (9, 0, 16'hbeef),       // r9 = 0xbeef
      i_ori (10, 0, 16'hffff),      // zero-extended: 0x0000ffff
      i_lw  (11, 1, 16'hfff0 + 16'h0020), // lw r11, 16(r1) again with wrap in imm: 0x100+0x10
      i_slti(12, 0, 16'hffff),      // 0 < -1 ? -> 0
      i_slti(13, 10, 16'hffff),     // 0xffff < -1 ? -> 0
      i_beq (0, 0, 16'hffff)        // loop here forever
    };
    load_program(prog);
    run_checked(40);
    check(seen_r[1] == 32'h100 && seen_r[2] == 32'h5 && seen_r[3] == 32'h105 &&
          seen_r[4] == 32'h105 && seen_r[5] == 32'h0 && seen_r[6] == 32'h1 &&
          seen_r[7] == 32'h100 && seen_r[8] == 32'h0 && seen_r[9] == 32'hbeef &&
          seen_r[10] == 32'h0000ffff && seen_r[11] == 32'h105 &&
          seen_r[12] == 32'h0 && seen_r[13] == 32'h0,
          "directed program final registers");
    check(seen_m.exists(32'h110) && seen_m[32'h110] == 32'h105, "directed program stored word");
    check(pc == 32'd16 * 4, "directed program ends in its loop");

    // ---- random programs ----
    for (int p = 0; p < 6; p++) begin
      prog = {};
      for (int i = 0; i < 2**REF_IAW - 8; i++) prog.push_back(rand_instr());
      load_program(prog);
      run_checked(3000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
