// tb_walkthroughs: runs the four single-instruction datapath walkthroughs on
// the full design at its default sizes and checks each one's effect:
//   add  $r3, $r1, $r2   r3 = r1 + r2
//   sw   $r3, 17($r1)    M[r1 + 17] = r3
//   lw   $r3, 17($r1)    r3 = M[r1 + 17]
//   slti $r3, $r1, 17    r3 = (r1 < 17)
// r1 is set to 0x103 so that r1 + 17 = 0x114 is word aligned, and r2 to 0x20.
// Each walkthrough instruction must finish in one clock cycle: its register
// or memory write is visible at the first edge and the PC moves on by 4.
module tb_walkthroughs;
  logic        clk = 0, rst = 1, load_we = 0, fsm_din = 0, fsm_detect;
  logic [31:0] load_addr = 0, load_data = 0, pc, instr, wb_data, st_addr, st_data;
  logic [4:0]  wb_reg;
  logic        wb_en, st_en, br_taken, alu_ovf, illegal;
  int checks = 0, failures = 0;

  single_cycle_top dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .pc, .instr, .wb_en, .wb_reg,
    .wb_data, .st_en, .st_addr, .st_data, .br_taken, .alu_ovf, .illegal,
    .fsm_din, .fsm_detect
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // {op, rs, rt, rd, shamt, funct} / {op, rs, rt, imm16}
  localparam logic [31:0] ORI_R1  = {6'h0d, 5'd0, 5'd1, 16'h0103};
  localparam logic [31:0] ORI_R2  = {6'h0d, 5'd0, 5'd2, 16'h0020};
  localparam logic [31:0] ADD     = {6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h20};
  localparam logic [31:0] SW      = {6'h2b, 5'd1, 5'd3, 16'd17};
  localparam logic [31:0] ORI_R3  = {6'h0d, 5'd0, 5'd3, 16'h0000};  // clear r3 before the load
  localparam logic [31:0] LW      = {6'h23, 5'd1, 5'd3, 16'd17};
  localparam logic [31:0] SLTI    = {6'h0a, 5'd1, 5'd3, 16'd17};
  localparam logic [31:0] ORI_R1S = {6'h0d, 5'd0, 5'd1, 16'h0004};  // r1 = 4
  localparam logic [31:0] LOOP    = {6'h04, 5'd0, 5'd0, 16'hffff};

  initial begin
    logic [31:0] prog [10];
    prog = '{ORI_R1, ORI_R2, ADD, SW, ORI_R3, LW, SLTI, ORI_R1S, SLTI, LOOP};
    for (int i = 0; i < 1024; i++) begin
      load_we = 1; load_addr = 32'(i * 4); load_data = (i < 10) ? prog[i] : 32'h0;
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    #1;
    for (int k = 0; k < 10; k++) begin
      logic [31:0] pc0;
      pc0 = pc;
      check(pc0 == 32'(k * 4), $sformatf("instruction %0d at pc %h", k, pc0));
      case (k)
        2: check(wb_en && wb_reg == 3 && wb_data == 32'h123, $sformatf("add: r%0d=%h", wb_reg, wb_data));
        3: check(st_en && st_addr == 32'h114 && st_data == 32'h123 && !wb_en,
                 $sformatf("sw: [%h]=%h", st_addr, st_data));
        5: check(wb_en && wb_reg == 3 && wb_data == 32'h123, $sformatf("lw: r%0d=%h", wb_reg, wb_data));
        6: check(wb_en && wb_reg == 3 && wb_data == 32'h0, $sformatf("slti 0x103<17: %h", wb_data));
        8: check(wb_en && wb_reg == 3 && wb_data == 32'h1, $sformatf("slti 4<17: %h", wb_data));
        9: check(br_taken, "final loop branch");
        default: check(!st_en && !illegal, "setup instruction");
      endcase
      @(posedge clk); #2;
      if (k < 9) check(pc == pc0 + 4, $sformatf("one cycle per instruction at pc %h", pc0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
