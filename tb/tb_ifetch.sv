// tb_ifetch: loads random words into the instruction memory through the load
// port while reset is held, then drives random branch/equal inputs and checks
// every cycle that the PC follows PC+4 or PC+4+SignExt(imm16)*4 (imm16 taken
// from the fetched word), that instr is the word at the PC in the same cycle,
// and that both backward and forward branches occurred.
module tb_ifetch;
  localparam int AW = 6;
  logic clk = 0, rst, branch, equal, load_we;
  logic [31:0] load_addr, load_data, pc, pc_plus4, instr;
  logic [31:0] img [2**AW];
  logic [31:0] mpc;
  int checks = 0, failures = 0, n_taken = 0, n_back = 0;

  ifetch #(.IMEM_AW(AW)) dut (.clk, .rst, .branch, .equal, .load_we, .load_addr,
                              .load_data, .pc, .pc_plus4, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; branch = 0; equal = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      img[i] = {16'($urandom), 16'($signed(6'($urandom)))};   // small signed offsets
      load_we = 1; load_addr = 32'(i * 4); load_data = img[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    mpc = 0;
    for (int c = 0; c < 2000; c++) begin
      logic [31:0] w;
      branch = 1'($urandom); equal = 1'($urandom);
      #1;
      w = img[mpc[AW+1:2]];
      checks++;
      if (pc !== mpc || instr !== w || pc_plus4 !== mpc + 4) begin
        failures++;
        $display("FAIL cycle %0d: pc=%h instr=%h, want pc=%h instr=%h", c, pc, instr, mpc, w);
      end
      @(posedge clk); #1;
      if (branch && equal) begin
        n_taken++;
        if (w[15]) n_back++;
        mpc = mpc + 4 + {{14{w[15]}}, w[15:0], 2'b00};
      end else begin
        mpc = mpc + 4;
      end
    end
    checks++;
    if (n_taken == 0 || n_back == 0) begin failures++; $display("FAIL branches not exercised"); end
    $display("branches taken=%0d, backward=%0d", n_taken, n_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
