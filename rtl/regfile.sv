// regfile: register file of 32 registers of 32 bits, two read ports, one write
// port.
//
// Reads are combinational: ra selects the register driven on bus_a and rb the
// one on bus_b, valid one access time after the addresses. Writes happen on the
// rising clock edge: when we (Write Enable) is 1, rw selects the register that
// takes bus_w. A read of a register being written in the same cycle returns
// the old value; the new one appears after the edge, which is what a
// single-cycle datapath expects.
// Register 0 always reads as zero and ignores writes, as the MIPS $zero
// register does; that and the synchronous clear on rst are this design's own
// choices.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,     // synchronous clear of all registers
  input  logic          we,      // Write Enable (RegWr)
  input  logic [AW-1:0] rw,      // register to write
  input  logic [W-1:0]  bus_w,   // write data
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  bus_a,
  output logic [W-1:0]  bus_b
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];
endmodule
