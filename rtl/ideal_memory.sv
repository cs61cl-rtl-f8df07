// ideal_memory: idealized word memory with one address, Data In, Data Out and
// Write Enable.
//
// Read is combinational: the word selected by addr appears on dout one access
// time after addr is valid, with no clock involved. Write is the only clocked
// operation: on a rising edge with we = 1, the word at addr takes din. Both
// follow the idealized memory of the single-cycle datapath.
// The address is a byte address, as MIPS uses; its two low bits are ignored
// (word accesses only) and bits above the array are ignored too, so the
// memory repeats through the address space. The size (2**AW words) is this
// design's choice. Contents start at zero.
module ideal_memory #(
  parameter int unsigned W  = 32,   // word width
  parameter int unsigned AW = 10    // log2 of the number of words
) (
  input  logic         clk,
  input  logic         we,          // Write Enable
  input  logic [31:0]  addr,        // byte address
  input  logic [W-1:0] din,         // Data In
  output logic [W-1:0] dout         // Data Out
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= din;
  end

  assign dout = mem[widx];
endmodule
