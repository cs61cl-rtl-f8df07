// three_ones_fsm: finite state machine that detects three consecutive 1s on a
// serial input.
//
// The machine is a state register plus a block of combinational logic that
// maps (present state, input) to (next state, output). Every rising clock
// edge it samples din and moves to a new state:
//   S0 (no 1 seen)      : din=1 -> S1, else S0
//   S1 (one 1 seen)     : din=1 -> S2, else S0
//   S2 (two 1s in a row): din=1 -> S0 with detect=1, else S0
// detect is a Mealy output: it is 1 during the cycle in which the third 1 of
// a run is on din, and the machine then starts counting afresh, so a run of
// six 1s gives two detections. The register-plus-logic structure follows the
// hardware implementation of an FSM; the state diagram, the Mealy output, the
// restart after a detection, the binary state encoding and the synchronous
// reset to S0 are this design's reading of the example.
module three_ones_fsm (
  input  logic clk,
  input  logic rst,      // synchronous, active high: state <= S0
  input  logic din,      // serial input
  output logic detect    // 1 while the third consecutive 1 is on din
);
  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} state_e;

  state_e ps, ns;   // present and next state

  // State register
  always_ff @(posedge clk) begin
    if (rst) ps <= S0;
    else     ps <= ns;
  end

  // Combinational logic: (PS, input) -> (NS, output)
  always_comb begin
    ns     = S0;
    detect = 1'b0;
    unique case (ps)
      S0: ns = din ? S1 : S0;
      S1: ns = din ? S2 : S0;
      S2: begin
        ns     = S0;
        detect = din;
      end
      default: ns = S0;
    endcase
  end
endmodule
