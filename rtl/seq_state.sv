// seq_state: one state of the one-hot sequencer that forms the controller.
//
// A single flip-flop holds the state. It is entered when entry is high at a
// rising clock edge and it stays active while stable is high; when stable
// drops the state pulses jump for the cycle in which it leaves, and jump is
// wired to the entry of the next state. So next = entry | (op & stable),
// jump = op & ~stable, and op (the flip-flop output) is the state's control
// strobe. A state that must last one cycle ties stable low; a state that
// waits for a handshake ties stable to the level it waits on.
// rst (asynchronous, active high) sets the flip-flop to RESET_VAL: the
// initial-loop state resets to 1, all others to 0. The reset is this
// design's addition; the state cell itself has none.
module seq_state #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic entry,
  input  logic stable,
  output logic op,
  output logic jump
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) op <= RESET_VAL;
    else     op <= entry | (op & stable);
  end

  assign jump = op & ~stable;

endmodule
