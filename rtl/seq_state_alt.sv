// seq_state_alt: sequencer state with a two-way exit.
//
// Like seq_state, the flip-flop is entered by entry and held while stable
// is high. When the state leaves (op & ~stable) it takes one of two exits
// chosen by the alt input: jump when alt is low, alt_jump when alt is high.
// The controller uses it where the multiplier's done flag picks the next
// step: after the second operand has been withdrawn (skip the multiplication
// loop when B is already zero) and after each shift (loop again or finish).
// rst (asynchronous, active high) clears the flip-flop.
module seq_state_alt (
  input  logic clk,
  input  logic rst,
  input  logic entry,
  input  logic stable,
  input  logic alt,
  output logic op,
  output logic jump,
  output logic alt_jump
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) op <= 1'b0;
    else     op <= entry | (op & stable);
  end

  always_comb begin
    jump     = op & ~stable & ~alt;
    alt_jump = op & ~stable & alt;
  end

endmodule
