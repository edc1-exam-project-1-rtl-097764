// control_unit: one-hot sequencer for the handshake and the multiplication.
//
// Eleven sequencer states (one flip-flop each) run the algorithm:
//   s0  initial loop: RR and RDY high, wait for NRDY       (reset state)
//   s1  load k into the pair counter and k buffer, clear the result; RDY
//   s2  RDY low, wait for NRDY to fall
//   s3  request x1: RDY, wait for NRDY
//   s4  load x1 and decrement the pair counter; RDY
//   s5  RDY low, wait for NRDY to fall
//   s6  request x2: RDY, wait for NRDY
//   s7  load the multiplier with sum and difference; RDY
//   s8  RDY low, wait for NRDY to fall; if B is zero skip the multiplication
//   s9  add operand A to the result (entered when B's low bit is set)
//   s10 shift A left and B right; loop while B is non-zero
// After s8 or s10 finishes the pair, counter_zero chooses between s3 (more
// pairs) and s0 (result ready). The low-bit test sits between s8/s10 and
// s9/s10 as gating on the state entries, so an add and a shift take one
// cycle each. Handshake: RDY up, NRDY up, RDY down, NRDY down; RR is high
// only in s0, together with RDY.
// States change on the rising clock edge and the strobes are the state
// flip-flops themselves. The flags come from the datapath, which runs on the
// opposite edge, so they already show the effect of the strobes of the
// current cycle. nrdy comes from outside and is used as it arrives.
module control_unit (
  input  logic clk,
  input  logic rst,
  input  logic nrdy,
  input  logic mult_done,
  input  logic mult_lsb,
  input  logic counter_zero,
  output logic rr,
  output logic rdy,
  output logic load_k,
  output logic load_x1,
  output logic decrement_counter,
  output logic mult_load,
  output logic mult_add,
  output logic mult_shift
);

  logic [10:0] op;
  logic [10:0] jump;
  logic        aj8, aj10;
  logic        pair_end, next_pair, run_end, mult_step, to_add, to_shift;

  always_comb begin
    pair_end  = aj8 | aj10;
    next_pair = pair_end & ~counter_zero;
    run_end   = pair_end & counter_zero;
    mult_step = jump[8] | jump[10];
    to_add    = mult_step & mult_lsb;
    to_shift  = (mult_step & ~mult_lsb) | jump[9];
  end

  seq_state #(.RESET_VAL(1'b1)) u_s0 (
    .clk, .rst, .entry(run_end), .stable(~nrdy), .op(op[0]), .jump(jump[0]));
  seq_state u_s1 (
    .clk, .rst, .entry(jump[0]), .stable(1'b0), .op(op[1]), .jump(jump[1]));
  seq_state u_s2 (
    .clk, .rst, .entry(jump[1]), .stable(nrdy), .op(op[2]), .jump(jump[2]));
  seq_state u_s3 (
    .clk, .rst, .entry(jump[2] | next_pair), .stable(~nrdy), .op(op[3]), .jump(jump[3]));
  seq_state u_s4 (
    .clk, .rst, .entry(jump[3]), .stable(1'b0), .op(op[4]), .jump(jump[4]));
  seq_state u_s5 (
    .clk, .rst, .entry(jump[4]), .stable(nrdy), .op(op[5]), .jump(jump[5]));
  seq_state u_s6 (
    .clk, .rst, .entry(jump[5]), .stable(~nrdy), .op(op[6]), .jump(jump[6]));
  seq_state u_s7 (
    .clk, .rst, .entry(jump[6]), .stable(1'b0), .op(op[7]), .jump(jump[7]));
  seq_state_alt u_s8 (
    .clk, .rst, .entry(jump[7]), .stable(nrdy), .alt(mult_done),
    .op(op[8]), .jump(jump[8]), .alt_jump(aj8));
  seq_state u_s9 (
    .clk, .rst, .entry(to_add), .stable(1'b0), .op(op[9]), .jump(jump[9]));
  seq_state_alt u_s10 (
    .clk, .rst, .entry(to_shift), .stable(1'b0), .alt(mult_done),
    .op(op[10]), .jump(jump[10]), .alt_jump(aj10));

  always_comb begin
    rr                = op[0];
    rdy               = op[0] | op[1] | op[3] | op[4] | op[6] | op[7];
    load_k            = op[1];
    load_x1           = op[4];
    decrement_counter = op[4];
    mult_load         = op[7];
    mult_add          = op[9];
    mult_shift        = op[10];
  end

  // The sequencer is one-hot: exactly one state is active after reset.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(op))
    else $error("control_unit: sequencer state not one-hot: %b", op);

  // Handshake rule: result ready is only signalled together with a request.
  a_rr_with_rdy: assert property (@(posedge clk) disable iff (rst) rr |-> rdy)
    else $error("control_unit: rr raised without rdy");

endmodule
