// datapath: the operational subsystem of the calculator.
//
// It joins the operand unit (x1 buffer, sum and difference adders), the
// shift-and-add multiplier with its 32-bit result register, the fractional
// bit unit (k buffer, log2, +2) and the processed-pairs counter. The counter
// is loaded with k together with the k buffer and counts down once per
// load_x1, so counter_zero is high once the last pair has been started.
// Every register here acts on the rising edge of clk; the top feeds clk with
// the inverted system clock, so the strobes set by the controller at a rising
// system edge are carried out half a cycle later, and the flags the
// controller tests (mult_done, mult_lsb, counter_zero) have settled by its
// next rising edge.
module datapath
  import edc1_pkg::*;
(
  input  logic              clk,
  input  logic [IN_W-1:0]   x,
  input  logic              load_k,
  input  logic              load_x1,
  input  logic              decrement_counter,
  input  logic              mult_load,
  input  logic              mult_add,
  input  logic              mult_shift,
  output logic [ACC_W-1:0]  y,
  output logic [FRAC_W-1:0] y_frac_bits,
  output logic              counter_zero,
  output logic              mult_done,
  output logic              mult_lsb
);

  logic [OPND_W-1:0] opa, opb;
  logic [IN_W-1:0]   pairs_left;
  logic              cnt_ceo;

  operand_unit u_operands (
    .clk, .x, .load_x1, .sum(opa), .diff(opb)
  );

  shift_add_multiplier u_mult (
    .clk, .load_k, .mult_load, .mult_shift, .mult_add,
    .opa, .opb, .y, .mult_done, .mult_lsb
  );

  frac_bits_unit u_frac (
    .clk, .x, .load_k, .y_frac_bits
  );

  pair_counter #(.WIDTH(IN_W)) u_pairs (
    .clk, .clr(1'b0), .l(load_k), .ce(decrement_counter), .up(1'b0),
    .d(x), .q(pairs_left), .tc(counter_zero), .ceo(cnt_ceo)
  );

endmodule
