// shift_add_multiplier: shift-and-add multiply-accumulate into a 32-bit sum.
//
// Operand A (2*x2 + x1/2) and operand B (2*x2 - x1/2) arrive as 16-bit
// numbers with one fractional bit. mult_load sign-extends both to 32 bits
// and loads them into two 32-bit shift registers. Each mult_add adds A to the
// 32-bit result register; each mult_shift moves A one place left and B one
// place right (zero enters at the top). The controller adds when B's low bit
// (mult_lsb) is set and stops when B is zero (mult_done), so a product is
// accumulated after as many shifts as B has significant bits. A negative B
// is sign-extended and therefore takes all 32 shifts; modulo 2^32 the sum is
// still the signed product, which is why the registers are as wide as the
// result. The result has 2 fractional bits and is cleared asynchronously by
// load_k when a new k arrives. Registers act on the rising edge of clk (the
// inverted system clock in the calculator); mult_done and mult_lsb are
// combinational from the B register.
module shift_add_multiplier
  import edc1_pkg::*;
(
  input  logic              clk,
  input  logic              load_k,
  input  logic              mult_load,
  input  logic              mult_shift,
  input  logic              mult_add,
  input  logic [OPND_W-1:0] opa,
  input  logic [OPND_W-1:0] opb,
  output logic [ACC_W-1:0]  y,
  output logic              mult_done,
  output logic              mult_lsb
);

  logic [ACC_W-1:0] a_ext, b_ext, a_q, b_q, acc_d;
  logic             a_zero, acc_co, acc_ofl;

  always_comb begin
    a_ext = {{(ACC_W-OPND_W){opa[OPND_W-1]}}, opa};
    b_ext = {{(ACC_W-OPND_W){opb[OPND_W-1]}}, opb};
  end

  // Operand A: shifts towards the top.
  sr32cled u_opa (
    .clk, .clr(1'b0), .l(mult_load), .ce(mult_shift), .left(1'b1),
    .sli(1'b0), .sri(1'b0), .d(a_ext), .q(a_q), .zero(a_zero)
  );

  // Operand B: shifts towards bit 0; its zero flag ends the multiplication.
  sr32cled u_opb (
    .clk, .clr(1'b0), .l(mult_load), .ce(mult_shift), .left(1'b0),
    .sli(1'b0), .sri(1'b0), .d(b_ext), .q(b_q), .zero(mult_done)
  );

  assign mult_lsb = b_q[0];

  adder #(.WIDTH(ACC_W)) u_acc_add (
    .a(a_q), .b(y), .ci(1'b0), .s(acc_d), .co(acc_co), .ofl(acc_ofl)
  );

  ce_register #(.WIDTH(ACC_W)) u_acc (
    .clk, .clr(load_k), .ce(mult_add), .d(acc_d), .q(y)
  );

endmodule
