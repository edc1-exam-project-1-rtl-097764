// operand_unit: forms the two multiplier operands 2*x2 + x1/2 and 2*x2 - x1/2.
//
// The sum of 4*x2^2 - x1^2/4 terms is rewritten as (2*x2 + x1/2)(2*x2 - x1/2)
// so that each pair costs one multiplication. The first operand of a pair,
// x1, is held in an 8-bit register (loaded by load_x1) because the second,
// x2, is only on the bus while it is being offered. Both are placed on
// 16-bit buses with one fractional bit, zero padded:
//   x2 bus = {6'b0, x, 2'b0}     value 2*x2 (x multiplied by 4, 1 frac bit)
//   x1 bus = {8'b0, x1_reg}      value x1/2
// A 16-bit adder gives the sum; a second one adds the inverted x1 bus with
// carry in set and gives the two's complement difference. Both outputs are
// combinational from x and the register, with 1 fractional bit; the sum is
// never negative, the difference may be. The register loads on the rising
// edge of clk, which in the calculator is the inverted system clock.
module operand_unit
  import edc1_pkg::*;
(
  input  logic              clk,
  input  logic [IN_W-1:0]   x,
  input  logic              load_x1,
  output logic [OPND_W-1:0] sum,
  output logic [OPND_W-1:0] diff
);

  logic [IN_W-1:0]   x1_q;
  logic [OPND_W-1:0] x1_bus, x2_bus, x1_inv;
  logic              sum_co, sum_ofl, diff_co, diff_ofl;

  ce_register #(.WIDTH(IN_W)) u_x1 (
    .clk, .clr(1'b0), .ce(load_x1), .d(x), .q(x1_q)
  );

  always_comb begin
    x2_bus = {6'b0, x, 2'b0};
    x1_bus = {8'b0, x1_q};
    x1_inv = ~x1_bus;
  end

  adder #(.WIDTH(OPND_W)) u_add (
    .a(x2_bus), .b(x1_bus), .ci(1'b0), .s(sum), .co(sum_co), .ofl(sum_ofl)
  );

  adder #(.WIDTH(OPND_W)) u_sub (
    .a(x1_inv), .b(x2_bus), .ci(1'b1), .s(diff), .co(diff_co), .ofl(diff_ofl)
  );

endmodule
