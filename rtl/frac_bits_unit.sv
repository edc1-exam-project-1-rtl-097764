// frac_bits_unit: reports how many fractional bits the output carries.
//
// Dividing the sum by k = 2^n is done by moving the binary point rather than
// by shifting the 32-bit sum: the sum is output unchanged and this unit
// outputs 2 + log2 k as its fractional-bit count. k is captured from the bus
// by load_k in an 8-bit register (it is only on the bus at the start of a
// run), passed through the three-OR log2 circuit and added to the constant 2
// by an 8-bit adder. y_frac_bits is combinational from the k register, which
// loads on the rising edge of clk (the inverted system clock).
module frac_bits_unit
  import edc1_pkg::*;
(
  input  logic              clk,
  input  logic [IN_W-1:0]   x,
  input  logic              load_k,
  output logic [FRAC_W-1:0] y_frac_bits
);

  logic [IN_W-1:0]   k_q;
  logic [FRAC_W-1:0] log2k;
  logic              co, ofl;

  ce_register #(.WIDTH(IN_W)) u_k (
    .clk, .clr(1'b0), .ce(load_k), .d(x), .q(k_q)
  );

  log2_calc u_log2 (.x(k_q), .y(log2k));

  adder #(.WIDTH(FRAC_W)) u_add (
    .a(log2k), .b(BASE_FRAC_BITS), .ci(1'b0), .s(y_frac_bits), .co(co), .ofl(ofl)
  );

endmodule
