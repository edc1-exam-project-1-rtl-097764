// edc1_pkg: widths and constants shared by the sum-of-squares calculator.
//
// The calculator takes k and then 2k operands, 8 bits each, over a parallel
// bus. The operands are widened to 16 bits with one fractional bit before
// the sum and difference are formed. The product accumulator is 32 bits,
// two of them fractional. These widths are the ones given for the design;
// the package only names them so that every module agrees.
package edc1_pkg;

  // Width of the input bus and of k.
  localparam int unsigned IN_W = 8;
  // Width of the widened operand buses and of the operand adders.
  localparam int unsigned OPND_W = 16;
  // Width of the multiplier shift registers and of the result register.
  localparam int unsigned ACC_W = 32;
  // Width of the fractional-bit count output.
  localparam int unsigned FRAC_W = 8;
  // Fractional bits of the undivided sum (one from each multiplier operand).
  localparam logic [FRAC_W-1:0] BASE_FRAC_BITS = FRAC_W'(2);

endpackage
