// log2_calc: base-2 logarithm of a one-hot byte, from three OR gates.
//
// k is one of 1, 2, 4, ..., 128, so exactly one bit of x is set and its index
// is log2 k. Bit j of the result is the OR of the input bits whose index has
// bit j set: y[0] = x1|x3|x5|x7, y[1] = x2|x3|x6|x7, y[2] = x4|x5|x6|x7.
// The upper five bits are constant zero. Purely combinational. For an input
// that is not a power of two the result is meaningless, as in the original.
module log2_calc (
  input  logic [7:0] x,
  output logic [7:0] y
);

  always_comb begin
    y    = '0;
    y[0] = x[1] | x[3] | x[5] | x[7];
    y[1] = x[2] | x[3] | x[6] | x[7];
    y[2] = x[4] | x[5] | x[6] | x[7];
  end

endmodule
