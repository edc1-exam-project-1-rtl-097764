// sr32cled: 32-bit bidirectional shift register with a zero flag.
//
// Two 16-bit shift registers are chained: when shifting left the top bit of
// the low half feeds the low bit of the high half, when shifting right the
// low bit of the high half feeds the top bit of the low half. External sli
// enters the low half and sri the high half. Load, shift and clear behave as
// in bidir_shift_reg and act on the rising edge of clk. zero is
// combinational: four 8-input NORs over the byte lanes of q, ANDed, so it is
// high exactly when q is all zeros. The multiplier uses it as its
// "multiplication done" flag.
module sr32cled (
  input  logic        clk,
  input  logic        clr,
  input  logic        l,
  input  logic        ce,
  input  logic        left,
  input  logic        sli,
  input  logic        sri,
  input  logic [31:0] d,
  output logic [31:0] q,
  output logic        zero
);

  logic [15:0] q_hi, q_lo;
  logic [3:0]  lane_zero;

  bidir_shift_reg #(.WIDTH(16)) u_hi (
    .clk, .clr, .l, .ce, .left,
    .sli (q_lo[15]),
    .sri (sri),
    .d   (d[31:16]),
    .q   (q_hi)
  );

  bidir_shift_reg #(.WIDTH(16)) u_lo (
    .clk, .clr, .l, .ce, .left,
    .sli (sli),
    .sri (q_hi[0]),
    .d   (d[15:0]),
    .q   (q_lo)
  );

  always_comb begin
    q = {q_hi, q_lo};
    for (int i = 0; i < 4; i++) lane_zero[i] = ~(|q[8*i +: 8]);
    zero = &lane_zero;
  end

endmodule
