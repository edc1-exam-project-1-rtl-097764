// adder: WIDTH-bit binary adder with carry in, carry out and signed overflow.
//
// It models the ADD8/ADD16/ADD32 library adders of the schematic: s = a + b
// + ci, co is the carry out of the top bit, ofl is set when a two's
// complement sum leaves the range (both operands of one sign, the sum of the
// other). The unit is purely combinational. Subtraction is done outside it by
// inverting b and setting ci, as the operand unit does.
module adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic             ofl
);

  always_comb begin
    {co, s} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, ci};
    ofl     = (a[WIDTH-1] == b[WIDTH-1]) && (s[WIDTH-1] != a[WIDTH-1]);
  end

endmodule
