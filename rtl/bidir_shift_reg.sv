// bidir_shift_reg: WIDTH-bit loadable bidirectional shift register.
//
// It models the SR16CLED library part, the half of the 32-bit multiplier
// registers. On a rising edge of clk: l high loads d in parallel; otherwise
// ce high shifts, towards the top when left is high (sli enters at bit 0)
// and towards bit 0 when left is low (sri enters at the top bit). clr,
// active high and asynchronous, empties it. That l acts without ce is an
// assumption about the library part; the multiplier never asserts both.
module bidir_shift_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             l,
  input  logic             ce,
  input  logic             left,
  input  logic             sli,
  input  logic             sri,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)       q <= '0;
    else if (l)    q <= d;
    else if (ce) begin
      if (left)    q <= {q[WIDTH-2:0], sli};
      else         q <= {sri, q[WIDTH-1:1]};
    end
  end

endmodule
