// ce_register: WIDTH-bit register with clock enable and asynchronous clear.
//
// It stands for the FD8CE and FD32CE registers of the schematic. On a rising
// edge of clk with ce high it takes d; clr, active high, empties it at once
// and wins over ce. In the calculator every such register is clocked by the
// inverted system clock, so "rising edge of clk" here is the falling edge of
// the system clock. The asynchronous clear follows the library part; where
// the schematic ties clr to ground it stays unused.
module ce_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             ce,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
