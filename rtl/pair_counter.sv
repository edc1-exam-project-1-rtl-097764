// pair_counter: loadable up/down counter that tracks the pairs still to read.
//
// It models the CB8CLED library counter used as the processed-pairs counter.
// On a rising edge of clk: l high loads d, otherwise ce high counts up when
// up is high and down when it is low. clr, active high and asynchronous,
// empties it. tc (terminal count) is all ones when counting up and all zeros
// when counting down; ceo = ce & tc is the cascade enable. In the calculator
// up is tied low, d is k, l is the k-load strobe and ce is pulsed once per
// first operand of a pair, so tc rises once k pairs have started.
// The priority of l over ce follows the library part's usual behaviour; the
// controller never asserts both at once.
module pair_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             l,
  input  logic             ce,
  input  logic             up,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             tc,
  output logic             ceo
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (l)  q <= d;
    else if (ce) q <= up ? q + WIDTH'(1) : q - WIDTH'(1);
  end

  always_comb begin
    tc  = up ? (&q) : ~(|q);
    ceo = ce & tc;
  end

endmodule
