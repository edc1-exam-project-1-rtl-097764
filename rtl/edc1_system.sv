// edc1_system: sequential calculator of y = sum_{i=1..k}(4*x_2i^2 - x_(2i-1)^2/4) / k.
//
// k (1, 2, 4, ..., 128) and then x1, x2, ..., x_2k arrive one at a time on
// the 8-bit bus x. Each number is requested with a four-phase handshake:
// the calculator raises rdy, the source puts the number on x and raises
// nrdy, the calculator drops rdy once it has read it, the source drops nrdy.
// rr is raised together with rdy while the calculator waits for the next k;
// y and y_frac_bits are then valid and stay so until that k is taken.
// Output format: y is the signed 32-bit sum of products with 2 fractional
// bits; the division by k is expressed by y_frac_bits = 2 + log2 k, the
// number of fractional bits to read y with (value = y / 2^y_frac_bits).
// Two clock phases: the controller's states change on the rising edge of
// clock and the operational subsystem is clocked by the inverted clock, so
// every control strobe is executed half a cycle after it is raised and the
// status flags are settled before the controller looks at them again.
// rst is an asynchronous, active-high reset of the controller into its
// initial loop; it is this design's addition. The data registers have no
// reset: k loading clears the result and loads everything else that is read.
module edc1_system
  import edc1_pkg::*;
(
  input  logic              clock,
  input  logic              rst,
  input  logic [IN_W-1:0]   x,
  input  logic              nrdy,
  output logic              rdy,
  output logic              rr,
  output logic [ACC_W-1:0]  y,
  output logic [FRAC_W-1:0] y_frac_bits
);

  logic clock_n;
  logic load_k, load_x1, decrement_counter, mult_load, mult_add, mult_shift;
  logic counter_zero, mult_done, mult_lsb;

  // Second clock phase for the operational subsystem.
  assign clock_n = ~clock;

  control_unit u_control (
    .clk(clock), .rst, .nrdy, .mult_done, .mult_lsb, .counter_zero,
    .rr, .rdy, .load_k, .load_x1, .decrement_counter,
    .mult_load, .mult_add, .mult_shift
  );

  datapath u_datapath (
    .clk(clock_n), .x, .load_k, .load_x1, .decrement_counter,
    .mult_load, .mult_add, .mult_shift,
    .y, .y_frac_bits, .counter_zero, .mult_done, .mult_lsb
  );

endmodule
