// tb_operand_unit: the two operands 2*x2 + x1/2 and 2*x2 - x1/2 in
// half-units (one fractional bit), i.e. 4*x2 + x1 and 4*x2 - x1 as 16-bit
// two's complement, for every x1 and a sweep of x2 values.
module tb_operand_unit;
  int checks = 0, failures = 0;

  logic        clk = 0, load_x1;
  logic [7:0]  x;
  logic [15:0] sum, diff;

  operand_unit dut (.clk, .x, .load_x1, .sum, .diff);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_x1 = 0; x = 0;
    for (int x1 = 0; x1 < 256; x1++) begin
      @(negedge clk); x = 8'(x1); load_x1 = 1;
      @(negedge clk); load_x1 = 0;
      for (int j = 0; j < 8; j++) begin
        int x2;
        x2 = (j == 0) ? 0 : (j == 1) ? 255 : int'($urandom % 256);
        x = 8'(x2);
        #1;
        checks++;
        if (sum !== 16'(4 * x2 + x1) || diff !== 16'(4 * x2 - x1)) begin
          failures++;
          $display("FAIL x1=%0d x2=%0d sum=%0d diff=%0d", x1, x2, sum, $signed(diff));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
