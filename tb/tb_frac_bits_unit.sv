// tb_frac_bits_unit: after k is loaded the unit reports 2 + log2 k fractional
// bits, and keeps reporting it while other numbers pass on the bus.
module tb_frac_bits_unit;
  int checks = 0, failures = 0;

  logic       clk = 0, load_k;
  logic [7:0] x, y_frac_bits;

  frac_bits_unit dut (.clk, .x, .load_k, .y_frac_bits);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_k = 0; x = 0;
    for (int r = 0; r < 3; r++) begin
      for (int n = 0; n < 8; n++) begin
        @(negedge clk); x = 8'(1 << n); load_k = 1;
        @(negedge clk); load_k = 0;
        for (int j = 0; j < 4; j++) begin
          x = 8'($urandom);
          @(negedge clk);
          checks++;
          if (y_frac_bits !== 8'(2 + n)) begin
            failures++;
            $display("FAIL k=%0d frac=%0d", 1 << n, y_frac_bits);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
