// tb_log2_calc: every power of two from 1 to 128 must give its exponent,
// with the upper five result bits zero.
module tb_log2_calc;
  int checks = 0, failures = 0;
  logic [7:0] x, y;

  log2_calc dut (.x, .y);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      x = 8'(1 << n);
      #1;
      checks++;
      if (y !== 8'(n)) begin failures++; $display("FAIL log2(%0d) = %0d", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
