// tb_datapath: runs complete calculations through the operational subsystem
// by issuing the controller's strobes from the testbench: load k, then per
// pair load x1 (with decrement), offer x2 and load the multiplier, then add
// and shift until B is zero. Checks the result against the formula, the
// fractional-bit count, and that counter_zero rises only after the k-th
// pair's first operand.
module tb_datapath;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [7:0]  x = 0, y_frac_bits;
  logic        load_k = 0, load_x1 = 0, decrement_counter = 0;
  logic        mult_load = 0, mult_add = 0, mult_shift = 0;
  logic [31:0] y;
  logic        counter_zero, mult_done, mult_lsb;

  datapath dut (.clk, .x, .load_k, .load_x1, .decrement_counter, .mult_load,
                .mult_add, .mult_shift, .y, .y_frac_bits, .counter_zero,
                .mult_done, .mult_lsb);

  always #5 clk = ~clk;

  task automatic strobe(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  task automatic run(int n);
    int          k;
    logic [31:0] ref_y;
    k = 1 << n;
    ref_y = 0;
    @(negedge clk); x = 8'(k); strobe(load_k);
    checks++;
    if (y !== 0 || y_frac_bits !== 8'(2 + n)) begin
      failures++; $display("FAIL after load k: y=%h frac=%0d", y, y_frac_bits);
    end
    for (int p = 0; p < k; p++) begin
      int x1, x2, guard;
      x1 = int'($urandom % 256); x2 = int'($urandom % 256);
      if (p == 1) begin x1 = 8; x2 = 2; end
      x = 8'(x1);
      load_x1 = 1; decrement_counter = 1; @(negedge clk);
      load_x1 = 0; decrement_counter = 0;
      checks++;
      if (counter_zero !== (p == k - 1)) begin
        failures++; $display("FAIL counter_zero=%0d at pair %0d of %0d", counter_zero, p, k);
      end
      x = 8'(x2); strobe(mult_load);
      x = 8'($urandom);
      guard = 0;
      while (!mult_done && guard < 80) begin
        if (mult_lsb) strobe(mult_add);
        strobe(mult_shift);
        guard++;
      end
      ref_y = ref_y + 32'(16 * x2 * x2 - x1 * x1);
    end
    checks++;
    if (y !== ref_y || y_frac_bits !== 8'(2 + n)) begin
      failures++;
      $display("FAIL k=%0d y=%0d exp %0d frac=%0d", k, $signed(y), $signed(ref_y), y_frac_bits);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) run(n);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
