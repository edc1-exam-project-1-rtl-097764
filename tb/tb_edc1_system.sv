// tb_edc1_system: end-to-end test of the calculator at its default sizes.
//
// A source model answers the four-phase handshake (rdy up -> x and nrdy up,
// rdy down -> nrdy down) with random delays of 0 to 3 cycles. Runs:
// the two worked examples of the design (k = 4 giving 156934 / 2^4 and k = 2
// giving -1706 / 2^3), every k from 1 to 128 with random operands, and
// extreme operands (255 and 0). After each run, when rr rises, y is checked
// against the formula evaluated in the testbench, in quarter units
// (16*x2^2 - x1^2 summed) and y_frac_bits against 2 + log2 k.
// Each multiplication is timed: from the multiplier load to the end of the
// pair it must take one shift per significant bit of the sign-extended
// difference and one add per set bit, as the shift-and-add loop prescribes.
// Mechanisms counted (each must occur): waiting in a handshake state,
// multiplication skipped because the difference is zero, add steps,
// shift-only steps, negative differences, pair-loop repeats, main-loop
// repeats, rr raised with rdy.
module tb_edc1_system;
  int checks = 0, failures = 0;

  logic        clock = 0, rst, nrdy;
  logic [7:0]  x;
  logic        rdy, rr;
  logic [31:0] y;
  logic [7:0]  y_frac_bits;

  edc1_system dut (.clock, .rst, .x, .nrdy, .rdy, .rr, .y, .y_frac_bits);

  always #5 clock = ~clock;

  int n_wait = 0, n_skip = 0, n_add = 0, n_shift_only = 0, n_neg = 0;
  int n_pair_loop = 0, n_main_loop = 0, n_rr = 0;

  // ---- source side of the handshake ----
  task automatic wait_cycles(int n);
    repeat (n) @(posedge clock);
    #1;
  endtask

  task automatic feed(int value);
    int d;
    while (!rdy) begin @(posedge clock); #1; end
    d = int'($urandom % 4);
    if (d > 0) n_wait++;
    wait_cycles(d);
    x = 8'(value); nrdy = 1;
    while (rdy) begin @(posedge clock); #1; end
    wait_cycles(int'($urandom % 4));
    x = 8'($urandom); nrdy = 0;
  endtask

  // ---- observe the multiplier through the control strobes ----
  int          mult_cycles = 0, exp_mult_cycles = 0;
  logic        in_mult = 0;
  logic [31:0] b_ext;

  function automatic int bitlen(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  always @(posedge clock) begin
    if (dut.u_control.mult_add) begin mult_cycles++; n_add++; end
    if (dut.u_control.mult_shift) mult_cycles++;
    if (dut.u_control.mult_shift && !$past(dut.u_control.mult_add)) n_shift_only++;
    if (rr) begin
      checks++;
      if (!rdy) begin failures++; $display("FAIL rr without rdy"); end
    end
  end

  task automatic check_mult_time();
    checks++;
    if (mult_cycles != exp_mult_cycles) begin
      failures++;
      $display("FAIL multiplication took %0d cycles, expected %0d", mult_cycles, exp_mult_cycles);
    end
  endtask

  task automatic run(int k, int vals[]);
    logic [31:0] ref_y = 0;
    int          n = 0;
    while ((1 << n) < k) n++;
    wait (rr == 1);
    @(posedge clock); #1;
    feed(k);
    for (int p = 0; p < k; p++) begin
      int x1, x2, d;
      x1 = vals[2 * p]; x2 = vals[2 * p + 1];
      if (p > 0) n_pair_loop++;
      feed(x1);
      mult_cycles = 0;
      d = 4 * x2 - x1;
      b_ext = 32'(d);
      exp_mult_cycles = bitlen(b_ext) + $countones(b_ext);
      if (d == 0) n_skip++;
      if (d < 0) n_neg++;
      feed(x2);
      ref_y = ref_y + 32'(16 * x2 * x2 - x1 * x1);
      // The multiplication ends before the next request (or rr) appears.
      wait (rdy == 1);
      check_mult_time();
    end
    checks++;
    if (!rr) begin failures++; $display("FAIL rr not raised after the run"); end
    else n_rr++;
    n_main_loop++;
    checks++;
    if (y !== ref_y || y_frac_bits !== 8'(2 + n)) begin
      failures++;
      $display("FAIL k=%0d y=%0d exp %0d frac=%0d exp %0d", k, $signed(y), $signed(ref_y),
               y_frac_bits, 2 + n);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[];
    rst = 0; nrdy = 0; x = 0;
    #1 rst = 1;
    #20 rst = 0;

    // Worked example 1: k = 4, result 156934 quarter units = 9808.375.
    vals = '{123, 85, 71, 2, 0, 0, 64, 64};
    run(4, vals);
    checks++;
    if (y !== 32'd156934 || y_frac_bits !== 8'd4) begin
      failures++; $display("FAIL example 1: y=%0d frac=%0d", $signed(y), y_frac_bits);
    end
    // Worked example 2: k = 2, result -1706 quarter units = -213.25.
    vals = '{69, 13, 7, 5};
    run(2, vals);
    checks++;
    if ($signed(y) !== -32'sd1706 || y_frac_bits !== 8'd3) begin
      failures++; $display("FAIL example 2: y=%0d frac=%0d", $signed(y), y_frac_bits);
    end

    // Every k with random operands, a few with zero differences.
    for (int n = 0; n < 8; n++) begin
      int k;
      k = 1 << n;
      vals = new[2 * k];
      foreach (vals[i]) vals[i] = int'($urandom % 256);
      if (k >= 2) begin vals[2] = 40; vals[3] = 10; end
      run(k, vals);
    end

    // Extremes: largest positive and most negative terms.
    vals = new[256];
    foreach (vals[i]) vals[i] = (i % 2 == 1) ? 255 : 0;
    run(128, vals);
    foreach (vals[i]) vals[i] = (i % 2 == 0) ? 255 : 0;
    run(128, vals);

    wait (rr == 1);
    $display("mechanisms: handshake waits=%0d zero skips=%0d adds=%0d shift-only=%0d",
             n_wait, n_skip, n_add, n_shift_only);
    $display("            negative differences=%0d pair repeats=%0d main repeats=%0d rr=%0d",
             n_neg, n_pair_loop, n_main_loop, n_rr);
    if (n_wait == 0)       begin failures++; $display("FAIL no handshake wait"); end
    if (n_skip == 0)       begin failures++; $display("FAIL no zero skip"); end
    if (n_add == 0)        begin failures++; $display("FAIL no add step"); end
    if (n_shift_only == 0) begin failures++; $display("FAIL no shift-only step"); end
    if (n_neg == 0)        begin failures++; $display("FAIL no negative difference"); end
    if (n_pair_loop == 0)  begin failures++; $display("FAIL no pair loop repeat"); end
    if (n_main_loop < 2)   begin failures++; $display("FAIL no main loop repeat"); end
    if (n_rr == 0)         begin failures++; $display("FAIL rr never raised"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
