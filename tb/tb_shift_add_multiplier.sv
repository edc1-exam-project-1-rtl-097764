// tb_shift_add_multiplier: drives the multiplier the way the controller
// does (load, then add when the low bit of B is set, shift, until B is
// zero) and checks the accumulated signed sum of products, the clear by
// load_k, and the number of add and shift steps each product takes: one
// shift per significant bit of the 32-bit B and one add per set bit.
module tb_shift_add_multiplier;
  int checks = 0, failures = 0;

  logic        clk = 0, load_k = 0, mult_load = 0, mult_shift = 0, mult_add = 0;
  logic [15:0] opa, opb;
  logic [31:0] y, ref_y;
  logic        mult_done, mult_lsb;

  shift_add_multiplier dut (.clk, .load_k, .mult_load, .mult_shift, .mult_add,
                            .opa, .opb, .y, .mult_done, .mult_lsb);

  always #5 clk = ~clk;

  function automatic int bitlen(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) if (v[i]) n = i + 1;
    return n;
  endfunction

  task automatic one_product(logic [15:0] a, logic [15:0] b);
    int          steps = 0, exp_steps;
    logic [31:0] bx;
    opa = a; opb = b;
    @(negedge clk); mult_load = 1;
    @(negedge clk); mult_load = 0;
    while (!mult_done) begin
      if (mult_lsb) begin
        mult_add = 1; @(negedge clk); mult_add = 0; steps++;
      end
      mult_shift = 1; @(negedge clk); mult_shift = 0; steps++;
      if (steps > 100) break;
    end
    bx        = {{16{b[15]}}, b};
    exp_steps = bitlen(bx) + $countones(bx);
    ref_y     = ref_y + 32'($signed(a)) * 32'($signed(b));
    checks++;
    if (steps !== exp_steps) begin
      failures++;
      $display("FAIL steps a=%h b=%h: %0d exp %0d", a, b, steps, exp_steps);
    end
    checks++;
    if (y !== ref_y) begin
      failures++;
      $display("FAIL sum a=%0d b=%0d: y=%0d exp %0d", $signed(a), $signed(b), $signed(y), $signed(ref_y));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opa = 0; opb = 0;
    for (int run = 0; run < 12; run++) begin
      @(negedge clk); load_k = 1;
      @(negedge clk); load_k = 0;
      ref_y = 0;
      checks++;
      if (y !== 32'd0) begin failures++; $display("FAIL clear y=%h", y); end
      for (int p = 0; p < 10; p++) begin
        int x1, x2;
        x1 = int'($urandom % 256); x2 = int'($urandom % 256);
        if (p == 0) x2 = x1 / 4;              // small or zero difference
        if (p == 1) begin x1 = 0; x2 = 0; end // multiplication by zero
        if (run >= 8) one_product(16'($urandom), 16'($urandom));
        else          one_product(16'(4 * x2 + x1), 16'(4 * x2 - x1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
