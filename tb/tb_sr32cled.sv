// tb_sr32cled: random operation sequence on the 32-bit shift register,
// checking that bits cross between the two halves in both directions and
// that the zero flag follows the contents.
module tb_sr32cled;
  int checks = 0, failures = 0;

  logic        clk = 0, clr, l, ce, left, sli, sri, zero;
  logic [31:0] d, q, ref_q;

  sr32cled dut (.clk, .clr, .l, .ce, .left, .sli, .sri, .d, .q, .zero);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; #1 clr = 1; l = 0; ce = 0; left = 0; sli = 0; sri = 0; d = 0;
    #2 clr = 0; ref_q = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      l = (($urandom % 10) == 0); ce = 1'($urandom); left = 1'($urandom);
      sli = (($urandom % 4) == 0); sri = (($urandom % 4) == 0);
      // Mostly sparse values so that the zero flag is exercised.
      d = (($urandom % 3) == 0) ? (32'd1 << ($urandom % 32)) : $urandom;
      @(posedge clk);
      if (l)          ref_q = d;
      else if (ce)    ref_q = left ? {ref_q[30:0], sli} : {sri, ref_q[31:1]};
      #1;
      checks++;
      if (q !== ref_q || zero !== (ref_q == 32'd0)) begin
        failures++;
        $display("FAIL q=%h exp=%h zero=%0d", q, ref_q, zero);
      end
      if (($urandom % 200) == 0) begin
        clr = 1; ref_q = 0; #1;
        checks++;
        if (q !== 32'd0 || !zero) begin failures++; $display("FAIL clear"); end
        clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
