// tb_bidir_shift_reg: random load / shift-left / shift-right / hold / clear
// sequence on the 16-bit shift register, against a reference model.
module tb_bidir_shift_reg;
  int checks = 0, failures = 0;

  logic        clk = 0, clr, l, ce, left, sli, sri;
  logic [15:0] d, q, ref_q;

  bidir_shift_reg #(.WIDTH(16)) dut (.clk, .clr, .l, .ce, .left, .sli, .sri, .d, .q);

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
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      l = (($urandom % 6) == 0); ce = 1'($urandom); left = 1'($urandom);
      sli = 1'($urandom); sri = 1'($urandom); d = 16'($urandom);
      @(posedge clk);
      if (l)          ref_q = d;
      else if (ce)    ref_q = left ? {ref_q[14:0], sli} : {sri, ref_q[15:1]};
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h exp=%h", q, ref_q); end
      if (($urandom % 100) == 0) begin
        clr = 1; ref_q = 0; #1;
        checks++;
        if (q !== 16'd0) begin failures++; $display("FAIL clear"); end
        clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
