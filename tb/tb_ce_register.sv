// tb_ce_register: clock-enable load and asynchronous clear of ce_register.
// A reference copy of the register is kept in the testbench and compared
// after every edge and every clear pulse.
module tb_ce_register;
  int checks = 0, failures = 0;

  logic        clk = 0, clr, ce;
  logic [31:0] d, q, ref_q;

  ce_register #(.WIDTH(32)) dut (.clk, .clr, .ce, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; ce = 0; d = 0;
    #1 clr = 1;
    #3 clr = 0; ref_q = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ce = 1'($urandom); d = $urandom;
      if (($urandom % 16) == 0) begin
        #1 clr = 1; #1 ref_q = '0;
        checks++;
        if (q !== 32'd0) begin failures++; $display("FAIL async clear q=%h", q); end
        clr = 0;
      end
      @(posedge clk);
      if (ce) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h exp=%h", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
