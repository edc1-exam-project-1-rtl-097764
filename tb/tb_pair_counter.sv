// tb_pair_counter: load, count down to terminal count, count up, load
// priority and asynchronous clear of pair_counter, against a reference.
module tb_pair_counter;
  int checks = 0, failures = 0;

  logic       clk = 0, clr, l, ce, up, tc, ceo;
  logic [7:0] d, q, ref_q;
  logic       ref_tc;

  pair_counter dut (.clk, .clr, .l, .ce, .up, .d, .q, .tc, .ceo);

  always #5 clk = ~clk;

  task automatic compare();
    ref_tc = up ? (ref_q == 8'hff) : (ref_q == 8'h00);
    checks++;
    if (q !== ref_q || tc !== ref_tc || ceo !== (ce & ref_tc)) begin
      failures++;
      $display("FAIL q=%0d exp=%0d tc=%0d ceo=%0d", q, ref_q, tc, ceo);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; #1 clr = 1; l = 0; ce = 0; up = 0; d = 0;
    #2 clr = 0; ref_q = 0;
    // Count down from each k: terminal count exactly after k decrements.
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); l = 1; ce = 0; d = 8'(1 << n);
      @(posedge clk); ref_q = d; #1 l = 0; compare();
      for (int j = 0; j < (1 << n); j++) begin
        @(negedge clk); ce = 1;
        #1 compare();
        @(posedge clk); ref_q = ref_q - 1; #1 compare();
      end
      @(negedge clk); ce = 0; #1 compare();
      checks++;
      if (!tc) begin failures++; $display("FAIL no terminal count after %0d", d); end
    end
    // Random mix of load, up/down counting and clear.
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      l = (($urandom % 8) == 0); ce = 1'($urandom); up = 1'($urandom); d = 8'($urandom);
      #1 compare();
      @(posedge clk);
      if (l) ref_q = d; else if (ce) ref_q = up ? ref_q + 1 : ref_q - 1;
      #1 compare();
      if (($urandom % 50) == 0) begin
        clr = 1; ref_q = 0; #1 compare(); clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
