// tb_seq_state: entry sets the state, stable holds it, leaving pulses jump
// for exactly the last active cycle; reset value of both variants.
module tb_seq_state;
  int checks = 0, failures = 0;

  logic clk = 0, rst, entry, stable;
  logic op0, jump0, op1, jump1;
  logic ref_op0, ref_op1;

  seq_state                     dut0 (.clk, .rst, .entry, .stable, .op(op0), .jump(jump0));
  seq_state #(.RESET_VAL(1'b1)) dut1 (.clk, .rst, .entry, .stable, .op(op1), .jump(jump1));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (op0 !== ref_op0 || jump0 !== (ref_op0 & ~stable) ||
        op1 !== ref_op1 || jump1 !== (ref_op1 & ~stable)) begin
      failures++;
      $display("FAIL t=%0t op0=%0d/%0d op1=%0d/%0d jump0=%0d jump1=%0d", $time,
               op0, ref_op0, op1, ref_op1, jump0, jump1);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; #1 rst = 1; entry = 0; stable = 0;
    #2; ref_op0 = 0; ref_op1 = 1; compare();
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      entry = (($urandom % 4) == 0); stable = 1'($urandom);
      #1 compare();
      @(posedge clk);
      ref_op0 = entry | (ref_op0 & stable);
      ref_op1 = entry | (ref_op1 & stable);
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
