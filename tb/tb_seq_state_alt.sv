// tb_seq_state_alt: state hold and the choice between the two exits.
module tb_seq_state_alt;
  int checks = 0, failures = 0;

  logic clk = 0, rst, entry, stable, alt, op, jump, alt_jump, ref_op;
  int   n_jump = 0, n_alt = 0;

  seq_state_alt dut (.clk, .rst, .entry, .stable, .alt, .op, .jump, .alt_jump);

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (op !== ref_op || jump !== (ref_op & ~stable & ~alt) ||
        alt_jump !== (ref_op & ~stable & alt)) begin
      failures++;
      $display("FAIL op=%0d/%0d jump=%0d alt_jump=%0d", op, ref_op, jump, alt_jump);
    end
    if (jump) n_jump++;
    if (alt_jump) n_alt++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; #1 rst = 1; entry = 0; stable = 0; alt = 0;
    #2 ref_op = 0; compare(); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      entry = (($urandom % 3) == 0); stable = 1'($urandom); alt = 1'($urandom);
      #1 compare();
      @(posedge clk);
      ref_op = entry | (ref_op & stable);
      #1;
    end
    checks++;
    if (n_jump == 0 || n_alt == 0) begin failures++; $display("FAIL an exit never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
