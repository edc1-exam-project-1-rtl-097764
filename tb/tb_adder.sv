// tb_adder: random and corner-case check of the adder at 16 and 8 bits.
// Sum, carry out and signed overflow are compared with a wider-integer
// reference computed in the testbench.
module tb_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [7:0]  a8, b8, s8;
  logic        ci16, co16, ofl16, ci8, co8, ofl8;

  adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .ci(ci16), .s(s16), .co(co16), .ofl(ofl16));
  adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .ci(ci8),  .s(s8),  .co(co8),  .ofl(ofl8));

  task automatic check16();
    int unsigned full;
    int          sres;
    logic        exp_ofl;
    full    = int'(a16) + int'(b16) + int'(ci16);
    sres    = int'($signed(a16)) + int'($signed(b16)) + int'(ci16);
    exp_ofl = (sres > 32767) || (sres < -32768);
    checks++;
    if (s16 !== full[15:0] || co16 !== full[16] || ofl16 !== exp_ofl) begin
      failures++;
      $display("FAIL add16 %h+%h+%0d -> %h co=%0d ofl=%0d", a16, b16, ci16, s16, co16, ofl16);
    end
  endtask

  task automatic check8();
    int unsigned full;
    int          sres;
    logic        exp_ofl;
    full    = int'(a8) + int'(b8) + int'(ci8);
    sres    = int'($signed(a8)) + int'($signed(b8)) + int'(ci8);
    exp_ofl = (sres > 127) || (sres < -128);
    checks++;
    if (s8 !== full[7:0] || co8 !== full[8] || ofl8 !== exp_ofl) begin
      failures++;
      $display("FAIL add8 %h+%h+%0d -> %h co=%0d ofl=%0d", a8, b8, ci8, s8, co8, ofl8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = 16'h7fff; b16 = 16'h0001; ci16 = 0; #1 check16();
    a16 = 16'hffff; b16 = 16'h0001; ci16 = 0; #1 check16();
    a16 = 16'h8000; b16 = 16'h8000; ci16 = 1; #1 check16();
    a8 = 8'd2; b8 = 8'd7; ci8 = 0; #1 check8();
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a8  = 8'($urandom);  b8  = 8'($urandom);  ci8  = 1'($urandom);
      #1 check16(); check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
