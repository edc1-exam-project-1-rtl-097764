// tb_control_unit: the sequencer against a cycle-by-cycle reference model of
// the calculator's flowchart, with random handshake and datapath flags.
// Every strobe, rdy and rr are compared each cycle, and each state of the
// flowchart must be visited.
module tb_control_unit;
  int checks = 0, failures = 0;

  typedef enum int {S_INIT, S_LOADK, S_WK, S_REQ1, S_LOAD1, S_W1, S_REQ2,
                    S_LOADM, S_WM, S_ADD, S_SHIFT} state_t;

  logic clk = 0, rst, nrdy, mult_done, mult_lsb, counter_zero;
  logic rr, rdy, load_k, load_x1, decrement_counter, mult_load, mult_add, mult_shift;
  state_t st;
  int     visits [11];

  control_unit dut (.clk, .rst, .nrdy, .mult_done, .mult_lsb, .counter_zero,
                    .rr, .rdy, .load_k, .load_x1, .decrement_counter,
                    .mult_load, .mult_add, .mult_shift);

  always #5 clk = ~clk;

  function automatic state_t after_pair_or_step(logic done, logic lsb, logic cz);
    if (done) return cz ? S_INIT : S_REQ1;
    return lsb ? S_ADD : S_SHIFT;
  endfunction

  function automatic state_t next_state(state_t s);
    case (s)
      S_INIT:  return nrdy ? S_LOADK : S_INIT;
      S_LOADK: return S_WK;
      S_WK:    return nrdy ? S_WK : S_REQ1;
      S_REQ1:  return nrdy ? S_LOAD1 : S_REQ1;
      S_LOAD1: return S_W1;
      S_W1:    return nrdy ? S_W1 : S_REQ2;
      S_REQ2:  return nrdy ? S_LOADM : S_REQ2;
      S_LOADM: return S_WM;
      S_WM:    return nrdy ? S_WM : after_pair_or_step(mult_done, mult_lsb, counter_zero);
      S_ADD:   return S_SHIFT;
      default: return after_pair_or_step(mult_done, mult_lsb, counter_zero);
    endcase
  endfunction

  task automatic compare();
    logic e_rdy;
    e_rdy = st inside {S_INIT, S_LOADK, S_REQ1, S_LOAD1, S_REQ2, S_LOADM};
    checks++;
    if (rr !== (st == S_INIT) || rdy !== e_rdy || load_k !== (st == S_LOADK) ||
        load_x1 !== (st == S_LOAD1) || decrement_counter !== (st == S_LOAD1) ||
        mult_load !== (st == S_LOADM) || mult_add !== (st == S_ADD) ||
        mult_shift !== (st == S_SHIFT)) begin
      failures++;
      $display("FAIL state %s: rr=%0d rdy=%0d lk=%0d lx=%0d dc=%0d ml=%0d ma=%0d ms=%0d",
               st.name(), rr, rdy, load_k, load_x1, decrement_counter,
               mult_load, mult_add, mult_shift);
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
    rst = 0; #1 rst = 1; nrdy = 0; mult_done = 0; mult_lsb = 0; counter_zero = 0;
    st = S_INIT;
    #2 rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      nrdy         = (($urandom % 3) != 0) ? nrdy : ~nrdy;
      mult_done    = (($urandom % 4) == 0);
      mult_lsb     = 1'($urandom);
      counter_zero = (($urandom % 3) == 0);
      #1 compare();
      visits[st]++;
      @(posedge clk);
      st = next_state(st);
    end
    for (int s = 0; s < 11; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
