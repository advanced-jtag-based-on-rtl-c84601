// Testbench for tap_ctrl: compares the controller with a table-driven
// model of the nine-state graph under random TMS, checks that four TMS=1
// clocks reach Test-Logic-Reset from every state, that the shortest
// Run-Test/Idle loop is three clocks, and that dclk is high exactly while
// the controller is in Run-Test/Idle.
module tb_tap_ctrl;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1;
  tap_state_t state;
  logic reset, capture_dr, shift_dr, clock_dr, update_dr, enable, dclk;
  int checks = 0, failures = 0;

  tap_ctrl dut (.*);

  always #5 tck = ~tck;

  // Model: next state for TMS=0 and TMS=1, per state code 0..8
  int unsigned nxt0 [9] = '{1, 1, 3, 4, 4, 6, 6, 4, 1};
  int unsigned nxt1 [9] = '{0, 2, 0, 5, 5, 8, 7, 8, 2};
  int unsigned mstate;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model %0d dut %0d)", what, mstate, state);
    end
  endtask

  task automatic step(input logic t);
    @(negedge tck) tms = t;
    #1 check(dclk == (mstate == 1), "dclk high in RTI after falling edge");
    @(posedge tck);
    mstate = t ? nxt1[mstate] : nxt0[mstate];
    #1;
    check(int'(state) == mstate, "state");
    check(reset == (mstate == 0), "reset");
    check(capture_dr == (mstate == 3), "capture_dr");
    check(shift_dr == (mstate == 4) && enable == (mstate == 4), "shift_dr/enable");
    check(clock_dr == (mstate == 3 || mstate == 4), "clock_dr");
    check(update_dr == (mstate == 8), "update_dr");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mstate = 0;
    #12 trst_n = 1'b1;
    #1 check(state == TLR, "reset state");
    // random walk
    repeat (3000) step(1'($urandom_range(0, 1)));
    // four TMS=1 from every state reach TLR
    for (int s = 0; s < 9; s++) begin
      // walk to state s by a short path from TLR
      repeat (4) step(1'b1);
      case (s)
        1: step(0);
        2: begin step(0); step(1); end
        3: begin step(0); step(1); step(0); end
        4: begin step(0); step(1); step(0); step(0); end
        5: begin step(0); step(1); step(0); step(1); end
        6: begin step(0); step(1); step(0); step(1); step(0); end
        7: begin step(0); step(1); step(0); step(1); step(0); step(1); end
        8: begin step(0); step(1); step(0); step(1); step(1); end
        default: ;
      endcase
      check(int'(state) == s, "reached start state");
      repeat (4) step(1'b1);
      check(state == TLR, "4 clocks TMS=1 reach TLR");
    end
    // shortest Run-Test/Idle loop: 3 clocks
    step(0);
    check(state == RTI, "in RTI");
    step(1); step(1); step(0);
    check(state == RTI, "RTI re-entered after 3 clocks");
    @(negedge tck) #1 check(dclk, "dclk high after re-entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
