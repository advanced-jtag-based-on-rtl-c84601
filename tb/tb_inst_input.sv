// Testbench for inst_input: shifts random 4-bit instructions in while the
// TAP is (modelled as) in Test-Logic-Reset with TMS=1, least significant
// bit first, and checks that the instruction appears after exactly five
// TCK cycles, that bits with TMS=0 or outside Test-Logic-Reset are ignored,
// and that trst_n loads IDCODE.
module tb_inst_input;
  import jtag_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b0, tdi = 1'b0, tlr = 1'b1;
  logic [3:0] inst;
  logic update;
  int checks = 0, failures = 0;

  inst_input dut (.*);
  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s inst=%b", what, inst); end
  endtask

  // One instruction: 4 cycles with TMS=1, then an update cycle with TMS=0.
  // Returns the number of cycles until inst holds the value.
  task automatic send(input logic [3:0] v, output int cycles);
    logic [3:0] prev;
    prev = inst;
    cycles = 0;
    for (int b = 0; b < 4; b++) begin
      @(negedge tck) begin tms = 1'b1; tdi = v[b]; end
      @(posedge tck) cycles++;
      #1 if (b < 3 || prev != v) check(inst == prev, "inst held while shifting");
    end
    @(negedge tck) begin tms = 1'b0; tdi = $urandom_range(0, 1); end
    #1 check(update, "update pulse after fourth bit");
    @(posedge tck) cycles++;
    #1 check(inst == v, "instruction loaded");
    check(!update, "update is one cycle");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [3:0] v, keep;
    #12 trst_n = 1'b1;
    #1 check(inst == I_IDCODE, "reset value IDCODE");
    for (int i = 0; i < 200; i++) begin
      v = 4'($urandom);
      send(v, cyc);
      check(cyc == 5, "five clocks per instruction");
      // idle cycles with TMS=0 must not disturb the instruction
      repeat ($urandom_range(0, 3)) begin
        @(negedge tck) begin tms = 1'b0; tdi = $urandom_range(0, 1); end
      end
      @(posedge tck) #1 check(inst == v, "inst held with TMS low");
    end
    // TMS high outside Test-Logic-Reset: ignored
    keep = inst;
    @(negedge tck) tlr = 1'b0;
    repeat (12) begin
      @(negedge tck) begin tms = 1'b1; tdi = $urandom_range(0, 1); end
    end
    @(negedge tck) begin tms = 1'b0; tlr = 1'b1; end
    @(posedge tck) #1 check(inst == keep && !update, "ignored outside TLR");
    // eight bits back to back with TMS held: two updates, last one wins
    for (int b = 0; b < 8; b++) begin
      @(negedge tck) begin tms = 1'b1; tdi = (b < 4) ? 1'(4'b0110 >> b) : 1'(4'b1001 >> (b - 4)); end
      if (b == 4) #1 check(update, "first update mid-stream");
    end
    @(negedge tck) tms = 1'b0;
    @(posedge tck) #1 check(inst == 4'b1001, "back-to-back instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
