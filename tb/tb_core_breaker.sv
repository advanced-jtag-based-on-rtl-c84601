// Testbench for core_breaker: programs breakpoints from the TCK side and
// drives random addresses on the system side. breakPT must rise on the
// clock after the first valid access to the breakpoint address once the
// breaker is armed, ignore invalid or non-matching accesses, stay high, and
// clear when a new breakpoint is programmed.
module tb_core_breaker;
  logic tck = 1'b0, trst_n = 1'b0, bp_load = 1'b0;
  logic [31:0] bp_addr = '0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] addr = '0;
  logic addr_valid = 1'b0;
  logic breakpt, armed;
  int checks = 0, failures = 0, breaks = 0;

  core_breaker dut (.*);
  always #7 tck = ~tck;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic program_bp(input logic [31:0] a);
    @(negedge tck) bp_addr = a;
    @(negedge tck) bp_load = 1'b1;
    @(negedge tck) bp_load = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(armed && !breakpt, "armed after programming");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] bp;
    #12 begin trst_n = 1'b1; rst_n = 1'b1; end
    @(posedge clk) #1 check(!armed && !breakpt, "disarmed after reset");
    // the matching address before arming does nothing
    @(negedge clk) begin addr = 32'h0; addr_valid = 1; end
    @(posedge clk) #1 check(!breakpt, "no break before programming");
    for (int rep = 0; rep < 30; rep++) begin
      bp = (rep == 0) ? 32'h0000_0004 : $urandom;
      program_bp(bp);
      // random non-matching traffic, plus matching address with valid low
      repeat ($urandom_range(3, 20)) begin
        @(negedge clk) begin
          addr = $urandom;
          if (addr == bp) addr = ~bp;
          addr_valid = 1'($urandom);
          if ($urandom_range(0, 3) == 0) begin addr = bp; addr_valid = 0; end
        end
        @(posedge clk) #1 check(!breakpt, "no break on other access");
      end
      @(negedge clk) begin addr = bp; addr_valid = 1; end
      @(posedge clk) #1 check(breakpt && !armed, "break on match");
      if (breakpt) breaks++;
      repeat (5) begin
        @(negedge clk) begin addr = $urandom; addr_valid = 1; end
        @(posedge clk) #1 check(breakpt, "breakPT holds");
      end
    end
    check(breaks == 30, "all breaks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
