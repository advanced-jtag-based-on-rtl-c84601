// Testbench for clock_selector: counts rising edges of the core clock in
// both modes. In normal mode every sys_clk edge must arrive; in debugging
// mode only dclk edges; switching in either direction, with dclk high or
// low, must not add an edge.
module tb_clock_selector;
  logic sys_clk = 1'b0, rst_n = 1'b0, dclk = 1'b0, breakpt = 1'b0;
  logic core_clk, use_dclk;
  int checks = 0, failures = 0;
  int n_core = 0, n_sys = 0, n_dclk = 0;

  clock_selector dut (.*);
  always #5 sys_clk = ~sys_clk;
  always @(posedge core_clk) n_core++;
  always @(posedge sys_clk) n_sys++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s core=%0d sys=%0d dclk=%0d", what, n_core, n_sys, n_dclk); end
  endtask

  task automatic dclk_pulse();
    #13 dclk = 1'b1; n_dclk++;
    #17 dclk = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, s0;
    #12 rst_n = 1'b1;
    for (int rep = 0; rep < 40; rep++) begin
      bit dhigh;
      dhigh = rep[0];
      // normal mode
      @(posedge sys_clk) #1;
      c0 = n_core; s0 = n_sys;
      repeat (10) @(posedge sys_clk);
      #1 check(n_core - c0 == n_sys - s0, "normal mode follows sys_clk");
      check(!use_dclk, "normal mode select");
      // enter debugging mode just after a sys_clk rising edge (as breakPT does)
      dclk = dhigh;
      @(posedge sys_clk) breakpt <= 1'b1;
      #1 c0 = n_core;
      n_dclk = 0;
      #23;
      if (dhigh) begin #4 dclk = 1'b0; end
      repeat (5) dclk_pulse();
      check(n_core - c0 == n_dclk, "debug mode follows dclk");
      check(use_dclk, "debug select");
      // leave debugging mode just after a sys_clk rising edge
      dclk = dhigh;
      c0 = n_core;
      @(posedge sys_clk) breakpt <= 1'b0;
      #1 s0 = n_sys;
      repeat (6) @(posedge sys_clk);
      #1 check(n_core - c0 == n_sys - s0, "no extra edge on switch back");
      dclk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
