// End-to-end testbench for jtag_debug_top at its default (and only) size.
//
// Plays the host: drives TCK/TMS/TDI, reads TDO, and runs the debugging
// session of the design's example. The core runs a program from memory on
// the system clock; a breakpoint at word 0x04 is programmed through scan
// chain 2 (instruction 0101); the core stops there and its clock switches
// to dclk; the test instruction 0xC0000001 (LDR R0, word 1) is shifted into
// scan chain 0 (instruction 0100) and executed by cycling Run-Test/Idle;
// the loaded word is read back through scan chain 1 (instruction 0011).
// Programming a new breakpoint then returns the core to normal mode. IDCODE,
// BYPASS and EXTEST are exercised too, and six more debugging cycles
// (instruction in, execute, data out) run before debugging mode ends. Every mechanism is counted; one that
// never happened counts as a failure. TCK cycles per debugging step are
// checked against the counts derived for this controller and printed next
// to the ones the design reports for its own run.
module tb_jtag_debug_top;
  import jtag_pkg::*;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0;
  logic tdo, tdo_en;
  logic ext_clk = 1'b0, rst_n = 1'b0;
  logic [31:0] mem_addr, mem_rdata, reg_val;
  logic mem_nopc, breakpt, dclk;
  logic [3:0] reg_sel = '0;

  int checks = 0, failures = 0;
  int host_cycles = 0;  // TCK cycles driven by the host tasks
  int n_break = 0, n_switch_in = 0, n_switch_out = 0, n_inst_update = 0;
  int n_debug_cycles = 0, n_extra_fetch = 0, e_break = 0;

  // The host knows the core's phase from the dclk edges it has given since
  // the break: the break leaves the core in its execute phase, and each
  // edge alternates fetch and execute.
  function automatic bit core_in_fetch();
    return ((n_core_dclk_edges - e_break) % 2) == 1;
  endfunction
  int n_rti_loop = 0, n_tap_reset = 0, n_core_dclk_edges = 0;
  int n_inst_used [6];

  jtag_debug_top dut (.*);
  mem_model u_mem (.addr(mem_addr), .rdata(mem_rdata));

  always #50 tck = ~tck;
  always #7  ext_clk = ~ext_clk;

  always @(posedge breakpt) if (rst_n) n_break++;
  always @(posedge dut.u_clksel.use_dclk) if (rst_n) n_switch_in++;
  always @(negedge dut.u_clksel.use_dclk) if (rst_n) n_switch_out++;
  always @(posedge tck) if (dut.inst_update) n_inst_update++;
  always @(posedge dut.core_clk) if (dut.u_clksel.use_dclk) n_core_dclk_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic clk_tck(input logic m, input logic d = 1'b0);
    @(negedge tck) begin tms = m; tdi = d; end
    @(posedge tck);
    host_cycles++;
  endtask

  // Four or more clocks with TMS=1 reach Test-Logic-Reset from anywhere.
  task automatic tap_reset();
    repeat (4) clk_tck(1);
    #1 check(dut.state == TLR, "TAP reset with four TMS=1 clocks");
    n_tap_reset++;
    clk_tck(0);
  endtask

  // From Run-Test/Idle: Select-DR, Test-Logic-Reset, four instruction bits
  // (least significant first) with TMS=1, then the update cycle back to
  // Run-Test/Idle. Returns the number of TCK cycles used.
  task automatic load_inst(input logic [3:0] v, output int cycles);
    int c0;
    c0 = host_cycles;
    clk_tck(1); clk_tck(1);
    for (int b = 0; b < 4; b++) clk_tck(1, v[b]);
    clk_tck(0);
    #1 check(dut.inst == v, $sformatf("instruction %b loaded", v));
    if (int'(v) < 6) n_inst_used[v]++;
    cycles = host_cycles - c0;
  endtask

  // From Run-Test/Idle: one DR scan of n bits, back to Run-Test/Idle.
  task automatic scan_dr(input logic [31:0] din, input int n, output logic [31:0] dout, output int cycles);
    int c0;
    c0 = host_cycles;
    dout = '0;
    clk_tck(1); clk_tck(0); clk_tck(0);
    for (int b = 0; b < n; b++) begin
      @(negedge tck) begin tms = (b == n - 1); tdi = din[b]; end
      #1 dout[b] = tdo;
      check(tdo_en, "TDO enabled while shifting");
      @(posedge tck);
      host_cycles++;
    end
    clk_tck(1); clk_tck(0);
    #1 check(dut.state == RTI, "back in Run-Test/Idle");
    cycles = host_cycles - c0;
  endtask

  // Shortest loop out of and back into Run-Test/Idle: one dclk pulse.
  task automatic rti_loop(output int cycles);
    int c0;
    c0 = host_cycles;
    clk_tck(1); clk_tck(1); clk_tck(0);
    #1 cycles = host_cycles - c0;
    check(cycles == 3 && dut.state == RTI, "three-clock Run-Test/Idle loop");
    n_rti_loop++;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, step2, step3, step4;
    logic [31:0] out;
    logic [31:0] pat;

    #1;  // after the memory model's own initialisation
    // program: words 0..15 are no-ops except word 2, LDR R3, word 0x20
    for (int i = 0; i < 16; i++) u_mem.poke(i, 32'h1000_0000 | 32'(i));
    u_mem.poke(2, 32'hC300_0020);
    u_mem.poke(1, 32'h1234_5678);

    #120 trst_n = 1'b1;
    tap_reset();

    // IDCODE is the instruction after reset
    check(dut.inst == I_IDCODE, "IDCODE after reset");
    scan_dr(32'h0, 32, out, c);
    check(out == IDCODE_VALUE, "IDCODE read");
    n_inst_used[0]++;

    // BYPASS: one clock delay
    load_inst(I_BYPASS, c);
    pat = $urandom;
    scan_dr(pat, 32, out, c);
    check(out == {pat[30:0], 1'b0}, "bypass one-bit delay");

    // EXTEST: scan chain 0 looped TDI->TDO, no update to the core
    load_inst(I_EXTEST, c);
    pat = $urandom;
    scan_dr(pat, 32, out, c);
    scan_dr(32'h0, 32, out, c);
    check(out == 32'h0, "EXTEST does not update scan chain 0");
    check(dut.sc0_q == 32'h0, "EXTEST leaves core instruction alone");

    // Step 1: breakpoint programming (core held in reset meanwhile)
    load_inst(I_SCAN2, c);
    scan_dr(32'h0000_0004, 32, out, c);
    check(dut.sc2_q == 32'h4, "breakpoint address in scan chain 2");
    repeat (3) @(posedge ext_clk);
    rst_n = 1'b1;

    // normal run until the breakpoint
    fork
      begin
        wait (breakpt);
        e_break = n_core_dclk_edges;
        // the word at the breakpoint has been fetched; the program counter
        // shows the next word, which is not fetched
        check(mem_addr == 32'h5 && mem_nopc, "core halted after breakpoint fetch");
      end
      begin
        repeat (200) @(posedge ext_clk);
        check(1'b0, "breakpoint never hit");
      end
    join_any
    disable fork;
    reg_sel = 4'd3;
    #1 check(reg_val == 32'h0000_2000 + 32'h5A, "normal-mode load before break");
    begin
      logic [31:0] a_hold;
      a_hold = mem_addr;
      repeat (20) @(posedge ext_clk);
      check(mem_addr == a_hold, "core stopped while TAP idle");
    end

    // Step 2: test instruction through scan chain 0
    load_inst(I_SCAN0, c);
    scan_dr(32'hC000_0001, 32, out, step2);
    step2 += c;
    check(dut.sc0_q == 32'hC000_0001, "test instruction in scan chain 0");
    check(out == 32'h0, "scan chain 0 previous content shifted out");

    // Step 3: execute by cycling Run-Test/Idle
    rti_loop(step3);
    @(negedge tck);
    reg_sel = 4'd0;
    #1 check(reg_val == 32'h1234_5678, "LDR R0, word 1 executed under dclk");

    // Step 4: read the data bus through scan chain 1
    load_inst(I_SCAN1, c);
    scan_dr(32'h0, 32, out, step4);
    step4 += c;
    check(out == 32'h1234_5678, "data bus value shifted out on TDO");

    check(step2 == 44, "step 2 TCK cycles");
    check(step3 == 3, "step 3 TCK cycles");
    check(step4 == 44, "step 4 TCK cycles");
    $display("TCK cycles: step 2 = %0d, step 3 = %0d, step 4 = %0d (design reports 40, 19, 42 for its own run)",
             step2, step3, step4);

    // more RTI loops: each gives the core exactly one dclk edge
    begin
      int e0;
      e0 = n_core_dclk_edges;
      repeat (4) rti_loop(c);
      check(n_core_dclk_edges - e0 == 4, "one core edge per Run-Test/Idle loop");
      check(mem_addr == 32'h5 || mem_addr == 32'h1, "program counter frozen in debug");
    end

    // Further debugging cycles without leaving debugging mode: each one
    // shifts in a load, executes it, and reads the data bus back.
    for (int k = 0; k < 6; k++) begin
      logic [3:0]  rd;
      logic [7:0]  a;
      logic [31:0] exp;
      rd = 4'($urandom_range(1, 15));
      a  = 8'($urandom_range(16, 255));
      exp = (32'(a) << 8) | 32'h5A;
      load_inst(I_SCAN0, c);
      scan_dr({4'hC, rd, 16'h0, a}, 32, out, c);
      // The core took one clock on entering Run-Test/Idle. If it is now in
      // FETCH, that clock executed the previous instruction, and the new one
      // needs a fetch loop before its execute loop.
      @(negedge tck) #1;
      if (core_in_fetch()) begin rti_loop(c); n_extra_fetch++; end
      rti_loop(c);
      @(negedge tck);
      reg_sel = rd;
      #1 check(reg_val == exp, "repeated debug cycle: load executed");
      load_inst(I_SCAN1, c);
      scan_dr(32'h0, 32, out, c);
      check(out == exp, "repeated debug cycle: data bus read back");
      check(breakpt, "still in debugging mode");
      n_debug_cycles++;
    end

    // End of test: programming a new breakpoint resumes normal mode
    load_inst(I_SCAN2, c);
    scan_dr(32'h0000_000C, 32, out, c);
    check(out == 32'h4, "old breakpoint read back");
    fork
      begin
        wait (!breakpt);
        wait (mem_addr == 32'h5 && !mem_nopc);
        n_inst_used[5] += 0;
      end
      begin
        repeat (100) @(posedge ext_clk);
        check(1'b0, "core did not resume at word 5");
      end
    join_any
    disable fork;
    fork
      begin
        wait (breakpt);
        check(mem_addr == 32'hD, "second breakpoint hit");
      end
      begin
        repeat (200) @(posedge ext_clk);
        check(1'b0, "second breakpoint never hit");
      end
    join_any
    disable fork;

    #1;
    // mechanism coverage
    check(n_break == 2, "breakpoint hits");
    check(n_switch_in == 2 && n_switch_out == 1, "clock switches");
    check(n_inst_update >= 8, "instruction updates");
    check(n_rti_loop >= 5, "Run-Test/Idle loops");
    check(n_tap_reset >= 1, "TAP resets");
    check(n_debug_cycles == 6, "repeated debugging cycles");
    check(n_extra_fetch > 0, "debugging cycle that needed a separate fetch loop");
    for (int i = 0; i < 6; i++) check(n_inst_used[i] > 0, $sformatf("instruction %0d used", i));
    $display("debug cycles=%0d (with a separate fetch loop: %0d)", n_debug_cycles, n_extra_fetch);
    $display("mechanisms: breaks=%0d switch_in=%0d switch_out=%0d inst_updates=%0d rti_loops=%0d tap_resets=%0d dclk_edges=%0d",
             n_break, n_switch_in, n_switch_out, n_inst_update, n_rti_loop, n_tap_reset, n_core_dclk_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
