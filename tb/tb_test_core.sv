// Testbench for test_core: a program of loads and no-ops runs from memory
// in normal mode (two clocks per instruction, nOPC low on fetch, program
// counter advancing); then in debugging mode the core takes its
// instructions from the dbg_instr input without advancing the program
// counter. Register contents, the data-bus register and the address bus are
// compared with values computed here.
module tb_test_core;
  logic clk = 1'b0, rst_n = 1'b0, dbg = 1'b0;
  logic [31:0] dbg_instr = '0, mem_rdata, addr, dbus, reg_val;
  logic addr_valid, nopc;
  logic [3:0] reg_sel = '0;
  int checks = 0, failures = 0;
  logic [31:0] exp_rf [16];

  test_core dut (.*);
  mem_model u_mem (.addr(addr), .rdata(mem_rdata));
  always #50 clk = ~clk;

  function automatic logic [31:0] memword(input int unsigned a);
    return (32'(a) << 8) | 32'h5A;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_regs();
    for (int r = 0; r < 16; r++) begin
      reg_sel = 4'(r);
      #1 check(reg_val == exp_rf[r], $sformatf("R%0d", r));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ins;
    int unsigned a;
    #1;  // after the memory model's own initialisation
    for (int r = 0; r < 16; r++) exp_rf[r] = '0;
    // program: word i (0..39) = LDR R(i%16), [100+i] on even i, no-op on odd
    for (int i = 0; i < 40; i++)
      u_mem.poke(i, (i % 2 == 0) ? {4'hC, 4'(i % 16), 24'(100 + i)} : 32'h1000_0321);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      // FETCH phase
      #1 check(addr == 32'(i) && addr_valid && !nopc, "fetch address / nOPC");
      @(negedge clk);
      if (i % 2 == 0) begin
        check(addr == 32'(100 + i) && addr_valid && nopc, "load address");
        exp_rf[i % 16] = memword(100 + i);
      end else begin
        check(!addr_valid, "no access on no-op");
      end
      @(negedge clk);
    end
    check_regs();
    check(dbus == 32'h1000_0321, "data bus register holds last word read");
    // debugging mode: instructions from dbg_instr, PC frozen at 40
    dbg = 1'b1;
    for (int k = 0; k < 20; k++) begin
      a = $urandom_range(0, 255);
      ins = {4'hC, 4'(k), 24'(a)};
      dbg_instr = ins;
      #1 check(!addr_valid && nopc, "no memory fetch in debug");
      @(negedge clk);
      check(addr == a && addr_valid, "debug load address");
      @(negedge clk);
      exp_rf[k % 16] = (a >= 40) ? memword(a) : ((a % 2 == 0) ? {4'hC, 4'(a % 16), 24'(100 + a)} : 32'h1000_0321);
      check(dbus == exp_rf[k % 16], "data bus register in debug");
      check(addr == 32'd40, "PC frozen in debug");
    end
    check_regs();
    // back to normal: fetch resumes at 40
    dbg = 1'b0;
    #1 check(addr == 32'd40 && addr_valid && !nopc, "resume at next address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
