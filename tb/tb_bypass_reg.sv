// Testbench for bypass_reg: captures 0, and delays TDI by exactly one TCK
// cycle while shifting.
module tb_bypass_reg;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  logic select = 1'b0, capture = 1'b0, shift = 1'b0, so;
  int checks = 0, failures = 0;
  logic prev;

  bypass_reg dut (.*);
  always #5 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge tck) begin select = 1; tdi = 1; shift = 1; end
      @(negedge tck) begin shift = 0; capture = 1; end
      @(negedge tck) capture = 0;
      checks++; if (so !== 1'b0) failures++;
      shift = 1;
      prev = 1'b0;
      for (int b = 0; b < 50; b++) begin
        tdi = 1'($urandom);
        @(posedge tck) #1;
        checks++;
        if (so !== tdi) failures++;
        @(negedge tck);
      end
      shift = 0;
      // not selected: holds
      prev = so;
      @(negedge tck) begin select = 0; shift = 1; tdi = ~prev; end
      @(negedge tck) shift = 0;
      checks++; if (so !== prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
