// Testbench for mod4_counter: random enable pattern against a reference
// count; update must be high exactly in the cycle after every fourth
// consecutive enabled clock, and the count must restart after a low enable.
module tb_mod4_counter;
  logic tck = 1'b0, trst_n = 1'b0, enable = 1'b0;
  logic [1:0] count;
  logic update;
  int checks = 0, failures = 0, updates = 0;
  int run = 0;          // enabled edges since the last low
  bit exp_update = 0;

  mod4_counter dut (.*);
  always #5 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge tck) enable = ($urandom_range(0, 9) < 8);
      @(posedge tck);
      exp_update = enable && (run % 4 == 3);
      run = enable ? run + 1 : 0;
      #1;
      checks++;
      if (count != 2'(run % 4) || update != exp_update) begin
        failures++;
        $display("FAIL i=%0d count=%0d exp=%0d update=%b exp=%b", i, count, run % 4, update, exp_update);
      end
      if (update) updates++;
    end
    checks++;
    if (updates < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
