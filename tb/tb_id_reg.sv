// Testbench for id_reg: after capture, 32 shift clocks must produce the ID
// code least significant bit first, with TDI data following it out.
module tb_id_reg;
  import jtag_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  logic select = 1'b0, capture = 1'b0, shift = 1'b0, so;
  int checks = 0, failures = 0;
  logic [31:0] got, pat;

  id_reg dut (.*);
  always #5 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      pat = $urandom;
      @(negedge tck) begin select = 1; capture = 1; end
      @(negedge tck) begin capture = 0; shift = 1; end
      for (int b = 0; b < 64; b++) begin
        if (b < 32) got[b] = so;
        else begin checks++; if (so !== pat[b-32]) failures++; end
        tdi = (b < 32) ? pat[b] : 1'b0;
        @(negedge tck);
      end
      shift = 0;
      checks++;
      if (got !== 32'h1A57_D001) begin failures++; $display("FAIL id=%h", got); end
      // not selected: capture ignored, so holds 0 (zeros were shifted in)
      @(negedge tck) begin select = 0; capture = 1; end
      @(negedge tck) capture = 0;
      checks++;
      if (so !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
