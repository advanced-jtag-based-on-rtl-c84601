// Testbench for scan_reg (scan chain, width overridden to 8 and left at 32
// in a second instance): random capture/shift/update sequences against a
// reference chain, plus the hold behaviour when the chain is not selected.
module tb_scan_reg;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  logic select, capture, shift, update;
  logic [31:0] cap_data;
  logic so8, so32;
  logic [7:0]  q8;
  logic [31:0] q32;
  logic [7:0]  m_sr8, m_q8;
  logic [31:0] m_sr32, m_q32;
  int checks = 0, failures = 0, n_cap = 0, n_shift = 0, n_upd = 0;

  scan_reg #(.WIDTH(8), .RESET_VAL(8'hA5)) dut8 (
    .tck, .trst_n, .tdi, .select, .capture, .shift, .update,
    .cap_data(cap_data[7:0]), .so(so8), .q(q8));
  scan_reg dut32 (
    .tck, .trst_n, .tdi, .select, .capture, .shift, .update,
    .cap_data(cap_data), .so(so32), .q(q32));

  always #5 tck = ~tck;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {select, capture, shift, update} = '0;
    cap_data = '0;
    m_sr8 = '0; m_q8 = 8'hA5; m_sr32 = '0; m_q32 = '0;
    #12 trst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int unsigned r;
      @(negedge tck);
      r = $urandom_range(0, 99);
      select   = (r < 90);
      capture  = (r % 10 == 0);
      shift    = !capture && (r % 10 < 8);
      update   = (r % 10 == 9);
      tdi      = 1'($urandom);
      cap_data = $urandom;
      @(posedge tck);
      if (select) begin
        if (update) begin m_q8 = m_sr8; m_q32 = m_sr32; n_upd++; end
        if (capture) begin m_sr8 = cap_data[7:0]; m_sr32 = cap_data; n_cap++; end
        else if (shift) begin m_sr8 = {tdi, m_sr8[7:1]}; m_sr32 = {tdi, m_sr32[31:1]}; n_shift++; end
      end
      #1;
      checks++;
      if (q8 !== m_q8 || q32 !== m_q32 || so8 !== m_sr8[0] || so32 !== m_sr32[0]) begin
        failures++;
        $display("FAIL i=%0d q8=%h/%h q32=%h/%h", i, q8, m_q8, q32, m_q32);
      end
    end
    checks++;
    if (n_cap == 0 || n_shift == 0 || n_upd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
