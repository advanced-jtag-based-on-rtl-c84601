// Testbench for tdo_mux: for each select value the matching serial input
// appears on TDO after the falling edge of TCK; TDO is 0 and tdo_en low when
// not shifting.
module tb_tdo_mux;
  import jtag_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, enable = 1'b0;
  dr_sel_t sel;
  logic so_idcode, so_bypass, so_sc0, so_sc1, so_sc2, tdo, tdo_en;
  int checks = 0, failures = 0;

  tdo_mux dut (.*);
  always #5 tck = ~tck;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] v;
    logic exp;
    int k;
    sel = '0;
    {so_idcode, so_bypass, so_sc0, so_sc1, so_sc2} = '0;
    #12 trst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge tck);
      k = $urandom_range(0, 5);
      sel = '0;
      case (k)
        0: sel.idcode = 1;
        1: sel.bypass = 1;
        2: sel.sc0 = 1;
        3: begin sel.sc0 = 1; sel.sc0_upd = 1; end
        4: sel.sc1 = 1;
        default: sel.sc2 = 1;
      endcase
      v = 5'($urandom);
      {so_idcode, so_bypass, so_sc0, so_sc1, so_sc2} = v;
      enable = ($urandom_range(0, 3) != 0);
      case (k)
        0: exp = v[4];
        1: exp = v[3];
        2, 3: exp = v[2];
        4: exp = v[1];
        default: exp = v[0];
      endcase
      if (!enable) exp = 1'b0;
      #1 checks++;
      if (tdo_en !== 1'b0 && i == 0) failures++;
      @(negedge tck) #1;
      checks++;
      if (tdo !== exp || tdo_en !== enable) begin
        failures++;
        $display("FAIL k=%0d v=%b tdo=%b exp=%b", k, v, tdo, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
