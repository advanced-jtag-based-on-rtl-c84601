// Testbench for inst_decoder: all sixteen codes against the instruction
// table (unused codes select the bypass register).
module tb_inst_decoder;
  import jtag_pkg::*;
  logic [3:0] inst;
  dr_sel_t sel, exp;
  int checks = 0, failures = 0;

  inst_decoder dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      inst = 4'(i);
      exp = '0;
      case (i)
        0: exp.idcode = 1;
        2: exp.sc0 = 1;
        3: exp.sc1 = 1;
        4: begin exp.sc0 = 1; exp.sc0_upd = 1; end
        5: exp.sc2 = 1;
        default: exp.bypass = 1;
      endcase
      #1;
      checks++;
      if (sel != exp) begin
        failures++;
        $display("FAIL inst=%b sel=%b exp=%b", inst, sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
