// TAP instruction decoder.
//
// Turns the 4-bit instruction into one-hot data-register select signals:
//   0000 IDCODE  ID register between TDI and TDO
//   0001 BYPASS  bypass register (one clock delay)
//   0010 EXTEST  scan chain 0 between TDI and TDO, its update does not reach
//                the core (checks the chain itself)
//   0011         scan chain 1: shifts out the core data bus
//   0100         scan chain 0: shifts in a test instruction for the core
//   0101         scan chain 2: shifts in the breakpoint address
// Codes and meanings follow the design's instruction table. An unused code
// selects the bypass register, as IEEE 1149.1 asks of unused codes.
// Purely combinational.
module inst_decoder
  import jtag_pkg::*;
(
  input  logic [INST_W-1:0] inst,
  output dr_sel_t           sel
);

  always_comb begin
    sel = '0;
    unique case (inst)
      I_IDCODE: sel.idcode = 1'b1;
      I_BYPASS: sel.bypass = 1'b1;
      I_EXTEST: sel.sc0    = 1'b1;
      I_SCAN1:  sel.sc1    = 1'b1;
      I_SCAN0: begin
        sel.sc0     = 1'b1;
        sel.sc0_upd = 1'b1;
      end
      I_SCAN2:  sel.sc2    = 1'b1;
      default:  sel.bypass = 1'b1;
    endcase
  end

endmodule
