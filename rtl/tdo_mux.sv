// TDO multiplexer.
//
// Picks the serial output of the data register chosen by the instruction
// decoder and retimes it on the falling edge of TCK, as IEEE 1149.1 asks,
// so the host samples a stable TDO on the next rising edge. `tdo_en` is the
// TAP controller's output enable retimed the same way; a pad would drive
// TDO only while it is high. The multiplexer is in the design; the falling
// edge retiming and the output when nothing is shifted (0) follow the
// standard or are this design's choice.
module tdo_mux
  import jtag_pkg::*;
(
  input  logic    tck,
  input  logic    trst_n,
  input  dr_sel_t sel,
  input  logic    enable,
  input  logic    so_idcode,
  input  logic    so_bypass,
  input  logic    so_sc0,
  input  logic    so_sc1,
  input  logic    so_sc2,
  output logic    tdo,
  output logic    tdo_en
);

  logic so;

  always_comb begin
    unique case (1'b1)
      sel.idcode: so = so_idcode;
      sel.sc0:    so = so_sc0;
      sel.sc1:    so = so_sc1;
      sel.sc2:    so = so_sc2;
      default:    so = so_bypass;
    endcase
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= enable ? so : 1'b0;
      tdo_en <= enable;
    end
  end

endmodule
