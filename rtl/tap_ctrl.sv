// Simplified TAP controller.
//
// A nine-state machine: the IEEE 1149.1 TAP controller with the whole
// instruction-register branch removed. The state graph follows the
// simplified diagram of the design: Select-DR-Scan with TMS=1 goes straight
// back to Test-Logic-Reset, so from any state four TCK rising edges with
// TMS=1 reach Test-Logic-Reset, and the shortest loop that leaves and
// re-enters Run-Test/Idle (TMS 1,1,0) takes three clocks.
//
// Interface: tck, tms, trst_n (asynchronous, active low). Outputs, all
// registered or decoded from the state register:
//   state      current state
//   reset      high in Test-Logic-Reset (enables the instruction input)
//   capture_dr capture enable for the selected data register (Capture-DR)
//   shift_dr   shift enable (Shift-DR)
//   clock_dr   capture-or-shift enable, the DR clock enable
//   update_dr  update enable (Update-DR); registers load on the TCK rising
//              edge that leaves Update-DR
//   enable     TDO output enable (Shift-DR)
//   dclk       debug clock for the test core: high while the controller is
//              in Run-Test/Idle, retimed on the falling edge of TCK, so it
//              rises half a TCK cycle after the controller enters
//              Run-Test/Idle and falls half a cycle after it leaves
//
// Design choices: DR registers use TCK-rising-edge enables instead of gated
// clocks; update happens on the rising edge leaving Update-DR rather than
// on the falling edge inside it. dclk is retimed on the falling edge so
// that a scan chain update made on the rising edge that enters
// Run-Test/Idle is stable before the core clocks it in.
module tap_ctrl
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output logic       reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       clock_dr,
  output logic       update_dr,
  output logic       enable,
  output logic       dclk
);

  tap_state_t nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SELECT_DR : RTI;
      SELECT_DR:  nxt = tms ? TLR       : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SELECT_DR : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) dclk <= 1'b0;
    else         dclk <= (state == RTI);
  end

  assign reset      = (state == TLR);
  assign capture_dr = (state == CAPTURE_DR);
  assign shift_dr   = (state == SHIFT_DR);
  assign clock_dr   = capture_dr | shift_dr;
  assign update_dr  = (state == UPDATE_DR);
  assign enable     = shift_dr;

endmodule
