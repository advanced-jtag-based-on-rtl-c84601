// TAP instruction input circuit.
//
// Replaces the IEEE 1149.1 instruction register and its TAP states. While
// the TAP controller sits in Test-Logic-Reset, TMS acts as the enable that
// marks TDI bits as instruction bits: on every TCK rising edge with
// TMS=1 the TDI bit enters a 4-bit shift register, and a modulo-4 counter
// counts the bit. After the fourth bit the counter's update pulse loads the
// shift register into the instruction register `inst`, which feeds the
// instruction decoder. An instruction therefore takes five TCK cycles:
// four shift cycles and one update cycle (in which TMS is normally brought
// low so the controller moves on to Run-Test/Idle).
//
// Interface: tck, trst_n, tms, tdi, tlr (high in Test-Logic-Reset);
// outputs inst (current instruction) and update (pulse, high the cycle
// before inst changes).
//
// The structure (gated TDI into a 4-bit shift register, a second row of
// four flops for the instruction, modulo-4 counter) follows the design.
// This design's choices: bits are shifted least significant first, the
// enable is TMS qualified by Test-Logic-Reset, and trst_n loads IDCODE.
module inst_input
  import jtag_pkg::*;
(
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tms,
  input  logic              tdi,
  input  logic              tlr,
  output logic [INST_W-1:0] inst,
  output logic              update
);

  logic              en;
  logic [INST_W-1:0] sr;
  logic [1:0]        count;

  assign en = tms & tlr;

  mod4_counter u_cnt (
    .tck    (tck),
    .trst_n (trst_n),
    .enable (en),
    .count  (count),
    .update (update)
  );

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr   <= '0;
      inst <= I_IDCODE;
    end else begin
      if (en)     sr   <= {tdi & en, sr[INST_W-1:1]};
      if (update) inst <= sr;
    end
  end

endmodule
