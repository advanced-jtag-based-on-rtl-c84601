// Core breaker.
//
// Holds the breakpoint and stops the test core when the core's address bus
// shows the breakpoint address. The 32-bit breakpoint address `bp_addr`
// comes from the update register of scan chain 2 (TCK domain). Each time a
// new address is loaded (`bp_load`, a TCK-domain pulse on the Update-DR
// edge of scan chain 2) a toggle flips; the toggle is brought into the
// system clock domain through two flops, and its change arms the breaker
// and clears breakPT, returning the core to normal mode. While armed, a
// system clock edge on which `addr_valid` is high and `addr` equals
// `bp_addr` sets breakPT and disarms the breaker; breakPT then stays high
// (debugging mode) until the next breakpoint is programmed.
//
// The compare of the core address with a stored 32-bit address and the
// breakPT output follow the design. The arming scheme, leaving debugging
// mode by programming a new breakpoint, and the two-flop synchronizer are
// this design's choices. bp_addr is quasi-static: it only changes while
// the host programs it, two or more system clocks before the breaker is
// armed, so it is read directly in the system clock domain.
module core_breaker (
  input  logic        tck,
  input  logic        trst_n,
  input  logic        bp_load,
  input  logic [31:0] bp_addr,
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] addr,
  input  logic        addr_valid,
  output logic        breakpt,
  output logic        armed
);

  logic       tog;      // TCK domain
  logic [2:0] tog_sync; // system clock domain
  logic       rearm;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)      tog <= 1'b0;
    else if (bp_load) tog <= ~tog;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog_sync <= '0;
    else        tog_sync <= {tog_sync[1:0], tog};
  end

  assign rearm = tog_sync[2] ^ tog_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      breakpt <= 1'b0;
    end else if (rearm) begin
      armed   <= 1'b1;
      breakpt <= 1'b0;
    end else if (armed && addr_valid && addr == bp_addr) begin
      armed   <= 1'b0;
      breakpt <= 1'b1;
    end
  end

endmodule
