// Clock selector.
//
// Drives the test core clock from the external system clock in normal mode
// and from the TAP controller's dclk in debugging mode (breakPT high).
// Switching in is immediate: breakPT rises just after a system clock rising
// edge, while sys_clk is high, so the output can only fall or stay. Switching
// back waits for the next falling edge of sys_clk, while sys_clk is low, so
// again the output can only fall or stay. Neither switch makes an extra
// rising edge at the core.
//
// The selection by breakPT follows the design; the glitch-avoiding timing is
// this design's choice.
module clock_selector (
  input  logic sys_clk,
  input  logic rst_n,
  input  logic dclk,
  input  logic breakpt,
  output logic core_clk,
  output logic use_dclk
);

  logic hold;

  always_ff @(negedge sys_clk or negedge rst_n) begin
    if (!rst_n) hold <= 1'b0;
    else        hold <= breakpt;
  end

  assign use_dclk = breakpt | hold;
  assign core_clk = use_dclk ? dclk : sys_clk;

endmodule
