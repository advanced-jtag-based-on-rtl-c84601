// Bypass register.
//
// One flop between TDI and TDO: it captures 0 in Capture-DR and takes TDI on
// every Shift-DR edge, so a bypassed device adds one TCK of delay to the
// scan path, as IEEE 1149.1 defines.
module bypass_reg (
  input  logic tck,
  input  logic trst_n,
  input  logic tdi,
  input  logic select,
  input  logic capture,
  input  logic shift,
  output logic so
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                so <= 1'b0;
    else if (select && capture) so <= 1'b0;
    else if (select && shift)   so <= tdi;
  end

endmodule
