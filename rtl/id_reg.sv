// Device identification register (IDCODE).
//
// A 32-bit capture-and-shift register: selected and in Capture-DR it loads
// the fixed ID value, in Shift-DR it shifts toward TDO (least significant
// bit first). It has no update stage. The ID value itself is this design's
// choice (bit 0 is 1, as IEEE 1149.1 asks).
module id_reg
  import jtag_pkg::*;
#(
  parameter logic [31:0] ID = IDCODE_VALUE
) (
  input  logic tck,
  input  logic trst_n,
  input  logic tdi,
  input  logic select,
  input  logic capture,
  input  logic shift,
  output logic so
);

  logic [31:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                sr <= ID;
    else if (select && capture) sr <= ID;
    else if (select && shift)   sr <= {tdi, sr[31:1]};
  end

  assign so = sr[0];

endmodule
