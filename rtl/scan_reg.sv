// Scan chain: a row of scan cells with capture, shift and update.
//
// Used for scan chains 0, 1 and 2 of the debugging unit. When the chain is
// selected by the current instruction, a TCK rising edge in Capture-DR loads
// `cap_data` in parallel, edges in Shift-DR move the chain one bit toward
// TDO (TDI enters at the most significant end, `so` is the least
// significant bit), and the edge leaving Update-DR copies the chain into the
// parallel output register `q`. When not selected the chain holds.
//
// The capture/shift/update roles of the cells follow IEEE 1149.1 as the
// design requires; shifting least significant bit first, rising-edge
// update and the reset value of `q` are this design's choices.
module scan_reg #(
  parameter int unsigned WIDTH     = 32,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tdi,
  input  logic             select,
  input  logic             capture,
  input  logic             shift,
  input  logic             update,
  input  logic [WIDTH-1:0] cap_data,
  output logic             so,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr <= '0;
      q  <= RESET_VAL;
    end else if (select) begin
      if (capture)     sr <= cap_data;
      else if (shift)  sr <= {tdi, sr[WIDTH-1:1]};
      if (update)      q  <= sr;
    end
  end

  assign so = sr[0];

endmodule
