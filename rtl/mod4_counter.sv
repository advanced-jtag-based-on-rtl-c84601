// Modulo-4 counter of the TAP instruction input circuit.
//
// Counts the TCK rising edges on which `enable` is high (TMS=1 while the TAP
// controller is in Test-Logic-Reset). On the edge that takes in the fourth
// bit of an instruction it wraps to zero and raises `update` for the
// following TCK cycle, telling the instruction register to load the four
// bits just shifted. The count restarts from zero whenever `enable` is low,
// so the first enabled edge after a low is always bit 0 of an instruction.
// The counter and its update output follow the design; the restart on a
// low enable is this design's choice.
//
// Timing: update is a registered one-cycle pulse, high in the cycle after
// the fourth enabled edge.
module mod4_counter (
  input  logic       tck,
  input  logic       trst_n,
  input  logic       enable,
  output logic [1:0] count,
  output logic       update
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      count  <= 2'd0;
      update <= 1'b0;
    end else begin
      update <= enable && (count == 2'd3);
      if (enable) count <= count + 2'd1;  // wraps 3 -> 0
      else        count <= 2'd0;
    end
  end

endmodule
