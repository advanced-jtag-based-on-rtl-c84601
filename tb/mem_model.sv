// Behavioural main memory for testbenches: 256 words, combinational read.
// Word i holds (i << 8) | 0x5A, except where the testbench places
// instructions with the `poke` task.
module mem_model (
  input  logic [31:0] addr,
  output logic [31:0] rdata
);
  logic [31:0] mem [256];

  initial for (int i = 0; i < 256; i++) mem[i] = (32'(i) << 8) | 32'h5A;

  function automatic void poke(input int unsigned a, input logic [31:0] v);
    mem[a] = v;
  endfunction

  assign rdata = mem[addr[7:0]];
endmodule
