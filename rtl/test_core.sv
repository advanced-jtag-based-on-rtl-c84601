// Test core: a minimal 32-bit RISC target for the debugging unit.
//
// Two phases per instruction. FETCH drives the program counter on the
// address bus with nOPC low and, on the clock edge, takes the instruction
// word: from memory (mem_rdata) in normal mode, or from scan chain 0
// (dbg_instr) in debugging mode, in which case the program counter does not
// advance, so the instruction at the breakpoint's successor is not executed.
// EXEC carries out the instruction. Instruction format (bits 31:28 opcode):
//   1100 LDR  Rd = mem[addr]  Rd in bits 27:24, addr = bits 23:0 (zero
//             extended); e.g. 0xC0000001 loads word 1 into R0
//   other     no operation
// Every word read from memory (instruction fetch or load) is kept in
// `dbus`, the data-bus value that scan chain 1 captures. reg_sel/reg_val
// is a combinational read port on the register file for observation.
//
// Timing: one instruction per two core clock edges; in debugging mode the
// core clock is dclk, one edge per visit of Run-Test/Idle.
//
// The design states only that the core has the essential elements of a
// 32-bit RISC processor with a minimal instruction set, takes test
// instructions from scan chain 0, and that 0xC0000001 means "LDR R0, word 1".
// The rest of the instruction set is not given; the field layout, the
// two-phase sequencing, the 16-register file and the treatment of other
// opcodes as no-ops are this design's choices.
module test_core #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dbg,
  input  logic [31:0] dbg_instr,
  input  logic [31:0] mem_rdata,
  output logic [31:0] addr,
  output logic        addr_valid,
  output logic        nopc,
  output logic [31:0] dbus,
  input  logic [3:0]  reg_sel,
  output logic [31:0] reg_val
);

  typedef enum logic { FETCH = 1'b0, EXEC = 1'b1 } phase_t;
  localparam logic [3:0] OP_LDR = 4'hC;

  phase_t      phase;
  logic [31:0] pc;
  logic [31:0] ir;
  logic [31:0] rf [16];

  logic [3:0]  op;
  logic [3:0]  rd;
  logic [31:0] ldr_addr;

  assign reg_val  = rf[reg_sel];
  assign op       = ir[31:28];
  assign rd       = ir[27:24];
  assign ldr_addr = {8'h00, ir[23:0]};

  always_comb begin
    addr       = pc;
    addr_valid = 1'b0;
    nopc       = 1'b1;
    if (phase == FETCH) begin
      addr_valid = !dbg;
      nopc       = dbg;
    end else if (op == OP_LDR) begin
      addr       = ldr_addr;
      addr_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= FETCH;
      pc    <= RESET_PC;
      ir    <= '0;
      dbus  <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else begin
      unique case (phase)
        FETCH: begin
          if (dbg) begin
            ir <= dbg_instr;
          end else begin
            ir   <= mem_rdata;
            dbus <= mem_rdata;
            pc   <= pc + 32'd1;
          end
          phase <= EXEC;
        end
        EXEC: begin
          if (op == OP_LDR) begin
            rf[rd] <= mem_rdata;
            dbus   <= mem_rdata;
          end
          phase <= FETCH;
        end
      endcase
    end
  end

endmodule
