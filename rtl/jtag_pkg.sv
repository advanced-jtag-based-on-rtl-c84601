// Shared types and constants of the JTAG debugging unit.
//
// The simplified TAP controller keeps only the data-register branch of the
// IEEE 1149.1 state diagram (nine states, no IR states). Instructions are
// four bits wide; the six codes below are the ones the unit supports. The
// codes and the register each one selects follow the instruction table of
// the design; the state encoding and the ID code value are this design's
// own choices.
package jtag_pkg;

  localparam int unsigned INST_W = 4;   // TAP instruction width

  // IDCODE value: bit 0 is 1 as IEEE 1149.1 requires; the rest is arbitrary.
  localparam logic [31:0] IDCODE_VALUE = 32'h1A57_D001;

  typedef enum logic [3:0] {
    TLR        = 4'd0,  // Test-Logic-Reset (instruction input happens here)
    RTI        = 4'd1,  // Run-Test/Idle (dclk high)
    SELECT_DR  = 4'd2,
    CAPTURE_DR = 4'd3,
    SHIFT_DR   = 4'd4,
    EXIT1_DR   = 4'd5,
    PAUSE_DR   = 4'd6,
    EXIT2_DR   = 4'd7,
    UPDATE_DR  = 4'd8
  } tap_state_t;

  typedef enum logic [INST_W-1:0] {
    I_IDCODE   = 4'b0000,  // ID register between TDI and TDO
    I_BYPASS   = 4'b0001,  // bypass register, one clock delay
    I_EXTEST   = 4'b0010,  // scan chain 0 looped between TDI and TDO
    I_SCAN1    = 4'b0011,  // scan chain 1: core data bus out through TDO
    I_SCAN0    = 4'b0100,  // scan chain 0: test instruction in from TDI
    I_SCAN2    = 4'b0101   // scan chain 2: breakpoint address in from TDI
  } inst_t;

  // One-hot data-register select produced by the instruction decoder.
  typedef struct packed {
    logic idcode;
    logic bypass;
    logic sc0;       // scan chain 0 in the TDI-TDO path
    logic sc0_upd;   // scan chain 0 update drives the core (not in EXTEST)
    logic sc1;
    logic sc2;
  } dr_sel_t;

endpackage
