// JTAG on-chip debugging unit with its test core (device under test).
//
// The debugging unit lets a host stop a core at a programmed address and
// then run it instruction by instruction from the JTAG port. It differs
// from an IEEE 1149.1 TAP in one place: there is no instruction register
// and no IR branch in the TAP state machine. Instructions are shifted in
// while the controller sits in Test-Logic-Reset with TMS=1 (four bits, then
// one update cycle), which shortens instruction transfer from ten TCK
// cycles to five and the shortest Run-Test/Idle loop from four to three.
//
// Blocks and connections:
//   tap_ctrl      nine-state TAP controller, DR controls and dclk
//   inst_input    4-bit TDI shift register + modulo-4 counter + instruction
//   inst_decoder  instruction -> data-register select
//   scan chain 0  32 bits in: test instruction for the core (code 0100),
//                 also looped TDI->TDO by EXTEST (0010)
//   scan chain 1  32 bits out: captures the core data bus (code 0011)
//   scan chain 2  32 bits in: breakpoint address (code 0101)
//   id_reg, bypass_reg, tdo_mux
//   core_breaker  compares the core address bus with scan chain 2 -> breakPT
//   clock_selector core clock = ext_clk normally, dclk while breakPT is high
//   test_core     minimal 32-bit core
// Memory is outside: its address and read data are ports.
//
// Ports: JTAG pins (tck, tms, tdi, trst_n, tdo, tdo_en), system clock and
// reset (ext_clk, rst_n), memory bus (mem_addr, mem_nopc, mem_rdata with a
// combinational read expected), breakpt/dclk for observation, and a
// read port on the core's register file (reg_sel/reg_val).
//
// Some block outputs are left unconnected here on purpose (TAP state,
// clock_dr, the instruction update pulse, use_dclk, the breaker's armed
// flag, scan chain 1's update register); lint reports them as unused.
// Lint also flags breakpt as used both as data and, through the clock
// selector, as a clock select; that is intended.
module jtag_debug_top
  import jtag_pkg::*;
(
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  output logic        tdo_en,
  input  logic        ext_clk,
  input  logic        rst_n,
  output logic [31:0] mem_addr,
  output logic        mem_nopc,
  input  logic [31:0] mem_rdata,
  output logic        breakpt,
  output logic        dclk,
  input  logic [3:0]  reg_sel,
  output logic [31:0] reg_val
);

  tap_state_t        state;
  logic              tlr, capture_dr, shift_dr, clock_dr, update_dr, enable;
  logic [INST_W-1:0] inst;
  logic              inst_update;
  dr_sel_t           sel;

  logic              so_id, so_byp, so_sc0, so_sc1, so_sc2;
  logic [31:0]       sc0_q, sc1_q, sc2_q;
  logic [31:0]       core_dbus, core_addr;
  logic              core_addr_valid;
  logic              core_clk, use_dclk, bp_armed;

  tap_ctrl u_tap (
    .tck        (tck),
    .trst_n     (trst_n),
    .tms        (tms),
    .state      (state),
    .reset      (tlr),
    .capture_dr (capture_dr),
    .shift_dr   (shift_dr),
    .clock_dr   (clock_dr),
    .update_dr  (update_dr),
    .enable     (enable),
    .dclk       (dclk)
  );

  inst_input u_inst (
    .tck    (tck),
    .trst_n (trst_n),
    .tms    (tms),
    .tdi    (tdi),
    .tlr    (tlr),
    .inst   (inst),
    .update (inst_update)
  );

  inst_decoder u_dec (
    .inst (inst),
    .sel  (sel)
  );

  // Scan chain 0: EXTEST captures the chain's own update register, so the
  // host reads back what it shifted in last.
  scan_reg #(.WIDTH(32)) u_sc0 (
    .tck      (tck),
    .trst_n   (trst_n),
    .tdi      (tdi),
    .select   (sel.sc0),
    .capture  (capture_dr),
    .shift    (shift_dr),
    .update   (update_dr & sel.sc0_upd),
    .cap_data (sc0_q),
    .so       (so_sc0),
    .q        (sc0_q)
  );

  // Scan chain 1: output only; its update register is not used.
  scan_reg #(.WIDTH(32)) u_sc1 (
    .tck      (tck),
    .trst_n   (trst_n),
    .tdi      (tdi),
    .select   (sel.sc1),
    .capture  (capture_dr),
    .shift    (shift_dr),
    .update   (1'b0),
    .cap_data (core_dbus),
    .so       (so_sc1),
    .q        (sc1_q)
  );

  scan_reg #(.WIDTH(32)) u_sc2 (
    .tck      (tck),
    .trst_n   (trst_n),
    .tdi      (tdi),
    .select   (sel.sc2),
    .capture  (capture_dr),
    .shift    (shift_dr),
    .update   (update_dr),
    .cap_data (sc2_q),
    .so       (so_sc2),
    .q        (sc2_q)
  );

  id_reg u_id (
    .tck     (tck),
    .trst_n  (trst_n),
    .tdi     (tdi),
    .select  (sel.idcode),
    .capture (capture_dr),
    .shift   (shift_dr),
    .so      (so_id)
  );

  bypass_reg u_byp (
    .tck     (tck),
    .trst_n  (trst_n),
    .tdi     (tdi),
    .select  (sel.bypass),
    .capture (capture_dr),
    .shift   (shift_dr),
    .so      (so_byp)
  );

  tdo_mux u_tdo (
    .tck       (tck),
    .trst_n    (trst_n),
    .sel       (sel),
    .enable    (enable),
    .so_idcode (so_id),
    .so_bypass (so_byp),
    .so_sc0    (so_sc0),
    .so_sc1    (so_sc1),
    .so_sc2    (so_sc2),
    .tdo       (tdo),
    .tdo_en    (tdo_en)
  );

  core_breaker u_brk (
    .tck        (tck),
    .trst_n     (trst_n),
    .bp_load    (update_dr & sel.sc2),
    .bp_addr    (sc2_q),
    .clk        (ext_clk),
    .rst_n      (rst_n),
    .addr       (core_addr),
    .addr_valid (core_addr_valid),
    .breakpt    (breakpt),
    .armed      (bp_armed)
  );

  clock_selector u_clksel (
    .sys_clk  (ext_clk),
    .rst_n    (rst_n),
    .dclk     (dclk),
    .breakpt  (breakpt),
    .core_clk (core_clk),
    .use_dclk (use_dclk)
  );

  test_core u_core (
    .clk        (core_clk),
    .rst_n      (rst_n),
    .dbg        (breakpt),
    .dbg_instr  (sc0_q),
    .mem_rdata  (mem_rdata),
    .addr       (core_addr),
    .addr_valid (core_addr_valid),
    .nopc       (mem_nopc),
    .dbus       (core_dbus),
    .reg_sel    (reg_sel),
    .reg_val    (reg_val)
  );

  assign mem_addr = core_addr;

endmodule
