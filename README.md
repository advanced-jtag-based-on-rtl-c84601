# JTAG on-chip debugging unit with an instruction-register-free TAP

This is a debugging unit for a small 32-bit core. A host can use it to stop the
core at a programmed address, feed it instructions one at a time through the
JTAG port, and read back what is on the core's data bus. The unusual part is
the TAP (test access port) controller. Standard IEEE 1149.1 JTAG loads
instructions through an instruction register and a separate branch of seven
TAP states. This design removes both:

- The TAP state machine keeps only the data-register branch: nine states
  instead of sixteen.
- Instructions are shifted in while the controller sits in
  Test-Logic-Reset. TMS is held high for four clocks that carry the four
  instruction bits, and a modulo-4 counter then loads them.

Loading an instruction then takes five TCK cycles (four bits and one update)
instead of ten. Leaving Run-Test/Idle and coming back takes three cycles
instead of four. The core is stepped by that loop in debugging mode, so
stepping gets faster too.

Everything is synthesizable SystemVerilog except `tb/`. There is one module,
package or interface per file.

## Block map

```
        TDI ──┬──────────────┬───────────────┬─────────────┬──────────┐
              │              │               │             │          │
     ┌────────▼───────┐ ┌────▼─────┐  ┌──────▼─────┐ ┌─────▼────┐ ┌───▼────┐
     │ inst_input     │ │ scan     │  │ scan       │ │ scan     │ │ id_reg │
     │ 4-bit shift reg│ │ chain 2  │  │ chain 0    │ │ chain 1  │ │ bypass │
     │ mod4_counter   │ │ (bp addr)│  │ (core instr)│ │(data bus)│ │ _reg   │
     └────────┬───────┘ └────┬─────┘  └──────┬─────┘ └─────▲────┘ └───┬────┘
        inst[3:0]            │ bp_addr       │ dbg_instr   │ dbus     │
     ┌────────▼───────┐ ┌────▼─────────┐ ┌───▼─────────────┴──┐       │
     │ inst_decoder   │ │ core_breaker │ │ test_core          │◄── memory bus
     └────────┬───────┘ └────┬─────────┘ └───▲────────────────┘   (ports)
              │ sel          │ breakPT        │ core_clk
              │         ┌────▼───────────┐    │
              │         │ clock_selector ├────┘
              │         └────▲───────────┘
              │              │ dclk / ext_clk
     TCK,TMS ─┼──► tap_ctrl ─┘  (capture/shift/update enables to all chains)
              │
     ┌────────▼───────┐
     │ tdo_mux        ├──► TDO
     └────────────────┘
```

`jtag_debug_top` wires these together. The memory sits outside the device.
The top brings out its address (`mem_addr`), nOPC (`mem_nopc`, low on an
opcode fetch) and read data (`mem_rdata`, combinational read expected). The
top also brings out `breakpt` and `dclk` for observation, plus a read port on
the core's register file (`reg_sel`, `reg_val`).

## The nine-state TAP controller (`tap_ctrl`)

The states are the standard data-register ones: Test-Logic-Reset (TLR),
Run-Test/Idle (RTI), Select-DR-Scan, Capture-DR, Shift-DR, Exit1-DR,
Pause-DR, Exit2-DR and Update-DR. Transitions are the IEEE ones, with one
change: Select-DR-Scan with TMS=1 goes straight back to TLR, because there is
no Select-IR-Scan. Two consequences:

- From any state, four TCK rising edges with TMS=1 reach TLR. The standard
  needs five.
- The loop RTI → Select-DR → TLR → RTI (TMS = 1, 1, 0) takes three clocks.

The controller's outputs are decoded from the state register:

| output | high in | used by |
|---|---|---|
| `reset` | TLR | enables instruction input |
| `capture_dr` | Capture-DR | parallel load of the selected chain |
| `shift_dr` / `enable` | Shift-DR | shifting / TDO enable |
| `clock_dr` | Capture-DR or Shift-DR | (clock enable, for reference) |
| `update_dr` | Update-DR | chain update register loads on the edge leaving Update-DR |
| `dclk` | RTI, retimed on the TCK falling edge | core clock in debugging mode |

All data registers are clocked by the TCK rising edge and use these signals
as enables; there are no gated clocks. `dclk` rises half a TCK cycle after the
controller enters RTI. Scan chain 0 may be updated on the very edge that
enters RTI, and by the time the core is clocked its new value is stable.
Each visit to RTI gives the core exactly one rising edge. Staying in RTI gives
no further edges.

## Loading an instruction (`inst_input`, `mod4_counter`)

There is no instruction register and no Shift-IR state. While the controller
is in TLR, TMS doubles as a "this TDI bit is an instruction bit" enable.

1. From RTI, clock TMS = 1, 1 to reach TLR (via Select-DR-Scan).
2. Clock four cycles with TMS=1, putting instruction bit 0, 1, 2, 3 on TDI
   (least significant first). Each bit enters a 4-bit shift register, and a
   modulo-4 counter counts it.
3. After the fourth bit the counter raises `update` for one cycle. Clock
   that cycle with TMS=0: the instruction register loads at its end and the
   controller moves to RTI.

Steps 2 and 3 are the five-cycle instruction transfer. Step 1 adds two cycles
when starting from RTI, so a full load from RTI takes seven TCK cycles. The
counter restarts whenever its enable (TMS and "in TLR") is low, so the first
TMS-high edge in TLR is always bit 0. If TMS stays high past the fourth bit,
the next four bits form the next instruction, and the last complete group
wins. Passing through TLR does not clear the instruction. Only nTRST does
(it loads IDCODE). This is why the three-cycle RTI loop, which runs through
TLR with TMS=0 there, keeps the current instruction.

Be aware that holding TMS high in TLR for a reset also loads whatever is on
TDI as an instruction. A host that wants a known instruction after a reset
should send one.

## Instructions and data registers

| code | name | register between TDI and TDO | effect of Update-DR |
|---|---|---|---|
| 0000 | IDCODE | 32-bit ID register (value `0x1A57D001`) | none |
| 0001 | BYPASS | 1-bit bypass register | none |
| 0010 | EXTEST | scan chain 0, capturing its own update register | none: only checks the chain |
| 0011 | scan chain 1 | 32-bit capture of the core data bus | none |
| 0100 | scan chain 0 | 32-bit test instruction for the core | instruction goes to the core |
| 0101 | scan chain 2 | 32-bit breakpoint address | new breakpoint; arms the breaker and ends debugging mode |
| others | — | bypass register | none |

All chains shift least significant bit first. TDO changes on the TCK falling
edge and is 0 outside Shift-DR; `tdo_en` shows when a pad would drive it. A
32-bit DR scan from RTI, ending back in RTI, takes 37 TCK cycles:
- three to reach Select-DR-Scan, Capture-DR and Shift-DR;
- 32 shift cycles, where the last one has TMS=1 and moves to Exit1-DR;
- two more, to Update-DR and back to RTI.

Naming caution: the source instruction table pairs the name "SC0" with code
0011 and "SC1" with 0100, but its own descriptions and the example session
use 0011 to select scan chain 1 and 0100 to select scan chain 0. The RTL
follows the chain each code selects (`I_SCAN1 = 0011`, `I_SCAN0 = 0100` in
`jtag_pkg`).

## Stopping and stepping the core

**Core breaker (`core_breaker`).** Updating scan chain 2 stores a 32-bit
address. A toggle in the TCK domain carries that event through a two-flop
synchronizer into the system clock domain. There it arms the breaker and
clears breakPT. While armed, the first memory access (instruction fetch or
load) whose address equals the breakpoint sets breakPT and disarms the
breaker. breakPT stays high until the next breakpoint is programmed. After
reset the breaker is disarmed.

**Clock selector (`clock_selector`).** The core clock is `ext_clk` while
breakPT is low and `dclk` while it is high. breakPT rises just after a
system-clock rising edge, while that clock is high, so switching in can only
lower the core clock. Switching back waits for the next system-clock falling
edge. Neither direction creates an extra rising edge at the core.

**Debugging session** (`tb/tb_jtag_debug_top.sv` runs exactly this):

| step | host action | TCK cycles here |
|---|---|---|
| 1 | load 0101, scan in breakpoint `0x00000004` | 7 + 37 |
| — | core runs from memory on `ext_clk`; the fetch of word 4 sets breakPT | — |
| 2 | load 0100, scan in `0xC0000001` (LDR R0, word 1) | 7 + 37 = 44 |
| 3 | one RTI loop (TMS 1,1,0): the core executes the load | 3 |
| 4 | load 0011, scan out: TDO returns the word at address 1 | 7 + 37 = 44 |
| end | load 0101 with a new address: breakPT clears, the core resumes at word 5 | 44 |

Every entry into RTI clocks the core once, including the entries at the end
of steps 2 and 4. After the break, the core still has to finish the
instruction at the breakpoint. The entry after loading 0100 does that, and
the entry after the scan fetches the new test instruction from scan chain 0.
One more RTI loop executes it. In a longer session the host must track the
core's phase. Each `dclk` edge alternates fetch and execute, and the break
leaves the core in execute. If the RTI entry at the end of a scan executed
the previous instruction instead of fetching the new one, the host needs one
extra loop to fetch before the loop that executes. The end-to-end testbench
runs six more such cycles (load, execute, read back) inside one debugging
session. The reference run reports 40, 19 and 42 TCK
cycles for steps 2–4 with an unstated host sequence. The counts above are
for the shortest host sequence this controller allows, and the testbench
checks them exactly.

## The test core (`test_core`)

This is only a stand-in target. Each instruction takes two clocks:

- FETCH drives the program counter on the address bus with nOPC low.
- EXEC carries the instruction out.

In debugging mode, FETCH takes the instruction from scan chain 0 instead of
memory and does not advance the program counter. So the instruction after
the breakpoint is not executed until normal mode resumes. The only
instruction is `LDR Rd, [addr]`: bits 31:28 = `1100`, Rd in 27:24, word
address in 23:0. Every other opcode is a no-op, and there are no stores.
`dbus` holds the last word read over the data bus, and scan chain 1 captures
it. Replace this module with a real core by keeping its ports: address,
access valid, nOPC, read data, a debug-instruction input and a data-bus
value to capture.

## Departures and choices to know about

- The TAP controller, the way instructions are loaded, the six instruction
  codes, the breakPT mechanism and the clock switch follow the source
  design. The following are choices made here:
  - DR update on the rising edge leaving Update-DR.
  - `dclk` retimed on the falling edge.
  - TMS qualified by TLR as the instruction-bit enable.
  - Shifting least significant bit first.
  - The ID value.
  - How the core breaker is armed, and leaving debugging mode by
    programming a new breakpoint.
  - The glitch-free timing of the clock switch.
  - The whole instruction set of the test core beyond its one load.
- Step counts differ from the reference run: 44/3/44 here against 40/19/42
  (see above).
- The breakpoint compares all 32 address bits. The reference example writes
  its step-1 address both as `0x04` and as `0xC0000004`. The example here
  uses `0x00000004`.
- The memory, the host PC and the protocol converter are not part of the
  RTL.
- Verilator's lint reports `SYNCASYNCNET` on `breakpt` because the signal
  feeds both the core-clock multiplexer and ordinary logic. This is intended.

## Files

- `rtl/jtag_pkg.sv` holds the state and instruction enums, the data-register
  select struct and the ID value.
- `rtl/<block>.sv` holds one module per block in the map above.
  `rtl/jtag_debug_top.sv` is the top.
- `tb/tb_<block>.sv` holds one self-checking testbench per module. Each
  prints `TB_RESULT checks=N failures=M`.
- `tb/mem_model.sv` is a 256-word behavioural memory: word *i* = `(i<<8) | 0x5A`
  unless a testbench pokes it.

What the testbenches check:

- The TAP controller is checked against an independent table model under
  random TMS, plus the four-clock reset from every state and the three-cycle
  RTI loop.
- Instruction input is checked for five-cycle loads, for ignored bits outside
  TLR and for back-to-back loads.
- The chains, ID, bypass and TDO multiplexer are checked against reference
  models.
- The breaker is checked for arm, match, hold and valid-qualification.
- The clock selector is checked by counting core edges across both
  switches.
- The core is checked against a program and against debug-mode stepping.
- The top-level test runs the session above at full size, with IDCODE,
  BYPASS and EXTEST. It counts every mechanism: breaks, both clock switches,
  instruction updates, RTI loops, TAP reset, and each of the six
  instructions.

To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/jtag_pkg.sv tb/tb_jtag_debug_top.sv \
          --top-module tb_jtag_debug_top -Mdir obj && obj/Vtb_jtag_debug_top
```

Use the same command with another `tb_<block>` for the unit testbenches. To
lint a module: `verilator --lint-only -Wall -Irtl rtl/jtag_pkg.sv rtl/<module>.sv`.
There are no parameters at the top. `scan_reg` has `WIDTH` (default 32, the
width of the core's buses) and `RESET_VAL`, `id_reg` has `ID`, and
`test_core` has `RESET_PC`.
