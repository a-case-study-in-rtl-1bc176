// emu_pkg: types and constants shared by the EPROM emulator modules.
//
// The emulator serves an 8051-family target from three RAMs (USER code,
// BP breakpoint bits, MON monitor code) and, on a breakpoint, substitutes
// the three bytes of an LCALL to the monitor. The LCALL opcode value (0x12)
// is the 8051 instruction encoding; the state and select encodings below
// are this design's own.
package emu_pkg;

  // 8051 LCALL addr16: opcode, then destination high byte, then low byte.
  localparam logic [7:0] LCALL_OPCODE = 8'h12;

  // Breakpoint controller state. Each value also names the byte source
  // that the target read in that state receives.
  typedef enum logic [2:0] {
    ST_USER   = 3'd0,  // running the user program from RAM USER
    ST_LC_OPC = 3'd1,  // breakpoint hit: serving the LCALL opcode
    ST_LC_HI  = 3'd2,  // serving the LCALL destination high byte
    ST_LC_LO  = 3'd3,  // serving the LCALL destination low byte
    ST_MON    = 3'd4   // running the monitor from RAM MON
  } emu_state_e;

  // Which RAM the emulator microcontroller addresses on its bus.
  typedef enum logic [1:0] {
    RAM_USER = 2'd0,
    RAM_BP   = 2'd1,
    RAM_MON  = 2'd2
  } ram_sel_e;

endpackage
