// eprom_emulator: the emulator core of the microcontroller-plus-ASIC
// architecture: the ASIC and the three RAMs USER, BP and MON.
//
// The target system's EPROM is replaced by a cable to this core. The
// emulator microcontroller (an 8051-family part, outside this RTL) loads
// the user program into RAM USER, marks breakpoint addresses in RAM BP and
// places the monitor program in RAM MON, using the mcu_* bus while `host`
// is high and the target is held in reset. With `host` low the target
// fetches its code through the socket: user code until it reaches an
// address whose BP bit is set, then an LCALL to MON_ENTRY generated by the
// ASIC, then monitor code. `in_monitor` tells the microcontroller that the
// target is stopped in the monitor; `resume` returns to the user program.
//
// The three RAMs share one address bus and are read in parallel. The
// microcontroller bus is synchronous to `clk` (writes on the rising edge,
// read data combinational); the socket side is asynchronous, with data
// valid one RAM access plus one multiplexer after the address and strobes.
// The target reset line TRST runs from the microcontroller straight to the
// target and does not pass through this core. The RAM depth, the monitor
// entry point and the microcontroller bus are this design's choices.
module eprom_emulator
  import emu_pkg::*;
#(
  parameter int unsigned ADDR_W      = 16,
  parameter logic [15:0] MON_ENTRY   = 16'hF800,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // emulator microcontroller bus
  input  logic              host,
  input  logic              resume,
  input  logic [ADDR_W-1:0] mcu_addr,
  input  ram_sel_e          mcu_sel,
  input  logic              mcu_we,
  input  logic [7:0]        mcu_wdata,
  output logic [7:0]        mcu_rdata,
  output emu_state_e        state,
  output logic              in_monitor,
  output logic              bp_hit,
  output logic              read_done,
  // target EPROM socket
  input  logic [ADDR_W-1:0] t_addr,
  input  logic              t_ce_n,
  input  logic              t_oe_n,
  output logic [7:0]        t_data,
  output logic              t_data_oe
);

  logic [ADDR_W-1:0] ram_addr;
  logic              we_user, we_bp, we_mon;
  logic [7:0]        user_q, mon_q;
  logic              bp_q;

  emu_asic #(
    .ADDR_W(ADDR_W), .MON_ENTRY(MON_ENTRY), .SYNC_STAGES(SYNC_STAGES)
  ) u_asic (
    .clk, .rst_n, .host, .resume,
    .mcu_addr, .mcu_sel, .mcu_we, .mcu_rdata,
    .state, .in_monitor, .bp_hit, .read_done,
    .t_addr, .t_ce_n, .t_oe_n, .t_data, .t_data_oe,
    .ram_addr, .we_user, .we_bp, .we_mon,
    .user_q, .bp_q, .mon_q
  );

  emu_sram #(.DATA_W(8), .ADDR_W(ADDR_W)) u_ram_user (
    .clk, .we(we_user), .addr(ram_addr), .wdata(mcu_wdata), .rdata(user_q)
  );

  emu_sram #(.DATA_W(1), .ADDR_W(ADDR_W)) u_ram_bp (
    .clk, .we(we_bp), .addr(ram_addr), .wdata(mcu_wdata[0]), .rdata(bp_q)
  );

  emu_sram #(.DATA_W(8), .ADDR_W(ADDR_W)) u_ram_mon (
    .clk, .we(we_mon), .addr(ram_addr), .wdata(mcu_wdata), .rdata(mon_q)
  );

endmodule
