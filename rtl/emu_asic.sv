// emu_asic: the emulator ASIC, split like the original into a data part
// (asic_datapath) and a control part (bp_controller).
//
// It sits between the target's EPROM socket, the emulator microcontroller
// bus and the three RAMs. While the target runs it passes RAM USER code to
// the socket; the BP RAM, read in parallel at the same address, flags
// breakpoints; on a breakpoint the ASIC itself produces the three bytes of
// LCALL MON_ENTRY and from then on conveys RAM MON code, until the
// microcontroller pulses `resume`. While `host` is high the microcontroller
// addresses the RAMs instead of the target and the socket is not driven.
//
// Timing: target address to socket data is combinational through the RAMs;
// the controller's state moves on `clk` after each target read (see
// bp_controller). The monitor entry address and the host/resume control are
// this design's choices; the document does not give them.
module emu_asic
  import emu_pkg::*;
#(
  parameter int unsigned ADDR_W      = 16,
  parameter logic [15:0] MON_ENTRY   = 16'hF800,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // emulator microcontroller
  input  logic              host,
  input  logic              resume,
  input  logic [ADDR_W-1:0] mcu_addr,
  input  ram_sel_e          mcu_sel,
  input  logic              mcu_we,
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
  output logic              t_data_oe,
  // RAMs
  output logic [ADDR_W-1:0] ram_addr,
  output logic              we_user,
  output logic              we_bp,
  output logic              we_mon,
  input  logic [7:0]        user_q,
  input  logic              bp_q,
  input  logic [7:0]        mon_q
);

  emu_state_e src;

  bp_controller #(.SYNC_STAGES(SYNC_STAGES)) u_ctrl (
    .clk, .rst_n, .host, .resume,
    .t_ce_n, .t_oe_n, .t_a0(t_addr[0]), .bp_q,
    .src, .t_data_oe, .state, .in_monitor, .bp_hit, .read_done
  );

  asic_datapath #(.ADDR_W(ADDR_W)) u_dp (
    .host, .mcu_addr, .mcu_sel, .mcu_we, .mcu_rdata,
    .we_user, .we_bp, .we_mon,
    .t_addr, .t_data,
    .ram_addr, .user_q, .bp_q, .mon_q,
    .src, .mon_entry(MON_ENTRY)
  );

endmodule
