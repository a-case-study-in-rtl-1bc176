// asic_datapath: the data part of the emulator ASIC.
//
// Address side: the RAMs share one address bus. While the emulator
// microcontroller owns the RAMs (host = 1, target held in reset) the bus
// carries the microcontroller's address, otherwise the target's EPROM
// address, so that USER, BP and MON are read in parallel at the address the
// target fetches.
//
// Data side: the byte driven into the EPROM socket is chosen by the
// breakpoint controller's state for the current read: the USER RAM code,
// one of the three LCALL bytes (opcode 0x12, destination high, destination
// low) or the MON RAM code. The LCALL destination is the monitor entry
// point, given as an input. The microcontroller's read data is the RAM it
// selects, and its write enable is decoded to that RAM only.
//
// Entirely combinational, so the path target address -> RAM -> target data
// is one RAM access plus one multiplexer, the ASIC propagation delay the
// document budgets. The three sources to the target and the address path
// follow the document's outline drawing; the host/target address
// multiplexer and the microcontroller bus are this design's choices.
module asic_datapath
  import emu_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  // emulator microcontroller bus
  input  logic              host,       // 1: microcontroller owns the RAMs
  input  logic [ADDR_W-1:0] mcu_addr,
  input  ram_sel_e          mcu_sel,
  input  logic              mcu_we,
  output logic [7:0]        mcu_rdata,
  output logic              we_user,
  output logic              we_bp,
  output logic              we_mon,
  // target EPROM socket
  input  logic [ADDR_W-1:0] t_addr,
  output logic [7:0]        t_data,
  // shared RAM address and read data
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [7:0]        user_q,
  input  logic              bp_q,
  input  logic [7:0]        mon_q,
  // from the controller
  input  emu_state_e        src,        // byte source for this read
  input  logic [15:0]       mon_entry   // LCALL destination
);

  assign ram_addr = host ? mcu_addr : t_addr;

  always_comb begin
    unique case (src)
      ST_USER:   t_data = user_q;
      ST_LC_OPC: t_data = LCALL_OPCODE;
      ST_LC_HI:  t_data = mon_entry[15:8];
      ST_LC_LO:  t_data = mon_entry[7:0];
      ST_MON:    t_data = mon_q;
      default:   t_data = user_q;
    endcase
  end

  always_comb begin
    we_user   = 1'b0;
    we_bp     = 1'b0;
    we_mon    = 1'b0;
    mcu_rdata = user_q;
    unique case (mcu_sel)
      RAM_USER: begin we_user = host & mcu_we; mcu_rdata = user_q;         end
      RAM_BP:   begin we_bp   = host & mcu_we; mcu_rdata = {7'b0, bp_q};   end
      RAM_MON:  begin we_mon  = host & mcu_we; mcu_rdata = mon_q;          end
      default:  ;
    endcase
  end

endmodule
