// bp_controller: the control part of the emulator ASIC, which stops the
// user program on a breakpoint.
//
// Every target read (TCE and TOE both low) receives a byte from one of five
// sources, named by emu_state_e. While the user program runs, reads get RAM
// USER code. When a read finds its BP bit set, the read gets the LCALL
// opcode instead, and the following reads get the LCALL destination high and
// low bytes; after that the target executes the monitor and every read gets
// RAM MON code until the emulator microcontroller pulses `resume`.
//
// The 8051 reads program memory ahead and may read one address several
// times. A new instruction byte is therefore recognised by a change of the
// address line A0 against the previous read: a read with the same A0 gets
// the same LCALL byte again, a read with a changed A0 moves to the next one.
//
// Timing: the byte source `src` for the read in progress is combinational
// in the registered state, the previous read's A0, the present A0 and the BP
// bit, so the socket sees data one RAM access plus one multiplexer after
// its address. The state advances after the read: TCE/TOE, A0 and the
// chosen source pass through SYNC_STAGES flip-flops into the `clk` domain,
// and when the synchronised read strobe goes inactive the source of that
// read becomes the new state and its A0 the reference for the next read.
// The gap between two target reads must therefore last at least
// SYNC_STAGES + 2 periods of `clk`. The document specifies the signals
// tested (TCE, TOE, BP, the A0 change) and the LCALL substitution; the
// clocked commit-after-read scheme, the synchroniser and the `resume`
// input are this design's choices. Reset puts the controller in the user
// state. Lint notes rst_n as used both asynchronously and synchronously:
// the synchronous use is only the disable condition of the assertion below.
module bp_controller
  import emu_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host,       // microcontroller owns the RAMs: no target reads
  input  logic       resume,     // pulse: return to the user program
  // target EPROM socket (active-low strobes)
  input  logic       t_ce_n,
  input  logic       t_oe_n,
  input  logic       t_a0,
  input  logic       bp_q,       // BP bit at the target address
  // to the data path
  output emu_state_e src,        // byte source for the read in progress
  output logic       t_data_oe,  // drive the socket's data lines
  // status to the emulator microcontroller
  output emu_state_e state,
  output logic       in_monitor,
  output logic       bp_hit,     // pulse: a breakpoint read has completed
  output logic       read_done   // pulse: a target read has completed
);

  logic       last_a0;
  logic       a0_changed;
  logic       rd_raw;

  assign rd_raw     = ~t_ce_n & ~t_oe_n & ~host;
  assign t_data_oe  = rd_raw;
  assign a0_changed = (t_a0 != last_a0);

  // Byte source of the read in progress.
  always_comb begin
    unique case (state)
      ST_USER:   src = bp_q       ? ST_LC_OPC : ST_USER;
      ST_LC_OPC: src = a0_changed ? ST_LC_HI  : ST_LC_OPC;
      ST_LC_HI:  src = a0_changed ? ST_LC_LO  : ST_LC_HI;
      ST_LC_LO:  src = a0_changed ? ST_MON    : ST_LC_LO;
      ST_MON:    src = ST_MON;
      default:   src = ST_USER;
    endcase
  end

  // Synchroniser: read strobe, A0 and the source travel together.
  logic       rd_p  [SYNC_STAGES];
  logic       a0_p  [SYNC_STAGES];
  emu_state_e src_p [SYNC_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) begin
        rd_p[i]  <= 1'b0;
        a0_p[i]  <= 1'b0;
        src_p[i] <= ST_USER;
      end
    end else begin
      rd_p[0]  <= rd_raw;
      a0_p[0]  <= t_a0;
      src_p[0] <= src;
      for (int i = 1; i < SYNC_STAGES; i++) begin
        rd_p[i]  <= rd_p[i-1];
        a0_p[i]  <= a0_p[i-1];
        src_p[i] <= src_p[i-1];
      end
    end
  end

  logic       rd_q;      // synchronised strobe, one clock later
  logic       cap_a0;    // A0 of the read in progress
  emu_state_e cap_src;   // source of the read in progress
  logic       commit;

  assign commit = rd_q & ~rd_p[SYNC_STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_USER;
      last_a0   <= 1'b0;
      rd_q      <= 1'b0;
      cap_a0    <= 1'b0;
      cap_src   <= ST_USER;
      bp_hit    <= 1'b0;
      read_done <= 1'b0;
    end else begin
      rd_q      <= rd_p[SYNC_STAGES-1];
      bp_hit    <= 1'b0;
      read_done <= 1'b0;
      if (rd_p[SYNC_STAGES-1]) begin
        cap_a0  <= a0_p[SYNC_STAGES-1];
        cap_src <= src_p[SYNC_STAGES-1];
      end
      if (resume) begin
        state <= ST_USER;
      end else if (commit) begin
        state     <= cap_src;
        last_a0   <= cap_a0;
        read_done <= 1'b1;
        bp_hit    <= (state == ST_USER) && (cap_src == ST_LC_OPC);
      end
    end
  end

  assign in_monitor = (state == ST_MON);

  // The LCALL bytes are served in order: the state never skips one.
  a_lcall_order : assert property (@(posedge clk) disable iff (!rst_n)
    commit && !resume |-> (cap_src == state) ||
                          (state == ST_USER   && cap_src == ST_LC_OPC) ||
                          (state == ST_LC_OPC && cap_src == ST_LC_HI)  ||
                          (state == ST_LC_HI  && cap_src == ST_LC_LO)  ||
                          (state == ST_LC_LO  && cap_src == ST_MON));

endmodule
