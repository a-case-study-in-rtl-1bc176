// tb_bp_controller: self-checking test of the breakpoint controller.
//
// Plays target read cycles (TCE and TOE low for a few clocks, then a gap)
// with chosen A0 and BP values, and checks for each read the byte source
// the controller selects and the socket output enable, against a reference
// kept in the testbench. Directed part: a breakpoint hit followed by the
// 8051's repeated reads of one address (A0 unchanged), which must repeat
// the same LCALL byte, then the move into the monitor and a resume. Random
// part: thousands of reads with random A0 changes, rare breakpoints, host
// phases and resumes. Also checks the state-update latency: the new state
// must be visible SYNC_STAGES + 2 clocks after the strobes rise, and not
// before the read ends.
module tb_bp_controller;
  import emu_pkg::*;
  localparam int unsigned SYNC = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       host = 1'b0, resume = 1'b0;
  logic       t_ce_n = 1'b1, t_oe_n = 1'b1, t_a0 = 1'b0, bp_q = 1'b0;
  emu_state_e src, state;
  logic       t_data_oe, in_monitor, bp_hit, read_done;

  int checks = 0, failures = 0;
  int hits = 0, dones = 0, exp_hits = 0, exp_dones = 0;

  bp_controller #(.SYNC_STAGES(SYNC)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && bp_hit) hits++;
    if (rst_n && read_done) dones++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  emu_state_e ref_state = ST_USER;
  logic       ref_last_a0 = 1'b0;

  function automatic emu_state_e ref_src(emu_state_e s, logic a0, logic bp);
    logic ch;
    ch = (a0 != ref_last_a0);
    case (s)
      ST_USER:   return bp ? ST_LC_OPC : ST_USER;
      ST_LC_OPC: return ch ? ST_LC_HI : ST_LC_OPC;
      ST_LC_HI:  return ch ? ST_LC_LO : ST_LC_HI;
      ST_LC_LO:  return ch ? ST_MON   : ST_LC_LO;
      default:   return ST_MON;
    endcase
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic target_read(logic a0, logic bp, int hold = 3);
    emu_state_e e;
    @(negedge clk);
    t_a0 = a0; bp_q = bp;
    t_ce_n = 1'b0; t_oe_n = 1'b0;
    #1;
    e = ref_src(ref_state, a0, bp);
    check("src", src, e);
    check("oe", t_data_oe, !host);
    repeat (hold) @(negedge clk);
    check("src held", src, e);
    check("state during read", state, ref_state);
    t_ce_n = 1'b1; t_oe_n = 1'b1;
    if (!host) begin
      ref_state = e; ref_last_a0 = a0;
      if (e == ST_LC_OPC && state == ST_USER) exp_hits++;
      exp_dones++;
    end
    // the state must move exactly SYNC + 2 clocks later
    repeat (SYNC + 1) @(negedge clk);
    if (!host && e != state) check("state too early", state, e == state ? 1 : 0);
    @(negedge clk);
    check("state after read", state, ref_state);
    check("in_monitor", in_monitor, ref_state == ST_MON);
    check("oe idle", t_data_oe, 0);
  endtask

  task automatic do_resume();
    @(negedge clk); resume = 1'b1;
    @(negedge clk); resume = 1'b0;
    ref_state = ST_USER;
    #1 check("resume", state, ST_USER);
  endtask

  logic a0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: user reads, breakpoint, read-ahead repeats, monitor
    a0 = 0;
    for (int i = 0; i < 4; i++) begin target_read(a0, 0); a0 = ~a0; end
    target_read(a0, 1);          // breakpoint address: opcode
    target_read(a0, 1);          // same address again: opcode again
    a0 = ~a0; target_read(a0, 0);  // high byte
    target_read(a0, 0);          // repeated: high byte again
    a0 = ~a0; target_read(a0, 0);  // low byte
    a0 = ~a0; target_read(a0, 0);  // monitor
    check("in monitor", state, ST_MON);
    a0 = ~a0; target_read(a0, 1);  // BP bits are ignored in the monitor
    check("still monitor", state, ST_MON);
    do_resume();
    // random
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(99);
      if (r < 8) do_resume();
      else if (r < 12) begin
        host = 1'b1; target_read(1'($urandom), 1'($urandom)); host = 1'b0;
      end else begin
        if ($urandom_range(3) != 0) a0 = ~a0;
        target_read(a0, $urandom_range(19) == 0, $urandom_range(1, 5));
      end
    end
    repeat (4) @(negedge clk);
    check("bp_hit pulses", hits, exp_hits);
    check("read_done pulses", dones, exp_dones);
    if (exp_hits == 0) begin failures++; $display("no breakpoint hit exercised"); end
    $display("breakpoints hit: %0d, reads: %0d", hits, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
