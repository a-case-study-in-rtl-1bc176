// tb_eprom_emulator: end-to-end test of the emulator core at its default
// size (64 KiB RAMs, monitor entry 0xF800).
//
// The testbench plays both processors. As the emulator microcontroller it
// downloads a user program and a monitor over the host bus, clears the BP
// RAM over the fetched ranges, sets breakpoints, reads memory back, and
// later clears a breakpoint and resumes. As the target 8051 it fetches
// instructions: each instruction's bytes in order, sometimes followed by a
// read-ahead of the next address which is then read again as the next
// opcode. When the opcode it receives is 0x12 it behaves like LCALL: reads
// two address bytes, makes one dummy read and continues at the destination.
// Every byte on the socket is compared, without waiting for a clock edge,
// with a reference computed in the testbench from the downloaded images.
//
// Mechanisms counted, each required at least once: host writes, host
// read-backs, breakpoint hits, LCALL bytes re-read because A0 did not
// change, read-aheads in user code, monitor fetches and resumes.
module tb_eprom_emulator;
  import emu_pkg::*;
  localparam int unsigned AW    = 16;
  localparam int unsigned ENTRY = 16'hF800;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host = 1'b1, resume = 1'b0, mcu_we = 1'b0;
  logic [AW-1:0] mcu_addr = '0, t_addr = '0;
  ram_sel_e      mcu_sel = RAM_USER;
  logic [7:0]    mcu_wdata = '0, mcu_rdata, t_data;
  logic          t_ce_n = 1'b1, t_oe_n = 1'b1, t_data_oe;
  emu_state_e    state;
  logic          in_monitor, bp_hit, read_done;

  int checks = 0, failures = 0;

  eprom_emulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  // ---- images held by the testbench ----
  logic [7:0] user_img [int];
  logic [7:0] mon_img  [int];
  logic       bp_img   [int];
  int         ilen     [int];   // instruction length at an opcode address
  bit         rdahead  [int];   // instruction followed by a read-ahead

  // mechanism counters
  int n_host_wr = 0, n_host_rd = 0, n_hits = 0, n_lcall_reread = 0;
  int n_readahead = 0, n_mon_fetch = 0, n_resume = 0, n_fetch = 0;

  always @(posedge clk) if (rst_n && bp_hit) n_hits++;

  // ---- emulator microcontroller side ----
  task automatic mcu_write(ram_sel_e sel, int a, logic [7:0] d);
    @(negedge clk);
    mcu_sel = sel; mcu_addr = AW'(a); mcu_wdata = d; mcu_we = 1'b1;
    @(negedge clk);
    mcu_we = 1'b0;
    n_host_wr++;
  endtask

  task automatic mcu_read_check(ram_sel_e sel, int a, logic [7:0] exp);
    @(negedge clk);
    mcu_sel = sel; mcu_addr = AW'(a); mcu_we = 1'b0;
    #1;
    check($sformatf("read-back %s %0h", sel.name(), a), mcu_rdata, exp);
    n_host_rd++;
  endtask

  // ---- reference for the socket ----
  emu_state_e ref_state = ST_USER;
  logic       ref_last_a0 = 1'b0;

  function automatic logic [7:0] ref_byte(int a, output emu_state_e s);
    logic ch, bp;
    ch = (a[0] != ref_last_a0);
    bp = bp_img.exists(a) ? bp_img[a] : 1'b0;
    case (ref_state)
      ST_USER:   s = bp ? ST_LC_OPC : ST_USER;
      ST_LC_OPC: s = ch ? ST_LC_HI : ST_LC_OPC;
      ST_LC_HI:  s = ch ? ST_LC_LO : ST_LC_HI;
      ST_LC_LO:  s = ch ? ST_MON   : ST_LC_LO;
      default:   s = ST_MON;
    endcase
    case (s)
      ST_USER:   return user_img[a];
      ST_LC_OPC: return 8'h12;
      ST_LC_HI:  return 8'(ENTRY >> 8);
      ST_LC_LO:  return 8'(ENTRY);
      default:   return mon_img[a];
    endcase
  endfunction

  // ---- target side ----
  task automatic fetch(int a, output logic [7:0] d);
    emu_state_e s;
    logic [7:0] exp;
    @(negedge clk);
    t_addr = AW'(a); t_ce_n = 1'b0; t_oe_n = 1'b0;
    exp = ref_byte(a, s);
    #1;
    d = t_data;
    check($sformatf("socket byte at %0h", a), t_data, exp);
    check("socket driven", t_data_oe, 1);
    if (s == ref_state && s inside {ST_LC_OPC, ST_LC_HI, ST_LC_LO}) n_lcall_reread++;
    if (s == ST_MON) n_mon_fetch++;
    ref_state = s; ref_last_a0 = a[0];
    repeat (3) @(negedge clk);
    t_ce_n = 1'b1; t_oe_n = 1'b1;
    repeat (5) @(negedge clk);
    n_fetch++;
  endtask

  // Run from pc until `count` instructions are done; returns the pc and the
  // return address of the last LCALL taken.
  task automatic run(inout int pc, input int count, inout int ret);
    logic [7:0] op, b, hi, lo;
    for (int k = 0; k < count; k++) begin
      fetch(pc, op);
      if (op == 8'h12) begin
        fetch(pc + 1, hi);
        fetch(pc + 1, hi);                         // a repeated read
        fetch(pc + 2, lo);
        fetch(pc + 3, b);                          // dummy read of the 2nd cycle
        ret = pc;
        pc = {hi, lo};
      end else begin
        for (int i = 1; i < ilen[pc]; i++) fetch(pc + i, b);
        if (rdahead[pc]) begin
          fetch(pc + ilen[pc], b);                 // read ahead, discarded
          n_readahead++;
        end
        pc += ilen[pc];
      end
    end
  endtask

  // Lay out `n` instructions from `base` into an image; returns opcode addresses.
  task automatic make_code(bit mon, int base, int n, ref int starts[$]);
    int a = base;
    for (int k = 0; k < n; k++) begin
      int l;
      l = $urandom_range(1, 3);
      starts.push_back(a);
      ilen[a] = l;
      rdahead[a] = ($urandom_range(2) == 0);
      for (int i = 0; i < l; i++) begin
        logic [7:0] v;
        v = 8'($urandom);
        if (i == 0 && v == 8'h12) v = 8'h00;      // no genuine LCALLs
        if (mon) mon_img[a + i] = v; else user_img[a + i] = v;
      end
      a += l;
    end
    // padding after the last instruction, for the trailing reads
    for (int i = 0; i < 4; i++) begin
      if (mon) mon_img[a + i] = 8'hA5; else user_img[a + i] = 8'h5A;
    end
  endtask

  int ustarts[$], mstarts[$];
  int bp1, bp2, pc, ret;
  initial begin
    make_code(0, 16'h0000, 120, ustarts);
    make_code(1, ENTRY, 12, mstarts);
    // the user image's addresses also exist in the MON image and back
    foreach (user_img[a]) if (!mon_img.exists(a)) mon_img[a] = 8'($urandom);
    foreach (mon_img[a])  if (!user_img.exists(a)) user_img[a] = 8'($urandom);
    bp1 = ustarts[30];
    bp2 = ustarts[80];
    rdahead[ustarts[29]] = 1'b1;    // the breakpoint opcode is read ahead
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // download: user code, monitor, BP bits (cleared, then two set)
    foreach (user_img[a]) mcu_write(RAM_USER, a, user_img[a]);
    foreach (mon_img[a])  mcu_write(RAM_MON,  a, mon_img[a]);
    foreach (user_img[a]) begin bp_img[a] = 1'b0; mcu_write(RAM_BP, a, 8'h00); end
    bp_img[bp1] = 1'b1; mcu_write(RAM_BP, bp1, 8'h01);
    bp_img[bp2] = 1'b1; mcu_write(RAM_BP, bp2, 8'h01);
    for (int i = 0; i < 40; i++) begin
      int a;
      a = ustarts[$urandom_range(ustarts.size() - 1)];
      mcu_read_check(RAM_USER, a, user_img[a]);
      mcu_read_check(RAM_BP,   a, 8'(bp_img[a]));
      mcu_read_check(RAM_MON,  ENTRY + i % 16, mon_img[ENTRY + i % 16]);
    end
    t_ce_n = 1'b0; t_oe_n = 1'b0; #1;
    check("socket idle in host mode", t_data_oe, 0);
    t_ce_n = 1'b1; t_oe_n = 1'b1;
    @(negedge clk); host = 1'b0;

    // run to the first breakpoint, through the monitor, then resume
    pc = 0; ret = -1;
    for (int bpn = 0; bpn < 2; bpn++) begin
      int target_bp;
      target_bp = (bpn == 0) ? bp1 : bp2;
      while (pc != ENTRY) run(pc, 1, ret);
      check("LCALL came from the breakpoint", ret, target_bp);
      repeat (6) @(negedge clk);
      check("in monitor after LCALL", in_monitor, 1);
      run(pc, mstarts.size(), ret);
      // the microcontroller clears the breakpoint and resumes the target
      // at the breakpoint address
      @(negedge clk); host = 1'b1;
      bp_img[target_bp] = 1'b0; mcu_write(RAM_BP, target_bp, 8'h00);
      @(negedge clk); host = 1'b0; resume = 1'b1;
      @(negedge clk); resume = 1'b0;
      ref_state = ST_USER; n_resume++;
      check("user state after resume", state, ST_USER);
      pc = target_bp;
    end
    while (pc < ustarts[$]) run(pc, 1, ret);
    repeat (6) @(negedge clk);
    check("breakpoint hits", n_hits, 2);
    check("still in user code", state, ST_USER);

    $display("fetches %0d  host writes %0d  read-backs %0d  breakpoints %0d",
             n_fetch, n_host_wr, n_host_rd, n_hits);
    $display("LCALL re-reads %0d  read-aheads %0d  monitor fetches %0d  resumes %0d",
             n_lcall_reread, n_readahead, n_mon_fetch, n_resume);
    if (n_host_wr == 0 || n_host_rd == 0 || n_hits == 0 || n_lcall_reread == 0 ||
        n_readahead == 0 || n_mon_fetch == 0 || n_resume == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
