// tb_target_speed: the emulator core under real 8051 fetch timing at
// several target oscillator frequencies, with the core's clock unrelated
// to the target's.
//
// The target model follows the 8051 external program-memory cycle: two
// fetches per 12 oscillator periods, the address valid one period before
// PSEN (wired to TOE) falls, PSEN low for 3 periods less 35 ns, the byte
// taken at the rising PSEN edge. TCE is held low, as on a board whose only
// program memory is this socket. The core runs at 50 MHz. For each target
// frequency (1.2 MHz, the top of the 80CL31 table; 12 MHz; 33 MHz; 36 MHz)
// the test resets the controller, runs user code into a breakpoint,
// follows the LCALL into the monitor, resumes and runs on. Every byte is
// checked against a reference computed from the RAM images. At 36 MHz the
// PSEN high time is about 118 ns, six clock periods of the core, against
// the four it needs.
module tb_target_speed;
  import emu_pkg::*;
  localparam int unsigned AW    = 16;
  localparam int unsigned ENTRY = 16'hF800;
  localparam realtime     TCLK  = 20ns;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host = 1'b1, resume = 1'b0, mcu_we = 1'b0;
  logic [AW-1:0] mcu_addr = '0, t_addr = '0;
  ram_sel_e      mcu_sel = RAM_USER;
  logic [7:0]    mcu_wdata = '0, mcu_rdata, t_data;
  logic          t_ce_n = 1'b0, t_oe_n = 1'b1, t_data_oe;
  emu_state_e    state;
  logic          in_monitor, bp_hit, read_done;

  int checks = 0, failures = 0;
  int n_hits = 0, n_mon = 0;

  eprom_emulator dut (.*);

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) if (rst_n && bp_hit) n_hits++;

  initial begin
    #5ms;
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

  // images: user code 0x0000..0x00FF, monitor at ENTRY..ENTRY+0xFF
  logic [7:0] user_img [int];
  logic [7:0] mon_img  [int];
  localparam int BP_ADDR = 16'h0041;
  bit bp_set;    // the BP bit at BP_ADDR as last written

  function automatic logic [7:0] img(bit mon, int a);
    if (mon) return mon_img.exists(a) ? mon_img[a] : 8'h00;
    return user_img.exists(a) ? user_img[a] : 8'h00;
  endfunction

  // reference
  emu_state_e ref_state;
  logic       ref_last_a0;

  function automatic logic [7:0] ref_byte(int a);
    logic ch;
    emu_state_e s;
    ch = (a[0] != ref_last_a0);
    case (ref_state)
      ST_USER:   s = (a == BP_ADDR && bp_set) ? ST_LC_OPC : ST_USER;
      ST_LC_OPC: s = ch ? ST_LC_HI : ST_LC_OPC;
      ST_LC_HI:  s = ch ? ST_LC_LO : ST_LC_HI;
      ST_LC_LO:  s = ch ? ST_MON   : ST_LC_LO;
      default:   s = ST_MON;
    endcase
    ref_state = s; ref_last_a0 = a[0];
    case (s)
      ST_USER:   return img(0, a);
      ST_LC_OPC: return 8'h12;
      ST_LC_HI:  return 8'(ENTRY >> 8);
      ST_LC_LO:  return 8'(ENTRY);
      default:   return img(1, a);
    endcase
  endfunction

  // one 8051 program-memory fetch, half a machine cycle long
  task automatic fetch(realtime tosc, int a, output logic [7:0] d);
    logic [7:0] exp;
    realtime low;
    low = 3 * tosc - 35ns;
    t_addr = AW'(a);
    #(tosc);
    t_oe_n = 1'b0;
    exp = ref_byte(a);
    #(low);
    d = t_data;
    check($sformatf("byte at %0h", a), d, exp);
    if (ref_state == ST_MON) n_mon++;
    t_oe_n = 1'b1;
    #(6 * tosc - tosc - low);
  endtask

  task automatic mcu_write(ram_sel_e sel, int a, logic [7:0] d);
    @(negedge clk);
    mcu_sel = sel; mcu_addr = AW'(a); mcu_wdata = d; mcu_we = 1'b1;
    @(negedge clk);
    mcu_we = 1'b0;
  endtask

  // Sequential one-byte instructions, each followed by a read-ahead of
  // the next address, as the 8051 does for single-byte, single-cycle code.
  task automatic run_at(real mhz);
    realtime tosc;
    logic [7:0] d, hi, lo;
    int pc, hits0;
    tosc = 1us / mhz;
    hits0 = n_hits;
    // reset the controller between runs
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    ref_state = ST_USER; ref_last_a0 = 1'b0;
    @(negedge clk); host = 1'b0;
    pc = 16'h0030;
    while (1) begin
      fetch(tosc, pc, d);
      if (d == 8'h12) break;
      fetch(tosc, pc + 1, d);     // read ahead
      pc++;
    end
    fetch(tosc, pc + 1, hi);
    fetch(tosc, pc + 2, lo);
    fetch(tosc, pc + 3, d);       // second-cycle dummy read
    check("breakpoint address", pc, BP_ADDR);
    pc = {hi, lo};
    check("LCALL destination", pc, ENTRY);
    for (int k = 0; k < 10; k++) begin
      fetch(tosc, pc, d); fetch(tosc, pc + 1, d); pc++;
    end
    check("in monitor", in_monitor, 1);
    // the microcontroller takes the bus, clears the breakpoint, resumes
    host = 1'b1; mcu_write(RAM_BP, BP_ADDR, 8'h00); bp_set = 1'b0;
    @(negedge clk); host = 1'b0; resume = 1'b1; @(negedge clk); resume = 1'b0;
    ref_state = ST_USER;
    pc = BP_ADDR;
    for (int k = 0; k < 10; k++) begin
      fetch(tosc, pc, d); fetch(tosc, pc + 1, d); pc++;
    end
    check("user code after resume", state, ST_USER);
    check($sformatf("one breakpoint at %0.1f MHz", mhz), n_hits - hits0, 1);
    // put the breakpoint back for the next frequency
    host = 1'b1; mcu_write(RAM_BP, BP_ADDR, 8'h01); bp_set = 1'b1;
    $display("%0.1f MHz target: breakpoint and monitor entry done", mhz);
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      user_img[a] = 8'($urandom);
      if (user_img[a] == 8'h12) user_img[a] = 8'h00;
      mon_img[ENTRY + a] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (user_img[a]) begin
      mcu_write(RAM_USER, a, user_img[a]);
      mcu_write(RAM_BP, a, 8'h00);
      mcu_write(RAM_MON, a, 8'h00);
      mon_img[a] = 8'h00;
    end
    foreach (mon_img[a]) if (a >= ENTRY) begin
      mcu_write(RAM_MON, a, mon_img[a]);
      mcu_write(RAM_BP, a, 8'h00);
      mcu_write(RAM_USER, a, 8'h00);
      user_img[a] = 8'h00;
    end
    mcu_write(RAM_BP, BP_ADDR, 8'h01); bp_set = 1'b1;
    run_at(1.2);
    run_at(12.0);
    run_at(33.0);
    run_at(36.0);
    check("monitor fetches seen", n_mon > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
