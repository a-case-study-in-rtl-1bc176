// tb_emu_asic: self-checking test of the ASIC (data part plus controller).
//
// The three RAMs are modelled by arrays in the testbench, read at the
// ASIC's RAM address. The test first acts as the microcontroller in host
// mode (checking the RAM address, write enables and read-back data), then
// as the target: it fetches a run of user code containing a breakpoint,
// with one address read twice as the 8051 does when it reads ahead, and
// checks every byte on the socket: user code, the LCALL opcode 0x12 twice,
// MON_ENTRY high and low, then monitor code; finally a resume returns to
// user code. Each byte is checked one time step after the address and
// strobes are applied, without waiting for a clock edge.
module tb_emu_asic;
  import emu_pkg::*;
  localparam int unsigned AW = 12;
  localparam logic [15:0] ENTRY = 16'h0A31;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host = 1'b1, resume = 1'b0, mcu_we = 1'b0;
  logic [AW-1:0] mcu_addr = '0, t_addr = '0, ram_addr;
  ram_sel_e      mcu_sel = RAM_USER;
  logic [7:0]    mcu_rdata, t_data, user_q, mon_q;
  logic          t_ce_n = 1'b1, t_oe_n = 1'b1, t_data_oe;
  logic          we_user, we_bp, we_mon, bp_q;
  emu_state_e    state;
  logic          in_monitor, bp_hit, read_done;

  int checks = 0, failures = 0;

  emu_asic #(.ADDR_W(AW), .MON_ENTRY(ENTRY), .SYNC_STAGES(2)) dut (.*);

  logic [7:0] user_mem [2**AW];
  logic [7:0] mon_mem  [2**AW];
  logic       bp_mem   [2**AW];
  assign user_q = user_mem[ram_addr];
  assign mon_q  = mon_mem[ram_addr];
  assign bp_q   = bp_mem[ram_addr];

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
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

  task automatic fetch(int a, int exp);
    @(negedge clk);
    t_addr = AW'(a); t_ce_n = 0; t_oe_n = 0;
    #1;
    check($sformatf("byte at %0h", a), t_data, exp);
    check("oe", t_data_oe, 1);
    repeat (3) @(negedge clk);
    t_ce_n = 1; t_oe_n = 1;
    repeat (6) @(negedge clk);
  endtask

  int hits = 0;
  always @(posedge clk) if (rst_n && bp_hit) hits++;

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      user_mem[i] = 8'($urandom); mon_mem[i] = 8'($urandom); bp_mem[i] = 1'b0;
    end
    bp_mem[16'h0105] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host mode: address, write enables, read-back
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      mcu_addr = AW'($urandom); mcu_sel = ram_sel_e'($urandom_range(2)); mcu_we = 1'($urandom);
      #1;
      check("host addr", ram_addr, mcu_addr);
      check("we_user", we_user, mcu_we && mcu_sel == RAM_USER);
      check("we_bp",   we_bp,   mcu_we && mcu_sel == RAM_BP);
      check("we_mon",  we_mon,  mcu_we && mcu_sel == RAM_MON);
      check("rdata", mcu_rdata, mcu_sel == RAM_USER ? user_mem[mcu_addr] :
                                mcu_sel == RAM_BP ? 8'(bp_mem[mcu_addr]) : mon_mem[mcu_addr]);
      t_ce_n = 0; t_oe_n = 0; #1;
      check("no socket drive in host mode", t_data_oe, 0);
      t_ce_n = 1; t_oe_n = 1;
    end
    @(negedge clk); mcu_we = 0; host = 0;
    // target run
    for (int a = 16'h0100; a < 16'h0105; a++) fetch(a, user_mem[a]);
    fetch(16'h0105, 8'h12);
    fetch(16'h0105, 8'h12);            // read ahead: same byte again
    fetch(16'h0106, ENTRY[15:8]);
    fetch(16'h0107, ENTRY[7:0]);
    fetch(16'h0108, mon_mem[16'h0108]); // dummy read, already monitor
    check("in monitor", in_monitor, 1);
    for (int a = ENTRY; a < ENTRY + 8; a++) fetch(a, mon_mem[a]);
    @(negedge clk); resume = 1; @(negedge clk); resume = 0;
    check("resumed", state, ST_USER);
    for (int a = 16'h0108; a < 16'h0110; a++) fetch(a, user_mem[a]);
    check("breakpoint pulses", hits, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
