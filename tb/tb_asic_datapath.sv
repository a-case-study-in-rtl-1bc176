// tb_asic_datapath: self-checking test of the ASIC data part.
//
// Drives random addresses, RAM read data, sources and microcontroller bus
// values, and compares the RAM address, the byte sent to the socket, the
// microcontroller read data and the three write enables with a reference
// worked out in the testbench from the rules: host selects the
// microcontroller address; the source picks USER code, the LCALL opcode
// 0x12, the entry high byte, the entry low byte or MON code; writes reach
// only the selected RAM and only in host mode.
module tb_asic_datapath;
  import emu_pkg::*;
  localparam int unsigned AW = 16;

  logic          host, mcu_we, we_user, we_bp, we_mon, bp_q;
  logic [AW-1:0] mcu_addr, t_addr, ram_addr;
  ram_sel_e      mcu_sel;
  logic [7:0]    mcu_rdata, t_data, user_q, mon_q;
  emu_state_e    src;
  logic [15:0]   mon_entry;

  int checks = 0, failures = 0;

  asic_datapath #(.ADDR_W(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0h expected %0h (src=%s)", what, got, exp, src.name());
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] exp_t;
      host      = 1'($urandom);
      mcu_we    = 1'($urandom);
      mcu_addr  = AW'($urandom);
      t_addr    = AW'($urandom);
      mcu_sel   = ram_sel_e'($urandom_range(2));
      user_q    = 8'($urandom);
      mon_q     = 8'($urandom);
      bp_q      = 1'($urandom);
      src       = emu_state_e'($urandom_range(4));
      mon_entry = 16'($urandom);
      #1;
      check("ram_addr", ram_addr, host ? mcu_addr : t_addr);
      case (src)
        ST_USER:   exp_t = user_q;
        ST_LC_OPC: exp_t = 8'h12;
        ST_LC_HI:  exp_t = mon_entry[15:8];
        ST_LC_LO:  exp_t = mon_entry[7:0];
        default:   exp_t = mon_q;
      endcase
      check("t_data", t_data, exp_t);
      check("mcu_rdata", mcu_rdata,
            mcu_sel == RAM_USER ? user_q : mcu_sel == RAM_BP ? {7'b0, bp_q} : mon_q);
      check("we_user", we_user, host && mcu_we && mcu_sel == RAM_USER);
      check("we_bp",   we_bp,   host && mcu_we && mcu_sel == RAM_BP);
      check("we_mon",  we_mon,  host && mcu_we && mcu_sel == RAM_MON);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
