// tb_emu_sram: self-checking test of the emulator SRAM.
//
// Writes random data to random addresses of an 8-bit and a 1-bit instance
// (the USER/MON and BP shapes), keeps a shadow copy in the testbench and
// reads every written address back, checking that the read is
// combinational (valid in the same cycle the address is applied) and that
// a write with we low changes nothing. The memories are shrunk to 10
// address bits to keep the run short.
module tb_emu_sram;
  localparam int unsigned AW = 10;

  logic          clk = 1'b0;
  logic          we8, we1;
  logic [AW-1:0] addr;
  logic [7:0]    wdata;
  logic [7:0]    q8;
  logic          q1;

  int checks = 0, failures = 0;

  emu_sram #(.DATA_W(8), .ADDR_W(AW)) dut8 (.clk, .we(we8), .addr, .wdata, .rdata(q8));
  emu_sram #(.DATA_W(1), .ADDR_W(AW)) dut1 (.clk, .we(we1), .addr, .wdata(wdata[0]), .rdata(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] shadow8 [2**AW];
  logic       shadow1 [2**AW];
  bit         written [2**AW];

  initial begin
    we8 = 0; we1 = 0; addr = '0; wdata = '0;
    @(negedge clk);
    // fill every address once so that all reads are defined
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); wdata = 8'($urandom); we8 = 1; we1 = 1;
      shadow8[a] = wdata; shadow1[a] = wdata[0]; written[a] = 1;
      @(negedge clk);
    end
    // random overwrites, some with we low
    for (int n = 0; n < 3000; n++) begin
      int unsigned a;
      bit w;
      a = $urandom_range(2**AW-1);
      w = $urandom_range(1);
      addr = AW'(a); wdata = 8'($urandom); we8 = w; we1 = ~w;
      if (w) shadow8[a] = wdata; else shadow1[a] = wdata[0];
      @(negedge clk);
    end
    we8 = 0; we1 = 0;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (q8 !== shadow8[a] || q1 !== shadow1[a]) begin
        failures++;
        if (failures < 10) $display("mismatch at %0h: %0h/%0b expected %0h/%0b", a, q8, q1, shadow8[a], shadow1[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
