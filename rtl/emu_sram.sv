// emu_sram: one of the emulator's three static RAMs (USER, BP or MON).
//
// The three RAMs are addressed in parallel from a single address bus that
// the ASIC drives: the target's EPROM address while the target runs, the
// emulator microcontroller's address while it downloads code, sets
// breakpoints or reads memory back. The read is asynchronous (data follows
// the address combinationally, like the discrete SRAM whose access time
// enters the emulator's reaction time); the write is taken on the rising
// clock edge when we is high. RAM USER and RAM MON are 8 bits wide, RAM BP
// holds the single BP bit per address (DATA_W = 1).
//
// The depth (2**ADDR_W, default 64 KiB, the full 8051 program space) and
// the synchronous write are this design's choices; the document gives the
// RAMs' roles but not their size or write timing. No reset: contents are
// undefined until written, as in a real SRAM.
module emu_sram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
