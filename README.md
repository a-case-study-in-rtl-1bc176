# EPROM emulator core with hardware breakpoints for 8051 targets

An EPROM emulator replaces the program EPROM of a target board with RAM that
a host can load and inspect. This core is the part of such an emulator that
sits on the target's EPROM socket. It serves the target's instruction fetches
from emulation RAM. It also stops the target at breakpoints, and it does so
in hardware, within one memory access, so targets with fast clocks can be
debugged.

The idea is a **three-RAM architecture**. Three RAMs share one address bus
and are read in parallel at the address the target fetches:

| RAM      | width | contents                                         |
|----------|-------|--------------------------------------------------|
| RAM USER | 8     | the user program being debugged                  |
| RAM BP   | 1     | one breakpoint bit per address                   |
| RAM MON  | 8     | a monitor program that the target runs when stopped |

Why not just patch a jump over the instruction at the breakpoint? A patched
jump has to fit in the space of the instruction it replaces. Many 8051
instructions are a single byte, and a 3-byte call does not fit in them. Here
the user code stays in place. When the target fetches an opcode whose BP bit
is set, the core itself answers with the three bytes of an `LCALL MON_ENTRY`
(opcode 0x12, destination high byte, destination low byte). From then on it
serves RAM MON instead of RAM USER. The monitor has its own RAM, so none of
the user address space is taken from the program.

## Blocks

```
             emulator microcontroller bus (host, mcu_*)
                 |                          |
      +----------v--------------------------v---------+
      | emu_asic                                      |
      |  asic_datapath:  RAM address mux (host/target)|     ram_addr
      |                  socket byte mux  ------------+---> emu_sram x3
      |                  (USER | 12 | hi | lo | MON)  | <--- user_q, bp_q, mon_q
      |  bp_controller:  TCE/TOE/A0/BP -> byte source |
      +-----------------------------------------------+
                 ^ t_addr, t_ce_n, t_oe_n     | t_data, t_data_oe
                 |        target EPROM socket v
```

| module           | role                                                             |
|------------------|------------------------------------------------------------------|
| `emu_pkg`        | LCALL opcode, controller state enum `emu_state_e`, RAM select enum `ram_sel_e` |
| `emu_sram`       | one SRAM: asynchronous read, write on the clock edge; used for USER (8 bit), BP (1 bit) and MON (8 bit) |
| `asic_datapath`  | combinational address and data multiplexers                      |
| `bp_controller`  | picks the byte source for each target read; moves the state after each read |
| `emu_asic`       | data path plus controller: the emulator ASIC                     |
| `eprom_emulator` | top: the ASIC and the three RAMs                                 |

The rest of the emulator is outside this RTL: the emulator microcontroller
(an 8051-family part that talks to the PC and drives the target's reset
TRST), the target processor and the cable. The microcontroller's side appears
as the `mcu_*`, `host` and `resume` ports.

## The breakpoint sequence and the A0 rule

This is the subtle part of the design. The controller has five states (`emu_state_e`). Each state is
also the source of the byte sent to the socket:

| state       | byte served           | next state, decided by the read just finished |
|-------------|-----------------------|-------------------------------------|
| `ST_USER`   | RAM USER              | `ST_LC_OPC` if that read's BP bit was set |
| `ST_LC_OPC` | 0x12                  | `ST_LC_HI` on an A0 change          |
| `ST_LC_HI`  | `MON_ENTRY[15:8]`     | `ST_LC_LO` on an A0 change          |
| `ST_LC_LO`  | `MON_ENTRY[7:0]`      | `ST_MON` on an A0 change            |
| `ST_MON`    | RAM MON               | stays until `resume`                |

The "next state" decision is made during the read itself, not one read later. The
read that finds its BP bit set already receives 0x12, not user code. In the
same way, a read in `ST_LC_OPC` whose A0 differs from the previous read's
already receives the high byte. In the RTL the signal `src` is this
combinational look-ahead. `state` holds what the last completed read
received.

Why A0? The 8051 reads program memory ahead. For a one-byte instruction it
fetches the following byte, throws it away, and fetches the same address again
as the next opcode. Some two-cycle instructions read the same address several
times. So "one read = one byte" is wrong. Instead, a read starts the next
LCALL byte only when address bit A0 differs from the previous read's. Repeated
reads of one address get the same byte again. Consecutive bytes always differ
in A0. The read after the low byte (the LCALL's dummy second-cycle read) already
gets RAM MON data. The target ignores it and then jumps to `MON_ENTRY`.

BP bits are not looked at while in the monitor or during the LCALL.

**Known limitation.** The 8051's read-ahead also happens after jumps and
conditional branches. For example, `JB` reads the first byte of the next
instruction whether or not it branches. A breakpoint placed directly after a
program-control instruction therefore fires even if the branch is taken.
Place such breakpoints elsewhere, or put a `NOP` in front of the instruction.
This core does not try to tell these cases apart.

**Leaving the monitor.** A one-clock pulse on `resume` puts the controller back
into `ST_USER`. The microcontroller decides when. Normally it first clears
(over the host bus) the BP bit that stopped the program. The monitor
software must arrange the return address itself: the LCALL pushed the
breakpoint address + 3.

## Timing

- **Socket data path:** combinational. Data is valid one RAM access plus one
  multiplexer after the target address and strobes. No clock edge is involved.
  The maximum target clock is set by this path. The target's address-to-
  instruction time (`TAVIV`, 5·Tosc − 115 ns for the 80CL31, 5·Tosc − 55 ns
  for the 80C31) must cover the RAM access, the logic and the cable. With a
  40 ns RAM and about 23 ns of logic, this allows 8051 targets up to roughly
  36 MHz.
- **Controller state:** moves on `clk`. The read strobe (`~t_ce_n & ~t_oe_n`),
  A0 and the chosen source pass together through `SYNC_STAGES` flip-flops.
  While the synchronised strobe is active, A0 and the source are captured. When
  it goes inactive, the captured source becomes `state` and the captured A0
  becomes the reference for the next read. The new state is visible
  `SYNC_STAGES + 2` clocks after the strobes rise (4 with the default).
- **Constraint:** the state must be updated before the target samples its
  next byte. Keeping two reads at least `SYNC_STAGES + 2` `clk` periods apart
  is a safe rule for this. On an 8051, PSEN stays high for about
  3 oscillator periods + 35 ns between fetches (about 118 ns at 36 MHz), so
  `clk` = 50 MHz covers 8051 targets up to 36 MHz. A target at a few MHz needs
  only a few MHz of `clk`. `tb_target_speed` runs 1.2, 12, 33 and 36 MHz
  targets against a 50 MHz `clk`. The same test fails at 33 MHz when `clk` is
  only 20 MHz.
- **Host bus:** synchronous. `mcu_we` writes on the rising `clk` edge into the RAM
  selected by `mcu_sel`, and only while `host` is 1. `mcu_rdata` is
  combinational from `mcu_addr`/`mcu_sel`. While `host` is 1 the RAM address is
  the microcontroller's and the socket is not driven (`t_data_oe = 0`). The
  target should be held in reset through TRST during that time.
- **Reset:** `rst_n` is asynchronous, active low, and gives `ST_USER`. The RAMs
  are not reset: the BP RAM must be cleared over the host bus before
  the target runs.

## Using it

1. With `host = 1` (target in reset), write the user program
   (`mcu_sel = RAM_USER`), the monitor (`RAM_MON`, starting at `MON_ENTRY`)
   and the BP RAM (`RAM_BP`, bit 0 of `mcu_wdata`). Clear every BP bit the
   target may fetch, then set the breakpoint addresses. Breakpoints must be
   opcode addresses.
2. Set `host = 0` and release the target's reset.
3. Watch `in_monitor` (or the one-clock pulse `bp_hit`). `read_done` pulses once
   per completed target read.
4. To continue, take the bus if needed to change BP bits, then pulse `resume`.

## Parameters

| parameter     | default    | meaning |
|---------------|------------|---------|
| `ADDR_W`      | 16         | RAM address width; 64 KiB covers the whole 8051 program space |
| `MON_ENTRY`   | `16'hF800` | LCALL destination, the monitor's entry point |
| `SYNC_STAGES` | 2          | synchroniser depth for the socket strobes (at least 1) |

## What follows the original design and what is this design's own

These come from the original design:
- the three RAMs read in parallel;
- the LCALL substitution when BP is set;
- the switch to monitor code afterwards;
- the signals the decision uses (TCE, TOE, BP, the A0 change);
- the split into a data part and a control part;
- the accepted branch limitation.

These are choices made here:
- the RAM depth and `MON_ENTRY`;
- the microcontroller bus with its `host` address multiplexer;
- the `resume` input and the `in_monitor`, `bp_hit` and `read_done` status outputs;
- the clocked commit-after-read controller with a synchroniser. The original
  was PLD logic, and its internal timing scheme is not known.

Not included:
- the communication channel that the original emulator adds between the
  emulator microcontroller and the target, because no registers or protocol
  are known for it;
- the emulator microcontroller's software.

The `bp_controller` lint reports `rst_n` as used both synchronously and
asynchronously. The synchronous use is only the `disable iff` of the
LCALL-order assertion, so the warning can be ignored.

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`:

| testbench           | what it does |
|---------------------|--------------|
| `tb_emu_sram`       | random writes and read-back on an 8-bit and a 1-bit instance, against a shadow copy |
| `tb_asic_datapath`  | random inputs; checks the multiplexers and write-enable decode against a reference |
| `tb_bp_controller`  | a directed breakpoint sequence with repeated reads, then about 2700 random reads. It mixes in A0 changes, breakpoints, host phases and resumes. It also checks the state-update latency. |
| `tb_emu_asic`       | host access, then a target fetch run through a breakpoint and into the monitor, then a resume. The RAMs are arrays in the testbench. |
| `tb_eprom_emulator` | end to end at the default parameters, described below |
| `tb_target_speed`   | 8051 fetch timing, asynchronous to `clk`, at 1.2, 12, 33 and 36 MHz target clocks: a breakpoint, monitor entry and resume at each |

In `tb_eprom_emulator` the testbench plays both processors:
- As the microcontroller, it downloads code and sets two breakpoints.
- As the target, it fetches instruction streams with read-aheads. When it
  receives 0x12 it behaves like an LCALL.

Every socket byte is compared with a reference, at the moment the address is
applied. The test also counts how often each mechanism occurs and fails if any
count is zero: breakpoint hit, LCALL byte re-read, read-ahead, monitor fetch,
resume, host write and host read-back.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl \
  rtl/emu_pkg.sv rtl/emu_sram.sv rtl/asic_datapath.sv rtl/bp_controller.sv \
  rtl/emu_asic.sv rtl/eprom_emulator.sv tb/tb_eprom_emulator.sv \
  --top-module tb_eprom_emulator
./obj_dir/Vtb_eprom_emulator
```

For another testbench, substitute its file and top module. Each test runs in
seconds.
