# VMCore: an FPGA microcontroller for voice-message synthesis

VMCore is a small 8-bit microcontroller meant to speak. It builds messages from recorded words,
phrases and numbers. These are stored in an external System Flash ROM (SFR), compressed by
adaptive delta modulation (ADM).

A host sends requests over a serial port. The program on the core then:

- looks up the primitives it needs;
- streams their compressed bytes out of the flash through two address registers;
- hands them to an ADM decoder, which turns one bit into one sample, 11025 times a second;
- lets the decoder ship each sample to a serial DAC.

An 8-bit parallel port (Port A) is there for interactive voice-response applications.

The processor itself is a Harvard, accumulator-type RISC machine:

- one 16-bit instruction per machine cycle, with the next instruction prefetched;
- a 512-byte register file holding every register the program can touch;
- a 4-entry hardware return stack.

At the intended 20 MHz clock, a machine cycle is 250 ns (5 clocks).

```
            +------+   +----+   +----+
  PCST <--> |  PC  |-->| PM |-->| IR |--> CU --> control of everything below
            +------+   +----+   +----+
                ^  absolute address | IR_L = FR address / immediate
                +-------------------+
  FR (512 B) --DOUT--> A_mux / B_mux --> ALU --DIN--> FR
      |                   ^   ^                 +--> AR0 (28 b) --+
      |             #0 #1 |   +-- SFR data bus  +--> AR1 (16 b) --+-- Addr_Mux --> SFR address
      +-- 000..00F: system + I/O registers (UART, DAC/IO_SR, Port A, ADM decoder)
```

## Files

| file | contents |
|---|---|
| `rtl/vmcore_pkg.sv` | widths, instruction encodings, register addresses and bit numbers, control-word structs |
| `rtl/vmcore_sys.sv` | system top: configuration controller and microcontroller on one flash bus |
| `rtl/vmcore_cfg.sv` | configuration controller (the CPLD beside the FPGA) |
| `rtl/vmcore.sv` | the microcontroller: wires the core and the peripherals together |
| `rtl/vmcore_cu.sv` | control unit: machine-cycle phases, decode, skip, multi-cycle loads, interrupts, SFR strobes |
| `rtl/vmcore_pc.sv`, `rtl/vmcore_pcst.sv` | program counter with fetch-address mux; 4-entry PC stack |
| `rtl/vmcore_pm.sv`, `rtl/vmcore_ir.sv` | 512 x 16 program ROM; instruction register with the IR_L counter |
| `rtl/vmcore_file_reg.sv` | File Register: system registers in flip-flops, general registers and System RAM in one 512-byte array |
| `rtl/vmcore_alu.sv` | 16-operation ALU and skip flag |
| `rtl/vmcore_addr_regs.sv` | AR0 counter, AR1 shift register, Addr_Mux |
| `rtl/vmcore_uart.sv`, `rtl/vmcore_porta.sv` | serial port; Port A |
| `rtl/vmcore_madm.sv`, `rtl/vmcore_dac.sv` | ADM decoder with sample timer; serial DAC controller |
| `rtl/vmcore_wdt.sv` | watchdog |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_vmcore` for the microcontroller, `tb_vmcore_sys` for the whole system; `tb_vmcore_playback` for real-time voice playback |
| `tb/vmcore_asm_pkg.sv` | instruction encoders used to write test programs |
| `tb/vmcore_sfr_model.sv`, `tb/vmcore_dac_model.sv`, `tb/vmcore_fpga_cfg_model.sv` | behavioural flash, DAC and FPGA-configuration-port models |

## Machine cycle, prefetch and skips

A phase counter in the control unit divides the clock into machine cycles of `CLK_PER_MC` clocks
(default 5). All architectural state (the File Register, flags, PC, IR, the address registers)
changes only on the last clock of a cycle (`mc_en`). The clocks before it give the combinational
datapath time to settle:

FR read → A/B mux → ALU → write-back.

They also shape the flash strobes.

**Prefetch.** While instruction *n* executes from the IR, the program memory is already being
read at the address of instruction *n+1*. That word is latched into the IR at the end of the
cycle. Every instruction therefore takes one cycle, including GOTO, CALL, RET and RETI: the
fetch-address mux picks the jump target in the same cycle, so no prefetched word is wasted.

**Skips.** DSZ, TBSS and TBSC are the only conditional instructions. When their condition holds,
the word already fetched is replaced by a NOP as it enters the IR. The skip therefore costs one
extra machine cycle: one cycle when the condition fails, two when the instruction skips.

**Multi-cycle loads.** `MOV AR0,Rn` fills the 28-bit AR0 one byte per cycle from FR[Rn],
FR[Rn+1], FR[Rn+2] and FR[Rn+3]. It holds the fetch for 4 cycles. `MOV AR1,Rn` does the same for
two bytes in 2 cycles. During these, IR_L acts as a counter that steps through the consecutive
FR addresses. IR_H is left alone, so the opcode stays in place.

## Instruction encoding

All instructions are 16 bits long, in four formats selected by bits 15:14.

| 15:14 | format | fields |
|---|---|---|
| 00 | register / immediate | OPC[13:8], FR address or immediate data [7:0] |
| 01 | bit | OP[13:11], bit number [10:8], FR address [7:0] |
| 10 | CALL | absolute address [13:0] |
| 11 | GOTO | absolute address [13:0] |

With a 9-bit PC only the low 9 bits of an absolute address are used. `PC_W` can be raised to 14.

Opcodes of the register/immediate format (bits 13:8, hex):

| group | opcodes |
|---|---|
| data transfer | 00 NOP, 01 `MOV A,Rn`, 02 `MOV Rn,A`, 03 `MOV A,#d`, 04 `MOV R0,#d`, 05 `MOV Rn,(R0)`, 06 `MOV Rn,(R0),RAM`, 07 `MOV (R0),Rn`, 08 `MOV (R0),Rn,RAM`, 09 `MOV Rn,(R1+A)`, 0A `MOV Rn,(R2)`, 0B `MOV (R2),Rn`, 0C `CLR Rn` |
| arithmetic | 10 `ADD A,Rn`, 11 `ADD A,Rn,C`, 12 `ADD A,#d`, 13 `ADD Rn,A`, 14 `ADD Rn,A,C`, 15 `SUB A,Rn`, 16 `SUB A,Rn,C`, 17 `SUB A,#d`, 18 `SUB Rn,A`, 19 `SUB Rn,A,C`, 1A `CMP A,Rn`, 1B `CMP A,#d`, 1C `INC`, 1D `DEC`, 1E `DSZ` |
| logic | 20/21 `AND A,Rn / #d`, 22/23 `OR`, 24/25 `XOR`, 26 `NOT Rn`, 27 `ROL Rn`, 28 `ROR Rn` |
| control | 30 `RET`, 31 `RETI`, 32 `CWDT` |
| address-register transfer | 38 `MOV Rn,(AR0)`, 39 `MOV Rn,(AR0+1)`, 3A `MOV Rn,(AR1<<BF)`, 3B `MOV AR0,Rn`, 3C `MOV AR1,Rn`, 3D `MOV (AR0),Rn`, 3E `MOV (AR0+1),Rn` |

Bit operations (bits 13:11): 0 SETB, 1 CLRB, 2 TBSS (skip if set), 3 TBSC (skip if clear),
4 LDBF (copy the bit into SR.BF). Unassigned codes execute as NOP.

Adding CALL and GOTO to the table gives 54 instructions in total.

Points about the arithmetic:

- Subtraction leaves the borrow in C.
- `SUB Rn,A` computes A − Rn and writes the result to Rn.
- ROL and ROR rotate through C.

Flags:

- ADD, SUB, CMP and the rotates update both C and Z.
- INC, DEC, DSZ, the logic operations, CLR and the plain moves update Z only.
- `MOV Rn,(R2)`, `MOV (R2),Rn` and the address-register group leave the flags alone, so a copy
  loop between flash and System RAM does not disturb a test in progress.

## The File Register

Everything the program can name is a byte in one 9-bit address space.

| address | register |
|---|---|
| 000–003 | R0–R3 (R0, R1, R2 are also pointers) |
| 004 | accumulator A |
| 005 | SR: bit 0 C, bit 1 Z, bit 2 BF (bit fed into AR1) |
| 006 | INTCR: bit 0 IEN, 1 UART-receive enable, 2 UART-transmitter-idle enable, 3 decoder-request enable, 7 watchdog enable |
| 007 | R7 |
| 008 | write: UART transmit; read: UART receive (reading clears "byte waiting") |
| 009 | write: DAC sample (upper 8 of 9 bits, while the decoder is idle); read: IO_SR = {DAC busy, decoder request, overrun, transmitter busy, byte waiting} in bits 4..0 |
| 00A | Port A: write the latch, read the pins |
| 00B–00E | R0B–R0E |
| 00F | ADM decoder: write a code byte; read status {request, running, buffer full} in bits 2..0 |
| 010–0FF | general-purpose registers (RAM) |
| 100–1FF | System RAM, reachable only indirectly |

The 16 system and I/O locations are flip-flops or peripheral registers. Locations 010–1FF are one
512-byte array, a single embedded RAM block on an FPGA. Its lowest 16 bytes are never used.

Ordinary instructions address 000–0FF through IR_L. The indirect forms reach further:

- `(R0)` and `(R1+A)` reach the whole register space 000–0FF.
- `(R0),RAM` and `(R2)` reach System RAM at 100 + R0 or 100 + R2.

System RAM is meant for stacks of saved registers during interrupts, and for buffers.

A write to SR or INTCR in the same cycle as a flag or IEN update wins over the update.

## Address registers and the flash bus

AR0 is a 28-bit up-counter and addresses the whole flash. AR1 is a 16-bit shift register that
addresses a table of decoder correction coefficients. `AR1_BASE` places that table in the flash.
`Addr_Mux` puts one of the two on `sfr_addr`.

- `MOV Rn,(AR0)` and `MOV (AR0),Rn` read or program one byte at AR0.
- The `(AR0+1)` forms first increment AR0 and use the new address in the same cycle. A block copy
  is therefore one instruction per byte.
- `MOV Rn,(AR1<<BF)` shifts AR1 left, moves SR.BF into bit 0, and reads at the new address. This
  suits walking a binary tree whose path bits are loaded into BF with LDBF.

Bus timing for one access per machine cycle:

- **Read:** `sfr_ce_n` and `sfr_oe_n` are low for the whole cycle. The data is taken on its last
  clock.
- **Write:** `sfr_drive` is high. `sfr_we_n` is low from the second clock to the next-to-last
  clock, so address and data are stable around the write pulse.

The flash chip's unlock and program command sequences are sequences of such writes issued by
software.

## Interrupts and the return stack

CALL and interrupts push the return address onto a 4-deep stack. RET and RETI pop it. The depth
is enough for two nested interrupts each running one call deep. A fifth push drops the oldest
entry. A pop from an empty stack returns address 0.

An interrupt is requested when INTCR.IEN is set and an enabled source is active. The sources are:

- the UART has a byte waiting;
- the UART transmitter is idle;
- the ADM decoder's buffer is empty while it plays.

The request is taken at the end of an instruction that is not a call, return, taken skip or
part of an address-register load. At that point:

- the address of the instruction that would have run next is pushed (for a GOTO, its target);
- fetch goes to address 004;
- IEN is cleared.

Because GOTO can be interrupted, a program may wait for interrupts in a `GOTO` loop to itself.
RETI returns and sets IEN again. The handler must remove the cause, for example by reading the
UART or writing a code byte; otherwise it is entered again at once.

## ADM decoder and DAC

The decoder turns a stream of code bits into samples. It holds one code byte in a buffer and one
in a shift register, which it empties MSB first, one bit per sample period of `CLK_HZ/FS_HZ`
clocks (1814 clocks at 20 MHz).

For each bit:

- The step size adapts. It doubles when the bit equals the previous bit, up to `STEP_MAX` (256),
  and halves when the bit differs, down to `STEP_MIN` (8).
- A 12-bit signed integrator adds the step for a 1 and subtracts it for a 0, saturating at the
  ends.
- The top 9 bits of the integrator, in offset binary, form the sample sent to the DAC.

Writing the first code byte starts playback. The request flag, and its interrupt, rise whenever
the buffer is empty while playing. If the shift register runs out with the buffer still empty,
playback stops and the integrator and step return to rest. Each message therefore starts from
silence.

While the decoder is idle the program may write a sample straight to the DAC through FR 009.

The DAC controller sends 12-bit frames:

- the 9-bit sample followed by three zero bits, MSB first;
- the converter takes each bit on the rising `dac_sck` edge;
- `dac_cs_ld` is low for the frame, and its rising edge loads the converter.

A frame takes 24·`SCK_HALF`+2 clocks (50 at the default). This matches a 12-bit three-wire DAC
used at 9-bit resolution.

## Peripherals

- **UART:** 8 data bits, no parity, one stop bit, at `BAUD` (default 115200; 174 clocks per bit
  at 20 MHz).
  - The receiver double-synchronises `uart_rxd` and samples each bit at its middle.
  - A byte arriving while the previous one is unread is dropped and sets the overrun flag.
  - A write to 008 while the transmitter is busy is ignored, so poll IO_SR or use the
    transmitter-idle interrupt.
- **Port A:** quasi-bidirectional.
  - Writing 0 to a pin drives it low. Writing 1 releases it (`porta_oe` = 0) so it can be read
    as an input.
  - The latch resets to FF, making all pins inputs.
  - Reads go through a two-flop synchroniser.
- **Watchdog:** counts machine cycles while INTCR.7 is set; CWDT clears it. After 2^16 cycles
  (3.3 ms at 20 MHz) it resets the whole core, peripherals included, for one clock. The
  general-purpose RAM keeps its contents, so software can tell a warm start from a power-up by
  a marker byte.

## Power-on configuration

The FPGA that holds the microcontroller is SRAM-based and loses its contents without power. A
small controller beside it (a CPLD in the original system, `vmcore_cfg` here) loads it from the
same flash that holds the voice data. `vmcore_sys` is the top that joins the two.

After power-on reset the controller:

1. pulls `cfg_nconfig` low for 4 clocks and waits for the FPGA to release `cfg_nstatus`;
2. reads `CFG_BYTES` bytes (default 98,048, an EP1K50 bit-stream) from flash address `CFG_BASE`
   (default 0);
3. sends each byte least significant bit first on `cfg_data0`, one bit per `cfg_dclk` period.
   A byte takes 18 clocks: 2 for the flash read and 8 two-clock dclk periods;
4. keeps clocking (up to 64 periods) until `cfg_conf_done` rises.

The whole load takes about 1.76 million clocks (88 ms at 20 MHz).

If the FPGA pulls `cfg_nstatus` low during the load, the controller starts again, up to three
times. If it still fails, or `cfg_conf_done` never rises, `cfg_error` is set and everything stops.

Until `cfg_done`, the controller owns the flash bus and the microcontroller is held in reset. In
hardware the FPGA simply is not running yet; here, reset models that. The controller then gives
up the bus for good. A watchdog reset restarts only the microcontroller, not the configuration.

The port protocol is the passive-serial scheme of ACEX 1K devices. The file size, its position in
the flash, and the retry policy are this design's choices.

## Parameters of the top (`vmcore_sys`)

`vmcore_sys` has all the parameters of `vmcore`, listed below, plus `CFG_BYTES` and `CFG_BASE`.



| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 20 000 000 | clock frequency, for the baud and sample-rate dividers |
| `CLK_PER_MC` | 5 | clocks per machine cycle (≥ 3) |
| `PC_W` | 9 | PC width, program memory is 2^PC_W words (up to 14) |
| `PCST_DEPTH` | 4 | return-stack entries |
| `BAUD` | 115 200 | UART rate |
| `FS_HZ` | 11 025 | decoder sample rate |
| `WDT_W` | 16 | watchdog counter width |
| `PM_INIT` | "" | optional `$readmemh` file with the program |

## Simulating

Every testbench is self-checking. Each prints one line, `TB_RESULT checks=N failures=M`, and
contains its own timeout. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vmcore_pkg.sv tb/vmcore_asm_pkg.sv tb/tb_vmcore.sv --top-module tb_vmcore
./obj_dir/Vtb_vmcore
```

For a unit test, replace the last file and the top name, for example `tb/tb_vmcore_alu.sv`.

`tb_vmcore_sys` (top `vmcore_sys`, add `tb/vmcore_fpga_cfg_model.sv` through `-y tb`) is the same
test with the full 98,048-byte configuration at every power-on in front of it. It checks every
byte received against the flash, and the load time. It runs in about five seconds.

`tb_vmcore_playback` is the real-time workload. The microcontroller waits in a `GOTO` loop while
its decoder interrupt streams 200 code bytes from the flash into the decoder, one
`MOV (AR0+1)` per request. The testbench checks all 1600 samples against a reference decoder, the
1814-clock period between every pair of samples, and that the decoder never runs dry.

`tb_vmcore` runs the microcontroller at its default parameters (20 MHz, 5 clocks per cycle, 115200 baud,
11025 Hz) in two phases; it takes well under a second.

1. **Random-program phase.** A random 512-word program with skips, calls, jumps, indirect
   accesses, flash reads and writes and enabled interrupts runs for 6000 instructions. After every
   instruction an instruction-set model written inside the testbench checks the registers, the
   whole File Register, the PC and the stack.
2. **System-program phase.** A hand-assembled program:
   - echoes UART bytes from an interrupt handler;
   - drives and reads Port A;
   - reads the flash through AR0 and through AR1 with both BF values, and programs two flash bytes;
   - nests calls inside an interrupt;
   - writes the DAC directly;
   - plays 32 samples of ADM code (checked against a reference decoder and the 1814-clock sample
     period);
   - lets the watchdog expire and checks the warm start.

The testbench counts how often each mechanism happened (skips, calls, interrupts, stack depth,
multi-cycle loads, flash writes, decoded samples, watchdog resets) and fails if any count is zero.

Programs are placed by writing `dut.u_pm.rom[]` directly from the testbench. `tb/vmcore_asm_pkg.sv`
has the encoders (`i_op`, `i_bit`, `i_call`, `i_goto`).

## How far to trust it, and where it is this design's own

These parts follow the architecture closely:

- the datapath structure;
- the File Register map and its 16 + 240 + 256 byte split;
- AR0 and AR1 widths and their byte-wise loading through a counting IR_L;
- the instruction list and formats;
- the cycle counts: one cycle per instruction, 1 or 2 for the three skipping instructions, 4 and
  2 for the address-register loads;
- the 9-bit PC with a 4-entry stack;
- 20 MHz with a 250 ns machine cycle;
- 11025 Hz sampling into a 9-bit DAC.

The following are this design's own choices. Change them freely.

- **Numbering.** Opcode numbers, the position of the bit-format fields, the flag and control bit
  positions, and the interrupt vector.
- **ALU operand registers.** The architecture holds the ALU's two operands in registers A and B
  for the machine cycle. Here the operands reach the ALU combinationally from the A/B muxes. The
  File Register and the accumulator do not change until the cycle's last clock, so the operands
  are just as stable; the difference is only a register stage less.
- **Flags.** Which instructions update which flags.
- **Subtraction carry.** Subtraction sets C as a borrow.
- **Direction of AR1's shift.** The architecture calls AR1 a right-shift register, but its
  instruction is written `AR1<<BF`. The shift-left form is built.
- **Pre-increment.** `(AR0+1)` increments before it accesses.
- **Interrupt hold-off.** Interrupts wait at the instructions listed above. An interrupted GOTO
  pushes its target.
- **Flash bus timing.** The strobes and their position in the machine cycle.
- **Peripheral interfaces.** The UART frame and rate, Port A's quasi-bidirectional pins, and the
  peripherals' register interface.
- **Watchdog.** Its length, its enable bit, and the fact that it resets the core.
- **Decoder algorithm.** A plain ADM decoder with doubling/halving step adaptation, 12-bit
  integrator and step limits 8..256. The original uses a *modified* ADM and corrects the decoded
  signal with statistically derived coefficients stored in the flash (addressed through AR1).
  Neither the modification nor the correction algorithm is given, so this decoder has no error
  correction. AR1 and `MOV Rn,(AR1<<BF)` are provided so that correction can be done in software.
- **DAC frame.** The 12-bit frame format.

Parts of the complete system that are outside this RTL:

- the flash chip;
- the DAC chip;
- the FPGA's own configuration logic;
- the FPGA's JTAG port.

The top therefore exposes the flash bus, the DAC pins and the configuration port. The flash and the DAC are modelled in
`tb/` for testing.

The original implementation used 1249 logic elements and 3 embedded RAM blocks on an ACEX EP1K50.
Here the File Register (4 kbit) and the program memory (8 kbit) are the same three 4-kbit blocks.
A generic synthesis of the logic gives about 570 word-level cells and 380 flip-flop bits. That
figure is not directly comparable with a LUT count.
