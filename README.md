# Buffered audio serial port with a programmable DMA controller

A DSP that processes speech in frames (a vocoder working on 20 ms blocks,
for example) has no use for an interrupt on every audio sample. Taking one
anyway costs a full interrupt routine per sample: about 250 DSP cycles at
8 kHz, which is 2 MIPS spent only on moving data. This design moves the
per-sample work out of the DSP and into an FPGA that sits between the DSP
board's buses and a stereo audio codec.

On every codec word, a very small programmable controller inside the FPGA
does the following:

- copies the new received samples into frame buffers in the DSP's on-chip
  SRAM;
- fetches the next samples to transmit from the same SRAM;
- updates the buffer descriptors.

The controller reaches the SRAM over a DMA bus. It interrupts the DSP only
when a whole frame has been filled and emptied. With 160-sample frames the
DSP sees 50 interrupts a second instead of 8000. The DSP-side overhead
drops from roughly 2 MIPS to about 0.0015 MIPS, assuming a 30-cycle
frame-level routine.

The controller runs its own 16-bit instruction set from a 256-word program
RAM. The DSP loads this RAM over the system bus at run time. The buffer
handling is therefore software: descriptor layout, stereo/mono choice and
the end-of-frame rule can all change without touching the RTL.

Everything is synthesizable SystemVerilog in a single clock domain. The
only exceptions are the codec pins, which are synchronised on entry.

## Block diagram

```
            DSP system bus (AHB slave)                 DSP DMA bus (AHB master)
                     |                                          ^
              +------+------+                            +------+------+
              |  osb_slave  |--- dma_control/address --->|             |
              |  (decoder,  |<-- dma_status -------------|     apc     |--- re/we/size/address/wdata --> odb_master
              |   map)      |--- program RAM port ------>| (controller)|<-- ok/rdata ---------------------+
              +--+-------+--+                            +--+-------+--+
                 |       |                                  |       |
        fpga_ctrl_reg    |  codec registers       codec_reg_sel/we  | dma_irq --> DSP
        (control bits)   +-------------+   +----------------+       |
                                       v   v                        |
                                  codec_reg_mux  <-- DmaEnable selects the owner
                                       |
                                   codec_if  (64-bit serial shifters, 4 TX + 4 RX
                                       |      16-bit registers, SCLK/FSYNC generator,
                                       |      word interrupt)
                               SCLK FSYNC SDTX SDRX DC RESET --> stereo codec
```

`user_fpga` is the top. It brings out three groups of ports:

- one AHB slave port (`osb_*`), for the system bus driven by the DSP;
- one AHB master port (`odb_*`), for the DMA bus into the DSP's SRAM;
- the codec pins (`codec_*`) and two interrupt lines to the DSP:
  - `dsp_codec_irq`: the codec word interrupt, in direct mode;
  - `dsp_dma_irq`: the controller's frame interrupt.

The bidirectional SCLK and FSYNC pins appear as `_in`, `_out` and `_oe`
triples. Add the tristate buffers at the pad level.

## Two operating modes

The `DmaEnable` bit of the control register decides who owns the audio
port.

- **Direct mode (`DmaEnable` = 0).** The DSP reads and writes the codec
  registers over the system bus. Every codec word interrupts the DSP on
  `dsp_codec_irq`, and the DSP acknowledges with `CodecIntAck`. Use this
  mode to configure the codec, which needs a few control words, and for
  tests.
- **Controller mode (`DmaEnable` = 1).** The codec interrupt goes to the
  controller instead. Only the controller may write the TX registers; the
  system bus can still read them. The controller program does all data
  movement. The DSP receives `dsp_dma_irq` when the program executes
  `SendIrq2Dsp`, and acknowledges it with `DmaIntAck`.

## System-bus view

All registers sit in a 256 MB window at `0xD000_0000`. The slave decodes
only address bits 15:0.

| offset | width | access | contents |
|---|---|---|---|
| 0x000 | 32 | RW | FPGA control register (below) |
| 0x004 | 32 | RW | controller control: bit 0 program-RAM write enable, bit 1 debug mode, bit 2 debug step |
| 0x008 | 32 | RW | controller address: the SRAM address of the program's data block, read by `MOVE_ADDR` |
| 0x00C | 32 | R  | controller status (below) |
| 0x010–0x01C | 16 | RW | codec TX registers: left, right, command high, command low (read-only to the bus in controller mode) |
| 0x020–0x02C | 16 | R  | codec RX registers, same order |
| 0x1000–0x11FE | 16 | RW | program RAM, 256 words, word *i* at 0x1000 + 2*i* |

Anything else reads 0 and ignores writes.

Register accesses have no wait states. A program-RAM read has one wait
state, because the RAM answers one clock after its address.

A 16-bit write takes its halfword from the byte lanes that the bus
endianness assigns to address bit 1:

- big endian (`endianness` = 1): bits 31:16 for an address with bit 1 = 0;
- little endian: bits 15:0 for the same address.

A 32-bit write to a 16-bit register uses bits 15:0. Every 16-bit location
reads back on both halves of HRDATA, so a halfword read is correct for
either endianness.

**FPGA control register (0xD000_0000).**

| bit | name | meaning |
|---|---|---|
| 0 | CodecIntAck | write 1: acknowledge the codec interrupt (direct mode); clears itself |
| 1 | CodecIntEnable | codec word interrupt enabled |
| 2 | CodecIntResetN | drives the codec RESET pin (0 = in reset) |
| 7:4 | DipSwitches | SCLK divider in control mode: SCLK period = 8 × (value + 1) clocks |
| 8 | endianness | 1 = big endian; used by both bus blocks for 8/16-bit accesses |
| 9 | codecDC | drives the codec DC pin: 0 = control mode (FPGA makes SCLK/FSYNC), 1 = data mode |
| 10 | MasterSlave | 1 = the FPGA drives SCLK/FSYNC in data mode too |
| 11 | Loopback | the interface's own output is fed back to its input |
| 12 | DmaEnable | controller mode; clearing it stops the controller and resets its program counter to 0 |
| 13 | DmaIntEnable | lets the controller interrupt reach `dsp_dma_irq` |
| 14 | DmaIntAck | write 1: acknowledge the controller interrupt; clears itself |

Reset clears the register. The codec is then in reset, in control mode,
and the controller is stopped. Bits 31:15 and 3 read as 0.

The endianness has no effect on 32-bit accesses. Software should therefore
write the whole register once at start-up, with the right endianness bit.

**Controller status (0xD000_000C).** The register is updated every clock.

| bits | contents |
|---|---|
| 7:0 | program counter |
| 10:8 | `ctrl_sm` state |
| 11 | TrueFalse flag |
| 12 | codec interrupt pending for the controller |
| 13 | DSP interrupt pending |
| 14 | last JUMP taken |
| 15 | an execution unit is busy |
| 31:16 | instruction register |

## The audio port interface (`codec_if`)

The codec exchanges one 64-bit word per sample period, most significant
bit first. The word holds four 16-bit fields in this order: left, right,
command high, command low. FSYNC is high during the last bit of a word. A
word ends on the SCLK rising edge on which FSYNC is high.

At that edge the interface does three things:

- copies the 64 received bits into the four RX registers;
- loads the four TX registers into the output shifter;
- if enabled, raises the word interrupt.

Data is driven out on SCLK falling edges and sampled on rising edges. A
TX value written after an interrupt is therefore sent during the *next*
word, and the codec's reply to it arrives one word after that.

SCLK, FSYNC and SDTX pass through two flip-flops each. All edges are
detected in the system clock domain, so SCLK must be well below a quarter
of the system clock. A typical AD1849-class codec runs at 64 × 8 kHz =
512 kHz, against a 45 MHz system clock.

Who makes SCLK and FSYNC:

- in control mode (`codecDC` = 0), or with `MasterSlave` = 1, the FPGA does.
  It divides the system clock, with a half period of 4 × (DipSwitches + 1)
  clocks;
- otherwise the codec does, and the FPGA only follows it.

The word interrupt is held until it is acknowledged, or until
CodecIntEnable is cleared.

## The controller (`apc`)

### Registers and instruction format

The controller has eight 32-bit registers R0–R7 and a TrueFalse flag.
Each instruction is 16 bits, made of four 4-bit fields:

```
 15    12 11     8 7      4 3      0
+--------+--------+--------+--------+
| OPCODE | OPTIONS|  REG1  |  REG2  |
+--------+--------+--------+--------+
```

| opcode | mnemonic | effect |
|---|---|---|
| 0000 | ADD value, Ra, Rb | Rb = Ra + VALUE[options] |
| 0001 | SUB value, Ra, Rb | Rb = Ra − VALUE[options] |
| 0010 | AND mask, Ra, Rb | Rb = Ra & MASK[options] |
| 0011 | OR mask, Ra, Rb | Rb = Ra \| MASK[options] |
| 0100 | TESTEQZERO Ra | TrueFalse = (Ra == 0) |
| 0101 | MOVE Ra, Rb | Rb = Ra |
| 0110 | MOVE_ADDR Rb | Rb = controller address register |
| 0111 | MOVE_CTRL Rb | Rb = controller control register |
| 1000 | READ Ra, Rb | Ra = 32-bit word at SRAM[Rb] |
| 1001 | WRITE Ra, Rb | SRAM[Rb] = Ra (32 bits) |
| 1010 | WRITE2CODEC c, Rb | codec TX register c = 16-bit halfword at SRAM[Rb] |
| 1011 | READFROMCODEC c, Rb | 16-bit SRAM[Rb] = codec register c |
| 1100 | JUMP cond, hi, lo | if cond: PC = {hi, lo} (cond 0 ANYCASE, 1 IFTRUE, 2 IFFALSE) |
| 1101 | ClearCodecIrq | acknowledge the codec word interrupt |
| 1110 | SendIrq2Dsp | interrupt the DSP and wait until it acknowledges |
| 1111 | (no-operation) | |

Codec register numbers are 0–3 for TX left/right/command-high/command-low,
and 4–7 for the RX registers in the same order. Only TX registers can be
written.

**The operand tables.** The second operand of ADD/SUB/AND/OR is a 4-bit
index into a fixed table of constants (`apc_pkg::value_of` and
`apc_pkg::mask_of`). The entries were picked for buffer handling:

- pointer steps of 2, 4, 8, 16, 20 and 24 bytes;
- 0x10000, one step of a count kept in bits 31:16;
- masks for the single descriptor flag bits and the count field.

| index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| VALUE | 0 | 1 | 2 | 4 | 8 | 12 | 16 | 20 | 24 | 32 | 0x100 | 0x10000 | 64 | 128 | 1024 | −1 |
| MASK | 0x1 | 0x2 | 0x3 | 0x4 | 0x8 | 0x10 | 0xFFFF0000 | 0xFFFFFFF7 | 0xFFFF | 0xFF | 0xFFFFFFFC | 0xFFFFFFEF | 0xFF00 | 0xFF000000 | 0x7FFFFFFF | −1 |

Changing a table entry changes the instruction set. Programs written for
one table will not run correctly on another.

### Instruction flow

The main state machine, `ctrl_sm`, runs every instruction through three
phases.

1. **Fetch.** The program RAM is read. Its registered output loads the
   instruction register.
2. **Execute.** Each of the four execution machines recognises its own
   opcodes:
   - `alu_instr_sm`: opcodes 0–7;
   - `trans_instr_sm`: 8–11;
   - `jump_instr_sm`: 12;
   - `spec_instr_sm`: 13–15.

   The machine that recognises the opcode raises a busy flag. `ctrl_sm`
   first waits for a flag to rise, then for all four to be low. This
   semaphore is what lets a transfer last as long as the DMA bus needs.
3. **Address generation.** The AGU loads the next program counter. If a
   codec interrupt is pending, it loads 0x0C, acknowledges the interrupt
   request and enters the interrupt routine. Otherwise it loads the jump
   target if the JUMP was taken, or else PC + 1.

**Timing.**

- An ALU, JUMP, ClearCodecIrq or no-op instruction takes 6 clocks.
- A transfer takes 5 clocks plus its busy time. The busy time is one
  request cycle, the bus master's time (4 clocks with a one-cycle grant
  and a zero-wait SRAM) and one finishing cycle.
- `SendIrq2Dsp` lasts until the DSP writes DmaIntAck.

**Where a program starts.**

- Setting `DmaEnable` starts the program at address 0. The code there
  normally loads the data-block pointer with `MOVE_ADDR` and then loops
  on a JUMP.
- Each codec word makes the controller finish its current instruction and
  jump to 0x0C. The routine there ends with a JUMP back to the loop.

There is no interrupt masking. The request is taken on the rising edge
of the codec interrupt line, so the routine must execute `ClearCodecIrq`,
or the next word will not be seen. A word that arrives while the routine
is still running restarts it at 0x0C at the next instruction boundary.
The routine must therefore finish within one sample period.

**Program RAM.** The RAM is dual-ported. The controller reads one port;
the system bus reads and writes the other. System-bus writes only land
while bit 0 of the controller control register is set, which protects a
running program from stray writes.

**Debug mode.** With bit 1 of the controller control register set,
`ctrl_sm` stops after every fetch. Each rising edge of bit 2 releases one
instruction. The status register shows the PC, the instruction register
and the flags, so a program can be single-stepped from the DSP.

## The DMA-bus master (`odb_master`)

The controller requests a transfer with a single-cycle handshake:

1. It raises `re` or `we` together with `size`, `address` and `wdata`.
2. The master drops `ok` on the next clock and runs one AHB transfer:
   - raise HBUSREQ;
   - on HGRANT, drive a locked NONSEQ SINGLE address phase;
   - run the data phase.
3. The master raises `ok` again when the transfer is done. Read data is
   then valid on `rdata`.

Byte and halfword writes are replicated across all byte lanes. Read data
is taken from the lanes given by the address and the endianness bit, and
is zero-extended.

If a transfer has not finished 20 clocks after it was accepted, the master
gives it up. It returns to idle and pulses `timeout`; a read returns 0. This
keeps a hung bus from freezing the controller. HRESP is not examined.

## Buffers and the sample routine

The buffer bookkeeping lives entirely in the program and in SRAM. The
end-to-end testbench uses the following data structures and program; a
different convention needs only a different program.

The **data block** sits at the address in the controller address register:

| offset | contents |
|---|---|
| +0, +4 | current TX left / right sample pointer |
| +8 | current TX buffer descriptor pointer |
| +12, +16 | first TX buffer descriptor, TX callback (DSP software only) |
| +20, +24 | current RX left / right sample pointer |
| +28 | current RX buffer descriptor pointer |
| +32, +36 | first RX buffer descriptor, RX callback (DSP software only) |

A **buffer descriptor** is:

| offset | contents |
|---|---|
| +0, +4 | left / right buffer address |
| +8 | status |
| +12 | size |

The status word holds these fields:

| bits | field | meaning |
|---|---|---|
| 31:16 | count | samples left |
| 4 | act | |
| 3 | rdy | |
| 2 | lst | |
| 1 | lEn | left channel enabled |
| 0 | rEn | right channel enabled |

The sample routine (75 words in all, entry at 0x0C) works as follows.

1. Acknowledge the codec interrupt.
2. For TX, if either channel is enabled:
   - decrement the count;
   - for each enabled channel, fetch the next 16-bit sample into the TX
     register and advance the pointer;
   - when the count reaches 0, clear `rdy`.
3. For RX, do the same, storing the RX registers into SRAM. When the count
   reaches 0, set `rdy` and execute `SendIrq2Dsp`.

The DSP's frame interrupt routine then switches the data block to the
next pair of buffers and re-arms the descriptors. The longest routine
measured is 503 clocks, at a frame end with both directions active. At
45 MHz and 8 kHz there are 5625 clocks per sample, so the controller is
busy less than 10 % of the time in the worst case.

## Where this RTL makes its own choices

The architecture and the behaviour listed below are taken from the
original prototype's description:

- the register map and control-register bit positions 0–13;
- the instruction set and its encoding;
- the controller architecture: the phase machine, four busy-flag
  execution machines, AGU, interrupt units, the 8 × 32 register bank and
  the 256 × 16 dual-port program RAM;
- the 0x0C interrupt entry;
- program-RAM write protection;
- debug single-step;
- the DMA-bus handshake and its 20-cycle time-out;
- the 64-bit serial word with four 16-bit registers per direction;
- the direct and controller modes.

The following were not specified there, and were chosen here:

- **The VALUE and MASK tables.** Only the constant names used by programs
  are known. The contents and order above are this design's.
- **Descriptor flag bit positions.** Only `count` in bits 31:16 is fixed;
  rEn, lEn, lst, rdy and act are placed at bits 0–4 here. The count is
  decremented with the 0x10000 constant. A step of 0x100 would not touch
  a count kept in bits 31:16.
- **Control register bit 14 (DmaIntAck)** and the self-clearing acknowledge
  bits. The DSP has to reset the controller interrupt through the control
  register, and no bit name was given for it.
- **The `codecDC` polarity.** 0 means control mode, when the FPGA drives
  the codec clock; 1 means data mode. One description of the bit states
  the opposite polarity, but the interface description and the codec's DC
  pin agree with the polarity used here.
- **TX registers read back** over the system bus. One table lists them as
  write-only.
- **The layout of the controller control and status registers**, beyond
  "a write-enable bit and two debug bits".
- **Unused opcode 1111** executes as a no-operation, and the instruction
  register resets to it.
- **The interrupt control unit is synchronous** (rising-edge detect in the
  system clock). The original unit was described as the one asynchronous
  part.
- **Two read ports on the register bank.** The original architecture
  drawing shows one bank output feeding both the bus address and the
  write data. A second port lets `WRITE` take its address and its data
  from two registers in the same cycle.
- **One clock for the audio port interface.** The original drawing puts
  the serial-side state machine on the FPGA clock and the
  interrupt-side machine on the system-bus clock. The two were
  described as the same clock, so a single clock runs both here.
- **Where the register bank lives.** The original controller kept its
  8 × 32 register bank in FPGA memory bits, next to the 256 × 16 = 4096
  bits of program RAM. It used about 430 logic elements in all. With its
  two asynchronous read ports, this bank is 256 flip-flops. The program
  RAM is still written as a memory array.
- **Interface details:**
  - the SCLK divider formula;
  - FSYNC during the last bit;
  - the word ending on the rising edge;
  - two-flip-flop synchronisers;
  - loopback taken from the interface's own output;
  - one wait state on program-RAM reads;
  - replicated read data;
  - zero-extended codec data on the DMA bus;
  - ignored HRESP.

Not included: the codec chip itself, the DSP, and the DSP's SRAM with its
DMA-bus arbiter. The testbenches model all three behaviourally. The
`endianness` control input and bit 8 behave as described for 8- and
16-bit accesses. The end-to-end test runs its last frame with the whole
system switched to big endian.

## Files

`rtl/`:

- `apc_pkg.sv`: opcodes, instruction and control-register structs, operand
  tables, address map.
- `user_fpga.sv`: the top.
- `osb_slave.sv`, `fpga_ctrl_reg.sv`, `odb_master.sv`, `codec_reg_mux.sv`,
  `codec_if.sv`: the FPGA infrastructure.
- `apc.sv` and its parts:
  - `ctrl_sm.sv`;
  - `alu_instr_sm.sv`, `trans_instr_sm.sv`, `jump_instr_sm.sv`,
    `spec_instr_sm.sv`;
  - `agu.sv`, `icu.sv`, `igu.sv`;
  - `alu.sv`, `reg_bank.sv`, `prog_mem.sv`.

`tb/`:

- `tb_<module>.sv`: one self-checking testbench per module.
- `codec_model.sv`: behavioural serial codec.
  - In data mode it is the clock master and sends a counting pattern.
  - In control mode it echoes each control word one word later.
- `sram_model.sv`: AHB SRAM with a one-cycle grant and programmable wait
  states. Its backdoor functions read and write it by address.
- `tb_user_fpga.sv`: the end-to-end test, at the default parameters. It
  plays the DSP in seven steps:
  1. configures the codec in direct mode;
  2. checks loopback;
  3. loads the 75-word program, first checking that the protection bit
     blocks writes;
  4. single-steps the controller in debug mode;
  5. streams three 160-sample stereo frames in each direction, checking
     every sample's order and the descriptor updates;
  6. forces a DMA-bus time-out;
  7. switches the system to big endian and moves one more frame each
     way.

  It counts each of these mechanisms and fails if any never happened.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs, and counts it as a failure. From the
project root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/apc_pkg.sv tb/tb_user_fpga.sv --top-module tb_user_fpga
./obj_dir/Vtb_user_fpga
```

Replace `tb_user_fpga` with any other `tb_<module>` to run one block's
test. The end-to-end test runs in well under a second of wall time, for
about 1,000,000 clock cycles. It uses a faster
codec clock than a real codec, 1536 system clocks per sample, to keep the
run short; the worst-case routine of 503 clocks still fits.

To change the controller program, edit `build_program` in
`tb/tb_user_fpga.sv`. Its `enc()` helper packs one instruction, and the
`apc_pkg` names give the table indices (`VAL_*`, `MSK_*`, `CREG_*`). On
hardware, the DSP writes the same 16-bit words to 0xD000_1000 + 2*i* with
bit 0 of the controller control register set. It then sets `DmaEnable`.
