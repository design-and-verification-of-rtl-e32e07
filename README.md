# FlexSPI controller: AXI4 to serial NOR flash

A processor on an AXI4 bus reaches a serial NOR flash through this controller. Software puts a whole
flash access in registers: command, address, dummy cycles, data length and mode. It then writes
one start bit. From then on, hardware runs the sequence on the flash pins. Data moves through two
32-bit FIFOs: a TX FIFO that software fills for writes, and an RX FIFO that software empties
after reads. The flash can be driven in standard SPI mode (one data line each way) or in quad
mode (four bidirectional lines). Its clock is a programmable division of the system clock.

```
            AXI4 (32-bit)          APB                      flash pins
  system ─────────────── axi2apb ─────── flexspi ─────────── spi_clk, spi_csn[3:0],
                                           │                 IO0..IO3 (out / oe / in)
                                           └── irq
flexspi:
   register configuration ──┬── TX FIFO (16 x 32) ──┐
   (APB slave, interrupts)  ├── RX FIFO (16 x 32) ──┤
                            └──────────────────── control
                                                    ├ mode control, chip select, IO direction
                                                    ├ command sequence state machine
                                                    ├ clock divider
                                                    └ shift logic: transmit and receive
```

The design has three parts: bus slave interface and
register block, data FIFOs, and a control block. The control block holds the mode control, the
command-sequence state machine, the clock divider and the shift logic.

## Files

| file | contents |
|---|---|
| `rtl/flexspi_pkg.sv` | register offsets, STATUS/INTCFG/INTSTA bit positions, state enum, sequence configuration struct |
| `rtl/flexspi_subsystem.sv` | top: AXI4 slave port, bridge and controller |
| `rtl/flexspi_axi2apb.sv` | AXI4 slave to APB master bridge |
| `rtl/flexspi.sv` | controller: register block, two FIFOs, control |
| `rtl/flexspi_regs.sv` | register configuration, APB slave, interrupt logic |
| `rtl/flexspi_fifo.sv` | valid/ready FIFO, used as TX FIFO and RX FIFO |
| `rtl/flexspi_ctrl.sv` | mode control and command-sequence state machine |
| `rtl/flexspi_clkgen.sv` | flash clock divider |
| `rtl/flexspi_tx.sv`, `rtl/flexspi_rx.sv` | transmit and receive shift logic |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/flash_model.sv`, `tb/axi_master_bfm.sv` | behavioural flash and AXI master used by the testbenches |

## Programming model

The controller has a 4 KB register window. The interconnect decodes the window; inside it, only
the low 12 address bits are used. In the reference system the window sits at `0x1A10_2000`, so
CLKDIV is at `0x1A10_2004` and TXFIFO at `0x1A10_2018`.

| offset | name | use |
|---|---|---|
| 0x00 | STATUS | write: bit0 RD, bit1 WR, bit2 QRD, bit3 QWR (start a standard/quad read/write), bit4 SRST (software reset), bits 11:8 chip select (one-hot). Read: bit0 busy, 11:8 chip select, 14:12 state, 20:16 TX FIFO level, 28:24 RX FIFO level |
| 0x04 | CLKDIV | bits 7:0, flash clock = clk / (2·(CLKDIV+1)) |
| 0x08 | CMD | command value, right aligned |
| 0x0C | ADR | address value, right aligned |
| 0x10 | LEN | bits 5:0 command bits (0–32), 13:8 address bits (0–32), 31:16 data bits (0–65535) |
| 0x14 | DUM | bits 15:0 dummy cycles before read data, 31:16 before write data |
| 0x18 | TXFIFO | write: push one word |
| 0x20 | RXFIFO | read: pop one word |
| 0x24 | INTCFG | bit31 enable, bit30 end-of-transfer, bit29 RX threshold, bit28 TX threshold events; bits 12:8 RX threshold, 4:0 TX threshold |
| 0x28 | INTSTA | bit0 interrupt flag (OR of 3:1), bit1 RX threshold, bit2 TX threshold, bit3 end of transfer; write 1 to clear |

Any other offset answers with PSLVERR, which the bridge returns as AXI SLVERR.

A typical standard read of 16 bytes from flash address 0x000100 (command 0x03):

```
CLKDIV = 4                         // flash clock = clk/10
CMD    = 0x03
ADR    = 0x000100
LEN    = (128 << 16) | (24 << 8) | 8
DUM    = 0
STATUS = (1 << 8) | 0x1            // chip select 0, standard read
poll STATUS.bit0 until 0, then read RXFIFO four times
```

For a write, push the data words into TXFIFO. This can be done before or after the start bit.
Data words leave MSB first. If the data length is not a multiple of 32, the last word sends only
its low bits. On reads, the last short word arrives right-aligned with zeros above. CMD and ADR
send their low LEN bits, MSB first.

## The command sequence

`flexspi_ctrl` runs up to four stages in a fixed order: **CMD → ADDR → DUMMY → DATA**. A stage
whose length is zero is skipped. So IDLE can lead straight into any stage, and a single command
(e.g. write-enable 0x06) is just CMD. DATA is `DATA_TX` for writes and `DATA_RX` for reads. A read
ends in **WAIT_EG**, which waits for two things: the flash clock must have finished its last high
phase and stopped low, and the last received word must be in the RX FIFO. The controller then
raises chip select and returns to IDLE. The end of a sequence pulses an end-of-transfer event that
can raise an interrupt.

A start is ignored if command, address and data lengths are all zero, because such a sequence
would do nothing on the bus. During DUMMY the flash clock runs and all four IO output enables are
off, so the flash may turn the lines around. The STATUS register reads the state as 0 IDLE,
1 CMD, 2 ADDR, 3 DUMMY, 4 DATA_TX, 5 DATA_RX, 6 WAIT_EG.

Quad mode applies to every stage. Command, address and data all move four bits per clock on
IO0..IO3, as a flash in QPI mode expects. In standard mode the controller drives IO0 and samples
IO1. IO2 and IO3 stay released, for external pull-ups on WP#/HOLD#.

## Flash clock and shift timing

This is the part that decides whether data is correct on the wire.

**Divider.** `flexspi_clkgen` counts from 0 to CLKDIV and toggles the clock when the count wraps.
Each half period is therefore CLKDIV+1 system clocks, and the full period is 2·(CLKDIV+1).
CLKDIV = 4 gives clk/10; CLKDIV = 0 gives clk/2. The divider also produces two strobes, `rise`
and `fall`. Each is high for the one system cycle whose clock edge makes the flash clock rise or
fall. The shift units act on these strobes, so everything stays in the system clock domain.

**Mode 0.** The flash clock idles low. The transmit unit puts its first bit out when it loads a
word, before the first rising edge. Each later bit goes out on a fall strobe, so it changes just
as the flash clock falls and is stable for the next rising edge. The receive unit samples on rise
strobes. The flash model shifts its output on the falling edge, the usual flash behaviour, so the
sampled data has been stable for half a flash clock period.

**Starting and stopping.** Each stage starts its own shift unit. A unit asks for the clock with
`clk_en`, and the divider runs while any unit asks. If the request drops in the low phase, the
clock stops at once. If it drops in the high phase, the clock first finishes that phase and then
stops, so it always rests low. Each stage ends on a falling edge. Between stages the clock
therefore pauses low for about three system cycles, then starts again with a full half period.
An SPI flash does not notice these pauses.

**Counting shifts.** Both shift units count shifts, not bits. In quad mode the length register's
bit count is divided by four, taking bits 15:2, and in standard mode it is used as is. Quad
lengths must therefore be multiples of 4. The DUMMY stage uses the transmit unit's counter in
standard mode, so DUM counts flash clock cycles in either mode.

**Flow control.** The flash clock waits for the FIFOs instead of overrunning them:

* **TX underrun.** After the last bit of a word, the transmit unit needs the next word before the
  next rising edge. If the TX FIFO is empty, the unit drops its clock request right after that
  falling edge, and the clock waits low until a word arrives. Software can start a long write
  with an empty FIFO and feed it as it goes.
* **RX overrun.** A received word waits in the receive unit's output register until the RX FIFO
  takes it. While the RX FIFO is full the clock is paused, so a read longer than the FIFO simply
  runs as fast as software drains it.
* **Bus side.** A TXFIFO write to a full FIFO, or an RXFIFO read from an empty one, holds APB
  PREADY low until the FIFO can serve it. The AXI access stalls for that time. Software that
  cannot risk a stall checks the levels in STATUS first.

## FIFOs

`flexspi_fifo` is a 16 × 32-bit circular buffer with a 4-bit read pointer, a 4-bit write pointer
and a 5-bit element count. It has valid/ready ports on both sides. The head word is read
combinationally: a word written at clock edge t is at `data_o` right after t. Push and pop in the
same cycle are allowed, also when the FIFO is full. `clr_i` empties it; the software reset drives
it.

## Interrupts

The interrupt has three event sources, each with its own enable in INTCFG:

* **RX threshold**: the RX FIFO level rises to the RX threshold or above.
* **TX threshold**: the TX FIFO level falls to the TX threshold or below.
* **End of transfer**: the sequence returned to IDLE.

An event sets its sticky bit in INTSTA. INTSTA bit0 is the OR of the causes, and `irq_o` follows
it while INTCFG bit31 is set. Writing 1 to a cause bit clears it. Events are edges, so a level
that stays above the threshold does not retrigger.

## Software reset

Writing STATUS bit4 empties both FIFOs and puts the state machine and both shift units in their
idle state within one cycle. Chip select rises at once, even mid-byte. The flash clock finishes a
high phase it is in and stops. Configuration registers (CMD, ADR, LEN, DUM, CLKDIV, INTCFG) keep
their values.

## AXI to APB bridge

`flexspi_axi2apb` serves one AXI transaction at a time. When a write and a read wait together, the
write goes first. Each beat becomes one APB transfer: a setup cycle, then access cycles until
PREADY. INCR bursts step the address by the beat size. FIXED bursts keep it, which is the natural
way to push several words into TXFIFO in one burst. WRAP is served as INCR. The write response
carries SLVERR if any beat saw PSLVERR; each read beat carries its own response. WSTRB and the
AxLOCK/AxCACHE/AxPROT/AxQOS fields are accepted and ignored, and registers are written whole.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `flexspi_subsystem` | `AXI_ID_W` | 4 | AXI ID width |
| `flexspi_subsystem`, `flexspi` | `FIFO_DEPTH` | 16 | words per FIFO |
| `flexspi_subsystem`, `flexspi`, `flexspi_ctrl` | `NUM_CS` | 4 | chip selects |
| `flexspi_clkgen` | `DIV_W` | 8 | divider width |
| `flexspi_tx`, `flexspi_rx` | `CNT_W` | 16 | shift counter width |

## Where this design makes its own choices

The following come from the controller description: the register names and offsets, the 8-bit
divider and its formula, the state set (IDLE, CMD, ADDR, DUMMY, DATA_TX, DATA_RX, WAIT_EG) and the
skipping of stages. So do the structure of the shift logic (control unit, counter unit with the
quad divide, data latch, shift register) and the FIFO's port names and sizes.

The following were not specified and were chosen here:

* the bit layout inside STATUS, LEN, DUM, INTCFG and INTSTA;
* the interrupt events;
* SPI mode 0;
* quad mode applying to all stages;
* IO line use in standard mode;
* released lines during dummy cycles;
* PREADY stalls on the FIFO registers;
* four chip selects;
* stage pauses;
* alignment of short words;
* the software reset leaving configuration registers alone;
* the whole AXI-to-APB bridge.

Not built:

* **Alternate-byte (mode byte) stage.** Such a stage is mentioned in general terms, but it has no
  register and no state. A mode byte can be sent by widening ADR: for example, 32 address bits
  with the mode byte in the low 8.
* **DDR (double data rate) transfers, octal or xSPI modes, and memory-mapped (XIP) reads.** None
  of these were part of the controller described.
* **AXI interconnect.** The subsystem's AXI4 slave port is the boundary.

## Verification

Each module has a self-checking testbench that prints `TB_RESULT checks=N failures=M`. Each also
has a watchdog that ends the run with a failure if it hangs. The expected values are computed in
the testbench or come from the flash model's memory, never from the design.

| testbench | what it covers |
|---|---|
| `tb_flexspi_fifo` | the 0xFFFFF01A single-word case, 4000 random push/pop cycles against a queue model, full, clear |
| `tb_flexspi_clkgen` | period 2·(CLKDIV+1) for CLKDIV 0, 1, 4, 7, 255; stop in either phase; no reload while running |
| `tb_flexspi_tx` | standard/quad streams, partial words, random data gaps, clock count, pause on underrun |
| `tb_flexspi_rx` | standard/quad streams, partial words, random back-pressure, clock count, pause on overrun |
| `tb_flexspi_ctrl` | program, read, fast read, quad program/read, command-only, data-only, empty start, software reset; every state visited |
| `tb_flexspi_regs` | read-back, field extraction, start/reset pulses, PREADY waits, PSLVERR, all interrupt causes |
| `tb_flexspi_axi2apb` | single, INCR and FIXED bursts, SLVERR, IDs, RLAST, APB setup/access |
| `tb_flexspi` | controller over APB with the flash model: standard, fast and quad transfers, clock period, interrupt |
| `tb_flexspi_subsystem` | whole subsystem at default parameters over AXI (see below) |
| `tb_std_mode_write_even_clkdiv` | the reference bring-up sequence over AXI: CLKDIV = 4 at 0x1A102004, 0xFFFFF01A into TXFIFO at 0x1A102018, a standard-mode program of that word; divider counter 0..4 and the clk/10 period, then CLKDIV 2 and 6 |

`tb_flexspi_subsystem` runs the subsystem with every parameter at its default. It:

* programs CLKDIV = 4 and measures a 10-clock flash period;
* pushes 0xFFFFF01A and sees it at the TX FIFO head;
* runs write-enable, page program (data pushed with a FIXED burst), read, fast read, quad program
  and quad read against the flash model;
* overfills both FIFOs (a 24-word read and a 20-word program);
* takes all three interrupts, an empty start, SLVERR and a software reset.

It counts TX pauses, RX pauses, APB wait states, WAIT_EG and DUMMY entries, IDLE→DATA_TX jumps,
quad transfers, interrupts, resets, SLVERR and bursts, and fails if any of them never happened.

The flash model (`tb/flash_model.sv`) understands 0x03, 0x0B (8 dummy cycles), 0xEB (quad, 6 dummy
cycles), 0x02/0x32 and 0x06 over a 256-byte memory. It is a test fixture, not a device model.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/flexspi_pkg.sv tb/tb_flexspi_subsystem.sv --top-module tb_flexspi_subsystem
./obj_dir/Vtb_flexspi_subsystem
```

The same command with another `tb_*` file and `--top-module` runs any other testbench. Lint a
module with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/flexspi_pkg.sv
rtl/<module>.sv`. The remaining lint warnings are unused AXI sideband inputs, unused package
constants, and the reset being used both as the flip-flops' asynchronous reset and in the
assertions' `disable iff`.
