# ILI9341 LCD controller for Avalon-MM systems

This controller drives a 240x320 TFT panel through an ILI9341 driver chip on
its 16-bit 8080-style parallel bus (the Terasic LT24 card, for instance). It
lives in an Avalon-MM system next to a soft processor and an external SDRAM.
It has two ways of getting pixels to the display:

- **Mode A, processor writes.** Software writes every command and pixel into
  two registers. The controller turns each register write into one LCD bus
  cycle.
- **Mode B, DMA.** Software sends the LCD commands itself, for example
  `0x2C` (memory write). It then gives the controller a start address, an
  end address and a burst length, and fires the DMA engine. The engine reads
  the frame from memory in Avalon bursts into a FIFO. The LCD side empties
  the FIFO at one pixel every four clocks. An interrupt marks the end of the
  frame.

At the 50 MHz system clock, four clocks per pixel gives
50 MHz / (4 x 240 x 320) = 162.76 frames per second. The full-frame
simulation measures 307 211 clocks per frame, which is 162.75 frames/s.
Reading from the LCD (ID, status, frame memory) works in both modes. Software
must skip the dummy word that the ILI9341 returns first.

## Structure

```
          Avalon slave (as_*)                Avalon master (am_*)
                 |                                   ^
           +-----v------+   dma_cfg, pulses    +-----+------+
  irq <----+  lcd_regs  +--------------------->|  lcd_dma   |
           |            |<---- status ---------+            |
           +--+------^--+                      +-----+------+
    requests  |      | busy, read data               | 32-bit words
           +--v------+--+   16-bit pixels      +-----v------+
  LCD pins<+ lcd_control|<---------------------+  lcd_fifo  |
           +------------+                      +------------+
```

| module | role |
|---|---|
| `lcd_controller` | top level; connects the four blocks below |
| `lcd_regs` | Avalon slave, register file, interrupt logic |
| `lcd_control` | LCD bus sequencer (write and read cycles) |
| `lcd_dma` | Avalon burst-read master that copies a frame into the FIFO |
| `lcd_fifo` | 256 x 32-bit show-ahead FIFO with a 16-bit read port |
| `lcd_pkg` | register offsets, state encodings, DMA configuration struct |

The whole design runs on one clock, the Avalon clock. `reset_n` is an
asynchronous, active-low reset.

## The LCD bus sequencer

This is the part where timing matters most. The ILI9341 bus timing at
50 MHz (20 ns per clock) sets the cycle lengths:

| rule | ILI9341 minimum | this design |
|---|---|---|
| write cycle twc | 66 ns | 4 clocks = 80 ns |
| WRX low / high | 15 ns / 15 ns | 2 clocks / 2 clocks |
| data setup / hold around the rising WRX | 10 ns / 10 ns | 40 ns / 40 ns |
| RDX low for frame-memory reads (trdlfm) | 355 ns | 17 clocks = 340 ns (see below) |
| read cycle for frame-memory reads (trcfm) | 450 ns | 19 clocks = 380 ns (see below) |
| read cycle for ID reads (trc) | 150 ns | 19 clocks = 380 ns |

**Write cycle.** The states are `WRITE`, `WRITE_WAIT`, `EDGE_W` and
`FINISH_W`, one clock each. WRX is low in the first two states. The LCD
latches D[15:0] on the rising edge of WRX at the start of `EDGE_W`. D stays
driven (`d_oe`) until `FINISH_W` ends. D/CX is low for a command and high for
data. It is set when the cycle starts and keeps its value afterwards.

**Read cycle.** `READ` pulls RDX low. `READ_L_WAIT` then keeps it low for
`RD_WAIT_CYCLES` more clocks (16 by default). The data bus is sampled at the
last clock edge of that wait, while RDX is still low. RDX rises in `EDGE_R`.
`FINISH_R` gives the LCD time to release the bus. The cycle takes 19 clocks.
This meets the rule that a read must last at least nine clocks. It is still
slightly shorter than the datasheet minimums for frame-memory reads.
Set `RD_WAIT_CYCLES = 18` (RDX low 380 ns, cycle 420 ns) or more to meet
those too. ID and status reads are well inside their limits.

**Streaming.** In mode B, `FINISH_W` goes directly to the next `WRITE`
whenever the FIFO has a pixel. That is what gives one pixel every four clocks
with no gap. A processor write always starts from `IDDLE`, so back-to-back
processor writes take five clocks each. If the processor accesses the LCD
during a stream, the stream stops at the next `FINISH_W` and the processor
access goes through. In `IDDLE`, the processor has priority over the FIFO.
Software can therefore send a command in the middle of a DMA frame without
waiting for the frame to finish.

**Pins.** CSX is low in every state except `IDDLE`. All pin outputs come
straight from flip-flops, so they do not glitch. The bidirectional data bus
appears as `d_out`, `d_oe` and `d_in`. Put the tri-state buffer in the pad
ring: `D = d_oe ? d_out : 'z`.

## The DMA engine and FIFO flow control

The engine has four states:

1. `waiting`: on DmaFire, load the address counter from DmaStartAddr.
2. `avalon`: hold `am_read`, the address, `am_burstcount = DmaBurstCount`
   and all byte enables until `am_waitrequest` is low.
3. `transferring`: count the returned beats. Every beat is written into the
   FIFO as it arrives. After the whole burst has arrived, the engine waits
   until the FIFO holds fewer than DmaFifoThreshold words. Then it either
   finishes, if the address is at or past DmaEndAddr, or adds DmaBurstCount
   to the address and goes back to `avalon`.
4. `irqreq`: raise the interrupt and wait for DmaIrqAck.

Only one burst is ever outstanding. The beat counter counts a copy of
`am_readdatavalid` delayed by one clock. That way, by the time the burst
counts as complete, the FIFO's registered word count already includes the
last beat. The threshold check happens before a burst is requested. So the
FIFO cannot overflow as long as

    DmaFifoThreshold + DmaBurstCount <= 256

For example, use bursts of 128 with a threshold of 128. Bursts can be 2 to
256 words. `am_burstcount` is 11 bits wide, but a burst longer than 256
needs a deeper FIFO (`FIFO_DEPTH`).

**Address units.** The address advances by DmaBurstCount, so it counts one
unit per 32-bit word. DmaEndAddr is the address of the *last burst*, not the
last word:

    DmaEndAddr = DmaStartAddr + words_in_frame - DmaBurstCount

A full RGB565 frame is 38 400 words. Note that a standard Avalon master
addresses bytes. Behind a byte-addressed interconnect, consecutive bursts
would then overlap by three quarters. Either place a word-to-byte address
shift (x4) between `am_address` and the interconnect, or change the
increment in `lcd_dma` to `burst_count * 4` and program byte addresses.

**FIFO.** The FIFO holds 256 words of 32 bits (one M4K-sized block). The
DMA writes 32-bit words. The LCD side reads 16-bit halves, low half
`[15:0]` first, so a memory word holds two pixels with the earlier pixel in
the low half. The FIFO is show-ahead: the head half-word is always on `q`,
and `rdreq` acknowledges it. `wrusedw` (8 bits, in 32-bit words) and
`rdusedw` (9 bits, in 16-bit words) wrap to 0 when the FIFO is completely
full, as such narrow counters do. Use `wrfull` and `rdempty` when the
difference matters. A DmaSyncRst write also empties the FIFO.

## Registers

Word offsets on `as_address[3:0]`. Byte offset = 4 x word offset. Every
register resets to 0, and the LCD reset pin starts low (panel held in
reset).

| offset | write | read |
|---|---|---|
| 0x0 | SendCommand: LCD write with D/CX low, bits 15:0 | 0 |
| 0x1 | SendData: LCD write with D/CX high, bits 15:0 | starts one LCD read; returns the previous read word |
| 0x2 | LCDOn, bit 0 drives `lcd_on` | LCDOn |
| 0x3 | LCDResetN, bit 0 drives `rsx` | LCDResetN |
| 0x4 | - | word from the last LCD read |
| 0x5 | bit 1 MaskIRQ, bit 0 ForceIRQ | same |
| 0x6 | any value: DmaIrqAck | LCD sequencer state (0 IDDLE, 1 WRITE, 2 WRITE_WAIT, 3 EDGE_W, 4 FINISH_W, 5 READ, 6 READ_L_WAIT, 7 EDGE_R, 8 FINISH_R) |
| 0x7 | bit 1 DmaSyncRst, bit 0 DmaFire | DMA state (0 waiting, 1 avalon, 2 transferring, 3 irqreq) |
| 0x8 | DmaStartAddr | current DMA address |
| 0x9 | DmaEndAddr | beats received in the current burst |
| 0xA | DmaBurstCount, bits 10:0 | same |
| 0xB | DmaFifoThreshold, bits 8:0 | same |
| 0xC | OpMode, bit 0: 0 = mode A, 1 = mode B | same |
| 0xD | - | KEY_N[1:0], synchronised |

**Waits.** Only accesses that start an LCD cycle can be held with
`as_waitrequest`: writes to 0x0 and 0x1, and reads of 0x1. They wait while
the sequencer is busy. Every other access finishes in its first cycle,
including during a DMA stream. `as_readdata` is combinational and valid in
the cycle where the read is accepted.

**Reading the LCD.** Read 0x1 to start a read. Poll 0x6 until it shows
`IDDLE` (0), then read 0x4.

**Interrupt.** `as_irq = ForceIRQ | (dma_irq & ~MaskIRQ)`. `dma_irq` stays
high from the end of the frame until software writes 0x6. Every
acknowledge also pulses the `irq_ack` pin for one clock, so external
equipment can see that a frame was taken.

Typical mode-B frame:

```
write 0x2 <- 1; write 0x3 <- 1          power the panel, release reset
(initialise the ILI9341 through 0x0 / 0x1)
write 0xC <- 1                          mode B
write 0x0 <- 0x2C                       memory write command
write 0x8 <- frame_base
write 0x9 <- frame_base + 38400 - 128
write 0xA <- 128; write 0xB <- 128
write 0x7 <- 1                          fire
... interrupt ...
write 0x6 <- 1                          acknowledge; the last pixels are still
                                        leaving the FIFO (poll 0x6 for IDDLE)
```

## Parameters

| parameter | default | meaning |
|---|---|---|
| `lcd_controller.FIFO_DEPTH` | 256 | FIFO depth in 32-bit words (power of two) |
| `lcd_controller.RD_WAIT_CYCLES` | 16 | extra RDX-low clocks in a read cycle |

The bus widths (32-bit Avalon address and data, 11-bit burst count, 4-bit
slave address) are fixed in `lcd_pkg`.

## Where the design makes its own choices

These points are decisions of this RTL, not given by the original design:

- The FIFO runs on the single system clock instead of two clocks.
- The low half of each word is sent first.
- The DMA's Avalon command is decoded from its state. The read request is
  held until it is accepted, rather than registered one clock late.
- DmaSyncRst also empties the FIFO.
- A processor request breaks into a DMA stream.
- The LCD pins are registered.
- The IRQ equation, the IRQAck pulse, the KEY_N synchroniser, the register
  bit positions that are not numbered, and the state codes.
- The RSX pin is used as the LCD reset.
- The read timing follows the original 16-clock wait. It is below the
  ILI9341 frame-memory read minimums (see above).
- The DMA address counts words (see above).

## Simulation

Testbenches are in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops.

| testbench | what it checks |
|---|---|
| `lcd_fifo_tb` | fill to full, counter wrap, drop on full, 20 000 random read/write cycles against a queue model, clear |
| `lcd_control_tb` | state sequence and WRX timing of a write, read cycle length and captured data, a 20-pixel stream at 4 clocks/pixel, a processor write breaking into a stream, processor priority |
| `lcd_dma_tb` | bursts at 0x100, 0x104 and 0x108 for start 0x100 / end 0x108 / burst 4, threshold throttling with a slowly drained FIFO, interrupt hold and acknowledge, synchronous reset |
| `lcd_regs_tb` | reset values, every register, waitrequest while busy, control pulses, IRQ mask and force |
| `lcd_controller_tb` | the whole controller at its default parameters. Mode A writes and a read, a full 240x320 frame by DMA (every pixel and the frame time checked), masked and forced interrupts, a command inside a stream, a DMA synchronous reset. It counts how often each of these happened. |

Support models, for simulation only:

- `ili9341_model` logs LCD writes, answers reads, and flags violations of
  the bus timing.
- `avalon_burst_mem` is a burst-read memory with wait states, latency and
  random gaps. Word `a` holds `{(2a+1) ^ 0x5A00, 2a ^ 0x5A00}`, so pixel
  `k` of a frame at address 0 is `k ^ 0x5A00`.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module lcd_controller_tb \
    -y rtl -y tb +libext+.sv rtl/lcd_pkg.sv tb/lcd_controller_tb.sv
./obj_dir/Vlcd_controller_tb
```

The full-frame run finishes in a few seconds. Lint with
`verilator --lint-only -Wall -y rtl rtl/lcd_pkg.sv rtl/lcd_controller.sv`.
It reports two unused FIFO outputs, `wrfull` and `rdusedw`. They are left
unconnected on purpose.
