// lcd_regs: Avalon-MM slave register file and interrupt logic of the LCD
// controller.
//
// Fourteen 32-bit registers at word offsets 0x0-0xD (AS_Address[3:0]):
//   0x0 W  SendCommand   write an LCD command (D/CX low), data in bits 15:0
//   0x1 W  SendData      write LCD data (D/CX high), data in bits 15:0
//       R  ReadsData     start one LCD read cycle; returns the last word read
//   0x2 RW LCDOn         bit 0 drives LCD_ON
//   0x3 RW LCDResetN     bit 0 drives the LCD reset pin (active low)
//   0x4 R  DataReadFromILI9341  last word read from the LCD
//   0x5 RW bit 1 MaskIRQ, bit 0 ForceIRQ
//   0x6 W  DmaIrqAck     any write acknowledges the DMA interrupt
//       R  LCD bus sequencer state
//   0x7 W  bit 1 DmaSyncRst, bit 0 DmaFire (one-clock pulses)
//       R  DMA engine state (bits 1:0)
//   0x8 W  DmaStartAddr  R current DMA address
//   0x9 W  DmaEndAddr    R DMA beat count of the current burst
//   0xA RW DmaBurstCount (bits 10:0)
//   0xB RW DmaFifoThreshold (bits 8:0)
//   0xC RW OpMode        bit 0: 0 = mode A (processor writes the LCD),
//                        1 = mode B (DMA engine writes the LCD)
//   0xD R  KEY_N         the two push buttons, active low
// All writable registers reset to 0, as the register map gives.
//
// Timing: readdata is combinational and valid in the cycle where read is
// high and waitrequest low. An access to offset 0x0 or 0x1 that would start
// an LCD cycle waits (waitrequest high) while the LCD bus sequencer is busy;
// in the cycle it is accepted, wr_req or rd_req pulses to the sequencer.
// Every other access completes in its first cycle. The DMA control pulses
// (fire, sync reset, irq acknowledge) are registered and reach the DMA
// engine one clock after the write.
//
// The register set, offsets, read/write split and defaults follow the
// controller's register map; the IRQ behaviour follows its description as
// an implementation-specific acknowledge. Design choices: the bit positions
// beyond those the map numbers, the IRQ equation irq = ForceIRQ |
// (dma_irq & ~MaskIRQ), the KEY_N two-flop synchroniser, the IRQAck pin as a
// one-clock pulse per DmaIrqAck write, and the LCD reset pin low (LCD held
// in reset) after controller reset since LCDResetN defaults to 0.
module lcd_regs
  import lcd_pkg::*;
(
  input  logic               clk,
  input  logic               reset_n,
  // Avalon-MM slave
  input  logic [3:0]         as_address,
  input  logic               as_chipselect,
  input  logic               as_read,
  input  logic               as_write,
  input  logic [31:0]        as_writedata,
  output logic [31:0]        as_readdata,
  output logic               as_waitrequest,
  output logic               as_irq,
  // LCD bus sequencer
  output logic               lcd_wr_req,
  output logic               lcd_wr_dc,
  output logic [15:0]        lcd_wr_data,
  output logic               lcd_rd_req,
  output logic               lcd_host_pending,
  input  logic               lcd_busy,
  input  logic [15:0]        lcd_read_data,
  input  lcd_state_e         lcd_state,
  output logic               op_mode,
  // DMA engine
  output logic               dma_fire,
  output logic               dma_sync_rst,
  output logic               dma_irq_ack,
  output dma_cfg_t           dma_cfg,
  input  logic               dma_irq,
  input  dma_state_e         dma_state,
  input  logic [ADDR_W-1:0]  dma_addr,
  input  logic [BURST_W-1:0] dma_rx_cnt,
  // pins
  output logic               lcd_on,
  output logic               lcd_resetn,
  input  logic [1:0]         key_n,
  output logic               irq_ack_pin
);

  reg_addr_e  addr;
  logic       acc_wr, acc_rd, lcd_access, irq_mask, irq_force;
  logic [1:0] key_meta, key_sync;

  assign addr       = reg_addr_e'(as_address);
  assign lcd_access = as_chipselect &&
                      ((as_write && (addr == REG_SEND_COMMAND || addr == REG_SEND_DATA)) ||
                       (as_read  &&  addr == REG_SEND_DATA));
  assign lcd_host_pending = lcd_access;
  assign as_waitrequest   = lcd_access && lcd_busy;

  // accepted accesses
  assign acc_wr = as_chipselect && as_write && !as_waitrequest;
  assign acc_rd = as_chipselect && as_read  && !as_waitrequest;

  assign lcd_wr_req  = acc_wr && (addr == REG_SEND_COMMAND || addr == REG_SEND_DATA);
  assign lcd_wr_dc   = (addr == REG_SEND_DATA);
  assign lcd_wr_data = as_writedata[15:0];
  assign lcd_rd_req  = acc_rd && (addr == REG_SEND_DATA);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      lcd_on       <= 1'b0;
      lcd_resetn   <= 1'b0;
      irq_mask     <= 1'b0;
      irq_force    <= 1'b0;
      op_mode      <= 1'b0;
      dma_cfg      <= '0;
      dma_fire     <= 1'b0;
      dma_sync_rst <= 1'b0;
      dma_irq_ack  <= 1'b0;
      key_meta     <= 2'b11;
      key_sync     <= 2'b11;
    end else begin
      dma_fire     <= 1'b0;
      dma_sync_rst <= 1'b0;
      dma_irq_ack  <= 1'b0;
      key_meta     <= key_n;
      key_sync     <= key_meta;
      if (acc_wr) begin
        unique case (addr)
          REG_LCD_ON:        lcd_on                 <= as_writedata[0];
          REG_LCD_RESETN:    lcd_resetn             <= as_writedata[0];
          REG_IRQ_CTRL:      {irq_mask, irq_force}  <= as_writedata[1:0];
          REG_IRQ_ACK:       dma_irq_ack            <= 1'b1;
          REG_DMA_CTRL:      {dma_sync_rst, dma_fire} <= as_writedata[1:0];
          REG_DMA_START:     dma_cfg.start_addr     <= as_writedata;
          REG_DMA_END:       dma_cfg.end_addr       <= as_writedata;
          REG_DMA_BURST:     dma_cfg.burst_count    <= as_writedata[BURST_W-1:0];
          REG_DMA_THRESHOLD: dma_cfg.fifo_threshold <= as_writedata[8:0];
          REG_OP_MODE:       op_mode                <= as_writedata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    as_readdata = '0;
    unique case (addr)
      REG_SEND_DATA:     as_readdata[15:0] = lcd_read_data;
      REG_LCD_ON:        as_readdata[0]    = lcd_on;
      REG_LCD_RESETN:    as_readdata[0]    = lcd_resetn;
      REG_READ_DATA:     as_readdata[15:0] = lcd_read_data;
      REG_IRQ_CTRL:      as_readdata[1:0]  = {irq_mask, irq_force};
      REG_IRQ_ACK:       as_readdata[3:0]  = lcd_state;
      REG_DMA_CTRL:      as_readdata[1:0]  = dma_state;
      REG_DMA_START:     as_readdata       = dma_addr;
      REG_DMA_END:       as_readdata[BURST_W-1:0] = dma_rx_cnt;
      REG_DMA_BURST:     as_readdata[BURST_W-1:0] = dma_cfg.burst_count;
      REG_DMA_THRESHOLD: as_readdata[8:0]  = dma_cfg.fifo_threshold;
      REG_OP_MODE:       as_readdata[0]    = op_mode;
      REG_KEY_N:         as_readdata[1:0]  = key_sync;
      default: ;
    endcase
  end

  assign as_irq      = irq_force || (dma_irq && !irq_mask);
  assign irq_ack_pin = dma_irq_ack;

  // An LCD cycle is only ever requested while the sequencer is idle.
  a_req_when_idle: assert property (@(posedge clk)
    (lcd_wr_req || lcd_rd_req) |-> !lcd_busy);

endmodule
