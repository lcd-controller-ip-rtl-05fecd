// lcd_controller: ILI9341 LCD controller IP for an Avalon-MM system.
//
// The controller drives a 240x320 ILI9341 LCD over the 16-bit 8080-I bus in
// one of two modes, chosen by the OpMode register:
//   mode A  the processor writes every command and pixel through the
//           SendCommand / SendData registers of the Avalon slave;
//   mode B  the processor sends the commands, then fires the DMA engine,
//           which burst-reads the frame from memory over the Avalon master
//           into a 32-to-16-bit FIFO that the LCD sequencer empties at one
//           pixel per four clocks. An interrupt marks the end of the frame.
// Reads from the LCD (register 0x1 starts one, register 0x4 returns it) are
// possible in both modes.
//
// Structure: lcd_regs (Avalon slave, registers, IRQ), lcd_control (LCD bus
// sequencer), lcd_dma (Avalon burst-read master), lcd_fifo (256 x 32-bit
// show-ahead FIFO, 16-bit read port). Everything runs on the single Avalon
// clock, 50 MHz in the target system; reset_n is asynchronous, active low.
//
// Pins: csx, dcx, wrx, rdx are the ILI9341 CSX, D/CX, WRX and RDX; rsx is the
// LCD reset (from LCDResetN); lcd_on powers the panel; the bidirectional
// bus D[15:0] is split into d_out, d_oe (drive enable) and d_in for the
// pad's tri-state buffer; key_n are two push buttons; irq_ack pulses for one
// clock when software acknowledges the DMA interrupt.
//
// This block arrangement, the Avalon port set and the pin set follow the
// controller's component and block diagrams. Design choices: a DMA
// synchronous reset also empties the FIFO; the mode-B stream runs only
// while OpMode is 1. The FIFO's wrfull and rdusedw outputs are left unused
// on purpose: the DMA threshold keeps the FIFO from filling and the LCD
// sequencer only needs rdempty.
module lcd_controller
  import lcd_pkg::*;
#(
  parameter int FIFO_DEPTH     = 256,
  parameter int RD_WAIT_CYCLES = 16
) (
  input  logic               clk,
  input  logic               reset_n,
  // Avalon-MM slave "as"
  input  logic [3:0]         as_address,
  input  logic               as_chipselect,
  input  logic               as_read,
  input  logic               as_write,
  input  logic [31:0]        as_writedata,
  output logic [31:0]        as_readdata,
  output logic               as_waitrequest,
  output logic               as_irq,
  // Avalon-MM master "avm_m0"
  output logic [ADDR_W-1:0]  am_address,
  output logic               am_read,
  input  logic               am_waitrequest,
  input  logic [31:0]        am_readdata,
  input  logic               am_readdatavalid,
  output logic [BURST_W-1:0] am_burstcount,
  output logic [3:0]         am_byteenable,
  // LCD and board pins
  output logic               rsx,
  output logic               csx,
  output logic               dcx,
  output logic               wrx,
  output logic               rdx,
  output logic [15:0]        d_out,
  output logic               d_oe,
  input  logic [15:0]        d_in,
  output logic               lcd_on,
  input  logic [1:0]         key_n,
  output logic               irq_ack
);

  localparam int FAW = $clog2(FIFO_DEPTH);

  // register file <-> LCD sequencer
  logic        lcd_wr_req, lcd_wr_dc, lcd_rd_req, lcd_host_pending, lcd_busy;
  logic [15:0] lcd_wr_data, lcd_read_data;
  lcd_state_e  lcd_state;
  logic        op_mode;
  // register file <-> DMA
  logic               dma_fire, dma_sync_rst, dma_irq_ack, dma_irq;
  dma_cfg_t           dma_cfg;
  dma_state_e         dma_state;
  logic [ADDR_W-1:0]  dma_addr;
  logic [BURST_W-1:0] dma_rx_cnt;
  // FIFO
  logic          fifo_wrreq, fifo_rdreq, fifo_rdempty, fifo_wrfull;
  logic [31:0]   fifo_data;
  logic [15:0]   fifo_q;
  logic [FAW-1:0] fifo_wrusedw;
  logic [FAW:0]   fifo_rdusedw;

  lcd_regs u_regs (
    .clk, .reset_n,
    .as_address, .as_chipselect, .as_read, .as_write, .as_writedata,
    .as_readdata, .as_waitrequest, .as_irq,
    .lcd_wr_req, .lcd_wr_dc, .lcd_wr_data, .lcd_rd_req, .lcd_host_pending,
    .lcd_busy, .lcd_read_data, .lcd_state, .op_mode,
    .dma_fire, .dma_sync_rst, .dma_irq_ack, .dma_cfg, .dma_irq, .dma_state,
    .dma_addr, .dma_rx_cnt,
    .lcd_on, .lcd_resetn(rsx), .key_n, .irq_ack_pin(irq_ack)
  );

  lcd_control #(.RD_WAIT_CYCLES(RD_WAIT_CYCLES)) u_control (
    .clk, .reset_n,
    .wr_req(lcd_wr_req), .wr_dc(lcd_wr_dc), .wr_data(lcd_wr_data),
    .rd_req(lcd_rd_req), .host_pending(lcd_host_pending), .busy(lcd_busy),
    .read_data(lcd_read_data), .state_o(lcd_state),
    .dma_mode(op_mode), .fifo_q, .fifo_empty(fifo_rdempty), .fifo_rdreq,
    .csx, .dcx, .wrx, .rdx, .d_out, .d_oe, .d_in
  );

  lcd_dma #(.FIFO_AW(FAW)) u_dma (
    .clk, .reset_n,
    .fire(dma_fire), .sync_rst(dma_sync_rst), .irq_ack(dma_irq_ack),
    .cfg(dma_cfg), .dma_irq, .state_o(dma_state), .dma_addr,
    .rx_cnt(dma_rx_cnt),
    .fifo_wrusedw, .fifo_wrreq, .fifo_data,
    .am_address, .am_byteenable, .am_burstcount, .am_read,
    .am_waitrequest, .am_readdata, .am_readdatavalid
  );

  lcd_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .reset_n, .sclr(dma_sync_rst),
    .data(fifo_data), .wrreq(fifo_wrreq), .wrusedw(fifo_wrusedw),
    .wrfull(fifo_wrfull),
    .rdreq(fifo_rdreq), .q(fifo_q), .rdusedw(fifo_rdusedw),
    .rdempty(fifo_rdempty)
  );

endmodule
