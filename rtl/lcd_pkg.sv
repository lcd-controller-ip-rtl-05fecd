// lcd_pkg: types and constants shared by the LCD controller blocks.
//
// The register offsets are the 32-bit word offsets of the controller's
// Avalon slave (AS_Address[3:0]); their names and order follow the
// controller's register map. The state names of the LCD bus sequencer are
// the ones of its state diagram (including the spelling IDDLE). The DMA
// state names are those of the DMA engine description; their 2-bit encoding
// is this design's choice, so that the whole DMA state fits the two bits
// returned at offset 0x07.
package lcd_pkg;

  // Avalon slave word offsets
  typedef enum logic [3:0] {
    REG_SEND_COMMAND  = 4'h0,  // W: command to the LCD (D/CX low)
    REG_SEND_DATA     = 4'h1,  // W: data to the LCD (D/CX high); R: start an LCD read
    REG_LCD_ON        = 4'h2,  // RW: LCD_ON pin
    REG_LCD_RESETN    = 4'h3,  // RW: LCD reset pin (active low)
    REG_READ_DATA     = 4'h4,  // R: last word read from the LCD
    REG_IRQ_CTRL      = 4'h5,  // RW: bit1 MaskIRQ, bit0 ForceIRQ
    REG_IRQ_ACK       = 4'h6,  // W: DmaIrqAck; R: LCD FSM state
    REG_DMA_CTRL      = 4'h7,  // W: bit1 DmaSyncRst, bit0 DmaFire; R: DMA FSM state
    REG_DMA_START     = 4'h8,  // W: DmaStartAddr; R: current DMA address
    REG_DMA_END       = 4'h9,  // W: DmaEndAddr; R: DMA receive count
    REG_DMA_BURST     = 4'hA,  // RW: DmaBurstCount
    REG_DMA_THRESHOLD = 4'hB,  // RW: DmaFifoThreshold
    REG_OP_MODE       = 4'hC,  // RW: 0 = mode A (processor), 1 = mode B (DMA)
    REG_KEY_N         = 4'hD   // R: KEY_N push buttons
  } reg_addr_e;

  // LCD 8080 bus sequencer states
  typedef enum logic [3:0] {
    IDDLE       = 4'd0,
    WRITE       = 4'd1,
    WRITE_WAIT  = 4'd2,
    EDGE_W      = 4'd3,
    FINISH_W    = 4'd4,
    READ        = 4'd5,
    READ_L_WAIT = 4'd6,
    EDGE_R      = 4'd7,
    FINISH_R    = 4'd8
  } lcd_state_e;

  // DMA engine states
  typedef enum logic [1:0] {
    DMA_WAITING      = 2'd0,
    DMA_AVALON       = 2'd1,
    DMA_TRANSFERRING = 2'd2,
    DMA_IRQREQ       = 2'd3
  } dma_state_e;

  localparam int BURST_W = 11;  // AM_BurstCount[10:0]
  localparam int ADDR_W  = 32;  // AM_Address[31:0]

  // Configuration held in the register file and used by the DMA engine
  typedef struct packed {
    logic [ADDR_W-1:0]  start_addr;
    logic [ADDR_W-1:0]  end_addr;
    logic [BURST_W-1:0] burst_count;
    logic [8:0]         fifo_threshold;
  } dma_cfg_t;

endpackage
