// lcd_dma: frame DMA engine, an Avalon-MM burst-read master feeding the FIFO.
//
// After a DmaFire pulse it reads a frame from memory in bursts of
// cfg.burst_count words, starting at cfg.start_addr, and pushes every
// returned word (AM_ReadValid / AM_ReadData) into the FIFO. States:
//   DMA_WAITING      idle; fire loads the address counter with start_addr.
//   DMA_AVALON       AM_Read with address, burst count and all byte enables
//                    held until AM_WaitRequest is low (command accepted).
//   DMA_TRANSFERRING counts the returned beats; once the whole burst is in
//                    and the FIFO holds fewer than cfg.fifo_threshold words,
//                    either the frame is done (address >= end_addr) or the
//                    address advances by burst_count and the next burst
//                    is issued.
//   DMA_IRQREQ       dma_irq high until the processor acknowledges it.
// A new burst is only requested once the previous one has fully arrived.
// The beat counter counts a one-cycle-delayed copy of AM_ReadValid so that,
// when the count reaches burst_count, the FIFO's registered used-word count
// already includes the last beat. sync_rst returns the engine to
// DMA_WAITING from any state.
//
// This behaviour follows the controller's DMA engine description, including
// that the address advances by burst_count (one address unit per word) and
// that end_addr is the address of the last burst. Design choices: the
// Avalon outputs are decoded from the state register (Moore outputs), so
// AM_Read stays high until the interconnect accepts the command, and are
// zero outside DMA_AVALON.
module lcd_dma
  import lcd_pkg::*;
#(
  parameter int FIFO_AW = 8     // width of the FIFO write-side used-word count
) (
  input  logic                clk,
  input  logic                reset_n,
  // control from the register file
  input  logic                fire,
  input  logic                sync_rst,
  input  logic                irq_ack,
  input  dma_cfg_t            cfg,
  output logic                dma_irq,
  output dma_state_e          state_o,
  output logic [ADDR_W-1:0]   dma_addr,
  output logic [BURST_W-1:0]  rx_cnt,
  // FIFO write side
  input  logic [FIFO_AW-1:0]  fifo_wrusedw,
  output logic                fifo_wrreq,
  output logic [31:0]         fifo_data,
  // Avalon-MM master
  output logic [ADDR_W-1:0]   am_address,
  output logic [3:0]          am_byteenable,
  output logic [BURST_W-1:0]  am_burstcount,
  output logic                am_read,
  input  logic                am_waitrequest,
  input  logic [31:0]         am_readdata,
  input  logic                am_readdatavalid
);

  dma_state_e state;
  logic       rx_d;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state    <= DMA_WAITING;
      dma_addr <= '0;
      rx_cnt   <= '0;
      rx_d     <= 1'b0;
    end else begin
      rx_d <= am_readdatavalid;
      unique case (state)
        DMA_WAITING: if (fire) begin
          state    <= DMA_AVALON;
          dma_addr <= cfg.start_addr;
        end
        DMA_AVALON: if (!am_waitrequest) begin
          state  <= DMA_TRANSFERRING;
          rx_cnt <= '0;
        end
        DMA_TRANSFERRING: begin
          if (rx_cnt >= cfg.burst_count) begin
            if (32'(fifo_wrusedw) < 32'(cfg.fifo_threshold)) begin
              if (dma_addr >= cfg.end_addr) begin
                state <= DMA_IRQREQ;
              end else begin
                state    <= DMA_AVALON;
                dma_addr <= dma_addr + ADDR_W'(cfg.burst_count);
              end
            end
          end else if (rx_d) begin
            rx_cnt <= rx_cnt + 1'b1;
          end
        end
        DMA_IRQREQ: if (irq_ack) state <= DMA_WAITING;
        default: state <= DMA_WAITING;
      endcase
      if (sync_rst) state <= DMA_WAITING;
    end
  end

  always_comb begin
    am_address    = '0;
    am_byteenable = '0;
    am_burstcount = '0;
    am_read       = 1'b0;
    if (state == DMA_AVALON) begin
      am_address    = dma_addr;
      am_byteenable = '1;
      am_burstcount = cfg.burst_count;
      am_read       = 1'b1;
    end
  end

  assign dma_irq    = (state == DMA_IRQREQ);
  assign state_o    = state;
  assign fifo_wrreq = am_readdatavalid;
  assign fifo_data  = am_readdata;

endmodule
