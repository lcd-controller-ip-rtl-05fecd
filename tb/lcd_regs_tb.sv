// lcd_regs_tb: self-checking test of the Avalon slave register file.
//
// The LCD sequencer and DMA engine are replaced by testbench signals. The
// test checks the reset values, write/read-back of every read-write
// register, the status readbacks, the LCD command/data/read requests and
// their D/CX level, waitrequest while the LCD is busy, the one-clock DMA
// fire / sync-reset / irq-acknowledge pulses, the IRQ mask and force bits
// and the synchronised KEY_N inputs.
module lcd_regs_tb;
  import lcd_pkg::*;

  logic clk = 1'b0, reset_n = 1'b1;
  logic [3:0] as_address = '0;
  logic as_chipselect = 0, as_read = 0, as_write = 0;
  logic [31:0] as_writedata = '0, as_readdata;
  logic as_waitrequest, as_irq;
  logic lcd_wr_req, lcd_wr_dc, lcd_rd_req, lcd_host_pending, op_mode;
  logic [15:0] lcd_wr_data;
  logic lcd_busy = 0;
  logic [15:0] lcd_read_data = 16'hBEEF;
  lcd_state_e lcd_state = READ_L_WAIT;
  logic dma_fire, dma_sync_rst, dma_irq_ack;
  dma_cfg_t dma_cfg;
  logic dma_irq = 0;
  dma_state_e dma_state = DMA_TRANSFERRING;
  logic [ADDR_W-1:0] dma_addr = 32'h1234_5678;
  logic [BURST_W-1:0] dma_rx_cnt = 11'd77;
  logic lcd_on, lcd_resetn, irq_ack_pin;
  logic [1:0] key_n = 2'b10;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_fire = 0, n_srst = 0, n_ack = 0, n_ackpin = 0;
  logic last_dc;
  logic [15:0] last_wd;

  lcd_regs dut (.*);

  always #10 clk = !clk;

  always @(posedge clk) begin
    if (lcd_wr_req) begin n_wr++; last_dc = lcd_wr_dc; last_wd = lcd_wr_data; end
    if (lcd_rd_req) n_rd++;
    if (dma_fire) n_fire++;
    if (dma_sync_rst) n_srst++;
    if (dma_irq_ack) n_ack++;
    if (irq_ack_pin) n_ackpin++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Avalon write; returns the number of clocks waitrequest was high
  task automatic av_write(logic [3:0] a, logic [31:0] d, output int waits);
    waits = 0;
    @(negedge clk);
    as_chipselect = 1; as_write = 1; as_address = a; as_writedata = d;
    #1;
    while (as_waitrequest) begin waits++; @(negedge clk); #1; end
    @(negedge clk);
    as_chipselect = 0; as_write = 0;
  endtask

  task automatic av_read(logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    as_chipselect = 1; as_read = 1; as_address = a;
    #1;
    while (as_waitrequest) begin @(negedge clk); #1; end
    d = as_readdata;
    @(negedge clk);
    as_chipselect = 0; as_read = 0;
  endtask

  initial begin
    logic [31:0] r;
    int w;
    #1 reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;

    // reset values
    for (int a = 2; a <= 12; a++) begin
      if (a == 4 || a == 6 || a == 7 || a == 8 || a == 9) continue;
      av_read(4'(a), r);
      check(r == 0, $sformatf("reset value of register %0h", a));
    end
    check(!lcd_on && !lcd_resetn && !as_irq && !op_mode && dma_cfg == '0, "reset outputs");

    // read-write registers
    av_write(4'h2, 32'hFFFF_FFFF, w); av_read(4'h2, r); check(r == 1 && lcd_on, "LCDOn");
    av_write(4'h3, 32'h1, w);         av_read(4'h3, r); check(r == 1 && lcd_resetn, "LCDResetN");
    av_write(4'hA, 32'hFFFF_FF80, w); av_read(4'hA, r); check(r == 32'h780 && dma_cfg.burst_count == 11'h780, "DmaBurstCount");
    av_write(4'hB, 32'h0000_0110, w); av_read(4'hB, r); check(r == 32'h110 && dma_cfg.fifo_threshold == 9'h110, "DmaFifoThreshold");
    av_write(4'hC, 32'h1, w);         av_read(4'hC, r); check(r == 1 && op_mode, "OpMode");
    av_write(4'h8, 32'h0800_0000, w); check(dma_cfg.start_addr == 32'h0800_0000, "DmaStartAddr");
    av_write(4'h9, 32'h0801_2BFF, w); check(dma_cfg.end_addr == 32'h0801_2BFF, "DmaEndAddr");

    // status readbacks
    av_read(4'h8, r); check(r == 32'h1234_5678, "DmaAddr readback");
    av_read(4'h9, r); check(r == 77, "DmaRxCount readback");
    av_read(4'h4, r); check(r == 32'hBEEF, "DataReadFromILI9341");
    av_read(4'h6, r); check(r == 32'(READ_L_WAIT), "LCD FSM state");
    av_read(4'h7, r); check(r == 32'(DMA_TRANSFERRING), "DMA FSM state");
    av_read(4'hD, r); check(r == 32'h2, "KEY_N");
    key_n = 2'b01; repeat (3) @(negedge clk);
    av_read(4'hD, r); check(r == 32'h1, "KEY_N after change");

    // LCD requests
    av_write(4'h0, 32'hABCD_002C, w);
    check(n_wr == 1 && last_dc == 0 && last_wd == 16'h002C && w == 0, "SendCommand");
    av_write(4'h1, 32'h0000_F800, w);
    check(n_wr == 2 && last_dc == 1 && last_wd == 16'hF800, "SendData");
    av_read(4'h1, r);
    check(n_rd == 1 && r == 32'hBEEF, "ReadsData starts an LCD read");
    // busy LCD: waitrequest until it frees up
    lcd_busy = 1;
    fork
      av_write(4'h1, 32'h1111, w);
      begin repeat (4) @(negedge clk); lcd_busy = 0; end
    join
    check(w == 3 && n_wr == 3, $sformatf("waitrequest while busy (%0d clocks)", w));
    lcd_busy = 1;
    av_write(4'h5, 32'h0, w);
    check(w == 0, "other registers do not wait while LCD busy");
    lcd_busy = 0;

    // DMA control pulses
    av_write(4'h7, 32'h1, w); repeat (2) @(negedge clk);
    check(n_fire == 1 && n_srst == 0, "DmaFire pulse");
    av_write(4'h7, 32'h2, w); repeat (2) @(negedge clk);
    check(n_fire == 1 && n_srst == 1, "DmaSyncRst pulse");
    av_write(4'h6, 32'h1, w); repeat (2) @(negedge clk);
    check(n_ack == 1 && n_ackpin == 1, "DmaIrqAck pulse and IRQAck pin");

    // IRQ
    dma_irq = 1; #1 check(as_irq, "DMA interrupt");
    av_write(4'h5, 32'h2, w); #1 check(!as_irq, "MaskIRQ");
    av_write(4'h5, 32'h3, w); #1 check(as_irq, "ForceIRQ over mask");
    dma_irq = 0;
    av_write(4'h5, 32'h1, w); #1 check(as_irq, "ForceIRQ alone");
    av_read(4'h5, r); check(r == 1, "IRQ control readback");
    av_write(4'h5, 32'h0, w); #1 check(!as_irq, "IRQ released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
