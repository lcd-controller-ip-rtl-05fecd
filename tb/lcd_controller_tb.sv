// lcd_controller_tb: end-to-end test of the LCD controller at its default
// parameters, with a behavioural burst-read memory on the Avalon master and
// a behavioural ILI9341 on the LCD pins.
//
// Sequence, as software would drive it:
//   1. power the panel (LCDOn, LCDResetN);
//   2. mode A: send a command and pixels through the slave, back to back
//      so that waitrequest stalls the processor; read a word from the LCD;
//   3. mode B: send the memory-write command, program a full 240x320 frame
//      (38400 words, bursts of 128, FIFO threshold 128), fire the DMA and
//      check all 76800 pixels, their order, the frame time (four clocks per
//      pixel, i.e. 162.76 frames/s at 50 MHz), the interrupt and its
//      acknowledge;
//   4. a short frame with the interrupt masked, then ForceIRQ;
//   5. a processor command sent while a DMA stream is running;
//   6. a DMA synchronous reset in the middle of a frame.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module lcd_controller_tb;
  import lcd_pkg::*;

  localparam int W = 240, H = 320;
  localparam int PIXELS = W * H, WORDS = PIXELS / 2;
  localparam logic [15:0] SEED = 16'h5A00;

  logic clk = 1'b0, reset_n = 1'b1;
  logic [3:0] as_address = '0;
  logic as_chipselect = 0, as_read = 0, as_write = 0;
  logic [31:0] as_writedata = '0, as_readdata;
  logic as_waitrequest, as_irq;
  logic [31:0] am_address, am_readdata;
  logic am_read, am_waitrequest, am_readdatavalid;
  logic [10:0] am_burstcount;
  logic [3:0] am_byteenable;
  logic rsx, csx, dcx, wrx, rdx, d_oe, lcd_on, irq_ack;
  logic [15:0] d_out, d_in;
  logic [1:0] key_n = 2'b11;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_proc_wr = 0, n_proc_rd = 0, n_slave_wait = 0, n_bursts = 0;
  int n_thr_stall = 0, n_irq = 0, n_irq_masked = 0, n_force = 0;
  int n_sync_rst = 0, n_break = 0, n_mode_sw = 0, n_ack_pin = 0;
  int beats_left = 0, since_last_beat = 1_000_000;

  lcd_controller dut (.*);
  ili9341_model #(.MIN_WC(4), .MIN_RDL(17)) lcd (.*);
  avalon_burst_mem #(.WAIT_CYCLES(2), .LATENCY(4), .GAPS(1'b1), .SEED(SEED)) mem (.*);

  always #10 clk = !clk;   // 50 MHz

  always @(posedge clk) begin
    if (as_chipselect && as_waitrequest) n_slave_wait <= n_slave_wait + 1;
    if (am_read && !am_waitrequest) n_bursts <= n_bursts + 1;
    // threshold wait, seen from outside: a burst has fully arrived but the
    // next command comes much later than the engine's three-clock turnaround
    if (am_read && !am_waitrequest) begin
      beats_left <= int'(am_burstcount);
      if (since_last_beat > 12 && since_last_beat < 1_000_000)
        n_thr_stall <= n_thr_stall + 1;
    end else if (am_readdatavalid) begin
      beats_left <= beats_left - 1;
    end
    if (am_readdatavalid && beats_left == 1) since_last_beat <= 0;
    else if (since_last_beat < 1_000_000) since_last_beat <= since_last_beat + 1;
    if (irq_ack) n_ack_pin <= n_ack_pin + 1;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic av_write(reg_addr_e a, logic [31:0] d);
    @(negedge clk);
    as_chipselect = 1; as_write = 1; as_address = a; as_writedata = d;
    #1;
    while (as_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    as_chipselect = 0; as_write = 0;
  endtask

  task automatic av_read(reg_addr_e a, output logic [31:0] d);
    @(negedge clk);
    as_chipselect = 1; as_read = 1; as_address = a;
    #1;
    while (as_waitrequest) begin @(negedge clk); #1; end
    d = as_readdata;
    @(negedge clk);
    as_chipselect = 0; as_read = 0;
  endtask

  // back-to-back writes: the next access is presented right after the
  // previous one is accepted, so the slave must stall it
  task automatic av_write_burst(reg_addr_e a, logic [31:0] d[]);
    foreach (d[i]) begin
      @(negedge clk);
      as_chipselect = 1; as_write = 1; as_address = a; as_writedata = d[i];
      #1;
      while (as_waitrequest) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    as_chipselect = 0; as_write = 0;
  endtask

  // The sequencer leaves IDDLE within one clock while the FIFO holds a
  // pixel, so three IDDLE readings in a row mean the FIFO is empty too.
  task automatic wait_lcd_idle();
    logic [31:0] r;
    int seen = 0;
    while (seen < 3) begin
      av_read(REG_IRQ_ACK, r);
      seen = (r == 32'(IDDLE)) ? seen + 1 : 0;
    end
  endtask

  function automatic logic [16:0] pixel(int k);
    return {1'b1, 16'(k) ^ SEED};
  endfunction

  initial begin
    logic [31:0] r;
    logic [31:0] px[];
    int t0, t1, w0, cyc, bad;

    #1 reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    check(!lcd_on && !rsx && csx && wrx && rdx, "pins after reset");

    // 1. power up
    av_write(REG_LCD_ON, 1);
    av_write(REG_LCD_RESETN, 1);
    check(lcd_on && rsx, "LCD_ON and reset released");
    av_read(REG_KEY_N, r);
    check(r == 32'h3, "KEY_N idle");

    // 2. mode A
    av_write(REG_SEND_COMMAND, 32'h2C);
    n_proc_wr++;
    px = new[8];
    foreach (px[i]) px[i] = 32'hF000 + 32'(i);
    av_write_burst(REG_SEND_DATA, px);
    n_proc_wr += 8;
    wait_lcd_idle();
    check(lcd.writes.size() == 9, "mode A: 9 LCD writes");
    check(lcd.writes[0] == {1'b0, 16'h002C}, "mode A: command");
    bad = 0;
    for (int i = 0; i < 8; i++) if (lcd.writes[1 + i] != {1'b1, 16'hF000 + 16'(i)}) bad++;
    check(bad == 0, "mode A: pixel data");
    check(n_slave_wait > 0, "processor stalled by waitrequest");
    // processor writes pass through IDDLE: four-clock cycle plus one idle
    check(lcd.last_wc == 5, "mode A: back-to-back processor writes every five clocks");

    av_write(REG_SEND_COMMAND, 32'h09);   // read display status
    av_read(REG_SEND_DATA, r);            // starts the LCD read
    wait_lcd_idle();
    av_read(REG_READ_DATA, r);
    n_proc_rd++;
    check(r == 32'hC000, $sformatf("mode A: LCD read %h", r));
    check(lcd.last_rdl == 17, "mode A: RDX low 17 clocks");

    // 3. mode B, one full frame
    av_write(REG_OP_MODE, 1);
    n_mode_sw++;
    av_write(REG_SEND_COMMAND, 32'h2C);
    av_write(REG_DMA_START, 32'h0);
    av_write(REG_DMA_END, 32'(WORDS - 128));
    av_write(REG_DMA_BURST, 128);
    av_write(REG_DMA_THRESHOLD, 128);
    w0 = lcd.writes.size();
    t0 = mem.cycle;
    av_write(REG_DMA_CTRL, 1);
    cyc = 0;
    while (lcd.writes.size() < w0 + PIXELS && cyc < 400_000) begin
      @(negedge clk); cyc++;
      if (as_irq && n_irq == 0) n_irq++;
    end
    t1 = mem.cycle;
    check(lcd.writes.size() == w0 + PIXELS, "frame: 76800 pixels written");
    bad = 0;
    for (int k = 0; k < PIXELS; k++) if (lcd.writes[w0 + k] != pixel(k)) bad++;
    check(bad == 0, $sformatf("frame: pixel order and values (%0d wrong)", bad));
    // 4 clocks per pixel plus the start-up latency of the first burst
    check(t1 - t0 <= 4 * PIXELS + 40,
          $sformatf("frame: %0d clocks for %0d pixels", t1 - t0, PIXELS));
    $display("frame time %0d clocks = %0.2f frames/s at 50 MHz",
             t1 - t0, 50.0e6 / real'(t1 - t0));
    check(n_irq == 1 && as_irq, "frame: interrupt raised and held");
    av_read(REG_DMA_CTRL, r);
    check(r == 32'(DMA_IRQREQ), "frame: DMA state readback");
    av_read(REG_DMA_START, r);
    check(r == 32'(WORDS - 128), "frame: final DMA address");
    av_write(REG_IRQ_ACK, 1);
    repeat (2) @(negedge clk);
    check(!as_irq && n_ack_pin == 1, "frame: interrupt acknowledged, IRQAck pulsed");
    check(n_thr_stall > 0, "frame: DMA waited on the FIFO threshold");

    // 4. masked interrupt, then ForceIRQ
    av_write(REG_IRQ_CTRL, 2);
    av_write(REG_DMA_START, 32'h1000);
    av_write(REG_DMA_END, 32'h1000 + 32'd16 * 3);
    av_write(REG_DMA_BURST, 16);
    av_write(REG_DMA_CTRL, 1);
    do av_read(REG_DMA_CTRL, r); while (r != 32'(DMA_IRQREQ));
    check(!as_irq, "masked interrupt stays low");
    n_irq_masked++;
    av_write(REG_IRQ_CTRL, 3);
    #1 check(as_irq, "ForceIRQ");
    n_force++;
    av_write(REG_IRQ_CTRL, 0);
    av_write(REG_IRQ_ACK, 1);
    wait_lcd_idle();

    // 5. processor command inside a running stream
    av_write(REG_DMA_START, 32'h2000);
    av_write(REG_DMA_END, 32'h2000 + 32'd16 * 7);
    w0 = lcd.writes.size();
    av_write(REG_DMA_CTRL, 1);
    repeat (60) @(negedge clk);
    av_read(REG_IRQ_ACK, r);
    check(r != 32'(IDDLE), "stream running");
    av_write(REG_SEND_COMMAND, 32'h00);   // NOP command
    wait (as_irq);
    av_write(REG_IRQ_ACK, 1);
    wait_lcd_idle();
    bad = 0;
    for (int i = w0; i < lcd.writes.size(); i++) if (lcd.writes[i] == 17'h0) bad++;
    check(bad == 1 && lcd.writes.size() == w0 + 256 + 1, "command slotted into the stream");
    if (bad == 1) n_break++;

    // 6. synchronous reset in the middle of a frame
    av_write(REG_DMA_START, 32'h0);
    av_write(REG_DMA_END, 32'(WORDS - 128));
    av_write(REG_DMA_BURST, 128);
    av_write(REG_DMA_CTRL, 1);
    repeat (1000) @(negedge clk);
    av_write(REG_DMA_CTRL, 2);
    n_sync_rst++;
    av_read(REG_DMA_CTRL, r);
    check(r == 32'(DMA_WAITING), "sync reset: DMA waiting");
    repeat (300) @(negedge clk);   // let in-flight beats settle
    av_write(REG_DMA_CTRL, 2);
    repeat (10) @(negedge clk);
    av_read(REG_IRQ_ACK, r);
    check(r == 32'(IDDLE), "sync reset: FIFO emptied, LCD idle");
    w0 = lcd.writes.size();
    repeat (200) @(negedge clk);
    check(lcd.writes.size() == w0 && !as_irq, "sync reset: nothing more sent");

    av_write(REG_OP_MODE, 0);
    n_mode_sw++;

    check(lcd.errors == 0, $sformatf("LCD bus timing errors: %0d", lcd.errors));
    check(mem.bad_be == 0, "byte enables");
    $display("mechanisms: proc_wr=%0d proc_rd=%0d slave_wait=%0d bursts=%0d thr_stall=%0d irq=%0d irq_masked=%0d force=%0d sync_rst=%0d break=%0d mode_sw=%0d",
             n_proc_wr, n_proc_rd, n_slave_wait, n_bursts, n_thr_stall, n_irq,
             n_irq_masked, n_force, n_sync_rst, n_break, n_mode_sw);
    check(n_proc_wr > 0 && n_proc_rd > 0 && n_slave_wait > 0 && n_bursts > 0 &&
          n_thr_stall > 0 && n_irq > 0 && n_irq_masked > 0 && n_force > 0 &&
          n_sync_rst > 0 && n_break > 0 && n_mode_sw > 0 && n_ack_pin > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
