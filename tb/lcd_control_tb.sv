// lcd_control_tb: self-checking test of the ILI9341 bus sequencer.
//
// An ili9341_model on the pins logs every write and checks the bus rules.
// The test checks: a processor command and a data write (state sequence
// WRITE, WRITE_WAIT, EDGE_W, FINISH_W, four clocks each, WRX low for two,
// D/CX level, data); a processor read (19 clocks busy, RDX low 17 clocks,
// the word the model drove is captured); a mode-B FIFO stream of pixels
// written back to back every four clocks in order; a processor write
// breaking into the stream; and processor priority over the FIFO in IDDLE.
module lcd_control_tb;
  import lcd_pkg::*;

  logic clk = 1'b0, reset_n = 1'b1;
  logic wr_req = 0, wr_dc = 0, rd_req = 0, host_pending = 0, dma_mode = 0;
  logic [15:0] wr_data = '0;
  logic busy, fifo_rdreq, csx, dcx, wrx, rdx, d_oe;
  logic [15:0] read_data, d_out, d_in, fifo_q;
  logic fifo_empty;
  lcd_state_e state_o;

  int checks = 0, failures = 0;
  logic [15:0] px[$];
  logic pop_pend = 1'b0;

  lcd_control #(.RD_WAIT_CYCLES(16)) dut (.*);
  ili9341_model #(.MIN_WC(4), .MIN_RDL(17)) lcd (.*);

  always #10 clk = !clk;

  // show-ahead FIFO stand-in driven from a queue
  assign fifo_q     = (px.size() != 0) ? px[0] : 16'h0;
  assign fifo_empty = (px.size() == 0);
  always @(posedge clk) pop_pend <= fifo_rdreq;
  always @(negedge clk) if (pop_pend) void'(px.pop_front());

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic host_write(bit dc, logic [15:0] d);
    @(negedge clk);
    while (busy) @(negedge clk);
    wr_req = 1; wr_dc = dc; wr_data = d;
    @(negedge clk);
    wr_req = 0;
  endtask

  initial begin
    lcd_state_e seq[5];
    int n, t0, wl;
    logic [16:0] w;
    #1 reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    check(csx && wrx && rdx && !d_oe && !busy, "idle pins after reset");

    // command write, then follow the state sequence
    @(negedge clk);
    wr_req = 1; wr_dc = 0; wr_data = 16'h002C;
    @(negedge clk);
    wr_req = 0;
    wl = 0;
    for (int i = 0; i < 5; i++) begin
      seq[i] = state_o;
      if (!wrx) wl++;
      @(negedge clk);
    end
    check(seq[0] == WRITE && seq[1] == WRITE_WAIT && seq[2] == EDGE_W &&
          seq[3] == FINISH_W && seq[4] == IDDLE, "write state sequence");
    check(wl == 2, "WRX low two clocks");
    check(lcd.writes.size() == 1 && lcd.writes[0] == {1'b0, 16'h002C}, "command logged");

    host_write(1, 16'h0088);
    repeat (5) @(negedge clk);
    check(lcd.writes.size() == 2 && lcd.writes[1] == {1'b1, 16'h0088}, "data logged");
    check(dcx == 1'b1, "D/CX high after data");

    // processor read
    @(negedge clk);
    rd_req = 1;
    @(negedge clk);
    rd_req = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    check(n == 19, $sformatf("read cycle 19 clocks (got %0d)", n));
    check(lcd.last_rdl == 17, $sformatf("RDX low 17 clocks (got %0d)", lcd.last_rdl));
    check(read_data == 16'hC000, $sformatf("read data %h", read_data));

    // mode B stream of 20 pixels
    dma_mode = 1;
    for (int i = 0; i < 20; i++) px.push_back(16'h1000 + 16'(i * 7));
    t0 = lcd.writes.size();
    @(negedge clk);
    n = 0;
    while (lcd.writes.size() < t0 + 20 && n < 200) begin n++; @(negedge clk); end
    // first pixel: 1 clock to leave IDDLE, then 20 writes of 4 clocks
    check(n >= 78 && n <= 82, $sformatf("20 pixels in 80 clocks (got %0d)", n));
    for (int i = 0; i < 20; i++)
      check(lcd.writes[t0 + i] == {1'b1, 16'h1000 + 16'(i * 7)}, "stream pixel");
    check(lcd.last_wc == 4, "back-to-back write cycle 4 clocks");
    repeat (4) @(negedge clk);
    check(!busy, "idle after stream");

    // a processor write breaks into a running stream
    for (int i = 0; i < 10; i++) px.push_back(16'h2000 + 16'(i));
    t0 = lcd.writes.size();
    repeat (6) @(negedge clk);
    host_pending = 1;
    while (busy) @(negedge clk);
    wr_req = 1; wr_dc = 0; wr_data = 16'h0029;
    @(negedge clk);
    wr_req = 0; host_pending = 0;
    repeat (60) @(negedge clk);
    n = 0;
    for (int i = t0; i < lcd.writes.size(); i++) begin
      w = lcd.writes[i];
      if (w == {1'b0, 16'h0029}) n = i - t0;
    end
    check(lcd.writes.size() == t0 + 11, "10 pixels and 1 command");
    check(n == 2, $sformatf("command after two pixels (at %0d)", n));
    check(px.size() == 0, "FIFO drained");

    // processor priority over a waiting FIFO pixel in IDDLE
    dma_mode = 0;
    px.push_back(16'h3333);
    repeat (2) @(negedge clk);
    t0 = lcd.writes.size();
    wr_req = 1; wr_dc = 1; wr_data = 16'h4444;
    dma_mode = 1;
    @(negedge clk);
    wr_req = 0;
    repeat (12) @(negedge clk);
    check(lcd.writes.size() == t0 + 2 && lcd.writes[t0] == {1'b1, 16'h4444} &&
          lcd.writes[t0 + 1] == {1'b1, 16'h3333}, "processor first, then FIFO");

    check(lcd.errors == 0, $sformatf("bus model errors %0d", lcd.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
