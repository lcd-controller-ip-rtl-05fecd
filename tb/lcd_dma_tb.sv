// lcd_dma_tb: self-checking test of the DMA engine against a behavioural
// burst-read memory and a counting stand-in for the FIFO.
//
// Run 1 repeats the controller's reference simulation: start 0x100, end
// 0x108, burst 4, threshold 0x10, which must give bursts at 0x100, 0x104
// and 0x108, then the interrupt. Run 2 uses bursts of 16 over ten bursts
// with a slowly drained FIFO and threshold 40, so the engine must wait for
// FIFO space; no burst may start with 40 or more words in the FIFO. Every
// word pushed into the FIFO is compared with the memory contents, the
// interrupt must stay high until acknowledged, and a synchronous reset in
// the middle of run 3 must return the engine to waiting.
module lcd_dma_tb;
  import lcd_pkg::*;

  logic clk = 1'b0, reset_n = 1'b1;
  logic fire = 0, sync_rst = 0, irq_ack = 0;
  dma_cfg_t cfg = '0;
  logic dma_irq;
  dma_state_e state_o;
  logic [ADDR_W-1:0] dma_addr;
  logic [BURST_W-1:0] rx_cnt;
  logic [7:0] fifo_wrusedw;
  logic fifo_wrreq;
  logic [31:0] fifo_data;
  logic [ADDR_W-1:0] am_address;
  logic [3:0] am_byteenable;
  logic [BURST_W-1:0] am_burstcount;
  logic am_read, am_waitrequest, am_readdatavalid;
  logic [31:0] am_readdata;

  int checks = 0, failures = 0;
  int fifo_words = 0, drain_period = 0, drain_cnt = 0;
  int stalls = 0, max_at_issue = 0;
  logic [31:0] expect_addr = '0;
  int words_seen = 0;

  lcd_dma #(.FIFO_AW(8)) dut (.*);
  avalon_burst_mem #(.WAIT_CYCLES(2), .LATENCY(3), .GAPS(1'b1)) mem (.*);

  always #10 clk = !clk;

  // FIFO stand-in: a registered word count, drained every drain_period clocks
  assign fifo_wrusedw = 8'(fifo_words);
  always @(posedge clk) begin
    automatic int d = 0;
    if (drain_period != 0) begin
      drain_cnt <= drain_cnt + 1;
      if (drain_cnt % drain_period == 0 && fifo_words > 0) d = 1;
    end
    fifo_words <= fifo_words + int'(fifo_wrreq) - d;
    if (fifo_wrreq) begin
      checks++;
      if (fifo_data != mem.word_at(expect_addr)) begin
        failures++;
        $display("FAIL word %h at address %h", fifo_data, expect_addr);
      end
      expect_addr <= expect_addr + 1;
      words_seen <= words_seen + 1;
    end
    if (state_o == DMA_TRANSFERRING && rx_cnt >= cfg.burst_count &&
        32'(fifo_wrusedw) >= 32'(cfg.fifo_threshold)) stalls <= stalls + 1;
    if (am_read && !am_waitrequest && fifo_words > max_at_issue)
      max_at_issue <= fifo_words;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(logic [31:0] s, logic [31:0] e, int b, int thr);
    int n0, t;
    cfg.start_addr = s; cfg.end_addr = e;
    cfg.burst_count = BURST_W'(b); cfg.fifo_threshold = 9'(thr);
    expect_addr = s; words_seen = 0;
    n0 = mem.cmd_addr.size();
    @(negedge clk) fire = 1;
    @(negedge clk) fire = 0;
    t = 0;
    while (!dma_irq && t < 20000) begin t++; @(negedge clk); end
    check(dma_irq, "interrupt raised");
    check(mem.cmd_addr.size() - n0 == (e - s) / b + 1, "number of bursts");
    for (int i = n0; i < mem.cmd_addr.size(); i++) begin
      check(mem.cmd_addr[i] == s + 32'((i - n0) * b), "burst address");
      check(mem.cmd_len[i] == b, "burst length");
    end
    check(words_seen == ((e - s) / b + 1) * b, "all words received");
    repeat (5) @(negedge clk);
    check(dma_irq && state_o == DMA_IRQREQ, "interrupt held until ack");
    irq_ack = 1; @(negedge clk) irq_ack = 0;
    @(negedge clk);
    check(!dma_irq && state_o == DMA_WAITING, "back to waiting after ack");
  endtask

  initial begin
    #1 reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    check(state_o == DMA_WAITING && !am_read && am_byteenable == 0, "idle after reset");

    run(32'h100, 32'h108, 4, 16);          // reference case: 3 bursts
    fifo_words = 0;
    drain_period = 4;                       // slow drain: one word per 4 clocks
    run(32'h2000, 32'h2000 + 16 * 9, 16, 40);
    check(stalls > 0, "engine waited for FIFO space");
    check(max_at_issue < 40, $sformatf("no burst issued at or above threshold (max %0d)", max_at_issue));

    // synchronous reset in the middle of a frame
    cfg.start_addr = 32'h4000; cfg.end_addr = 32'h4000 + 8 * 20; cfg.burst_count = 8;
    expect_addr = 32'h4000;
    @(negedge clk) fire = 1;
    @(negedge clk) fire = 0;
    repeat (40) @(negedge clk);
    check(state_o != DMA_WAITING, "running before sync reset");
    sync_rst = 1; @(negedge clk) sync_rst = 0;
    check(state_o == DMA_WAITING && !dma_irq, "sync reset returns to waiting");
    repeat (100) @(negedge clk);
    check(state_o == DMA_WAITING, "stays waiting");
    check(mem.bad_be == 0, "all byte enables set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
