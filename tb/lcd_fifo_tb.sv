// lcd_fifo_tb: self-checking test of the 32-in / 16-out show-ahead FIFO.
//
// A queue of 16-bit half-words is the reference: every accepted 32-bit
// write appends its low then its high half. The test fills the FIFO
// completely (checking wrfull, the wrapped used-word counts and that an
// extra write is dropped), drains it, then runs random simultaneous reads
// and writes, comparing q and both used-word counts every cycle, and ends
// with a synchronous clear.
module lcd_fifo_tb;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, reset_n = 1'b0, sclr = 1'b0;
  logic [31:0] data = '0;
  logic wrreq = 1'b0, rdreq = 1'b0;
  logic [AW-1:0] wrusedw;
  logic [AW:0] rdusedw;
  logic wrfull, rdempty;
  logic [15:0] q;

  int checks = 0, failures = 0;
  logic [15:0] model[$];

  lcd_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: q=%h rdusedw=%0d wrusedw=%0d model=%0d",
               what, $time, q, rdusedw, wrusedw, model.size());
    end
  endtask

  // compare outputs with the model (called between edges)
  task automatic compare();
    int words;
    words = (model.size() + 1) / 2;
    check(rdempty == (model.size() == 0), "rdempty");
    check(rdusedw == (AW+1)'(model.size()), "rdusedw");
    check(wrusedw == AW'(words), "wrusedw");
    check(wrfull == (words == DEPTH), "wrfull");
    if (model.size() != 0) check(q == model[0], "q");
  endtask

  // one clock with the given requests, updating the model
  task automatic step(bit wr, bit rd, logic [31:0] d);
    bit full, empty;
    full  = ((model.size() + 1) / 2) == DEPTH;
    empty = model.size() == 0;
    wrreq = wr; rdreq = rd; data = d;
    @(posedge clk);
    #1;
    if (rd && !empty) void'(model.pop_front());
    if (wr && !full) begin
      model.push_back(d[15:0]);
      model.push_back(d[31:16]);
    end
    wrreq = 0; rdreq = 0;
    compare();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1'b1;
    #1 compare();
    // fill completely
    for (int i = 0; i < DEPTH; i++) step(1, 0, {16'(i) ^ 16'hA5A5, 16'(i)});
    check(wrfull && wrusedw == 0 && rdusedw == 0, "full wraps counts");
    step(1, 0, 32'hDEAD_BEEF);  // dropped
    // drain
    while (model.size() != 0) step(0, 1, '0);
    step(0, 1, '0);             // read while empty: ignored
    // random traffic
    for (int i = 0; i < 20000; i++)
      step(($urandom % 3) != 0, ($urandom % 2) != 0, $urandom);
    // synchronous clear
    for (int i = 0; i < 5; i++) step(1, 0, $urandom);
    sclr = 1'b1; @(posedge clk); #1 sclr = 1'b0;
    model.delete();
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
