// ili9341_model: behavioural model of the ILI9341 8080-I 16-bit bus, for
// testbenches only (the LCD driver chip is an external part).
//
// It samples the bus on the testbench clock. Every rising edge of WRX with
// CSX low is logged in `writes` as {D/CX, D[15:0]}. While RDX is low it drives
// d_in with READ_BASE + the number of reads so far, and it counts the reads
// in `reads`. It checks, in clock cycles, the write-cycle rules that the
// controller must meet at 50 MHz (WRX low >= 1 cycle, WRX high >= 1 cycle,
// falling-to-falling >= MIN_WC cycles, D driven while WRX is low, CSX low
// during every WRX or RDX pulse, no drive while RDX is low) and the read
// rules (RDX low >= MIN_RDL cycles), counting each breach in `errors` and
// printing the first ten.
// It also records the length of the last write cycle and last RDX low pulse.
module ili9341_model #(
  parameter int          MIN_WC    = 4,
  parameter int          MIN_RDL   = 17,
  parameter logic [15:0] READ_BASE = 16'hC000
) (
  input  logic        clk,
  input  logic        csx,
  input  logic        dcx,
  input  logic        wrx,
  input  logic        rdx,
  input  logic [15:0] d_out,
  input  logic        d_oe,
  output logic [15:0] d_in
);
  logic [16:0] writes[$];
  int reads = 0, errors = 0;
  int wr_low = 0, since_wr_fall = 0, rd_low = 0;
  int last_wc = 0, last_rdl = 0;
  logic wrx_q = 1'b1, rdx_q = 1'b1;

  assign d_in = rdx ? 16'h0000 : READ_BASE + 16'(reads);

  always @(posedge clk) begin
    wrx_q <= wrx;
    rdx_q <= rdx;
    since_wr_fall <= since_wr_fall + 1;
    if (!wrx) begin
      wr_low <= wr_low + 1;
      if (!d_oe || csx) begin
        errors <= errors + 1;
        if (errors < 10) $display("ili9341_model: WRX low without D driven or CSX low at %0t", $time);
      end
    end
    if (wrx_q && !wrx) begin  // falling WRX
      if (since_wr_fall < MIN_WC && writes.size() != 0) begin
        errors <= errors + 1;
        if (errors < 10) $display("ili9341_model: write cycle of %0d cycles at %0t", since_wr_fall, $time);
      end
      last_wc <= since_wr_fall;
      since_wr_fall <= 1;
    end
    if (!wrx_q && wrx) begin  // rising WRX: the LCD latches D
      writes.push_back({dcx, d_out});
      wr_low <= 0;
    end
    if (!rdx) begin
      rd_low <= rd_low + 1;
      if (d_oe || csx) begin
        errors <= errors + 1;
        if (errors < 10) $display("ili9341_model: RDX low with D driven or CSX high at %0t", $time);
      end
    end
    if (!rdx_q && rdx) begin  // rising RDX: end of a read
      if (rd_low < MIN_RDL) begin
        errors <= errors + 1;
        if (errors < 10) $display("ili9341_model: RDX low for %0d cycles at %0t", rd_low, $time);
      end
      last_rdl <= rd_low;
      rd_low <= 0;
      reads <= reads + 1;
    end
  end
endmodule
