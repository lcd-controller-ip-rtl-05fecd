// lcd_fifo: show-ahead FIFO with a 32-bit write port and a 16-bit read port.
//
// It sits between the DMA engine, which writes one 32-bit memory word per
// accepted Avalon read beat, and the LCD bus sequencer, which takes one
// 16-bit pixel per LCD write cycle. Its size (DEPTH words of 32 bits, 256 by
// default, one M4K block), the port widths and the used-word outputs
// wrusedw[7:0] (32-bit words) and rdusedw[8:0] (16-bit words) follow the
// controller's FIFO description.
//
// Design choices of this implementation: both ports run on the single
// controller clock (the controller is synchronous to the Avalon clock), each
// 32-bit word is read out low half [15:0] first, then high half [31:16], and
// the used-word counts wrap to 0 when the FIFO is completely full, as narrow
// counts do; wrfull and rdempty give the unambiguous flags. A write into a
// full FIFO and a read from an empty one are ignored.
//
// Timing: show-ahead, q shows the oldest half-word whenever rdempty is low
// and rdreq acknowledges (removes) it at the next clock edge. A word written
// at one edge is visible on q and in both counts after that edge.
module lcd_fifo #(
  parameter int DEPTH = 256,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          reset_n,
  input  logic          sclr,      // synchronous clear
  // write side, 32 bits
  input  logic [31:0]   data,
  input  logic          wrreq,
  output logic [AW-1:0] wrusedw,
  output logic          wrfull,
  // read side, 16 bits, show-ahead
  input  logic          rdreq,
  output logic [15:0]   q,
  output logic [AW:0]   rdusedw,
  output logic          rdempty
);

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;       // 32-bit words held, 0..DEPTH
  logic          half;        // 1: low half of the head word already read

  logic do_wr, do_rd, pop_word;

  assign wrfull   = (count == (AW+1)'(DEPTH));
  assign rdempty  = (count == '0);
  assign do_wr    = wrreq && !wrfull;
  assign do_rd    = rdreq && !rdempty;
  assign pop_word = do_rd && half;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      half   <= 1'b0;
    end else if (sclr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      half   <= 1'b0;
    end else begin
      if (do_wr)    wr_ptr <= wr_ptr + 1'b1;
      if (pop_word) rd_ptr <= rd_ptr + 1'b1;
      if (do_rd)    half   <= !half;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(pop_word);
    end
  end

  assign q       = half ? mem[rd_ptr][31:16] : mem[rd_ptr][15:0];
  assign wrusedw = count[AW-1:0];
  assign rdusedw = {count[AW-1:0], 1'b0} - (AW+1)'(half);

endmodule
