// lcd_control: bus sequencer for the ILI9341 8080-I 16-bit parallel interface.
//
// It turns single requests into complete LCD bus cycles. A write comes from
// the processor (command or data, through the register file) or, in mode B,
// from the FIFO (always data). A read is only started by the processor; the
// word read is kept in read_data.
//
// Write cycle, four clocks (80 ns at 50 MHz, above the 66 ns minimum write
// cycle): WRITE and WRITE_WAIT hold WRx low, EDGE_W raises WRx (the LCD
// latches D on this rising edge), FINISH_W keeps D driven for the hold time.
// In mode B, FINISH_W goes straight to the next WRITE when the FIFO holds a
// pixel, so a stream runs at one pixel every four clocks (50 MHz /
// (4 * 240 * 320) = 162.76 frames/s). The FIFO pixel is acknowledged in the
// cycle it is taken.
//
// Read cycle: READ drops RDx, READ_L_WAIT keeps it low for RD_WAIT_CYCLES
// more clocks, the data bus is sampled at the clock edge that leaves
// READ_L_WAIT, EDGE_R raises RDx, FINISH_R lets the LCD release the bus.
// With the default 16 the read cycle is 19 clocks and RDx is low for 17.
//
// The state names, the four-clock write and the 16-count read wait follow
// the controller's state diagram and simulation traces. Design choices:
// the pin outputs are registered (decoded from the next state) so they do
// not glitch; CSx is low in every state but IDDLE; DCx keeps its last value
// between cycles; a processor request (host_pending) breaks a FIFO stream
// at FINISH_W so the processor is not locked out in mode B; a processor
// request in IDDLE has priority over the FIFO. The bidirectional data bus is
// split into d_out / d_oe / d_in; the tri-state buffer belongs in the pads.
module lcd_control
  import lcd_pkg::*;
#(
  parameter int RD_WAIT_CYCLES = 16
) (
  input  logic        clk,
  input  logic        reset_n,
  // processor requests, accepted only while busy is low
  input  logic        wr_req,       // one-cycle pulse: write wr_data
  input  logic        wr_dc,        // 0: command, 1: data
  input  logic [15:0] wr_data,
  input  logic        rd_req,       // one-cycle pulse: read one word
  input  logic        host_pending, // a processor LCD access is waiting
  output logic        busy,
  output logic [15:0] read_data,
  output lcd_state_e  state_o,
  // FIFO side (mode B)
  input  logic        dma_mode,
  input  logic [15:0] fifo_q,
  input  logic        fifo_empty,
  output logic        fifo_rdreq,
  // ILI9341 pins
  output logic        csx,
  output logic        dcx,
  output logic        wrx,
  output logic        rdx,
  output logic [15:0] d_out,
  output logic        d_oe,
  input  logic [15:0] d_in
);

  localparam int CW = $clog2(RD_WAIT_CYCLES + 1);

  lcd_state_e state, next;
  logic [CW-1:0] cnt;
  logic take_fifo, take_host_wr, take_host_rd;

  // A new cycle may start from IDDLE (processor first, then FIFO) or, for
  // the FIFO, directly from FINISH_W.
  always_comb begin
    take_host_wr = (state == IDDLE) && wr_req;
    take_host_rd = (state == IDDLE) && rd_req && !wr_req;
    take_fifo    = dma_mode && !fifo_empty &&
                   (((state == IDDLE) && !wr_req && !rd_req) ||
                    ((state == FINISH_W) && !host_pending));
  end

  assign fifo_rdreq = take_fifo;

  always_comb begin
    next = state;
    unique case (state)
      IDDLE: begin
        if (take_host_wr || take_fifo) next = WRITE;
        else if (take_host_rd)         next = READ;
      end
      WRITE:       next = WRITE_WAIT;
      WRITE_WAIT:  next = EDGE_W;
      EDGE_W:      next = FINISH_W;
      FINISH_W:    next = take_fifo ? WRITE : IDDLE;
      READ:        next = READ_L_WAIT;
      READ_L_WAIT: if (cnt == CW'(RD_WAIT_CYCLES - 1)) next = EDGE_R;
      EDGE_R:      next = FINISH_R;
      FINISH_R:    next = IDDLE;
      default:     next = IDDLE;
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state     <= IDDLE;
      cnt       <= '0;
      read_data <= '0;
      d_out     <= '0;
      dcx       <= 1'b1;
      csx       <= 1'b1;
      wrx       <= 1'b1;
      rdx       <= 1'b1;
      d_oe      <= 1'b0;
    end else begin
      state <= next;
      cnt   <= (state == READ_L_WAIT && next == READ_L_WAIT) ? cnt + 1'b1 : '0;
      if (take_host_wr) begin
        d_out <= wr_data;
        dcx   <= wr_dc;
      end else if (take_fifo) begin
        d_out <= fifo_q;
        dcx   <= 1'b1;
      end else if (take_host_rd) begin
        dcx   <= 1'b1;
      end
      if (state == READ_L_WAIT && next == EDGE_R) read_data <= d_in;
      csx  <= (next == IDDLE);
      wrx  <= !(next == WRITE || next == WRITE_WAIT);
      rdx  <= !(next == READ  || next == READ_L_WAIT);
      d_oe <=  (next == WRITE || next == WRITE_WAIT ||
                next == EDGE_W || next == FINISH_W);
    end
  end

  assign busy    = (state != IDDLE);
  assign state_o = state;

endmodule
