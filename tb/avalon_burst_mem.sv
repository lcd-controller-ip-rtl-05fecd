// avalon_burst_mem: behavioural Avalon-MM burst-read memory, for testbenches
// only (it stands for the SDRAM behind the system interconnect).
//
// Word at address a (one address unit per 32-bit word, the unit the DMA
// engine steps in) holds {16'(2a+1) ^ SEED, 16'(2a) ^ SEED}, so that each
// 32-bit word carries two consecutive 16-bit "pixels" 2a and 2a+1.
// Each read command is held off with waitrequest for WAIT_CYCLES clocks,
// then accepted; its burst of beats is returned in order, starting
// LATENCY clocks later, one beat per clock or, with GAPS set, with random
// idle clocks between beats. Commands are logged in cmd_addr / cmd_len.
module avalon_burst_mem #(
  parameter int          WAIT_CYCLES = 2,
  parameter int          LATENCY     = 3,
  parameter bit          GAPS        = 1'b1,
  parameter logic [15:0] SEED        = 16'h5A00
) (
  input  logic        clk,
  input  logic [31:0] am_address,
  input  logic        am_read,
  output logic        am_waitrequest,
  output logic [31:0] am_readdata,
  output logic        am_readdatavalid,
  input  logic [10:0] am_burstcount,
  input  logic [3:0]  am_byteenable
);
  logic [31:0] cmd_addr[$];
  int          cmd_len[$];
  int          wait_cnt = 0;
  logic [31:0] pend_addr[$];
  int          pend_due[$];
  int          cycle = 0;
  int          bad_be = 0;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return {16'(2 * a + 1) ^ SEED, 16'(2 * a) ^ SEED};
  endfunction

  initial begin
    am_readdatavalid = 1'b0;
    am_readdata      = '0;
  end

  assign am_waitrequest = am_read && (wait_cnt < WAIT_CYCLES);

  always @(posedge clk) begin
    cycle <= cycle + 1;
    am_readdatavalid <= 1'b0;
    if (am_read) begin
      if (wait_cnt < WAIT_CYCLES) begin
        wait_cnt <= wait_cnt + 1;
      end else begin
        wait_cnt <= 0;
        if (am_byteenable != 4'hF) bad_be <= bad_be + 1;
        cmd_addr.push_back(am_address);
        cmd_len.push_back(int'(am_burstcount));
        for (int i = 0; i < int'(am_burstcount); i++) begin
          pend_addr.push_back(am_address + 32'(i));
          pend_due.push_back(cycle + LATENCY);
        end
      end
    end
    if (pend_addr.size() != 0 && pend_due[0] <= cycle &&
        (!GAPS || ($urandom % 4) != 0)) begin
      am_readdatavalid <= 1'b1;
      am_readdata      <= word_at(pend_addr[0]);
      void'(pend_addr.pop_front());
      void'(pend_due.pop_front());
    end
  end
endmodule
