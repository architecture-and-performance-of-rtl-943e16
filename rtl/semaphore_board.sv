// semaphore_board: the MPM semaphore board, an array of test-and-set bits.
//
// There is one semaphore per longword of the 4 Mbyte memory; the semaphore
// of memory address A is at A + SEM_BASE. Reading a semaphore returns its old
// state in data bit 0 (1 = SET, 0 = CLEAR) and sets it in the same bus
// cycle, so that a single bus ownership both tests and claims it. Writing a
// semaphore (any data) clears it. The semaphores do not guard memory: the
// software that shares a critical section must use them.
// The bits are kept as WORDS/32 words of 32 bits. After reset the board
// clears all of them, one word per clock, and answers no bus cycle until it
// has finished (ready goes high); a cycle in that time ends with the bus
// timeout.
// Interface: req/sel/rsp as for every MPM slave. Timing: DTACK two clocks
// after AS and sel; the board then waits for AS to drop.
// The test-and-set rule, one semaphore per longword and the address offset
// are the system's; the data bit used, the answer time and the clearing
// after reset are this design's.
module semaphore_board
  import mpm_pkg::*;
#(
  parameter int unsigned BYTES = MEM_BYTES   // memory covered by semaphores
) (
  input  logic     clk,
  input  logic     rst,
  input  mpm_req_t req,
  input  logic     sel,
  output mpm_rsp_t rsp,
  output logic     ready
);
  localparam int unsigned NSEM  = BYTES / 4;
  localparam int unsigned NROW  = NSEM / 32;
  localparam int unsigned RW    = $clog2(NROW);

  logic [31:0] bits [NROW];

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_ACK, S_DONE} sstate_e;
  sstate_e     state;
  logic [RW-1:0] sweep;
  logic [RW-1:0] row;
  logic [4:0]    col;
  logic [31:0]   cur;

  assign row = req.addr[RW+6:7];
  assign col = req.addr[6:2];
  assign cur = bits[row];

  always_ff @(posedge clk) begin
    if (state == S_CLEAR) bits[sweep] <= '0;
    else if (state == S_IDLE && req.as && sel) begin
      if (req.write) bits[row] <= cur & ~(32'd1 << col);
      else           bits[row] <= cur |  (32'd1 << col);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_CLEAR;
      sweep <= '0;
      rsp   <= '0;
    end else begin
      rsp.dtack <= 1'b0;
      rsp.berr  <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          sweep <= sweep + 1'b1;
          if (sweep == RW'(NROW - 1)) state <= S_IDLE;
        end
        S_IDLE: if (req.as && sel) begin
          rsp.rdata <= {31'd0, cur[col]};
          state     <= S_ACK;
        end
        S_ACK: begin
          rsp.dtack <= 1'b1;
          state     <= S_DONE;
        end
        S_DONE: if (!req.as) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
  assign ready = (state != S_CLEAR);
endmodule
