// fifo_board: the MPM FIFO board, message passing among the processors.
//
// Sixteen FIFOs of 9 bits by 512 words, one per backplane slot. A single
// longword write to the board (offset 0) pushes its data bits 8:0 into every
// FIFO whose bit is set in data bits 31:16 (bit 16+i selects FIFO i), so one
// instruction can send the same message to any set of processors. A read of
// offset 0 returns the status word: bit i is FIFO i's NOT-EMPTY flag. A read
// of offset 4*(i+1) pops FIFO i and returns the word in bits 8:0; bit 31 is
// set when the FIFO was empty and nothing was popped.
// Board offsets are byte offsets from FIFO_BASE; other offsets answer with
// DTACK and no effect (reads give 0).
// Interface: req/sel/rsp as for every MPM slave; not_empty gives the flags
// directly for observation. Timing: DTACK two clocks after AS and sel; the
// board then waits for AS to drop. A push into a full FIFO is dropped.
// The FIFO count, size, the multicast write format and the NOT-EMPTY status
// word are the system's; the offsets of the pop ports, the empty marker in
// bit 31 and the dropping of a push into a full FIFO are this design's.
module fifo_board
  import mpm_pkg::*;
#(
  parameter int unsigned NFIFO = 16,
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  mpm_req_t         req,
  input  logic             sel,
  output mpm_rsp_t         rsp,
  output logic [NFIFO-1:0] not_empty
);
  logic [NFIFO-1:0] push, pop, empty, full;
  logic [WIDTH-1:0] rdata [NFIFO];

  typedef enum logic [1:0] {F_IDLE, F_ACK, F_DONE} fstate_e;
  fstate_e state;

  logic [7:0] off;
  logic       start;
  assign off   = req.addr[7:0];
  assign start = (state == F_IDLE) && req.as && sel;

  for (genvar i = 0; i < NFIFO; i++) begin : g_fifo
    assign push[i] = start && req.write && (off == 8'd0) && req.wdata[16+i];
    assign pop[i]  = start && !req.write && (off == 8'(4 * (i + 1)));
    sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .push(push[i]), .wdata(req.wdata[WIDTH-1:0]),
      .pop(pop[i]), .rdata(rdata[i]), .empty(empty[i]), .full(full[i])
    );
  end

  assign not_empty = ~empty;

  logic [31:0] rd_word;
  always_comb begin
    rd_word = '0;
    if (off == 8'd0) rd_word[NFIFO-1:0] = not_empty;
    for (int unsigned i = 0; i < NFIFO; i++) begin
      if (off == 8'(4 * (i + 1))) begin
        if (empty[i]) rd_word = 32'h8000_0000;
        else          rd_word = {{(32-WIDTH){1'b0}}, rdata[i]};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= F_IDLE;
      rsp   <= '0;
    end else begin
      rsp.dtack <= 1'b0;
      rsp.berr  <= 1'b0;
      unique case (state)
        F_IDLE: if (start) begin
          rsp.rdata <= req.write ? 32'd0 : rd_word;
          state     <= F_ACK;
        end
        F_ACK: begin
          rsp.dtack <= 1'b1;
          state     <= F_DONE;
        end
        F_DONE: if (!req.as) state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule
