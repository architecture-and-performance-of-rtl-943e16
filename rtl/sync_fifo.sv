// sync_fifo: one FIFO chip of the MPM FIFO board, WIDTH bits by DEPTH words.
//
// A single-clock first-in first-out store with first-word fall-through:
// rdata shows the oldest word whenever empty is low, and pop removes it.
// A push into a full FIFO is dropped; a pop of an empty one does nothing.
// Both may happen in the same cycle. Storage is an array (a memory) with
// separate read and write pointers one bit wider than the address, so full
// and empty are told apart by the extra bit.
// Timing: a pushed word is visible (empty low) the next cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end
endmodule
