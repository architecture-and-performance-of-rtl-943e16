// rrs_arbiter: round-robin-select (RRS) bus arbiter for sixteen bus requests.
//
// The system controller in slot 1 grants the MPM backplane to one of up to
// sixteen masters, each with its own bus request (BR) and bus grant (BG) wire,
// instead of the four-level RRS of the VMEbus standard. Every master owns the
// bus for a single read or write, and the next owner is chosen while the
// current cycle runs, so the grant can move on in the cycle right after the
// current cycle ends.
//
// Interface: br[i] is held by master i until its cycle ends; bg is one-hot
// (or zero when no one asked) and registered. cyc_end is the bus DTACK or
// BERR pulse that ends the owner's cycle.
// Timing: an idle bus is granted one cycle after a request appears. When the
// owner's cycle ends, the grant moves to the next requester one cycle later.
// The search starts at the slot after the last owner, so every requester is
// served within N-1 other cycles. The 16 request lines and the round-robin
// rule follow the system's description; the starting slot after reset (slot 0)
// and the release of a grant whose master withdrew its request are choices
// of this design.
module rrs_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high (SYSRESET)
  input  logic [N-1:0] br,
  input  logic         cyc_end,  // DTACK or BERR on the bus
  output logic [N-1:0] bg,
  output logic         busy      // some master owns the bus
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] owner, last;
  logic          owned;

  // round-robin pick: first request after slot 'from', wrapping around
  function automatic logic [IW:0] pick(input logic [N-1:0] req,
                                       input logic [IW-1:0] from);
    logic [IW:0] r;
    int unsigned idx;
    r = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(from) + k) % N;
      if (req[idx] && !r[IW]) r = {1'b1, IW'(idx)};
    end
    return r;
  endfunction

  logic [IW:0]  nxt;
  logic [N-1:0] cand;

  always_comb begin
    cand = br;
    if (owned) cand[owner] = 1'b0;       // the owner is done or withdrawing
    nxt = pick(cand, owned ? owner : last);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      owned <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else if (!owned || cyc_end || !br[owner]) begin
      owned <= nxt[IW];
      if (nxt[IW]) owner <= nxt[IW-1:0];
      if (owned)   last  <= owner;
    end
  end

  always_comb begin
    bg = '0;
    if (owned) bg[owner] = 1'b1;
  end
  assign busy = owned;

  // at most one grant at a time
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(bg));

endmodule
