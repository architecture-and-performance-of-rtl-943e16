// mpm_bus_master: the MPM-bus side shared by the VME and VAX slave boards.
//
// Performs one longword read or write on the MPM backplane per start pulse:
// raises the bus request, waits for the grant, drives AS with address,
// direction and data until DTACK or BERR, then drops AS and the request in
// the same step, so the board owns the bus for exactly one operation.
// Interface: start (one cycle, while idle) with write/addr/wdata; done pulses
// for one cycle at the end with rdata and berr valid (held until the next
// start). br/bg/req/rsp face the backplane.
// Timing: done follows the bus answer by one clock; the request is dropped
// in that same clock.
module mpm_bus_master
  import mpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        write,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        done,
  output logic        busy,
  output logic [31:0] rdata,
  output logic        berr,
  output logic        br,
  input  logic        bg,
  output mpm_req_t    req,
  input  mpm_rsp_t    rsp
);
  typedef enum logic [1:0] {B_IDLE, B_REQ, B_OWN} bstate_e;
  bstate_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_IDLE;
      req   <= '0;
      br    <= 1'b0;
      done  <= 1'b0;
      rdata <= '0;
      berr  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          br        <= 1'b1;
          req.write <= write;
          req.addr  <= {addr[31:2], 2'b00};
          req.wdata <= wdata;
          state     <= B_REQ;
        end
        B_REQ: if (bg) begin
          req.as <= 1'b1;
          state  <= B_OWN;
        end
        B_OWN: if (rsp.dtack || rsp.berr) begin
          req.as <= 1'b0;
          br     <= 1'b0;
          rdata  <= rsp.rdata;
          berr   <= rsp.berr;
          done   <= 1'b1;
          state  <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end
  assign busy = (state != B_IDLE);

  // bus rules: AS only while the request is up, and once raised AS and the
  // cycle's fields stay unchanged until the cycle is answered
  a_as_needs_br: assert property (@(posedge clk) disable iff (rst) req.as |-> br);
  a_as_held: assert property (@(posedge clk) disable iff (rst)
    req.as && !(rsp.dtack || rsp.berr) |=> req.as && $stable(req.addr) && $stable(req.write)
                                           && $stable(req.wdata));
endmodule
