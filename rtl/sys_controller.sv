// sys_controller: the MPM system controller board (slot 1).
//
// Holds the three functions of the slot-1 board that are logic: the
// SYSRESET one-shot, the 16-request round-robin bus arbiter and the 1 us bus
// timer that ends hung cycles with BERR. The 16 MHz crystal oscillator is
// not logic; its clock enters as clk.
// Interface: power_good / reset_sw trigger the reset; br/bg are the sixteen
// request/grant pairs; bus_as and slave_ack watch the current cycle;
// berr is the timer's bus error and cyc_end the cycle end (any slave answer
// or the timer) that lets the arbiter move the grant on.
// Timing: see rrs_arbiter, bus_timer and reset_oneshot. The board's content
// is the system's description; the parameter defaults are its numbers
// (16 requests, 1 us at 16 MHz) except the reset length, which is the VMEbus
// minimum of 200 ms.
module sys_controller #(
  parameter int unsigned NREQ           = 16,
  parameter int unsigned TIMEOUT_CYCLES = 16,
  parameter int unsigned RESET_CYCLES   = 3_200_000
) (
  input  logic            clk,
  input  logic            power_good,
  input  logic            reset_sw,
  output logic            sysreset,
  input  logic [NREQ-1:0] br,
  output logic [NREQ-1:0] bg,
  input  logic            bus_as,
  input  logic            slave_ack,
  output logic            berr,
  output logic            cyc_end,
  output logic            bus_busy
);
  reset_oneshot #(.PULSE_CYCLES(RESET_CYCLES)) u_reset (
    .clk, .power_good, .reset_sw, .sysreset
  );

  bus_timer #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_timer (
    .clk, .rst(sysreset), .as_i(bus_as), .ack_i(slave_ack), .berr_o(berr)
  );

  assign cyc_end = slave_ack || berr;

  rrs_arbiter #(.N(NREQ)) u_arb (
    .clk, .rst(sysreset), .br, .cyc_end, .bg, .busy(bus_busy)
  );
endmodule
