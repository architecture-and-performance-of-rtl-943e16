// tb_cesr_mpm_top: end-to-end test of the MPM system with the reset
// one-shot shortened to 200 clocks (all other parameters at their defaults).
// See cesr_tb_body.svh for what is run and checked.
`define CESR_DUT_PARAMS #(.RESET_CYCLES(200))
`define CESR_WATCHDOG 400000
module tb_cesr_mpm_top;
  `include "tb/cesr_tb_body.svh"
endmodule
