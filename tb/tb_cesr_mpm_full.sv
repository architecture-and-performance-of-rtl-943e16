// tb_cesr_mpm_full: end-to-end test of the MPM system with every parameter
// at its default, including the 200 ms (3.2 million clock) power-up reset.
// See cesr_tb_body.svh for what is run and checked.
`define CESR_DUT_PARAMS
`define CESR_WATCHDOG 8000000
module tb_cesr_mpm_full;
  `include "tb/cesr_tb_body.svh"
endmodule
