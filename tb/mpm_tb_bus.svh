// Shared testbench task for driving one MPM bus cycle into a slave board.
// Expects in scope: clk, req (mpm_req_t), sel, rsp (mpm_rsp_t).
// Raises AS with the given fields at a falling edge, waits for DTACK or BERR,
// then drops AS. Returns the read data, whether BERR ended the cycle and the
// number of clocks from AS to the answer.
task automatic bus_cycle(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                         output logic [31:0] rd, output bit be, output int clocks);
  req.as = 1; req.write = wr; req.addr = a; req.wdata = wd; sel = 1;
  clocks = 0;
  do begin
    @(negedge clk);
    clocks++;
  end while (!rsp.dtack && !rsp.berr && clocks < 1000);
  rd = rsp.rdata; be = rsp.berr;
  req.as = 0; sel = 0;
  @(negedge clk);
endtask
