// Shared testbench model of the MPM side seen by one interface board: a
// grant given a random 0..5 clocks after the request, and a memory that
// answers after 3 clocks with DTACK, or with BERR for addresses at or above
// 0x0100_0000. Counts the bus cycles and remembers the time of the last one.
// Expects in scope: clk, br, bg, req (mpm_req_t), rsp (mpm_rsp_t).
logic [31:0] bmem [logic [31:0]];
int          bus_cycles = 0;
time         last_bus_end = 0;
initial begin
  bg = 0; rsp = '0;
  forever begin
    @(negedge clk);
    if (br) begin
      repeat ($urandom % 6) @(negedge clk);
      bg = 1;
      while (!req.as) @(negedge clk);
      repeat (3) @(negedge clk);
      if (req.addr >= 32'h0100_0000) rsp.berr = 1;
      else begin
        rsp.dtack = 1;
        if (req.write) bmem[req.addr] = req.wdata;
        else rsp.rdata = bmem.exists(req.addr) ? bmem[req.addr] : 32'hBAD0_0000;
      end
      bus_cycles++;
      @(negedge clk);
      rsp = '0; bg = 0;
      last_bus_end = $time;
    end
  end
end
