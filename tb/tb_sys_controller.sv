// tb_sys_controller: self-checking test of the system controller board.
// After the power-up reset (shortened to 50 clocks) three model masters
// request the bus. Each owner raises AS a clock after its grant; the model
// slave answers slots 2 and 9 after 3 clocks and never answers slot 13,
// whose cycle the timer must end with BERR 16 clocks after AS. Grants must
// rotate 2, 9, 13, 2, ... and the switch press must reset the arbiter.
module tb_sys_controller;
  logic clk = 0, power_good = 0, reset_sw = 0, sysreset;
  logic [15:0] br, bg;
  logic bus_as, slave_ack, berr, cyc_end, bus_busy;
  int checks = 0, failures = 0;

  sys_controller #(.NREQ(16), .TIMEOUT_CYCLES(16), .RESET_CYCLES(50)) dut (
    .clk, .power_good, .reset_sw, .sysreset, .br, .bg, .bus_as, .slave_ack,
    .berr, .cyc_end, .bus_busy);

  always #31 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(input logic [15:0] v);
    for (int i = 0; i < 16; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    int n, owner, clocks, order [3];
    order = '{2, 9, 13};
    br = 0; bus_as = 0; slave_ack = 0;
    repeat (3) @(negedge clk);
    power_good = 1;
    n = 0;
    while (sysreset && n < 1000) begin @(negedge clk); n++; end
    check(n == 51, $sformatf("power-up reset %0d clocks", n));
    br = 16'h2204;
    for (int k = 0; k < 9; k++) begin
      n = 0;
      while (bg == 0 && n < 50) begin @(negedge clk); n++; end
      owner = idx(bg);
      check(owner == order[k % 3], $sformatf("grant %0d to slot %0d (got %0d)", k, order[k % 3], owner));
      @(negedge clk);
      bus_as = 1;
      clocks = 0;
      do begin
        if (owner != 13 && clocks == 2) slave_ack = 1;
        @(negedge clk);
        slave_ack = 0;
        clocks++;
      end while (!cyc_end && clocks < 100);
      if (owner == 13) check(berr && clocks == 16, $sformatf("timeout BERR after %0d clocks", clocks));
      else             check(!berr && clocks == 3, "answered cycle has no BERR");
      bus_as = 0;
      @(negedge clk);
      check(idx(bg) == order[(k + 1) % 3], "next grant one clock after the cycle end");
    end
    // switch press: reset returns the arbiter to idle
    reset_sw = 1; repeat (4) @(negedge clk); reset_sw = 0;
    check(sysreset && bg == 0, "switch resets the bus");
    n = 0;
    while (sysreset && n < 1000) begin @(negedge clk); n++; end
    check(n > 50, "reset held after the switch");
    @(negedge clk);
    check(idx(bg) == 2, "after reset the search starts at slot 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
