// tb_reset_oneshot: self-checking test of the SYSRESET one-shot.
// Reset must be active while power is not good, stay active PULSE_CYCLES
// clocks after power comes good, drop, and come back for PULSE_CYCLES clocks
// after each press of the manual reset switch (plus the two-flop input
// synchroniser). The pulse length is shortened to 100 clocks here.
module tb_reset_oneshot;
  localparam int P = 100;
  logic clk = 0, power_good = 0, reset_sw = 0, sysreset;
  int checks = 0, failures = 0;

  reset_oneshot #(.PULSE_CYCLES(P)) dut (.clk, .power_good, .reset_sw, .sysreset);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(output int len);
    len = 0;
    while (sysreset && len < 10 * P) begin @(negedge clk); len++; end
  endtask

  initial begin
    int len, hold;
    repeat (5) @(negedge clk);
    check(sysreset, "reset active while power is not good");
    power_good = 1;
    @(negedge clk);
    measure(len);
    check(len == P, $sformatf("power-up pulse %0d clocks (want %0d)", len, P));
    repeat (20) begin @(negedge clk); check(!sysreset, "reset stays off"); end
    for (int r = 0; r < 4; r++) begin
      hold = 1 + $urandom % 20;
      reset_sw = 1;
      repeat (3) @(negedge clk);
      check(sysreset, "switch press resets");
      repeat (hold) @(negedge clk);
      reset_sw = 0;
      // two clocks for the synchroniser, one for the trigger to fall
      repeat (3) @(negedge clk);
      measure(len);
      check(len == P, $sformatf("switch pulse %0d clocks after release (want %0d)", len, P));
      repeat (10) @(negedge clk);
    end
    power_good = 0;
    @(negedge clk);
    check(sysreset, "power loss resets at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
