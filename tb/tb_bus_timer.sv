// tb_bus_timer: self-checking test of the 1 us bus timeout.
// A cycle that no slave answers must end with exactly one BERR pulse on its
// 16th clock (1 us at 16 MHz). A cycle answered before then must get none,
// and the count must restart for every new cycle.
module tb_bus_timer;
  logic clk = 0, rst = 1, as_i = 0, ack_i = 0, berr_o;
  int checks = 0, failures = 0;

  bus_timer #(.TIMEOUT_CYCLES(16)) dut (.clk, .rst, .as_i, .ack_i, .berr_o);

  always #31 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, first, pulses;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 5; r++) begin
      // unanswered cycle: measure clocks from AS to BERR
      as_i = 1; n = 0; first = -1; pulses = 0;
      for (int c = 1; c <= 40; c++) begin
        @(negedge clk);
        if (berr_o) begin pulses++; if (first < 0) first = c; end
      end
      check(first == 16, $sformatf("BERR after 16 clocks (got %0d)", first));
      check(pulses == 1, $sformatf("one BERR pulse (got %0d)", pulses));
      as_i = 0;
      repeat (2) @(negedge clk);
      // answered cycle after a random number of clocks below the limit
      as_i = 1; pulses = 0;
      n = 1 + $urandom % 14;
      repeat (n) begin @(negedge clk); if (berr_o) pulses++; end
      ack_i = 1; @(negedge clk); ack_i = 0; as_i = 0;
      repeat (30) begin @(negedge clk); if (berr_o) pulses++; end
      check(pulses == 0, "no BERR for an answered cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
