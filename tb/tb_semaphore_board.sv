// tb_semaphore_board: self-checking test of the test-and-set semaphores.
// After the post-reset clearing sweep every semaphore reads CLEAR the first
// time and SET after that; a write clears it again. Semaphores next to each
// other (same 32-bit storage word) must not disturb one another. Random
// traffic is checked against a bit model. Answer time: 2 clocks from AS.
module tb_semaphore_board;
  import mpm_pkg::*;
  logic clk = 0, rst = 1, sel = 0, ready;
  mpm_req_t req;
  mpm_rsp_t rsp;
  int checks = 0, failures = 0;
  bit model [logic [31:0]];

  semaphore_board dut (.clk, .rst, .req, .sel, .rsp, .ready);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  `include "tb/mpm_tb_bus.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, rd;
    bit be, exp;
    int clocks, sweep;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    sweep = 0;
    while (!ready) begin @(negedge clk); sweep++; end
    check(sweep == MEM_BYTES / 4 / 32, $sformatf("clearing sweep %0d clocks", sweep));
    // neighbours in one storage word
    for (int i = 0; i < 32; i++) begin
      bus_cycle(0, SEM_BASE + 32'h100 + 4 * i, 0, rd, be, clocks);
      check(rd == 0 && !be, "first read of a semaphore finds CLEAR");
      check(clocks == 2, $sformatf("answer in %0d clocks", clocks));
    end
    for (int i = 0; i < 32; i++) begin
      bus_cycle(0, SEM_BASE + 32'h100 + 4 * i, 0, rd, be, clocks);
      check(rd == 1, "second read finds SET");
    end
    for (int i = 0; i < 32; i += 2) bus_cycle(1, SEM_BASE + 32'h100 + 4 * i, $urandom, rd, be, clocks);
    for (int i = 0; i < 32; i++) begin
      bus_cycle(0, SEM_BASE + 32'h100 + 4 * i, 0, rd, be, clocks);
      check(rd == ((i % 2 == 0) ? 0 : 1), $sformatf("after clearing evens, sem %0d", i));
    end
    // random traffic over a few hundred semaphores, including the ends
    for (int i = 0; i < 3000; i++) begin
      a = SEM_BASE + 32'h1000 + 4 * ($urandom % 300);
      if (i % 7 == 0) a = SEM_BASE + MEM_BYTES - 4 - 4 * ($urandom % 40);
      exp = model.exists(a) ? model[a] : 1'b0;
      if ($urandom % 3 == 0) begin
        bus_cycle(1, a, $urandom, rd, be, clocks);
        model[a] = 0;
      end else begin
        bus_cycle(0, a, 0, rd, be, clocks);
        check(rd == {31'd0, exp}, "test-and-set returns old state");
        model[a] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
