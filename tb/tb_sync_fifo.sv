// tb_sync_fifo: self-checking test of one 9-bit by 512-word FIFO chip.
// Fills it to 512 words against a queue model, checks full and that a 513th
// push is dropped, drains it in order, then runs random push/pop traffic
// against the model.
module tb_sync_fifo;
  logic clk = 0, rst = 1, push = 0, pop = 0, empty, full;
  logic [8:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [8:0] model [$];

  sync_fifo #(.WIDTH(9), .DEPTH(512)) dut (.clk, .rst, .push, .wdata, .pop, .rdata, .empty, .full);

  always #5 clk = ~clk;

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

  // one clock of traffic with the model updated alongside
  task automatic step(input bit pu, input bit po);
    push = pu; pop = po; wdata = 9'($urandom);
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == 512), "full flag");
    if (po && model.size() > 0) check(rdata == model[0], "data order");
    @(negedge clk);
    begin
      bit was_full;
      was_full = (model.size() == 512);      // a push into a full FIFO is dropped
      if (po && model.size() > 0) void'(model.pop_front());
      if (pu && !was_full) model.push_back(wdata);
    end
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 513; i++) step(1, 0);
    check(full && model.size() == 512, "full after 512 pushes, extra dropped");
    for (int i = 0; i < 512; i++) step(0, 1);
    check(empty, "empty after draining");
    for (int i = 0; i < 4000; i++) step($urandom % 2, $urandom % 3 == 0);
    for (int i = 0; i < 4000; i++) step($urandom % 3 == 0, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
