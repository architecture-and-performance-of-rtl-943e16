// tb_fifo_board: self-checking test of the 16-FIFO message board.
// Multicast writes with random FIFO masks in data bits 31:16 are checked
// against sixteen queue models: the status word (offset 0) must show the
// NOT-EMPTY bit of every FIFO, and each pop port (offset 4*(i+1)) must
// return that FIFO's words in order, with bit 31 set once it is empty. One
// FIFO is filled past 512 words to check that the overflow is dropped.
module tb_fifo_board;
  import mpm_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  mpm_req_t req;
  mpm_rsp_t rsp;
  logic [15:0] not_empty;
  int checks = 0, failures = 0;
  logic [8:0] model [16][$];

  fifo_board dut (.clk, .rst, .req, .sel, .rsp, .not_empty);

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

  function automatic logic [15:0] model_status();
    logic [15:0] s;
    for (int i = 0; i < 16; i++) s[i] = (model[i].size() != 0);
    return s;
  endfunction

  task automatic send(input logic [15:0] mask, input logic [8:0] d);
    logic [31:0] rd; bit be; int clocks;
    bus_cycle(1, FIFO_BASE, {mask, 7'd0, d}, rd, be, clocks);
    check(!be && clocks == 2, "multicast write answered in 2 clocks");
    for (int i = 0; i < 16; i++)
      if (mask[i] && model[i].size() < 512) model[i].push_back(d);
  endtask

  task automatic receive(input int i);
    logic [31:0] rd; bit be; int clocks;
    bus_cycle(0, FIFO_BASE + 4 * (i + 1), 0, rd, be, clocks);
    if (model[i].size() == 0) check(rd == 32'h8000_0000, "empty FIFO read marked");
    else check(rd == {23'd0, model[i].pop_front()}, $sformatf("FIFO %0d data order", i));
  endtask

  task automatic status();
    logic [31:0] rd; bit be; int clocks;
    bus_cycle(0, FIFO_BASE, 0, rd, be, clocks);
    check(rd == {16'd0, model_status()}, $sformatf("status %h want %h", rd, model_status()));
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    status();
    for (int r = 0; r < 1500; r++) begin
      case ($urandom % 3)
        0: send(16'($urandom) & 16'($urandom), 9'($urandom));
        1: receive($urandom % 16);
        default: status();
      endcase
    end
    // overflow of FIFO 5
    while (model[5].size() > 0) receive(5);
    for (int k = 0; k < 520; k++) send(16'h0020, 9'(k));
    status();
    for (int k = 0; k < 514; k++) receive(5);
    status();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
