// tb_mpm_memory: self-checking test of the 4 Mbyte ECC memory board.
// Random longword writes over the whole 4 Mbyte and a block of 1024
// consecutive ones, read back, are checked
// against an associative-array model, with the answer time checked at
// ACCESS_CYCLES+2 clocks from AS. With the diagnostic flip mask, a word
// written with one bad bit must read back correct with the 'corrected'
// flag, and one written with two bad bits must end the read with BERR and
// the 'uncorrectable' flag.
module tb_mpm_memory;
  import mpm_pkg::*;
  localparam int ACC = 4;
  logic clk = 0, rst = 1, sel = 0;
  mpm_req_t req;
  mpm_rsp_t rsp;
  logic [38:0] flip_mask = '0;
  logic corrected, uncorrectable;
  int checks = 0, failures = 0;
  int n_corr = 0, n_unc = 0;
  logic [31:0] model [logic [31:0]];

  mpm_memory #(.ACCESS_CYCLES(ACC)) dut (.clk, .rst, .req, .sel, .rsp, .flip_mask,
                                          .corrected, .uncorrectable);

  always #31 clk = ~clk;
  always @(posedge clk) begin
    if (corrected) n_corr++;
    if (uncorrectable) n_unc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  `include "tb/mpm_tb_bus.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, d, rd;
    bit be;
    int clocks, c0, u0;
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      a = {10'd0, 20'($urandom), 2'b00};
      if (i < 4) a = (i == 0) ? 32'h0 : (i == 1) ? 32'h003F_FFFC : a;
      d = $urandom;
      bus_cycle(1, a, d, rd, be, clocks);
      model[a] = d;
      check(!be && clocks == ACC + 2, $sformatf("write answered in %0d clocks", clocks));
    end
    // a block of 1024 consecutive longwords (address bits 2..11)
    for (int i = 0; i < 1024; i++) begin
      a = 32'h0002_0000 + 4 * i; d = $urandom;
      bus_cycle(1, a, d, rd, be, clocks);
      model[a] = d;
    end
    foreach (model[k]) begin
      bus_cycle(0, k, 0, rd, be, clocks);
      check(!be && rd == model[k], $sformatf("read %h got %h want %h", k, rd, model[k]));
      check(clocks == ACC + 2, "read answer time");
    end
    // single-bit error
    c0 = n_corr;
    for (int i = 0; i < 20; i++) begin
      a = {10'd0, 20'($urandom), 2'b00}; d = $urandom;
      flip_mask = 39'd1 << ($urandom % 39);
      bus_cycle(1, a, d, rd, be, clocks);
      flip_mask = '0;
      bus_cycle(0, a, 0, rd, be, clocks);
      check(!be && rd == d, "single-bit error corrected");
    end
    check(n_corr == c0 + 20, "corrected flagged every time");
    // double-bit error
    u0 = n_unc;
    for (int i = 0; i < 20; i++) begin
      int b1, b2;
      a = {10'd0, 20'($urandom), 2'b00}; d = $urandom;
      b1 = $urandom % 39; do b2 = $urandom % 39; while (b2 == b1);
      flip_mask = (39'd1 << b1) | (39'd1 << b2);
      bus_cycle(1, a, d, rd, be, clocks);
      flip_mask = '0;
      bus_cycle(0, a, 0, rd, be, clocks);
      check(be, "double-bit error ends the read with BERR");
    end
    check(n_unc == u0 + 20, "uncorrectable flagged every time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
