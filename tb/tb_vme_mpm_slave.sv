// tb_vme_mpm_slave: self-checking test of the MPM-side VME interface board.
// The testbench drives the cable as the master board does and models the
// MPM bus. Checked: the address is acknowledged; on a read the board fetches
// the MPM word and gives the bus back before the master asks for the data
// (the testbench asks 20 clocks late and checks the bus cycle is over and
// BR is down); on a write it asks for the bus only after the data arrives;
// each access uses exactly one bus cycle; bus errors come back on the cable;
// the MPM reset appears on the cable.
module tb_vme_mpm_slave;
  import mpm_pkg::*;
  logic clk = 0, sysreset = 1;
  vme_m2s_t m2s;
  vme_s2m_t s2m;
  logic br, bg;
  mpm_req_t req;
  mpm_rsp_t rsp;
  int checks = 0, failures = 0;

  vme_mpm_slave dut (.clk, .sysreset, .m2s, .s2m, .br, .bg, .req, .rsp);

  always #31 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  `include "tb/mpm_tb_slavebus.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cable(input bit wr, input logic [31:0] a, input logic [31:0] d,
                       output logic [31:0] rd, output bit be);
    int n, c0;
    c0 = bus_cycles;
    m2s = '0;
    m2s.as = 1; m2s.write = wr; m2s.ad = a;
    n = 0;
    do begin @(negedge clk); n++; end while (!s2m.aack && n < 100);
    check(s2m.aack, "address acknowledged");
    if (wr) begin
      repeat (10) @(negedge clk);
      check(bus_cycles == c0 && !br, "no bus request before the write data");
      m2s.ad = d; m2s.ds = 1;
    end else begin
      m2s.ad = 0;
      repeat (20) @(negedge clk);
      check(bus_cycles == c0 + 1 && !br, "read done and bus released before DS");
      m2s.ds = 1;
    end
    n = 0;
    do begin @(negedge clk); n++; end while (!s2m.dack && n < 100);
    check(s2m.dack, "data acknowledged");
    rd = s2m.ad; be = s2m.berr;
    check(bus_cycles == c0 + 1, "exactly one MPM bus cycle per access");
    m2s = '0;
    n = 0;
    do begin @(negedge clk); n++; end while ((s2m.aack || s2m.dack) && n < 100);
    check(!s2m.aack && !s2m.dack, "acknowledges fall after AS");
  endtask

  initial begin
    logic [31:0] a, d, rd;
    bit be;
    logic [31:0] model [logic [31:0]];
    m2s = '0;
    repeat (3) @(negedge clk);
    check(s2m.reset, "MPM reset on the cable");
    sysreset = 0;
    @(negedge clk);
    check(!s2m.reset, "reset released on the cable");
    for (int i = 0; i < 150; i++) begin
      a = 4 * ($urandom % 32);
      if ($urandom % 2) begin
        d = $urandom;
        cable(1, a, d, rd, be);
        model[a] = d;
        check(!be && bmem[a] == d, "write reaches the MPM");
      end else begin
        cable(0, a, 0, rd, be);
        check(!be && rd == (model.exists(a) ? model[a] : 32'hBAD0_0000), "read data");
      end
    end
    cable(0, 32'h0200_0000, 0, rd, be);
    check(be, "read bus error on the cable");
    cable(1, 32'h0200_0000, 5, rd, be);
    check(be, "write bus error on the cable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
