// tb_vax_mpm_slave: self-checking test of the 32 VAX register sets.
// The testbench drives the cable as the master board does and models the
// MPM bus. For random interleaved accesses by 32 "processes", each using its
// own register set, it checks against a model: address halves are stored;
// writing the upper data half needs no bus cycle, writing the lower half
// makes one MPM write of the whole longword; reading the upper half makes
// one MPM read and returns bits 31:16, reading the lower half then returns
// bits 15:0 with no bus cycle; the auto-increment registers step the address
// by 4 after each MPM access; the status register records a bus error and
// a write clears it.
module tb_vax_mpm_slave;
  import mpm_pkg::*;
  logic clk = 0, sysreset = 1;
  vax_m2s_t m2s;
  vax_s2m_t s2m;
  logic br, bg;
  mpm_req_t req;
  mpm_rsp_t rsp;
  int checks = 0, failures = 0;

  vax_mpm_slave #(.NSETS(32)) dut (.clk, .sysreset, .m2s, .s2m, .br, .bg, .req, .rsp);

  always #31 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  `include "tb/mpm_tb_slavebus.svh"

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one VAX access through the cable; returns read data and bus cycles used
  task automatic acc(input bit wr, input int set, input int rg, input bit lower,
                     input logic [15:0] d, output logic [15:0] rd, output int cyc);
    int n, c0;
    c0 = bus_cycles;
    m2s = '0;
    m2s.as = 1; m2s.write = wr; m2s.ad = {8'd0, 5'(set), 2'(rg), lower};
    n = 0;
    do begin @(negedge clk); n++; end while (!s2m.aack && n < 100);
    m2s.ds = 1; m2s.ad = wr ? d : 16'd0;
    n = 0;
    do begin @(negedge clk); n++; end while (!s2m.dack && n < 200);
    check(s2m.dack, "data acknowledged");
    rd = s2m.ad;
    m2s = '0;
    n = 0;
    do begin @(negedge clk); n++; end while ((s2m.aack || s2m.dack) && n < 100);
    cyc = bus_cycles - c0;
  endtask

  logic [31:0] m_addr [32];
  logic [31:0] m_data [32];
  bit          m_berr [32];
  logic [31:0] mem [logic [31:0]];

  initial begin
    logic [15:0] rd, d;
    int cyc, s, rg;
    bit lo;
    m2s = '0;
    foreach (m_addr[i]) begin m_addr[i] = 0; m_data[i] = 0; m_berr[i] = 0; end
    repeat (3) @(negedge clk);
    sysreset = 0;
    @(negedge clk);
    // every set gets its own area
    for (int i = 0; i < 32; i++) begin
      acc(1, i, VREG_ADDR, 0, 16'h0000, rd, cyc);
      acc(1, i, VREG_ADDR, 1, 16'(i * 256), rd, cyc);
      m_addr[i] = i * 256;
      check(cyc == 0, "address write uses no bus cycle");
    end
    for (int k = 0; k < 2500; k++) begin
      s = $urandom % 32;
      rg = $urandom % 4;
      lo = 1'($urandom);
      if (rg == VREG_ADDR && $urandom % 8 == 0) begin
        // occasionally point a set at a non-existent device
        acc(1, s, VREG_ADDR, 0, 16'h0200, rd, cyc);
        m_addr[s][31:16] = 16'h0200;
      end else if (rg == VREG_ADDR) begin
        acc(0, s, VREG_ADDR, lo, 0, rd, cyc);
        check(rd == (lo ? m_addr[s][15:0] : m_addr[s][31:16]), "address register read");
        if (m_addr[s][31:16] != 0 && $urandom % 2) begin
          acc(1, s, VREG_ADDR, 0, 16'h0000, rd, cyc);
          m_addr[s][31:16] = 0;
        end
      end else if (rg == VREG_STATUS) begin
        acc(0, s, VREG_STATUS, 1, 0, rd, cyc);
        check(rd == {15'd0, m_berr[s]}, "status shows the last bus error");
        if ($urandom % 2) begin
          acc(1, s, VREG_STATUS, 0, 0, rd, cyc);
          m_berr[s] = 0;
        end
      end else if ($urandom % 2) begin
        // write: upper half then lower half
        d = 16'($urandom);
        acc(1, s, rg, 0, d, rd, cyc);
        check(cyc == 0, "upper data half write stays on the board");
        m_data[s][31:16] = d;
        d = 16'($urandom);
        acc(1, s, rg, 1, d, rd, cyc);
        m_data[s][15:0] = d;
        check(cyc == 1, "lower data half write makes one MPM write");
        m_berr[s] = (m_addr[s] >= 32'h0100_0000);
        if (!m_berr[s]) begin
          check(bmem[m_addr[s]] == m_data[s], "MPM write of the whole longword");
          mem[m_addr[s]] = m_data[s];
        end
        if (rg == VREG_AUTOINC) m_addr[s] += 4;
      end else begin
        // read: upper half then lower half
        acc(0, s, rg, 0, 0, rd, cyc);
        check(cyc == 1, "upper data half read makes one MPM read");
        m_berr[s] = (m_addr[s] >= 32'h0100_0000);
        if (!m_berr[s]) begin
          m_data[s] = mem.exists(m_addr[s]) ? mem[m_addr[s]] : 32'hBAD0_0000;
          check(rd == m_data[s][31:16], "upper half of the MPM word");
          acc(0, s, rg, 1, 0, rd, cyc);
          check(cyc == 0 && rd == m_data[s][15:0], "lower half from the latch");
        end
        if (rg == VREG_AUTOINC) m_addr[s] += 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
