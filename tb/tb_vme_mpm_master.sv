// tb_vme_mpm_master: self-checking test of the XBP-side interface board.
// The testbench plays the slave board on the cable, with random delays, and
// a memory behind it. Checked: only XBP addresses in 0x300000..0xFFFFFF are
// taken; the cable carries the address minus 0x300000 first and the write
// data only after the address acknowledge; reads return the slave's data;
// an MPM bus error reaches the XBP as BERR; the MPM reset reaches the XBP.
module tb_vme_mpm_master;
  import mpm_pkg::*;
  logic clk = 0, rst = 1;
  logic cpu_as = 0, cpu_write = 0, cpu_dtack, cpu_berr, xbp_reset;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  vme_m2s_t m2s;
  vme_s2m_t s2m;
  int checks = 0, failures = 0;
  logic [31:0] mem [logic [31:0]];

  vme_mpm_master dut (.clk, .rst, .cpu_as, .cpu_write, .cpu_addr, .cpu_wdata,
    .cpu_dtack, .cpu_berr, .cpu_rdata, .xbp_reset, .m2s, .s2m);

  always #31 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave-board model: addresses at or above 0xC00000 end in a bus error
  logic [31:0] s_addr;
  initial begin
    s2m = '0;
    forever begin
      @(negedge clk);
      if (m2s.as) begin
        s_addr = m2s.ad;
        repeat ($urandom % 4) @(negedge clk);
        s2m.aack = 1;
        @(negedge clk);
        while (!m2s.ds) @(negedge clk);
        repeat ($urandom % 6) @(negedge clk);
        s2m.berr = (s_addr >= 32'h00C0_0000);
        if (m2s.write) mem[s_addr] = m2s.ad;
        else s2m.ad = mem.exists(s_addr) ? mem[s_addr] : 32'hDEAD_0000;
        s2m.dack = 1;
        while (m2s.as) @(negedge clk);
        s2m.aack = 0; s2m.dack = 0; s2m.berr = 0; s2m.ad = 0;
      end
    end
  end

  // the address must never be followed by data before the acknowledge
  always @(negedge clk) if (m2s.ds && !s2m.aack && m2s.as) begin
    checks++; failures++; $display("FAIL DS before address acknowledge");
  end

  task automatic xbp_cycle(input bit wr, input logic [31:0] a, input logic [31:0] d,
                           output logic [31:0] rd, output bit be, output bit answered);
    int n;
    cpu_as = 1; cpu_write = wr; cpu_addr = a; cpu_wdata = d;
    n = 0;
    do begin @(negedge clk); n++; end while (!cpu_dtack && !cpu_berr && n < 200);
    answered = (n < 200);
    rd = cpu_rdata; be = cpu_berr;
    cpu_as = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] a, d, rd;
    bit be, ans;
    logic [31:0] model [logic [31:0]];
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      a = 32'h0030_0000 + 4 * ($urandom % 64);
      if ($urandom % 2) begin
        d = $urandom;
        xbp_cycle(1, a, d, rd, be, ans);
        model[a - 32'h30_0000] = d;
        check(ans && !be, "write in the window answered");
        check(mem[a - 32'h30_0000] == d, "address minus base and data on the cable");
      end else begin
        xbp_cycle(0, a, 0, rd, be, ans);
        check(ans && !be, "read in the window answered");
        check(rd == (model.exists(a - 32'h30_0000) ? model[a - 32'h30_0000] : 32'hDEAD_0000),
              "read data from the cable");
      end
    end
    xbp_cycle(0, 32'h00F0_0000, 0, rd, be, ans);
    check(ans && be, "MPM bus error returned as BERR");
    xbp_cycle(1, 32'h002F_FFFC, 1, rd, be, ans);
    check(!ans, "address below the window not taken");
    xbp_cycle(1, 32'h0100_0000, 1, rd, be, ans);
    check(!ans, "address above the window not taken");
    xbp_cycle(0, 32'h00FF_FFFC, 0, rd, be, ans);
    check(ans && be, "top of the window taken");
    s2m.reset = 1; #1;
    check(xbp_reset, "MPM reset passed to the XBP");
    s2m.reset = 0; #1;
    check(!xbp_reset, "reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
