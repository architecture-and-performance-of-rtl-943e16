// tb_vax_mpm_master: self-checking test of the VAX-side interface board.
// The testbench plays the slave board on the cable as a plain 256-entry
// register file of 16-bit halves. Checked: only the 512-byte block at
// 764000 (octal) is answered; the cable carries VAX address bits 8:1 as the
// register number, then the write data after the acknowledge; reads return
// the slave's data.
module tb_vax_mpm_master;
  import mpm_pkg::*;
  localparam logic [17:0] BASE = 18'o764000;
  logic clk = 0, rst = 1;
  logic vax_req = 0, vax_write = 0, vax_ack;
  logic [17:0] vax_addr = 0;
  logic [15:0] vax_wdata = 0, vax_rdata;
  vax_m2s_t m2s;
  vax_s2m_t s2m;
  int checks = 0, failures = 0;
  logic [15:0] regs [256];

  vax_mpm_master dut (.clk, .rst, .vax_req, .vax_write, .vax_addr, .vax_wdata,
    .vax_ack, .vax_rdata, .m2s, .s2m);

  always #50 clk = ~clk;

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

  logic [7:0] rn;
  initial begin
    s2m = '0;
    foreach (regs[i]) regs[i] = 16'(i * 3 + 1);
    forever begin
      @(negedge clk);
      if (m2s.as) begin
        rn = m2s.ad[7:0];
        if (m2s.ad[15:8] != 0) begin checks++; failures++; $display("FAIL register number width"); end
        repeat ($urandom % 4) @(negedge clk);
        s2m.aack = 1;
        @(negedge clk);
        while (!m2s.ds) @(negedge clk);
        repeat ($urandom % 6) @(negedge clk);
        if (m2s.write) regs[rn] = m2s.ad;
        else s2m.ad = regs[rn];
        s2m.dack = 1;
        while (m2s.as) @(negedge clk);
        s2m = '0;
      end
    end
  end

  task automatic vax_cycle(input bit wr, input logic [17:0] a, input logic [15:0] d,
                           output logic [15:0] rd, output bit answered);
    int n;
    vax_req = 1; vax_write = wr; vax_addr = a; vax_wdata = d;
    n = 0;
    do begin @(negedge clk); n++; end while (!vax_ack && n < 200);
    answered = (n < 200);
    rd = vax_rdata;
    vax_req = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [15:0] model [256];
    logic [15:0] d, rd;
    logic [7:0] r;
    bit ans;
    foreach (model[i]) model[i] = 16'(i * 3 + 1);
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      r = 8'($urandom);
      if ($urandom % 2) begin
        d = 16'($urandom);
        vax_cycle(1, BASE + {r, 1'b0}, d, rd, ans);
        model[r] = d;
        check(ans && regs[r] == d, $sformatf("write reg %0d through the cable", r));
      end else begin
        vax_cycle(0, BASE + {r, 1'b0}, 0, rd, ans);
        check(ans && rd == model[r], $sformatf("read reg %0d through the cable", r));
      end
    end
    vax_cycle(0, BASE - 2, 0, rd, ans);
    check(!ans, "below the block not answered");
    vax_cycle(0, BASE + 18'd512, 0, rd, ans);
    check(!ans, "above the block not answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
