// Body of the end-to-end tests of cesr_mpm_top, shared by the short test
// (reset one-shot shortened) and the full-size test (all defaults).
// The including module defines CESR_DUT_PARAMS (parameter override or empty)
// and CESR_TB_NAME.
//
// The test runs the system as its software uses it:
//   1. power-up reset, which must also reset every XBP master board;
//   2. all four VAXes and all six XBPs at once write and read back their own
//      memory areas (the VAXes through auto-incrementing register sets), so
//      the arbiter sees several requests at once;
//   3. a request packet (IRP) round: VAX 0 builds a packet in memory and
//      sends its number to all six XBPs with one multicast FIFO write; each
//      XBP polls the FIFO status word, pops its FIFO, reads the packet, and
//      under a semaphore clears its bit in the packet's START and DONE words
//      after writing its result; VAX 0 polls DONE until it reads zero;
//   4. an XBP addresses a non-existent device: the 1 us timer must end the
//      cycle with BERR 16 clocks after AS;
//   5. the ECC: a single-bit error is corrected, a double one gives BERR;
//   6. the manual reset switch resets the MPM and the XBPs, and the
//      semaphores come back clear.
// It counts how often each mechanism occurred and fails any that never did.
import mpm_pkg::*;

localparam int NV = 4, NX = 6;
logic clk = 0, power_good = 0, reset_sw = 0, sysreset;
logic [NV-1:0] vax_init = '1, vax_req = '0, vax_write = '0, vax_ack;
logic [NV-1:0][17:0] vax_addr = '0;
logic [NV-1:0][15:0] vax_wdata = '0, vax_rdata;
logic [NX-1:0] xbp_as = '0, xbp_write = '0, xbp_dtack, xbp_berr, xbp_reset;
logic [NX-1:0][31:0] xbp_addr = '0, xbp_wdata = '0, xbp_rdata;
logic [38:0] ecc_flip_mask = '0;
logic ecc_corrected, ecc_uncorrectable, bus_timeout, sem_ready;
logic [15:0] bus_grant, fifo_not_empty;
int checks = 0, failures = 0;

cesr_mpm_top `CESR_DUT_PARAMS dut (
  .clk, .power_good, .reset_sw, .sysreset,
  .vax_init, .vax_req, .vax_write, .vax_addr, .vax_wdata, .vax_ack, .vax_rdata,
  .xbp_as, .xbp_write, .xbp_addr, .xbp_wdata, .xbp_dtack, .xbp_berr, .xbp_rdata,
  .xbp_reset, .ecc_flip_mask, .ecc_corrected, .ecc_uncorrectable, .bus_grant,
  .bus_timeout, .fifo_not_empty, .sem_ready
);

always #31 clk = ~clk;   // 16 MHz

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
endtask

// ---------------- mechanism counters ----------------
int n_contend = 0, n_timeout = 0, n_corr = 0, n_unc = 0, n_sem_busy = 0;
int n_multicast = 0, n_autoinc = 0, n_xbp_reset = 0, n_switch = 0, n_handover = 0;
logic [15:0] prev_grant = '0;
always @(posedge clk) begin
  if ($countones(dut.br) > 1) n_contend++;
  if (bus_timeout) n_timeout++;
  if (ecc_corrected) n_corr++;
  if (ecc_uncorrectable) n_unc++;
  if (bus_grant != 0 && prev_grant != 0 && bus_grant != prev_grant) n_handover++;
  prev_grant <= bus_grant;
end

// ---------------- VAX side ----------------
localparam logic [17:0] DEV = 18'o764000;

task automatic vax_io(input int v, input bit wr, input int set, input int rg,
                      input bit lower, input logic [15:0] d, output logic [15:0] rd);
  int n;
  vax_addr[v] = DEV + 18'({5'(set), 2'(rg), lower, 1'b0});
  vax_write[v] = wr; vax_wdata[v] = d; vax_req[v] = 1;
  n = 1;
  @(negedge clk);
  while (!vax_ack[v] && n < 2000) begin @(negedge clk); n++; end
  check(n < 2000, "VAX access answered");
  rd = vax_rdata[v];
  vax_req[v] = 0;
  @(negedge clk);
endtask

task automatic vax_set_addr(input int v, input int set, input logic [31:0] a);
  logic [15:0] rd;
  vax_io(v, 1, set, VREG_ADDR, 0, a[31:16], rd);
  vax_io(v, 1, set, VREG_ADDR, 1, a[15:0], rd);
endtask

task automatic vax_write32(input int v, input int set, input int rg, input logic [31:0] d);
  logic [15:0] rd;
  vax_io(v, 1, set, rg, 0, d[31:16], rd);
  vax_io(v, 1, set, rg, 1, d[15:0], rd);
endtask

task automatic vax_read32(input int v, input int set, input int rg, output logic [31:0] d);
  logic [15:0] hi, lo;
  vax_io(v, 0, set, rg, 0, 0, hi);
  vax_io(v, 0, set, rg, 1, 0, lo);
  d = {hi, lo};
endtask

// ---------------- XBP side ----------------
localparam logic [31:0] WIN = 32'h0030_0000;   // MPM address 0 as an XBP sees it

task automatic xbp_rw(input int x, input bit wr, input logic [31:0] mpm_a,
                      input logic [31:0] d, output logic [31:0] rd, output bit be);
  int n;
  xbp_addr[x] = WIN + mpm_a; xbp_write[x] = wr; xbp_wdata[x] = d; xbp_as[x] = 1;
  n = 1;
  @(negedge clk);
  while (!xbp_dtack[x] && !xbp_berr[x] && n < 2000) begin @(negedge clk); n++; end
  check(n < 2000, "XBP access answered");
  rd = xbp_rdata[x]; be = xbp_berr[x];
  xbp_as[x] = 0;
  @(negedge clk);
endtask

// acquire / release the semaphore guarding longword a
task automatic sem_lock(input int x, input logic [31:0] a);
  logic [31:0] rd; bit be;
  forever begin
    xbp_rw(x, 0, SEM_BASE + a, 0, rd, be);
    if (rd[0] == 0) break;
    n_sem_busy++;
  end
endtask

task automatic sem_unlock(input int x, input logic [31:0] a);
  logic [31:0] rd; bit be;
  xbp_rw(x, 1, SEM_BASE + a, 0, rd, be);
endtask

// clear bit b of word a under its semaphore, holding it a while
task automatic clear_bit_locked(input int x, input logic [31:0] a, input int b);
  logic [31:0] rd; bit be;
  sem_lock(x, a);
  xbp_rw(x, 0, a, 0, rd, be);
  repeat (20) @(negedge clk);
  xbp_rw(x, 1, a, rd & ~(32'd1 << b), rd, be);
  sem_unlock(x, a);
endtask

localparam int IRP_NUM  = 7;
localparam logic [31:0] IRP_BASE = 32'h0000_2000;
localparam logic [31:0] RESULTS  = 32'h0000_3000;

// ---------------- concurrent workers ----------------
// VAX v fills and reads back its own 24 longwords through an auto-increment
// register set of its own.
task automatic vax_worker(input int vv);
  logic [31:0] a0, got;
  logic [15:0] r16;
  int set;
  set = (vv * 7 + 3) % 32;
  a0 = 32'h0001_0000 + vv * 32'h1000;
  vax_set_addr(vv, set, a0);
  for (int k = 0; k < 24; k++) vax_write32(vv, set, VREG_AUTOINC, a0 ^ 32'(k * 77));
  vax_set_addr(vv, set, a0);
  for (int k = 0; k < 24; k++) begin
    vax_read32(vv, set, VREG_AUTOINC, got);
    check(got == (a0 ^ 32'(k * 77)), $sformatf("VAX %0d auto-increment word %0d", vv, k));
    if (got == (a0 ^ 32'(k * 77))) n_autoinc++;
  end
  vax_io(vv, 0, set, VREG_ADDR, 1, 0, r16);
  check(r16 == 16'(a0 + 24 * 4), "address register stepped by 4 per access");
endtask

// XBP x fills and reads back its own 32 longwords.
task automatic xbp_worker(input int xx);
  logic [31:0] a0, got;
  bit e;
  a0 = 32'h0010_0000 + xx * 32'h1000;
  for (int k = 0; k < 32; k++) xbp_rw(xx, 1, a0 + 4 * k, {8'(xx), 24'(k * 1001)}, got, e);
  for (int k = 0; k < 32; k++) begin
    xbp_rw(xx, 0, a0 + 4 * k, 0, got, e);
    check(!e && got == {8'(xx), 24'(k * 1001)}, $sformatf("XBP %0d word %0d", xx, k));
  end
endtask

// XBP x serves one IRP: wait for its FIFO, pop the packet number, clear its
// START bit, do the operation (write a result), clear its DONE bit.
task automatic xbp_irp(input int xx);
  logic [31:0] got, pk, op, vec;
  bit e;
  int slot, n;
  slot = NV + xx;
  n = 0;
  do begin
    xbp_rw(xx, 0, FIFO_BASE, 0, got, e);
    n++;
  end while (!got[slot] && n < 100);
  check(got[slot], $sformatf("XBP %0d sees its FIFO not empty", xx));
  xbp_rw(xx, 0, FIFO_BASE + 4 * (slot + 1), 0, got, e);
  check(got == IRP_NUM, $sformatf("XBP %0d pops the IRP number", xx));
  pk = IRP_BASE + got * 32;
  clear_bit_locked(xx, pk + 0, xx);                 // START
  xbp_rw(xx, 0, pk + 12, 0, op, e);
  xbp_rw(xx, 0, pk + 16, 0, vec, e);
  check(op == 32'h0A5A && vec == RESULTS, "packet contents");
  xbp_rw(xx, 1, vec + 4 * xx, op + xx, got, e);      // the "XBUS" result
  clear_bit_locked(xx, pk + 4, xx);                 // DONE
  xbp_rw(xx, 0, FIFO_BASE + 4 * (slot + 1), 0, got, e);
  check(got == 32'h8000_0000, "FIFO empty after the pop");
endtask

// a VAX (number 2, set 9) polls the packet's DONE word until it is zero
task automatic vax_poll_done(input logic [31:0] irp);
  logic [31:0] done_w;
  int polls;
  polls = 0;
  do begin
    vax_set_addr(2, 9, irp + 4);
    vax_read32(2, 9, VREG_DATA, done_w);
    polls++;
  end while (done_w != 0 && polls < 400);
  check(done_w == 0, "VAX sees every DONE bit cleared");
endtask

initial begin
  repeat (`CESR_WATCHDOG) @(posedge clk);
  failures++; $display("FAIL watchdog");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  logic [31:0] d, rd, irp;
  logic [15:0] r16;
  bit be;
  int t0;

  // ---- 1. power-up
  repeat (5) @(negedge clk);
  check(sysreset, "reset while power is not good");
  power_good = 1;
  vax_init = '0;
  @(negedge clk);
  check(xbp_reset == '1, "MPM reset reaches every XBP");
  if (xbp_reset == '1) n_xbp_reset++;
  while (sysreset) @(negedge clk);
  @(negedge clk);
  check(xbp_reset == '0, "XBP reset released");
  while (!sem_ready) @(negedge clk);

  // ---- 2. everybody at once
  fork
    vax_worker(0); vax_worker(1); vax_worker(2); vax_worker(3);
    xbp_worker(0); xbp_worker(1); xbp_worker(2);
    xbp_worker(3); xbp_worker(4); xbp_worker(5);
  join

  // ---- 3. IRP round: VAX 0 builds the packet and wakes all XBPs
  irp = IRP_BASE + IRP_NUM * 32;
  vax_set_addr(0, 0, irp);
  vax_write32(0, 0, VREG_AUTOINC, 32'h0000_003F);        // START: one bit per XBP
  vax_write32(0, 0, VREG_AUTOINC, 32'h0000_003F);        // DONE
  vax_write32(0, 0, VREG_AUTOINC, 32'h0000_0000);        // STATUS
  vax_write32(0, 0, VREG_AUTOINC, 32'h0000_0A5A);        // operation code
  vax_write32(0, 0, VREG_AUTOINC, RESULTS);              // data vector pointer
  // one multicast write: FIFOs of slots 4..9 (the XBPs), data = IRP number
  vax_set_addr(0, 1, FIFO_BASE);
  vax_write32(0, 1, VREG_DATA, {16'(6'h3F << NV), 7'd0, 9'(IRP_NUM)});
  n_multicast++;
  fork
    xbp_irp(0); xbp_irp(1); xbp_irp(2); xbp_irp(3); xbp_irp(4); xbp_irp(5);
    vax_poll_done(irp);
  join
  vax_set_addr(1, 4, irp);
  vax_read32(1, 4, VREG_DATA, d);
  check(d == 0, "every START bit cleared");
  vax_set_addr(1, 4, RESULTS);
  for (int x = 0; x < NX; x++) begin
    vax_read32(1, 4, VREG_AUTOINC, d);
    check(d == 32'h0A5A + x, $sformatf("result of XBP %0d", x));
  end
  check(fifo_not_empty == 0, "all FIFOs drained");

  // ---- 4. non-existent device: 1 us timeout
  fork
    xbp_rw(2, 0, 32'h00C0_0000, 0, rd, be);
    begin
      @(posedge dut.bus.as);
      t0 = 0;
      while (!bus_timeout && t0 < 100) begin @(negedge clk); t0++; end
    end
  join
  check(be, "XBP gets BERR from a non-existent device");
  // AS rises on clock edge 0; the timer sees it on edges 1..16 and its BERR
  // is visible after edge 16, i.e. at the 17th falling edge counted here
  check(t0 == 17, $sformatf("timeout after %0d clocks (1 us = 16)", t0 - 1));

  // ---- 4b. access times on an idle system, as seen by the computers.
  // A software call spends 25-60 us per vector element; the hardware's part
  // of one element (one 32-bit access) must be a small fraction of that.
  begin
    realtime ts;
    int c_xbp, c_vax;
    ts = $realtime;
    xbp_rw(1, 0, RESULTS, 0, rd, be);
    c_xbp = int'(($realtime - ts) / 62.0);
    vax_set_addr(1, 5, RESULTS);
    ts = $realtime;
    vax_read32(1, 5, VREG_DATA, d);
    c_vax = int'(($realtime - ts) / 62.0);
    $display("idle access: XBP 32-bit read %0d clocks, VAX 32-bit read (two 16-bit accesses) %0d clocks",
             c_xbp, c_vax);
    check(!be && rd == 32'h0A5A && d == 32'h0A5A, "idle reads return the data");
    check(c_xbp > 0 && c_xbp < 40, "XBP read under 2.5 us");
    check(c_vax > 0 && c_vax < 80, "VAX 32-bit read under 5 us");
  end

  // ---- 5. ECC
  vax_set_addr(3, 31, 32'h0000_4000);
  ecc_flip_mask = 39'd1 << 17;
  vax_write32(3, 31, VREG_DATA, 32'h1234_5678);
  ecc_flip_mask = '0;
  vax_read32(3, 31, VREG_DATA, d);
  check(d == 32'h1234_5678, "single-bit error corrected");
  ecc_flip_mask = (39'd1 << 3) | (39'd1 << 30);
  xbp_rw(5, 1, 32'h0000_4004, 32'hCAFE_F00D, rd, be);
  ecc_flip_mask = '0;
  xbp_rw(5, 0, 32'h0000_4004, 0, rd, be);
  check(be, "double-bit error gives BERR");
  vax_io(3, 0, 31, VREG_STATUS, 1, 0, r16);
  check(r16 == 0, "status clean after a good access");

  // ---- 6. manual reset
  xbp_rw(0, 0, SEM_BASE + 32'h0000_5000, 0, rd, be);   // leave one semaphore SET
  reset_sw = 1;
  repeat (4) @(negedge clk);
  check(sysreset && xbp_reset == '1, "switch resets the MPM and the XBPs");
  if (sysreset) n_switch++;
  reset_sw = 0;
  while (sysreset) @(negedge clk);
  while (!sem_ready) @(negedge clk);
  xbp_rw(0, 0, SEM_BASE + 32'h0000_5000, 0, rd, be);
  check(rd == 0, "semaphores clear after reset");
  xbp_rw(0, 0, RESULTS, 0, rd, be);
  check(rd == 32'h0A5A, "memory keeps its contents over a reset");

  // ---- mechanism report
  $display("mechanisms: contention=%0d handover=%0d timeout=%0d ecc_corr=%0d ecc_unc=%0d sem_busy=%0d multicast=%0d autoinc=%0d xbp_reset=%0d switch=%0d",
           n_contend, n_handover, n_timeout, n_corr, n_unc, n_sem_busy, n_multicast, n_autoinc, n_xbp_reset, n_switch);
  check(n_contend > 0, "bus contention happened");
  check(n_handover > 0, "back-to-back grant handover happened");
  check(n_timeout > 0, "bus timeout happened");
  check(n_corr > 0, "ECC correction happened");
  check(n_unc > 0, "ECC detection happened");
  check(n_sem_busy > 0, "a semaphore was found SET");
  check(n_multicast > 0, "multicast FIFO write happened");
  check(n_autoinc > 0, "auto-increment access happened");
  check(n_xbp_reset > 0, "reset reached the XBPs");
  check(n_switch > 0, "manual reset happened");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
