// cesr_mpm_top: the multi-port memory (MPM) system of the CESR control system
// with its VAX and XBUS-processor interfaces.
//
// The MPM crate holds the system controller (reset, 16-way round-robin
// arbiter, 1 us bus timer), the 4 Mbyte ECC memory, the semaphore board and
// the FIFO board, and one interface slave board per connected computer. Each
// slave board is a bus master on the MPM backplane and is cabled to a master
// board in its computer:
//   * NVAX VAX-to-MPM pairs (slots 0..NVAX-1): a VAX reaches the MPM through
//     32 register sets in a 512-byte I/O block, 16 bits at a time;
//   * NXBP VME-to-MPM pairs (slots NVAX..NVAX+NXBP-1): an XBUS processor
//     (XBP) sees the MPM as a 13 Mbyte window of its own VMEbus.
// The computers themselves (VAX CPUs, the XBP CPU boards, their XBUS drivers
// and crates) are outside; their bus sides are this module's ports. The
// remaining backplane slots are empty.
// Interface: clk is the 16 MHz SYSCLK; power_good and reset_sw start the
// SYSRESET one-shot, which also resets every XBP master board through its
// cable (xbp_reset). vax_init resets a VAX master board. vax_* and xbp_* are
// the local buses described in vax_mpm_master and vme_mpm_master.
// ecc_flip_mask is the memory board's diagnostic error injection.
// The board set, the slot count, the ten connected computers (four VAXes and
// six XBPs) and all protocols' outlines follow the system's description; the
// details noted in each board's header are this design's.
module cesr_mpm_top
  import mpm_pkg::*;
#(
  parameter int unsigned NVAX           = 4,
  parameter int unsigned NXBP           = 6,
  parameter int unsigned TIMEOUT_CYCLES = 16,
  parameter int unsigned RESET_CYCLES   = 3_200_000,
  parameter int unsigned MEM_ACCESS     = 4,
  parameter int unsigned VAX_SETS       = 32,
  parameter int unsigned FIFO_DEPTH     = 512
) (
  input  logic                  clk,
  input  logic                  power_good,
  input  logic                  reset_sw,
  output logic                  sysreset,
  // VAX I/O buses
  input  logic [NVAX-1:0]       vax_init,
  input  logic [NVAX-1:0]       vax_req,
  input  logic [NVAX-1:0]       vax_write,
  input  logic [NVAX-1:0][17:0] vax_addr,
  input  logic [NVAX-1:0][15:0] vax_wdata,
  output logic [NVAX-1:0]       vax_ack,
  output logic [NVAX-1:0][15:0] vax_rdata,
  // XBP VMEbuses
  input  logic [NXBP-1:0]       xbp_as,
  input  logic [NXBP-1:0]       xbp_write,
  input  logic [NXBP-1:0][31:0] xbp_addr,
  input  logic [NXBP-1:0][31:0] xbp_wdata,
  output logic [NXBP-1:0]       xbp_dtack,
  output logic [NXBP-1:0]       xbp_berr,
  output logic [NXBP-1:0][31:0] xbp_rdata,
  output logic [NXBP-1:0]       xbp_reset,
  // observation and diagnostics
  input  logic [38:0]           ecc_flip_mask,
  output logic                  ecc_corrected,
  output logic                  ecc_uncorrectable,
  output logic [NSLOT-1:0]      bus_grant,
  output logic                  bus_timeout,
  output logic [15:0]           fifo_not_empty,
  output logic                  sem_ready
);
  mpm_req_t         mreq [NSLOT];
  logic [NSLOT-1:0] br, bg;
  mpm_req_t         bus;
  mpm_rsp_t         rsp, mem_rsp, sem_rsp, fifo_rsp;
  logic             mem_sel, sem_sel, fifo_sel, slave_ack, timer_berr;
  logic             cyc_end, bus_busy;

  // ---------------- system controller and backplane ----------------
  sys_controller #(
    .NREQ(NSLOT), .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .RESET_CYCLES(RESET_CYCLES)
  ) u_sysctl (
    .clk, .power_good, .reset_sw, .sysreset, .br, .bg,
    .bus_as(bus.as), .slave_ack, .berr(timer_berr), .cyc_end, .bus_busy
  );

  mpm_backplane #(.N(NSLOT)) u_bp (
    .mreq, .bg, .bus, .mem_sel, .sem_sel, .fifo_sel,
    .mem_rsp, .sem_rsp, .fifo_rsp, .timer_berr, .rsp, .slave_ack
  );

  assign bus_grant   = bg;
  assign bus_timeout = timer_berr;

  // ---------------- MPM slave boards ----------------
  mpm_memory #(.ACCESS_CYCLES(MEM_ACCESS)) u_mem (
    .clk, .rst(sysreset), .req(bus), .sel(mem_sel), .rsp(mem_rsp),
    .flip_mask(ecc_flip_mask), .corrected(ecc_corrected),
    .uncorrectable(ecc_uncorrectable)
  );

  semaphore_board u_sem (
    .clk, .rst(sysreset), .req(bus), .sel(sem_sel), .rsp(sem_rsp),
    .ready(sem_ready)
  );

  fifo_board #(.NFIFO(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst(sysreset), .req(bus), .sel(fifo_sel), .rsp(fifo_rsp),
    .not_empty(fifo_not_empty)
  );

  // ---------------- VAX-to-MPM interfaces ----------------
  for (genvar v = 0; v < NVAX; v++) begin : g_vax
    vax_m2s_t m2s;
    vax_s2m_t s2m;

    vax_mpm_master u_master (
      .clk, .rst(vax_init[v]), .vax_req(vax_req[v]), .vax_write(vax_write[v]),
      .vax_addr(vax_addr[v]), .vax_wdata(vax_wdata[v]), .vax_ack(vax_ack[v]),
      .vax_rdata(vax_rdata[v]), .m2s, .s2m
    );

    vax_mpm_slave #(.NSETS(VAX_SETS)) u_slave (
      .clk, .sysreset, .m2s, .s2m, .br(br[v]), .bg(bg[v]),
      .req(mreq[v]), .rsp
    );
  end

  // ---------------- VME-to-MPM interfaces ----------------
  for (genvar x = 0; x < NXBP; x++) begin : g_xbp
    vme_m2s_t m2s;
    vme_s2m_t s2m;

    vme_mpm_master u_master (
      .clk, .rst(xbp_reset[x]), .cpu_as(xbp_as[x]), .cpu_write(xbp_write[x]),
      .cpu_addr(xbp_addr[x]), .cpu_wdata(xbp_wdata[x]),
      .cpu_dtack(xbp_dtack[x]), .cpu_berr(xbp_berr[x]),
      .cpu_rdata(xbp_rdata[x]), .xbp_reset(xbp_reset[x]), .m2s, .s2m
    );

    vme_mpm_slave u_slave (
      .clk, .sysreset, .m2s, .s2m, .br(br[NVAX+x]), .bg(bg[NVAX+x]),
      .req(mreq[NVAX+x]), .rsp
    );
  end

  // ---------------- empty slots ----------------
  for (genvar e = NVAX + NXBP; e < NSLOT; e++) begin : g_empty
    assign br[e]   = 1'b0;
    assign mreq[e] = '0;
  end
endmodule
