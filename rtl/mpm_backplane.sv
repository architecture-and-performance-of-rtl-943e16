// mpm_backplane: the MPM VMEbus backplane as a multiplexed, decoded bus.
//
// Connects up to NSLOT bus masters (the interface slave boards) with the
// three MPM slave boards and the system controller. The master holding the
// grant drives the bus; the others are ignored. The bus address is decoded
// into a select for the memory board (first 4 Mbyte), the semaphore board
// (SEM_BASE up to 4 Mbyte further) and the FIFO board (FIFO_SPAN bytes at
// FIFO_BASE). An address outside all three selects nothing; no slave
// answers and the system controller's timer ends the cycle with BERR. The
// answers of the slaves and the timer are ORed and sent to every master;
// only the owner acts on them.
// Interface: mreq/bg in, bus/rsp out, *_sel and *_rsp to and from the slave
// boards, timer_berr from the system controller, slave_ack to its timer.
// Purely combinational. Sixteen slots are the system's number; the address
// map is this design's, with the semaphores at a constant offset from the
// memory as the system describes.
module mpm_backplane
  import mpm_pkg::*;
#(
  parameter int unsigned N = NSLOT
) (
  input  mpm_req_t       mreq [N],
  input  logic [N-1:0]   bg,
  output mpm_req_t       bus,
  output logic           mem_sel,
  output logic           sem_sel,
  output logic           fifo_sel,
  input  mpm_rsp_t       mem_rsp,
  input  mpm_rsp_t       sem_rsp,
  input  mpm_rsp_t       fifo_rsp,
  input  logic           timer_berr,
  output mpm_rsp_t       rsp,
  output logic           slave_ack
);
  always_comb begin
    bus = '0;
    for (int unsigned i = 0; i < N; i++)
      if (bg[i]) bus = mreq[i];
  end

  assign mem_sel  = (bus.addr < MEM_BASE + MEM_BYTES);   // MEM_BASE is 0
  assign sem_sel  = (bus.addr >= SEM_BASE)  && (bus.addr < SEM_BASE + MEM_BYTES);
  assign fifo_sel = (bus.addr >= FIFO_BASE) && (bus.addr < FIFO_BASE + FIFO_SPAN);

  assign slave_ack = mem_rsp.dtack | mem_rsp.berr | sem_rsp.dtack | sem_rsp.berr
                   | fifo_rsp.dtack | fifo_rsp.berr;

  always_comb begin
    rsp       = '0;
    rsp.dtack = mem_rsp.dtack | sem_rsp.dtack | fifo_rsp.dtack;
    rsp.berr  = mem_rsp.berr  | sem_rsp.berr  | fifo_rsp.berr | timer_berr;
    rsp.rdata = mem_sel  ? mem_rsp.rdata  :
                sem_sel  ? sem_rsp.rdata  :
                fifo_sel ? fifo_rsp.rdata : '0;
  end
endmodule
