// mpm_pkg: types and constants shared by the multi-port memory (MPM) system.
//
// The MPM is a VMEbus backplane into which up to sixteen interface boards
// (VAX-to-MPM and VME-to-MPM slaves) plug as bus masters, and which holds four
// slave boards: a 4 Mbyte ECC memory, a semaphore board (one test-and-set bit
// per longword of memory, at the memory address plus a constant) and a FIFO
// board of sixteen 9-bit by 512-word FIFOs. All transfers are 32-bit longwords.
//
// The backplane is modelled as a synchronous, point-to-point bus rather than
// the asynchronous wired-OR VMEbus:
//   * a master raises its bus request (BR) and holds it;
//   * the arbiter answers with a registered one-hot bus grant (BG);
//   * the owner raises AS with address, direction and write data, and holds
//     them until the addressed slave (or the bus timer) answers with a
//     one-cycle DTACK or BERR pulse; it then drops AS and BR together.
// One ownership covers exactly one read or one write, as on the real system.
// The address map (memory at 0, semaphores at +4 Mbyte, FIFO board at
// +8 Mbyte) is this design's choice; only the memory size, the 16 slots, the
// 16 MHz clock and the 1 us timeout come from the system's description.
package mpm_pkg;

  localparam int unsigned NSLOT        = 16;           // bus request/grant pairs
  localparam int unsigned SYSCLK_HZ    = 16_000_000;   // VMEbus SYSCLK
  localparam int unsigned MEM_BYTES    = 4 * 1024 * 1024;
  localparam logic [31:0] MEM_BASE     = 32'h0000_0000;
  localparam logic [31:0] SEM_BASE     = 32'h0040_0000; // semaphore = mem addr + SEM_BASE
  localparam logic [31:0] FIFO_BASE    = 32'h0080_0000;
  localparam logic [31:0] FIFO_SPAN    = 32'h0000_0100; // status/broadcast + 16 pop ports

  // one bus cycle as driven by the current owner
  typedef struct packed {
    logic        as;     // address strobe: a cycle is in progress
    logic        write;  // 1 = write, 0 = read
    logic [31:0] addr;   // byte address, longword aligned
    logic [31:0] wdata;
  } mpm_req_t;

  // answer from the addressed slave or from the bus timer
  typedef struct packed {
    logic        dtack;  // one-cycle pulse: cycle done
    logic        berr;   // one-cycle pulse: cycle failed
    logic [31:0] rdata;  // valid with dtack on a read
  } mpm_rsp_t;

  // VME-to-MPM cable, master board to slave board (32-bit multiplexed A/D)
  typedef struct packed {
    logic        as;     // address on the cable / transfer in progress
    logic        write;
    logic        ds;     // write: data on the cable; read: "send the data"
    logic [31:0] ad;
  } vme_m2s_t;

  // VME-to-MPM cable, slave board to master board
  typedef struct packed {
    logic        aack;   // address latched
    logic        dack;   // read: data valid on the cable; write: transfer complete
    logic        berr;   // the MPM cycle ended in a bus error (valid with dack)
    logic        reset;  // MPM SYSRESET passed on to the XBP crate
    logic [31:0] ad;
  } vme_s2m_t;

  // VAX-to-MPM cable, master board to slave board (16-bit multiplexed A/D)
  typedef struct packed {
    logic        as;     // register number on the cable
    logic        write;
    logic        ds;     // write: data on the cable; read: "send the data"
    logic [15:0] ad;
  } vax_m2s_t;

  // VAX-to-MPM cable, slave board to master board
  typedef struct packed {
    logic        aack;   // register number latched
    logic        dack;   // read: data valid; write: done
    logic [15:0] ad;
  } vax_s2m_t;

  // register within a VAX register set, address bits 3:2
  typedef enum logic [1:0] {
    VREG_STATUS = 2'd0,
    VREG_ADDR   = 2'd1,
    VREG_DATA   = 2'd2,
    VREG_AUTOINC = 2'd3
  } vax_reg_e;

endpackage
